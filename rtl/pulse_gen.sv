// pulse_gen: paces the wire scan so that wires only change between conversions.
//
// Runs on the ADC clock. One ADC conversion takes 16 clocks (4 leading zeros
// and 12 data bits) plus ADC_TQUIET clocks with chip select high, so a counter
// steps through 16+ADC_TQUIET clocks and raises rd_pulse for one clock on the
// last of them: the read wire advances exactly when a conversion has ended.
// A second counter counts rd_pulses and raises sw_pulse together with every
// RD_WIRE_CNT-th rd_pulse, so the switching wire advances once per row.
// The period (16+ADC_TQUIET) and the once-per-row switching pulse follow the
// report; the pulse sits on the last clock of the conversion, which is this
// design's choice, and matches adc_reader, which starts its count from the same
// reset.
module pulse_gen #(
  parameter int unsigned ADC_TQUIET  = 4,
  parameter int unsigned RD_WIRE_CNT = 16
) (
  input  logic clk,        // ADC clock
  input  logic rst,        // synchronous, active high
  output logic rd_pulse,   // advance the read wire
  output logic sw_pulse    // advance the switching wire
);
  localparam int unsigned PERIOD = 16 + ADC_TQUIET;
  localparam int unsigned PW = $clog2(PERIOD);
  localparam int unsigned RW = (RD_WIRE_CNT > 1) ? $clog2(RD_WIRE_CNT) : 1;

  logic [PW-1:0] cyc;
  logic [RW-1:0] rd_cnt;

  wire last_cyc = (cyc == PW'(PERIOD - 1));
  wire last_rd  = (rd_cnt == RW'(RD_WIRE_CNT - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      cyc    <= '0;
      rd_cnt <= '0;
    end else begin
      cyc <= last_cyc ? '0 : cyc + 1'b1;
      if (last_cyc) rd_cnt <= last_rd ? '0 : rd_cnt + 1'b1;
    end
  end

  assign rd_pulse = last_cyc;
  assign sw_pulse = last_cyc && last_rd;
endmodule
