// adc_reader: SPI read-out of an AD7476A-style 12-bit ADC.
//
// Runs on the ADC clock, which is also the ADC's serial clock. One conversion
// lasts 16+ADC_TQUIET clocks: ADC_TQUIET clocks with chip select high (the
// quiet time, during which the analog multiplexers settle on the new wire),
// then 16 clocks with chip select low. On the 16 rising edges of the low phase
// the module samples sdata: first the ADC's four leading zeros, which it
// checks, then 12 data bits, MSB first, into a shift buffer. On the last edge
// it registers the value and raises valid for one clock, or raises error
// instead if a leading zero was 1. The ADC is assumed to present bit k after
// the k-th falling clock edge of the low phase, so every rising edge samples a
// settled bit.
// The frame (4 zeros, 12 bits, ADC_TQUIET quiet clocks, zero check, value plus
// valid) follows the report; the error output, the sampling edge and the
// quiet-first order after reset are this design's.
module adc_reader #(
  parameter int unsigned ADC_TQUIET = 4
) (
  input  logic        clk,     // ADC clock
  input  logic        rst,     // synchronous, active high
  input  logic        sdata,   // ADC serial data
  output logic        cs_n,    // ADC chip select, active low
  output logic [11:0] data,    // last good sample
  output logic        valid,   // one clock: data holds a new sample
  output logic        error    // one clock: leading zeros were not zero
);
  localparam int unsigned PERIOD = 16 + ADC_TQUIET;
  localparam int unsigned PW = $clog2(PERIOD + 1);

  logic [PW-1:0] cyc;      // position in the conversion period
  logic [10:0]   shreg;    // data bits received so far
  logic          lz_bad;   // a leading zero was 1

  wire          in_conv  = (cyc >= PW'(ADC_TQUIET));
  wire          in_zeros = in_conv && (cyc < PW'(ADC_TQUIET + 4));
  wire          last_cyc = (cyc == PW'(PERIOD - 1));
  wire [PW-1:0] cyc_next = last_cyc ? '0 : cyc + 1'b1;

  always_ff @(posedge clk) begin
    if (rst) begin
      cyc    <= '0;
      cs_n   <= 1'b1;
      shreg  <= '0;
      lz_bad <= 1'b0;
      data   <= '0;
      valid  <= 1'b0;
      error  <= 1'b0;
    end else begin
      cyc   <= cyc_next;
      cs_n  <= (cyc_next < PW'(ADC_TQUIET));
      valid <= 1'b0;
      error <= 1'b0;
      if (in_zeros) begin
        lz_bad <= lz_bad | sdata;
      end else if (in_conv) begin
        shreg <= {shreg[9:0], sdata};
      end
      if (last_cyc) begin
        lz_bad <= 1'b0;
        if (lz_bad) begin
          error <= 1'b1;
        end else begin
          data  <= {shreg, sdata};
          valid <= 1'b1;
        end
      end
    end
  end
endmodule
