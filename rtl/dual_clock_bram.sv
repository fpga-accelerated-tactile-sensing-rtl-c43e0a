// dual_clock_bram: simple dual-port RAM with independent write and read clocks.
//
// Port A writes din_a to addr_a on clk_a when we_a is high. Port B reads
// addr_b on clk_b and returns the word on dout_b one clk_b cycle later
// (registered output, as a block RAM does). The contents start at zero. Used
// three times: for the raw frame (written on the ADC clock, read on the 65 MHz
// clock) and for the two copies of the convolved frame (both ports on the
// 65 MHz clock, one copy read by the VGA path, one by the UART path).
// Dual-port dual-clock storage follows the report; the one-cycle read latency
// and the zero initial contents are this design's. A read of the word being
// written in the same instant returns either the old or the new word.
module dual_clock_bram #(
  parameter int unsigned DATA_W = 12,
  parameter int unsigned DEPTH  = 256,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk_a,
  input  logic              we_a,
  input  logic [AW-1:0]     addr_a,
  input  logic [DATA_W-1:0] din_a,
  input  logic              clk_b,
  input  logic [AW-1:0]     addr_b,
  output logic [DATA_W-1:0] dout_b
);
  logic [DATA_W-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) mem[i] = '0;
  end

  always_ff @(posedge clk_a) begin
    if (we_a) mem[addr_a] <= din_a;
  end

  always_ff @(posedge clk_b) begin
    dout_b <= mem[addr_b];
  end
endmodule
