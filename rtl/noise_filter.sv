// noise_filter: applies the user thresholds to the raw pixel stream.
//
// A pixel below the lower threshold is treated as noise and becomes 0; a pixel
// above the upper threshold is clipped to the upper threshold; anything in
// between passes unchanged. One register stage: the pixel, its valid flag and
// its coordinates come out one clock after they go in (analysis stage 2).
// The report names threshold noise filtering ahead of the convolution but not
// its rule; zeroing below and clipping above is this design's reading.
module noise_filter #(
  parameter int unsigned DATA_W = 12,
  parameter int unsigned RW     = 4,
  parameter int unsigned CW     = 4
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [DATA_W-1:0] lower,
  input  logic [DATA_W-1:0] upper,
  input  logic              in_valid,
  input  logic [DATA_W-1:0] in_pix,
  input  logic [RW-1:0]     in_row,
  input  logic [CW-1:0]     in_col,
  output logic              out_valid,
  output logic [DATA_W-1:0] out_pix,
  output logic [RW-1:0]     out_row,
  output logic [CW-1:0]     out_col
);
  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out_pix   <= '0;
      out_row   <= '0;
      out_col   <= '0;
    end else begin
      out_valid <= in_valid;
      out_row   <= in_row;
      out_col   <= in_col;
      if (in_pix < lower)      out_pix <= '0;
      else if (in_pix > upper) out_pix <= upper;
      else                     out_pix <= in_pix;
    end
  end
endmodule
