// heatmap: turns a 12-bit pressure value into a heat-map colour.
//
// The value is first scaled to a combined colour index 0..767
// (index = value * 3 / 16). The index is split into thirds: the first third
// ramps red from 0 to 255, the second ramps green with red full, the last
// ramps blue with red and green full, giving black -> red -> yellow -> white.
// One register stage: colour appears one clock after the value. The 0..767
// index and its three thirds for R, G and B follow the report; keeping the
// earlier channels full while the next one ramps is this design's reading.
module heatmap
  import tactile_pkg::*;
(
  input  logic   clk,
  input  pixel_t value,
  output rgb_t   rgb
);
  wire [13:0] prod  = {value, 1'b0} + {1'b0, value};   // value * 3
  wire [9:0]  index = prod[13:4];                        // 0..767

  always_ff @(posedge clk) begin
    if (index < 10'd256)      rgb <= '{r: index[7:0], g: 8'd0,        b: 8'd0};
    else if (index < 10'd512) rgb <= '{r: 8'd255,     g: index[7:0],  b: 8'd0};
    else                      rgb <= '{r: 8'd255,     g: 8'd255,      b: index[7:0]};
  end
endmodule
