// vga_mux: layers the overlays on top of the heat-map picture.
//
// For each screen pixel, in order of priority:
//   outside the sensor area or in blanking  -> black
//   crosshair (cross_en, centroid valid): the pixel lies on the vertical or
//     horizontal line through the centroid                  -> magenta
//   motion (motion_en, motion active): the pixel's cell_idx is in the trail -> blue
//   black-out (black_en): the cell_idx's value is below the lower threshold -> black
//   otherwise the heat-map colour.
// The centroid arrives in cell_idx units with FRAC_BITS fraction bits; its screen
// position is X0 + com_x*CELL_PX + CELL_PX/2 (and likewise for y), taken from
// the right edge when the picture is mirrored. All inputs must be aligned to
// the same screen pixel; the output is registered one clock later.
// The three overlays follow the report; colours and priority are this
// design's.
module vga_mux
  import tactile_pkg::*;
#(
  parameter int unsigned SW_WIRE_CNT = 16,
  parameter int unsigned RD_WIRE_CNT = 16,
  parameter int unsigned CELL_PX     = 32,
  parameter int unsigned X0          = 256,
  parameter int unsigned Y0          = 128,
  parameter int unsigned FRAC_BITS   = 4,
  parameter int unsigned RW = (SW_WIRE_CNT > 1) ? $clog2(SW_WIRE_CNT) : 1,
  parameter int unsigned CW = (RD_WIRE_CNT > 1) ? $clog2(RD_WIRE_CNT) : 1
) (
  input  logic                                clk,
  input  rgb_t                                heat,       // heat-map colour
  input  pixel_t                              value,      // cell_idx value
  input  logic                                in_range,
  input  logic                                blank,
  input  logic [RW-1:0]                       cell_row,
  input  logic [CW-1:0]                       cell_col,   // after mirroring
  input  logic [10:0]                         hcount,
  input  logic [9:0]                          vcount,
  input  logic                                mirror,
  input  pixel_t                              lower,
  input  logic [CW+FRAC_BITS-1:0]             com_x,
  input  logic [RW+FRAC_BITS-1:0]             com_y,
  input  logic                                com_valid,
  input  logic                                motion,
  input  logic [SW_WIRE_CNT*RD_WIRE_CNT-1:0]  trail,
  input  logic                                cross_en,
  input  logic                                motion_en,
  input  logic                                black_en,
  output rgb_t                                rgb
);
  localparam int unsigned AW = (SW_WIRE_CNT * RD_WIRE_CNT > 1) ? $clog2(SW_WIRE_CNT * RD_WIRE_CNT) : 1;
  localparam rgb_t BLACK   = '{r: 8'd0,   g: 8'd0, b: 8'd0};
  localparam rgb_t MAGENTA = '{r: 8'd255, g: 8'd0, b: 8'd255};
  localparam rgb_t BLUE    = '{r: 8'd0,   g: 8'd0, b: 8'd255};

  // centroid offset inside the sensor area, in screen pixels
  wire [21:0] off_x = (22'(com_x) * 22'(CELL_PX)) >> FRAC_BITS;
  wire [21:0] off_y = (22'(com_y) * 22'(CELL_PX)) >> FRAC_BITS;
  wire [21:0] cx = mirror ? 22'(X0 + RD_WIRE_CNT * CELL_PX - CELL_PX / 2) - off_x
                          : 22'(X0 + CELL_PX / 2) + off_x;
  wire [21:0] cy = 22'(Y0 + CELL_PX / 2) + off_y;

  wire on_cross = cross_en && com_valid &&
                  ((22'(hcount) == cx) || (22'(vcount) == cy));
  wire [AW-1:0] cell_idx = AW'(cell_row) * AW'(RD_WIRE_CNT) + AW'(cell_col);
  // the trail is recorded in sensor coordinates; cell_col is already mirrored
  // for the screen, which is the same cell_idx
  wire on_trail = motion_en && motion && trail[cell_idx];

  always_ff @(posedge clk) begin
    if (blank || !in_range)               rgb <= BLACK;
    else if (on_cross)                    rgb <= MAGENTA;
    else if (on_trail)                    rgb <= BLUE;
    else if (black_en && value < lower)   rgb <= BLACK;
    else                                  rgb <= heat;
  end
endmodule
