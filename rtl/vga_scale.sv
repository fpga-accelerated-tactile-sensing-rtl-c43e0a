// vga_scale: maps the screen position to a sensor cell (scale and mirror).
//
// The sensor image is drawn as SW_WIRE_CNT x RD_WIRE_CNT square cells of
// CELL_PX x CELL_PX screen pixels with its top-left corner at (X0, Y0). For
// the current hcount/vcount the module decides whether the position is inside
// that area and, if so, which cell it shows: row = (vcount-Y0)/CELL_PX,
// column = (hcount-X0)/CELL_PX, the column reversed when mirror is set. It
// returns the cell's RAM address (row*RD_WIRE_CNT + column) for the frame
// RAM's read port, plus the cell coordinates for the overlays. All outputs are
// registered: one clock after hcount/vcount. Scaling and mirroring by hcount
// and vcount range tests follow the report; the cell size, the placement and
// a left-right mirror are this design's.
module vga_scale #(
  parameter int unsigned SW_WIRE_CNT = 16,
  parameter int unsigned RD_WIRE_CNT = 16,
  parameter int unsigned CELL_PX     = 32,
  parameter int unsigned X0          = 256,
  parameter int unsigned Y0          = 128,
  parameter int unsigned RW = (SW_WIRE_CNT > 1) ? $clog2(SW_WIRE_CNT) : 1,
  parameter int unsigned CW = (RD_WIRE_CNT > 1) ? $clog2(RD_WIRE_CNT) : 1,
  parameter int unsigned AW = (SW_WIRE_CNT * RD_WIRE_CNT > 1) ? $clog2(SW_WIRE_CNT * RD_WIRE_CNT) : 1
) (
  input  logic          clk,
  input  logic [10:0]   hcount,
  input  logic [9:0]    vcount,
  input  logic          mirror,
  output logic          in_range,
  output logic [AW-1:0] addr,
  output logic [RW-1:0] cell_row,
  output logic [CW-1:0] cell_col
);
  wire h_in = (hcount >= 11'(X0)) && (hcount < 11'(X0 + RD_WIRE_CNT * CELL_PX));
  wire v_in = (vcount >= 10'(Y0)) && (vcount < 10'(Y0 + SW_WIRE_CNT * CELL_PX));

  wire [10:0]   hx  = hcount - 11'(X0);
  wire [9:0]    vy  = vcount - 10'(Y0);
  wire [10:0]   c0  = hx / 11'(CELL_PX);
  wire [9:0]    r0  = vy / 10'(CELL_PX);
  wire [CW-1:0] col = mirror ? CW'(RD_WIRE_CNT - 1) - CW'(c0) : CW'(c0);
  wire [RW-1:0] row = RW'(r0);

  always_ff @(posedge clk) begin
    in_range <= h_in && v_in;
    cell_row <= row;
    cell_col <= col;
    addr     <= AW'(row) * AW'(RD_WIRE_CNT) + AW'(col);
  end
endmodule
