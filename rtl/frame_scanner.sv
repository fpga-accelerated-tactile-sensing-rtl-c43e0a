// frame_scanner: streams the raw frame out of its RAM, one pixel per clock.
//
// A row/column counter pair walks the frame in raster order (row = switching
// wire, column = reading wire) on every clock and wraps at the end of the
// frame, so the analysis pipeline sees a continuous stream of frames at full
// throughput. rd_addr goes to the RAM's read port; one clock later the RAM
// word arrives together with out_valid, out_row and out_col from this module.
// This is pipeline stage 1 of the analysis path. The report gives the
// continuous stream at the 65 MHz clock; the raster order is this design's.
module frame_scanner #(
  parameter int unsigned SW_WIRE_CNT = 16,
  parameter int unsigned RD_WIRE_CNT = 16,
  localparam int unsigned RW = (SW_WIRE_CNT > 1) ? $clog2(SW_WIRE_CNT) : 1,
  localparam int unsigned CW = (RD_WIRE_CNT > 1) ? $clog2(RD_WIRE_CNT) : 1,
  localparam int unsigned AW = (SW_WIRE_CNT * RD_WIRE_CNT > 1) ? $clog2(SW_WIRE_CNT * RD_WIRE_CNT) : 1
) (
  input  logic          clk,
  input  logic          rst,       // synchronous, active high
  output logic [AW-1:0] rd_addr,   // RAM read address (row*RD_WIRE_CNT + col)
  output logic          out_valid, // RAM data of the previous address is valid
  output logic [RW-1:0] out_row,   // row of that data
  output logic [CW-1:0] out_col    // column of that data
);
  logic [RW-1:0] row;
  logic [CW-1:0] col;

  wire last_col = (col == CW'(RD_WIRE_CNT - 1));
  wire last_row = (row == RW'(SW_WIRE_CNT - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      row       <= '0;
      col       <= '0;
      out_valid <= 1'b0;
      out_row   <= '0;
      out_col   <= '0;
    end else begin
      col       <= last_col ? '0 : col + 1'b1;
      if (last_col) row <= last_row ? '0 : row + 1'b1;
      out_valid <= 1'b1;
      out_row   <= row;
      out_col   <= col;
    end
  end

  assign rd_addr = AW'(row) * AW'(RD_WIRE_CNT) + AW'(col);
endmodule
