// center_of_mass: centroid of the pixels that pass the threshold.
//
// Watches the convolved pixel stream. Every pixel at or above the lower
// threshold adds its column to sum_x, its row to sum_y and one to a count.
// After the last pixel of a frame (row SW_WIRE_CNT-1, column RD_WIRE_CNT-1)
// the sums are latched and cleared, and two bit-serial dividers compute
// (sum * 2^FRAC_BITS) / count for both axes. When they finish, com_x and com_y
// hold the centroid in cell units with FRAC_BITS fraction bits, com_valid says
// whether any pixel passed in that frame, and com_update pulses for one clock.
// Results follow the frame end by about W_SUM+FRAC_BITS clocks, well inside the
// next frame. Summing the passing pixels and dividing by their number follows
// the report; counting each passing pixel once (not weighting it by its value),
// the fraction bits and the divider are this design's.
module center_of_mass #(
  parameter int unsigned SW_WIRE_CNT = 16,
  parameter int unsigned RD_WIRE_CNT = 16,
  parameter int unsigned DATA_W      = 12,
  parameter int unsigned FRAC_BITS   = 4,
  parameter int unsigned RW = (SW_WIRE_CNT > 1) ? $clog2(SW_WIRE_CNT) : 1,
  parameter int unsigned CW = (RD_WIRE_CNT > 1) ? $clog2(RD_WIRE_CNT) : 1
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic [DATA_W-1:0]       lower,
  input  logic                    in_valid,
  input  logic [DATA_W-1:0]       in_pix,
  input  logic [RW-1:0]           in_row,
  input  logic [CW-1:0]           in_col,
  output logic [CW+FRAC_BITS-1:0] com_x,      // column, fixed point
  output logic [RW+FRAC_BITS-1:0] com_y,      // row, fixed point
  output logic                    com_valid,  // some pixel passed last frame
  output logic                    com_update  // new result this clock
);
  localparam int unsigned NPIX  = SW_WIRE_CNT * RD_WIRE_CNT;
  localparam int unsigned NW    = $clog2(NPIX + 1);
  localparam int unsigned SXW   = $clog2(NPIX * RD_WIRE_CNT + 1);
  localparam int unsigned SYW   = $clog2(NPIX * SW_WIRE_CNT + 1);
  localparam int unsigned XNUMW = SXW + FRAC_BITS;
  localparam int unsigned YNUMW = SYW + FRAC_BITS;

  logic [SXW-1:0] sum_x;
  logic [SYW-1:0] sum_y;
  logic [NW-1:0]  cnt;
  logic           start;
  logic [XNUMW-1:0] num_x;
  logic [YNUMW-1:0] num_y;
  logic [NW-1:0]    den;

  wire pass      = in_valid && (in_pix >= lower);
  wire frame_end = in_valid && (in_row == RW'(SW_WIRE_CNT - 1)) &&
                   (in_col == CW'(RD_WIRE_CNT - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      sum_x <= '0;
      sum_y <= '0;
      cnt   <= '0;
      start <= 1'b0;
      num_x <= '0;
      num_y <= '0;
      den   <= '0;
    end else begin
      start <= 1'b0;
      if (frame_end) begin
        num_x <= {sum_x + (pass ? SXW'(in_col) : '0), {FRAC_BITS{1'b0}}};
        num_y <= {sum_y + (pass ? SYW'(in_row) : '0), {FRAC_BITS{1'b0}}};
        den   <= cnt + (pass ? NW'(1) : '0);
        start <= 1'b1;
        sum_x <= '0;
        sum_y <= '0;
        cnt   <= '0;
      end else if (pass) begin
        sum_x <= sum_x + SXW'(in_col);
        sum_y <= sum_y + SYW'(in_row);
        cnt   <= cnt + 1'b1;
      end
    end
  end

  logic [XNUMW-1:0] qx;
  logic [YNUMW-1:0] qy;
  logic             done_x, done_y, busy_x, busy_y;

  seq_divider #(.NUM_W(XNUMW), .DEN_W(NW)) u_div_x (
    .clk, .rst, .start, .num(num_x), .den, .busy(busy_x), .done(done_x), .quot(qx));
  seq_divider #(.NUM_W(YNUMW), .DEN_W(NW)) u_div_y (
    .clk, .rst, .start, .num(num_y), .den, .busy(busy_y), .done(done_y), .quot(qy));

  // both dividers start together; x has at least as many steps as y or vice
  // versa, so publish when the longer one is done
  localparam bit X_LONGER = (XNUMW >= YNUMW);
  wire all_done = X_LONGER ? done_x : done_y;

  always_ff @(posedge clk) begin
    if (rst) begin
      com_x      <= '0;
      com_y      <= '0;
      com_valid  <= 1'b0;
      com_update <= 1'b0;
    end else begin
      com_update <= 1'b0;
      if (all_done) begin
        com_valid  <= (den != '0);
        com_update <= 1'b1;
        if (den != '0) begin
          com_x <= qx[CW+FRAC_BITS-1:0];
          com_y <= qy[RW+FRAC_BITS-1:0];
        end
      end
    end
  end
endmodule
