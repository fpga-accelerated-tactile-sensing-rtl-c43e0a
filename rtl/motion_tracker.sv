// motion_tracker: detects the pressure centroid moving across the sensor.
//
// Takes the centroid from center_of_mass (fixed point; only the integer cell
// is used) on every com_update. When the centroid enters a different cell
// (switching wire, reading wire pair) than the last one, that cell's bit is set
// in the trail map and the count of cells crossed goes up, and a timer restarts.
// Once three cells have been crossed without a TIMEOUT_CYCLES gap between
// moves, motion is raised and the VGA overlay paints the trail cells blue. If
// the centroid stays in one cell (or disappears) for TIMEOUT_CYCLES clocks,
// motion drops, the trail is cleared and counting starts over from the
// current cell. The three-cell rule, the trail of crossed cells and the
// timeout follow the report; the timeout's default of 0.5 s (32,500,000 clocks
// at 65 MHz) and counting the starting cell as the first are this design's.
module motion_tracker #(
  parameter int unsigned SW_WIRE_CNT    = 16,
  parameter int unsigned RD_WIRE_CNT    = 16,
  parameter int unsigned FRAC_BITS      = 4,
  parameter int unsigned TIMEOUT_CYCLES = 32_500_000,
  parameter int unsigned MIN_CELLS      = 3,
  parameter int unsigned RW = (SW_WIRE_CNT > 1) ? $clog2(SW_WIRE_CNT) : 1,
  parameter int unsigned CW = (RD_WIRE_CNT > 1) ? $clog2(RD_WIRE_CNT) : 1
) (
  input  logic                                 clk,
  input  logic                                 rst,
  input  logic                                 com_update,
  input  logic                                 com_valid,
  input  logic [CW+FRAC_BITS-1:0]              com_x,
  input  logic [RW+FRAC_BITS-1:0]              com_y,
  output logic                                 motion,  // >= MIN_CELLS crossed
  output logic [SW_WIRE_CNT*RD_WIRE_CNT-1:0]   trail    // bit row*RD+col
);
  localparam int unsigned NCELL = SW_WIRE_CNT * RD_WIRE_CNT;
  localparam int unsigned TW    = $clog2(TIMEOUT_CYCLES + 1);
  localparam int unsigned KW    = $clog2(MIN_CELLS + 1);
  localparam int unsigned AW    = (NCELL > 1) ? $clog2(NCELL) : 1;

  logic [RW-1:0] last_row;
  logic [CW-1:0] last_col;
  logic          have_last;
  logic [TW-1:0] timer;
  logic [KW-1:0] cells;

  wire [RW-1:0] row = com_y[RW+FRAC_BITS-1:FRAC_BITS];
  wire [CW-1:0] col = com_x[CW+FRAC_BITS-1:FRAC_BITS];
  wire [AW-1:0] idx = AW'(row) * AW'(RD_WIRE_CNT) + AW'(col);
  wire          sample  = com_update && com_valid;
  wire          moved   = sample && have_last && (row != last_row || col != last_col);
  wire          expired = (timer == TW'(TIMEOUT_CYCLES));

  always_ff @(posedge clk) begin
    if (rst) begin
      last_row  <= '0;
      last_col  <= '0;
      have_last <= 1'b0;
      timer     <= '0;
      cells     <= '0;
      trail     <= '0;
    end else begin
      if (!expired) timer <= timer + 1'b1;
      if (sample && (!have_last || expired)) begin
        // first sighting, or first one after a timeout: start a new track
        have_last <= 1'b1;
        last_row  <= row;
        last_col  <= col;
        cells     <= KW'(1);
        trail     <= '0;
        trail[idx] <= 1'b1;
        timer     <= '0;
      end else if (moved) begin
        last_row   <= row;
        last_col   <= col;
        if (cells != KW'(MIN_CELLS)) cells <= cells + 1'b1;
        trail[idx] <= 1'b1;
        timer      <= '0;
      end else if (expired) begin
        cells <= '0;
        trail <= '0;
      end
    end
  end

  assign motion = (cells >= KW'(MIN_CELLS));
endmodule
