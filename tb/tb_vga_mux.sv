// tb_vga_mux: directed screen pixels for each overlay and their priority:
// blanking, crosshair (plain and mirrored), motion trail, black-out and the
// plain heat-map colour.
module tb_vga_mux;
  import tactile_pkg::*;
  logic clk = 0;
  rgb_t heat, rgb;
  pixel_t value, lower;
  logic in_range, blank, mirror, com_valid, motion, cross_en, motion_en, black_en;
  logic [3:0] cell_row, cell_col;
  logic [10:0] hcount;
  logic [9:0] vcount;
  logic [7:0] com_x, com_y;
  logic [255:0] trail;
  int checks = 0, failures = 0;

  vga_mux dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam rgb_t HEAT = '{r: 8'd200, g: 8'd100, b: 8'd0};
  localparam rgb_t BLK  = '{r: 8'd0, g: 8'd0, b: 8'd0};
  localparam rgb_t MAG  = '{r: 8'd255, g: 8'd0, b: 8'd255};
  localparam rgb_t BLU  = '{r: 8'd0, g: 8'd0, b: 8'd255};

  // put the screen at pixel (h, v), which lies in cell (h-256)/32, (v-128)/32
  task automatic at(input int h, input int v, input rgb_t exp, input string what);
    int c;
    hcount = 11'(h); vcount = 10'(v);
    in_range = (h >= 256 && h < 768 && v >= 128 && v < 640);
    c = (h - 256) / 32;
    cell_col = 4'(mirror ? 15 - c : c);
    cell_row = 4'((v - 128) / 32);
    @(posedge clk); #1;
    checks++;
    if (rgb != exp) begin
      failures++;
      $display("FAIL %s at %0d,%0d: %0d %0d %0d", what, h, v, rgb.r, rgb.g, rgb.b);
    end
  endtask

  initial begin
    heat = HEAT; value = 12'd500; lower = 12'd300; blank = 0; mirror = 0;
    com_valid = 1; motion = 0; cross_en = 0; motion_en = 0; black_en = 0;
    trail = '0;
    // centroid at cell column 5.5, row 2.25 -> screen x = 256+5.5*32+16 = 448,
    // y = 128+2.25*32+16 = 216
    com_x = 8'(5 * 16 + 8); com_y = 8'(2 * 16 + 4);
    at(300, 300, HEAT, "plain");
    at(100, 300, BLK, "outside");
    blank = 1; at(300, 300, BLK, "blank"); blank = 0;
    at(448, 500, HEAT, "cross disabled");
    cross_en = 1;
    at(448, 500, MAG, "cross vertical");
    at(300, 216, MAG, "cross horizontal");
    at(449, 500, HEAT, "next to cross");
    com_valid = 0; at(448, 500, HEAT, "no centroid"); com_valid = 1;
    // mirrored: x = 256 + 512 - (5.5*32 + 16) = 576
    mirror = 1;
    at(576, 500, MAG, "mirrored cross");
    at(448, 500, HEAT, "mirrored old spot");
    mirror = 0;
    // trail in cell (row 10, col 1) -> screen (256+32+5, 128+320+5)
    trail[10 * 16 + 1] = 1'b1;
    motion = 1;
    at(293, 453, HEAT, "motion disabled");
    motion_en = 1;
    at(293, 453, BLU, "trail cell");
    at(333, 453, HEAT, "cell outside trail");
    motion = 0; at(293, 453, HEAT, "no motion"); motion = 1;
    // the trail is stored in sensor coordinates; mirrored it is drawn at the
    // screen column of cell 15-1
    mirror = 1; at(256 + 14 * 32 + 5, 453, BLU, "mirrored trail"); mirror = 0;
    trail[10 * 16 + 6] = 1'b1;           // the cell under the vertical line
    at(448, 453, MAG, "cross over trail");
    at(448 + 8, 453, BLU, "trail beside cross");
    value = 12'd100;
    at(300, 300, HEAT, "black-out disabled");
    black_en = 1;
    at(300, 300, BLK, "black-out");
    value = 12'd300; at(300, 300, HEAT, "at threshold");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
