// tb_motion_tracker: moves the centroid through cells and checks when motion
// is raised, which cells the trail holds, and that a pause longer than the
// timeout (shortened here to 200 clocks) drops motion and clears the trail.
module tb_motion_tracker;
  localparam int TO = 200;
  logic clk = 0, rst = 1;
  logic com_update = 0, com_valid = 0;
  logic [7:0] com_x = 0, com_y = 0;
  logic motion;
  logic [255:0] trail;
  int checks = 0, failures = 0;

  motion_tracker #(.TIMEOUT_CYCLES(TO)) dut (.clk, .rst, .com_update, .com_valid,
                                             .com_x, .com_y, .motion, .trail);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // present a centroid at cell (r, c) with some fraction bits
  task automatic put(input int r, input int c, input bit v = 1);
    com_x = 8'(c * 16 + $urandom_range(0, 15));
    com_y = 8'(r * 16 + $urandom_range(0, 15));
    com_valid = v;
    com_update = 1;
    @(posedge clk); #1;
    com_update = 0;
  endtask

  task automatic expect_state(input bit m, input logic [255:0] t, input string what);
    checks++;
    if (motion !== m || trail !== t) begin
      failures++;
      $display("FAIL %s: motion %b trail %h", what, motion, trail);
    end
  endtask

  function automatic logic [255:0] bit_of(int r, int c);
    return 256'(1) << (r * 16 + c);
  endfunction

  initial begin
    logic [255:0] t;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    put(3, 3);
    expect_state(0, bit_of(3, 3), "start");
    repeat (50) @(posedge clk); #1;
    put(3, 3);                         // same cell: nothing new
    expect_state(0, bit_of(3, 3), "same cell");
    put(3, 4);
    expect_state(0, bit_of(3, 3) | bit_of(3, 4), "second cell");
    repeat (TO - 20) @(posedge clk); #1;
    put(4, 4);                         // third cell inside the timeout
    t = bit_of(3, 3) | bit_of(3, 4) | bit_of(4, 4);
    expect_state(1, t, "third cell");
    put(5, 5);
    t |= bit_of(5, 5);
    expect_state(1, t, "fourth cell");
    repeat (TO - 5) @(posedge clk); #1;
    expect_state(1, t, "before timeout");
    repeat (10) @(posedge clk); #1;
    expect_state(0, '0, "after timeout");
    // a slow walk: each move longer than the timeout never raises motion
    for (int k = 0; k < 4; k++) begin
      put(8, k);
      repeat (TO + 10) @(posedge clk); #1;
      checks++;
      if (motion) begin failures++; $display("FAIL slow walk raised motion"); end
    end
    // a fast walk across a row
    for (int k = 0; k < 6; k++) put(10, k + 2);
    t = '0;
    for (int k = 0; k < 6; k++) t |= bit_of(10, k + 2);
    expect_state(1, t, "fast walk");
    // centroid gone: invalid updates are not moves
    repeat (20) put(0, 0, 0);
    expect_state(1, t, "invalid ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
