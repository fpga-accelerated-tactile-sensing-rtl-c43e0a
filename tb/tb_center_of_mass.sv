// tb_center_of_mass: streams frames of random pixels with random thresholds
// and checks each published centroid against (sum << 4) / count computed
// here, including a frame in which no pixel passes.
module tb_center_of_mass;
  localparam int W = 16, H = 16, N = W * H, NF = 12;
  logic clk = 0, rst = 1;
  logic [11:0] lower = 0, in_pix = 0;
  logic in_valid = 0;
  logic [3:0] in_row = 0, in_col = 0;
  logic [7:0] com_x, com_y;
  logic com_valid, com_update;
  int checks = 0, failures = 0;

  center_of_mass dut (.clk, .rst, .lower, .in_valid, .in_pix, .in_row, .in_col,
                      .com_x, .com_y, .com_valid, .com_update);

  always #5 clk = ~clk;

  initial begin
    repeat (NF * N * 2 + 2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int exp_x [NF], exp_y [NF], exp_n [NF];
  int nres = 0;
  int frame_end_cyc = 0, cyc = 0;

  always @(posedge clk) begin
    cyc++;
    #1;
    if (com_update && !rst) begin
      checks++;
      if (exp_n[nres] == 0) begin
        if (com_valid) begin failures++; $display("FAIL frame %0d: valid with no pixel", nres); end
      end else if (!com_valid || int'(com_x) != exp_x[nres] || int'(com_y) != exp_y[nres]) begin
        failures++;
        $display("FAIL frame %0d: got (%0d,%0d) exp (%0d,%0d)", nres, com_x, com_y, exp_x[nres], exp_y[nres]);
      end
      // result must come before the next frame ends
      checks++;
      if (cyc - frame_end_cyc > N) begin failures++; $display("FAIL late result"); end
      nres++;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int f = 0; f < NF; f++) begin
      int sx, sy, n, cr, cc;
      logic [11:0] thr;
      thr = (f == 3) ? 12'hFFF : 12'($urandom_range(1000, 3800));
      cr = $urandom_range(0, H - 1); cc = $urandom_range(0, W - 1);
      sx = 0; sy = 0; n = 0;
      for (int i = 0; i < N; i++) begin
        int r, c, d;
        r = i / W; c = i % W;
        d = (r > cr ? r - cr : cr - r) + (c > cc ? c - cc : cc - c);
        lower = thr;
        in_valid = 1;
        in_row = 4'(r); in_col = 4'(c);
        // a pressure blob around (cr, cc) plus noise
        in_pix = (f == 3) ? 12'd100 : 12'((d < 5 ? 4000 - 700 * d : 200) + $urandom_range(0, 99));
        if (in_pix >= lower) begin sx += c; sy += r; n++; end
        @(posedge clk); #1;
      end
      frame_end_cyc = cyc;
      exp_n[f] = n;
      exp_x[f] = n ? (sx * 16) / n : 0;
      exp_y[f] = n ? (sy * 16) / n : 0;
    end
    in_valid = 0;
    repeat (100) @(posedge clk);
    checks++;
    if (nres != NF) begin failures++; $display("FAIL %0d results", nres); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
