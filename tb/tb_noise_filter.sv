// tb_noise_filter: random pixels and thresholds against the filtering rule,
// including the one-clock latency of pixel, valid and coordinates.
module tb_noise_filter;
  logic clk = 0, rst = 1;
  logic [11:0] lower, upper, in_pix, out_pix;
  logic in_valid, out_valid;
  logic [3:0] in_row, in_col, out_row, out_col;
  int checks = 0, failures = 0;

  noise_filter dut (.clk, .rst, .lower, .upper, .in_valid, .in_pix, .in_row, .in_col,
                    .out_valid, .out_pix, .out_row, .out_col);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [11:0] e;
    int zeroed = 0, clipped = 0, passed = 0;
    lower = 0; upper = 0; in_pix = 0; in_valid = 0; in_row = 0; in_col = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 2000; n++) begin
      lower = 12'($urandom_range(0, 2047));
      upper = 12'($urandom_range(2048, 4095));
      in_pix = 12'($urandom);
      in_valid = $urandom_range(0, 1);
      in_row = 4'($urandom); in_col = 4'($urandom);
      if (in_pix < lower) begin e = 0; zeroed++; end
      else if (in_pix > upper) begin e = upper; clipped++; end
      else begin e = in_pix; passed++; end
      @(posedge clk); #1;
      checks++;
      if (out_pix != e || out_valid != in_valid || out_row != in_row || out_col != in_col) begin
        failures++; $display("FAIL pix %h lo %h hi %h -> %h", in_pix, lower, upper, out_pix);
      end
    end
    checks++;
    if (zeroed == 0 || clipped == 0 || passed == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
