// tb_vga_timing: runs one full 1024x768 frame and checks line and frame
// lengths, sync pulse positions and widths, and the blanking region.
module tb_vga_timing;
  logic clk = 0, rst = 1;
  logic [10:0] hcount;
  logic [9:0] vcount;
  logic hsync, vsync, blank;
  int checks = 0, failures = 0;

  vga_timing dut (.clk, .rst, .hcount, .vcount, .hsync, .vsync, .blank);

  always #5 clk = ~clk;

  initial begin
    repeat (1344 * 806 * 2 + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int h, v, hs_low, vs_low_lines, blank_cnt, errs;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    h = 0; v = 0; hs_low = 0; vs_low_lines = 0; blank_cnt = 0; errs = 0;
    for (int n = 0; n < 1344 * 806; n++) begin
      // expected position and outputs of this clock
      if (hcount != 11'(h) || vcount != 10'(v)) errs++;
      if (hsync != !(h >= 1048 && h < 1184)) errs++;
      if (vsync != !(v >= 771 && v < 777)) errs++;
      if (blank != (h >= 1024 || v >= 768)) errs++;
      if (!hsync) hs_low++;
      if (!vsync && h == 0) vs_low_lines++;
      if (!blank) blank_cnt++;
      h++;
      if (h == 1344) begin h = 0; v = (v + 1) % 806; end
      @(posedge clk); #1;
    end
    checks++;
    if (errs != 0) begin failures++; $display("FAIL %0d mismatches", errs); end
    checks++;
    if (hs_low != 136 * 806) begin failures++; $display("FAIL hsync low %0d", hs_low); end
    checks++;
    if (vs_low_lines != 6) begin failures++; $display("FAIL vsync lines %0d", vs_low_lines); end
    checks++;
    if (blank_cnt != 1024 * 768) begin failures++; $display("FAIL visible %0d", blank_cnt); end
    checks++;
    if (hcount != 0 || vcount != 0) begin failures++; $display("FAIL frame wrap"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
