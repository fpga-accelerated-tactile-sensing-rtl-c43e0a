// tb_heatmap: all 4096 input values against the colour gradient worked out
// here (index = value*3/16; red, then green, then blue ramps up).
module tb_heatmap;
  import tactile_pkg::*;
  logic clk = 0;
  pixel_t value = 0;
  rgb_t rgb;
  int checks = 0, failures = 0;

  heatmap dut (.clk, .value, .rgb);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int idx, er, eg, eb;
    for (int v = 0; v < 4096; v++) begin
      value = 12'(v);
      @(posedge clk); #1;
      idx = (v * 768) / 4096;
      er = idx < 256 ? idx : 255;
      eg = idx < 256 ? 0 : (idx < 512 ? idx - 256 : 255);
      eb = idx < 512 ? 0 : idx - 512;
      checks++;
      if (int'(rgb.r) != er || int'(rgb.g) != eg || int'(rgb.b) != eb) begin
        failures++;
        if (failures < 10) $display("FAIL %0d -> %0d %0d %0d", v, rgb.r, rgb.g, rgb.b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
