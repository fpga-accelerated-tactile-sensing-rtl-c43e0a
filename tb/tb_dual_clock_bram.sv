// tb_dual_clock_bram: writes random words on one clock and reads them back on
// an unrelated clock, checking the one-cycle read latency and the contents.
module tb_dual_clock_bram;
  logic clk_a = 0, clk_b = 0;
  logic we_a = 0;
  logic [7:0] addr_a = 0, addr_b = 0;
  logic [11:0] din_a = 0, dout_b;
  logic [11:0] model [256];
  int checks = 0, failures = 0;

  dual_clock_bram dut (.clk_a, .we_a, .addr_a, .din_a, .clk_b, .addr_b, .dout_b);

  always #7 clk_a = ~clk_a;    // slow write clock
  always #3 clk_b = ~clk_b;    // fast read clock

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) model[i] = '0;
    // initial contents are zero
    for (int i = 0; i < 16; i++) begin
      @(negedge clk_b) addr_b = 8'(i * 13);
      @(posedge clk_b); #1;
      checks++;
      if (dout_b != 12'd0) begin failures++; $display("FAIL init %0d", i); end
    end
    // fill with random data
    for (int i = 0; i < 600; i++) begin
      @(negedge clk_a);
      we_a = ($urandom_range(0, 3) != 0);
      addr_a = 8'($urandom);
      din_a = 12'($urandom);
      @(posedge clk_a); #1;
      if (we_a) model[addr_a] = din_a;
    end
    @(negedge clk_a) we_a = 0;
    // read everything back
    for (int i = 0; i < 256; i++) begin
      @(negedge clk_b) addr_b = 8'(i);
      @(posedge clk_b); #1;
      checks++;
      if (dout_b != model[i]) begin failures++; $display("FAIL addr %0d got %h exp %h", i, dout_b, model[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
