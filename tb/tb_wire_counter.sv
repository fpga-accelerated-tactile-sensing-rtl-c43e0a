// tb_wire_counter: random pulses against a reference count, for 16 wires and
// for a non-power-of-two count of 10.
module tb_wire_counter;
  logic clk = 0, rst = 1, pulse = 0;
  logic [3:0] c16, c10;
  int checks = 0, failures = 0;
  int ref16 = 0, ref10 = 0;

  wire_counter dut16 (.clk, .rst, .pulse, .count(c16));
  wire_counter #(.WIRE_CNT(10)) dut10 (.clk, .rst, .pulse, .count(c10));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 1000; n++) begin
      pulse = ($urandom_range(0, 2) != 0);
      @(posedge clk); #1;
      if (pulse) begin ref16 = (ref16 + 1) % 16; ref10 = (ref10 + 1) % 10; end
      checks += 2;
      if (c16 != 4'(ref16)) begin failures++; $display("FAIL c16 %0d exp %0d", c16, ref16); end
      if (c10 != 4'(ref10)) begin failures++; $display("FAIL c10 %0d exp %0d", c10, ref10); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
