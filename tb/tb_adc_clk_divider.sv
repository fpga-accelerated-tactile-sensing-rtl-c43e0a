// tb_adc_clk_divider: checks the ADC clock period and duty cycle for the
// default divider of 4 and for the odd dividers 3 and 5. Every period after
// reset is measured edge to edge, and the high and low times are compared
// with floor(DIV/2) low and the rest high.
module tb_adc_clk_divider;
  logic clk = 0, rst = 1;
  logic ck3, ck4, ck5;
  int checks = 0, failures = 0;

  adc_clk_divider dut4 (.clk, .rst, .adc_clk(ck4));
  adc_clk_divider #(.ADC_CLK_DIVIDE(5)) dut5 (.clk, .rst, .adc_clk(ck5));
  adc_clk_divider #(.ADC_CLK_DIVIDE(3)) dut3 (.clk, .rst, .adc_clk(ck3));

  // every period after reset, rising edge to rising edge, must be exactly DIV
  // reference clocks; checked for each divider on every rising edge
  int last3 = -1, last4 = -1, last5 = -1, cyc = 0;
  logic p3, p4, p5;
  always @(posedge clk) begin
    #1;
    cyc++;
    if (rst) begin
      last3 = -1; last4 = -1; last5 = -1;
    end else begin
      if (ck3 && !p3) begin
        if (last3 >= 0) begin
          checks++;
          if (cyc - last3 != 3) begin failures++; $display("FAIL div 3 period %0d", cyc - last3); end
        end
        last3 = cyc;
      end
      if (ck4 && !p4) begin
        if (last4 >= 0) begin
          checks++;
          if (cyc - last4 != 4) begin failures++; $display("FAIL div 4 period %0d", cyc - last4); end
        end
        last4 = cyc;
      end
      if (ck5 && !p5) begin
        if (last5 >= 0) begin
          checks++;
          if (cyc - last5 != 5) begin failures++; $display("FAIL div 5 period %0d", cyc - last5); end
        end
        last5 = cyc;
      end
    end
    p3 = ck3; p4 = ck4; p5 = ck5;
  end

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // measure high and low run lengths in clk cycles
  task automatic measure(input int div, input int exp_hi);
    int hi, lo, prev, run;
    logic v;
    prev = -1; run = 0;
    for (int n = 0; n < 12 * div; n++) begin
      @(posedge clk); #1;
      v = (div == 3) ? ck3 : (div == 4) ? ck4 : ck5;
      if (int'(v) == prev) run++;
      else begin
        if (prev == 1) hi = run; else if (prev == 0) lo = run;
        prev = int'(v); run = 1;
      end
    end
    checks++;
    if (hi != exp_hi || lo != div - exp_hi) begin
      failures++;
      $display("FAIL div %0d: high %0d low %0d", div, hi, lo);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (10) @(posedge clk);
    measure(4, 2);
    measure(5, 3);
    measure(3, 2);
    // period check: count rising edges of ck4 over 400 clocks
    begin
      automatic int edges = 0; automatic logic p = ck4;
      for (int n = 0; n < 400; n++) begin
        @(posedge clk); #1;
        if (ck4 && !p) edges++;
        p = ck4;
      end
      checks++;
      if (edges != 100) begin failures++; $display("FAIL edges %0d", edges); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
