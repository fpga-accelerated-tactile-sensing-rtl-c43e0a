// tb_pulse_gen: checks that rd_pulse comes every 16+ADC_TQUIET clocks and
// sw_pulse with every RD_WIRE_CNT-th rd_pulse.
module tb_pulse_gen;
  logic clk = 0, rst = 1;
  logic rd_pulse, sw_pulse;
  int checks = 0, failures = 0;

  pulse_gen dut (.clk, .rst, .rd_pulse, .sw_pulse);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last_rd, last_sw, n_rd, n_sw, cyc;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    last_rd = -1; last_sw = -1; n_rd = 0; n_sw = 0; cyc = 0;
    while (n_sw < 5) begin
      @(posedge clk); #1;
      cyc++;
      if (rd_pulse) begin
        n_rd++;
        if (last_rd >= 0) begin
          checks++;
          if (cyc - last_rd != 20) begin failures++; $display("FAIL rd period %0d", cyc - last_rd); end
        end else begin
          checks++;
          // the count starts in the last reset cycle
          if (cyc != 19) begin failures++; $display("FAIL first rd pulse at %0d", cyc); end
        end
        last_rd = cyc;
      end
      if (sw_pulse) begin
        n_sw++;
        checks++;
        if (!rd_pulse) begin failures++; $display("FAIL sw without rd"); end
        checks++;
        if (n_rd != 16 * n_sw) begin failures++; $display("FAIL sw after %0d rd", n_rd); end
        if (last_sw >= 0) begin
          checks++;
          if (cyc - last_sw != 320) begin failures++; $display("FAIL sw period %0d", cyc - last_sw); end
        end
        last_sw = cyc;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
