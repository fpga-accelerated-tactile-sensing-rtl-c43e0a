// tb_adc_reader: reads random values from the ADC model, checks each value,
// the 16+ADC_TQUIET clock conversion period, chip-select timing, and that a
// word with a bad leading zero raises error instead of valid.
module tb_adc_reader;
  logic clk = 0, rst = 1;
  logic sdata, cs_n, valid, error;
  logic [11:0] data;
  int checks = 0, failures = 0;

  adc_reader dut (.clk, .rst, .sdata, .cs_n, .data, .valid, .error);
  sensor_adc_model #(.SW(1), .RD(1), .RW(1), .CW(1)) adc (
    .cs_n, .sclk(clk), .sw_sel(1'b0), .rd_sel(1'b0), .sdata);

  always #10 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0, last_valid = -1, low_cycles = 0;
  always @(posedge clk) begin
    cyc++;
    if (!cs_n) low_cycles++;
  end

  initial begin
    logic [11:0] v;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 60; n++) begin
      v = 12'($urandom);
      adc.press[0][0] = v;
      adc.bad_zeros = (n % 10 == 7);
      low_cycles = 0;
      // wait for the end of this conversion
      do begin @(posedge clk); #1; end while (!(valid || error));
      checks++;
      if (adc.bad_zeros) begin
        if (!error || valid) begin failures++; $display("FAIL bad zeros not flagged"); end
      end else if (!valid || data != v) begin
        failures++; $display("FAIL sample %0d: got %h exp %h", n, data, v);
      end
      checks++;
      if (low_cycles != 16) begin failures++; $display("FAIL cs low %0d cycles", low_cycles); end
      if (last_valid >= 0) begin
        checks++;
        if (cyc - last_valid != 20) begin failures++; $display("FAIL period %0d", cyc - last_valid); end
      end
      last_valid = cyc;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
