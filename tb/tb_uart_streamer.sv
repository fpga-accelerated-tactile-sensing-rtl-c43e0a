// tb_uart_streamer: feeds the streamer from a RAM model holding a random frame
// and accepts bytes with a random ready; checks two full frames of bytes
// (value >> 4, a value equal to the marker escaped to 1) each followed by the
// NEWFRAME_VALUE marker 0.
module tb_uart_streamer;
  logic clk = 0, rst = 1;
  logic [7:0] ram_addr, tx_data;
  logic [11:0] ram_data;
  logic tx_valid, tx_ready = 0;
  logic [11:0] ram [256];
  int checks = 0, failures = 0;

  uart_streamer dut (.clk, .rst, .ram_addr, .ram_data, .tx_data, .tx_valid, .tx_ready);

  always #5 clk = ~clk;
  always @(posedge clk) ram_data <= ram[ram_addr];

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int got, escaped, markers;
    logic [7:0] e;
    for (int i = 0; i < 256; i++) ram[i] = 12'($urandom);
    ram[5] = 12'h00F;     // scales to 0: must be escaped
    ram[6] = 12'h010;     // scales to 1
    repeat (2) @(posedge clk);
    #1 rst = 0;
    got = 0; escaped = 0; markers = 0;
    while (got < 2 * 257) begin
      tx_ready = ($urandom_range(0, 2) == 0);
      @(posedge clk);
      if (tx_ready && tx_valid) begin
        if (got % 257 == 256) begin
          e = 8'h00;
          markers++;
        end else begin
          e = ram[got % 257][11:4];
          if (e == 8'h00) begin e = 8'h01; escaped++; end
        end
        checks++;
        if (tx_data != e) begin failures++; $display("FAIL byte %0d got %h exp %h", got, tx_data, e); end
        got++;
      end
      #1;
    end
    checks++;
    if (markers != 2 || escaped < 2) begin failures++; $display("FAIL markers %0d escaped %0d", markers, escaped); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
