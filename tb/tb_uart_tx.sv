// tb_uart_tx: sends random bytes at the default 115,200 baud from 65 MHz and
// decodes the line here by sampling the middle of each bit; checks the bytes,
// the 564-clock bit time and the stop bit.
module tb_uart_tx;
  localparam int DIV = 65_000_000 / 115_200;   // 564
  localparam int NB = 12;
  logic clk = 0, rst = 1;
  logic [7:0] data = 0;
  logic valid = 0, ready, tx;
  int checks = 0, failures = 0;
  logic [7:0] sent [$];

  uart_tx dut (.clk, .rst, .data, .valid, .ready, .tx);

  always #5 clk = ~clk;

  initial begin
    repeat (DIV * 11 * (NB + 2)) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sender: offers bytes back to back
  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < NB; n++) begin
      data = 8'($urandom);
      valid = 1;
      while (!ready) begin @(posedge clk); #1; end
      // ready was high during this clock: the byte is taken at the next edge
      sent.push_back(data);
      @(posedge clk); #1;
      valid = 0;
    end
  end

  // receiver
  initial begin
    logic [7:0] b;
    int t0, t1;
    @(negedge rst);
    for (int n = 0; n < NB; n++) begin
      @(negedge tx);
      t0 = $time;
      repeat (DIV / 2) @(posedge clk);
      checks++;
      if (tx != 0) begin failures++; $display("FAIL start bit"); end
      for (int k = 0; k < 8; k++) begin
        repeat (DIV) @(posedge clk);
        b[k] = tx;
      end
      repeat (DIV) @(posedge clk);
      checks++;
      if (tx != 1) begin failures++; $display("FAIL stop bit"); end
      checks++;
      if (sent.size() == 0 || b != sent[0]) begin
        failures++; $display("FAIL byte %0d got %h", n, b);
      end
      if (sent.size() != 0) void'(sent.pop_front());
      // bit time: the next falling edge inside the byte (if any) is on the grid
      t1 = $time;
      checks++;
      if (((t1 - t0) / 10) != DIV / 2 + 9 * DIV) begin failures++; $display("FAIL timing"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // measure the start-bit length exactly
  initial begin
    int a, z;
    @(negedge rst);
    @(negedge tx); a = $time;
    @(posedge tx); z = $time;
    checks++;
    // first byte's LSB may also be 0; the low run is a multiple of the bit time
    if (((z - a) / 10) % DIV != 0) begin failures++; $display("FAIL start bit length %0d", (z - a) / 10); end
  end
endmodule
