// tb_vga_scale: random screen positions, with and without mirroring, against
// the cell mapping computed here; checks the one-clock output register.
module tb_vga_scale;
  logic clk = 0;
  logic [10:0] hcount = 0;
  logic [9:0] vcount = 0;
  logic mirror = 0, in_range;
  logic [7:0] addr;
  logic [3:0] cell_row, cell_col;
  int checks = 0, failures = 0;

  vga_scale dut (.clk, .hcount, .vcount, .mirror, .in_range, .addr, .cell_row, .cell_col);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int h, v, r, c, ins, hits;
    hits = 0;
    for (int n = 0; n < 4000; n++) begin
      // mostly ins the 512x512 area at (256,128), sometimes just outside
      h = (n % 4 == 0) ? $urandom_range(0, 1343) : $urandom_range(250, 773);
      v = (n % 4 == 0) ? $urandom_range(0, 805) : $urandom_range(120, 645);
      hcount = 11'(h); vcount = 10'(v); mirror = n[4];
      @(posedge clk); #1;
      ins = (h >= 256 && h < 768 && v >= 128 && v < 640);
      checks++;
      if (in_range != ins[0]) begin failures++; $display("FAIL range at %0d,%0d", h, v); end
      if (ins) begin
        hits++;
        r = (v - 128) / 32;
        c = (h - 256) / 32;
        if (mirror) c = 15 - c;
        checks++;
        if (cell_row != 4'(r) || cell_col != 4'(c) || addr != 8'(r * 16 + c)) begin
          failures++; $display("FAIL cell at %0d,%0d m%0d: %0d,%0d", h, v, mirror, cell_row, cell_col);
        end
      end
    end
    checks++;
    if (hits < 1000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
