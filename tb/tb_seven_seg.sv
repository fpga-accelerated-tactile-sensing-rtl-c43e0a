// tb_seven_seg: checks that the display cycles through all eight digits, each
// showing the right hex digit of {0, upper, 0, lower}, and that the decimal
// point marks the edited digit; the refresh time is shortened to 4 clocks.
module tb_seven_seg;
  logic clk = 0, rst = 1;
  logic [11:0] upper = 12'hA5C, lower = 12'h31F;
  logic sel_upper = 1;
  logic [1:0] nibble_sel = 2'd1;
  logic [6:0] seg_n;
  logic dp_n;
  logic [7:0] an_n;
  int checks = 0, failures = 0;

  seven_seg #(.REFRESH_CYCLES(4)) dut (.clk, .rst, .upper, .lower, .sel_upper, .nibble_sel,
                                       .seg_n, .dp_n, .an_n);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // segment patterns {g..a}, active high, for 0..F
  logic [6:0] pat [16] = '{7'h3F, 7'h06, 7'h5B, 7'h4F, 7'h66, 7'h6D, 7'h7D, 7'h07,
                           7'h7F, 7'h6F, 7'h77, 7'h7C, 7'h39, 7'h5E, 7'h79, 7'h71};

  initial begin
    logic [31:0] shown;
    int seen;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int pass = 0; pass < 2; pass++) begin
      if (pass == 1) begin upper = 12'h7E0; lower = 12'hB29; sel_upper = 0; nibble_sel = 2'd2; end
      shown = {4'h0, upper, 4'h0, lower};
      seen = 0;
      repeat (4 * 8 * 2) begin
        @(posedge clk); #1;
        for (int d = 0; d < 8; d++) begin
          if (an_n == ~(8'b1 << d)) begin
            seen |= 1 << d;
            checks++;
            if (seg_n != ~pat[shown[4*d +: 4]] || dp_n != (d != int'({sel_upper, nibble_sel}))) begin
              failures++; $display("FAIL digit %0d seg %b dp %b", d, seg_n, dp_n);
            end
          end
        end
      end
      checks++;
      if (seen != 255) begin failures++; $display("FAIL digits seen %b", seen); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
