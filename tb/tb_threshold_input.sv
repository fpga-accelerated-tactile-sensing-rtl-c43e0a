// tb_threshold_input: presses the buttons (with contact bounce) to edit both
// thresholds nibble by nibble and checks the values after each press against
// a model kept here; the debounce time is shortened to 20 clocks.
module tb_threshold_input;
  localparam int DB = 20;
  logic clk = 0, rst = 1;
  logic sel_upper = 0, btn_up = 0, btn_down = 0, btn_left = 0, btn_right = 0;
  logic [11:0] lower, upper;
  logic [1:0] nibble_sel;
  int checks = 0, failures = 0;
  logic [11:0] m_lo, m_hi;
  int m_sel;

  threshold_input #(.DEBOUNCE_CYCLES(DB)) dut (.clk, .rst, .sel_upper, .btn_up, .btn_down,
    .btn_left, .btn_right, .lower, .upper, .nibble_sel);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // press one button (0 up, 1 down, 2 left, 3 right), bouncing first
  task automatic press(input int which);
    for (int k = 0; k < 4; k++) begin
      case (which) 0: btn_up = ~btn_up; 1: btn_down = ~btn_down;
                   2: btn_left = ~btn_left; default: btn_right = ~btn_right; endcase
      repeat ($urandom_range(1, 5)) @(posedge clk);
    end
    // after an even number of toggles the button is back up; now hold it down
    case (which) 0: btn_up = 1; 1: btn_down = 1; 2: btn_left = 1; default: btn_right = 1; endcase
    repeat (DB + 10) @(posedge clk);
    case (which) 0: btn_up = 0; 1: btn_down = 0; 2: btn_left = 0; default: btn_right = 0; endcase
    repeat (DB + 10) @(posedge clk);
    #1;
    // model
    case (which)
      0, 1: begin
        logic [3:0] nb;
        nb = sel_upper ? m_hi[4*m_sel +: 4] : m_lo[4*m_sel +: 4];
        nb = (which == 0) ? nb + 4'd1 : nb - 4'd1;
        if (sel_upper) m_hi[4*m_sel +: 4] = nb; else m_lo[4*m_sel +: 4] = nb;
      end
      2: m_sel = (m_sel + 1) % 3;
      default: m_sel = (m_sel + 2) % 3;
    endcase
    checks++;
    if (lower != m_lo || upper != m_hi || int'(nibble_sel) != m_sel) begin
      failures++;
      $display("FAIL after %0d: lo %h/%h hi %h/%h sel %0d/%0d", which, lower, m_lo, upper, m_hi, nibble_sel, m_sel);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    m_lo = 12'h100; m_hi = 12'hFFF; m_sel = 0;
    checks++;
    if (lower != m_lo || upper != m_hi) begin failures++; $display("FAIL reset values"); end
    press(0); press(0);                 // lower nibble 0 -> 2
    press(2); press(1); press(1);       // nibble 1 -> E
    press(2); press(0);                 // nibble 2: 1 -> 2
    press(2);                           // wraps to nibble 0
    sel_upper = 1;
    press(0);                           // upper nibble 0: F -> 0
    press(3); press(1);                 // right wraps to nibble 2: F -> E
    for (int n = 0; n < 20; n++) begin
      sel_upper = $urandom_range(0, 1);
      press($urandom_range(0, 3));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
