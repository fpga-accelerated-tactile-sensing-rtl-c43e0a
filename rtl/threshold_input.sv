// threshold_input: user-set lower and upper 12-bit thresholds.
//
// Each threshold is three hex nibbles, each held in its own 4-bit counter.
// A switch (sel_upper) picks which threshold the buttons edit. The left and
// right buttons move the edited nibble towards the more or the less
// significant end (wrapping from one end to the other); the up and down
// buttons add or subtract one from the edited nibble (wrapping within 0..F).
// Buttons are debounced and act once per press, one clock after the
// debounced rising edge. nibble_sel tells the display which digit is edited.
// Per-nibble counters driven by button edges, the selecting switch and the
// button roles follow the report; the reset values (lower 0x100, upper 0xFFF),
// the wrapping and the debounce are this design's.
module threshold_input #(
  parameter int unsigned DEBOUNCE_CYCLES = 650_000,
  parameter logic [11:0] LOWER_INIT      = 12'h100,
  parameter logic [11:0] UPPER_INIT      = 12'hFFF
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        sel_upper,    // switch: 1 edits upper, 0 edits lower
  input  logic        btn_up,
  input  logic        btn_down,
  input  logic        btn_left,
  input  logic        btn_right,
  output logic [11:0] lower,
  output logic [11:0] upper,
  output logic [1:0]  nibble_sel    // 0 = least significant nibble
);
  logic p_up, p_down, p_left, p_right;
  logic l_up, l_down, l_left, l_right;

  debounce #(.STABLE_CYCLES(DEBOUNCE_CYCLES)) u_db_up    (.clk, .rst, .btn(btn_up),    .level(l_up),    .press(p_up));
  debounce #(.STABLE_CYCLES(DEBOUNCE_CYCLES)) u_db_down  (.clk, .rst, .btn(btn_down),  .level(l_down),  .press(p_down));
  debounce #(.STABLE_CYCLES(DEBOUNCE_CYCLES)) u_db_left  (.clk, .rst, .btn(btn_left),  .level(l_left),  .press(p_left));
  debounce #(.STABLE_CYCLES(DEBOUNCE_CYCLES)) u_db_right (.clk, .rst, .btn(btn_right), .level(l_right), .press(p_right));

  logic [3:0] lo_nib [3];
  logic [3:0] hi_nib [3];

  always_ff @(posedge clk) begin
    if (rst) begin
      nibble_sel <= 2'd0;
      for (int i = 0; i < 3; i++) begin
        lo_nib[i] <= LOWER_INIT[4*i +: 4];
        hi_nib[i] <= UPPER_INIT[4*i +: 4];
      end
    end else begin
      if (p_left)       nibble_sel <= (nibble_sel == 2'd2) ? 2'd0 : nibble_sel + 2'd1;
      else if (p_right) nibble_sel <= (nibble_sel == 2'd0) ? 2'd2 : nibble_sel - 2'd1;
      if (p_up || p_down) begin
        if (sel_upper) hi_nib[nibble_sel] <= p_up ? hi_nib[nibble_sel] + 4'd1 : hi_nib[nibble_sel] - 4'd1;
        else           lo_nib[nibble_sel] <= p_up ? lo_nib[nibble_sel] + 4'd1 : lo_nib[nibble_sel] - 4'd1;
      end
    end
  end

  assign lower = {lo_nib[2], lo_nib[1], lo_nib[0]};
  assign upper = {hi_nib[2], hi_nib[1], hi_nib[0]};
endmodule
