// vga_timing: pixel counters and sync pulses for 1024x768 at 60 Hz.
//
// With a 65 MHz pixel clock each line has 1024 visible pixels, 24 front
// porch, 136 sync and 160 back porch (1344 total); each frame has 768
// visible lines, 3 front porch, 6 sync and 29 back porch (806 total). Both
// sync pulses are active low. hcount and vcount are registered and count
// from 0 at the top-left visible pixel; blank is high outside the visible area.
// The report fixes the 65 MHz VGA clock; the mode timing is the standard
// XGA one that clock implies.
module vga_timing #(
  parameter int unsigned H_ACTIVE = 1024,
  parameter int unsigned H_FP     = 24,
  parameter int unsigned H_SYNC   = 136,
  parameter int unsigned H_BP     = 160,
  parameter int unsigned V_ACTIVE = 768,
  parameter int unsigned V_FP     = 3,
  parameter int unsigned V_SYNC   = 6,
  parameter int unsigned V_BP     = 29
) (
  input  logic        clk,
  input  logic        rst,
  output logic [10:0] hcount,
  output logic [9:0]  vcount,
  output logic        hsync,   // active low
  output logic        vsync,   // active low
  output logic        blank
);
  localparam int unsigned H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP;

  wire h_last = (hcount == 11'(H_TOTAL - 1));
  wire v_last = (vcount == 10'(V_TOTAL - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      hcount <= '0;
      vcount <= '0;
    end else begin
      hcount <= h_last ? '0 : hcount + 1'b1;
      if (h_last) vcount <= v_last ? '0 : vcount + 1'b1;
    end
  end

  assign hsync = !((hcount >= 11'(H_ACTIVE + H_FP)) && (hcount < 11'(H_ACTIVE + H_FP + H_SYNC)));
  assign vsync = !((vcount >= 10'(V_ACTIVE + V_FP)) && (vcount < 10'(V_ACTIVE + V_FP + V_SYNC)));
  assign blank = (hcount >= 11'(H_ACTIVE)) || (vcount >= 10'(V_ACTIVE));
endmodule
