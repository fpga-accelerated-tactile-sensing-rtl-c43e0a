// adc_clk_divider: makes the ADC clock by dividing the 65 MHz reference clock.
//
// A counter runs from 0 to ADC_CLK_DIVIDE-1 on the reference clock; the
// registered output is low for the first half of the count and high for the
// rest, so one ADC clock period is ADC_CLK_DIVIDE reference cycles (duty cycle
// 50 % for even dividers, floor(DIV/2)/DIV low for odd ones). The divided clock
// drives the acquisition logic and is forwarded to the ADC as its serial clock.
// The integer divider and its default of 4 (16.25 MHz, under the ADC's 20 MHz
// limit) follow the report; the counter and the duty cycle are this design's.
// Timing: the output changes one reference cycle after the counter step.
module adc_clk_divider #(
  parameter int unsigned ADC_CLK_DIVIDE = 4   // >= 2
) (
  input  logic clk,      // 65 MHz reference
  input  logic rst,      // synchronous, active high
  output logic adc_clk   // divided clock
);
  localparam int unsigned CW = (ADC_CLK_DIVIDE > 2) ? $clog2(ADC_CLK_DIVIDE) : 1;
  localparam logic [CW-1:0] LAST = CW'(ADC_CLK_DIVIDE - 1);
  localparam logic [CW-1:0] HALF = CW'(ADC_CLK_DIVIDE / 2);

  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt     <= '0;
      adc_clk <= 1'b0;
    end else begin
      cnt     <= (cnt == LAST) ? '0 : cnt + 1'b1;
      adc_clk <= (cnt == LAST) ? 1'b0 : ((cnt + 1'b1) >= HALF);
    end
  end

  initial assert (ADC_CLK_DIVIDE >= 2) else $error("ADC_CLK_DIVIDE must be at least 2");
endmodule
