// sensor_adc_model: behavioural model of the sensor grid, its analog front end
// and the 12-bit SPI ADC, for simulation only (not synthesizable).
//
// press[sw][rd] holds the 12-bit reading of each crossing. When chip select
// falls, the model latches the crossing selected by sw_sel/rd_sel and builds
// the 16-bit ADC word: four leading zeros, then the 12-bit value, MSB first.
// Bit k of the word is driven after the k-th falling edge of sclk with chip
// select low, so the reader's rising edges sample settled bits. Setting
// bad_zeros makes the next words carry a 1 in the leading zeros, as a
// misaligned or noisy read would. conversions counts chip-select cycles.
module sensor_adc_model #(
  parameter int unsigned SW = 16,
  parameter int unsigned RD = 16,
  parameter int unsigned RW = 4,
  parameter int unsigned CW = 4
) (
  input  logic          cs_n,
  input  logic          sclk,
  input  logic [RW-1:0] sw_sel,
  input  logic [CW-1:0] rd_sel,
  output logic          sdata
);
  logic [11:0] press [SW][RD];
  logic        bad_zeros = 1'b0;
  int          conversions = 0;
  logic [15:0] word = '0;
  int          bitk = 0;

  initial begin
    sdata = 1'b0;
    for (int s = 0; s < int'(SW); s++)
      for (int r = 0; r < int'(RD); r++) press[s][r] = '0;
  end

  always @(negedge cs_n) begin
    word = {bad_zeros ? 4'b0010 : 4'b0000, press[sw_sel][rd_sel]};
    bitk = 0;
    conversions++;
  end

  always @(negedge sclk) begin
    if (!cs_n && bitk < 16) begin
      sdata <= word[15 - bitk];
      bitk++;
    end
  end

  always @(posedge cs_n) sdata <= 1'b0;
endmodule
