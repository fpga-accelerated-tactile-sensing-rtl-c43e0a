// uart_tx: 8N1 serial transmitter.
//
// Accepts a byte with a valid/ready handshake when idle, loads start bit,
// the byte (LSB first) and a stop bit into a 10-bit shift buffer, and shifts
// one bit out every CLK_HZ/BAUD clocks (564 clocks at 65 MHz and 115,200 baud,
// 0.04 % fast). ready is high when a byte can be taken; tx idles high.
// Baud rate from a divider of the 65 MHz clock and the shift buffer follow the
// report; the handshake and the rounding of the divider are this design's.
module uart_tx #(
  parameter int unsigned CLK_HZ = 65_000_000,
  parameter int unsigned BAUD   = 115_200
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] data,
  input  logic       valid,
  output logic       ready,
  output logic       tx
);
  localparam int unsigned DIV = CLK_HZ / BAUD;
  localparam int unsigned DW  = $clog2(DIV + 1);

  logic [9:0]    shreg;
  logic [3:0]    bits_left;
  logic [DW-1:0] baud_cnt;

  assign ready = (bits_left == 4'd0);

  always_ff @(posedge clk) begin
    if (rst) begin
      shreg     <= '1;
      bits_left <= '0;
      baud_cnt  <= '0;
      tx        <= 1'b1;
    end else if (ready) begin
      tx <= 1'b1;
      if (valid) begin
        shreg     <= {1'b1, data, 1'b0};
        bits_left <= 4'd10;
        baud_cnt  <= '0;
      end
    end else begin
      tx <= shreg[0];
      if (baud_cnt == DW'(DIV - 1)) begin
        baud_cnt  <= '0;
        shreg     <= {1'b1, shreg[9:1]};
        bits_left <= bits_left - 1'b1;
      end else begin
        baud_cnt <= baud_cnt + 1'b1;
      end
    end
  end
endmodule
