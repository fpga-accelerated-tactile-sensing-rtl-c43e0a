// seven_seg: shows both thresholds on an eight-digit seven-segment display.
//
// The left four digits show the upper threshold and the right four the lower
// one, each as four hex digits (the top digit of each group is always 0 since
// thresholds are 12 bits). The digits are multiplexed: each is lit for
// REFRESH_CYCLES clocks in turn (default 65,000, 1 ms at 65 MHz). The decimal
// point marks the nibble currently being edited. Segment and anode outputs are
// active low (a common-anode board display); seg_n is {g,f,e,d,c,b,a}.
// Upper on the top digits and lower on the bottom digits follow the report;
// the refresh rate and the decimal-point marker are this design's.
module seven_seg #(
  parameter int unsigned REFRESH_CYCLES = 65_000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [11:0] upper,
  input  logic [11:0] lower,
  input  logic        sel_upper,
  input  logic [1:0]  nibble_sel,
  output logic [6:0]  seg_n,
  output logic        dp_n,
  output logic [7:0]  an_n
);
  localparam int unsigned CW = $clog2(REFRESH_CYCLES + 1);

  logic [CW-1:0] cnt;
  logic [2:0]    digit;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt   <= '0;
      digit <= '0;
    end else if (cnt == CW'(REFRESH_CYCLES - 1)) begin
      cnt   <= '0;
      digit <= digit + 3'd1;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end

  wire [31:0] shown = {4'h0, upper, 4'h0, lower};
  wire [3:0]  nib   = shown[4*digit +: 4];
  wire [2:0]  edit  = {sel_upper, nibble_sel};   // digit being edited

  function automatic logic [6:0] hex_to_seg(logic [3:0] h);   // active high, {g..a}
    unique case (h)
      4'h0: return 7'b0111111;  4'h1: return 7'b0000110;
      4'h2: return 7'b1011011;  4'h3: return 7'b1001111;
      4'h4: return 7'b1100110;  4'h5: return 7'b1101101;
      4'h6: return 7'b1111101;  4'h7: return 7'b0000111;
      4'h8: return 7'b1111111;  4'h9: return 7'b1101111;
      4'hA: return 7'b1110111;  4'hB: return 7'b1111100;
      4'hC: return 7'b0111001;  4'hD: return 7'b1011110;
      4'hE: return 7'b1111001;  default: return 7'b1110001;
    endcase
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      seg_n <= '1;
      dp_n  <= 1'b1;
      an_n  <= '1;
    end else begin
      seg_n <= ~hex_to_seg(nib);
      dp_n  <= ~(digit == edit);
      an_n  <= ~(8'b1 << digit);
    end
  end
endmodule
