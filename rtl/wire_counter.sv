// wire_counter: selects one sensor wire by counting pulses.
//
// Counts 0, 1, ..., WIRE_CNT-1, 0, ... advancing by one on every clock where
// pulse is high. The count is the select code of the external 16:1 analog
// multiplexer, brought out on a board header. One instance selects the
// switching (grounded) wire, another the reading wire. Counting from 0 to the
// wire count on each pulse follows the report; the wrap to 0 and the
// synchronous reset to wire 0 are this design's.
// Timing: count changes on the clock edge where pulse is sampled high.
module wire_counter #(
  parameter int unsigned WIRE_CNT = 16,
  localparam int unsigned W = (WIRE_CNT > 1) ? $clog2(WIRE_CNT) : 1
) (
  input  logic         clk,
  input  logic         rst,     // synchronous, active high
  input  logic         pulse,   // advance one wire
  output logic [W-1:0] count    // selected wire
);
  always_ff @(posedge clk) begin
    if (rst)        count <= '0;
    else if (pulse) count <= (count == W'(WIRE_CNT - 1)) ? '0 : count + 1'b1;
  end
endmodule
