// pipe_delay: delays a bus by a fixed number of clocks.
//
// A chain of DEPTH registers (DEPTH = 0 is a plain wire). Used to keep the VGA
// sync and position signals aligned with the RAM and colour pipeline.
module pipe_delay #(
  parameter int unsigned WIDTH = 1,
  parameter int unsigned DEPTH = 1
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [WIDTH-1:0] stage [DEPTH];
    always_ff @(posedge clk) begin
      stage[0] <= d;
      for (int i = 1; i < int'(DEPTH); i++) stage[i] <= stage[i-1];
    end
    assign q = stage[DEPTH-1];
  end
endmodule
