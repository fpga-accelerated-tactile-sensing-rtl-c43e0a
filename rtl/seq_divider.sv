// seq_divider: unsigned restoring divider, one quotient bit per clock.
//
// A start pulse loads num and den; NUM_W clocks later done rises for one
// clock with quot = num / den (den = 0 gives an all-ones quotient). busy is
// high while a division runs; a start while busy is ignored. Used by the
// centre-of-mass unit, whose two divisions per frame leave plenty of time for
// a bit-serial divider; the algorithm is this design's choice.
module seq_divider #(
  parameter int unsigned NUM_W = 16,
  parameter int unsigned DEN_W = 9
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  input  logic [NUM_W-1:0] num,
  input  logic [DEN_W-1:0] den,
  output logic             busy,
  output logic             done,
  output logic [NUM_W-1:0] quot
);
  localparam int unsigned CNT_W = $clog2(NUM_W + 1);

  logic [NUM_W-1:0] q;        // dividend shifting out, quotient shifting in
  logic [DEN_W:0]   rem;      // partial remainder
  logic [DEN_W-1:0] d;
  logic [CNT_W-1:0] left;

  wire [DEN_W:0] trial = {rem[DEN_W-1:0], q[NUM_W-1]};
  wire           fits  = (trial >= {1'b0, d});

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0;
      done <= 1'b0;
      quot <= '0;
      q    <= '0;
      rem  <= '0;
      d    <= '0;
      left <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          q    <= num;
          d    <= den;
          rem  <= '0;
          left <= CNT_W'(NUM_W);
        end
      end else begin
        rem  <= fits ? trial - {1'b0, d} : trial;
        q    <= {q[NUM_W-2:0], fits};
        left <= left - 1'b1;
        if (left == CNT_W'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          quot <= {q[NUM_W-2:0], fits};
        end
      end
    end
  end
endmodule
