// debounce: cleans a push button and reports its presses.
//
// The raw input is brought into the clock domain by two flip-flops. The clean
// level follows it only after it has stayed unchanged for STABLE_CYCLES
// clocks (default 650,000, 10 ms at 65 MHz). press pulses for one clock on
// each rising edge of the clean level. The report counts on the rising edge
// of each button push; the filter and its length are this design's.
module debounce #(
  parameter int unsigned STABLE_CYCLES = 650_000
) (
  input  logic clk,
  input  logic rst,
  input  logic btn,     // raw, asynchronous
  output logic level,   // debounced level
  output logic press    // one clock per press
);
  localparam int unsigned CW = $clog2(STABLE_CYCLES + 1);

  logic [1:0]    sync;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      sync  <= '0;
      cnt   <= '0;
      level <= 1'b0;
      press <= 1'b0;
    end else begin
      sync  <= {sync[0], btn};
      press <= 1'b0;
      if (sync[1] == level) begin
        cnt <= '0;
      end else if (cnt == CW'(STABLE_CYCLES - 1)) begin
        cnt   <= '0;
        level <= sync[1];
        press <= sync[1];
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
