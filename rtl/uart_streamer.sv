// uart_streamer: sends the convolved frame over the serial line.
//
// Keeps its own switching-wire and reading-wire counters and walks the frame
// in raster order. For each cell it reads the convolution RAM (one clock of
// read latency), scales the 12-bit value to 8 bits by dropping the 4 LSBs,
// and hands the byte to the transmitter. After the last cell of a frame it
// sends the NEWFRAME_VALUE byte, so the receiving host can find frame
// boundaries, and starts over. A data byte that would equal NEWFRAME_VALUE is
// sent as NEWFRAME_VALUE xor 1 so the marker stays unique.
// Byte stream: cell 0 .. cell N-1, marker, cell 0, ... at the line rate.
// The counters, the RAM read, the 12-to-8-bit scaling and the marker with its
// default of 0 follow the report; dropping the low bits and escaping a data
// byte equal to the marker are this design's.
module uart_streamer #(
  parameter int unsigned SW_WIRE_CNT    = 16,
  parameter int unsigned RD_WIRE_CNT    = 16,
  parameter int unsigned DATA_W         = 12,
  parameter logic [7:0]  NEWFRAME_VALUE = 8'h00,
  parameter int unsigned AW = (SW_WIRE_CNT * RD_WIRE_CNT > 1) ? $clog2(SW_WIRE_CNT * RD_WIRE_CNT) : 1
) (
  input  logic              clk,
  input  logic              rst,
  output logic [AW-1:0]     ram_addr,   // convolution RAM read address
  input  logic [DATA_W-1:0] ram_data,   // word at ram_addr, one clock later
  output logic [7:0]        tx_data,
  output logic              tx_valid,
  input  logic              tx_ready
);
  localparam int unsigned RW = (SW_WIRE_CNT > 1) ? $clog2(SW_WIRE_CNT) : 1;
  localparam int unsigned CW = (RD_WIRE_CNT > 1) ? $clog2(RD_WIRE_CNT) : 1;

  typedef enum logic [1:0] {S_ADDR, S_READ, S_SEND, S_MARK} state_e;
  state_e state;

  logic [RW-1:0] sw_cnt;
  logic [CW-1:0] rd_cnt;

  wire last_rd = (rd_cnt == CW'(RD_WIRE_CNT - 1));
  wire last_sw = (sw_cnt == RW'(SW_WIRE_CNT - 1));
  wire [7:0] scaled = ram_data[DATA_W-1 -: 8];

  assign ram_addr = AW'(sw_cnt) * AW'(RD_WIRE_CNT) + AW'(rd_cnt);
  assign tx_valid = (state == S_SEND) || (state == S_MARK);

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_ADDR;
      sw_cnt  <= '0;
      rd_cnt  <= '0;
      tx_data <= '0;
    end else begin
      unique case (state)
        S_ADDR: state <= S_READ;                 // address presented
        S_READ: begin                            // word arrives
          tx_data <= (scaled == NEWFRAME_VALUE) ? (scaled ^ 8'h01) : scaled;
          state   <= S_SEND;
        end
        S_SEND: if (tx_ready) begin
          rd_cnt <= last_rd ? '0 : rd_cnt + 1'b1;
          if (last_rd) sw_cnt <= last_sw ? '0 : sw_cnt + 1'b1;
          if (last_rd && last_sw) begin
            tx_data <= NEWFRAME_VALUE;
            state   <= S_MARK;
          end else begin
            state <= S_ADDR;
          end
        end
        S_MARK: if (tx_ready) state <= S_ADDR;
        default: state <= S_ADDR;
      endcase
    end
  end
endmodule
