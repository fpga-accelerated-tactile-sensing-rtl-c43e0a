// convolution: 3x3 convolution of the filtered pixel stream with six kernels.
//
// The input is a raster-order stream (row = switching wire, column = reading
// wire) of RD_WIRE_CNT pixels per row. A delay line of 2*RD_WIRE_CNT+3 pixels
// plays the role of the three-line buffer: its taps 0..2, W..W+2 and
// 2W..2W+2 (W = RD_WIRE_CNT) hold the 3x3 window centred on the pixel that
// arrived W+1 pixels ago. Frames follow each other without gaps, so the window
// needs no flushing. Pixels on the outer wires (first/last row or column) have
// no full window and pass through unchanged; every other pixel becomes the sum
// of the nine products with the selected kernel:
//   identity   [0 0 0; 0 1 0; 0 0 0]
//   gaussian   [1 2 1; 2 4 2; 1 2 1] / 16
//   sharpen    [0 -1 0; -1 5 -1; 0 -1 0]
//   ridge      [-1 -1 -1; -1 8 -1; -1 -1 -1]
//   sobel x    [-1 0 1; -2 0 2; -1 0 1]   (absolute value)
//   sobel y    [-1 -2 -1; 0 0 0; 1 2 1]   (absolute value)
// and is clamped to 0..2^DATA_W-1.
// Pipeline (analysis stages 3 to 5): the delay line, the nine products, and
// the sum with scaling and clamping. The result for the window centre leaves
// three clocks after the pixel that completed the window entered, with the
// centre's coordinates; one result per input pixel once W+2 pixels have been
// seen after reset. The line buffer, the kernel list and the untouched outer
// wires follow the report; the coefficients, the scaling, the absolute value
// of the edge detectors and the clamp are this design's.
module convolution
  import tactile_pkg::*;
#(
  parameter int unsigned RD_WIRE_CNT = 16,
  parameter int unsigned SW_WIRE_CNT = 16,
  parameter int unsigned RW = (SW_WIRE_CNT > 1) ? $clog2(SW_WIRE_CNT) : 1,
  parameter int unsigned CW = (RD_WIRE_CNT > 1) ? $clog2(RD_WIRE_CNT) : 1
) (
  input  logic          clk,
  input  logic          rst,        // synchronous, active high
  input  kernel_e       kernel,     // selected kernel
  input  logic          in_valid,
  input  pixel_t        in_pix,
  input  logic [RW-1:0] in_row,
  input  logic [CW-1:0] in_col,
  output logic          out_valid,
  output pixel_t        out_pix,
  output logic [RW-1:0] out_row,    // coordinates of the window centre
  output logic [CW-1:0] out_col
);
  localparam int unsigned W     = RD_WIRE_CNT;
  localparam int unsigned DEPTH = 2 * W + 3;
  localparam int unsigned CENTRE = W + 1;
  localparam int unsigned PW = DATA_W + 6;   // signed product / sum width

  typedef struct packed {
    pixel_t        pix;
    logic [RW-1:0] row;
    logic [CW-1:0] col;
  } beat_t;

  // ---- stage 3: delay line (three-line buffer) ----
  beat_t line [DEPTH];
  logic  s3_valid;
  logic [$clog2(CENTRE + 2)-1:0] fill;

  always_ff @(posedge clk) begin
    if (rst) begin
      s3_valid <= 1'b0;
      fill     <= '0;
    end else begin
      s3_valid <= in_valid && (fill >= ($bits(fill))'(CENTRE));
      if (in_valid && fill < ($bits(fill))'(CENTRE + 1)) fill <= fill + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      line[0] <= '{pix: in_pix, row: in_row, col: in_col};
      for (int i = 1; i < int'(DEPTH); i++) line[i] <= line[i-1];
    end
  end

  // kernel coefficient for window position (dr, dc), each in -1..1
  function automatic logic signed [4:0] coef(kernel_e k, int dr, int dc);
    int ad;
    ad = (dr < 0 ? -dr : dr) + (dc < 0 ? -dc : dc);   // Manhattan distance
    unique case (k)
      K_IDENTITY: return (ad == 0) ? 5'sd1 : 5'sd0;
      K_GAUSSIAN: return (ad == 0) ? 5'sd4 : (ad == 1) ? 5'sd2 : 5'sd1;
      K_SHARPEN:  return (ad == 0) ? 5'sd5 : (ad == 1) ? -5'sd1 : 5'sd0;
      K_RIDGE:    return (ad == 0) ? 5'sd8 : -5'sd1;
      K_SOBEL_X:  return 5'(dc * ((dr == 0) ? 2 : 1));
      K_SOBEL_Y:  return 5'(dr * ((dc == 0) ? 2 : 1));
      default:    return (ad == 0) ? 5'sd1 : 5'sd0;
    endcase
  endfunction

  // ---- stage 4: products ----
  logic signed [PW-1:0] prod [9];
  logic                 s4_valid, s4_border;
  kernel_e              s4_kernel;
  beat_t                s4_centre;

  beat_t centre;
  assign centre = line[CENTRE];

  always_ff @(posedge clk) begin
    if (rst) begin
      s4_valid <= 1'b0;
    end else begin
      s4_valid <= s3_valid;
    end
  end

  always_ff @(posedge clk) begin
    s4_centre <= centre;
    s4_kernel <= kernel;
    s4_border <= (centre.row == '0) || (centre.row == RW'(SW_WIRE_CNT - 1)) ||
                 (centre.col == '0) || (centre.col == CW'(RD_WIRE_CNT - 1));
    for (int dr = -1; dr <= 1; dr++) begin
      for (int dc = -1; dc <= 1; dc++) begin
        // neighbour (dr, dc) of the centre sits dr*W + dc pixels after it
        prod[(dr + 1) * 3 + (dc + 1)] <=
          PW'(coef(kernel, dr, dc)) *
          $signed({{(PW - DATA_W){1'b0}}, line[CENTRE - dr * int'(W) - dc].pix});
      end
    end
  end

  // ---- stage 5: sum, scale, clamp ----
  logic signed [PW-1:0] sum, scaled;
  always_comb begin
    sum = '0;
    for (int i = 0; i < 9; i++) sum += prod[i];
    unique case (s4_kernel)
      K_GAUSSIAN:         scaled = sum >>> 4;
      K_SOBEL_X, K_SOBEL_Y: scaled = (sum < 0) ? -sum : sum;
      default:            scaled = sum;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out_pix   <= '0;
      out_row   <= '0;
      out_col   <= '0;
    end else begin
      out_valid <= s4_valid;
      out_row   <= s4_centre.row;
      out_col   <= s4_centre.col;
      if (s4_border)                           out_pix <= s4_centre.pix;
      else if (scaled < 0)                     out_pix <= '0;
      else if (scaled > PW'((1 << DATA_W) - 1)) out_pix <= '1;
      else                                     out_pix <= scaled[DATA_W-1:0];
    end
  end
endmodule
