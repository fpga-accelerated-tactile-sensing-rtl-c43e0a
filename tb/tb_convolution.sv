// tb_convolution: streams random frames through the convolution with each of
// the six kernels and compares every output with a reference convolution
// computed here from the same frames; also checks the coordinates of each
// result, the untouched outer wires and the three-clock latency.
module tb_convolution;
  import tactile_pkg::*;
  localparam int W = 16, H = 16, N = W * H;
  localparam int FRAMES_PER_K = 2;
  localparam int NIN = 6 * FRAMES_PER_K * N;

  logic clk = 0, rst = 1;
  kernel_e kernel = K_IDENTITY;
  logic in_valid = 0, out_valid;
  pixel_t in_pix = 0, out_pix;
  logic [3:0] in_row = 0, in_col = 0, out_row, out_col;
  int checks = 0, failures = 0;

  convolution dut (.clk, .rst, .kernel, .in_valid, .in_pix, .in_row, .in_col,
                   .out_valid, .out_pix, .out_row, .out_col);

  always #5 clk = ~clk;

  initial begin
    repeat (NIN + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  pixel_t  stream [NIN];
  kernel_e kstream [NIN];
  int      tin [NIN];       // clock at which each input entered
  int      cyc = 0;
  int      nout = 0;
  int      kseen [6];

  always @(posedge clk) cyc++;

  function automatic int kc(kernel_e k, int dr, int dc);
    int g [3][3] = '{'{1, 2, 1}, '{2, 4, 2}, '{1, 2, 1}};
    int s [3][3] = '{'{0, -1, 0}, '{-1, 5, -1}, '{0, -1, 0}};
    int r [3][3] = '{'{-1, -1, -1}, '{-1, 8, -1}, '{-1, -1, -1}};
    int x [3][3] = '{'{-1, 0, 1}, '{-2, 0, 2}, '{-1, 0, 1}};
    int y [3][3] = '{'{-1, -2, -1}, '{0, 0, 0}, '{1, 2, 1}};
    case (k)
      K_GAUSSIAN: return g[dr + 1][dc + 1];
      K_SHARPEN:  return s[dr + 1][dc + 1];
      K_RIDGE:    return r[dr + 1][dc + 1];
      K_SOBEL_X:  return x[dr + 1][dc + 1];
      K_SOBEL_Y:  return y[dr + 1][dc + 1];
      default:    return (dr == 0 && dc == 0) ? 1 : 0;
    endcase
  endfunction

  function automatic int expected(int g);   // g = global index of the centre
    int base, rr, cc, acc;
    kernel_e k;
    base = (g / N) * N;
    rr = (g % N) / W;
    cc = g % W;
    k = kstream[g + W + 1];
    if (rr == 0 || rr == H - 1 || cc == 0 || cc == W - 1) return int'(stream[g]);
    acc = 0;
    for (int dr = -1; dr <= 1; dr++)
      for (int dc = -1; dc <= 1; dc++)
        acc += kc(k, dr, dc) * int'(stream[base + (rr + dr) * W + cc + dc]);
    if (k == K_GAUSSIAN) acc = acc >>> 4;
    if (k == K_SOBEL_X || k == K_SOBEL_Y) acc = (acc < 0) ? -acc : acc;
    if (acc < 0) acc = 0;
    if (acc > 4095) acc = 4095;
    return acc;
  endfunction

  always @(posedge clk) begin
    #1;
    if (out_valid && !rst) begin
      int e;
      e = expected(nout);
      checks++;
      if (int'(out_pix) != e || int'(out_row) != (nout % N) / W || int'(out_col) != nout % W) begin
        failures++;
        if (failures < 10)
          $display("FAIL out %0d (r%0d c%0d) got %0d exp %0d k=%0d", nout, out_row, out_col,
                   out_pix, e, kstream[nout + W + 1]);
      end
      // latency: the input that completed this window entered 3 clocks before
      checks++;
      if (cyc - tin[nout + W + 1] != 3) begin
        failures++;
        if (failures < 10) $display("FAIL latency %0d", cyc - tin[nout + W + 1]);
      end
      kseen[int'(kstream[nout + W + 1])]++;
      nout++;
    end
  end

  initial begin
    for (int i = 0; i < NIN; i++) begin
      // smooth-ish blobs plus noise so clamping and negative sums both occur
      stream[i] = (($urandom_range(0, 3) == 0) ? 12'hFFF : 12'd0) ^ 12'($urandom_range(0, 255));
      kstream[i] = kernel_e'(i / (FRAMES_PER_K * N));
    end
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < NIN; i++) begin
      if (i > 0 && kstream[i] != kstream[i - 1]) begin
        in_valid = 0;
        repeat (5) @(posedge clk);   // drain before changing the kernel
        #1;
      end
      kernel = kstream[i];
      in_valid = 1;
      in_pix = stream[i];
      in_row = 4'((i % N) / W);
      in_col = 4'(i % W);
      tin[i] = cyc;
      @(posedge clk); #1;
    end
    in_valid = 0;
    repeat (10) @(posedge clk);
    checks++;
    if (nout != NIN - W - 1) begin failures++; $display("FAIL %0d outputs", nout); end
    for (int k = 0; k < 6; k++) begin
      checks++;
      if (kseen[k] == 0) begin failures++; $display("FAIL kernel %0d never used", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
