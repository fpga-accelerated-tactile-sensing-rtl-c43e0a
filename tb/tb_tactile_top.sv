// tb_tactile_top: end-to-end run of the whole design against a model of the
// sensor grid and its SPI ADC.
//
// The model holds a pressure blob; the design scans it, filters and convolves
// it, tracks its centroid and shows it on VGA and UART. The test checks:
// button editing of the upper threshold; the raw frame RAM against the model;
// the full-frame scan time (ADC_CLK_DIVIDE*(16+ADC_TQUIET)*16*16 clocks);
// ADC words with bad leading zeros being dropped; the convolution RAM against a
// reference filter and convolution (identity and Sobel X); the centroid; a UART
// frame and its marker; motion detection over three cells and its timeout;
// and every visible pixel of two VGA frames (plain and mirrored) against a
// reference of the heat map and its three overlays. Every mechanism is
// counted and a mechanism that never happened is a failure. The motion
// timeout, debounce, display refresh and baud rate are shortened.
module tb_tactile_top;
  import tactile_pkg::*;
  localparam int W = 16, H = 16, N = W * H;
  localparam int TO = 1_500_000;
  localparam int BAUD = 4_062_500;            // 16 clocks per bit
  localparam int BIT = 65_000_000 / BAUD;
  localparam int FRAME_CLKS = 4 * 20 * N;     // one acquisition frame

  logic clk = 0, rst = 1;
  logic adc_cs_n, adc_sclk, adc_sdata;
  logic [3:0] sw_sel, rd_sel;
  logic btn_up = 0, btn_down = 0, btn_left = 0, btn_right = 0;
  logic sw_upper = 0, sw_mirror = 0, sw_cross = 0, sw_motion = 0, sw_black = 0;
  logic [2:0] sw_kernel = 3'd0;
  logic [6:0] seg_n;
  logic dp_n;
  logic [7:0] an_n;
  logic [3:0] vga_r, vga_g, vga_b;
  logic vga_hs, vga_vs, uart_txd;

  int checks = 0, failures = 0;

  tactile_top #(.TIMEOUT_CYCLES(TO), .DEBOUNCE_CYCLES(20), .REFRESH_CYCLES(8), .BAUD(BAUD)) dut (.clk_65mhz(clk), .*);
  sensor_adc_model model (.cs_n(adc_cs_n), .sclk(adc_sclk), .sw_sel, .rd_sel, .sdata(adc_sdata));

  always #5 clk = ~clk;     // nominal 65 MHz; the period only sets the time scale

  initial begin
    repeat (8_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // ------------------------------------------------------------ counters
  int n_adc_err = 0, n_write_bad = 0, n_sw_wrap = 0, n_zeroed = 0, n_clipped = 0;
  int n_com = 0, n_motion_on = 0, n_motion_off = 0, n_marker = 0;
  int n_cross_px = 0, n_trail_px = 0, n_black_px = 0, n_heat_px = 0, n_mirror_px = 0;
  int n_button = 0, n_kernel = 0;
  int cyc = 0, last_wrap = -1;
  bit bad_window = 0;
  logic motion_q = 0;

  always @(posedge clk) begin
    cyc++;
    #1;
    if (!rst) begin
      if (dut.u_filter.out_valid && dut.u_filter.out_pix == 0 && dut.u_filter.in_pix != 0) n_zeroed++;
      if (dut.com_update) n_com++;
      if (dut.motion && !motion_q) n_motion_on++;
      if (!dut.motion && motion_q) begin
        n_motion_off++;
        checks++;
        if (dut.trail != '0) begin failures++; $display("FAIL trail not cleared at timeout"); end
      end
      motion_q = dut.motion;
    end
  end

  always @(posedge adc_sclk) begin
    #1;
    if (!rst) begin
      if (dut.adc_error) n_adc_err++;
      if (bad_window && dut.adc_valid) n_write_bad++;
      if (dut.sw_pulse) begin
        if (last_wrap >= 0 && sw_sel == 4'd0 && rd_sel == 4'd0) begin
          checks++;
          if (cyc - last_wrap != FRAME_CLKS) begin
            failures++; $display("FAIL frame time %0d", cyc - last_wrap);
          end
        end
        if (sw_sel == 4'd0) begin last_wrap = cyc; n_sw_wrap++; end
      end
    end
  end

  // ------------------------------------------------------------ references
  function automatic int filt(int v, int lo, int hi);
    return v < lo ? 0 : (v > hi ? hi : v);
  endfunction

  function automatic int conv_ref(int r, int c, int k, int lo, int hi);
    int x [3][3] = '{'{-1, 0, 1}, '{-2, 0, 2}, '{-1, 0, 1}};
    int acc;
    if (r == 0 || c == 0 || r == H - 1 || c == W - 1 || k == 0)
      return filt(int'(model.press[r][c]), lo, hi);
    acc = 0;
    for (int dr = -1; dr <= 1; dr++)
      for (int dc = -1; dc <= 1; dc++)
        acc += x[dr + 1][dc + 1] * filt(int'(model.press[r + dr][c + dc]), lo, hi);
    acc = acc < 0 ? -acc : acc;
    return acc > 4095 ? 4095 : acc;
  endfunction

  function automatic logic [11:0] heat_ref(int v);
    int i, r, g, b;
    i = v * 3 / 16;
    r = i < 256 ? i : 255;
    g = i < 256 ? 0 : (i < 512 ? i - 256 : 255);
    b = i < 512 ? 0 : i - 512;
    return {4'(r >> 4), 4'(g >> 4), 4'(b >> 4)};
  endfunction

  // pressure blob centred on cell (cr, cc) over a noise floor below the
  // lower threshold, one saturated cell that the upper threshold clips
  task automatic set_blob(input int cr, input int cc);
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        int d;
        d = (r > cr ? r - cr : cr - r) + (c > cc ? c - cc : cc - c);
        model.press[r][c] = 12'(d == 0 ? 3900 : d == 1 ? 2600 : d == 2 ? 1200 : 16 + (r * 7 + c * 3) % 64);
      end
    model.press[H - 1][0] = 12'hFFF;
  endtask

  task automatic button(input int which);
    case (which) 0: btn_up = 1; 1: btn_down = 1; 2: btn_left = 1; default: btn_right = 1; endcase
    repeat (40) @(posedge clk);
    btn_up = 0; btn_down = 0; btn_left = 0; btn_right = 0;
    repeat (40) @(posedge clk);
    n_button++;
  endtask

  task automatic check_raw(input string what);
    int bad = 0;
    for (int a = 0; a < N; a++)
      if (dut.u_raw_ram.mem[a] != model.press[a / W][a % W]) bad++;
    check(bad == 0, $sformatf("%s: %0d raw RAM words differ", what, bad));
  endtask

  task automatic check_conv(input int k, input string what);
    int bad = 0, lo, hi;
    lo = int'(dut.lower); hi = int'(dut.upper);
    for (int a = 0; a < N; a++) begin
      if (int'(dut.u_conv_ram_vga.mem[a]) != conv_ref(a / W, a % W, k, lo, hi)) bad++;
      if (dut.u_conv_ram_uart.mem[a] != dut.u_conv_ram_vga.mem[a]) bad++;
    end
    check(bad == 0, $sformatf("%s: %0d convolution RAM words differ", what, bad));
  endtask

  task automatic check_com();
    int sx = 0, sy = 0, n = 0, lo;
    lo = int'(dut.lower);
    for (int a = 0; a < N; a++)
      if (int'(dut.u_conv_ram_vga.mem[a]) >= lo) begin sx += a % W; sy += a / W; n++; end
    check(n > 0 && dut.com_valid && int'(dut.com_x) == sx * 16 / n && int'(dut.com_y) == sy * 16 / n,
          $sformatf("centroid %0d,%0d exp %0d,%0d", dut.com_x, dut.com_y, sx * 16 / n, sy * 16 / n));
  endtask

  // ------------------------------------------------------------ UART receiver
  logic [7:0] rx_q [$];
  initial begin
    logic [7:0] b;
    @(negedge rst);
    forever begin
      @(negedge uart_txd);
      repeat (BIT / 2) @(posedge clk);
      for (int k = 0; k < 8; k++) begin
        repeat (BIT) @(posedge clk);
        b[k] = uart_txd;
      end
      repeat (BIT) @(posedge clk);
      rx_q.push_back(b);
    end
  end

  task automatic check_uart_frame();
    int bad = 0;
    logic [7:0] e;
    rx_q.delete();
    // wait for a marker, then one whole frame and the next marker
    do wait (rx_q.size() > 0); while (rx_q.pop_front() != 8'h00);
    n_marker++;
    wait (rx_q.size() >= N + 1);
    for (int a = 0; a < N; a++) begin
      e = dut.u_conv_ram_uart.mem[a][11:4];
      if (e == 8'h00) e = 8'h01;
      if (rx_q[a] != e) bad++;
    end
    check(bad == 0, $sformatf("UART frame: %0d bytes differ", bad));
    check(rx_q[N] == 8'h00, "UART frame marker");
    if (rx_q[N] == 8'h00) n_marker++;
  endtask

  // ------------------------------------------------------------ VGA checker
  logic [10:0] h_hist [5];
  logic [9:0]  v_hist [5];
  logic        vga_on = 0;
  int          vga_bad = 0;

  always @(posedge clk) begin
    #1;
    for (int i = 4; i > 0; i--) begin h_hist[i] = h_hist[i - 1]; v_hist[i] = v_hist[i - 1]; end
    h_hist[0] = dut.hcount; v_hist[0] = dut.vcount;
    if (vga_on) begin
      int h, v, r, c, sc, val, cx, cy, a;
      logic [11:0] e;
      h = int'(h_hist[4]); v = int'(v_hist[4]);
      e = '0;
      if (vga_hs != !(h >= 1048 && h < 1184) || vga_vs != !(v >= 771 && v < 777)) vga_bad++;
      if (h >= 256 && h < 768 && v >= 128 && v < 640) begin
        r = (v - 128) / 32;
        sc = (h - 256) / 32;
        c = sw_mirror ? 15 - sc : sc;
        a = r * W + c;
        val = int'(dut.u_conv_ram_vga.mem[a]);
        cx = 256 + (int'(dut.com_x) * 32) / 16 + 16;
        if (sw_mirror) cx = 256 + 512 - (int'(dut.com_x) * 32) / 16 - 16;
        cy = 128 + (int'(dut.com_y) * 32) / 16 + 16;
        if (sw_cross && dut.com_valid && (h == cx || v == cy)) begin
          e = 12'hF0F; n_cross_px++;
        end else if (sw_motion && dut.motion && dut.trail[a]) begin
          e = 12'h00F; n_trail_px++;
        end else if (sw_black && val < int'(dut.lower)) begin
          e = 12'h000; n_black_px++;
        end else begin
          e = heat_ref(val); n_heat_px++;
        end
        if (sw_mirror) n_mirror_px++;
      end
      if ({vga_r, vga_g, vga_b} != e) begin
        vga_bad++;
        if (vga_bad < 5) $display("VGA mismatch at %0d,%0d: %h exp %h", h, v, {vga_r, vga_g, vga_b}, e);
      end
    end
  end

  task automatic check_vga_frame(input string what);
    // start at the top of a frame so the picture is stable throughout
    wait (dut.hcount == 0 && dut.vcount == 0);
    repeat (5) @(posedge clk);
    vga_bad = 0;
    vga_on = 1;
    wait (dut.vcount == 700);
    vga_on = 0;
    check(vga_bad == 0, $sformatf("%s: %0d VGA pixels differ", what, vga_bad));
  endtask

  // ------------------------------------------------------------ sequence
  initial begin
    set_blob(5, 5);
    repeat (4) @(posedge clk);
    #1 rst = 0;

    // upper threshold FFF -> EFF: select upper, move to the top nibble, down
    sw_upper = 1;
    button(2); button(2); button(1);
    sw_upper = 0;
    check(dut.upper == 12'hEFF && dut.lower == 12'h100, $sformatf("thresholds %h %h", dut.upper, dut.lower));

    // two full scans
    repeat (2 * FRAME_CLKS + 2000) @(posedge clk);
    check_raw("first scan");
    check(model.conversions >= 2 * N, "conversion count");
    check_conv(0, "identity");
    n_kernel++;
    check(dut.u_conv_ram_vga.mem[(H - 1) * W] == 12'hEFF, "clipped cell");
    if (dut.u_conv_ram_vga.mem[(H - 1) * W] == 12'hEFF) n_clipped++;
    check_com();
    check_uart_frame();

    // bad leading zeros: words are dropped, nothing is written
    // (the conversion already running when the fault starts is still good)
    model.bad_zeros = 1;
    repeat (160) @(posedge clk);
    bad_window = 1;
    repeat (40 * 80) @(posedge clk);
    bad_window = 0;
    model.bad_zeros = 0;
    check(n_adc_err > 0 && n_write_bad == 0, $sformatf("bad words: %0d errors, %0d writes", n_adc_err, n_write_bad));

    // move the blob across cells, one scan and a half per cell
    for (int k = 0; k < 4; k++) begin
      set_blob(5 + k / 2, 6 + k);
      repeat (FRAME_CLKS * 3 / 2) @(posedge clk);
    end
    check(dut.motion, "motion after a fast move");
    check_raw("moved");
    check_conv(0, "moved");
    check_com();

    // one full VGA frame with all overlays, then one mirrored
    sw_cross = 1; sw_motion = 1; sw_black = 1;
    check_vga_frame("overlays");
    sw_mirror = 1;
    check_vga_frame("mirrored");
    sw_mirror = 0;

    // stand still past the timeout
    wait (!dut.motion);

    // switch to Sobel X
    sw_kernel = 3'd4;
    repeat (1000) @(posedge clk);
    check_conv(4, "sobel x");
    n_kernel++;
    check_vga_frame("sobel x");

    // every mechanism must have happened
    check(n_button == 3, "buttons");
    check(n_sw_wrap >= 2, "full scans");
    check(n_adc_err > 0, "leading-zero errors");
    check(n_zeroed > 0, "noise filter zeroing");
    check(n_clipped > 0, "noise filter clipping");
    check(n_kernel == 2, "kernels");
    check(n_com > 0, "centroid updates");
    check(n_motion_on > 0, "motion raised");
    check(n_motion_off > 0, "motion timed out");
    check(n_marker >= 2, "UART markers");
    check(n_cross_px > 0, "crosshair pixels");
    check(n_trail_px > 0, "trail pixels");
    check(n_black_px > 0, "black-out pixels");
    check(n_heat_px > 0, "heat-map pixels");
    check(n_mirror_px > 0, "mirrored pixels");
    $display("mechanisms: scans %0d, adc errors %0d, zeroed %0d, clipped %0d, centroids %0d, motion on %0d off %0d, markers %0d",
             n_sw_wrap, n_adc_err, n_zeroed, n_clipped, n_com, n_motion_on, n_motion_off, n_marker);
    $display("pixels: cross %0d, trail %0d, black %0d, heat %0d, mirrored %0d",
             n_cross_px, n_trail_px, n_black_px, n_heat_px, n_mirror_px);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
