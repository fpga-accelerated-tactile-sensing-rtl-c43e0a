// tb_tactile_top_large: the design built for the 61 x 157 wire sensor that the
// scalability estimate considers (9,577 crossings, 6 + 8 select lines).
//
// Same checks as the full-size test: two scans of a pressure blob, the scan
// time of 4*(16+4)*9,577 = 766,160 clocks per frame (84.8 frames/s), the raw
// and convolution RAMs, the centroid, one VGA frame (4 x 4 screen pixels per
// cell) and one UART frame, here at 4.06 Mbaud so the 9,578-byte frame fits
// in the run.
module tb_tactile_top_large;
  import tactile_pkg::*;
  localparam int W = 157, H = 61, N = W * H;
  localparam int RW = 6, CW = 8;
  localparam int CELL = 4, X0 = (1024 - W * CELL) / 2, Y0 = (768 - H * CELL) / 2;
  localparam int BAUD = 4_062_500;             // 16 clocks per bit
  localparam int BIT = 65_000_000 / BAUD;
  localparam int FRAME_CLKS = 4 * 20 * N;     // one acquisition frame

  logic clk = 0, rst = 1;
  logic adc_cs_n, adc_sclk, adc_sdata;
  logic [RW-1:0] sw_sel;
  logic [CW-1:0] rd_sel;
  logic btn_up = 0, btn_down = 0, btn_left = 0, btn_right = 0;
  logic sw_upper = 0, sw_mirror = 0, sw_cross = 0, sw_motion = 0, sw_black = 0;
  logic [2:0] sw_kernel = 3'd0;
  logic [6:0] seg_n;
  logic dp_n;
  logic [7:0] an_n;
  logic [3:0] vga_r, vga_g, vga_b;
  logic vga_hs, vga_vs, uart_txd;

  int checks = 0, failures = 0;

  tactile_top #(.SW_WIRE_CNT(H), .RD_WIRE_CNT(W), .CELL_PX(CELL), .BAUD(BAUD)) dut (.clk_65mhz(clk), .*);
  sensor_adc_model #(.SW(H), .RD(W), .RW(RW), .CW(CW)) model (.cs_n(adc_cs_n), .sclk(adc_sclk), .sw_sel, .rd_sel, .sdata(adc_sdata));

  always #5 clk = ~clk;     // nominal 65 MHz; the period only sets the time scale

  initial begin
    repeat (12_000_000) @(posedge clk);
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
        if (last_wrap >= 0 && sw_sel == '0 && rd_sel == '0) begin
          checks++;
          if (cyc - last_wrap != FRAME_CLKS) begin
            failures++; $display("FAIL frame time %0d", cyc - last_wrap);
          end
        end
        if (sw_sel == '0) begin last_wrap = cyc; n_sw_wrap++; end
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
      if (h >= X0 && h < X0 + W * CELL && v >= Y0 && v < Y0 + H * CELL) begin
        r = (v - Y0) / CELL;
        sc = (h - X0) / CELL;
        c = sw_mirror ? W - 1 - sc : sc;
        a = r * W + c;
        val = int'(dut.u_conv_ram_vga.mem[a]);
        cx = X0 + (int'(dut.com_x) * CELL) / 16 + CELL / 2;
        if (sw_mirror) cx = X0 + W * CELL - (int'(dut.com_x) * CELL) / 16 - CELL / 2;
        cy = Y0 + (int'(dut.com_y) * CELL) / 16 + CELL / 2;
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
    set_blob(30, 100);
    repeat (4) @(posedge clk);
    #1 rst = 0;

    // two full scans
    repeat (2 * FRAME_CLKS + 2000) @(posedge clk);
    check_raw("scan");
    check(model.conversions >= 2 * N, "conversion count");
    check_conv(0, "identity");
    check_com();

    // one VGA frame with the crosshair and the black-out overlay
    sw_cross = 1; sw_black = 1;
    fork
      check_vga_frame("overlays");
      check_uart_frame();
    join

    check(n_sw_wrap >= 2, "full scans");
    check(n_zeroed > 0, "noise filter zeroing");
    check(n_com > 0, "centroid updates");
    check(n_marker >= 2, "UART markers");
    check(n_cross_px > 0, "crosshair pixels");
    check(n_black_px > 0, "black-out pixels");
    check(n_heat_px > 0, "heat-map pixels");
    $display("scans %0d, centroids %0d, markers %0d; pixels: cross %0d, black %0d, heat %0d",
             n_sw_wrap, n_com, n_marker, n_cross_px, n_black_px, n_heat_px);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
