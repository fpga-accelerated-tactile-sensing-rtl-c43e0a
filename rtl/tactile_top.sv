// tactile_top: FPGA side of a 16 x 16 piezoresistive textile pressure sensor.
//
// Three parts share the 65 MHz VGA pixel clock:
//  * Acquisition, on the ADC clock (65 MHz / ADC_CLK_DIVIDE). pulse_gen paces
//    one ADC conversion (16 + ADC_TQUIET clocks) per sensor crossing; two
//    wire_counters drive the select lines of the external switching and reading
//    multiplexers; adc_reader reads the SPI ADC; each sample is written to the
//    raw frame RAM at the crossing it was taken from. A full frame takes
//    ADC_CLK_DIVIDE*(16+ADC_TQUIET)*SW_WIRE_CNT*RD_WIRE_CNT clocks of 65 MHz
//    (20,480 clocks, 3.17 kHz, at the defaults).
//  * Analysis, on the 65 MHz clock, five pipeline stages with one pixel per
//    clock: frame_scanner reads the raw RAM in raster order, noise_filter
//    applies the user thresholds, convolution runs the selected 3x3 kernel.
//    Results go to two identical convolution RAMs and to center_of_mass, whose
//    centroid feeds motion_tracker. threshold_input (buttons and a switch)
//    sets the thresholds, seven_seg shows them.
//  * Visualization: vga_timing, vga_scale (cell address per screen pixel),
//    the VGA copy of the convolution RAM, heatmap and vga_mux (crosshair,
//    motion trail, black-out overlays) make a 1024x768 picture; uart_streamer
//    and uart_tx send the UART copy of the frame at 115,200 baud.
// The 65 MHz clock comes from a clock generator outside this module; the ADC
// and the analog multiplexers are off-chip. The structure, the clocking and
// the defaults follow the report; the port names, the reset synchronizer for
// the ADC clock domain, the 4-bit VGA colour outputs (the top nibble of
// each 8-bit channel) and the picture size (CELL_PX screen pixels per cell,
// centred on the screen) are this design's.
module tactile_top
  import tactile_pkg::*;
#(
  parameter int unsigned SW_WIRE_CNT     = 16,
  parameter int unsigned RD_WIRE_CNT     = 16,
  parameter int unsigned ADC_CLK_DIVIDE  = 4,
  parameter int unsigned ADC_TQUIET      = 4,
  parameter int unsigned BAUD            = 115_200,
  parameter logic [7:0]  NEWFRAME_VALUE  = 8'h00,
  parameter int unsigned TIMEOUT_CYCLES  = 32_500_000,
  parameter int unsigned DEBOUNCE_CYCLES = 650_000,
  parameter int unsigned REFRESH_CYCLES  = 65_000,
  parameter int unsigned CELL_PX         = 32,      // screen pixels per cell side
  localparam int unsigned RW = (SW_WIRE_CNT > 1) ? $clog2(SW_WIRE_CNT) : 1,
  localparam int unsigned CW = (RD_WIRE_CNT > 1) ? $clog2(RD_WIRE_CNT) : 1
) (
  input  logic          clk_65mhz,
  input  logic          rst,          // synchronous to clk_65mhz, active high
  // ADC (SPI)
  output logic          adc_cs_n,
  output logic          adc_sclk,
  input  logic          adc_sdata,
  // analog multiplexer select lines
  output logic [RW-1:0] sw_sel,
  output logic [CW-1:0] rd_sel,
  // user controls
  input  logic          btn_up,
  input  logic          btn_down,
  input  logic          btn_left,
  input  logic          btn_right,
  input  logic          sw_upper,     // buttons edit the upper threshold
  input  logic [2:0]    sw_kernel,    // convolution kernel (kernel_e)
  input  logic          sw_mirror,
  input  logic          sw_cross,     // centroid crosshair overlay
  input  logic          sw_motion,    // motion trail overlay
  input  logic          sw_black,     // black-out below lower threshold
  // seven-segment display
  output logic [6:0]    seg_n,
  output logic          dp_n,
  output logic [7:0]    an_n,
  // VGA
  output logic [3:0]    vga_r,
  output logic [3:0]    vga_g,
  output logic [3:0]    vga_b,
  output logic          vga_hs,
  output logic          vga_vs,
  // UART
  output logic          uart_txd
);
  localparam int unsigned NPIX = SW_WIRE_CNT * RD_WIRE_CNT;
  localparam int unsigned AW   = (NPIX > 1) ? $clog2(NPIX) : 1;
  localparam int unsigned FRAC = 4;
  // the sensor picture is centred on the 1024x768 screen
  localparam int unsigned X0   = (1024 - RD_WIRE_CNT * CELL_PX) / 2;
  localparam int unsigned Y0   = (768 - SW_WIRE_CNT * CELL_PX) / 2;

  initial assert (RD_WIRE_CNT * CELL_PX <= 1024 && SW_WIRE_CNT * CELL_PX <= 768)
    else $error("sensor picture does not fit on the screen: reduce CELL_PX");

  logic clk;
  assign clk = clk_65mhz;

  // ------------------------------------------------------------------
  // acquisition (ADC clock domain)
  // ------------------------------------------------------------------
  logic adc_clk;
  logic [1:0] adc_rst_sync;
  logic adc_rst;

  adc_clk_divider #(.ADC_CLK_DIVIDE(ADC_CLK_DIVIDE)) u_adc_div (
    .clk, .rst, .adc_clk);

  always_ff @(posedge adc_clk) adc_rst_sync <= {adc_rst_sync[0], rst};
  assign adc_rst = adc_rst_sync[1] | rst;

  logic rd_pulse, sw_pulse;
  pulse_gen #(.ADC_TQUIET(ADC_TQUIET), .RD_WIRE_CNT(RD_WIRE_CNT)) u_pulse (
    .clk(adc_clk), .rst(adc_rst), .rd_pulse, .sw_pulse);

  wire_counter #(.WIRE_CNT(SW_WIRE_CNT)) u_sw_cnt (
    .clk(adc_clk), .rst(adc_rst), .pulse(sw_pulse), .count(sw_sel));
  wire_counter #(.WIRE_CNT(RD_WIRE_CNT)) u_rd_cnt (
    .clk(adc_clk), .rst(adc_rst), .pulse(rd_pulse), .count(rd_sel));

  pixel_t adc_data;
  logic   adc_valid, adc_error;
  adc_reader #(.ADC_TQUIET(ADC_TQUIET)) u_adc (
    .clk(adc_clk), .rst(adc_rst), .sdata(adc_sdata), .cs_n(adc_cs_n),
    .data(adc_data), .valid(adc_valid), .error(adc_error));

  assign adc_sclk = adc_clk;

  // crossing that the finishing conversion belongs to: the wire counters
  // advance on the same edge that ends the conversion
  logic [AW-1:0] wr_addr;
  always_ff @(posedge adc_clk) begin
    if (adc_rst)       wr_addr <= '0;
    else if (rd_pulse) wr_addr <= AW'(sw_sel) * AW'(RD_WIRE_CNT) + AW'(rd_sel);
  end

  logic [AW-1:0] raw_rd_addr;
  pixel_t        raw_rd_data;
  dual_clock_bram #(.DATA_W(DATA_W), .DEPTH(NPIX)) u_raw_ram (
    .clk_a(adc_clk), .we_a(adc_valid), .addr_a(wr_addr), .din_a(adc_data),
    .clk_b(clk), .addr_b(raw_rd_addr), .dout_b(raw_rd_data));

  // ------------------------------------------------------------------
  // analysis (65 MHz)
  // ------------------------------------------------------------------
  pixel_t     lower, upper;
  logic [1:0] nibble_sel;

  threshold_input #(.DEBOUNCE_CYCLES(DEBOUNCE_CYCLES)) u_thr (
    .clk, .rst, .sel_upper(sw_upper), .btn_up, .btn_down, .btn_left, .btn_right,
    .lower, .upper, .nibble_sel);

  seven_seg #(.REFRESH_CYCLES(REFRESH_CYCLES)) u_seg (
    .clk, .rst, .upper, .lower, .sel_upper(sw_upper), .nibble_sel,
    .seg_n, .dp_n, .an_n);

  logic          scan_valid;
  logic [RW-1:0] scan_row;
  logic [CW-1:0] scan_col;
  frame_scanner #(.SW_WIRE_CNT(SW_WIRE_CNT), .RD_WIRE_CNT(RD_WIRE_CNT)) u_scan (
    .clk, .rst, .rd_addr(raw_rd_addr), .out_valid(scan_valid),
    .out_row(scan_row), .out_col(scan_col));

  logic          flt_valid;
  pixel_t        flt_pix;
  logic [RW-1:0] flt_row;
  logic [CW-1:0] flt_col;
  noise_filter #(.DATA_W(DATA_W), .RW(RW), .CW(CW)) u_filter (
    .clk, .rst, .lower, .upper,
    .in_valid(scan_valid), .in_pix(raw_rd_data), .in_row(scan_row), .in_col(scan_col),
    .out_valid(flt_valid), .out_pix(flt_pix), .out_row(flt_row), .out_col(flt_col));

  kernel_e       kernel;
  logic          cv_valid;
  pixel_t        cv_pix;
  logic [RW-1:0] cv_row;
  logic [CW-1:0] cv_col;
  always_comb kernel = (sw_kernel > 3'd5) ? K_IDENTITY : kernel_e'(sw_kernel);

  convolution #(.RD_WIRE_CNT(RD_WIRE_CNT), .SW_WIRE_CNT(SW_WIRE_CNT)) u_conv (
    .clk, .rst, .kernel,
    .in_valid(flt_valid), .in_pix(flt_pix), .in_row(flt_row), .in_col(flt_col),
    .out_valid(cv_valid), .out_pix(cv_pix), .out_row(cv_row), .out_col(cv_col));

  wire [AW-1:0] cv_addr = AW'(cv_row) * AW'(RD_WIRE_CNT) + AW'(cv_col);

  logic [AW-1:0] vga_addr, uart_addr;
  pixel_t        vga_value, uart_value;
  dual_clock_bram #(.DATA_W(DATA_W), .DEPTH(NPIX)) u_conv_ram_vga (
    .clk_a(clk), .we_a(cv_valid), .addr_a(cv_addr), .din_a(cv_pix),
    .clk_b(clk), .addr_b(vga_addr), .dout_b(vga_value));
  dual_clock_bram #(.DATA_W(DATA_W), .DEPTH(NPIX)) u_conv_ram_uart (
    .clk_a(clk), .we_a(cv_valid), .addr_a(cv_addr), .din_a(cv_pix),
    .clk_b(clk), .addr_b(uart_addr), .dout_b(uart_value));

  logic [CW+FRAC-1:0] com_x;
  logic [RW+FRAC-1:0] com_y;
  logic               com_valid, com_update;
  center_of_mass #(.SW_WIRE_CNT(SW_WIRE_CNT), .RD_WIRE_CNT(RD_WIRE_CNT),
                   .DATA_W(DATA_W), .FRAC_BITS(FRAC)) u_com (
    .clk, .rst, .lower,
    .in_valid(cv_valid), .in_pix(cv_pix), .in_row(cv_row), .in_col(cv_col),
    .com_x, .com_y, .com_valid, .com_update);

  logic            motion;
  logic [NPIX-1:0] trail;
  motion_tracker #(.SW_WIRE_CNT(SW_WIRE_CNT), .RD_WIRE_CNT(RD_WIRE_CNT),
                   .FRAC_BITS(FRAC), .TIMEOUT_CYCLES(TIMEOUT_CYCLES)) u_motion (
    .clk, .rst, .com_update, .com_valid, .com_x, .com_y, .motion, .trail);

  // ------------------------------------------------------------------
  // VGA: t0 timing, t1 scale, t2 RAM word, t3 colour, t4 overlays
  // ------------------------------------------------------------------
  logic [10:0] hcount;
  logic [9:0]  vcount;
  logic        hsync, vsync, blank;
  vga_timing u_vga_timing (.clk, .rst, .hcount, .vcount, .hsync, .vsync, .blank);

  logic          in_range;
  logic [RW-1:0] cell_row;
  logic [CW-1:0] cell_col;
  vga_scale #(.SW_WIRE_CNT(SW_WIRE_CNT), .RD_WIRE_CNT(RD_WIRE_CNT),
              .CELL_PX(CELL_PX), .X0(X0), .Y0(Y0)) u_scale (
    .clk, .hcount, .vcount, .mirror(sw_mirror),
    .in_range, .addr(vga_addr), .cell_row, .cell_col);

  rgb_t heat, rgb;
  heatmap u_heat (.clk, .value(vga_value), .rgb(heat));

  pixel_t        value_t3;
  logic          in_range_t3;
  logic [RW-1:0] cell_row_t3;
  logic [CW-1:0] cell_col_t3;
  logic [10:0]   hcount_t3;
  logic [9:0]    vcount_t3;
  logic          blank_t3;
  logic [1:0]    sync_t4;

  pipe_delay #(.WIDTH(DATA_W), .DEPTH(1)) u_dly_value (.clk, .d(vga_value), .q(value_t3));
  pipe_delay #(.WIDTH(1 + RW + CW), .DEPTH(2)) u_dly_cell (
    .clk, .d({in_range, cell_row, cell_col}), .q({in_range_t3, cell_row_t3, cell_col_t3}));
  pipe_delay #(.WIDTH(22), .DEPTH(3)) u_dly_pos (
    .clk, .d({hcount, vcount, blank}), .q({hcount_t3, vcount_t3, blank_t3}));
  pipe_delay #(.WIDTH(2), .DEPTH(4)) u_dly_sync (.clk, .d({hsync, vsync}), .q(sync_t4));

  vga_mux #(.SW_WIRE_CNT(SW_WIRE_CNT), .RD_WIRE_CNT(RD_WIRE_CNT), .FRAC_BITS(FRAC),
            .CELL_PX(CELL_PX), .X0(X0), .Y0(Y0)) u_mux (
    .clk, .heat, .value(value_t3), .in_range(in_range_t3), .blank(blank_t3),
    .cell_row(cell_row_t3), .cell_col(cell_col_t3), .hcount(hcount_t3), .vcount(vcount_t3),
    .mirror(sw_mirror), .lower, .com_x, .com_y, .com_valid, .motion, .trail,
    .cross_en(sw_cross), .motion_en(sw_motion), .black_en(sw_black), .rgb);

  assign vga_r  = rgb.r[7:4];
  assign vga_g  = rgb.g[7:4];
  assign vga_b  = rgb.b[7:4];
  assign vga_hs = sync_t4[1];
  assign vga_vs = sync_t4[0];

  // ------------------------------------------------------------------
  // UART
  // ------------------------------------------------------------------
  logic [7:0] tx_data;
  logic       tx_valid, tx_ready;
  uart_streamer #(.SW_WIRE_CNT(SW_WIRE_CNT), .RD_WIRE_CNT(RD_WIRE_CNT), .DATA_W(DATA_W),
                  .NEWFRAME_VALUE(NEWFRAME_VALUE)) u_stream (
    .clk, .rst, .ram_addr(uart_addr), .ram_data(uart_value),
    .tx_data, .tx_valid, .tx_ready);
  uart_tx #(.CLK_HZ(65_000_000), .BAUD(BAUD)) u_uart (
    .clk, .rst, .data(tx_data), .valid(tx_valid), .ready(tx_ready), .tx(uart_txd));
endmodule
