// tactile_pkg: constants and types shared by the tactile sensing textile design.
//
// The sensor is a grid of SW_WIRE_CNT switching wires (rows) crossed by
// RD_WIRE_CNT reading wires (columns). Each crossing is sampled by a 12-bit
// ADC, so every pixel of the pressure image is a 12-bit unsigned value. A
// pixel address is row * RD_WIRE_CNT + column, rows and columns counted from 0.
// The 16 x 16 grid, the 12-bit sample and the six convolution kernels follow
// the report this design implements; the kernel encoding and the RGB struct are
// this design's own.
package tactile_pkg;

  localparam int unsigned DATA_W   = 12;          // ADC sample width

  typedef logic [DATA_W-1:0] pixel_t;

  // 3x3 convolution kernels, selected with the board switches
  typedef enum logic [2:0] {
    K_IDENTITY = 3'd0,
    K_GAUSSIAN = 3'd1,
    K_SHARPEN  = 3'd2,
    K_RIDGE    = 3'd3,
    K_SOBEL_X  = 3'd4,
    K_SOBEL_Y  = 3'd5
  } kernel_e;

  // 8-bit-per-channel colour
  typedef struct packed {
    logic [7:0] r;
    logic [7:0] g;
    logic [7:0] b;
  } rgb_t;

endpackage
