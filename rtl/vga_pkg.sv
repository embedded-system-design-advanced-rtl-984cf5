// vga_pkg: constants and types shared by the VGA controller.
//
// The screen runs the 640x480 VGA mode at 60 Hz with a 25 MHz pixel rate,
// one pixel every second cycle of the 50 MHz system clock. The picture is a
// 160x120 one-bit image, each image pixel shown as a 4x4 block of screen
// pixels. Bit 0 shows the background colour, bit 1 the foreground colour.
// Colours are 8-bit RGB (3 bits red, 3 green, 2 blue) as on the board's
// resistor DAC.
//
// The 160x120 image, the one bit per pixel, the 50 MHz clock, dark green
// background and purple foreground follow the published design. The porch and
// sync lengths are those of the standard 640x480 mode, and the exact colour
// codes are this implementation's choice.
package vga_pkg;

  // Horizontal timing in pixels.
  localparam int unsigned H_VISIBLE = 640;
  localparam int unsigned H_FRONT   = 16;
  localparam int unsigned H_SYNC    = 96;
  localparam int unsigned H_BACK    = 48;
  localparam int unsigned H_TOTAL   = H_VISIBLE + H_FRONT + H_SYNC + H_BACK;  // 800

  // Vertical timing in lines.
  localparam int unsigned V_VISIBLE = 480;
  localparam int unsigned V_FRONT   = 10;
  localparam int unsigned V_SYNC    = 2;
  localparam int unsigned V_BACK    = 33;
  localparam int unsigned V_TOTAL   = V_VISIBLE + V_FRONT + V_SYNC + V_BACK;  // 525

  localparam int unsigned CLKS_PER_PIXEL = 2;    // 50 MHz clock, 25 MHz pixels

  // Stored image.
  localparam int unsigned FB_W     = 160;
  localparam int unsigned FB_H     = 120;
  localparam int unsigned FB_SCALE = 4;          // 640 / 160 and 480 / 120
  localparam int unsigned FB_WORDS = FB_W * FB_H; // 19200 one-bit pixels
  localparam int unsigned FB_AW    = $clog2(FB_WORDS);  // 15

  typedef logic [9:0]       coord_t;
  typedef logic [FB_AW-1:0] fb_addr_t;

  typedef struct packed {
    logic [2:0] r;
    logic [2:0] g;
    logic [1:0] b;
  } rgb332_t;

  localparam rgb332_t COLOR_BACKGROUND = '{r: 3'd0, g: 3'd3, b: 2'd0};  // dark green
  localparam rgb332_t COLOR_FOREGROUND = '{r: 3'd7, g: 3'd0, b: 2'd3};  // purple
  localparam rgb332_t COLOR_BLANK      = '{r: 3'd0, g: 3'd0, b: 2'd0};  // outside the picture

endpackage
