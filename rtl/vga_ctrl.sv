// vga_ctrl: VGA controller for a 160x120 two-colour picture.
//
// The processor draws by writing one bit per pixel into the graphic memory
// (vga_framebuf) at address x + 160*y; any nonzero bus value is stored as 1.
// The display side (vga_sync) scans the 640x480 screen; each screen pixel
// (h, v) inside the picture reads image pixel (h/4, v/4), so the image fills
// the screen at four times its size. Stored 0 is shown dark green, stored 1
// purple, and the blanking intervals are black.
//
// Pipeline: the memory address is formed from the sync counters, the memory
// answers one clock later, and the colour and both syncs are registered one
// clock after that. Colour and sync are therefore delayed alike by two clocks
// (one pixel), and every output pin is driven from a flip-flop.
//
// Interface: wr_en/wr_addr/wr_data is a plain one-clock write port; it stands
// for the user-logic side of the processor bus attachment. Red, Green, Blue,
// Hsyn and Vsyn are the board pins; Hsyn and Vsyn are active low.
//
// The picture size, the one-bit memory, its addressing, the colours and the
// pin names follow the published design. The write port, the black blanking,
// the 2-clock pipeline and the registered pins are this implementation's
// choices.
module vga_ctrl
  import vga_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       wr_en,
  input  fb_addr_t   wr_addr,
  input  logic       wr_data,
  output logic [2:0] Red,
  output logic [2:0] Green,
  output logic [1:0] Blue,
  output logic       Hsyn,
  output logic       Vsyn
);

  logic     pix_en;
  coord_t   hcount;
  coord_t   vcount;
  logic     active;
  logic     hsync_n;
  logic     vsync_n;
  fb_addr_t rd_addr;
  logic     pixel;
  coord_t   img_x;
  coord_t   img_y;

  // Stage-1 copies of the timing signals, aligned with the memory output.
  logic     active_q;
  logic     hsync_q;
  logic     vsync_q;
  rgb332_t  color;

  vga_sync u_sync (
    .clk     (clk),
    .rst     (rst),
    .pix_en  (pix_en),
    .hcount  (hcount),
    .vcount  (vcount),
    .active  (active),
    .hsync_n (hsync_n),
    .vsync_n (vsync_n)
  );

  // Address generator: x + 160*y = x + 128*y + 32*y.
  assign img_x   = hcount >> $clog2(FB_SCALE);
  assign img_y   = vcount >> $clog2(FB_SCALE);
  assign rd_addr = fb_addr_t'({img_y, 7'b0}) + fb_addr_t'({img_y, 5'b0}) + fb_addr_t'(img_x);

  vga_framebuf u_framebuf (
    .clk     (clk),
    .wr_en   (wr_en),
    .wr_addr (wr_addr),
    .wr_data (wr_data),
    .rd_addr (rd_addr),
    .rd_data (pixel)
  );

  always_comb begin
    if (!active_q)  color = COLOR_BLANK;
    else if (pixel) color = COLOR_FOREGROUND;
    else            color = COLOR_BACKGROUND;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      active_q <= 1'b0;
      hsync_q  <= 1'b1;
      vsync_q  <= 1'b1;
      Red      <= '0;
      Green    <= '0;
      Blue     <= '0;
      Hsyn     <= 1'b1;
      Vsyn     <= 1'b1;
    end else begin
      active_q <= active;
      hsync_q  <= hsync_n;
      vsync_q  <= vsync_n;
      Red      <= color.r;
      Green    <= color.g;
      Blue     <= color.b;
      Hsyn     <= hsync_q;
      Vsyn     <= vsync_q;
    end
  end

endmodule
