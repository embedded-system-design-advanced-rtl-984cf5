// vga_framebuf: the graphic memory ("BRAM") of the VGA controller.
//
// Holds the 160x120 one-bit image, pixel (x, y) at address x + 160*y, 19200
// bits in all. It has a write port for the processor and a read port for the
// display, both on the one system clock, so it maps onto block RAM. The read
// is synchronous: `rd_data` shows the pixel at `rd_addr` one clock after the
// address. Writes to addresses past the image are ignored. The memory starts
// cleared (all background), as block RAM is initialised at configuration.
//
// The size and the one bit per pixel follow the published design; the port
// arrangement and the initial contents are this implementation's choice.
module vga_framebuf
  import vga_pkg::*;
#(
  parameter int unsigned WORDS = FB_WORDS
) (
  input  logic     clk,
  input  logic     wr_en,
  input  fb_addr_t wr_addr,
  input  logic     wr_data,
  input  fb_addr_t rd_addr,
  output logic     rd_data
);

  logic mem [WORDS];

  initial begin
    for (int i = 0; i < int'(WORDS); i++) mem[i] = 1'b0;
  end

  always_ff @(posedge clk) begin
    if (wr_en && (int'(wr_addr) < int'(WORDS)))
      mem[wr_addr] <= wr_data;
    if (int'(rd_addr) < int'(WORDS))
      rd_data <= mem[rd_addr];
    else
      rd_data <= 1'b0;
  end

endmodule
