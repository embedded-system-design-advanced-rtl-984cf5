// vga_sync: the "Synch" part of the VGA controller.
//
// Generates the 640x480 / 60 Hz VGA timing from the 50 MHz system clock. A
// divide-by-two enable makes the 25 MHz pixel rate; the horizontal counter
// runs 0..799 (640 visible, 16 front porch, 96 sync, 48 back porch) and the
// vertical counter 0..524 (480 visible, 10 front porch, 2 sync, 33 back
// porch), advancing at the end of each line. Both syncs are active low.
//
// Interface: `hcount`/`vcount` are the position of the current pixel,
// `active` is high inside the 640x480 picture, `pix_en` marks the second
// clock of each pixel, on which the counters advance. The counters are
// registers; `active` and the syncs are decoded from them, so all outputs
// change together, and a pixel lasts two clocks. The clock in reset counts as
// the first clock of pixel (0, 0).
//
// Only the name of this block and the screen it drives come from the
// published design; the standard mode's numbers and the counter structure are
// this implementation's choice.
module vga_sync
  import vga_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  output logic   pix_en,
  output coord_t hcount,
  output coord_t vcount,
  output logic   active,
  output logic   hsync_n,
  output logic   vsync_n
);

  localparam coord_t H_LAST       = coord_t'(H_TOTAL - 1);
  localparam coord_t V_LAST       = coord_t'(V_TOTAL - 1);
  localparam coord_t H_SYNC_START = coord_t'(H_VISIBLE + H_FRONT);
  localparam coord_t H_SYNC_END   = coord_t'(H_VISIBLE + H_FRONT + H_SYNC);
  localparam coord_t V_SYNC_START = coord_t'(V_VISIBLE + V_FRONT);
  localparam coord_t V_SYNC_END   = coord_t'(V_VISIBLE + V_FRONT + V_SYNC);

  logic phase;

  assign pix_en  = phase;
  assign active  = (hcount < coord_t'(H_VISIBLE)) && (vcount < coord_t'(V_VISIBLE));
  assign hsync_n = !((hcount >= H_SYNC_START) && (hcount < H_SYNC_END));
  assign vsync_n = !((vcount >= V_SYNC_START) && (vcount < V_SYNC_END));

  always_ff @(posedge clk) begin
    if (rst) begin
      phase  <= 1'b0;
      hcount <= '0;
      vcount <= '0;
    end else begin
      phase <= !phase;
      if (phase) begin
        if (hcount == H_LAST) begin
          hcount <= '0;
          vcount <= (vcount == V_LAST) ? '0 : vcount + coord_t'(1);
        end else begin
          hcount <= hcount + coord_t'(1);
        end
      end
    end
  end

endmodule
