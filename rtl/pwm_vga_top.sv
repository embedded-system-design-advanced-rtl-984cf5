// pwm_vga_top: the custom hardware of a music player with a visual effect.
//
// A soft processor plays a melody by sending tune values, one per note, over a
// one-way FSL link to the PWM tone generator, whose pulse output drives an
// audio filter/amplifier module and a speaker. At the same time it draws a
// jumping square, sized by the current tune, into the 160x120 graphic memory
// of the VGA controller, which shows it on a 640x480 screen. This module holds
// the two hardware blocks side by side on the one 50 MHz clock; the processor,
// its bus, push-button input and timer are outside and reach the blocks
// through the FSL slave ports and the pixel write port brought out here.
//
// Timing: see pwm_gen (tone changes at the next period boundary) and vga_ctrl
// (colour and sync two clocks after the scan position). Pin names follow the
// board constraints of the published design; the shared reset is this
// implementation's choice.
module pwm_vga_top
  import pwm_pkg::*;
  import vga_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  // FSL slave side, from the processor
  input  logic [DATA_W-1:0] fsl_s_data,
  input  logic              fsl_s_exists,
  output logic              fsl_s_read,
  // pixel write port, from the processor bus
  input  logic              vga_wr_en,
  input  fb_addr_t          vga_wr_addr,
  input  logic              vga_wr_data,
  // board pins
  output logic              pulseout,
  output logic [2:0]        Red,
  output logic [2:0]        Green,
  output logic [1:0]        Blue,
  output logic              Hsyn,
  output logic              Vsyn
);

  pwm_gen u_pwm_gen (
    .fsl_clk      (clk),
    .fsl_rst      (rst),
    .fsl_s_data   (fsl_s_data),
    .fsl_s_exists (fsl_s_exists),
    .fsl_s_read   (fsl_s_read),
    .pulseout     (pulseout)
  );

  vga_ctrl u_vga_ctrl (
    .clk     (clk),
    .rst     (rst),
    .wr_en   (vga_wr_en),
    .wr_addr (vga_wr_addr),
    .wr_data (vga_wr_data),
    .Red     (Red),
    .Green   (Green),
    .Blue    (Blue),
    .Hsyn    (Hsyn),
    .Vsyn    (Vsyn)
  );

endmodule
