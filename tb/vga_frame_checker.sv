// vga_frame_checker: testbench monitor for the VGA pins.
//
// Watches Red/Green/Blue/Hsyn/Vsyn, sampled on the falling clock edge, and
// checks them against the 640x480 / 60 Hz mode with a 50 MHz clock: Hsyn low
// for 192 clocks every 1600, Vsyn low for 2 lines every 525. It locates the
// picture from the syncs alone (33 lines after the end of Vsyn, 96 clocks
// after the end of Hsyn, 1280 clocks wide, two clocks per pixel) and compares
// every sample with `img`, the 160x120 one-bit image the testbench wrote:
// image pixel (x/4, y/4) shown purple when 1, dark green when 0, black outside
// the picture. Frames are only compared while `enable` was high at their
// start. Counts and failures are reported through the outputs.
module vga_frame_checker (
  input  logic             clk,
  input  logic             enable,
  input  logic [19199:0]   img,
  input  logic [2:0]       Red,
  input  logic [2:0]       Green,
  input  logic [1:0]       Blue,
  input  logic             Hsyn,
  input  logic             Vsyn,
  output int               checks,
  output int               failures,
  output int               frames,
  output int               lines
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam logic [7:0] PURPLE = 8'b111_000_11;
  localparam logic [7:0] GREEN  = 8'b000_011_00;
  localparam logic [7:0] BLACK  = 8'b000_000_00;

  logic   last_h = 1'b1;
  logic   last_v = 1'b1;
  bit     seen_v = 1'b0;
  bit     in_frame = 1'b0;
  int     line_k = 0;
  longint clk_since = 0;
  longint cyc = 0;
  longint h_fall = -1, h_rise = -1, v_fall = -1, v_rise = -1;
  int     fails_seen = 0;

  initial begin
    checks = 0;
    failures = 0;
    frames = 0;
    lines = 0;
  end

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      fails_seen++;
      if (fails_seen <= 20) $display("FAIL @%0t: %s", $time, what);
    end
  endfunction

  always @(negedge clk) begin
    logic [7:0] pix;
    logic [7:0] want;
    cyc++;
    clk_since++;
    pix = {Red, Green, Blue};

    // Horizontal sync.
    if (!Hsyn && last_h) begin
      if (h_fall >= 0) check(cyc - h_fall == 1600, $sformatf("Hsyn period %0d", cyc - h_fall));
      h_fall = cyc;
    end
    if (Hsyn && !last_h) begin
      if (h_fall >= 0) check(cyc - h_fall == 192, $sformatf("Hsyn low for %0d", cyc - h_fall));
      h_rise = cyc;
      clk_since = 0;
      line_k++;
      lines++;
    end

    // Vertical sync.
    if (!Vsyn && last_v) begin
      if (v_fall >= 0) check(cyc - v_fall == 525 * 1600, $sformatf("Vsyn period %0d", cyc - v_fall));
      v_fall = cyc;
    end
    if (Vsyn && !last_v) begin
      if (v_fall >= 0) check(cyc - v_fall == 2 * 1600, $sformatf("Vsyn low for %0d", cyc - v_fall));
      if (in_frame) begin
        check(line_k == 525, $sformatf("%0d lines in frame", line_k));
        frames++;
      end
      in_frame = enable && seen_v;
      seen_v = 1'b1;
      line_k = 0;
    end

    if (in_frame && h_rise >= 0) begin
      if (line_k >= 33 && line_k < 513 && clk_since >= 96 && clk_since < 96 + 1280) begin
        int x, y;
        x = int'(clk_since - 96) / 2;
        y = line_k - 33;
        want = img[(y / 4) * 160 + x / 4] ? PURPLE : GREEN;
        check(pix == want, $sformatf("pixel (%0d,%0d) = %h, expected %h", x, y, pix, want));
      end else begin
        check(pix == BLACK, $sformatf("blanking line %0d clk %0d = %h", line_k, clk_since, pix));
      end
    end

    last_h = Hsyn;
    last_v = Vsyn;
  end

endmodule
