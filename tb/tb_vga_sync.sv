// tb_vga_sync: self-checking testbench of the 640x480 VGA timing generator.
//
// Runs two frames and checks, against the standard mode's numbers written out
// here: the pixel enable every second clock, the horizontal and vertical
// count ranges, `active` exactly inside the 640x480 picture, the sync pulse
// positions (Hsyn low on pixels 656..751 of each line, Vsyn low on lines
// 490..491), the number of clocks per line (1600) and per frame (840000).
module tb_vga_sync;
  timeunit 1ns;
  timeprecision 1ps;

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic       pix_en;
  logic [9:0] hcount, vcount;
  logic       active, hsync_n, vsync_n;

  int checks = 0;
  int failures = 0;

  vga_sync dut (.clk, .rst, .pix_en, .hcount, .vcount, .active, .hsync_n, .vsync_n);

  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin
    longint n;
    int h, v, prev_en;
    int active_clks;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    n = 0;
    active_clks = 0;
    prev_en = 1;
    // Model: the reset clock is the first half of pixel 0, so the n-th
    // sample after reset is scan clock n+1 and shows pixel (n+1)/2.
    while (n < 2 * 840_000) begin
      @(negedge clk);
      h = int'(((n + 1) / 2) % 800);
      v = int'(((n + 1) / 1600) % 525);
      check(int'(hcount) == h && int'(vcount) == v,
            $sformatf("clk %0d: position (%0d,%0d), expected (%0d,%0d)", n, hcount, vcount, h, v));
      check(pix_en == ((n + 1) % 2 == 1), "pixel enable phase");
      check(active == (h < 640 && v < 480), "active flag");
      check(hsync_n == !(h >= 656 && h < 752), "Hsync position");
      check(vsync_n == !(v >= 490 && v < 492), "Vsync position");
      if (active) active_clks++;
      n++;
    end
    check(active_clks == 2 * 2 * 640 * 480, $sformatf("%0d active clocks in two frames", active_clks));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
