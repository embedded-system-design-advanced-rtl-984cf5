// tb_vga_ctrl: self-checking testbench of the VGA controller.
//
// Writes a random 160x120 image through the pixel write port, then lets a
// monitor (vga_frame_checker) compare a whole frame of the VGA pins with it:
// sync timing, picture position, 4x enlargement, colours and blanking. It then
// redraws the image with a different pattern, written while the screen is
// being scanned, and checks the next full frame again. Writes past the last
// pixel must not alter the picture.
module tb_vga_ctrl;
  timeunit 1ns;
  timeprecision 1ps;

  logic         clk = 1'b0;
  logic         rst = 1'b1;
  logic         wr_en = 1'b0;
  logic [14:0]  wr_addr = '0;
  logic         wr_data = 1'b0;
  logic [2:0]   Red, Green;
  logic [1:0]   Blue;
  logic         Hsyn, Vsyn;
  logic [19199:0] img = '0;
  logic         enable = 1'b0;

  int checks = 0;
  int failures = 0;
  int m_checks, m_failures, m_frames, m_lines;

  vga_ctrl dut (.clk, .rst, .wr_en, .wr_addr, .wr_data, .Red, .Green, .Blue, .Hsyn, .Vsyn);

  vga_frame_checker mon (.clk, .enable, .img, .Red, .Green, .Blue, .Hsyn, .Vsyn,
                         .checks(m_checks), .failures(m_failures),
                         .frames(m_frames), .lines(m_lines));

  always #10 clk = ~clk;

  task automatic write_pixel(input int addr, input bit value);
    @(negedge clk);
    wr_en   = 1'b1;
    wr_addr = 15'(addr);
    wr_data = value;
    @(negedge clk);
    wr_en   = 1'b0;
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin
    repeat (4) @(negedge clk);
    rst = 1'b0;

    // Random image.
    for (int a = 0; a < 19200; a++) begin
      bit v;
      v = 1'($urandom_range(0, 1));
      img[a] = v;
      write_pixel(a, v);
    end
    // Writes past the end are ignored.
    for (int a = 19200; a < 19300; a++) write_pixel(a, 1'b1);

    enable = 1'b1;
    wait (m_frames == 1);
    enable = 1'b0;

    // Second pattern: stripes and a box, written during the scan.
    for (int a = 0; a < 19200; a++) begin
      bit v;
      int x, y;
      x = a % 160;
      y = a / 160;
      v = ((x / 8) % 2 == 0) ^ (x > 40 && x < 120 && y > 30 && y < 90);
      img[a] = v;
      write_pixel(a, v);
    end
    wait (m_frames == 1 && Vsyn == 1'b0);
    enable = 1'b1;
    wait (m_frames == 2);

    check(m_frames == 2, "two frames not checked");
    check(m_checks > 1_000_000, "too few pixel checks");
    checks   += m_checks;
    failures += m_failures;
    $display("frames=%0d lines=%0d", m_frames, m_lines);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + m_checks, failures + m_failures);
    $finish;
  end

endmodule
