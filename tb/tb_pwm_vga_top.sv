// tb_pwm_vga_top: end-to-end testbench of the music player hardware.
//
// Plays the part of the processor software at full size (50 MHz clock, all
// parameters at their defaults): for each note of a short melody it draws the
// visual effect for that tune into the 160x120 graphic memory, sends the tune
// value over the FSL port, lets vga_frame_checker compare one whole frame on
// the VGA pins with the image, and then measures the pulse period on pulseout
// (nine rising edges per period) against CLK / (200 * (947 - value)).
//
// The visual effect is the software's jumping square with a 'V' cut out of
// it: with jitter = tune % 64 and a running value w that grows by 7 per
// pixel, pixel (x, y) is set when
//   70 - jitter + w%25 < x < 90 + jitter - w%25,  80 - jitter < y < 80,
//   and x != y and x != 160 - y.
//
// The melody includes the tune values 640, 32, 768 and a too large 3072 that
// must be ignored. Each mechanism is counted and must occur at least once:
// start from the reset state, an ignored value, a tune change deferred to the
// period boundary, a full frame checked, pixel writes.
module tb_pwm_vga_top;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int BASE = 947;
  localparam int N_NOTES = 6;
  localparam int MELODY [N_NOTES] = '{0, 640, 32, 3072, 768, 474};

  logic           clk = 1'b0;
  logic           rst = 1'b1;
  logic [31:0]    fsl_s_data = '0;
  logic           fsl_s_exists = 1'b0;
  logic           fsl_s_read;
  logic           vga_wr_en = 1'b0;
  logic [14:0]    vga_wr_addr = '0;
  logic           vga_wr_data = 1'b0;
  logic           pulseout;
  logic [2:0]     Red, Green;
  logic [1:0]     Blue;
  logic           Hsyn, Vsyn;

  logic [19199:0] img = '0;
  logic           enable = 1'b0;
  int m_checks, m_failures, m_frames, m_lines;

  int checks = 0;
  int failures = 0;
  int n_start = 0;
  int n_rejected = 0;
  int n_deferred = 0;
  int n_writes = 0;
  int n_notes_measured = 0;

  pwm_vga_top dut (
    .clk, .rst, .fsl_s_data, .fsl_s_exists, .fsl_s_read,
    .vga_wr_en, .vga_wr_addr, .vga_wr_data,
    .pulseout, .Red, .Green, .Blue, .Hsyn, .Vsyn
  );

  vga_frame_checker mon (.clk, .enable, .img, .Red, .Green, .Blue, .Hsyn, .Vsyn,
                         .checks(m_checks), .failures(m_failures),
                         .frames(m_frames), .lines(m_lines));

  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // A new tune waits for the period boundary: the saved divider differs from
  // the active one for a while.
  always @(posedge clk)
    if (dut.u_pwm_gen.u_divider.div != dut.u_pwm_gen.u_divider.div_act
        && dut.u_pwm_gen.u_divider.cycle_end)
      n_deferred++;

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic draw(input int tune);
    int jitter, w, x, y;
    bit v;
    jitter = tune % 64;
    w = 0;
    for (y = 0; y < 120; y++) begin
      for (x = 0; x < 160; x++) begin
        w += 7;
        v = (x > 70 - jitter + w % 25) && (x < 90 + jitter - w % 25)
            && (y > 80 - jitter) && (y < 80) && !(x == y || x == 160 - y);
        img[y * 160 + x] = v;
        @(negedge clk);
        vga_wr_en   = 1'b1;
        vga_wr_addr = 15'(y * 160 + x);
        vga_wr_data = v;
        n_writes++;
      end
    end
    @(negedge clk);
    vga_wr_en = 1'b0;
  endtask

  task automatic send(input int value);
    @(negedge clk);
    fsl_s_data   = 32'(value);
    fsl_s_exists = 1'b1;
    #1;
    check(fsl_s_read == 1'b1, "FSL word not acknowledged");
    @(negedge clk);
    fsl_s_exists = 1'b0;
  endtask

  // Period from the first to the tenth rising edge: nine pulses per period.
  task automatic measure(input int div);
    longint t0;
    @(posedge pulseout);
    t0 = cyc;
    repeat (9) @(posedge pulseout);
    check(cyc - t0 == 200 * div,
          $sformatf("pulse period %0d clocks, expected %0d (%0.2f Hz)", cyc - t0, 200 * div,
                    50.0e6 / real'(200 * div)));
    n_notes_measured++;
  endtask

  initial begin
    int div;
    repeat (4) @(negedge clk);
    rst = 1'b0;
    repeat (1000) @(negedge clk);
    check(pulseout == 1'b0 && dut.u_pwm_gen.state == 1'b0, "generator active before first tune");

    div = BASE;
    for (int n = 0; n < N_NOTES; n++) begin
      int tune;
      tune = MELODY[n];
      // Draw between frames, then check the next whole frame.
      wait (Vsyn == 1'b0);
      enable = 1'b0;
      draw(tune);
      send(tune);
      if (tune < BASE) begin
        if (n == 0) n_start++;
        div = BASE - tune;
      end else begin
        n_rejected++;
      end
      if (n == 0) check(dut.u_pwm_gen.state == 1'b1, "not working after first tune");
      begin
        int f0;
        f0 = m_frames;
        wait (Vsyn == 1'b0);
        enable = 1'b1;
        wait (m_frames == f0 + 1);
        enable = 1'b0;
      end
      measure(div);
    end

    checks   += m_checks;
    failures += m_failures;
    check(m_frames >= N_NOTES, $sformatf("%0d frames checked", m_frames));
    check(n_start > 0, "start from reset never happened");
    check(n_rejected > 0, "no ignored value");
    check(n_deferred > 0, "no deferred tune change");
    check(n_writes >= N_NOTES * 19200, "too few pixel writes");
    check(n_notes_measured == N_NOTES, "not every note measured");
    $display("mechanisms: start=%0d ignored=%0d deferred_changes=%0d pixel_writes=%0d frames=%0d notes=%0d",
             n_start, n_rejected, n_deferred, n_writes, m_frames, n_notes_measured);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + m_checks, failures + m_failures);
    $finish;
  end

endmodule
