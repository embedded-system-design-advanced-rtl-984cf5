// tb_pwm_gen: self-checking testbench of the PWM tone generator.
//
// Drives the FSL slave port the way the processor does: one word per clock,
// held while fsl_s_exists is high, and checks that every word is acknowledged.
// A monitor measures the length of every high and low stretch of pulseout and
// compares it with the pulse pattern of the set/reset table (written out here
// as step counts: 19 high at the start, then 2 low, 16 high, 7 low, ...) times
// the divider. When a new tune is sent mid-period, the stretch around the
// period boundary must be 19 steps of the old divider plus 19 of the new one,
// which shows that the change waits for the end of the period. For each of the
// 21 notes the rise-to-rise period is turned into a frequency and compared
// with the frequency table of the 21-note scale (to 0.01 Hz).
// Also checked: a value of 947 or more is ignored, in either state, and the
// output stays low until the first valid value.
module tb_pwm_gen;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int NOTES = 21;
  localparam int BASE  = 947;

  // Divider and frequency (Hz x 100) of the 21 notes, low to high.
  localparam int DIVS [NOTES] = '{947, 842, 758, 710, 631, 568, 505,
                                  473, 421, 379, 355, 316, 284, 253,
                                  237, 210, 189, 178, 158, 142, 126};
  localparam int FREQ_X100 [NOTES] = '{26399, 29691, 32982, 35211, 39620, 44014, 49505,
                                       52854, 59382, 65963, 70423, 79114, 88028, 98814,
                                       105485, 119048, 132275, 140449, 158228, 176056, 198413};
  // Published input values of the first 14 notes.
  localparam int INPUTS [14] = '{0, 105, 189, 237, 316, 379, 442,
                                 474, 526, 568, 592, 631, 663, 694};

  // Stretches of one period after step 19, in steps: low, high, low, ...
  // The last entry is the high stretch around the period boundary (181..18).
  localparam int SEG_STEPS [18] = '{2, 16, 7, 10, 14, 4, 18, 1, 19,
                                    1, 17, 4, 14, 10, 7, 16, 2, 38};

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic [31:0] fsl_s_data = '0;
  logic        fsl_s_exists = 1'b0;
  logic        fsl_s_read;
  logic        pulseout;

  int checks = 0;
  int failures = 0;
  int n_rejected = 0;
  int n_started = 0;
  int n_deferred = 0;
  int n_period_checks = 0;

  pwm_gen dut (
    .fsl_clk      (clk),
    .fsl_rst      (rst),
    .fsl_s_data   (fsl_s_data),
    .fsl_s_exists (fsl_s_exists),
    .fsl_s_read   (fsl_s_read),
    .pulseout     (pulseout)
  );

  always #10 clk = ~clk;   // 50 MHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // ---------------------------------------------------------------- monitor
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  bit     started = 1'b0;       // first valid tune sent
  int     act_div = 0;          // divider of the period being played
  int     pend_div = 0;         // divider waiting for the period boundary
  int     seg = -2;             // -2: before the first rise, -1: first stretch (19 high)
  longint last_edge = 0;
  longint last_wrap_rise = -1;
  bit     last_pulse = 1'b0;
  longint wrap_rise_time = 0;
  bit     changed = 1'b0;       // the divider changed since the last boundary rise
  event   ev_mid;               // rise at step 21
  event   ev_wrap;              // rise at step 181

  always @(posedge clk) begin
    if (!rst && started) begin
      if (seg == -2) begin
        if (pulseout) begin
          seg = -1;
          last_edge = cyc;
          last_pulse = 1'b1;
        end
      end else if (pulseout != last_pulse) begin
        longint len;
        longint want;
        len = cyc - last_edge;
        if (seg < 0) begin
          want = 19 * act_div;
        end else if (seg == 17) begin
          want = 19 * act_div + 19 * pend_div;
          if (pend_div != act_div) begin
            n_deferred++;
            changed = 1'b1;
          end
          act_div = pend_div;
        end else begin
          want = SEG_STEPS[seg] * act_div;
        end
        check(len == want, $sformatf("stretch %0d lasted %0d clocks, expected %0d (div %0d)",
                                     seg, len, want, act_div));
        // The rise that starts the boundary stretch marks one period.
        if (pulseout && seg == 16) begin
          if (last_wrap_rise >= 0 && !changed) begin
            longint period;
            period = cyc - last_wrap_rise;
            check(period == 200 * act_div,
                  $sformatf("period %0d clocks, expected %0d", period, 200 * act_div));
          end
          last_wrap_rise = cyc;
          changed = 1'b0;
          wrap_rise_time = cyc;
          -> ev_wrap;
        end
        if (pulseout && seg == 0) -> ev_mid;
        seg = (seg == 17) ? 0 : seg + 1;
        last_edge = cyc;
        last_pulse = pulseout;
      end
    end
  end

  // ----------------------------------------------------------------- driver
  task automatic send(input int value);
    @(negedge clk);
    fsl_s_data   = 32'(value);
    fsl_s_exists = 1'b1;
    #1;
    check(fsl_s_read == 1'b1, "word not acknowledged");
    @(negedge clk);
    fsl_s_exists = 1'b0;
    fsl_s_data   = '0;
  endtask

  // Wait until the rise at step 21 (start of the 16-step high stretch).
  task automatic wait_mid_period();
    @(ev_mid);
  endtask

  // Measure one full period of the note now playing and compare the frequency.
  task automatic measure(input int note);
    longint r0;
    real    f;
    int     fx;
    // The first boundary rise after a change still ends an old-divider
    // stretch, and the period after it is mixed; skip both.
    @(ev_wrap);
    @(ev_wrap);
    r0 = wrap_rise_time;
    @(ev_wrap);
    f  = 50.0e6 / real'(wrap_rise_time - r0);
    fx = int'(f * 100.0 + 0.5);
    check((fx - FREQ_X100[note]) inside {[-1:1]},
          $sformatf("note %0d: %0.2f Hz, table %0d.%02d Hz", note, f,
                    FREQ_X100[note] / 100, FREQ_X100[note] % 100));
    n_period_checks++;
  endtask

  initial begin
    repeat (5) @(posedge clk);
    @(negedge clk) rst = 1'b0;

    // Published input values give the published dividers.
    for (int i = 0; i < 14; i++)
      check(BASE - INPUTS[i] == DIVS[i], $sformatf("input table entry %0d", i));

    // A too large value does not start the generator.
    send(3072);
    n_rejected++;
    repeat (2000) begin
      @(posedge clk);
      check(pulseout == 1'b0, "output active before a valid tune");
    end
    check(dut.state == 1'b0, "left reset state on a too large value");

    // First valid tune: the lowest note.
    act_div  = DIVS[0];
    pend_div = DIVS[0];
    send(BASE - DIVS[0]);
    started = 1'b1;
    n_started++;
    measure(0);

    for (int n = 1; n < NOTES; n++) begin
      wait_mid_period();
      if (n % 5 == 0) begin
        send(BASE + n * 100);   // too large: ignored
        n_rejected++;
      end
      send(BASE - DIVS[n]);
      pend_div = DIVS[n];
      measure(n);
    end

    // Drop back to a low note and back up, values straight from the table.
    wait_mid_period();
    send(INPUTS[3]);
    pend_div = BASE - INPUTS[3];
    measure(3);

    check(n_started  > 0, "generator never started");
    check(n_rejected > 0, "no too large value sent");
    check(n_deferred >= NOTES, $sformatf("only %0d deferred divider loads", n_deferred));
    check(n_period_checks == NOTES + 1, "not every note measured");
    $display("mechanisms: start=%0d rejected=%0d deferred_loads=%0d notes_measured=%0d",
             n_started, n_rejected, n_deferred, n_period_checks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
