// tb_pwm_divider: self-checking testbench of the PWM clock divider.
//
// Checks the value-to-divider rule (divider = 947 - value, values of 947 or
// more ignored) on values drawn from the 21-note table and at random, that
// the first value loads at once while the generator is idle, that ticks come
// exactly every div_act clocks, and that a value received while running only
// becomes the active divider at the end of a PWM cycle. The PWM cycle end is
// played by the testbench, here every fifth tick.
module tb_pwm_divider;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int BASE = 947;
  localparam int NOTE_DIVS [7] = '{947, 473, 237, 631, 126, 355, 189};

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic        running = 1'b0;
  logic        in_valid = 1'b0;
  logic [31:0] in_data = '0;
  logic        cycle_end;
  logic        accepted;
  logic        tick;
  logic [9:0]  div;
  logic [9:0]  div_act;
  logic [9:0]  frqcnt;

  int checks = 0;
  int failures = 0;
  int tb_ticks = 0;
  int n_deferred = 0;
  int n_rejected = 0;

  assign cycle_end = tick && (tb_ticks % 5 == 4);

  pwm_divider dut (.clk, .rst, .running, .in_valid, .in_data, .cycle_end,
                   .accepted, .tick, .div, .div_act, .frqcnt);

  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // Tick spacing monitor.
  int     ref_act = 0;
  int     ref_pend = 0;
  int     want_gap = 0;
  longint cyc = 0;
  longint last_tick = -1;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (running && tick) begin
      if (last_tick >= 0)
        check(cyc - last_tick == want_gap,
              $sformatf("tick gap %0d, expected %0d", cyc - last_tick, want_gap));
      if (cycle_end) begin
        if (ref_pend != ref_act) n_deferred++;
        ref_act = ref_pend;
      end
      want_gap  = ref_act;
      last_tick = cyc;
      tb_ticks <= tb_ticks + 1;
    end
  end

  task automatic send(input int value);
    @(negedge clk);
    in_valid = 1'b1;
    in_data  = 32'(value);
    #1;
    check(accepted == (value < BASE), $sformatf("accepted=%0b for %0d", accepted, value));
    @(negedge clk);
    in_valid = 1'b0;
    if (value < BASE) begin
      check(int'(div) == BASE - value, $sformatf("div %0d for value %0d", div, value));
      ref_pend = BASE - value;
    end else begin
      n_rejected++;
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    check(int'(div) == BASE, "div not 947 after reset");

    // Idle: rejected value changes nothing, a valid one loads everything.
    send(5000);
    check(int'(div) == BASE, "too large value changed div");
    send(BASE - 473);
    check(int'(div_act) == 473 && int'(frqcnt) == 473, "idle load did not reach div_act/frqcnt");
    ref_act  = 473;
    ref_pend = 473;
    want_gap = 473;
    running  = 1'b1;

    // Running: change the tune at random moments.
    for (int n = 0; n < 7; n++) begin
      repeat ($urandom_range(100, 3000)) @(negedge clk);
      if (n == 2) send(BASE + 1);
      if (n == 4) send(BASE);
      send(BASE - NOTE_DIVS[n]);
      // Wait for the cycle end plus one cycle of the new divider.
      repeat (12 * 947) @(negedge clk);
      check(int'(div_act) == NOTE_DIVS[n], $sformatf("div_act %0d, expected %0d", div_act, NOTE_DIVS[n]));
    end

    for (int i = 0; i < 200; i++) begin
      int v;
      v = int'($urandom_range(0, 4000));
      @(negedge clk);
      in_valid = 1'b1;
      in_data  = 32'(v);
      #1;
      check(accepted == (v < BASE), $sformatf("accept rule for %0d", v));
      if (v < BASE) begin
        @(negedge clk);
        check(int'(div) == BASE - v, $sformatf("div for %0d", v));
        ref_pend = BASE - v;
      end
    end
    in_valid = 1'b0;

    check(n_deferred >= 7, $sformatf("only %0d deferred loads", n_deferred));
    check(n_rejected >= 3, "too few rejected values");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
