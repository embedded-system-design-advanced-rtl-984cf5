// tb_pwm_setreset: self-checking testbench of the set/reset pulse stage.
//
// Sweeps the step count through whole periods (0..199) and checks, one clock
// after each step, that the pulse is high exactly inside the ten windows
// [set, reset) of the sine table, written out independently here. Also checks
// that the output is held low while the generator is not running, and that a
// step count that is neither a set nor a reset point leaves the pulse as it is.
module tb_pwm_setreset;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int SETS [10]   = '{0, 21, 44, 68, 90, 110, 128, 146, 163, 181};
  localparam int RESETS [10] = '{19, 37, 54, 72, 91, 111, 132, 156, 179, 200};

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic       running = 1'b0;
  logic [7:0] pwmcnt = '0;
  logic       pulse;

  int checks = 0;
  int failures = 0;

  pwm_setreset dut (.clk, .rst, .running, .pwmcnt, .pulse);

  always #10 clk = ~clk;

  function automatic bit in_window(input int step);
    for (int i = 0; i < 10; i++)
      if (step >= SETS[i] && step < RESETS[i]) return 1'b1;
    return 1'b0;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin
    int highs;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    check(pulse == 1'b0, "pulse high after reset");
    // Not running: output stays low even on a set point.
    pwmcnt = 8'd0;
    repeat (3) @(negedge clk);
    check(pulse == 1'b0, "pulse high while not running");

    running = 1'b1;
    for (int p = 0; p < 3; p++) begin
      highs = 0;
      for (int s = 0; s < 200; s++) begin
        pwmcnt = 8'(s);
        @(negedge clk);
        check(pulse == in_window(s), $sformatf("period %0d step %0d: pulse %0b", p, s, pulse));
        highs += int'(pulse);
      end
      check(highs == 100, $sformatf("%0d high steps per period, expected 100", highs));
    end

    // Steps that are no table point hold the pulse.
    pwmcnt = 8'd181;            // set
    @(negedge clk);
    pwmcnt = 8'd195;
    repeat (4) @(negedge clk);
    check(pulse == 1'b1, "pulse did not hold high");
    pwmcnt = 8'd91;             // reset
    @(negedge clk);
    pwmcnt = 8'd100;
    repeat (4) @(negedge clk);
    check(pulse == 1'b0, "pulse did not hold low");

    running = 1'b0;
    pwmcnt  = 8'd21;
    @(negedge clk);
    check(pulse == 1'b0, "pulse not cleared when stopped");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
