// tb_pwm_counter: self-checking testbench of the 200-step PWM counter.
//
// Gives step ticks at random clocks and checks the count against a plain
// modulo-200 model, that cycle_end is high exactly on the tick that ends step
// 199, that a full cycle takes 200 ticks, and that the count is held at 0
// while the generator is not running.
module tb_pwm_counter;
  timeunit 1ns;
  timeprecision 1ps;

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic       running = 1'b0;
  logic       tick = 1'b0;
  logic [7:0] pwmcnt;
  logic       cycle_end;

  int checks = 0;
  int failures = 0;
  int ticks = 0;
  int ends = 0;

  pwm_counter dut (.clk, .rst, .running, .tick, .pwmcnt, .cycle_end);

  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    tick = 1'b1;
    repeat (5) @(negedge clk);
    check(pwmcnt == 8'd0, "counted while not running");

    running = 1'b1;
    tick = 1'b0;
    @(negedge clk);
    for (int i = 0; i < 2000; i++) begin
      tick = ($urandom_range(0, 2) != 0);
      #1;
      check(pwmcnt == 8'(ticks % 200), $sformatf("count %0d, expected %0d", pwmcnt, ticks % 200));
      check(cycle_end == (tick && (ticks % 200 == 199)), "cycle_end wrong");
      if (cycle_end) begin
        ends++;
        check(ticks + 1 == ends * 200, "cycle did not take 200 ticks");
      end
      @(negedge clk);
      if (tick) ticks++;
    end
    check(ends >= 5, "too few cycles seen");

    running = 1'b0;
    @(negedge clk);
    check(pwmcnt == 8'd0, "count not cleared when stopped");

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
