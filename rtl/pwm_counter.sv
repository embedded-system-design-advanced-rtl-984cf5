// pwm_counter: the "PWM counter" of the PWM tone generator.
//
// Counts the divider's step ticks from 0 to STEPS-1 (200 steps: one period of
// the sine that the pulse train encodes) and wraps to 0. `cycle_end` is high in
// the clock whose tick ends the last step; the divider uses it to switch to a
// newly received tune at the period boundary. While the generator is not
// running the count is held at 0.
//
// Timing: `pwmcnt` changes on the clock after a tick. The 200 steps follow the
// published design (its frequency table is CLK / (200 * divider)); the rest is
// this implementation's choice.
module pwm_counter
  import pwm_pkg::*;
#(
  parameter int unsigned N_STEPS = STEPS
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  running,
  input  logic  tick,
  output step_t pwmcnt,
  output logic  cycle_end
);

  localparam step_t LAST = step_t'(N_STEPS - 1);

  assign cycle_end = tick && (pwmcnt == LAST);

  always_ff @(posedge clk) begin
    if (rst || !running)
      pwmcnt <= '0;
    else if (tick)
      pwmcnt <= (pwmcnt == LAST) ? '0 : pwmcnt + step_t'(1);
  end

endmodule
