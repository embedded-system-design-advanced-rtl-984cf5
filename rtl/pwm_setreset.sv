// pwm_setreset: the "Set or reset" stage of the PWM tone generator.
//
// Looks the current PWM step up in the two point tables of pwm_pkg: when the
// step equals a set point the pulse register is set, when it equals a reset
// point it is cleared, otherwise it keeps its value. Ten pulses per period
// approximate one sine period. A reset point of 200 lies past the last step,
// so the pulse that starts at 181 runs on into the set point 0 of the next
// period. The output is low while the generator is not running.
//
// Timing: `pulse` follows `pwmcnt` one clock later. The tables are the
// published design's; the registered output is this implementation's choice.
module pwm_setreset
  import pwm_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  running,
  input  step_t pwmcnt,
  output logic  pulse
);

  logic set_hit;
  logic reset_hit;

  always_comb begin
    set_hit   = 1'b0;
    reset_hit = 1'b0;
    for (int i = 0; i < int'(N_PULSES); i++) begin
      if (pwmcnt == step_t'(SET_POINTS[i]))   set_hit   = 1'b1;
      if (pwmcnt == step_t'(RESET_POINTS[i])) reset_hit = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst || !running)
      pulse <= 1'b0;
    else if (set_hit)
      pulse <= 1'b1;
    else if (reset_hit)
      pulse <= 1'b0;
  end

endmodule
