// pwm_gen: PWM tone generator, an FSL slave of the processor.
//
// The processor sends tune input values down a one-way FSL link (Fast Simplex
// Link: a FIFO whose slave side shows fsl_s_exists while a word waits in
// fsl_s_data, and pops it when the slave raises fsl_s_read). Every word is
// acknowledged in the clock it is presented. pwm_divider turns the value into
// a clock divider, pwm_counter counts 200 steps of one sine period, and
// pwm_setreset forms the pulse train from the set/reset table. The pulse goes
// to an external audio filter and amplifier, which turns it into a tone of
// CLK_HZ / (200 * divider).
//
// The state machine has two states. In `reset` the output is low and the
// counters are idle; the first value in range moves it to `working`, where it
// stays until fsl_rst. Changes of tune are handled inside `working`: a new
// value is saved at once and takes effect at the start of the next period.
// Values of 947 or more are acknowledged but ignored.
//
// Timing: the state and the divider change on the clock after the word; the
// first step starts there, and pulseout follows the step count by one clock.
// Port names, the two states, the acknowledge and the ignoring of too large
// values follow the published design; the same-clock acknowledge is this
// implementation's choice.
module pwm_gen
  import pwm_pkg::*;
(
  input  logic              fsl_clk,
  input  logic              fsl_rst,
  input  logic [DATA_W-1:0] fsl_s_data,
  input  logic              fsl_s_exists,
  output logic              fsl_s_read,
  output logic              pulseout
);

  pwm_state_e state;
  logic       running;
  logic       accepted;
  logic       tick;
  logic       cycle_end;
  div_t       div;
  div_t       div_act;
  div_t       frqcnt;
  step_t      pwmcnt;

  assign running    = (state == ST_WORKING);
  assign fsl_s_read = fsl_s_exists && !fsl_rst;

  always_ff @(posedge fsl_clk) begin
    if (fsl_rst)
      state <= ST_RESET;
    else if (state == ST_RESET && accepted)
      state <= ST_WORKING;
  end

  pwm_divider u_divider (
    .clk       (fsl_clk),
    .rst       (fsl_rst),
    .running   (running),
    .in_valid  (fsl_s_exists),
    .in_data   (fsl_s_data),
    .cycle_end (cycle_end),
    .accepted  (accepted),
    .tick      (tick),
    .div       (div),
    .div_act   (div_act),
    .frqcnt    (frqcnt)
  );

  pwm_counter u_counter (
    .clk       (fsl_clk),
    .rst       (fsl_rst),
    .running   (running),
    .tick      (tick),
    .pwmcnt    (pwmcnt),
    .cycle_end (cycle_end)
  );

  pwm_setreset u_setreset (
    .clk     (fsl_clk),
    .rst     (fsl_rst),
    .running (running),
    .pwmcnt  (pwmcnt),
    .pulse   (pulseout)
  );

  // FSL rule: a word is popped only while one is waiting.
  a_read_only_when_exists: assert property (@(posedge fsl_clk)
    fsl_s_read |-> fsl_s_exists);

endmodule
