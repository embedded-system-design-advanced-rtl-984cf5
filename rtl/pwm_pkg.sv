// pwm_pkg: constants and types shared by the PWM tone generator.
//
// The generator plays one period of a sine wave as a pulse train of 200 steps.
// Each step lasts DIV system clocks, so the tone frequency is
// CLK_HZ / (STEPS * DIV). With a 50 MHz clock a divider of 947 gives 263.99 Hz,
// the lowest note of the 21-note scale, and the processor sends the tune as
// "input value" = BASE_DIV - DIV, so input 0 is that lowest note.
//
// The pulse pattern is a sine period sampled by a 40 kHz triangle carrier and
// reduced to 10 pulses: the output is set at SET_POINTS[i] and cleared at
// RESET_POINTS[i] (in steps). A reset point equal to STEPS is the end of the
// period; the first pulse of the next period starts at step 0, so the last and
// first pulses join into one 38-step pulse around the sine peak.
//
// The 50 MHz clock, the 200 steps, the base divider 947 and the two point
// tables are the published design's numbers. The state encoding and the widths
// are this implementation's choice.
package pwm_pkg;

  localparam int unsigned CLK_HZ   = 50_000_000;
  localparam int unsigned STEPS    = 200;   // steps per sine period
  localparam int unsigned BASE_DIV = 947;   // divider for input value 0 (264 Hz)
  localparam int unsigned N_PULSES = 10;    // set/reset pairs per period

  localparam int unsigned DIV_W  = 10;      // holds 1..BASE_DIV
  localparam int unsigned STEP_W = 8;       // holds 0..STEPS
  localparam int unsigned DATA_W = 32;      // FSL word

  typedef logic [DIV_W-1:0]  div_t;
  typedef logic [STEP_W-1:0] step_t;

  typedef int unsigned point_table_t [N_PULSES];

  localparam point_table_t SET_POINTS   = '{0, 21, 44, 68, 90, 110, 128, 146, 163, 181};
  localparam point_table_t RESET_POINTS = '{19, 37, 54, 72, 91, 111, 132, 156, 179, 200};

  // Two states: waiting for the first tune, and playing.
  typedef enum logic {
    ST_RESET   = 1'b0,
    ST_WORKING = 1'b1
  } pwm_state_e;

endpackage
