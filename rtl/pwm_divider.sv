// pwm_divider: the "Divider" of the PWM tone generator.
//
// It takes the tune input value sent by the processor, turns it into a clock
// divider DIV = BASE_DIV - value and keeps it in `div`. A value of BASE_DIV or
// more would give no usable divider; it is dropped and `div` keeps its old
// value. The saved divider does not disturb the period being played: it is
// copied into the active divider `div_act` only when the PWM counter ends its
// 200-step cycle (`cycle_end`), so a new note always starts at step 0.
//
// While `running`, the down-counter `frqcnt` counts the system clock from the
// active divider down to 1; at 1 it raises `tick` for one clock, the PWM
// counter advances one step, and `frqcnt` reloads. Each step therefore lasts
// exactly div_act clocks. Before the generator runs (`running` low) the first
// accepted value is loaded at once into both registers and into `frqcnt`, so
// the first step starts on the next clock.
//
// Interface: in_valid/in_data carry one word per clock; `accepted` is high in
// the clock a word in range arrives. Timing: `div` changes on the clock after
// the word; `div_act` on the clock after the last tick of a cycle.
//
// The divider formula, the value 947 and the rule that too large values are
// ignored follow the published design; taking "too large" as "no divider of
// at least 1 results" (value >= 947) and the word forwarding when a value
// arrives in the very clock a cycle ends are this implementation's choices.
module pwm_divider
  import pwm_pkg::*;
#(
  parameter int unsigned BASE = BASE_DIV
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              running,    // generator is in its working state
  input  logic              in_valid,   // a tune word is presented
  input  logic [DATA_W-1:0] in_data,    // tune input value
  input  logic              cycle_end,  // PWM counter finishes its cycle this clock
  output logic              accepted,   // in_valid with a value in range
  output logic              tick,       // one step of the PWM counter ends
  output div_t              div,        // most recently accepted divider
  output div_t              div_act,    // divider of the period being played
  output div_t              frqcnt      // clock down-counter
);

  div_t new_div;
  div_t next_div;

  assign accepted = in_valid && (in_data < DATA_W'(BASE));
  assign new_div  = div_t'(BASE) - in_data[DIV_W-1:0];
  assign next_div = accepted ? new_div : div;
  assign tick     = running && (frqcnt == div_t'(1));

  always_ff @(posedge clk) begin
    if (rst) begin
      div     <= div_t'(BASE);
      div_act <= div_t'(BASE);
      frqcnt  <= '0;
    end else begin
      if (accepted)
        div <= new_div;
      if (!running) begin
        if (accepted) begin
          div_act <= new_div;
          frqcnt  <= new_div;
        end
      end else if (tick) begin
        if (cycle_end) begin
          div_act <= next_div;
          frqcnt  <= next_div;
        end else begin
          frqcnt  <= div_act;
        end
      end else begin
        frqcnt <= frqcnt - div_t'(1);
      end
    end
  end

  // While running the counter stays within 1..div_act.
  a_frqcnt_range: assert property (@(posedge clk) disable iff (rst)
    running |-> (frqcnt >= div_t'(1) && frqcnt <= div_act));

endmodule
