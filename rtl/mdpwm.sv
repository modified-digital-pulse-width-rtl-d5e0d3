// mdpwm -- counter-based modified DPWM core, leading-edge modulation.
//
// A conventional leading-edge counter DPWM turns its output ON when the main
// down counter falls below the duty-cycle command and OFF only when the
// counter reaches zero, so a command reduced after turn-ON waits for the end
// of the period. This core adds an auxiliary up counter that is cleared at
// turn-ON and counts the ON cycles; a second comparator turns the output OFF
// as soon as that ON time reaches the current command. A reduced command
// therefore takes effect at once, mid-pulse. In steady state the output is
// identical to the conventional modulator: ON exactly while count < duty,
// i.e. duty cycles out of 2**W. A raised command turns the output ON at once
// if the count is already below it (no turn-ON delay either).
//
// Structure: down_counter -> zero_state_detector, main magnitude_comparator
// -> set_pulse_gen -> sr_output_latch.set and aux_up_counter.clear;
// aux_up_counter -> aux magnitude_comparator -> OR with the zero detector ->
// sr_output_latch reset.
//
// Interface: clk, active-low asynchronous rst_n, duty (W bits, 0 .. 2**W-1,
// read every cycle, ON time in clock cycles), pwm (registered), count (main
// counter), aux_count (ON cycles delivered so far), events (one-cycle
// strobes, valid in the cycle before the output changes). Timing: a command applied in cycle t affects pwm from cycle t+1.
// The block diagram (two counters, two comparators, zero detector, OR gate,
// SR flip-flop) follows the reference design; the look-ahead comparisons,
// the ">=" in the auxiliary comparison (so that the ON time after a reduction
// is exactly the new command) and counting the auxiliary counter while the
// output is ON are this design's choices.
module mdpwm #(
  parameter int unsigned W = mdpwm_pkg::CNT_BITS_DEFAULT
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [W-1:0]           duty,
  output logic                   pwm,
  output logic [W-1:0]           count,
  output logic [W-1:0]           aux_count,
  output mdpwm_pkg::mdpwm_events_t events
);

  logic [W-1:0] count_next;
  logic [W-1:0] aux_next;
  logic         zero, below_duty, set_pulse, aux_reached, aux_unused_lt, main_unused_ge;
  logic         reset_aux;

  down_counter #(.W(W)) u_main_cnt (
    .clk, .rst_n, .count, .count_next
  );

  zero_state_detector #(.W(W)) u_zero (
    .count, .zero
  );

  // Turn-ON condition: the main counter (next value) is below the command.
  magnitude_comparator #(.W(W)) u_main_cmp (
    .a(count_next), .b(duty), .a_lt_b(below_duty), .a_ge_b(main_unused_ge)
  );

  set_pulse_gen u_set (
    .clk, .rst_n, .cmp(below_duty), .period_end(zero), .set_pulse
  );

  aux_up_counter #(.W(W)) u_aux_cnt (
    .clk, .rst_n, .clear(set_pulse), .enable(pwm),
    .count(aux_count), .count_next(aux_next)
  );

  // Early turn-OFF condition: ON time (next value) has reached the command.
  magnitude_comparator #(.W(W)) u_aux_cmp (
    .a(aux_next), .b(duty), .a_lt_b(aux_unused_lt), .a_ge_b(aux_reached)
  );

  assign reset_aux = pwm & aux_reached;

  sr_output_latch u_sr (
    .clk, .rst_n, .set(set_pulse), .reset_zero(zero), .reset_aux, .q(pwm)
  );

  assign events.set       = set_pulse;
  assign events.zero_off  = pwm & zero;
  assign events.early_off = reset_aux & ~zero;

endmodule
