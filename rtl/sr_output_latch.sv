// sr_output_latch -- clocked SR flip-flop with an OR of two reset sources.
//
// Drives the modulator output. set turns the output ON at the next clock
// edge. The reset input is the OR of reset_zero (end of the switching period,
// from the zero-state detector) and reset_aux (auxiliary up counter has
// reached the duty-cycle command); either turns the output OFF at the next
// edge. The modulator never asserts set together with a reset; if it did, set
// would win, and the assertion below flags it.
//
// Interface: clk, active-low asynchronous rst_n (output OFF), set,
// reset_zero, reset_aux, q. q is a register output, free of glitches.
// The SR flip-flop and the OR gate in front of its reset input follow the
// modified modulator's block diagram; the clocked form and set priority are
// this design's choices.
module sr_output_latch (
  input  logic clk,
  input  logic rst_n,
  input  logic set,
  input  logic reset_zero,
  input  logic reset_aux,
  output logic q
);

  logic reset_any;
  assign reset_any = reset_zero | reset_aux;   // the OR gate

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         q <= 1'b0;
    else if (set)       q <= 1'b1;
    else if (reset_any) q <= 1'b0;
  end

  a_set_reset_exclusive : assert property (@(posedge clk) disable iff (!rst_n)
                                          !(set && reset_any))
    else $error("set and reset asserted together");

endmodule
