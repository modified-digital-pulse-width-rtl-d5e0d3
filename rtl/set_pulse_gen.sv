// set_pulse_gen -- turns the main comparator level into one set pulse per period.
//
// The main comparator output (count below duty) is a level that stays high
// for the rest of the period once the count has dropped below the command.
// This block emits a single one-cycle pulse the first time that level is seen
// high in a switching period. The pulse sets the output SR flip-flop and
// clears the auxiliary up counter. An "armed" flag remembers that the pulse
// was given; the zero-state detector re-arms it at the end of the period.
// Because of the flag, an output turned OFF early by the auxiliary comparator
// is not turned ON again in the same period.
//
// Interface: clk, active-low asynchronous rst_n, cmp (level), period_end
// (zero-state detector), set_pulse (combinational, valid in the cycle where
// cmp first rises in the period).
// That the set and the counter clear are narrow pulses follows the waveforms
// of the modified modulator; the one-pulse-per-period flag is this design's
// own way of producing them.
module set_pulse_gen (
  input  logic clk,
  input  logic rst_n,
  input  logic cmp,
  input  logic period_end,
  output logic set_pulse
);

  logic fired;   // a set pulse has already been given in this period

  assign set_pulse = cmp & ~fired & ~period_end;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          fired <= 1'b0;
    else if (period_end) fired <= 1'b0;
    else if (set_pulse)  fired <= 1'b1;
  end

endmodule
