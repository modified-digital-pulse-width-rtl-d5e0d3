// zero_state_detector -- end-of-period detector of the main down counter.
//
// Asserts zero while the main down counter holds 0, i.e. in the last clock
// cycle of a switching period. Its output is one of the two reset sources of
// the output SR flip-flop: it ends every pulse at the end of the period, as in
// a conventional leading-edge modulator. Purely combinational.
//
// Interface: count (W bits) in, zero out.
module zero_state_detector #(
  parameter int unsigned W = mdpwm_pkg::CNT_BITS_DEFAULT
) (
  input  logic [W-1:0] count,
  output logic         zero
);

  assign zero = (count == '0);

endmodule
