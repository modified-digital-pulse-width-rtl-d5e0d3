// magnitude_comparator -- unsigned magnitude comparator.
//
// Compares two unsigned W-bit values and gives both a < b and a >= b. The
// modulator uses two of them: one compares the main down counter with the
// duty-cycle command (turn-ON condition), the other compares the auxiliary up
// counter with the command (early turn-OFF condition). Purely combinational.
//
// Interface: a, b in; a_lt_b, a_ge_b out.
module magnitude_comparator #(
  parameter int unsigned W = mdpwm_pkg::CNT_BITS_DEFAULT
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         a_lt_b,
  output logic         a_ge_b
);

  assign a_lt_b = (a < b);
  assign a_ge_b = ~a_lt_b;

endmodule
