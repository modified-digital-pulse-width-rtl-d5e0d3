// down_counter -- main down counter of the modulator (sets the switching period).
//
// A free-running W-bit down counter. It counts from 2**W-1 to 0 and wraps, so
// one switching period is 2**W clock cycles. Besides the registered count it
// exposes count_next, the value the counter takes at the next clock edge; the
// comparators of the modulator look at that value so that the registered PWM
// output changes in the same cycle in which the count crosses the threshold.
//
// Interface: clk, active-low asynchronous rst_n (the counter restarts at the
// top of a period, 2**W-1), count, count_next.
// Counting down with wrap-around follows the counter-based leading-edge
// modulator it is part of; the reset value and the look-ahead output are
// choices of this design.
module down_counter #(
  parameter int unsigned W = mdpwm_pkg::CNT_BITS_DEFAULT
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic [W-1:0] count,
  output logic [W-1:0] count_next
);

  assign count_next = count - W'(1);   // wraps from 0 to 2**W-1

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) count <= '1;
    else        count <= count_next;
  end

endmodule
