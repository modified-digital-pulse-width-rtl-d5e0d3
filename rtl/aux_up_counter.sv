// aux_up_counter -- auxiliary up counter: measures the ON time of the pulse.
//
// Cleared to zero by the set pulse (the instant the main counter falls below
// the duty-cycle command), then counts one per clock while enabled. The
// modulator enables it while the output is ON, so the count is the number of
// ON cycles already delivered in the current period. It saturates at 2**W-1
// instead of wrapping. Like the main counter it exposes count_next, the value
// after the next clock edge, for the look-ahead comparison.
//
// Interface: clk, active-low asynchronous rst_n, clear, enable, count,
// count_next. Clear has priority over enable.
// The clear on every set and the up-counting follow the modified modulator;
// saturation and the enable source are this design's choices.
module aux_up_counter #(
  parameter int unsigned W = mdpwm_pkg::CNT_BITS_DEFAULT
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         enable,
  output logic [W-1:0] count,
  output logic [W-1:0] count_next
);

  always_comb begin
    if (clear)                        count_next = '0;
    else if (enable && count != '1)   count_next = count + W'(1);
    else                              count_next = count;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) count <= '0;
    else        count <= count_next;
  end

endmodule
