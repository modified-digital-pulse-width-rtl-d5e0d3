// tb_down_counter -- self-checking test of the main down counter.
// Checks the reset value (top of a period), that count_next is always the
// next registered value, the wrap from 0 to 2**W-1 and that one period is
// exactly 2**W clock cycles.
module tb_down_counter;
  localparam int unsigned W = 10;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [W-1:0] count, count_next, prev_next;
  int checks = 0, failures = 0;
  int zero_seen_at = -1, period_len = 0;

  down_counter #(.W(W)) dut (.clk, .rst_n, .count, .count_next);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 check(count == {W{1'b1}}, "reset value is 2**W-1");
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 3 * (1 << W); cyc++) begin
      prev_next = count_next;
      check(count_next == W'(count - 1), "count_next = count - 1 mod 2**W");
      @(posedge clk); #1;
      check(count == prev_next, "count takes count_next");
      if (count == '0) begin
        if (zero_seen_at >= 0) begin
          period_len = cyc - zero_seen_at;
          check(period_len == (1 << W), $sformatf("period is %0d cycles", period_len));
        end
        zero_seen_at = cyc;
      end
      if (zero_seen_at >= 0 && zero_seen_at == cyc - 1) check(count == {W{1'b1}}, "wrap from 0 to 2**W-1");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
