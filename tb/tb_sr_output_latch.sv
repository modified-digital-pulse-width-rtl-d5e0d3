// tb_sr_output_latch -- test of the output SR flip-flop and the OR of its
// two reset sources: set turns the output ON at the next edge, either reset
// turns it OFF, nothing holds it, asynchronous reset clears it.
module tb_sr_output_latch;
  logic clk = 1'b0, rst_n = 1'b0;
  logic set = 1'b0, reset_zero = 1'b0, reset_aux = 1'b0, q;
  int checks = 0, failures = 0;
  bit model = 1'b0;

  sr_output_latch dut (.clk, .rst_n, .set, .reset_zero, .reset_aux, .q);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  task automatic step(input bit s, input bit rz, input bit ra);
    set = s; reset_zero = rz; reset_aux = ra;
    @(posedge clk); #1;
    if (s) model = 1'b1;
    else if (rz || ra) model = 1'b0;
    check(q == model, $sformatf("s=%0b rz=%0b ra=%0b q=%0b", s, rz, ra, q));
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 check(q == 1'b0, "reset output OFF");
    rst_n = 1'b1;
    step(1, 0, 0); check(q, "set turns ON");
    step(0, 0, 0); check(q, "hold ON");
    step(0, 1, 0); check(!q, "zero-state reset turns OFF");
    step(1, 0, 0);
    step(0, 0, 1); check(!q, "auxiliary reset turns OFF");
    step(0, 0, 0); check(!q, "hold OFF");
    step(1, 0, 0);
    step(0, 1, 1); check(!q, "both resets");
    for (int n = 0; n < 2000; n++) begin
      bit s;
      s = ($urandom_range(3, 0) == 0);
      step(s, !s && $urandom_range(3, 0) == 0, !s && $urandom_range(3, 0) == 0);
    end
    step(1, 0, 0);
    rst_n = 1'b0; #1;
    check(q == 1'b0, "asynchronous reset clears output");
    rst_n = 1'b1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
