// tb_set_pulse_gen -- test of the one-pulse-per-period set generator.
// Directed cases: the first rise of cmp gives a single one-cycle pulse, a
// level held high gives no second pulse, a drop and rise of cmp in the same
// period gives none, the end of period re-arms it and suppresses a pulse in
// the end-of-period cycle. Then random cmp / period_end traffic is compared
// with an expected value derived from the pulse history of each period.
module tb_set_pulse_gen;
  logic clk = 1'b0, rst_n = 1'b0;
  logic cmp = 1'b0, period_end = 1'b0, set_pulse;
  int checks = 0, failures = 0;
  int pulses_this_period = 0;

  set_pulse_gen dut (.clk, .rst_n, .cmp, .period_end, .set_pulse);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // Apply inputs, check the combinational pulse against the expectation,
  // then take a clock edge.
  task automatic step(input bit c, input bit pe, input bit exp);
    cmp = c; period_end = pe;
    #1 check(set_pulse == exp, $sformatf("cmp=%0b pe=%0b expected %0b", c, pe, exp));
    @(posedge clk); #1;
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
    rst_n = 1'b1;
    @(posedge clk); #1;
    step(0, 0, 0);
    step(1, 0, 1);     // first rise: pulse
    step(1, 0, 0);     // held: no pulse
    step(0, 0, 0);
    step(1, 0, 0);     // second rise in the same period: no pulse
    step(1, 1, 0);     // end of period: never a pulse
    step(1, 0, 1);     // new period, level already high: pulse
    step(0, 1, 0);
    step(0, 0, 0);
    step(1, 0, 1);
    // Random traffic: expected pulse = cmp and no pulse yet in this period
    // and not the last cycle of the period.
    step(0, 1, 0);
    pulses_this_period = 0;
    for (int n = 0; n < 5000; n++) begin
      bit c, pe, exp;
      c = 1'($urandom_range(1, 0));
      pe = ($urandom_range(15, 0) == 0);
      exp = c && !pe && (pulses_this_period == 0);
      step(c, pe, exp);
      if (pe) pulses_this_period = 0;
      else if (exp) pulses_this_period++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
