// tb_aux_up_counter -- test of the auxiliary (ON-time) up counter: reset to
// zero, clear to zero with priority over enable, count only when enabled,
// saturation at 2**W-1 and count_next equal to the next registered value.
module tb_aux_up_counter;
  localparam int unsigned W = 6;   // small width to reach saturation quickly
  localparam int MAXV = (1 << W) - 1;
  logic clk = 1'b0, rst_n = 1'b0;
  logic clear = 1'b0, enable = 1'b0;
  logic [W-1:0] count, count_next;
  int checks = 0, failures = 0;
  int model = 0;

  aux_up_counter #(.W(W)) dut (.clk, .rst_n, .clear, .enable, .count, .count_next);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  task automatic step(input bit cl, input bit en);
    int exp;
    clear = cl; enable = en;
    exp = cl ? 0 : (en ? ((model < MAXV) ? model + 1 : MAXV) : model);
    #1 check(int'(count_next) == exp, $sformatf("count_next %0d expected %0d", count_next, exp));
    @(posedge clk); #1;
    model = exp;
    check(int'(count) == model, $sformatf("count %0d expected %0d", count, model));
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
    #1 check(count == '0, "reset value 0");
    rst_n = 1'b1;
    for (int n = 0; n < 10; n++) step(0, 1);
    check(count == 10, "counted ten enabled cycles");
    for (int n = 0; n < 5; n++) step(0, 0);
    check(count == 10, "held while disabled");
    step(1, 1);
    check(count == 0, "clear wins over enable");
    for (int n = 0; n < MAXV + 20; n++) step(0, 1);
    check(count == MAXV, "saturated at 2**W-1");
    for (int n = 0; n < 3000; n++)
      step($urandom_range(31, 0) == 0, 1'($urandom_range(1, 0)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
