// tb_magnitude_comparator -- test of the unsigned magnitude comparator with
// corner values (0, 1, 2**W-1, equal operands) and random operands.
module tb_magnitude_comparator;
  localparam int unsigned W = 10;
  localparam int MAXV = (1 << W) - 1;
  logic [W-1:0] a, b;
  logic a_lt_b, a_ge_b;
  int checks = 0, failures = 0;

  magnitude_comparator #(.W(W)) dut (.a, .b, .a_lt_b, .a_ge_b);

  task automatic try(input int av, input int bv);
    a = W'(av); b = W'(bv);
    #1;
    checks++;
    if (a_lt_b !== (av < bv) || a_ge_b !== (av >= bv)) begin
      failures++;
      $display("FAIL: a=%0d b=%0d lt=%0b ge=%0b", av, bv, a_lt_b, a_ge_b);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int corner[5] = '{0, 1, MAXV / 2, MAXV - 1, MAXV};
    foreach (corner[i]) foreach (corner[j]) try(corner[i], corner[j]);
    for (int n = 0; n < 2000; n++) begin
      int av;
      av = int'($urandom_range(MAXV, 0));
      try(av, int'($urandom_range(MAXV, 0)));
      try(av, av);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
