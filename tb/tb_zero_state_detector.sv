// tb_zero_state_detector -- exhaustive test of the end-of-period detector:
// zero must be high for count 0 and low for every other value.
module tb_zero_state_detector;
  localparam int unsigned W = 10;
  logic [W-1:0] count;
  logic zero;
  int checks = 0, failures = 0;

  zero_state_detector #(.W(W)) dut (.count, .zero);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << W); v++) begin
      count = W'(v);
      #1;
      checks++;
      if (zero !== (v == 0)) begin
        failures++;
        $display("FAIL: count=%0d zero=%0b", v, zero);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
