// tb_multisample_ctrl -- test of the multisampling interface.
// A behavioural down counter drives the block for three switching periods.
// Checks: sample_req is high exactly when the cycle starts one of the SAMPLES
// equal slots of the period (every 2**W/SAMPLES cycles), there are SAMPLES
// requests per period, sample_idx numbers the slots 0..SAMPLES-1, and the
// duty register loads duty_cmd one cycle after duty_valid and holds otherwise.
module tb_multisample_ctrl;
  localparam int unsigned W = 10;
  localparam int unsigned SAMPLES = 16;
  localparam int PERIOD = 1 << W;
  localparam int SLOT = PERIOD / SAMPLES;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [W-1:0] count = '1, duty_cmd = '0, duty;
  logic duty_valid = 1'b0, sample_req;
  logic [$clog2(SAMPLES)-1:0] sample_idx;
  int checks = 0, failures = 0;
  int reqs_in_period = 0;
  int expected_duty = 0;

  multisample_ctrl #(.W(W), .SAMPLES(SAMPLES)) dut (
    .clk, .rst_n, .count, .duty_cmd, .duty_valid, .sample_req, .sample_idx, .duty
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 check(duty == '0, "command reset to 0");
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 3 * PERIOD; cyc++) begin
      int phase;
      bit v;
      phase = cyc % PERIOD;               // cycles since the period began
      count = W'(PERIOD - 1 - phase);
      v = ($urandom_range(7, 0) == 0);
      duty_valid = v;
      duty_cmd = W'($urandom_range(PERIOD - 1, 0));
      #1;
      check(sample_req == (phase % SLOT == 0), $sformatf("sample_req at phase %0d", phase));
      if (sample_req) begin
        check(int'(sample_idx) == phase / SLOT, $sformatf("sample_idx %0d at phase %0d", sample_idx, phase));
        reqs_in_period++;
      end
      check(int'(duty) == expected_duty, "duty register value");
      @(posedge clk); #1;
      if (v) expected_duty = int'(duty_cmd);
      if (phase == PERIOD - 1) begin
        check(reqs_in_period == SAMPLES, $sformatf("%0d requests per period", reqs_in_period));
        reqs_in_period = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
