// tb_open_loop_steps -- open-loop duty-step workload at the default size.
//
// Reproduces the open-loop step experiments: a duty-change indication toggles
// the command between 0.8 and 0.2 of the period (819 and 205 of 1024). A
// behavioural compensator answers each of the 16 sample requests per period
// with the command selected by the indication. The indication toggles every
// 3 periods plus 237 cycles, so over 60 toggles the steps land at many
// different points of the period.
//
// For every step-down the test records the ON time delivered before the new
// command reached the modulator and checks that the output then turns OFF
// when its ON time reaches max(delivered, 205) cycles (the pulse is cut to
// the new command, or ends at once if it is already longer). It prints the mean turn-OFF delay
// next to that of a conventional leading-edge modulator, which holds the
// output ON until the end of the period. For every step-up it checks that the
// output is ON while the count is below the new command from the cycle after
// the command is seen: at once if the count is already below it. In periods with a
// constant command the output must be high exactly while the count is below
// the command. At least one step-down must cut a pulse short and one
// step-up must turn the output ON at once.
module tb_open_loop_steps;
  import mdpwm_pkg::*;
  localparam int W = CNT_BITS_DEFAULT;
  localparam int SAMPLES = SAMPLES_PER_PERIOD_DEFAULT;
  localparam int PERIOD = 1 << W;
  localparam int D_HI = 819, D_LO = 205;
  localparam int TOGGLE = 3 * PERIOD + 237;
  localparam int N_TOGGLES = 60;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [W-1:0] duty_cmd = '0, count, aux_count;
  logic duty_valid = 1'b0, sample_req, pwm;
  logic [$clog2(SAMPLES)-1:0] sample_idx;
  mdpwm_events_t events;

  int checks = 0, failures = 0;
  bit indication = 1'b1;               // 1: 0.8, 0: 0.2
  int cur_duty = 0;                    // command inside the modulator
  int cmd_since = 0;                   // cycle the command last changed
  int cyc = 0;
  // step bookkeeping
  int down_pending = -1, down_expect = 0;
  bit up_active = 0, up_skip = 0;
  int n_down = 0, n_in_pulse = 0, n_cut = 0, n_up = 0, n_fast_on = 0;
  longint sum_md = 0, sum_conv = 0;

  mdpwm_top dut (
    .clk, .rst_n, .duty_cmd, .duty_valid, .sample_req, .sample_idx,
    .pwm, .count, .aux_count, .events
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    #((N_TOGGLES + 4) * TOGGLE * 10);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Compensator: answer each request in the next cycle.
  always @(posedge clk) begin
    duty_valid <= sample_req & rst_n;
    duty_cmd   <= W'(indication ? D_HI : D_LO);
  end

  always @(posedge clk) if (rst_n) begin
    int c, newd, delivered;
    c = int'(count);
    // checks on the current cycle
    if (down_pending >= 0) begin
      if (pwm) down_pending++;
      else begin
        check(down_pending == down_expect,
              $sformatf("step-down turn-OFF after %0d cycles, expected %0d", down_pending, down_expect));
        sum_md += down_pending;
        down_pending = -1;
      end
    end
    if (up_skip) begin
      up_skip = 0; up_active = 1;
    end else if (up_active) begin
      check(pwm == (c < D_HI), $sformatf("step-up: output at count %0d", c));
      if (c == 0) up_active = 0;
    end
    if (cyc - cmd_since > 2 * PERIOD)
      check(pwm == (c < cur_duty), $sformatf("steady state: count %0d duty %0d pwm %0b", c, cur_duty, pwm));
    // the register takes duty_cmd at this edge when duty_valid is high
    if (duty_valid) begin
      newd = int'(duty_cmd);
      if (newd != cur_duty) begin
        if (newd < cur_duty) begin
          n_down++;
          if (pwm) begin
            // The register shows the new command in the next cycle (count
            // c-1), where the modulator decides; ON cycles delivered by the
            // end of that cycle:
            delivered = cur_duty - c + 1;
            down_expect = (D_LO - delivered + 1 > 1) ? D_LO - delivered + 1 : 1;
            down_pending = 0;
            n_in_pulse++;
            // conventional: ON for the counts c-1 .. 0
            n_cut += int'(down_expect < c);
            sum_conv += c;
          end
        end else begin
          n_up++;
          // new command visible at count c-1, output ON from count c-2 on
          if (c >= 2) up_skip = 1;
          // turned ON without waiting for the count to fall further
          n_fast_on += int'(!pwm && c >= 2 && c - 2 < D_HI && c - 2 >= cur_duty);
        end
        cur_duty = newd;
        cmd_since = cyc;
      end
    end
    cyc++;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < N_TOGGLES; t++) begin
      repeat (TOGGLE) @(posedge clk);
      indication = ~indication;
    end
    repeat (2 * PERIOD) @(posedge clk);
    #1;
    check(n_down >= N_TOGGLES / 2 - 1 && n_up >= N_TOGGLES / 2 - 1, "every toggle produced a step");
    check(n_cut > 0, "a step-down cut a running pulse short");
    check(n_fast_on > 0, "a step-up turned the output ON at once");
    check(sum_md < sum_conv, "mean turn-OFF delay below the conventional modulator");
    $display("step-downs %0d (during a pulse %0d, pulse cut short %0d), step-ups %0d (immediate turn-ON %0d)",
             n_down, n_in_pulse, n_cut, n_up, n_fast_on);
    $display("turn-OFF delay summed over step-downs during a pulse: modified %0d cycles, conventional %0d cycles",
             sum_md, sum_conv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
