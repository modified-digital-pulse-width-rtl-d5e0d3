// tb_mdpwm_top -- end-to-end test of the modulator with its multisampling
// interface, at the default size (10-bit counters, 16 samples per period).
//
// A behavioural compensator answers every sample_req after a fixed latency
// with a new duty-cycle command taken from a scenario:
//   * steady 0.8 of the period (819/1024),
//   * step-down to 0.2 (205/1024) answered in the middle of a pulse, as in the
//     open-loop step-down experiment: the pulse must end early,
//   * steady 0.2,
//   * step-up to 0.8 answered while the output is OFF, as in the step-up
//     experiment: the output must turn ON without waiting,
//   * a random walk of commands, refreshed at every sample.
// Every cycle the output is compared with a behavioural model of the
// modulation rules fed with the same commands. The test also checks SAMPLES
// requests per period with their slot numbers, and counts the mechanisms
// (set, end-of-period OFF, early OFF, immediate ON after a raise, mid-period
// command updates); one that never happens is a failure. Turn-OFF delays of
// the step-down are printed next to those of a conventional leading-edge
// modulator, which turns OFF only at the end of the period.
module tb_mdpwm_top;
  import mdpwm_pkg::*;
  localparam int W = CNT_BITS_DEFAULT;
  localparam int SAMPLES = SAMPLES_PER_PERIOD_DEFAULT;
  localparam int PERIOD = 1 << W;
  localparam int SLOT = PERIOD / SAMPLES;
  localparam int COMP_LATENCY = 5;     // compensator answer delay, cycles
  localparam int D_HI = 819;           // 0.8 of the period
  localparam int D_LO = 205;           // 0.2 of the period

  logic clk = 1'b0, rst_n = 1'b0;
  logic [W-1:0] duty_cmd = '0, count, aux_count;
  logic duty_valid = 1'b0, sample_req, pwm;
  logic [$clog2(SAMPLES)-1:0] sample_idx;
  mdpwm_events_t events;

  int checks = 0, failures = 0;
  int n_set = 0, n_zero_off = 0, n_early_off = 0, n_fast_on = 0, n_mid_update = 0;
  int n_req = 0, req_in_period = 0, n_req_24 = -1;

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
    #(40 * PERIOD * 10);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- compensator model ----------------
  int phase_period = 0;                // switching periods since start
  int scenario_cmd = D_HI;             // command the compensator will send
  int walk = 512;
  int pend[$];                         // cycles left for pending answers
  bit want_step_down = 0, want_step_up = 0;
  int step_down_period = -1, step_up_period = -1;

  // ---------------- reference model ----------------
  int  m_duty = 0;                     // registered command
  bit  m_on = 0, m_started = 0;
  int  m_ontime = 0;
  int  cyc = 0;
  int  off_delay_mdpwm = -1, off_delay_conv = -1, step_cycle = -1;
  int  up_cycle = -1;

  always @(posedge clk) begin
    if (rst_n) begin
      int c, nd;
      bit nxt, v;
      c = int'(count);
      // --- checks of the current cycle ---
      check(pwm == m_on, $sformatf("cycle %0d count %0d pwm %0b model %0b", cyc, c, pwm, m_on));
      check(sample_req == ((PERIOD - 1 - c) % SLOT == 0), "sample_req position");
      if (sample_req) begin
        check(int'(sample_idx) == (PERIOD - 1 - c) / SLOT, "sample_idx value");
        n_req++; req_in_period++;
        pend.push_back(COMP_LATENCY);
      end
      n_set       += int'(events.set);
      n_zero_off  += int'(events.zero_off);
      n_early_off += int'(events.early_off);
      if (c == 0) begin
        check(req_in_period == SAMPLES, $sformatf("%0d requests in period", req_in_period));
        req_in_period = 0;
      end
      if (step_cycle >= 0 && off_delay_mdpwm < 0 && !pwm) off_delay_mdpwm = cyc - step_cycle;
      if (up_cycle >= 0 && pwm && cyc - up_cycle <= 2) begin n_fast_on++; up_cycle = -1; end

      // --- model of the output for the next cycle (command as registered) ---
      if (c == 0) begin nxt = 0; m_started = 0; end
      else if (!m_started && (c - 1) < m_duty) begin nxt = 1; m_started = 1; m_ontime = 0; end
      else if (m_on) begin m_ontime++; nxt = (m_ontime < m_duty); end
      else nxt = 0;

      // --- compensator answer for this edge ---
      v = 0; nd = 0;
      foreach (pend[i]) pend[i]--;
      if (pend.size() > 0 && pend[0] == 0) begin
        void'(pend.pop_front());
        v = 1;
        // scenario selection
        if (want_step_down && m_on && c < D_HI - 80) begin
          scenario_cmd = D_LO; want_step_down = 0; step_cycle = cyc + 2;
          off_delay_conv = c + 1;      // conventional: OFF when count passes 0
          step_down_period = phase_period;
        end else if (want_step_up && !m_on && c > D_LO + 100 && c < D_HI - 100) begin
          scenario_cmd = D_HI; want_step_up = 0; up_cycle = cyc + 1;
          step_up_period = phase_period;
        end else if (phase_period >= 12) begin
          walk += int'($urandom_range(160, 0)) - 80;
          if (walk < 0) walk = 0;
          if (walk > PERIOD - 1) walk = PERIOD - 1;
          scenario_cmd = walk;
        end
        nd = scenario_cmd;
        if (m_started && m_on && nd < m_duty) n_mid_update++;
      end
      duty_valid <= v;
      duty_cmd   <= W'(nd);
      // register model: command seen one cycle after duty_valid
      if (duty_valid) m_duty = int'(duty_cmd);
      m_on = nxt;
      if (c == 0) begin
        phase_period++;
        if (phase_period == 3) want_step_down = 1;
        if (phase_period == 7) want_step_up = 1;
        if (phase_period == 24) n_req_24 = n_req;
      end
      cyc++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (phase_period == 24);
    @(posedge clk); #1;
    check(step_down_period >= 0, "step-down applied during a pulse");
    check(step_up_period >= 0, "step-up applied while OFF");
    check(off_delay_mdpwm >= 0 && off_delay_mdpwm < off_delay_conv,
          $sformatf("turn-OFF after step-down: %0d cycles, conventional %0d", off_delay_mdpwm, off_delay_conv));
    check(n_set > 0, "set occurred");
    check(n_zero_off > 0, "end-of-period turn-OFF occurred");
    check(n_early_off > 0, "early turn-OFF through the auxiliary counter occurred");
    check(n_fast_on > 0, "immediate turn-ON after a raised command occurred");
    check(n_mid_update > 0, "command lowered during a pulse");
    check(n_req_24 == SAMPLES * 24, $sformatf("%0d sample requests in 24 periods", n_req_24));
    $display("step-down 0.8->0.2: MDPWM turn-OFF after %0d cycles, conventional after %0d cycles",
             off_delay_mdpwm, off_delay_conv);
    $display("mechanisms: set=%0d zero_off=%0d early_off=%0d fast_on=%0d mid_update=%0d requests=%0d",
             n_set, n_zero_off, n_early_off, n_fast_on, n_mid_update, n_req);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
