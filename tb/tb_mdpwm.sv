// tb_mdpwm -- self-checking test of the modified leading-edge DPWM core.
//
// 1. Steady state: for a set of constant commands the output must be high
//    exactly while the main count is below the command, i.e. a pulse of
//    `duty` cycles at the end of every 2**W-cycle period.
// 2. Step-down during a pulse (0.8 -> 0.2 of the period, as in the reference
//    open-loop experiment): if the ON time already delivered is at least the
//    new command the output must drop in the very next cycle; otherwise the
//    pulse must last exactly the new command. A conventional leading-edge
//    modulator would stay ON until the end of the period; the test prints both
//    turn-OFF delays.
// 3. Step-down before the pulse began: the pulse starts at the new crossing.
// 4. Step-up while OFF: the output turns ON in the next cycle.
// 5. Random commands refreshed 16 times per period, compared cycle by cycle
//    with a behavioural model of the modulation rules.
// The auxiliary counter must equal the ON cycles already delivered, and
// each event strobe (set, end-of-period OFF, early OFF) must occur.
module tb_mdpwm;
  import mdpwm_pkg::*;
  localparam int unsigned W = 10;
  localparam int PERIOD = 1 << W;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [W-1:0] duty = '0, count, aux_count;
  logic pwm;
  mdpwm_events_t events;
  int checks = 0, failures = 0;
  int n_set = 0, n_zero_off = 0, n_early_off = 0;

  mdpwm #(.W(W)) dut (.clk, .rst_n, .duty, .pwm, .count, .aux_count, .events);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    n_set       += int'(events.set);
    n_zero_off  += int'(events.zero_off);
    n_early_off += int'(events.early_off);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  task automatic tick();
    @(posedge clk); #1;
  endtask

  task automatic wait_count(input int c);
    while (int'(count) != c) tick();
  endtask

  initial begin
    #(40 * PERIOD * 10 + 200000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Step the command from d1 to d2 when the count reads at_count (d1 held for a
  // full period before). Returns the cycles from the change to the output
  // going low and the total length of that pulse.
  task automatic step_down(input int d1, input int d2, input int at_count,
                           output int off_delay, output int pulse_len);
    int delivered;
    duty = W'(d1);
    wait_count(PERIOD - 1); tick();
    wait_count(at_count);
    delivered = pwm ? (d1 - 1 - at_count) : 0;   // ON cycles before this one
    duty = W'(d2);
    off_delay = 0;
    pulse_len = pwm ? delivered : 0;
    while (pwm) begin
      pulse_len++; off_delay++; tick();
    end
  endtask

  // Steady-state commands and step-down instants (main count at the change).
  localparam int dlist[8] = '{0, 1, 2, 205, 512, 819, 1022, 1023};
  localparam int at[5] = '{800, 700, 619, 614, 400};

  // Behavioural model of the modulation rules for the random phase.
  bit m_on, m_started;
  int m_ontime;

  initial begin
    int off_delay, pulse_len, conv_delay, len, exp_len;
    repeat (3) tick();
    rst_n = 1'b1;

    // 1. steady state
    begin
      foreach (dlist[i]) begin
        duty = W'(dlist[i]);
        wait_count(PERIOD - 1); tick();
        len = 0;
        for (int c = 0; c < PERIOD; c++) begin
          check(pwm == (int'(count) < dlist[i]),
                $sformatf("steady duty %0d count %0d pwm %0b", dlist[i], count, pwm));
          if (pwm)
            check(int'(aux_count) == dlist[i] - 1 - int'(count),
                  $sformatf("auxiliary count %0d at count %0d", aux_count, count));
          len += int'(pwm);
          tick();
        end
        check(len == dlist[i], $sformatf("pulse width %0d for duty %0d", len, dlist[i]));
      end
    end

    // 2. step-down 0.8 -> 0.2 during the pulse
    begin
      foreach (at[i]) begin
        step_down(819, 205, at[i], off_delay, pulse_len);
        // delivered before the change cycle, plus the change cycle itself
        exp_len = (818 - at[i]) + 1 > 205 ? (818 - at[i]) + 1 : 205;
        conv_delay = at[i] + 1;    // conventional: ON until the count reaches 0
        check(pulse_len == exp_len,
              $sformatf("step-down at count %0d: pulse %0d expected %0d", at[i], pulse_len, exp_len));
        check(off_delay <= conv_delay, "turn-OFF not later than the conventional modulator");
        $display("step-down 819->205 at count %0d: turn-OFF after %0d cycles (conventional %0d)",
                 at[i], off_delay, conv_delay);
        // the next period must be a steady 205-cycle pulse
        wait_count(PERIOD - 1); tick();
        len = 0;
        for (int c = 0; c < PERIOD; c++) begin len += int'(pwm); tick(); end
        check(len == 205, $sformatf("period after the step: width %0d", len));
      end
    end

    // 3. step-down before the crossing: pulse starts at the new crossing
    duty = W'(819);
    wait_count(PERIOD - 1); tick();
    wait_count(900);
    duty = W'(205);
    while (!pwm) tick();
    check(int'(count) == 204, $sformatf("pulse started at count %0d, expected 204", count));
    while (pwm) tick();
    check(int'(count) == PERIOD - 1, "pulse ended at the end of the period");

    // 4. step-up while OFF: ON at the next cycle
    duty = W'(205);
    wait_count(PERIOD - 1); tick();
    wait_count(600);
    check(!pwm, "OFF before the step-up");
    duty = W'(819);
    tick();
    check(pwm, "ON in the cycle after the step-up");
    len = 1;
    while (pwm) begin tick(); len += int'(pwm); end
    check(len == 600, $sformatf("step-up pulse lasts to the end of the period: %0d", len));

    // 5. random commands, 16 refreshes per period, against the model
    rst_n = 1'b0; duty = '0; tick(); rst_n = 1'b1;
    m_on = 0; m_started = 0; m_ontime = 0;
    for (int cyc = 0; cyc < 20 * PERIOD; cyc++) begin
      int c, d;
      bit nxt;
      if (cyc % (PERIOD / 16) == 3) duty = W'($urandom_range(PERIOD - 1, 0));
      c = int'(count); d = int'(duty);
      check(pwm == m_on, $sformatf("random: cycle %0d count %0d pwm %0b model %0b", cyc, c, pwm, m_on));
      // rules: OFF after the last cycle of a period; first time in a period the
      // next count is below the command, ON; ON ends once the ON time reaches
      // the command.
      if (c == 0) begin nxt = 0; m_started = 0; end
      else if (!m_started && (c - 1) < d) begin nxt = 1; m_started = 1; m_ontime = 0; end
      else if (m_on) begin m_ontime++; nxt = (m_ontime < d); end
      else nxt = 0;
      m_on = nxt;
      tick();
    end

    check(n_set > 0, "set events occurred");
    check(n_zero_off > 0, "end-of-period turn-OFF occurred");
    check(n_early_off > 0, "early turn-OFF occurred");
    $display("events: set=%0d zero_off=%0d early_off=%0d", n_set, n_zero_off, n_early_off);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
