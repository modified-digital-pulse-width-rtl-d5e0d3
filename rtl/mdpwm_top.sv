// mdpwm_top -- digital modulator of a multisampled DC-DC converter controller.
//
// Joins the multisampling interface and the modified leading-edge DPWM core.
// The compensator (outside this design) is asked for a new duty-cycle command
// SAMPLES times per switching period through sample_req; each command it
// returns with duty_valid is registered and used by the modulator from the
// next cycle on, so a reduction cuts the running pulse short instead of
// waiting for the next period. With the defaults (W = 10, SAMPLES = 16) a
// switching period is 1024 clock cycles and a sample is requested every 64
// cycles; a 342 kHz switching frequency therefore needs a clock of about
// 350 MHz.
//
// Interface: clk, rst_n (active low, asynchronous), duty_cmd/duty_valid from
// the compensator, sample_req/sample_idx to the ADC and compensator, pwm to
// the gate-driver latches, count and aux_count (the two counters, for
// monitoring), events.
// Latency from duty_valid to pwm: two clock cycles.
module mdpwm_top #(
  parameter int unsigned W       = mdpwm_pkg::CNT_BITS_DEFAULT,
  parameter int unsigned SAMPLES = mdpwm_pkg::SAMPLES_PER_PERIOD_DEFAULT
) (
  input  logic                                     clk,
  input  logic                                     rst_n,
  input  logic [W-1:0]                             duty_cmd,
  input  logic                                     duty_valid,
  output logic                                     sample_req,
  output logic [(SAMPLES > 1 ? $clog2(SAMPLES) : 1)-1:0] sample_idx,
  output logic                                     pwm,
  output logic [W-1:0]                             count,
  output logic [W-1:0]                             aux_count,
  output mdpwm_pkg::mdpwm_events_t                 events
);

  logic [W-1:0] duty;

  multisample_ctrl #(.W(W), .SAMPLES(SAMPLES)) u_ms (
    .clk, .rst_n, .count, .duty_cmd, .duty_valid, .sample_req, .sample_idx, .duty
  );

  mdpwm #(.W(W)) u_mod (
    .clk, .rst_n, .duty, .pwm, .count, .aux_count, .events
  );

endmodule
