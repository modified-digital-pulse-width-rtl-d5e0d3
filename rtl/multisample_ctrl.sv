// multisample_ctrl -- multisampling interface between compensator and modulator.
//
// The modified modulator only shortens the turn-OFF delay if the duty-cycle
// command is refreshed several times per switching period. This block divides
// each period of the main down counter into SAMPLES equal slots and issues a
// one-cycle sample_req at the first cycle of each slot (the request to the
// ADC / compensator), together with the slot number. It holds the duty-cycle
// command in a register that loads duty_cmd whenever the compensator asserts
// duty_valid, at any cycle; the modulator reads the register every cycle.
//
// Interface: clk, active-low asynchronous rst_n (command cleared to 0: output
// OFF), count (main down counter), duty_cmd/duty_valid (from the compensator),
// sample_req, sample_idx (0 .. SAMPLES-1), duty (to the modulator).
// Timing: the register output changes one cycle after duty_valid.
// SAMPLES = 16 is the reference prototype's rate; slot alignment, the
// valid-qualified load and the reset value are this design's choices.
// SAMPLES must be a power of two no larger than 2**W.
module multisample_ctrl #(
  parameter int unsigned W       = mdpwm_pkg::CNT_BITS_DEFAULT,
  parameter int unsigned SAMPLES = mdpwm_pkg::SAMPLES_PER_PERIOD_DEFAULT
) (
  input  logic                                     clk,
  input  logic                                     rst_n,
  input  logic [W-1:0]                             count,
  input  logic [W-1:0]                             duty_cmd,
  input  logic                                     duty_valid,
  output logic                                     sample_req,
  output logic [(SAMPLES > 1 ? $clog2(SAMPLES) : 1)-1:0] sample_idx,
  output logic [W-1:0]                             duty
);

  localparam int unsigned L  = $clog2(SAMPLES);        // index bits
  localparam int unsigned IW = (SAMPLES > 1) ? L : 1;

  if ((1 << L) != SAMPLES || L > W) begin : g_bad_samples
    $error("SAMPLES must be a power of two not above 2**W");
  end

  // The counter counts down, so a slot starts when its low W-L bits are all
  // ones, and the slot number is the inverted top L bits.
  if (L == 0) begin : g_single
    assign sample_req = (count == '1);
    assign sample_idx = '0;
  end else if (L == W) begin : g_every
    assign sample_req = 1'b1;
    assign sample_idx = IW'(~count);
  end else begin : g_slots
    assign sample_req = (count[W-L-1:0] == '1);
    assign sample_idx = IW'(~count[W-1:W-L]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          duty <= '0;
    else if (duty_valid) duty <= duty_cmd;
  end

endmodule
