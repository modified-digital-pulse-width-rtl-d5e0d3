// mdpwm_pkg -- constants shared by the modified digital pulse width modulator.
//
// The modulator resolution (10 bits for both the main down counter and the
// auxiliary up counter) and the multisampling rate (16 duty-cycle updates per
// switching period) are the values of the reference prototype. The event
// record type is this design's own: it bundles the single-cycle strobes the
// modulator core exposes for monitoring.
package mdpwm_pkg;

  // Resolution of the main down counter and of the auxiliary up counter.
  localparam int unsigned CNT_BITS_DEFAULT = 10;

  // Number of compensator updates (duty-cycle samples) per switching period.
  localparam int unsigned SAMPLES_PER_PERIOD_DEFAULT = 16;

  // One-cycle strobes produced by the modulator core in the cycle before the
  // output changes.
  typedef struct packed {
    logic set;        // output will turn ON (main counter fell below the duty)
    logic zero_off;   // output will turn OFF at the end of the switching period
    logic early_off;  // output will turn OFF early through the auxiliary comparator
  } mdpwm_events_t;

endpackage
