// sd_pkg: types and constants shared by the blocks of the sigma-delta DPWM
// controller.
//
// The windowed A/D delivers an error that takes only the nine values -4..+4;
// err_t holds it as a 4-bit two's-complement number. The controller runs in
// one of two modes: steady state (undersampled, full sigma-delta resolution)
// or dynamic (sampled every switching period, sigma-delta loop bypassed).
// The error limits that select the mode follow the description of the
// controller; the 4-bit encoding is this design's choice.
package sd_pkg;

  // Error word from the windowed A/D: -E_LIMIT..+E_LIMIT.
  typedef logic signed [3:0] err_t;

  localparam int E_LIMIT = 4;  // window of the A/D: nine levels
  localparam int E_SS    = 2;  // |e| <= E_SS keeps steady state, |e| > E_SS enters dynamic mode

  typedef enum logic {
    MODE_SS = 1'b0,  // steady state: sample every DIV-th switching period
    MODE_DY = 1'b1   // dynamic: sample every switching period, bypass the sigma-delta loop
  } mode_e;

  // Magnitude of an error word.
  function automatic int err_abs(err_t e);
    int v;
    v = int'(e);
    return (v < 0) ? -v : v;
  endfunction

endpackage
