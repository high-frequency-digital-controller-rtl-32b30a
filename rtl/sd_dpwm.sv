// sd_dpwm: multi-bit sigma-delta digital pulse-width modulator.
//
// A fast low-resolution DPWM (ring_dpwm, LR_BITS bits) is driven by a
// first-order sigma-delta loop (sd_loop) that dithers its command from one
// switching period to the next so that the average duty ratio has D_BITS of
// resolution; the converter's LC filter does the averaging. With D_BITS = 10
// and LR_BITS = 4 the DPWM only needs 16 time steps per period instead of
// 1024. In dynamic mode the loop is bypassed and d_dy drives the DPWM
// directly.
//
// Timing: d_hr and d_dy are read in the cycle where period_tick is high and
// take effect one switching period later (the sigma-delta delay z^-1); c is
// registered.
module sd_dpwm
  import sd_pkg::*;
#(
  parameter int unsigned D_BITS      = 10,
  parameter int unsigned LR_BITS     = 4,
  parameter int unsigned CELL_STAGES = 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  mode_e              mode,
  input  logic [D_BITS-1:0]  d_hr,         // high-resolution command (steady state)
  input  logic [LR_BITS-1:0] d_dy,         // low-resolution command (dynamic mode)
  output logic               c,            // pulse-width modulated output c(t)
  output logic               period_tick,  // last fast cycle of each switching period
  output logic [LR_BITS-1:0] d_lr          // low-resolution command of the current period
);

  logic [LR_BITS-1:0] d_next;

  sd_loop #(.D_BITS(D_BITS), .LR_BITS(LR_BITS)) u_loop (
    .clk, .rst_n, .period_tick, .mode, .d_hr, .d_dy, .d_lr(d_next)
  );

  ring_dpwm #(.LR_BITS(LR_BITS), .CELL_STAGES(CELL_STAGES)) u_dpwm (
    .clk, .rst_n, .duty(d_next), .c, .period_tick, .duty_q(d_lr)
  );

endmodule
