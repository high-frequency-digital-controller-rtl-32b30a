// sd_loop: the noise-shaping loop of the multi-bit sigma-delta DPWM.
//
// Each switching period the loop turns the D_BITS-wide high-resolution duty
// command d[n] into an LR_BITS-wide command d_LR[n] for the low-resolution
// DPWM. It is a first-order sigma-delta modulator built from two adders and
// one delay register:
//   d_LR[n]  = x[n] truncated to its LR_BITS most significant bits
//   e_D[n]   = d[n] - d_LR[n]            (first adder)
//   x[n+1]   = x[n] + e_D[n]             (second adder, delay register)
// The integrator (pole at z = 1) drives the average of e_D to zero, so the
// average of d_LR over a few periods approaches d. Seen from d, the loop adds
// one switching period of delay.
//
// In dynamic mode the multiplexer bypasses the loop: the low-resolution DPWM
// is fed directly with d_dy, and the integrator is cleared so the loop starts
// from zero when steady state resumes (this design's choice).
//
// The input is limited to (2^LR_BITS - 1) / 2^LR_BITS, the largest duty the
// low-resolution DPWM can produce; with that limit x stays inside D_BITS bits
// and d_LR never overflows (this design's choice).
//
// Timing: all registers use the fast DPWM clock. period_tick (one cycle per
// switching period, from the DPWM ring) advances the loop; d_lr is valid in
// the cycle of period_tick and is latched by the DPWM at that edge.
module sd_loop
  import sd_pkg::*;
#(
  parameter int unsigned D_BITS  = 10,  // effective resolution of d[n]
  parameter int unsigned LR_BITS = 4    // resolution of the low-resolution DPWM
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               period_tick,  // last fast cycle of a switching period
  input  mode_e              mode,
  input  logic [D_BITS-1:0]  d_hr,         // high-resolution command d[n], fraction of the period
  input  logic [LR_BITS-1:0] d_dy,         // low-resolution command used in dynamic mode
  output logic [LR_BITS-1:0] d_lr          // command for the low-resolution DPWM
);

  localparam int unsigned SHIFT = D_BITS - LR_BITS;
  localparam logic [D_BITS-1:0] D_MAX = D_BITS'(((1 << LR_BITS) - 1) << SHIFT);

  logic [D_BITS-1:0]  x_q;        // delay register x[n]
  logic [D_BITS-1:0]  d_lim;      // d[n] limited to the DPWM range
  logic [LR_BITS-1:0] d_q;        // truncation of x[n]
  logic signed [D_BITS+1:0] e_d;  // e_D[n]
  logic signed [D_BITS+1:0] x_sum;

  always_comb begin
    d_lim = (d_hr > D_MAX) ? D_MAX : d_hr;
    d_q   = x_q[D_BITS-1 -: LR_BITS];
    e_d   = $signed({2'b00, d_lim}) - $signed({2'b00, d_q, {SHIFT{1'b0}}});
    x_sum = $signed({2'b00, x_q}) + e_d;
    d_lr  = (mode == MODE_DY) ? d_dy : d_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q <= '0;
    end else if (period_tick) begin
      if (mode == MODE_DY) x_q <= '0;
      else                 x_q <= x_sum[D_BITS-1:0];
    end
  end

  // With the input limit, the integrator never leaves 0 .. 2^D_BITS - 1.
  assert property (@(posedge clk) disable iff (!rst_n)
    period_tick && mode == MODE_SS |-> x_sum >= 0 && x_sum < (1 << D_BITS))
    else $error("sd_loop: integrator out of range");

endmodule
