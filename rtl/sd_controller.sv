// sd_controller: digital controller for a low-power buck converter built
// around a multi-bit sigma-delta DPWM and a dual-sampling-mode compensator.
//
// Signal flow (one fast clock, clk, runs everything):
//   v_sense -> windowed_adc -> e[n] (-4..+4)
//   e[n] -> mode_control -> mode, sample strobe clk1
//   e[n], mode, clk1 -> lut_compensator -> d_ss (D_BITS), d_dy (LR_BITS)
//   d_ss, d_dy, mode -> sd_dpwm -> c(t) -> dead_time -> C, C_n
// In steady state (|e| <= 2) the output voltage is sampled every DIV-th
// switching period and the sigma-delta DPWM turns the D_BITS command into a
// dithered sequence of LR_BITS duty ratios. When |e| exceeds 2 the controller
// enters dynamic mode at once: it samples every switching period, uses the
// dynamic control law, and drives the low-resolution DPWM directly with d_dy,
// bypassing the sigma-delta loop. It goes back when |e| falls below 2.
//
// The switching period is 2^LR_BITS * CELL_STAGES cycles of clk; with the
// defaults (10-bit effective, 4-bit DPWM, one flip-flop per ring cell) that
// is 16 cycles. The windowed A/D is a behavioural model, so this top is for
// simulation; everything digital sits in sd_core, which is synthesizable. v_sense is the attenuated
// output voltage in volts, v_ref the reference in A/D steps of V_LSB volts.
module sd_controller
  import sd_pkg::*;
#(
  parameter int unsigned D_BITS      = 10,   // effective DPWM resolution
  parameter int unsigned LR_BITS     = 4,    // low-resolution DPWM
  parameter int unsigned CELL_STAGES = 1,    // flip-flops per ring cell
  parameter int unsigned DIV         = 6,    // steady-state undersampling
  parameter int unsigned DT          = 1,    // dead time, clk cycles
  parameter int unsigned REF_BITS    = 8,
  parameter real         V_LSB       = 0.01  // A/D step, volts
) (
  input  logic                clk,
  input  logic                rst_n,
  input  real                 v_sense,     // attenuated output voltage H*v_out
  input  logic [REF_BITS-1:0] v_ref,       // reference, A/D steps
  output logic                c,           // pulse-width modulated signal c(t)
  output logic                c_hs,        // C: high-side gate drive
  output logic                c_ls,        // C_n: low-side gate drive
  output mode_e               mode,        // MODE_DY during transients
  output logic                sample_en,   // clk1 sample strobe
  output logic                period_tick, // last clk cycle of each switching period
  output err_t                e,           // error from the A/D
  output logic [D_BITS-1:0]   d_ss,        // high-resolution command
  output logic [LR_BITS-1:0]  d_dy,        // low-resolution command
  output logic [LR_BITS-1:0]  d_lr         // duty command of the current period
);

  windowed_adc #(.REF_BITS(REF_BITS), .V_LSB(V_LSB)) u_adc (
    .v_sense, .v_ref, .e
  );

  sd_core #(
    .D_BITS(D_BITS), .LR_BITS(LR_BITS), .CELL_STAGES(CELL_STAGES), .DIV(DIV), .DT(DT)
  ) u_core (
    .clk, .rst_n, .e, .c, .c_hs, .c_ls, .mode, .sample_en, .period_tick, .d_ss, .d_dy, .d_lr
  );

endmodule
