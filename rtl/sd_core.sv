// sd_core: the synthesizable part of the controller: hysteretic mode logic
// and clock divider, look-up-table compensator, sigma-delta DPWM and
// dead-time circuit, wired as in the dual-sampling controller.
//
// Input is the error word e from the windowed A/D (-4..+4), read every
// cycle of the fast clock clk. The mode logic switches to dynamic mode in
// the cycle where |e| exceeds 2 and produces the sample strobe clk1: every
// DIV-th switching period in steady state, every period in dynamic mode. At
// each strobe the compensator updates its high-resolution (d_ss) and
// low-resolution (d_dy) commands. The sigma-delta DPWM dithers d_ss over
// successive periods in steady state and passes d_dy straight to its ring
// DPWM in dynamic mode. The dead-time circuit turns c into the two gate
// drives.
//
// Timing: one switching period is 2^LR_BITS * CELL_STAGES cycles of clk.
// A new command is used from the period that starts after the next
// period_tick; in steady state the sigma-delta loop adds one further period.
module sd_core
  import sd_pkg::*;
#(
  parameter int unsigned D_BITS      = 10,  // effective DPWM resolution
  parameter int unsigned LR_BITS     = 4,   // low-resolution DPWM
  parameter int unsigned CELL_STAGES = 1,   // flip-flops per ring cell
  parameter int unsigned DIV         = 6,   // steady-state undersampling
  parameter int unsigned DT          = 1    // dead time, clk cycles
) (
  input  logic               clk,
  input  logic               rst_n,
  input  err_t               e,           // error from the windowed A/D
  output logic               c,           // pulse-width modulated signal c(t)
  output logic               c_hs,        // C: high-side gate drive
  output logic               c_ls,        // C_n: low-side gate drive
  output mode_e              mode,        // MODE_DY during transients
  output logic               sample_en,   // clk1 sample strobe
  output logic               period_tick, // last clk cycle of each switching period
  output logic [D_BITS-1:0]  d_ss,        // high-resolution command
  output logic [LR_BITS-1:0] d_dy,        // low-resolution command
  output logic [LR_BITS-1:0] d_lr         // duty command of the current period
);

  mode_control #(.DIV(DIV)) u_mode (
    .clk, .rst_n, .period_tick, .e, .mode, .sample_en
  );

  lut_compensator #(.D_BITS(D_BITS), .LR_BITS(LR_BITS)) u_comp (
    .clk, .rst_n, .sample_en, .mode, .e, .d_ss, .d_dy
  );

  sd_dpwm #(.D_BITS(D_BITS), .LR_BITS(LR_BITS), .CELL_STAGES(CELL_STAGES)) u_dpwm (
    .clk, .rst_n, .mode, .d_hr(d_ss), .d_dy, .c, .period_tick, .d_lr
  );

  dead_time #(.DT(DT)) u_dt (
    .clk, .rst_n, .c, .c_hs, .c_ls
  );

endmodule
