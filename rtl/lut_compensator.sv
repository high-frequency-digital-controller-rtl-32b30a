// lut_compensator: look-up-table PID compensator with two control laws.
//
// Because the windowed A/D error takes only nine values, every product of a
// PID coefficient and an error is read from a nine-entry table instead of
// being computed by a multiplier. The compensator is the incremental
// (velocity) form of a PID controller:
//   u[n] = u[n-1] + A(e[n]) + B(e[n-1]) + C(e[n-2])
// where A(e) = KA*e, B(e) = KB*e, C(e) = KC*e are table look-ups. There is one
// set of tables per mode; the mode input selects the control law used at each
// sample. Both laws update the same accumulator, so changing mode is bumpless.
//
// Outputs: d_ss is u rounded down to D_BITS (the high-resolution command for
// steady state); d_dy is u rounded to the nearest LR_BITS value (the
// low-resolution command for dynamic mode). u carries G_BITS guard bits
// below the DPWM LSB and saturates to the duty range 0 .. 1 - 2^-D_BITS.
//
// The PID form, the shared accumulator, the rounding and all coefficient
// values are this design's choices: only the table-based compensator, its two
// outputs and the mode-dependent control law are prescribed. The default
// coefficients regulate a 2 MHz, 8 V to 3.3 V buck converter with
// L = 4.7 uH, C = 47 uF (30 mOhm ESR) and 20 mV of output voltage per error
// step (the converter model of the closed-loop testbench). In PID terms, in
// DPWM LSBs per error step: steady state Kp = 2, Ki = 1, Kd = 12; dynamic
// Kp = 2, Ki = 0.125, Kd = 16 (KA = 16*(Kp+Ki+Kd), KB = -16*(Kp+2*Kd),
// KC = 16*Kd). They were chosen for robust settling from any initial state
// over 4..10 V input and 0.1..1 A load.
//
// Timing: the tables and the accumulator are updated at the clock edge where
// sample_en (clk1) is high; outputs are registered.
module lut_compensator
  import sd_pkg::*;
#(
  parameter int unsigned D_BITS  = 10,
  parameter int unsigned LR_BITS = 4,
  parameter int unsigned G_BITS  = 4,    // guard bits below the DPWM LSB
  // Coefficients in units of 2^-G_BITS DPWM LSBs per error step.
  parameter int KA_SS = 240,
  parameter int KB_SS = -416,
  parameter int KC_SS = 192,
  parameter int KA_DY = 290,
  parameter int KB_DY = -544,
  parameter int KC_DY = 256,
  parameter int unsigned D_INIT = 0      // initial duty command, D_BITS LSBs
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               sample_en,  // clk1 strobe
  input  mode_e              mode,
  input  err_t               e,
  output logic [D_BITS-1:0]  d_ss,       // high-resolution command
  output logic [LR_BITS-1:0] d_dy        // low-resolution command
);

  localparam int unsigned UW    = D_BITS + G_BITS;           // accumulator magnitude bits
  localparam int unsigned SW    = UW + 8;                    // signed working width
  localparam int          U_MAX = (1 << UW) - 1;
  localparam int unsigned SHIFT_LR = D_BITS - LR_BITS + G_BITS;

  typedef int lut_t [9];

  function automatic lut_t make_lut(int k);
    lut_t t;
    for (int i = 0; i < 9; i++) t[i] = k * (i - E_LIMIT);
    return t;
  endfunction

  // Tables indexed by e + 4.
  localparam lut_t LUT_A_SS = make_lut(KA_SS);
  localparam lut_t LUT_B_SS = make_lut(KB_SS);
  localparam lut_t LUT_C_SS = make_lut(KC_SS);
  localparam lut_t LUT_A_DY = make_lut(KA_DY);
  localparam lut_t LUT_B_DY = make_lut(KB_DY);
  localparam lut_t LUT_C_DY = make_lut(KC_DY);

  err_t  e1_q, e2_q;                 // e[n-1], e[n-2]
  logic [UW-1:0] u_q;                // accumulator u[n-1]
  logic signed [SW-1:0] u_sum;
  logic [UW-1:0] u_next;
  logic [3:0] i0, i1, i2;            // table addresses
  logic signed [SW-1:0] a_v, b_v, c_v;

  function automatic logic [3:0] addr(err_t v);
    err_t s;
    s = (v > 4'sd4) ? 4'sd4 : (v < -4'sd4) ? -4'sd4 : v;
    return 4'(s + 4'sd4);
  endfunction

  always_comb begin
    i0 = addr(e);
    i1 = addr(e1_q);
    i2 = addr(e2_q);
    if (mode == MODE_DY) begin
      a_v = SW'(LUT_A_DY[i0]); b_v = SW'(LUT_B_DY[i1]); c_v = SW'(LUT_C_DY[i2]);
    end else begin
      a_v = SW'(LUT_A_SS[i0]); b_v = SW'(LUT_B_SS[i1]); c_v = SW'(LUT_C_SS[i2]);
    end
    u_sum = $signed({8'b0, u_q}) + a_v + b_v + c_v;
    if (u_sum < 0)                 u_next = '0;
    else if (u_sum > SW'(U_MAX))   u_next = UW'(U_MAX);
    else                           u_next = u_sum[UW-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      u_q  <= UW'(D_INIT << G_BITS);
      e1_q <= '0;
      e2_q <= '0;
    end else if (sample_en) begin
      u_q  <= u_next;
      e1_q <= e;
      e2_q <= e1_q;
    end
  end

  // Outputs: truncation for the high-resolution word, rounding (with
  // saturation) for the low-resolution word.
  logic [UW:0] u_rnd;
  always_comb begin
    d_ss  = u_q[UW-1 -: D_BITS];
    u_rnd = {1'b0, u_q} + (UW+1)'(1 << (SHIFT_LR - 1));
    d_dy  = u_rnd[UW] ? '1 : u_rnd[UW-1 -: LR_BITS];
  end

endmodule
