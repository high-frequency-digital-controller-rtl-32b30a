// buck_model: behavioural model of a synchronous buck power stage, for
// closed-loop simulation only (real-valued, not synthesizable).
//
// On every rising edge of clk the inductor current and capacitor voltage are
// advanced by one forward-Euler step of DT_S seconds. The switch node is at
// vin while the high-side drive is on and at ground while the low-side drive
// is on; in the dead time the body diode of the off switch carries the
// inductor current (0.7 V drop). The load is a resistor. v_sense is the
// output voltage scaled by the divider ratio H, as seen by the A/D.
`timescale 1ns/1ps
module buck_model #(
  parameter real L_H   = 4.7e-6,
  parameter real C_F   = 47e-6,
  parameter real DCR   = 0.05,     // inductor resistance, ohm
  parameter real ESR   = 0.03,     // capacitor series resistance, ohm
  parameter real DT_S  = 31.25e-9, // simulation step = clk period, s
  parameter real H     = 0.5       // output divider ratio
) (
  input  logic clk,
  input  logic hs,        // high-side switch on
  input  logic ls,        // low-side switch on
  input  real  vin,       // input voltage, V
  input  real  r_load,    // load resistance, ohm
  output real  v_out,     // output voltage, V
  output real  v_sense,   // H * v_out
  output real  i_l        // inductor current, A
);
  real vc = 0.0;
  real il = 0.0;

  always @(posedge clk) begin
    real vsw, ic, vo;
    vo = (vc * r_load + il * ESR * r_load) / (r_load + ESR);
    if (hs)            vsw = vin;
    else if (ls)       vsw = 0.0;
    else if (il > 0.0) vsw = -0.7;
    else if (il < 0.0) vsw = vin + 0.7;
    else               vsw = vo;
    ic = il - vo / r_load;
    il = il + (vsw - il * DCR - vo) / L_H * DT_S;
    if (!hs && !ls && ((vsw < 0.0 && il < 0.0) || (vsw > vin && il > 0.0))) il = 0.0;
    vc = vc + ic / C_F * DT_S;
    v_out   = vc + ic * ESR;
    v_sense = H * v_out;
    i_l     = il;
  end

  initial begin
    v_out = 0.0; v_sense = 0.0; i_l = 0.0;
  end
endmodule
