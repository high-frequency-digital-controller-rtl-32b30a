// mode_control: hysteretic mode logic and clock divider of the dual-sampling
// compensator.
//
// The error e from the windowed A/D is watched continuously. As soon as |e|
// exceeds E_SS (2) the controller is in dynamic mode: the mode output rises
// in the same cycle, combinationally from e, so that the sigma-delta bypass
// acts without waiting for a sample. The mode is left when, at a sample
// instant, |e| has dropped below E_SS; an error of exactly E_SS keeps the
// current mode (the hysteresis band).
//
// The divider produces the system sampling strobe clk1 as a clock enable,
// one fast-clock cycle wide and aligned with period_tick: every DIV-th
// switching period in steady state (DIV = 6), every switching period in
// dynamic mode. Entering dynamic mode restarts the divide-by-DIV count.
// Using a clock enable instead of a divided clock, and judging the exit at
// sample instants, are this design's choices.
module mode_control
  import sd_pkg::*;
#(
  parameter int unsigned DIV = 6  // steady-state undersampling ratio
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  period_tick,  // one cycle per switching period
  input  err_t  e,            // error from the windowed A/D
  output mode_e mode,         // MODE_DY while the error is large
  output logic  sample_en     // clk1: compensator sample strobe
);

  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;

  logic          dy_q;       // registered dynamic-mode flag
  logic          big_err;    // |e| > E_SS
  logic          small_err;  // |e| < E_SS
  logic [CW-1:0] cnt_q;

  always_comb begin
    big_err   = err_abs(e) > E_SS;
    small_err = err_abs(e) < E_SS;
    mode      = (dy_q || big_err) ? MODE_DY : MODE_SS;
    sample_en = period_tick && ((mode == MODE_DY) || (cnt_q == CW'(DIV - 1)));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dy_q  <= 1'b0;
      cnt_q <= '0;
    end else begin
      if (big_err)                          dy_q <= 1'b1;
      else if (sample_en && small_err)      dy_q <= 1'b0;

      if (mode == MODE_DY)                  cnt_q <= '0;
      else if (period_tick)                 cnt_q <= (cnt_q == CW'(DIV - 1)) ? '0 : cnt_q + 1'b1;
    end
  end

endmodule
