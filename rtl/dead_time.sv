// dead_time: turns the pulse-width modulated signal c into the two gate
// drives C (high-side switch) and C_n (low-side switch) with a dead time in
// which both are off.
//
// The last DT samples of c are kept in a shift register. C is high while c
// and all DT samples are high, C_n while c and all samples are low. Each
// switch therefore turns on only after c has been steady for DT cycles,
// which is at least DT cycles after the other switch turned off, even for
// pulses or gaps shorter than DT (those are swallowed). The structure and DT are this
// design's choice: the controller only calls for a dead-time circuit that
// outputs C and its complement.
//
// Timing: C and C_n are combinational from c and the delay register; with
// c coming from a register they are glitch-free decodes of register outputs.
module dead_time #(
  parameter int unsigned DT = 1  // dead time in fast-clock cycles, >= 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic c,      // pulse-width modulated signal
  output logic c_hs,   // C: high-side gate drive
  output logic c_ls    // C_n: low-side gate drive
);

  logic [DT-1:0] dly_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dly_q <= '0;
    else        dly_q <= DT'({dly_q, c});
  end

  assign c_hs = c & (&dly_q);
  assign c_ls = ~c & ~(|dly_q);

  assert property (@(posedge clk) disable iff (!rst_n) !(c_hs && c_ls))
    else $error("dead_time: both switches on");

endmodule
