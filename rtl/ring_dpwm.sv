// ring_dpwm: low-resolution DPWM built around a ring of delay cells.
//
// A single token circulates through 2^LR_BITS delay cells; one trip round the
// ring is one switching period. The output c is set when the token enters
// cell 0 and cleared when it enters the cell selected by the duty command, so
// the duty ratio takes the 2^LR_BITS values k / 2^LR_BITS, k = 0 .. 2^LR_BITS-1.
// A multiplexer picks the tap that ends the pulse.
//
// Each delay cell is CELL_STAGES flip-flops in series; more stages per cell
// lower the switching frequency for the same fast clock. The ring is clocked
// synchronously by clk, so the flip-flop propagation delay of a free-running
// ring becomes one clock period here (this design's choice, which makes the
// block ordinary synthesizable logic).
//
// Interface and timing: duty is sampled in the cycle where period_tick is
// high (the token sits in the last flip-flop) and used for the period that
// starts at that clock edge. c is a register output that is high for exactly
// duty * CELL_STAGES fast cycles of every 2^LR_BITS * CELL_STAGES.
module ring_dpwm #(
  parameter int unsigned LR_BITS     = 4,  // resolution of the DPWM
  parameter int unsigned CELL_STAGES = 1   // flip-flops per delay cell
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [LR_BITS-1:0] duty,         // duty command, fraction duty / 2^LR_BITS
  output logic               c,            // pulse-width modulated output
  output logic               period_tick,  // last fast cycle of the switching period
  output logic [LR_BITS-1:0] duty_q        // command in use during the current period
);

  localparam int unsigned NCELLS = 1 << LR_BITS;
  localparam int unsigned NFF    = NCELLS * CELL_STAGES;

  logic [NFF-1:0] ring_q;  // one-hot token
  logic           tap;     // token at the end of the selected cell

  // Tap multiplexer: the token is about to enter cell duty_q.
  always_comb begin
    tap = 1'b0;
    for (int unsigned k = 1; k < NCELLS; k++)
      if (duty_q == LR_BITS'(k)) tap = ring_q[k*CELL_STAGES - 1];
  end

  assign period_tick = ring_q[NFF-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ring_q <= NFF'(1);
      duty_q <= '0;
      c      <= 1'b0;
    end else begin
      ring_q <= {ring_q[NFF-2:0], ring_q[NFF-1]};
      if (period_tick) begin
        duty_q <= duty;
        c      <= (duty != '0);
      end else if (tap) begin
        c <= 1'b0;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot(ring_q))
    else $error("ring_dpwm: token lost");

endmodule
