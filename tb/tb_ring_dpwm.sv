// tb_ring_dpwm: self-checking testbench of the ring-oscillator DPWM.
//
// Two instances: the default (16 cells of one flip-flop) and one with four
// flip-flops per cell. With random duty commands, the testbench follows the
// position in the period itself and checks, every cycle, that c is high
// exactly during the first duty * CELL_STAGES cycles of the period, that the
// period lasts 2^LR_BITS * CELL_STAGES cycles, and that a new command takes
// effect at the next period.
`timescale 1ns/1ps
module tb_ring_dpwm;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [3:0] duty_a = '0, duty_b = '0, dq_a, dq_b;
  logic c_a, c_b, t_a, t_b;

  ring_dpwm dut_a (.clk, .rst_n, .duty(duty_a), .c(c_a), .period_tick(t_a), .duty_q(dq_a));
  ring_dpwm #(.LR_BITS(4), .CELL_STAGES(4)) dut_b (
    .clk, .rst_n, .duty(duty_b), .c(c_b), .period_tick(t_b), .duty_q(dq_b));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int pa = 1, pb = 1;         // position in the period (reset holds the token at 0)
  int cur_a = 0, cur_b = 0;   // duty of the current period
  int periods_a = 0, periods_b = 0;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (20000) begin
      @(negedge clk);
      check(c_a == (pa < cur_a), $sformatf("A: c at position %0d duty %0d", pa, cur_a));
      check(c_b == (pb < cur_b * 4), $sformatf("B: c at position %0d duty %0d", pb, cur_b));
      check(t_a == (pa == 15), "A: period tick position");
      check(t_b == (pb == 63), "B: period tick position");
      if (pa == 15) begin
        duty_a = 4'($urandom);  // latched at the coming edge
        cur_a = duty_a; periods_a++;
      end
      if (pb == 63) begin
        duty_b = 4'($urandom);
        cur_b = duty_b; periods_b++;
      end
      pa = (pa + 1) % 16;
      pb = (pb + 1) % 64;
      // commands may change at any time; only the one present at the tick counts
      if ($urandom % 5 == 0 && pa != 0) duty_a = 4'($urandom);
      if ($urandom % 5 == 0 && pb != 0) duty_b = 4'($urandom);
    end
    check(periods_a == 20000 / 16, "A: number of periods");
    check(periods_b == 20000 / 64, "B: number of periods");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
