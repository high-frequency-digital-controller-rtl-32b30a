// tb_sd_loop: self-checking testbench of the sigma-delta loop.
//
// Two instances: the 9-bit / 3-bit configuration of the worked example
// (command 0.3, all states zero at the start) and the default 10-bit / 4-bit
// one. A behavioural reference model, written from the loop equations,
// predicts every low-resolution command. The testbench also checks the first
// commands of the worked example (0, then 0.25), that the running sum of the
// commands tracks n*d[n] within one full-scale step (the averaging
// property), the dynamic-mode bypass, and the one-period update rate.
`timescale 1ns/1ps
module tb_sd_loop;
  import sd_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, tick = 0;
  always #5 clk = ~clk;

  // 9-bit / 3-bit instance
  mode_e mode_a = MODE_SS;
  logic [8:0] d_a = '0;
  logic [2:0] dy_a = '0, lr_a;
  sd_loop #(.D_BITS(9), .LR_BITS(3)) dut_a (
    .clk, .rst_n, .period_tick(tick), .mode(mode_a), .d_hr(d_a), .d_dy(dy_a), .d_lr(lr_a));

  // default instance
  mode_e mode_b = MODE_SS;
  logic [9:0] d_b = '0;
  logic [3:0] dy_b = '0, lr_b;
  sd_loop dut_b (
    .clk, .rst_n, .period_tick(tick), .mode(mode_b), .d_hr(d_b), .d_dy(dy_b), .d_lr(lr_b));

  // Reference: integrator state as a plain integer.
  int xa = 0, xb = 0;
  function automatic int q(int x, int shift); return x >>> shift; endfunction
  function automatic int lim(int d, int dbits, int lrbits);
    int m = ((1 << lrbits) - 1) << (dbits - lrbits);
    return (d > m) ? m : d;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // One switching period: tick for one cycle, then three idle cycles.
  // Returns the commands seen during the tick cycle.
  task automatic period(output int got_a, output int got_b);
    @(negedge clk); tick = 1;
    got_a = lr_a; got_b = lr_b;
    @(negedge clk); tick = 0;
    repeat (2) @(negedge clk);
  endtask

  task automatic step_ref(output int exp_a, output int exp_b);
    exp_a = (mode_a == MODE_DY) ? int'(dy_a) : q(xa, 6);
    exp_b = (mode_b == MODE_DY) ? int'(dy_b) : q(xb, 6);
    xa = (mode_a == MODE_DY) ? 0 : xa + lim(int'(d_a), 9, 3) - (q(xa, 6) << 6);
    xb = (mode_b == MODE_DY) ? 0 : xb + lim(int'(d_b), 10, 4) - (q(xb, 6) << 6);
  endtask

  initial begin
    int ga, gb, ea, eb;
    longint sum_a, sum_b;
    int stable;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // Worked example: d = 0.3 with 9 bits (154/512).
    d_a = 9'd154; d_b = 10'd307;
    sum_a = 0; sum_b = 0;
    for (int n = 1; n <= 600; n++) begin
      // No change between ticks: the loop advances once per period.
      stable = lr_a;
      @(negedge clk);
      check(lr_a == 3'(stable), "command changed without a period tick");
      step_ref(ea, eb);
      period(ga, gb);
      check(ga == ea, $sformatf("9/3 period %0d: got %0d exp %0d", n, ga, ea));
      check(gb == eb, $sformatf("10/4 period %0d: got %0d exp %0d", n, gb, eb));
      if (n == 1) check(ga == 0, "example: first command 0");
      if (n == 2) check(ga == 2, "example: second command 0.25");
      sum_a += longint'(ga) << 6; sum_b += longint'(gb) << 6;
      // averaging: |sum - n*d| < 2^D_BITS
      check((longint'(n) * 154 - sum_a) < 512 && (longint'(n) * 154 - sum_a) > -512,
            "9/3 running average");
      check((longint'(n) * 307 - sum_b) < 1024 && (longint'(n) * 307 - sum_b) > -1024,
            "10/4 running average");
    end

    // Random commands, including values above the DPWM range.
    for (int n = 0; n < 2000; n++) begin
      if (n % 7 == 0) begin d_a = 9'($urandom); d_b = 10'($urandom); end
      step_ref(ea, eb);
      period(ga, gb);
      check(ga == ea && gb == eb, $sformatf("random period %0d", n));
    end

    // Dynamic mode: the multiplexer passes d_dy, the integrator is cleared.
    mode_a = MODE_DY; mode_b = MODE_DY;
    for (int n = 0; n < 50; n++) begin
      dy_a = 3'($urandom); dy_b = 4'($urandom);
      @(negedge clk);
      check(lr_a == dy_a && lr_b == dy_b, "bypass passes d_dy");
      step_ref(ea, eb);
      period(ga, gb);
      check(ga == ea && gb == eb, "bypass period");
    end
    mode_a = MODE_SS; mode_b = MODE_SS;
    d_a = 9'd154; d_b = 10'd307;
    step_ref(ea, eb);
    period(ga, gb);
    check(ga == 0 && gb == 0, "loop restarts from zero after dynamic mode");
    for (int n = 0; n < 100; n++) begin
      step_ref(ea, eb);
      period(ga, gb);
      check(ga == ea && gb == eb, "after bypass");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
