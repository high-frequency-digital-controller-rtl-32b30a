// tb_sd_core: open-loop testbench of the synthesizable controller core.
//
// The error word is driven directly, as the windowed A/D would. The
// testbench checks the mode switching of the assembled core (entry in the
// same cycle as |e| = 3, hold at |e| = 2, exit at a sample with |e| < 2),
// the sampling rate in each mode (every 6th period in steady state, every
// period in dynamic mode), the compensator response (a positive error raises
// the command, with the expected first steady-state step KA_SS / 16 = 15
// LSBs), the pulse width of c in dynamic mode (equal to d_dy of the previous
// period tick), the average duty in steady state (equal to d_ss within one
// full-scale step) and the dead time between the gate drives.
`timescale 1ns/1ps
module tb_sd_core;
  import sd_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  err_t e = '0;
  logic c, c_hs, c_ls, sample_en, tick;
  mode_e mode;
  logic [9:0] d_ss;
  logic [3:0] d_dy, d_lr;

  sd_core #(.DT(2)) dut (
    .clk, .rst_n, .e, .c, .c_hs, .c_ls, .mode, .sample_en, .period_tick(tick),
    .d_ss, .d_dy, .d_lr
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Monitor: pulse width per period and sample spacing.
  int width = 0, ticks = 0, last_s = -1, gap = 0;
  int prev_width = 0;
  logic [3:0] lr_at_tick = '0;
  longint sum_w = 0;
  always @(posedge clk) if (rst_n) begin
    check(!(c_hs && c_ls), "gate drives overlap");
    width += c;
    if (tick) begin
      prev_width = width;
      sum_w += width;
      width = 0;
      ticks++;
      if (sample_en) begin
        gap = (last_s >= 0) ? ticks - last_s : 0;
        last_s = ticks;
      end
    end
  end

  task automatic periods(int n); repeat (16 * n) @(posedge clk); endtask
  task automatic set_e(int v); @(negedge clk); e = err_t'(v); endtask

  initial begin
    int d0, t0; longint s0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // steady state at e = 0: command stays at zero, sampling every 6th period
    periods(40);
    check(mode == MODE_SS, "steady state at e = 0");
    check(gap == 6, $sformatf("steady-state sample spacing %0d", gap));
    // e = +1: the first sample adds KA_SS/16 = 15 LSBs
    set_e(1);
    @(posedge sample_en); @(posedge clk); @(negedge clk);
    check(d_ss == 10'd15, $sformatf("first step of d_ss: %0d", d_ss));
    // keep a small positive error until the command is near the middle
    while (d_ss < 10'd420) @(negedge clk);
    set_e(0);
    periods(30);
    d0 = d_ss;
    // average duty equals d_ss while d_ss holds
    @(posedge tick); @(negedge clk);
    s0 = sum_w; t0 = ticks;
    periods(192);
    check(d_ss == 10'(d0), "command holds at e = 0");
    check(((sum_w - s0) * 64 - longint'(ticks - t0) * d0) < 1024 &&
          ((sum_w - s0) * 64 - longint'(ticks - t0) * d0) > -1024,
          $sformatf("average duty %0d/%0d periods for d_ss %0d", sum_w - s0, ticks - t0, d0));
    // large error: dynamic mode in the same cycle
    @(negedge clk); e = -4'sd3; #1;
    check(mode == MODE_DY, "dynamic mode entered at once");
    periods(8);
    check(gap == 1, $sformatf("dynamic sample spacing %0d", gap));
    // in dynamic mode c follows d_dy period by period
    repeat (6) begin
      @(posedge tick); lr_at_tick = d_dy;
      @(posedge tick); @(negedge clk);
      check(prev_width == int'(lr_at_tick) || prev_width == int'(d_dy),
            $sformatf("dynamic pulse width %0d for d_dy %0d", prev_width, lr_at_tick));
    end
    // |e| = 2 keeps dynamic mode, |e| < 2 leaves it at the next sample
    set_e(2);
    periods(6);
    check(mode == MODE_DY, "|e| = 2 holds dynamic mode");
    set_e(-1);
    periods(2);
    check(mode == MODE_SS, "|e| < 2 returns to steady state");
    set_e(0);
    periods(20);
    check(gap == 6, "steady-state sample spacing after dynamic mode");
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
