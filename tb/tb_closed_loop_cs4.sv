// tb_closed_loop_cs4: closed-loop testbench of the controller in the
// configuration of the 2 MHz converter experiment: the 4-bit ring DPWM with
// every delay cell made of four flip-flops in series (CELL_STAGES = 4), so
// one switching period is 64 clock cycles and a 128 MHz clock gives 2 MHz.
// The dead time is set to 4 clock cycles, the same 31 ns (1/16 of the
// period) as in the default configuration, for which the compensator
// coefficients were tuned; everything else is at its default.
//
// The sequence and checks are those of tb_sd_controller: start-up at 1 A,
// load steps 1 A -> 0.1 A -> 1 A, input steps to 4 V and 10 V, regulation
// inside the +-2 step window after each event, no overlap of the gate
// drives, and each mechanism of the design (mode entry and exit, sampling
// every 6th / every period, bypass, dithering, dead time) seen at least once.
`timescale 1ns/1ps
module tb_closed_loop_cs4;
  import sd_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #3.90625 clk = ~clk;

  real v_sense, v_out, i_l;
  real vin = 8.0, r_load = 3.3;
  logic [7:0] v_ref = 8'd165;   // 1.65 V at the A/D = 3.3 V at the output
  logic c, c_hs, c_ls, sample_en, period_tick;
  mode_e mode;
  err_t e;
  logic [9:0] d_ss;
  logic [3:0] d_dy, d_lr;

  sd_controller #(.CELL_STAGES(4), .DT(4)) dut (
    .clk, .rst_n, .v_sense, .v_ref, .c, .c_hs, .c_ls, .mode, .sample_en,
    .period_tick, .e, .d_ss, .d_dy, .d_lr
  );

  buck_model #(.DT_S(7.8125e-9)) plant (.clk, .hs(c_hs), .ls(c_ls), .vin, .r_load, .v_out, .v_sense, .i_l);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Mechanism counters and monitors (sampled at the rising edge).
  int n_enter = 0, n_exit = 0, n_ss_gap6 = 0, n_dy_gap1 = 0;
  int n_bypass = 0, n_dither = 0, n_deadtime = 0, n_periods = 0;
  int cyc = 0, last_tick = -1, tick_cnt = 0, last_sample = -1;
  mode_e prev_mode = MODE_SS;
  logic [3:0] prev_lr = '0;
  logic [9:0] prev_ss = '0;
  bit prev_both_off = 0;
  int period_errs = 0, overlap = 0;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (c_hs && c_ls) overlap++;
    if (!c_hs && !c_ls && !prev_both_off) n_deadtime++;
    prev_both_off = !c_hs && !c_ls;
    if (mode == MODE_DY && prev_mode == MODE_SS) n_enter++;
    if (mode == MODE_SS && prev_mode == MODE_DY) n_exit++;
    prev_mode = mode;
    if (period_tick) begin
      if (last_tick >= 0 && cyc - last_tick != 64) period_errs++;
      last_tick = cyc;
      n_periods++;
      if (sample_en) begin
        if (last_sample >= 0) begin
          if (mode == MODE_SS && tick_cnt - last_sample == 6) n_ss_gap6++;
          if (mode == MODE_DY && tick_cnt - last_sample == 1) n_dy_gap1++;
        end
        last_sample = tick_cnt;
      end
      if (mode == MODE_DY && dut.u_core.u_dpwm.d_next == d_dy) n_bypass++;
      if (mode == MODE_SS && d_ss == prev_ss && dut.u_core.u_dpwm.d_next != prev_lr) n_dither++;
      prev_lr = dut.u_core.u_dpwm.d_next;
      prev_ss = d_ss;
      tick_cnt++;
    end
  end

  function automatic real fabs(real x); return (x < 0.0) ? -x : x; endfunction

  // Wait, then check steady-state regulation over a window.
  task automatic settle_and_check(string what, real wait_s);
    real vmin, vmax, vsum; int n, dy_cycles, big_e;
    repeat (int'(wait_s / 7.8125e-9)) @(posedge clk);
    vmin = 100.0; vmax = -100.0; vsum = 0.0; n = 0; dy_cycles = 0; big_e = 0;
    repeat (25600) begin  // 200 us
      @(posedge clk);
      if (v_out < vmin) vmin = v_out;
      if (v_out > vmax) vmax = v_out;
      vsum += v_out; n++;
      if (mode == MODE_DY) dy_cycles++;
      if (e > 2 || e < -2) big_e++;
    end
    $display("%s: v_out avg %.4f min %.4f max %.4f, d_ss %0d, dynamic cycles %0d",
             what, vsum / n, vmin, vmax, d_ss, dy_cycles);
    check(fabs(vsum / n - 3.3) < 0.03, {what, ": average output within 30 mV of 3.3 V"});
    check(vmin > 3.24 && vmax < 3.36, {what, ": output inside the +-2 step window"});
    check(dy_cycles == 0 && big_e == 0, {what, ": steady-state mode held"});
  endtask

  // Wait for a mode change within a time limit.
  task automatic expect_dynamic(string what);
    int k = 0;
    while (mode != MODE_DY && k < 12800) begin @(posedge clk); k++; end
    check(mode == MODE_DY, {what, ": dynamic mode entered"});
    k = 0;
    while (mode != MODE_SS && k < 256000) begin @(posedge clk); k++; end
    check(mode == MODE_SS, {what, ": steady state resumed within 2 ms"});
    $display("%s: dynamic mode for %0.1f us", what, real'(k) * 0.0078125);
  endtask

  initial begin
    repeat (4) @(negedge clk);
    rst_n = 1;
    // start-up at full load
    settle_and_check("start-up, 8 V, 1 A", 3000e-6);
    // load step down
    r_load = 33.0;
    expect_dynamic("load step 1 A -> 0.1 A");
    settle_and_check("8 V, 0.1 A", 500e-6);
    // load step up
    r_load = 3.3;
    expect_dynamic("load step 0.1 A -> 1 A");
    settle_and_check("8 V, 1 A", 500e-6);
    // input voltage range
    vin = 4.0;
    settle_and_check("4 V, 1 A", 1000e-6);
    vin = 10.0;
    settle_and_check("10 V, 1 A", 1000e-6);

    check(period_errs == 0, "switching period is 64 clock cycles");
    check(overlap == 0, "high- and low-side drives never on together");
    check(n_periods > 1000, "switching periods counted");
    $display("mechanisms: enter=%0d exit=%0d ss_gap6=%0d dy_gap1=%0d bypass=%0d dither=%0d deadtime=%0d",
             n_enter, n_exit, n_ss_gap6, n_dy_gap1, n_bypass, n_dither, n_deadtime);
    check(n_enter > 0, "dynamic mode entered");
    check(n_exit > 0, "dynamic mode left");
    check(n_ss_gap6 > 0, "steady-state sampling every 6th period");
    check(n_dy_gap1 > 0, "dynamic sampling every period");
    check(n_bypass > 0, "sigma-delta loop bypassed");
    check(n_dither > 0, "sigma-delta dithering");
    check(n_deadtime > 0, "dead time inserted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
