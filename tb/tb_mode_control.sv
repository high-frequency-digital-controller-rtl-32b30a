// tb_mode_control: self-checking testbench of the hysteretic mode logic and
// clock divider.
//
// Switching periods of 5 clock cycles are simulated while the error steps
// through chosen and random sequences. An independent reference decides,
// every cycle, the expected mode (enter at once when |e| > 2; leave at a
// sample instant when |e| < 2; |e| = 2 holds) and the expected strobe
// (every 6th period in steady state, every period in dynamic mode). The
// testbench also counts steady-state strobe spacing (6 periods) and
// dynamic-mode spacing (1 period).
`timescale 1ns/1ps
module tb_mode_control;
  import sd_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, tick = 0;
  always #5 clk = ~clk;
  err_t e = '0;
  mode_e mode;
  logic sample_en;

  mode_control dut (.clk, .rst_n, .period_tick(tick), .e, .mode, .sample_en);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // reference state
  bit ref_dy = 0;
  int ref_cnt = 0;   // ticks since last steady-state sample
  int ph = 0;
  int last_sample_tick = -1, ntick = 0;
  int ss_gaps6 = 0, dy_gaps1 = 0, entries = 0;
  bit prev_mode = 0;

  function automatic int mag(err_t v); return (v < 0) ? -int'(v) : int'(v); endfunction

  // Checked at the rising edge, where the design samples its inputs.
  always @(posedge clk) if (rst_n) begin
    bit exp_mode, exp_s;
    exp_mode = ref_dy || (mag(e) > 2);
    exp_s = tick && (exp_mode || ref_cnt == 5);
    check(mode == (exp_mode ? MODE_DY : MODE_SS), $sformatf("mode e=%0d", e));
    check(sample_en == exp_s, $sformatf("sample strobe cnt=%0d dut=%0d tick=%0d e=%0d m=%0d t=%0t", ref_cnt, dut.cnt_q, tick, e, exp_mode, $time));
    if (exp_mode && !prev_mode) entries++;
    prev_mode = exp_mode;
    if (exp_s) begin
      if (last_sample_tick >= 0) begin
        if (!exp_mode && ntick - last_sample_tick == 6) ss_gaps6++;
        if (exp_mode && ntick - last_sample_tick == 1) dy_gaps1++;
      end
      last_sample_tick = ntick;
    end
    // update reference
    if (mag(e) > 2) ref_dy = 1;
    else if (exp_s && mag(e) < 2) ref_dy = 0;
    if (exp_mode) ref_cnt = 0;
    else if (tick) ref_cnt = (ref_cnt == 5) ? 0 : ref_cnt + 1;
    if (tick) ntick++;
  end

  // Period tick: one cycle in five, changed away from the rising edge.
  always @(negedge clk) if (rst_n) begin
    ph = (ph + 1) % 5;
    tick = (ph == 4);
  end

  initial begin
    repeat (3) @(negedge clk);
    #2 rst_n = 1;
    // steady state with small errors
    repeat (300) begin @(negedge clk); #2 e = err_t'(int'($urandom % 5) - 2); end
    // a large error for a few cycles, then |e| = 2 (holds), then small
    #2 e = 4'sd3; repeat (3) @(negedge clk);
    #2 e = -4'sd2; repeat (60) @(negedge clk);
    check(mode == MODE_DY, "|e| = 2 keeps dynamic mode");
    #2 e = 4'sd1; repeat (10) @(negedge clk);
    check(mode == MODE_SS, "|e| < 2 returns to steady state");
    // random errors over the whole range
    repeat (20000) begin
      @(negedge clk);
      #2 if ($urandom % 7 == 0) e = err_t'(int'($urandom % 9) - 4);
    end
    check(ss_gaps6 > 10, $sformatf("steady-state strobes 6 periods apart: %0d", ss_gaps6));
    check(dy_gaps1 > 10, $sformatf("dynamic strobes every period: %0d", dy_gaps1));
    check(entries > 5, $sformatf("dynamic mode entries: %0d", entries));
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
