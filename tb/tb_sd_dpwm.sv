// tb_sd_dpwm: self-checking testbench of the complete sigma-delta DPWM
// (default 10-bit effective, 4-bit ring, one flip-flop per cell).
//
// The testbench measures the pulse width of c in every switching period and
// compares it with a reference model of the sigma-delta loop driven by the
// command present at each period tick (the loop's one-period delay included).
// It checks the period length (16 cycles), that the average duty of c over
// many periods equals the 10-bit command within one full-scale step, and
// that in dynamic mode c follows d_dy directly.
`timescale 1ns/1ps
module tb_sd_dpwm;
  import sd_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  mode_e mode = MODE_SS;
  logic [9:0] d_hr = '0;
  logic [3:0] d_dy = '0, d_lr;
  logic c, tick;

  sd_dpwm dut (.clk, .rst_n, .mode, .d_hr, .d_dy, .c, .period_tick(tick), .d_lr);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int x = 0;          // reference integrator
  int exp_w = 0;      // expected pulse width of the current period
  int nxt_w = 0;
  int width = 0, len = 0;
  longint sum_w = 0;
  int nper = 0;
  bit started = 0;

  // Per-cycle monitor (at negedge the outputs are stable).
  always @(negedge clk) if (rst_n) begin
    width += c;
    len++;
    if (tick) begin
      if (started) begin
        check(len == 16, $sformatf("period length %0d", len));
        check(width == exp_w, $sformatf("period %0d: width %0d exp %0d", nper, width, exp_w));
        sum_w += width;
        nper++;
      end
      started = 1;
      // reference: command latched at this tick
      if (mode == MODE_DY) begin
        nxt_w = d_dy; x = 0;
      end else begin
        int dl;
        dl = (d_hr > 10'd960) ? 960 : int'(d_hr);
        nxt_w = x >> 6;
        x = x + dl - ((x >> 6) << 6);
      end
      exp_w = nxt_w;
      width = 0; len = 0;
    end
  end

  task automatic run_periods(int n);
    repeat (n * 16) @(negedge clk);
  endtask

  initial begin
    longint s0; int n0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // Constant commands: check the average duty.
    for (int k = 0; k < 12; k++) begin
      d_hr = (k == 0) ? 10'd307 : 10'($urandom % 961);
      run_periods(3);
      s0 = sum_w; n0 = nper;
      run_periods(256);
      check(((sum_w - s0) * 64 - longint'(nper - n0) * longint'(d_hr)) < 1024 &&
            ((sum_w - s0) * 64 - longint'(nper - n0) * longint'(d_hr)) > -1024,
            $sformatf("average duty for d=%0d: %0d/%0d periods", d_hr, sum_w - s0, nper - n0));
    end
    // Random commands changing at random times.
    repeat (2000) begin
      @(negedge clk);
      if ($urandom % 9 == 0) d_hr = 10'($urandom);
    end
    // Dynamic mode.
    mode = MODE_DY;
    repeat (100) begin
      d_dy = 4'($urandom);
      run_periods(1);
    end
    mode = MODE_SS;
    run_periods(50);
    check(nper > 3000, "enough periods observed");
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
