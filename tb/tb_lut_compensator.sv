// tb_lut_compensator: self-checking testbench of the look-up-table PID
// compensator.
//
// An independent reference computes the incremental PID law
//   u[n] = sat(u[n-1] + KA*e[n] + KB*e[n-1] + KC*e[n-2])
// with the coefficient set of the current mode, using multiplications
// instead of tables, and derives both outputs (truncated high-resolution
// word, rounded and saturated low-resolution word). Errors, modes and sample
// strobes are random; long runs of a full-scale error drive u into both
// saturation limits, which are counted.
`timescale 1ns/1ps
module tb_lut_compensator;
  import sd_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic sample_en = 0;
  mode_e mode = MODE_SS;
  err_t e = '0;
  logic [9:0] d_ss;
  logic [3:0] d_dy;

  lut_compensator dut (.clk, .rst_n, .sample_en, .mode, .e, .d_ss, .d_dy);

  localparam int KSS[3] = '{240, -416, 192};
  localparam int KDY[3] = '{290, -544, 256};
  localparam int UMAX = (1 << 14) - 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int u = 0, e1 = 0, e2 = 0;
  int sat_hi = 0, sat_lo = 0, dy_updates = 0;

  function automatic int exp_dy(int uu);
    int r = (uu + 512) / 1024;
    return (r > 15) ? 15 : r;
  endfunction

  always @(posedge clk) if (rst_n) begin
    // outputs reflect the state before this edge
    check(int'(d_ss) == u / 16, $sformatf("d_ss %0d exp %0d", d_ss, u / 16));
    check(int'(d_dy) == exp_dy(u), $sformatf("d_dy %0d exp %0d", d_dy, exp_dy(u)));
    if (sample_en) begin
      int s;
      if (mode == MODE_DY) begin
        s = u + KDY[0] * int'(e) + KDY[1] * e1 + KDY[2] * e2;
        dy_updates++;
      end else begin
        s = u + KSS[0] * int'(e) + KSS[1] * e1 + KSS[2] * e2;
      end
      if (s > UMAX) begin s = UMAX; sat_hi++; end
      if (s < 0) begin s = 0; sat_lo++; end
      u = s; e2 = e1; e1 = int'(e);
    end
  end

  initial begin
    int bias;
    repeat (3) @(negedge clk);
    #2 rst_n = 1;
    for (int blk = 0; blk < 60; blk++) begin
      // some blocks hold a full-scale error long enough to saturate u
      bias = (blk % 6 == 1) ? 4 : (blk % 6 == 4) ? -4 : 0;
      repeat ((bias != 0) ? 1500 : 300) begin
        @(negedge clk);
        #2;
        e = (bias != 0) ? err_t'(bias) : err_t'(int'($urandom % 9) - 4);
        sample_en = ($urandom % 3 == 0);
        if ($urandom % 20 == 0) mode = (mode == MODE_SS) ? MODE_DY : MODE_SS;
      end
    end
    check(sat_hi > 0, $sformatf("upper limit reached %0d times", sat_hi));
    check(sat_lo > 0, $sformatf("lower limit reached %0d times", sat_lo));
    check(dy_updates > 100, "dynamic law used");
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
