// tb_fpga_dpwm_9b: the sigma-delta DPWM in the configuration of the FPGA
// pulse-width modulation experiment: a 9-bit command on a 3-bit ring of
// single flip-flops, switching at 60 MHz.
//
// A 480 MHz clock drives the 8-cell ring, so each period is 8 clock cycles
// (16.67 ns). The 9-bit command alternates between two values (0.3 and
// 0.7, then random pairs) every 40 periods. The testbench checks that the
// switching period is 16.67 ns, that every pulse is one of the eight widths
// k/8 of the period, and that over each 40-period window the average duty
// equals the command within one full-scale step of the 3-bit DPWM divided by
// the window length (the sigma-delta averaging).
`timescale 1ns/1ps
module tb_fpga_dpwm_9b;
  import sd_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #1.0416667 clk = ~clk;

  logic [8:0] d = 9'd154;
  logic [2:0] d_lr;
  logic c, tick;

  sd_dpwm #(.D_BITS(9), .LR_BITS(3), .CELL_STAGES(1)) dut (
    .clk, .rst_n, .mode(MODE_SS), .d_hr(d), .d_dy(3'd0), .c, .period_tick(tick), .d_lr
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int width = 0;
  longint win_sum = 0;
  int win_n = 0;
  realtime last_t = 0;
  bit have_t = 0;

  always @(posedge clk) if (rst_n) begin
    width += c;
    if (tick) begin
      if (have_t) check($realtime - last_t > 16.6 && $realtime - last_t < 16.7,
                        $sformatf("period %0.3f ns", $realtime - last_t));
      last_t = $realtime; have_t = 1;
      check(width <= 7, "pulse width is one of 8 levels");
      win_sum += width; win_n++;
      width = 0;
    end
  end

  initial begin
    logic [8:0] v0, v1;
    v0 = 9'd154; v1 = 9'd358;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int w = 0; w < 40; w++) begin
      if (w >= 8 && w % 2 == 0) begin v0 = 9'($urandom % 449); v1 = 9'($urandom % 449); end
      d = (w % 2 == 0) ? v0 : v1;
      // skip the period in flight and the one-period loop delay
      repeat (2) @(posedge tick);
      @(negedge clk);
      win_sum = 0; win_n = 0;
      repeat (40) @(posedge tick);
      @(negedge clk);
      check(win_n == 40, "window length");
      check((win_sum * 64 - longint'(win_n) * longint'(d)) < 512 &&
            (win_sum * 64 - longint'(win_n) * longint'(d)) > -512,
            $sformatf("window %0d: average %0d/%0d vs command %0d/512", w, win_sum, win_n, d));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
