// tb_dead_time: self-checking testbench of the dead-time circuit.
//
// Two instances (dead time of 1 and of 3 clock cycles) receive a random
// pulse train. A reference history of c predicts C (c and its last DT
// samples all high) and C_n (all low). The testbench also checks that the two
// drives are never on together, and that every turn-on of either switch
// comes at least DT cycles after the other switch turned off, and exactly
// DT cycles after it in the common case.
`timescale 1ns/1ps
module tb_dead_time;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic c = 0;
  logic hs1, ls1, hs3, ls3;
  dead_time dut1 (.clk, .rst_n, .c, .c_hs(hs1), .c_ls(ls1));
  dead_time #(.DT(3)) dut3 (.clk, .rst_n, .c, .c_hs(hs3), .c_ls(ls3));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  bit hist[8];          // hist[k] = c sampled k+1 rising edges ago
  int off3 = 0;         // cycles both drives of dut3 have been off
  int gaps = 0;
  bit p_hs3 = 0, p_ls3 = 1;
  bit last_hs = 0;      // the switch that was on last was the high-side one

  always @(posedge clk) if (rst_n) begin
    check(hs1 == (c && hist[0]) && ls1 == (!c && !hist[0]), "DT=1 drives");
    check(hs3 == (c && hist[0] && hist[1] && hist[2]) &&
          ls3 == (!c && !hist[0] && !hist[1] && !hist[2]), "DT=3 drives");
    check(!(hs1 && ls1) && !(hs3 && ls3), "both switches on");
    // a hand-over from one switch to the other waits at least DT cycles,
    // exactly DT when c itself stayed put in between
    if ((hs3 && !p_hs3 && !last_hs) || (ls3 && !p_ls3 && last_hs)) begin
      check(off3 >= 3, $sformatf("dead time %0d cycles", off3));
      if (off3 == 3) gaps++;
    end
    if (hs3) last_hs = 1;
    if (ls3) last_hs = 0;
    off3 = (!hs3 && !ls3) ? off3 + 1 : 0;
    p_hs3 = hs3; p_ls3 = ls3;
    for (int k = 7; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = c;
  end

  initial begin
    foreach (hist[k]) hist[k] = 0;
    repeat (3) @(negedge clk);
    #2 rst_n = 1;
    repeat (10) @(negedge clk);
    repeat (5000) begin
      @(negedge clk);
      // pulses and gaps of random length, some shorter than the dead time
      if ($urandom % 6 == 0) c = ~c;
    end
    check(gaps > 100, $sformatf("turn-on events %0d", gaps));
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
