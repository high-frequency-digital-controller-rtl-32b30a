// tb_windowed_adc: self-checking testbench of the windowed A/D model.
//
// The sensed voltage is swept across and beyond the window around the
// reference. The expected error is found by counting how many decision
// levels (reference +- (k - 0.5) steps) the voltage lies beyond, which gives
// the nine codes -4..+4 without using the model's formula. Every code must
// appear during the sweep.
`timescale 1ns/1ps
module tb_windowed_adc;
  import sd_pkg::*;

  int checks = 0, failures = 0;
  real v = 0.0;
  logic [7:0] vref = 8'd165;
  err_t e;
  int seen[9];

  windowed_adc dut (.v_sense(v), .v_ref(vref), .e);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int expected(real vs, real center);
    int n = 0;
    for (int k = 1; k <= 4; k++) begin
      if (vs < center - (k - 0.5) * 0.01) n++;
      if (vs > center + (k - 0.5) * 0.01) n--;
    end
    return n;
  endfunction

  initial begin
    foreach (seen[i]) seen[i] = 0;
    for (int r = 0; r < 3; r++) begin
      vref = (r == 0) ? 8'd165 : 8'($urandom % 200 + 20);
      for (int i = -700; i <= 700; i += 3) begin
        v = real'(vref) * 0.01 + real'(i) * 0.0001 + 0.00003;
        #10;
        check(int'(e) == expected(v, real'(vref) * 0.01),
              $sformatf("v=%f ref=%0d e=%0d", v, vref, e));
        seen[int'(e) + 4]++;
      end
    end
    foreach (seen[i]) check(seen[i] > 0, $sformatf("code %0d seen", i - 4));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
