// Test of the D/A converter model: V_FV = 5 V * code / 1023 for every code,
// and the optional settling delay.
`timescale 1ns / 1ps
module tb_dac;
  logic [9:0] code = '0;
  real v0, v1;
  int checks = 0, failures = 0;

  dac dut (.code, .v_fv(v0));
  dac #(.SETTLE_NS(100.0)) dut_slow (.code, .v_fv(v1));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    for (int c = 0; c < 1024; c += 7) begin
      real e;
      code = 10'(c);
      #1;
      e = 5.0 * real'(c) / 1023.0;
      check(v0 - e < 1.0e-9 && e - v0 < 1.0e-9, $sformatf("code %0d: %f V, expected %f V", c, v0, e));
      #200;
    end
    code = 10'd1023;
    #200;
    code = 10'd0;
    #50 check(v1 > 4.99, "settling delay: output changed too early");
    #60 check(v1 < 0.01, "settling delay: output did not settle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
