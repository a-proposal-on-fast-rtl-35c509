// Test of the VCO model at its default gain (50 kHz/V): the period at several
// control voltages must be 1 / (KV * V) within two 5 ns steps, the duty cycle
// one half, and a reset must hold the output high and start a full new period
// when released.
`timescale 1ns / 1ps
module tb_vco;
  real v_ctrl = 4.0;
  logic rst = 1'b0, out;
  int checks = 0, failures = 0;
  real t_rise, t_prev;

  vco dut (.v_ctrl, .rst, .out);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    real volts [4] = '{4.0, 2.0, 1.0, 4.5};
    foreach (volts[i]) begin
      real p, t_fall;
      v_ctrl = volts[i];
      p = 1.0e9 / (50.0e3 * volts[i]);
      @(posedge out);
      @(posedge out);
      t_prev = $realtime;
      @(negedge out);
      t_fall = $realtime;
      @(posedge out);
      t_rise = $realtime;
      check(t_rise - t_prev > p - 10.0 && t_rise - t_prev < p + 10.0,
            $sformatf("%0.1f V: period %0.1f ns, expected %0.1f ns", volts[i], t_rise - t_prev, p));
      check(t_fall - t_prev > p / 2.0 - 10.0 && t_fall - t_prev < p / 2.0 + 10.0, "duty cycle");
    end
    // Reset in the middle of the low half.
    v_ctrl = 4.0;
    @(negedge out);
    #1000;
    rst = 1'b1;
    #10 check(out == 1'b1, "output not high during reset");
    #200;
    check(out == 1'b1, "output left high during reset");
    rst = 1'b0;
    t_prev = $realtime;
    @(negedge out);
    check($realtime - t_prev > 2490.0 && $realtime - t_prev < 2510.0, "first half period after reset");
    @(posedge out);
    check($realtime - t_prev > 4990.0 && $realtime - t_prev < 5010.0, "first period after reset");
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
