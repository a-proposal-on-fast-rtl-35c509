// Test of the charge pump / loop filter / Sw model at its default values
// (100 uA, 10 kOhm, 4 nF): pumping up for 1 us raises the capacitor by
// I*t/C = 25 mV and lifts Vo' by I*R = 1 V while the current flows; pumping
// down does the reverse; Sw sets the capacitor to V_FV at once; the voltages
// stay within 0..5 V.
`timescale 1ns / 1ps
module tb_charge_pump_filter;
  logic up = 1'b0, dn = 1'b0, sw = 1'b0;
  real v_fv = 0.0, v_ctrl, v_cap;
  int checks = 0, failures = 0;

  charge_pump_filter dut (.up, .dn, .sw, .v_fv, .v_ctrl, .v_cap);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  function automatic bit near(input real a, input real b, input real tol);
    return (a - b < tol) && (b - a < tol);
  endfunction

  initial begin
    real v0;
    #100;
    check(near(v_cap, 0.0, 1e-9) && near(v_ctrl, 0.0, 1e-9), "initial voltage");
    // Preset through Sw.
    v_fv = 3.0;
    sw = 1'b1;
    #20;
    sw = 1'b0;
    check(near(v_cap, 3.0, 1e-9), $sformatf("Sw preset: %f V", v_cap));
    // Up for 1 us.
    v0 = v_cap;
    up = 1'b1;
    #10 check(near(v_ctrl - v_cap, 1.0, 1e-6), "I*R step while pumping up");
    #990 up = 1'b0;
    #20;
    check(near(v_cap - v0, 0.025, 0.0005), $sformatf("up 1 us: +%f V", v_cap - v0));
    check(near(v_ctrl, v_cap, 1e-9), "Vo' = Vc with no current");
    // Down for 2 us.
    v0 = v_cap;
    dn = 1'b1;
    #10 check(near(v_cap - v_ctrl, 1.0, 1e-6), "I*R step while pumping down");
    #1990 dn = 1'b0;
    #20;
    check(near(v0 - v_cap, 0.050, 0.0005), $sformatf("down 2 us: -%f V", v0 - v_cap));
    // Both on: no net current.
    v0 = v_cap;
    up = 1'b1; dn = 1'b1;
    #1000 up = 1'b0; dn = 1'b0;
    #20 check(near(v_cap, v0, 1e-9), "up and dn together changed the voltage");
    // Sw wins over the pump, and the rail clips.
    v_fv = 4.5;
    sw = 1'b1; up = 1'b1;
    #1000;
    check(near(v_cap, 4.5, 1e-9), "capacitor not held at V_FV by Sw");
    check(near(v_ctrl, 5.0, 1e-9), "Vo' not clipped at 5 V");
    sw = 1'b0; up = 1'b0;
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
