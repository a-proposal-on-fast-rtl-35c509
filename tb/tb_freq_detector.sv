// Test of the clock count frequency detector at its default parameters
// (20 MHz fixed clock, 10-bit counters, tolerance 4) with free-running input
// and output square waves:
//   * N_in and N_out equal f_x / f within one count, and a new N_in comes
//     every second input period (the T flip-flop counts alternate periods);
//   * fv_code is the D/A code of f_in / KV, worked out here in floating point;
//   * equal frequencies give "same frequency" decisions and no Cs; a 25 %
//     slower or faster output, or a stopped one, raises Cs; Cs is held until a
//     VCO reset, which also restarts the output measurement.
`timescale 1ns / 1ps
module tb_freq_detector;
  localparam real FX = 20.0e6, KV = 50.0e3;
  logic clk = 1'b0, rst_n = 1'b1, in_sig = 1'b0, out_sig = 1'b0, vco_rst = 1'b0;
  logic [9:0] fv_code, n_in, n_out;
  logic cs, decide, match;
  int checks = 0, failures = 0;

  // Reset asserted by an edge, so the asynchronous reset acts at once.
  initial #1 rst_n = 1'b0;

  real p_in = 5000.0, p_out = 5000.0;  // periods in ns
  bit  out_on = 1'b1;                  // 0: output stopped
  int  n_in_updates = 0;               // decisions, one per counted input period
  int  in_rises = 0, n_match = 0, n_decide = 0;

  freq_detector dut (.clk, .rst_n, .in_sig, .out_sig, .vco_rst, .fv_code, .cs,
                     .n_in, .n_out, .decide, .match);

  always #25 clk = ~clk;

  always begin
    #(p_in / 2.0) in_sig = 1'b1;
    in_rises++;
    #(p_in / 2.0) in_sig = 1'b0;
  end

  initial begin
    #1234;
    forever begin
      if (out_on) begin
        #(p_out / 2.0) out_sig = 1'b1;
        #(p_out / 2.0) out_sig = 1'b0;
      end else begin
        #100;
      end
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  function automatic int code_of(input int n);
    real c;
    c = (FX / real'(n)) / KV / 5.0 * 1023.0;
    if (c > 1023.0) return 1023;
    return int'($floor(c + 0.5));
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (decide) begin n_decide++; n_in_updates++; end
    if (match) n_match++;
  end

  task automatic settle(input int periods);
    #(p_in * periods);
  endtask

  task automatic near(input int got, input real want, input string what);
    check(real'(got) > want - 1.5 && real'(got) < want + 1.5,
          $sformatf("%s: %0d, expected %0.1f", what, got, want));
  endtask

  task automatic do_reset();
    @(negedge clk) vco_rst = 1'b1;
    @(negedge clk) vco_rst = 1'b0;
    check(!cs, "Cs not released by the VCO reset");
  endtask

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    // Equal frequencies, several values.
    foreach (p_in_list[i]) begin
      int r0, u0;
      p_in = p_in_list[i];
      p_out = p_in_list[i];
      settle(5);
      // The periods that straddled the change may have raised Cs.
      if (cs) do_reset();
      settle(4);
      r0 = in_rises;
      u0 = n_in_updates;
      n_match = 0;
      settle(20);
      near(int'(n_in), p_in / 50.0, "N_in");
      near(int'(n_out), p_out / 50.0, "N_out");
      check(int'(fv_code) == code_of(int'(n_in)),
            $sformatf("fv_code %0d for N_in %0d, expected %0d", fv_code, n_in, code_of(int'(n_in))));
      check((n_in_updates - u0) * 2 >= in_rises - r0 - 2 && (n_in_updates - u0) * 2 <= in_rises - r0 + 2,
            $sformatf("%0d counts in %0d input periods", n_in_updates - u0, in_rises - r0));
      check(!cs && n_match > 5, $sformatf("equal frequencies: cs=%0b matches=%0d", cs, n_match));
    end
    // Output 25 % slower, then 25 % faster.
    p_in = 5000.0;
    p_out = 6250.0;
    settle(6);
    check(cs, "slower output not detected");
    near(int'(n_out), 125.0, "N_out of the slow output");
    n_decide = 0;
    settle(6);
    check(cs && n_decide == 0, "Cs not held, or decisions while held");
    do_reset();
    p_out = 4000.0;
    settle(6);
    check(cs, "faster output not detected");
    do_reset();
    // Stopped output.
    out_on = 1'b0;
    settle(4);
    check(cs, "stopped output not detected");
    out_on = 1'b1;
    p_out = 5000.0;
    do_reset();
    settle(8);
    check(!cs, "Cs after the output recovered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real p_in_list [4] = '{5000.0, 10000.0, 2500.0, 40000.0};

  initial begin
    #20000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
