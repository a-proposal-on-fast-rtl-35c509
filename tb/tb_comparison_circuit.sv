// Test of the comparison circuit at its default parameters (10-bit counts,
// tolerance 4): equal and near-equal counts give a "same frequency" decision,
// larger differences raise Cs, Cs is held until the VCO reset and no new
// decision is taken meanwhile, the reset discards the output count, a VCO
// with no output edge for more than N_in + 4 cycles is "too slow", and an
// input count with no valid output count waits for the next output count.
`timescale 1ns / 1ps
module tb_comparison_circuit;
  logic clk = 1'b0, rst_n = 1'b1;
  logic in_stb = 1'b0, out_stb = 1'b0, out_q = 1'b0, vco_rst = 1'b0;
  logic [9:0] n_in = '0, n_out = '0;
  logic cs, decide, match;
  int checks = 0, failures = 0;

  // Reset asserted by an edge, so the asynchronous reset acts at once.
  initial #1 rst_n = 1'b0;

  comparison_circuit dut (.clk, .rst_n, .in_stb, .n_in, .out_stb, .n_out,
                          .out_q, .vco_rst, .cs, .decide, .match);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  task automatic out_count(input int n);
    @(negedge clk) n_out = 10'(n); out_stb = 1'b1; out_q = ~out_q;
    @(negedge clk) out_stb = 1'b0;
  endtask

  // Input count; returns what was decided in the following cycle.
  task automatic in_count(input int n, output bit d, output bit m, output bit c);
    @(negedge clk) n_in = 10'(n); in_stb = 1'b1;
    @(negedge clk) in_stb = 1'b0;
    d = decide; m = match; c = cs;
  endtask

  task automatic pulse_reset();
    @(negedge clk) vco_rst = 1'b1;
    @(negedge clk) vco_rst = 1'b0;
  endtask

  bit d, m, c;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // Differences within and just beyond the tolerance, both signs.
    for (int delta = -6; delta <= 6; delta++) begin
      out_count(300 + delta);
      in_count(300, d, m, c);
      check(d, $sformatf("delta %0d: no decision", delta));
      if (delta >= -4 && delta <= 4)
        check(m && !c, $sformatf("delta %0d: should match", delta));
      else
        check(!m && c, $sformatf("delta %0d: should raise Cs", delta));
      if (c) begin
        // Held, and no further decision while held.
        in_count(300 + delta, d, m, c);
        check(c && !d, "Cs not held or new decision while Cs is high");
        pulse_reset();
        check(!cs, "Cs not released by the VCO reset");
      end
    end
    // After a reset the old output count is discarded: with the VCO running
    // (edges every 20 cycles) and no completed count there is no decision.
    out_count(500);
    pulse_reset();
    fork
      repeat (12) begin repeat (10) @(negedge clk); out_q = ~out_q; end
      begin repeat (30) @(negedge clk); in_count(100, d, m, c); end
    join
    check(!d && !c, "decision taken on a discarded output count");
    // The pending decision is completed by the next output count.
    @(negedge clk) n_out = 10'd103; out_stb = 1'b1; out_q = ~out_q;
    @(negedge clk) out_stb = 1'b0;
    check(decide && match && !cs, "pending decision not completed by the output count");
    repeat (3) @(negedge clk);
    check(!decide, "pending decision taken twice");
    // Simultaneous strobes: the new output count is used.
    fork
      begin @(negedge clk) n_out = 10'd200; out_stb = 1'b1; out_q = ~out_q; end
      begin @(negedge clk) n_in = 10'd200; in_stb = 1'b1; end
    join
    @(negedge clk) out_stb = 1'b0; in_stb = 1'b0;
    check(decide && match && !cs, "simultaneous strobes not compared with the new count");
    // Stopped VCO: no output edge for N_in + 5 cycles.
    pulse_reset();
    repeat (60) @(negedge clk);
    in_count(50, d, m, c);
    check(d && c, "stopped VCO not detected");
    pulse_reset();
    // Slow but not yet beyond N_in + 4: no decision.
    repeat (40) @(negedge clk);
    in_count(50, d, m, c);
    check(!d && !c, "decision on a gap shorter than N_in + 4");
    // Still no edge: the pending decision becomes "too slow" once the gap
    // passes N_in + 4 = 54 cycles.
    repeat (10) @(negedge clk);
    check(!cs, "too slow declared early");
    repeat (6) @(negedge clk);
    check(cs, "pending decision did not detect the slow VCO");
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
