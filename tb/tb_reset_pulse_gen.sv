// Test of the reset pulse generator: input edges without Cs give no pulse;
// after Cs the next input rising edge gives exactly one pulse, 2 to 4 cycles
// after the edge and RST_CYCLES cycles wide (checked for the default of 1 and
// for 3 on a second instance).
`timescale 1ns / 1ps
module tb_reset_pulse_gen;
  logic clk = 1'b0, rst_n = 1'b1, cs = 1'b0, in_sig = 1'b0;
  logic rst1, rst3;
  int checks = 0, failures = 0;

  // Reset asserted by an edge, so the asynchronous reset acts at once.
  initial #1 rst_n = 1'b0;
  int n1 = 0, n3 = 0, w1 = 0, w3 = 0;
  int first1 = -1, cyc = 0;

  reset_pulse_gen dut1 (.clk, .rst_n, .cs, .in_sig, .vco_rst(rst1));
  reset_pulse_gen #(.RST_CYCLES(3)) dut3 (.clk, .rst_n, .cs, .in_sig, .vco_rst(rst3));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  logic r1_d = 1'b0, r3_d = 1'b0;
  always @(posedge clk) begin
    cyc++;
    r1_d <= rst1;
    r3_d <= rst3;
    if (rst_n) begin
      if (rst1) w1++;
      if (rst3) w3++;
      if (rst1 && !r1_d) begin n1++; if (first1 < 0) first1 = cyc; end
      if (rst3 && !r3_d) n3++;
    end
  end

  task automatic in_edge();
    #2 in_sig = 1'b1;
    repeat (20) @(negedge clk);
    in_sig = 1'b0;
    repeat (20) @(negedge clk);
  endtask

  initial begin
    int edge_cyc;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) in_edge();
    check(n1 == 0 && n3 == 0, "pulse without Cs");
    for (int i = 0; i < 5; i++) begin
      @(negedge clk) cs = 1'b1;
      repeat (5) @(negedge clk);
      check(n1 == i && n3 == i, "pulse before the input edge");
      first1 = -1;
      w1 = 0;
      w3 = 0;
      edge_cyc = cyc;
      fork
        in_edge();
        begin @(posedge rst1); @(negedge clk) cs = 1'b0; end
      join
      check(n1 == i + 1 && n3 == i + 1, $sformatf("round %0d: %0d/%0d pulses", i, n1, n3));
      check(first1 - edge_cyc >= 2 && first1 - edge_cyc <= 4,
            $sformatf("pulse %0d cycles after the edge", first1 - edge_cyc));
      check(w1 == 1 && w3 == 3, $sformatf("widths %0d and %0d", w1, w3));
      in_edge();
      check(n1 == i + 1, "second pulse for one Cs");
    end
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
