// Test of the phase detector: for an input edge leading the VCO edge by D
// fixed-clock cycles, `up` must be high for D cycles (+/-1 for the
// synchronizers) and `dn` not at all; for a lagging input the roles swap;
// coincident edges give no pulse; `up` and `dn` are never high together.
`timescale 1ns / 1ps
module tb_phase_detector;
  logic clk = 1'b0, rst_n = 1'b1, in_sig = 1'b0, out_sig = 1'b0;
  logic up, dn;
  int checks = 0, failures = 0;

  // Reset asserted by an edge, so the asynchronous reset acts at once.
  initial #1 rst_n = 1'b0;
  int up_cycles, dn_cycles;
  bit both_seen = 1'b0;

  phase_detector dut (.clk, .rst_n, .in_sig, .out_sig, .up, .dn);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (up) up_cycles++;
    if (dn) dn_cycles++;
    if (up && dn) both_seen = 1'b1;
  end

  // One period: the edge of `first` comes D cycles before that of the other.
  task automatic one_period(input int d, input bit in_first);
    up_cycles = 0;
    dn_cycles = 0;
    #3;
    if (in_first) in_sig = 1'b1; else out_sig = 1'b1;
    #(10 * d);
    if (in_first) out_sig = 1'b1; else in_sig = 1'b1;
    #150;
    in_sig = 1'b0;
    out_sig = 1'b0;
    #150;
    @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    for (int i = 0; i < 30; i++) begin
      int d;
      bit lead;
      d = $urandom_range(0, 12);
      lead = 1'(i % 2);
      one_period(d, lead);
      if (lead) begin
        check(up_cycles >= d - 1 && up_cycles <= d + 1 && dn_cycles == 0,
              $sformatf("input leads by %0d: up %0d dn %0d cycles", d, up_cycles, dn_cycles));
      end else begin
        check(dn_cycles >= d - 1 && dn_cycles <= d + 1 && up_cycles == 0,
              $sformatf("output leads by %0d: up %0d dn %0d cycles", d, up_cycles, dn_cycles));
      end
    end
    check(!both_seen, "up and dn high together");
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
