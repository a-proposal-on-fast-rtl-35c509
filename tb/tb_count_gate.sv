// Test of the counting gate: `en` must follow Q, `done` must pulse for exactly
// one cycle, one cycle after Q falls, and `clr` must suppress both.
`timescale 1ns / 1ps
module tb_count_gate;
  logic clk = 1'b0, rst_n = 1'b1, clr = 1'b0, q = 1'b0;
  logic en, done;
  int checks = 0, failures = 0;

  // Reset asserted by an edge, so the asynchronous reset acts at once.
  initial #1 rst_n = 1'b0;
  int done_count = 0;

  count_gate dut (.clk, .rst_n, .clr, .q, .q_n(~q), .en, .done);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  always @(posedge clk) if (rst_n && done) done_count++;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 20; i++) begin
      int hi, lo;
      hi = $urandom_range(1, 12);
      lo = $urandom_range(2, 12);
      @(negedge clk) q = 1'b1;
      for (int k = 0; k < hi; k++) begin
        #1 check(en == 1'b1 && done == 1'b0, "en low or done while Q high");
        @(negedge clk);
      end
      q = 1'b0;
      #1 check(en == 1'b0, "en high after Q fell");
      check(done == 1'b1, $sformatf("period %0d: no done in the cycle after Q fell", i));
      @(negedge clk);
      for (int k = 1; k < lo; k++) begin
        #1 check(done == 1'b0, "done longer than one cycle");
        @(negedge clk);
      end
    end
    check(done_count == 20, $sformatf("%0d done pulses for 20 periods", done_count));
    // clr while counting: no enable, and no done when Q is then dropped.
    @(negedge clk) q = 1'b1;
    @(negedge clk) clr = 1'b1;
    #1 check(en == 1'b0, "en not suppressed by clr");
    q = 1'b0;
    @(negedge clk) clr = 1'b0;
    repeat (3) @(negedge clk);
    check(done_count == 20, "done after a cleared period");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
