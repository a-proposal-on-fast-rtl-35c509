// Test of the period up-counter at its default width (10 bits): random
// counting periods must be reported exactly on `result` with a one-cycle
// `result_stb`, a period longer than 1023 cycles must read 1023, and `clr`
// must discard the running count.
`timescale 1ns / 1ps
module tb_up_counter;
  localparam int W = 10;
  logic clk = 1'b0, rst_n = 1'b1, clr = 1'b0, en = 1'b0, done = 1'b0;
  logic [W-1:0] count, result;
  logic result_stb;
  int checks = 0, failures = 0;

  // Reset asserted by an edge, so the asynchronous reset acts at once.
  initial #1 rst_n = 1'b0;

  up_counter dut (.clk, .rst_n, .clr, .en, .done, .count, .result, .result_stb);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  task automatic period(input int n, input int expect_n);
    @(negedge clk) en = 1'b1;
    repeat (n) @(negedge clk);
    en = 1'b0;
    done = 1'b1;
    @(negedge clk) done = 1'b0;
    check(result_stb == 1'b1, "no result strobe");
    check(int'(result) == expect_n, $sformatf("count %0d, expected %0d", result, expect_n));
    check(count == '0, "counter not restarted");
    @(negedge clk);
    check(result_stb == 1'b0, "result strobe longer than one cycle");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 30; i++) begin
      int n;
      n = $urandom_range(1, 1000);
      period(n, n);
    end
    period(1023, 1023);
    period(1500, 1023);  // saturates
    // clr discards the running count.
    @(negedge clk) en = 1'b1;
    repeat (50) @(negedge clk);
    en  = 1'b0;
    clr = 1'b1;
    @(negedge clk) clr = 1'b0;
    check(count == '0, "clr did not clear the count");
    period(7, 7);
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
