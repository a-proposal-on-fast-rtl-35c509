// Test of the T flip-flop: Q must toggle once for every rising edge of the
// asynchronous input, within three fixed-clock cycles, Q-bar must be its
// inverse, and `clr` must force Q low. Edges come at random times.
`timescale 1ns / 1ps
module tb_t_ff;
  logic clk = 1'b0, rst_n = 1'b1, clr = 1'b0, sig = 1'b0;
  logic q, q_n;
  int checks = 0, failures = 0;

  // Reset asserted by an edge, so the asynchronous reset acts at once.
  initial #1 rst_n = 1'b0;
  bit expect_q = 1'b0;

  t_ff dut (.clk, .rst_n, .clr, .sig, .q, .q_n);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    check(q == 1'b0 && q_n == 1'b1, "after reset");
    for (int i = 0; i < 40; i++) begin
      #($urandom_range(1, 9));
      sig = 1'b1;
      expect_q = ~expect_q;
      repeat (3) @(posedge clk);
      #1;
      check(q == expect_q, $sformatf("edge %0d: q=%0b expected %0b", i, q, expect_q));
      check(q_n == ~q, "q_n is not ~q");
      repeat ($urandom_range(1, 6)) @(posedge clk);
      #($urandom_range(1, 9));
      sig = 1'b0;
      repeat (4) @(posedge clk);
      #1;
      check(q == expect_q, "falling edge changed q");
      if (i == 20) begin
        @(negedge clk) clr = 1'b1;
        @(negedge clk) clr = 1'b0;
        expect_q = 1'b0;
        check(q == 1'b0, "clr did not clear q");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
