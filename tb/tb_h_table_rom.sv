// Test of the H(N) table at its default parameters: for every count N the
// entry must be the D/A code of the VCO voltage for the frequency f_x / N,
// worked out here in floating point from the VCO law f = KV * V:
//     code = round((f_x / N) / KV / VREF * 1023), at most 1023.
// The read latency of one clock is checked as well.
`timescale 1ns / 1ps
module tb_h_table_rom;
  localparam real FX = 20.0e6, KV = 50.0e3, VREF = 5.0, FULL = 1023.0;
  logic clk = 1'b0, rst_n = 1'b1, rd = 1'b0;
  logic [9:0] addr = '0, code;
  int checks = 0, failures = 0;

  // Reset asserted by an edge, so the asynchronous reset acts at once.
  initial #1 rst_n = 1'b0;

  h_table_rom dut (.clk, .rst_n, .rd, .addr, .code);

  always #5 clk = ~clk;

  function automatic int expected(input int n);
    real c;
    if (n == 0) return 1023;
    c = (FX / real'(n)) / KV / VREF * FULL;
    if (c > FULL) return 1023;
    return int'($floor(c + 0.5));
  endfunction

  // Exact halves (N = 352 is one) may round either way in floating point.
  function automatic bit tie(input int n);
    real c;
    if (n == 0) return 1'b0;
    c = (FX / real'(n)) / KV / VREF * FULL;
    return (c - $floor(c) - 0.5 < 1.0e-6) && (0.5 - (c - $floor(c)) < 1.0e-6);
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 1024; n++) begin
      @(negedge clk);
      addr = 10'(n);
      rd   = 1'b1;
      @(negedge clk);
      rd   = 1'b0;
      addr = 10'(n + 1);
      checks++;
      if (int'(code) != expected(n) && !(tie(n) && int'(code) == expected(n) + 1)) begin
        failures++;
        $display("FAIL N=%0d: code %0d, expected %0d", n, code, expected(n));
      end
      @(negedge clk);
      checks++;
      if (int'(code) != expected(n) && !(tie(n) && int'(code) == expected(n) + 1)) begin
        failures++;
        $display("FAIL N=%0d: code changed without rd", n);
      end
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
