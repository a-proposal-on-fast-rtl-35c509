// Gate between a T flip-flop and its up-counter.
//
// The proposal's gate lets the fixed clock through to the counter while the
// T flip-flop's Q is high. In this synchronous implementation the fixed clock
// is the clock of every register, so the gate produces the counter's enable
// `en` (Q, suppressed while `clr` is high) and, from the rising edge of Q-bar,
// a one-cycle `done` strobe that closes the counting period. `done` comes one
// cycle after Q falls.
`timescale 1ns / 1ps
module count_gate (
  input  logic clk,
  input  logic rst_n,
  input  logic clr,
  input  logic q,
  input  logic q_n,
  output logic en,
  output logic done
);
  logic q_n_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   q_n_d <= 1'b1;
    else if (clr) q_n_d <= 1'b1;
    else          q_n_d <= q_n;
  end

  assign en   = q & ~clr;
  assign done = q_n & ~q_n_d & ~clr;
endmodule
