// T flip-flop of the frequency detector (T-FF1 on the input signal, T-FF2 on
// the VCO output).
//
// Q toggles on every rising edge of `sig`, so Q is high for exactly one full
// period of `sig` and low for the next one; the gate counts the fixed clock
// while Q is high. As in the proposal the flip-flop toggles on the signal's
// rising edge. In this implementation the edge is first synchronized to the
// fixed clock (two to three cycles of latency) so that Q is a fixed-clock
// signal, and a synchronous `clr` forces Q low; the PLL uses it to restart the
// output-period measurement when the VCO is reset.
`timescale 1ns / 1ps
module t_ff (
  input  logic clk,
  input  logic rst_n,
  input  logic clr,
  input  logic sig,
  output logic q,
  output logic q_n
);
  logic sig_rise;

  sync_edge u_sync (
    .clk     (clk),
    .rst_n   (rst_n),
    .async_in(sig),
    .level   (),
    .rise    (sig_rise)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        q <= 1'b0;
    else if (clr)      q <= 1'b0;
    else if (sig_rise) q <= ~q;
  end

  assign q_n = ~q;
endmodule
