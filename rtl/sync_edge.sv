// Two-stage synchronizer with rising-edge detector.
//
// Brings an asynchronous square wave (the PLL input or the VCO output) into the
// fixed-clock domain. `level` is the synchronized signal, `rise` is a one-cycle
// pulse in the cycle after `level` goes from 0 to 1. Latency from the
// asynchronous edge to `rise` is two to three fixed-clock cycles.
`timescale 1ns / 1ps
module sync_edge (
  input  logic clk,
  input  logic rst_n,
  input  logic async_in,
  output logic level,
  output logic rise
);
  logic meta, lvl_q, lvl_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta  <= 1'b0;
      lvl_q <= 1'b0;
      lvl_d <= 1'b0;
    end else begin
      meta  <= async_in;
      lvl_q <= meta;
      lvl_d <= lvl_q;
    end
  end

  assign level = lvl_q;
  assign rise  = lvl_q & ~lvl_d;
endmodule
