// Phase detector (PD) driving the charge pump's up and down switches.
//
// A three-state phase-frequency detector evaluated on the fixed clock: a
// rising edge of the input signal sets `up`, a rising edge of the VCO output
// sets `dn`, and when both would be set they cancel, so at most one of them is
// high and its pulse lasts as many fixed-clock cycles as the edges are apart.
// `up` charges the loop filter (output lags), `dn` discharges it (output
// leads). The proposal names the phase detector and shows its two switch
// outputs; the three-state behaviour and its sampling on the fixed clock are
// this implementation's choice, which limits the phase resolution to one
// fixed-clock period. The PD is not cleared by the VCO reset: the input edge
// that triggers the reset must still be paired with the VCO's restart edge,
// which leaves only a short up pulse for the reset latency.
//
// Both inputs go through their own two-stage synchronizer, so `up`/`dn` start
// 3 cycles after the corresponding edge.
`timescale 1ns / 1ps
module phase_detector (
  input  logic clk,
  input  logic rst_n,
  input  logic in_sig,
  input  logic out_sig,
  output logic up,
  output logic dn
);
  logic in_rise, out_rise;
  logic up_nx, dn_nx;

  sync_edge u_sync_in  (.clk, .rst_n, .async_in(in_sig),  .level(),        .rise(in_rise));
  sync_edge u_sync_out (.clk, .rst_n, .async_in(out_sig), .level(),        .rise(out_rise));

  always_comb begin
    up_nx = up | in_rise;
    dn_nx = dn | out_rise;
    if (up_nx && dn_nx) begin
      up_nx = 1'b0;
      dn_nx = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      up <= 1'b0;
      dn <= 1'b0;
    end else begin
      up <= up_nx;
      dn <= dn_nx;
    end
  end

  a_not_both: assert property (@(posedge clk) disable iff (!rst_n) !(up && dn));
endmodule
