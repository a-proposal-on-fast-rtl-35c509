// Behavioural model (not synthesizable logic): voltage controlled oscillator
// with phase reset.
//
// Linear characteristic f = F0_HZ + KV_HZ_PER_V * Vo' (never below zero),
// which the H(N) table inverts. The phase advances in steps of TSTEP_NS
// nanoseconds; the output is high in the first half of each cycle. While
// `rst` is high the phase is held at the start of a cycle, so the output goes
// high at the reset and a new cycle starts when `rst` falls: the reset aligns
// the output's rising edge with the input edge that triggered it. The reset
// input is the proposal's; the linear law and its numbers are this design's.
// A reset is seen within one step.
`timescale 1ns / 1ps
module vco #(
  parameter real F0_HZ       = real'(ccfd_pkg::VCO_F0_HZ),
  parameter real KV_HZ_PER_V = real'(ccfd_pkg::VCO_KV_HZ_PER_V),
  parameter real TSTEP_NS    = 5.0
) (
  input  real  v_ctrl,
  input  logic rst,
  output logic out
);
  real phase;  // in cycles, 0 <= phase < 1
  real f_hz;

  assign f_hz = (F0_HZ + KV_HZ_PER_V * v_ctrl > 0.0) ? F0_HZ + KV_HZ_PER_V * v_ctrl : 0.0;

  initial begin
    phase = 0.5;
    out   = 1'b0;
    forever begin
      #(TSTEP_NS);
      if (rst) begin
        phase = 0.0;
      end else begin
        phase = phase + f_hz * TSTEP_NS * 1.0e-9;
        while (phase >= 1.0) phase = phase - 1.0;
      end
      out = (phase < 0.5);
    end
  end
endmodule
