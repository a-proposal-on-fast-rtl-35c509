// Behavioural model (not synthesizable logic): D/A converter of the
// frequency detector.
//
// Turns the code read from the H(N) table into the voltage V_FV that the
// switch Sw applies to the loop-filter capacitor:
//     V_FV = VREF * code / (2**DAC_W - 1)  volts.
// An ideal, unipolar converter. The proposal shows a settling ("charging
// time of V_FV") after each new code; SETTLE_NS models it as a single delay,
// which defaults to zero. Resolution and reference are this design's choice.
`timescale 1ns / 1ps
module dac #(
  parameter int unsigned DAC_W     = ccfd_pkg::DAC_W,
  parameter int unsigned VREF_MV   = ccfd_pkg::VREF_MV,
  parameter real         SETTLE_NS = 0.0
) (
  input  logic [DAC_W-1:0] code,
  output real              v_fv
);
  localparam real FULL = real'((2 ** DAC_W) - 1);

  real v_target;

  assign v_target = real'(VREF_MV) / 1000.0 * real'(code) / FULL;
  assign #(SETTLE_NS) v_fv = v_target;
endmodule
