// Clock count type frequency detector (FD).
//
// Two identical channels count the fixed clock over one period of a signal:
// T-FF1 -> gate -> Up-C1 on the PLL input, T-FF2 -> gate -> Up-C2 on the VCO
// output. Because each T flip-flop toggles on every rising edge, a channel
// measures every second period. Each input count N_in addresses the table
// H(N) held in the D/A converter's memory, whose code `fv_code` the external
// D/A converter turns into V_FV, the VCO input voltage for the measured input
// frequency. Both counts go to the comparison circuit, which raises `cs` on a
// frequency difference. This follows the proposal's block diagram; the
// external D/A converter is the analog half of its "D/A converter", and the
// `vco_rst` input that restarts the output channel is this design's addition.
//
// Timing (fixed clock cycles): an input rising edge reaches the T flip-flop
// after 2-3 cycles; the count of the period it closes is in `n_in` 2 cycles
// later, and `fv_code` and `cs` follow one cycle after that.
`timescale 1ns / 1ps
module freq_detector #(
  parameter int unsigned CNT1_W          = ccfd_pkg::CNT_W,  // m1
  parameter int unsigned CNT2_W          = ccfd_pkg::CNT_W,  // m2
  parameter int unsigned DAC_W           = ccfd_pkg::DAC_W,
  parameter int unsigned FX_HZ           = ccfd_pkg::FX_HZ,
  parameter int unsigned VREF_MV         = ccfd_pkg::VREF_MV,
  parameter int unsigned VCO_F0_HZ       = ccfd_pkg::VCO_F0_HZ,
  parameter int unsigned VCO_KV_HZ_PER_V = ccfd_pkg::VCO_KV_HZ_PER_V,
  parameter int unsigned DIFF_TOL        = ccfd_pkg::DIFF_TOL
) (
  input  logic              clk,       // fixed clock f_x
  input  logic              rst_n,
  input  logic              in_sig,    // PLL input signal (asynchronous)
  input  logic              out_sig,   // VCO output signal (asynchronous)
  input  logic              vco_rst,   // VCO reset from the RPG
  output logic [DAC_W-1:0]  fv_code,   // D/A code of V_FV
  output logic              cs,        // control signal Cs
  output logic [CNT1_W-1:0] n_in,      // last input period count
  output logic [CNT2_W-1:0] n_out,     // last output period count
  output logic              decide,    // a frequency decision was taken
  output logic              match      // it found no difference
);
  logic q1, q1_n, en1, done1, stb1;
  logic q2, q2_n, en2, done2, stb2;

  // Input channel.
  t_ff u_tff1 (.clk, .rst_n, .clr(1'b0), .sig(in_sig), .q(q1), .q_n(q1_n));
  count_gate u_gate1 (.clk, .rst_n, .clr(1'b0), .q(q1), .q_n(q1_n),
                      .en(en1), .done(done1));
  up_counter #(.W(CNT1_W)) u_upc1 (.clk, .rst_n, .clr(1'b0), .en(en1),
                                   .done(done1), .count(), .result(n_in),
                                   .result_stb(stb1));

  // Output channel, restarted by every VCO reset.
  t_ff u_tff2 (.clk, .rst_n, .clr(vco_rst), .sig(out_sig), .q(q2), .q_n(q2_n));
  count_gate u_gate2 (.clk, .rst_n, .clr(vco_rst), .q(q2), .q_n(q2_n),
                      .en(en2), .done(done2));
  up_counter #(.W(CNT2_W)) u_upc2 (.clk, .rst_n, .clr(vco_rst), .en(en2),
                                   .done(done2), .count(), .result(n_out),
                                   .result_stb(stb2));

  // Memory of the D/A converter: H(N_in).
  h_table_rom #(
    .CNT_W(CNT1_W), .DAC_W(DAC_W), .FX_HZ(FX_HZ), .VREF_MV(VREF_MV),
    .VCO_F0_HZ(VCO_F0_HZ), .VCO_KV_HZ_PER_V(VCO_KV_HZ_PER_V)
  ) u_table (.clk, .rst_n, .rd(stb1), .addr(n_in), .code(fv_code));

  comparison_circuit #(.W1(CNT1_W), .W2(CNT2_W), .TOL(DIFF_TOL)) u_cmp (
    .clk, .rst_n, .in_stb(stb1), .n_in, .out_stb(stb2), .n_out,
    .out_q(q2), .vco_rst, .cs, .decide, .match
  );
endmodule
