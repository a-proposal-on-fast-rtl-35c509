// Fast pull-in PLL with a clock count type frequency detector.
//
// A charge-pump PLL (phase detector, current sources, R-C loop filter, VCO)
// that does not pull in by slow loop action. A frequency detector counts the
// fixed clock f_x over one period of the input (N_in cycles) and of the VCO
// output. N_in addresses a table of VCO input voltages H(N) = VCO^-1(f_x/N);
// the D/A converter turns the entry into V_FV. When the two counts differ, the
// control signal Cs closes the switch Sw, which charges the loop-filter
// capacitor to V_FV (the VCO is now at the input frequency), and arms the
// reset pulse generator, which restarts the VCO at the next rising input edge
// (the VCO is now in phase as well). From then on the phase detector keeps the
// loop locked. Pull-in takes about two input periods: one to count, one to
// charge; which period is counted depends on the T flip-flop's phase, so up to
// one more may pass.
//
// The digital part (frequency detector, table, comparison, phase detector,
// reset pulse generator) is synthesizable and runs on the fixed clock `clk`,
// whose frequency must equal FX_HZ. The D/A converter, charge pump with loop
// filter and switch, and the VCO are behavioural models of analog parts.
//
// Ports: `in_sig` is the input signal, `out_sig` the VCO output; the other
// outputs expose the loop's internal signals for observation.
`timescale 1ns / 1ps
module ccfd_pll #(
  parameter int unsigned FX_HZ           = ccfd_pkg::FX_HZ,
  parameter int unsigned CNT1_W          = ccfd_pkg::CNT_W,
  parameter int unsigned CNT2_W          = ccfd_pkg::CNT_W,
  parameter int unsigned DAC_W           = ccfd_pkg::DAC_W,
  parameter int unsigned VREF_MV         = ccfd_pkg::VREF_MV,
  parameter int unsigned VCO_F0_HZ       = ccfd_pkg::VCO_F0_HZ,
  parameter int unsigned VCO_KV_HZ_PER_V = ccfd_pkg::VCO_KV_HZ_PER_V,
  parameter int unsigned DIFF_TOL        = ccfd_pkg::DIFF_TOL,
  parameter int unsigned RST_CYCLES      = ccfd_pkg::RST_CYCLES
) (
  input  logic              clk,       // fixed clock f_x
  input  logic              rst_n,
  input  logic              in_sig,    // input signal
  output logic              out_sig,   // output signal (VCO output)
  output logic              cs,        // Cs: frequency difference found
  output logic              vco_rst,   // reset pulse to the VCO
  output logic              pd_up,     // charge pump up switch
  output logic              pd_dn,     // charge pump down switch
  output logic [DAC_W-1:0]  fv_code,   // D/A code of V_FV
  output logic [CNT1_W-1:0] n_in,      // input period in fixed-clock cycles
  output logic [CNT2_W-1:0] n_out,     // output period in fixed-clock cycles
  output logic              fd_decide, // frequency decision taken
  output logic              fd_match,  // decision found no difference
  output real               v_ctrl,    // Vo', VCO input voltage
  output real               v_fv,      // D/A converter output
  output real               v_cap      // loop-filter capacitor voltage
);
  freq_detector #(
    .CNT1_W(CNT1_W), .CNT2_W(CNT2_W), .DAC_W(DAC_W), .FX_HZ(FX_HZ),
    .VREF_MV(VREF_MV), .VCO_F0_HZ(VCO_F0_HZ),
    .VCO_KV_HZ_PER_V(VCO_KV_HZ_PER_V), .DIFF_TOL(DIFF_TOL)
  ) u_fd (
    .clk, .rst_n, .in_sig, .out_sig, .vco_rst, .fv_code, .cs, .n_in, .n_out,
    .decide(fd_decide), .match(fd_match)
  );

  phase_detector u_pd (
    .clk, .rst_n, .in_sig, .out_sig, .up(pd_up), .dn(pd_dn)
  );

  reset_pulse_gen #(.RST_CYCLES(RST_CYCLES)) u_rpg (
    .clk, .rst_n, .cs, .in_sig, .vco_rst
  );

  dac #(.DAC_W(DAC_W), .VREF_MV(VREF_MV)) u_dac (.code(fv_code), .v_fv);

  charge_pump_filter u_lf (
    .up(pd_up), .dn(pd_dn), .sw(cs), .v_fv, .v_ctrl, .v_cap
  );

  vco #(
    .F0_HZ(real'(VCO_F0_HZ)), .KV_HZ_PER_V(real'(VCO_KV_HZ_PER_V))
  ) u_vco (.v_ctrl, .rst(vco_rst), .out(out_sig));
endmodule
