// Behavioural model (not synthesizable logic): charge pump, loop filter and
// switch Sw.
//
// Two current sources of ICP_A, switched by the phase detector's `up` and
// `dn`, feed a series R-C loop filter. The control voltage Vo' at the top of
// the resistor drives the VCO:
//     Vo' = Vc + R * i,   dVc/dt = i / C,   i = ICP * (up - dn).
// While the frequency detector's Cs closes the switch Sw, the capacitor is
// connected to the D/A converter output and is taken to V_FV at once, which is
// how the loop is preset to the input frequency. This is the circuit of the
// proposal's block diagram; all component values are this design's choice
// (ICP = 100 uA, R = 10 kOhm, C = 4 nF, supply 0..5 V, for a natural frequency
// near 5.6 kHz with damping about 0.7 at the default VCO gain of 50 kHz/V).
//
// The capacitor voltage is integrated in steps of TSTEP_NS nanoseconds.
`timescale 1ns / 1ps
module charge_pump_filter #(
  parameter real ICP_A    = 100.0e-6,
  parameter real R_OHM    = 10.0e3,
  parameter real C_F      = 4.0e-9,
  parameter real VDD      = 5.0,
  parameter real VC_INIT  = 0.0,
  parameter real TSTEP_NS = 5.0
) (
  input  logic up,      // charge: pump ICP into the filter
  input  logic dn,      // discharge: pump ICP out of the filter
  input  logic sw,      // Cs: connect the capacitor to V_FV
  input  real  v_fv,    // D/A converter output
  output real  v_ctrl,  // Vo', the VCO input
  output real  v_cap    // capacitor voltage
);
  real vc;
  real i_cp;

  function automatic real clip(input real v);
    if (v < 0.0) return 0.0;
    if (v > VDD) return VDD;
    return v;
  endfunction

  assign i_cp = (up ? ICP_A : 0.0) - (dn ? ICP_A : 0.0);

  initial begin
    vc = VC_INIT;
    forever begin
      #(TSTEP_NS);
      if (sw) vc = clip(v_fv);
      else    vc = clip(vc + i_cp * TSTEP_NS * 1.0e-9 / C_F);
    end
  end

  assign v_ctrl = clip(vc + R_OHM * i_cp);
  assign v_cap  = vc;
endmodule
