// Comparison circuit of the frequency detector.
//
// Latches the fixed-clock count of each completed input period (Up-C1) and
// output period (Up-C2) and decides, for each counted input period, whether
// the two frequencies differ. If they do, it raises the control signal `cs`,
// which closes the switch Sw (the loop-filter capacitor is charged to the D/A
// voltage) and arms the reset pulse generator. `cs` stays high until the VCO
// reset (`vco_rst`) has been issued, and no decision is taken meanwhile.
//
// Decision rule (the proposal only says a difference is detected; the rule
// is this implementation's choice):
//   * the input count N_in is compared with the latest output count N_out;
//     they differ when |N_in - N_out| > TOL, which absorbs the +/-1 count
//     quantization of two unrelated edges and the shortening of the first
//     output period after a reset by the phase detector;
//   * N_out counts only when it was completed after the last VCO reset
//     (`valid`): the output period that spans a reset says nothing about the
//     VCO's frequency. Without a valid N_out the decision is held `pending`
//     until Up-C2 delivers one (right after a reset both channels start on
//     the same edge, and the output count arrives a few cycles later);
//   * while waiting, a VCO that has had no rising edge for more than
//     N_in + TOL cycles (`gap`, counted from the T-FF2 toggles) certainly has
//     a longer period, so that is a difference too; this catches a stopped
//     VCO.
//
// Timing: `cs`, `decide` and `match` change in the clock after `in_stb`, or
// after the `out_stb` that completes a pending decision.
`timescale 1ns / 1ps
module comparison_circuit #(
  parameter int unsigned W1  = ccfd_pkg::CNT_W,
  parameter int unsigned W2  = ccfd_pkg::CNT_W,
  parameter int unsigned TOL = ccfd_pkg::DIFF_TOL
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_stb,    // Up-C1 finished an input period
  input  logic [W1-1:0] n_in,      // its count N_in
  input  logic          out_stb,   // Up-C2 finished an output period
  input  logic [W2-1:0] n_out,     // its count N_out
  input  logic          out_q,     // T-FF2 output: toggles on each output edge
  input  logic          vco_rst,   // reset pulse to the VCO
  output logic          cs,        // frequency difference: close Sw, arm RPG
  output logic          decide,    // one-cycle pulse: a decision was taken
  output logic          match      // one-cycle pulse: decided "same frequency"
);
  localparam int unsigned WM = (W1 > W2) ? W1 : W2;

  logic [W1-1:0] n_in_q;    // input count of a pending decision
  logic [W2-1:0] n_out_q;   // latest output count
  logic          valid;     // n_out_q completed since the last VCO reset
  logic          pending;   // an input count waits for an output count
  logic          out_q_d;
  logic [WM:0]   a, b, diff, gap, limit;
  logic          active, eff_valid, differ, too_slow;

  always_comb begin
    active    = (in_stb | pending) & ~cs;
    eff_valid = out_stb | valid;
    a         = in_stb ? (WM + 1)'(n_in) : (WM + 1)'(n_in_q);
    b         = out_stb ? (WM + 1)'(n_out) : (WM + 1)'(n_out_q);
    diff      = (a > b) ? a - b : b - a;
    differ    = diff > (WM + 1)'(TOL);
    limit     = a + (WM + 1)'(TOL);
    too_slow  = gap > limit;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_in_q  <= '0;
      n_out_q <= '0;
      valid   <= 1'b0;
      pending <= 1'b0;
      out_q_d <= 1'b0;
      gap     <= '0;
      cs      <= 1'b0;
      decide  <= 1'b0;
      match   <= 1'b0;
    end else begin
      decide  <= 1'b0;
      match   <= 1'b0;
      out_q_d <= out_q;
      // Cycles since the last output rising edge, saturating.
      if (vco_rst || out_q != out_q_d) gap <= '0;
      else if (!(&gap))                gap <= gap + 1'b1;
      if (vco_rst) begin
        valid   <= 1'b0;
        pending <= 1'b0;
        cs      <= 1'b0;
      end else begin
        if (out_stb) begin
          n_out_q <= n_out;
          valid   <= 1'b1;
        end
        if (in_stb) n_in_q <= n_in;
        if (active) begin
          if (eff_valid) begin
            pending <= 1'b0;
            decide  <= 1'b1;
            cs      <= differ;
            match   <= ~differ;
          end else if (too_slow) begin
            pending <= 1'b0;
            decide  <= 1'b1;
            cs      <= 1'b1;
          end else begin
            pending <= 1'b1;
          end
        end
      end
    end
  end

  // Cs is only released by the VCO reset it asked for.
  a_cs_held: assert property (@(posedge clk) disable iff (!rst_n)
    (cs && !vco_rst) |=> cs);
  // No decision is left pending while Cs is high.
  a_no_pending_with_cs: assert property (@(posedge clk) disable iff (!rst_n)
    !(cs && pending));
endmodule
