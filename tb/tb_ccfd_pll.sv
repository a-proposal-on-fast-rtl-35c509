// End-to-end test of the fast pull-in PLL at its default parameters.
//
// A 20 MHz fixed clock and an input square wave whose frequency is stepped:
// 200 kHz from power-up, then 125 kHz, then 250 kHz and back to 200 kHz. The
// steps are large (25-60 %), the case in which a conventional PLL slips cycles.
// For every step the test measures how many input periods pass from the first
// edge at the new frequency to the VCO reset (the frequency detector's pull-in),
// checks that V_FV equals f_in / KV (computed here from the input frequency,
// not from the design's table) to within the count quantization, and checks
// that from two periods after the reset on, every VCO output edge lies within
// 4 % of a period of an input edge and no further reset occurs (stable lock).
// It also counts each mechanism of the loop and fails if one never happened:
// a decision "frequency differs" (Cs), the capacitor preset through Sw, the
// VCO reset, a decision "same frequency", a "VCO too slow" decision taken
// before the VCO has produced any edge, and up and down pulses of the phase detector.
`timescale 1ns / 1ps
module tb_ccfd_pll;
  localparam real FX_PERIOD_NS = 50.0;   // 20 MHz = ccfd_pkg::FX_HZ
  localparam real KV           = 50.0e3; // Hz/V, = ccfd_pkg::VCO_KV_HZ_PER_V
  localparam int  NSTEP        = 5;

  logic clk = 1'b0, rst_n = 1'b1, in_sig = 1'b0;
  logic out_sig, cs, vco_rst, pd_up, pd_dn, fd_decide, fd_match;
  logic [9:0] fv_code, n_in, n_out;
  real v_ctrl, v_fv, v_cap;

  int checks = 0, failures = 0;

  // Reset asserted by an edge, so the asynchronous reset acts at once.
  initial #1 rst_n = 1'b0;

  ccfd_pll dut (
    .clk, .rst_n, .in_sig, .out_sig, .cs, .vco_rst, .pd_up, .pd_dn, .fv_code,
    .n_in, .n_out, .fd_decide, .fd_match, .v_ctrl, .v_fv, .v_cap
  );

  always #(FX_PERIOD_NS / 2.0) clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t: %s", $time, what);
    end
  endtask

  // Input generator: frequencies of the successive steps.
  real f_step [NSTEP] = '{200.0e3, 100.0e3, 225.0e3, 160.0e3, 200.0e3};
  // 41 + 41 periods put the T flip-flop of the input channel in both phases
  // at the following steps.
  int  periods [NSTEP] = '{41, 41, 40, 41, 40};
  int  edges_before = 0;      // input rising edges before the current step
  // Step 4 starts at a falling edge, inside a period that T-FF1 is counting.
  bit  mid [NSTEP] = '{0, 0, 0, 0, 1};
  real t_change;
  real t_in_period;           // current input period in ns
  real t_last_in_rise;
  int  step = -1;
  real t_step_start;
  bit  running = 1'b0;

  // Per-step observations.
  int  resets_in_step;
  real t_first_reset, t_last_reset;
  int  edges_checked;
  real worst_err;

  // Mechanism counters.
  int n_second = 0;
  int n_cs = 0, n_reset = 0, n_match = 0, n_slow = 0, n_up = 0, n_dn = 0, n_preset = 0;

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);
    for (int s = 0; s < NSTEP; s++) begin
      t_in_period = 1.0e9 / f_step[s];
      step           = s;
      resets_in_step = 0;
      t_first_reset  = -1.0;
      t_last_reset   = -1.0;
      edges_checked  = 0;
      worst_err      = 0.0;
      t_step_start   = mid[s] ? t_change : $realtime;
      running        = 1'b1;
      for (int p = 0; p < periods[s]; p++) begin
        in_sig = 1'b1;
        t_last_in_rise = $realtime;
        #(t_in_period / 2.0);
        in_sig = 1'b0;
        if (p == periods[s] - 1 && s + 1 < NSTEP && mid[s + 1]) begin
          // The next step starts in the middle of this period.
          t_change = $realtime;
          #(0.5e9 / f_step[s + 1]);
        end else begin
          #(t_in_period / 2.0);
        end
      end
      running = 1'b0;
      // Pull-in: the proposal's two input periods (count one, preset the
      // filter during the next, reset at the edge after it) when the step
      // meets the T flip-flop at the start of a counted period, i.e. after an
      // even number of input edges; one more period otherwise, because the
      // period counted across the step is still at the old frequency.
      check(t_first_reset >= 0.0, $sformatf("step %0d: no VCO reset", s));
      if (t_first_reset >= 0.0) begin
        real pull_in, last, want;
        pull_in = (t_first_reset - t_step_start) / t_in_period;
        last    = (t_last_reset - t_step_start) / t_in_period;
        want    = (edges_before % 2 == 0) ? 2.0 : 3.0;
        $display("step %0d: f_in %0.0f Hz, VCO reset after %0.2f input periods, %0d reset(s), last after %0.2f, worst lock phase error %0.2f %% over %0d edges",
                 s, f_step[s], pull_in, resets_in_step, last, 100.0 * worst_err, edges_checked);
        if (!mid[s]) begin
          check(pull_in > want - 0.05 && pull_in < want + 0.1,
                $sformatf("step %0d: pull-in %0.2f periods, expected %0.0f", s, pull_in, want));
          check(resets_in_step == 1, $sformatf("step %0d: %0d VCO resets", s, resets_in_step));
        end else begin
          // A change inside a counted period yields a count of neither
          // frequency: the first preset is wrong, and the next count
          // (one period later) triggers a second, correct one.
          check(resets_in_step == 2, $sformatf("step %0d: %0d VCO resets, expected 2", s, resets_in_step));
          check(last < 4.6, $sformatf("step %0d: last reset after %0.2f periods", s, last));
          if (resets_in_step == 2) n_second++;
        end
      end
      check(edges_checked > periods[s] - 8, $sformatf("step %0d: only %0d locked edges", s, edges_checked));
      edges_before += periods[s];
    end
    check(n_cs >= NSTEP,   "Cs never asserted for every step");
    check(n_preset >= NSTEP, "capacitor preset through Sw did not happen");
    check(n_reset >= NSTEP, "VCO reset did not happen for every step");
    check(n_match > 0,     "no 'same frequency' decision");
    check(n_slow > 0,      "no 'VCO too slow' decision");
    check(n_up > 0,        "no PD up pulse");
    check(n_dn > 0,        "no PD down pulse");
    check(n_second > 0,    "no second reset after a mid-period change");
    $display("mechanisms: cs=%0d preset=%0d vco_reset=%0d match=%0d too_slow=%0d pd_up=%0d pd_dn=%0d second_reset=%0d",
             n_cs, n_preset, n_reset, n_match, n_slow, n_up, n_dn, n_second);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int out_edges = 0;
  always @(posedge out_sig) if (rst_n) out_edges++;

  // VCO resets.
  always @(posedge vco_rst) if (running) begin
    n_reset++;
    resets_in_step++;
    if (t_first_reset < 0.0) t_first_reset = $realtime;
    t_last_reset = $realtime;
  end

  // Lock check at each VCO output rising edge, from two input periods after
  // the latest reset of the step.
  always @(posedge out_sig) if (running && t_last_reset >= 0.0 &&
                                $realtime > t_last_reset + 2.0 * t_in_period) begin
    real e;
    e = $realtime - t_last_in_rise;
    if (e > t_in_period / 2.0) e = e - t_in_period;
    e = e / t_in_period;
    if (e < 0.0) e = -e;
    if (e > worst_err) worst_err = e;
    edges_checked++;
    check(e < 0.04, $sformatf("step %0d: phase error %0.3f of a period", step, e));
  end

  // Decisions, preset of the capacitor, phase detector activity.
  logic cs_d = 1'b0, up_d = 1'b0, dn_d = 1'b0;
  always @(posedge clk) begin
    cs_d <= cs;
    up_d <= pd_up;
    dn_d <= pd_dn;
    if (rst_n) begin
      if (cs && !cs_d) begin
        real expect_v;
        n_cs++;
        // H(N) worked out independently: V = f_x / N / KV.
        expect_v = (1.0e9 / FX_PERIOD_NS) / real'(n_in) / KV;
        if (expect_v > 5.0) expect_v = 5.0;
        check(v_fv - expect_v < 0.006 && expect_v - v_fv < 0.006,
              $sformatf("V_FV %0.4f V for N_in %0d, expected %0.4f V", v_fv, n_in, expect_v));
      end
      if (!cs && cs_d) begin
        n_preset++;
        check(v_cap - v_fv < 0.005 && v_fv - v_cap < 0.005,
              $sformatf("capacitor %0.4f V not preset to V_FV %0.4f V", v_cap, v_fv));
      end
      if (fd_match) n_match++;
      // Cs before the VCO has produced a single edge: the "too slow" rule.
      if (cs && !cs_d && out_edges == 0) n_slow++;
      if (pd_up && !up_d) n_up++;
      if (pd_dn && !dn_d) n_dn++;
    end
  end

  // Watchdog.
  initial begin
    #(60.0e6);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
