# Fast pull-in PLL with a clock count type frequency detector

A phase-locked loop normally pulls in slowly: the phase detector has to pump
the loop-filter capacitor, charge by charge, up to the voltage at which the VCO
runs at the input frequency, and a large initial frequency error makes the
phase error wrap round (cycle slips), which stretches the pull-in further.

This design skips that phase. A digital frequency detector counts a fixed
reference clock `f_x` over one period of the input. The count `N_in` says what
the input frequency is (`f_in ≈ f_x / N_in`), and a table holds, for every
possible count, the VCO control voltage that produces that frequency,
`H(N) = VCO⁻¹(f_x / N)`. A D/A converter turns the table entry into a voltage
`V_FV`, a switch `Sw` connects the loop-filter capacitor to it (the frequency is
now right), and at the next rising edge of the input the VCO is reset so that
it starts its cycle together with the input (the phase is now right as well).
After that an ordinary charge-pump loop keeps the lock. Pull-in takes two input
periods: one to count, one to set the capacitor.

The RTL implements the PLL proposed in *A Proposal on Fast Pull-in PLL with
Clock Count Type Frequency Detector* ("the proposal" below). The structure and
the pull-in sequence are the proposal's; the numbers, the digital timing, the
decision rule and the phase detector's inner working are this design's own
(see [Where this design departs from the proposal](#where-this-design-departs-from-the-proposal)).

## Block structure

```
                 +------+  up/dn   current sources      Vo'
 in_sig --+----->|  PD  |-------> (ICP up / ICP down) --+------------> +-----+
          |  +-->|      |                               |              | VCO |--+--> out_sig
          |  |   +------+                               R              +-----+  |
          |  |                                          |                 ^     |
          |  |                                          +---o Sw o--+     |     |
          |  |                                          |           |     |     |
          |  |                                          C           |  vco_rst  |
          |  |   +---------------------------+   V_FV              |     |     |
          +--|-->|  frequency detector (FD)  |---------------------+  +-----+   |
          |  +-->|  counts f_x per period    |--- Cs --> Sw, RPG ---->| RPG |   |
          |  |   +---------------------------+                        +-----+   |
          +--|------------------------------------------------------->  ^      |
             +--------------------------------------------------------------------+
```

Inside the frequency detector there are two identical measuring channels and
the decision logic:

```
 in_sig  -> T-FF1 -> gate -> Up-C1 (m1 bits) --+--> H(N) table -> fv_code -> D/A -> V_FV
                        ^                      |
             fixed clock f_x                   +--> comparison circuit -> Cs
                        v                      |
 out_sig -> T-FF2 -> gate -> Up-C2 (m2 bits) --+
```

| Module | Part | Kind |
|---|---|---|
| `ccfd_pll` | the whole PLL | top; digital blocks plus the analog models |
| `freq_detector` | frequency detector: two channels, table, comparison | synthesizable |
| `t_ff` | T flip-flop (T-FF1, T-FF2) | synthesizable |
| `count_gate` | gate between T flip-flop and counter | synthesizable |
| `up_counter` | period counter (Up-C1, Up-C2) | synthesizable |
| `h_table_rom` | the `H(N)` memory of the D/A converter | synthesizable |
| `comparison_circuit` | frequency decision, output `Cs` | synthesizable |
| `phase_detector` | three-state phase detector, outputs `up`/`dn` | synthesizable |
| `reset_pulse_gen` | reset pulse generator (RPG) | synthesizable |
| `sync_edge` | two-flop synchronizer with edge detect (helper) | synthesizable |
| `ccfd_pkg` | default parameters, RPG state type | package |
| `dac` | D/A converter, code to `V_FV` | behavioural model |
| `charge_pump_filter` | current sources, R-C loop filter, switch `Sw` | behavioural model |
| `vco` | VCO with phase reset | behavioural model |

The fixed clock itself is an external oscillator; it is the `clk` input of
every digital block, and its frequency must equal the parameter `FX_HZ`.

## One pull-in, step by step

All digital logic runs on `clk` = `f_x` (20 MHz by default). The input and the
VCO output are asynchronous to it and are brought in through two-flop
synchronizers, so each of their rising edges is seen 2–3 clock cycles late.

1. **Count (input period 1).** T-FF1 toggles on every rising edge of the
   input, so its `Q` is high for exactly one input period, then low for the
   next. While `Q` is high Up-C1 counts clock cycles. When `Q` falls, the gate
   marks the end of the period and the count `N_in` is latched (2 cycles after
   the synchronized edge). The output channel does the same on the VCO output.
2. **Decide and preset (input period 2).** One cycle later the table entry for
   `N_in` is on `fv_code` and the comparison circuit has decided. On a
   frequency difference `Cs` goes high: `Sw` closes and the capacitor jumps to
   `V_FV` (an ideal switch; the proposal charges it "instantly"), and the RPG
   is armed. Because this happens while T-FF1's `Q` is low, the charging time
   does not lengthen the pull-in.
3. **Reset (start of input period 3).** At the next rising input edge the RPG
   drives `vco_rst` for `RST_CYCLES` cycles. The VCO's phase is held at the
   start of a cycle with its output high, so its rising edge now follows the
   input edge by only the reset latency (about 3 clock cycles, 3 % of a period
   at 200 kHz). `vco_rst` also releases `Cs` (the switch opens) and discards
   the output channel's measurement. From here the phase detector removes the
   small remaining phase and frequency error.

Which input period gets counted depends on the phase of T-FF1: when the input
frequency changes at an edge where T-FF1 is just finishing a count, that count
still belongs to the old frequency, and the pull-in takes three periods
instead of two. When the frequency changes *inside* a counted period, the
count belongs to neither frequency: the first preset is wrong, and the next
count, two periods later, triggers a second reset with the right voltage. The
end-to-end test exercises all three cases.

## The frequency decision

The comparison circuit is where most of this design's own choices sit, because
"a frequency difference" has to be turned into a rule that never fires while
the loop is locked and always fires when it is not.

* **When.** A decision is due each time Up-C1 delivers a new `N_in` (every
  second input period), unless `Cs` is already high.
* **Against what.** The latest completed output count `N_out`, provided it
  was completed after the last VCO reset: the output period that spans a
  reset says nothing about the VCO's frequency. If `N_out` and `N_in` arrive
  in the same cycle, the new `N_out` is used.
* **Waiting for the output.** With no such `N_out` the decision is held
  pending until Up-C2 delivers one. Right after a reset both channels start
  counting on the same edge and the output count arrives a few cycles after
  the input count, so the check after a reset costs no extra period.
* **Tolerance.** The frequencies differ when `|N_in − N_out| > DIFF_TOL`
  (4 counts by default). Two unrelated edges give ±1 count, and the first
  output period after a reset is shortened by the phase detector pulling the
  output edge forward by the reset latency (about 3 counts). With a tolerance
  of 2, that shortening kept re-triggering the reset.
* **Stopped or very slow VCO.** While a decision waits, a VCO that has not
  produced a rising edge for more than `N_in + DIFF_TOL` clock cycles
  certainly has a longer period, so `Cs` is raised at once. At power-up, with
  the capacitor empty and the VCO stopped, this is what starts the pull-in.
* **Release.** `Cs` stays high until the VCO reset it asked for.

Assertions check that `Cs` is only released by a VCO reset, that no decision
is left pending while `Cs` is high, that the phase
detector never drives `up` and `dn` together, and that an RPG pulse always
follows an armed state.

## The `H(N)` table

The table has one entry per possible count, `2^CNT_W` entries of `DAC_W` bits
(1024 × 10 bits by default), and is computed at elaboration from the
parameters, so it always matches the VCO they describe. With the linear VCO
law assumed here, `f = F0 + KV·V`, entry `N` holds

```
code(N) = round( (f_x/N − F0) / KV / VREF · (2^DAC_W − 1) ),   clipped to 0 .. 2^DAC_W − 1
```

with `code(0)` = full scale. The integer form used in the RTL is
`((f_x − F0·N)·(2^DAC_W−1)·1000 + den/2) / den` with `den = N·KV·VREF_mV`.
A different VCO needs a different table; with a non-linear VCO the function
`build_table` in `h_table_rom.sv` is the one place to change.

Resolution at the defaults: at 200 kHz, `N = 100`, so one count is 1 % of the
frequency; one D/A step is 4.9 mV or 245 Hz. The charge-pump loop takes care of
the residual error after the reset.

## Phase detector and loop filter

The phase detector is a three-state phase-frequency detector evaluated on the
fixed clock: a (synchronized) input edge sets `up`, an output edge sets `dn`,
and when both would be set they cancel. Its phase resolution is one `f_x`
period (50 ns, 1 % of a 200 kHz period), which is what limits the steady-state
jitter in this implementation. It is not cleared by the VCO reset: the input
edge that triggers the reset must still be paired with the VCO's restart edge,
otherwise a `dn` pulse would be left standing for a whole period.

The loop-filter model is the circuit of the proposal's block diagram: two
switched current sources into a series R-C. Default values: `ICP` = 100 µA,
`R` = 10 kΩ, `C` = 4 nF, with `KV` = 50 kHz/V. That gives a natural frequency
of about 5.6 kHz and a damping factor of about 0.7, some 35 input periods per
natural period at 200 kHz, and a 1 V kick on `Vo'` while a pump current flows.

## Parameters

Top-level parameters of `ccfd_pll` (defaults in `ccfd_pkg`):

| Parameter | Default | Meaning |
|---|---|---|
| `FX_HZ` | 20 000 000 | fixed clock frequency; must match `clk` |
| `CNT1_W`, `CNT2_W` | 10 | widths of Up-C1 / Up-C2 (m1, m2); counts saturate at `2^W−1` |
| `DAC_W` | 10 | D/A converter resolution |
| `VREF_MV` | 5000 | D/A full scale in mV |
| `VCO_F0_HZ`, `VCO_KV_HZ_PER_V` | 0, 50 000 | VCO law `f = F0 + KV·V`, used by the table and the VCO model |
| `DIFF_TOL` | 4 | counts of difference still treated as the same frequency |
| `RST_CYCLES` | 1 | width of the VCO reset pulse in clock cycles |

The analog models have their own `real` parameters (`ICP_A`, `R_OHM`, `C_F`,
`VDD`, `TSTEP_NS` of `charge_pump_filter`; `F0_HZ`, `KV_HZ_PER_V`, `TSTEP_NS`
of `vco`; `SETTLE_NS` of `dac`).

Operating range at the defaults: the input frequency must lie between
`f_x/1023` = 19.6 kHz (counter range) and 250 kHz (VCO range at 5 V). One
count is `f_in/f_x` of the frequency, so resolution falls as the input gets
faster. The tests use 100–225 kHz.

## Ports of `ccfd_pll`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | fixed clock `f_x` |
| `rst_n` | in | 1 | asynchronous reset, active low |
| `in_sig` | in | 1 | input signal (asynchronous) |
| `out_sig` | out | 1 | output signal (VCO output) |
| `cs` | out | 1 | frequency difference found; `Sw` closed, RPG armed |
| `vco_rst` | out | 1 | reset pulse to the VCO |
| `pd_up`, `pd_dn` | out | 1 | phase detector pump switches |
| `fv_code` | out | `DAC_W` | D/A code of `V_FV` |
| `n_in`, `n_out` | out | `CNT1_W`, `CNT2_W` | last input / output period counts |
| `fd_decide`, `fd_match` | out | 1 | decision taken / decided "same frequency" |
| `v_ctrl`, `v_fv`, `v_cap` | out | real | `Vo'`, `V_FV`, capacitor voltage, for observation |

## Simulating

Everything is plain SystemVerilog for Verilator 5 (`--timing` is needed for
the analog models and the testbenches). Every testbench prints
`TB_RESULT checks=N failures=M` and finishes. For example, the whole PLL:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/ccfd_pkg.sv tb/tb_ccfd_pll.sv --top-module tb_ccfd_pll -o sim
./obj_dir/sim
```

and likewise `tb_<module>` for each block. `tb_ccfd_pll` runs the top at its
default parameters in well under a second.

What the tests check:

* `tb_ccfd_pll`: input steps 200 → 100 → 225 → 160 → 200 kHz, the first
  from a stopped VCO at power-up, the last inside a counted period. For every
  step at a period boundary: exactly one VCO reset, after 2.0 input periods
  (3.0 when the step meets T-FF1 finishing a count); for the last step: two
  resets, the last within 4.6 periods; `V_FV` equal to
  `f_in/KV` computed independently; the capacitor preset to `V_FV`; from two
  periods after the reset every output edge within 4 % of a period of an input
  edge (worst seen: 3.0 % at 225 kHz, 0.6 % at 100 kHz). It counts each
  mechanism (difference found, preset, reset, "same frequency", "VCO too
  slow", up and down pulses) and fails if one never occurs.
* Block tests: counts exact to the cycle, the whole 1024-entry table against a
  floating-point computation, the decision rule at and around the tolerance,
  RPG timing and pulse width, phase detector pulse widths, and the analog
  models' `I·t/C`, `I·R` and period laws.

## Where this design departs from the proposal

* **Numbers.** Clock frequency, counter and D/A widths, VCO gain, pump
  current, R and C, tolerance and reset width are all this design's choices.
  The proposal's own simulation conditions were not used.
* **Synchronous implementation.** The proposal draws the T flip-flops as
  clocked by the signals and the gate as passing the fixed clock to the
  counter. Here every register runs on the fixed clock, the signals are
  synchronized, and the gate is a count enable plus an end-of-period strobe.
  This costs 2–3 clock cycles of latency on every edge.
* **Phase detector.** The proposal only names it; the three-state detector
  sampled on the fixed clock is this design's.
* **Decision rule.** Tolerance, the stopped-VCO rule, the pending decision,
  the invalidation of the output count by a reset and the release of `Cs` by
  the reset are this design's.
* **D/A converter.** The proposal's D/A converter contains the table memory.
  Here the memory is digital (`h_table_rom`, inside `freq_detector`) and the
  conversion is a separate analog model (`dac`) at the top level.
* **Two resets.** The proposal's simulation shows two reset pulses during one
  pull-in without saying why. In this design a step produces exactly one,
  unless the frequency changes in the middle of a counted period, which costs
  a second reset two input periods after the first.
* **Conventional PLL.** The proposal compares against a conventional PLL that
  slips cycles; that baseline is not part of this design.
* **Analog parts** are behavioural models with ideal components: an ideal
  switch, no pump mismatch or leakage, a VCO stepped in 5 ns increments. The
  top is therefore not synthesizable as a whole; the digital blocks are.
