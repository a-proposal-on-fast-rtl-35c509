// Shared constants of the clock count frequency detector PLL.
//
// The defaults describe one consistent operating point: a 20 MHz fixed clock,
// 10-bit period counters and a 10-bit D/A converter with a 5 V reference
// feeding a VCO of 50 kHz/V. The PLL structure (counters, table, comparison,
// reset pulse generator) follows the proposal; every number here is a choice of
// this implementation.
`timescale 1ns / 1ps
package ccfd_pkg;
  // Fixed clock f_x counted by both up-counters (Hz).
  localparam int unsigned FX_HZ        = 20_000_000;
  // Up-C1 / Up-C2 widths (m1, m2 bits).
  localparam int unsigned CNT_W        = 10;
  // D/A converter resolution and full-scale voltage.
  localparam int unsigned DAC_W        = 10;
  localparam int unsigned VREF_MV      = 5000;
  // Linear VCO characteristic f = VCO_F0_HZ + VCO_KV_HZ_PER_V * V.
  localparam int unsigned VCO_F0_HZ       = 0;
  localparam int unsigned VCO_KV_HZ_PER_V = 50_000;
  // Largest count difference still treated as "same frequency".
  localparam int unsigned DIFF_TOL     = 4;
  // Width of the VCO reset pulse in fixed-clock cycles.
  localparam int unsigned RST_CYCLES   = 1;

  // States of the reset pulse generator.
  typedef enum logic [1:0] {
    RPG_IDLE  = 2'd0,  // no frequency difference pending
    RPG_ARMED = 2'd1,  // Cs seen, waiting for the next input rising edge
    RPG_PULSE = 2'd2   // driving the VCO reset
  } rpg_state_e;
endpackage
