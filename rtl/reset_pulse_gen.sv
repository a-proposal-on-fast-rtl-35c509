// Reset pulse generator (RPG).
//
// When the frequency detector's control signal Cs reports a frequency
// difference, the loop-filter capacitor is being charged to the right voltage
// and the VCO's phase has to be restarted in step with the input. The RPG arms
// on `cs` and, at the next rising edge of the input signal, drives `vco_rst`
// high for RST_CYCLES fixed-clock cycles; the VCO then starts a new cycle with
// a rising edge, in phase with the input. This is the function the proposal
// gives; the state machine and the pulse width are this design's choice.
//
// Timing: the input edge is synchronized (2-3 cycles); `vco_rst` rises one
// cycle after the synchronized edge.
`timescale 1ns / 1ps
module reset_pulse_gen #(
  parameter int unsigned RST_CYCLES = ccfd_pkg::RST_CYCLES
) (
  input  logic clk,
  input  logic rst_n,
  input  logic cs,
  input  logic in_sig,
  output logic vco_rst
);
  import ccfd_pkg::*;

  localparam int unsigned CW = (RST_CYCLES > 1) ? $clog2(RST_CYCLES) : 1;

  rpg_state_e    state;
  logic [CW-1:0] left;
  logic          in_rise;

  sync_edge u_sync (.clk, .rst_n, .async_in(in_sig), .level(), .rise(in_rise));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= RPG_IDLE;
      left  <= '0;
    end else begin
      unique case (state)
        RPG_IDLE:  if (cs) state <= RPG_ARMED;
        RPG_ARMED: if (in_rise) begin
                     state <= RPG_PULSE;
                     left  <= CW'(RST_CYCLES - 1);
                   end
        RPG_PULSE: if (left == '0) state <= RPG_IDLE;
                   else            left  <= left - 1'b1;
        default:   state <= RPG_IDLE;
      endcase
    end
  end

  assign vco_rst = (state == RPG_PULSE);

  // The pulse only follows a request.
  a_pulse_after_arm: assert property (@(posedge clk) disable iff (!rst_n)
    $rose(vco_rst) |-> $past(state) == RPG_ARMED);
endmodule
