// Memory of the D/A converter: the table H(N) = VCO^-1(f_x / N).
//
// The frequency detector measures the input period as N fixed-clock cycles,
// so the input frequency is about f_x / N. The VCO input voltage that gives
// that frequency is written into this table, one entry per possible N, so the
// loop-filter capacitor can be set to the right voltage in one step instead of
// being pulled in by the phase detector. With the linear VCO assumed here,
// f = F0 + KV * V, each entry is the D/A code of
//     V(N) = (f_x / N - F0) / KV,
// i.e. code(N) = round(V(N) / VREF * (2**DAC_W - 1)), clipped to the code
// range; N = 0 (no count yet) maps to full scale. The table is computed at
// elaboration from the parameters, so it always matches the VCO they describe.
//
// Timing: the entry for `addr` appears on `code` one clock after `rd` is high;
// `code` holds its value otherwise.
`timescale 1ns / 1ps
module h_table_rom #(
  parameter int unsigned CNT_W           = ccfd_pkg::CNT_W,
  parameter int unsigned DAC_W           = ccfd_pkg::DAC_W,
  parameter int unsigned FX_HZ           = ccfd_pkg::FX_HZ,
  parameter int unsigned VREF_MV         = ccfd_pkg::VREF_MV,
  parameter int unsigned VCO_F0_HZ       = ccfd_pkg::VCO_F0_HZ,
  parameter int unsigned VCO_KV_HZ_PER_V = ccfd_pkg::VCO_KV_HZ_PER_V
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             rd,
  input  logic [CNT_W-1:0] addr,
  output logic [DAC_W-1:0] code
);
  localparam int unsigned DEPTH = 2 ** CNT_W;
  typedef logic [DEPTH-1:0][DAC_W-1:0] table_t;

  // Entry n of H, as a D/A code, in integer arithmetic:
  //   code = ((f_x - F0*n) * (2**DAC_W-1) * 1000 + den/2) / den,
  //   den  = n * KV * VREF_MV.
  function automatic table_t build_table();
    table_t t;
    longint num, den, c;
    longint full = longint'(2 ** DAC_W) - 1;
    for (int n = 0; n < DEPTH; n++) begin
      if (n == 0) begin
        c = full;
      end else begin
        num = (longint'(FX_HZ) - longint'(VCO_F0_HZ) * n) * full * 1000;
        den = longint'(n) * longint'(VCO_KV_HZ_PER_V) * longint'(VREF_MV);
        if (num <= 0) c = 0;
        else          c = (num + den / 2) / den;
        if (c > full) c = full;
      end
      t[n] = DAC_W'(c);
    end
    return t;
  endfunction

  localparam table_t TABLE = build_table();

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  code <= '0;
    else if (rd) code <= TABLE[addr];
  end
endmodule
