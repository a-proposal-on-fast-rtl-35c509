// Up-counter of the frequency detector (Up-C1 / Up-C2, W = m1 / m2 bits).
//
// Counts fixed-clock cycles while `en` is high. On `done` the count of the
// period just ended is copied to `result`, `result_stb` pulses for one cycle
// with it, and the counter restarts from zero. `count` is the running value.
// The counter saturates at all ones, so a period longer than 2**W-1 cycles
// (a very slow or stopped signal) reads as the largest count. `clr` drops the
// running count without producing a result. Saturation and the running-count
// output are choices of this implementation.
`timescale 1ns / 1ps
module up_counter #(
  parameter int unsigned W = ccfd_pkg::CNT_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         en,
  input  logic         done,
  output logic [W-1:0] count,
  output logic [W-1:0] result,
  output logic         result_stb
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count      <= '0;
      result     <= '0;
      result_stb <= 1'b0;
    end else begin
      result_stb <= 1'b0;
      if (clr) begin
        count <= '0;
      end else if (done) begin
        result     <= count;
        result_stb <= 1'b1;
        count      <= '0;
      end else if (en && !(&count)) begin
        count <= count + 1'b1;
      end
    end
  end
endmodule
