// dp_rng4: the minimal divergent-path random number generator.
//
// A W-bit accumulator adds STEP (modulo 2^W) on every edge of a noisy
// oscillator. At each sample the sum is rotated left by one bit (the MSB
// re-enters at bit 0), the rotated value is the random number, and it is also
// written back into the accumulator. The rotation is a second function that
// does not commute with the addition, so the number of oscillator edges in
// every sample period changes where the accumulator goes next: the jitter of
// each period is kept instead of averaging out. Defaults: 4 bits and +7, the
// design's worked example (from 0, 9/10/11 edges give 15/12/11).
//
// Timing: sample is synchronous to osc_clk (the caller synchronises it) and is
// taken on the edge it is high, counting that edge: with the sample on the
// n-th edge of a period the result is rotl(previous + n*STEP). value and valid
// update on that edge; valid is high for one osc_clk cycle. Reset clears the
// accumulator and value.
`timescale 1ns / 1ps
module dp_rng4 #(
  parameter int           W    = 4,
  parameter logic [W-1:0] STEP = 7
) (
  input  logic         osc_clk,
  input  logic         rst,
  input  logic         sample,
  output logic [W-1:0] value,
  output logic         valid
);
  logic [W-1:0] acc, sum, rot;

  assign sum = acc + STEP;
  assign rot = {sum[W-2:0], sum[W-1]};

  always_ff @(posedge osc_clk or posedge rst) begin
    if (rst) begin
      acc   <= '0;
      value <= '0;
      valid <= 1'b0;
    end else begin
      valid <= sample;
      if (sample) begin
        acc   <= rot;
        value <= rot;
      end else begin
        acc   <= sum;
      end
    end
  end
endmodule
