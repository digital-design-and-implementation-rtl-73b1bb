// barrel_rotator: the logical shifter of the adder-shifter generator.
//
// Rotates a W-bit word left by a count taken from a free-running counter: bits
// leave at the MSB (b31) and re-enter at b0, so no generated bit is lost. It is
// built, as the design describes, from log2(W) stages of 2:1 multiplexers, stage
// k rotating by 2^k when bit k of the count is set. Purely combinational.
`timescale 1ns / 1ps
module barrel_rotator #(
  parameter int W = 32
) (
  input  logic [W-1:0]         din,
  input  logic [$clog2(W)-1:0] amount,
  output logic [W-1:0]         dout
);
  localparam int S = $clog2(W);
  logic [W-1:0] stage [S+1];

  assign stage[0] = din;
  for (genvar k = 0; k < S; k++) begin : g_stage
    localparam int D = 1 << k;
    assign stage[k+1] = amount[k] ? {stage[k][W-1-D:0], stage[k][W-1:W-D]} : stage[k];
  end
  assign dout = stage[S];
endmodule
