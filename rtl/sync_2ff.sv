// sync_2ff: two flip-flop synchroniser for a single-bit level or toggle.
//
// Brings a signal from another clock domain into the clk domain. Output is the
// input delayed by two rising edges of clk. Used for the preload request and
// acknowledge toggles that cross between the bus clock and the free-running
// ring-oscillator clocks. Reset clears both stages.
`timescale 1ns / 1ps
module sync_2ff (
  input  logic clk,
  input  logic rst,
  input  logic d,
  output logic q
);
  logic meta;
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      meta <= 1'b0;
      q    <= 1'b0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
