// lfsr_gen: maximal-length LFSR clocked by its own ring oscillator, with a
// synchronous preload requested from the bus clock domain.
//
// This is the bit generator of the concatenated-LFSR generator. The register
// shifts towards the MSB on every osc_clk edge; the new bit 0 is the XOR of
// the bits marked in trng_pkg::lfsr_taps(W). XOR feedback locks up only in
// the all-zero state, so the register resets to a non-zero SEED and the
// generator only ever preloads it with a permutation of its own bits, which
// cannot be zero either. Preload handshake as in osc_counter: the bus domain
// holds preload_data and flips preload_req; the LFSR loads the data on the
// third osc_clk edge after the toggle, then returns preload_ack equal to it.
// Reset is asynchronous and active high.
`timescale 1ns / 1ps
module lfsr_gen
  import trng_pkg::*;
#(
  parameter int           W    = 16,
  parameter logic [W-1:0] SEED = 1
) (
  input  logic         osc_clk,
  input  logic         rst,
  input  logic         preload_req,
  input  logic [W-1:0] preload_data,
  output logic         preload_ack,
  output logic [W-1:0] state
);
  localparam logic [63:0]  TAPS64 = lfsr_taps(W);
  localparam logic [W-1:0] TAPS   = TAPS64[W-1:0];
  logic req_s;

  sync_2ff u_sync (.clk(osc_clk), .rst(rst), .d(preload_req), .q(req_s));

  always_ff @(posedge osc_clk or posedge rst) begin
    if (rst) begin
      state       <= SEED;
      preload_ack <= 1'b0;
    end else begin
      preload_ack <= req_s;
      if (req_s != preload_ack) state <= preload_data;
      else                      state <= {state[W-2:0], ^(state & TAPS)};
    end
  end

  initial assert (TAPS != '0) else $error("lfsr_gen: no tap set for width %0d", W);
endmodule
