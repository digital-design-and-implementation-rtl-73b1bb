// prng32: 32-bit whitening pseudo random number generator.
//
// A 32-bit maximal-length LFSR (XOR of bits 31, 21, 1 and 0 into bit 0, as the
// design specifies) with a small state machine that, after each sample, clocks
// the LFSR exactly 32 times and then holds it, so every bit is new at the next
// sample. It runs on a ring-oscillator clock. The bus domain requests the 32
// steps by flipping step_req; once the steps are done step_ack equals step_req
// and state is stable for sampling. A request is taken on the third osc_clk
// edge after the toggle; the 32 steps occupy the next 32 edges and step_ack
// flips on the last. Reset (asynchronous) loads a fixed non-zero seed.
`timescale 1ns / 1ps
module prng32
  import trng_pkg::*;
#(
  parameter logic [31:0] SEED = 32'h1
) (
  input  logic        osc_clk,
  input  logic        rst,
  input  logic        step_req,
  output logic        step_ack,
  output logic [31:0] state
);
  localparam logic [63:0] TAPS64 = lfsr_taps(32);
  localparam logic [31:0] TAPS   = TAPS64[31:0];
  logic       req_s, busy;
  logic [4:0] left;

  sync_2ff u_sync (.clk(osc_clk), .rst(rst), .d(step_req), .q(req_s));

  always_ff @(posedge osc_clk or posedge rst) begin
    if (rst) begin
      state    <= SEED;
      step_ack <= 1'b0;
      busy     <= 1'b0;
      left     <= '0;
    end else if (busy) begin
      state <= {state[30:0], ^(state & TAPS)};
      left  <= left - 1'b1;
      if (left == 5'd0) begin
        busy     <= 1'b0;
        step_ack <= ~step_ack;
      end
    end else if (req_s != step_ack) begin
      busy <= 1'b1;
      left <= 5'd31;
    end
  end
endmodule
