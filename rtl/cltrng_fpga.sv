// cltrng_fpga: a complete concatenated-LFSR generator as built in the FPGA:
// ring oscillators, the cltrng datapath and the same 16-bit host bus as the
// adder-shifter chip, so that both are driven and read the same way.
//
// Each LFSR has its own ring oscillator (behavioural model) whose frequency
// select comes from the cross-coupled LFSR bits; the oscillators never rotate
// on their own. The control register is 3 bits (trng_pkg::clt_ctrl_t): run
// starts the oscillators, en_trng and en_prng select raw TRNG, PRNG alone or
// their XOR (whitened TRNG). After reset run = irun, en_trng = 1, en_prng = 0.
// The oscillator periods reuse the measured settings of the chip's four
// oscillators (oscillator i uses the chip's oscillator i mod 4); the FPGA
// oscillators' periods are not given, so these are this design's choice.
// Bus timing is that of rng_bus_port. As in the chip, rst both resets the
// registers and holds the oscillators off (enable = run && !rst).
`timescale 1ns / 1ps
module cltrng_fpga
  import trng_pkg::*;
#(
  parameter int              NL = 3,
  parameter logic [8*NL-1:0] LW = {8'd16, 8'd13, 8'd9},
  parameter logic [8*NL-1:0] CB = {8'd14, 8'd11, 8'd7}
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             irun,
  input  logic             cs,
  input  logic             rnw,
  input  logic             msw,
  input  logic             creg,
  output logic             ack,
  input  logic [BUS_W-1:0] d_in,
  output logic [BUS_W-1:0] d_out,
  output logic             d_oe,
  output logic [NL-1:0]    osc_out,
  output logic             fb_launched
);
  localparam int P [16] = '{64100, 68500, 83300, 98000,
                            56200, 64100, 70400, 86200,
                            53200, 58800, 69400, 74600,
                            49500, 52600, 58800, 68500};
  clt_ctrl_t       ctrl;
  logic [2:0]      ctrl_bits;
  logic [1:0]      fsel [NL];
  logic            sample, rn_valid;
  logic [RN_W-1:0] rn;

  assign ctrl = clt_ctrl_t'(ctrl_bits);

  for (genvar i = 0; i < NL; i++) begin : g_osc
    localparam int K = 4 * (i % 4);
    ring_osc #(.PERIOD_PS_0(P[K]), .PERIOD_PS_1(P[K+1]), .PERIOD_PS_2(P[K+2]),
               .PERIOD_PS_3(P[K+3]), .SEED(101 + 7 * i + NL)) u_osc (
      .en(ctrl.run && !rst), .rotate(1'b0), .fsel(fsel[i]), .clk_o(osc_out[i]));
  end

  cltrng #(.NL(NL), .LW(LW), .CB(CB)) u_core (
    .clk(clk), .rst(rst), .osc_clk(osc_out), .sample(sample),
    .en_trng(ctrl.en_trng), .en_prng(ctrl.en_prng), .rn(rn), .rn_valid(rn_valid),
    .osc_fsel(fsel), .fb_launched(fb_launched));

  rng_bus_port #(.CW(3)) u_bus (
    .clk(clk), .rst(rst), .ctrl_init({1'b0, 1'b1, irun}), .cs(cs), .rnw(rnw), .msw(msw),
    .creg(creg), .din(d_in), .dout(d_out), .ack(ack), .ctrl(ctrl_bits),
    .sample(sample), .rn(rn), .rn_valid(rn_valid));

  assign d_oe = cs && rnw;
endmodule
