// trng_top: the divergent-path random number generators side by side.
//
// Holds the adder-shifter generator chip (astrng_chip) and the three
// concatenated-LFSR generators that were built after it: three LFSRs of 16,
// 13 and 9 bits; three LFSRs of 27, 13 and 12 bits contributing 11, 11 and 10
// bits; and four LFSRs of 13, 11, 9 and 7 bits. They share nothing but the bus
// clock and reset; each has its own bus port, brought out with a prefix
// (a_ = adder-shifter, c1_, c2_, c3_ = the three LFSR versions). All four use
// the same 16-bit bus protocol (see rng_bus_port). Beside them stands the
// minimal 4-bit divergent-path generator (dp_ prefix), which has no bus: it
// takes its oscillator and a sample strobe synchronous to that oscillator.
`timescale 1ns / 1ps
module trng_top
  import trng_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic             irun,
  // adder-shifter chip
  input  logic             a_cs, a_rnw, a_msw, a_creg,
  output logic             a_ack,
  input  logic [BUS_W-1:0] a_din,
  output logic [BUS_W-1:0] a_dout,
  output logic             a_doe,
  input  logic             a_obo,
  input  logic [3:0]       a_osc_in,
  output logic [3:0]       a_osc_out,
  output logic             a_fb,
  // 16/13/9-bit CLTRNG
  input  logic             c1_cs, c1_rnw, c1_msw, c1_creg,
  output logic             c1_ack,
  input  logic [BUS_W-1:0] c1_din,
  output logic [BUS_W-1:0] c1_dout,
  output logic             c1_doe,
  output logic [2:0]       c1_osc_out,
  output logic             c1_fb,
  // 27/13/12-bit CLTRNG
  input  logic             c2_cs, c2_rnw, c2_msw, c2_creg,
  output logic             c2_ack,
  input  logic [BUS_W-1:0] c2_din,
  output logic [BUS_W-1:0] c2_dout,
  output logic             c2_doe,
  output logic [2:0]       c2_osc_out,
  output logic             c2_fb,
  // 13/11/9/7-bit CLTRNG
  input  logic             c3_cs, c3_rnw, c3_msw, c3_creg,
  output logic             c3_ack,
  input  logic [BUS_W-1:0] c3_din,
  output logic [BUS_W-1:0] c3_dout,
  output logic             c3_doe,
  output logic [3:0]       c3_osc_out,
  output logic             c3_fb,
  // minimal 4-bit divergent-path generator
  input  logic             dp_osc,
  input  logic             dp_sample,
  output logic [3:0]       dp_value,
  output logic             dp_valid
);
  astrng_chip u_ast (
    .clk(clk), .rst(rst), .irun(irun), .cs(a_cs), .rnw(a_rnw), .msw(a_msw), .creg(a_creg),
    .ack(a_ack), .d_in(a_din), .d_out(a_dout), .d_oe(a_doe), .obo(a_obo),
    .osc_in(a_osc_in), .osc_out(a_osc_out), .fb_launched(a_fb));

  cltrng_fpga #(.NL(3), .LW({8'd16, 8'd13, 8'd9}), .CB({8'd14, 8'd11, 8'd7})) u_clt1 (
    .clk(clk), .rst(rst), .irun(irun), .cs(c1_cs), .rnw(c1_rnw), .msw(c1_msw),
    .creg(c1_creg), .ack(c1_ack), .d_in(c1_din), .d_out(c1_dout), .d_oe(c1_doe),
    .osc_out(c1_osc_out), .fb_launched(c1_fb));

  cltrng_fpga #(.NL(3), .LW({8'd27, 8'd13, 8'd12}), .CB({8'd11, 8'd11, 8'd10})) u_clt2 (
    .clk(clk), .rst(rst), .irun(irun), .cs(c2_cs), .rnw(c2_rnw), .msw(c2_msw),
    .creg(c2_creg), .ack(c2_ack), .d_in(c2_din), .d_out(c2_dout), .d_oe(c2_doe),
    .osc_out(c2_osc_out), .fb_launched(c2_fb));

  cltrng_fpga #(.NL(4), .LW({8'd13, 8'd11, 8'd9, 8'd7}), .CB({8'd11, 8'd9, 8'd7, 8'd5})) u_clt3 (
    .clk(clk), .rst(rst), .irun(irun), .cs(c3_cs), .rnw(c3_rnw), .msw(c3_msw),
    .creg(c3_creg), .ack(c3_ack), .d_in(c3_din), .d_out(c3_dout), .d_oe(c3_doe),
    .osc_out(c3_osc_out), .fb_launched(c3_fb));

  dp_rng4 u_dp (.osc_clk(dp_osc), .rst(rst), .sample(dp_sample), .value(dp_value), .valid(dp_valid));
endmodule
