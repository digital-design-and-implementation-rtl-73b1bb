// astrng_chip: the adder-shifter true random number generator chip.
//
// Wraps the generator datapath with everything the packaged part has: four
// on-chip ring oscillators (behavioural models here), the choice between those
// and four external oscillator inputs (obo pin), the oscillator outputs brought
// to pins for measurement, the 14-bit control register and the 16-bit host bus.
// Oscillator 0 clocks the up counter, 1 the down counter, 2 the 5-bit shift
// count and 3 the 2-bit transpose count.
//
// Control register (see trng_pkg::ast_ctrl_t): run starts and stops all four
// oscillators; inhibit_fb stops the feedback of each number into the counters;
// per oscillator, rotate selects stepping through the four frequencies and fsel
// the fixed frequency. Pins follow the chip's pin list: rst (1 = reset), irun
// (run bit value after reset), cs, rnw, msw, creg, ack, data and obo. The
// bidirectional data pins are split into d_in, d_out and d_oe. The package has
// no clock pin; this model adds clk for the bus logic, which is this design's
// choice. A 32-bit read is a lower-word read followed by an upper-word read.
//
// The five fabricated chips had slightly different oscillators; CHIP (1..5)
// selects which chip's measured periods the oscillator models use (default:
// chip 1), and also gives each chip its own noise seeds, so that several
// instances behave like several chips on one board. Besides resetting the
// registers asynchronously, rst holds the oscillators off (their enable is
// run && !rst), so lint tools see rst used both as a reset and as data; that is
// intended.
`timescale 1ns / 1ps
module astrng_chip
  import trng_pkg::*;
#(
  parameter int CHIP = 1   // which fabricated chip's oscillators to model, 1..5
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
  input  logic             obo,      // 1: on-chip oscillators, 0: osc_in
  input  logic [3:0]       osc_in,
  output logic [3:0]       osc_out,
  output logic             fb_launched
);
  ast_ctrl_t        ctrl;
  logic [13:0]      ctrl_bits;
  logic [3:0]       ring, oclk;
  logic             sample, rn_valid;
  logic [RN_W-1:0]  rn;

  assign ctrl = ast_ctrl_t'(ctrl_bits);

  // Measured oscillator periods of the five fabricated chips, in units of
  // 0.1 ns, for chip c: {setting 00: osc 0..3, setting 01: ..., setting 11: ...}.
  function automatic logic [15:0][9:0] chip_periods(input int c);
    unique case (c)
      1: return {10'd641, 10'd562, 10'd532, 10'd495, 10'd685, 10'd641, 10'd588, 10'd526,
                 10'd833, 10'd704, 10'd694, 10'd588, 10'd980, 10'd862, 10'd746, 10'd685};
      2: return {10'd633, 10'd556, 10'd521, 10'd490, 10'd676, 10'd649, 10'd588, 10'd521,
                 10'd820, 10'd694, 10'd676, 10'd581, 10'd962, 10'd862, 10'd758, 10'd676};
      3: return {10'd625, 10'd556, 10'd521, 10'd485, 10'd667, 10'd633, 10'd588, 10'd515,
                 10'd820, 10'd694, 10'd676, 10'd588, 10'd962, 10'd847, 10'd746, 10'd676};
      4: return {10'd641, 10'd549, 10'd521, 10'd500, 10'd685, 10'd649, 10'd588, 10'd521,
                 10'd833, 10'd694, 10'd685, 10'd581, 10'd962, 10'd847, 10'd736, 10'd676};
      default:
         return {10'd632, 10'd562, 10'd521, 10'd500, 10'd676, 10'd649, 10'd581, 10'd526,
                 10'd820, 10'd704, 10'd676, 10'd581, 10'd962, 10'd847, 10'd746, 10'd685};
    endcase
  endfunction

  localparam logic [15:0][9:0] PER  = chip_periods(CHIP);  // entry 15 first
  localparam int               SEEDS [4] = '{11, 23, 37, 41};

  initial assert (CHIP >= 1 && CHIP <= 5) else $error("CHIP must be 1..5");

  for (genvar i = 0; i < 4; i++) begin : g_osc
    ring_osc #(.PERIOD_PS_0(100 * int'(PER[15 - i])),     .PERIOD_PS_1(100 * int'(PER[11 - i])),
               .PERIOD_PS_2(100 * int'(PER[7 - i])), .PERIOD_PS_3(100 * int'(PER[3 - i])),
               .SEED(SEEDS[i] + 1000 * (CHIP - 1))) u_osc (
      .en(ctrl.run && !rst), .rotate(ctrl.osc[i].rotate), .fsel(ctrl.osc[i].fsel), .clk_o(ring[i]));
  end

  assign oclk    = obo ? ring : osc_in;
  assign osc_out = ring;

  astrng_core u_core (
    .clk(clk), .rst(rst), .clk_up(oclk[0]), .clk_dn(oclk[1]), .clk_sh(oclk[2]),
    .clk_tr(oclk[3]), .sample(sample), .inhibit_fb(ctrl.inhibit_fb),
    .rn(rn), .rn_valid(rn_valid), .fb_launched(fb_launched));

  rng_bus_port #(.CW(14)) u_bus (
    .clk(clk), .rst(rst), .ctrl_init({13'b0, irun}), .cs(cs), .rnw(rnw), .msw(msw),
    .creg(creg), .din(d_in), .dout(d_out), .ack(ack), .ctrl(ctrl_bits),
    .sample(sample), .rn(rn), .rn_valid(rn_valid));

  assign d_oe = cs && rnw;
endmodule
