// trng_pkg: constants and types shared by the divergent-path random number
// generators (the adder-shifter ASTRNG and the concatenated-LFSR CLTRNG).
//
// Holds the maximal-length LFSR tap masks for every LFSR length the designs use,
// the control-register layouts of both generators and the bit-reversal used to
// scramble an LFSR state before it is preloaded back. The tap positions are the
// widely published maximal-length XOR taps (the 32-bit PRNG uses bits 31, 21, 1
// and 0, as the design specifies); the other lengths are this design's choice
// from the same published table.
`timescale 1ns / 1ps
package trng_pkg;

  localparam int RN_W  = 32;  // width of one random number
  localparam int BUS_W = 16;  // width of the external data bus

  // Feedback tap mask (bit i set = state bit i feeds the XOR) of a
  // maximal-length Fibonacci LFSR shifting towards the MSB.
  function automatic logic [63:0] lfsr_taps(input int width);
    logic [63:0] m;
    m = '0;
    case (width)
      7:  begin m[6] = 1'b1; m[5] = 1'b1; end
      9:  begin m[8] = 1'b1; m[4] = 1'b1; end
      10: begin m[9] = 1'b1; m[6] = 1'b1; end
      11: begin m[10] = 1'b1; m[8] = 1'b1; end
      12: begin m[11] = 1'b1; m[5] = 1'b1; m[3] = 1'b1; m[0] = 1'b1; end
      13: begin m[12] = 1'b1; m[3] = 1'b1; m[2] = 1'b1; m[0] = 1'b1; end
      16: begin m[15] = 1'b1; m[14] = 1'b1; m[12] = 1'b1; m[3] = 1'b1; end
      27: begin m[26] = 1'b1; m[4] = 1'b1; m[1] = 1'b1; m[0] = 1'b1; end
      32: begin m[31] = 1'b1; m[21] = 1'b1; m[1] = 1'b1; m[0] = 1'b1; end
      default: m = '0;
    endcase
    return m;
  endfunction

  // Per-oscillator control field of the ASTRNG control register.
  typedef struct packed {
    logic       rotate;  // 1: step through the four frequencies, 0: fixed
    logic [1:0] fsel;    // frequency setting used when fixed
  } osc_ctrl_t;

  // ASTRNG control register, 14 bits, LSB first:
  // [0] run, [1] inhibit_fb, [4:2] osc0, [7:5] osc1, [10:8] osc2, [13:11] osc3.
  typedef struct packed {
    osc_ctrl_t [3:0] osc;
    logic            inhibit_fb;
    logic            run;
  } ast_ctrl_t;

  // CLTRNG control register, 3 bits: [0] run, [1] enable TRNG, [2] enable PRNG.
  typedef struct packed {
    logic en_prng;
    logic en_trng;
    logic run;
  } clt_ctrl_t;

endpackage
