// ring_osc: behavioural model of a frequency-selectable ring oscillator.
//
// kind: behavioural model, not synthesizable. The real part is an odd-length
// inverter ring whose stage count can be switched between four settings; its
// period jitters by a few percent from cycle to cycle, and that jitter is the
// entropy the generators collect. Here the four nominal periods are parameters
// (defaults: the measured periods of the first oscillator of the fabricated
// chip, in ns, scaled to ps). Two noise terms are modelled, both from
// $urandom seeded per instance: a slow frequency wander, a random walk of
// WANDER_STEP_PPM per period bounded to +/- WANDER_PPM, which makes the count
// over a whole sample interval uncertain by a few counts (the kind of
// "100 MHz +/- 1 MHz" uncertainty the divergent-path argument starts from);
// and white cycle-to-cycle jitter, each half period drawn uniformly within
// +/- JITTER_PERMIL per mille. The noise magnitudes are this model's choice.
//
// Interface: en starts and stops the ring (output held low while stopped);
// fsel picks the setting when rotate=0; with rotate=1 the ring steps through
// the four settings in turn, changing every ROT_CYCLES periods. Setting changes
// are applied only at the end of a full period, as the real ring must switch
// stages in step with its own oscillation. The stepping rate is this model's
// choice; the design does not state it.
`timescale 1ns / 1ps
module ring_osc #(
  parameter int PERIOD_PS_0  = 64100,
  parameter int PERIOD_PS_1  = 68500,
  parameter int PERIOD_PS_2  = 83300,
  parameter int PERIOD_PS_3  = 98000,
  parameter int JITTER_PERMIL = 30,
  parameter int ROT_CYCLES    = 16,
  parameter int WANDER_PPM      = 20000,
  parameter int WANDER_STEP_PPM = 2000,
  parameter int SEED          = 1
) (
  input  logic       en,
  input  logic       rotate,
  input  logic [1:0] fsel,
  output logic       clk_o
);
  int unsigned rnd;
  int          cyc;
  logic [1:0]  rot_sel;
  logic [1:0]  cur;
  int          nominal;
  int          half_ps;
  int          wander;     // current frequency offset, ppm of the period

  function automatic int period_of(input logic [1:0] s);
    case (s)
      2'd0:    return PERIOD_PS_0;
      2'd1:    return PERIOD_PS_1;
      2'd2:    return PERIOD_PS_2;
      default: return PERIOD_PS_3;
    endcase
  endfunction

  initial begin
    clk_o   = 1'b0;
    cyc     = 0;
    rot_sel = 2'd0;
    wander  = 0;
    rnd     = $urandom(SEED);
    forever begin
      if (!en) begin
        clk_o = 1'b0;
        wait (en);
      end
      cur     = rotate ? rot_sel : fsel;
      rnd     = $urandom;
      wander  = wander + (int'(rnd % 3) - 1) * WANDER_STEP_PPM;
      if (wander > WANDER_PPM)  wander = WANDER_PPM;
      if (wander < -WANDER_PPM) wander = -WANDER_PPM;
      nominal = int'((longint'(period_of(cur)) * (longint'(1000000) + longint'(wander))) / 2000000);
      for (int h = 0; h < 2; h++) begin
        rnd     = $urandom;
        half_ps = nominal + (nominal * (int'(rnd % (2 * JITTER_PERMIL + 1)) - JITTER_PERMIL)) / 1000;
        #(half_ps * 1ps);
        clk_o = ~clk_o;
      end
      cyc = cyc + 1;
      if (cyc >= ROT_CYCLES) begin
        cyc     = 0;
        rot_sel = rot_sel + 2'd1;
      end
    end
  end
endmodule
