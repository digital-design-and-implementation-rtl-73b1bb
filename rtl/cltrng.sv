// cltrng: concatenated-LFSR true random number generator (datapath).
//
// NL maximal-length LFSRs of different lengths LW[i], each clocked by its own
// ring oscillator, run freely. A random number is the concatenation of the low
// CB[i] bits of every LFSR, LFSR 0 in the most significant position. The two
// top bits of every LFSR are not part of the number; they drive the frequency
// selects of the other LFSRs' oscillators, so the oscillators keep changing
// frequency: oscillator i takes fsel[1] from the MSB of LFSR (i-1) mod NL and
// fsel[0] from bit MSB-1 of LFSR (i-2) mod NL. No oscillator is steered by its
// own LFSR. At each sample the full state of every LFSR is captured, and each
// LFSR is preloaded with its captured state bit-reversed: a permutation of its
// own bits, which sends it to another point of its sequence and can never be
// the all-zero lock-up state. A 32-bit whitening PRNG (prng32), clocked by the
// oscillator of the last LFSR, is sampled at the same time and then stepped 32
// times. The output is (TRNG if en_trng) XOR (PRNG if en_prng).
//
// Default: the three-LFSR version with 16-, 13- and 9-bit LFSRs contributing
// 14, 11 and 7 bits. Timing: sample (one clk cycle) -> rn_valid two clk cycles
// later. A preload or PRNG step is launched at rn_valid if the previous one has
// been acknowledged, otherwise it is skipped for that sample. The bit-reversal
// scramble, the order of the control bits and the skip rule are this design's
// choices.
`timescale 1ns / 1ps
module cltrng
  import trng_pkg::*;
#(
  parameter int              NL = 3,
  parameter logic [8*NL-1:0] LW = {8'd16, 8'd13, 8'd9},  // LFSR lengths, LFSR 0 first
  parameter logic [8*NL-1:0] CB = {8'd14, 8'd11, 8'd7}   // bits each contributes
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [NL-1:0]   osc_clk,
  input  logic            sample,
  input  logic            en_trng,
  input  logic            en_prng,
  output logic [RN_W-1:0] rn,
  output logic            rn_valid,
  output logic [1:0]      osc_fsel [NL],
  output logic            fb_launched
);
  localparam int MAXW = 32;

  // Length and contribution of LFSR i (element 0 is the leftmost byte).
  function automatic int lw(input int i);
    return int'(LW[8*(NL-1-i) +: 8]);
  endfunction
  function automatic int cb(input int i);
    return int'(CB[8*(NL-1-i) +: 8]);
  endfunction

  // Bit position of LFSR i's contribution inside the random number.
  function automatic int lsb_of(input int i);
    int s = 0;
    for (int j = i + 1; j < NL; j++) s += cb(j);
    return s;
  endfunction

  function automatic int total_bits();
    int s = 0;
    for (int j = 0; j < NL; j++) s += cb(j);
    return s;
  endfunction

  // Preload scramble: bit-reverse the low w bits of a captured state.
  function automatic logic [MAXW-1:0] scramble(input logic [MAXW-1:0] v, input int w);
    logic [MAXW-1:0] r = '0;
    for (int b = 0; b < MAXW; b++)
      if (b < w) r[b] = v[w-1-b];
    return r;
  endfunction

  logic [MAXW-1:0] st   [NL];   // live LFSR states, zero-extended
  logic [MAXW-1:0] lat  [NL];   // captured states
  logic [MAXW-1:0] pl   [NL];   // preload data (scrambled capture)
  logic [NL-1:0]   ack, ack_s;
  logic            req, prng_req, prng_ack, prng_ack_s, lat_valid;
  logic [31:0]     prng_st, prng_lat, trng_word;

  for (genvar i = 0; i < NL; i++) begin : g_lfsr
    localparam int W = lw(i);
    localparam int C = cb(i);
    logic [W-1:0] s;
    logic [W-1:0] pd;
    assign pd = pl[i][W-1:0];
    lfsr_gen #(.W(W), .SEED(W'(i + 1))) u_lfsr (
      .osc_clk(osc_clk[i]), .rst(rst), .preload_req(req), .preload_data(pd),
      .preload_ack(ack[i]), .state(s));
    assign st[i] = MAXW'(s);
    sync_2ff u_ack (.clk(clk), .rst(rst), .d(ack[i]), .q(ack_s[i]));

    // Cross-coupled frequency control of oscillator i.
    localparam int A = (i + NL - 1) % NL;
    localparam int B = (i + NL - 2) % NL;
    assign osc_fsel[i] = {st[A][lw(A)-1], st[B][lw(B)-2]};

    // Contribution to the random number.
    assign trng_word[lsb_of(i) +: C] = lat[i][C-1:0];
  end

  prng32 u_prng (.osc_clk(osc_clk[NL-1]), .rst(rst), .step_req(prng_req),
                 .step_ack(prng_ack), .state(prng_st));
  sync_2ff u_prng_ack (.clk(clk), .rst(rst), .d(prng_ack), .q(prng_ack_s));

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      lat_valid <= 1'b0;
      prng_lat  <= '0;
      for (int i = 0; i < NL; i++) lat[i] <= '0;
    end else begin
      lat_valid <= sample;
      if (sample) begin
        prng_lat <= prng_st;
        for (int i = 0; i < NL; i++) lat[i] <= st[i];
      end
    end
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      rn          <= '0;
      rn_valid    <= 1'b0;
      req         <= 1'b0;
      prng_req    <= 1'b0;
      fb_launched <= 1'b0;
      for (int i = 0; i < NL; i++) pl[i] <= '0;
    end else begin
      rn_valid    <= lat_valid;
      fb_launched <= 1'b0;
      if (lat_valid) begin
        rn <= (en_trng ? trng_word : '0) ^ (en_prng ? prng_lat : '0);
        if (ack_s == {NL{req}}) begin
          for (int i = 0; i < NL; i++) pl[i] <= scramble(lat[i], lw(i));
          req         <= ~req;
          fb_launched <= 1'b1;
        end
        if (prng_ack_s == prng_req) prng_req <= ~prng_req;
      end
    end
  end

  initial assert (total_bits() == RN_W)
    else $error("cltrng: contributions add up to %0d bits, not %0d", total_bits(), RN_W);
  for (genvar i = 0; i < NL; i++) begin : g_chk
    initial assert (cb(i) + 2 <= lw(i) && lw(i) <= MAXW)
      else $error("cltrng: LFSR %0d too short for its contribution", i);
  end
endmodule
