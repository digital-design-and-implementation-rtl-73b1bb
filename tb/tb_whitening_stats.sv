// tb_whitening_stats: a reduced statistical workload on the 16/13/9-bit
// concatenated-LFSR generator of the full-size top. The generator is read
// N times at 10 us intervals in each of its three output modes (raw TRNG,
// PRNG alone, TRNG XOR PRNG), selected by writing the control register. On
// each stream it computes three statistics on the bit sequence (each 32-bit
// number MSB first):
//   - frequency (monobit): s = |#ones - #zeros| / sqrt(n);
//   - per-bit-position balance: largest |ones - N/2| over the 32 positions,
//     in standard deviations (sqrt(N)/2);
//   - runs: z = |V - 2 n p (1-p)| / (2 sqrt(2n) p (1-p)), V = number of runs.
// All three are near-normal deviates for random data. The PRNG and the
// whitened stream must stay below 3.9 (a two-sided p-value of about 1e-4),
// loose enough that a good stream practically never fails while a stuck or
// biased bit does. The raw TRNG statistics are printed for comparison only:
// an unwhitened generator of this kind can show some bias.
`timescale 1ns / 1ps
module tb_whitening_stats;
  localparam int N     = 1024;     // readings per mode
  localparam real LIMIT = 3.9;

  logic clk = 0, rst, irun;
  logic cs [4], rnw [4], msw [4], creg [4], ack [4], doe [4], fbv [4];
  logic [15:0] din [4], dout [4];
  logic [3:0] a_osc_out, c3_osc_out;
  logic [2:0] c1_osc_out, c2_osc_out;
  logic [3:0] dp_value;
  logic dp_valid;
  int checks = 0, failures = 0;

  trng_top dut (
    .clk(clk), .rst(rst), .irun(irun),
    .a_cs(cs[0]), .a_rnw(rnw[0]), .a_msw(msw[0]), .a_creg(creg[0]), .a_ack(ack[0]),
    .a_din(din[0]), .a_dout(dout[0]), .a_doe(doe[0]), .a_obo(1'b1), .a_osc_in(4'b0),
    .a_osc_out(a_osc_out), .a_fb(fbv[0]),
    .c1_cs(cs[1]), .c1_rnw(rnw[1]), .c1_msw(msw[1]), .c1_creg(creg[1]), .c1_ack(ack[1]),
    .c1_din(din[1]), .c1_dout(dout[1]), .c1_doe(doe[1]), .c1_osc_out(c1_osc_out), .c1_fb(fbv[1]),
    .c2_cs(cs[2]), .c2_rnw(rnw[2]), .c2_msw(msw[2]), .c2_creg(creg[2]), .c2_ack(ack[2]),
    .c2_din(din[2]), .c2_dout(dout[2]), .c2_doe(doe[2]), .c2_osc_out(c2_osc_out), .c2_fb(fbv[2]),
    .c3_cs(cs[3]), .c3_rnw(rnw[3]), .c3_msw(msw[3]), .c3_creg(creg[3]), .c3_ack(ack[3]),
    .c3_din(din[3]), .c3_dout(dout[3]), .c3_doe(doe[3]), .c3_osc_out(c3_osc_out), .c3_fb(fbv[3]),
    .dp_osc(1'b0), .dp_sample(1'b0), .dp_value(dp_value), .dp_valid(dp_valid));

  always #31.25 clk = ~clk;   // 16 MHz bus clock

  task automatic access(input logic r, input logic m, input logic c, input logic [15:0] d,
                        output logic [15:0] q);
    @(negedge clk);
    cs[1] = 1; rnw[1] = r; msw[1] = m; creg[1] = c; din[1] = d;
    while (!ack[1]) @(negedge clk);
    q = dout[1];
    cs[1] = 0;
    @(negedge clk);
  endtask

  initial begin
    #60ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] buffer [N];

  // frequency, worst bit position and runs statistics of buffer[]
  task automatic stats(output real s_freq, output real s_pos, output real s_runs);
    automatic longint ones = 0, runs = 1, n = 32 * N;
    automatic int     pos [32];
    automatic logic   prev = buffer[0][31];
    real p;
    foreach (pos[b]) pos[b] = 0;
    s_pos = 0.0;
    for (int i = 0; i < N; i++)
      for (int b = 31; b >= 0; b--) begin
        if (buffer[i][b]) begin ones++; pos[b]++; end
        if (!(i == 0 && b == 31) && buffer[i][b] != prev) runs++;
        prev = buffer[i][b];
      end
    s_freq = (real'(2 * ones - n) < 0 ? -real'(2 * ones - n) : real'(2 * ones - n)) / $sqrt(real'(n));
    foreach (pos[b]) begin
      automatic real d = (real'(pos[b]) - real'(N) / 2.0) / ($sqrt(real'(N)) / 2.0);
      if (d < 0) d = -d;
      if (d > s_pos) s_pos = d;
    end
    p = real'(ones) / real'(n);
    s_runs = (real'(runs) - 2.0 * real'(n) * p * (1.0 - p)) / (2.0 * $sqrt(2.0 * real'(n)) * p * (1.0 - p));
    if (s_runs < 0) s_runs = -s_runs;
  endtask

  initial begin
    string       mname [3] = '{"raw TRNG", "PRNG alone", "TRNG xor PRNG"};
    logic [2:0]  mreg  [3] = '{3'b011, 3'b101, 3'b111};   // {en_prng, en_trng, run}
    logic [15:0] lo, hi;
    real         sf, sp, sr;
    irun = 1;
    for (int g = 0; g < 4; g++) begin cs[g] = 0; rnw[g] = 1; msw[g] = 0; creg[g] = 0; din[g] = 0; end
    rst = 0;
    #1 rst = 1;
    #500ns rst = 0;
    for (int m = 0; m < 3; m++) begin
      access(0, 0, 1, {13'b0, mreg[m]}, lo);
      access(1, 0, 1, 16'h0, lo);
      checks++; if (lo[2:0] !== mreg[m]) begin failures++; $display("mode write read back %b", lo[2:0]); end
      for (int i = 0; i < N; i++) begin
        #10us;
        access(1, 0, 0, 0, lo);
        access(1, 1, 0, 0, hi);
        buffer[i] = {hi, lo};
      end
      stats(sf, sp, sr);
      $display("%-14s: %0d bits, frequency %0.2f, worst bit position %0.2f, runs %0.2f",
               mname[m], 32 * N, sf, sp, sr);
      if (m != 0) begin
        checks++; if (sf > LIMIT) begin failures++; $display("  frequency statistic too large"); end
        checks++; if (sp > LIMIT + 1.0) begin failures++; $display("  a bit position is biased"); end
        checks++; if (sr > LIMIT) begin failures++; $display("  runs statistic too large"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
