// tb_divergence_histogram: the continuous form of the reset-and-read
// workload on the full-size top, for the 16/13/9-bit three-LFSR generator and
// the 13/11/9/7-bit four-LFSR generator. One group is eight runs of
// reset-then-twenty-readings; for each group the number of rows (k-th reading
// of every run) that hold a repeated value is counted, and the counts of
// GROUPS groups are collected into a 21-bin histogram (0..20 duplicate rows).
// This is done at a 40 us and at a 100 us reading interval. The histograms and
// their means are printed as the divergence measure. Checks: every group
// diverges (no duplicate row after the third reading, no two identical runs),
// and the histograms account for every group. The expected trends (fewer
// duplicate rows at 100 us than at 40 us, fewer with four LFSRs than with
// three) are printed, not enforced, since they are statistical.
`timescale 1ns / 1ps
module tb_divergence_histogram;
  localparam int GROUPS = 6;
  localparam int NRUN   = 8;
  localparam int NRD    = 20;

  logic clk = 0, rst, irun;
  logic cs [4], rnw [4], msw [4], creg [4], ack [4], doe [4], fbv [4];
  logic [15:0] din [4], dout [4];
  logic [3:0] a_osc_out, c3_osc_out;
  logic [2:0] c1_osc_out, c2_osc_out;
  logic [3:0] dp_value;
  logic dp_valid;
  int checks = 0, failures = 0;
  int gap_ns;

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

  task automatic access(input int g, input logic m, output logic [15:0] q);
    @(negedge clk);
    cs[g] = 1; rnw[g] = 1; msw[g] = m; creg[g] = 0; din[g] = 0;
    while (!ack[g]) @(negedge clk);
    q = dout[g];
    cs[g] = 0;
    @(negedge clk);
  endtask

  initial begin
    #250ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] col [4][NRUN][NRD];
  int          hist [2][4][NRD+1];   // [interval][generator][duplicate rows]

  // one run: reset, then NRD readings of generators 1 and 3 side by side
  task automatic one_run(input int r);
    rst = 1;
    #500ns rst = 0;
    fork
      for (int k = 0; k < NRD; k++) begin
        logic [15:0] lo, hi;
        #(gap_ns * 1ns);
        access(1, 0, lo); access(1, 1, hi);
        col[1][r][k] = {hi, lo};
      end
      for (int k = 0; k < NRD; k++) begin
        logic [15:0] lo, hi;
        #(gap_ns * 1ns);
        access(3, 0, lo); access(3, 1, hi);
        col[3][r][k] = {hi, lo};
      end
    join
  endtask

  // count rows with a duplicate in one group; check divergence
  task automatic score(input int iv, input int g);
    automatic int rows = 0, late = 0, same = 0;
    for (int k = 0; k < NRD; k++) begin
      automatic int d = 0;
      for (int r = 0; r < NRUN; r++) for (int s = r + 1; s < NRUN; s++) if (col[g][r][k] == col[g][s][k]) d++;
      if (d != 0) begin rows++; if (k >= 3) late++; end
    end
    for (int r = 0; r < NRUN; r++) for (int s = r + 1; s < NRUN; s++) if (col[g][r] == col[g][s]) same++;
    hist[iv][g][rows]++;
    checks++; if (late != 0) begin failures++; $display("generator %0d: duplicate row after the third reading", g); end
    checks++; if (same != 0) begin failures++; $display("generator %0d: identical runs", g); end
  endtask

  initial begin
    int   tot;
    real  mean [2][4];
    int   ivs [2] = '{40000, 100000};
    irun = 1;
    for (int g = 0; g < 4; g++) begin cs[g] = 0; rnw[g] = 1; msw[g] = 0; creg[g] = 0; din[g] = 0; end
    foreach (hist[a, b, c]) hist[a][b][c] = 0;
    rst = 0;
    #1;
    for (int iv = 0; iv < 2; iv++) begin
      gap_ns = ivs[iv];
      for (int grp = 0; grp < GROUPS; grp++) begin
        for (int r = 0; r < NRUN; r++) one_run(r);
        score(iv, 1);
        score(iv, 3);
      end
    end
    for (int iv = 0; iv < 2; iv++) begin
      for (int g = 1; g < 4; g += 2) begin
        automatic string line = "";
        tot = 0; mean[iv][g] = 0.0;
        for (int b = 0; b <= NRD; b++) begin
          tot += hist[iv][g][b];
          mean[iv][g] += real'(b * hist[iv][g][b]);
          line = {line, $sformatf(" %0d", hist[iv][g][b])};
        end
        mean[iv][g] /= real'(GROUPS);
        $display("%s at %0d us: histogram of duplicate rows per group:%s  mean %0.2f",
                 (g == 1) ? "3-LFSR 16/13/9" : "4-LFSR 13/11/9/7", ivs[iv] / 1000, line, mean[iv][g]);
        checks++; if (tot != GROUPS) begin failures++; $display("  histogram lost groups"); end
      end
    end
    $display("trend 40 us -> 100 us: 3-LFSR %0.2f -> %0.2f, 4-LFSR %0.2f -> %0.2f",
             mean[0][1], mean[1][1], mean[0][3], mean[1][3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
