// tb_reset_and_read: the reset-and-read divergence workload on the full-size
// top. Each generator is reset and then read twenty times at its measurement
// interval (adder-shifter 20 us, 16/13/9-bit LFSR version 10 us, 27/13/12-bit
// and 13/11/9/7-bit versions 40 us); this is repeated for eight runs, which
// are then compared side by side. A row (the k-th reading of every run) with
// a repeated value is counted, as in the original measurements. Passing needs
// every run to differ from every other, no repeat among the readings of one
// run, and no duplicate rows after the first three readings. The duplicate-row
// count per generator is printed as the measure of divergence.
`timescale 1ns / 1ps
module tb_reset_and_read;
  logic clk = 0, rst, irun;
  logic cs [4], rnw [4], msw [4], creg [4], ack [4], doe [4], fbv [4];
  logic [15:0] din [4], dout [4];
  logic [3:0] a_osc_out, c3_osc_out;
  logic [2:0] c1_osc_out, c2_osc_out;
  logic [3:0] dp_value;
  logic dp_valid;
  int checks = 0, failures = 0;
  string gname [4] = '{"adder-shifter 20us", "LFSR 16/13/9 10us", "LFSR 27/13/12 40us", "LFSR 13/11/9/7 40us"};
  int    gap_ns [4] = '{20000, 10000, 40000, 40000};

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
    #80ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // all four generators run concurrently, each on its own interval
  logic [31:0] col [4][8][20];
  logic        done [4];

  for (genvar g = 0; g < 4; g++) begin : g_gen
    initial begin
      logic [15:0] lo, hi;
      done[g] = 0;
      cs[g] = 0; rnw[g] = 1; msw[g] = 0; creg[g] = 0; din[g] = 0;
      for (int r = 0; r < 8; r++) begin
        wait (rst == 1'b1);
        wait (rst == 1'b0);
        for (int k = 0; k < 20; k++) begin
          #(gap_ns[g] * 1ns);
          access(g, 0, lo);
          access(g, 1, hi);
          col[g][r][k] = {hi, lo};
        end
        done[g] = (r == 7);
        wait (rst == 1'b1);
      end
    end
  end

  initial begin
    int dup_rows, late_dup, same_col, in_col;
    irun = 1;
    rst = 0;
    for (int r = 0; r < 8; r++) begin
      #1 rst = 1;
      #500 rst = 0;
      #(20 * 40000 * 1ns + 100us);     // longest run: 20 readings at 40 us
    end
    wait (done[0] && done[1] && done[2] && done[3]);
    for (int g = 0; g < 4; g++) begin
      dup_rows = 0; late_dup = 0; same_col = 0; in_col = 0;
      for (int k = 0; k < 20; k++) begin
        automatic int d = 0;
        for (int r = 0; r < 8; r++) for (int s = r + 1; s < 8; s++) if (col[g][r][k] == col[g][s][k]) d++;
        if (d != 0) begin dup_rows++; if (k >= 3) late_dup++; end
      end
      for (int r = 0; r < 8; r++) begin
        for (int s = r + 1; s < 8; s++) if (col[g][r] == col[g][s]) same_col++;
        for (int i = 0; i < 20; i++) for (int j = i + 1; j < 20; j++) if (col[g][r][i] == col[g][r][j]) in_col++;
      end
      $display("%s: rows with duplicates %0d of 20; first row %h %h %h %h", gname[g], dup_rows,
               col[g][0][0], col[g][1][0], col[g][2][0], col[g][3][0]);
      checks++; if (same_col != 0) begin failures++; $display("  %0d identical runs", same_col); end
      checks++; if (in_col != 0) begin failures++; $display("  %0d repeats within a run", in_col); end
      checks++; if (late_dup != 0) begin failures++; $display("  duplicates after the third reading"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
