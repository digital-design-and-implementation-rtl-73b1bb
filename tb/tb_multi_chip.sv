// tb_multi_chip: the multi-chip reset-and-read workload. Five adder-shifter
// chips, each modelled with its own measured oscillator periods (CHIP = 1..5),
// sit on one bus clock and one reset, as on a five-chip test board. They are
// reset together, released together and read together at 20 us intervals:
// four readings per chip, then the board is reset again, for eight resets.
// Every chip runs on its on-chip oscillators and starts generating out of
// reset (irun = 1). Checks, following what such a test is meant to show:
//   - no two chips produce the same four readings after any reset;
//   - within one chip and one reset the four readings all differ;
//   - no chip repeats its own sequence after a later reset;
//   - a value may recur in the first reading after a reset, but a chip's
//     second to fourth readings never equal those of another reset.
// Each chip reads its 32-bit number as a lower-word then an upper-word read.
`timescale 1ns / 1ps
module tb_multi_chip;
  localparam int NCHIP = 5;
  localparam int NRST  = 8;
  localparam int NRD   = 4;

  logic clk = 0, rst, irun;
  logic cs [NCHIP], rnw [NCHIP], msw [NCHIP], creg [NCHIP], ack [NCHIP], doe [NCHIP], fb [NCHIP];
  logic [15:0] din [NCHIP], dout [NCHIP];
  logic [3:0]  oout [NCHIP];
  int checks = 0, failures = 0;

  for (genvar c = 0; c < NCHIP; c++) begin : g_chip
    astrng_chip #(.CHIP(c + 1)) u_chip (
      .clk(clk), .rst(rst), .irun(irun), .cs(cs[c]), .rnw(rnw[c]), .msw(msw[c]), .creg(creg[c]),
      .ack(ack[c]), .d_in(din[c]), .d_out(dout[c]), .d_oe(doe[c]), .obo(1'b1), .osc_in(4'b0),
      .osc_out(oout[c]), .fb_launched(fb[c]));
  end

  always #31.25 clk = ~clk;   // 16 MHz bus clock

  task automatic access(input int c, input logic m, output logic [15:0] q);
    @(negedge clk);
    cs[c] = 1; rnw[c] = 1; msw[c] = m; creg[c] = 0; din[c] = 0;
    while (!ack[c]) @(negedge clk);
    q = dout[c];
    cs[c] = 0;
    @(negedge clk);
  endtask

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] rd [NRST][NCHIP][NRD];

  initial begin
    irun = 1;
    for (int c = 0; c < NCHIP; c++) begin cs[c] = 0; rnw[c] = 1; msw[c] = 0; creg[c] = 0; din[c] = 0; end
    rst = 0;
    for (int r = 0; r < NRST; r++) begin
      #1 rst = 1;
      #500ns rst = 0;
      for (int k = 0; k < NRD; k++) begin
        #20us;
        // all five chips are read at the same moment
        for (int c = 0; c < NCHIP; c++) begin
          fork
            automatic int cc = c;
            automatic int kk = k;
            automatic int rr = r;
            begin
              automatic logic [15:0] lo, hi;
              access(cc, 0, lo);
              access(cc, 1, hi);
              rd[rr][cc][kk] = {hi, lo};
            end
          join_none
        end
        wait fork;
      end
      $display("reset %0d: %h %h %h %h %h", r, rd[r][0][0], rd[r][1][0], rd[r][2][0], rd[r][3][0], rd[r][4][0]);
    end

    // different chips give different streams
    for (int r = 0; r < NRST; r++)
      for (int a = 0; a < NCHIP; a++)
        for (int b = a + 1; b < NCHIP; b++) begin
          checks++;
          if (rd[r][a] == rd[r][b]) begin failures++; $display("reset %0d: chips %0d and %0d identical", r, a + 1, b + 1); end
        end
    // no repeat within one chip's four readings
    for (int r = 0; r < NRST; r++)
      for (int c = 0; c < NCHIP; c++) begin
        automatic int rep = 0;
        for (int i = 0; i < NRD; i++) for (int j = i + 1; j < NRD; j++) if (rd[r][c][i] == rd[r][c][j]) rep++;
        checks++;
        if (rep != 0) begin failures++; $display("reset %0d chip %0d: repeated reading", r, c + 1); end
      end
    // a chip never repeats itself after a later reset
    for (int c = 0; c < NCHIP; c++) begin
      automatic int same = 0, first = 0, late = 0;
      for (int r = 0; r < NRST; r++)
        for (int s = r + 1; s < NRST; s++) begin
          if (rd[r][c] == rd[s][c]) same++;
          if (rd[r][c][0] == rd[s][c][0]) first++;
          for (int k = 1; k < NRD; k++) if (rd[r][c][k] == rd[s][c][k]) late++;
        end
      $display("chip %0d: first readings repeated across resets %0d times", c + 1, first);
      checks++; if (same != 0) begin failures++; $display("chip %0d: sequence repeated after reset", c + 1); end
      checks++; if (late != 0) begin failures++; $display("chip %0d: later reading repeated after reset", c + 1); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
