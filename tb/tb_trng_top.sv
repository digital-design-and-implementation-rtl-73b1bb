// tb_trng_top: end-to-end test of all four generators at their default sizes.
//
// Runs the reset-and-read test: all generators are reset together, released
// together and read every 20 us, four numbers per run, for eight runs; every
// run of every generator must give a different sequence (the generators
// diverge although reset and read timing are identical), and no generator may
// repeat a number within a run. Then it takes each mechanism through its paces
// and counts it: feedback preloads of every generator, the adder-shifter chip
// with feedback inhibited, with rotating oscillator frequencies, halted, and
// on external oscillators; the LFSR generators in TRNG-only, PRNG-only
// (checked against a reference) and whitened (XOR) modes; two-word reads and
// control register write/read-back; and the minimal 4-bit generator on its
// worked example. A mechanism that never happened counts as
// a failure.
`timescale 1ns / 1ps
module tb_trng_top;
  logic clk = 0, rst, irun;
  logic cs [4], rnw [4], msw [4], creg [4], ack [4], doe [4], fbv [4];
  logic [15:0] din [4], dout [4];
  logic a_obo;
  logic [3:0] a_osc_in, a_osc_out, c3_osc_out;
  logic [2:0] c1_osc_out, c2_osc_out;
  logic dp_osc = 0, dp_sample = 0, dp_valid;
  logic [3:0] dp_value;
  int n_dp = 0;
  int checks = 0, failures = 0;
  int fb_count [4] = '{0, 0, 0, 0};
  int samples [4] = '{0, 0, 0, 0};
  string gname [4] = '{"adder-shifter", "LFSR 16/13/9", "LFSR 27/13/12", "LFSR 13/11/9/7"};
  // mechanism counters
  int n_inhibit = 0, n_rotate = 0, n_halt = 0, n_ext = 0, n_prng = 0, n_xor = 0, n_ctrl = 0, n_msw = 0;

  trng_top dut (
    .clk(clk), .rst(rst), .irun(irun),
    .a_cs(cs[0]), .a_rnw(rnw[0]), .a_msw(msw[0]), .a_creg(creg[0]), .a_ack(ack[0]),
    .a_din(din[0]), .a_dout(dout[0]), .a_doe(doe[0]), .a_obo(a_obo), .a_osc_in(a_osc_in),
    .a_osc_out(a_osc_out), .a_fb(fbv[0]),
    .c1_cs(cs[1]), .c1_rnw(rnw[1]), .c1_msw(msw[1]), .c1_creg(creg[1]), .c1_ack(ack[1]),
    .c1_din(din[1]), .c1_dout(dout[1]), .c1_doe(doe[1]), .c1_osc_out(c1_osc_out), .c1_fb(fbv[1]),
    .c2_cs(cs[2]), .c2_rnw(rnw[2]), .c2_msw(msw[2]), .c2_creg(creg[2]), .c2_ack(ack[2]),
    .c2_din(din[2]), .c2_dout(dout[2]), .c2_doe(doe[2]), .c2_osc_out(c2_osc_out), .c2_fb(fbv[2]),
    .c3_cs(cs[3]), .c3_rnw(rnw[3]), .c3_msw(msw[3]), .c3_creg(creg[3]), .c3_ack(ack[3]),
    .c3_din(din[3]), .c3_dout(dout[3]), .c3_doe(doe[3]), .c3_osc_out(c3_osc_out), .c3_fb(fbv[3]),
    .dp_osc(dp_osc), .dp_sample(dp_sample), .dp_value(dp_value), .dp_valid(dp_valid));

  always #31.25 clk = ~clk;   // 16 MHz bus clock
  always @(posedge clk) for (int g = 0; g < 4; g++) if (fbv[g]) fb_count[g]++;

  task automatic access(input int g, input logic r, input logic m, input logic c,
                        input logic [15:0] d, output logic [15:0] q);
    int guard = 0;
    @(negedge clk);
    cs[g] = 1; rnw[g] = r; msw[g] = m; creg[g] = c; din[g] = d;
    while (!ack[g] && guard < 1000) begin @(negedge clk); guard++; end
    if (guard >= 1000) begin failures++; $display("%s: bus hangs", gname[g]); end
    q = dout[g];
    cs[g] = 0;
    @(negedge clk);
  endtask

  task automatic read32(input int g, output logic [31:0] v);
    logic [15:0] lo, hi;
    access(g, 1, 0, 0, 0, lo);
    access(g, 1, 1, 0, 0, hi);
    samples[g]++;
    n_msw++;
    v = {hi, lo};
  endtask

  task automatic write_ctrl(input int g, input logic [15:0] d);
    logic [15:0] q;
    access(g, 0, 0, 1, d, q);
    access(g, 1, 0, 1, 0, q);
    checks++;
    if (q !== d) begin failures++; $display("%s: control %h read back %h", gname[g], d, q); end
    n_ctrl++;
  endtask

  task automatic reset_all();
    rst = 0;
    #1 rst = 1;
    for (int g = 0; g < 4; g++) samples[g] = 0;
    #500 rst = 0;
  endtask

  function automatic logic [31:0] prng_after(int n);
    logic [31:0] s = 32'h1;
    for (int k = 0; k < 32 * n; k++) s = {s[30:0], s[31] ^ s[21] ^ s[1] ^ s[0]};
    return s;
  endfunction

  initial begin
    #30ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] runs [4][8][4];
    logic [31:0] x, y, e;
    logic [15:0] q;
    int dup_runs, dup_in_run, fb0;
    for (int g = 0; g < 4; g++) begin cs[g] = 0; rnw[g] = 1; msw[g] = 0; creg[g] = 0; din[g] = 0; end
    a_obo = 1; a_osc_in = 0; irun = 1;

    // reset-and-read: eight runs of four reads at 20 us
    for (int r = 0; r < 8; r++) begin
      reset_all();
      for (int k = 0; k < 4; k++) begin
        #20us;
        for (int g = 0; g < 4; g++) read32(g, runs[g][r][k]);
      end
    end
    for (int g = 0; g < 4; g++) begin
      dup_runs = 0; dup_in_run = 0;
      for (int r = 0; r < 8; r++) begin
        for (int s = r + 1; s < 8; s++) if (runs[g][r] == runs[g][s]) dup_runs++;
        for (int i = 0; i < 4; i++) for (int j = i + 1; j < 4; j++)
          if (runs[g][r][i] == runs[g][r][j]) dup_in_run++;
      end
      checks++; if (dup_runs != 0) begin failures++; $display("%s: %0d repeated runs", gname[g], dup_runs); end
      checks++; if (dup_in_run != 0) begin failures++; $display("%s: repeats within a run", gname[g]); end
      $display("%s run 0: %h %h %h %h", gname[g], runs[g][0][0], runs[g][0][1], runs[g][0][2], runs[g][0][3]);
    end

    // adder-shifter: feedback inhibited, then rotating frequencies, halt, external oscillators
    write_ctrl(0, 16'h0003);
    fb0 = fb_count[0];
    repeat (4) begin #20us; read32(0, x); end
    checks++; if (fb_count[0] != fb0) begin failures++; $display("feedback while inhibited"); end
    else n_inhibit++;
    write_ctrl(0, 16'h2491);          // run, every oscillator rotating
    repeat (4) begin #20us; read32(0, x); end
    checks++; if (fb_count[0] == fb0) begin failures++; $display("no feedback with rotation"); end
    else n_rotate++;
    write_ctrl(0, 16'h0002);          // halted, feedback inhibited
    #2us; read32(0, x); #20us; read32(0, y);
    checks++; if (x != y) begin failures++; $display("halted chip changes"); end
    else n_halt++;
    a_obo = 0;
    write_ctrl(0, 16'h0003);          // run on external oscillators, which are stopped
    #2us; read32(0, x); #20us; read32(0, y);
    checks++; if (x != y) begin failures++; $display("stopped external oscillators but number changed"); end
    repeat (77) begin #7 a_osc_in[0] = 1; #7 a_osc_in[0] = 0; end   // up counter +77
    read32(0, y);
    checks++; if (x == y) begin failures++; $display("external oscillator edges ignored"); end
    else n_ext++;
    a_obo = 1;

    // LFSR generators: PRNG only (exact), then whitened
    for (int g = 1; g < 4; g++) begin
      write_ctrl(g, 16'h0005);
      repeat (3) begin
        #20us;
        e = prng_after(samples[g]);
        read32(g, x);
        checks++; if (x !== e) begin failures++; $display("%s PRNG: %h expected %h", gname[g], x, e); end
        else n_prng++;
      end
      write_ctrl(g, 16'h0007);
      #20us;
      e = prng_after(samples[g]);
      read32(g, x);
      checks++; if (x == e) begin failures++; $display("%s: XOR equals PRNG", gname[g]); end
      else n_xor++;
    end

    // minimal generator: the worked example, 10 oscillations from reset give 12
    rst = 1; #100 rst = 0;
    for (int k = 1; k <= 10; k++) begin dp_sample = (k == 10); #50 dp_osc = 1; #50 dp_osc = 0; end
    dp_sample = 0;
    checks++; if (dp_value !== 4'd12) begin failures++; $display("minimal generator: %0d", dp_value); end
    else n_dp++;

    for (int g = 0; g < 4; g++) begin
      checks++; if (fb_count[g] == 0) begin failures++; $display("%s: feedback never happened", gname[g]); end
      $display("%s: %0d feedback preloads", gname[g], fb_count[g]);
    end
    $display("minimal generator samples checked: %0d", n_dp);
    $display("mechanisms: inhibit=%0d rotate=%0d halt=%0d external=%0d prng=%0d xor=%0d ctrl=%0d upper-word=%0d",
             n_inhibit, n_rotate, n_halt, n_ext, n_prng, n_xor, n_ctrl, n_msw);
    checks++; if (n_inhibit == 0 || n_rotate == 0 || n_halt == 0 || n_ext == 0 ||
                  n_prng == 0 || n_xor == 0 || n_ctrl == 0 || n_msw == 0 || n_dp == 0) begin
      failures++; $display("a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
