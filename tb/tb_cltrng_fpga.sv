// tb_cltrng_fpga: exercises the default three-LFSR generator through its bus.
// Checks the control register after reset, that TRNG-only numbers read at
// 20 us intervals do not repeat, that in PRNG-only mode the numbers are exactly
// the 32-bit LFSR advanced 32 steps per sample from its seed (computed here),
// that XOR mode differs from both, and that the oscillators are steered
// through several frequency settings by the cross-coupled LFSR bits.
`timescale 1ns / 1ps
module tb_cltrng_fpga;
  logic clk = 0, rst, irun, cs, rnw, msw, creg, ack, doe, fb;
  logic [15:0] din, dout;
  logic [2:0]  oout;
  int checks = 0, failures = 0, samples = 0;

  cltrng_fpga dut (.clk(clk), .rst(rst), .irun(irun), .cs(cs), .rnw(rnw), .msw(msw), .creg(creg),
                   .ack(ack), .d_in(din), .d_out(dout), .d_oe(doe), .osc_out(oout), .fb_launched(fb));

  always #31.25 clk = ~clk;

  task automatic access(input logic r, input logic m, input logic c, input logic [15:0] d,
                        output logic [15:0] q);
    @(negedge clk);
    cs = 1; rnw = r; msw = m; creg = c; din = d;
    while (!ack) @(negedge clk);
    q = dout;
    cs = 0;
    @(negedge clk);
  endtask

  task automatic read32(output logic [31:0] v);
    logic [15:0] lo, hi;
    access(1, 0, 0, 0, lo);
    access(1, 1, 0, 0, hi);
    samples++;
    v = {hi, lo};
  endtask

  function automatic logic [31:0] prng_after(int n);
    logic [31:0] s = 32'h1;
    for (int k = 0; k < 32 * n; k++) s = {s[30:0], s[31] ^ s[21] ^ s[1] ^ s[0]};
    return s;
  endfunction

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %h expected %h", what, got, exp); end
  endtask

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // frequency settings seen on oscillator 0, by period
  int seen [4] = '{0, 0, 0, 0};
  initial begin
    realtime t0, t1;
    real p;
    @(negedge rst);
    @(posedge oout[0]) t0 = $realtime;
    forever begin
      @(posedge oout[0]);
      t1 = $realtime; p = t1 - t0; t0 = t1;
      if (p < 66.3) seen[0]++;
      else if (p < 75.9) seen[1]++;
      else if (p < 90.6) seen[2]++;
      else seen[3]++;
    end
  end

  initial begin
    logic [31:0] v [16];
    logic [31:0] x, e;
    logic [15:0] q;
    int dup, settings;
    cs = 0; rnw = 1; msw = 0; creg = 0; din = 0; irun = 1; rst = 0; #1 rst = 1;
    #500 rst = 0;
    access(1, 0, 1, 0, q);
    check("control after reset", q, 16'h0003);
    for (int k = 0; k < 16; k++) begin
      #20us;
      read32(v[k]);
    end
    dup = 0;
    for (int i = 0; i < 16; i++) for (int j = i + 1; j < 16; j++) if (v[i] == v[j]) dup++;
    check("no repeated TRNG numbers", dup, 0);
    access(0, 0, 1, 16'h0005, q);           // run, PRNG only
    for (int k = 0; k < 6; k++) begin
      #20us;
      e = prng_after(samples);
      read32(x);
      check("PRNG-only number", x, e);
    end
    access(0, 0, 1, 16'h0007, q);           // run, TRNG XOR PRNG
    #20us;
    e = prng_after(samples);
    read32(x);
    checks++; if (x == e) begin failures++; $display("XOR mode equals PRNG"); end
    settings = 0;
    for (int s = 0; s < 4; s++) if (seen[s] > 0) settings++;
    checks++; if (settings < 3) begin failures++; $display("only %0d frequency settings seen", settings); end
    $display("settings seen on oscillator 0: %0d %0d %0d %0d", seen[0], seen[1], seen[2], seen[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
