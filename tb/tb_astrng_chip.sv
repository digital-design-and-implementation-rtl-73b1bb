// tb_astrng_chip: exercises the adder-shifter chip through its 16-bit bus, the
// way a host does. With the on-chip oscillators it reads numbers at 20 us
// intervals and checks that they do not repeat and that feedback happens; it
// checks the control register, that clearing run stops the oscillators (and so
// freezes the numbers), that a fixed setting gives the expected oscillator
// period, and, with the external oscillator inputs driven edge by edge, that
// each number equals the reference rotate-and-transpose of the known counts.
// Every 32-bit read also checks the bus latency: ack at the fourth clock edge
// for the lower word (sample, capture, result register, ack) and at the first
// for the upper word.
`timescale 1ns / 1ps
module tb_astrng_chip;
  logic clk = 0, rst, irun, cs, rnw, msw, creg, ack, doe, obo, fb;
  logic [15:0] din, dout;
  logic [3:0]  oin, oout;
  int checks = 0, failures = 0, fb_count = 0;

  astrng_chip dut (.clk(clk), .rst(rst), .irun(irun), .cs(cs), .rnw(rnw), .msw(msw), .creg(creg),
                   .ack(ack), .d_in(din), .d_out(dout), .d_oe(doe), .obo(obo), .osc_in(oin),
                   .osc_out(oout), .fb_launched(fb));

  always #31.25 clk = ~clk;   // 16 MHz bus clock
  always @(posedge clk) if (fb) fb_count++;

  int last_lat;   // clock edges from raising cs to seeing ack

  task automatic access(input logic r, input logic m, input logic c, input logic [15:0] d,
                        output logic [15:0] q);
    @(negedge clk);
    cs = 1; rnw = r; msw = m; creg = c; din = d;
    last_lat = 0;
    while (!ack) begin @(negedge clk); last_lat++; end
    q = dout;
    cs = 0;
    @(negedge clk);
  endtask

  task automatic read32(output logic [31:0] v);
    logic [15:0] lo, hi;
    access(1, 0, 0, 0, lo);
    check("lower-word read latency", last_lat, 4);
    access(1, 1, 0, 0, hi);
    check("upper-word read latency", last_lat, 1);
    v = {hi, lo};
  endtask

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %h expected %h", what, got, exp); end
  endtask

  function automatic logic [31:0] ref_rn(logic [15:0] u, logic [15:0] d, int sh, int tr);
    logic [31:0] w, r;
    int g;
    w = {u, d};
    for (int k = 0; k < sh; k++) w = {w[30:0], w[31]};
    g = 32 >> tr;
    for (int i = 0; i < 32; i++) r[i] = w[(i / g) * g + (g - 1 - (i % g))];
    return r;
  endfunction

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] v [20];
    logic [31:0] a, b;
    logic [15:0] q;
    realtime t0, t1;
    int dup;
    logic [15:0] up, dn;
    int sh, tr, n0, n1, n2, n3;
    cs = 0; rnw = 1; msw = 0; creg = 0; din = 0; obo = 1; oin = 0; irun = 1; rst = 0; #1 rst = 1;
    #500 rst = 0;
    access(1, 0, 1, 0, q);
    check("control after reset (run)", q, 16'h0001);
    // numbers from the running chip
    for (int k = 0; k < 20; k++) begin
      #20us;
      read32(v[k]);
    end
    dup = 0;
    for (int i = 0; i < 20; i++) for (int j = i + 1; j < 20; j++) if (v[i] == v[j]) dup++;
    check("no repeated numbers", dup, 0);
    checks++; if (fb_count < 15) begin failures++; $display("feedback %0d times", fb_count); end
    // fixed setting 3 on oscillator 0: period near 98 ns
    access(0, 0, 1, 16'h000d, q);          // run, osc0 fixed setting 3
    access(1, 0, 1, 0, q);
    check("control read back", q, 16'h000d);
    repeat (4) @(posedge oout[0]);
    t0 = $realtime;
    repeat (32) @(posedge oout[0]);
    t1 = $realtime;
    checks++;
    if ((t1 - t0) / 32 < 95.5 || (t1 - t0) / 32 > 100.5) begin
      failures++; $display("osc0 period %0.2f ns", (t1 - t0) / 32);
    end
    // run cleared, feedback inhibited: the counters stop, numbers repeat
    access(0, 0, 1, 16'h0002, q);
    #2us;
    read32(a);
    #20us;
    read32(b);
    check("halted chip repeats", b, a);
    checks++; if (oout !== 4'b0) begin failures++; $display("oscillators run while halted"); end
    // external oscillators, driven edge by edge
    obo = 0;
    rst = 1; irun = 0; #200 rst = 0;
    access(0, 0, 1, 16'h0003, q);          // run, inhibit feedback
    up = 0; dn = 0; sh = 0; tr = 0;
    for (int k = 0; k < 12; k++) begin
      n0 = $urandom % 300; n1 = $urandom % 300; n2 = $urandom % 60; n3 = $urandom % 7;
      repeat (n0) begin #7 oin[0] = 1; #7 oin[0] = 0; end
      repeat (n1) begin #7 oin[1] = 1; #7 oin[1] = 0; end
      repeat (n2) begin #7 oin[2] = 1; #7 oin[2] = 0; end
      repeat (n3) begin #7 oin[3] = 1; #7 oin[3] = 0; end
      up += 16'(n0); dn -= 16'(n1); sh = (sh + n2) % 32; tr = (tr + n3) % 4;
      read32(a);
      check("external-oscillator number", a, ref_rn(up, dn, sh, tr));
    end
    $display("feedback preloads: %0d", fb_count);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
