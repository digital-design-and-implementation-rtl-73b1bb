// tb_rng_bus_port: runs the 16-bit bus against a stand-in generator that
// answers each sample with a known number after a random delay. Checks the
// control register reset value, write and read-back, the lower-word read
// (one sample, bits 15:0), the upper-word read (bits 31:16 from the latch, no
// new sample), that a data write has no effect and that ack follows cs.
`timescale 1ns / 1ps
module tb_rng_bus_port;
  logic        clk = 0, rst;
  logic        cs, rnw, msw, creg, ack, sample, rn_valid;
  logic [15:0] din, dout;
  logic [13:0] ctrl;
  logic [31:0] rn;
  int checks = 0, failures = 0, samples = 0, lat;

  rng_bus_port #(.CW(14)) dut (
    .clk(clk), .rst(rst), .ctrl_init(14'h2a5), .cs(cs), .rnw(rnw), .msw(msw), .creg(creg),
    .din(din), .dout(dout), .ack(ack), .ctrl(ctrl), .sample(sample), .rn(rn), .rn_valid(rn_valid));

  always #5 clk = ~clk;

  // stand-in generator: number k is 32'hA5000000 + k * 32'h00010001
  initial begin
    rn_valid = 0; rn = 0;
    forever begin
      @(posedge clk);
      if (sample) begin
        samples++;
        repeat ($urandom % 5 + 1) @(posedge clk);
        rn <= 32'hA500_0000 + 32'(samples) * 32'h0001_0001;
        rn_valid <= 1'b1;
        @(posedge clk);
        rn_valid <= 1'b0;
      end
    end
  end

  task automatic access(input logic r, input logic m, input logic c, input logic [15:0] d,
                        output logic [15:0] q, output int cycles);
    @(negedge clk);
    cs = 1; rnw = r; msw = m; creg = c; din = d;
    cycles = 0;
    while (!ack) begin @(negedge clk); cycles++; end
    q = dout;
    cs = 0;
    @(negedge clk);
    checks++; if (ack) begin failures++; $display("ack stays after cs drops"); end
  endtask

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %h expected %h", what, got, exp); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] q;
    int cyc;
    cs = 0; rnw = 1; msw = 0; creg = 0; din = 0; rst = 0; #1 rst = 1;
    repeat (3) @(posedge clk);
    rst = 0;
    check("ctrl after reset", ctrl, 14'h2a5);
    access(1, 0, 1, 0, q, cyc);
    check("ctrl read", q, 16'h02a5);
    check("ctrl read latency", cyc, 1);
    access(0, 0, 1, 16'hffff, q, cyc);
    check("ctrl write", ctrl, 14'h3fff);
    access(0, 0, 1, 16'h1234, q, cyc);
    check("ctrl write 2", ctrl, 14'h1234);
    access(1, 0, 1, 0, q, cyc);
    check("ctrl read back", q, 16'h1234);
    for (int k = 1; k <= 10; k++) begin
      access(1, 0, 0, 0, q, cyc);
      check("lower word", q, 16'(k));
      check("one sample per lower read", samples, k);
      access(1, 1, 0, 0, q, cyc);
      check("upper word", q, 16'hA500 + 16'(k));
      check("upper read takes no sample", samples, k);
      check("upper read latency", cyc, 1);
      access(1, 1, 0, 0, q, cyc);
      check("upper word again", q, 16'hA500 + 16'(k));
    end
    access(0, 0, 0, 16'hbeef, q, cyc);
    check("data write ignored: ctrl", ctrl, 14'h1234);
    check("data write ignored: no sample", samples, 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
