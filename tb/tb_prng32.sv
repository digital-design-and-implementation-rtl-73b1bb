// tb_prng32: checks that the whitening PRNG starts at its seed, that each step
// request advances it by exactly 32 steps of the 32-bit LFSR with taps at bits
// 31, 21, 1 and 0 (computed here independently), that it holds its state once
// done, and that the request/acknowledge takes 3 + 32 oscillator edges.
`timescale 1ns / 1ps
module tb_prng32;
  logic        osc, rst, req, ack;
  logic [31:0] st;
  int checks = 0, failures = 0;

  prng32 dut (.osc_clk(osc), .rst(rst), .step_req(req), .step_ack(ack), .state(st));

  function automatic logic [31:0] step(logic [31:0] s);
    return {s[30:0], s[31] ^ s[21] ^ s[1] ^ s[0]};
  endfunction

  task automatic tick();
    #5 osc = 1'b1; #5 osc = 1'b0;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] e;
    int edges;
    osc = 0; rst = 0; #1 rst = 1; req = 0;
    #20 rst = 0;
    e = 32'h1;
    repeat (5) tick();
    checks++; if (st !== e) begin failures++; $display("seed %h", st); end
    for (int k = 0; k < 40; k++) begin
      req = ~req;
      edges = 0;
      while (ack != req && edges < 100) begin tick(); edges++; end
      for (int i = 0; i < 32; i++) e = step(e);
      checks++; if (st !== e) begin failures++; $display("sample %0d: %h expected %h", k, st, e); end
      checks++; if (edges != 35) begin failures++; $display("took %0d edges", edges); end
      repeat ($urandom % 10) tick();
      checks++; if (st !== e) begin failures++; $display("did not hold"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
