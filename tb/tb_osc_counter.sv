// tb_osc_counter: drives the oscillator and bus clocks by hand. Checks that the
// up and down counters count every oscillator edge, wrap modulo 2^W, and that a
// preload request is taken on the third oscillator edge after the toggle, with
// the acknowledge toggle following; also that a counter without preload
// ignores requests.
`timescale 1ns / 1ps
module tb_osc_counter;
  logic        osc, rst, req;
  logic [15:0] pdata;
  logic        ack_u, ack_d, ack_n;
  logic [15:0] cnt_u, cnt_d;
  logic [4:0]  cnt_n;
  int checks = 0, failures = 0;

  osc_counter #(.W(16), .UP(1'b1), .PRELOAD(1'b1)) u_up (
    .osc_clk(osc), .rst(rst), .preload_req(req), .preload_data(pdata), .preload_ack(ack_u), .count(cnt_u));
  osc_counter #(.W(16), .UP(1'b0), .PRELOAD(1'b1)) u_dn (
    .osc_clk(osc), .rst(rst), .preload_req(req), .preload_data(pdata), .preload_ack(ack_d), .count(cnt_d));
  osc_counter #(.W(5), .UP(1'b1), .PRELOAD(1'b0)) u_np (
    .osc_clk(osc), .rst(rst), .preload_req(req), .preload_data(pdata[4:0]), .preload_ack(ack_n), .count(cnt_n));

  task automatic pulse(int n);
    repeat (n) begin #5 osc = 1'b1; #5 osc = 1'b0; end
  endtask

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    logic [15:0] eu, ed;
    logic [4:0]  en;
    osc = 0; rst = 0; #1 rst = 1; req = 0; pdata = 0;
    #20 rst = 0;
    check("reset up", cnt_u, 0);
    check("reset down", cnt_d, 0);
    pulse(1);
    check("up +1", cnt_u, 1);
    check("down -1 wraps", cnt_d, 16'hffff);
    eu = 1; ed = 16'hffff; en = 1;
    for (int r = 0; r < 8; r++) begin
      n = 1 + ($urandom % 40);
      pulse(n);
      eu += 16'(n); ed -= 16'(n); en += 5'(n);
      check("up count", cnt_u, eu);
      check("down count", cnt_d, ed);
      check("5-bit count", cnt_n, en);
      // preload
      pdata = 16'($urandom);
      req = ~req;
      pulse(2);
      eu += 2; ed -= 2; en += 2;
      check("up before load", cnt_u, eu);
      check("ack not yet", ack_u, !req);
      pulse(1);
      eu = pdata; ed = pdata; en += 1;
      check("up loaded", cnt_u, eu);
      check("down loaded", cnt_d, ed);
      check("ack up", ack_u, req);
      check("ack down", ack_d, req);
      check("no-preload counter ignores request", cnt_n, en);
      pulse(3);
      eu += 3; ed -= 3; en += 3;
      check("up after load", cnt_u, eu);
      check("down after load", cnt_d, ed);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
