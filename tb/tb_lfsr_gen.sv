// tb_lfsr_gen: checks that the LFSR lengths used by the generators are maximal
// length (the state returns to its start only after 2^W-1 steps and never
// reaches zero), that every step matches a reference register built from the
// published tap list, and that a preload is taken on the third oscillator edge
// after the request toggle.
`timescale 1ns / 1ps
module tb_lfsr_gen;
  logic osc, rst, req;
  int checks = 0, failures = 0;

  logic [6:0]  s7;   logic [8:0]  s9;   logic [10:0] s11;
  logic [11:0] s12;  logic [12:0] s13;  logic [15:0] s16;
  logic [12:0] pd13;
  logic        a7, a9, a11, a12, a13, a16;

  lfsr_gen #(.W(7))  u7  (.osc_clk(osc), .rst(rst), .preload_req(1'b0), .preload_data('0), .preload_ack(a7),  .state(s7));
  lfsr_gen #(.W(9))  u9  (.osc_clk(osc), .rst(rst), .preload_req(1'b0), .preload_data('0), .preload_ack(a9),  .state(s9));
  lfsr_gen #(.W(11)) u11 (.osc_clk(osc), .rst(rst), .preload_req(1'b0), .preload_data('0), .preload_ack(a11), .state(s11));
  lfsr_gen #(.W(12)) u12 (.osc_clk(osc), .rst(rst), .preload_req(1'b0), .preload_data('0), .preload_ack(a12), .state(s12));
  lfsr_gen #(.W(13)) u13 (.osc_clk(osc), .rst(rst), .preload_req(req),  .preload_data(pd13), .preload_ack(a13), .state(s13));
  lfsr_gen #(.W(16)) u16 (.osc_clk(osc), .rst(rst), .preload_req(1'b0), .preload_data('0), .preload_ack(a16), .state(s16));

  // Reference: published taps, numbered from 1.
  function automatic logic [31:0] ref_step(logic [31:0] s, int w);
    int t [4];
    logic fb;
    case (w)
      7:  t = '{7, 6, 0, 0};
      9:  t = '{9, 5, 0, 0};
      11: t = '{11, 9, 0, 0};
      12: t = '{12, 6, 4, 1};
      13: t = '{13, 4, 3, 1};
      16: t = '{16, 15, 13, 4};
      default: t = '{0, 0, 0, 0};
    endcase
    fb = 1'b0;
    for (int k = 0; k < 4; k++) if (t[k] != 0) fb ^= s[t[k]-1];
    return ((s << 1) | 32'(fb)) & ((32'h1 << w) - 1);
  endfunction

  task automatic tick();
    #5 osc = 1'b1; #5 osc = 1'b0;
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] r7, r9, r11, r12, r13, r16;
    int p7, p9, p11, p12, p13, p16, bad;
    osc = 0; rst = 0; #1 rst = 1; req = 0; pd13 = '0;
    #20 rst = 0;
    r7 = 1; r9 = 1; r11 = 1; r12 = 1; r13 = 1; r16 = 1;
    p7 = 0; p9 = 0; p11 = 0; p12 = 0; p13 = 0; p16 = 0; bad = 0;
    for (int n = 1; n <= 65535; n++) begin
      tick();
      r7 = ref_step(r7, 7);   r9 = ref_step(r9, 9);   r11 = ref_step(r11, 11);
      r12 = ref_step(r12, 12); r13 = ref_step(r13, 13); r16 = ref_step(r16, 16);
      if (32'(s7) != r7 || 32'(s9) != r9 || 32'(s11) != r11 ||
          32'(s12) != r12 || 32'(s13) != r13 || 32'(s16) != r16) bad++;
      if (s7 == 1 && p7 == 0) p7 = n;
      if (s9 == 1 && p9 == 0) p9 = n;
      if (s11 == 1 && p11 == 0) p11 = n;
      if (s12 == 1 && p12 == 0) p12 = n;
      if (s13 == 1 && p13 == 0) p13 = n;
      if (s16 == 1 && p16 == 0) p16 = n;
    end
    checks++; if (bad != 0) begin failures++; $display("%0d steps differ from reference", bad); end
    checks++; if (p7 != 127) begin failures++; $display("period 7: %0d", p7); end
    checks++; if (p9 != 511) begin failures++; $display("period 9: %0d", p9); end
    checks++; if (p11 != 2047) begin failures++; $display("period 11: %0d", p11); end
    checks++; if (p12 != 4095) begin failures++; $display("period 12: %0d", p12); end
    checks++; if (p13 != 8191) begin failures++; $display("period 13: %0d", p13); end
    checks++; if (p16 != 65535) begin failures++; $display("period 16: %0d", p16); end
    // preload of the 13-bit register
    for (int k = 0; k < 6; k++) begin
      r13 = 32'(s13);
      pd13 = 13'($urandom) | 13'h1;
      req = ~req;
      tick(); r13 = ref_step(r13, 13);
      tick(); r13 = ref_step(r13, 13);
      checks++; if (32'(s13) != r13) begin failures++; $display("stepping before load"); end
      tick();
      checks++; if (s13 != pd13 || a13 != req) begin failures++; $display("load: %h vs %h", s13, pd13); end
      tick();
      checks++; if (32'(s13) != ref_step(32'(pd13), 13)) begin failures++; $display("step after load"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
