// tb_cltrng: drives every oscillator clock by hand and checks the
// concatenated-LFSR generator against reference LFSRs kept here (published
// taps): the number is the low bits of each LFSR, first LFSR leftmost; each
// LFSR is preloaded with its captured state bit-reversed on the third edge of
// its oscillator; the frequency selects follow the cross-coupling (oscillator
// i gets the MSB of LFSR i-1 and bit MSB-1 of LFSR i-2); the PRNG is sampled
// and then advanced 32 steps; TRNG-only, PRNG-only and XOR modes. It runs the
// default three-LFSR version (16/13/9) and the four-LFSR version (13/11/9/7).
`timescale 1ns / 1ps
module tb_cltrng;
  logic clk = 0, rst, sample, en_t, en_p;
  logic [2:0] oa;
  logic [3:0] ob;
  logic [31:0] rn_a, rn_b;
  logic va, vb, fba, fbb;
  logic [1:0] fs_a [3];
  logic [1:0] fs_b [4];
  int checks = 0, failures = 0, preloads = 0;

  cltrng dut_a (.clk(clk), .rst(rst), .osc_clk(oa), .sample(sample), .en_trng(en_t), .en_prng(en_p),
                .rn(rn_a), .rn_valid(va), .osc_fsel(fs_a), .fb_launched(fba));
  cltrng #(.NL(4), .LW({8'd13, 8'd11, 8'd9, 8'd7}), .CB({8'd11, 8'd9, 8'd7, 8'd5})) dut_b (
                .clk(clk), .rst(rst), .osc_clk(ob), .sample(sample), .en_trng(en_t), .en_prng(en_p),
                .rn(rn_b), .rn_valid(vb), .osc_fsel(fs_b), .fb_launched(fbb));

  always #5 clk = ~clk;
  always @(posedge clk) if (fba) preloads++;

  function automatic logic [31:0] step(logic [31:0] s, int w);
    int t [4];
    logic fb;
    case (w)
      7:  t = '{7, 6, 0, 0};
      9:  t = '{9, 5, 0, 0};
      11: t = '{11, 9, 0, 0};
      13: t = '{13, 4, 3, 1};
      16: t = '{16, 15, 13, 4};
      32: t = '{32, 22, 2, 1};
      default: t = '{0, 0, 0, 0};
    endcase
    fb = 1'b0;
    for (int k = 0; k < 4; k++) if (t[k] != 0) fb ^= s[t[k]-1];
    return (w == 32) ? {s[30:0], fb} : (((s << 1) | 32'(fb)) & ((32'h1 << w) - 1));
  endfunction

  function automatic logic [31:0] rev(logic [31:0] s, int w);
    logic [31:0] r = 0;
    for (int b = 0; b < w; b++) r[b] = s[w-1-b];
    return r;
  endfunction

  int          wa [3] = '{16, 13, 9};
  int          ca [3] = '{14, 11, 7};
  int          wb [4] = '{13, 11, 9, 7};
  int          cbb [4] = '{11, 9, 7, 5};
  logic [31:0] sa [3];
  logic [31:0] sb [4];
  logic [31:0] pa, pb;   // PRNG models

  task automatic edge_a(int i, int n);
    repeat (n) begin
      #3 oa[i] = 1'b1; #3 oa[i] = 1'b0;
      sa[i] = step(sa[i], wa[i]);
    end
  endtask
  task automatic edge_b(int i, int n);
    repeat (n) begin
      #3 ob[i] = 1'b1; #3 ob[i] = 1'b0;
      sb[i] = step(sb[i], wb[i]);
    end
  endtask

  task automatic take();
    @(negedge clk); sample = 1;
    @(negedge clk); sample = 0;
    @(negedge clk);
    checks++; if (!va || !vb) begin failures++; $display("rn_valid not two cycles after sample"); end
  endtask

  function automatic logic [31:0] word_a();
    return {sa[0][13:0], sa[1][10:0], sa[2][6:0]};
  endfunction
  function automatic logic [31:0] word_b();
    return {sb[0][10:0], sb[1][8:0], sb[2][6:0], sb[3][4:0]};
  endfunction

  task automatic check_fsel();
    for (int i = 0; i < 3; i++) begin
      int a = (i + 2) % 3, b = (i + 1) % 3;
      checks++;
      if (fs_a[i] !== {sa[a][wa[a]-1], sa[b][wa[b]-2]}) begin
        failures++; $display("fsel a%0d: %b expected %b%b", i, fs_a[i], sa[a][wa[a]-1], sa[b][wa[b]-2]);
      end
    end
    for (int i = 0; i < 4; i++) begin
      int a = (i + 3) % 4, b = (i + 2) % 4;
      checks++;
      if (fs_b[i] !== {sb[a][wb[a]-1], sb[b][wb[b]-2]}) begin failures++; $display("fsel b%0d", i); end
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] ea, eb, ta, tb_;
    oa = 0; ob = 0; sample = 0; en_t = 1; en_p = 0; rst = 0; #1 rst = 1;
    for (int i = 0; i < 3; i++) sa[i] = 32'(i + 1);
    for (int i = 0; i < 4; i++) sb[i] = 32'(i + 1);
    pa = 1; pb = 1;
    #30 rst = 0;
    for (int k = 0; k < 30; k++) begin
      en_t = (k % 3) != 1;     // TRNG, PRNG alone, XOR of both
      en_p = (k % 3) != 0;
      for (int i = 0; i < 3; i++) edge_a(i, 1 + $urandom % 40);
      for (int i = 0; i < 4; i++) edge_b(i, 1 + $urandom % 40);
      check_fsel();
      take();
      ta = word_a(); tb_ = word_b();
      ea = (en_t ? ta : 0) ^ (en_p ? pa : 0);
      eb = (en_t ? tb_ : 0) ^ (en_p ? pb : 0);
      checks++; if (rn_a !== ea) begin failures++; $display("A %0d: %h expected %h", k, rn_a, ea); end
      checks++; if (rn_b !== eb) begin failures++; $display("B %0d: %h expected %h", k, rn_b, eb); end
      repeat (3) @(negedge clk);
      // every LFSR: two edges while the request synchronises, the third loads
      for (int i = 0; i < 3; i++) begin
        automatic logic [31:0] cap = sa[i];
        edge_a(i, 2); #3 oa[i] = 1; #3 oa[i] = 0; sa[i] = rev(cap, wa[i]);
      end
      for (int i = 0; i < 4; i++) begin
        automatic logic [31:0] cap = sb[i];
        edge_b(i, 2); #3 ob[i] = 1; #3 ob[i] = 0; sb[i] = rev(cap, wb[i]);
      end
      // PRNG on the last oscillator: 3 edges to take the request, then 32 steps
      repeat (35) begin #3 oa[2] = 1; #3 oa[2] = 0; sa[2] = step(sa[2], 9); end
      repeat (35) begin #3 ob[3] = 1; #3 ob[3] = 0; sb[3] = step(sb[3], 7); end
      for (int j = 0; j < 32; j++) begin pa = step(pa, 32); pb = step(pb, 32); end
      repeat (3) @(negedge clk);
    end
    checks++; if (preloads != 30) begin failures++; $display("preloads %0d", preloads); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
