// tb_astrng_core: drives the four oscillator clocks by hand so that every count
// is known, and checks each random number against a reference computed here:
// the word {up, down} rotated left by the shift count, then bit-reversed within
// 32/16/8/4-bit groups by the transpose count. Checks the feedback: the number
// is preloaded into the up (bits 31:16) and down (bits 15:0) counters on the
// third oscillator edge after it appears, and nothing is preloaded while
// inhibit_fb is set. Also checks the two-cycle sample-to-rn latency.
`timescale 1ns / 1ps
module tb_astrng_core;
  logic clk = 0, rst, cu, cd, csh, ctr, sample, inhibit, rn_valid, fb;
  logic [31:0] rn;
  int checks = 0, failures = 0, fb_count = 0;

  astrng_core dut (.clk(clk), .rst(rst), .clk_up(cu), .clk_dn(cd), .clk_sh(csh), .clk_tr(ctr),
                   .sample(sample), .inhibit_fb(inhibit), .rn(rn), .rn_valid(rn_valid),
                   .fb_launched(fb));

  always #5 clk = ~clk;
  always @(posedge clk) if (fb) fb_count++;

  function automatic logic [31:0] ref_rn(logic [15:0] u, logic [15:0] d, int sh, int tr);
    logic [31:0] w, r;
    int g;
    w = {u, d};
    for (int k = 0; k < sh; k++) w = {w[30:0], w[31]};
    g = 32 >> tr;                       // group size 32, 16, 8, 4
    for (int i = 0; i < 32; i++) r[i] = w[(i / g) * g + (g - 1 - (i % g))];
    return r;
  endfunction

  task automatic osc_edges(ref logic c, input int n);
    repeat (n) begin #3 c = 1'b1; #3 c = 1'b0; end
  endtask

  task automatic take(output logic [31:0] v, output int lat);
    @(negedge clk); sample = 1;
    @(negedge clk); sample = 0;
    lat = 1;
    while (!rn_valid) begin @(negedge clk); lat++; end
    v = rn;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] up, dn;
    int sh, tr, nu, nd, ns, nt, lat, fb0;
    logic [31:0] v, e;
    cu = 0; cd = 0; csh = 0; ctr = 0; sample = 0; inhibit = 1; rst = 0; #1 rst = 1;
    #30 rst = 0;
    up = 0; dn = 0; sh = 0; tr = 0;
    // Phase 1: no feedback; counts are the edge counts.
    for (int k = 0; k < 40; k++) begin
      nu = $urandom % 50; nd = $urandom % 50; ns = $urandom % 40; nt = $urandom % 6;
      osc_edges(cu, nu); osc_edges(cd, nd); osc_edges(csh, ns); osc_edges(ctr, nt);
      up += 16'(nu); dn -= 16'(nd); sh = (sh + ns) % 32; tr = (tr + nt) % 4;
      take(v, lat);
      e = ref_rn(up, dn, sh, tr);
      checks++; if (v !== e) begin failures++; $display("no-fb sample %0d: %h expected %h", k, v, e); end
      checks++; if (lat != 2) begin failures++; $display("latency %0d", lat); end
    end
    checks++; if (fb_count != 0) begin failures++; $display("feedback while inhibited"); end
    // Phase 2: feedback on.
    inhibit = 0;
    for (int k = 0; k < 40; k++) begin
      fb0 = fb_count;
      take(v, lat);
      e = ref_rn(up, dn, sh, tr);
      checks++; if (v !== e) begin failures++; $display("fb sample %0d: %h expected %h", k, v, e); end
      repeat (3) @(negedge clk);          // let the request toggle settle
      checks++; if (fb_count != fb0 + 1) begin failures++; $display("no feedback launched"); end
      // three edges: two while synchronising (counting), the third loads
      osc_edges(cu, 3); osc_edges(cd, 3);
      up = v[31:16]; dn = v[15:0];
      nu = $urandom % 50; nd = $urandom % 50; ns = $urandom % 40; nt = $urandom % 6;
      osc_edges(cu, nu); osc_edges(cd, nd); osc_edges(csh, ns); osc_edges(ctr, nt);
      up += 16'(nu); dn -= 16'(nd); sh = (sh + ns) % 32; tr = (tr + nt) % 4;
      repeat (3) @(negedge clk);          // acknowledge back in the bus domain
    end
    // Phase 3: a sample while the previous preload is still pending is not fed back.
    fb0 = fb_count;
    take(v, lat);
    repeat (2) @(negedge clk);
    take(v, lat);
    checks++; if (fb_count != fb0 + 1) begin failures++; $display("pending preload overwritten"); end
    $display("feedback preloads: %0d", fb_count);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
