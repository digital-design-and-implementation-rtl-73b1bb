// tb_ring_osc: measures the oscillator model. Every period must lie within the
// wander-plus-jitter band (+/-5.2%) around the nominal period of the selected
// setting, the mean over
// many periods must be close to nominal, the output must stay low while
// disabled, rotation must visit all four settings, and two instances with
// different seeds must not produce the same edge times.
`timescale 1ns / 1ps
module tb_ring_osc;
  logic en, rot, c0, c1;
  logic [1:0] fsel;
  int checks = 0, failures = 0;
  int nom [4] = '{64100, 68500, 83300, 98000};

  ring_osc #(.SEED(3)) u0 (.en(en), .rotate(rot), .fsel(fsel), .clk_o(c0));
  ring_osc #(.SEED(5)) u1 (.en(en), .rotate(rot), .fsel(fsel), .clk_o(c1));

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime t0, t1, first;
    real p, sum;
    int seen [4];
    int same;
    en = 0; rot = 0; fsel = 0;
    #1us;
    checks++; if (c0 !== 1'b0) begin failures++; $display("runs while disabled"); end
    en = 1;
    for (int s = 0; s < 4; s++) begin
      fsel = 2'(s);
      repeat (2) @(posedge c0);       // let the new setting take effect
      t0 = $realtime; first = t0; sum = 0;
      for (int n = 0; n < 64; n++) begin
        @(posedge c0);
        t1 = $realtime;
        p = (t1 - t0) * 1000.0;       // ps
        t0 = t1;
        checks++;
        if (p < nom[s] * 0.948 || p > nom[s] * 1.052) begin
          failures++; $display("setting %0d period %0.1f ps", s, p);
        end
      end
      p = (t0 - first) * 1000.0 / 64.0;
      checks++;
      if (p < nom[s] * 0.975 || p > nom[s] * 1.025) begin failures++; $display("mean %0.1f", p); end
    end
    // two seeds give different edge times
    same = 0;
    repeat (20) begin @(posedge c0); if (c1) same++; end
    checks++;
    begin
      realtime a, b;
      @(posedge c0) a = $realtime;
      @(posedge c1) b = $realtime;
      if (a == b) begin failures++; $display("identical instances"); end
    end
    // rotation visits every setting
    rot = 1;
    seen = '{0, 0, 0, 0};
    @(posedge c0) t0 = $realtime;
    repeat (200) begin
      @(posedge c0);
      t1 = $realtime; p = (t1 - t0) * 1000.0; t0 = t1;
      begin
        automatic int best = 0;
        for (int s = 1; s < 4; s++) if ((p - nom[s]) * (p - nom[s]) < (p - nom[best]) * (p - nom[best])) best = s;
        seen[best]++;
      end
    end
    for (int s = 0; s < 4; s++) begin
      checks++; if (seen[s] < 20) begin failures++; $display("rotation: setting %0d seen %0d (%0d %0d %0d %0d)", s, seen[s], seen[0], seen[1], seen[2], seen[3]); end
    end
    en = 0;
    #1us;
    checks++; if (c0 !== 1'b0) begin failures++; $display("does not stop"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
