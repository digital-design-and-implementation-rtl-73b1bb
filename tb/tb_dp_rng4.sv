// tb_dp_rng4: checks the minimal divergent-path generator against the worked
// example (from reset, a sample on the 9th, 10th or 11th edge gives 15, 12 or
// 11) and then against a reference accumulator over random period lengths; it
// also checks that two different orders of the same period lengths end in
// different values, which is the point of the design.
`timescale 1ns / 1ps
module tb_dp_rng4;
  logic osc, rst, sample, valid;
  logic [3:0] value;
  int checks = 0, failures = 0;

  dp_rng4 dut (.osc_clk(osc), .rst(rst), .sample(sample), .value(value), .valid(valid));

  // n edges, the sample on the last one
  task automatic period(int n);
    for (int k = 1; k <= n; k++) begin
      sample = (k == n);
      #5 osc = 1; #5 osc = 0;
    end
    sample = 0;
  endtask

  function automatic logic [3:0] ref_next(logic [3:0] prev, int n);
    logic [3:0] s = prev + 4'(7 * n);
    return {s[2:0], s[3]};
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ex [3] = '{9, 10, 11};
    logic [3:0] want [3] = '{4'd15, 4'd12, 4'd11};
    logic [3:0] e, a, b;
    osc = 0; sample = 0;
    for (int i = 0; i < 3; i++) begin
      rst = 0; #1 rst = 1; #10 rst = 0;
      period(ex[i]);
      checks++;
      if (value !== want[i] || !valid) begin failures++; $display("example %0d: %0d", ex[i], value); end
    end
    rst = 1; #10 rst = 0;
    e = 0;
    for (int k = 0; k < 200; k++) begin
      int n = 9 + $urandom % 3;
      period(n);
      e = ref_next(e, n);
      checks++; if (value !== e) begin failures++; $display("period %0d: %0d expected %0d", k, value, e); end
    end
    // order matters: 9 then 11 versus 11 then 9
    rst = 1; #10 rst = 0; period(9); period(11); a = value;
    rst = 1; #10 rst = 0; period(11); period(9); b = value;
    checks++; if (a == b) begin failures++; $display("order of periods lost"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
