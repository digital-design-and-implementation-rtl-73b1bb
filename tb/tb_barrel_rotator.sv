// tb_barrel_rotator: checks the 32-bit rotate-left shifter against a reference
// built from shifts, for every rotate amount and random words.
`timescale 1ns / 1ps
module tb_barrel_rotator;
  logic [31:0] din, dout, exp;
  logic [4:0]  amount;
  int checks = 0, failures = 0;

  barrel_rotator #(.W(32)) dut (.din(din), .amount(amount), .dout(dout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 32; a++) begin
      for (int n = 0; n < 20; n++) begin
        din    = (n == 0) ? 32'h8000_0001 : $urandom;
        amount = 5'(a);
        #1;
        exp = (a == 0) ? din : ((din << a) | (din >> (32 - a)));
        checks++;
        if (dout !== exp) begin
          failures++;
          $display("rotate %0d of %h: got %h expected %h", a, din, dout, exp);
        end
      end
    end
    // The example from the design: the MSB re-enters at bit 0.
    din = 32'h8000_0000; amount = 5'd1; #1;
    checks++; if (dout !== 32'h1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
