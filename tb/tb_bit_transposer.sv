// tb_bit_transposer: checks every output bit of the transposer, for all four
// counts, against the transposition table written out here as plain numbers
// (for each count, the input bit that drives output bits 0..31).
`timescale 1ns / 1ps
module tb_bit_transposer;
  logic [31:0] din, dout;
  logic [1:0]  sel;
  int checks = 0, failures = 0;

  int tab [4][32] = '{
    '{31,30,29,28,27,26,25,24,23,22,21,20,19,18,17,16,15,14,13,12,11,10,9,8,7,6,5,4,3,2,1,0},
    '{15,14,13,12,11,10,9,8,7,6,5,4,3,2,1,0,31,30,29,28,27,26,25,24,23,22,21,20,19,18,17,16},
    '{7,6,5,4,3,2,1,0,15,14,13,12,11,10,9,8,23,22,21,20,19,18,17,16,31,30,29,28,27,26,25,24},
    '{3,2,1,0,7,6,5,4,11,10,9,8,15,14,13,12,19,18,17,16,23,22,21,20,27,26,25,24,31,30,29,28}
  };

  bit_transposer dut (.din(din), .sel(sel), .dout(dout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 4; s++) begin
      sel = 2'(s);
      // one-hot inputs: each output bit must follow exactly its table entry
      for (int b = 0; b < 32; b++) begin
        din = 32'h1 << b;
        #1;
        for (int o = 0; o < 32; o++) begin
          checks++;
          if (dout[o] !== (tab[s][o] == b)) begin
            failures++;
            $display("count %0d input bit %0d: output bit %0d = %b", s, b, o, dout[o]);
          end
        end
      end
      for (int n = 0; n < 16; n++) begin
        din = $urandom;
        #1;
        for (int o = 0; o < 32; o++) begin
          checks++;
          if (dout[o] !== din[tab[s][o]]) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
