// bit_transposer: the selective bit transposer of the adder-shifter generator.
//
// A 32-bit wide 4:1 multiplexer that reverses the bit order of the shifted word
// within groups of 32, 16, 8 or 4 bits, chosen by a 2-bit count latched from a
// free-running counter. Output bit i takes input bit
//   count 00: 31-i                 (whole word reversed)
//   count 01: 16*(i/16) + 15-i%16  (each half reversed)
//   count 10:  8*(i/8)  +  7-i%8   (each byte reversed)
//   count 11:  4*(i/4)  +  3-i%4   (each nibble reversed)
// which is the design's transposition table. Purely combinational.
`timescale 1ns / 1ps
module bit_transposer (
  input  logic [31:0] din,
  input  logic [1:0]  sel,
  output logic [31:0] dout
);
  always_comb begin
    for (int i = 0; i < 32; i++) begin
      unique case (sel)
        2'b00: dout[i] = din[31 - i];
        2'b01: dout[i] = din[(i & ~15) + 15 - (i & 15)];
        2'b10: dout[i] = din[(i & ~7) + 7 - (i & 7)];
        default: dout[i] = din[(i & ~3) + 3 - (i & 3)];
      endcase
    end
  end
endmodule
