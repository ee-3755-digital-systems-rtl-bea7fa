// ahpl_adder - ADDER{N}: N-bit combinational adder with carry in.
//
// Bits are numbered the AHPL way, index 0 being the most significant bit
// (ranges are declared [0:N-1]).  The result ADD is N+1 bits wide and its
// leftmost bit add[0] is the carry out, so add[1:N] is the N-bit sum.  The
// same unit serves as an incrementer (b = 0...01, cin = 0, or b = 0, cin = 1),
// a decrementer (b = 1...1, cin = 0) and, with b inverted and cin = 1, a
// subtracter, as the multipliers in this collection use it.
// Purely combinational, no clock.  The carry-out convention and port names
// follow the AHPL CLUNIT; the ripple/carry structure is left to synthesis.
module ahpl_adder #(
  parameter int unsigned N = 16
) (
  input  logic [0:N-1] a,
  input  logic [0:N-1] b,
  input  logic         cin,
  output logic [0:N]   add
);
  always_comb add = {1'b0, a} + {1'b0, b} + {{N{1'b0}}, cin};
endmodule
