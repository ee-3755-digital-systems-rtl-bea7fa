// ahpl_comparator - N-bit combinational magnitude comparator CLUNIT.
//
// A and B are unsigned magnitudes (bit 0 most significant).  The 3-bit output
// COMP, leftmost bit comp[0], is 1,0,0 when A > B, 0,1,0 when A = B and 0,0,1
// when A < B.  Exactly one bit is always set.  Purely combinational.
module ahpl_comparator #(
  parameter int unsigned N = 8
) (
  input  logic [0:N-1] a,
  input  logic [0:N-1] b,
  output logic [0:2]   comp
);
  always_comb comp = {a > b, a == b, a < b};
endmodule
