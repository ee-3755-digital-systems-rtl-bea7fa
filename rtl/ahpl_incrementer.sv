// ahpl_incrementer - INCREMENTER{N}: combinational X+1 modulo 2^N.
//
// All ones wraps to all zeros, as in the AHPL incrementer table.  Bit 0 is the
// most significant bit.  No carry out is produced (the AHPL unit's output INC
// is N bits wide).  Purely combinational.
module ahpl_incrementer #(
  parameter int unsigned N = 4
) (
  input  logic [0:N-1] x,
  output logic [0:N-1] inc
);
  always_comb inc = x + 1'b1;
endmodule
