// ahpl_decrementer - DECREMENTER{N}: combinational X-1 modulo 2^N.
//
// All zeros wraps to all ones, as in the AHPL decrementer table.  Bit 0 is the
// most significant bit; the output DEC is N bits wide.  It is built the way the
// notes suggest an adder can do the job: X plus the all-ones vector with carry
// in 0, keeping the low N bits.  Purely combinational.
module ahpl_decrementer #(
  parameter int unsigned N = 4
) (
  input  logic [0:N-1] x,
  output logic [0:N-1] dec
);
  logic [0:N] sum;
  ahpl_adder #(.N(N)) u_add (.a(x), .b({N{1'b1}}), .cin(1'b0), .add(sum));
  always_comb dec = sum[1:N];
endmodule
