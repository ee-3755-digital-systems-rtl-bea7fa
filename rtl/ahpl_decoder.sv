// ahpl_decoder - N-to-2^N decoder CLUNIT.
//
// Output line dcd[i] is 1 exactly when the value of X is i, where X is read
// with x[0] as the most significant bit.  The output is declared [0:2^N-1] so
// that, as in AHPL, dcd[0] is the leftmost line and the one selected by all
// zeros.  Purely combinational.
module ahpl_decoder #(
  parameter int unsigned N = 3
) (
  input  logic [0:N-1]      x,
  output logic [0:2**N-1]   dcd
);
  always_comb begin
    dcd = '0;
    dcd[x] = 1'b1;
  end
endmodule
