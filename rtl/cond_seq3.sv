// cond_seq3 - the conditional-transfer exercise reduced to three steps.
//
// Same registers, inputs and outputs as cond_seq6, and the same effect on A, B
// and D for every b, c, but steps 2 to 5 of the six-step sequence are merged
// into one clock using conditional transfers:
//   1 goto (a ? 2 : 1)
//   2 B * b          <- X | B
//     D * ~(b & ~c)  <- (A & B  ! A & (X | B)) * (~b, b)
//     A              <- (X ^ B  ! X ^ (X | B)) * (~b, b)
//   3 z = 1; goto 1
// Conditions on the left are clock enables, those on the right select the data
// (a 2-way bus).  The step holding a = 1 is followed by z exactly two clocks
// later, whatever b and c are; b, c and X are sampled in step 2 only.
//
// The step structure and the transfers follow the reduction table of the
// exercise: D is loaded for bc = 00, 01 and 11 and left alone for bc = 10, which
// is the condition ~(b & ~c).  Reset, the register outputs a_q, b_q, d_q and
// the csl[1..3] control-line outputs are this design's additions.
module cond_seq3 (
  input  logic        clk,
  input  logic        rst,
  input  logic [0:7]  x,
  input  logic        a,
  input  logic        b,
  input  logic        c,
  output logic        z,
  output logic [0:7]  a_q,
  output logic [0:7]  b_q,
  output logic [0:7]  d_q,
  output logic [1:3]  csl
);
  logic [0:7] ra, rb, rd;
  logic [0:7] x_or_b;

  always_ff @(posedge clk) begin
    if (rst) begin
      csl <= 3'b100;
    end else begin
      csl[1] <= (csl[1] & ~a) | csl[3];
      csl[2] <= csl[1] & a;
      csl[3] <= csl[2];
    end
  end

  always_comb x_or_b = x | rb;

  always_ff @(posedge clk) begin
    if (rst) begin
      ra <= '0;
      rb <= '0;
      rd <= '0;
    end else if (csl[2]) begin
      if (b) rb <= x_or_b;
      if (!(b && !c)) rd <= b ? (ra & x_or_b) : (ra & rb);
      ra <= b ? (x ^ x_or_b) : (x ^ rb);
    end
  end

  always_comb begin
    z   = csl[3];
    a_q = ra;
    b_q = rb;
    d_q = rd;
  end

  a_onehot: assert property (@(posedge clk) disable iff (rst) $onehot(csl));
endmodule
