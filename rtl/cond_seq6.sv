// cond_seq6 - the six-step system of the conditional-transfer exercise.
//
// Three 8-bit registers A, B, D, an 8-bit input X and control inputs a, b, c.
// The system waits in step 1 until a = 1, then, depending on b and c, performs
// some of the transfers B <- X | B, D <- A & B, A <- X ^ B in that order, one per
// clock, and finally raises z for one clock and returns to step 1:
//   1 goto (a ? 2 : 1)
//   2 goto (b ? 3 : 4)
//   3 B <- X | B;  goto (c ? 4 : 5)
//   4 D <- A & B
//   5 A <- X ^ B
//   6 z = 1; goto 1
// b and c are sampled in steps 2 and 3 and X in steps 3 and 5, so they should
// be held from the a pulse until z.  Clocks from the step that sees a = 1 to z:
// bc = 00/01: 4, bc = 10: 4, bc = 11: 5.  (cond_seq3 does the same in 2.)
//
// Interface: the register contents are brought out on a_q, b_q and d_q so that
// the result can be observed; the description itself only names z as output.
// csl[1..6] are the one-hot control state lines.  The sequence is the
// exercise's own; the synchronous reset (to step 1, registers cleared) and the
// register outputs are this design's additions.
module cond_seq6 (
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
  output logic [1:6]  csl
);
  logic [0:7] ra, rb, rd;

  always_ff @(posedge clk) begin
    if (rst) begin
      csl <= '0;
      csl[1] <= 1'b1;
    end else begin
      csl[1] <= (csl[1] & ~a) | csl[6];
      csl[2] <= csl[1] & a;
      csl[3] <= csl[2] & b;
      csl[4] <= (csl[2] & ~b) | (csl[3] & c);
      csl[5] <= (csl[3] & ~c) | csl[4];
      csl[6] <= csl[5];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ra <= '0;
      rb <= '0;
      rd <= '0;
    end else begin
      if (csl[3]) rb <= x | rb;
      if (csl[4]) rd <= ra & rb;
      if (csl[5]) ra <= x ^ rb;
    end
  end

  always_comb begin
    z   = csl[6];
    a_q = ra;
    b_q = rb;
    d_q = rd;
  end

  a_onehot: assert property (@(posedge clk) disable iff (rst) $onehot(csl));
endmodule
