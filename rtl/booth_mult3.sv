// booth_mult3 - AHPL module BOOTHMULT reduced to three steps.
//
// Same function as booth_mult7 (radix-2 Booth multiplication of two N-bit
// two's-complement numbers into a 2N-bit product), with the bit-pair test,
// the add or subtract and the arithmetic shift all done in one clock:
//   1 A[0:N-1], A[2N] <- 0; A[N:2N-1] <- X; B <- Y; CNT <- 0
//   2 A <- (A[0], A[0:2N-1]  !  ADD[1](arg), ADD[1:N](arg), A[N:2N-1])
//          * (~(A[2N-1] ^ A[2N]), A[2N-1] ^ A[2N]);
//     CNT <- CNT+1; goto (CNT all ones ? 3 : 2)
//     where arg = A[0:N-1]; (B ! ~B) * (~A[2N-1], A[2N-1]); A[2N-1]
//   3 Z = A[0:2N-1]; goto 1
// When the pair differs, the sum (B added for 01, ~B plus carry in 1 for 10) is
// written one place to the right with its own sign bit ADD[1] repeated in
// A[0], which is the arithmetic shift of the new accumulator.  A product takes
// N+2 clocks, step 1 to step 3 inclusive (18 for N = 16).  Z carries the
// product while csl[3] is high and is 0 otherwise; X and Y are read in step 1.
//
// As in booth_mult7 the accumulator is N bits wide, so Y = -2^(N-1) can
// overflow it and give a wrong product; every other pair of operands gives the
// true product.  Steps, registers and CLUNITs follow the AHPL description; the
// synchronous reset, clock enables and the csl output are this design's own.
module booth_mult3 #(
  parameter int unsigned N = 16
) (
  input  logic           clk,
  input  logic           rst,
  input  logic [0:N-1]   x,
  input  logic [0:N-1]   y,
  output logic [0:2*N-1] z,
  output logic [1:3]     csl
);
  localparam int unsigned CW = $clog2(N);

  logic [0:2*N]   a;
  logic [0:N-1]   b;
  logic [0:CW-1]  cnt, inc;
  logic [0:N]     add;
  logic           cnt_full;
  logic           differ;

  // The carry in and the choice of B or ~B both come from A[2N-1].
  ahpl_adder #(.N(N)) u_add (.a(a[0:N-1]), .b(a[2*N-1] ? ~b : b), .cin(a[2*N-1]), .add(add));
  ahpl_incrementer #(.N(CW)) u_inc (.x(cnt), .inc(inc));

  always_comb begin
    cnt_full = &cnt;
    differ   = a[2*N-1] ^ a[2*N];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      csl <= 3'b100;
    end else begin
      csl[1] <= csl[3];
      csl[2] <= csl[1] | (csl[2] & ~cnt_full);
      csl[3] <= csl[2] & cnt_full;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      a   <= '0;
      b   <= '0;
      cnt <= '0;
    end else begin
      if (csl[1]) begin
        a   <= {{N{1'b0}}, x, 1'b0};
        b   <= y;
        cnt <= '0;
      end
      if (csl[2]) begin
        if (differ) a <= {add[1], add[1:N], a[N:2*N-1]};
        else        a <= {a[0], a[0:2*N-1]};
        cnt <= inc;
      end
    end
  end

  always_comb z = csl[3] ? a[0:2*N-1] : '0;

  a_onehot: assert property (@(posedge clk) disable iff (rst) $onehot(csl));
endmodule
