// unsigned_mult3 - AHPL module UNSIGNEDMULT reduced to three steps.
//
// Same function as unsigned_mult5 (N-bit unsigned X times Y into a 2N-bit Z),
// but the test of the multiplier bit, the optional add and the shift are done
// in one clock:
//   1 c, A[0:N-1] <- 0; A[N:2N-1] <- X; B <- Y; CNT <- 0
//   2 c, A <- (0, c, A[0:2N-2]  !  0, ADD(A[0:N-1]; B; 0), A[N:2N-2])
//             * (~A[2N-1], A[2N-1]);
//     CNT <- CNT+1; goto (CNT all ones ? 3 : 2)
//   3 Z = A; goto 1
// With A[2N-1] = 1 the adder's carry and sum are written one place to the right
// (the shifted add); with A[2N-1] = 0 A is only shifted.  c is always cleared,
// so it is kept only because the description declares it.  A product takes
// N+2 clocks, step 1 to step 3 inclusive (18 for N = 16).  Z carries the
// product while csl[3] is high and is 0 otherwise; X and Y are read in step 1.
//
// Steps, registers and CLUNITs follow the AHPL description; the synchronous
// reset, clock enables in place of gated clocks and the csl output are this
// design's own.
module unsigned_mult3 #(
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

  logic [0:2*N-1] a;
  logic [0:N-1]   b;
  logic [0:CW-1]  cnt, inc;
  logic           c;
  logic [0:N]     add;
  logic           cnt_full;

  ahpl_adder #(.N(N)) u_add (.a(a[0:N-1]), .b(b), .cin(1'b0), .add(add));
  ahpl_incrementer #(.N(CW)) u_inc (.x(cnt), .inc(inc));

  always_comb cnt_full = &cnt;

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
      c   <= 1'b0;
      cnt <= '0;
    end else begin
      if (csl[1]) begin
        c   <= 1'b0;
        a   <= {{N{1'b0}}, x};
        b   <= y;
        cnt <= '0;
      end
      if (csl[2]) begin
        if (a[2*N-1]) {c, a} <= {1'b0, add, a[N:2*N-2]};
        else          {c, a} <= {1'b0, c, a[0:2*N-2]};
        cnt <= inc;
      end
    end
  end

  always_comb z = csl[3] ? a : '0;

  a_onehot: assert property (@(posedge clk) disable iff (rst) $onehot(csl));
endmodule
