// booth_mult7 - AHPL module BOOTHMULT, seven-step version.
//
// Multiplies two N-bit two's-complement numbers, X (multiplier) and Y
// (multiplicand), into a 2N-bit product Z with the simplest (radix-2) Booth
// algorithm, which looks at two bits at a time.  A is a 2N+1-bit register:
// A[0:N-1] accumulates, A[N:2N-1] starts with the multiplier and A[2N] is the
// extra bit to the right of it, initially 0.  The pair A[2N-1],A[2N] selects:
// 00/11 shift only, 01 add B, 10 subtract B (add ~B with carry in 1).
//   1 A[0:N-1], A[2N] <- 0; A[N:2N-1] <- X; B <- Y; CNT <- 0
//   2 goto (A[2N-1] ^ A[2N] ? 3 : 6)
//   3 goto (A[2N-1] ? 5 : 4)
//   4 A[0:N-1] <- ADD[1:N](A[0:N-1]; B; 0); goto 6
//   5 A[0:N-1] <- ADD[1:N](A[0:N-1]; ~B; 1)
//   6 A <- A[0], A[0:2N-1]; CNT <- CNT+1; goto (CNT all ones ? 7 : 2)
//   7 Z = A[0:2N-1]; goto 1
// Step 6 is an arithmetic right shift of all of A.  A product takes
// 2 + 2N + 2t clocks from step 1 to step 7 inclusive, t being the number of
// cycles whose bit pair is 01 or 10.  Z carries the product while csl[7] is
// high and is 0 otherwise; X and Y are read in step 1 only.
//
// The accumulator is N bits wide, as in the description, so the result is the
// true product for every X and Y except Y = -2^(N-1): subtracting or adding
// that multiplicand can overflow A[0:N-1].  The adder's carry out ADD[0] is not
// used.  Steps, registers and CLUNITs follow the AHPL description; the
// synchronous reset, clock enables and the csl output are this design's own.
module booth_mult7 #(
  parameter int unsigned N = 16
) (
  input  logic           clk,
  input  logic           rst,
  input  logic [0:N-1]   x,
  input  logic [0:N-1]   y,
  output logic [0:2*N-1] z,
  output logic [1:7]     csl
);
  localparam int unsigned CW = $clog2(N);

  logic [0:2*N]   a;
  logic [0:N-1]   b;
  logic [0:CW-1]  cnt, inc;
  logic [0:N]     add;
  logic           sub;
  logic           cnt_full;

  // Step 5 subtracts, step 4 adds; the operand and carry in follow csl[5].
  always_comb sub = csl[5];
  ahpl_adder #(.N(N)) u_add (.a(a[0:N-1]), .b(sub ? ~b : b), .cin(sub), .add(add));
  ahpl_incrementer #(.N(CW)) u_inc (.x(cnt), .inc(inc));

  always_comb cnt_full = &cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      csl <= 7'b1000000;
    end else begin
      csl[1] <= csl[7];
      csl[2] <= csl[1] | (csl[6] & ~cnt_full);
      csl[3] <= csl[2] & (a[2*N-1] ^ a[2*N]);
      csl[4] <= csl[3] & ~a[2*N-1];
      csl[5] <= csl[3] & a[2*N-1];
      csl[6] <= (csl[2] & ~(a[2*N-1] ^ a[2*N])) | csl[4] | csl[5];
      csl[7] <= csl[6] & cnt_full;
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
      if (csl[4] || csl[5]) a[0:N-1] <= add[1:N];
      if (csl[6]) begin
        a   <= {a[0], a[0:2*N-1]};
        cnt <= inc;
      end
    end
  end

  always_comb z = csl[7] ? a[0:2*N-1] : '0;

  a_onehot: assert property (@(posedge clk) disable iff (rst) $onehot(csl));
endmodule
