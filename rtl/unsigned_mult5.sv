// unsigned_mult5 - AHPL module UNSIGNEDMULT, five-step version.
//
// Multiplies two N-bit unsigned numbers, X (multiplier) and Y (multiplicand),
// into a 2N-bit product Z by shift-and-add.  A is a 2N-bit register whose right
// half starts with the multiplier and whose left half accumulates partial sums;
// c holds the adder's carry out; CNT counts the N cycles.
//   1 c, A[0:N-1] <- 0; A[N:2N-1] <- X; B <- Y; CNT <- 0
//   2 goto (A[2N-1] ? 3 : 4)                 test the current multiplier bit
//   3 c, A[0:N-1] <- ADD(A[0:N-1]; B; 0)     add the multiplicand
//   4 c, A <- 0, c, A[0:2N-2]; CNT <- CNT+1; goto (CNT all ones ? 5 : 2)
//   5 Z = A; goto 1
// Step 4 tests CNT before it is incremented, so steps 2-4 run exactly N times.
// One product takes 2 + 2N + k clocks from step 1 to step 5 inclusive, k being
// the number of 1 bits in X (36..52 clocks for N = 16).  X and Y are read in
// step 1 only; Z carries the product while csl[5] is high and is 0 otherwise.
// The controller runs freely: after step 5 it starts the next product at once.
//
// CNT_ON_ADDER = 0 increments CNT with the separate INCREMENTER{log2 N} CLUNIT.
// CNT_ON_ADDER = 1 is the variant that saves that unit by passing CNT through
// the main adder in step 4 (0...0,CNT plus 0...01, keeping the low bits), which
// is possible because the adder is idle in that step.
//
// Follows the AHPL description: register sizes, steps, CLUNITs and the gating
// of Z by csl[5].  Clock gating in the drawings is replaced by clock enables;
// the synchronous reset to step 1 and the csl output are this design's own.
module unsigned_mult5 #(
  parameter int unsigned N            = 16,
  parameter bit          CNT_ON_ADDER = 1'b0
) (
  input  logic           clk,
  input  logic           rst,
  input  logic [0:N-1]   x,
  input  logic [0:N-1]   y,
  output logic [0:2*N-1] z,
  output logic [1:5]     csl
);
  localparam int unsigned CW = $clog2(N);

  logic [0:2*N-1] a;
  logic [0:N-1]   b;
  logic [0:CW-1]  cnt;
  logic           c;

  logic [0:N-1]   add_a, add_b;
  logic [0:N]     add;
  logic [0:CW-1]  cnt_next;
  logic           cnt_full;

  // CLUNITs
  ahpl_adder #(.N(N)) u_add (.a(add_a), .b(add_b), .cin(1'b0), .add(add));

  if (CNT_ON_ADDER) begin : g_cnt_adder
    // Step 4 routes 0...0,CNT and 0...01 to the adder; step 3 uses A and B.
    always_comb begin
      add_a = csl[4] ? {{(N-CW){1'b0}}, cnt} : a[0:N-1];
      add_b = csl[4] ? {{(N-1){1'b0}}, 1'b1} : b;
    end
    assign cnt_next = add[N-CW+1:N];
  end else begin : g_cnt_inc
    logic [0:CW-1] inc;
    ahpl_incrementer #(.N(CW)) u_inc (.x(cnt), .inc(inc));
    always_comb begin
      add_a = a[0:N-1];
      add_b = b;
    end
    assign cnt_next = inc;
  end

  always_comb cnt_full = &cnt;

  // Hardwired controller.
  always_ff @(posedge clk) begin
    if (rst) begin
      csl <= 5'b10000;
    end else begin
      csl[1] <= csl[5];
      csl[2] <= csl[1] | (csl[4] & ~cnt_full);
      csl[3] <= csl[2] & a[2*N-1];
      csl[4] <= (csl[2] & ~a[2*N-1]) | csl[3];
      csl[5] <= csl[4] & cnt_full;
    end
  end

  // Data part.
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
      if (csl[3]) {c, a[0:N-1]} <= add;
      if (csl[4]) begin
        {c, a} <= {1'b0, c, a[0:2*N-2]};
        cnt    <= cnt_next;
      end
    end
  end

  always_comb z = csl[5] ? a : '0;

  a_onehot: assert property (@(posedge clk) disable iff (rst) $onehot(csl));
endmodule
