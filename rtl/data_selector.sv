// data_selector - AHPL module DATASELECTOR ("system B").
//
// System B sits between a sender (system A) and a receiver (system C).  It
// raises inready for one clock, stores the 12-bit word on X in the next clock,
// and ANDs the word's three 4-bit fields together (X[0:3] & X[4:7] & X[8:11]).
// If that 4-bit AND is zero the word is dropped and the controller returns to
// its first step; otherwise the word is copied to OUTREG, outready is raised for
// one clock and in the following clock the word is driven on Z.
//
// Control part: a hardwired one-hot controller, one flip-flop per AHPL step
// (csl[1..10] are the control state lines).  Step by step:
//   1 inready = 1            2 INREG <- X            3 A <- INREG[0:3] & INREG[4:7]
//   4 A <- INREG[8:11] & A   5 S <- A[0] | A[1]      6 S <- S | A[2]
//   7 S <- S | A[3]          8 goto S ? 9 : 1        9 OUTREG <- INREG; outready = 1
//   10 Z = OUTREG; goto 1
// So a word is taken every 8 clocks when dropped and every 10 when forwarded.
// Z is OUTREG gated by csl[10] and is 0 in every other step.
//
// The step sequence, register sizes and the gating of Z follow the AHPL
// description and its data-part drawings.  Those drawings gate the register
// clocks with the control lines; here each register has a clock enable instead.
// The synchronous, active-high reset (to step 1, registers cleared) is this
// design's own addition: the description has no reset.
module data_selector (
  input  logic         clk,
  input  logic         rst,
  input  logic [0:11]  x,
  output logic [0:11]  z,
  output logic         inready,
  output logic         outready,
  output logic [1:10]  csl
);
  logic [0:11] inreg, outreg;
  logic [0:3]  a;
  logic        s;

  // Hardwired controller: one flip-flop per step.
  always_ff @(posedge clk) begin
    if (rst) begin
      csl <= '0;
      csl[1] <= 1'b1;
    end else begin
      csl[1]  <= (csl[8] & ~s) | csl[10];
      csl[2]  <= csl[1];
      csl[3]  <= csl[2];
      csl[4]  <= csl[3];
      csl[5]  <= csl[4];
      csl[6]  <= csl[5];
      csl[7]  <= csl[6];
      csl[8]  <= csl[7];
      csl[9]  <= csl[8] & s;
      csl[10] <= csl[9];
    end
  end

  // Data part.
  always_ff @(posedge clk) begin
    if (rst) begin
      inreg  <= '0;
      outreg <= '0;
      a      <= '0;
      s      <= 1'b0;
    end else begin
      if (csl[2]) inreg <= x;
      if (csl[3]) a <= inreg[0:3] & inreg[4:7];
      if (csl[4]) a <= inreg[8:11] & a;
      if (csl[5]) s <= a[0] | a[1];
      if (csl[6]) s <= s | a[2];
      if (csl[7]) s <= s | a[3];
      if (csl[9]) outreg <= inreg;
    end
  end

  always_comb begin
    inready  = csl[1];
    outready = csl[9];
    z        = csl[10] ? outreg : '0;
  end

  // Exactly one control step is active at any time.
  a_onehot: assert property (@(posedge clk) disable iff (rst) $onehot(csl));
endmodule
