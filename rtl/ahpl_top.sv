// ahpl_top - every design of the AHPL collection, side by side.
//
// The designs are independent: each keeps its own ports, prefixed by the
// instance name, and they share only the clock and the synchronous reset.
//   ds_*   data_selector   12-bit word filter between two systems (10 steps)
//   c6_*   cond_seq6       conditional-transfer exercise, original 6 steps
//   c3_*   cond_seq3       the same system reduced to 3 steps
//   u5_*   unsigned_mult5  16x16 unsigned shift-and-add multiplier, 5 steps
//   u5a_*  unsigned_mult5  the same with CNT counted through the main adder
//   u3_*   unsigned_mult3  16x16 unsigned multiplier, 3 steps
//   b7_*   booth_mult7     16x16 two's-complement Booth multiplier, 7 steps
//   b3_*   booth_mult3     16x16 Booth multiplier, 3 steps
// The combinational units that no sequential design here uses are brought out
// as well: a 3-to-8 decoder, a 4-bit decrementer and an 8-bit magnitude
// comparator (the adder and incrementer sit inside the multipliers).
// Timing of each design is described in its own module; all are clocked by
// clk and return to their first step on rst.
module ahpl_top (
  input  logic        clk,
  input  logic        rst,
  // data_selector
  input  logic [0:11] ds_x,
  output logic [0:11] ds_z,
  output logic        ds_inready,
  output logic        ds_outready,
  output logic [1:10] ds_csl,
  // cond_seq6
  input  logic [0:7]  c6_x,
  input  logic        c6_a, c6_b, c6_c,
  output logic        c6_z,
  output logic [0:7]  c6_a_q, c6_b_q, c6_d_q,
  output logic [1:6]  c6_csl,
  // cond_seq3
  input  logic [0:7]  c3_x,
  input  logic        c3_a, c3_b, c3_c,
  output logic        c3_z,
  output logic [0:7]  c3_a_q, c3_b_q, c3_d_q,
  output logic [1:3]  c3_csl,
  // unsigned_mult5, incrementer CLUNIT for CNT
  input  logic [0:15] u5_x, u5_y,
  output logic [0:31] u5_z,
  output logic [1:5]  u5_csl,
  // unsigned_mult5, CNT through the adder
  input  logic [0:15] u5a_x, u5a_y,
  output logic [0:31] u5a_z,
  output logic [1:5]  u5a_csl,
  // unsigned_mult3
  input  logic [0:15] u3_x, u3_y,
  output logic [0:31] u3_z,
  output logic [1:3]  u3_csl,
  // booth_mult7
  input  logic [0:15] b7_x, b7_y,
  output logic [0:31] b7_z,
  output logic [1:7]  b7_csl,
  // booth_mult3
  input  logic [0:15] b3_x, b3_y,
  output logic [0:31] b3_z,
  output logic [1:3]  b3_csl,
  // stand-alone CLUNITs
  input  logic [0:2]  dcd_x,
  output logic [0:7]  dcd_out,
  input  logic [0:3]  dec_x,
  output logic [0:3]  dec_out,
  input  logic [0:7]  cmp_a, cmp_b,
  output logic [0:2]  cmp_out
);
  data_selector u_ds (.clk, .rst, .x(ds_x), .z(ds_z), .inready(ds_inready),
                      .outready(ds_outready), .csl(ds_csl));

  cond_seq6 u_c6 (.clk, .rst, .x(c6_x), .a(c6_a), .b(c6_b), .c(c6_c), .z(c6_z),
                  .a_q(c6_a_q), .b_q(c6_b_q), .d_q(c6_d_q), .csl(c6_csl));

  cond_seq3 u_c3 (.clk, .rst, .x(c3_x), .a(c3_a), .b(c3_b), .c(c3_c), .z(c3_z),
                  .a_q(c3_a_q), .b_q(c3_b_q), .d_q(c3_d_q), .csl(c3_csl));

  unsigned_mult5 u_u5 (.clk, .rst, .x(u5_x), .y(u5_y), .z(u5_z), .csl(u5_csl));

  unsigned_mult5 #(.CNT_ON_ADDER(1'b1)) u_u5a (.clk, .rst, .x(u5a_x), .y(u5a_y),
                                              .z(u5a_z), .csl(u5a_csl));

  unsigned_mult3 u_u3 (.clk, .rst, .x(u3_x), .y(u3_y), .z(u3_z), .csl(u3_csl));

  booth_mult7 u_b7 (.clk, .rst, .x(b7_x), .y(b7_y), .z(b7_z), .csl(b7_csl));

  booth_mult3 u_b3 (.clk, .rst, .x(b3_x), .y(b3_y), .z(b3_z), .csl(b3_csl));

  ahpl_decoder     #(.N(3)) u_dcd (.x(dcd_x), .dcd(dcd_out));
  ahpl_decrementer #(.N(4)) u_dec (.x(dec_x), .dec(dec_out));
  ahpl_comparator  #(.N(8)) u_cmp (.a(cmp_a), .b(cmp_b), .comp(cmp_out));
endmodule
