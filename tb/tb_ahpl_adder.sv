// tb_ahpl_adder - self-checking test of the ADDER{N} CLUNIT.
//
// Instantiates the adder at N = 16 and at N = 4.  The 4-bit one is checked
// exhaustively (all a, b and cin); the 16-bit one with corner values and
// random operands.  The expected N+1-bit result is worked out with integer
// arithmetic, carry out in the leftmost bit.
module tb_ahpl_adder;
  int checks = 0, failures = 0;

  logic [0:15] a16, b16;
  logic        c16;
  logic [0:16] s16;
  logic [0:3]  a4, b4;
  logic        c4;
  logic [0:4]  s4;

  ahpl_adder #(.N(16)) dut16 (.a(a16), .b(b16), .cin(c16), .add(s16));
  ahpl_adder #(.N(4))  dut4  (.a(a4),  .b(b4),  .cin(c4),  .add(s4));

  task automatic check16(input int unsigned x, input int unsigned y, input bit ci);
    int unsigned exp;
    a16 = x[15:0]; b16 = y[15:0]; c16 = ci;
    #1;
    exp = (x & 32'hFFFF) + (y & 32'hFFFF) + ci;
    checks++;
    if (s16 !== exp[16:0]) begin
      failures++;
      $display("FAIL adder16 %h + %h + %0d = %h, expected %h", x[15:0], y[15:0], ci, s16, exp[16:0]);
    end
  endtask

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++)
        for (int k = 0; k < 2; k++) begin
          a4 = 4'(i); b4 = 4'(j); c4 = k[0];
          #1;
          checks++;
          if (s4 !== 5'(i + j + k)) begin
            failures++;
            $display("FAIL adder4 %0d + %0d + %0d = %0d", i, j, k, s4);
          end
        end
    check16(16'hFFFF, 16'hFFFF, 1'b1);
    check16(16'hFFFF, 16'h0000, 1'b1);
    check16(16'h0000, 16'h0000, 1'b0);
    check16(16'h8000, 16'h8000, 1'b0);
    check16(16'h1234, 16'h0001, 1'b0);
    for (int n = 0; n < 2000; n++) check16($urandom, $urandom, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
