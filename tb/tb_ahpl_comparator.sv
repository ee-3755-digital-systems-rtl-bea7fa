// tb_ahpl_comparator - exhaustive check of the 8-bit magnitude comparator.
//
// COMP must be 100 for a > b, 010 for a = b and 001 for a < b, with a and b
// read as unsigned numbers.
module tb_ahpl_comparator;
  int checks = 0, failures = 0;
  logic [0:7] a, b;
  logic [0:2] comp;
  logic [0:2] exp;

  ahpl_comparator #(.N(8)) dut (.a(a), .b(b), .comp(comp));

  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a = 8'(i); b = 8'(j);
        #1;
        exp = (i > j) ? 3'b100 : (i == j) ? 3'b010 : 3'b001;
        checks++;
        if (comp !== exp) begin
          failures++;
          if (failures < 10) $display("FAIL comp %0d vs %0d = %b", i, j, comp);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
