// tb_ahpl_incrementer - exhaustive check of INCREMENTER{N} at N = 4 and N = 8.
//
// The expected value is (x + 1) mod 2^N, so all ones must wrap to all zeros.
module tb_ahpl_incrementer;
  int checks = 0, failures = 0;
  logic [0:3] x4, i4;
  logic [0:7] x8, i8;

  ahpl_incrementer #(.N(4)) dut4 (.x(x4), .inc(i4));
  ahpl_incrementer #(.N(8)) dut8 (.x(x8), .inc(i8));

  initial begin
    for (int v = 0; v < 256; v++) begin
      x4 = 4'(v); x8 = 8'(v);
      #1;
      checks += 2;
      if (i4 !== 4'((v + 1) % 16)) begin failures++; $display("FAIL inc4 %0d -> %0d", v % 16, i4); end
      if (i8 !== 8'((v + 1) % 256)) begin failures++; $display("FAIL inc8 %0d -> %0d", v, i8); end
    end
    x4 = 4'b1111; #1; checks++;
    if (i4 !== 4'b0000) begin failures++; $display("FAIL inc4 wrap"); end
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
