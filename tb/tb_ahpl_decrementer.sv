// tb_ahpl_decrementer - exhaustive check of DECREMENTER{N} at N = 4 and N = 8.
//
// The expected value is (x - 1) mod 2^N: all zeros must wrap to all ones.
module tb_ahpl_decrementer;
  int checks = 0, failures = 0;
  logic [0:3] x4, d4;
  logic [0:7] x8, d8;

  ahpl_decrementer #(.N(4)) dut4 (.x(x4), .dec(d4));
  ahpl_decrementer #(.N(8)) dut8 (.x(x8), .dec(d8));

  initial begin
    for (int v = 0; v < 256; v++) begin
      x4 = 4'(v); x8 = 8'(v);
      #1;
      checks += 2;
      if (d4 !== 4'((v + 15) % 16)) begin failures++; $display("FAIL dec4 %0d -> %0d", v % 16, d4); end
      if (d8 !== 8'((v + 255) % 256)) begin failures++; $display("FAIL dec8 %0d -> %0d", v, d8); end
    end
    x4 = 4'b0000; #1; checks++;
    if (d4 !== 4'b1111) begin failures++; $display("FAIL dec4 wrap"); end
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
