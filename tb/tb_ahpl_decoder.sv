// tb_ahpl_decoder - exhaustive check of the n-to-2^n decoder at n = 3 and 4.
//
// For each input value v exactly one output line must be 1, the line
// dcd[v], counting lines from the left (dcd[0] is selected by all zeros).
module tb_ahpl_decoder;
  int checks = 0, failures = 0;
  logic [0:2]  x3;
  logic [0:7]  d3;
  logic [0:3]  x4;
  logic [0:15] d4;

  ahpl_decoder #(.N(3)) dut3 (.x(x3), .dcd(d3));
  ahpl_decoder #(.N(4)) dut4 (.x(x4), .dcd(d4));

  initial begin
    for (int v = 0; v < 16; v++) begin
      x3 = 3'(v); x4 = 4'(v);
      #1;
      for (int line = 0; line < 16; line++) begin
        checks++;
        if (d4[line] !== (line == v)) begin failures++; $display("FAIL dcd4 x=%0d line %0d = %b", v, line, d4[line]); end
      end
      for (int line = 0; line < 8; line++) begin
        checks++;
        if (d3[line] !== (line == (v % 8))) begin failures++; $display("FAIL dcd3 x=%0d line %0d", v % 8, line); end
      end
    end
    x3 = 3'b001; #1; checks++;
    if (d3 !== 8'b0100_0000) begin failures++; $display("FAIL dcd3 pattern %b", d3); end
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
