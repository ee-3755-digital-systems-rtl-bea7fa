// tb_unsigned_mult5 - self-checking test of unsigned_mult5 at N = 16.
//
// Unsigned shift-and-add in five steps: 34 clocks plus 1 for every 1 bit of
// X.
// A second instance with CNT_ON_ADDER = 1 (CNT counted through the main
// adder) runs alongside and must match the first one in every clock.
// The test waits for step 1, presents X and Y in that clock and scrambles
// them afterwards (they are read in step 1 only), then counts clocks up to
// the last step, where it compares Z with the product worked out here with
// integer arithmetic.  Z must be 0 in every other clock.  Corner operands
// (0, 1, all ones, the most negative number) and random ones are used.
module tb_unsigned_mult5;
  int checks = 0, failures = 0;
  localparam bit SIGNED = 1'b0;
  int n_add = 0, n_sub = 0, n_shift = 0;

  logic        clk = 1'b0, rst = 1'b1;
  logic [0:15] x, y;
  logic [0:31] z;
  logic [1:5] csl;

  unsigned_mult5 dut (.clk(clk), .rst(rst), .x(x), .y(y), .z(z), .csl(csl));

  // The variant that increments CNT through the main adder must behave
  // identically, clock for clock.
  logic [0:31] z2;
  logic [1:5]  csl2;
  unsigned_mult5 #(.CNT_ON_ADDER(1'b1)) dut2 (.clk(clk), .rst(rst), .x(x), .y(y), .z(z2), .csl(csl2));

  always @(negedge clk) if (!rst) begin
    checks++;
    if (z2 != z || csl2 != csl) begin
      failures++;
      $display("FAIL adder-counted variant differs: Z %h / %h, csl %b / %b", z, z2, csl, csl2);
    end
  end

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // Expected number of clocks from step 1 to the last step, inclusive.
  function automatic int expected_clocks(input logic [0:15] xv);
    int ones = 0, changes = 0;
    logic prev = 1'b0;
    for (int i = 15; i >= 0; i--) begin
      ones += xv[i];
      changes += (xv[i] != prev);
      prev = xv[i];
    end
    return 34 + ones;
  endfunction

  task automatic mult(input logic [0:15] xv, input logic [0:15] yv);
    logic [0:31] exp;
    int clocks;
    while (!csl[1]) @(negedge clk);
    x = xv; y = yv;
    if (SIGNED) exp = 32'($signed(xv) * $signed(yv));
    else     exp = 32'(xv) * 32'(yv);
    // Count the kinds of cycle this operand pair goes through.
    begin
      logic prev = 1'b0;
      for (int i = 15; i >= 0; i--) begin
        if (SIGNED) begin
          if (xv[i] == prev) n_shift++;
          else if (xv[i]) n_sub++;
          else n_add++;
        end else begin
          if (xv[i]) n_add++; else n_shift++;
        end
        prev = xv[i];
      end
    end
    clocks = 1;
    @(negedge clk);
    x = 16'($urandom); y = 16'($urandom);
    clocks++;
    while (!csl[5] && clocks < 100) begin
      check(z == '0, "Z is 0 before the last step");
      @(negedge clk);
      clocks++;
    end
    check(z == exp, $sformatf("%h * %h = %h, expected %h", xv, yv, z, exp));
    check(clocks == expected_clocks(xv), $sformatf("%0d clocks for X=%h, expected %0d", clocks, xv, expected_clocks(xv)));
    @(negedge clk);
    check(z == '0 && csl[1], "back in step 1 with Z = 0");
  endtask

  initial begin
    logic [0:15] ylist [6];
    x = '0; y = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    ylist = '{16'h0000, 16'h0001, 16'hFFFF, 16'h7FFF, 16'h8001, 16'h1234};
    foreach (ylist[j]) begin
      mult(16'h0000, ylist[j]);
      mult(16'h0001, ylist[j]);
      mult(16'hFFFF, ylist[j]);
      mult(16'h8000, ylist[j]);
      mult(16'h7FFF, ylist[j]);
      mult(16'hAAAA, ylist[j]);
    end
    if (!SIGNED) begin
      mult(16'hFFFF, 16'h8000);
      mult(16'h8000, 16'h8000);
    end
    for (int i = 0; i < 300; i++) begin
      logic [0:15] yv;
      yv = 16'($urandom);
      if (SIGNED && yv == 16'h8000) yv = 16'h8001;  // outside the Booth design's range
      mult(16'($urandom), yv);
    end
    check(n_add > 0 && n_shift > 0 && (!SIGNED || n_sub > 0), "add, subtract and shift-only cycles happened");
    $display("add cycles %0d, subtract cycles %0d, shift-only cycles %0d", n_add, n_sub, n_shift);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
