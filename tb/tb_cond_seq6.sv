// tb_cond_seq6 - self-checking test of the conditional-transfer exercise,
// six-step original: 4 clocks, 5 for b = c = 1 from the step that sees a = 1 to z.
//
// The expected register contents are computed here by applying the
// transfers of the original six-step sequence one after another:
//   b = 1: B <- X | B, then (c = 1 only) D <- A & B, then A <- X ^ B
//   b = 0: D <- A & B, then A <- X ^ B
// Every combination of b and c is used many times with random X, and the
// test also checks that nothing happens while a stays 0 and that z is a
// single-clock pulse.
module tb_cond_seq6;
  int checks = 0, failures = 0;
  int n_bc[4] = '{0, 0, 0, 0};

  logic       clk = 1'b0, rst = 1'b1;
  logic [0:7] x, a_q, b_q, d_q;
  logic       a, b, c, z;
  logic [1:6] csl;
  logic [0:7] ma, mb, md;

  cond_seq6 dut (.clk(clk), .rst(rst), .x(x), .a(a), .b(b), .c(c), .z(z),
                 .a_q(a_q), .b_q(b_q), .d_q(d_q), .csl(csl));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  task automatic run(input logic [0:7] xv, input bit bb, input bit cc, input int idle);
    int lat;
    a = 1'b0;
    for (int i = 0; i < idle; i++) begin
      @(negedge clk);
      check(!z, "no z while a = 0");
    end
    x = xv; b = bb; c = cc; a = 1'b1;
    @(negedge clk);
    a = 1'b0;
    lat = 1;
    while (!z && lat < 20) begin
      @(negedge clk);
      lat++;
    end
    // model of the original sequence
    if (bb) begin
      mb = xv | mb;
      if (cc) md = ma & mb;
    end else begin
      md = ma & mb;
    end
    ma = xv ^ mb;
    n_bc[{bb, cc}]++;
    check(lat == ((bb && cc) ? 5 : 4), $sformatf("latency %0d for bc=%0d%0d", lat, bb, cc));
    check(a_q == ma, $sformatf("A = %h, expected %h (bc=%0d%0d)", a_q, ma, bb, cc));
    check(b_q == mb, $sformatf("B = %h, expected %h (bc=%0d%0d)", b_q, mb, bb, cc));
    check(d_q == md, $sformatf("D = %h, expected %h (bc=%0d%0d)", d_q, md, bb, cc));
    @(negedge clk);
    check(!z, "z lasts one clock");
  endtask

  initial begin
    x = '0; a = 1'b0; b = 1'b0; c = 1'b0;
    ma = '0; mb = '0; md = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    run(8'h5A, 1'b1, 1'b1, 3);
    run(8'hC3, 1'b0, 1'b0, 0);
    run(8'h0F, 1'b1, 1'b0, 1);
    run(8'hF0, 1'b0, 1'b1, 2);
    for (int i = 0; i < 400; i++) run(8'($urandom), 1'($urandom), 1'($urandom), $urandom % 3);
    for (int k = 0; k < 4; k++) check(n_bc[k] > 0, $sformatf("bc=%0d exercised", k));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
