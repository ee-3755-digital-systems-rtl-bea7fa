// tb_data_selector - self-checking test of the DATASELECTOR system.
//
// Acts as system A and system C.  For every word it waits for inready, puts
// the word on X in the following clock (step 2) and scrambles X afterwards,
// so a late sample would be caught.  The expected decision is computed
// here: the word is forwarded exactly when X[0:3] & X[4:7] & X[8:11] is not
// zero.  Checked per word: outready (or, for a dropped word, the next
// inready) exactly 7 clocks after the step that stores X; Z equal to the word
// in the clock after outready and 0 in every other clock.
module tb_data_selector;
  int checks = 0, failures = 0;
  int n_pass = 0, n_drop = 0;

  logic        clk = 1'b0, rst = 1'b1;
  logic [0:11] x, z;
  logic        inready, outready;
  logic [1:10] csl;

  data_selector dut (.clk(clk), .rst(rst), .x(x), .z(z), .inready(inready), .outready(outready), .csl(csl));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  task automatic send(input logic [0:11] w);
    logic [0:3] andv;
    bit pass;
    andv = w[0:3] & w[4:7] & w[8:11];
    pass = (andv != 4'b0000);
    while (!inready) begin
      check(z == '0, "Z idle while waiting for inready");
      @(negedge clk);
    end
    @(negedge clk);              // step 2: data valid on X
    x = w;
    check(!inready && !outready, "no handshake in step 2");
    @(negedge clk);
    x = 12'($urandom);           // X is no longer valid
    for (int i = 0; i < 5; i++) begin
      check(!inready && !outready && z == '0, "quiet during steps 3-7");
      @(negedge clk);
    end
    check(!inready && !outready, "quiet in step 8");
    @(negedge clk);
    check(outready == pass, $sformatf("outready for word %h", w));
    check(inready == !pass, $sformatf("inready after word %h", w));
    check(z == '0, "Z is 0 in the step with outready");
    if (pass) begin
      n_pass++;
      @(negedge clk);
      check(z == w, $sformatf("Z = %h, expected %h", z, w));
      check(!outready && !inready, "step 10 handshake lines low");
      @(negedge clk);
      check(inready, "back to step 1 after Z");
    end else begin
      n_drop++;
    end
  endtask

  initial begin
    x = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    send(12'hFFF);
    send(12'h000);
    send(12'h111);   // AND = 0001, only the last bit of A is set
    send(12'h888);   // AND = 1000
    send(12'h124);   // AND = 0000 although every field is non-zero
    send(12'h4F4);   // AND = 0100
    send(12'h2A2);   // AND = 0010
    for (int i = 0; i < 300; i++) begin
      logic [0:11] w;
      w = 12'($urandom);
      if (i % 3 == 0) w = w | 12'h111 << ($urandom % 4);
      send(w);
    end
    check(n_pass > 0 && n_drop > 0, "both outcomes happened");
    $display("forwarded %0d, dropped %0d", n_pass, n_drop);
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
