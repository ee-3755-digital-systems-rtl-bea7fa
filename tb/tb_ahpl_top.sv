// tb_ahpl_top - end-to-end test of the whole collection at its default sizes.
//
// All designs in ahpl_top run at the same time, each driven by its own
// process, and every result is compared with a value computed here:
//  - data selector: words forwarded or dropped by the nibble-AND rule, with
//    the 8- or 10-clock step count;
//  - conditional-transfer system, six-step and three-step: A, B, D after the
//    b/c-selected transfers and the 4/5- and 2-clock latencies;
//  - the four multipliers: products and clocks per product (unsigned 5-step:
//    34 + ones(X), Booth 7-step: 34 + 2 * bit changes of X, 3-step: 18);
//  - the stand-alone decoder, decrementer and comparator, exhaustively.
// It counts how often each mechanism happened (word forwarded / dropped; every
// b,c combination in both sequences; add, subtract and shift-only cycles;
// decrementer wrap-around; each comparator outcome) and counts a failure for
// any that never did.  The top is used with no parameter overrides.
module tb_ahpl_top;
  int checks = 0, failures = 0;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic [0:11] ds_x, ds_z;
  logic        ds_inready, ds_outready;
  logic [1:10] ds_csl;
  logic [0:7]  c6_x, c6_a_q, c6_b_q, c6_d_q, c3_x, c3_a_q, c3_b_q, c3_d_q;
  logic        c6_a, c6_b, c6_c, c6_z, c3_a, c3_b, c3_c, c3_z;
  logic [1:6]  c6_csl;
  logic [1:3]  c3_csl;
  logic [0:15] u5_x, u5_y, u5a_x, u5a_y, u3_x, u3_y, b7_x, b7_y, b3_x, b3_y;
  logic [0:31] u5_z, u5a_z, u3_z, b7_z, b3_z;
  logic [1:5]  u5_csl, u5a_csl;
  logic [1:3]  u3_csl, b3_csl;
  logic [1:7]  b7_csl;
  logic [0:2]  dcd_x, cmp_out;
  logic [0:7]  dcd_out, cmp_a, cmp_b;
  logic [0:3]  dec_x, dec_out;

  ahpl_top dut (.*);

  // mechanism counters
  int n_fwd = 0, n_drop = 0;
  int n_bc6[4] = '{0, 0, 0, 0};
  int n_bc3[4] = '{0, 0, 0, 0};
  int n_uadd = 0, n_ushift = 0, n_badd = 0, n_bsub = 0, n_bshift = 0;
  int n_wrap = 0, n_gt = 0, n_eq = 0, n_lt = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // ---------------- data selector ----------------
  task automatic ds_run(input int n);
    for (int k = 0; k < n; k++) begin
      logic [0:11] w;
      bit pass;
      int clocks;
      w = 12'($urandom);
      if (k % 2 == 0) w = w | (12'h111 << ($urandom % 4));
      pass = ((w[0:3] & w[4:7] & w[8:11]) != 4'b0000);
      while (!ds_inready) @(negedge clk);
      clocks = 1;
      @(negedge clk);
      ds_x = w;
      clocks++;
      @(negedge clk);
      ds_x = 12'($urandom);
      clocks++;
      while (!ds_inready && !ds_outready) begin @(negedge clk); clocks++; end
      if (pass) begin
        n_fwd++;
        check(ds_outready && clocks == 9, $sformatf("outready after %0d clocks for %h", clocks, w));
        @(negedge clk);
        check(ds_z == w, $sformatf("ds Z = %h, expected %h", ds_z, w));
        @(negedge clk);
        check(ds_inready, "ds back to step 1 after 10 clocks");
      end else begin
        n_drop++;
        check(ds_inready && clocks == 9, $sformatf("dropped word %h took %0d clocks", w, clocks - 1));
      end
    end
  endtask

  // ---------------- conditional-transfer systems ----------------
  task automatic c6_run(input int n);
    logic [0:7] ma = '0, mb = '0, md = '0;
    for (int k = 0; k < n; k++) begin
      logic [0:7] xv;
      bit bb, cc;
      int lat;
      xv = 8'($urandom); bb = 1'($urandom); cc = 1'($urandom);
      c6_x = xv; c6_b = bb; c6_c = cc; c6_a = 1'b1;
      @(negedge clk);
      c6_a = 1'b0;
      lat = 1;
      while (!c6_z && lat < 20) begin @(negedge clk); lat++; end
      if (bb) begin mb = xv | mb; if (cc) md = ma & mb; end else md = ma & mb;
      ma = xv ^ mb;
      n_bc6[{bb, cc}]++;
      check(lat == ((bb && cc) ? 5 : 4), $sformatf("c6 latency %0d", lat));
      check(c6_a_q == ma && c6_b_q == mb && c6_d_q == md, "c6 registers");
      @(negedge clk);
    end
  endtask

  task automatic c3_run(input int n);
    logic [0:7] ma = '0, mb = '0, md = '0;
    for (int k = 0; k < n; k++) begin
      logic [0:7] xv;
      bit bb, cc;
      int lat;
      xv = 8'($urandom); bb = 1'($urandom); cc = 1'($urandom);
      c3_x = xv; c3_b = bb; c3_c = cc; c3_a = 1'b1;
      @(negedge clk);
      c3_a = 1'b0;
      lat = 1;
      while (!c3_z && lat < 20) begin @(negedge clk); lat++; end
      if (bb) begin mb = xv | mb; if (cc) md = ma & mb; end else md = ma & mb;
      ma = xv ^ mb;
      n_bc3[{bb, cc}]++;
      check(lat == 2, $sformatf("c3 latency %0d", lat));
      check(c3_a_q == ma && c3_b_q == mb && c3_d_q == md, "c3 registers");
      @(negedge clk);
    end
  endtask

  // ---------------- multipliers ----------------
  function automatic int ones(input logic [0:15] v);
    int s = 0;
    for (int i = 0; i < 16; i++) s += v[i];
    return s;
  endfunction

  function automatic int changes(input logic [0:15] v);
    int s = 0;
    logic prev = 1'b0;
    for (int i = 15; i >= 0; i--) begin s += (v[i] != prev); prev = v[i]; end
    return s;
  endfunction

  // which: 0 u5, 1 u5a, 2 u3, 3 b7, 4 b3
  task automatic mult_run(input int which, input int n);
    for (int k = 0; k < n; k++) begin
      logic [0:15] xv, yv;
      logic [0:31] exp, got;
      bit first, last, sgn;
      int clocks, want;
      xv = 16'($urandom); yv = 16'($urandom);
      if (k == 0) xv = 16'hFFFF;
      if (k == 1) xv = 16'h0000;
      if (k == 2) yv = 16'hFFFF;
      sgn = (which >= 3);
      if (sgn && yv == 16'h8000) yv = 16'h8001;
      exp = sgn ? 32'($signed(xv) * $signed(yv)) : 32'(xv) * 32'(yv);
      case (which)
        0: want = 34 + ones(xv);
        1: want = 34 + ones(xv);
        3: want = 34 + 2 * changes(xv);
        default: want = 18;
      endcase
      if (sgn) begin
        n_bsub += (changes(xv) + 1) / 2;
        n_badd += changes(xv) / 2;
        n_bshift += 16 - changes(xv);
      end else begin
        n_uadd += ones(xv);
        n_ushift += 16 - ones(xv);
      end
      do begin
        @(negedge clk);
        case (which)
          0: first = u5_csl[1];  1: first = u5a_csl[1]; 2: first = u3_csl[1];
          3: first = b7_csl[1];  default: first = b3_csl[1];
        endcase
      end while (!first);
      case (which)
        0: begin u5_x = xv; u5_y = yv; end
        1: begin u5a_x = xv; u5a_y = yv; end
        2: begin u3_x = xv; u3_y = yv; end
        3: begin b7_x = xv; b7_y = yv; end
        default: begin b3_x = xv; b3_y = yv; end
      endcase
      clocks = 1;
      do begin
        @(negedge clk);
        clocks++;
        case (which)
          0: begin last = u5_csl[5];  got = u5_z;  end
          1: begin last = u5a_csl[5]; got = u5a_z; end
          2: begin last = u3_csl[3];  got = u3_z;  end
          3: begin last = b7_csl[7];  got = b7_z;  end
          default: begin last = b3_csl[3]; got = b3_z; end
        endcase
      end while (!last && clocks < 100);
      check(got == exp, $sformatf("multiplier %0d: %h * %h = %h, expected %h", which, xv, yv, got, exp));
      check(clocks == want, $sformatf("multiplier %0d: %0d clocks, expected %0d", which, clocks, want));
    end
  endtask

  // ---------------- stand-alone CLUNITs ----------------
  task automatic clunits;
    for (int v = 0; v < 8; v++) begin
      dcd_x = 3'(v); #1;
      check(dcd_out == (8'b1000_0000 >> v), $sformatf("decoder %0d -> %b", v, dcd_out));
    end
    for (int v = 0; v < 16; v++) begin
      dec_x = 4'(v); #1;
      check(dec_out == 4'((v + 15) % 16), $sformatf("decrementer %0d -> %0d", v, dec_out));
      if (v == 0 && dec_out == 4'hF) n_wrap++;
    end
    for (int k = 0; k < 300; k++) begin
      int ia, ib;
      ia = $urandom % 256; ib = (k % 5 == 0) ? ia : $urandom % 256;
      cmp_a = 8'(ia); cmp_b = 8'(ib); #1;
      check(cmp_out == ((ia > ib) ? 3'b100 : (ia == ib) ? 3'b010 : 3'b001), "comparator");
      if (ia > ib) n_gt++; else if (ia == ib) n_eq++; else n_lt++;
    end
  endtask

  initial begin
    ds_x = '0;
    {c6_x, c6_a, c6_b, c6_c, c3_x, c3_a, c3_b, c3_c} = '0;
    {u5_x, u5_y, u5a_x, u5a_y, u3_x, u3_y, b7_x, b7_y, b3_x, b3_y} = '0;
    dcd_x = '0; dec_x = '0; cmp_a = '0; cmp_b = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    fork
      ds_run(60);
      c6_run(60);
      c3_run(60);
      mult_run(0, 20);
      mult_run(1, 20);
      mult_run(2, 20);
      mult_run(3, 20);
      mult_run(4, 20);
      clunits();
    join
    check(n_fwd > 0, "a word was forwarded");
    check(n_drop > 0, "a word was dropped");
    for (int k = 0; k < 4; k++) begin
      check(n_bc6[k] > 0, $sformatf("six-step system saw bc=%0d", k));
      check(n_bc3[k] > 0, $sformatf("three-step system saw bc=%0d", k));
    end
    check(n_uadd > 0 && n_ushift > 0, "unsigned add/shift and shift-only cycles");
    check(n_badd > 0 && n_bsub > 0 && n_bshift > 0, "Booth add, subtract and shift-only cycles");
    check(n_wrap > 0 && n_gt > 0 && n_eq > 0 && n_lt > 0, "decrementer wrap and all comparator outcomes");
    $display("words forwarded %0d dropped %0d; unsigned add %0d shift %0d; Booth add %0d sub %0d shift %0d",
             n_fwd, n_drop, n_uadd, n_ushift, n_badd, n_bsub, n_bshift);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
