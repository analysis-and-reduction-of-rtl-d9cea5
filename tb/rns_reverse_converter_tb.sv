// rns_reverse_converter_tb: test of the CRT reverse converter.
//
// The expected binary value is found without the CRT: a table maps the
// residue triple of every x in [0, M) to x, and each applied triple
// (reduced by its modulus, so non-canonical port values are covered too)
// is looked up there. N = 2 (the default) is run over every value the
// residue ports can carry, N = 4 over every canonical triple and random
// port values, N = 6 with random triples. Residues are applied right after
// a rising edge; the registered output must keep its old value until the
// next edge and show the result after it (one cycle of latency). The
// N = 2 example (0, 1, 2) -> 57 is also checked on the internal products
// (0, 45, 72) and the partial sum (45). An asynchronous reset in mid-cycle
// must clear the output at once. End-around carries and all-ones fixes in
// the modulo-M reduction are counted and must occur.
module rns_reverse_converter_tb;
  int checks = 0, failures = 0;
  int n_wrap = 0, n_zfix = 0;
  int cycles = 0;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  logic [1:0] a2, b2; logic [2:0] c2; logic [5:0]  y2, d2; logic fw2, zf2;
  logic [3:0] a4, b4; logic [4:0] c4; logic [11:0] y4, d4; logic fw4, zf4;
  logic [5:0] a6, b6; logic [6:0] c6; logic [17:0] y6, d6; logic fw6, zf6;

  rns_reverse_converter          dut2 (.clk(clk), .rst(rst), .r1(a2), .r2(b2), .r3(c2),
                                       .binary(y2), .binary_d(d2), .fold_wrap(fw2), .zero_fix(zf2));
  rns_reverse_converter #(.N(4)) dut4 (.clk(clk), .rst(rst), .r1(a4), .r2(b4), .r3(c4),
                                       .binary(y4), .binary_d(d4), .fold_wrap(fw4), .zero_fix(zf4));
  rns_reverse_converter #(.N(6)) dut6 (.clk(clk), .rst(rst), .r1(a6), .r2(b6), .r3(c6),
                                       .binary(y6), .binary_d(d6), .fold_wrap(fw6), .zero_fix(zf6));

  // residue triple -> x, one table per N
  int tbl [3][int];
  localparam int NS [3] = '{2, 4, 6};

  function automatic int key(input int n, input int r1, input int r2, input int r3);
    int p;
    p = 1 << n;
    return ((r1 % (p - 1)) << 16) | ((r2 % p) << 8) | (r3 % (p + 1));
  endfunction

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Registered output of the converter of table t.
  function automatic int cur_y(input int t);
    case (t)
      0:       return int'(y2);
      1:       return int'(y4);
      default: return int'(y6);
    endcase
  endfunction

  // Apply one triple to the converter of table t, then check the output
  // before and after the next rising edge.
  task automatic apply(input int t, input int r1, input int r2, input int r3);
    int exp_x, old_y, start;
    @(posedge clk);
    #1;
    case (t)
      0: begin a2 = 2'(r1); b2 = 2'(r2); c2 = 3'(r3); old_y = int'(y2); end
      1: begin a4 = 4'(r1); b4 = 4'(r2); c4 = 5'(r3); old_y = int'(y4); end
      default: begin a6 = 6'(r1); b6 = 6'(r2); c6 = 7'(r3); old_y = int'(y6); end
    endcase
    start = cycles;
    exp_x = tbl[t][key(NS[t], r1, r2, r3)];
    #3;
    checks++;
    if (cur_y(t) != old_y) begin
      failures++; $display("FAIL N=%0d output changed before the clock edge", NS[t]);
    end
    @(posedge clk);
    #1;
    checks += 2;
    if (cycles - start != 1) begin failures++; $display("FAIL latency %0d", cycles - start); end
    if (cur_y(t) != exp_x) begin
      failures++;
      $display("FAIL N=%0d residues (%0d,%0d,%0d) -> %0d, expected %0d", NS[t], r1, r2, r3,
               cur_y(t), exp_x);
    end
    case (t)
      0: begin n_wrap += int'(fw2); n_zfix += int'(zf2); end
      1: begin n_wrap += int'(fw4); n_zfix += int'(zf4); end
      default: begin n_wrap += int'(fw6); n_zfix += int'(zf6); end
    endcase
  endtask

  initial begin
    a2 = '0; b2 = '0; c2 = '0; a4 = '0; b4 = '0; c4 = '0; a6 = '0; b6 = '0; c6 = '0;
    for (int t = 0; t < 3; t++) begin
      int p, m;
      p = 1 << NS[t];
      m = (p - 1) * p * (p + 1);
      for (int x = 0; x < m; x++) tbl[t][key(NS[t], x % (p - 1), x % p, x % (p + 1))] = x;
    end
    repeat (2) @(posedge clk);
    checks++;
    if (y2 != 0 || y4 != 0 || y6 != 0) begin failures++; $display("FAIL reset value"); end
    #2 rst = 1'b0;

    // Worked example for N = 2: residues (0, 1, 2) of moduli (3, 4, 5).
    @(posedge clk); #1;
    a2 = 2'd0; b2 = 2'd1; c2 = 3'd2;
    #1;
    checks += 5;
    if (dut2.out1 != 0)  begin failures++; $display("FAIL out1 = %0d", dut2.out1); end
    if (dut2.out2 != 45) begin failures++; $display("FAIL out2 = %0d", dut2.out2); end
    if (dut2.out3 != 72) begin failures++; $display("FAIL out3 = %0d", dut2.out3); end
    if (dut2.mid != 45)  begin failures++; $display("FAIL mid = %0d", dut2.mid); end
    @(posedge clk); #1;
    if (y2 != 57) begin failures++; $display("FAIL example binary = %0d", y2); end

    // N = 2: every value of the residue ports.
    for (int r1 = 0; r1 < 4; r1++)
      for (int r2 = 0; r2 < 4; r2++)
        for (int r3 = 0; r3 < 8; r3++) apply(0, r1, r2, r3);
    // N = 4: every canonical triple, then random port values.
    for (int r1 = 0; r1 < 15; r1++)
      for (int r2 = 0; r2 < 16; r2++)
        for (int r3 = 0; r3 < 17; r3++) apply(1, r1, r2, r3);
    for (int i = 0; i < 2000; i++) apply(1, $urandom % 16, $urandom % 16, $urandom % 32);
    // N = 6: random port values and the extremes.
    apply(2, 0, 0, 0);
    apply(2, 62, 63, 64);
    for (int i = 0; i < 5000; i++) apply(2, $urandom % 64, $urandom % 64, $urandom % 128);

    // Asynchronous reset in mid-cycle.
    @(posedge clk); #2;
    rst = 1'b1;
    #1;
    checks++;
    if (y2 != 0 || y4 != 0 || y6 != 0) begin failures++; $display("FAIL asynchronous reset"); end
    rst = 1'b0;

    checks++;
    if (n_wrap == 0 || n_zfix == 0) begin
      failures++; $display("FAIL coverage fold_wrap=%0d zero_fix=%0d", n_wrap, n_zfix);
    end
    $display("coverage: end-around carry in reduction %0d, all-ones fixed %0d", n_wrap, n_zfix);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
