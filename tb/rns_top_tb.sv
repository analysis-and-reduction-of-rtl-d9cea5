// rns_top_tb: end-to-end test of the RNS datapath at its default size
// (N = 2, moduli 3, 4, 5, dynamic range M = 60).
//
// Every 6-bit input x goes through the forward converter; a behavioural
// model of the residue computation stage then works on each residue
// channel on its own (identity, squaring, adding the residues of a
// constant k, multiplying by the residues of k), and the reverse converter
// brings the result back to binary. The output, one clock after the
// residues are applied, must equal the same operation done on integers
// modulo M. The forward residues are also compared with x mod m_i.
// The test counts how often each correction step of the converters took
// place (end-around carry and each number of 2^N+1 subtractions in the
// forward converter, end-around carry and all-ones fix in the reverse
// reduction) and an asynchronous reset, and fails if one never happened.
module rns_top_tb;
  localparam int N  = 2;
  localparam int P  = 1 << N;
  localparam int M1 = P - 1, M2 = P, M3 = P + 1;
  localparam int M  = M1 * M2 * M3;
  localparam int NOPS = 4;

  int checks = 0, failures = 0, cycles = 0;
  int n_fwd_wrap = 0, n_sub [3] = '{0, 0, 0}, n_rev_wrap = 0, n_zfix = 0, n_reset = 0;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  logic [3*N-1:0] x, binary;
  logic [N-1:0]   f1, f2, c1, c2;
  logic [N:0]     f3, c3;
  logic           fwd_wrap, rev_wrap, zfix;
  logic [1:0]     fwd_sub;

  rns_top dut (
    .clk(clk), .rst(rst), .x(x),
    .fwd_r1(f1), .fwd_r2(f2), .fwd_r3(f3),
    .res_r1(c1), .res_r2(c2), .res_r3(c3),
    .binary(binary),
    .fwd_r1_wrap(fwd_wrap), .fwd_r3_sub(fwd_sub),
    .rev_fold_wrap(rev_wrap), .rev_zero_fix(zfix)
  );

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Behavioural residue computation: operation op on one channel of
  // modulus m, residue r, with k the constant operand.
  function automatic int chan_op(input int op, input int r, input int k, input int m);
    case (op)
      0:       return r;
      1:       return (r * r) % m;
      2:       return (r + k % m) % m;
      default: return (r * (k % m)) % m;
    endcase
  endfunction

  // The same operation on the integer value modulo M.
  function automatic int int_op(input int op, input int v, input int k);
    case (op)
      0:       return v % M;
      1:       return (v * v) % M;
      2:       return (v + k) % M;
      default: return (v * k) % M;
    endcase
  endfunction

  initial begin
    int k, exp_y, start;
    x = '0; c1 = '0; c2 = '0; c3 = '0;
    repeat (2) @(posedge clk);
    checks++;
    if (binary != 0) begin failures++; $display("FAIL reset value %0d", binary); end
    n_reset++;
    #2 rst = 1'b0;

    for (int op = 0; op < NOPS; op++)
      for (int v = 0; v < (1 << (3 * N)); v++) begin
        k = (v * 7 + op * 13 + 1) % M;
        @(posedge clk); #1;
        x = (3*N)'(v);
        #1;
        // forward conversion
        checks++;
        if (int'(f1) != v % M1 || int'(f2) != v % M2 || int'(f3) != v % M3) begin
          failures++;
          $display("FAIL forward x=%0d -> (%0d,%0d,%0d)", v, f1, f2, f3);
        end
        n_fwd_wrap += int'(fwd_wrap);
        n_sub[int'(fwd_sub[0]) + int'(fwd_sub[1])]++;
        // residue computation, channel by channel
        c1 = N'(chan_op(op, int'(f1), k, M1));
        c2 = N'(chan_op(op, int'(f2), k, M2));
        c3 = (N+1)'(chan_op(op, int'(f3), k, M3));
        exp_y = int_op(op, v % M, k);
        start = cycles;
        #1;
        n_rev_wrap += int'(rev_wrap);
        n_zfix     += int'(zfix);
        // reverse conversion, one cycle later
        @(posedge clk); #1;
        checks += 2;
        if (cycles - start != 1) begin failures++; $display("FAIL latency %0d", cycles - start); end
        if (int'(binary) != exp_y) begin
          failures++;
          $display("FAIL op=%0d x=%0d k=%0d -> %0d, expected %0d", op, v, k, binary, exp_y);
        end
      end

    // Asynchronous reset between clock edges.
    #2 rst = 1'b1;
    #1;
    checks++;
    if (binary != 0) begin failures++; $display("FAIL asynchronous reset"); end
    n_reset++;
    rst = 1'b0;

    $display("mechanisms: forward end-around carry %0d, 2^N+1 subtracted 0x %0d 1x %0d 2x %0d,",
             n_fwd_wrap, n_sub[0], n_sub[1], n_sub[2]);
    $display("            reverse end-around carry %0d, all-ones fix %0d, reset %0d",
             n_rev_wrap, n_zfix, n_reset);
    checks++;
    if (n_fwd_wrap == 0 || n_sub[0] == 0 || n_sub[1] == 0 || n_sub[2] == 0 ||
        n_rev_wrap == 0 || n_zfix == 0 || n_reset < 2) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
