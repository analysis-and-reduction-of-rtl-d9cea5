// bk_pre_tb: exhaustive test of the pre-processing stage at its default
// width of 4 bits: every bit of g and p is compared with a single-bit
// half-adder reference (carry and sum of a_i + b_i).
module bk_pre_tb;
  localparam int W = 4;
  logic [W-1:0] a, b, g, p;
  int checks = 0, failures = 0;

  bk_pre #(.W(W)) dut (.a(a), .b(b), .g(g), .p(p));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int va = 0; va < (1 << W); va++)
      for (int vb = 0; vb < (1 << W); vb++) begin
        a = W'(va); b = W'(vb);
        #1;
        for (int i = 0; i < W; i++) begin
          int hs;
          hs = int'(a[i]) + int'(b[i]);
          checks++;
          if (g[i] !== (hs == 2) || p[i] !== (hs == 1)) begin
            failures++;
            $display("FAIL a=%0d b=%0d bit %0d g=%b p=%b", va, vb, i, g[i], p[i]);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
