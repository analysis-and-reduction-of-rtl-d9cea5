// bk_post_tb: exhaustive test of the post-processing stage at its default
// width of 4 bits: s must be the bitwise modulo-2 sum of p and c.
module bk_post_tb;
  localparam int W = 4;
  logic [W-1:0] p, c, s;
  int checks = 0, failures = 0;

  bk_post #(.W(W)) dut (.p(p), .c(c), .s(s));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int vp = 0; vp < (1 << W); vp++)
      for (int vc = 0; vc < (1 << W); vc++) begin
        p = W'(vp); c = W'(vc);
        #1;
        for (int i = 0; i < W; i++) begin
          checks++;
          if (s[i] !== ((int'(p[i]) + int'(c[i])) % 2 == 1)) begin
            failures++;
            $display("FAIL p=%0d c=%0d bit %0d", vp, vc, i);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
