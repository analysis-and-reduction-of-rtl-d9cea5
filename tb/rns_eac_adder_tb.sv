// rns_eac_adder_tb: exhaustive test of the end-around-carry adder at W = 4
// and W = 6. For every a, b the sum must be congruent to a + b modulo
// 2^W - 1, must fit W bits, and `wrap` must be set exactly when a + b
// reaches 2^W.
module rns_eac_adder_tb;
  int checks = 0, failures = 0;

  logic [3:0] a4, b4, s4; logic w4;
  logic [5:0] a6, b6, s6; logic w6;

  rns_eac_adder          dut4 (.a(a4), .b(b4), .s(s4), .wrap(w4));
  rns_eac_adder #(.W(6)) dut6 (.a(a6), .b(b6), .s(s6), .wrap(w6));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int va = 0; va < 16; va++)
      for (int vb = 0; vb < 16; vb++) begin
        a4 = 4'(va); b4 = 4'(vb);
        #1;
        checks += 2;
        if (int'(s4) % 15 != (va + vb) % 15) begin
          failures++; $display("FAIL W=4 %0d+%0d -> %0d", va, vb, s4);
        end
        if (w4 !== (va + vb >= 16)) begin
          failures++; $display("FAIL W=4 wrap %0d+%0d", va, vb);
        end
      end
    for (int va = 0; va < 64; va++)
      for (int vb = 0; vb < 64; vb++) begin
        a6 = 6'(va); b6 = 6'(vb);
        #1;
        checks += 2;
        if (int'(s6) % 63 != (va + vb) % 63) begin
          failures++; $display("FAIL W=6 %0d+%0d -> %0d", va, vb, s6);
        end
        if (w6 !== (va + vb >= 64)) begin
          failures++; $display("FAIL W=6 wrap %0d+%0d", va, vb);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
