// bk_black_cell_tb: exhaustive self-checking test of the black cell.
// All 16 input combinations are applied and G and P are compared with the
// group equations G = gh | ph & gl, P = ph & pl written out as truth-table
// sums of products.
module bk_black_cell_tb;
  logic gh, ph, gl, pl, g, p;
  int checks = 0, failures = 0;

  bk_black_cell dut (.g_hi(gh), .p_hi(ph), .g_lo(gl), .p_lo(pl), .g_out(g), .p_out(p));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic exp_g, exp_p;
      {gh, ph, gl, pl} = 4'(v);
      #1;
      exp_g = (v >= 8) || (v == 6) || (v == 7);  // gh set, or ph & gl
      exp_p = (v == 5) || (v == 7) || (v == 13) || (v == 15);
      checks += 2;
      if (g !== exp_g) begin failures++; $display("FAIL G v=%0d got %b", v, g); end
      if (p !== exp_p) begin failures++; $display("FAIL P v=%0d got %b", v, p); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
