// bk_grey_cell_tb: exhaustive self-checking test of the grey cell.
// All 8 input combinations are compared with G = gh | ph & gl written as a
// truth table.
module bk_grey_cell_tb;
  logic gh, ph, gl, g;
  int checks = 0, failures = 0;
  // Expected G for {gh, ph, gl} = 0..7.
  localparam logic [7:0] TRUTH = 8'b1111_1000;

  bk_grey_cell dut (.g_hi(gh), .p_hi(ph), .g_lo(gl), .g_out(g));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {gh, ph, gl} = 3'(v);
      #1;
      checks++;
      if (g !== TRUTH[v]) begin failures++; $display("FAIL v=%0d got %b", v, g); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
