// rns_cond_sub_tb: exhaustive test of the conditional subtraction at its
// default (W = 4, MOD = 5) and at W = 6, MOD = 17.
module rns_cond_sub_tb;
  int checks = 0, failures = 0;

  logic [3:0] x4, y4; logic s4;
  logic [5:0] x6, y6; logic s6;

  rns_cond_sub                        dut4 (.x(x4), .y(y4), .sub(s4));
  rns_cond_sub #(.W(6), .MOD(6'd17))  dut6 (.x(x6), .y(y6), .sub(s6));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      x4 = 4'(v);
      #1;
      checks++;
      if (y4 !== 4'((v >= 5) ? v - 5 : v) || s4 !== (v >= 5)) begin
        failures++; $display("FAIL W=4 x=%0d y=%0d sub=%b", v, y4, s4);
      end
    end
    for (int v = 0; v < 64; v++) begin
      x6 = 6'(v);
      #1;
      checks++;
      if (y6 !== 6'((v >= 17) ? v - 17 : v) || s6 !== (v >= 17)) begin
        failures++; $display("FAIL W=6 x=%0d y=%0d sub=%b", v, y6, s6);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
