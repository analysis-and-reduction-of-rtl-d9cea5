// rns_crt_rom_tb: test of the CRT constant ROM.
// For N = 2 (moduli 3, 4, 5) and N = 3 (moduli 7, 8, 9) the words are
// compared with constants worked out by hand; word 3 must read zero. For
// N = 5 (moduli 31, 32, 33) each word C_i is checked by the defining CRT
// property: C_i mod m_i = 1, C_i mod m_j = 0 for j != i, C_i < M.
module rns_crt_rom_tb;
  int checks = 0, failures = 0;

  logic [1:0]  ch;
  logic [5:0]  w2;
  logic [8:0]  w3;
  logic [14:0] w5;

  rns_crt_rom           dut2 (.ch(ch), .word(w2));
  rns_crt_rom #(.N(3))  dut3 (.ch(ch), .word(w3));
  rns_crt_rom #(.N(5))  dut5 (.ch(ch), .word(w5));

  localparam int EXP2 [4] = '{40, 45, 36, 0};
  localparam int EXP3 [4] = '{288, 441, 280, 0};
  localparam int MOD5 [3] = '{31, 32, 33};

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      ch = 2'(i);
      #1;
      checks += 2;
      if (int'(w2) != EXP2[i]) begin failures++; $display("FAIL N=2 word %0d = %0d", i, w2); end
      if (int'(w3) != EXP3[i]) begin failures++; $display("FAIL N=3 word %0d = %0d", i, w3); end
      if (i < 3) begin
        checks++;
        if (int'(w5) >= 31 * 32 * 33) begin failures++; $display("FAIL N=5 word %0d too big", i); end
        for (int j = 0; j < 3; j++) begin
          checks++;
          if (int'(w5) % MOD5[j] != ((i == j) ? 1 : 0)) begin
            failures++; $display("FAIL N=5 word %0d mod %0d = %0d", i, MOD5[j], int'(w5) % MOD5[j]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
