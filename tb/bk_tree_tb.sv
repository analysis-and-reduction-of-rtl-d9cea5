// bk_tree_tb: test of the Brent-Kung prefix carry tree.
// The tree is fed the generate/propagate of operand pairs a, b and a carry
// in; every carry c[i] must equal the carry into bit i of the integer sum
// a + b + cin, and cout the carry out of the top bit. The default 4-bit
// tree is tested exhaustively; 5-, 13- and 32-bit trees (non-power-of-two
// position counts and a wide one) are tested with random operands.
module bk_tree_tb;
  int checks = 0, failures = 0;

  localparam int NT = 4;
  localparam int WS [NT] = '{4, 5, 13, 32};

  logic [63:0] a_v [NT];
  logic [63:0] b_v [NT];
  logic        cin_v;
  logic [63:0] c_v [NT];
  logic        cout_v [NT];

  for (genvar t = 0; t < NT; t++) begin : g_dut
    localparam int W = WS[t];
    logic [W-1:0] c;
    bk_tree #(.W(W)) dut (
      .g(a_v[t][W-1:0] & b_v[t][W-1:0]), .p(a_v[t][W-1:0] ^ b_v[t][W-1:0]),
      .cin(cin_v), .c(c), .cout(cout_v[t])
    );
    assign c_v[t] = 64'(c);
  end

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int t);
    int w;
    logic [64:0] full;
    logic [63:0] mask;
    w = WS[t];
    for (int i = 0; i <= w; i++) begin
      // carry into bit i = bit i of the sum of the operands' low i bits + cin
      mask = (i == 64) ? '1 : ((64'd1 << i) - 64'd1);
      full = 65'(a_v[t] & mask) + 65'(b_v[t] & mask) + 65'(cin_v);
      checks++;
      if (i < w) begin
        if (c_v[t][i] !== full[i]) begin
          failures++;
          $display("FAIL W=%0d a=%h b=%h cin=%b c[%0d]=%b", w, a_v[t], b_v[t], cin_v, i, c_v[t][i]);
        end
      end else if (cout_v[t] !== full[i]) begin
        failures++;
        $display("FAIL W=%0d a=%h b=%h cin=%b cout=%b", w, a_v[t], b_v[t], cin_v, cout_v[t]);
      end
    end
  endtask

  initial begin
    for (int v = 0; v < 512; v++) begin
      a_v[0] = 64'(v & 15); b_v[0] = 64'((v >> 4) & 15); cin_v = v[8];
      for (int t = 1; t < NT; t++) begin
        a_v[t] = {$urandom, $urandom} & ((WS[t] == 64) ? '1 : ((64'd1 << WS[t]) - 1));
        b_v[t] = {$urandom, $urandom} & ((WS[t] == 64) ? '1 : ((64'd1 << WS[t]) - 1));
        // also hit the all-propagate chain that must ripple the carry in
        if (v % 16 == 3) b_v[t] = ~a_v[t] & ((64'd1 << WS[t]) - 1);
      end
      #1;
      for (int t = 0; t < NT; t++) check(t);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
