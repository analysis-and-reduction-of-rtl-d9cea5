// rns_forward_converter_tb: test of the binary-to-residue converter.
// N = 2 and N = 4 are tested over every 3N-bit input, N = 8 with random
// inputs and the extreme values. Each residue is compared with the
// remainder of integer division by 2^N-1, 2^N and 2^N+1. The test also
// counts how often the end-around carry and each number of 2^N+1
// subtractions occurred and fails if one never did.
module rns_forward_converter_tb;
  int checks = 0, failures = 0;
  int n_wrap = 0, n_sub0 = 0, n_sub1 = 0, n_sub2 = 0;

  logic [5:0]  x2;  logic [1:0] a2, b2; logic [2:0] c2; logic w2; logic [1:0] s2;
  logic [11:0] x4;  logic [3:0] a4, b4; logic [4:0] c4; logic w4; logic [1:0] s4;
  logic [23:0] x8;  logic [7:0] a8, b8; logic [8:0] c8; logic w8; logic [1:0] s8;

  rns_forward_converter          dut2 (.x(x2), .r1(a2), .r2(b2), .r3(c2), .r1_wrap(w2), .r3_sub(s2));
  rns_forward_converter #(.N(4)) dut4 (.x(x4), .r1(a4), .r2(b4), .r3(c4), .r1_wrap(w4), .r3_sub(s4));
  rns_forward_converter #(.N(8)) dut8 (.x(x8), .r1(a8), .r2(b8), .r3(c8), .r1_wrap(w8), .r3_sub(s8));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(input int n, input int x, input int r1, input int r2, input int r3,
                     input logic wrap, input logic [1:0] sub);
    int p;
    p = 1 << n;
    checks += 3;
    if (r1 != x % (p - 1)) begin failures++; $display("FAIL N=%0d x=%0d r1=%0d", n, x, r1); end
    if (r2 != x % p)       begin failures++; $display("FAIL N=%0d x=%0d r2=%0d", n, x, r2); end
    if (r3 != x % (p + 1)) begin failures++; $display("FAIL N=%0d x=%0d r3=%0d", n, x, r3); end
    if (wrap) n_wrap++;
    case (sub)
      2'b00:   n_sub0++;
      2'b01:   n_sub1++;
      2'b11:   n_sub2++;
      default: begin failures++; $display("FAIL N=%0d second subtraction without first", n); end
    endcase
  endtask

  initial begin
    for (int v = 0; v < 64; v++) begin
      x2 = 6'(v); #1;
      cmp(2, v, int'(a2), int'(b2), int'(c2), w2, s2);
    end
    for (int v = 0; v < 4096; v++) begin
      x4 = 12'(v); #1;
      cmp(4, v, int'(a4), int'(b4), int'(c4), w4, s4);
    end
    for (int v = 0; v < 5000; v++) begin
      x8 = (v == 0) ? '0 : (v == 1) ? '1 : 24'($urandom); #1;
      cmp(8, int'(x8), int'(a8), int'(b8), int'(c8), w8, s8);
    end
    checks++;
    if (n_wrap == 0 || n_sub0 == 0 || n_sub1 == 0 || n_sub2 == 0) begin
      failures++;
      $display("FAIL coverage wrap=%0d sub0=%0d sub1=%0d sub2=%0d", n_wrap, n_sub0, n_sub1, n_sub2);
    end
    $display("coverage: end-around carry %0d, 2^N+1 subtracted 0x %0d, 1x %0d, 2x %0d",
             n_wrap, n_sub0, n_sub1, n_sub2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
