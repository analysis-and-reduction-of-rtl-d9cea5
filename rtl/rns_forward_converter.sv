// rns_forward_converter: binary to residue conversion for {2^n-1, 2^n, 2^n+1}.
//
// Splits the 3N-bit input x into three N-bit digits x2:x1:x0 and forms its
// remainders with respect to the three moduli without any division:
//   r1 = x mod (2^N-1): since 2^N = 1, x = x0 + x1 + x2; the digits are
//        summed by two end-around-carry adders and an all-ones result is
//        folded to zero.
//   r2 = x mod 2^N: the low digit x0.
//   r3 = x mod (2^N+1): since 2^N = -1, x = x0 - x1 + x2. The circuit forms
//        x0 + x2, adds (2^N+1) - x1 to keep the value positive, and brings
//        the result (below 3*(2^N+1)) into range with two conditional
//        subtractions of 2^N+1.
// Every adder is a Brent-Kung parallel prefix adder. Any 3N-bit x is
// accepted; x in [0, M) with M = 2^N*(2^(2N)-1) is the range the residues
// represent uniquely. The residues come out canonical (r1 < 2^N-1,
// r3 <= 2^N). Purely combinational; `r1_wrap`, `r3_sub` expose which
// correction steps were taken (end-around carry seen, number of
// subtractions of 2^N+1). The reference design defines this stage only as
// taking remainders; the digit-folding circuit is this design's own.
module rns_forward_converter
  import rns_pkg::*;
#(
  parameter int unsigned N = 2
) (
  input  logic [3*N-1:0] x,
  output logic [N-1:0]   r1,
  output logic [N-1:0]   r2,
  output logic [N:0]     r3,
  output logic           r1_wrap,
  output logic [1:0]     r3_sub
);
  if (N < 2 || N > MAX_N) begin : g_bad_n
    $error("rns_forward_converter: N must lie in 2..%0d", MAX_N);
  end

  logic [N-1:0] x0, x1, x2;
  assign {x2, x1, x0} = x;

  // ---- modulus 2^N - 1 ----------------------------------------------------
  logic [N-1:0] s01, s012;
  logic         wrap01, wrap012;

  rns_eac_adder #(.W(N)) u_m1_a (.a(x0),  .b(x1), .s(s01),  .wrap(wrap01));
  rns_eac_adder #(.W(N)) u_m1_b (.a(s01), .b(x2), .s(s012), .wrap(wrap012));

  assign r1      = (&s012) ? '0 : s012;
  assign r1_wrap = wrap01 | wrap012;

  // ---- modulus 2^N ----------------------------------------------------------
  assign r2 = x0;

  // ---- modulus 2^N + 1 ------------------------------------------------------
  localparam int unsigned   W3 = N + 2;
  localparam logic [W3-1:0] M3 = W3'(modulus(N, 2));

  logic [N-1:0]  s02;
  logic          c02;
  logic [W3-1:0] neg_x1, t0, t1, t2;
  logic          c_neg, c_t0;

  // x0 + x2, N+1 bits.
  bk_adder #(.W(N)) u_m3_sum (.a(x0), .b(x2), .cin(1'b0), .s(s02), .cout(c02));
  // (2^N+1) - x1 = M3 + ~x1 + 1, in [2, 2^N+1].
  bk_adder #(.W(W3)) u_m3_neg (
    .a(M3), .b(~{2'b00, x1}), .cin(1'b1), .s(neg_x1), .cout(c_neg)
  );
  // x0 + x2 + (2^N+1) - x1, below 3*(2^N+1).
  bk_adder #(.W(W3)) u_m3_add (
    .a({1'b0, c02, s02}), .b(neg_x1), .cin(1'b0), .s(t0), .cout(c_t0)
  );
  rns_cond_sub #(.W(W3), .MOD(M3)) u_m3_red1 (.x(t0), .y(t1), .sub(r3_sub[0]));
  rns_cond_sub #(.W(W3), .MOD(M3)) u_m3_red2 (.x(t1), .y(t2), .sub(r3_sub[1]));

  assign r3 = t2[N:0];

  // The subtraction above always carries out and the final value is at
  // most 2^N, so these bits carry no information.
  if (1) begin : g_unused
    logic unused;
    assign unused = ^{c_neg, c_t0, t2[W3-1]};
  end
endmodule
