// rns_eac_adder: W-bit adder modulo 2^W - 1 with end-around carry.
//
// s = (a + b) mod (2^W - 1), for a, b in [0, 2^W - 1]. Because
// 2^W = 1 (mod 2^W - 1), a carry out of the top bit is worth 1 and is fed
// back into the carry in. The feedback is made without a combinational
// loop by two Brent-Kung adders: the first forms a + b and its carry out,
// the second adds the same operands again with that carry as carry in.
// The result is one of the two codes of a residue modulo 2^W - 1: zero can
// come out as all zeros or as all ones, and the user folds all ones to
// zero where the canonical code is needed. `wrap` reports that the end-
// around carry was used. Purely combinational. End-around-carry adders are
// named by the reference design; the two-adder form is this design's own.
module rns_eac_adder #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] s,
  output logic         wrap
);
  logic [W-1:0] s_first;
  logic         c_second;

  bk_adder #(.W(W)) u_first  (.a(a), .b(b), .cin(1'b0), .s(s_first), .cout(wrap));
  bk_adder #(.W(W)) u_second (.a(a), .b(b), .cin(wrap), .s(s), .cout(c_second));

  // With both operands at most 2^W - 1 the corrected sum always fits in W
  // bits, so the second carry out is never set.
  if (1) begin : g_unused
    logic unused;
    assign unused = ^{s_first, c_second};
  end
endmodule
