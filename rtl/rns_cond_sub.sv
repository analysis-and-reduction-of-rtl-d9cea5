// rns_cond_sub: conditional subtraction of a constant modulus.
//
// y = (x >= MOD) ? x - MOD : x. The difference is formed by a Brent-Kung
// adder as x + ~MOD + 1; its carry out is set exactly when x >= MOD and
// selects the difference. `sub` reports that the modulus was subtracted.
// This is one correction step of a modular reduction. Purely
// combinational. A helper of this design, not named by the reference.
module rns_cond_sub #(
  parameter int unsigned W   = 4,
  parameter logic [W-1:0] MOD = W'(5)
) (
  input  logic [W-1:0] x,
  output logic [W-1:0] y,
  output logic         sub
);
  logic [W-1:0] diff;

  bk_adder #(.W(W)) u_sub (.a(x), .b(~MOD), .cin(1'b1), .s(diff), .cout(sub));

  assign y = sub ? diff : x;
endmodule
