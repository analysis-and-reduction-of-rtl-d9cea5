// bk_adder: W-bit Brent-Kung parallel prefix adder.
//
// s + 2^W * cout = a + b + cin. The adder is the three-stage parallel
// prefix structure: pre-processing (bit generate and propagate), the
// Brent-Kung prefix carry tree (carry into every bit, with the carry in
// entering as prefix position 0), and post-processing (sum = propagate
// xor carry). Purely combinational; the delay grows with 2*clog2(W+1)-1
// prefix cells. The three-stage structure, the cell types and the Brent-Kung
// topology are those of the reference design; the generic width is this
// design's own.
module bk_adder #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  logic [W-1:0] g, p, c;

  bk_pre  #(.W(W)) u_pre  (.a(a), .b(b), .g(g), .p(p));
  bk_tree #(.W(W)) u_tree (.g(g), .p(p), .cin(cin), .c(c), .cout(cout));
  bk_post #(.W(W)) u_post (.p(p), .c(c), .s(s));
endmodule
