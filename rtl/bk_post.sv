// bk_post: post-processing stage of a parallel prefix adder.
//
// Forms the sum bits s_i = p_i ^ c_i from the bit propagates of the
// pre-processing stage and the carries c_i into each bit position delivered
// by the prefix carry tree. Purely combinational. The equation is that of
// the reference design.
module bk_post #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] p,
  input  logic [W-1:0] c,
  output logic [W-1:0] s
);
  assign s = p ^ c;
endmodule
