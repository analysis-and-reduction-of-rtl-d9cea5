// bk_pre: pre-processing stage of a parallel prefix adder.
//
// Forms the bitwise generate g_i = a_i & b_i and propagate p_i = a_i ^ b_i
// of the two W-bit operands. The propagate is reused by the post-processing
// stage to form the sum. Purely combinational. The equations are those of
// the reference design.
module bk_pre #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] g,
  output logic [W-1:0] p
);
  assign g = a & b;
  assign p = a ^ b;
endmodule
