// bk_grey_cell: grey cell of a parallel prefix carry tree.
//
// Merges a higher group with a lower group that already reaches bit 0, so
// only the generate of the result is formed: G = g_hi | (p_hi & g_lo). That
// generate is the carry out of the merged group. Purely combinational.
// Cell and equation follow the reference design.
module bk_grey_cell (
  input  logic g_hi,
  input  logic p_hi,
  input  logic g_lo,
  output logic g_out
);
  assign g_out = g_hi | (p_hi & g_lo);
endmodule
