// bk_black_cell: black cell of a parallel prefix carry tree.
//
// Merges a higher group (g_hi, p_hi) with the adjacent lower group
// (g_lo, p_lo) into one group, producing both its generate and its
// propagate: G = g_hi | (p_hi & g_lo), P = p_hi & p_lo. It is used where
// the merged group does not yet reach bit 0, so its propagate is still
// needed further down the tree. Purely combinational. Cell and equations
// follow the reference design.
module bk_black_cell (
  input  logic g_hi,
  input  logic p_hi,
  input  logic g_lo,
  input  logic p_lo,
  output logic g_out,
  output logic p_out
);
  assign g_out = g_hi | (p_hi & g_lo);
  assign p_out = p_hi & p_lo;
endmodule
