// bk_tree: Brent-Kung prefix carry tree.
//
// Takes the bit generates g and propagates p of a W-bit addition and the
// carry in, and returns the carry c[i] into every bit position i together
// with the carry out. The carry in is treated as an extra bit position 0
// with generate = cin and propagate = 0, so the operand bits occupy
// positions 1..W and the tree spans NW = W+1 positions. The prefix of
// position j is then the group (j:0), and its generate is the carry into
// operand bit j.
//
// The tree has the Brent-Kung shape: an up-sweep of L = clog2(NW) levels
// that forms the groups ending at positions 2^l*k - 1, followed by a
// down-sweep of L-1 levels that fills in the remaining prefixes from the
// ones already complete. A merge whose lower group already reaches
// position 0 uses a grey cell (generate only); any other merge uses a
// black cell (generate and propagate). A position with nothing to merge at
// a level is carried on unchanged, which is the buffer cell of the
// classical drawing. For four positions this gives exactly the 4-bit
// Brent-Kung tree: (1:0) grey and (3:2) black at level 1, (3:0) grey at
// level 2, (2:0) grey at level 3. Every cell has fan-out of at most two,
// and depth is 2*L-1 cells. Purely combinational. The reference design
// gives the 4-position tree and the cell equations; treating cin as
// position 0 (G = cin, P = 0) follows its equations, and the extension to
// any W is the standard Brent-Kung construction chosen here.
module bk_tree #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] g,
  input  logic [W-1:0] p,
  input  logic         cin,
  output logic [W-1:0] c,
  output logic         cout
);
  localparam int unsigned NW   = W + 1;
  localparam int unsigned L    = $clog2(NW);
  localparam int unsigned NLEV = 2 * L - 1;

  // Group generate/propagate of every position after each level.
  logic [NW-1:0] gl [NLEV+1];
  logic [NW-1:0] pl [NLEV+1];

  assign gl[0] = {g, cin};
  assign pl[0] = {p, 1'b0};

  for (genvar lv = 1; lv <= NLEV; lv++) begin : g_level
    // Up-sweep levels 1..L merge at stride 2^lv; down-sweep levels
    // L+1..2L-1 merge at half the stride of the level before.
    localparam bit          UP   = (lv <= L);
    localparam int unsigned SH   = UP ? lv : (2 * L - lv);
    localparam int unsigned STEP = 1 << SH;
    localparam int unsigned HALF = STEP >> 1;
    for (genvar i = 0; i < NW; i++) begin : g_pos
      localparam bit MERGE_UP   = UP  && ((i + 1) % STEP == 0);
      localparam bit MERGE_DOWN = !UP && ((i + 1) % STEP == HALF) && (i + 1 >= STEP + HALF);
      if (MERGE_UP && (i + 1 != STEP)) begin : g_black
        bk_black_cell u_cell (
          .g_hi (gl[lv-1][i]),      .p_hi (pl[lv-1][i]),
          .g_lo (gl[lv-1][i-HALF]), .p_lo (pl[lv-1][i-HALF]),
          .g_out(gl[lv][i]),        .p_out(pl[lv][i])
        );
      end else if (MERGE_UP || MERGE_DOWN) begin : g_grey
        bk_grey_cell u_cell (
          .g_hi (gl[lv-1][i]), .p_hi (pl[lv-1][i]),
          .g_lo (gl[lv-1][i-HALF]),
          .g_out(gl[lv][i])
        );
        // The group now reaches position 0, whose propagate is 0.
        assign pl[lv][i] = 1'b0;
      end else begin : g_buffer
        assign gl[lv][i] = gl[lv-1][i];
        assign pl[lv][i] = pl[lv-1][i];
      end
    end
  end

  assign c    = gl[NLEV][W-1:0];
  assign cout = gl[NLEV][W];
endmodule
