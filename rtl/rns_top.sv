// rns_top: residue number system datapath for the moduli set
// {2^N-1, 2^N, 2^N+1}.
//
// The system has three stages: a forward converter that turns a binary
// number into its three residues, a residue computation stage that works
// on each residue channel independently, and a reverse converter that
// turns the residues back into a binary number. Every adder in both
// converters is a Brent-Kung parallel prefix adder.
//
// The residue computation stage is application specific and is not part
// of this block: the forward residues leave on fwd_r1..fwd_r3, and the
// residues to be converted back enter on res_r1..res_r3. Tying fwd_* to
// res_* gives a binary -> RNS -> binary round trip. N is shared by both
// converters (the moduli set is fixed at elaboration).
//
// Timing: x to fwd_* is combinational. res_* to binary takes one clock
// cycle (registered on the rising edge of clk); rst, active high and
// asynchronous, clears binary. The flags report the correction steps the
// converters took for the current inputs: fwd_r1_wrap (end-around carry
// in the 2^N-1 channel), fwd_r3_sub (subtractions of 2^N+1 in that
// channel), rev_fold_wrap (end-around carry in the modulo-M reduction) and
// rev_zero_fix (all-ones code mapped to zero there). The three-stage
// structure and the moduli set follow the reference design; leaving the
// residue computation outside, the timing and the flags are choices made
// here.
module rns_top #(
  parameter int unsigned N = 2
) (
  input  logic           clk,
  input  logic           rst,
  // forward conversion
  input  logic [3*N-1:0] x,
  output logic [N-1:0]   fwd_r1,
  output logic [N-1:0]   fwd_r2,
  output logic [N:0]     fwd_r3,
  // reverse conversion
  input  logic [N-1:0]   res_r1,
  input  logic [N-1:0]   res_r2,
  input  logic [N:0]     res_r3,
  output logic [3*N-1:0] binary,
  // correction-step flags
  output logic           fwd_r1_wrap,
  output logic [1:0]     fwd_r3_sub,
  output logic           rev_fold_wrap,
  output logic           rev_zero_fix
);
  logic [3*N-1:0] binary_d;

  rns_forward_converter #(.N(N)) u_fwd (
    .x      (x),
    .r1     (fwd_r1),
    .r2     (fwd_r2),
    .r3     (fwd_r3),
    .r1_wrap(fwd_r1_wrap),
    .r3_sub (fwd_r3_sub)
  );

  rns_reverse_converter #(.N(N)) u_rev (
    .clk      (clk),
    .rst      (rst),
    .r1       (res_r1),
    .r2       (res_r2),
    .r3       (res_r3),
    .binary   (binary),
    .binary_d (binary_d),
    .fold_wrap(rev_fold_wrap),
    .zero_fix (rev_zero_fix)
  );

  // Only the registered result leaves the top.
  if (1) begin : g_unused
    logic unused;
    assign unused = ^binary_d;
  end
endmodule
