// rns_reverse_converter: CRT reverse converter for {2^n-1, 2^n, 2^n+1}.
//
// Converts the residues (r1, r2, r3) of moduli (2^N-1, 2^N, 2^N+1) back to
// the binary number X in [0, M), M = 2^N*(2^(2N)-1), by the Chinese
// remainder theorem:
//   X = | r1*C1 + r2*C2 + r3*C3 |_M,   C_i = M_i * |M_i^-1|_{m_i}.
// The constants C_i come from a ROM (rns_crt_rom). Each residue is
// multiplied by its constant (out1, out2, out3), the first two products
// are added (mid) and then the third (sum), both with Brent-Kung adders.
// The modulo-M reduction uses M = 2^N * Q, Q = 2^(2N)-1:
//   |sum|_M = 2^N * | sum >> N |_Q + (sum mod 2^N),
// and | . |_Q is formed by folding the upper part of the sum in 2N-bit
// digits with end-around-carry adders (2^(2N) = 1 mod Q), then mapping the
// all-ones code to zero. No comparator or divider is needed.
// For N = 2 and residues (0, 1, 2): out1 = 0, out2 = 45, out3 = 72,
// mid = 45, sum = 117, X = 57.
//
// Timing: combinational from the residues to `binary_d`; `binary` is that
// value registered on the rising clock edge, so it appears one cycle after
// the residues. `rst` (active high, asynchronous) clears the register.
// Residue ports may carry any value their width allows, non-canonical ones
// included (r1 = 2^N-1 means 0); X is still the correct CRT result.
// `fold_wrap` reports that an end-around carry occurred during the fold,
// `zero_fix` that the all-ones code was mapped to zero.
// The CRT formulation with ROM constants multiplied by the residues and
// summed by adders, and the product/partial-sum values of the example,
// follow the reference design. The widths, the modulo-M reduction by EAC
// folding, the output register and its reset are this design's choices.
module rns_reverse_converter
  import rns_pkg::*;
#(
  parameter int unsigned N = 2
) (
  input  logic           clk,
  input  logic           rst,
  input  logic [N-1:0]   r1,
  input  logic [N-1:0]   r2,
  input  logic [N:0]     r3,
  output logic [3*N-1:0] binary,
  output logic [3*N-1:0] binary_d,
  output logic           fold_wrap,
  output logic           zero_fix
);
  if (N < 2 || N > MAX_N) begin : g_bad_n
    $error("rns_reverse_converter: N must lie in 2..%0d", MAX_N);
  end

  localparam int unsigned CW = 3 * N;                     // ROM word width
  localparam int unsigned SW = bits_for(crt_max_sum(N));  // sum width
  localparam int unsigned QW = 2 * N;                     // Q = 2^QW - 1
  localparam int unsigned UW = SW - N;                    // sum >> N
  localparam int unsigned K  = (UW + QW - 1) / QW;        // 2N-bit digits

  // ---- CRT constants -------------------------------------------------------
  logic [CW-1:0] c1, c2, c3;

  rns_crt_rom #(.N(N)) u_rom1 (.ch(2'd0), .word(c1));
  rns_crt_rom #(.N(N)) u_rom2 (.ch(2'd1), .word(c2));
  rns_crt_rom #(.N(N)) u_rom3 (.ch(2'd2), .word(c3));

  // ---- products and their sum ------------------------------------------------
  logic [SW-1:0] out1, out2, out3, mid, sum;
  logic          c_mid, c_sum;

  assign out1 = SW'(r1) * SW'(c1);
  assign out2 = SW'(r2) * SW'(c2);
  assign out3 = SW'(r3) * SW'(c3);

  bk_adder #(.W(SW)) u_add_mid (.a(out1), .b(out2), .cin(1'b0), .s(mid), .cout(c_mid));
  bk_adder #(.W(SW)) u_add_sum (.a(mid),  .b(out3), .cin(1'b0), .s(sum), .cout(c_sum));

  // ---- reduction modulo M ------------------------------------------------
  logic [K*QW-1:0] upper;
  logic [QW-1:0]   acc [K];
  logic [K-1:0]    wrap;
  logic [QW-1:0]   upper_mod;

  assign upper   = (K*QW)'(sum[SW-1:N]);
  assign acc[0]  = upper[QW-1:0];
  assign wrap[0] = 1'b0;

  for (genvar k = 1; k < K; k++) begin : g_fold
    rns_eac_adder #(.W(QW)) u_eac (
      .a(acc[k-1]), .b(upper[k*QW +: QW]), .s(acc[k]), .wrap(wrap[k])
    );
  end

  assign zero_fix  = &acc[K-1];
  assign upper_mod = zero_fix ? '0 : acc[K-1];
  assign fold_wrap = |wrap;
  assign binary_d  = {upper_mod, sum[N-1:0]};

  always_ff @(posedge clk or posedge rst) begin
    if (rst) binary <= '0;
    else     binary <= binary_d;
  end

  // SW is sized for the largest possible sum, so neither adder carries out.
  if (1) begin : g_unused
    logic unused;
    assign unused = ^{c_mid, c_sum};
  end
endmodule
