// rns_crt_rom: ROM of the CRT constants of the moduli set {2^n-1, 2^n, 2^n+1}.
//
// Word ch holds C_ch = M_ch * |M_ch^-1|_{m_ch}, where M is the dynamic range
// and M_ch = M / m_ch; word 3 holds zero. The reverse converter multiplies
// each residue by its word and adds the products. The contents are
// computed at elaboration from N; for N = 2 (moduli 3, 4, 5) they are 40,
// 45 and 36. Each word is 3N bits, as every C_ch is below M < 2^(3N).
// Asynchronous read, purely combinational. Keeping the constants in a ROM
// follows the reference design; the word layout is this design's own.
module rns_crt_rom
  import rns_pkg::*;
#(
  parameter int unsigned N = 2
) (
  input  logic [1:0]     ch,
  output logic [3*N-1:0] word
);
  localparam logic [3*N-1:0] C0 = (3*N)'(crt_const(N, 0));
  localparam logic [3*N-1:0] C1 = (3*N)'(crt_const(N, 1));
  localparam logic [3*N-1:0] C2 = (3*N)'(crt_const(N, 2));

  always_comb begin
    case (ch)
      2'd0:    word = C0;
      2'd1:    word = C1;
      2'd2:    word = C2;
      default: word = '0;
    endcase
  end
endmodule
