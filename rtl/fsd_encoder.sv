// fsd_encoder -- systematic encoder of the (15,7,5) EG-LDPC code.
//
// Computes the codeword C = I G with G = [I : X]: the 7 information bits pass
// straight to codeword bits 6:0 and each of the 8 parity bits 14:7 is the XOR of
// the information bits selected by its row of X (X is derived from the
// parity-check matrix in eg_ldpc_pkg). Every codeword digit has its own XOR
// tree and no term is shared between digits, so a single transient fault in
// the encoder corrupts at most one digit; the fault-secure detector that
// follows the encoder then sees it. This single-digit property and the
// systematic form come from the published design; the gate-level structure is
// this design's own.
//
// Interface: info (7 bits) in, cw (15 bits) out. Purely combinational.
module fsd_encoder
  import eg_ldpc_pkg::*;
(
  input  info_t     info,
  output codeword_t cw
);

  always_comb begin
    cw[K-1:0] = info;
    for (int unsigned p = 0; p < NP; p++) cw[K + p] = ^(info & X[p]);
  end

endmodule
