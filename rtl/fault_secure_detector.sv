// fault_secure_detector -- fault-secure detector (FSD) of the EG-LDPC code.
//
// Computes all 15 syndrome bits, S_j = C_j ^ C_(j+8) ^ C_(j+9) ^ C_(j+11)
// (indices mod 15), one independent 4-input parity per row of the square
// parity-check matrix, and ORs them into one error flag. Because the code's
// minimum distance and the column weight of H are large, any small mix of
// errors in the word checked and in the syndrome trees themselves leaves at
// least one syndrome bit set, so the flag is raised; the OR gate is the one
// part that must be built reliably. Structure and connections follow the
// published design; the syn_flip input is this design's own addition, used to
// inject a transient fault into a syndrome tree (tie it to zero otherwise).
//
// Interface: cw (15 bits) and syn_flip (15 bits) in; syndrome (15 bits) and
// error out. Purely combinational.
module fault_secure_detector
  import eg_ldpc_pkg::*;
(
  input  codeword_t cw,
  input  syndrome_t syn_flip,
  output syndrome_t syndrome,
  output logic      error
);

  always_comb begin
    for (int unsigned j = 0; j < N; j++) begin
      syndrome[j] = syn_flip[j];
      for (int unsigned m = 0; m < W; m++) syndrome[j] ^= cw[(j + LINE[m]) % N];
    end
    error = |syndrome;
  end

endmodule
