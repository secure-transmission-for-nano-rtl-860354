// mlg_corrector -- parallel, pipelined corrector for the (15,7,5) EG-LDPC code.
//
// Every codeword bit i has its own copy of the 4 parity checks of H that
// contain it (rows i, i-8, i-9, i-11 mod 15). These 4 checks meet only in bit
// i, so with at most 2 errors in the word an erroneous bit fails at least 3 of
// them and a correct bit fails at most 2. The bit is flipped when 3 or more
// fail (one-step majority logic), which corrects any 1 or 2 errors. All 15
// bits are corrected in parallel, and no logic is shared between bits, so a
// single fault inside the corrector disturbs only one output digit, which the
// fault-secure detector after it can then catch.
//
// The published design asks for a parallel, pipelined corrector that corrects
// the retrieved word; the majority-logic method and the two-stage pipeline
// are this design's choices.
//
// Timing: stage 1 registers the word and the 60 per-bit check results; stage
// 2 registers the corrected word. out_valid follows in_valid by 2 cycles and
// a new word may enter every cycle.
module mlg_corrector
  import eg_ldpc_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  codeword_t in_cw,
  output logic      out_valid,
  output codeword_t out_cw,
  output logic      out_fixed
);

  typedef logic [W-1:0] checks_t;

  logic               s1_valid;
  codeword_t          s1_cw;
  checks_t   [N-1:0]  s1_chk;
  checks_t   [N-1:0]  chk;
  codeword_t          flip;

  // Per-bit check sums.
  always_comb begin
    for (int unsigned i = 0; i < N; i++)
      for (int unsigned m = 0; m < W; m++)
        chk[i][m] = ^(in_cw & h_row(check_of_bit(i, m)));
  end

  // Per-bit majority vote.
  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      int unsigned fails;
      fails = 0;
      for (int unsigned m = 0; m < W; m++) fails += int'(s1_chk[i][m]);
      flip[i] = (fails >= THRESH);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1_valid  <= 1'b0;
      s1_cw     <= '0;
      s1_chk    <= '0;
      out_valid <= 1'b0;
      out_cw    <= '0;
      out_fixed <= 1'b0;
    end else begin
      s1_valid  <= in_valid;
      s1_cw     <= in_cw;
      s1_chk    <= chk;
      out_valid <= s1_valid;
      out_cw    <= s1_cw ^ flip;
      out_fixed <= |flip;
    end
  end

endmodule
