// eg_ldpc_pkg -- constants, types and elaboration-time functions of the
// (15,7,5) Euclidean-Geometry LDPC code used by the fault-secure memory.
//
// The code is the t = 2 member of the EG-LDPC family: n = 2^(2t)-1 = 15,
// k = 2^(2t)-3^t = 7, dmin = 2^t+1 = 5, so it corrects t = 2 errors. Its
// parity-check matrix H is square (n x n) and cyclic: row j is the incidence
// vector of one line of the geometry, {0, 8, 9, 11}, rotated by j, so syndrome
// bit S_j checks codeword bits j, j+8, j+9 and j+11 (mod 15). Every row and
// every column of H has weight 4, and the 4 rows through any bit share no other
// bit, which is what makes one-step majority correction possible.
//
// The code size, the line and the n-syndrome-bit structure follow the
// published design. The generator's parity part X (G = [I : X], information in
// bits 0..6, parity in bits 7..14) is not tabulated: parity_matrix() derives
// it at elaboration by Gaussian elimination of H over GF(2), pivoting on the
// parity columns 7..14 (any 7 consecutive positions of a cyclic code are an
// information set, so the pivots always exist).
package eg_ldpc_pkg;

  localparam int unsigned T      = 2;                  // correctable errors
  localparam int unsigned N      = (1 << (2 * T)) - 1; // code length, 15
  localparam int unsigned K      = 7;                  // information bits, 2^(2t) - 3^t
  localparam int unsigned NP     = N - K;              // parity bits, 8
  localparam int unsigned W      = 1 << T;             // row/column weight of H, 4
  localparam int unsigned THRESH = W / 2 + 1;          // failing checks that flip a bit, 3

  // Positions of the ones in row 0 of H (the line through bit 0).
  localparam int unsigned LINE [W] = '{0, 8, 9, 11};

  typedef logic [N-1:0]  codeword_t;
  typedef logic [K-1:0]  info_t;
  typedef logic [N-1:0]  syndrome_t;
  typedef logic [NP-1:0][K-1:0] parity_matrix_t;       // [p][i]: parity bit K+p uses info bit i

  // Row j of H as an n-bit mask.
  function automatic codeword_t h_row(int unsigned j);
    codeword_t r;
    r = '0;
    for (int unsigned m = 0; m < W; m++) r[(j + LINE[m]) % N] = 1'b1;
    return r;
  endfunction

  // Index of the m-th check (row of H) that contains bit i.
  function automatic int unsigned check_of_bit(int unsigned i, int unsigned m);
    return (i + N - LINE[m]) % N;
  endfunction

  // Syndrome of a word: S_j = parity of the bits selected by row j.
  function automatic syndrome_t calc_syndrome(codeword_t c);
    syndrome_t s;
    for (int unsigned j = 0; j < N; j++) s[j] = ^(c & h_row(j));
    return s;
  endfunction

  // Parity part X of the systematic generator, from H by GF(2) elimination.
  function automatic parity_matrix_t parity_matrix();
    codeword_t      rows [N];
    codeword_t      tmp;
    parity_matrix_t x;
    int unsigned    piv;
    for (int unsigned j = 0; j < N; j++) rows[j] = h_row(j);
    for (int unsigned p = 0; p < NP; p++) begin
      piv = N;
      for (int unsigned r = p; r < N; r++)
        if (piv == N && rows[r][K + p]) piv = r;
      tmp = rows[p]; rows[p] = rows[piv]; rows[piv] = tmp;
      for (int unsigned r = 0; r < N; r++)
        if (r != p && rows[r][K + p]) rows[r] = rows[r] ^ rows[p];
    end
    // Row p now reads: c[K+p] ^ (xor of info bits in rows[p][K-1:0]) = 0.
    for (int unsigned p = 0; p < NP; p++) x[p] = rows[p][K-1:0];
    return x;
  endfunction

  localparam parity_matrix_t X = parity_matrix();

  // Reference encoding, C = I G.
  function automatic codeword_t encode(info_t info);
    codeword_t c;
    c[K-1:0] = info;
    for (int unsigned p = 0; p < NP; p++) c[K + p] = ^(info & X[p]);
    return c;
  endfunction

endpackage
