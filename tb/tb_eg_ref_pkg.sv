// tb_eg_ref_pkg -- reference model of the (15,7,5) EG-LDPC code for the
// testbenches, written independently of the RTL package.
//
// H is built from its defining line {0, 8, 9, 11}: syndrome bit j is the parity
// of bits j, j+8, j+9, j+11 (mod 15). Testbenches use ref_syndrome only in
// continuous assignments. rand_err draws an error pattern of a given weight.
package tb_eg_ref_pkg;

  localparam int N = 15;
  localparam int K = 7;
  localparam int OFS [4] = '{0, 8, 9, 11};

  function automatic logic [N-1:0] ref_syndrome(logic [N-1:0] c);
    logic [N-1:0] s;
    for (int j = 0; j < N; j++) begin
      s[j] = 1'b0;
      for (int m = 0; m < 4; m++) s[j] ^= c[(j + OFS[m]) % N];
    end
    return s;
  endfunction

  // A random error pattern of exactly e bits.
  function automatic logic [N-1:0] rand_err(int e);
    logic [N-1:0] m;
    m = '0;
    while ($countones(m) < e) m[$urandom_range(N - 1)] = 1'b1;
    return m;
  endfunction

endpackage
