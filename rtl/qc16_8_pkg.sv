// qc16_8_pkg: constants, types and elaboration-time functions of the
// linear, systematic, quasi-cyclic (16,8) code with minimum distance 5
// (corrects any two bit errors in a 16-bit code word).
//
// Bit numbering: the data byte is the row vector m = (m_1 .. m_8); element
// m_(i+1) is m[i] here, and likewise p_(j+1) is p[j]. The parity matrix P
// is the 8x8 circulant whose first row is 0 1 0 0 1 1 0 1 and whose row
// i+1 is row i rotated one place to the right. A code word is u = [p m].
//
// The syndrome look-up table is not stored as literal data: build_lut()
// computes it while the design is elaborated, by enumerating every error
// pattern of weight 0, 1 or 2 over the 16 code bits, computing its
// syndrome s = e_p xor e_m P, and storing the data part e_m at address s.
// Syndromes that no such pattern produces are flagged as uncorrectable
// (three or more bit errors). That flag is this design's addition; the
// table contents themselves follow the maximum-likelihood rule of the code.
package qc16_8_pkg;

  localparam int unsigned K = 8;   // data bits per code word
  localparam int unsigned N = 16;  // code bits per code word

  typedef logic [K-1:0] byte_t;

  // One stored code word: parity byte and data byte.
  typedef struct packed {
    byte_t p;
    byte_t m;
  } codeword_t;

  // First row of the circulant parity matrix, element P[0][j] at index j.
  localparam logic [K-1:0] P_ROW0 = 8'b1011_0010;  // j=0..7: 0 1 0 0 1 1 0 1

  // Element P[i][j] of the circulant: row i is row 0 rotated right i places.
  function automatic logic p_elem(int unsigned i, int unsigned j);
    return P_ROW0[(j + K - i) % K];
  endfunction

  // Row i of P as a packed byte (bit j = P[i][j]).
  function automatic byte_t p_row(int unsigned i);
    byte_t r;
    for (int unsigned j = 0; j < K; j++) r[j] = p_elem(i, j);
    return r;
  endfunction

  // p = m P (modulo 2).
  function automatic byte_t encode(byte_t m);
    byte_t p = '0;
    for (int unsigned i = 0; i < K; i++)
      if (m[i]) p ^= p_row(i);
    return p;
  endfunction

  // Syndrome of a 16-bit error pattern e = {e_p, e_m}: s = e_p xor e_m P.
  function automatic byte_t syndrome_of(codeword_t e);
    return e.p ^ encode(e.m);
  endfunction

  // Look-up table entry: bit 8 = syndrome is correctable, bits 7:0 = e_hat.
  typedef logic [K:0] lut_entry_t;
  typedef lut_entry_t [2**K-1:0] lut_t;

  function automatic lut_t build_lut();
    lut_t t = '0;
    for (int unsigned a = 0; a <= N; a++) begin
      for (int unsigned b = a; b <= N; b++) begin
        // a == N stands for "no bit"; (a,b) = (N,N) is the error-free word,
        // (a,N) a single error, a<b<N a double error.
        logic [N-1:0] e;
        codeword_t    ew;
        e = '0;
        if (a < N) e[a] = 1'b1;
        if (b < N) e[b] = 1'b1;
        if (a == b && a < N) continue;
        if (a == N && b != N) continue;
        ew = codeword_t'(e);
        t[syndrome_of(ew)] = {1'b1, ew.m};
      end
    end
    return t;
  endfunction

endpackage
