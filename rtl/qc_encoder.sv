// qc_encoder: parity generator of the (16,8) quasi-cyclic code (the block
// marked P in the encoder and decoder schematics).
//
// It forms the parity byte p = m P modulo 2, where P is the circulant parity
// matrix of qc16_8_pkg: each parity bit p[j] is the XOR of the data bits
// m[i] for which P[i][j] = 1 (four data bits per parity bit, since every
// column of P has weight 4). The data byte itself is stored unaltered next
// to p, so the code is systematic.
//
// Interface: m (data byte) in, p (parity byte) out. Purely combinational,
// no clock and no latency in cycles, as the document requires for a word
// EDAC that must "flow forward" from data to code word.
module qc_encoder
  import qc16_8_pkg::*;
(
  input  byte_t m,
  output byte_t p
);

  always_comb begin
    byte_t acc;
    acc = '0;
    for (int unsigned j = 0; j < K; j++)
      for (int unsigned i = 0; i < K; i++)
        acc[j] = acc[j] ^ (m[i] & p_elem(i, j));
    p = acc;
  end

endmodule
