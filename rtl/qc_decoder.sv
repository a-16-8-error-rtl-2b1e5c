// qc_decoder: flow-through decoder of the (16,8) quasi-cyclic code.
//
// It follows the decoder schematic: the read data byte m' is re-encoded by
// the parity generator P, XOR-ed with the read parity byte p' to give the
// syndrome s = m'P xor p', the syndrome addresses the maximum-likelihood
// look-up table, and the table's data error vector e_hat is XOR-ed into m'
// to give the corrected byte m_hat = e_hat xor m'. Any one or two bit
// errors anywhere in the 16-bit word are corrected; errors in the parity
// byte are not corrected, because the parity is never returned.
//
// Interface: p_r, m_r (read parity and data) in; m_hat (corrected data),
// syndrome (zero for an intact word) and uncorrectable (more than two bit
// errors detected) out. The syndrome output and the flag are this design's
// additions for observing the decoder. Purely combinational.
module qc_decoder
  import qc16_8_pkg::*;
(
  input  byte_t p_r,
  input  byte_t m_r,
  output byte_t m_hat,
  output byte_t syndrome,
  output logic  uncorrectable
);

  byte_t p_re;   // re-encoded parity of the read data
  byte_t e_hat;

  qc_encoder u_reencode (
    .m (m_r),
    .p (p_re)
  );

  assign syndrome = p_re ^ p_r;

  qc_syndrome_lut u_lut (
    .s             (syndrome),
    .e_hat         (e_hat),
    .uncorrectable (uncorrectable)
  );

  assign m_hat = e_hat ^ m_r;

endmodule
