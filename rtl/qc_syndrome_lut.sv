// qc_syndrome_lut: maximum-likelihood syndrome decoder table of the (16,8)
// code (the LUT block of the decoder schematic).
//
// For an 8-bit syndrome s it returns the data error vector e_hat of the
// least-weight error pattern (weight 0, 1 or 2 over all 16 code bits) that
// has this syndrome. 137 of the 256 syndromes are reachable that way:
// 1 error-free, 16 single errors and 120 double errors. 100 of them involve
// a data bit and give a non-zero e_hat (8 single data errors, 28 double data
// errors, 64 one-data-plus-one-parity errors). The other 37 are the
// error-free word and the 36 errors confined to the parity byte, which
// need no correction, so e_hat = 0.
// The 119 syndromes that no pattern of weight <= 2 produces raise
// `uncorrectable`; e_hat is then 0 and the data passes uncorrected. That
// flag is this design's own addition (the document only speaks of
// detection capability in its conclusion).
//
// The table is computed at elaboration by qc16_8_pkg::build_lut() rather
// than listed, and is read as a 256-entry constant ROM, which synthesis
// turns into plain gates. Interface: s in; e_hat, uncorrectable out.
// Purely combinational.
module qc_syndrome_lut
  import qc16_8_pkg::*;
(
  input  byte_t s,
  output byte_t e_hat,
  output logic  uncorrectable
);

  localparam lut_t LUT = build_lut();

  lut_entry_t entry;

  always_comb begin
    entry         = LUT[s];
    e_hat         = entry[K-1:0];
    uncorrectable = ~entry[K];
  end

endmodule
