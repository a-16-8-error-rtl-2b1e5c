// qc_ref_pkg: reference model of the (16,8) code for the testbenches.
//
// It holds the parity matrix P exactly as it is printed, row by row with
// the leftmost element first, and derives everything else from it by
// straightforward vector arithmetic: encoding as the XOR of the rows of P
// selected by the data bits, syndromes from the columns of H = [I | P^T],
// and a table of which syndromes a pattern of one or two bit errors
// produces. It shares no code with the design.
package qc_ref_pkg;

  // Rows of P, leftmost element first (element j of row i is bit 7-j of
  // the literal, and bit j of the design's vectors).
  localparam logic [7:0] P_PRINTED [8] = '{
    8'b01001101,
    8'b10100110,
    8'b01010011,
    8'b10101001,
    8'b11010100,
    8'b01101010,
    8'b00110101,
    8'b10011010
  };

  function automatic logic [7:0] rev8(logic [7:0] v);
    logic [7:0] r;
    for (int b = 0; b < 8; b++) r[b] = v[7-b];
    return r;
  endfunction

  // Row i of P in the design's bit order.
  function automatic logic [7:0] ref_row(int i);
    return rev8(P_PRINTED[i]);
  endfunction

  function automatic logic [7:0] ref_encode(logic [7:0] m);
    logic [7:0] p = 8'h00;
    for (int i = 0; i < 8; i++) if (m[i]) p = p ^ ref_row(i);
    return p;
  endfunction

  // Column c of H, as the syndrome of a single error at code bit c
  // (c = 0..7: parity bit c; c = 8..15: data bit c-8).
  function automatic logic [7:0] ref_hcol(int c);
    return (c < 8) ? (8'h01 << c) : ref_row(c - 8);
  endfunction

  // Syndrome of a 16-bit error pattern {e_p, e_m}.
  function automatic logic [7:0] ref_syndrome(logic [15:0] e);
    logic [7:0] s = 8'h00;
    for (int c = 0; c < 8; c++)  if (e[8+c]) s = s ^ ref_hcol(c);
    for (int c = 8; c < 16; c++) if (e[c-8]) s = s ^ ref_hcol(c);
    return s;
  endfunction

  function automatic int popcount16(logic [15:0] v);
    int n = 0;
    for (int b = 0; b < 16; b++) n += int'(v[b]);
    return n;
  endfunction

  // Random error pattern over the 16 code bits {e_p, e_m} of exactly w bits.
  function automatic logic [15:0] rand_pattern(int w);
    logic [15:0] e = 16'h0000;
    while (popcount16(e) < w) e[$urandom_range(15, 0)] = 1'b1;
    return e;
  endfunction

endpackage
