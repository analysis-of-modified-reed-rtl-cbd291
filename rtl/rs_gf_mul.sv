// rs_gf_mul -- combinational GF(2^m) multiplier with a run-time field.
//
// y = a * b reduced modulo the primitive polynomial p of degree m. The field is
// an input, not a parameter, so one multiplier serves every supported m
// (3..8); this is what lets the encoder and decoder change block length
// without new hardware. Operands and result are 8-bit words whose bits above
// m-1 are zero. Purely combinational: no clock, no latency.
module rs_gf_mul
  import rs_pkg::*;
(
  input  sym_t  a,
  input  sym_t  b,
  input  poly_t p,     // primitive polynomial including the x^m term
  input  m_t    m,     // field size
  output sym_t  y
);
  always_comb y = gf_mul(a, b, p, m);
endmodule
