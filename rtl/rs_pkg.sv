// rs_pkg -- shared types and Galois-field arithmetic for the reconfigurable
// Reed-Solomon encoder/decoder.
//
// Symbols are held in MMAX = 8 bit words; for a field GF(2^m) with m < 8 the
// upper 8-m bits are zero. The field size m is a run-time setting (3..8), so
// multiplication takes the primitive polynomial and m as operands instead of
// being hard-wired for one field.
//
// Primitive polynomials (the run-time field table, indexed by m):
//   m=3 x^3+x+1, m=4 x^4+x+1, m=5 x^5+x^2+1, m=6 x^6+x+1, m=7 x^7+x^3+1,
//   m=8 x^8+x^4+x^3+x^2+1.
// The m=4 entry reproduces the published test vector (n=15, k=9, t=3); the
// other entries are the usual minimum-weight choices and are a design choice.
// Code roots are alpha^1 .. alpha^2t (first consecutive root 1), which the same
// test vector confirms.
package rs_pkg;

  localparam int unsigned MMAX = 8;          // widest symbol, GF(2^8)
  localparam int unsigned MMIN = 3;          // narrowest supported field

  typedef logic [MMAX-1:0] sym_t;            // one field element / symbol
  typedef logic [MMAX:0]   poly_t;           // primitive polynomial incl. x^m
  typedef logic [3:0]      m_t;              // field size m
  typedef logic [4:0]      t_t;              // correction capability t
  typedef logic [MMAX-1:0] len_t;            // block length n = 2^m - 1

  // Primitive polynomial look-up table.
  function automatic poly_t prim_poly(input m_t m);
    unique case (m)
      4'd3:    return 9'h00B;
      4'd4:    return 9'h013;
      4'd5:    return 9'h025;
      4'd6:    return 9'h043;
      4'd7:    return 9'h089;
      4'd8:    return 9'h11D;
      default: return 9'h000;
    endcase
  endfunction

  // n = 2^m - 1
  function automatic len_t block_len(input m_t m);
    logic [MMAX:0] one_hot;
    one_hot = 9'(1) << m;
    return len_t'(one_hot - 9'd1);
  endfunction

  // Whether (m, t) is a configuration the hardware supports: 3 <= m <= 8,
  // 1 <= t <= tmax and 2t < n.
  function automatic logic cfg_ok(input m_t m, input t_t t, input int unsigned tmax);
    if (m < 4'(MMIN) || m > 4'(MMAX)) return 1'b0;
    if (t == '0 || 32'(t) > tmax) return 1'b0;
    return (9'(t) << 1) < 9'(block_len(m));
  endfunction

  // a*b in GF(2^m) modulo p. Operands must be below 2^m. Shift-and-add,
  // most significant bit of b first, reducing by p whenever bit m is set.
  function automatic sym_t gf_mul(input sym_t a, input sym_t b, input poly_t p, input m_t m);
    logic [MMAX:0] r;
    r = '0;
    for (int i = MMAX - 1; i >= 0; i--) begin
      r = r << 1;
      if (r[m]) r = r ^ p;
      if (b[i]) r = r ^ {1'b0, a};
    end
    return r[MMAX-1:0];
  endfunction

endpackage
