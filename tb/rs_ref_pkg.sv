// rs_ref_pkg -- independent reference arithmetic for the Reed-Solomon
// testbenches.
//
// Multiplication is done as a carry-less product followed by polynomial long
// division (a different method from the RTL's interleaved reduction). The
// generator polynomial is the product of (x + alpha^i), i = 1..2t, encoding
// is polynomial long division, and syndromes are direct power sums. Blocks
// are arrays of 256 symbols where index 0 is the first symbol sent (the
// coefficient of x^(n-1)).
package rs_ref_pkg;

  typedef logic [7:0] rsym_t;
  typedef rsym_t blk_t [256];

  function automatic int ref_poly(input int m);
    case (m)
      3: return 'h00B;
      4: return 'h013;
      5: return 'h025;
      6: return 'h043;
      7: return 'h089;
      8: return 'h11D;
      default: return 0;
    endcase
  endfunction

  function automatic int ref_n(input int m);
    return (1 << m) - 1;
  endfunction

  function automatic rsym_t ref_mul(input int m, input rsym_t a, input rsym_t b);
    logic [15:0] prod;
    int p;
    p = ref_poly(m);
    prod = '0;
    for (int i = 0; i < 8; i++) if (b[i]) prod ^= 16'(a) << i;
    for (int i = 15; i >= m; i--) if (prod[i]) prod ^= 16'(p) << (i - m);
    return prod[7:0];
  endfunction

  function automatic rsym_t ref_pow(input int m, input int e);
    rsym_t r;
    int ee;
    r = 8'd1;
    ee = e % ref_n(m);
    if (ee < 0) ee += ref_n(m);
    for (int i = 0; i < ee; i++) r = ref_mul(m, r, 8'd2);
    return r;
  endfunction

  function automatic rsym_t ref_inv(input int m, input rsym_t a);
    for (int x = 1; x < 256; x++) if (ref_mul(m, a, rsym_t'(x)) == 8'd1) return rsym_t'(x);
    return 8'd0;
  endfunction

  // g[j] = coefficient of x^j, j = 0..2t (g[2t] = 1)
  function automatic void ref_genpoly(input int m, input int t, output rsym_t g [33]);
    rsym_t ng [33];
    rsym_t root;
    for (int j = 0; j < 33; j++) g[j] = '0;
    g[0] = 8'd1;
    for (int i = 1; i <= 2*t; i++) begin
      root = ref_pow(m, i);
      for (int j = 0; j < 33; j++) ng[j] = ref_mul(m, g[j], root) ^ ((j > 0) ? g[j-1] : 8'd0);
      g = ng;
    end
  endfunction

  // cw[0..k-1] = msg[0..k-1], cw[k..n-1] = remainder of msg(x)*x^2t / g(x)
  function automatic void ref_encode(input int m, input int t, input blk_t msg, output blk_t cw);
    rsym_t g [33];
    blk_t  w;
    int n, k;
    rsym_t q;
    n = ref_n(m);
    k = n - 2*t;
    ref_genpoly(m, t, g);
    for (int i = 0; i < 256; i++) w[i] = (i < k) ? msg[i] : 8'd0;
    // long division, w[i] is the coefficient of x^(n-1-i)
    for (int i = 0; i < k; i++) begin
      q = w[i];
      if (q != 0)
        for (int j = 0; j <= 2*t; j++) w[i+j] ^= ref_mul(m, q, g[2*t-j]);
    end
    for (int i = 0; i < 256; i++) cw[i] = (i < k) ? msg[i] : ((i < n) ? w[i] : 8'd0);
  endfunction

  // S_j = R(alpha^j), j = 1..2t, returned in s[j-1]
  function automatic void ref_syndromes(input int m, input int t, input blk_t r, output rsym_t s [32]);
    int n;
    n = ref_n(m);
    for (int j = 0; j < 32; j++) begin
      s[j] = '0;
      if (j < 2*t)
        for (int i = 0; i < n; i++)
          s[j] ^= ref_mul(m, r[i], ref_pow(m, (j+1) * (n-1-i)));
    end
  endfunction

  function automatic rsym_t ref_rand_sym(input int m);
    return rsym_t'($urandom_range(ref_n(m), 0));
  endfunction

endpackage
