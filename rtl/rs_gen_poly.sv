// rs_gen_poly -- generator-polynomial coefficient table for the configured
// code RS(n, n-2t) over GF(2^m).
//
// g(x) = (x + alpha^1)(x + alpha^2)...(x + alpha^2t). After a start pulse the
// block sets g(x) = 1 and multiplies in one root factor per clock, using
// 2*TMAX parallel GF multipliers, so the table is ready 2t+1 cycles after
// start. The monic leading coefficient g_2t = 1 is implicit; g[j] for j >= 2t
// reads as 0.
//
// Interface: start, m, t in; ready, the field (poly, m_q), t_q and the
// coefficients g[0 .. 2*TMAX-1] out, held until the next start.
//
// The document generates generator coefficients from a LUT for every (m, t);
// computing them once per configuration is this design's way to fill that
// table without storing every (m, t) combination.
module rs_gen_poly
  import rs_pkg::*;
#(
  parameter int unsigned TMAX = 16
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  m_t    m,
  input  t_t    t,
  output logic  ready,
  output poly_t poly,
  output m_t    m_q,
  output t_t    t_q,
  output sym_t  g [2*TMAX]
);
  localparam int unsigned NPAR = 2*TMAX;

  sym_t  gc   [NPAR+1];          // working polynomial, gc[NPAR] for overflow-free shift
  sym_t  prod [NPAR+1];
  sym_t  root_q, root_nx;
  logic [5:0] step_q;
  logic  busy_q;

  for (genvar j = 0; j <= NPAR; j++) begin : g_mul
    rs_gf_mul u_mul (.a(gc[j]), .b(root_q), .p(poly), .m(m_q), .y(prod[j]));
  end
  rs_gf_mul u_root (.a(root_q), .b(sym_t'(2)), .p(poly), .m(m_q), .y(root_nx));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q <= 1'b0;
      ready  <= 1'b0;
      poly   <= '0;
      m_q    <= '0;
      t_q    <= '0;
      step_q <= '0;
      root_q <= '0;
      for (int j = 0; j <= NPAR; j++) gc[j] <= '0;
    end else if (start) begin
      busy_q <= 1'b1;
      ready  <= 1'b0;
      poly   <= prim_poly(m);
      m_q    <= m;
      t_q    <= t;
      step_q <= '0;
      root_q <= sym_t'(2);                       // alpha^1
      gc[0]  <= sym_t'(1);
      for (int j = 1; j <= NPAR; j++) gc[j] <= '0;
    end else if (busy_q) begin
      // g(x) <- g(x) * (x + root)
      gc[0] <= prod[0];
      for (int j = 1; j <= NPAR; j++) gc[j] <= gc[j-1] ^ prod[j];
      root_q <= root_nx;
      step_q <= step_q + 1'b1;
      if (step_q == {t_q, 1'b0} - 6'd1) begin
        busy_q <= 1'b0;
        ready  <= 1'b1;
      end
    end
  end

  always_comb begin
    for (int j = 0; j < NPAR; j++) g[j] = (j < 2*int'(t_q)) ? gc[j] : '0;
  end

endmodule
