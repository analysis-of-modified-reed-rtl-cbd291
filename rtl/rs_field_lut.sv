// rs_field_lut -- field-coefficient look-up tables for the configured GF(2^m).
//
// When a new field size m is configured (start pulse), the block selects the
// primitive polynomial from a ROM and then walks the field once, one element
// per clock: u = alpha^i steps up by alpha and d = alpha^-i steps down by
// alpha^-1. Each cycle it writes inv_mem[u] = d, so after n = 2^m - 1 cycles
// the inverse table is complete, and the first 2*TMAX+1 powers are kept in
// apow[] for the syndrome roots and the Chien search step constants.
//
// Interface: start/m in; ready goes high n+1 cycles after start and stays high
// until the next start. poly, m_q and n are the registered field settings.
// inv_addr/inv_data is an asynchronous read port of the inverse table
// (inv(0) is defined as 0).
//
// The document calls for a LUT that supplies the field coefficients for each
// m; filling the tables by walking the field, rather than storing one ROM per
// m, is this design's choice. alpha^-1 is taken as p >> 1, which holds for any
// primitive polynomial because its constant term is 1.
module rs_field_lut
  import rs_pkg::*;
#(
  parameter int unsigned TMAX = 16
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  m_t    m,
  output logic  ready,
  output poly_t poly,
  output m_t    m_q,
  output len_t  n,
  output sym_t  apow [2*TMAX+1],   // apow[j] = alpha^j, j = 0 .. 2*TMAX
  input  sym_t  inv_addr,
  output sym_t  inv_data
);
  localparam int unsigned NPOW = 2*TMAX + 1;

  sym_t inv_mem [1 << MMAX];
  sym_t up_q, dn_q, up_nx, dn_nx;
  len_t idx_q;
  logic busy_q;
  sym_t ainv;

  assign ainv = sym_t'(poly >> 1);

  rs_gf_mul u_up (.a(up_q), .b(sym_t'(2)), .p(poly), .m(m_q), .y(up_nx));
  rs_gf_mul u_dn (.a(dn_q), .b(ainv),      .p(poly), .m(m_q), .y(dn_nx));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q <= 1'b0;
      ready  <= 1'b0;
      poly   <= '0;
      m_q    <= '0;
      n      <= '0;
      idx_q  <= '0;
      up_q   <= sym_t'(1);
      dn_q   <= sym_t'(1);
      for (int j = 0; j < NPOW; j++) apow[j] <= '0;
    end else if (start) begin
      busy_q <= 1'b1;
      ready  <= 1'b0;
      poly   <= prim_poly(m);
      m_q    <= m;
      n      <= block_len(m);
      idx_q  <= '0;
      up_q   <= sym_t'(1);
      dn_q   <= sym_t'(1);
    end else if (busy_q) begin
      for (int j = 0; j < NPOW; j++) if (32'(idx_q) == j) apow[j] <= up_q;
      up_q  <= up_nx;
      dn_q  <= dn_nx;
      idx_q <= idx_q + 1'b1;
      if (idx_q == n - 1'b1) begin
        busy_q <= 1'b0;
        ready  <= 1'b1;
      end
    end
  end

  // Entries apow[j] with j >= n are not written for small fields; they are
  // never used because every configuration has 2t < n.

  always_ff @(posedge clk) begin
    if (busy_q) inv_mem[up_q] <= dn_q;
  end

  assign inv_data = (inv_addr == '0) ? '0 : inv_mem[inv_addr];

endmodule
