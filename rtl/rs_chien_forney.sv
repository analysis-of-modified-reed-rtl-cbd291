// rs_chien_forney -- Chien search, Forney error magnitude and correction.
//
// For the k-th symbol leaving the decoder (k = 0 .. n-1, position p = n-1-k)
// the block evaluates, at x = alpha^-p = alpha^(k+1):
//   Lambda(x)            (zero marks an error at position p),
//   odd(x)  = sum of the odd terms of Lambda(x) = x * Lambda'(x),
//   Omega(x).
// Each polynomial term has its own register that is multiplied by alpha^j
// every clock, so one evaluation point is finished per clock. With first
// code root alpha^1 the error value is e = Omega(x) / Lambda'(x)
// = Omega(x) * x * inv(odd(x)); the inverse comes from the field LUT. The
// delayed received symbol (from the delay buffer) is XORed with e when
// Lambda(x) = 0.
//
// Interface: kes_valid/kes_ready take Lambda, Omega and deg (= L). Then n
// consecutive clocks pop the delay buffer (rx_pop/rx_data) and produce one
// registered output symbol each (out_valid, out_sop, out_eop). With the last
// symbol, err_count (roots found) and fail are updated and then held:
// fail = L > t, or the number of roots found differs from L, or a repeated
// root. When L > t nothing is corrected. A new block is loaded in the same
// clock as the last symbol of the previous one, so blocks can follow back to
// back.
//
// The document names Chien search, error magnitude and correction as the
// last stages and defines error_count and fail; the structure is a design
// choice.
module rs_chien_forney
  import rs_pkg::*;
#(
  parameter int unsigned TMAX = 16
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clear,
  input  poly_t poly,
  input  m_t    m,
  input  t_t    t,
  input  len_t  n,
  input  sym_t  apow [2*TMAX+1],
  // key-equation result
  input  logic  kes_valid,
  output logic  kes_ready,
  input  sym_t  lambda [TMAX+1],
  input  sym_t  omega [TMAX],
  input  logic [5:0] deg,
  // field inverse table
  output sym_t  inv_addr,
  input  sym_t  inv_data,
  // delayed received symbols
  output logic  rx_pop,
  input  sym_t  rx_data,
  // corrected output
  output logic  out_valid,
  output sym_t  out_data,
  output logic  out_sop,
  output logic  out_eop,
  output logic [5:0] err_count,
  output logic  fail
);
  sym_t lam_q [TMAX+1];
  sym_t om_q  [TMAX];
  sym_t lam_p [TMAX+1];
  sym_t om_p  [TMAX];
  sym_t x_q, x_p;
  sym_t lam_v, odd_v, om_v, ox, mag;
  logic [5:0] deg_q, cnt_err_q;
  len_t k_q;
  logic run_q, en_q, bad_q;
  logic last, root, load;

  for (genvar j = 0; j <= TMAX; j++) begin : g_lam
    rs_gf_mul u_mul (.a(lam_q[j]), .b(apow[j]), .p(poly), .m(m), .y(lam_p[j]));
  end
  for (genvar j = 0; j < TMAX; j++) begin : g_om
    rs_gf_mul u_mul (.a(om_q[j]), .b(apow[j]), .p(poly), .m(m), .y(om_p[j]));
  end
  rs_gf_mul u_x   (.a(x_q),   .b(sym_t'(2)), .p(poly), .m(m), .y(x_p));
  rs_gf_mul u_ox  (.a(om_v),  .b(x_p),       .p(poly), .m(m), .y(ox));
  rs_gf_mul u_mag (.a(ox),    .b(inv_data),  .p(poly), .m(m), .y(mag));

  always_comb begin
    lam_v = '0;
    odd_v = '0;
    om_v  = '0;
    for (int j = 0; j <= TMAX; j++) begin
      lam_v ^= lam_p[j];
      if (j % 2 == 1) odd_v ^= lam_p[j];
    end
    for (int j = 0; j < TMAX; j++) om_v ^= om_p[j];
  end

  assign inv_addr  = odd_v;
  assign last      = run_q && (k_q == n - 1'b1);
  assign kes_ready = !run_q || last;
  assign load      = kes_valid && kes_ready;
  assign root      = run_q && en_q && (lam_v == '0);
  assign rx_pop    = run_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_q     <= 1'b0;
      en_q      <= 1'b0;
      bad_q     <= 1'b0;
      k_q       <= '0;
      x_q       <= '0;
      deg_q     <= '0;
      cnt_err_q <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      out_sop   <= 1'b0;
      out_eop   <= 1'b0;
      err_count <= '0;
      fail      <= 1'b0;
      for (int j = 0; j <= TMAX; j++) lam_q[j] <= '0;
      for (int j = 0; j < TMAX; j++)  om_q[j]  <= '0;
    end else if (clear) begin
      run_q     <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= run_q;
      if (run_q) begin
        out_data <= rx_data ^ ((root && odd_v != '0) ? mag : '0);
        out_sop  <= (k_q == '0);
        out_eop  <= last;
        for (int j = 0; j <= TMAX; j++) lam_q[j] <= lam_p[j];
        for (int j = 0; j < TMAX; j++)  om_q[j]  <= om_p[j];
        x_q <= x_p;
        k_q <= k_q + 1'b1;
        if (root) cnt_err_q <= cnt_err_q + 6'd1;
        if (root && odd_v == '0) bad_q <= 1'b1;
        if (last) begin
          run_q     <= 1'b0;
          err_count <= cnt_err_q + 6'(root);
          fail      <= !en_q || bad_q || (root && odd_v == '0) ||
                       (cnt_err_q + 6'(root) != deg_q);
        end
      end
      if (load) begin
        run_q     <= 1'b1;
        k_q       <= '0;
        x_q       <= sym_t'(1);
        deg_q     <= deg;
        en_q      <= (deg <= 6'(t));
        bad_q     <= 1'b0;
        cnt_err_q <= '0;
        for (int j = 0; j <= TMAX; j++) lam_q[j] <= lambda[j];
        for (int j = 0; j < TMAX; j++)  om_q[j]  <= omega[j];
      end
    end
  end

endmodule
