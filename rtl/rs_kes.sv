// rs_kes -- key-equation solver of the RS decoder.
//
// From the syndromes S_1..S_2t it finds the error-locator polynomial
// Lambda(x) with the inversion-free Berlekamp-Massey algorithm, one iteration
// per clock (2t clocks):
//   delta   = sum_j Lambda_j * S_(r+1-j)
//   Lambda <- gamma*Lambda + delta*x*B
//   if delta != 0 and 2L <= r:  B <- Lambda(old), L <- r+1-L, gamma <- delta
//   else                        B <- x*B
// It then forms the error-evaluator Omega(x) = S(x)Lambda(x) mod x^t, one
// coefficient per clock (t clocks), reusing the discrepancy datapath. Lambda
// and Omega share the same unknown scale factor gamma, which cancels in the
// Forney formula, so no field inversion is needed here.
//
// Interface: syn_valid/syn_ready in; kes_valid/kes_ready out, with lambda[],
// omega[] and deg (= L, the number of errors Lambda predicts) held until taken.
// Latency from accepting the syndromes to kes_valid: 3t clocks. A new block
// is accepted only after the result has been taken.
//
// The document names "determine error-location polynomial" as the second
// stage without fixing an algorithm; Berlekamp-Massey in its inversion-free
// form is this design's choice. Syndrome index: syn[i] holds S_(i+1).
module rs_kes
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
  input  logic  syn_valid,
  output logic  syn_ready,
  input  sym_t  syn [2*TMAX],
  output logic  kes_valid,
  input  logic  kes_ready,
  output sym_t  lambda [TMAX+1],
  output sym_t  omega [TMAX],
  output logic [5:0] deg
);
  localparam int unsigned NPAR = 2*TMAX;

  typedef enum logic [1:0] {S_IDLE, S_BM, S_OMEGA, S_DONE} state_t;
  state_t state_q;

  sym_t s_q   [NPAR];
  sym_t bb_q  [TMAX+1];
  sym_t gam_q;
  logic [5:0] r_q, len_q;
  sym_t delta;
  sym_t lam_nx [TMAX+1];

  // discrepancy (BM) or Omega coefficient r_q (Omega phase)
  always_comb begin
    delta = '0;
    for (int j = 0; j <= TMAX; j++) begin
      int idx;
      idx = int'(r_q) - j;
      if (idx >= 0 && idx < 2*int'(t))
        delta ^= gf_mul(lambda[j], s_q[idx], poly, m);
    end
  end

  always_comb begin
    lam_nx[0] = gf_mul(gam_q, lambda[0], poly, m);
    for (int j = 1; j <= TMAX; j++)
      lam_nx[j] = gf_mul(gam_q, lambda[j], poly, m) ^ gf_mul(delta, bb_q[j-1], poly, m);
  end

  assign syn_ready = (state_q == S_IDLE);
  assign kes_valid = (state_q == S_DONE);
  assign deg       = len_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      r_q     <= '0;
      len_q   <= '0;
      gam_q   <= '0;
      for (int j = 0; j < NPAR; j++) s_q[j] <= '0;
      for (int j = 0; j <= TMAX; j++) begin
        lambda[j] <= '0;
        bb_q[j]   <= '0;
      end
      for (int j = 0; j < TMAX; j++) omega[j] <= '0;
    end else if (clear) begin
      state_q <= S_IDLE;
    end else begin
      unique case (state_q)
        S_IDLE: if (syn_valid) begin
          for (int j = 0; j < NPAR; j++) s_q[j] <= syn[j];
          for (int j = 0; j <= TMAX; j++) begin
            lambda[j] <= (j == 0) ? sym_t'(1) : '0;
            bb_q[j]   <= (j == 0) ? sym_t'(1) : '0;
          end
          for (int j = 0; j < TMAX; j++) omega[j] <= '0;
          gam_q   <= sym_t'(1);
          len_q   <= '0;
          r_q     <= '0;
          state_q <= S_BM;
        end
        S_BM: begin
          for (int j = 0; j <= TMAX; j++) lambda[j] <= lam_nx[j];
          if (delta != '0 && {len_q, 1'b0} <= {1'b0, r_q}) begin
            for (int j = 0; j <= TMAX; j++) bb_q[j] <= lambda[j];
            len_q <= r_q + 6'd1 - len_q;
            gam_q <= delta;
          end else begin
            bb_q[0] <= '0;
            for (int j = 1; j <= TMAX; j++) bb_q[j] <= bb_q[j-1];
          end
          if (r_q == {t, 1'b0} - 6'd1) begin
            r_q     <= '0;
            state_q <= S_OMEGA;
          end else begin
            r_q <= r_q + 6'd1;
          end
        end
        S_OMEGA: begin
          for (int k = 0; k < TMAX; k++) if (6'(k) == r_q) omega[k] <= delta;
          if (r_q == {1'b0, t} - 6'd1) state_q <= S_DONE;
          else                          r_q <= r_q + 6'd1;
        end
        S_DONE: if (kes_ready) state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
