// rs_encoder -- reconfigurable systematic Reed-Solomon encoder, RS(n, k) with
// n = 2^m - 1 and k = n - 2t, both chosen at run time.
//
// Parity is the remainder of x^(n-k) * M(x) divided by g(x), formed by the
// classic linear-feedback shift register: 2t parity registers, one GF
// multiplier per generator coefficient, feedback = input symbol + highest
// parity register. The message symbols (highest power first) pass straight to
// the output while the LFSR divides; then the 2t parity registers are shifted
// out, highest first, which also clears them for the next block. Generator
// coefficients come from rs_gen_poly, which is rebuilt on every cfg_start.
//
// Interface: streaming valid/ready on both sides. in_ready is low while parity
// is being sent (2t cycles per block) and while configuring. Output is
// registered (one cycle latency); out_sop/out_eop mark the first and last
// symbol of each n-symbol codeword. A rate of one symbol per clock on the
// output is kept whenever out_ready is high.
//
// Follows the document: LFSR division, message symbols placed in the high
// powers, generator coefficients from a configuration-time table. The
// valid/ready handshake and the configuration port are this design's own.
module rs_encoder
  import rs_pkg::*;
#(
  parameter int unsigned TMAX = 16
) (
  input  logic clk,
  input  logic rst_n,
  // configuration
  input  logic cfg_start,
  input  m_t   cfg_m,
  input  t_t   cfg_t,
  output logic cfg_ready,
  // message symbols in
  input  logic in_valid,
  output logic in_ready,
  input  sym_t in_data,
  // codeword symbols out
  output logic out_valid,
  input  logic out_ready,
  output sym_t out_data,
  output logic out_sop,
  output logic out_eop
);
  localparam int unsigned NPAR = 2*TMAX;

  poly_t poly;
  m_t    m_q;
  t_t    t_q;
  sym_t  g    [NPAR];
  sym_t  par  [NPAR];
  sym_t  prod [NPAR];
  sym_t  fb;
  len_t  n, k, cnt_q;
  logic  advance, msg_phase, accept;
  logic [$clog2(NPAR)-1:0] top;          // index of the highest parity register, 2t-1

  rs_gen_poly #(.TMAX(TMAX)) u_gen (
    .clk, .rst_n, .start(cfg_start), .m(cfg_m), .t(cfg_t),
    .ready(cfg_ready), .poly, .m_q, .t_q, .g
  );

  assign n         = block_len(m_q);
  assign k         = n - len_t'({t_q, 1'b0});
  assign top       = $bits(top)'({t_q, 1'b0} - 6'd1);
  assign advance   = !out_valid || out_ready;
  assign msg_phase = cnt_q < k;
  assign in_ready  = cfg_ready && msg_phase && advance;
  assign accept    = in_valid && in_ready;
  assign fb        = in_data ^ par[top];

  for (genvar j = 0; j < NPAR; j++) begin : g_mul
    rs_gf_mul u_mul (.a(fb), .b(g[j]), .p(poly), .m(m_q), .y(prod[j]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q     <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      out_sop   <= 1'b0;
      out_eop   <= 1'b0;
      for (int j = 0; j < NPAR; j++) par[j] <= '0;
    end else if (cfg_start) begin
      cnt_q     <= '0;
      out_valid <= 1'b0;
      for (int j = 0; j < NPAR; j++) par[j] <= '0;
    end else if (advance) begin
      if (accept) begin
        // message symbol: pass through and divide
        out_valid <= 1'b1;
        out_data  <= in_data;
        out_sop   <= (cnt_q == '0);
        out_eop   <= 1'b0;
        par[0]    <= prod[0];
        for (int j = 1; j < NPAR; j++) par[j] <= par[j-1] ^ prod[j];
        cnt_q     <= cnt_q + 1'b1;
      end else if (cfg_ready && !msg_phase) begin
        // parity symbol: shift the remainder out, highest power first
        out_valid <= 1'b1;
        out_data  <= par[top];
        out_sop   <= 1'b0;
        out_eop   <= (cnt_q == n - 1'b1);
        par[0]    <= '0;
        for (int j = 1; j < NPAR; j++) par[j] <= par[j-1];
        cnt_q     <= (cnt_q == n - 1'b1) ? '0 : cnt_q + 1'b1;
      end else begin
        out_valid <= 1'b0;
      end
    end
  end

endmodule
