// rs_decoder -- reconfigurable Reed-Solomon decoder, RS(n, n-2t) over GF(2^m)
// with m (3..8) and t (1..TMAX, 2t < n) chosen at run time.
//
// Pipeline, one symbol per clock:
//   rs_syndrome      S_1..S_2t by Horner's rule while the block streams in
//   rs_kes           error locator Lambda (Berlekamp-Massey) and evaluator Omega
//   rs_chien_forney  error positions (Chien search), values (Forney), correction
//   rs_delay_fifo    holds the received symbols until their correction is known
//   rs_field_lut     primitive polynomial, powers of alpha, inverse table
// The three stages overlap, so three blocks can be in flight. The output is
// the whole corrected codeword, parity included, with block_start/block_end
// on its first and last symbol. error_count and fail describe the block that
// has just ended (they change with block_end and are held).
//
// Configuration: pulse cfg_start with cfg_m/cfg_t; cfg_ready rises 2^m cycles
// later. Any block in progress is dropped. Input: in_valid/in_ready/in_data,
// highest-power symbol first, n symbols per block, no gaps needed. in_ready
// drops only when the key-equation solver (3t+1 clocks per block) cannot keep
// up, which happens when 3t+1 > n. Latency from the last input symbol of a
// block to its block_start output: 3t+3 clocks when the pipeline is free.
//
// Follows the document: stage order, LUT-based field coefficients for a
// run-time m, block_start/block_end/error_count/fail outputs. Algorithms,
// handshakes and timing are this design's choices.
module rs_decoder
  import rs_pkg::*;
#(
  parameter int unsigned TMAX  = 16,
  parameter int unsigned DEPTH = 1024
) (
  input  logic clk,
  input  logic rst_n,
  // configuration
  input  logic cfg_start,
  input  m_t   cfg_m,
  input  t_t   cfg_t,
  output logic cfg_ready,
  // received symbols
  input  logic in_valid,
  output logic in_ready,
  input  sym_t in_data,
  // corrected symbols
  output logic out_valid,
  output sym_t out_data,
  output logic block_start,
  output logic block_end,
  output logic [5:0] error_count,
  output logic fail
);
  localparam int unsigned NPAR = 2*TMAX;

  poly_t poly;
  m_t    m_q;
  t_t    t_q;
  len_t  n;
  sym_t  apow [NPAR+1];
  sym_t  inv_addr, inv_data;

  logic  syn_in_ready, syn_valid, syn_ready;
  sym_t  syn [NPAR];
  logic  kes_valid, kes_ready;
  sym_t  lambda [TMAX+1];
  sym_t  omega  [TMAX];
  logic [5:0] deg;
  logic  rx_pop;
  sym_t  rx_data;
  logic  fifo_full;
  logic  accept;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         t_q <= '0;
    else if (cfg_start) t_q <= cfg_t;
  end

  rs_field_lut #(.TMAX(TMAX)) u_lut (
    .clk, .rst_n, .start(cfg_start), .m(cfg_m), .ready(cfg_ready),
    .poly, .m_q, .n, .apow, .inv_addr, .inv_data
  );

  assign in_ready = cfg_ready && syn_in_ready;
  assign accept   = in_valid && in_ready;

  rs_syndrome #(.TMAX(TMAX)) u_syn (
    .clk, .rst_n, .clear(cfg_start), .poly, .m(m_q), .t(t_q), .n, .apow,
    .in_valid(in_valid && cfg_ready), .in_ready(syn_in_ready), .in_data,
    .syn_valid, .syn_ready, .syn
  );

  rs_kes #(.TMAX(TMAX)) u_kes (
    .clk, .rst_n, .clear(cfg_start), .poly, .m(m_q), .t(t_q),
    .syn_valid, .syn_ready, .syn,
    .kes_valid, .kes_ready, .lambda, .omega, .deg
  );

  rs_delay_fifo #(.DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n, .clear(cfg_start), .push(accept), .wdata(in_data),
    .pop(rx_pop), .rdata(rx_data), .empty(), .full(fifo_full), .level()
  );

  // three blocks in flight at most: the buffer must never fill
  a_buffer_room: assert property (@(posedge clk) disable iff (!rst_n) accept |-> !fifo_full);

  rs_chien_forney #(.TMAX(TMAX)) u_chien (
    .clk, .rst_n, .clear(cfg_start), .poly, .m(m_q), .t(t_q), .n, .apow,
    .kes_valid, .kes_ready, .lambda, .omega, .deg,
    .inv_addr, .inv_data, .rx_pop, .rx_data,
    .out_valid, .out_data, .out_sop(block_start), .out_eop(block_end),
    .err_count(error_count), .fail
  );

endmodule
