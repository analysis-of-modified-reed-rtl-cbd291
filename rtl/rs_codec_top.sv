// rs_codec_top -- reconfigurable Reed-Solomon error-correcting system:
// encoder, channel error injection and decoder in one chain.
//
// Message symbols enter the encoder (data_in_enc), which appends 2t parity
// symbols (data_out_enc). Each codeword symbol is XORed with err_in, the
// error pattern standing in for the channel, and fed to the decoder, whose
// output data_out should be the encoder's codeword again. block_start and
// block_end frame each decoded codeword; error_count and fail report on the
// block that just ended.
//
// Both ends share one configuration port: pulse cfg_start with cfg_m (3..8)
// and cfg_t (1..TMAX, 2t < 2^m - 1); cfg_ready is high once both the
// generator-polynomial table and the field tables are built. The encoder
// waits when the decoder drops in_ready_dec, so no symbol is lost; err_in is
// applied to the symbol on data_out_enc in each clock where out_valid_enc
// and in_ready_dec are both high.
//
// This mirrors the document's simulation and hardware test set-up (ramp into
// the encoder, errors added between encoder and decoder, error_count and fail
// observed). Signal names follow it; the handshakes are this design's choice.
module rs_codec_top
  import rs_pkg::*;
#(
  parameter int unsigned TMAX  = 16,
  parameter int unsigned DEPTH = 1024
) (
  input  logic clk,
  input  logic rst_n,
  input  logic cfg_start,
  input  m_t   cfg_m,
  input  t_t   cfg_t,
  output logic cfg_ready,
  // encoder input
  input  logic in_valid_enc,
  output logic in_ready_enc,
  input  sym_t data_in_enc,
  // encoder output (observation) and channel errors
  output logic out_valid_enc,
  output sym_t data_out_enc,
  output logic block_start_enc,
  output logic block_end_enc,
  output logic in_ready_dec,     // decoder takes data_out_enc ^ err_in this clock
  input  sym_t err_in,
  output sym_t data_in_dec,      // symbol as received by the decoder
  // decoder output
  output logic out_valid,
  output sym_t data_out,
  output logic block_start,
  output logic block_end,
  output logic [5:0] error_count,
  output logic fail
);
  logic enc_ready, dec_ready;

  rs_encoder #(.TMAX(TMAX)) u_enc (
    .clk, .rst_n, .cfg_start, .cfg_m, .cfg_t, .cfg_ready(enc_ready),
    .in_valid(in_valid_enc), .in_ready(in_ready_enc), .in_data(data_in_enc),
    .out_valid(out_valid_enc), .out_ready(in_ready_dec), .out_data(data_out_enc),
    .out_sop(block_start_enc), .out_eop(block_end_enc)
  );

  rs_decoder #(.TMAX(TMAX), .DEPTH(DEPTH)) u_dec (
    .clk, .rst_n, .cfg_start, .cfg_m, .cfg_t, .cfg_ready(dec_ready),
    .in_valid(out_valid_enc), .in_ready(in_ready_dec),
    .in_data(data_in_dec),
    .out_valid, .out_data(data_out), .block_start, .block_end,
    .error_count, .fail
  );

  assign data_in_dec = data_out_enc ^ err_in;
  assign cfg_ready   = enc_ready && dec_ready;

  // only supported (m, t) pairs may be loaded
  a_cfg_legal: assert property (@(posedge clk) disable iff (!rst_n) cfg_start |-> cfg_ok(cfg_m, cfg_t, TMAX));

endmodule
