// tb_rs_codec_top -- end-to-end test of the encoder -> channel -> decoder
// chain at the default parameters (TMAX = 16, 1024-symbol delay buffer).
//
// Scenarios, each after a run-time reconfiguration:
//   RS(15,9), t=3: message 8,7,...,0 with the first transmitted symbol
//     (8) hit by an error (8 -> 7), as in the published test case;
//   GF(2^8), t=16: ramp input, blocks with 0, some, 16 and 40 errors;
//   GF(2^6), t=12 and GF(2^7), t=16: triangular input, random errors;
//   GF(2^3), t=3: a code whose key-equation solver cannot keep up, so the
//     decoder must hold the encoder (back-pressure).
// Every decoded block is compared with the reference codeword; error_count
// and fail are checked. The test counts each mechanism: encoder parity stall,
// decoder back-pressure, corrected block, failed (uncorrectable) block,
// error-free block, reconfiguration; one that never happens is a failure.
module tb_rs_codec_top;
  import rs_pkg::*;
  import rs_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic cfg_start = 0, cfg_ready;
  m_t cfg_m = '0;
  t_t cfg_t = '0;
  logic in_valid_enc = 0, in_ready_enc;
  sym_t data_in_enc = '0;
  logic out_valid_enc, block_start_enc, block_end_enc, in_ready_dec;
  sym_t data_out_enc, err_in, data_in_dec;
  logic out_valid, block_start, block_end, fail;
  sym_t data_out;
  logic [5:0] error_count;

  rs_codec_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_parity_stall = 0, n_dec_stall = 0, n_corrected = 0, n_failed = 0,
      n_clean = 0, n_reconfig = 0;

  // per-block reference data, ring of 8
  blk_t msg_q [8], cw_q [8], err_q [8];
  int   nerr_q [8];
  int   cur_m = 4, cur_t = 3, nn = 15;
  int   in_blk = 0, in_idx = 0;      // message symbols into the encoder
  int   ch_blk = 0, ch_idx = 0;      // codeword symbols through the channel
  int   out_blk = 0, out_idx = 0;    // decoded symbols
  int   gap_pct = 0;
  int   queued = 0;                  // blocks handed to the driver
  blk_t got;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // encoder input driver: runs whenever there are queued blocks
  always @(negedge clk) begin
    if (cfg_ready && in_blk < ch_blk + 8 && in_blk < queued && $urandom_range(99, 0) >= gap_pct) begin
      in_valid_enc <= 1;
      data_in_enc  <= msg_q[in_blk % 8][in_idx];
    end else in_valid_enc <= 0;
    err_in <= (cfg_ready && ch_blk < queued) ? err_q[ch_blk % 8][ch_idx] : '0;
  end

  always @(posedge clk) if (rst_n && cfg_ready) begin
    if (in_valid_enc && in_ready_enc) begin
      if (in_idx == nn - 2*cur_t - 1) begin
        in_idx <= 0;
        in_blk <= in_blk + 1;
      end else in_idx <= in_idx + 1;
    end
    if (in_valid_enc && !in_ready_enc) n_parity_stall++;
    if (out_valid_enc && !in_ready_dec) n_dec_stall++;
    if (out_valid_enc && in_ready_dec) begin
      check(data_out_enc == cw_q[ch_blk % 8][ch_idx], "encoder output");
      check(data_in_dec == (cw_q[ch_blk % 8][ch_idx] ^ err_q[ch_blk % 8][ch_idx]), "decoder input");
      check(block_start_enc == (ch_idx == 0) && block_end_enc == (ch_idx == nn - 1), "encoder framing");
      if (ch_idx == nn - 1) begin
        ch_idx <= 0;
        ch_blk <= ch_blk + 1;
      end else ch_idx <= ch_idx + 1;
    end
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    automatic int b = out_blk % 8;
    check(block_start == (out_idx == 0) && block_end == (out_idx == nn - 1), "decoder framing");
    got[out_idx] = data_out;
    if (out_idx == nn - 1) begin
      out_idx <= 0;
      out_blk <= out_blk + 1;
      #1;
      if (nerr_q[b] <= cur_t) begin
        bit same;
        same = 1;
        for (int i = 0; i < nn; i++) if (got[i] != cw_q[b][i]) same = 0;
        check(same, $sformatf("m=%0d t=%0d block %0d not restored", cur_m, cur_t, out_blk));
        check(int'(error_count) == nerr_q[b], $sformatf("error_count %0d, expected %0d", error_count, nerr_q[b]));
        check(!fail, "fail on a correctable block");
        if (nerr_q[b] == 0) n_clean++;
        else n_corrected++;
      end else begin
        rsym_t s [32];
        bit zero;
        ref_syndromes(cur_m, cur_t, got, s);
        zero = 1;
        for (int j = 0; j < 32; j++) if (s[j] != 0) zero = 0;
        check(fail || zero, "uncorrectable block neither flagged nor a codeword");
        if (fail) n_failed++;
      end
    end else out_idx <= out_idx + 1;
  end

  task automatic configure(input int mm, input int tt);
    @(negedge clk);
    cfg_m = m_t'(mm);
    cfg_t = t_t'(tt);
    cfg_start = 1;
    @(negedge clk);
    cfg_start = 0;
    cur_m = mm; cur_t = tt; nn = ref_n(mm);
    in_blk = 0; in_idx = 0; ch_blk = 0; ch_idx = 0; out_blk = 0; out_idx = 0; queued = 0;
    n_reconfig++;
    while (!cfg_ready) @(negedge clk);
  endtask

  // kind 0: ramp, 1: triangle, 2: random; nerr errors at random positions
  task automatic queue_block(input int kind, input int nerr);
    int b, k, pos;
    bit is_err [256];
    while (queued >= out_blk + 8) @(negedge clk);
    b = queued % 8;
    k = nn - 2*cur_t;
    for (int i = 0; i < 256; i++) begin
      is_err[i] = 0;
      err_q[b][i] = 0;
      case (kind)
        0:       msg_q[b][i] = rsym_t'(i % (nn + 1));
        1:       msg_q[b][i] = rsym_t'((i % (2*nn)) < nn ? (i % (2*nn)) : 2*nn - 1 - (i % (2*nn)));
        default: msg_q[b][i] = ref_rand_sym(cur_m);
      endcase
    end
    ref_encode(cur_m, cur_t, msg_q[b], cw_q[b]);
    for (int e = 0; e < nerr; e++) begin
      do pos = $urandom_range(nn - 1, 0); while (is_err[pos]);
      is_err[pos] = 1;
      err_q[b][pos] = rsym_t'($urandom_range(nn, 1));
    end
    nerr_q[b] = nerr;
    queued++;
  endtask

  task automatic drain();
    while (out_blk < queued) @(negedge clk);
    repeat (3) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;

    // published RS(15,9) case
    configure(4, 3);
    begin
      int b;
      b = queued % 8;
      for (int i = 0; i < 256; i++) begin
        msg_q[b][i] = (i < 9) ? rsym_t'(8 - i) : 8'd0;
        err_q[b][i] = 0;
      end
      ref_encode(4, 3, msg_q[b], cw_q[b]);
      check(cw_q[b][9] == 12 && cw_q[b][14] == 13, "reference RS(15,9) parity");
      err_q[b][0] = 8'd8 ^ 8'd7;       // 8 received as 7
      nerr_q[b] = 1;
      queued++;
    end
    drain();

    // GF(2^8), t = 16, ramp
    configure(8, 16);
    queue_block(0, 0);
    queue_block(0, 5);
    queue_block(0, 16);
    queue_block(0, 40);
    queue_block(2, 16);
    drain();

    // GF(2^6), t = 12 and GF(2^7), t = 16, triangular input
    configure(6, 12);
    for (int i = 0; i < 4; i++) queue_block(1, $urandom_range(12, 0));
    drain();
    configure(7, 16);
    gap_pct = 30;
    for (int i = 0; i < 3; i++) queue_block(1, $urandom_range(16, 0));
    queue_block(1, 30);
    drain();
    gap_pct = 0;

    // GF(2^3), t = 3: decoder back-pressure
    configure(3, 3);
    for (int i = 0; i < 6; i++) queue_block(2, $urandom_range(3, 0));
    drain();

    $display("parity stalls %0d, decoder stalls %0d, corrected %0d, failed %0d, clean %0d, reconfigurations %0d",
             n_parity_stall, n_dec_stall, n_corrected, n_failed, n_clean, n_reconfig);
    check(n_parity_stall > 0, "encoder parity stall");
    check(n_dec_stall > 0, "decoder back-pressure");
    check(n_corrected > 0, "corrected block");
    check(n_failed > 0, "failed block");
    check(n_clean > 0, "error-free block");
    check(n_reconfig > 1, "reconfiguration");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
