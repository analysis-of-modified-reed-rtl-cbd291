// tb_rs_decoder -- end-to-end check of the decoder. Random codewords from
// the reference encoder get 0..t random symbol errors (some blocks t+1 or
// more) and are streamed back to back. For correctable blocks the output must
// be the codeword, error_count the number of errors and fail low; for the
// others the output must either be flagged by fail or be a codeword. Checks
// block_start/block_end framing, the latency from the last input symbol to
// block_start (3t+3 clocks when the pipeline is free), and that in_ready
// drops only for configurations with 3t+1 > n.
module tb_rs_decoder;
  import rs_pkg::*;
  import rs_ref_pkg::*;

  localparam int TMAX = 16;
  logic clk = 0, rst_n = 0;
  logic cfg_start = 0, cfg_ready;
  m_t cfg_m = '0;
  t_t cfg_t = '0;
  logic in_valid = 0, in_ready;
  sym_t in_data = '0;
  logic out_valid, block_start, block_end, fail;
  sym_t out_data;
  logic [5:0] error_count;
  int checks = 0, failures = 0, stalls = 0, fails_seen = 0, corrected = 0;

  blk_t cw_q [8];
  int   nerr_q [8];
  int   out_blk = 0, out_idx = 0, in_blk = 0;
  blk_t got;
  int   cur_m, cur_t;
  int   last_in_time, lat;
  bit   measure = 0;

  rs_decoder #(.TMAX(TMAX)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && in_valid && !in_ready && cfg_ready) stalls++;

  always @(posedge clk) if (rst_n && out_valid) begin
    automatic int b = out_blk % 8;
    automatic int nn = ref_n(cur_m);
    if (block_start && measure) begin
      // block_start was registered one edge before this sampling edge
      lat = ($time - last_in_time) / 10 - 1;
      check(lat == 3*cur_t + 3, $sformatf("latency %0d, expected %0d", lat, 3*cur_t + 3));
      measure = 0;
    end
    check(block_start == (out_idx == 0), "block_start");
    check(block_end == (out_idx == nn - 1), "block_end");
    got[out_idx] = out_data;
    if (out_idx == nn - 1) begin
      out_idx <= 0;
      out_blk <= out_blk + 1;
      #1;
      if (nerr_q[b] <= cur_t) begin
        for (int i = 0; i < nn; i++)
          check(got[i] == cw_q[b][i], $sformatf("m=%0d t=%0d block %0d symbol %0d = %0d, expected %0d",
                                                cur_m, cur_t, out_blk, i, got[i], cw_q[b][i]));
        check(int'(error_count) == nerr_q[b], $sformatf("error_count %0d, expected %0d", error_count, nerr_q[b]));
        check(!fail, "fail on a correctable block");
        if (nerr_q[b] > 0) corrected++;
      end else begin
        rsym_t s [32];
        bit zero;
        ref_syndromes(cur_m, cur_t, got, s);
        zero = 1;
        for (int j = 0; j < 32; j++) if (s[j] != 0) zero = 0;
        check(fail || zero, "uncorrectable block neither flagged nor a codeword");
        if (fail) fails_seen++;
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
    cur_m = mm;
    cur_t = tt;
    out_blk = 0; out_idx = 0; in_blk = 0;
    while (!cfg_ready) @(negedge clk);
  endtask

  task automatic send(input int nerr, input bit time_it);
    blk_t msg, rx;
    bit is_err [256];
    int nn, pos, b;
    nn = ref_n(cur_m);
    b = in_blk % 8;
    for (int i = 0; i < 256; i++) begin
      msg[i] = ref_rand_sym(cur_m);
      is_err[i] = 0;
    end
    ref_encode(cur_m, cur_t, msg, cw_q[b]);
    rx = cw_q[b];
    for (int e = 0; e < nerr; e++) begin
      do pos = $urandom_range(nn - 1, 0); while (is_err[pos]);
      is_err[pos] = 1;
      rx[pos] ^= rsym_t'($urandom_range(nn, 1));
    end
    nerr_q[b] = nerr;
    in_blk++;
    for (int i = 0; i < nn; i++) begin
      in_valid = 1;
      in_data  = rx[i];
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      #1;
    end
    in_valid = 0;
    if (time_it) begin
      last_in_time = $time - 1;
      measure = 1;
    end
  endtask

  task automatic drain();
    while (out_blk < in_blk) @(posedge clk);
    repeat (2) @(posedge clk);
    #1;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // published case RS(15,9): one error
    configure(4, 3);
    send(1, 1);
    drain();
    send(0, 0); send(3, 0); send(2, 0); send(4, 0); send(1, 0);
    drain();
    // GF(2^8), t = 16, back to back, full rate required
    configure(8, 16);
    stalls = 0;
    send(16, 1);
    drain();
    for (int b = 0; b < 5; b++) send($urandom_range(16, 0), 0);
    send(20, 0);
    drain();
    check(stalls == 0, $sformatf("%0d stalls at m=8 t=16", stalls));
    configure(6, 12);
    for (int b = 0; b < 4; b++) send($urandom_range(12, 0), 0);
    drain();
    configure(7, 16);
    for (int b = 0; b < 3; b++) send($urandom_range(16, 0), 0);
    drain();
    // 3t+1 > n: the key-equation solver is the bottleneck, input must stall
    configure(3, 3);
    stalls = 0;
    for (int b = 0; b < 6; b++) send($urandom_range(3, 0), 0);
    drain();
    check(stalls > 0, "stall when 3t+1 > n");
    // boundary: n = 15, t = 4 (3t+1 = 13) keeps up, t = 5 (3t+1 = 16) does not
    configure(4, 4);
    stalls = 0;
    for (int b = 0; b < 6; b++) send($urandom_range(4, 0), 0);
    drain();
    check(stalls == 0, $sformatf("%0d stalls at n=15 t=4", stalls));
    configure(4, 5);
    stalls = 0;
    for (int b = 0; b < 6; b++) send($urandom_range(5, 0), 0);
    drain();
    check(stalls > 0, "stall at n=15 t=5");
    for (int r = 0; r < 12; r++) begin
      int mm, tt;
      mm = $urandom_range(8, 3);
      tt = $urandom_range(((1 << mm) - 2) / 2 > 16 ? 16 : ((1 << mm) - 2) / 2, 1);
      configure(mm, tt);
      for (int b = 0; b < 3; b++) send($urandom_range(tt + 2, 0), 0);
      drain();
    end
    check(corrected > 0, "blocks corrected");
    check(fails_seen > 0, "uncorrectable block flagged");
    $display("corrected %0d, failed %0d, stall cycles %0d", corrected, fails_seen, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
