// tb_rs_chien_forney -- checks the Chien search / Forney stage on its own.
// The locator is built by the test as Lambda(x) = c * prod(1 + alpha^p x)
// over chosen error positions p, and Omega = S(x)Lambda(x) mod x^t from
// reference syndromes (c is a random non-zero scale, which must not matter).
// The corrected output must equal the original codeword, error_count the
// number of errors, fail low. A locator of degree > t must give fail and no
// correction; a wrong degree must give fail. Blocks are offered back to back
// and must come out with no gap (n symbols in n clocks).
module tb_rs_chien_forney;
  import rs_pkg::*;
  import rs_ref_pkg::*;

  localparam int TMAX = 16;
  logic clk = 0, rst_n = 0;
  logic lut_start = 0, lut_ready;
  m_t lut_m = '0;
  poly_t poly;
  m_t m;
  len_t n;
  sym_t apow [2*TMAX+1];
  sym_t inv_addr, inv_data;
  t_t t = '0;
  logic kes_valid = 0, kes_ready;
  sym_t lambda [TMAX+1];
  sym_t omega [TMAX];
  logic [5:0] deg = '0;
  logic rx_pop;
  sym_t rx_data;
  logic out_valid, out_sop, out_eop, fail;
  sym_t out_data;
  logic [5:0] err_count;
  int checks = 0, failures = 0;

  blk_t rx_q [4];         // received blocks, by block number mod 4
  blk_t cw_q [4];         // expected output
  int   exp_cnt [4];
  bit   exp_fail [4];
  bit   chk_data [4];
  int   rx_blk = 0, rx_idx = 0, out_blk = 0, out_idx = 0;
  int   gap_cycles = 0;
  bit   in_block = 0;

  rs_field_lut #(.TMAX(TMAX)) u_lut (.clk, .rst_n, .start(lut_start), .m(lut_m), .ready(lut_ready),
                                     .poly, .m_q(m), .n, .apow, .inv_addr, .inv_data);
  rs_chien_forney #(.TMAX(TMAX)) dut (.clk, .rst_n, .clear(lut_start), .poly, .m, .t, .n, .apow,
                                      .kes_valid, .kes_ready, .lambda, .omega, .deg,
                                      .inv_addr, .inv_data, .rx_pop, .rx_data,
                                      .out_valid, .out_data, .out_sop, .out_eop, .err_count, .fail);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // delay-buffer model
  assign rx_data = rx_q[rx_blk % 4][rx_idx];
  always @(posedge clk) if (rx_pop) begin
    if (rx_idx == int'(n) - 1) begin
      rx_idx <= 0;
      rx_blk <= rx_blk + 1;
    end else rx_idx <= rx_idx + 1;
  end

  always @(posedge clk) if (rst_n) begin
    if (in_block && !out_valid) gap_cycles++;
    if (out_valid) begin
      if (chk_data[out_blk % 4])
        check(out_data == cw_q[out_blk % 4][out_idx],
              $sformatf("block %0d symbol %0d = %0d, expected %0d", out_blk, out_idx, out_data, cw_q[out_blk % 4][out_idx]));
      check(out_sop == (out_idx == 0), "sop");
      check(out_eop == (out_idx == int'(n) - 1), "eop");
      in_block <= !out_eop;
      if (out_eop) begin
        out_idx <= 0;
        out_blk <= out_blk + 1;
      end else out_idx <= out_idx + 1;
    end
  end

  // error_count / fail are valid in the clock after block end
  always @(posedge clk) if (rst_n && out_valid && out_eop) begin
    automatic int b = out_blk;
    #1;
    check(int'(err_count) == exp_cnt[b % 4] || exp_fail[b % 4],
          $sformatf("block %0d error_count %0d, expected %0d", b, err_count, exp_cnt[b % 4]));
    check(fail == exp_fail[b % 4], $sformatf("block %0d fail %0d", b, fail));
  end

  // mode 0: correctable, 1: degree > t, 2: declared degree off by one
  task automatic offer(input int mm, input int tt, input int blk, input int nerr, input int mode);
    blk_t msg;
    rsym_t s [32];
    rsym_t lam [33];
    rsym_t nl [33];
    rsym_t c, xl;
    bit is_err [256];
    int nn, pos;
    nn = ref_n(mm);
    for (int i = 0; i < 256; i++) begin
      msg[i] = ref_rand_sym(mm);
      is_err[i] = 0;
    end
    ref_encode(mm, tt, msg, cw_q[blk % 4]);
    rx_q[blk % 4] = cw_q[blk % 4];
    for (int j = 0; j < 33; j++) lam[j] = 0;
    c = rsym_t'($urandom_range(nn, 1));
    lam[0] = c;
    for (int e = 0; e < nerr; e++) begin
      do pos = $urandom_range(nn - 1, 0); while (is_err[pos]);
      is_err[pos] = 1;
      rx_q[blk % 4][pos] ^= rsym_t'($urandom_range(nn, 1));
      xl = ref_pow(mm, nn - 1 - pos);
      for (int j = 0; j < 33; j++) nl[j] = lam[j] ^ ((j > 0) ? ref_mul(mm, lam[j-1], xl) : 8'd0);
      lam = nl;
    end
    ref_syndromes(mm, tt, rx_q[blk % 4], s);
    exp_cnt[blk % 4]  = (mode == 1) ? 0 : nerr;
    exp_fail[blk % 4] = (mode != 0);
    chk_data[blk % 4] = 1'b1;
    // a declared degree above t disables correction
    if (nerr + ((mode == 2) ? 1 : 0) > tt) begin
      cw_q[blk % 4] = rx_q[blk % 4];
      exp_cnt[blk % 4] = 0;
    end
    @(negedge clk);
    for (int j = 0; j <= TMAX; j++) lambda[j] = lam[j];
    for (int k = 0; k < TMAX; k++) begin
      omega[k] = 0;
      if (k < tt) for (int j = 0; j <= k; j++) omega[k] ^= ref_mul(mm, lam[j], s[k-j]);
    end
    deg = 6'(nerr + ((mode == 2) ? 1 : 0));
    kes_valid = 1;
    @(posedge clk);
    while (!kes_ready) @(posedge clk);
    #1 kes_valid = 0;
  endtask

  task automatic configure(input int mm, input int tt);
    @(negedge clk);
    lut_m = m_t'(mm);
    t = t_t'(tt);
    lut_start = 1;
    @(negedge clk);
    lut_start = 0;
    while (!lut_ready) @(negedge clk);
    rx_blk = 0; rx_idx = 0; out_blk = 0; out_idx = 0;
  endtask

  task automatic drain(input int blocks);
    while (out_blk < blocks) @(posedge clk);
    repeat (3) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    configure(4, 3);
    offer(4, 3, 0, 1, 0);
    offer(4, 3, 1, 3, 0);
    offer(4, 3, 2, 0, 0);
    drain(3);
    configure(8, 16);
    gap_cycles = 0;
    for (int b = 0; b < 4; b++) offer(8, 16, b, (b == 0) ? 16 : $urandom_range(16, 0), 0);
    drain(4);
    check(gap_cycles == 0, $sformatf("%0d gap cycles between back-to-back blocks", gap_cycles));
    for (int r = 0; r < 10; r++) begin
      int mm, tt;
      mm = $urandom_range(8, 3);
      tt = $urandom_range(((1 << mm) - 2) / 2 > 16 ? 16 : ((1 << mm) - 2) / 2, 1);
      configure(mm, tt);
      offer(mm, tt, 0, $urandom_range(tt, 0), 0);
      offer(mm, tt, 1, tt, 0);
      offer(mm, tt, 2, $urandom_range(tt, 1), 2);
      drain(3);
    end
    configure(6, 4);
    offer(6, 4, 0, 5, 1);
    offer(6, 4, 1, 4, 0);
    drain(2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
