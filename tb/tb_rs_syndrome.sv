// tb_rs_syndrome -- checks the syndrome calculator against direct power sums
// R(alpha^j), for codewords (all zero syndromes) and for received blocks with
// random errors, blocks back to back. Also checks that in_ready drops while
// a result is not taken and that no symbol is lost then.
module tb_rs_syndrome;
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
  sym_t inv_addr = '0, inv_data;
  t_t t = '0;
  logic in_valid = 0, in_ready, syn_valid, syn_ready = 1;
  sym_t in_data = '0;
  sym_t syn [2*TMAX];
  int checks = 0, failures = 0, stalls = 0;
  int ready_pct = 100;
  rsym_t exp_s [64][32];
  int nexp = 0, ngot = 0;

  rs_field_lut #(.TMAX(TMAX)) u_lut (.clk, .rst_n, .start(lut_start), .m(lut_m), .ready(lut_ready),
                                     .poly, .m_q(m), .n, .apow, .inv_addr, .inv_data);
  rs_syndrome #(.TMAX(TMAX)) dut (.clk, .rst_n, .clear(lut_start), .poly, .m, .t, .n, .apow,
                                  .in_valid, .in_ready, .in_data, .syn_valid, .syn_ready, .syn);

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

  always @(negedge clk) syn_ready <= ($urandom_range(99, 0) < ready_pct);

  always @(posedge clk) begin
    if (in_valid && !in_ready) stalls++;
    if (rst_n && syn_valid && syn_ready) begin
      for (int j = 0; j < 2*TMAX; j++)
        check(syn[j] == exp_s[ngot][j], $sformatf("block %0d S%0d = %0d, expected %0d", ngot, j+1, syn[j], exp_s[ngot][j]));
      ngot++;
    end
  end

  task automatic run_config(input int mm, input int tt, input int blocks);
    blk_t msg, cw;
    @(negedge clk);
    lut_m = m_t'(mm);
    t = t_t'(tt);
    lut_start = 1;
    @(negedge clk);
    lut_start = 0;
    while (!lut_ready) @(negedge clk);
    nexp = 0;
    ngot = 0;
    for (int b = 0; b < blocks; b++) begin
      for (int i = 0; i < 256; i++) msg[i] = ref_rand_sym(mm);
      ref_encode(mm, tt, msg, cw);
      // b = 0 stays a codeword, others get up to t+1 random errors
      if (b > 0)
        for (int e = 0; e <= tt; e++) cw[$urandom_range(ref_n(mm) - 1, 0)] ^= ref_rand_sym(mm);
      ref_syndromes(mm, tt, cw, exp_s[b]);
      if (b == 0)
        for (int j = 0; j < 32; j++) check(exp_s[b][j] == 0, "reference codeword syndrome");
      nexp++;
      for (int i = 0; i < ref_n(mm); i++) begin
        in_valid = 1;
        in_data  = cw[i];
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        #1;
      end
      in_valid = 0;
    end
    while (ngot < nexp) @(posedge clk);
    #1;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    ready_pct = 100;
    run_config(4, 3, 4);
    run_config(8, 16, 3);
    ready_pct = 5;           // slow consumer: forces in_ready low
    run_config(3, 2, 6);
    run_config(6, 12, 3);
    ready_pct = 100;
    run_config(7, 9, 3);
    check(stalls > 0, "back-pressure seen");
    check(ngot == nexp, "all syndromes delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
