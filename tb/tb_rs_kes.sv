// tb_rs_kes -- checks the key-equation solver. Syndromes of blocks with
// 0..t known errors (from the reference) go in; the test checks that the
// returned locator has degree equal to the error count, that it vanishes at
// alpha^-p for every error position p and nowhere else, that Omega equals
// S(x)Lambda(x) mod x^t, and that the result appears 3t clocks after the
// syndromes are taken. Blocks with more than t errors are run too and must
// not hang the solver.
module tb_rs_kes;
  import rs_pkg::*;
  import rs_ref_pkg::*;

  localparam int TMAX = 16;
  logic clk = 0, rst_n = 0;
  poly_t poly;
  m_t m;
  t_t t;
  logic syn_valid = 0, syn_ready, kes_valid, kes_ready = 0;
  sym_t syn [2*TMAX];
  sym_t lambda [TMAX+1];
  sym_t omega [TMAX];
  logic [5:0] deg;
  int checks = 0, failures = 0;

  rs_kes #(.TMAX(TMAX)) dut (.clk, .rst_n, .clear(1'b0), .poly, .m, .t, .syn_valid, .syn_ready, .syn,
                             .kes_valid, .kes_ready, .lambda, .omega, .deg);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic rsym_t eval_lambda(input int mm, input rsym_t x);
    rsym_t acc, xp;
    acc = 0;
    xp = 1;
    for (int j = 0; j <= TMAX; j++) begin
      acc ^= ref_mul(mm, lambda[j], xp);
      xp = ref_mul(mm, xp, x);
    end
    return acc;
  endfunction

  task automatic run(input int mm, input int tt, input int nerr);
    blk_t msg, cw;
    rsym_t s [32];
    bit is_err [256];
    int n, cyc, pos;
    n = ref_n(mm);
    for (int i = 0; i < 256; i++) begin
      msg[i] = ref_rand_sym(mm);
      is_err[i] = 0;
    end
    ref_encode(mm, tt, msg, cw);
    for (int e = 0; e < nerr; e++) begin
      do pos = $urandom_range(n - 1, 0); while (is_err[pos]);
      is_err[pos] = 1;
      cw[pos] ^= rsym_t'($urandom_range(ref_n(mm), 1));
    end
    ref_syndromes(mm, tt, cw, s);
    @(negedge clk);
    poly = poly_t'(ref_poly(mm));
    m = m_t'(mm);
    t = t_t'(tt);
    for (int j = 0; j < 2*TMAX; j++) syn[j] = s[j];
    syn_valid = 1;
    @(posedge clk);
    while (!syn_ready) @(posedge clk);
    #1 syn_valid = 0;
    cyc = 0;
    while (!kes_valid) begin
      @(posedge clk);
      #1 cyc++;
    end
    check(cyc == 3*tt, $sformatf("latency %0d, expected %0d", cyc, 3*tt));
    if (nerr <= tt) begin
      check(int'(deg) == nerr, $sformatf("m=%0d t=%0d deg %0d, expected %0d", mm, tt, deg, nerr));
      for (int i = 0; i < n; i++)
        // symbol i sits at position p = n-1-i, error locator root alpha^-p
        check((eval_lambda(mm, ref_pow(mm, -(n-1-i))) == 0) == is_err[i],
              $sformatf("m=%0d t=%0d root test at symbol %0d", mm, tt, i));
      for (int k = 0; k < TMAX; k++) begin
        rsym_t ok;
        ok = 0;
        if (k < tt)
          for (int j = 0; j <= k; j++) ok ^= ref_mul(mm, lambda[j], s[k-j]);
        check(omega[k] == ok, $sformatf("omega[%0d]", k));
      end
    end
    @(negedge clk);
    kes_ready = 1;
    @(negedge clk);
    kes_ready = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int e = 0; e <= 3; e++) run(4, 3, e);
    for (int r = 0; r < 40; r++) begin
      int mm, tt;
      mm = $urandom_range(8, 3);
      tt = $urandom_range(((1 << mm) - 2) / 2 > 16 ? 16 : ((1 << mm) - 2) / 2, 1);
      run(mm, tt, $urandom_range(tt, 0));
    end
    run(8, 16, 16);
    run(8, 16, 17);
    run(5, 4, 9);
    run(8, 16, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
