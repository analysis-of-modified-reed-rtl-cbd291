// tb_rs_encoder -- checks the encoder against the published RS(15,9) test
// vector and against reference long-division encoding for random (m, t),
// with random gaps on the input and random back-pressure on the output.
// Also checks that in_ready is low for exactly 2t parity cycles per block
// and that sop/eop frame every codeword.
module tb_rs_encoder;
  import rs_pkg::*;
  import rs_ref_pkg::*;

  localparam int TMAX = 16;
  logic clk = 0, rst_n = 0;
  logic cfg_start = 0, cfg_ready;
  m_t cfg_m = '0;
  t_t cfg_t = '0;
  logic in_valid = 0, in_ready;
  sym_t in_data = '0;
  logic out_valid, out_ready = 1, out_sop, out_eop;
  sym_t out_data;
  int checks = 0, failures = 0;
  int parity_stalls = 0;
  int gap_pct = 0, bp_pct = 0;

  rs_encoder #(.TMAX(TMAX)) dut (.*);

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

  task automatic configure(input int mm, input int tt);
    @(negedge clk);
    cfg_m = m_t'(mm);
    cfg_t = t_t'(tt);
    cfg_start = 1;
    @(negedge clk);
    cfg_start = 0;
    while (!cfg_ready) @(negedge clk);
  endtask

  // send one message and collect one codeword, concurrently
  task automatic run_block(input int mm, input int tt, input blk_t msg, input logic use_exp, input blk_t exp_in);
    blk_t exp_cw, got;
    int n, k, ni, no;
    n = ref_n(mm);
    k = n - 2*tt;
    if (use_exp) exp_cw = exp_in;
    else ref_encode(mm, tt, msg, exp_cw);
    ni = 0;
    no = 0;
    parity_stalls = 0;
    fork
      begin
        while (ni < k) begin
          @(negedge clk);
          in_valid = ($urandom_range(99, 0) >= gap_pct);
          in_data  = msg[ni];
          @(posedge clk);
          if (in_valid && in_ready) ni++;
          #1 in_valid = 0;
        end
      end
      begin
        while (no < n) begin
          @(negedge clk);
          out_ready = ($urandom_range(99, 0) >= bp_pct);
          @(posedge clk);
          if (out_valid && out_ready) begin
            got[no] = out_data;
            check(out_sop == (no == 0), "sop");
            check(out_eop == (no == n-1), "eop");
            no++;
          end
        end
      end
    join
    check(parity_stalls == 2*tt, $sformatf("%0d parity cycles, expected %0d", parity_stalls, 2*tt));
    for (int i = 0; i < n; i++)
      check(got[i] == exp_cw[i], $sformatf("m=%0d t=%0d symbol %0d = %0d, expected %0d", mm, tt, i, got[i], exp_cw[i]));
  endtask

  // cycles in which the output advances but no input is taken: parity phase
  always @(posedge clk) if (cfg_ready && !in_ready && (!out_valid || out_ready)) parity_stalls++;

  initial begin
    blk_t msg, exp_cw;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // published test case: RS(15,9), t=3, message 8,7,...,0 (highest power
    // first) gives parity 12,5,3,2,5,13 (c5..c0)
    configure(4, 3);
    for (int i = 0; i < 9; i++) msg[i] = rsym_t'(8 - i);
    for (int i = 0; i < 9; i++) exp_cw[i] = msg[i];
    exp_cw[9] = 12; exp_cw[10] = 5; exp_cw[11] = 3; exp_cw[12] = 2; exp_cw[13] = 5; exp_cw[14] = 13;
    run_block(4, 3, msg, 1'b1, exp_cw);
    // back-to-back timing: full rate input, 2t parity cycles per block
    begin
      int t0, t1;
      gap_pct = 0; bp_pct = 0;
      configure(8, 16);
      for (int i = 0; i < 256; i++) msg[i] = ref_rand_sym(8);
      @(negedge clk);
      t0 = $time;
      run_block(8, 16, msg, 1'b0, exp_cw);
      t1 = $time;
      // k input cycles + 2t parity cycles + 1 register stage
      check((t1 - t0) / 10 == 255 + 1, $sformatf("block time %0d clocks", (t1 - t0) / 10));
    end
    // random configurations, gaps and back-pressure
    gap_pct = 20; bp_pct = 20;
    for (int b = 0; b < 30; b++) begin
      int mm, tt;
      mm = $urandom_range(8, 3);
      tt = $urandom_range(((1 << mm) - 2) / 2 > 16 ? 16 : ((1 << mm) - 2) / 2, 1);
      configure(mm, tt);
      for (int r = 0; r < 2; r++) begin
        for (int i = 0; i < 256; i++) msg[i] = ref_rand_sym(mm);
        run_block(mm, tt, msg, 1'b0, exp_cw);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
