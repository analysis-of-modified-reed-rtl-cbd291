// tb_rs_gen_poly -- checks the generator-polynomial table for many (m, t)
// against the reference product of root factors, including the published
// RS(15,9) case, and the 2t+1 clock build time.
module tb_rs_gen_poly;
  import rs_pkg::*;
  import rs_ref_pkg::*;

  localparam int TMAX = 16;
  logic clk = 0, rst_n = 0, start = 0, ready;
  m_t m = '0;
  t_t t = '0;
  poly_t poly;
  m_t m_q;
  t_t t_q;
  sym_t g [2*TMAX];
  rsym_t gr [33];
  int checks = 0, failures = 0;
  int cyc;

  rs_gen_poly #(.TMAX(TMAX)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int mm, input int tt);
    @(negedge clk);
    m = m_t'(mm);
    t = t_t'(tt);
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!ready) begin
      @(negedge clk);
      cyc++;
    end
    check(cyc == 2*tt + 1, $sformatf("m=%0d t=%0d ready after %0d", mm, tt, cyc));
    ref_genpoly(mm, tt, gr);
    for (int j = 0; j < 2*TMAX; j++)
      check(g[j] == ((j < 2*tt) ? gr[j] : 8'd0), $sformatf("m=%0d t=%0d g[%0d]=%0d exp %0d", mm, tt, j, g[j], gr[j]));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(4, 3);
    // g(x) for RS(15,9), x^4+x+1, roots alpha^1..alpha^6: 12,10,12,3,9,7,(1)
    check(g[0] == 12 && g[1] == 10 && g[2] == 12 && g[3] == 3 && g[4] == 9 && g[5] == 7,
          "RS(15,9) generator coefficients");
    for (int mm = 3; mm <= 8; mm++)
      for (int tt = 1; tt <= TMAX && 2*tt < ref_n(mm); tt += (mm > 5 ? 5 : 1))
        run(mm, tt);
    run(8, 16);
    run(6, 12);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
