// tb_rs_field_lut -- checks the field tables for every m = 3..8: ready comes
// n+1 clocks after start, apow[j] = alpha^j, and inv(a) * a = 1 for every
// non-zero a (inv(0) = 0), all against the reference arithmetic.
module tb_rs_field_lut;
  import rs_pkg::*;
  import rs_ref_pkg::*;

  localparam int TMAX = 16;
  logic clk = 0, rst_n = 0, start = 0, ready;
  m_t m = '0;
  poly_t poly;
  m_t m_q;
  len_t n;
  sym_t apow [2*TMAX+1];
  sym_t inv_addr = '0, inv_data;
  int checks = 0, failures = 0;
  int cyc;

  rs_field_lut #(.TMAX(TMAX)) dut (.*);

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

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int mm = 3; mm <= 8; mm++) begin
      @(negedge clk);
      m = m_t'(mm);
      start = 1;
      @(negedge clk);
      start = 0;
      cyc = 1;
      while (!ready) begin
        @(negedge clk);
        cyc++;
      end
      check(cyc == ref_n(mm) + 1, $sformatf("m=%0d ready after %0d clocks", mm, cyc));
      check(poly == poly_t'(ref_poly(mm)), "primitive polynomial");
      check(n == len_t'(ref_n(mm)), "block length");
      for (int j = 0; j <= 2*TMAX && j < ref_n(mm); j++)
        check(apow[j] == ref_pow(mm, j), $sformatf("m=%0d alpha^%0d = %0d", mm, j, apow[j]));
      for (int a = 0; a < (1 << mm); a++) begin
        inv_addr = sym_t'(a);
        #1;
        if (a == 0) check(inv_data == '0, "inv(0)");
        else check(ref_mul(mm, sym_t'(a), inv_data) == 8'd1,
                   $sformatf("m=%0d inv(%0d) = %0d", mm, a, inv_data));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
