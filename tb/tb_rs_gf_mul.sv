// tb_rs_gf_mul -- exhaustive check of the run-time-field GF multiplier for
// every supported m (3..8) against the reference carry-less multiply and
// long-division reduction.
module tb_rs_gf_mul;
  import rs_pkg::*;
  import rs_ref_pkg::*;

  sym_t a, b, y;
  poly_t p;
  m_t m;
  int checks = 0, failures = 0;

  rs_gf_mul dut (.a, .b, .p, .m, .y);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int mm = 3; mm <= 8; mm++) begin
      m = m_t'(mm);
      p = poly_t'(ref_poly(mm));
      for (int i = 0; i < (1 << mm); i++)
        for (int j = 0; j < (1 << mm); j++) begin
          a = sym_t'(i);
          b = sym_t'(j);
          #1;
          checks++;
          if (y != ref_mul(mm, a, b)) begin
            failures++;
            if (failures < 10) $display("m=%0d %0d*%0d = %0d, expected %0d", mm, i, j, y, ref_mul(mm, a, b));
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
