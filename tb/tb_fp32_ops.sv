// tb_fp32_ops: checks the FP32 operators of eri_pkg bit for bit against double
// precision arithmetic. Operands are drawn so that the exact product or sum
// fits in a double (exponent differences of at most 24), so that rounding the
// double result to single precision gives the correctly rounded answer.
module tb_fp32_ops;
  import eri_pkg::*;
  import fp_ref_pkg::*;

  int checks = 0;
  int failures = 0;

  task automatic check(input string what, input fp32_t got, input fp32_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    fp32_t a, b;
    real   ra, rb;
    // a few fixed cases
    check("1*1", fp_mul(FP_ONE, FP_ONE), FP_ONE);
    check("1+1", fp_add(FP_ONE, FP_ONE), 32'h4000_0000);
    check("1-1", fp_add(FP_ONE, 32'hbf80_0000), FP_ZERO);
    check("0*x", fp_mul(FP_ZERO, 32'h4049_0fdb), FP_ZERO);
    check("0+x", fp_add(FP_ZERO, 32'h4049_0fdb), 32'h4049_0fdb);
    for (int v = 0; v < 40; v++) check("int", fp_from_uint(unsigned'(v)), from_real(real'(v)));
    // random products and sums
    for (int i = 0; i < 20000; i++) begin
      a = from_real(rand_real(-20, 20));
      b = from_real(rand_real(-20, 20));
      ra = to_real(a);
      rb = to_real(b);
      check("mul", fp_mul(a, b), from_real(ra * rb));
      // sums with close exponents exercise cancellation
      if (i % 2 == 0) b = from_real(rand_real(-3, 3));
      rb = to_real(b);
      if ((ra * rb) != 0.0) check("add", fp_add(a, b), from_real(ra + rb));
      // add a perturbation close to one ulp to exercise rounding ties
      b = {a[31] ^ 1'(i % 3 == 0), a[30:23] - 8'(i % 24), 23'($urandom)};
      rb = to_real(b);
      check("add2", fp_add(a, b), from_real(ra + rb));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
