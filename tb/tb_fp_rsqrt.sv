// Self-checking testbench of fp_rsqrt.
// The reference is 1/sqrt computed in double precision and rounded to float.
// Exact powers of four must give exact results; for random positive inputs
// over a wide exponent range the result must lie within one unit in the last
// place, and at least 99% of them must be the correctly rounded value.
module tb_fp_rsqrt;
  import nbody_pkg::*;
  import tb_float_pkg::*;

  float_t x, y;
  int checks = 0, failures = 0, exact_hits = 0, n_rand = 0;

  fp_rsqrt dut (.x(x), .y(y));

  task automatic check(float_t xi, bit must_be_exact);
    float_t expv;
    int     diff;
    x = xi;
    #1;
    expv = r2f(1.0 / $sqrt(f2r(xi)));
    diff = ulp_diff(y, expv);
    checks++;
    if (y == expv) exact_hits++;
    if ((must_be_exact && y != expv) || diff > 1) begin
      failures++;
      if (failures < 10) $display("FAIL rsqrt(%h) = %h, expected %h", xi, y, expv);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32'h3f80_0000, 1'b1);   // 1 -> 1
    check(32'h4080_0000, 1'b1);   // 4 -> 0.5
    check(32'h3e80_0000, 1'b1);   // 0.25 -> 2
    check(32'h4180_0000, 1'b1);   // 16 -> 0.25
    check(32'h4000_0000, 1'b0);   // 2
    check(EPS2, 1'b0);
    exact_hits = 0;
    for (int i = 0; i < 20000; i++) begin
      float_t f;
      f = {1'b0, 8'(60 + ($urandom % 136)), 23'($urandom)};
      check(f, 1'b0);
      n_rand++;
    end
    checks++;
    if (exact_hits * 100 < n_rand * 99) begin
      failures++;
      $display("FAIL only %0d of %0d correctly rounded", exact_hits, n_rand);
    end
    $display("correctly rounded: %0d of %0d", exact_hits, n_rand);
    // zero input gives +infinity
    x = FP_ZERO; #1;
    checks++;
    if (y != FP_PINF) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
