// Self-checking testbench of fp_mul.
// Random normal operands of both signs (the 48-bit significand product is
// exact in double precision, so rounding the double product once to float is
// the correctly rounded reference) plus directed cases with a zero operand,
// powers of two and a product that rounds up into the next binade. Every
// result is compared bit for bit.
module tb_fp_mul;
  import nbody_pkg::*;
  import tb_float_pkg::*;

  float_t a, b, y;
  int checks = 0, failures = 0;

  fp_mul dut (.a(a), .b(b), .y(y));

  function automatic float_t rnd_float();
    float_t f;
    f[31]    = 1'($urandom);
    f[30:23] = 8'(70 + ($urandom % 110));
    f[22:0]  = 23'($urandom);
    return f;
  endfunction

  task automatic check(float_t xa, float_t xb);
    float_t expv;
    real r;
    a = xa; b = xb;
    #1;
    r    = f2r(xa) * f2r(xb);
    expv = r2f(r);
    checks++;
    if (y !== expv) begin
      failures++;
      if (failures < 10) $display("FAIL mul %h * %h = %h, expected %h", xa, xb, y, expv);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32'h3f80_0000, 32'h4049_0fdb);   // 1 * pi
    check(32'h4000_0000, 32'hc040_0000);   // 2 * -3
    check(32'h0000_0000, 32'h4049_0fdb);   // 0 * pi
    check(32'h3fff_ffff, 32'h3fff_ffff);   // rounds up to the next binade
    check(32'h3cf5_c28f, 32'h3cf5_c28f);   // 0.03f * 0.03f = EPS2
    for (int i = 0; i < 20000; i++) check(rnd_float(), rnd_float());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
