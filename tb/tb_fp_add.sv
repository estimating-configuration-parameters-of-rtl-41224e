// Self-checking testbench of fp_add.
// Random normal operands of both signs whose exponents lie within 20 of each
// other (so the reference sum in double precision is exact and rounding it
// once to float gives the correctly rounded result), plus directed cases:
// exact cancellation, a zero operand, a carry out of the significand and a
// tie that must round to even. Every result is compared bit for bit.
module tb_fp_add;
  import nbody_pkg::*;
  import tb_float_pkg::*;

  float_t a, b, y;
  int checks = 0, failures = 0;

  fp_add dut (.a(a), .b(b), .y(y));

  function automatic float_t rnd_float(int unsigned ebase);
    float_t f;
    f[31]    = 1'($urandom);
    f[30:23] = 8'(ebase + ($urandom % 21));
    f[22:0]  = 23'($urandom);
    return f;
  endfunction

  task automatic check(float_t xa, float_t xb);
    float_t expv;
    real r;
    a = xa; b = xb;
    #1;
    r    = f2r(xa) + f2r(xb);
    expv = r2f(r);
    if (expv[30:0] == 31'd0) expv = FP_ZERO;
    checks++;
    if (y !== expv) begin
      failures++;
      if (failures < 10) $display("FAIL add %h + %h = %h, expected %h", xa, xb, y, expv);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32'h3f80_0000, 32'h3f80_0000);   // 1 + 1
    check(32'h3f80_0000, 32'hbf80_0000);   // 1 - 1 = +0
    check(32'h4049_0fdb, 32'h0000_0000);   // pi + 0
    check(32'h0000_0000, 32'hc049_0fdb);   // 0 - pi
    check(32'h3fff_ffff, 32'h3400_0000);   // carry into a new binade
    check(32'h4b00_0001, 32'h3f00_0000);   // tie, rounds to even (up)
    check(32'h4b00_0000, 32'h3f00_0000);   // tie, rounds to even (stays)
    check(32'h3f80_0001, 32'hbf80_0000);   // massive cancellation
    check(EPS2, 32'h3f80_0000);
    for (int i = 0; i < 20000; i++) check(rnd_float(110), rnd_float(110));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
