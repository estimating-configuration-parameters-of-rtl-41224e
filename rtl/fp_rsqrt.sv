// Single-precision reciprocal square root, y = 1/sqrt(x), combinational.
//
// This is "1.0f / sqrtf(r2)" of the force calculation as one unit. The input
// is split into x = M * 2^E with E even and M in [1, 4). The significand is
// widened to R = M * 2^76, its integer square root S = floor(sqrt(M) * 2^38)
// is found digit by digit (39 result bits), and Q = floor(2^80 / S) gives
// 1/sqrt(M) with 42 fraction bits. The exponent of the result is -E/2 (or
// -E/2 - 1 when 1/sqrt(M) < 1). Q is rounded to 24 bits to nearest using a
// guard bit and a sticky bit that also records an inexact root or quotient,
// so the result is within one unit in the last place of the exact value and
// is normally the correctly rounded one.
//
// Choices of this design: zero or subnormal input gives +infinity, a
// negative input gives a quiet NaN. The force pipeline only feeds it
// r2 >= EPS2 > 0.
//
// Interface: x, y are float bit patterns. No clock; the caller registers.
module fp_rsqrt
  import nbody_pkg::*;
(
  input  float_t x,
  output float_t y
);

  always_comb begin
    int          e_unb, e_even, e;
    logic [24:0] mi;
    logic [77:0] r;
    logic [38:0] root;
    logic [40:0] rem, trial;
    logic [80:0] num, qrem;
    logic [42:0] q;          // quotient is below 2^43
    logic        exact, g, st, rnd;
    logic [24:0] mant;

    e_unb = int'(x[30:23]) - 127;
    if (e_unb[0]) begin
      mi     = {1'b1, x[22:0], 1'b0};
      e_even = e_unb - 1;
    end else begin
      mi     = {1'b0, 1'b1, x[22:0]};
      e_even = e_unb;
    end
    // R = M * 2^76 with M = mi / 2^23
    r = {mi, 53'd0};

    rem  = '0;
    root = '0;
    for (int i = 38; i >= 0; i--) begin
      rem   = {rem[38:0], r[2*i+1], r[2*i]};
      trial = {root, 2'b01};
      if (rem >= trial) begin
        rem  = rem - trial;
        root = {root[37:0], 1'b1};
      end else begin
        root = {root[37:0], 1'b0};
      end
    end
    exact = (rem == '0);

    num  = 81'd1 << 80;
    q    = 43'(num / {42'd0, root});
    qrem = num % {42'd0, root};

    e = -(e_even >>> 1);
    if (q[42]) begin
      // 1/sqrt(M) == 1 exactly (M == 1)
      mant = {2'b01, 23'd0};
      g    = 1'b0;
      st   = 1'b0;
    end else begin
      mant = {1'b0, q[41:18]};
      g    = q[17];
      st   = (|q[16:0]) | (qrem != '0) | ~exact;
      e    = e - 1;
    end
    rnd  = g & (st | mant[0]);
    mant = mant + {24'd0, rnd};
    if (mant[24]) begin
      mant = mant >> 1;
      e    = e + 1;
    end
    e = e + 127;

    if (x[30:23] == 8'd0) begin
      y = FP_PINF;
    end else if (x[31]) begin
      y = FP_QNAN;
    end else begin
      y = {1'b0, e[7:0], mant[22:0]};
    end
  end

endmodule
