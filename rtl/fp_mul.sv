// Single-precision floating-point multiplier, y = a * b, combinational.
//
// The 24x24-bit significand product is normalised by at most one place and
// rounded to nearest, ties to even, using the bit below the result and a
// sticky OR of the rest. This is the "*" of the force calculation.
//
// Simplifications chosen for this design: subnormal inputs are read as zero,
// subnormal results are flushed to (signed) zero, overflow gives infinity,
// and NaN/infinity inputs are not treated specially.
//
// Interface: a, b, y are float bit patterns. No clock; the caller registers.
module fp_mul
  import nbody_pkg::*;
(
  input  float_t a,
  input  float_t b,
  output float_t y
);

  always_comb begin
    logic        s;
    logic [23:0] m_a, m_b, m;
    logic [47:0] p;
    logic        g, st, rnd;
    logic [24:0] mant;
    int          e;

    s   = a[31] ^ b[31];
    m_a = {1'b1, a[22:0]};
    m_b = {1'b1, b[22:0]};
    p   = m_a * m_b;
    e   = int'(a[30:23]) + int'(b[30:23]) - 127;
    if (p[47]) begin
      m  = p[47:24];
      g  = p[23];
      st = |p[22:0];
      e  = e + 1;
    end else begin
      m  = p[46:23];
      g  = p[22];
      st = |p[21:0];
    end
    rnd  = g & (st | m[0]);
    mant = {1'b0, m} + {24'd0, rnd};
    if (mant[24]) begin
      mant = mant >> 1;
      e    = e + 1;
    end

    if (a[30:23] == 8'd0 || b[30:23] == 8'd0) begin
      y = {s, 31'd0};
    end else if (e >= 255) begin
      y = {s, FP_PINF[30:0]};
    end else if (e <= 0) begin
      y = {s, 31'd0};
    end else begin
      y = {s, e[7:0], mant[22:0]};
    end
  end

endmodule
