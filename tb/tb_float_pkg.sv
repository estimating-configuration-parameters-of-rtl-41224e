// Testbench helpers: conversions between float bit patterns and real
// (double precision), written out on the bit fields so that they do not
// depend on simulator support for shortreal. r2f rounds to nearest, ties to
// even, and flushes results below the smallest normal float to zero, the same
// convention the arithmetic units use. Also a double-precision reference for
// the gravitational interaction and a generator of random particles.
package tb_float_pkg;
  import nbody_pkg::*;

  function automatic real f2r(float_t f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) return 0.0;
    d = {f[31], 11'(f[30:23]) + 11'd896, f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic float_t r2f(real r);
    logic [63:0] d;
    int          e;
    logic [24:0] m;
    logic        g, st;
    d = $realtobits(r);
    if (d[62:52] == 11'd0) return {d[63], 31'd0};
    e  = int'(d[62:52]) - 1023 + 127;
    m  = {2'b01, d[51:29]};
    g  = d[28];
    st = |d[27:0];
    if (g && (st || m[0])) m = m + 25'd1;
    if (m[24]) begin
      m = m >> 1;
      e = e + 1;
    end
    if (e >= 255) return {d[63], FP_PINF[30:0]};
    if (e <= 0) return {d[63], 31'd0};
    return {d[63], e[7:0], m[22:0]};
  endfunction

  // Distance of two floats in units in the last place (same sign assumed).
  function automatic int ulp_diff(float_t a, float_t b);
    int d;
    d = int'(a[30:0]) - int'(b[30:0]);
    return (d < 0) ? -d : d;
  endfunction

  // Reference interaction in double precision, computed from the physics
  // rather than from the pipeline's operation order: component k (0..2) of
  // -mj * dr / |dr|^3 and, for k == 3, the potential term mj / |dr|, with
  // |dr|^2 softened by EPS2. The caller multiplies the sums by mi.
  function automatic real pair_term(float4_t pi, float4_t pj, int k);
    real dx, dy, dz, r2, r;
    dx = f2r(pi.x) - f2r(pj.x);
    dy = f2r(pi.y) - f2r(pj.y);
    dz = f2r(pi.z) - f2r(pj.z);
    r2 = dx * dx + dy * dy + dz * dz + f2r(EPS2);
    r  = $sqrt(r2);
    case (k)
      0:       return -f2r(pj.w) * dx / (r2 * r);
      1:       return -f2r(pj.w) * dy / (r2 * r);
      2:       return -f2r(pj.w) * dz / (r2 * r);
      default: return f2r(pj.w) / r;
    endcase
  endfunction

  // A random particle: position in the cube [-1, 1)^3, mass in [0.5, 1.5).
  function automatic float4_t rand_particle();
    float4_t p;
    p.x = r2f(($urandom % 2000000) / 1000000.0 - 1.0);
    p.y = r2f(($urandom % 2000000) / 1000000.0 - 1.0);
    p.z = r2f(($urandom % 2000000) / 1000000.0 - 1.0);
    p.w = r2f(0.5 + ($urandom % 1000000) / 1000000.0);
    return p;
  endfunction

  // True when the float result v agrees with the reference sum ref to a
  // relative 1e-5 of the sum of magnitudes mag of the terms.
  function automatic bit close(float_t v, real ref_v, real mag);
    real d;
    d = f2r(v) - ref_v;
    if (d < 0.0) d = -d;
    return d <= 1.0e-5 * mag + 1.0e-30;
  endfunction

endpackage
