// Single-precision floating-point adder, y = a + b, combinational.
//
// The adder aligns the smaller operand to the larger one with three extra
// bits (guard, round, sticky), adds or subtracts the significands,
// renormalises with a leading-zero count and rounds to nearest, ties to even.
// It is the "+", "-" and "+=" of the force calculation; a subtraction is
// made by flipping the sign of b outside the unit.
//
// Simplifications chosen for this design (the float format itself is the
// design's; how the adder is built is not given): subnormal inputs are read
// as zero and subnormal results are flushed to zero, an overflow gives
// infinity of the proper sign, and NaN/infinity inputs are not treated
// specially. An exact zero result is +0.
//
// Interface: a, b, y are float bit patterns. No clock; the caller registers.
module fp_add
  import nbody_pkg::*;
(
  input  float_t a,
  input  float_t b,
  output float_t y
);

  always_comb begin
    logic        s_l, s_s;
    logic [7:0]  e_l, e_s;
    logic [23:0] m_a, m_b, m_l, m_s;
    logic [7:0]  d;
    logic [26:0] al, as_, mask;
    logic        sticky;
    logic [27:0] sum;
    logic [24:0] mant;
    logic        rnd;
    int          e;
    int          lz;

    mask = '0; sum = '0; mant = '0; rnd = 1'b0; e = 0; lz = 0;
    m_a = (a[30:23] == 8'd0) ? 24'd0 : {1'b1, a[22:0]};
    m_b = (b[30:23] == 8'd0) ? 24'd0 : {1'b1, b[22:0]};
    if ({a[30:23], m_a} >= {b[30:23], m_b}) begin
      s_l = a[31]; e_l = a[30:23]; m_l = m_a;
      s_s = b[31]; e_s = b[30:23]; m_s = m_b;
    end else begin
      s_l = b[31]; e_l = b[30:23]; m_l = m_b;
      s_s = a[31]; e_s = a[30:23]; m_s = m_a;
    end

    d   = e_l - e_s;
    al  = {m_l, 3'b000};
    as_ = {m_s, 3'b000};
    if (d >= 8'd27) begin
      sticky = |m_s;
      as_    = '0;
    end else begin
      mask   = (27'd1 << d) - 27'd1;
      sticky = |(as_ & mask);
      as_    = as_ >> d;
    end
    as_[0] = as_[0] | sticky;

    e  = int'(e_l);
    lz = 0;
    if (s_l == s_s) begin
      sum = {1'b0, al} + {1'b0, as_};
      if (sum[27]) begin
        sum = {1'b0, sum[27:2], sum[1] | sum[0]};
        e   = e + 1;
      end
    end else begin
      sum = {1'b0, al} - {1'b0, as_};
      for (int i = 26; i >= 0; i--) begin
        if (sum[i] == 1'b0 && lz == 26 - i) lz = lz + 1;
      end
      sum = sum << lz;
      e   = e - lz;
    end

    rnd  = sum[2] & (sum[1] | sum[0] | sum[3]);
    mant = {1'b0, sum[26:3]} + {24'd0, rnd};
    if (mant[24]) begin
      mant = mant >> 1;
      e    = e + 1;
    end

    if (e_l == 8'd0 || sum[26:0] == 27'd0) begin
      y = FP_ZERO;
    end else if (e >= 255) begin
      y = {s_l, FP_PINF[30:0]};
    end else if (e <= 0) begin
      y = {s_l, 31'd0};
    end else begin
      y = {s_l, e[7:0], mant[22:0]};
    end
  end

endmodule
