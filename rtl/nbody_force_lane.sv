// One lane of the gravity pipeline: the pairwise interaction of one
// i-particle with a stream of j-particles, accumulated.
//
// For every j-particle (xj, yj, zj, mj) presented with j_valid the lane
// computes, in float,
//   dr    = ri - rj                       (3 subtractions)
//   r2    = EPS2 + dx*dx + dy*dy + dz*dz  (added in this order)
//   r_1   = 1/sqrt(r2)
//   dtmp  = mj * r_1                      (potential term, fi[3] += dtmp)
//   dtmp  = dtmp * (r_1 * r_1)
//   fi[k] = fi[k] - dtmp * dr[k]          (k = x, y, z)
// and force_o gives the accumulated fi multiplied by the i-particle's mass mi.
// This is the loop body of the force routine; the order of the float
// operations follows it, so the results match a float reference in the same
// order except where fp_rsqrt differs by one unit in the last place.
//
// Timing: the datapath is cut into seven register stages (subtract, square,
// sum, rsqrt, mass and r^-2, r^-3 scaling, component products) followed by
// the accumulator. A j-particle with j_valid in cycle t is in the accumulators
// from cycle t + LANE_LATENCY (8). A new j-particle may be presented every
// cycle; the controller uses one every II cycles. i_load (one cycle) loads the
// i-particle and clears the accumulators; it must not coincide with j_valid
// or with work still in flight (busy). busy is high while any stage holds a
// valid j-particle. The stage cut is this design's choice; the original flow
// reached an interval of 5 clocks at 100 MHz and a deeper or shallower cut
// does not change the results.
module nbody_force_lane
  import nbody_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    i_load,
  input  float4_t i_pos,
  input  logic    j_valid,
  input  float4_t j_pos,
  output logic    busy,
  output float4_t force_o
);

  float4_t pi_q;       // i-particle: x, y, z, mass
  float4_t acc_q;      // accumulators: fx, fy, fz, potential

  // stage registers
  logic   [7:1] v;
  float_t dx1, dy1, dz1, m1;
  float_t dx2, dy2, dz2, m2, sx2, sy2, sz2;
  float_t dx3, dy3, dz3, m3, r2_3;
  float_t dx4, dy4, dz4, m4, r1_4;
  float_t dx5, dy5, dz5, pot5, rr5;
  float_t dx6, dy6, dz6, pot6, f6;
  float_t tx7, ty7, tz7, pot7;

  // combinational results of each stage
  float_t dx_c, dy_c, dz_c;
  float_t sx_c, sy_c, sz_c;
  float_t r2a_c, r2b_c, r2_c;
  float_t r1_c;
  float_t pot_c, rr_c;
  float_t f_c;
  float_t tx_c, ty_c, tz_c;
  float_t ax_c, ay_c, az_c, aw_c;

  fp_add u_dx (.a(pi_q.x), .b(fneg(j_pos.x)), .y(dx_c));
  fp_add u_dy (.a(pi_q.y), .b(fneg(j_pos.y)), .y(dy_c));
  fp_add u_dz (.a(pi_q.z), .b(fneg(j_pos.z)), .y(dz_c));

  fp_mul u_sx (.a(dx1), .b(dx1), .y(sx_c));
  fp_mul u_sy (.a(dy1), .b(dy1), .y(sy_c));
  fp_mul u_sz (.a(dz1), .b(dz1), .y(sz_c));

  fp_add u_r2a (.a(EPS2),  .b(sx2), .y(r2a_c));
  fp_add u_r2b (.a(r2a_c), .b(sy2), .y(r2b_c));
  fp_add u_r2c (.a(r2b_c), .b(sz2), .y(r2_c));

  fp_rsqrt u_rsq (.x(r2_3), .y(r1_c));

  fp_mul u_pot (.a(m4),   .b(r1_4), .y(pot_c));
  fp_mul u_rr  (.a(r1_4), .b(r1_4), .y(rr_c));

  fp_mul u_f   (.a(pot5), .b(rr5), .y(f_c));

  fp_mul u_tx (.a(f6), .b(dx6), .y(tx_c));
  fp_mul u_ty (.a(f6), .b(dy6), .y(ty_c));
  fp_mul u_tz (.a(f6), .b(dz6), .y(tz_c));

  fp_add u_ax (.a(acc_q.x), .b(fneg(tx7)), .y(ax_c));
  fp_add u_ay (.a(acc_q.y), .b(fneg(ty7)), .y(ay_c));
  fp_add u_az (.a(acc_q.z), .b(fneg(tz7)), .y(az_c));
  fp_add u_aw (.a(acc_q.w), .b(pot7),      .y(aw_c));

  fp_mul u_ox (.a(acc_q.x), .b(pi_q.w), .y(force_o.x));
  fp_mul u_oy (.a(acc_q.y), .b(pi_q.w), .y(force_o.y));
  fp_mul u_oz (.a(acc_q.z), .b(pi_q.w), .y(force_o.z));
  fp_mul u_ow (.a(acc_q.w), .b(pi_q.w), .y(force_o.w));

  assign busy = |v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v <= '0;
    else        v <= {v[6:1], j_valid};
  end

  // Data registers need no reset: they are only read under their valid bit.
  always_ff @(posedge clk) begin
    dx1 <= dx_c;  dy1 <= dy_c;  dz1 <= dz_c;  m1 <= j_pos.w;
    dx2 <= dx1;   dy2 <= dy1;   dz2 <= dz1;   m2 <= m1;
    sx2 <= sx_c;  sy2 <= sy_c;  sz2 <= sz_c;
    dx3 <= dx2;   dy3 <= dy2;   dz3 <= dz2;   m3 <= m2;   r2_3 <= r2_c;
    dx4 <= dx3;   dy4 <= dy3;   dz4 <= dz3;   m4 <= m3;   r1_4 <= r1_c;
    dx5 <= dx4;   dy5 <= dy4;   dz5 <= dz4;   pot5 <= pot_c; rr5 <= rr_c;
    dx6 <= dx5;   dy6 <= dy5;   dz6 <= dz5;   pot6 <= pot5;  f6 <= f_c;
    tx7 <= tx_c;  ty7 <= ty_c;  tz7 <= tz_c;  pot7 <= pot6;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pi_q  <= '0;
      acc_q <= '0;
    end else if (i_load) begin
      pi_q  <= i_pos;
      acc_q <= '0;
    end else if (v[7]) begin
      acc_q <= '{w: aw_c, z: az_c, y: ay_c, x: ax_c};
    end
  end

  a_load_idle: assert property (@(posedge clk) disable iff (!rst_n) i_load |-> !j_valid && !busy)
    else $error("i_load while the lane is working");

endmodule
