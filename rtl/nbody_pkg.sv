// Shared types and constants of the N-body force accelerator.
//
// All arithmetic is IEEE-754 single precision ("float"), carried as raw 32-bit
// patterns. A particle or a force is a group of four floats: the position
// (x, y, z) and the mass of a particle, or the force (fx, fy, fz) and the
// potential accumulated on it. In a packed float4_t element 0 (x) sits in bits
// [31:0] and element 3 (w) in bits [127:96], which is also the order in which
// the four words travel over the 32-bit DMA streams.
//
// EPS2 is the gravitational softening 0.03^2, rounded to float as
// 0.03f*0.03f; II is the pipeline's initiation interval of 5 clocks per
// pairwise interaction at 100 MHz, the figure the performance model uses.
package nbody_pkg;

  typedef logic [31:0] float_t;

  typedef struct packed {
    float_t w;   // mass (positions) or potential (forces)
    float_t z;
    float_t y;
    float_t x;
  } float4_t;

  localparam float_t FP_ZERO = 32'h0000_0000;
  localparam float_t FP_PINF = 32'h7f80_0000;
  localparam float_t FP_QNAN = 32'h7fc0_0000;

  // 0.03f * 0.03f in single precision.
  localparam float_t EPS2 = 32'h3a6b_edfa;

  // Initiation interval of the force pipeline, clocks per interaction.
  localparam int unsigned II_DEFAULT = 5;

  // Clocks from a j-particle word leaving local memory (lane j_valid) to the
  // cycle after its contribution has been added to the accumulators.
  localparam int unsigned LANE_LATENCY = 8;

  // Flip the sign bit: a - b is computed as a + neg(b).
  function automatic float_t fneg(float_t a);
    return {~a[31], a[30:0]};
  endfunction

endpackage
