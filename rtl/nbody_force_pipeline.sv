// The force pipeline: local particle memories, P_UNROLL lanes and the loop
// controller that runs the i- and j-loops of the force routine in hardware.
//
// Function: after start, with ni i-particles in posi[0..ni-1] and nj
// j-particles in posj[0..nj-1], it writes to forcef[i] (i < ni) the force
// (fx, fy, fz) and potential on i-particle i from all nj j-particles, each
// multiplied by the mass of particle i. Self-interaction is not excluded:
// with the softening EPS2 a particle contributes zero force and a finite
// potential term on itself, as in the original routine.
//
// Operation: the i-loop is unrolled by P_UNROLL. For each group of P_UNROLL
// i-particles the controller
//   LOADI  reads the group's i-particles, one per clock, into the lanes;
//   RUNJ   reads posj[j] every II clocks and broadcasts it to all lanes;
//   DRAIN  waits until the last j-particle has left every lane;
//   WRITEF writes the lanes' results to forcef, one per clock, skipping lanes
//          past ni when ni is not a multiple of P_UNROLL.
// Then the next group follows, and after the last one done is pulsed.
//
// Timing: with G = ceil(ni / P_UNROLL) groups, done rises
//   1 + G * (2*P_UNROLL + (nj - 1)*II + 10)
// clocks after the cycle in which start is sampled, i.e. one interaction per
// lane every II clocks. ni and nj must be 1..N_LOCAL. The memories' write
// ports (posi, posj) and forcef's read port belong to the DMA engine and may
// be used only while busy is low.
//
// Following the published design: the loop structure, the manual unrolling of the i-loop
// (P_UNROLL), the interval II = 5 and the memory size N_LOCAL (4096 by
// default). The state machine, the port layout and the sequential loading
// and writing of the lanes are this design's choices.
module nbody_force_pipeline
  import nbody_pkg::*;
#(
  parameter int unsigned N_LOCAL  = 4096,
  parameter int unsigned P_UNROLL = 1,
  parameter int unsigned II       = II_DEFAULT,
  localparam int unsigned AW = (N_LOCAL > 1) ? $clog2(N_LOCAL) : 1,
  localparam int unsigned NW = $clog2(N_LOCAL + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // command
  input  logic          start,
  input  logic [NW-1:0] ni,
  input  logic [NW-1:0] nj,
  output logic          busy,
  output logic          done,
  // posi / posj write ports
  input  logic          posi_we,
  input  logic [AW-1:0] posi_addr,
  input  float4_t       posi_wdata,
  input  logic          posj_we,
  input  logic [AW-1:0] posj_addr,
  input  float4_t       posj_wdata,
  // forcef read port (rdata one clock after re)
  input  logic          force_re,
  input  logic [AW-1:0] force_addr,
  output float4_t       force_rdata
);

  localparam int unsigned UW = (P_UNROLL > 1) ? $clog2(P_UNROLL) : 1;
  localparam int unsigned PW = (II > 1) ? $clog2(II) : 1;

  typedef enum logic [2:0] {S_IDLE, S_LOADI, S_RUNJ, S_DRAIN, S_WRITEF, S_DONE} state_t;

  state_t        state;
  logic [NW-1:0] ni_q, nj_q;
  logic [NW-1:0] ig;          // first i-particle of the current group
  logic [NW-1:0] jc;          // next j-particle to read
  logic [UW-1:0] u;           // lane being loaded or written
  logic [PW-1:0] ph;          // phase within the initiation interval

  // delayed read strobes
  logic          ild_q;       // posi word for lane uld_q arrives this cycle
  logic [UW-1:0] uld_q;
  logic          jv_q;        // posj word arrives this cycle

  // memories
  logic          pi_re, pj_re, f_we;
  logic [AW-1:0] pi_raddr, pj_raddr, f_waddr;
  float4_t       pi_rdata, pj_rdata, f_wdata;

  // lanes
  logic    [P_UNROLL-1:0] lane_busy;
  float4_t                lane_force [P_UNROLL];

  particle_ram #(.DEPTH(N_LOCAL)) u_posi (
    .clk, .we(posi_we), .waddr(posi_addr), .wdata(posi_wdata),
    .re(pi_re), .raddr(pi_raddr), .rdata(pi_rdata));

  particle_ram #(.DEPTH(N_LOCAL)) u_posj (
    .clk, .we(posj_we), .waddr(posj_addr), .wdata(posj_wdata),
    .re(pj_re), .raddr(pj_raddr), .rdata(pj_rdata));

  particle_ram #(.DEPTH(N_LOCAL)) u_forcef (
    .clk, .we(f_we), .waddr(f_waddr), .wdata(f_wdata),
    .re(force_re), .raddr(force_addr), .rdata(force_rdata));

  for (genvar l = 0; l < P_UNROLL; l++) begin : g_lane
    nbody_force_lane u_lane (
      .clk, .rst_n,
      .i_load (ild_q && uld_q == UW'(l)),
      .i_pos  (pi_rdata),
      .j_valid(jv_q),
      .j_pos  (pj_rdata),
      .busy   (lane_busy[l]),
      .force_o(lane_force[l]));
  end

  // memory requests, decoded from the state
  always_comb begin
    logic [NW:0] idx;
    idx      = {1'b0, ig} + (NW+1)'(u);
    pi_re    = (state == S_LOADI);
    pi_raddr = AW'(idx);
    pj_re    = (state == S_RUNJ) && (ph == '0);
    pj_raddr = AW'(jc);
    f_we     = (state == S_WRITEF) && (idx < {1'b0, ni_q});
    f_waddr  = AW'(idx);
    f_wdata  = lane_force[u];
  end

  assign busy = (state != S_IDLE);
  assign done = (state == S_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      ni_q  <= '0;
      nj_q  <= '0;
      ig    <= '0;
      jc    <= '0;
      u     <= '0;
      ph    <= '0;
      ild_q <= 1'b0;
      uld_q <= '0;
      jv_q  <= 1'b0;
    end else begin
      ild_q <= pi_re;
      uld_q <= u;
      jv_q  <= pj_re;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            ni_q  <= ni;
            nj_q  <= nj;
            ig    <= '0;
            u     <= '0;
            state <= S_LOADI;
          end
        end
        S_LOADI: begin
          if (u == UW'(P_UNROLL - 1)) begin
            u     <= '0;
            jc    <= '0;
            ph    <= '0;
            state <= S_RUNJ;
          end else begin
            u <= u + 1'b1;
          end
        end
        S_RUNJ: begin
          ph <= (ph == PW'(II - 1)) ? '0 : ph + 1'b1;
          if (ph == '0) begin
            jc <= jc + 1'b1;
            if (jc == nj_q - 1'b1) state <= S_DRAIN;
          end
        end
        S_DRAIN: begin
          if (!jv_q && lane_busy == '0) state <= S_WRITEF;
        end
        S_WRITEF: begin
          if (u == UW'(P_UNROLL - 1)) begin
            u <= '0;
            if ({1'b0, ig} + (NW+1)'(P_UNROLL) >= {1'b0, ni_q}) begin
              state <= S_DONE;
            end else begin
              ig    <= ig + NW'(P_UNROLL);
              state <= S_LOADI;
            end
          end else begin
            u <= u + 1'b1;
          end
        end
        S_DONE:  state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  a_no_write_busy: assert property (@(posedge clk) disable iff (!rst_n) busy |-> !posi_we && !posj_we)
    else $error("local memory written while the pipeline runs");
  a_sizes: assert property (@(posedge clk) disable iff (!rst_n)
      (start && !busy) |-> ni != '0 && nj != '0 && ni <= NW'(N_LOCAL) && nj <= NW'(N_LOCAL))
    else $error("ni/nj out of range");

endmodule
