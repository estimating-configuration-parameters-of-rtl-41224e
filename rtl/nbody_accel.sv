// N-body gravity accelerator: P_DMA force pipelines working side by side,
// each behind its own DMA engine.
//
// The host splits the i-particles among the channels and sends every channel
// the j-particles; each channel computes the forces on its i-particles
// independently (one call = one command, see nbody_dma) and returns them on
// its own output stream. When a problem has more particles than a channel's
// local memory holds (N > N_LOCAL), the host runs several calls, replacing
// the memory contents with the next block of i- or j-particles, and adds up
// the partial forces of the j-blocks itself. Channels share nothing; they
// may be started and stalled independently.
//
// Each channel c has its own command (cmd_*[c]), input stream (s_*[c]) and
// output stream (m_*[c]); see nbody_dma for the protocol and
// nbody_force_pipeline for the timing of a call.
//
// Defaults: P_DMA = 7 channels, N_LOCAL = 2048 particles of local memory and
// P_UNROLL = 1 lane each. This follows the published configuration study,
// whose resource and performance model picks it as the fastest setting that
// fits a ZU3EG device (432 block RAMs) for 8192 particles. The channel
// structure and the host-side splitting also follow that design; the stream
// and command ports are this design's choices.
module nbody_accel
  import nbody_pkg::*;
#(
  parameter int unsigned P_DMA    = 7,
  parameter int unsigned N_LOCAL  = 2048,
  parameter int unsigned P_UNROLL = 1,
  parameter int unsigned II       = II_DEFAULT,
  localparam int unsigned NW = $clog2(N_LOCAL + 1)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic   [P_DMA-1:0]  cmd_valid,
  output logic   [P_DMA-1:0]  cmd_ready,
  input  logic   [NW-1:0]     cmd_ni [P_DMA],
  input  logic   [NW-1:0]     cmd_nj [P_DMA],
  input  logic   [P_DMA-1:0]  s_tvalid,
  output logic   [P_DMA-1:0]  s_tready,
  input  float_t              s_tdata [P_DMA],
  output logic   [P_DMA-1:0]  m_tvalid,
  input  logic   [P_DMA-1:0]  m_tready,
  output float_t              m_tdata [P_DMA],
  output logic   [P_DMA-1:0]  m_tlast,
  output logic   [P_DMA-1:0]  busy
);

  localparam int unsigned AW = (N_LOCAL > 1) ? $clog2(N_LOCAL) : 1;

  for (genvar c = 0; c < P_DMA; c++) begin : g_ch
    logic          pl_start, pl_done, pl_busy;
    logic [NW-1:0] pl_ni, pl_nj;
    logic          posi_we, posj_we, force_re;
    logic [AW-1:0] posi_addr, posj_addr, force_addr;
    float4_t       posi_wdata, posj_wdata, force_rdata;

    nbody_dma #(.N_LOCAL(N_LOCAL)) u_dma (
      .clk, .rst_n,
      .cmd_valid(cmd_valid[c]), .cmd_ready(cmd_ready[c]),
      .cmd_ni(cmd_ni[c]), .cmd_nj(cmd_nj[c]),
      .s_tvalid(s_tvalid[c]), .s_tready(s_tready[c]), .s_tdata(s_tdata[c]),
      .m_tvalid(m_tvalid[c]), .m_tready(m_tready[c]), .m_tdata(m_tdata[c]),
      .m_tlast(m_tlast[c]),
      .pl_start, .pl_ni, .pl_nj, .pl_done,
      .posi_we, .posi_addr, .posi_wdata,
      .posj_we, .posj_addr, .posj_wdata,
      .force_re, .force_addr, .force_rdata);

    nbody_force_pipeline #(.N_LOCAL(N_LOCAL), .P_UNROLL(P_UNROLL), .II(II)) u_pipe (
      .clk, .rst_n,
      .start(pl_start), .ni(pl_ni), .nj(pl_nj), .busy(pl_busy), .done(pl_done),
      .posi_we, .posi_addr, .posi_wdata,
      .posj_we, .posj_addr, .posj_wdata,
      .force_re, .force_addr, .force_rdata);

    assign busy[c] = pl_busy || !cmd_ready[c];
  end

endmodule
