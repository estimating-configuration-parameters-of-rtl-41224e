// DMA engine of one force pipeline: moves particles between the host's
// 32-bit data streams and the pipeline's local memories, and runs one call
// of the force routine.
//
// A command (cmd_valid/cmd_ready, with ni and nj) stands for one call. The
// engine then
//   1. takes 4*ni words from the input stream (x, y, z, mass of each
//      i-particle, in that order) and writes them to posi[0..ni-1];
//   2. takes 4*nj words the same way and writes them to posj[0..nj-1];
//   3. pulses start to the pipeline and waits for its done;
//   4. reads forcef[0..ni-1] and sends 4*ni words on the output stream
//      (fx, fy, fz, potential), with m_tlast on the last word.
// cmd_ready is high only while the engine is idle.
//
// Both streams follow the valid/ready rule: a word moves in a cycle where
// valid and ready are both high, and an offered output word stays stable
// until taken. Either side may stall for any number of cycles. The engine
// takes one input word per clock and sends one output word per clock except
// for one idle clock before each particle while forcef is read.
//
// The original system generates this engine with its tool flow and does not
// describe it beyond its existence, one per pipeline; the stream width of one
// float, the word order and the command are this design's choices.
module nbody_dma
  import nbody_pkg::*;
#(
  parameter int unsigned N_LOCAL = 4096,
  localparam int unsigned AW = (N_LOCAL > 1) ? $clog2(N_LOCAL) : 1,
  localparam int unsigned NW = $clog2(N_LOCAL + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // command from the host
  input  logic          cmd_valid,
  output logic          cmd_ready,
  input  logic [NW-1:0] cmd_ni,
  input  logic [NW-1:0] cmd_nj,
  // host -> accelerator stream
  input  logic          s_tvalid,
  output logic          s_tready,
  input  float_t        s_tdata,
  // accelerator -> host stream
  output logic          m_tvalid,
  input  logic          m_tready,
  output float_t        m_tdata,
  output logic          m_tlast,
  // pipeline side
  output logic          pl_start,
  output logic [NW-1:0] pl_ni,
  output logic [NW-1:0] pl_nj,
  input  logic          pl_done,
  output logic          posi_we,
  output logic [AW-1:0] posi_addr,
  output float4_t       posi_wdata,
  output logic          posj_we,
  output logic [AW-1:0] posj_addr,
  output float4_t       posj_wdata,
  output logic          force_re,
  output logic [AW-1:0] force_addr,
  input  float4_t       force_rdata
);

  typedef enum logic [2:0] {D_IDLE, D_RECVI, D_RECVJ, D_START, D_WAIT, D_RD, D_SEND} dstate_t;

  dstate_t       state;
  logic [NW-1:0] ni_q, nj_q, idx;
  logic [1:0]    k;            // word within a particle
  float_t        w0, w1, w2;   // first three words of the particle being received
  logic          s_hs, m_hs;

  assign cmd_ready = (state == D_IDLE);
  assign s_tready  = (state == D_RECVI) || (state == D_RECVJ);
  assign s_hs      = s_tvalid && s_tready;
  assign m_tvalid  = (state == D_SEND);
  assign m_hs      = m_tvalid && m_tready;
  assign m_tlast   = (state == D_SEND) && (k == 2'd3) && (idx == ni_q - 1'b1);

  always_comb begin
    unique case (k)
      2'd0:    m_tdata = force_rdata.x;
      2'd1:    m_tdata = force_rdata.y;
      2'd2:    m_tdata = force_rdata.z;
      default: m_tdata = force_rdata.w;
    endcase
  end

  assign posi_we    = s_hs && (state == D_RECVI) && (k == 2'd3);
  assign posj_we    = s_hs && (state == D_RECVJ) && (k == 2'd3);
  assign posi_addr  = AW'(idx);
  assign posj_addr  = AW'(idx);
  assign posi_wdata = '{w: s_tdata, z: w2, y: w1, x: w0};
  assign posj_wdata = posi_wdata;
  assign pl_start   = (state == D_START);
  assign pl_ni      = ni_q;
  assign pl_nj      = nj_q;
  assign force_re   = (state == D_RD);
  assign force_addr = AW'(idx);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= D_IDLE;
      ni_q  <= '0;
      nj_q  <= '0;
      idx   <= '0;
      k     <= '0;
      w0    <= '0;
      w1    <= '0;
      w2    <= '0;
    end else begin
      if (s_hs) begin
        unique case (k)
          2'd0:    w0 <= s_tdata;
          2'd1:    w1 <= s_tdata;
          2'd2:    w2 <= s_tdata;
          default: ;
        endcase
      end
      unique case (state)
        D_IDLE: begin
          if (cmd_valid) begin
            ni_q  <= cmd_ni;
            nj_q  <= cmd_nj;
            idx   <= '0;
            k     <= '0;
            state <= D_RECVI;
          end
        end
        D_RECVI, D_RECVJ: begin
          if (s_hs) begin
            k <= k + 1'b1;
            if (k == 2'd3) begin
              if (idx == ((state == D_RECVI) ? ni_q : nj_q) - 1'b1) begin
                idx   <= '0;
                state <= (state == D_RECVI) ? D_RECVJ : D_START;
              end else begin
                idx <= idx + 1'b1;
              end
            end
          end
        end
        D_START: state <= D_WAIT;
        D_WAIT:  if (pl_done) state <= D_RD;
        D_RD: begin
          k     <= '0;
          state <= D_SEND;
        end
        D_SEND: begin
          if (m_hs) begin
            k <= k + 1'b1;
            if (k == 2'd3) begin
              if (idx == ni_q - 1'b1) begin
                state <= D_IDLE;
              end else begin
                idx   <= idx + 1'b1;
                state <= D_RD;
              end
            end
          end
        end
        default: state <= D_IDLE;
      endcase
    end
  end

  a_m_stable: assert property (@(posedge clk) disable iff (!rst_n)
      m_tvalid && !m_tready |=> m_tvalid && $stable(m_tdata) && $stable(m_tlast))
    else $error("output word changed while stalled");
  a_cmd_sizes: assert property (@(posedge clk) disable iff (!rst_n)
      cmd_valid && cmd_ready |-> cmd_ni != '0 && cmd_nj != '0 &&
                                 cmd_ni <= NW'(N_LOCAL) && cmd_nj <= NW'(N_LOCAL))
    else $error("command sizes out of range");

endmodule
