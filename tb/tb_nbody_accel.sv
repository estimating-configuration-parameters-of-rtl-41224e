// End-to-end testbench of nbody_accel (P_DMA = 3, N_LOCAL = 16, P_UNROLL = 2).
//
// A host model computes the gravitational forces on N = 40 particles, more
// than one channel's local memory holds, and then on 11 particles. As in the parallel host routine, the
// i-particles are split into one contiguous slice per channel; each channel
// then runs one call per block of N_LOCAL j-particles, the local memories
// being refilled for every block, and the host adds up the partial forces.
// All channels run at the same time, each from its own host thread, with
// random gaps on the input streams and random stalls on the output streams.
//
// Checks: every force and potential against a double-precision reference
// (relative 1e-5); the clocks each pipeline spends busy against the timing
// formula of the force pipeline (II = 5 per interaction); and that each
// mechanism happened at least once: local-memory refill (several calls per
// channel), a partly filled unroll group (odd ni), input gaps, output stalls
// and several channels computing at the same time.
module tb_nbody_accel;
  import nbody_pkg::*;
  import tb_float_pkg::*;

  localparam int unsigned P_DMA    = 3;
  localparam int unsigned N_LOCAL  = 16;
  localparam int unsigned P_UNROLL = 2;
  localparam int unsigned II       = II_DEFAULT;
  localparam int unsigned N        = 40;   // largest problem size run
  localparam int unsigned RUNS [2] = '{40, 11};
  localparam bit          STALLS   = 1'b1;
  localparam int unsigned NW = $clog2(N_LOCAL + 1);

  logic               clk = 1'b0, rst_n = 1'b0;
  logic   [P_DMA-1:0] cmd_valid = '0, cmd_ready;
  logic   [NW-1:0]    cmd_ni [P_DMA], cmd_nj [P_DMA];
  logic   [P_DMA-1:0] s_tvalid = '0, s_tready;
  float_t             s_tdata [P_DMA];
  logic   [P_DMA-1:0] m_tvalid, m_tready = '0, m_tlast;
  float_t             m_tdata [P_DMA];
  logic   [P_DMA-1:0] busy;

  nbody_accel #(.P_DMA(P_DMA), .N_LOCAL(N_LOCAL), .P_UNROLL(P_UNROLL), .II(II)) dut (.*);

  int      checks = 0, failures = 0, ch_done = 0;
  int      n_refill = 0, n_partial_group = 0, n_in_gap = 0, n_out_stall = 0, n_overlap = 0;
  longint  pipe_busy [P_DMA], pipe_expect [P_DMA];
  float4_t part [N];
  real     facc [N][4];
  int      n_part;                        // particles in the current run

  always #5 clk = ~clk;

  // busy flag of each channel's force pipeline (inside the design)
  logic [P_DMA-1:0] pl_busy;
  for (genvar g = 0; g < P_DMA; g++) begin : g_probe
    assign pl_busy[g] = dut.g_ch[g].pl_busy;
  end

  always @(posedge clk) begin
    int nb;
    nb = 0;
    for (int c = 0; c < P_DMA; c++) begin
      if (rst_n && pl_busy[c]) begin
        nb++;
        pipe_busy[c] <= pipe_busy[c] + 1;
      end
      if (s_tready[c] && !s_tvalid[c]) n_in_gap <= n_in_gap + 1;
      if (m_tvalid[c] && !m_tready[c]) n_out_stall <= n_out_stall + 1;
    end
    if (nb > 1) n_overlap <= n_overlap + 1;
  end

  initial begin
    repeat (50_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  task automatic send_word(int c, float_t w);
    while (STALLS && $urandom % 4 == 0) begin s_tvalid[c] = 1'b0; @(negedge clk); end
    s_tvalid[c] = 1'b1; s_tdata[c] = w;
    do @(posedge clk); while (!s_tready[c]);
    @(negedge clk);
    s_tvalid[c] = 1'b0;
  endtask

  // One call on channel c: i-particles [i0, i0+ni), j-particles [j0, j0+nj).
  task automatic run_call(int c, int i0, int ni, int j0, int nj);
    int got;
    float_t w;
    @(negedge clk);
    while (!cmd_ready[c]) @(negedge clk);
    cmd_valid[c] = 1'b1; cmd_ni[c] = NW'(ni); cmd_nj[c] = NW'(nj);
    @(negedge clk);
    cmd_valid[c] = 1'b0;
    pipe_expect[c] += 64'(1 + ((ni + int'(P_UNROLL) - 1) / int'(P_UNROLL)) *
                              (2 * int'(P_UNROLL) + (nj - 1) * int'(II) + 10));
    if (ni % P_UNROLL != 0) n_partial_group++;
    for (int i = 0; i < ni; i++)
      for (int k = 0; k < 4; k++) send_word(c, part[i0 + i][32*k +: 32]);
    for (int j = 0; j < nj; j++)
      for (int k = 0; k < 4; k++) send_word(c, part[j0 + j][32*k +: 32]);
    got = 0;
    while (got < 4 * ni) begin
      m_tready[c] = !STALLS || ($urandom % 4 != 0);
      @(posedge clk);
      if (m_tvalid[c] && m_tready[c]) begin
        w = m_tdata[c];
        check(m_tlast[c] == (got == 4 * ni - 1), "m_tlast on the last word only");
        facc[i0 + got / 4][got % 4] += f2r(w);
        got++;
      end
      @(negedge clk);
    end
    m_tready[c] = 1'b0;
  endtask

  // Channel c: its slice of i-particles against every block of j-particles.
  task automatic host_channel(int c);
    int i0, i1, calls;
    i0 = (c * n_part) / P_DMA;
    i1 = ((c + 1) * n_part) / P_DMA;
    calls = 0;
    for (int ib = i0; ib < i1; ib += N_LOCAL) begin
      for (int jb = 0; jb < n_part; jb += N_LOCAL) begin
        run_call(c, ib, (i1 - ib < N_LOCAL) ? i1 - ib : N_LOCAL,
                     jb, (n_part - jb < N_LOCAL) ? n_part - jb : N_LOCAL);
        calls++;
      end
    end
    if (calls > 1) n_refill += calls - 1;
  endtask

  // Forces on n particles, all channels at once, checked against the
  // double-precision reference.
  task automatic run_workload(int n);
    real accr, mag, t;
    n_part  = n;
    ch_done = 0;
    for (int i = 0; i < n; i++) begin
      part[i] = rand_particle();
      for (int k = 0; k < 4; k++) facc[i][k] = 0.0;
    end
    for (int c = 0; c < P_DMA; c++) begin
      automatic int cc = c;
      fork
        begin
          host_channel(cc);
          ch_done++;
        end
      join_none
    end
    wait (ch_done == P_DMA);
    for (int i = 0; i < n; i++)
      for (int k = 0; k < 4; k++) begin
        accr = 0.0; mag = 0.0;
        for (int j = 0; j < n; j++) begin
          t = pair_term(part[i], part[j], k);
          accr += t;
          mag  += (t < 0.0) ? -t : t;
        end
        check(close(r2f(facc[i][k]), f2r(part[i].w) * accr, f2r(part[i].w) * mag),
              $sformatf("N=%0d particle %0d component %0d", n, i, k));
      end
    $display("N=%0d finished at time %0t", n, $time);
  endtask

  initial begin
    for (int c = 0; c < P_DMA; c++) begin
      pipe_busy[c] = 0; pipe_expect[c] = 0; s_tdata[c] = '0; cmd_ni[c] = '0; cmd_nj[c] = '0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    foreach (RUNS[r]) run_workload(RUNS[r]);

    for (int c = 0; c < P_DMA; c++)
      check(pipe_busy[c] == pipe_expect[c],
            $sformatf("channel %0d busy %0d clocks, expected %0d", c, pipe_busy[c], pipe_expect[c]));

    $display("mechanisms: refills=%0d partial_groups=%0d input_gaps=%0d output_stalls=%0d overlap_cycles=%0d",
             n_refill, n_partial_group, n_in_gap, n_out_stall, n_overlap);
    check(n_refill > 0, "local memory refilled");
    check(P_UNROLL == 1 || n_partial_group > 0, "partly filled unroll group");
    check(!STALLS || n_in_gap > 0, "input stream gap");
    check(!STALLS || n_out_stall > 0, "output stream stall");
    check(P_DMA == 1 || n_overlap > 0, "channels computing at the same time");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
