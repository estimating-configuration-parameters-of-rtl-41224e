// Self-checking testbench of nbody_dma (N_LOCAL = 16).
// The pipeline is replaced by a model: memories that record what the engine
// writes, and a forcef memory with the real one-cycle read latency that the
// model fills with random words when it sees start, raising done after a
// random delay. For several commands the testbench streams random words in
// with random gaps, and takes the output with random stalls. It checks that
// posi and posj receive exactly the streamed particles, that start carries
// ni and nj, that the output words are forcef[0..ni-1] in order with m_tlast
// on the last one only, that cmd_ready is low while a command runs, and
// that both stall cases occurred.
module tb_nbody_dma;
  import nbody_pkg::*;

  localparam int unsigned N_LOCAL = 16;
  localparam int unsigned AW = $clog2(N_LOCAL);
  localparam int unsigned NW = $clog2(N_LOCAL + 1);

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          cmd_valid = 1'b0, cmd_ready;
  logic [NW-1:0] cmd_ni = '0, cmd_nj = '0;
  logic          s_tvalid = 1'b0, s_tready;
  float_t        s_tdata = '0;
  logic          m_tvalid, m_tready = 1'b0, m_tlast;
  float_t        m_tdata;
  logic          pl_start, pl_done = 1'b0;
  logic [NW-1:0] pl_ni, pl_nj;
  logic          posi_we, posj_we, force_re;
  logic [AW-1:0] posi_addr, posj_addr, force_addr;
  float4_t       posi_wdata, posj_wdata, force_rdata;

  float4_t       posi_m [N_LOCAL], posj_m [N_LOCAL], force_m [N_LOCAL];
  int            checks = 0, failures = 0, s_stalls = 0, m_stalls = 0, starts = 0;

  nbody_dma #(.N_LOCAL(N_LOCAL)) dut (.*);

  always #5 clk = ~clk;

  // pipeline model
  always_ff @(posedge clk) begin
    if (posi_we) posi_m[posi_addr] <= posi_wdata;
    if (posj_we) posj_m[posj_addr] <= posj_wdata;
    if (force_re) force_rdata <= force_m[force_addr];
    if (m_tvalid && !m_tready) m_stalls <= m_stalls + 1;
    if (s_tready && !s_tvalid) s_stalls <= s_stalls + 1;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  float_t sent [8*N_LOCAL];

  task automatic run_cmd(int n_i, int n_j);
    int nw, got;
    nw = 4 * (n_i + n_j);
    for (int w = 0; w < nw; w++) sent[w] = $urandom;
    @(negedge clk);
    check(cmd_ready, "idle engine accepts a command");
    cmd_valid = 1'b1; cmd_ni = NW'(n_i); cmd_nj = NW'(n_j);
    @(negedge clk);
    cmd_valid = 1'b0;
    check(!cmd_ready, "busy engine refuses commands");
    fork
      begin // input stream
        for (int w = 0; w < nw; w++) begin
          while ($urandom % 3 == 0) begin s_tvalid = 1'b0; @(negedge clk); end
          s_tvalid = 1'b1; s_tdata = sent[w];
          do @(posedge clk); while (!s_tready);
          @(negedge clk);
        end
        s_tvalid = 1'b0;
      end
      begin // pipeline model: start, then done
        @(posedge clk iff pl_start);
        starts++;
        @(negedge clk);
        check(pl_ni == NW'(n_i) && pl_nj == NW'(n_j), "start carries ni and nj");
        for (int i = 0; i < n_i; i++)
          check(posi_m[i] == {sent[4*i+3], sent[4*i+2], sent[4*i+1], sent[4*i]},
                $sformatf("posi[%0d]", i));
        for (int j = 0; j < n_j; j++)
          check(posj_m[j] == {sent[4*(n_i+j)+3], sent[4*(n_i+j)+2], sent[4*(n_i+j)+1], sent[4*(n_i+j)]},
                $sformatf("posj[%0d]", j));
        for (int i = 0; i < N_LOCAL; i++) force_m[i] = {$urandom, $urandom, $urandom, $urandom};
        repeat ($urandom % 20) @(negedge clk);
        pl_done = 1'b1;
        @(negedge clk);
        pl_done = 1'b0;
      end
      begin // output stream
        got = 0;
        while (got < 4 * n_i) begin
          m_tready = ($urandom % 3 != 0);
          @(posedge clk);
          if (m_tvalid && m_tready) begin
            check(m_tdata == force_m[got / 4][32*(got % 4) +: 32],
                  $sformatf("output word %0d", got));
            check(m_tlast == (got == 4 * n_i - 1), $sformatf("m_tlast at word %0d", got));
            got++;
          end
          @(negedge clk);
        end
        m_tready = 1'b0;
      end
    join
    repeat (2) @(negedge clk);
    check(cmd_ready && !m_tvalid, "engine idle after the last word");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_cmd(3, 5);
    run_cmd(1, 1);
    run_cmd(N_LOCAL, N_LOCAL);
    run_cmd(7, 2);
    check(starts == 4, "one start per command");
    check(s_stalls > 0 && m_stalls > 0, "both streams stalled at least once");
    $display("input gaps %0d, output stalls %0d", s_stalls, m_stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
