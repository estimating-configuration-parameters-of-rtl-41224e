// Self-checking testbench of nbody_force_pipeline (N_LOCAL = 64,
// P_UNROLL = 3, II = 5).
// For several calls (ni, nj), including a group only partly filled
// (ni not a multiple of P_UNROLL), a single particle and completely full
// memories, it loads random particles through the write ports, starts the
// pipeline, checks the clock count from start to done against
//   1 + ceil(ni/P_UNROLL) * (2*P_UNROLL + (nj-1)*II + 10),
// reads every forcef entry back and compares it with a double-precision
// reference to a relative 1e-5. It also checks that forcef entries at and
// beyond ni are left untouched.
module tb_nbody_force_pipeline;
  import nbody_pkg::*;
  import tb_float_pkg::*;

  localparam int unsigned N_LOCAL  = 64;
  localparam int unsigned P_UNROLL = 3;
  localparam int unsigned II       = 5;
  localparam int unsigned AW = $clog2(N_LOCAL);
  localparam int unsigned NW = $clog2(N_LOCAL + 1);

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          start = 1'b0, busy, done;
  logic [NW-1:0] ni = '0, nj = '0;
  logic          posi_we = 1'b0, posj_we = 1'b0, force_re = 1'b0;
  logic [AW-1:0] posi_addr = '0, posj_addr = '0, force_addr = '0;
  float4_t       posi_wdata = '0, posj_wdata = '0, force_rdata;
  int            checks = 0, failures = 0;
  longint        cyc = 0;

  nbody_force_pipeline #(.N_LOCAL(N_LOCAL), .P_UNROLL(P_UNROLL), .II(II)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  float4_t pi [N_LOCAL], pj [N_LOCAL];

  task automatic run_call(int n_i, int n_j);
    real    accr, mag, t;
    longint c0, expect_cycles;
    int     groups;
    float4_t fr;
    for (int i = 0; i < n_i; i++) pi[i] = rand_particle();
    for (int j = 0; j < n_j; j++) pj[j] = rand_particle();
    // overlap some i and j particles, as when a block interacts with itself
    for (int i = 0; i < n_i && i < n_j; i += 2) pj[i] = pi[i];
    for (int i = 0; i < N_LOCAL; i++) begin
      @(negedge clk);
      posi_we = (i < n_i); posi_addr = AW'(i); posi_wdata = pi[i];
      posj_we = (i < n_j); posj_addr = AW'(i); posj_wdata = pj[i];
    end
    @(negedge clk);
    posi_we = 1'b0; posj_we = 1'b0;
    start = 1'b1; ni = NW'(n_i); nj = NW'(n_j);
    c0 = cyc;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    groups = (n_i + P_UNROLL - 1) / P_UNROLL;
    expect_cycles = 1 + groups * (2 * P_UNROLL + (n_j - 1) * II + 10);
    check(cyc - c0 == expect_cycles,
          $sformatf("ni=%0d nj=%0d took %0d clocks, expected %0d", n_i, n_j, cyc - c0, expect_cycles));
    @(negedge clk);
    check(!busy, "idle after done");
    for (int i = 0; i < N_LOCAL; i++) begin
      force_re = 1'b1; force_addr = AW'(i);
      @(negedge clk);
      fr = force_rdata;
      if (i < n_i) begin
        for (int k = 0; k < 4; k++) begin
          accr = 0.0; mag = 0.0;
          for (int j = 0; j < n_j; j++) begin
            t = pair_term(pi[i], pj[j], k);
            accr += t;
            mag  += (t < 0.0) ? -t : t;
          end
          check(close(fr[32*k +: 32], f2r(pi[i].w) * accr, f2r(pi[i].w) * mag),
                $sformatf("ni=%0d nj=%0d force[%0d][%0d] = %h", n_i, n_j, i, k, fr[32*k +: 32]));
        end
      end else begin
        check(fr == 128'h5555_5555_5555_5555_5555_5555_5555_5555,
              $sformatf("forcef[%0d] beyond ni untouched", i));
      end
    end
    force_re = 1'b0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // forcef is filled with a marker pattern before each call (by a
    // hierarchical write) so that entries the call must not touch can be seen
    for (int i = 0; i < N_LOCAL; i++)
      dut.u_forcef.mem[i] = 128'h5555_5555_5555_5555_5555_5555_5555_5555;
    run_call(7, 10);                 // last group holds one of three lanes
    for (int i = 0; i < N_LOCAL; i++)
      dut.u_forcef.mem[i] = 128'h5555_5555_5555_5555_5555_5555_5555_5555;
    run_call(1, 1);
    for (int i = 0; i < N_LOCAL; i++)
      dut.u_forcef.mem[i] = 128'h5555_5555_5555_5555_5555_5555_5555_5555;
    run_call(6, 23);
    for (int i = 0; i < N_LOCAL; i++)
      dut.u_forcef.mem[i] = 128'h5555_5555_5555_5555_5555_5555_5555_5555;
    run_call(N_LOCAL, N_LOCAL);      // full memories
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
