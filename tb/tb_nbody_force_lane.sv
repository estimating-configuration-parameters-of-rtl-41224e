// Self-checking testbench of nbody_force_lane.
// 1. Latency: a single j-particle presented in cycle t must leave force_o at
//    zero through cycle t+7 and change it in cycle t+8 (LANE_LATENCY).
// 2. Accuracy: for several random i-particles, streams of random j-particles
//    (back to back and with random gaps, the i-particle itself included) are
//    accumulated and the four outputs compared with a double-precision
//    reference to a relative 1e-5.
module tb_nbody_force_lane;
  import nbody_pkg::*;
  import tb_float_pkg::*;

  logic    clk = 1'b0, rst_n = 1'b0;
  logic    i_load = 1'b0, j_valid = 1'b0, busy;
  float4_t i_pos = '0, j_pos = '0, force_o;
  int      checks = 0, failures = 0;
  longint  cyc = 0;

  nbody_force_lane dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_i(float4_t p);
    @(negedge clk); i_load = 1'b1; i_pos = p;
    @(negedge clk); i_load = 1'b0;
  endtask

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  initial begin
    float4_t pi, pj [40];
    real     accr [4], mag [4], t;
    int      nj;

    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // 1. latency
    pi = rand_particle();
    load_i(pi);
    pj[0] = rand_particle();
    @(negedge clk); j_valid = 1'b1; j_pos = pj[0];
    @(negedge clk); j_valid = 1'b0;
    for (int c = 1; c < LANE_LATENCY; c++) begin
      check(force_o == '0 && busy, $sformatf("no result before latency (c=%0d)", c));
      @(negedge clk);
    end
    check(force_o.w != '0, "result present after LANE_LATENCY cycles");
    @(negedge clk);
    check(!busy, "idle after the last stage");

    // 2. accuracy
    for (int trial = 0; trial < 12; trial++) begin
      nj = 1 + $urandom % 40;
      pi = rand_particle();
      for (int j = 0; j < nj; j++) pj[j] = rand_particle();
      if (trial % 3 == 0) pj[0] = pi;   // self interaction
      for (int k = 0; k < 4; k++) begin accr[k] = 0.0; mag[k] = 0.0; end
      for (int j = 0; j < nj; j++)
        for (int k = 0; k < 4; k++) begin
          t = pair_term(pi, pj[j], k);
          accr[k] += t;
          mag[k]  += (t < 0.0) ? -t : t;
        end
      load_i(pi);
      for (int j = 0; j < nj; j++) begin
        @(negedge clk); j_valid = 1'b1; j_pos = pj[j];
        if (trial % 2 == 1) begin
          @(negedge clk); j_valid = 1'b0;
          repeat ($urandom % 5) @(negedge clk);
        end
      end
      @(negedge clk); j_valid = 1'b0;
      while (busy) @(negedge clk);
      check(close(force_o.x, f2r(pi.w) * accr[0], f2r(pi.w) * mag[0]), "fx");
      check(close(force_o.y, f2r(pi.w) * accr[1], f2r(pi.w) * mag[1]), "fy");
      check(close(force_o.z, f2r(pi.w) * accr[2], f2r(pi.w) * mag[2]), "fz");
      check(close(force_o.w, f2r(pi.w) * accr[3], f2r(pi.w) * mag[3]), "potential");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
