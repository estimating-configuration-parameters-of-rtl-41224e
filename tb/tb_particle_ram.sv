// Self-checking testbench of particle_ram (DEPTH reduced to 64).
// Fills the memory with random words, reads every address back and checks
// the one-cycle read latency, that rdata holds while re is low, and that a
// read of an address written in the same cycle returns the old word.
module tb_particle_ram;
  import nbody_pkg::*;

  localparam int unsigned DEPTH = 64;

  logic          clk = 1'b0;
  logic          we = 1'b0, re = 1'b0;
  logic [5:0]    waddr = '0, raddr = '0;
  float4_t       wdata = '0, rdata;
  float4_t       model [DEPTH];
  int            checks = 0, failures = 0;

  particle_ram #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1'b1; waddr = 6'(a);
      wdata = {$urandom, $urandom, $urandom, $urandom};
      model[a] = wdata;
    end
    @(negedge clk); we = 1'b0;
    for (int a = 0; a < DEPTH; a++) begin
      re = 1'b1; raddr = 6'(a);
      @(negedge clk);
      check(rdata == model[a], $sformatf("read back %0d", a));
    end
    re = 1'b0; raddr = 6'd5;
    repeat (3) @(negedge clk);
    check(rdata == model[DEPTH-1], "rdata held while re low");
    // read-during-write: old data
    re = 1'b1; raddr = 6'd9; we = 1'b1; waddr = 6'd9; wdata = ~model[9];
    @(negedge clk);
    check(rdata == model[9], "read during write returns old word");
    we = 1'b0; model[9] = ~model[9];
    @(negedge clk);
    check(rdata == model[9], "new word after the write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
