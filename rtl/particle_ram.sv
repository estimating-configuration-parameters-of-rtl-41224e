// Local particle memory: one write port and one registered read port.
//
// Each force pipeline owns three of these, for the i-particle positions
// (posi), the j-particle positions (posj) and the results (forcef), each
// DEPTH entries of four floats (16 bytes). On the FPGA they map onto block
// RAM. Writing and reading are independent; a read issued in cycle t (re high)
// presents its word on rdata in cycle t+1 and holds it until the next read.
// Reading an address written in the same cycle returns the old contents.
//
// DEPTH is the local memory size N_local of the accelerator (4096 entries by
// default, the largest the original tool flow allowed); the port layout is
// this design's choice.
module particle_ram
  import nbody_pkg::*;
#(
  parameter int unsigned DEPTH = 4096,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  float4_t       wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output float4_t       rdata
);

  float4_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end

endmodule
