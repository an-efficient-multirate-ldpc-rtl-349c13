// post_mem: posterior message memory block of one processor.  Five dual-port
// memories of 228 x 8 bits, one for each bit type (X0..X3 in memories 0..3,
// P in memory 4), so that every type can be read at its own delay factor in
// the same cycle.  Each memory has its own read and write address; reads take
// one cycle.  Per check node each memory sees three reads and three writes,
// spread over three cycles.  Each memory has its own read and write enable,
// so the memories of bit types a code rate does not use stay idle.  Sizes and
// organisation follow the published architecture; the per-memory enables are
// this design's way of disabling unused hardware at the lower rates.
module post_mem
  import ldpc_pkg::*;
#(
  parameter int DEPTH = 228,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic [NTYPE-1:0] we,
  input  logic [AW-1:0]    waddr [NTYPE],
  input  llr_t             wdata [NTYPE],
  input  logic [NTYPE-1:0] re,
  input  logic [AW-1:0]    raddr [NTYPE],
  output llr_t             rdata [NTYPE]
);
  for (genvar j = 0; j < NTYPE; j++) begin : g_dram
    dp_ram #(.DEPTH(DEPTH), .W(LW)) u_dram (
      .clk(clk), .we(we[j]), .waddr(waddr[j]), .wdata(wdata[j]),
      .re(re[j]), .raddr(raddr[j]), .rdata(rdata[j]));
  end
endmodule
