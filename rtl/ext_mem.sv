// ext_mem: extrinsic message memory block placed between processor i and
// processor i+1.  228 words of 30 bits, one compressed check-node word
// (ext_t) per time step of the window.  Processor i writes the word of the
// check node it has just finished and, three cycles per time step earlier,
// reads the word of the check node 228 time steps older, which travels to
// processor i+1 together with the posterior messages leaving processor i.
// Both ports use processor i's address counter.  Size follows the published
// architecture; the port timing is this design's.
module ext_mem
  import ldpc_pkg::*;
#(
  parameter int DEPTH = 228,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  ext_t          wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output ext_t          rdata
);
  logic [EXTW-1:0] q;
  dp_ram #(.DEPTH(DEPTH), .W(EXTW)) u_sram (
    .clk(clk), .we(we), .waddr(waddr), .wdata(wdata),
    .re(re), .raddr(raddr), .rdata(q));
  assign rdata = ext_t'(q);
endmodule
