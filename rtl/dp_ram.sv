// dp_ram: dual-port synchronous memory, one write port and one read port,
// DEPTH words of W bits.  A read returns its data on the next clock edge; a
// read and a write of the same address in the same cycle return the old
// word (read-first), which the processor controller relies on and covers
// with its bypass.  No reset: contents are undefined until written; the
// controller's legal bits keep unwritten words from being used.  The
// published design uses foundry dual-port macros (228 x 8 and 228 x 30);
// this is a behavioural array that synthesis maps to memory cells, and its
// read-first timing is an assumption.
module dp_ram #(
  parameter int DEPTH = 228,
  parameter int W     = 8,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
    if (we) mem[waddr] <= wdata;
  end
endmodule
