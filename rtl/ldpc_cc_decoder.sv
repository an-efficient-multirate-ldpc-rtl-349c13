// ldpc_cc_decoder: multirate LDPC convolutional code decoder (rates 1/2,
// 2/3, 3/4, 4/5, period-3 time-varying codes with three delay factors per
// bit type) using layered normalized min-sum decoding.
//
// NPROC identical processors form a pipeline; each one performs one
// decoding iteration on a window of DEPTH time steps and processes one check
// node per arriving time step.  Posterior messages flow from processor i to
// processor i+1 when they leave the window.  Because the extrinsic messages
// computed by processor i are only used again by processor i+1, they are
// kept, compressed to 30 bits per check node, in an extrinsic memory between
// the two (NPROC-1 of them; the last processor's are not needed).  The first
// processor receives the channel LLRs as posterior messages and an all-zero
// extrinsic word.
//
// Interface: at frame_start the code rate is latched and every processor's
// window is emptied.  Then one time step (five LLRs, X0..X3 then P; unused
// systematic slots are ignored) is accepted when in_valid and in_ready are
// both high, at most one every three cycles.  Each accepted time step comes
// out on out_valid, with the final posterior messages and their hard
// decisions (1 = negative LLR), NPROC*DEPTH time steps later; to drain the
// last NPROC*DEPTH time steps of a frame, keep feeding time steps (for
// example the code's termination).  Synchronous active-high reset.
//
// The processor count, window depth and the memory organisation follow the
// published architecture; the frame and handshake interface is this design's.
module ldpc_cc_decoder
  import ldpc_pkg::*;
#(
  parameter int NPROC = 10,
  parameter int DEPTH = 228,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             frame_start,
  input  rate_t            code_rate,
  input  logic             in_valid,
  output logic             in_ready,
  input  llr_t             in_llr   [NTYPE],
  output logic             out_valid,
  output logic [NTYPE-1:0] out_bits,
  output llr_t             out_llr  [NTYPE]
);
  rate_t rate_q;
  always_ff @(posedge clk)
    if (rst)              rate_q <= R1_2;
    else if (frame_start) rate_q <= code_rate;

  logic          dv    [NPROC+1];
  llr_t          post  [NPROC+1][NTYPE];
  ext_t          ext   [NPROC+1];
  logic          rdy   [NPROC];
  logic          e_we  [NPROC];
  logic          e_re  [NPROC];
  logic [AW-1:0] e_wa  [NPROC];
  logic [AW-1:0] e_ra  [NPROC];
  ext_t          e_wd  [NPROC];

  assign dv[0]   = in_valid && in_ready;
  assign post[0] = in_llr;
  assign ext[0]  = '0;
  assign in_ready = rdy[0] && !frame_start;

  for (genvar i = 0; i < NPROC; i++) begin : g_proc
    ldpc_proc #(.DEPTH(DEPTH)) u_proc (
      .clk, .rst, .clear(frame_start), .rate(rate_q),
      .data_valid_in(dv[i]), .ready(rdy[i]), .post_in(post[i]), .ext_in(ext[i]),
      .ext_we(e_we[i]), .ext_waddr(e_wa[i]), .ext_wdata(e_wd[i]),
      .ext_re(e_re[i]), .ext_raddr(e_ra[i]),
      .data_valid_out(dv[i+1]), .post_out(post[i+1]));

    if (i < NPROC - 1) begin : g_ext
      ext_mem #(.DEPTH(DEPTH)) u_ext (
        .clk, .we(e_we[i]), .waddr(e_wa[i]), .wdata(e_wd[i]),
        .re(e_re[i]), .raddr(e_ra[i]), .rdata(ext[i+1]));
    end
  end
  assign ext[NPROC] = '0;

  assign out_valid = dv[NPROC];
  assign out_llr   = post[NPROC];
  always_comb
    for (int j = 0; j < NTYPE; j++) out_bits[j] = post[NPROC][j][LW-1];
endmodule
