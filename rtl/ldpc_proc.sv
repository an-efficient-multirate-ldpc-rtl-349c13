// ldpc_proc: one decoding processor (one layered-decoding iteration) of the
// pipelined LDPC-CC decoder.
//
// The processor keeps a sliding window of DEPTH time steps of posterior
// messages, one memory per bit type.  Each time a new time step arrives
// (data_valid_in with five posterior messages and the compressed extrinsic
// word that the previous processor produced for this check node), it
// processes the check node of that time step as one layer, in three cycles:
//   cycle 0: group 0 = the arriving messages (delay D^0)
//   cycle 1: group 1 read from the memories (issued in cycle 0)
//   cycle 2: group 2 read from the memories (issued in cycle 1)
// In each cycle the subtractor block forms the prior messages
// S = L_old - Z_old (Z_old expanded from the extrinsic word), the NMS block
// merges their normalized magnitudes into the running first/second minimum,
// and S and its sign are stored in the 5x3 register array.  After cycle 2 the
// finished check-node word (min, sub_min, idx, 15 signs, product) is
// registered; in the next three cycles the adder block writes
// L_new = S + Z_new back for groups 0, 1, 2, while the next check node is
// read, and the word goes to the extrinsic memory feeding the next processor.
// In cycle 2 the oldest time step of the window is read and leaves, valid one
// cycle later on data_valid_out with post_out; it has seen every check node
// this processor will ever apply to it.
//
// A read that hits a write of the previous check node not yet performed is
// served from a bypass adder (S + Z_new of that write) instead of the memory;
// a read of an address holding no time step of this frame reads +127.
// Unused bit types (code rates below 4/5) are masked: their memories are
// neither written nor counted in the minimum or the sign product, and their
// outputs are 0.
//
// Throughput: one time step per three cycles.  The first processor is fed
// with the channel LLRs and an all-zero extrinsic word.  The five memories,
// the 5x3 register array, the NMS/subtract/add blocks and the three-cycle
// schedule follow the published architecture; the bypass, saturation and the
// masking details are this design's choices.
module ldpc_proc
  import ldpc_pkg::*;
#(
  parameter int DEPTH = 228,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          clear,           // start of a frame
  input  rate_t         rate,
  // from the previous processor (or the channel)
  input  logic          data_valid_in,
  output logic          ready,
  input  llr_t          post_in [NTYPE],
  input  ext_t          ext_in,
  // extrinsic memory towards the next processor
  output logic          ext_we,
  output logic [AW-1:0] ext_waddr,
  output ext_t          ext_wdata,
  output logic          ext_re,
  output logic [AW-1:0] ext_raddr,
  // to the next processor
  output logic          data_valid_out,
  output llr_t          post_out [NTYPE]
);
  logic             rd_act, wr_act;
  logic [NTYPE-1:0] re;
  logic [1:0]       cur_d, slot_t, wr_grp;
  logic [AW-1:0]    slot_a;
  logic [AW-1:0]    raddr [NTYPE];
  logic [AW-1:0]    waddr [NTYPE];
  logic [NTYPE-1:0] fwd_hit, q_legal, q_fwd, we, act_mask;
  logic [1:0]       fwd_grp [NTYPE];

  proc_ctrl #(.DEPTH(DEPTH)) u_ctrl (
    .clk, .rst, .clear, .rate, .data_valid_in, .ready,
    .rd_act, .cur_d, .slot_t, .slot_a, .re, .raddr, .fwd_hit, .fwd_grp,
    .q_legal, .q_fwd, .wr_act, .wr_grp, .we, .waddr,
    .ext_we, .ext_waddr, .ext_re, .ext_raddr, .data_valid_out);

  always_comb
    for (int j = 0; j < NTYPE; j++) act_mask[j] = type_active(rate, j);

  // ---------------------------------------------------------------- memory
  llr_t wdata [NTYPE];
  llr_t rdata [NTYPE];
  post_mem #(.DEPTH(DEPTH)) u_mem (
    .clk, .we, .waddr, .wdata, .re, .raddr, .rdata);

  // --------------------------------------------------- registers of a layer
  llr_t s_reg [NTYPE][NGRP];     // prior messages of the layer (5x3 array)
  ext_t acc;                     // running min / sub_min / idx / signs
  ext_t res;                     // finished layer being written back
  ext_t ext_q;                   // extrinsic word of the layer being read
  llr_t fwd_val [NTYPE];         // bypass value for the data arriving now

  // ------------------------------------------------------------ read phase
  ext_t w_old;
  llr_t l_old [NTYPE];
  llr_t z_old [NTYPE];
  llr_t s_new [NTYPE];
  mag_t n_min, n_sub;
  idx_t n_idx;

  assign w_old = (cur_d == 2'd0) ? ext_in : ext_q;

  always_comb
    for (int j = 0; j < NTYPE; j++) begin
      if (cur_d == 2'd0)  l_old[j] = post_in[j];
      else if (q_fwd[j])  l_old[j] = fwd_val[j];
      else if (q_legal[j]) l_old[j] = rdata[j];
      else                l_old[j] = LLR_MAX;
    end

  ext_unpack u_zold (.w(w_old), .grp(cur_d), .z(z_old));
  sub_blk    u_sub  (.l(l_old), .z(z_old), .s(s_new));
  nms        u_nms  (.s(s_new), .active(act_mask), .grp(cur_d), .first(cur_d == 2'd0),
                     .min_in(acc.min), .sub_min_in(acc.sub_min), .idx_min_in(acc.idx),
                     .min_out(n_min), .sub_min_out(n_sub), .idx_min_out(n_idx));

  // signs of this group merged into the running sign vector
  logic [NPOS-1:0] signs_n;
  always_comb begin
    signs_n = (cur_d == 2'd0) ? '0 : acc.signs;
    for (int j = 0; j < NTYPE; j++)
      signs_n[int'(cur_d) * NTYPE + j] = act_mask[j] && s_new[j][LW-1];
  end

  // ----------------------------------------------------------- write phase
  llr_t z_res [NGRP][NTYPE];
  for (genvar g = 0; g < NGRP; g++) begin : g_znew
    ext_unpack u_znew (.w(res), .grp(2'(g)), .z(z_res[g]));
  end

  llr_t s_wr [NTYPE];
  llr_t s_fw [NTYPE];
  llr_t z_fw [NTYPE];
  llr_t l_fw [NTYPE];
  always_comb
    for (int j = 0; j < NTYPE; j++) begin
      s_wr[j] = s_reg[j][wr_grp];
      s_fw[j] = s_reg[j][fwd_grp[j]];
      z_fw[j] = z_res[fwd_grp[j]][j];
    end

  add_blk u_add (.s(s_wr), .z(z_res[wr_grp]), .l(wdata));   // write-back adders
  add_blk u_fwa (.s(s_fw), .z(z_fw), .l(l_fw));              // bypass adders

  always_ff @(posedge clk) begin
    if (rd_act) begin
      for (int j = 0; j < NTYPE; j++) s_reg[j][cur_d] <= s_new[j];
      acc.min     <= n_min;
      acc.sub_min <= n_sub;
      acc.idx     <= n_idx;
      acc.signs   <= signs_n;
      acc.prod    <= 1'b0;
      if (cur_d == 2'd0) ext_q <= ext_in;
      if (cur_d == 2'd2) begin
        res.min     <= n_min;
        res.sub_min <= n_sub;
        res.idx     <= n_idx;
        res.signs   <= signs_n;
        res.prod    <= ^signs_n;
      end
    end
    for (int j = 0; j < NTYPE; j++)
      if (fwd_hit[j]) fwd_val[j] <= l_fw[j];
  end

  // ---------------------------------------------------------------- outputs
  assign ext_wdata = res;
  always_comb
    for (int j = 0; j < NTYPE; j++)
      post_out[j] = !act_mask[j] ? '0 : q_fwd[j] ? fwd_val[j] : rdata[j];

endmodule
