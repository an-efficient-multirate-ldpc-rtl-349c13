// proc_ctrl: local controller of one decoding processor.
//
// Counters: counter_d (cur_d) steps through the three cycles of a check node
// and starts from 0 only when data_valid_in announces a new time step;
// counter_t (slot_t) is the phase of the period-3 check polynomial and
// advances when counter_d is 2; counter_a (slot_a) is the window address
// 0..DEPTH-1 where the new time step is stored, advancing with counter_t.
//
// Reads (issued in the cycle shown, data one cycle later):
//   cur_d 0 : group 1 of every type, address slot_a - delay
//   cur_d 1 : group 2 of every type, address slot_a - delay
//   cur_d 2 : the oldest time step (address slot_a), sent on to the next
//             processor, and the extrinsic word stored at slot_a
// Group 0 (delay D^0) is the time step arriving with data_valid_in itself.
//
// Writes: the write control is the read control delayed by three cycles
// (ctr_w = D(ctr_r)): wr_grp 0, 1, 2 write back group 0 (address slot_a, the
// new time step), group 1 and group 2, while the next check node is already
// being read.  The extrinsic word is written with group 0.
//
// Legal check: one bit per address tells whether it holds a received time
// step of the current frame; a read of an address that does not reads as
// +infinity (all bits before the frame are known zeros) and is never written
// back.  Conflict handling: a read whose address matches a write of the
// previous check node that has not been performed yet (same or later cycle)
// is flagged (fwd_hit, fwd_grp) so that the datapath bypasses the memory.
//
// The counters, legal bits and the delayed write control follow the
// published controller; the cycle assignment, the bypass and the clear input
// are this design's choices.  Synchronous active-high reset; clear restarts a
// frame.
module proc_ctrl
  import ldpc_pkg::*;
#(
  parameter int DEPTH = 228,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             clear,
  input  rate_t            rate,
  input  logic             data_valid_in,
  output logic             ready,
  // read phase
  output logic             rd_act,            // a check node is being read
  output logic [1:0]       cur_d,             // counter_d
  output logic [1:0]       slot_t,            // counter_t
  output logic [AW-1:0]    slot_a,            // counter_a
  output logic [NTYPE-1:0] re,                // per memory; off for unused types
  output logic [AW-1:0]    raddr     [NTYPE],
  output logic [NTYPE-1:0] fwd_hit,           // read hits a pending write
  output logic [1:0]       fwd_grp   [NTYPE], // group of that write
  output logic [NTYPE-1:0] q_legal,           // for the data arriving now
  output logic [NTYPE-1:0] q_fwd,             // use the bypass value
  // write phase
  output logic             wr_act,
  output logic [1:0]       wr_grp,
  output logic [NTYPE-1:0] we,
  output logic [AW-1:0]    waddr     [NTYPE],
  output logic             ext_we,
  output logic [AW-1:0]    ext_waddr,
  output logic             ext_re,
  output logic [AW-1:0]    ext_raddr,
  // to the next processor
  output logic             data_valid_out
);
  logic             busy_q;
  logic [1:0]       d_q;
  logic [AW-1:0]    wr_a;
  logic [1:0]       wr_d_q;
  logic             wr_busy;
  logic [1:0]       wr_t;
  logic [DEPTH-1:0] legal;
  logic [NTYPE-1:0] slot_legal [NGRP];   // legality of groups 1, 2 of this slot
  logic [NTYPE-1:0] wr_legal   [NGRP];   // the same, for the slot being written
  logic [NTYPE-1:0] act_mask;

  function automatic logic [AW-1:0] sub_addr(logic [AW-1:0] a, int d);
    int v;
    v = int'(a) - d;
    if (v < 0) v += DEPTH;
    return AW'(v);
  endfunction

  always_comb
    for (int j = 0; j < NTYPE; j++) act_mask[j] = type_active(rate, j);

  // read phase control
  assign ready  = !busy_q;
  assign rd_act = busy_q || data_valid_in;
  assign cur_d  = busy_q ? d_q : 2'd0;
  assign re     = {NTYPE{rd_act}} & act_mask;

  always_comb begin
    for (int j = 0; j < NTYPE; j++) begin
      if (cur_d == 2'd2) raddr[j] = slot_a;
      else raddr[j] = sub_addr(slot_a, delay_f(rate, int'(slot_t), j, int'(cur_d) + 1));
    end
  end

  // write phase control (delayed copy of the read control)
  assign wr_grp = wr_d_q;
  assign wr_act = wr_busy;

  function automatic logic [AW-1:0] wr_addr_of(int j, int g);
    return sub_addr(wr_a, delay_f(rate, int'(wr_t), j, g));
  endfunction

  always_comb begin
    for (int j = 0; j < NTYPE; j++) begin
      waddr[j] = wr_addr_of(j, int'(wr_d_q));
      we[j]    = wr_busy && act_mask[j] && (wr_d_q == 2'd0 || wr_legal[wr_d_q][j]);
    end
  end
  assign ext_we    = wr_busy && wr_d_q == 2'd0;
  assign ext_waddr = wr_a;
  assign ext_re    = rd_act && cur_d == 2'd2;
  assign ext_raddr = slot_a;

  // conflict check: pending writes are those of groups >= wr_d_q
  always_comb begin
    for (int j = 0; j < NTYPE; j++) begin
      fwd_hit[j] = 1'b0;
      fwd_grp[j] = 2'd0;
      for (int g = 0; g < NGRP; g++) begin
        if (rd_act && wr_busy && g >= int'(wr_d_q) && act_mask[j] &&
            (g == 0 || wr_legal[g][j]) && wr_addr_of(j, g) == raddr[j]) begin
          fwd_hit[j] = 1'b1;
          fwd_grp[j] = 2'(g);
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      busy_q         <= 1'b0;
      d_q            <= 2'd0;
      slot_t         <= 2'd0;
      slot_a         <= '0;
      wr_busy        <= 1'b0;
      wr_d_q         <= 2'd0;
      wr_a           <= '0;
      wr_t           <= 2'd0;
      legal          <= '0;
      q_legal        <= '0;
      q_fwd          <= '0;
      data_valid_out <= 1'b0;
      for (int g = 0; g < NGRP; g++) begin
        slot_legal[g] <= '0;
        wr_legal[g]   <= '0;
      end
    end else begin
      data_valid_out <= 1'b0;
      q_fwd          <= rd_act ? fwd_hit : '0;
      for (int j = 0; j < NTYPE; j++)
        q_legal[j] <= rd_act && (legal[raddr[j]] || fwd_hit[j]);
      if (rd_act) begin
        if (cur_d != 2'd2)
          for (int j = 0; j < NTYPE; j++)
            slot_legal[int'(cur_d) + 1][j] <= legal[raddr[j]] || fwd_hit[j];
        if (cur_d == 2'd2) begin
          busy_q         <= 1'b0;
          d_q            <= 2'd0;
          data_valid_out <= legal[slot_a] || (|fwd_hit);
          slot_t         <= (slot_t == 2'(PERIOD - 1)) ? 2'd0 : slot_t + 2'd1;
          slot_a         <= (slot_a == AW'(DEPTH - 1)) ? '0 : slot_a + 1'b1;
        end else begin
          busy_q <= 1'b1;
          d_q    <= cur_d + 2'd1;
        end
      end
      // write phase
      if (rd_act && cur_d == 2'd2) begin
        wr_busy     <= 1'b1;
        wr_d_q      <= 2'd0;
        wr_a        <= slot_a;
        wr_t        <= slot_t;
        wr_legal[1] <= slot_legal[1];
        wr_legal[2] <= slot_legal[2];
        wr_legal[0] <= '1;
      end else if (wr_busy) begin
        if (wr_d_q == 2'd2) wr_busy <= 1'b0;
        else wr_d_q <= wr_d_q + 2'd1;
      end
      if (wr_busy && wr_d_q == 2'd0) legal[wr_a] <= 1'b1;
    end
  end

  // a new time step may only arrive when the previous check node is read
  assert property (@(posedge clk) disable iff (rst) data_valid_in |-> ready)
    else $error("proc_ctrl: data_valid_in while busy");

  initial begin
    for (int r = 0; r < 4; r++)
      for (int t = 0; t < PERIOD; t++)
        for (int j = 0; j < NTYPE; j++)
          for (int g = 0; g < NGRP; g++)
            assert (delay_f(rate_t'(r), t, j, g) < DEPTH)
              else $error("proc_ctrl: delay exceeds window depth");
  end
endmodule
