// nms: normalized min-sum magnitude unit of one processor.
// Every cycle it takes the five prior messages of one delay-factor group
// (one per bit type), normalizes them (pretreat) and merges them with the
// running (min_in, sub_min_in, idx_min_in) of the current layer, giving the
// updated first minimum, second minimum and index.  On the first group of a
// layer the running values are replaced by 31/31/0.  Three comparison steps:
// three cmp2 units on (a,b), (c,d) and (e, min_in) -- the last one also folds
// in sub_min_in -- then a cmp4 on the first two sets, then a cmp4 on that
// result and the third set.  Input position j of group g carries index g*5+j.
// Purely combinational: the processor registers the outputs and feeds them
// back.  Structure and constants follow the published architecture; signs are
// handled outside, as there.
module nms
  import ldpc_pkg::*;
(
  input  llr_t             s       [NTYPE],  // prior messages a..e
  input  logic [NTYPE-1:0] active,           // bit types used by the code rate
  input  logic [1:0]       grp,              // delay-factor group 0..2
  input  logic             first,            // first group of the layer
  input  mag_t             min_in,
  input  mag_t             sub_min_in,
  input  idx_t             idx_min_in,
  output mag_t             min_out,
  output mag_t             sub_min_out,
  output idx_t             idx_min_out
);
  mag_t m [NTYPE];
  idx_t id [NTYPE];
  mag_t fb_min, fb_sub;
  idx_t fb_idx;

  for (genvar j = 0; j < NTYPE; j++) begin : g_pre
    pretreat u_pre (.s(s[j]), .active(active[j]), .mag(m[j]));
    assign id[j] = idx_t'(int'(grp) * NTYPE + j);
  end

  assign fb_min = first ? MAG_MAX : min_in;
  assign fb_sub = first ? MAG_MAX : sub_min_in;
  assign fb_idx = first ? '0      : idx_min_in;

  // step 1
  mag_t ab_min, ab_sub, cd_min, cd_sub, e_min, e_sub2, e_sub;
  idx_t ab_idx, cd_idx, e_idx;
  cmp2 u_ab (.x(m[0]), .y(m[1]), .idx_x(id[0]), .idx_y(id[1]),
             .min(ab_min), .sub_min(ab_sub), .idx_min(ab_idx));
  cmp2 u_cd (.x(m[2]), .y(m[3]), .idx_x(id[2]), .idx_y(id[3]),
             .min(cd_min), .sub_min(cd_sub), .idx_min(cd_idx));
  cmp2 u_e  (.x(m[4]), .y(fb_min), .idx_x(id[4]), .idx_y(fb_idx),
             .min(e_min), .sub_min(e_sub2), .idx_min(e_idx));
  assign e_sub = (fb_sub < e_sub2) ? fb_sub : e_sub2;

  // step 2
  mag_t q_min, q_sub;
  idx_t q_idx;
  cmp4 u_q (.min_a(ab_min), .sub_a(ab_sub), .idx_a(ab_idx),
            .min_b(cd_min), .sub_b(cd_sub), .idx_b(cd_idx),
            .min(q_min), .sub_min(q_sub), .idx_min(q_idx));

  // step 3
  cmp4 u_f (.min_a(q_min), .sub_a(q_sub), .idx_a(q_idx),
            .min_b(e_min), .sub_b(e_sub), .idx_b(e_idx),
            .min(min_out), .sub_min(sub_min_out), .idx_min(idx_min_out));
endmodule
