// cmp4: merges two (min, sub_min, idx_min) sets, each with min <= sub_min,
// into the first and second minimum of all four values and the index of the
// first.  One comparison picks the set with the smaller min; its partner's
// min is then compared with the winner's sub_min (a cmp2 on those two) to give
// the new sub_min.  Ties go to set a.  Purely combinational.  The structure
// (one comparator plus a CMP2) follows the published CMP4 unit; the tie rule
// is this design's.
module cmp4
  import ldpc_pkg::*;
(
  input  mag_t min_a,
  input  mag_t sub_a,
  input  idx_t idx_a,
  input  mag_t min_b,
  input  mag_t sub_b,
  input  idx_t idx_b,
  output mag_t min,
  output mag_t sub_min,
  output idx_t idx_min
);
  logic b_wins;
  mag_t win_sub, lose_min, s_min, s_sub;
  idx_t s_idx;

  assign b_wins   = min_b < min_a;
  assign win_sub  = b_wins ? sub_b : sub_a;
  assign lose_min = b_wins ? min_a : min_b;

  cmp2 u_sub (.x(win_sub), .y(lose_min), .idx_x('0), .idx_y('0),
              .min(s_min), .sub_min(s_sub), .idx_min(s_idx));

  assign min     = b_wins ? min_b : min_a;
  assign idx_min = b_wins ? idx_b : idx_a;
  assign sub_min = s_min;
endmodule
