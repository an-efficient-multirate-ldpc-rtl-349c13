// sub_blk: subtractor block of a processor.  Five saturating subtractors
// compute the prior messages S = L_old - Z_old (one per bit type) and clip
// them to [-127, 127].  Purely combinational.  Five subtractors, one per bit
// type, as published; the saturation range is this design's choice.
module sub_blk
  import ldpc_pkg::*;
(
  input  llr_t l [NTYPE],   // old posterior messages
  input  llr_t z [NTYPE],   // old extrinsic messages (|z| <= 31)
  output llr_t s [NTYPE]    // prior messages
);
  for (genvar j = 0; j < NTYPE; j++) begin : g_sub
    assign s[j] = sat_llr(9'(l[j]) - 9'(z[j]));
  end
endmodule
