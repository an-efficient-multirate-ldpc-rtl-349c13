// add_blk: adder block of a processor.  Five saturating adders compute the
// new posterior messages L_new = S + Z_new (one per bit type), clipped to
// [-127, 127].  Purely combinational.  Five adders, one per bit type, as
// published; the saturation range is this design's choice.
module add_blk
  import ldpc_pkg::*;
(
  input  llr_t s [NTYPE],   // prior messages
  input  llr_t z [NTYPE],   // new extrinsic messages (|z| <= 31)
  output llr_t l [NTYPE]    // new posterior messages
);
  for (genvar j = 0; j < NTYPE; j++) begin : g_add
    assign l[j] = sat_llr(9'(s[j]) + 9'(z[j]));
  end
endmodule
