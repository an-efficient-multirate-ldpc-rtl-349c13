// ext_unpack: expands a compressed check-node word into the five extrinsic
// messages of one delay-factor group g.  For position p = g*5+j the magnitude
// is sub_min if p is the position of the first minimum and min otherwise; the
// sign is the product of all signs times the message's own sign (the XOR of
// the two bits), which equals the product of the other signs.  An all-zero
// word gives all-zero messages, which is what the first processor uses.
// Output as 8-bit two's complement in [-31, 31].  Purely combinational.
// The word's contents follow the published check-node-based storage; the
// position numbering g*5+j and this separate unit are this design's.
module ext_unpack
  import ldpc_pkg::*;
(
  input  ext_t       w,
  input  logic [1:0] grp,
  output llr_t       z [NTYPE]
);
  for (genvar j = 0; j < NTYPE; j++) begin : g_z
    idx_t pos;
    mag_t mag;
    logic neg;
    always_comb begin
      pos = idx_t'(int'(grp) * NTYPE + j);
      mag = (w.idx == pos) ? w.sub_min : w.min;
      neg = w.prod ^ w.signs[pos];
      z[j] = neg ? -llr_t'({3'b000, mag}) : llr_t'({3'b000, mag});
    end
  end
endmodule
