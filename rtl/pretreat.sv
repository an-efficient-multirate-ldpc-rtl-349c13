// pretreat: normalizes one prior message for the min-sum comparison tree.
// It takes the magnitude of an 8-bit prior message, scales it by the
// normalization factor 0.75 computed as |x| - floor(|x|/4), and clamps the
// result to 31, the largest 5-bit extrinsic magnitude, whenever |x| > 41
// (42 * 0.75 would already overflow 5 bits).  An inactive input (a bit type
// the current code rate does not use) is forced to 31 so that it can never
// become a minimum.  Purely combinational.  The scaling, the comparison with
// 41 and the clamp to 31 follow the published architecture; the inactive-input
// handling is this design's choice.
module pretreat
  import ldpc_pkg::*;
(
  input  llr_t s,        // prior message, range [-127, 127]
  input  logic active,   // bit type used by the current code rate
  output mag_t mag       // normalized, clamped magnitude
);
  logic [6:0] abs_pos;
  logic [6:0] scaled;

  always_comb begin
    abs_pos = s[LW-1] ? 7'(-s) : 7'(s);
    scaled  = abs_pos - (abs_pos >> 2);
    if (!active || abs_pos > OVF_LIM) mag = MAG_MAX;
    else                              mag = MW'(scaled);
  end
endmodule
