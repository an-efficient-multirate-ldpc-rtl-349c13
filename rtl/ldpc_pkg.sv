// ldpc_pkg: types, widths and the check-polynomial delay table shared by the
// multirate LDPC-CC layered decoder.
//
// Number formats (those of the published fixed-point design): posterior and
// prior messages are 8-bit two's complement with 3 fraction bits, kept in the
// symmetric range [-127, +127]; extrinsic messages are 6-bit sign/magnitude
// (5-bit magnitude, 3 fraction bits).  A compressed check-node (layer) word is
// 30 bits: first minimum (5), second minimum (5), position of the first
// minimum (4), the 15 signs of the prior messages and their product (1).
//
// Code structure: a rate b/(b+1) code (b = 1..4) has the bit types X0..X(b-1)
// and P, one check node per time step, a time-varying period of 3, and three
// delay factors per bit type in every check polynomial.  Each type is kept in
// its own memory (X0..X3 in memories 0..3, P in memory 4).
//
// The numerical delay factors of the standard's check polynomials are not
// reproduced here.  delay_f() is a placeholder of this design: delay group 0
// is D^0, group 1 is 3*((17j+5t+3r+40) mod 75)+4 (1 mod 3, at most 226) and
// group 2 is 3*((7j+2t+5r+3) mod 40)+2 (2 mod 3); for P, group 2 is the group-1
// delay of the previous phase plus one, so that back-to-back check nodes touch
// the same posterior message and the read-after-write bypass is exercised.
// Replace delay_f() with the standard's table to decode real IEEE 1901 frames;
// every delay must stay below the window depth (228).
package ldpc_pkg;

  localparam int NTYPE  = 5;    // X0, X1, X2, X3, P
  localparam int NGRP   = 3;    // delay factors per type per check polynomial
  localparam int PERIOD = 3;    // time-varying period of the code
  localparam int LW     = 8;    // posterior / prior message width
  localparam int MW     = 5;    // extrinsic magnitude width
  localparam int IW     = 4;    // index of the first minimum (0..14)
  localparam int NPOS   = NTYPE * NGRP;  // 15 messages per check node

  localparam logic signed [LW-1:0] LLR_MAX = 8'sd127;   // stands for +infinity
  localparam logic signed [LW-1:0] LLR_MIN = -8'sd127;
  localparam logic [MW-1:0]        MAG_MAX = 5'd31;
  localparam logic [6:0]           OVF_LIM = 7'd41;     // |x| > 41 overflows after *0.75

  typedef logic signed [LW-1:0] llr_t;
  typedef logic [MW-1:0]        mag_t;
  typedef logic [IW-1:0]        idx_t;

  typedef enum logic [1:0] {R1_2 = 2'd0, R2_3 = 2'd1, R3_4 = 2'd2, R4_5 = 2'd3} rate_t;

  // Compressed extrinsic message of one check node (30 bits).
  typedef struct packed {
    logic              prod;     // XOR of the signs of all active prior messages
    logic [NPOS-1:0]   signs;    // sign of the prior message at position g*5+j
    idx_t              idx;      // position g*5+j of the first minimum
    mag_t              sub_min;  // second minimum magnitude (normalized)
    mag_t              min;      // first minimum magnitude (normalized)
  } ext_t;

  localparam int EXTW = $bits(ext_t);

  // Memory j holds a bit type that takes part in codes of rate r.
  function automatic logic type_active(rate_t r, int j);
    return (j == NTYPE - 1) || (j <= int'(r));
  endfunction

  // Delay (in time steps) of group g of bit type j in the check polynomial of
  // phase t, for code rate r.  See the header for the formula.
  function automatic int delay_f(rate_t r, int t, int j, int g);
    int tp;
    if (g == 0) return 0;
    if (g == 1) return 3 * ((17 * j + 5 * t + 3 * int'(r) + 40) % 75) + 4;
    if (j == NTYPE - 1) begin
      tp = (t + PERIOD - 1) % PERIOD;
      return 3 * ((17 * j + 5 * tp + 3 * int'(r) + 40) % 75) + 5;
    end
    return 3 * ((7 * j + 2 * t + 5 * int'(r) + 3) % 40) + 2;
  endfunction

  function automatic llr_t sat_llr(logic signed [LW:0] v);
    if (v > 9'sd127)  return LLR_MAX;
    if (v < -9'sd127) return LLR_MIN;
    return llr_t'(v);
  endfunction

endpackage
