// cmp2: orders two extrinsic magnitudes.  Outputs the smaller one (min), the
// larger one (sub_min) and the index carried by the smaller one.  On a tie the
// x input wins.  Purely combinational; first comparison stage of the NMS tree.
// The ports follow the published CMP2 unit; the tie rule is this design's.
module cmp2
  import ldpc_pkg::*;
(
  input  mag_t x,
  input  mag_t y,
  input  idx_t idx_x,
  input  idx_t idx_y,
  output mag_t min,
  output mag_t sub_min,
  output idx_t idx_min
);
  always_comb begin
    if (y < x) begin
      min = y; sub_min = x; idx_min = idx_y;
    end else begin
      min = x; sub_min = y; idx_min = idx_x;
    end
  end
endmodule
