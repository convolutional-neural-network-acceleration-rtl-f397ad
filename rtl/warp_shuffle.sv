// warp_shuffle: the lane crossbar of the warp shuffle instruction.
//
// Every lane N of the warp receives the 32-bit value that lane N+delta holds
// in the source register, in one pass for all 32 lanes ("shuffle" with a
// fixed lane distance, as the L-register scheme uses it: delta 1 for the
// horizontal neighbour, delta = thread-block row length for the vertical
// one). A lane whose source N+delta lies beyond the warp has no source in
// this warp: its `in_range` bit is 0 and it receives its own value, as a
// CUDA shuffle does. Crossing the warp boundary would need the inter-warp
// register decoder, which is not part of this design.
// Purely combinational.
module warp_shuffle
  import lreg_pkg::*;
(
  input  warp_data_t         src,
  input  logic [DELTA_W-1:0] delta,
  output warp_data_t         dst,
  output lane_mask_t         in_range
);

  always_comb begin
    for (int n = 0; n < WARP_SIZE; n++) begin
      if (n + int'(delta) < WARP_SIZE) begin
        dst[n]      = src[n + int'(delta)];
        in_range[n] = 1'b1;
      end else begin
        dst[n]      = src[n];
        in_range[n] = 1'b0;
      end
    end
  end

endmodule
