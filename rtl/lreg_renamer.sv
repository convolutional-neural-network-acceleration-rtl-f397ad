// lreg_renamer: renames L-type load destinations in program order.
//
// Whatever register number the compiler gave an L-type load, the hardware
// numbers the L registers of a warp 1, 2, 3, ... in the order the loads
// issue; with a skip factor of 2 the odd numbers then hold input pixels and
// the even numbers weights, as the loads alternate between the two. One
// counter per warp holds the number of the last L register issued. When the
// number reaches the end of the kernel window (last_id = KX*KY*S) the counter
// returns to 0, so the next pass of the convolution loop (the next input
// channel or output map) reuses the numbers 1, 2, 3, ... The window wrap and
// the per-warp counter are this design's reading of "renames them in
// increasing order".
//
// Interface: `next_id` is combinational from `warp`; the counter of `warp`
// advances on a clock edge with `advance` high. `clear` (kernel launch)
// zeroes all counters and wins over `advance`. Counters reset to 0.
module lreg_renamer
  import lreg_pkg::*;
#(
  parameter int unsigned NUM_WARPS = 48
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         clear,
  input  logic [$clog2(NUM_WARPS)-1:0] warp,
  input  logic                         advance,
  input  lreg_id_t                     last_id,
  output lreg_id_t                     next_id,
  output logic                         wrap      // next_id is the last of the window
);

  lreg_id_t count [NUM_WARPS];

  always_comb begin
    next_id = count[warp] + lreg_id_t'(1);
    wrap    = (next_id == last_id);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int w = 0; w < NUM_WARPS; w++) count[w] <= '0;
    end else if (clear) begin
      for (int w = 0; w < NUM_WARPS; w++) count[w] <= '0;
    end else if (advance) begin
      count[warp] <= wrap ? '0 : next_id;
    end
  end

endmodule
