// lreg_pkg: types and constants shared by the L-register load path.
//
// The L-register scheme keeps the input pixels that neighbouring threads of a
// convolutional layer load into dedicated, sequentially numbered "L" registers,
// so that a later load of the same pixel can be replaced by a warp shuffle from
// the neighbour's register. The warp width (32 lanes), the 32-bit register
// width, the 1024 warp-wide physical registers per SM (32 banks of 1024
// registers) and the 48 warps per SM are the Fermi numbers this design is
// built around. The field widths of the kernel descriptor and the 63-entry
// L-register name space (a Fermi thread can use at most 63 registers) are this
// design's choice.
package lreg_pkg;

  localparam int unsigned WARP_SIZE = 32;   // lanes per warp
  localparam int unsigned DATA_W    = 32;   // bits per register
  localparam int unsigned LREG_MAX  = 63;   // highest L-register number
  localparam int unsigned LREG_W    = 6;    // bits of an L-register number (1..63)
  localparam int unsigned DELTA_W   = 6;    // bits of a shuffle lane distance (0..32)

  typedef logic [WARP_SIZE-1:0]             lane_mask_t;
  typedef logic [WARP_SIZE-1:0][DATA_W-1:0] warp_data_t;
  typedef logic [LREG_W-1:0]                lreg_id_t;

  // Kernel descriptor, set by the compiler directive at kernel launch.
  typedef struct packed {
    logic       enable;       // L-register sharing active (convolutional layer)
    logic [3:0] kdim_x;       // kernel dimension X (columns)
    logic [3:0] kdim_y;       // kernel dimension Y (rows)
    logic [3:0] col_stride;   // column stride of the kernel window
    logic [3:0] row_stride;   // row stride of the kernel window
    logic [1:0] skip;         // skip factor: L registers per kernel element
    logic [5:0] block_dim_x;  // thread-block row length = lane distance of a vertical neighbour
    logic       edge_load;    // still load, from memory, the lanes whose shuffle source is beyond the warp
  } lreg_cfg_t;

  // Where the value of one L register comes from.
  typedef enum logic [1:0] {
    SRC_LOAD  = 2'd0,   // executed load (active mask kept)
    SRC_HSHFL = 2'd1,   // horizontal shuffle from lane + 1
    SRC_VSHFL = 2'd2    // vertical shuffle from lane + block_dim_x
  } lreg_src_e;

  // Single-cycle event pulses of the load path, for counters and tests.
  typedef struct packed {
    logic load;        // a load was sent to memory
    logic hshfl;       // a load was replaced by a horizontal shuffle
    logic vshfl;       // a load was replaced by a vertical shuffle
    logic release_;    // a dead L register was returned to the pool
    logic wrap;        // a thread's L-register sequence completed a kernel window
    logic stall_free;  // load held: no free physical register
    logic stall_src;   // shuffle held: source L register not yet written
    logic stall_busy;  // load held: the previous instance of this L register is still live
    logic edge_load;   // a shuffle was completed by a memory load for its warp-edge lanes
  } lreg_evt_t;

endpackage
