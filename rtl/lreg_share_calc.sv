// lreg_share_calc: overlap test and shift computation for one L register.
//
// Given the kernel descriptor and the number (1, 2, 3, ...) the renamer gave
// a load destination, this combinational block decides whether the value can
// be taken from a neighbouring thread instead of memory, and from where.
// With skip factor S the L registers hold input pixel, weight, input pixel,
// weight, ... so that element (row r, column c) of the kernel window has its
// input in L register id = S*(KX*r + c) + 1; only these input registers are
// shared, weights are always loaded.
//   horizontal overlap : (id-1) mod (KX*S) >= CS*S  -> source id - CS*S,     lane + 1
//   vertical overlap   : (id-1)         >= KX*S*RS -> source id - KX*RS*S,  lane + block_dim_x
// For S = 2 these are exactly the rules "id mod (KX*S) > CS*S" and
// "id > KX*S*RS" of the scheme; written from id-1 they also hold for S = 1.
// The horizontal source is preferred when both apply (either holds the
// value; horizontal is the nearer lane). The vertical shift includes the skip
// factor so that it lands on an input register, as the horizontal shift does.
// The block also reports how many later L registers of the same window will
// read this one by shuffle (0, 1 or 2), which fixes its lifetime.
// Purely combinational; no clock. The descriptor's edge_load bit concerns
// how the top completes a shuffle at the warp edge and is not read here.
module lreg_share_calc
  import lreg_pkg::*;
(
  input  lreg_cfg_t         cfg,
  input  lreg_id_t          id,          // L register being written, 1-based
  output logic              is_input,    // register holds an input pixel, not a weight
  output logic              h_overlap,   // in the horizontal overlap region
  output logic              v_overlap,   // in the vertical overlap region
  output logic              share,       // load replaced by a shuffle
  output lreg_src_e         src,         // where the value comes from
  output lreg_id_t          src_id,      // L register to shuffle from
  output logic [DELTA_W-1:0] lane_delta, // lane distance of the source thread
  output logic [1:0]        readers,     // later shuffles that read this register
  output lreg_id_t          last_id      // last L register of a kernel window (KX*KY*S)
);

  logic [11:0] idx;          // id - 1
  logic [11:0] row_len;      // KX*S
  logic [11:0] h_shift;      // CS*S
  logic [11:0] v_shift;      // KX*RS*S
  logic [11:0] window;       // KX*KY*S
  logic [11:0] h_reader;     // id + CS*S
  logic [11:0] v_reader;     // id + KX*RS*S

  always_comb begin
    row_len  = 12'(cfg.kdim_x) * 12'(cfg.skip);
    h_shift  = 12'(cfg.col_stride) * 12'(cfg.skip);
    v_shift  = row_len * 12'(cfg.row_stride);
    window   = row_len * 12'(cfg.kdim_y);
    last_id  = lreg_id_t'(window);
    idx      = 12'(id) - 12'd1;
    h_reader = 12'(id) + h_shift;
    v_reader = 12'(id) + v_shift;

    is_input  = (cfg.skip != 2'd0) && ((idx % 12'(cfg.skip)) == 12'd0);
    h_overlap = (row_len != 12'd0) && ((idx % row_len) >= h_shift);
    v_overlap = (idx >= v_shift);
    share     = cfg.enable && is_input && (h_overlap || v_overlap);

    src        = SRC_LOAD;
    src_id     = '0;
    lane_delta = '0;
    if (share) begin
      if (h_overlap) begin
        src        = SRC_HSHFL;
        src_id     = lreg_id_t'(12'(id) - h_shift);
        lane_delta = DELTA_W'(1);
      end else begin
        src        = SRC_VSHFL;
        src_id     = lreg_id_t'(12'(id) - v_shift);
        lane_delta = cfg.block_dim_x;
      end
    end

    // A later register of this window in the same column CS to the right takes
    // this one horizontally; the one RS rows down takes it vertically only if
    // it is not itself horizontally overlapped (same column as this one).
    readers = '0;
    if (cfg.enable && is_input) begin
      if (h_reader <= window && (row_len != 12'd0) && (((h_reader - 12'd1) % row_len) >= h_shift))
        readers = readers + 2'd1;
      if (v_reader <= window && !h_overlap)
        readers = readers + 2'd1;
    end
  end

endmodule
