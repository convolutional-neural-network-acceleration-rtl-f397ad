// lreg_lifetime: L-register map table with lifetime tracking.
//
// L registers are mapped to physical warp registers per warp. Unlike an
// ordinary register, an L register may still be needed after its own thread
// has used it: a neighbouring thread may shuffle it out later. Each entry
// therefore carries a count of the reads still to come: one read by its own
// thread (the multiply-accumulate that consumes it) plus one per later
// shuffle that takes it (horizontal neighbour, vertical neighbour, or both;
// see lreg_share_calc). Every read lowers the count; the read that takes it
// to zero is the last access, the entry is invalidated and its physical row
// is released. A weight, or a pixel no neighbour takes, is so released right
// after its own thread reads it. The scheme states when a register dies; the
// reference count is how this design detects it.
//
// Each entry also has a `written` bit, set when the memory response or the
// shuffle fills its row. Readers use it as a scoreboard.
//
// Interface: lookups are combinational. `alloc`, `fill` and `read` act on the
// clock edge; `release_valid`/`release_row` are combinational and high in the
// cycle of the read that releases the row. All entries reset to invalid.
module lreg_lifetime
  import lreg_pkg::*;
#(
  parameter int unsigned NUM_WARPS = 48,
  parameter int unsigned RF_ROWS   = 1024,
  localparam int unsigned WARP_W   = $clog2(NUM_WARPS),
  localparam int unsigned ROW_W    = $clog2(RF_ROWS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,        // kernel launch: drop all mappings
  // allocation of a new L register
  input  logic              alloc,
  input  logic [WARP_W-1:0] alloc_warp,
  input  lreg_id_t          alloc_id,
  input  logic [ROW_W-1:0]  alloc_row,
  input  logic [1:0]        alloc_readers, // later shuffles that will read it
  output logic              alloc_busy,    // entry still live from the previous window
  // fill: the register's row has been written
  input  logic              fill,
  input  logic [WARP_W-1:0] fill_warp,
  input  lreg_id_t          fill_id,
  // lookup + read (one read per cycle: the register file has one read port)
  input  logic [WARP_W-1:0] look_warp,
  input  lreg_id_t          look_id,
  output logic              look_valid,
  output logic              look_written,
  output logic [ROW_W-1:0]  look_row,
  input  logic              read,          // the looked-up register is read now
  // release of a dead register
  output logic              release_valid,
  output logic [ROW_W-1:0]  release_row
);

  // One entry per (warp, L register number); flat index warp*64 + number.
  localparam int unsigned IDS     = 1 << LREG_W;
  localparam int unsigned ENTRIES = NUM_WARPS * IDS;
  localparam int unsigned IDX_W   = $clog2(ENTRIES);

  logic [ENTRIES-1:0] valid_q;              // mapped
  logic [ENTRIES-1:0] written_q;            // row filled
  logic [1:0]         pending_q [ENTRIES];  // reads still to come, minus one
  logic [ROW_W-1:0]   row_q     [ENTRIES];  // physical row

  logic [IDX_W-1:0] a_idx, f_idx, l_idx;
  logic [1:0]       l_pending;

  assign a_idx = IDX_W'(alloc_warp) * IDX_W'(IDS) + IDX_W'(alloc_id);
  assign f_idx = IDX_W'(fill_warp)  * IDX_W'(IDS) + IDX_W'(fill_id);
  assign l_idx = IDX_W'(look_warp)  * IDX_W'(IDS) + IDX_W'(look_id);

  assign alloc_busy    = valid_q[a_idx];
  assign look_valid    = valid_q[l_idx];
  assign look_written  = written_q[l_idx];
  assign look_row      = row_q[l_idx];
  assign l_pending     = pending_q[l_idx];
  assign release_valid = read && look_valid && (l_pending == 2'd0);
  assign release_row   = look_row;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q   <= '0;
      written_q <= '0;
    end else if (clear) begin
      valid_q   <= '0;
    end else begin
      if (release_valid) valid_q[l_idx]   <= 1'b0;
      if (fill)          written_q[f_idx] <= 1'b1;
      if (alloc) begin
        valid_q[a_idx]   <= 1'b1;
        written_q[a_idx] <= 1'b0;
      end
    end
  end

  // Row and read count need no reset: they are only looked at while valid.
  always_ff @(posedge clk) begin
    if (read && look_valid && l_pending != 2'd0) pending_q[l_idx] <= l_pending - 2'd1;
    if (alloc) begin
      pending_q[a_idx] <= alloc_readers;
      row_q[a_idx]     <= alloc_row;
    end
  end

  alloc_only_when_free: assert property (@(posedge clk) disable iff (!rst_n) alloc |-> !alloc_busy)
    else $error("lreg_lifetime: allocation over a live L register");
  read_only_live: assert property (@(posedge clk) disable iff (!rst_n) read |-> look_valid)
    else $error("lreg_lifetime: read of an unmapped L register");

endmodule
