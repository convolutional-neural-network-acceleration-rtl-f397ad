// lreg_top: the L-register load path of one streaming multiprocessor.
//
// In a convolutional layer each thread computes one output neuron from a
// KX x KY window of the input, and neighbouring threads' windows overlap.
// This block sits between the warp issue stage and the load-store unit. Every
// load the compiler marked as L-type (the loads of input pixels and weights)
// enters here. The block
//   1. renames its destination to the next L register of the warp
//      (lreg_renamer), so pixels and weights alternate in L1, L2, L3, ...;
//   2. checks whether the register lies in the horizontal or vertical overlap
//      region (lreg_share_calc);
//   3. if it does not, sends the load to memory with the warp's active mask;
//   4. if it does, sends nothing to memory (the load's active mask is
//      nullified for every lane) and instead performs a shuffle: it reads the
//      source L register's row from the register file, moves each lane's
//      value from lane N+delta to lane N (warp_shuffle) and writes the result
//      into the new L register's row (see "Warp edge" below for lanes with
//      no source inside the warp);
//   5. tracks every L register's remaining reads and returns its physical row
//      to the pool (lreg_free_list) after the last one (lreg_lifetime).
// The compute pipeline reads L registers through the read port; that read is
// the register's own use and counts toward its lifetime.
//
// What follows the scheme: L-register numbering, the overlap rules and shifts,
// mask nullification for all lanes, shuffles within one warp only, release of
// a register after its own and its neighbours' last access, use of spare rows
// of the existing register file, and the kernel-launch directive (`cfg_load`)
// carrying kernel size, strides, skip factor and thread-block row length.
// This design's own choices: the valid/ready handshakes, one register-file
// read and one write per cycle (the banks' single ports), priority of the
// shuffle over compute reads and memory responses, stalling on a missing
// source or a full pool, and the pool at rows POOL_BASE..POOL_BASE+POOL_SIZE-1.
//
// Warp edge. A shuffle cannot reach beyond lane 31. The scheme skips the load
// for the whole warp, yet also asks that loads not be skipped at a warp
// boundary; the launch bit `edge_load` selects between the two readings.
// With it clear, the lanes whose source lies beyond the warp are left
// unwritten and reported on `shfl_oob`. With it set, the shuffle goes ahead
// and, in the same cycle, a memory request with only those active lanes in
// its mask is sent for the same L register; the register counts as written
// when that response has been written. The response cannot overtake the
// shuffle's write, which happens in the cycle after acceptance, when memory
// responses are held off.
//
// Timing: a load is accepted in the cycle ld_valid && ld_ready. A memory load
// leaves on mem_req in that same cycle. A shuffle reads the source row in
// that cycle and writes the destination row in the next one. A compute read
// accepted in cycle t returns rd_data with rd_data_valid in cycle t+1.
module lreg_top
  import lreg_pkg::*;
#(
  parameter int unsigned NUM_WARPS = 48,
  parameter int unsigned RF_ROWS   = 1024,
  parameter int unsigned POOL_BASE = 512,
  parameter int unsigned POOL_SIZE = 512,
  parameter int unsigned ADDR_W    = 32,
  localparam int unsigned WARP_W   = $clog2(NUM_WARPS),
  localparam int unsigned ROW_W    = $clog2(RF_ROWS),
  localparam int unsigned FREE_W   = $clog2(POOL_SIZE + 1)
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  // kernel launch: the compiler directive
  input  logic                                  cfg_load,
  input  lreg_cfg_t                             cfg_in,
  // L-type load from the issue stage
  input  logic                                  ld_valid,
  output logic                                  ld_ready,
  input  logic [WARP_W-1:0]                     ld_warp,
  input  lane_mask_t                            ld_mask,
  input  logic [WARP_SIZE-1:0][ADDR_W-1:0]      ld_addr,
  output lreg_id_t                              ld_id,    // L register given to this load
  output lreg_src_e                             ld_src,   // load, horizontal or vertical shuffle
  // load request to the load-store unit / global memory
  output logic                                  mem_req_valid,
  input  logic                                  mem_req_ready,
  output logic [WARP_W-1:0]                     mem_req_warp,
  output lreg_id_t                              mem_req_id,
  output logic [ROW_W-1:0]                      mem_req_row,
  output lane_mask_t                            mem_req_mask,
  output logic [WARP_SIZE-1:0][ADDR_W-1:0]      mem_req_addr,
  // load response (returns the request's warp, id, row and mask)
  input  logic                                  mem_resp_valid,
  output logic                                  mem_resp_ready,
  input  logic [WARP_W-1:0]                     mem_resp_warp,
  input  lreg_id_t                              mem_resp_id,
  input  logic [ROW_W-1:0]                      mem_resp_row,
  input  lane_mask_t                            mem_resp_mask,
  input  warp_data_t                            mem_resp_data,
  // compute read of an L register
  input  logic                                  rd_valid,
  output logic                                  rd_ready,
  input  logic [WARP_W-1:0]                     rd_warp,
  input  lreg_id_t                              rd_id,
  output logic                                  rd_data_valid,
  output warp_data_t                            rd_data,
  // status
  output lreg_evt_t                             evt,
  output lane_mask_t                            shfl_oob,
  output logic [FREE_W-1:0]                     free_count
);

  // ---------------------------------------------------------------- config
  lreg_cfg_t cfg_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        cfg_q <= '0;
    else if (cfg_load) cfg_q <= cfg_in;
  end

  // ---------------------------------------------------------------- rename + share decision
  lreg_id_t           next_id, last_id, src_id;
  logic               wrap, share;
  lreg_src_e          src;
  logic [DELTA_W-1:0] lane_delta;
  logic [1:0]         readers;
  logic               ld_fire;

  lreg_renamer #(.NUM_WARPS(NUM_WARPS)) u_renamer (
    .clk     (clk),
    .rst_n   (rst_n),
    .clear   (cfg_load),
    .warp    (ld_warp),
    .advance (ld_fire),
    .last_id (last_id),
    .next_id (next_id),
    .wrap    (wrap)
  );

  lreg_share_calc u_share (
    .cfg        (cfg_q),
    .id         (next_id),
    .is_input   (),
    .h_overlap  (),
    .v_overlap  (),
    .share      (share),
    .src        (src),
    .src_id     (src_id),
    .lane_delta (lane_delta),
    .readers    (readers),
    .last_id    (last_id)
  );

  // ---------------------------------------------------------------- pool + lifetime
  logic             pool_avail;
  logic [ROW_W-1:0] pool_row;
  logic             rel_valid;
  logic [ROW_W-1:0] rel_row;

  lreg_free_list #(.RF_ROWS(RF_ROWS), .POOL_BASE(POOL_BASE), .POOL_SIZE(POOL_SIZE)) u_pool (
    .clk        (clk),
    .rst_n      (rst_n),
    .clear      (cfg_load),
    .pop        (ld_fire),
    .avail      (pool_avail),
    .pop_row    (pool_row),
    .push       (rel_valid),
    .push_row   (rel_row),
    .free_count (free_count)
  );

  logic              alloc_busy;
  logic [WARP_W-1:0] look_warp;
  lreg_id_t          look_id;
  logic              look_valid, look_written;
  logic [ROW_W-1:0]  look_row;
  logic              rf_read;
  logic              fill;
  logic [WARP_W-1:0] fill_warp;
  lreg_id_t          fill_id;

  lreg_lifetime #(.NUM_WARPS(NUM_WARPS), .RF_ROWS(RF_ROWS)) u_life (
    .clk           (clk),
    .rst_n         (rst_n),
    .clear         (cfg_load),
    .alloc         (ld_fire),
    .alloc_warp    (ld_warp),
    .alloc_id      (next_id),
    .alloc_row     (pool_row),
    .alloc_readers (readers),
    .alloc_busy    (alloc_busy),
    .fill          (fill),
    .fill_warp     (fill_warp),
    .fill_id       (fill_id),
    .look_warp     (look_warp),
    .look_id       (look_id),
    .look_valid    (look_valid),
    .look_written  (look_written),
    .look_row      (look_row),
    .read          (rf_read),
    .release_valid (rel_valid),
    .release_row   (rel_row)
  );

  // ---------------------------------------------------------------- issue decision
  logic ld_alloc_ok;   // a row is free and the previous instance is dead
  logic ld_shfl_look;  // this load owns the lookup/read port this cycle
  logic src_ready;
  logic rd_fire;
  lane_mask_t edge_mask;  // lanes whose shuffle source lies beyond lane 31
  logic edge_ld;          // this shuffle also needs a memory load for those lanes

  always_comb begin
    ld_alloc_ok  = pool_avail && !alloc_busy && !cfg_load;
    ld_shfl_look = ld_valid && ld_alloc_ok && share;
    look_warp    = ld_shfl_look ? ld_warp : rd_warp;
    look_id      = ld_shfl_look ? src_id  : rd_id;
    src_ready    = look_valid && look_written;
    for (int n = 0; n < WARP_SIZE; n++) edge_mask[n] = (n + int'(lane_delta) >= WARP_SIZE);
    edge_ld = share && cfg_q.edge_load && |(ld_mask & edge_mask);

    ld_ready = ld_alloc_ok && (share ? src_ready && (!edge_ld || mem_req_ready) : mem_req_ready);
    ld_fire  = ld_valid && ld_ready;
    ld_id    = next_id;
    ld_src   = src;

    mem_req_valid = ld_valid && ld_alloc_ok && (!share || (edge_ld && src_ready));
    mem_req_warp  = ld_warp;
    mem_req_id    = next_id;
    mem_req_row   = pool_row;
    // the active mask is kept for executed loads, cut to the edge lanes for a shuffle
    mem_req_mask  = share ? (ld_mask & edge_mask) : ld_mask;
    mem_req_addr  = ld_addr;

    rd_ready = !ld_shfl_look && src_ready && !cfg_load;
    rd_fire  = rd_valid && rd_ready;
    rf_read  = (ld_fire && share) || rd_fire;
  end

  // ---------------------------------------------------------------- shuffle stage
  logic               shf_v;
  logic [ROW_W-1:0]   shf_row;
  lane_mask_t         shf_mask;
  logic [DELTA_W-1:0] shf_delta;
  logic [WARP_W-1:0]  shf_warp;
  lreg_id_t           shf_id;
  logic               shf_edge;
  logic               rd_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shf_v <= 1'b0;
      rd_q  <= 1'b0;
    end else begin
      shf_v <= ld_fire && share;
      rd_q  <= rd_fire;
    end
  end

  always_ff @(posedge clk) begin
    if (ld_fire && share) begin
      shf_row   <= pool_row;
      shf_mask  <= ld_mask;
      shf_delta <= lane_delta;
      shf_warp  <= ld_warp;
      shf_id    <= next_id;
      shf_edge  <= edge_ld;
    end
  end

  // ---------------------------------------------------------------- register file
  warp_data_t rf_rdata, shf_data, wr_data;
  lane_mask_t in_range, wr_mask;
  logic       wr_en;
  logic [ROW_W-1:0] wr_row;

  warp_shuffle u_shfl (
    .src      (rf_rdata),
    .delta    (shf_delta),
    .dst      (shf_data),
    .in_range (in_range)
  );

  always_comb begin
    mem_resp_ready = !shf_v;
    if (shf_v) begin
      wr_en     = 1'b1;
      wr_row    = shf_row;
      wr_mask   = shf_mask & in_range;
      wr_data   = shf_data;
      fill      = !shf_edge;   // otherwise the edge lanes' response completes it
      fill_warp = shf_warp;
      fill_id   = shf_id;
    end else begin
      wr_en     = mem_resp_valid;
      wr_row    = mem_resp_row;
      wr_mask   = mem_resp_mask;
      wr_data   = mem_resp_data;
      fill      = mem_resp_valid;
      fill_warp = mem_resp_warp;
      fill_id   = mem_resp_id;
    end
    shfl_oob      = (shf_v && !shf_edge) ? (shf_mask & ~in_range) : '0;
    rd_data_valid = rd_q;
    rd_data       = rf_rdata;
  end

  banked_regfile #(.ROWS(RF_ROWS)) u_rf (
    .clk     (clk),
    .rd_en   (rf_read),
    .rd_row  (look_row),
    .rd_data (rf_rdata),
    .wr_en   (wr_en),
    .wr_row  (wr_row),
    .wr_mask (wr_mask),
    .wr_data (wr_data)
  );

  // ---------------------------------------------------------------- events
  always_comb begin
    evt            = '0;
    evt.load       = ld_fire && !share;
    evt.hshfl      = ld_fire && src == SRC_HSHFL;
    evt.vshfl      = ld_fire && src == SRC_VSHFL;
    evt.release_   = rel_valid;
    evt.wrap       = ld_fire && wrap;
    evt.stall_free = ld_valid && !pool_avail;
    evt.stall_busy = ld_valid && pool_avail && alloc_busy;
    evt.stall_src  = ld_shfl_look && !src_ready;
    evt.edge_load  = ld_fire && edge_ld;
  end

  // ---------------------------------------------------------------- handshake rules
  ld_held: assert property (@(posedge clk) disable iff (!rst_n)
                            ld_valid && !ld_ready && !cfg_load |=> ld_valid)
    else $error("lreg_top: ld_valid dropped before ld_ready");
  resp_held: assert property (@(posedge clk) disable iff (!rst_n)
                              mem_resp_valid && !mem_resp_ready |=> mem_resp_valid)
    else $error("lreg_top: mem_resp_valid dropped before mem_resp_ready");
  rd_held: assert property (@(posedge clk) disable iff (!rst_n)
                            rd_valid && !rd_ready && !cfg_load |=> rd_valid)
    else $error("lreg_top: rd_valid dropped before rd_ready");

endmodule
