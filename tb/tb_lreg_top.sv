// tb_lreg_top: end-to-end convolution through the L-register load path.
//
// The testbench plays the SM around lreg_top: an issue stage that sends the
// L-type loads of a convolutional layer, a compute stage that reads every L
// register back and accumulates pixel * weight per lane, and a global memory
// (a behavioural model with random latency and back-pressure) holding two
// input channels and four weight filters.
//
// Layer: 5x5 kernel, column and row stride 2, pixels and weights alternating
// (skip factor 2). Thread-block rows are 8 threads long, so each warp is an
// 8 x 4 patch of output neurons; 16 warps cover 64 output rows and each uses
// one of four filters. Each warp runs two passes of its window (two input
// channels), so the L numbering wraps once.
//
// Phase A1 (sharing on, 16 warps, compute stage starts late): the 12 lanes
// per warp whose horizontal and vertical neighbours lie in the same row and
// warp (x <= 5, row-in-warp <= 1) must produce the exact convolution; the
// other lanes are the boundary threads the scheme leaves to extra worker
// threads. Per window and warp exactly 29 loads (25 weights + 4 pixels), 15
// horizontal and 6 vertical shuffles must occur, and every pool row must be
// free at the end. With 16 x 50 registers wanted the 512-row pool runs dry.
// Phase A2 (one warp): memory latency is exposed, so shuffles wait for their
// source's data and the second pass waits for live registers of the first.
// Phase B (sharing off, a non-convolutional kernel launch): every load goes
// to memory and all 32 lanes must be exact.
// Phase C (sharing on with warp-edge loads, 4 warps): every shuffle whose
// source lies beyond lane 31 also loads those lanes from memory (21 of the
// 25 pixel registers per window: lane 31 for the horizontal ones, lanes
// 24-31 for the vertical ones), no lane is left unwritten, and the lanes with
// x <= 5 must be exact in all four rows.
// Each mechanism is counted and must have happened at least once.
// The top runs with its default parameters (48 warps, 1024-row register
// file, 512-row pool).
module tb_lreg_top;
  import lreg_pkg::*;

  localparam int KX = 5, KY = 5, CS = 2, RS = 2, S = 2, BDX = 8;
  localparam int NWU = 16;                       // warps used
  localparam int ROWS_PER_WARP = WARP_SIZE / BDX;
  localparam int IMG_W = CS * (BDX - 1) + KX;
  localparam int IMG_H = RS * (ROWS_PER_WARP * NWU - 1) + KY;
  localparam int WIN = KX * KY * S;
  localparam int WBASE = 32'h10_0000;

  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // DUT signals
  logic cfg_load = 0;
  lreg_cfg_t cfg_in = '0;
  logic ld_valid = 0, ld_ready;
  logic [5:0] ld_warp = '0;
  lane_mask_t ld_mask = '0;
  logic [WARP_SIZE-1:0][31:0] ld_addr = '0;
  lreg_id_t ld_id;
  lreg_src_e ld_src;
  logic mem_req_valid, mem_req_ready = 0;
  logic [5:0] mem_req_warp;
  lreg_id_t mem_req_id;
  logic [9:0] mem_req_row;
  lane_mask_t mem_req_mask;
  logic [WARP_SIZE-1:0][31:0] mem_req_addr;
  logic mem_resp_valid = 0, mem_resp_ready;
  logic [5:0] mem_resp_warp = '0;
  lreg_id_t mem_resp_id = '0;
  logic [9:0] mem_resp_row = '0;
  lane_mask_t mem_resp_mask = '0;
  warp_data_t mem_resp_data = '0;
  logic rd_valid = 0, rd_ready;
  logic [5:0] rd_warp = '0;
  lreg_id_t rd_id = '0;
  logic rd_data_valid;
  warp_data_t rd_data;
  lreg_evt_t evt;
  lane_mask_t shfl_oob;
  logic [9:0] free_count;

  lreg_top dut (
    .clk(clk), .rst_n(rst_n), .cfg_load(cfg_load), .cfg_in(cfg_in),
    .ld_valid(ld_valid), .ld_ready(ld_ready), .ld_warp(ld_warp), .ld_mask(ld_mask),
    .ld_addr(ld_addr), .ld_id(ld_id), .ld_src(ld_src),
    .mem_req_valid(mem_req_valid), .mem_req_ready(mem_req_ready), .mem_req_warp(mem_req_warp),
    .mem_req_id(mem_req_id), .mem_req_row(mem_req_row), .mem_req_mask(mem_req_mask),
    .mem_req_addr(mem_req_addr),
    .mem_resp_valid(mem_resp_valid), .mem_resp_ready(mem_resp_ready),
    .mem_resp_warp(mem_resp_warp), .mem_resp_id(mem_resp_id), .mem_resp_row(mem_resp_row),
    .mem_resp_mask(mem_resp_mask), .mem_resp_data(mem_resp_data),
    .rd_valid(rd_valid), .rd_ready(rd_ready), .rd_warp(rd_warp), .rd_id(rd_id),
    .rd_data_valid(rd_data_valid), .rd_data(rd_data),
    .evt(evt), .shfl_oob(shfl_oob), .free_count(free_count)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ------------------------------------------------------------ data
  int img [2][IMG_H][IMG_W];
  int wt  [2][4][KY][KX];

  function automatic int mem_word(input logic [31:0] a);
    int o, f, v;
    if (a >= 32'(WBASE)) begin
      o = int'(a) - WBASE;
      f = o % 4096;
      v = wt[o / 4096][f / (KX * KY)][(f % (KX * KY)) / KX][f % KX];
    end else begin
      o = int'(a) % 65536;
      v = img[int'(a) / 65536][o / IMG_W][o % IMG_W];
    end
    return v;
  endfunction

  function automatic int lane_x(input int lane); return lane % BDX; endfunction
  function automatic int lane_y(input int w, input int lane); return ROWS_PER_WARP * w + lane / BDX; endfunction

  // ------------------------------------------------------------ global memory model
  typedef struct {
    logic [5:0] warp; lreg_id_t id; logic [9:0] row; lane_mask_t mask;
    warp_data_t data; longint due;
  } resp_t;
  resp_t   mq [$];
  longint  cyc = 0;

  always @(negedge clk) begin
    cyc++;
    mem_req_ready = ($urandom_range(0, 4) != 0);
    if (mq.size() != 0 && mq[0].due <= cyc) begin
      mem_resp_valid = 1;
      mem_resp_warp = mq[0].warp; mem_resp_id = mq[0].id; mem_resp_row = mq[0].row;
      mem_resp_mask = mq[0].mask; mem_resp_data = mq[0].data;
    end else mem_resp_valid = 0;
    #4;
    if (rst_n && mem_req_valid && mem_req_ready) begin
      resp_t r;
      r.warp = mem_req_warp; r.id = mem_req_id; r.row = mem_req_row; r.mask = mem_req_mask;
      for (int n = 0; n < WARP_SIZE; n++)
        r.data[n] = mem_req_mask[n] ? 32'(mem_word(mem_req_addr[n])) : 32'hDEAD_BEEF;
      r.due = cyc + longint'($urandom_range(3, 12));
      mq.push_back(r);
    end
    if (mem_resp_valid && mem_resp_ready) void'(mq.pop_front());
  end

  // ------------------------------------------------------------ event counters
  int n_load = 0, n_hshfl = 0, n_vshfl = 0, n_release = 0, n_wrap = 0;
  int n_stall_free = 0, n_stall_src = 0, n_stall_busy = 0, n_oob = 0, n_edge = 0;
  always @(negedge clk) begin
    #4;
    if (rst_n) begin
      n_load       += int'(evt.load);
      n_hshfl      += int'(evt.hshfl);
      n_vshfl      += int'(evt.vshfl);
      n_release    += int'(evt.release_);
      n_wrap       += int'(evt.wrap);
      n_stall_free += int'(evt.stall_free);
      n_stall_src  += int'(evt.stall_src);
      n_stall_busy += int'(evt.stall_busy);
      n_oob        += int'(shfl_oob != '0);
      n_edge       += int'(evt.edge_load);
    end
  end

  // ------------------------------------------------------------ issue stage
  typedef struct { int w; int id; int elem; bit pixel; } rd_item_t;
  rd_item_t rq [$];

  task automatic issue(input int w, input int pass, input int k, input bit en);
    int elem = (k - 1) / S;
    bit pixel = ((k - 1) % S) == 0;
    int r = elem / KX, c = elem % KX;
    @(negedge clk);
    ld_valid = 1;
    ld_warp  = 6'(w);
    ld_mask  = '1;
    for (int n = 0; n < WARP_SIZE; n++)
      ld_addr[n] = pixel ? 32'(pass * 65536 + (RS * lane_y(w, n) + r) * IMG_W + CS * lane_x(n) + c)
                         : 32'(WBASE + pass * 4096 + (w % 4) * KX * KY + r * KX + c);
    forever begin
      #4;
      if (ld_ready) break;
      @(negedge clk);
    end
    check(int'(ld_id) == k, "renamed L register number");
    if (!pixel || !en) check(ld_src == SRC_LOAD, "weights and disabled loads go to memory");
    rq.push_back('{w: w, id: k, elem: elem, pixel: pixel});
    @(negedge clk);
    ld_valid = 0;
  endtask

  // ------------------------------------------------------------ compute stage
  int  acc [NWU][WARP_SIZE];
  int  pix [NWU][WARP_SIZE];
  int  reads_done = 0;
  int  read_delay = 0;
  bit  en_q, edge_q;
  int  pass_of [NWU];

  initial begin
    rd_item_t it;
    int r, c, p;
    bit exact;
    forever begin
      @(negedge clk);
      if (!rd_valid) begin
        if (read_delay > 0) begin read_delay--; continue; end
        if (rq.size() == 0 || $urandom_range(0, 2) == 0) continue;
      end
      rd_valid = 1; rd_warp = 6'(rq[0].w); rd_id = lreg_id_t'(rq[0].id);
      #4;
      if (!rd_ready) continue;
      begin
        it = rq.pop_front();
        r  = it.elem / KX;
        c  = it.elem % KX;
        p  = pass_of[it.w];
        @(negedge clk);
        rd_valid = 0;
        #4;
        check(rd_data_valid, "read data valid one cycle after the read");
        for (int n = 0; n < WARP_SIZE; n++) begin
          exact = !en_q || (lane_x(n) <= BDX - 3 && (edge_q || (n / BDX) <= ROWS_PER_WARP - 3));
          if (it.pixel) begin
            pix[it.w][n] = int'(rd_data[n]);
            if (exact)
              check(pix[it.w][n] == img[p][RS * lane_y(it.w, n) + r][CS * lane_x(n) + c], "pixel value");
            if (exact && it.pixel && pix[it.w][n] != img[p][RS * lane_y(it.w, n) + r][CS * lane_x(n) + c] && failures < 5)
              $display("  pass %0d warp %0d id %0d lane %0d got %0d want %0d other %0d", p, it.w, it.id, n, pix[it.w][n],
                       img[p][RS * lane_y(it.w, n) + r][CS * lane_x(n) + c], img[1-p][RS * lane_y(it.w, n) + r][CS * lane_x(n) + c]);
          end else begin
            check(int'(rd_data[n]) == wt[p][it.w % 4][r][c], "weight value");
            if (int'(rd_data[n]) != wt[p][it.w % 4][r][c] && failures < 5)
              $display("  warp %0d id %0d lane %0d got %0d want %0d", it.w, it.id, n, int'(rd_data[n]), wt[p][it.w % 4][r][c]);
            acc[it.w][n] += pix[it.w][n] * int'(rd_data[n]);
          end
        end
        if (!it.pixel && it.id == WIN) pass_of[it.w]++;
        reads_done++;
      end
    end
  end

  // ------------------------------------------------------------ phases
  task automatic run_layer(input bit en, input int nw, input int passes, input int delay,
                           input bit edge_ld);
    int total = nw * passes * WIN;
    @(negedge clk);
    cfg_in = '{enable: en, kdim_x: 4'(KX), kdim_y: 4'(KY), col_stride: 4'(CS),
               row_stride: 4'(RS), skip: 2'(S), block_dim_x: 6'(BDX),
               edge_load: edge_ld};
    cfg_load = 1;
    en_q   = en;
    edge_q = edge_ld;
    @(negedge clk);
    cfg_load = 0;
    for (int w = 0; w < NWU; w++) begin
      pass_of[w] = 0;
      for (int n = 0; n < WARP_SIZE; n++) acc[w][n] = 0;
    end
    reads_done = 0;
    read_delay = delay;
    for (int p = 0; p < passes; p++)
      for (int k = 1; k <= WIN; k++)
        for (int w = 0; w < nw; w++) issue(w, p, k, en);
    while (reads_done < total) @(negedge clk);
    repeat (4) @(negedge clk);
    // reference convolution
    for (int w = 0; w < nw; w++)
      for (int n = 0; n < WARP_SIZE; n++) begin
        int ref_v = 0;
        bit exact = !en || (lane_x(n) <= BDX - 3 && (edge_ld || (n / BDX) <= ROWS_PER_WARP - 3));
        for (int p = 0; p < passes; p++)
          for (int r = 0; r < KY; r++)
            for (int c = 0; c < KX; c++)
              ref_v += img[p][RS * lane_y(w, n) + r][CS * lane_x(n) + c] * wt[p][w % 4][r][c];
        if (exact) check(acc[w][n] == ref_v, "output neuron");
      end
    check(int'(free_count) == 512, "all L registers released");
  endtask

  int base_load = 0, base_h = 0, base_v = 0, base_wrap = 0;

  // per-window counts of a phase that ran `windows` warp-windows
  task automatic phase_counts(input int windows);
    check(n_load - base_load  == windows * (KX * KY + CS * RS), "executed loads = weights + 4 pixels per window");
    check(n_hshfl - base_h    == windows * (KY * (KX - CS)), "horizontal shuffles");
    check(n_vshfl - base_v    == windows * ((KY - RS) * CS), "vertical shuffles");
    check(n_wrap - base_wrap  == windows, "one wrap per window");
    $display("after phase: loads=%0d hshfl=%0d vshfl=%0d releases=%0d stall_free=%0d stall_src=%0d stall_busy=%0d oob=%0d",
             n_load, n_hshfl, n_vshfl, n_release, n_stall_free, n_stall_src, n_stall_busy, n_oob);
    base_load = n_load; base_h = n_hshfl; base_v = n_vshfl; base_wrap = n_wrap;
  endtask

  initial begin
    for (int p = 0; p < 2; p++) begin
      for (int y = 0; y < IMG_H; y++)
        for (int x = 0; x < IMG_W; x++) img[p][y][x] = $urandom_range(0, 255);
      for (int f = 0; f < 4; f++)
        for (int r = 0; r < KY; r++)
          for (int c = 0; c < KX; c++) wt[p][f][r][c] = $urandom_range(0, 15) - 7;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    // Phase A1: sharing on, 16 warps, compute stage starts late (pool runs dry)
    run_layer(1'b1, NWU, 2, 1800, 1'b0);
    phase_counts(NWU * 2);
    // Phase A2: sharing on, one warp, memory latency exposed (shuffle waits
    // for its source; the second pass waits for live registers of the first)
    run_layer(1'b1, 1, 2, 150, 1'b0);
    phase_counts(2);
    // Phase B: sharing off (mode switch by kernel launch)
    base_load = n_load; base_h = n_hshfl; base_v = n_vshfl;
    run_layer(1'b0, 2, 1, 0, 1'b0);
    check(n_load - base_load == 2 * WIN, "every load executes with sharing off");
    check(n_hshfl == base_h && n_vshfl == base_v, "no shuffles with sharing off");
    check(n_edge == 0, "no warp-edge loads while they are off");
    // Phase C: sharing on with warp-edge loads
    begin
      int oob0;
      oob0 = n_oob;
      base_load = n_load; base_h = n_hshfl; base_v = n_vshfl; base_wrap = n_wrap;
      run_layer(1'b1, 4, 1, 0, 1'b1);
      phase_counts(4);
      check(n_edge == 4 * (KY * (KX - CS) + (KY - RS) * CS), "warp-edge loads: one per shuffle reaching past lane 31");
      check(n_oob == oob0, "no lane left unwritten with warp-edge loads");
    end
    // every mechanism must have happened
    check(n_hshfl > 0,      "mechanism: horizontal shuffle");
    check(n_vshfl > 0,      "mechanism: vertical shuffle");
    check(n_release > 0,    "mechanism: release");
    check(n_wrap > 0,       "mechanism: window wrap");
    check(n_stall_free > 0, "mechanism: stall on empty pool");
    check(n_stall_src > 0,  "mechanism: stall on unwritten source");
    check(n_stall_busy > 0, "mechanism: stall on live previous instance");
    check(n_oob > 0,        "mechanism: lanes without in-warp source");
    check(n_edge > 0,       "mechanism: warp-edge load");
    $display("totals: loads=%0d hshfl=%0d vshfl=%0d releases=%0d stall_free=%0d stall_src=%0d stall_busy=%0d oob=%0d edge=%0d cycles=%0d",
             n_load, n_hshfl, n_vshfl, n_release, n_stall_free, n_stall_src, n_stall_busy, n_oob, n_edge, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
