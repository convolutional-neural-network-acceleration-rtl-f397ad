// tb_lreg_workloads: the evaluated convolutional layers through lreg_top.
//
// Runs the convolutional layer shapes of a four-layer handwritten-digit
// network on the load path at its default size (48 warps, 512-row pool),
// with a behavioural global memory (random latency 3-12 cycles, random
// back-pressure). Each thread block computes one feature map. Kernel 5x5,
// strides 2, pixel and weight loads alternating. Two thread layouts:
//   plain : thread (x, y) of a BX-wide block is thread y*BX + x, i.e. warp
//           (y*BX+x)/32, lane (y*BX+x)%32; lanes beyond the block inactive.
//   tiled : every warp is an 8x4 tile whose top-left 6x2 threads produce
//           outputs; the other threads only fetch the tile's border pixels.
// Layers run (image, block, outputs, maps); "edge" sets the launch bit that
// loads from memory the lanes whose shuffle source lies beyond lane 31:
//   29x29, 13x13 plain, 13x13, 6 maps         (boundary threads left as they are)
//   29x29, 15x15 plain, 13x13, 6 maps         (two worker threads per row/column)
//   29x29, 15x15 plain, 13x13, 6 maps, edge   (48 warps)
//   29x29, tiled,       13x13, 2 maps         (42 warps)
//   13x13 x 6 channels, 7x7 plain, 5x5, 8 maps        (the numbering wraps 6 times)
//   13x13 x 6 channels, 7x7 plain, 5x5, 8 maps, edge
//   13x13 x 6 channels, tiled,     5x5, 4 maps
//   33x33, 17x17 plain, 15x15, 4 maps         (40 warps)
//   33x33, 17x17 plain, 15x15, 4 maps, edge
//   73x73, 37x37 plain, 35x35, 1 map, edge    (43 warps)
// For every output neuron the testbench predicts, from the window geometry
// alone, whether all its pixels arrive intact: a pixel is intact if it is
// loaded, or copied from a neighbour that is in the same warp, is the true
// geometric neighbour (same row for horizontal), is active, and holds the
// intact pixel itself. Predicted-intact neurons must equal the reference
// convolution exactly, and with the tiled layout or edge loads every output
// must be intact; edge loads must occur exactly when enabled, and no lane may
// be left unwritten while they are. Every window must make exactly 29 memory loads, and the pool must
// be full again after each layer. The number of intact neurons and the mean
// squared error of the others are printed.
module tb_lreg_workloads;
  import lreg_pkg::*;

  localparam int K = 5, ST = 2, S = 2, WIN = K * K * S;
  localparam int MAXD = 80, MAXC = 6, MAXM = 8;
  localparam int WBASE = 32'h10_0000;

  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

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

  // ------------------------------------------------------------ layer under test
  int IW, IH, BX, BY, OX, OY, NC, NM, WPB;   // image, block, outputs, channels, maps, warps per block
  int img [MAXC][MAXD][MAXD];
  int wt  [MAXC][MAXM][K][K];

  function automatic int mem_word(input logic [31:0] a);
    int o, f, v, y, x;
    if (a >= 32'(WBASE)) begin
      o = int'(a) - WBASE;
      f = o % 4096;
      v = wt[o / 4096][f / (K * K)][(f % (K * K)) / K][f % K];
    end else begin
      o = int'(a) % 65536;
      y = o / 256;
      x = o % 256;
      v = (y < IH && x < IW) ? img[int'(a) / 65536][y][x] : 0;   // zero outside the image
    end
    return v;
  endfunction

  // ------------------------------------------------------------ global memory model
  typedef struct {
    logic [5:0] warp; lreg_id_t id; logic [9:0] row; lane_mask_t mask;
    warp_data_t data; longint due;
  } resp_t;
  resp_t  mq [$];
  longint cyc = 0;

  always @(negedge clk) begin
    resp_t r;
    cyc++;
    mem_req_ready = ($urandom_range(0, 5) != 0);
    if (mq.size() != 0 && mq[0].due <= cyc) begin
      mem_resp_valid = 1;
      mem_resp_warp = mq[0].warp; mem_resp_id = mq[0].id; mem_resp_row = mq[0].row;
      mem_resp_mask = mq[0].mask; mem_resp_data = mq[0].data;
    end else mem_resp_valid = 0;
    #4;
    if (rst_n && mem_req_valid && mem_req_ready) begin
      r.warp = mem_req_warp; r.id = mem_req_id; r.row = mem_req_row; r.mask = mem_req_mask;
      for (int n = 0; n < WARP_SIZE; n++)
        r.data[n] = mem_req_mask[n] ? 32'(mem_word(mem_req_addr[n])) : 32'hDEAD_BEEF;
      r.due = cyc + longint'($urandom_range(3, 12));
      mq.push_back(r);
    end
    if (mem_resp_valid && mem_resp_ready) void'(mq.pop_front());
  end

  int n_load = 0, n_edge = 0;
  always @(negedge clk) begin
    #4;
    if (rst_n) begin
      n_load += int'(evt.load);
      n_edge += int'(evt.edge_load);
      if (shfl_oob != '0 && EDGE) begin
        failures++;
        $display("FAIL lanes left unwritten with edge loads on");
      end
    end
  end

  // ------------------------------------------------------------ thread geometry
  // Plain mapping: thread t = (warp % WPB)*32 + lane, at (t % BX, t / BX).
  // Tiled mapping: each warp is an 8x4 tile of threads whose top-left 6x2
  // threads produce outputs; the rest only fetch the tile's border pixels.
  bit TILED;
  bit EDGE;                                  // lanes whose source is beyond the warp load themselves
  int TX;                                    // tiles per row of outputs

  function automatic int tid(input int w, input int lane); return (w % WPB) * WARP_SIZE + lane; endfunction
  function automatic bit active(input int w, input int lane);
    return (TILED || tid(w, lane) < BX * BY) && lane < WARP_SIZE;
  endfunction
  function automatic int lx(input int w, input int lane);
    return TILED ? lane % BX : tid(w, lane) % BX;
  endfunction
  function automatic int gx(input int w, input int lane);
    return TILED ? ((w % WPB) % TX) * (BX - 2) + lane % BX : tid(w, lane) % BX;
  endfunction
  function automatic int gy(input int w, input int lane);
    return TILED ? ((w % WPB) / TX) * (WARP_SIZE / BX - 2) + lane / BX : tid(w, lane) / BX;
  endfunction
  function automatic bit is_output(input int w, input int lane);
    if (!active(w, lane) || gx(w, lane) >= OX || gy(w, lane) >= OY) return 1'b0;
    return !TILED || (lane % BX < BX - 2 && lane / BX < WARP_SIZE / BX - 2);
  endfunction

  // Does lane n's register for kernel element (r, c) hold the right pixel?
  function automatic bit intact(input int w, input int n, input int r, input int c);
    if (n >= WARP_SIZE || !active(w, n)) return 1'b0;
    if (r < ST && c < ST) return 1'b1;
    if (c >= ST) begin
      if (n + 1 >= WARP_SIZE) return EDGE;
      if (lx(w, n) == BX - 1) return 1'b0;
      return intact(w, n + 1, r, c - ST);
    end
    if (n + BX >= WARP_SIZE) return EDGE;
    return intact(w, n + BX, r - ST, c);
  endfunction

  // ------------------------------------------------------------ issue and compute
  typedef struct { int w; int id; int elem; bit pixel; } rd_item_t;
  rd_item_t rq [$];

  task automatic issue(input int w, input int pass, input int k);
    int elem, r, c;
    bit pixel;
    elem  = (k - 1) / S;
    pixel = ((k - 1) % S) == 0;
    r = elem / K;
    c = elem % K;
    @(negedge clk);
    ld_valid = 1;
    ld_warp  = 6'(w);
    for (int n = 0; n < WARP_SIZE; n++) begin
      ld_mask[n] = active(w, n);
      ld_addr[n] = pixel ? 32'(pass * 65536 + (ST * gy(w, n) + r) * 256 + ST * gx(w, n) + c)
                         : 32'(WBASE + pass * 4096 + (w / WPB) * K * K + r * K + c);
    end
    forever begin
      #4;
      if (ld_ready) break;
      @(negedge clk);
    end
    check(int'(ld_id) == k, "renamed L register number");
    rq.push_back('{w: w, id: k, elem: elem, pixel: pixel});
    @(negedge clk);
    ld_valid = 0;
  endtask

  int acc [48][WARP_SIZE];
  int pix [48][WARP_SIZE];
  int pass_of [48];
  int reads_done = 0;

  initial begin
    rd_item_t it;
    forever begin
      @(negedge clk);
      if (!rd_valid && rq.size() == 0) continue;
      rd_valid = 1; rd_warp = 6'(rq[0].w); rd_id = lreg_id_t'(rq[0].id);
      #4;
      if (!rd_ready) continue;
      it = rq.pop_front();
      @(negedge clk);
      rd_valid = 0;
      #4;
      for (int n = 0; n < WARP_SIZE; n++) begin
        if (it.pixel) pix[it.w][n] = int'(rd_data[n]);
        else acc[it.w][n] += pix[it.w][n] * int'(rd_data[n]);
      end
      if (!it.pixel && it.id == WIN) pass_of[it.w]++;
      reads_done++;
    end
  end

  task automatic run_layer(input string name, input int iw, input int ih, input int nc,
                           input int bx, input int by, input int ox, input int oy, input int nm,
                           input bit tiled, input bit edge_ld);
    int nw, load0, edge0, total, good, bad, x, y, ref_v;
    bit ok;
    real sq;
    IW = iw; IH = ih; NC = nc; BX = bx; BY = by; OX = ox; OY = oy; NM = nm;
    TILED = tiled;
    EDGE  = edge_ld;
    TX  = (ox + bx - 3) / (bx - 2);
    WPB = tiled ? TX * ((oy + WARP_SIZE / bx - 3) / (WARP_SIZE / bx - 2))
                : (bx * by + WARP_SIZE - 1) / WARP_SIZE;
    nw  = WPB * nm;
    for (int p = 0; p < nc; p++) begin
      for (int yy = 0; yy < ih; yy++)
        for (int xx = 0; xx < iw; xx++) img[p][yy][xx] = $urandom_range(0, 255);
      for (int m = 0; m < nm; m++)
        for (int r = 0; r < K; r++)
          for (int c = 0; c < K; c++) wt[p][m][r][c] = $urandom_range(0, 15) - 7;
    end
    @(negedge clk);
    cfg_in = '{enable: 1'b1, kdim_x: 4'(K), kdim_y: 4'(K), col_stride: 4'(ST),
               row_stride: 4'(ST), skip: 2'(S), block_dim_x: 6'(bx),
               edge_load: edge_ld};
    cfg_load = 1;
    @(negedge clk);
    cfg_load = 0;
    for (int w = 0; w < 48; w++) begin
      pass_of[w] = 0;
      for (int n = 0; n < WARP_SIZE; n++) acc[w][n] = 0;
    end
    reads_done = 0;
    load0 = n_load;
    edge0 = n_edge;
    total = nw * nc * WIN;
    for (int p = 0; p < nc; p++)
      for (int k = 1; k <= WIN; k++)
        for (int w = 0; w < nw; w++) issue(w, p, k);
    while (reads_done < total) @(negedge clk);
    repeat (4) @(negedge clk);
    check(n_load - load0 == nw * nc * (K * K + ST * ST), "29 memory loads per window");
    check(int'(free_count) == 512, "all L registers released");
    good = 0; bad = 0; sq = 0.0;
    for (int w = 0; w < nw; w++)
      for (int n = 0; n < WARP_SIZE; n++) begin
        if (!is_output(w, n)) continue;
        x = gx(w, n);
        y = gy(w, n);
        ref_v = 0;
        for (int p = 0; p < nc; p++)
          for (int r = 0; r < K; r++)
            for (int c = 0; c < K; c++)
              ref_v += mem_word(32'(p * 65536 + (ST * y + r) * 256 + ST * x + c)) * wt[p][w / WPB][r][c];
        ok = 1'b1;
        for (int r = 0; r < K; r++)
          for (int c = 0; c < K; c++) ok &= intact(w, n, r, c);
        if (ok) begin
          good++;
          check(acc[w][n] == ref_v, "intact output neuron equals the reference");
        end else begin
          bad++;
          sq += real'(acc[w][n] - ref_v) * real'(acc[w][n] - ref_v);
        end
      end
    check(good + bad == ox * oy * nm, "every output neuron computed once");
    if (tiled || edge_ld) check(bad == 0, "no boundary neuron left");
    check(edge_ld == (n_edge != edge0), "edge loads made exactly when enabled");
    $display("%s: %0d warps, %0d output neurons intact, %0d boundary neurons (mean squared error %0.1f), %0d loads, %0d edge loads",
             name, nw, good, bad, (bad > 0) ? sq / bad : 0.0, n_load - load0, n_edge - edge0);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_layer("L1 13x13 block           ", 29, 29, 1, 13, 13, 13, 13, 6, 1'b0, 1'b0);
    run_layer("L1 15x15 block           ", 29, 29, 1, 15, 15, 13, 13, 6, 1'b0, 1'b0);
    run_layer("L1 15x15 block, edge load", 29, 29, 1, 15, 15, 13, 13, 6, 1'b0, 1'b1);
    run_layer("L1 8x4 warp tiles        ", 29, 29, 1,  8,  4, 13, 13, 2, 1'b1, 1'b0);
    run_layer("L2 7x7 block             ", 13, 13, 6,  7,  7,  5,  5, 8, 1'b0, 1'b0);
    run_layer("L2 7x7 block, edge load  ", 13, 13, 6,  7,  7,  5,  5, 8, 1'b0, 1'b1);
    run_layer("L2 8x4 warp tiles        ", 13, 13, 6,  8,  4,  5,  5, 4, 1'b1, 1'b0);
    run_layer("33x33 17x17 block        ", 33, 33, 1, 17, 17, 15, 15, 4, 1'b0, 1'b0);
    run_layer("33x33 17x17, edge load   ", 33, 33, 1, 17, 17, 15, 15, 4, 1'b0, 1'b1);
    run_layer("73x73 37x37, edge load   ", 73, 73, 1, 37, 37, 35, 35, 1, 1'b0, 1'b1);
    $display("cycles=%0d", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
