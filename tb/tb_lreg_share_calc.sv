// tb_lreg_share_calc: checks the overlap rules and shifts of lreg_share_calc.
//
// For several kernel descriptors it walks every L register of a window and
// compares the block's answer with one derived from window geometry: the
// register's kernel element (row r, column c) is found from its number, a
// pixel is horizontally shared when c >= CS (the thread to the right has
// loaded it at column c-CS), vertically when r >= RS (the thread one
// block-row down has it at row r-RS). It also counts the loads left per
// thread: for a 5x5 kernel with stride 2 only 4 of the 25 pixel loads remain.
module tb_lreg_share_calc;
  import lreg_pkg::*;

  int checks = 0, failures = 0;

  lreg_cfg_t          cfg;
  lreg_id_t           id, src_id, last_id;
  logic               is_input, h_ov, v_ov, share;
  lreg_src_e          src;
  logic [DELTA_W-1:0] lane_delta;
  logic [1:0]         readers;

  lreg_share_calc dut (
    .cfg(cfg), .id(id), .is_input(is_input), .h_overlap(h_ov), .v_overlap(v_ov),
    .share(share), .src(src), .src_id(src_id), .lane_delta(lane_delta),
    .readers(readers), .last_id(last_id)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: cfg kx=%0d ky=%0d cs=%0d rs=%0d s=%0d en=%0d id=%0d",
               what, cfg.kdim_x, cfg.kdim_y, cfg.col_stride, cfg.row_stride,
               cfg.skip, cfg.enable, id);
    end
  endtask

  // Walk one descriptor; return the number of pixel loads left per window.
  task automatic walk(input int kx, input int ky, input int cs, input int rs,
                      input int s, input bit en, input int bdx, output int loads);
    int win, e, r, c, exp_src_id, exp_readers;
    bit inp, eh, ev, esh;
    lreg_src_e esrc;
    cfg = '{enable: en, kdim_x: 4'(kx), kdim_y: 4'(ky), col_stride: 4'(cs),
            row_stride: 4'(rs), skip: 2'(s), block_dim_x: 6'(bdx),
            edge_load: 1'b0};
    win   = kx * ky * s;
    loads = 0;
    for (int n = 1; n <= win; n++) begin
      id = lreg_id_t'(n);
      #1;
      inp = ((n - 1) % s) == 0;
      e   = (n - 1) / s;
      r   = e / kx;
      c   = e % kx;
      eh  = c >= cs;
      ev  = r >= rs;
      esh = en && inp && (eh || ev);
      esrc = !esh ? SRC_LOAD : (eh ? SRC_HSHFL : SRC_VSHFL);
      exp_src_id = !esh ? 0 : (eh ? s * (kx * r + c - cs) + 1 : s * (kx * (r - rs) + c) + 1);
      exp_readers = 0;
      if (en && inp && c + cs < kx) exp_readers++;
      if (en && inp && r + rs < ky && c < cs) exp_readers++;
      check(last_id == lreg_id_t'(win), "last_id");
      check(is_input == inp, "is_input");
      check(share == esh, "share");
      check(src == esrc, "src");
      if (esh) begin
        check(src_id == lreg_id_t'(exp_src_id), "src_id");
        check(lane_delta == (eh ? DELTA_W'(1) : DELTA_W'(bdx)), "lane_delta");
      end
      if (inp) check(readers == 2'(exp_readers), "readers");
      if (inp && !share) loads++;
    end
  endtask

  int loads;

  initial begin
    // 5x5 kernel, stride 2, pixels and weights alternating (benchmark layer 1)
    walk(5, 5, 2, 2, 2, 1'b1, 13, loads);
    checks++;
    if (loads != 4) begin failures++; $display("FAIL: %0d pixel loads left, expected 4", loads); end
    // the printed examples: register 3 (numbered without skip) comes from lane+1 register 1
    cfg = '{enable: 1'b1, kdim_x: 4'd5, kdim_y: 4'd5, col_stride: 4'd2, row_stride: 4'd2,
            skip: 2'd1, block_dim_x: 6'd13, edge_load: 1'b0};
    id = 6'd3;  #1; check(src == SRC_HSHFL && src_id == 6'd1 && lane_delta == 6'd1, "example reg 3");
    id = 6'd11; #1; check(src == SRC_VSHFL && src_id == 6'd1 && lane_delta == 6'd13, "example reg 11");
    id = 6'd21; #1; check(src == SRC_VSHFL && src_id == 6'd11, "example reg 21");
    // other shapes
    walk(5, 5, 2, 2, 1, 1'b1, 16, loads);
    walk(3, 3, 1, 1, 2, 1'b1, 8, loads);
    checks++; if (loads != 1) begin failures++; $display("FAIL: 3x3/1 loads %0d", loads); end
    walk(5, 5, 1, 1, 2, 1'b1, 8, loads);
    walk(7, 4, 3, 1, 2, 1'b1, 8, loads);
    walk(4, 4, 2, 3, 3, 1'b1, 8, loads);
    // L registers disabled (non-convolutional kernel): every load executes
    walk(5, 5, 2, 2, 2, 1'b0, 13, loads);
    checks++; if (loads != 25) begin failures++; $display("FAIL: disabled loads %0d", loads); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
