// tb_lreg_lifetime: checks the L-register map table and release timing.
//
// Registers of two warps are allocated with 0, 1 or 2 later shuffle readers.
// Each must stay mapped (and report busy to a new allocation) until it has
// been read 1 + readers times, and must release its row exactly on the last
// read, never earlier. A random sequence of allocations, fills and reads is
// compared with a reference model of remaining reads; a clear drops all.
module tb_lreg_lifetime;
  import lreg_pkg::*;

  localparam int NW = 2, ROWS = 64;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, clear = 0;
  logic alloc = 0, fill = 0, read = 0;
  logic [0:0] alloc_warp = '0, fill_warp = '0, look_warp = '0;
  lreg_id_t alloc_id = '0, fill_id = '0, look_id = '0;
  logic [5:0] alloc_row = '0, look_row, release_row;
  logic [1:0] alloc_readers = '0;
  logic alloc_busy, look_valid, look_written, release_valid;

  lreg_lifetime #(.NUM_WARPS(NW), .RF_ROWS(ROWS)) dut (
    .clk(clk), .rst_n(rst_n), .clear(clear),
    .alloc(alloc), .alloc_warp(alloc_warp), .alloc_id(alloc_id), .alloc_row(alloc_row),
    .alloc_readers(alloc_readers), .alloc_busy(alloc_busy),
    .fill(fill), .fill_warp(fill_warp), .fill_id(fill_id),
    .look_warp(look_warp), .look_id(look_id), .look_valid(look_valid),
    .look_written(look_written), .look_row(look_row), .read(read),
    .release_valid(release_valid), .release_row(release_row)
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // reference: remaining reads (0 = unmapped), row, written
  int left [NW][8];
  int mrow [NW][8];
  bit mwr  [NW][8];
  int releases = 0;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 600; k++) begin
      int w, i, op;
      @(negedge clk);
      alloc = 0; fill = 0; read = 0;
      w  = $urandom_range(0, NW - 1);
      i  = $urandom_range(1, 7);
      op = $urandom_range(0, 2);
      alloc_warp = 1'(w); alloc_id = lreg_id_t'(i);
      fill_warp  = 1'(w); fill_id  = lreg_id_t'(i);
      look_warp  = 1'(w); look_id  = lreg_id_t'(i);
      #1;
      check(alloc_busy == (left[w][i] != 0), "busy");
      check(look_valid == (left[w][i] != 0), "valid");
      if (left[w][i] != 0) begin
        check(look_row == 6'(mrow[w][i]), "row");
        check(look_written == mwr[w][i], "written");
      end
      case (op)
        0: if (left[w][i] == 0) begin
             alloc = 1; alloc_row = 6'($urandom_range(0, ROWS - 1));
             alloc_readers = 2'($urandom_range(0, 2));
             left[w][i] = 1 + alloc_readers; mrow[w][i] = alloc_row; mwr[w][i] = 0;
           end
        1: if (left[w][i] != 0) begin fill = 1; mwr[w][i] = 1; end
        default: if (left[w][i] != 0) begin
             read = 1;
             #1;
             check(release_valid == (left[w][i] == 1), "release on last read only");
             if (release_valid) begin
               check(release_row == 6'(mrow[w][i]), "release row");
               releases++;
             end
             left[w][i]--;
           end
      endcase
      if (!read) begin #1; check(!release_valid, "no release without read"); end
    end
    @(negedge clk);
    alloc = 0; fill = 0; read = 0;
    clear = 1;
    @(negedge clk);
    clear = 0;
    for (int w = 0; w < NW; w++)
      for (int i = 1; i < 8; i++) begin
        look_warp = 1'(w); look_id = lreg_id_t'(i); #1;
        check(!look_valid, "cleared");
      end
    checks++;
    if (releases < 20) begin failures++; $display("FAIL: only %0d releases", releases); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
