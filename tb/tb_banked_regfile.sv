// tb_banked_regfile: checks masked row writes and one-cycle row reads.
//
// Random rows are written with random lane masks while other rows are read
// back; a reference array predicts every lane. A same-row read and write in
// one cycle must return the old value. The full 1024-row, 32-bank size is
// used.
module tb_banked_regfile;
  import lreg_pkg::*;

  localparam int ROWS = 1024;
  int checks = 0, failures = 0;

  logic clk = 0, rd_en = 0, wr_en = 0;
  logic [9:0] rd_row = '0, wr_row = '0;
  warp_data_t rd_data, wr_data;
  lane_mask_t wr_mask = '0;

  banked_regfile #(.ROWS(ROWS)) dut (
    .clk(clk), .rd_en(rd_en), .rd_row(rd_row), .rd_data(rd_data),
    .wr_en(wr_en), .wr_row(wr_row), .wr_mask(wr_mask), .wr_data(wr_data)
  );

  always #5 clk = ~clk;

  warp_data_t model [ROWS];
  warp_data_t expect_q;
  bit         expect_v = 0;

  initial begin
    // initialise the rows the test reads
    for (int r = 0; r < 64; r++) begin
      @(negedge clk);
      wr_en = 1; wr_row = 10'(r); wr_mask = '1;
      for (int n = 0; n < WARP_SIZE; n++) wr_data[n] = $urandom;
      model[r] = wr_data;
    end
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      if (expect_v) begin
        checks++;
        if (rd_data !== expect_q) begin failures++; $display("FAIL read at %0t", $time); end
      end
      rd_en  = ($urandom_range(0, 3) != 0);
      rd_row = 10'($urandom_range(0, 63));
      wr_en  = $urandom_range(0, 1);
      wr_row = (k % 7 == 0) ? rd_row : 10'($urandom_range(0, 63));
      wr_mask = $urandom;
      for (int n = 0; n < WARP_SIZE; n++) wr_data[n] = $urandom;
      expect_v = rd_en;
      expect_q = model[rd_row];
      if (wr_en)
        for (int n = 0; n < WARP_SIZE; n++) if (wr_mask[n]) model[wr_row][n] = wr_data[n];
    end
    // the top row of the array
    @(negedge clk);
    wr_en = 1; wr_row = 10'(ROWS - 1); wr_mask = '1; rd_en = 0;
    for (int n = 0; n < WARP_SIZE; n++) wr_data[n] = 32'(n * 3 + 1);
    @(negedge clk);
    wr_en = 0; rd_en = 1; rd_row = 10'(ROWS - 1);
    @(negedge clk);
    for (int n = 0; n < WARP_SIZE; n++) begin
      checks++;
      if (rd_data[n] != 32'(n * 3 + 1)) begin failures++; $display("FAIL top row lane %0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
