// tb_lreg_renamer: checks per-warp L-register numbering.
//
// Three warps issue L loads in an interleaved random order; a reference
// counter per warp predicts the number each load must get (1, 2, ... up to
// the window length, then 1 again) and the wrap flag. A clear in the middle
// must restart every warp at 1.
module tb_lreg_renamer;
  import lreg_pkg::*;

  localparam int NW = 3;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, clear = 0, advance = 0;
  logic [$clog2(NW)-1:0] warp = '0;
  lreg_id_t last_id = 6'd50, next_id;
  logic wrap;

  lreg_renamer #(.NUM_WARPS(NW)) dut (
    .clk(clk), .rst_n(rst_n), .clear(clear), .warp(warp), .advance(advance),
    .last_id(last_id), .next_id(next_id), .wrap(wrap)
  );

  always #5 clk = ~clk;

  int model [NW];
  int wraps = 0;

  initial begin
    for (int w = 0; w < NW; w++) model[w] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 400; k++) begin
      @(negedge clk);
      warp    = 2'($urandom_range(0, NW - 1));
      advance = ($urandom_range(0, 3) != 0);
      clear   = (k == 200);
      #1;
      checks++;
      if (next_id != lreg_id_t'(model[warp] + 1) || wrap != (model[warp] + 1 == 50)) begin
        failures++;
        $display("FAIL k=%0d warp=%0d id=%0d expected %0d", k, warp, next_id, model[warp] + 1);
      end
      if (clear) for (int w = 0; w < NW; w++) model[w] = 0;
      else if (advance) begin
        if (model[warp] + 1 == 50) begin model[warp] = 0; wraps++; end
        else model[warp]++;
      end
    end
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL: no window wrap seen"); end
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
