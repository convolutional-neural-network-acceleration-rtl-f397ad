// tb_warp_shuffle: checks the lane crossbar for every lane distance.
//
// Random register rows are shuffled with distances 0..33; each lane N must
// receive lane N+delta's value while N+delta is inside the warp, and keep
// its own value with in_range low beyond it.
module tb_warp_shuffle;
  import lreg_pkg::*;

  int checks = 0, failures = 0;
  warp_data_t src, dst;
  lane_mask_t in_range;
  logic [DELTA_W-1:0] delta;

  warp_shuffle dut (.src(src), .delta(delta), .dst(dst), .in_range(in_range));

  initial begin
    for (int t = 0; t < 20; t++) begin
      for (int n = 0; n < WARP_SIZE; n++) src[n] = $urandom;
      for (int d = 0; d <= 33; d++) begin
        delta = DELTA_W'(d);
        #1;
        for (int n = 0; n < WARP_SIZE; n++) begin
          checks++;
          if (n + d < WARP_SIZE) begin
            if (dst[n] !== src[n + d] || !in_range[n]) begin
              failures++; $display("FAIL d=%0d lane %0d", d, n);
            end
          end else if (dst[n] !== src[n] || in_range[n]) begin
            failures++; $display("FAIL d=%0d lane %0d out of range", d, n);
          end
        end
      end
    end
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
