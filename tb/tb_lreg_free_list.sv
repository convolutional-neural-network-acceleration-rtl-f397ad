// tb_lreg_free_list: checks the physical-register pool.
//
// A small pool (8 rows from row 4) is drained: every row must come out once,
// all inside the pool, and `avail` must drop when it is empty. Rows are then
// returned in a scrambled order and must be handed out again first-in
// first-out. Random pop/push traffic is then checked against a queue model,
// and a clear must make all rows free again.
module tb_lreg_free_list;
  localparam int ROWS = 16, BASE = 4, SIZE = 8;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, clear = 0, pop = 0, push = 0;
  logic avail;
  logic [3:0] pop_row, push_row = '0;
  logic [3:0] free_count;

  lreg_free_list #(.RF_ROWS(ROWS), .POOL_BASE(BASE), .POOL_SIZE(SIZE)) dut (
    .clk(clk), .rst_n(rst_n), .clear(clear), .pop(pop), .avail(avail), .pop_row(pop_row),
    .push(push), .push_row(push_row), .free_count(free_count)
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  logic [3:0] held [$];
  logic [3:0] fifo_model [$];
  bit seen [ROWS];
  int pick;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // drain
    for (int k = 0; k < SIZE; k++) begin
      @(negedge clk);
      check(avail, "avail while rows left");
      check(int'(free_count) == SIZE - k, "free_count during drain");
      check(pop_row >= BASE && pop_row < BASE + SIZE && !seen[pop_row], "row unique and in pool");
      seen[pop_row] = 1'b1;
      held.push_back(pop_row);
      pop = 1;
      @(negedge clk);
      pop = 0;
    end
    @(negedge clk);
    check(!avail && free_count == 0, "empty after drain");
    // return in scrambled order
    held.shuffle();
    foreach (held[i]) begin
      push = 1; push_row = held[i]; fifo_model.push_back(held[i]);
      @(negedge clk);
    end
    push = 0;
    held.delete();
    // random traffic
    for (int k = 0; k < 300; k++) begin
      @(negedge clk);
      check(avail == (fifo_model.size() != 0), "avail vs model");
      if (avail) check(pop_row == fifo_model[0], "FIFO order");
      pop  = avail && ($urandom_range(0, 1) == 1);
      push = (held.size() != 0) && ($urandom_range(0, 1) == 1);
      if (push) begin
        pick = $urandom_range(0, held.size() - 1);
        push_row = held[pick];
        held.delete(pick);
      end
      if (pop) begin held.push_back(fifo_model.pop_front()); end
      if (push) fifo_model.push_back(push_row);
    end
    @(negedge clk);
    pop = 0; push = 0;
    clear = 1;
    @(negedge clk);
    clear = 0;
    check(avail && free_count == 4'(SIZE), "clear refills pool");
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
