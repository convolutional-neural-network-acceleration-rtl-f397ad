// lreg_free_list: pool of free warp-wide physical registers for L registers.
//
// L registers live in otherwise unused rows of the register file, the rows
// POOL_BASE .. POOL_BASE+POOL_SIZE-1. Each row is one warp register (one
// entry in each of the 32 banks). A dead L register's row is returned with
// `push`; `pop` takes a row for a new L register. Rows never handed out yet
// come from a counter, so the pool needs no initialisation pass after reset;
// returned rows wait in a FIFO and are reused first. The pool size and base
// are this design's choice: the scheme only says the L registers use the
// register file space that the kernel leaves unused.
//
// Interface: `avail`/`pop_row` are combinational; `pop` and `push` take
// effect on the clock edge and may both happen in one cycle. Popping an
// empty pool or pushing a full one is an error (asserted). `clear` (kernel
// launch) makes the whole pool free again and wins over `pop` and `push`.
module lreg_free_list #(
  parameter int unsigned RF_ROWS   = 1024,
  parameter int unsigned POOL_BASE = 512,
  parameter int unsigned POOL_SIZE = 512,
  localparam int unsigned ROW_W    = $clog2(RF_ROWS),
  localparam int unsigned CNT_W    = $clog2(POOL_SIZE + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,     // kernel launch: every pool row free again
  input  logic             pop,
  output logic             avail,
  output logic [ROW_W-1:0] pop_row,
  input  logic             push,
  input  logic [ROW_W-1:0] push_row,
  output logic [CNT_W-1:0] free_count
);

  localparam int unsigned PTR_W = $clog2(POOL_SIZE);

  logic [ROW_W-1:0] fifo [POOL_SIZE];
  logic [PTR_W-1:0] rd_ptr, wr_ptr;
  logic [CNT_W-1:0] fifo_count;   // returned rows waiting
  logic [CNT_W-1:0] fresh;        // rows never handed out so far

  logic from_fifo;

  always_comb begin
    from_fifo  = (fifo_count != '0);
    avail      = from_fifo || (fresh != '0);
    pop_row    = from_fifo ? fifo[rd_ptr]
                           : ROW_W'(POOL_BASE + POOL_SIZE - int'(fresh));
    free_count = fifo_count + fresh;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr     <= '0;
      wr_ptr     <= '0;
      fifo_count <= '0;
      fresh      <= CNT_W'(POOL_SIZE);
    end else if (clear) begin
      rd_ptr     <= '0;
      wr_ptr     <= '0;
      fifo_count <= '0;
      fresh      <= CNT_W'(POOL_SIZE);
    end else begin
      if (push) begin
        wr_ptr <= (int'(wr_ptr) == POOL_SIZE - 1) ? '0 : wr_ptr + 1'b1;
      end
      if (pop && from_fifo) begin
        rd_ptr <= (int'(rd_ptr) == POOL_SIZE - 1) ? '0 : rd_ptr + 1'b1;
      end
      if (pop && !from_fifo) fresh <= fresh - 1'b1;
      fifo_count <= fifo_count + CNT_W'(push) - CNT_W'(pop && from_fifo);
    end
  end

  always_ff @(posedge clk) begin
    if (push && !clear) fifo[wr_ptr] <= push_row;
  end

  pop_when_available: assert property (@(posedge clk) disable iff (!rst_n) pop |-> avail)
    else $error("lreg_free_list: pop from an empty pool");
  push_when_room: assert property (@(posedge clk) disable iff (!rst_n) push |-> (free_count < CNT_W'(POOL_SIZE)))
    else $error("lreg_free_list: push into a full pool");

endmodule
