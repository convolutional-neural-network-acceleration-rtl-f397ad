// rf_bank: one bank of the banked register file.
//
// A single-ported-per-direction SRAM-style array: one synchronous read port
// and one write port. The read returns the row's value on the next clock
// edge; a read and a write of the same row in one cycle return the old value
// (read-first). Contents are not reset, as in an SRAM.
module rf_bank #(
  parameter int unsigned ROWS   = 1024,
  parameter int unsigned DATA_W = 32,
  localparam int unsigned ROW_W = $clog2(ROWS)
) (
  input  logic              clk,
  input  logic              rd_en,
  input  logic [ROW_W-1:0]  rd_row,
  output logic [DATA_W-1:0] rd_data,
  input  logic              wr_en,
  input  logic [ROW_W-1:0]  wr_row,
  input  logic [DATA_W-1:0] wr_data
);

  logic [DATA_W-1:0] mem [ROWS];

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_row];
    if (wr_en) mem[wr_row] <= wr_data;
  end

endmodule
