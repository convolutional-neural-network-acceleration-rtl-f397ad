// banked_regfile: the SM's register file, as banks of one lane each.
//
// Fermi's register file holds 32768 registers of 4 bytes (128 KB) in 32
// banks of 1024 registers; each bank serves one thread of a warp and has one
// read and one write port, so a warp instruction reads or writes one row
// across all banks in a single access. A row is therefore one warp register.
// L registers are ordinary rows of this array; no extra storage is added.
//
// Interface: a row read (`rd_en`, `rd_row`) returns all 32 lanes in `rd_data`
// one clock later. A row write writes the lanes set in `wr_mask`. Read-first
// on a same-row collision. Bank count, bank depth and port count follow the
// Fermi organisation; the one-cycle read latency is this design's choice.
module banked_regfile
  import lreg_pkg::*;
#(
  parameter int unsigned ROWS = 1024,
  localparam int unsigned ROW_W = $clog2(ROWS)
) (
  input  logic             clk,
  input  logic             rd_en,
  input  logic [ROW_W-1:0] rd_row,
  output warp_data_t       rd_data,
  input  logic             wr_en,
  input  logic [ROW_W-1:0] wr_row,
  input  lane_mask_t       wr_mask,
  input  warp_data_t       wr_data
);

  for (genvar b = 0; b < WARP_SIZE; b++) begin : g_bank
    rf_bank #(.ROWS(ROWS), .DATA_W(DATA_W)) u_bank (
      .clk     (clk),
      .rd_en   (rd_en),
      .rd_row  (rd_row),
      .rd_data (rd_data[b]),
      .wr_en   (wr_en && wr_mask[b]),
      .wr_row  (wr_row),
      .wr_data (wr_data[b])
    );
  end

endmodule
