// transpose_memory - double-buffered N x N store between the two 1D passes.
//
// The first pass produces one row of intermediate values per clock and the
// second pass consumes one column per clock, so the store is built from
// registers, which can take a whole row and give a whole column in the same
// clock. Two
// halves (bank 0/1) let the first pass fill one TU while the second pass
// drains the previous one. One instance exists per TU size.
//
// Interface: wr_en writes wr_data[0..N-1] to row wr_row of half wr_bank.
// rd_en loads column rd_col of half rd_bank into rd_data (valid the next
// clock, held until the next read). No reset: contents are only read after
// being written.
//
// A separate, double-buffered transpose memory per TU size, kept in
// registers, follows the published design; the row-write and column-read
// organisation is this design's choice.
module transpose_memory
  import hevc_it_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  logic                 clk,
  input  logic                 wr_en,
  input  logic                 wr_bank,
  input  logic [$clog2(N)-1:0] wr_row,
  input  sample_t              wr_data [N],
  input  logic                 rd_en,
  input  logic                 rd_bank,
  input  logic [$clog2(N)-1:0] rd_col,
  output sample_t              rd_data [N]
);

  // One packed register per row and half, so that a row write and a column
  // read are plain register loads and a per-row column multiplexer.
  for (genvar r = 0; r < N; r++) begin : g_row
    logic [N-1:0][COEF_W-1:0] row_q [2];   // [bank], column c in row_q[b][c]

    for (genvar b = 0; b < 2; b++) begin : g_bank
      always_ff @(posedge clk)
        if (wr_en && wr_bank == 1'(b) && wr_row == r[$clog2(N)-1:0])
          for (int c = 0; c < N; c++) row_q[b][c] <= wr_data[c];
    end

    always_ff @(posedge clk)
      if (rd_en) rd_data[r] <= sample_t'(row_q[rd_bank][rd_col]);
  end

endmodule
