// output_memory - double-buffered N x N residual store after the second pass.
//
// The second pass writes one row of N residuals per clock; the output
// transfer reads one residual per clock in raster order. The store is built
// from N column memories: a row write puts one word into each of them at
// address {bank, row}, and a read takes one word from column memory rd_col.
// Each column memory therefore has one write and one synchronous read port
// and maps onto a block RAM. One instance exists per TU size.
//
// Interface: wr_en writes wr_data[0..N-1] to row wr_row of half wr_bank;
// rd_en reads (rd_bank, rd_row, rd_col) and rd_data is valid the next clock.
//
// A separate, double-buffered output memory per TU size follows the
// published design; splitting it into column RAMs is this design's choice.
module output_memory
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
  input  logic [$clog2(N)-1:0] rd_row,
  input  logic [$clog2(N)-1:0] rd_col,
  output sample_t              rd_data
);

  localparam int unsigned AW = $clog2(N) + 1;

  sample_t col_q [N];

  for (genvar c = 0; c < N; c++) begin : g_col
    sample_t mem [2 * N];

    always_ff @(posedge clk) begin
      if (wr_en)
        mem[AW'({wr_bank, wr_row})] <= wr_data[c];
      if (rd_en && rd_col == c[$clog2(N)-1:0])
        col_q[c] <= mem[AW'({rd_bank, rd_row})];
    end
  end

  // Column select of the registered read, delayed with the read.
  logic [$clog2(N)-1:0] rd_col_q;

  always_ff @(posedge clk)
    if (rd_en) rd_col_q <= rd_col;

  assign rd_data = col_q[rd_col_q];

endmodule
