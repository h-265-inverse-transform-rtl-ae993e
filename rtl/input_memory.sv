// input_memory - double-buffered coefficient store in front of the first 1D pass.
//
// The memory is built from NMAX separate row memories. Row memory r holds
// row r of the coefficient block for both halves of the ping-pong buffer
// (address = {bank, column}), so a single write touches one row memory and a
// column read touches every row memory at the same address: the whole column
// of a TU comes out in one clock. Each row memory has one write and one
// synchronous read port, i.e. it maps onto one block RAM.
//
// Interface: one coefficient written per clock (wr_*), one column read per
// clock (rd_*); rd_data is valid the clock after rd_en and holds its value
// until the next read. TUs smaller than NMAX use rows/columns 0..N-1; rows
// above N-1 are read but ignored by the smaller transforms.
//
// Splitting the input memory into 32 row RAMs so that a whole column is
// read at once follows the published design; its extra register copies of
// the memory are not built here.
module input_memory
  import hevc_it_pkg::*;
#(
  parameter int unsigned NMAX = 32
) (
  input  logic                    clk,
  input  logic                    wr_en,
  input  logic                    wr_bank,
  input  logic [$clog2(NMAX)-1:0] wr_row,
  input  logic [$clog2(NMAX)-1:0] wr_col,
  input  sample_t                 wr_data,
  input  logic                    rd_en,
  input  logic                    rd_bank,
  input  logic [$clog2(NMAX)-1:0] rd_col,
  output sample_t                 rd_data [NMAX]
);

  localparam int unsigned AW = $clog2(NMAX) + 1;

  for (genvar r = 0; r < NMAX; r++) begin : g_row
    sample_t mem [2 * NMAX];

    always_ff @(posedge clk) begin
      if (wr_en && wr_row == r[$clog2(NMAX)-1:0])
        mem[AW'({wr_bank, wr_col})] <= wr_data;
      if (rd_en)
        rd_data[r] <= mem[AW'({rd_bank, rd_col})];
    end
  end

endmodule
