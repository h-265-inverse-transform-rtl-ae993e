// hevc_itr_top - HEVC 2D inverse transform co-processor (FPGA side).
//
// Turns blocks of dequantised HEVC coefficients into residual blocks,
// Y = T^T X T, for all transform units (TUs) of the standard: 4x4 DST and
// 4x4, 8x8, 16x16 and 32x32 DCT. The 2D transform is done as two 1D passes
// with a transpose memory in between, and the four processing elements run
// as a pipeline over double-buffered memories, each on a different TU:
//
//   in stream -> FIFO -> transfer_input -> input_memory (shared, 2 halves)
//     -> P1: itr_1d_stage, shift 7 -> transpose_memory[type] (2 halves each)
//     -> P2: itr_1d_stage, shift 20-BIT_DEPTH -> output_memory[type] (2 halves)
//     -> transfer_output -> FIFO -> out stream
//   controller: launches every element, hands memory halves over, and
//     pushes one duration record per TU through the stats FIFO.
//
// Each TU type has its own transpose and output memory sized for it, and
// its own 1D unit inside each pass, so consecutive TUs of different sizes
// never share storage.
//
// Streams (valid/ready, a word moves when both are high):
//   in    : header word (bits 2:0 = hevc_it_pkg::tu_type_e), then the N*N
//           coefficients row-major in bits 15:0 of each word;
//   out   : header word (same encoding), then the N*N residuals row-major,
//           sign-extended to 32 bits;
//   stats : one hevc_it_pkg::stats_t per TU, in TU order.
//
// Timing per TU: each 1D pass takes N + 4 clocks; with empty pipelines a TU's
// first pass starts one clock after its last coefficient is written, and its
// residuals leave one TU-transfer (N*N + 3 clocks) after the second pass.
// Throughput is set by the stream transfers, which move one word per clock.
// Reset is synchronous and active low.
//
// The split into one shared input memory, per-size first-pass units,
// transpose memories, second-pass units and output memories, and the chain of
// transfer, pass, pass, transfer processes around a controller, follow the
// published Impulse C design. The stream framing, handshakes, FIFO depths and
// the parameters are this design's own.
module hevc_itr_top
  import hevc_it_pkg::*;
#(
  parameter int unsigned BIT_DEPTH  = 8,
  parameter int unsigned FIFO_DEPTH = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [31:0] in_data,
  output logic        out_valid,
  input  logic        out_ready,
  output logic [31:0] out_data,
  output logic        stats_valid,
  input  logic        stats_ready,
  output stats_t      stats_data
);

  localparam int unsigned NT = 5;
  localparam int unsigned CW = $clog2(FIFO_DEPTH) + 1;
  localparam logic [4:0]  SHIFT_2ND = 5'(20 - BIT_DEPTH);

  // Edge of TU type t: 4 for the DST, 4 << (t-1) for the DCTs.
  function automatic int unsigned edge_of(int unsigned t);
    return (t == 0) ? 4 : (4 << (t - 1));
  endfunction

  // ---- input FIFO and transfer ---------------------------------------------
  logic        fin_valid, fin_ready;
  logic [31:0] fin_data;
  logic [CW-1:0] fin_count;

  sync_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_in_fifo (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_data,
    .out_valid(fin_valid), .out_ready(fin_ready), .out_data(fin_data),
    .count(fin_count)
  );

  logic       in_bank_free, in_wr_bank, tu_in_done;
  tu_type_e   tu_in_type;
  logic       im_we;
  logic [4:0] im_row, im_col;
  sample_t    im_wdata;

  transfer_input u_transfer_in (
    .clk, .rst_n,
    .in_valid(fin_valid), .in_ready(fin_ready), .in_data(fin_data),
    .bank_free(in_bank_free),
    .mem_we(im_we), .mem_row(im_row), .mem_col(im_col), .mem_wdata(im_wdata),
    .tu_done(tu_in_done), .tu_type(tu_in_type)
  );

  // ---- controller ------------------------------------------------------------
  logic     p1_start, p1_in_bank, p1_tr_bank, p1_done;
  tu_type_e p1_start_type, p1_type;
  logic     p2_start, p2_tr_bank, p2_out_bank, p2_done;
  tu_type_e p2_start_type, p2_type;
  logic     out_start, out_start_bank, out_busy, out_done;
  tu_type_e out_start_type;
  logic     stats_room, stats_push;
  stats_t   stats_rec;

  controller u_controller (
    .clk, .rst_n,
    .in_bank_free, .in_wr_bank, .tu_in_done, .tu_in_type,
    .p1_start, .p1_start_type, .p1_in_bank, .p1_tr_bank, .p1_type, .p1_done,
    .p2_start, .p2_start_type, .p2_type, .p2_tr_bank, .p2_out_bank, .p2_done,
    .out_start, .out_start_type, .out_start_bank, .out_busy, .out_done,
    .stats_room, .stats_push, .stats_rec
  );

  // ---- input memory and first pass -----------------------------------------
  logic       p1_rd_en, p1_wr_en, p1_busy;
  logic [4:0] p1_rd_col, p1_wr_row;
  sample_t    p1_rd_data [32];
  sample_t    p1_wr_data [32];

  input_memory #(.NMAX(32)) u_input_memory (
    .clk,
    .wr_en(im_we), .wr_bank(in_wr_bank), .wr_row(im_row), .wr_col(im_col), .wr_data(im_wdata),
    .rd_en(p1_rd_en), .rd_bank(p1_in_bank), .rd_col(p1_rd_col), .rd_data(p1_rd_data)
  );

  itr_1d_stage u_p1 (
    .clk, .rst_n,
    .start(p1_start), .start_type(p1_start_type), .shift(5'(SHIFT_1ST)),
    .busy(p1_busy), .done(p1_done),
    .rd_en(p1_rd_en), .rd_col(p1_rd_col), .rd_data(p1_rd_data),
    .wr_en(p1_wr_en), .wr_row(p1_wr_row), .wr_data(p1_wr_data)
  );

  // ---- second pass -----------------------------------------------------------
  logic       p2_rd_en, p2_wr_en, p2_busy;
  logic [4:0] p2_rd_col, p2_wr_row;
  sample_t    p2_rd_data [32];
  sample_t    p2_wr_data [32];
  sample_t    tr_rd_data [NT][32];

  itr_1d_stage u_p2 (
    .clk, .rst_n,
    .start(p2_start), .start_type(p2_start_type), .shift(SHIFT_2ND),
    .busy(p2_busy), .done(p2_done),
    .rd_en(p2_rd_en), .rd_col(p2_rd_col), .rd_data(p2_rd_data),
    .wr_en(p2_wr_en), .wr_row(p2_wr_row), .wr_data(p2_wr_data)
  );

  always_comb p2_rd_data = tr_rd_data[p2_type];

  // ---- output transfer and FIFO ------------------------------------------------
  tu_type_e    tout_type;
  logic        tout_bank, tout_rd_en, tout_push;
  logic [4:0]  tout_row, tout_col;
  sample_t     om_rd_data [NT];
  logic [31:0] tout_push_data;
  logic        fout_ready;
  logic [CW-1:0] fout_count;
  logic [7:0]  fout_space;

  assign fout_space = 8'(FIFO_DEPTH) - 8'(fout_count);

  transfer_output u_transfer_out (
    .clk, .rst_n,
    .start(out_start), .start_type(out_start_type), .start_bank(out_start_bank),
    .busy(out_busy), .done(out_done),
    .rd_type(tout_type), .rd_bank(tout_bank), .rd_en(tout_rd_en),
    .rd_row(tout_row), .rd_col(tout_col), .rd_data(om_rd_data[tout_type]),
    .space(fout_space), .push(tout_push), .push_data(tout_push_data)
  );

  sync_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_out_fifo (
    .clk, .rst_n,
    .in_valid(tout_push), .in_ready(fout_ready), .in_data(tout_push_data),
    .out_valid, .out_ready, .out_data,
    .count(fout_count)
  );

  // ---- per-type transpose and output memories -------------------------------
  for (genvar t = 0; t < NT; t++) begin : g_type
    localparam int unsigned N  = edge_of(t);
    localparam int unsigned IW = $clog2(N);
    sample_t tr_wr [N];
    sample_t tr_rd [N];
    sample_t om_wr [N];

    always_comb
      for (int i = 0; i < int'(N); i++) begin
        tr_wr[i] = p1_wr_data[i];
        om_wr[i] = p2_wr_data[i];
      end

    transpose_memory #(.N(N)) u_transpose (
      .clk,
      .wr_en(p1_wr_en && (p1_type == tu_type_e'(t))), .wr_bank(p1_tr_bank),
      .wr_row(p1_wr_row[IW-1:0]), .wr_data(tr_wr),
      .rd_en(p2_rd_en && (p2_type == tu_type_e'(t))), .rd_bank(p2_tr_bank),
      .rd_col(p2_rd_col[IW-1:0]), .rd_data(tr_rd)
    );

    always_comb
      for (int i = 0; i < 32; i++)
        tr_rd_data[t][i] = (i < int'(N)) ? tr_rd[i % N] : '0;

    output_memory #(.N(N)) u_output (
      .clk,
      .wr_en(p2_wr_en && (p2_type == tu_type_e'(t))), .wr_bank(p2_out_bank),
      .wr_row(p2_wr_row[IW-1:0]), .wr_data(om_wr),
      .rd_en(tout_rd_en && (tout_type == tu_type_e'(t))), .rd_bank(tout_bank),
      .rd_row(tout_row[IW-1:0]), .rd_col(tout_col[IW-1:0]), .rd_data(om_rd_data[t])
    );
  end

  // ---- stats FIFO --------------------------------------------------------------
  logic [CW-1:0] fst_count;
  logic [STATS_W-1:0] stats_bits;

  sync_fifo #(.WIDTH(STATS_W), .DEPTH(FIFO_DEPTH)) u_stats_fifo (
    .clk, .rst_n,
    .in_valid(stats_push), .in_ready(stats_room), .in_data(stats_rec),
    .out_valid(stats_valid), .out_ready(stats_ready), .out_data(stats_bits),
    .count(fst_count)
  );

  assign stats_data = stats_t'(stats_bits);

  // transfer_output never pushes into a full FIFO.
  assert property (@(posedge clk) disable iff (!rst_n) tout_push |-> fout_ready);

endmodule
