// itr_1d_stage - one 1D inverse-transform pass over a whole TU.
//
// This is one of the two transform processes of the co-processor (the first
// pass, reading coefficients and writing the transpose memory, or the second
// pass, reading the transpose memory and writing the output memory). It
// holds the five 1D units of one column of the architecture - 4x4 IDST and
// 4/8/16/32-point IDCT - and runs the column loop of the selected one:
// column j of the source block is read in clock j, goes through the unit,
// and the unit's N results are written as row j of the destination block.
// Writing the results of column j as row j is what makes two passes of
// "transform the columns" compute Y = T^T X T.
//
// Interface: a `start` pulse while !busy launches one TU of type start_type;
// `shift` is the rounding shift of this pass. rd_en/rd_col ask the source
// memory for a column; rd_data must hold it the clock after rd_en (entries
// above N-1 are ignored). wr_en/wr_row/wr_data write one result row
// (entries above N-1 are zero). `done` pulses for one clock after the last
// row is written, and busy drops in the same clock.
//
// Timing: columns are issued back to back (rate 1), the units have a latency
// of 2 and the read a latency of 1, so a TU of edge N takes N + 4 clocks from
// start to done.
//
// Reading one column per clock from a memory split by rows and running the
// units at rate 1 follows the published design; the sequencer, its start and
// done handshake and the timing are this design's own.
module itr_1d_stage
  import hevc_it_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  tu_type_e   start_type,
  input  logic [4:0] shift,
  output logic       busy,
  output logic       done,
  output logic       rd_en,
  output logic [4:0] rd_col,
  input  sample_t    rd_data [32],
  output logic       wr_en,
  output logic [4:0] wr_row,
  output sample_t    wr_data [32]
);

  tu_type_e    type_q;
  logic [5:0]  size_q;
  logic [5:0]  rd_cnt;
  logic [5:0]  wr_cnt;
  logic        col_valid;    // rd_data holds a column for the units

  assign rd_en  = busy && (rd_cnt < size_q);
  assign rd_col = rd_cnt[4:0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      done      <= 1'b0;
      type_q    <= TU_DST4;
      size_q    <= 6'd4;
      rd_cnt    <= '0;
      wr_cnt    <= '0;
      col_valid <= 1'b0;
    end else begin
      done      <= 1'b0;
      col_valid <= rd_en;
      if (start && !busy) begin
        busy   <= 1'b1;
        type_q <= start_type;
        size_q <= 6'(tu_size(start_type));
        rd_cnt <= '0;
        wr_cnt <= '0;
      end else begin
        if (rd_en) rd_cnt <= rd_cnt + 6'd1;
        if (wr_en) begin
          wr_cnt <= wr_cnt + 6'd1;
          if (wr_cnt == size_q - 6'd1) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
      end
    end
  end

  // ---- the five 1D units ------------------------------------------------
  logic    dst_in_v,  dst_out_v;
  sample_t dst_in [4], dst_out [4];

  always_comb
    for (int i = 0; i < 4; i++) dst_in[i] = rd_data[i];

  assign dst_in_v = col_valid && (type_q == TU_DST4);

  idst4_1d u_idst4 (
    .clk, .rst_n, .in_valid(dst_in_v), .in_col(dst_in), .shift,
    .out_valid(dst_out_v), .out_row(dst_out)
  );

  logic    dct_out_v [4];
  sample_t dct_out   [4][32];

  for (genvar g = 0; g < 4; g++) begin : g_dct
    localparam int unsigned N = 4 << g;
    localparam tu_type_e    T = tu_type_e'(g + 1);
    sample_t in_col  [N];
    sample_t out_row [N];

    always_comb
      for (int i = 0; i < int'(N); i++) in_col[i] = rd_data[i];

    idct_1d #(.N(N)) u_idct (
      .clk, .rst_n, .in_valid(col_valid && (type_q == T)), .in_col, .shift,
      .out_valid(dct_out_v[g]), .out_row
    );

    always_comb
      for (int i = 0; i < 32; i++)
        dct_out[g][i] = (i < int'(N)) ? out_row[i % N] : '0;
  end

  // ---- result row -------------------------------------------------------
  always_comb begin
    wr_en = 1'b0;
    for (int i = 0; i < 32; i++) wr_data[i] = '0;
    case (type_q)
      TU_DST4: begin
        wr_en = dst_out_v;
        for (int i = 0; i < 4; i++) wr_data[i] = dst_out[i];
      end
      TU_DCT4:  begin wr_en = dct_out_v[0]; wr_data = dct_out[0]; end
      TU_DCT8:  begin wr_en = dct_out_v[1]; wr_data = dct_out[1]; end
      TU_DCT16: begin wr_en = dct_out_v[2]; wr_data = dct_out[2]; end
      default:  begin wr_en = dct_out_v[3]; wr_data = dct_out[3]; end
    endcase
  end

  assign wr_row = wr_cnt[4:0];

  // The sequencer only accepts a TU when idle.
  assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);

endmodule
