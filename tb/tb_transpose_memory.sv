// tb_transpose_memory - checks the row-write / column-read transpose store.
//
// For N = 32 (default) and N = 4, whole rows are written into both halves,
// then every column of both halves is read and compared one clock later.
// A read and a write in the same clock to different halves are also tried.
module tb_transpose_memory;
  import hevc_it_pkg::*;

  logic clk = 1'b0;
  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  for (genvar g = 0; g < 2; g++) begin : g_n
    localparam int N = (g == 0) ? 32 : 4;
    localparam int W = $clog2(N);
    logic         wr_en = 1'b0, wr_bank = 1'b0, rd_en = 1'b0, rd_bank = 1'b0;
    logic [W-1:0] wr_row = '0, rd_col = '0;
    sample_t      wr_data [N];
    sample_t      rd_data [N];
    int           blk [2][N][N];
    bit           fin = 1'b0;

    transpose_memory #(.N(N)) dut (.clk, .wr_en, .wr_bank, .wr_row, .wr_data,
                                   .rd_en, .rd_bank, .rd_col, .rd_data);

    initial begin
      for (int b = 0; b < 2; b++)
        for (int r = 0; r < N; r++) begin
          @(negedge clk);
          wr_en = 1'b1; wr_bank = b[0]; wr_row = W'(r);
          for (int c = 0; c < N; c++) begin
            blk[b][r][c] = int'($urandom_range(0, 65535)) - 32768;
            wr_data[c] = sample_t'(blk[b][r][c]);
          end
        end
      @(negedge clk);
      wr_en = 1'b0;
      for (int b = 0; b < 2; b++)
        for (int c = 0; c < N; c++) begin
          @(negedge clk);
          rd_en = 1'b1; rd_bank = b[0]; rd_col = W'(c);
          // rewrite row 0 of the other half at the same time
          wr_en = 1'b1; wr_bank = !b[0]; wr_row = '0;
          for (int i = 0; i < N; i++) wr_data[i] = sample_t'(blk[!b][0][i]);
          @(negedge clk);
          rd_en = 1'b0; wr_en = 1'b0;
          for (int r = 0; r < N; r++) begin
            checks++;
            if (int'(rd_data[r]) != blk[b][r][c]) begin
              failures++;
              if (failures < 10) $display("N=%0d bank %0d [%0d][%0d] = %0d, expected %0d",
                                          N, b, r, c, rd_data[r], blk[b][r][c]);
            end
          end
        end
      fin = 1'b1;
    end
  end

  initial begin
    wait (g_n[0].fin && g_n[1].fin);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
