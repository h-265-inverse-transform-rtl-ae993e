// tb_output_memory - checks the row-write / word-read residual store.
//
// For N = 32 (default) and N = 8, whole rows are written into both halves,
// then every word of both halves is read back-to-back in raster order and
// compared one clock after its read request.
module tb_output_memory;
  import hevc_it_pkg::*;

  logic clk = 1'b0;
  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  for (genvar g = 0; g < 2; g++) begin : g_n
    localparam int N = (g == 0) ? 32 : 8;
    localparam int W = $clog2(N);
    logic         wr_en = 1'b0, wr_bank = 1'b0, rd_en = 1'b0, rd_bank = 1'b0;
    logic [W-1:0] wr_row = '0, rd_row = '0, rd_col = '0;
    sample_t      wr_data [N];
    sample_t      rd_data;
    int           blk [2][N][N];
    int           exp_q [$];
    logic         rd_q = 1'b0;
    int           ck = 0, fl = 0;
    bit           fin = 1'b0;

    output_memory #(.N(N)) dut (.clk, .wr_en, .wr_bank, .wr_row, .wr_data,
                                .rd_en, .rd_bank, .rd_row, .rd_col, .rd_data);

    always_ff @(posedge clk) begin
      rd_q <= rd_en;
      if (rd_q) begin
        ck <= ck + 1;
        if (int'(rd_data) != exp_q[0]) begin
          fl <= fl + 1;
          $display("N=%0d read %0d, expected %0d", N, rd_data, exp_q[0]);
        end
        void'(exp_q.pop_front());
      end
    end

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
      for (int b = 1; b >= 0; b--)
        for (int r = 0; r < N; r++)
          for (int c = 0; c < N; c++) begin
            @(negedge clk);
            rd_en = 1'b1; rd_bank = b[0]; rd_row = W'(r); rd_col = W'(c);
            exp_q.push_back(blk[b][r][c]);
          end
      @(negedge clk);
      rd_en = 1'b0;
      repeat (2) @(negedge clk);
      fin = 1'b1;
    end
  end

  initial begin
    wait (g_n[0].fin && g_n[1].fin);
    checks = g_n[0].ck + g_n[1].ck;
    failures = g_n[0].fl + g_n[1].fl;
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
