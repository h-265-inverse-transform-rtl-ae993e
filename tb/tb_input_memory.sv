// tb_input_memory - checks the column-read coefficient memory.
//
// Two different random 32x32 blocks are written one word per clock into
// the two halves; then every column of both halves is read back-to-back and
// compared, one clock after each read request. A read of one half during a
// write into the other half must return the old contents.
module tb_input_memory;
  import hevc_it_pkg::*;

  logic       clk = 1'b0;
  logic       wr_en = 1'b0, wr_bank = 1'b0, rd_en = 1'b0, rd_bank = 1'b0;
  logic [4:0] wr_row = '0, wr_col = '0, rd_col = '0;
  sample_t    wr_data = '0;
  sample_t    rd_data [32];
  int checks = 0;
  int failures = 0;
  int blk [2][32][32];

  always #5 clk = ~clk;

  input_memory dut (.*);

  task automatic check_col(int b, int c);
    @(negedge clk);
    rd_en = 1'b1; rd_bank = b[0]; rd_col = 5'(c);
    @(negedge clk);
    rd_en = 1'b0;
    for (int r = 0; r < 32; r++) begin
      checks++;
      if (int'(rd_data[r]) != blk[b][r][c]) begin
        failures++;
        if (failures < 10) $display("bank %0d [%0d][%0d] = %0d, expected %0d", b, r, c, rd_data[r], blk[b][r][c]);
      end
    end
  endtask

  initial begin
    for (int b = 0; b < 2; b++)
      for (int r = 0; r < 32; r++)
        for (int c = 0; c < 32; c++) begin
          blk[b][r][c] = int'($urandom_range(0, 65535)) - 32768;
          @(negedge clk);
          wr_en = 1'b1; wr_bank = b[0]; wr_row = 5'(r); wr_col = 5'(c);
          wr_data = sample_t'(blk[b][r][c]);
        end
    @(negedge clk);
    wr_en = 1'b0;
    for (int b = 0; b < 2; b++)
      for (int c = 0; c < 32; c++) check_col(b, c);
    // overwrite half 1 while reading half 0
    @(negedge clk);
    wr_en = 1'b1; wr_bank = 1'b1; wr_row = 5'd3; wr_col = 5'd7; wr_data = 16'sd1234;
    rd_en = 1'b1; rd_bank = 1'b0; rd_col = 5'd7;
    @(negedge clk);
    wr_en = 1'b0; rd_en = 1'b0;
    checks++;
    if (int'(rd_data[3]) != blk[0][3][7]) begin
      failures++;
      $display("half 0 disturbed by a write to half 1");
    end
    blk[1][3][7] = 1234;
    check_col(1, 7);
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
