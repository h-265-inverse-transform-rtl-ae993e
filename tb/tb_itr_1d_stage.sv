// tb_itr_1d_stage - checks one 1D pass over whole TUs of every type.
//
// A behavioural source memory answers each column read one clock later; the
// written rows are collected and compared with a direct matrix product
// (out row j, entry n = R(sum_k T[k][n] * src[k][j]) with rounding shift and
// 16-bit clip). Both shifts of the design (7 and 12) are used, every TU type
// is run several times with random and full-scale data, and the clocks from
// start to done must be N + 4 with one write per clock (rate 1).
module tb_itr_1d_stage;
  import hevc_it_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       start = 1'b0;
  tu_type_e   start_type = TU_DST4;
  logic [4:0] shift = 5'd7;
  logic       busy, done, rd_en, wr_en;
  logic [4:0] rd_col, wr_row;
  sample_t    rd_data [32];
  sample_t    wr_data [32];

  always #5 clk = ~clk;

  itr_1d_stage dut (.*);

  int checks = 0;
  int failures = 0;
  int src [32][32];
  int got [32][32];
  int writes = 0;

  always_ff @(posedge clk) begin
    if (rd_en)
      for (int r = 0; r < 32; r++) rd_data[r] <= sample_t'(src[r][rd_col]);
    if (wr_en) begin
      for (int c = 0; c < 32; c++) got[wr_row][c] <= int'(wr_data[c]);
      writes <= writes + 1;
    end
  end

  function automatic int tsz(tu_type_e t);
    case (t)
      TU_DCT8:  return 8;
      TU_DCT16: return 16;
      TU_DCT32: return 32;
      default:  return 4;
    endcase
  endfunction

  function automatic int mat(tu_type_e t, int k, int n);
    return (t == TU_DST4) ? dst_coef(k, n) : dct_coef(tsz(t), k, n);
  endfunction

  function automatic int rclip(longint s, int sh);
    longint v = (s + (longint'(1) << (sh - 1))) >>> sh;
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : int'(v);
  endfunction

  task automatic run(tu_type_e t, int sh, int mode);
    int n = tsz(t);
    int t0, t1;
    longint s;
    for (int r = 0; r < 32; r++)
      for (int c = 0; c < 32; c++)
        src[r][c] = (mode == 1) ? ($urandom_range(0, 1) ? 32767 : -32768)
                                : int'($urandom_range(0, 8191)) - 4096;
    @(negedge clk);
    start      = 1'b1;
    start_type = t;
    shift      = 5'(sh);
    t0 = $time;
    writes = 0;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    t1 = $time;
    checks += 2;
    if ((t1 - t0) / 10 != n + 4) begin
      failures++;
      $display("type %0d: %0d clocks, expected %0d", t, (t1 - t0) / 10, n + 4);
    end
    if (writes != n) begin
      failures++;
      $display("type %0d: %0d row writes, expected %0d", t, writes, n);
    end
    for (int j = 0; j < n; j++)
      for (int m = 0; m < n; m++) begin
        s = 0;
        for (int k = 0; k < n; k++) s += longint'(mat(t, k, m)) * src[k][j];
        checks++;
        if (got[j][m] != rclip(s, sh)) begin
          failures++;
          if (failures < 10)
            $display("type %0d shift %0d row %0d col %0d: %0d expected %0d",
                     t, sh, j, m, got[j][m], rclip(s, sh));
        end
      end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int rep = 0; rep < 3; rep++)
      for (int t = 0; t < 5; t++) begin
        run(tu_type_e'(t), 7, 0);
        run(tu_type_e'(t), 12, 0);
        run(tu_type_e'(t), 7, 1);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
