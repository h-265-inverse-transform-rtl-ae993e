// tb_hevc_itr_top - end-to-end test of the inverse transform co-processor.
//
// Streams 110 TUs of all five types through the top at its default
// parameters and checks every residual against a direct matrix-product
// model of the two rounded and clipped 1D passes (Y = T^T X T), every header
// word, and every duration record (both passes must take N + 4 clocks and
// their sum must not exceed the per-size 2D durations of the reference
// implementation: 47, 47, 197, 812 and 2541 clocks).
//
// The stimulus is shaped so that every flow-control path is taken: the stats
// reader is held off until records pile up, the residual reader is stalled
// for a while and then reads at random, some TUs carry full-scale
// coefficients so that the clip saturates, and the coefficient stream has
// random gaps. Each of these events is counted from inside the design and a
// failure is counted for any that never happened.
module tb_hevc_itr_top;
  import hevc_it_pkg::*;

  localparam int NTU = 110;
  localparam int WATCHDOG = 400000;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        in_valid = 1'b0;
  logic        in_ready;
  logic [31:0] in_data = '0;
  logic        out_valid;
  logic        out_ready = 1'b0;
  logic [31:0] out_data;
  logic        stats_valid;
  logic        stats_ready = 1'b0;
  stats_t      stats_data;

  always #5 clk = ~clk;

  hevc_itr_top dut (.*);

  int checks = 0;
  int failures = 0;
  int cycle = 0;

  tu_type_e tu_t [NTU];
  int       coef [NTU][32][32];
  int       exp_res [32][32];
  bit       exp_clipped;

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

  function automatic int ref_2d_cycles(tu_type_e t);
    case (t)
      TU_DST4:  return 47;
      TU_DCT4:  return 47;
      TU_DCT8:  return 197;
      TU_DCT16: return 812;
      default:  return 2541;
    endcase
  endfunction

  function automatic int rclip(longint s, int sh, ref bit clipped);
    longint v;
    v = (s + (longint'(1) << (sh - 1))) >>> sh;
    if (v > 32767)  begin clipped = 1'b1; return 32767;  end
    if (v < -32768) begin clipped = 1'b1; return -32768; end
    return int'(v);
  endfunction

  // Reference: tmp[j][n] = R7(sum_k T[k][n] X[k][j]); res[j][n] = R12(sum_k T[k][n] tmp[k][j]).
  function automatic void ref2d(int idx);
    int n = tsz(tu_t[idx]);
    int tmp [32][32];
    longint s;
    exp_clipped = 1'b0;
    for (int j = 0; j < n; j++)
      for (int m = 0; m < n; m++) begin
        s = 0;
        for (int k = 0; k < n; k++) s += longint'(mat(tu_t[idx], k, m)) * coef[idx][k][j];
        tmp[j][m] = rclip(s, 7, exp_clipped);
      end
    for (int j = 0; j < n; j++)
      for (int m = 0; m < n; m++) begin
        s = 0;
        for (int k = 0; k < n; k++) s += longint'(mat(tu_t[idx], k, m)) * tmp[k][j];
        exp_res[j][m] = rclip(s, 12, exp_clipped);
      end
  endfunction

  // ---- stimulus ------------------------------------------------------------
  initial begin
    int n;
    for (int i = 0; i < NTU; i++) begin
      if (i < 10)       tu_t[i] = tu_type_e'(i % 5);
      else if (i < 90)  tu_t[i] = tu_type_e'(i % 2);
      else              tu_t[i] = tu_type_e'($urandom_range(0, 4));
      n = tsz(tu_t[i]);
      for (int r = 0; r < 32; r++)
        for (int c = 0; c < 32; c++) begin
          if (r >= n || c >= n)       coef[i][r][c] = 0;
          else if (i % 7 == 3)        coef[i][r][c] = $urandom_range(0, 1) ? 32767 : -32768;
          else if ($urandom_range(0, 3) == 0) coef[i][r][c] = int'($urandom_range(0, 4095)) - 2048;
          else                        coef[i][r][c] = int'($urandom_range(0, 63)) - 32;
        end
    end
  end

  // Driven at the falling edge: in_ready is stable then, and a word whose
  // in_ready is high is taken at the following rising edge.
  task automatic send_word(logic [31:0] w);
    while ($urandom_range(0, 9) == 0) @(negedge clk);
    in_valid = 1'b1;
    in_data  = w;
    while (!in_ready) @(negedge clk);
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  initial begin
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int i = 0; i < NTU; i++) begin
      send_word({29'd0, tu_t[i]});
      for (int r = 0; r < tsz(tu_t[i]); r++)
        for (int c = 0; c < tsz(tu_t[i]); c++)
          send_word(32'(coef[i][r][c]));
    end
  end

  // ---- residual reader -----------------------------------------------------
  int  out_tu = 0;
  int  out_pos = -1;     // -1: expecting the header
  int  clip_tus = 0;
  int  type_seen [5] = '{default: 0};

  always_ff @(posedge clk) begin
    cycle <= cycle + 1;
    // stalled from clock 300 to 1300, random afterwards
    out_ready <= (cycle < 300) ? 1'b1 : (cycle < 1300) ? 1'b0 : ($urandom_range(0, 3) != 0);
    if (rst_n && out_valid && out_ready) begin
      if (out_tu >= NTU) begin
        failures <= failures + 1;
        $display("extra output word %h", out_data);
      end else if (out_pos < 0) begin
        checks <= checks + 1;
        if (out_data != {29'd0, tu_t[out_tu]}) begin
          failures <= failures + 1;
          $display("TU %0d: header %h, expected type %0d", out_tu, out_data, tu_t[out_tu]);
        end
        ref2d(out_tu);
        if (exp_clipped) clip_tus <= clip_tus + 1;
        type_seen[tu_t[out_tu]] <= type_seen[tu_t[out_tu]] + 1;
        out_pos <= 0;
      end else begin
        automatic int n = tsz(tu_t[out_tu]);
        automatic int r = out_pos / n;
        automatic int c = out_pos % n;
        checks <= checks + 1;
        if ($signed(out_data) != exp_res[r][c]) begin
          failures <= failures + 1;
          if (failures < 10)
            $display("TU %0d (type %0d) res[%0d][%0d] = %0d, expected %0d",
                     out_tu, tu_t[out_tu], r, c, $signed(out_data), exp_res[r][c]);
        end
        if (out_pos == n * n - 1) begin
          out_pos <= -1;
          out_tu  <= out_tu + 1;
        end else begin
          out_pos <= out_pos + 1;
        end
      end
    end
  end

  // ---- stats reader --------------------------------------------------------
  int stats_tu = 0;
  int stats_stalls = 0;
  int st_checks = 0;     // kept apart from the residual reader's counters
  int st_failures = 0;

  always_ff @(posedge clk) begin
    // held off until the stats FIFO has stopped the second pass for a while
    if (stats_stalls > 50 || cycle > 150000) stats_ready <= 1'b1;
    if (rst_n && stats_valid && stats_ready) begin
      automatic int n = tsz(tu_t[stats_tu]);
      st_checks <= st_checks + 4;
      if (stats_data.tu_type != tu_t[stats_tu]) begin
        st_failures <= st_failures + 1;
        $display("stats %0d: type %0d expected %0d", stats_tu, stats_data.tu_type, tu_t[stats_tu]);
      end
      if (int'(stats_data.p1_cycles) != n + 4 || int'(stats_data.p2_cycles) != n + 4) begin
        st_failures <= st_failures + 1;
        $display("stats %0d: p1 %0d p2 %0d, expected %0d", stats_tu,
                 stats_data.p1_cycles, stats_data.p2_cycles, n + 4);
      end
      if (int'(stats_data.p1_cycles) + int'(stats_data.p2_cycles) > ref_2d_cycles(tu_t[stats_tu])) begin
        st_failures <= st_failures + 1;
        $display("stats %0d: 2D duration above the reference", stats_tu);
      end
      if (int'(stats_data.total_cycles) < int'(stats_data.p1_cycles) + int'(stats_data.p2_cycles)) begin
        st_failures <= st_failures + 1;
        $display("stats %0d: total %0d below p1+p2", stats_tu, stats_data.total_cycles);
      end
      stats_tu <= stats_tu + 1;
    end
  end

  // ---- mechanism counters --------------------------------------------------
  int in_bank_used [2] = '{0, 0};
  int in_full_stall = 0;      // a header waits for a free input-memory half
  int tr_full_stall = 0;      // P1 waits for a free transpose half
  int out_full_stall = 0;     // P2 waits for a free output-memory half
  int fifo_full_wait = 0;     // transfer_output waits for output FIFO room
  int out_stream_stall = 0;   // residual reader not ready
  int overlap = 0;            // both passes busy on different TUs
  int gap = 0;                // coefficient stream idle while the design could take a word

  always_ff @(posedge clk) begin
    if (rst_n) begin
      if (dut.tu_in_done) in_bank_used[dut.in_wr_bank] <= in_bank_used[dut.in_wr_bank] + 1;
      if (dut.u_transfer_in.state == 1'b0 && dut.fin_valid && !dut.in_bank_free)
        in_full_stall <= in_full_stall + 1;
      if (!dut.u_controller.p1_active && dut.u_controller.in_full[dut.u_controller.in_rd]
          && dut.u_controller.tr_cnt[dut.p1_start_type] == 2'd2)
        tr_full_stall <= tr_full_stall + 1;
      if (!dut.u_controller.p2_active && dut.u_controller.q12_valid
          && dut.u_controller.out_cnt[dut.p2_start_type] == 2'd2)
        out_full_stall <= out_full_stall + 1;
      if (!dut.u_controller.p2_active && dut.u_controller.q12_valid && !dut.stats_room)
        stats_stalls <= stats_stalls + 1;
      if (dut.u_transfer_out.state == 2'd2 && !dut.tout_rd_en)
        fifo_full_wait <= fifo_full_wait + 1;
      if (out_valid && !out_ready) out_stream_stall <= out_stream_stall + 1;
      if (dut.p1_busy && dut.p2_busy) overlap <= overlap + 1;
      if (!in_valid && in_ready) gap <= gap + 1;
    end
  end

  task automatic mechanism(string name, int count);
    $display("  %-34s %0d", name, count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("  mechanism never exercised: %s", name);
    end
  endtask

  initial begin
    wait (out_tu == NTU && stats_tu == NTU);
    repeat (20) @(posedge clk);
    checks += st_checks;
    failures += st_failures;
    $display("finished after %0d clocks", cycle);
    mechanism("TUs 4x4 DST", type_seen[0]);
    mechanism("TUs 4x4 DCT", type_seen[1]);
    mechanism("TUs 8x8 DCT", type_seen[2]);
    mechanism("TUs 16x16 DCT", type_seen[3]);
    mechanism("TUs 32x32 DCT", type_seen[4]);
    mechanism("input half 0 filled", in_bank_used[0]);
    mechanism("input half 1 filled", in_bank_used[1]);
    mechanism("input memory full (stream held)", in_full_stall);
    mechanism("transpose memory full (P1 held)", tr_full_stall);
    mechanism("output memory full (P2 held)", out_full_stall);
    mechanism("stats FIFO full (P2 held)", stats_stalls);
    mechanism("output FIFO full (transfer held)", fifo_full_wait);
    mechanism("residual reader stall", out_stream_stall);
    mechanism("P1 and P2 overlapping", overlap);
    mechanism("TUs with clipping", clip_tus);
    mechanism("idle input stream", gap);
    if (out_valid || stats_valid) begin
      failures++;
      $display("words left in the output streams");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog: %0d of %0d TUs out, %0d stats", out_tu, NTU, stats_tu);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
