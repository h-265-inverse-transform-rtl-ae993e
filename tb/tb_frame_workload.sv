// tb_frame_workload - Full HD frames' worth of TUs through the top.
//
// Runs six frames through the top at its default parameters, with every
// stream at full rate: a coefficient is offered on every clock and the
// residual and stats readers never stall.
//   frame 0: 14,500 TUs, the TU count of a 1920x1080 frame, in a mix that
//            repeats a 20-TU pattern (3 of 32x32, 4 of 16x16, 6 of 8x8,
//            4 DCT 4x4, 3 DST 4x4), about 230 samples per TU, somewhat more
//            than a 4:2:0 Full HD frame carries;
//   frames 1-5: a 1920x1080 luma frame tiled with one TU type only
//            (129,600 DST 4x4, 129,600 DCT 4x4, 32,400 DCT 8x8, 8,100 DCT
//            16x16 and 2,025 DCT 32x32 TUs).
//
// Every residual, header and duration record is checked against the same
// direct matrix-product model as the end-to-end test. The pipeline is
// drained between frames and each frame's time (first coefficient in to
// last residual out) is measured and checked:
//   - the mixed frame must fit a 30 frames/s budget at 200 MHz and keep the
//     streams busy (no more than 2% above one clock per input word);
//   - each single-type frame must reach at least the frame rate of the
//     reference implementation for that TU type at 200 MHz (32.8, 32.8,
//     31.3, 30.4 and 38.6 frames/s).
// Coefficients are a hash of (TU, row, column), so the model regenerates
// them instead of storing the frames.
module tb_frame_workload;
  import hevc_it_pkg::*;

  localparam int NFRAMES = 6;
  localparam int FRAME_TUS [NFRAMES] = '{14500, 129600, 129600, 32400, 8100, 2025};
  localparam string FRAME_NAME [NFRAMES] = '{"mixed", "DST 4x4", "DCT 4x4", "DCT 8x8", "DCT 16x16", "DCT 32x32"};
  localparam int NTU = 14500 + 129600 + 129600 + 32400 + 8100 + 2025;
  localparam int WATCHDOG = 30000000;
  localparam int BUDGET_30FPS = 6666666;
  // reference implementation, frames/s at 200 MHz for frames 1..5 (x10)
  localparam int REF_FPS10 [NFRAMES] = '{300, 328, 328, 313, 304, 386};

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        in_valid = 1'b0;
  logic        in_ready;
  logic [31:0] in_data = '0;
  logic        out_valid;
  logic        out_ready = 1'b1;
  logic [31:0] out_data;
  logic        stats_valid;
  logic        stats_ready = 1'b1;
  stats_t      stats_data;

  always #5 clk = ~clk;

  hevc_itr_top dut (.*);

  int checks = 0;
  int failures = 0;
  int cycle = 0;
  int exp_res [32][32];

  function automatic int frame_of(int i);
    int f = 0;
    int first = 0;
    while (f < NFRAMES - 1 && i >= first + FRAME_TUS[f]) begin
      first += FRAME_TUS[f];
      f++;
    end
    return f;
  endfunction

  function automatic tu_type_e tu_of(int i);
    if (i >= FRAME_TUS[0]) return tu_type_e'(frame_of(i) - 1);
    case (i % 20)
      0, 7, 14:             return TU_DCT32;
      1, 5, 10, 16:         return TU_DCT16;
      2, 4, 8, 11, 15, 18:  return TU_DCT8;
      3, 9, 13, 19:         return TU_DCT4;
      default:              return TU_DST4;
    endcase
  endfunction

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

  // Coefficient of TU i at (r, c): mostly small, with a sparse set of large
  // values and, in every 50th TU, full-scale values that make the clip act.
  function automatic int coef_of(int i, int r, int c);
    logic [31:0] h;
    h = 32'(i) * 32'h9e3779b1 ^ 32'(r * 32 + c) * 32'h85ebca6b;
    h = (h ^ (h >> 15)) * 32'h2c1b3c6d;
    h = h ^ (h >> 13);
    if (i % 50 == 7)        return h[0] ? 32767 : -32768;
    if (h[7:4] == 4'd0)     return int'(h[27:16]) - 2048;
    return int'(h[21:16]) - 32;
  endfunction

  function automatic int rclip(longint s, int sh);
    longint v;
    v = (s + (longint'(1) << (sh - 1))) >>> sh;
    if (v > 32767)  return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  function automatic void ref2d(int idx);
    tu_type_e t = tu_of(idx);
    int n = tsz(t);
    int x [32][32];
    int tmp [32][32];
    longint s;
    for (int r = 0; r < n; r++)
      for (int c = 0; c < n; c++) x[r][c] = coef_of(idx, r, c);
    for (int j = 0; j < n; j++)
      for (int m = 0; m < n; m++) begin
        s = 0;
        for (int k = 0; k < n; k++) s += longint'(mat(t, k, m)) * x[k][j];
        tmp[j][m] = rclip(s, 7);
      end
    for (int j = 0; j < n; j++)
      for (int m = 0; m < n; m++) begin
        s = 0;
        for (int k = 0; k < n; k++) s += longint'(mat(t, k, m)) * tmp[k][j];
        exp_res[j][m] = rclip(s, 12);
      end
  endfunction

  // ---- stimulus: one word offered on every clock ---------------------------
  longint words_in [NFRAMES] = '{default: 0};
  int     first_in [NFRAMES] = '{default: -1};
  int     last_out [NFRAMES] = '{default: 0};
  int     frames_done = 0;

  task automatic send_word(int f, logic [31:0] w);
    in_valid = 1'b1;
    in_data  = w;
    while (!in_ready) @(negedge clk);
    if (first_in[f] < 0) first_in[f] = cycle;
    words_in[f]++;
    @(negedge clk);
  endtask

  initial begin
    tu_type_e t;
    int i;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    i = 0;
    for (int f = 0; f < NFRAMES; f++) begin
      for (int k = 0; k < FRAME_TUS[f]; k++) begin
        t = tu_of(i);
        send_word(f, {29'd0, t});
        for (int r = 0; r < tsz(t); r++)
          for (int c = 0; c < tsz(t); c++)
            send_word(f, 32'(coef_of(i, r, c)));
        i++;
      end
      in_valid = 1'b0;
      wait (out_tu == i && stats_tu == i);   // drain before the next frame
      frames_done = f + 1;
      @(negedge clk);
    end
  end

  // ---- residual reader -----------------------------------------------------
  int out_tu = 0;
  int out_pos = -1;

  always_ff @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && out_valid && out_ready) begin
      last_out[frame_of(out_tu < NTU ? out_tu : NTU - 1)] <= cycle;
      if (out_tu >= NTU) begin
        failures <= failures + 1;
        $display("extra output word %h", out_data);
      end else if (out_pos < 0) begin
        checks <= checks + 1;
        if (out_data != {29'd0, tu_of(out_tu)}) begin
          failures <= failures + 1;
          $display("TU %0d: header %h, expected type %0d", out_tu, out_data, tu_of(out_tu));
        end
        ref2d(out_tu);
        out_pos <= 0;
      end else begin
        automatic int n = tsz(tu_of(out_tu));
        automatic int r = out_pos / n;
        automatic int c = out_pos % n;
        checks <= checks + 1;
        if ($signed(out_data) != exp_res[r][c]) begin
          failures <= failures + 1;
          if (failures < 10)
            $display("TU %0d res[%0d][%0d] = %0d, expected %0d",
                     out_tu, r, c, $signed(out_data), exp_res[r][c]);
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
  int st_checks = 0;     // kept apart from the residual reader's counters
  int st_failures = 0;

  always_ff @(posedge clk) begin
    if (rst_n && stats_valid && stats_ready) begin
      automatic int n = tsz(tu_of(stats_tu));
      st_checks <= st_checks + 2;
      if (stats_data.tu_type != tu_of(stats_tu)) begin
        st_failures <= st_failures + 1;
        $display("stats %0d: type %0d expected %0d", stats_tu, stats_data.tu_type, tu_of(stats_tu));
      end
      if (int'(stats_data.p1_cycles) != n + 4 || int'(stats_data.p2_cycles) != n + 4) begin
        st_failures <= st_failures + 1;
        $display("stats %0d: p1 %0d p2 %0d, expected %0d", stats_tu,
                 stats_data.p1_cycles, stats_data.p2_cycles, n + 4);
      end
      stats_tu <= stats_tu + 1;
    end
  end

  initial begin
    int frame;
    int fps10;
    wait (frames_done == NFRAMES);
    repeat (20) @(posedge clk);
    for (int f = 0; f < NFRAMES; f++) begin
      frame = last_out[f] - first_in[f] + 1;
      fps10 = int'(2000.0e6 / frame);
      $display("frame %0d: %0d TUs (%s), %0d input words, %0d clocks, %0.2f ms, %0.1f frames/s at 200 MHz",
               f, FRAME_TUS[f], FRAME_NAME[f],
               words_in[f], frame, frame / 200.0e3, 200.0e6 / frame);
      checks++;
      if (f == 0) begin
        checks += 1;
        if (frame > BUDGET_30FPS) begin
          failures++;
          $display("  frame time above the 30 frames/s budget");
        end
        if (longint'(frame) * 100 > words_in[f] * 102) begin
          failures++;
          $display("  streams idle for more than 2%% of the frame");
        end
      end else if (fps10 < REF_FPS10[f]) begin
        failures++;
        $display("  below the reference rate of %0d.%0d frames/s", REF_FPS10[f] / 10, REF_FPS10[f] % 10);
      end
    end
    if (out_valid || stats_valid) begin
      failures++;
      $display("words left in the output streams");
    end
    checks += st_checks;
    failures += st_failures;
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
