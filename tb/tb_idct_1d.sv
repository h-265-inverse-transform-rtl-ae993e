// tb_idct_1d - checks the N-point 1D inverse DCT for N = 4, 8, 16, 32.
//
// Each size gets a back-to-back stream of random columns (some full-scale,
// to hit the clip) with shift 7, then with shift 12. Outputs must appear
// exactly two clocks after their inputs, one per clock, and equal the
// direct matrix product sum_k T_N[k][n] * in[k] rounded and clipped.
module tb_idct_1d;
  import hevc_it_pkg::*;

  localparam int NCOL = 40;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic [4:0] shift = 5'd7;
  logic       in_valid = 1'b0;
  sample_t    col [32];
  int checks = 0;
  int failures = 0;
  int cyc = 0;

  always #5 clk = ~clk;
  always_ff @(posedge clk) cyc <= cyc + 1;

  int stim [NCOL][32];
  int stim_cyc [NCOL];

  function automatic int rclip(longint s, int sh);
    longint v = (s + (longint'(1) << (sh - 1))) >>> sh;
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : int'(v);
  endfunction

  for (genvar g = 0; g < 4; g++) begin : g_n
    localparam int N = 4 << g;
    sample_t in_col [N];
    sample_t out_row [N];
    logic    out_valid;
    int      idx = 0;
    int      ck = 0, fl = 0;

    always_comb for (int i = 0; i < N; i++) in_col[i] = col[i];

    idct_1d #(.N(N)) dut (.clk, .rst_n, .in_valid, .in_col, .shift, .out_valid, .out_row);

    always_ff @(posedge clk) begin
      if (rst_n && out_valid) begin
        longint s;
        ck <= ck + 1;
        if (idx >= NCOL || cyc != stim_cyc[idx % NCOL] + 2) begin
          fl <= fl + 1;
          $display("N=%0d: output %0d at clock %0d, input at %0d", N, idx, cyc, stim_cyc[idx % NCOL]);
        end
        for (int n = 0; n < N; n++) begin
          s = 0;
          for (int k = 0; k < N; k++) s += longint'(dct_coef(N, k, n)) * stim[idx % NCOL][k];
          if (int'(out_row[n]) != rclip(s, int'(shift))) begin
            fl <= fl + 1;
            $display("N=%0d col %0d out[%0d] = %0d, expected %0d", N, idx, n, out_row[n], rclip(s, int'(shift)));
          end
        end
        idx <= (idx + 1) % NCOL;
      end
    end
  end

  task automatic burst(int sh);
    shift = 5'(sh);
    for (int c = 0; c < NCOL; c++) begin
      for (int k = 0; k < 32; k++)
        stim[c][k] = (c % 9 == 4) ? ($urandom_range(0, 1) ? 32767 : -32768)
                                  : int'($urandom_range(0, 16383)) - 8192;
      @(negedge clk);
      in_valid = 1'b1;
      for (int k = 0; k < 32; k++) col[k] = sample_t'(stim[c][k]);
      stim_cyc[c] = cyc;
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (5) @(negedge clk);
  endtask

  initial begin
    for (int k = 0; k < 32; k++) col[k] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    burst(7);
    burst(12);
    checks   = g_n[0].ck + g_n[1].ck + g_n[2].ck + g_n[3].ck;
    failures = g_n[0].fl + g_n[1].fl + g_n[2].fl + g_n[3].fl;
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
