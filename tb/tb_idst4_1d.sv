// tb_idst4_1d - checks the 4-point 1D inverse DST.
//
// A back-to-back stream of random columns (some full-scale) goes in with
// shift 7 and then 12; each output must appear two clocks after its input
// and equal sum_k S[k][n] * in[k] with S the HEVC 4x4 sine matrix, rounded
// and clipped.
module tb_idst4_1d;
  import hevc_it_pkg::*;

  localparam int NCOL = 60;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic [4:0] shift = 5'd7;
  logic       in_valid = 1'b0;
  sample_t    in_col [4];
  sample_t    out_row [4];
  logic       out_valid;
  int checks = 0;
  int failures = 0;
  int cyc = 0;
  int idx = 0;
  int stim [NCOL][4];
  int stim_cyc [NCOL];

  always #5 clk = ~clk;
  always_ff @(posedge clk) cyc <= cyc + 1;

  idst4_1d dut (.*);

  localparam int S4 [4][4] = '{'{29, 55, 74, 84}, '{74, 74, 0,-74}, '{84,-29,-74, 55}, '{55,-84, 74,-29}};

  function automatic int rclip(longint s, int sh);
    longint v = (s + (longint'(1) << (sh - 1))) >>> sh;
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : int'(v);
  endfunction

  always_ff @(posedge clk) begin
    if (rst_n && out_valid) begin
      longint s;
      checks <= checks + 5;
      if (cyc != stim_cyc[idx] + 2) begin
        failures <= failures + 1;
        $display("column %0d out at clock %0d, in at %0d", idx, cyc, stim_cyc[idx]);
      end
      for (int n = 0; n < 4; n++) begin
        s = 0;
        for (int k = 0; k < 4; k++) s += longint'(S4[k][n]) * stim[idx][k];
        if (int'(out_row[n]) != rclip(s, int'(shift))) begin
          failures <= failures + 1;
          $display("col %0d out[%0d] = %0d, expected %0d", idx, n, out_row[n], rclip(s, int'(shift)));
        end
      end
      idx <= (idx + 1) % NCOL;
    end
  end

  task automatic burst(int sh);
    shift = 5'(sh);
    for (int c = 0; c < NCOL; c++) begin
      for (int k = 0; k < 4; k++)
        stim[c][k] = (c % 7 == 2) ? ($urandom_range(0, 1) ? 32767 : -32768)
                                  : int'($urandom_range(0, 16383)) - 8192;
      @(negedge clk);
      in_valid = 1'b1;
      for (int k = 0; k < 4; k++) in_col[k] = sample_t'(stim[c][k]);
      stim_cyc[c] = cyc;
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (5) @(negedge clk);
  endtask

  initial begin
    for (int k = 0; k < 4; k++) in_col[k] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    burst(7);
    burst(12);
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
