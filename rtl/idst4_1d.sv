// idst4_1d - HEVC 4-point 1D inverse DST, one column per clock.
//
// Computes out[n] = clip16((sum_k S[k][n] * in[k] + 2^(shift-1)) >>> shift)
// for the 4x4 HEVC sine matrix S (rows 29 55 74 84 / 74 74 0 -74 /
// 84 -29 -74 55 / 55 -84 74 -29), using the factored form of the reference
// decoder: c0 = in0 + in2, c1 = in2 + in3, c2 = in0 - in3, c3 = 74*in1, then
//   out0 = 29*c0 + 55*c1 + c3        out1 = 55*c2 - 29*c1 + c3
//   out2 = 74*(in0 - in2 + in3)      out3 = 55*c0 + 29*c2 - c3
// which needs 8 products instead of 16.
//
// Timing: rate 1, latency 2 (sums registered, then shift and clip
// registered), the same as idct_1d so the two can share one sequencer.
module idst4_1d
  import hevc_it_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  sample_t    in_col [4],
  input  logic [4:0] shift,
  output logic       out_valid,
  output sample_t    out_row [4]
);

  acc_t sum_c [4];
  acc_t sum_q [4];
  logic valid_q;

  always_comb begin
    acc_t x0, x1, x2, x3, c0, c1, c2, c3;
    x0 = acc_t'(in_col[0]);
    x1 = acc_t'(in_col[1]);
    x2 = acc_t'(in_col[2]);
    x3 = acc_t'(in_col[3]);
    c0 = x0 + x2;
    c1 = x2 + x3;
    c2 = x0 - x3;
    c3 = 32'sd74 * x1;
    sum_c[0] = 32'sd29 * c0 + 32'sd55 * c1 + c3;
    sum_c[1] = 32'sd55 * c2 - 32'sd29 * c1 + c3;
    sum_c[2] = 32'sd74 * (x0 - x2 + x3);
    sum_c[3] = 32'sd55 * c0 + 32'sd29 * c2 - c3;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid_q   <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      valid_q   <= in_valid;
      out_valid <= valid_q;
    end
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < 4; i++) begin
      if (in_valid) sum_q[i]   <= sum_c[i];
      if (valid_q)  out_row[i] <= round_clip(sum_q[i], shift);
    end
  end

endmodule
