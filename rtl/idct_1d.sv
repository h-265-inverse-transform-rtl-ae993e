// idct_1d - N-point HEVC 1D inverse DCT, one column per clock.
//
// Takes the N coefficients of one column and produces the N outputs
// out[n] = clip16((sum_k T_N[k][n] * in[k] + 2^(shift-1)) >>> shift).
// The sum is built with the even/odd ("partial butterfly") split: the odd
// rows of an s-point transform give O[m] = sum_{k odd} T_s[k][m] * in[k],
// the even rows are an s/2-point transform E[m] of the even inputs, and
// out[m] = E[m] + O[m], out[s-1-m] = E[m] - O[m]. Applied from s = 2 up to
// s = N, this needs N^2/4 + N^2/16 + ... constant products instead of N^2,
// and row 0 (all 64) becomes a left shift by 6. The 4-point case is exactly
// the butterfly of the reference 4x4 kernel (64/83/36 terms); applying the
// same split to the larger sizes is this design's reading of "use symmetry to
// minimise multiplications".
//
// Timing: rate 1 (a new column every clock), latency 2: the butterfly sums
// are registered, then the rounding shift and clip are registered. in_valid
// travels alongside as out_valid. `shift` must be steady while columns are in
// flight (7 for the first pass, 20 - bit depth for the second).
module idct_1d
  import hevc_it_pkg::*;
#(
  parameter int unsigned N = 32     // 4, 8, 16 or 32
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  sample_t    in_col [N],
  input  logic [4:0] shift,
  output logic       out_valid,
  output sample_t    out_row [N]
);

  localparam int unsigned LOGN = $clog2(N);
  localparam int unsigned H    = N / 2;

  acc_t sum_c [N];
  acc_t sum_q [N];
  logic valid_q;

  // Odd-part products of every level L (s = 2^L points): prod[L][m][q] is
  // T_s[2q+1][m] * in[(2q+1) * N/s], a product by an elaboration-time
  // constant. Entries outside a level's s/2 x s/2 range are zero.
  acc_t prod [LOGN+1][H][H];

  for (genvar L = 0; L <= LOGN; L++) begin : g_lvl
    localparam int S = 1 << L;
    for (genvar m = 0; m < H; m++) begin : g_m
      for (genvar q = 0; q < H; q++) begin : g_q
        if (L >= 1 && m < S / 2 && q < S / 2) begin : g_p
          localparam int K = 2 * q + 1;
          localparam int C = dct_coef(S, K, m);
          assign prod[L][m][q] = acc_t'(C) * acc_t'(in_col[K * (N / S)]);
        end else begin : g_z
          assign prod[L][m][q] = '0;
        end
      end
    end
  end

  // Even/odd recombination, smallest size first.
  always_comb begin
    acc_t e   [N];
    acc_t nxt [N];
    acc_t o;
    for (int i = 0; i < N; i++) begin
      e[i]   = '0;
      nxt[i] = '0;
    end
    e[0] = acc_t'(in_col[0]) <<< 6;           // 1-point transform: times 64
    for (int L = 1; L <= int'(LOGN); L++) begin
      for (int m = 0; m < (1 << L) / 2; m++) begin
        o = '0;
        for (int q = 0; q < (1 << L) / 2; q++) o += prod[L][m][q];
        nxt[m]              = e[m] + o;
        nxt[(1 << L) - 1 - m] = e[m] - o;
      end
      for (int i = 0; i < (1 << L); i++) e[i] = nxt[i];
    end
    for (int i = 0; i < N; i++) sum_c[i] = e[i];
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
    for (int i = 0; i < N; i++) begin
      if (in_valid) sum_q[i]   <= sum_c[i];
      if (valid_q)  out_row[i] <= round_clip(sum_q[i], shift);
    end
  end

endmodule
