// hevc_it_pkg - types and constants shared by the HEVC inverse transform.
//
// Holds the transform-unit (TU) type encoding, the 8-bit HEVC core transform
// matrices and the rounding/clipping step applied after every 1D pass.
//
// DCT matrix: every entry of the 32-point HEVC matrix is +/- one of 33
// magnitudes C[m], m = 0..32, where C[m] approximates 64*sqrt(2)*cos(m*pi/64)
// (C[16] = 64, C[32] = 0). Entry T32[k][n] is 64 for k = 0, otherwise the
// angle index m = k*(2n+1) mod 128 is folded into 0..32 with the sign of
// cos(m*pi/64). The N-point matrix is a row sub-sample of the 32-point one:
// T_N[k][n] = T32[k*32/N][n]. The functions are constant-evaluable, so the 1D
// units see every coefficient as an elaboration-time constant.
//
// DST matrix: the 4x4 HEVC sine transform used for 4x4 intra luma blocks.
//
// Rounding: after each 1D pass a sum s becomes clip16((s + 2^(shift-1)) >>> shift),
// clip16 saturating to the 16-bit two's complement range. The shift is 7 after
// the first pass and 20 - bit depth after the second (HEVC reference values).
package hevc_it_pkg;

  // Widths of the datapath.
  localparam int unsigned COEF_W = 16;   // coefficients, intermediate values, residuals
  localparam int unsigned ACC_W  = 32;   // butterfly sums before the rounding shift

  // Shift after the first 1D pass.
  localparam int unsigned SHIFT_1ST = 7;

  typedef logic signed [COEF_W-1:0] sample_t;
  typedef logic signed [ACC_W-1:0]  acc_t;

  // TU type, as carried in the stream header word (bits 2:0).
  typedef enum logic [2:0] {
    TU_DST4  = 3'd0,
    TU_DCT4  = 3'd1,
    TU_DCT8  = 3'd2,
    TU_DCT16 = 3'd3,
    TU_DCT32 = 3'd4
  } tu_type_e;

  // One duration record per TU, sent to the stats stream.
  typedef struct packed {
    tu_type_e    tu_type;
    logic [15:0] p1_cycles;     // first 1D pass, start to done
    logic [15:0] p2_cycles;     // second 1D pass, start to done
    logic [15:0] total_cycles;  // first-pass start to second-pass done
  } stats_t;

  localparam int unsigned STATS_W = $bits(stats_t);

  // Edge length of a TU type.
  function automatic int unsigned tu_size(tu_type_e t);
    case (t)
      TU_DCT8:  return 8;
      TU_DCT16: return 16;
      TU_DCT32: return 32;
      default:  return 4;
    endcase
  endfunction

  // Header word decode; codes 5..7 are not defined and are read as 32x32.
  function automatic tu_type_e decode_type(logic [2:0] code);
    return (code > 3'd4) ? TU_DCT32 : tu_type_e'(code);
  endfunction

  // Magnitude C[m] for angle index m = 0..32.
  function automatic int dct_mag(int m);
    case (m)
      0: return 64;  1: return 90;  2: return 90;  3: return 90;
      4: return 89;  5: return 88;  6: return 87;  7: return 85;
      8: return 83;  9: return 82; 10: return 80; 11: return 78;
     12: return 75; 13: return 73; 14: return 70; 15: return 67;
     16: return 64; 17: return 61; 18: return 57; 19: return 54;
     20: return 50; 21: return 46; 22: return 43; 23: return 38;
     24: return 36; 25: return 31; 26: return 25; 27: return 22;
     28: return 18; 29: return 13; 30: return 9;  31: return 4;
      default: return 0;
    endcase
  endfunction

  // Entry T32[k][n] of the 32-point inverse/forward DCT matrix.
  function automatic int dct32_coef(int k, int n);
    int m;
    if (k == 0) return 64;
    m = (k * (2 * n + 1)) % 128;
    if (m <= 32)      return  dct_mag(m);
    else if (m < 64)  return -dct_mag(64 - m);
    else if (m <= 96) return -dct_mag(m - 64);
    else              return  dct_mag(128 - m);
  endfunction

  // Entry T_N[k][n] of the N-point matrix, N = 2, 4, 8, 16 or 32.
  function automatic int dct_coef(int size, int k, int n);
    return dct32_coef(k * (32 / size), n);
  endfunction

  // Entry of the 4x4 DST matrix, row k (frequency), column n.
  function automatic int dst_coef(int k, int n);
    case (k * 4 + n)
      0: return 29;   1: return 55;   2: return 74;   3: return 84;
      4: return 74;   5: return 74;   6: return 0;    7: return -74;
      8: return 84;   9: return -29; 10: return -74; 11: return 55;
     12: return 55;  13: return -84; 14: return 74;  15: return -29;
      default: return 0;
    endcase
  endfunction

  // Rounding right shift followed by saturation to 16 bits.
  function automatic sample_t round_clip(acc_t sum, logic [4:0] shift);
    acc_t rnd;
    acc_t shifted;
    rnd     = (shift == 5'd0) ? acc_t'(0) : (acc_t'(1) <<< (shift - 5'd1));
    shifted = (sum + rnd) >>> shift;
    if (shifted > acc_t'(32767))       return sample_t'(16'sh7fff);
    else if (shifted < acc_t'(-32768)) return sample_t'(16'sh8000);
    else                               return sample_t'(shifted);
  endfunction

endpackage
