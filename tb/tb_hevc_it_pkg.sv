// tb_hevc_it_pkg - checks the transform constants and helpers of hevc_it_pkg.
//
// The generated DCT entries are compared with the published HEVC 4x4 and
// 8x8 matrices and with rows 1 and 3 of the 32-point matrix (typed in
// here), the 16-point row 1, the 4x4 DST matrix, and the rounding/clipping
// helper on hand-worked values.
module tb_hevc_it_pkg;
  import hevc_it_pkg::*;

  int checks = 0;
  int failures = 0;

  localparam int M8 [8][8] = '{
    '{64, 64, 64, 64, 64, 64, 64, 64},
    '{89, 75, 50, 18,-18,-50,-75,-89},
    '{83, 36,-36,-83,-83,-36, 36, 83},
    '{75,-18,-89,-50, 50, 89, 18,-75},
    '{64,-64,-64, 64, 64,-64,-64, 64},
    '{50,-89, 18, 75,-75,-18, 89,-50},
    '{36,-83, 83,-36,-36, 83,-83, 36},
    '{18,-50, 75,-89, 89,-75, 50,-18}};

  localparam int R32_1 [32] = '{90, 90, 88, 85, 82, 78, 73, 67, 61, 54, 46, 38, 31, 22, 13, 4,
                                -4,-13,-22,-31,-38,-46,-54,-61,-67,-73,-78,-82,-85,-88,-90,-90};
  localparam int R32_3 [32] = '{90, 82, 67, 46, 22, -4,-31,-54,-73,-85,-90,-88,-78,-61,-38,-13,
                                13, 38, 61, 78, 88, 90, 85, 73, 54, 31,  4,-22,-46,-67,-82,-90};
  localparam int R16_1 [16] = '{90, 87, 80, 70, 57, 43, 25,  9, -9,-25,-43,-57,-70,-80,-87,-90};
  localparam int M4 [4][4] = '{'{64, 64, 64, 64}, '{83, 36,-36,-83}, '{64,-64,-64, 64}, '{36,-83, 83,-36}};
  localparam int S4 [4][4] = '{'{29, 55, 74, 84}, '{74, 74, 0,-74}, '{84,-29,-74, 55}, '{55,-84, 74,-29}};

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: %0d, expected %0d", what, got, exp);
    end
  endtask

  logic clk = 1'b0;
  initial begin
    for (int k = 0; k < 8; k++)
      for (int n = 0; n < 8; n++) begin
        expect_eq($sformatf("T8[%0d][%0d]", k, n), dct_coef(8, k, n), M8[k][n]);
        expect_eq($sformatf("T32[%0d][%0d]", 4 * k, n), dct32_coef(4 * k, n), M8[k][n]);
      end
    for (int k = 0; k < 4; k++)
      for (int n = 0; n < 4; n++) begin
        expect_eq($sformatf("T4[%0d][%0d]", k, n), dct_coef(4, k, n), M4[k][n]);
        expect_eq($sformatf("S4[%0d][%0d]", k, n), dst_coef(k, n), S4[k][n]);
      end
    for (int n = 0; n < 32; n++) begin
      expect_eq($sformatf("T32[1][%0d]", n), dct_coef(32, 1, n), R32_1[n]);
      expect_eq($sformatf("T32[3][%0d]", n), dct_coef(32, 3, n), R32_3[n]);
      expect_eq($sformatf("T32[0][%0d]", n), dct_coef(32, 0, n), 64);
    end
    for (int n = 0; n < 16; n++)
      expect_eq($sformatf("T16[1][%0d]", n), dct_coef(16, 1, n), R16_1[n]);
    // rounding and clipping
    expect_eq("round 191>>7",   round_clip(32'sd191, 5'd7), 1);
    expect_eq("round 192>>7",   round_clip(32'sd192, 5'd7), 2);
    expect_eq("round -64>>7",   round_clip(-32'sd64, 5'd7), 0);
    expect_eq("round -65>>7",   round_clip(-32'sd65, 5'd7), -1);
    expect_eq("round 2048>>12", round_clip(32'sd2048, 5'd12), 1);
    expect_eq("clip high",      round_clip(32'sd5000000, 5'd7), 32767);
    expect_eq("clip low",       round_clip(-32'sd5000000, 5'd7), -32768);
    expect_eq("edge 32767",     round_clip(32'sd4194240, 5'd7), 32767);
    expect_eq("edge -32768",    round_clip(-32'sd4194304, 5'd7), -32768);
    expect_eq("size dst",  int'(tu_size(TU_DST4)), 4);
    expect_eq("size 16",   int'(tu_size(TU_DCT16)), 16);
    expect_eq("size 32",   int'(tu_size(TU_DCT32)), 32);
    expect_eq("decode 2",  int'(decode_type(3'd2)), int'(TU_DCT8));
    expect_eq("decode 7",  int'(decode_type(3'd7)), int'(TU_DCT32));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always #5 clk = ~clk;
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
