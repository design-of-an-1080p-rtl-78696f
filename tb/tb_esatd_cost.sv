// Self-checking testbench of esatd_cost. Random transformed 4x4 and 8x8
// blocks are fed as column vectors; the expected cost uses the weight matrix
// of the ESATD equation written out in full (4x4) and the 8x8 weight matrix
// written out row by row, and the cycle of the result is checked.
//
// Origin: expected values come from this testbench's own reference model,
// written from the H.264 standard and the original design's description of
// the unit; stimulus and coverage are its own.
module tb_esatd_cost;
  import h264_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        in_valid = 0, in_last = 0, size8 = 0, out_valid;
  logic [2:0]  in_idx = 0;
  coef_t       coef [LANES];
  logic [19:0] cost;
  int checks = 0, failures = 0;

  esatd_cost dut (.*);

  int W4 [4][4] = '{'{32, 25, 32, 25}, '{25, 20, 25, 20}, '{32, 25, 32, 25}, '{25, 20, 25, 20}};
  // 8x8: rows i%4==0, odd, i%4==2 (same weight rule as 4x4, 8x8 multipliers)
  int R0 [8] = '{32, 31, 36, 31, 32, 31, 36, 31};
  int R1 [8] = '{31, 30, 35, 30, 31, 30, 35, 30};
  int R2 [8] = '{36, 35, 40, 35, 36, 35, 40, 35};
  int Y [8][8];

  function automatic int w8(input int i, input int j);
    if (i % 2 == 1) return R1[j];
    if (i % 4 == 0) return R0[j];
    return R2[j];
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 500; it++) begin
      int s8, n, exp;
      s8 = it % 2;
      n = s8 ? 8 : 2;
      exp = 0;
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++) begin
          Y[i][j] = int'($urandom_range(0, 8000)) - 4000;
          if (s8) exp += (Y[i][j] < 0 ? -Y[i][j] : Y[i][j]) * w8(i, j);
          else if (i < 4 && j < 4) exp += (Y[i][j] < 0 ? -Y[i][j] : Y[i][j]) * W4[i][j];
        end
      exp = s8 ? exp >> 6 : exp >> 5;
      for (int v = 0; v < n; v++) begin
        @(negedge clk);
        in_valid = 1; in_last = (v == n-1); size8 = s8[0]; in_idx = 3'(v);
        for (int k = 0; k < 8; k++)
          coef[k] = s8 ? coef_t'(Y[k][v]) : coef_t'(Y[k%4][2*v + k/4]);
      end
      @(negedge clk);
      in_valid = 0; in_last = 0;
      checks++;
      if (!out_valid || int'(cost) != exp) begin
        if (failures < 10) $display("size8 %0d: got %0d (valid %0d) exp %0d", s8, cost, out_valid, exp);
        failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
