// Self-checking testbench of dequantizer. Random levels at random QP in all
// four modes; expected values use the standard's formulation with
// LevelScale = 16 * V and the qP >= 24 / 36 split (4x4 / 8x8), which the
// design simplifies to a plain left shift for 4x4 blocks.
//
// Origin: expected values come from this testbench's own reference model,
// written from the H.264 standard and the original design's description of
// the unit; stimulus and coverage are its own.
module tb_dequantizer;
  import h264_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       in_valid = 0, out_valid;
  logic [1:0] dq_mode = 0;
  logic [5:0] qp = 0;
  logic [2:0] in_idx = 0;
  level_t     level [LANES];
  coef_t      coef [LANES];
  int checks = 0, failures = 0;

  dequantizer dut (.*);

  int V4 [6][3] = '{'{10, 16, 13}, '{11, 18, 14}, '{13, 20, 16}, '{14, 23, 18}, '{16, 25, 20}, '{18, 29, 23}};
  int V8 [6][6] = '{'{20, 18, 32, 19, 25, 24}, '{22, 19, 35, 21, 28, 26}, '{26, 23, 42, 24, 33, 31},
                    '{28, 25, 45, 26, 35, 33}, '{32, 28, 51, 30, 40, 38}, '{36, 32, 58, 34, 46, 43}};
  int P4 [4][4] = '{'{0, 2, 0, 2}, '{2, 1, 2, 1}, '{0, 2, 0, 2}, '{2, 1, 2, 1}};
  int P8 [8][8] = '{'{0, 3, 4, 3, 0, 3, 4, 3}, '{3, 1, 5, 1, 3, 1, 5, 1},
                    '{4, 5, 2, 5, 4, 5, 2, 5}, '{3, 1, 5, 1, 3, 1, 5, 1},
                    '{0, 3, 4, 3, 0, 3, 4, 3}, '{3, 1, 5, 1, 3, 1, 5, 1},
                    '{4, 5, 2, 5, 4, 5, 2, 5}, '{3, 1, 5, 1, 3, 1, 5, 1}};

  function automatic int sat(input longint v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : int'(v);
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
    for (int it = 0; it < 4000; it++) begin
      int m, q, idx, e, exp [8];
      longint ls, v;
      m = it % 4;
      q = $urandom_range(0, 51);
      idx = (m == 1) ? $urandom_range(0, 7) : $urandom_range(0, 1);
      e = q / 6;
      @(negedge clk);
      in_valid = 1; dq_mode = 2'(m); qp = 6'(q); in_idx = 3'(idx);
      for (int k = 0; k < 8; k++) begin
        level[k] = level_t'(int'($urandom_range(0, 400)) - 200);
        case (m)
          0: ls = 16 * V4[q % 6][P4[k % 4][2*idx + k/4]];
          1: ls = 16 * V8[q % 6][P8[k][idx]];
          default: ls = 16 * V4[q % 6][0];
        endcase
        v = longint'(level[k]) * ls;
        case (m)
          0: v = (q >= 24) ? v <<< (e - 4) : (v + (longint'(1) <<< (3 - e))) >>> (4 - e);
          1, 2: v = (q >= 36) ? v <<< (e - 6) : (v + (longint'(1) <<< (5 - e))) >>> (6 - e);
          default: v = (v <<< e) >>> 5;
        endcase
        exp[k] = sat(v);
      end
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid) failures++;
      for (int k = 0; k < 8; k++)
        if (int'(coef[k]) != exp[k]) begin
          if (failures < 10) $display("mode %0d qp %0d lane %0d: got %0d exp %0d", m, q, k, coef[k], exp[k]);
          failures++;
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
