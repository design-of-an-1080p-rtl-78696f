// Self-checking testbench of quantizer. Random coefficient vectors at random
// QP for 4x4, 8x8 and DC inputs. The expected levels use multiplier
// matrices laid out by position (the 8x8 class map written out), and a
// directed check at QP 28 compares the multipliers each lane uses with the
// QP 28 parameter table of the design (4x4: 8192 / 5243 / 3355 pattern,
// 8x8: 8192 7740 10486 7740 / 7740 7346 9777 7346 / ...).
//
// Origin: expected values come from this testbench's own reference model,
// written from the H.264 standard and the original design's description of
// the unit; stimulus and coverage are its own.
module tb_quantizer;
  import h264_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       in_valid = 0, size8 = 0, dc = 0, out_valid;
  logic [5:0] qp = 0;
  logic [2:0] in_idx = 0;
  coef_t      coef [LANES];
  level_t     level [LANES];
  int checks = 0, failures = 0;

  quantizer dut (.*);

  int MF4 [6][3] = '{'{13107, 5243, 8066}, '{11916, 4660, 7490}, '{10082, 4194, 6554},
                     '{9362, 3647, 5825}, '{8192, 3355, 5243}, '{7282, 2893, 4559}};
  int MF8 [6][6] = '{'{13107, 11428, 20972, 12222, 16777, 15481},
                     '{11916, 10826, 19174, 11058, 14980, 14290},
                     '{10082, 8943, 15978, 9675, 12710, 11985},
                     '{9362, 8228, 14913, 8931, 11984, 11259},
                     '{8192, 7346, 13159, 7740, 10486, 9777},
                     '{7282, 6428, 11570, 6830, 9118, 8640}};
  int P4 [4][4] = '{'{0, 2, 0, 2}, '{2, 1, 2, 1}, '{0, 2, 0, 2}, '{2, 1, 2, 1}};
  int P8 [8][8] = '{'{0, 3, 4, 3, 0, 3, 4, 3}, '{3, 1, 5, 1, 3, 1, 5, 1},
                    '{4, 5, 2, 5, 4, 5, 2, 5}, '{3, 1, 5, 1, 3, 1, 5, 1},
                    '{0, 3, 4, 3, 0, 3, 4, 3}, '{3, 1, 5, 1, 3, 1, 5, 1},
                    '{4, 5, 2, 5, 4, 5, 2, 5}, '{3, 1, 5, 1, 3, 1, 5, 1}};
  int T28_4 [4][4] = '{'{8192, 5243, 8192, 5243}, '{5243, 3355, 5243, 3355},
                       '{8192, 5243, 8192, 5243}, '{5243, 3355, 5243, 3355}};
  int T28_8 [4][8] = '{'{8192, 7740, 10486, 7740, 8192, 7740, 10486, 7740},
                       '{7740, 7346, 9777, 7346, 7740, 7346, 9777, 7346},
                       '{10486, 9777, 13159, 9777, 10486, 9777, 13159, 9777},
                       '{7740, 7346, 9777, 7346, 7740, 7346, 9777, 7346}};

  function automatic int q(input int c, input int mf, input int qb);
    longint a, f;
    a = (c < 0) ? -c : c;
    f = (longint'(1) << qb) / 3;
    a = (a * mf + f) >> qb;
    if (a > 8191) a = 8191;
    return (c < 0) ? -int'(a) : int'(a);
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int s8, input int d, input int qpv, input int idx, input bit t28);
    int exp [8], mfv, r, cc, qb;
    @(negedge clk);
    in_valid = 1; size8 = s8[0]; dc = d[0]; qp = 6'(qpv); in_idx = 3'(idx);
    for (int k = 0; k < 8; k++) begin
      coef[k] = t28 ? 16'sd4096 : coef_t'(int'($urandom_range(0, 40000)) - 20000);
      if (d) begin mfv = MF4[qpv % 6][0]; qb = 16 + qpv / 6; end
      else if (s8) begin
        r = k; cc = idx;
        mfv = t28 ? T28_8[r % 4][cc] : MF8[qpv % 6][P8[r][cc]];
        qb = 16 + qpv / 6;
      end else begin
        r = k % 4; cc = 2 * idx + k / 4;
        mfv = t28 ? T28_4[r][cc] : MF4[qpv % 6][P4[r][cc]];
        qb = 15 + qpv / 6;
      end
      if (d) exp[k] = q(int'(coef[k]), mfv, qb) ; else exp[k] = q(int'(coef[k]), mfv, qb);
      if (d) begin
        longint a, f;
        a = (coef[k] < 0) ? -longint'(coef[k]) : longint'(coef[k]);
        f = ((longint'(1) << (qb - 1)) / 3) * 2;
        a = (a * mfv + f) >> qb;
        if (a > 8191) a = 8191;
        exp[k] = (coef[k] < 0) ? -int'(a) : int'(a);
      end
    end
    @(negedge clk);
    in_valid = 0;
    checks++;
    if (!out_valid) failures++;
    for (int k = 0; k < 8; k++)
      if (int'(level[k]) != exp[k]) begin
        if (failures < 10) $display("s8 %0d dc %0d qp %0d idx %0d lane %0d: got %0d exp %0d",
                                    s8, d, qpv, idx, k, level[k], exp[k]);
        failures++;
      end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int idx = 0; idx < 8; idx++) begin
      if (idx < 2) run(0, 0, 28, idx, 1);
      run(1, 0, 28, idx, 1);
    end
    for (int it = 0; it < 3000; it++) begin
      int s8;
      s8 = $urandom_range(0, 1);
      run(s8, (it % 5 == 0) ? 1 : 0, $urandom_range(0, 51), s8 ? $urandom_range(0, 7) : $urandom_range(0, 1), 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
