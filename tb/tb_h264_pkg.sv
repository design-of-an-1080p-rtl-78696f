// Self-checking testbench of the shared package h264_pkg (its table
// functions). It checks the scaling tables by properties rather than by a
// second copy:
//  - at QP 28 (qp%6 = 4) the 4x4 and 8x8 quantization multipliers, looked
//    up through the position classes cls4 / cls8 for every position, must
//    give the QP-28 parameter table of the design (8192 / 5243 / 3355 for
//    4x4; 8192 7740 10486 7740 / 7740 7346 9777 7346 / 10486 9777 13159 9777
//    for 8x8, repeating every four positions);
//  - quantization times de-quantization scale must be a constant per class
//    (4x4: MF * V * {1, 25/16, 5/4} = 2^17 within 0.5 %; 8x8: MF * V
//    constant over qp%6 within 1.5 %), and the 8x8 DC entries equal the 4x4
//    ones (MF) and twice them (V);
//  - MF falls and V rises with the quantizer step size of qp%6 (0.625,
//    0.6875, 0.8125, 0.875, 1, 1.125): MF[m]/MF[0] = 0.625/step and
//    V[m]/V[0] = step/0.625 within 6 % (the tables are rounded);
//  - alpha = 0.8 * (2^(idx/6) - 1) within 1 or 2 % (capped at 255), zero
//    below 16;
//    beta and tc0 non-decreasing in idx and tc0 in bS, with the end values
//    beta(51) = 18, tc0(51, bS 1..3) = 13, 17, 25 and tc0 = 0 for bS 0.
//
// Origin: expected values come from this testbench's own reference model,
// written from the H.264 standard and the original design's description of
// the unit; stimulus and coverage are its own.
module tb_h264_pkg;
  import h264_pkg::*;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      if (failures < 12) $display("failed: %s", what);
      failures++;
    end
  endtask

  function automatic real rabs(input real v);
    return v < 0.0 ? -v : v;
  endfunction

  localparam int T4 [4][4] = '{'{8192, 5243, 8192, 5243}, '{5243, 3355, 5243, 3355},
                               '{8192, 5243, 8192, 5243}, '{5243, 3355, 5243, 3355}};
  localparam int T8 [4][4] = '{'{8192, 7740, 10486, 7740}, '{7740, 7346, 9777, 7346},
                               '{10486, 9777, 13159, 9777}, '{7740, 7346, 9777, 7346}};

  initial begin
    // QP 28 table through the class maps
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++)
        check(qmf4(4, cls4(i, j)) == T4[i][j], $sformatf("4x4 QP28 (%0d,%0d)", i, j));
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++)
        check(qmf8(4, cls8(i, j)) == T8[i % 4][j % 4], $sformatf("8x8 QP28 (%0d,%0d)", i, j));

    // products and ratios
    for (int m = 0; m < 6; m++) begin
      real k4 [3];
      k4 = '{1.0, 25.0 / 16.0, 5.0 / 4.0};
      for (int c = 0; c < 3; c++)
        check(rabs(real'(qmf4(m, c)) * real'(dqv4(m, c)) * k4[c] / 131072.0 - 1.0) < 0.005,
              $sformatf("4x4 MF*V m %0d class %0d", m, c));
      check(qmf8(m, 0) == qmf4(m, 0), $sformatf("8x8 DC MF m %0d", m));
      check(dqv8(m, 0) == 2 * dqv4(m, 0), $sformatf("8x8 DC V m %0d", m));
      for (int c = 0; c < 6; c++) begin
        real p0, pm;
        p0 = real'(qmf8(0, c)) * real'(dqv8(0, c));
        pm = real'(qmf8(m, c)) * real'(dqv8(m, c));
        check(rabs(pm / p0 - 1.0) < 0.015, $sformatf("8x8 MF*V m %0d class %0d", m, c));
      end
      begin
        real st [6], f;
        st = '{0.625, 0.6875, 0.8125, 0.875, 1.0, 1.125};
        f  = st[m] / 0.625;
        for (int c = 0; c < 3; c++) begin
          check(rabs(real'(qmf4(0, c)) / real'(qmf4(m, c)) / f - 1.0) < 0.06,
                $sformatf("4x4 MF step m %0d class %0d", m, c));
          check(rabs(real'(dqv4(m, c)) / real'(dqv4(0, c)) / f - 1.0) < 0.06,
                $sformatf("4x4 V step m %0d class %0d", m, c));
        end
        for (int c = 0; c < 6; c++) begin
          check(rabs(real'(qmf8(0, c)) / real'(qmf8(m, c)) / f - 1.0) < 0.06,
                $sformatf("8x8 MF step m %0d class %0d", m, c));
          check(rabs(real'(dqv8(m, c)) / real'(dqv8(0, c)) / f - 1.0) < 0.06,
                $sformatf("8x8 V step m %0d class %0d", m, c));
        end
      end
    end

    // deblocking tables
    for (int i = 0; i < 52; i++) begin
      int ea;
      real a;
      a  = 0.8 * ($pow(2.0, real'(i) / 6.0) - 1.0);
      ea = (i < 16) ? 0 : (a > 255.0 ? 255 : int'(a));
      check(rabs(real'(int'(dbf_alpha(i)) - ea)) <= ((ea > 50) ? 0.02 * real'(ea) : 1.0),
            $sformatf("alpha %0d = %0d, formula %0d", i, dbf_alpha(i), ea));
      check(i < 16 ? dbf_beta(i) == 0 : dbf_beta(i) >= 2, $sformatf("beta %0d", i));
      check(dbf_tc0(i, 0) == 0, $sformatf("tc0 bS 0 at %0d", i));
      if (i > 0) begin
        check(dbf_beta(i) >= dbf_beta(i - 1), $sformatf("beta order %0d", i));
        for (int b = 1; b < 4; b++)
          check(dbf_tc0(i, b) >= dbf_tc0(i - 1, b), $sformatf("tc0 order %0d bS %0d", i, b));
      end
      for (int b = 2; b < 4; b++)
        check(dbf_tc0(i, b) >= dbf_tc0(i, b - 1), $sformatf("tc0 bS order %0d bS %0d", i, b));
    end
    check(dbf_beta(51) == 18, "beta(51)");
    check(dbf_tc0(51, 1) == 13 && dbf_tc0(51, 2) == 17 && dbf_tc0(51, 3) == 25, "tc0(51)");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog (the checks above take no simulated time)
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
