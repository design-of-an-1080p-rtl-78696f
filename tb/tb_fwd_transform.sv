// Self-checking testbench of fwd_transform. Random blocks in all four modes.
// 4x4 DCT, 4x4 Hadamard and 2x2 Hadamard are checked against plain matrix
// products (C X C^T with the integer DCT matrix); the 8x8 DCT against a
// scalar model of the high-profile 8x8 forward transform applied to rows and
// then to columns. The output column order and the latency (the first
// output is valid two cycles after the last input) are checked too.
//
// Origin: expected values come from this testbench's own reference model,
// written from the H.264 standard and the original design's description of
// the unit; stimulus and coverage are its own.
module tb_fwd_transform;
  import h264_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic     in_valid = 0, in_ready, out_valid, out_last;
  tr_mode_t mode = TR_DCT4;
  coef_t    din [LANES], dout [LANES];
  logic [2:0] out_idx;
  int checks = 0, failures = 0;

  fwd_transform dut (.*);

  int C4 [4][4] = '{'{1, 1, 1, 1}, '{2, 1, -1, -2}, '{1, -1, -1, 1}, '{1, -2, 2, -1}};
  int H4 [4][4] = '{'{1, 1, 1, 1}, '{1, 1, -1, -1}, '{1, -1, -1, 1}, '{1, -1, 1, -1}};
  int X [8][8], Y [8][8];

  function automatic void t8(ref int v [8]);
    int a [8], b [8];
    for (int i = 0; i < 4; i++) begin a[i] = v[i] + v[7-i]; a[i+4] = v[i] - v[7-i]; end
    b[0] = a[0] + a[3]; b[1] = a[1] + a[2]; b[2] = a[0] - a[3]; b[3] = a[1] - a[2];
    b[4] = a[5] + a[6] + ((a[4] >>> 1) + a[4]);
    b[5] = a[4] - a[7] - ((a[6] >>> 1) + a[6]);
    b[6] = a[4] + a[7] - ((a[5] >>> 1) + a[5]);
    b[7] = a[5] - a[6] + ((a[7] >>> 1) + a[7]);
    v[0] = b[0] + b[1]; v[4] = b[0] - b[1];
    v[2] = b[2] + (b[3] >>> 1); v[6] = (b[2] >>> 1) - b[3];
    v[1] = b[4] + (b[7] >>> 2); v[3] = b[5] + (b[6] >>> 2);
    v[5] = b[6] - (b[5] >>> 2); v[7] = (b[4] >>> 2) - b[7];
  endfunction

  task automatic reference(input tr_mode_t m);
    int v [8];
    if (m == TR_DCT8) begin
      for (int i = 0; i < 8; i++) begin
        for (int j = 0; j < 8; j++) v[j] = X[i][j];
        t8(v);
        for (int j = 0; j < 8; j++) Y[i][j] = v[j];
      end
      for (int j = 0; j < 8; j++) begin
        for (int i = 0; i < 8; i++) v[i] = Y[i][j];
        t8(v);
        for (int i = 0; i < 8; i++) Y[i][j] = v[i];
      end
    end else if (m == TR_DHT2) begin
      for (int c = 0; c < 2; c++) begin
        Y[0][4*c+0] = X[0][4*c] + X[0][4*c+1] + X[0][4*c+2] + X[0][4*c+3];
        Y[0][4*c+1] = X[0][4*c] - X[0][4*c+1] + X[0][4*c+2] - X[0][4*c+3];
        Y[0][4*c+2] = X[0][4*c] + X[0][4*c+1] - X[0][4*c+2] - X[0][4*c+3];
        Y[0][4*c+3] = X[0][4*c] - X[0][4*c+1] - X[0][4*c+2] + X[0][4*c+3];
      end
    end else begin
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++) begin
          int s = 0;
          for (int a = 0; a < 4; a++)
            for (int b = 0; b < 4; b++)
              s += (m == TR_DHT4) ? H4[i][a] * X[a][b] * H4[j][b]
                                  : C4[i][a] * X[a][b] * C4[j][b];
          Y[i][j] = (m == TR_DHT4) ? (s + 1) >>> 1 : s;
        end
    end
  endtask

  function automatic int nv(input tr_mode_t m);
    return (m == TR_DCT8) ? 8 : (m == TR_DHT2) ? 1 : 2;
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
    for (int it = 0; it < 400; it++) begin
      tr_mode_t m;
      int lim;
      m = tr_mode_t'(it % 4);
      lim = (m == TR_DCT4 || m == TR_DCT8) ? 255 : 2000;
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++)
          X[i][j] = (it % 9 == 0) ? lim : int'($urandom_range(0, 2*lim)) - lim;
      reference(m);
      // drive
      for (int v = 0; v < nv(m); v++) begin
        @(negedge clk);
        if (!in_ready) failures++;
        in_valid = 1; mode = m;
        for (int k = 0; k < 8; k++)
          din[k] = (m == TR_DCT8) ? coef_t'(X[v][k]) :
                   (m == TR_DHT2) ? coef_t'(X[0][k]) : coef_t'(X[2*v + k/4][k%4]);
      end
      @(negedge clk);
      in_valid = 0;
      if (out_valid) failures++;     // one cycle for the column pass register
      @(negedge clk);
      for (int v = 0; v < nv(m); v++) begin
        checks++;
        if (!out_valid || out_idx != 3'(v) || out_last != (v == nv(m)-1)) begin
          failures++;
          $display("timing: mode %0d vec %0d valid %0d idx %0d", m, v, out_valid, out_idx);
        end
        for (int k = 0; k < 8; k++) begin
          int exp;
          exp = (m == TR_DCT8) ? Y[k][v] : (m == TR_DHT2) ? Y[0][k] : Y[k%4][2*v + k/4];
          if (int'(dout[k]) != exp) begin
            if (failures < 10) $display("mode %0d vec %0d lane %0d: got %0d exp %0d", m, v, k, dout[k], exp);
            failures++;
          end
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
