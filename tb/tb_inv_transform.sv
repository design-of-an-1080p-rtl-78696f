// Self-checking testbench of inv_transform. Random coefficient blocks in all
// four modes, fed as columns. The expected output follows the standard's
// inverse transform equations, applied to every row first and then to every
// column (the Hadamard cases as matrix products). The latency from the last
// input to the first output (2N + 2 cycles, 3 for the 2x2 case) and the row
// order of the output are checked as well.
//
// Origin: expected values come from this testbench's own reference model,
// written from the H.264 standard and the original design's description of
// the unit; stimulus and coverage are its own.
module tb_inv_transform;
  import h264_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic     in_valid = 0, in_ready, out_valid, out_last;
  tr_mode_t mode = TR_DCT4;
  coef_t    din [LANES], dout [LANES];
  logic [2:0] out_idx;
  int checks = 0, failures = 0;

  inv_transform dut (.*);

  int D [8][8], R [8][8];
  int H4 [4][4] = '{'{1, 1, 1, 1}, '{1, 1, -1, -1}, '{1, -1, -1, 1}, '{1, -1, 1, -1}};

  function automatic void i4(ref int v [8], input int o);
    int a, b, c, d;
    a = v[o] + v[o+2];
    b = v[o] - v[o+2];
    c = (v[o+1] >>> 1) - v[o+3];
    d = v[o+1] + (v[o+3] >>> 1);
    v[o] = a + d; v[o+1] = b + c; v[o+2] = b - c; v[o+3] = a - d;
  endfunction

  function automatic void i8(ref int d [8]);
    int e [8], f [8];
    e[0] = d[0] + d[4];
    e[1] = -d[3] + d[5] - d[7] - (d[7] >>> 1);
    e[2] = d[0] - d[4];
    e[3] = d[1] + d[7] - d[3] - (d[3] >>> 1);
    e[4] = (d[2] >>> 1) - d[6];
    e[5] = -d[1] + d[7] + d[5] + (d[5] >>> 1);
    e[6] = d[2] + (d[6] >>> 1);
    e[7] = d[3] + d[5] + d[1] + (d[1] >>> 1);
    f[0] = e[0] + e[6]; f[1] = e[1] + (e[7] >>> 2); f[2] = e[2] + e[4]; f[3] = e[3] + (e[5] >>> 2);
    f[4] = e[2] - e[4]; f[5] = (e[3] >>> 2) - e[5]; f[6] = e[0] - e[6]; f[7] = e[7] - (e[1] >>> 2);
    d[0] = f[0] + f[7]; d[1] = f[2] + f[5]; d[2] = f[4] + f[3]; d[3] = f[6] + f[1];
    d[4] = f[6] - f[1]; d[5] = f[4] - f[3]; d[6] = f[2] - f[5]; d[7] = f[0] - f[7];
  endfunction

  task automatic reference(input tr_mode_t m);
    int v [8];
    if (m == TR_DHT2) begin
      for (int c = 0; c < 2; c++) begin
        int a, b, cc, d;
        a = D[0][4*c]; b = D[0][4*c+1]; cc = D[0][4*c+2]; d = D[0][4*c+3];
        R[0][4*c] = a + b + cc + d; R[0][4*c+1] = a - b + cc - d;
        R[0][4*c+2] = a + b - cc - d; R[0][4*c+3] = a - b - cc + d;
      end
    end else if (m == TR_DHT4) begin
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++) begin
          R[i][j] = 0;
          for (int a = 0; a < 4; a++)
            for (int b = 0; b < 4; b++) R[i][j] += H4[i][a] * D[a][b] * H4[b][j];
        end
    end else begin
      int n;
      n = (m == TR_DCT8) ? 8 : 4;
      for (int i = 0; i < n; i++) begin
        for (int j = 0; j < 8; j++) v[j] = (j < n) ? D[i][j] : 0;
        if (n == 8) i8(v); else i4(v, 0);
        for (int j = 0; j < n; j++) R[i][j] = v[j];
      end
      for (int j = 0; j < n; j++) begin
        for (int i = 0; i < 8; i++) v[i] = (i < n) ? R[i][j] : 0;
        if (n == 8) i8(v); else i4(v, 0);
        for (int i = 0; i < n; i++) R[i][j] = v[i];
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
      int lat, explat;
      m = tr_mode_t'(it % 4);
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++) D[i][j] = int'($urandom_range(0, 4000)) - 2000;
      reference(m);
      for (int v = 0; v < nv(m); v++) begin
        @(negedge clk);
        if (!in_ready) failures++;
        in_valid = 1; mode = m;
        for (int k = 0; k < 8; k++)
          din[k] = (m == TR_DCT8) ? coef_t'(D[k][v]) :
                   (m == TR_DHT2) ? coef_t'(D[0][k]) : coef_t'(D[k%4][2*v + k/4]);
      end
      @(negedge clk);
      in_valid = 0;
      lat = 1;
      while (!out_valid && lat < 40) begin @(negedge clk); lat++; end
      explat = (m == TR_DHT2) ? 3 : 2 * nv(m) + 2;
      checks++;
      if (lat != explat) begin
        failures++;
        $display("mode %0d latency %0d expected %0d", m, lat, explat);
      end
      for (int v = 0; v < nv(m); v++) begin
        checks++;
        if (!out_valid || out_idx != 3'(v) || out_last != (v == nv(m)-1)) failures++;
        for (int k = 0; k < 8; k++) begin
          int exp;
          exp = (m == TR_DCT8) ? R[v][k] : (m == TR_DHT2) ? R[0][k] : R[2*v + k/4][k%4];
          if (int'(dout[k]) != exp) begin
            if (failures < 10) $display("mode %0d row %0d lane %0d: got %0d exp %0d", m, v, k, dout[k], exp);
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
