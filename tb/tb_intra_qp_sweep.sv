// Workload testbench: runs intra_encoder_top over the QP points at which
// the encoder's all-intra results are usually reported (16, 22, 28, 34, 40),
// on a generated 1080p-like picture: a smooth two-dimensional wave pattern
// with edges, a ramp and low-amplitude noise. For every QP it encodes 48
// 8x8 regions taken at different places of the picture (the neighbours come
// from the same picture) and reports PSNR-Y of the deblocked output, the
// share of 8x8 decisions and the cycles per region, with the clock a
// 1080p30 stream would need at that cycle count (four regions per
// macroblock, luma 4x4/8x8 work only).
// Checks: PSNR falls as QP rises (0.2 dB tolerance), PSNR at QP 16 above
// 40 dB and at QP 40 above 25 dB, and no run over 600 cycles.
//
// Origin: expected values come from this testbench's own reference model,
// written from the H.264 standard and the original design's description of
// the unit; stimulus and coverage are its own.
module tb_intra_qp_sweep;
  import h264_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        start = 0;
  logic [5:0]  qp = 28;
  logic [3:0]  mpm4 = 2, mpm8 = 2;
  logic [19:0] mpm_init_cost = 0;
  pix_t        src [8][8], top_px [4][16], left_nb [8][4], corner;
  logic        done, best_is_8x8;
  logic [3:0]  mode8, mode4 [4];
  logic [20:0] cost8;
  logic [22:0] cost4_sum;
  pix_t        rec_out [8][8], left_out [8][4], top_out [4][16];
  logic [15:0] cycles;
  logic        cb_rd = 0;
  logic [3:0]  cb_raddr = 0;
  level_t      cb_rdata [16];
  logic        ev_md4_done, ev_md8_done, ev_md4_57, ev_md8_57, ev_dbf_start;
  logic        ev_dbf_line, ev_dbf_changed;
  logic [2:0]  ev_dbf_bs;

  intra_encoder_top dut (.*);

  localparam int QPS [5] = '{16, 22, 28, 34, 40};
  localparam int REGIONS = 48;

  int checks = 0, failures = 0;

  function automatic int picture(input int x, input int y);
    real v;
    v = 120.0 + 55.0 * $sin(real'(x) / 9.0) * $cos(real'(y) / 13.0)
              + 0.08 * real'(x - y) + ((x + 2 * y) % 97 < 30 ? 25.0 : 0.0);
    v = v + real'(int'($urandom_range(0, 6)) - 3);
    return v < 0.0 ? 0 : v > 255.0 ? 255 : int'(v);
  endfunction

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real psnr [5];
    for (int r = 0; r < 8; r++) begin
      for (int c = 0; c < 8; c++) src[r][c] = 0;
      for (int c = 0; c < 4; c++) left_nb[r][c] = 0;
    end
    for (int r = 0; r < 4; r++) for (int c = 0; c < 16; c++) top_px[r][c] = 0;
    corner = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int qi = 0; qi < 5; qi++) begin
      real sse;
      int  n8, cyc;
      sse = 0.0; n8 = 0; cyc = 0;
      qp = 6'(QPS[qi]);
      for (int rg = 0; rg < REGIONS; rg++) begin
        int x0, y0;
        x0 = 8 + 40 * (rg % 12);
        y0 = 8 + 24 * (rg / 12);
        for (int r = -4; r < 8; r++)
          for (int c = -4; c < 16; c++) begin
            int v;
            v = picture(x0 + c, y0 + r);
            if (r >= 0 && c >= 0 && c < 8) src[r][c] = pix_t'(v);
            if (r < 0 && c >= 0) top_px[r+4][c] = pix_t'(v);
            if (c < 0 && r >= 0) left_nb[r][c+4] = pix_t'(v);
            if (r == -1 && c == -1) corner = pix_t'(v);
          end
        mpm4 = 4'(rg % 3);
        mpm8 = 4'(rg % 3);
        @(negedge clk);
        start = 1;
        @(negedge clk);
        start = 0;
        while (!done) @(negedge clk);
        for (int r = 0; r < 8; r++)
          for (int c = 0; c < 8; c++) begin
            real d;
            d = real'(int'(rec_out[r][c]) - int'(src[r][c]));
            sse += d * d;
          end
        if (best_is_8x8) n8++;
        cyc += cycles;
        checks++;
        if (cycles > 600) failures++;
      end
      psnr[qi] = (sse == 0.0) ? 99.0 : 10.0 * $log10(255.0 * 255.0 * 64.0 * REGIONS / sse);
      $display("QP %0d: PSNR-Y %0.2f dB, 8x8 chosen in %0d of %0d regions, %0.1f cycles/region, 1080p30 would need %0.1f MHz",
               QPS[qi], psnr[qi], n8, REGIONS, real'(cyc) / REGIONS,
               8160.0 * 30.0 * 4.0 * real'(cyc) / REGIONS / 1.0e6);
    end
    for (int qi = 1; qi < 5; qi++) begin
      checks++;
      if (psnr[qi] > psnr[qi-1] + 0.2) failures++;
    end
    checks += 2;
    if (psnr[0] < 40.0) failures++;
    if (psnr[4] < 25.0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
