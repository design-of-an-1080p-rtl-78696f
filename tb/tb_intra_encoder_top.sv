// End-to-end testbench of intra_encoder_top at its default (and only)
// configuration. Each run encodes one 8x8 luma region from a generated
// source and neighbourhood and checks:
//  - the luma type decision: best_is_8x8 exactly when cost8 < cost4_sum;
//  - the reconstruction before deblocking (sampled when the deblocking
//    engine starts) against the source: mean and peak error bounded by the
//    quantizer step size, and exact for a flat region whose neighbours have
//    the same value (all prediction modes are then exact and every level is
//    zero);
//  - the deblocking: an independent model filters the sampled
//    reconstruction with the standard's edge order (all vertical edges, then
//    all horizontal ones) and filters, and must give exactly rec_out,
//    left_out and top_out, which also shows that the interleaved edge order
//    of the design gives the standard's result;
//  - the coefficient buffer read port: the levels of the four words;
//  - the run time in cycles against a fixed bound.
// It counts how often each mechanism happened (4x4 and 8x8 type decisions,
// both third-step branches of the fast mode decision in each path, MPM
// chosen, lines changed by the filter at bS 4 and bS 3, non-zero levels read
// from the coefficient buffer) and counts a failure for any that never did.
//
// Origin: expected values come from this testbench's own reference model,
// written from the H.264 standard and the original design's description of
// the unit; stimulus and coverage are its own.
module tb_intra_encoder_top;
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

  localparam int MAX_CYCLES = 600;   // one macroblock's budget

  int checks = 0, failures = 0;
  int n4win = 0, n8win = 0, nbr57_4 = 0, nbr68_4 = 0, nbr57_8 = 0, nbr68_8 = 0;
  int nmpm = 0, nf4 = 0, nf3 = 0, nlev = 0, maxcyc = 0;

  // ---------------------------------------------- deblocking reference model
  localparam int ALPHA [52] = '{0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,
    4,4,5,6,7,8,9,10,12,13,15,17,20,22,25,28,32,36,40,45,50,56,63,71,80,90,
    101,113,127,144,162,182,203,226,255,255};
  localparam int BETA [52] = '{0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,
    2,2,2,3,3,3,3,4,4,4,6,6,7,7,8,8,9,9,10,10,11,11,12,12,13,13,14,14,15,15,
    16,16,17,17,18,18};
  localparam int TC0_BS3 [52] = '{0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,1,1,1,1,
    1,1,1,1,1,1,2,2,2,2,3,3,3,4,4,4,5,6,6,7,8,9,10,11,13,14,16,18,20,23,25};

  function automatic int clp(input int lo, input int hi, input int v);
    return v < lo ? lo : v > hi ? hi : v;
  endfunction
  function automatic int ab(input int v);
    return v < 0 ? -v : v;
  endfunction

  // luma line filter; pp[0] / qq[0] next to the edge, updated in place
  function automatic void luma_line(input int bsv, input int qpv,
                                    inout int pp [4], inout int qq [4]);
    int a, b, t0, tc, dl, ap, aq, p0, q0;
    bit sm;
    int np [4], nq [4];
    a = ALPHA[qpv]; b = BETA[qpv];
    if (ab(pp[0] - qq[0]) >= a || ab(pp[1] - pp[0]) >= b || ab(qq[1] - qq[0]) >= b) return;
    np = pp; nq = qq;
    ap = ab(pp[2] - pp[0]); aq = ab(qq[2] - qq[0]);
    if (bsv == 3) begin
      t0 = TC0_BS3[qpv];
      tc = t0 + (ap < b) + (aq < b);
      dl = clp(-tc, tc, ((qq[0] - pp[0]) * 4 + (pp[1] - qq[1]) + 4) >>> 3);
      np[0] = clp(0, 255, pp[0] + dl);
      nq[0] = clp(0, 255, qq[0] - dl);
      if (ap < b) np[1] = pp[1] + clp(-t0, t0, (pp[2] + ((pp[0] + qq[0] + 1) >> 1) - 2 * pp[1]) >>> 1);
      if (aq < b) nq[1] = qq[1] + clp(-t0, t0, (qq[2] + ((pp[0] + qq[0] + 1) >> 1) - 2 * qq[1]) >>> 1);
    end else begin
      sm = ab(pp[0] - qq[0]) < (a / 4 + 2);
      if (ap < b && sm) begin
        np[0] = (pp[2] + 2*pp[1] + 2*pp[0] + 2*qq[0] + qq[1] + 4) / 8;
        np[1] = (pp[2] + pp[1] + pp[0] + qq[0] + 2) / 4;
        np[2] = (2*pp[3] + 3*pp[2] + pp[1] + pp[0] + qq[0] + 4) / 8;
      end else np[0] = (2*pp[1] + pp[0] + qq[1] + 2) / 4;
      if (aq < b && sm) begin
        nq[0] = (pp[1] + 2*qq[0] + 2*pp[0] + 2*qq[1] + qq[2] + 4) / 8;
        nq[1] = (pp[0] + qq[0] + qq[1] + qq[2] + 2) / 4;
        nq[2] = (2*qq[3] + 3*qq[2] + qq[1] + qq[0] + pp[0] + 4) / 8;
      end else nq[0] = (2*qq[1] + qq[0] + pp[1] + 2) / 4;
    end
    pp = np; qq = nq;
  endfunction

  // picture window: rows -4..7 -> 0..11, cols -4..15 -> 0..19
  int W [12][20];

  task automatic deblock_model(input int qpv, input bit t8);
    int pp [4], qq [4];
    for (int e = 0; e < 2; e++) begin                 // vertical edges
      if (e == 1 && t8) continue;
      for (int r = 0; r < 8; r++) begin
        for (int k = 0; k < 4; k++) begin
          pp[k] = W[r+4][4+4*e-1-k];
          qq[k] = W[r+4][4+4*e+k];
        end
        luma_line(e == 0 ? 4 : 3, qpv, pp, qq);
        for (int k = 0; k < 4; k++) begin
          W[r+4][4+4*e-1-k] = pp[k];
          W[r+4][4+4*e+k]   = qq[k];
        end
      end
    end
    for (int e = 0; e < 2; e++) begin                 // horizontal edges
      if (e == 1 && t8) continue;
      for (int c = 0; c < 8; c++) begin
        for (int k = 0; k < 4; k++) begin
          pp[k] = W[4+4*e-1-k][c+4];
          qq[k] = W[4+4*e+k][c+4];
        end
        luma_line(e == 0 ? 4 : 3, qpv, pp, qq);
        for (int k = 0; k < 4; k++) begin
          W[4+4*e-1-k][c+4] = pp[k];
          W[4+4*e+k][c+4]   = qq[k];
        end
      end
    end
  endtask

  // ------------------------------------------------------------ monitors
  pix_t snap_rec [8][8], snap_lft [8][4], snap_tp [4][16];
  bit   snapped;
  always @(posedge clk) begin
    if (ev_dbf_start) begin
      snap_rec <= rec_out;
      snap_lft <= left_out;
      snap_tp  <= top_out;
      snapped  <= 1'b1;
    end
    if (ev_md4_done) begin
      if (ev_md4_57) nbr57_4++; else nbr68_4++;
    end
    if (ev_md8_done) begin
      if (ev_md8_57) nbr57_8++; else nbr68_8++;
    end
    if (ev_dbf_line && ev_dbf_changed) begin
      if (ev_dbf_bs == 3'd4) nf4++; else nf3++;
    end
  end

  // ------------------------------------------------------------ stimulus
  task automatic make_region(input int kind);
    int base, gx, gy, amp;
    base = $urandom_range(40, 210);
    gx   = int'($urandom_range(0, 12)) - 6;
    gy   = int'($urandom_range(0, 12)) - 6;
    amp  = $urandom_range(0, 40);
    corner = pix_t'(clp(0, 255, base - gx - gy));
    for (int r = -4; r < 8; r++)
      for (int c = -4; c < 16; c++) begin
        int v;
        unique case (kind)
          0: v = base;                                           // flat
          1: v = base + gx * c + gy * r + int'($urandom_range(0, 4)) - 2;  // ramp
          2: v = base + int'($urandom_range(0, 2 * amp)) - amp;  // noise
          3: v = base + (((c >> 1) + r) % 4 < 2 ? amp : -amp);   // diagonal stripes
          4: v = base + ((c < 0 || r < 0) ? gx * 4 : 0) +        // step at the edges
                 ((r >= 4 || c >= 4) ? gy : 0) + int'($urandom_range(0, 2));
          5: v = base + (((r + 8) / 2 + (c + 8) / 3) % 2 ? amp : -amp);  // texture
          default: v = base + ((c % 4) < 2 ? amp : -amp);        // vertical bars
        endcase
        v = clp(0, 255, v);
        if (r >= 0 && c >= 0 && c < 8) src[r][c] = pix_t'(v);
        if (r < 0 && c >= 0) top_px[r+4][c] = pix_t'(v);
        if (c < 0 && r >= 0) left_nb[r][c+4] = pix_t'(v);
      end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 8; r++) begin
      for (int c = 0; c < 8; c++) src[r][c] = 0;
      for (int c = 0; c < 4; c++) left_nb[r][c] = 0;
    end
    for (int r = 0; r < 4; r++) for (int c = 0; c < 16; c++) top_px[r][c] = 0;
    corner = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 140; run++) begin
      int kind, nz, sumerr, maxerr, qstep_x8;
      kind = (run < 4) ? 0 : run % 7;
      make_region(kind);
      qp   = (run < 70) ? 6'($urandom_range(0, 20)) : 6'($urandom_range(21, 51));
      mpm4 = 4'($urandom_range(0, 8));
      mpm8 = 4'($urandom_range(0, 8));
      mpm_init_cost = 20'($urandom_range(0, 3) == 0 ? $urandom_range(0, 200) : 0);
      snapped = 0;
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      while (!done) @(negedge clk);

      // luma type decision
      checks++;
      if (best_is_8x8 != (32'(cost8) < 32'(cost4_sum))) begin
        $display("run %0d: type decision %0d with cost8 %0d cost4 %0d", run, best_is_8x8, cost8, cost4_sum);
        failures++;
      end
      if (best_is_8x8) n8win++; else n4win++;
      if (mode8 == mpm8) nmpm++;
      for (int b = 0; b < 4; b++) if (mode4[b] == mpm4) nmpm++;
      checks++;
      if (mode8 > 8 || mode4[0] > 8 || mode4[1] > 8 || mode4[2] > 8 || mode4[3] > 8) failures++;

      // reconstruction before deblocking
      checks++;
      if (!snapped) failures++;
      sumerr = 0; maxerr = 0;
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++) begin
          int e;
          e = ab(int'(snap_rec[r][c]) - int'(src[r][c]));
          sumerr += e;
          if (e > maxerr) maxerr = e;
        end
      // quantizer step size times 8: 5 * 2^(qp/6) (rounded up)
      qstep_x8 = 5 << (qp / 6);
      checks++;
      if (kind == 0 ? (sumerr != 0) : (sumerr * 8 > 64 * (qstep_x8 + 8) || maxerr * 8 > 4 * qstep_x8 + 64)) begin
        $display("run %0d kind %0d qp %0d 8x8 %0d: reconstruction error sum %0d max %0d",
                 run, kind, qp, best_is_8x8, sumerr, maxerr);
        failures++;
      end

      // deblocking against the reference model
      for (int r = 0; r < 12; r++) for (int c = 0; c < 20; c++) W[r][c] = 0;
      for (int r = 0; r < 8; r++) begin
        for (int c = 0; c < 8; c++) W[r+4][c+4] = snap_rec[r][c];
        for (int c = 0; c < 4; c++) W[r+4][c]   = snap_lft[r][c];
      end
      for (int r = 0; r < 4; r++) for (int c = 0; c < 16; c++) W[r][c+4] = snap_tp[r][c];
      deblock_model(qp, best_is_8x8);
      checks++;
      begin
        int bad;
        bad = 0;
        for (int r = 0; r < 8; r++) begin
          for (int c = 0; c < 8; c++) if (int'(rec_out[r][c]) != W[r+4][c+4]) bad++;
          for (int c = 0; c < 4; c++) if (int'(left_out[r][c]) != W[r+4][c]) bad++;
        end
        for (int r = 0; r < 4; r++) for (int c = 0; c < 16; c++)
          if (int'(top_out[r][c]) != W[r][c+4]) bad++;
        if (bad != 0) begin
          $display("run %0d qp %0d 8x8 %0d: %0d deblocked samples differ", run, qp, best_is_8x8, bad);
          failures++;
        end
      end

      // coefficient buffer read-out
      nz = 0;
      for (int w = 0; w < 4; w++) begin
        @(negedge clk);
        cb_rd = 1; cb_raddr = 4'(w);
        @(negedge clk);
        cb_rd = 0;
        for (int k = 0; k < 16; k++) if (cb_rdata[k] != 0) nz++;
      end
      nlev += nz;
      checks++;
      if (kind == 0 && nz != 0) begin
        $display("run %0d: flat region has %0d non-zero levels", run, nz);
        failures++;
      end

      // run time
      if (int'(cycles) > maxcyc) maxcyc = cycles;
      checks++;
      if (int'(cycles) > MAX_CYCLES) begin
        $display("run %0d: %0d cycles", run, cycles);
        failures++;
      end
    end

    $display("type 4x4 %0d, 8x8 %0d; step-3 branch 5/7 vs 6/8: 4x4 %0d/%0d, 8x8 %0d/%0d; MPM chosen %0d",
             n4win, n8win, nbr57_4, nbr68_4, nbr57_8, nbr68_8, nmpm);
    $display("filtered lines bS4 %0d bS3 %0d; non-zero levels read %0d; longest run %0d cycles",
             nf4, nf3, nlev, maxcyc);
    checks += 9;
    if (n4win == 0)   failures++;
    if (n8win == 0)   failures++;
    if (nbr57_4 == 0) failures++;
    if (nbr68_4 == 0) failures++;
    if (nbr57_8 == 0) failures++;
    if (nbr68_8 == 0) failures++;
    if (nmpm == 0)    failures++;
    if (nf4 == 0 || nf3 == 0) failures++;
    if (nlev == 0)    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
