// Self-checking testbench of deblock_filter. The reference model below is
// written independently of the design's package: it carries its own copy
// of the standard's alpha, beta and tc0 tables and applies the normal and
// strong edge filters to random lines. Lines are drawn mostly as smooth
// ramps with small steps across the edge, so that the sample-level
// decisions pass often, and partly fully random. All QPs 0-51, bS 0-4, luma
// and chroma are covered; the test also counts filtered lines per bS and
// fails if any bS value never filtered a line (bS 0 must never filter).
//
// Origin: expected values come from this testbench's own reference model,
// written from the H.264 standard and the original design's description of
// the unit; stimulus and coverage are its own.
module tb_deblock_filter;
  import h264_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       in_valid = 0, chroma = 0, out_valid, filtered;
  logic [2:0] bs = 0;
  logic [5:0] qp = 0;
  pix_t       p [4], q [4], p_out [4], q_out [4];
  int checks = 0, failures = 0;
  int nfilt [5];

  deblock_filter dut (.*);

  localparam int ALPHA [52] = '{0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,
    4,4,5,6,7,8,9,10,12,13,15,17,20,22,25,28,32,36,40,45,50,56,63,71,80,90,
    101,113,127,144,162,182,203,226,255,255};
  localparam int BETA [52] = '{0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,
    2,2,2,3,3,3,3,4,4,4,6,6,7,7,8,8,9,9,10,10,11,11,12,12,13,13,14,14,15,15,
    16,16,17,17,18,18};
  // tc0 for bS = 1, 2, 3 (three digits per index)
  localparam int TC0 [52][3] = '{
    '{0,0,0},'{0,0,0},'{0,0,0},'{0,0,0},'{0,0,0},'{0,0,0},'{0,0,0},'{0,0,0},
    '{0,0,0},'{0,0,0},'{0,0,0},'{0,0,0},'{0,0,0},'{0,0,0},'{0,0,0},'{0,0,0},
    '{0,0,0},'{0,0,1},'{0,0,1},'{0,0,1},'{0,0,1},'{0,1,1},'{0,1,1},'{1,1,1},
    '{1,1,1},'{1,1,1},'{1,1,1},'{1,1,2},'{1,1,2},'{1,1,2},'{1,1,2},'{1,2,3},
    '{1,2,3},'{2,2,3},'{2,2,4},'{2,3,4},'{2,3,4},'{3,3,5},'{3,4,6},'{3,4,6},
    '{4,5,7},'{4,5,8},'{4,6,9},'{5,7,10},'{6,8,11},'{6,8,13},'{7,10,14},
    '{8,11,16},'{9,12,18},'{10,13,20},'{11,15,23},'{13,17,25}};

  function automatic int clp(input int lo, input int hi, input int v);
    return v < lo ? lo : v > hi ? hi : v;
  endfunction
  function automatic int ab(input int v);
    return v < 0 ? -v : v;
  endfunction

  // reference: returns 1 if the line is filtered; e[0..3] = p', e[4..7] = q'
  function automatic bit ref_filter(input int bsv, input bit ch, input int qpv,
                                    input int pp [4], input int qq [4], output int e [8]);
    int a, b, t0, tc, dl, ap, aq;
    bit sm;
    for (int k = 0; k < 4; k++) begin e[k] = pp[k]; e[k+4] = qq[k]; end
    a = ALPHA[qpv]; b = BETA[qpv];
    if (bsv == 0 || ab(pp[0] - qq[0]) >= a || ab(pp[1] - pp[0]) >= b || ab(qq[1] - qq[0]) >= b)
      return 0;
    ap = ab(pp[2] - pp[0]); aq = ab(qq[2] - qq[0]);
    if (bsv < 4) begin
      t0 = TC0[qpv][bsv-1];
      tc = ch ? t0 + 1 : t0 + (ap < b) + (aq < b);
      dl = clp(-tc, tc, ((qq[0] - pp[0]) * 4 + (pp[1] - qq[1]) + 4) >>> 3);
      e[0] = clp(0, 255, pp[0] + dl);
      e[4] = clp(0, 255, qq[0] - dl);
      if (!ch && ap < b) e[1] = pp[1] + clp(-t0, t0, (pp[2] + ((pp[0] + qq[0] + 1) >> 1) - 2 * pp[1]) >>> 1);
      if (!ch && aq < b) e[5] = qq[1] + clp(-t0, t0, (qq[2] + ((pp[0] + qq[0] + 1) >> 1) - 2 * qq[1]) >>> 1);
    end else begin
      sm = ab(pp[0] - qq[0]) < (a / 4 + 2);
      if (!ch && ap < b && sm) begin
        e[0] = (pp[2] + 2*pp[1] + 2*pp[0] + 2*qq[0] + qq[1] + 4) / 8;
        e[1] = (pp[2] + pp[1] + pp[0] + qq[0] + 2) / 4;
        e[2] = (2*pp[3] + 3*pp[2] + pp[1] + pp[0] + qq[0] + 4) / 8;
      end else e[0] = (2*pp[1] + pp[0] + qq[1] + 2) / 4;
      if (!ch && aq < b && sm) begin
        e[4] = (pp[1] + 2*qq[0] + 2*pp[0] + 2*qq[1] + qq[2] + 4) / 8;
        e[5] = (pp[0] + qq[0] + qq[1] + qq[2] + 2) / 4;
        e[6] = (2*qq[3] + 3*qq[2] + qq[1] + qq[0] + pp[0] + 4) / 8;
      end else e[4] = (2*qq[1] + qq[0] + pp[1] + 2) / 4;
    end
    return 1;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 20000; it++) begin
      int pp [4], qq [4], e [8], base, step, jump;
      bit expf;
      if ($urandom_range(0, 4) != 0) begin
        base = $urandom_range(0, 255);
        step = int'($urandom_range(0, 6)) - 3;
        jump = int'($urandom_range(0, 60)) - 30;
        for (int k = 0; k < 4; k++) begin
          pp[k] = clp(0, 255, base - step * (k + 1) + int'($urandom_range(0, 4)) - 2);
          qq[k] = clp(0, 255, base + jump + step * k + int'($urandom_range(0, 4)) - 2);
        end
      end else
        for (int k = 0; k < 4; k++) begin
          pp[k] = $urandom_range(0, 255);
          qq[k] = $urandom_range(0, 255);
        end
      @(negedge clk);
      in_valid = 1;
      bs     = 3'($urandom_range(0, 4));
      chroma = $urandom_range(0, 1);
      qp     = 6'($urandom_range(0, 51));
      for (int k = 0; k < 4; k++) begin p[k] = pix_t'(pp[k]); q[k] = pix_t'(qq[k]); end
      expf = ref_filter(bs, chroma, qp, pp, qq, e);
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid || filtered != expf) failures++;
      if (expf) nfilt[bs]++;
      for (int k = 0; k < 4; k++)
        if (int'(p_out[k]) != e[k] || int'(q_out[k]) != e[k+4]) begin
          if (failures < 10)
            $display("bs %0d ch %0d qp %0d k %0d: p %0d->%0d exp %0d, q %0d->%0d exp %0d",
                     bs, chroma, qp, k, pp[k], p_out[k], e[k], qq[k], q_out[k], e[k+4]);
          failures++;
        end
    end
    $display("filtered lines per bS 0..4: %0d %0d %0d %0d %0d", nfilt[0], nfilt[1], nfilt[2], nfilt[3], nfilt[4]);
    checks++;
    if (nfilt[0] != 0) failures++;
    for (int b = 1; b < 5; b++) begin
      checks++;
      if (nfilt[b] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
