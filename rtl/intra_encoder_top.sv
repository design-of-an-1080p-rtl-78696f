// intra_encoder_top: intra encoding flow for one 8x8 luma region of a
// macroblock: two parallel mode-decision paths, a shared reconstruction
// phase, the buffers between them and the deblocking engine.
//
// Flow, in the order the controller runs it:
//  1. Parallel intra 8x8 / 4x4 computation. The additional path (8x8
//     prediction generator, 8x8 forward transform, its own ESATD and mode
//     decision) evaluates the 8x8 block while the 4x4 path evaluates its four
//     4x4 blocks in reconstruction order 0 1 / 2 3. Both use the three-step
//     fast decision (7 of 9 modes per block).
//  2. After each 4x4 decision the best mode is re-computed: its transform
//     coefficients go to the residual buffer and its prediction to the
//     reference buffer; the reconstruction phase then quantizes (levels to
//     the coefficient buffer), de-quantizes, inverse-transforms and adds, so
//     the next 4x4 block predicts from reconstructed neighbours.
//  3. Luma type decision: the 8x8 cost against the sum of the four 4x4
//     costs. If 8x8 wins, its best mode is re-computed twice: once to send
//     the coefficients through the reconstruction phase, and once to
//     regenerate the prediction that is added to the decoded residual (no
//     8x8 prediction buffer).
//  4. Deblocking: the edge sequencer walks the macroblock's edges; the edges
//     of this 8x8 region are filtered line by line in place: the left and
//     top macroblock edges with bS = 4 against the neighbour samples given
//     on left_nb / top_px (modified copies come out on left_out / top_out),
//     and, for a 4x4-transformed block, the internal 4x4 edges with bS = 3.
//
// The chroma, luma 16x16 and inter (FME) sources of the reconstruction phase
// and the entropy coder are outside this module: the coefficient buffer's
// read port is brought out for the entropy coder. All neighbours are taken as
// available, except the top-right of 4x4 block 3, which is never available
// and is replaced by repeating the last top sample, as in the standard.
//
// Interface: load src / neighbours, pulse start; done pulses when the
// deblocked block is on rec_out. Run time is reported on cycles; the ev_*
// outputs pulse on the internal events (mode decisions and their third-step
// branch, start of deblocking, each filtered line) for monitoring.
//
// Origin: the parallel 4x4/8x8 paths, best-mode re-computation (twice for
// 8x8), the shared reconstruction chain through single-port buffers and the
// interleaved deblocking follow the original design. Processing one 8x8
// region, the strictly sequential 4x4 blocks, the 8x8 prediction register
// (pred_hold) and the in-place register deblocking are this design's own
// choices.
module intra_encoder_top
  import h264_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [5:0]  qp,
  input  logic [3:0]  mpm4,            // most probable mode of the 4x4 blocks
  input  logic [3:0]  mpm8,            // most probable mode of the 8x8 block
  input  logic [19:0] mpm_init_cost,   // initial cost of the MPM (lambda table)
  input  pix_t        src     [8][8],  // source samples [row][col]
  input  pix_t        top_px  [4][16], // rows -4..-1 above, cols 0..15
  input  pix_t        left_nb [8][4],  // rows 0..7, cols -4..-1 left
  input  pix_t        corner,          // p[-1,-1]
  output logic        done,
  output logic        best_is_8x8,
  output logic [3:0]  mode8,
  output logic [3:0]  mode4   [4],
  output logic [20:0] cost8,
  output logic [22:0] cost4_sum,
  output pix_t        rec_out [8][8],
  output pix_t        left_out[8][4],
  output pix_t        top_out [4][16],
  output logic [15:0] cycles,
  // status events, one pulse each, for monitoring
  output logic        ev_md4_done,     // a 4x4 mode decision finished
  output logic        ev_md8_done,     // the 8x8 mode decision finished
  output logic        ev_md4_57,       // with ev_md4_done: third step tried 5/7
  output logic        ev_md8_57,       // with ev_md8_done: third step tried 5/7
  output logic        ev_dbf_start,    // deblocking starts; rec_out holds the
                                       // reconstruction before filtering
  output logic        ev_dbf_line,     // a line left the edge filter
  output logic        ev_dbf_changed,  // ... and the filter changed it
  output logic [2:0]  ev_dbf_bs,       // boundary strength of that line
  // coefficient buffer read port (entropy coder side)
  input  logic        cb_rd,
  input  logic [3:0]  cb_raddr,
  output level_t      cb_rdata [16]
);

  // ---------------------------------------------------------------- control
  typedef enum logic [3:0] {
    T_IDLE, T_MD, T_A_RECOMP, T_RECON, T_A_NEXT, T_DECIDE, T_B_RECOMP,
    T_B_PRED, T_DBF, T_DONE
  } tstate_t;
  tstate_t state;

  pix_t       rec [8][8];
  pix_t       lft [8][4];
  pix_t       tp  [4][16];
  pix_t       pred_hold [8][8];
  logic [1:0] blk;                    // current 4x4 block 0..3
  logic       b_md_done;              // 8x8 decision finished
  logic [3:0] best4_q;
  logic [3:0] cnt;
  logic       size8_rc;               // reconstruction of the 8x8 block

  assign rec_out  = rec;
  assign left_out = lft;
  assign top_out  = tp;

  // ----------------------------------------------------- 4x4 path (path A)
  logic        md4_start, md4_req, md4_done, md4_branch;
  logic [3:0]  md4_mode, md4_best;
  logic [20:0] md4_cost;
  logic        a_req, a_half, a_recomp;
  ipred_mode_t a_mode;
  logic        pa_valid;
  pix_t        pa [LANES];
  pix_t        a_top [8], a_left [4], a_corner;
  logic        a_half_q;
  logic [3:0]  md4_mode_q;
  logic        fa_ready, fa_valid, fa_last;
  logic [2:0]  fa_idx;
  coef_t       fa_in [LANES], fa_out [LANES];
  logic        ea_valid;
  logic [19:0] ea_cost;

  logic [1:0] bx, by;
  assign bx = {1'b0, blk[0]};
  assign by = {1'b0, blk[1]};

  // Neighbours of the current 4x4 block from the region's reconstruction.
  always_comb begin
    for (int k = 0; k < 8; k++) begin
      if (by == 0) a_top[k] = tp[3][4*bx + k];
      else if (k < 4 || bx == 0) a_top[k] = rec[3][4*bx + k];
      else a_top[k] = rec[3][7];              // block 3: no top-right
    end
    for (int k = 0; k < 4; k++)
      a_left[k] = (bx == 0) ? lft[4*by + k][3] : rec[4*by + k][3];
    if (bx == 0 && by == 0) a_corner = corner;
    else if (by == 0)       a_corner = tp[3][3];
    else if (bx == 0)       a_corner = lft[3][3];
    else                    a_corner = rec[3][3];
  end

  mode_decision u_md4 (
    .clk, .rst_n, .start(md4_start), .mpm(mpm4), .mpm_init_cost,
    .req_valid(md4_req), .req_mode(md4_mode), .cost_valid(ea_valid),
    .cost(ea_cost), .done(md4_done), .best_mode(md4_best),
    .best_cost(md4_cost), .took_5_7(md4_branch));

  // Two-cycle request: half 0 then half 1 of the 4x4 block.
  logic a_second, a_first;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) a_second <= 1'b0;
    else        a_second <= a_req && !a_second;
  end
  assign a_half = a_second;
  assign a_first = md4_req || (state == T_A_RECOMP && cnt == 0);
  assign a_req   = a_first || a_second;
  assign a_mode  = ipred_mode_t'(a_recomp ? best4_q : (md4_req ? md4_mode : md4_mode_q));
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) md4_mode_q <= '0;
    else if (md4_req) md4_mode_q <= md4_mode;
  end

  intra_pred_gen u_pred4 (
    .clk, .rst_n, .in_valid(a_req), .mode(a_mode), .half(a_half),
    .top(a_top), .left(a_left), .corner(a_corner), .dc_ext(8'd0),
    .out_valid(pa_valid), .pred(pa));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) a_half_q <= 1'b0;
    else        a_half_q <= a_half;
  end

  always_comb
    for (int k = 0; k < LANES; k++)
      fa_in[k] = coef_t'(int'(src[4*by + 2*a_half_q + k/4][4*bx + k%4]) - int'(pa[k]));

  fwd_transform u_fwd4 (
    .clk, .rst_n, .in_valid(pa_valid), .in_ready(fa_ready), .mode(TR_DCT4),
    .din(fa_in), .out_valid(fa_valid), .out_last(fa_last), .out_idx(fa_idx),
    .dout(fa_out));

  esatd_cost u_esatd4 (
    .clk, .rst_n, .in_valid(fa_valid && !a_recomp), .in_last(fa_last),
    .size8(1'b0), .in_idx(fa_idx), .coef(fa_out), .out_valid(ea_valid),
    .cost(ea_cost));

  // ------------------------------------------ additional 8x8 path (path B)
  logic        md8_start, md8_req, md8_done, md8_branch;
  logic [3:0]  md8_mode, md8_best, md8_mode_q;
  logic [20:0] md8_cost;
  logic        b_load, b_req;
  ipred_mode_t b_mode;
  logic [2:0]  b_row, b_row_q, b_row_c;
  logic        b_busy;
  logic        pb_valid;
  pix_t        pb [LANES];
  pix_t        b_top [16], b_left [8];
  logic        fb_ready, fb_valid, fb_last;
  logic [2:0]  fb_idx;
  coef_t       fb_in [LANES], fb_out [LANES];
  logic        eb_valid;
  logic [19:0] eb_cost;
  logic        b_recomp;      // coefficients of the best 8x8 mode
  logic        b_regen;       // prediction of the best 8x8 mode

  always_comb begin
    for (int k = 0; k < 16; k++) b_top[k] = tp[3][k];
    for (int k = 0; k < 8; k++)  b_left[k] = lft[k][3];
  end

  mode_decision u_md8 (
    .clk, .rst_n, .start(md8_start), .mpm(mpm8), .mpm_init_cost,
    .req_valid(md8_req), .req_mode(md8_mode), .cost_valid(eb_valid),
    .cost(eb_cost), .done(md8_done), .best_mode(md8_best),
    .best_cost(md8_cost), .took_5_7(md8_branch));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b_busy     <= 1'b0;
      b_row      <= '0;
      md8_mode_q <= '0;
    end else begin
      if (md8_req) md8_mode_q <= md8_mode;
      if (md8_req || (state == T_B_RECOMP && cnt == 0) || (state == T_B_PRED && cnt == 0)) begin
        b_busy <= 1'b1;
        b_row  <= 3'd1;
      end else if (b_busy) begin
        b_row <= b_row + 1;
        if (b_row == 3'd7) b_busy <= 1'b0;
      end
    end
  end
  assign b_req = md8_req || b_busy || (state == T_B_RECOMP && cnt == 0) ||
                 (state == T_B_PRED && cnt == 0);
  assign b_row_c = b_busy ? b_row : 3'd0;
  assign b_mode = ipred_mode_t'((b_recomp || b_regen) ? md8_best :
                                (md8_req ? md8_mode : md8_mode_q));

  intra8_pred_gen u_pred8 (
    .clk, .rst_n, .load(b_load), .top(b_top), .left(b_left), .corner,
    .in_valid(b_req), .mode(b_mode), .row(b_row_c), .out_valid(pb_valid),
    .pred(pb));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) b_row_q <= '0;
    else        b_row_q <= b_row_c;
  end

  always_comb
    for (int k = 0; k < LANES; k++)
      fb_in[k] = coef_t'(int'(src[b_row_q][k]) - int'(pb[k]));

  fwd_transform u_fwd8 (
    .clk, .rst_n, .in_valid(pb_valid && !b_regen), .in_ready(fb_ready),
    .mode(TR_DCT8), .din(fb_in), .out_valid(fb_valid), .out_last(fb_last),
    .out_idx(fb_idx), .dout(fb_out));

  esatd_cost u_esatd8 (
    .clk, .rst_n, .in_valid(fb_valid && !b_recomp), .in_last(fb_last),
    .size8(1'b1), .in_idx(fb_idx), .coef(fb_out), .out_valid(eb_valid),
    .cost(eb_cost));

  // ------------------------------------------- buffers between the stages
  logic  rb_ce, rb_we;
  logic [4:0] rb_addr;
  coef_t rb_wdata [LANES], rb_rdata [LANES];
  logic  fb_ce, fb_we;
  logic [4:0] ref_addr;
  pix_t  ref_wdata [LANES], ref_rdata [LANES];

  residual_buffer u_resbuf (
    .clk, .ce(rb_ce), .we(rb_we), .chroma(1'b0), .addr(rb_addr),
    .wdata(rb_wdata), .rdata(rb_rdata));

  reference_buffer u_refbuf (
    .clk, .ce(fb_ce), .we(fb_we), .chroma(1'b0), .addr(ref_addr),
    .wdata(ref_wdata), .rdata(ref_rdata));

  // ---------------------------------------------------- reconstruction
  logic       rc_rd;           // residual buffer read issued this cycle
  logic [3:0] rc_cnt;          // reads issued
  logic       q_in_valid;
  logic [2:0] q_idx, q_idx_d;
  logic       q_valid, dq_valid;
  level_t     q_level [LANES];
  coef_t      dq_coef [LANES];
  logic       it_ready, it_valid, it_last;
  logic [2:0] it_idx;
  coef_t      it_out [LANES];
  logic       ra_valid;
  pix_t       ra_out [LANES];
  logic [2:0] ra_idx;
  pix_t       ra_pred [LANES];
  logic [3:0] cb_word;
  logic       rc_rd_q, ref_rd_q;
  logic [2:0] rc_idx_q;

  quantizer u_q (
    .clk, .rst_n, .in_valid(q_in_valid), .size8(size8_rc), .dc(1'b0), .qp,
    .in_idx(q_idx), .coef(rb_rdata), .out_valid(q_valid), .level(q_level));

  dequantizer u_dq (
    .clk, .rst_n, .in_valid(q_valid), .dq_mode(size8_rc ? 2'd1 : 2'd0), .qp,
    .in_idx(q_idx_d), .level(q_level), .out_valid(dq_valid), .coef(dq_coef));

  coef_buffer u_cbuf (
    .clk, .rst_n, .wr(q_valid), .half(q_idx_d[0]), .chroma(1'b0),
    .waddr(cb_word), .wdata(q_level), .rd(cb_rd), .rd_chroma(1'b0),
    .raddr(cb_raddr), .rdata(cb_rdata));

  inv_transform u_it (
    .clk, .rst_n, .in_valid(dq_valid), .in_ready(it_ready),
    .mode(size8_rc ? TR_DCT8 : TR_DCT4), .din(dq_coef), .out_valid(it_valid),
    .out_last(it_last), .out_idx(it_idx), .dout(it_out));

  always_comb
    for (int k = 0; k < LANES; k++)
      ra_pred[k] = size8_rc ? pred_hold[it_idx][k]
                            : pred_hold[2*it_idx + k/4][k%4];

  recon_add u_add (
    .clk, .rst_n, .in_valid(it_valid), .res(it_out), .pred(ra_pred),
    .out_valid(ra_valid), .rec(ra_out));

  // ------------------------------------------------------------ deblocking
  logic       eo_start, eo_valid, eo_ready, eo_horiz, eo_done;
  logic [5:0] eo_num;
  logic [1:0] eo_x, eo_y, eo_plane;
  logic [2:0] eo_bs;
  logic       df_in, df_valid, df_filtered;
  pix_t       df_p [4], df_q [4], df_po [4], df_qo [4];
  logic [1:0] line;
  logic       df_wait;
  logic       edge_here;

  dbf_edge_order u_eo (
    .clk, .rst_n, .start(eo_start), .edge_ready(eo_ready),
    .edge_valid(eo_valid), .edge_num(eo_num), .edge_horiz(eo_horiz),
    .blk_x(eo_x), .blk_y(eo_y), .plane(eo_plane), .bs(eo_bs),
    .mb_done(eo_done));

  // Edge belongs to this 8x8 region and is filtered for its transform size.
  // Internal 4x4 edges of an 8x8-transformed block are not filtered.
  assign edge_here = eo_valid && eo_plane == 0 && eo_x < 2 && eo_y < 2 &&
                     (eo_bs == 3'd4 || !best_is_8x8);

  always_comb begin
    int r, c;
    r = 0;
    c = 0;
    for (int k = 0; k < 4; k++) begin
      if (!eo_horiz) begin
        r = 4*int'(eo_y) + int'(line);
        df_p[k] = (eo_x == 0) ? lft[r][3-k] : rec[r][4*int'(eo_x)-1-k];
        df_q[k] = rec[r][4*int'(eo_x)+k];
      end else begin
        c = 4*int'(eo_x) + int'(line);
        df_p[k] = (eo_y == 0) ? tp[3-k][c] : rec[4*int'(eo_y)-1-k][c];
        df_q[k] = rec[4*int'(eo_y)+k][c];
      end
    end
  end

  assign df_in    = (state == T_DBF) && edge_here && !df_wait;
  assign eo_ready = (state == T_DBF) && (!edge_here || (df_valid && line == 2'd3));

  deblock_filter u_dbf (
    .clk, .rst_n, .in_valid(df_in), .bs(eo_bs), .chroma(1'b0), .qp,
    .p(df_p), .q(df_q), .out_valid(df_valid), .filtered(df_filtered),
    .p_out(df_po), .q_out(df_qo));

  // --------------------------------------------------------- main sequence
  assign md4_start = (state == T_MD && cnt == 0) || (state == T_A_NEXT);
  assign md8_start = (state == T_MD && cnt == 0);
  assign b_load    = (state == T_MD && cnt == 0);
  assign eo_start  = (state == T_DBF && cnt == 0);

  always_comb begin
    rb_ce = 1'b0;  rb_we = 1'b0;  rb_addr = '0;  rb_wdata = fa_out;
    fb_ce = 1'b0;  fb_we = 1'b0;  ref_addr = '0; ref_wdata = pa;
    rc_rd = 1'b0;
    if (a_recomp && fa_valid) begin
      rb_ce = 1'b1;  rb_we = 1'b1;  rb_addr = {2'b0, blk, fa_idx[0]};
    end else if (b_recomp && fb_valid) begin
      rb_ce = 1'b1;  rb_we = 1'b1;  rb_addr = {2'b0, fb_idx};  rb_wdata = fb_out;
    end else if (state == T_RECON && rc_cnt < (size8_rc ? 4'd8 : 4'd2)) begin
      rb_ce = 1'b1;  rc_rd = 1'b1;
      rb_addr = size8_rc ? {2'b0, rc_cnt[2:0]} : {2'b0, blk, rc_cnt[0]};
    end
    if (a_recomp && pa_valid) begin
      fb_ce = 1'b1;  fb_we = 1'b1;  ref_addr = {2'b0, blk, a_half_q};
    end else if (state == T_RECON && !size8_rc && rc_cnt < 4'd2) begin
      fb_ce = 1'b1;  ref_addr = {2'b0, blk, rc_cnt[0]};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rc_rd_q  <= 1'b0;
      ref_rd_q <= 1'b0;
      rc_idx_q <= '0;
      q_idx_d  <= '0;
    end else begin
      rc_rd_q  <= rc_rd;
      ref_rd_q <= fb_ce && !fb_we;
      rc_idx_q <= rc_cnt[2:0];
      if (q_in_valid) q_idx_d <= q_idx;
    end
  end
  assign q_in_valid = rc_rd_q;
  assign q_idx      = rc_idx_q;
  // coefficient buffer word: 4x4 block b -> word b; 8x8 -> words 0..3
  assign cb_word = size8_rc ? {2'b0, q_idx_d[2:1]} : {2'b0, blk};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= T_IDLE;
      cnt         <= '0;
      blk         <= '0;
      rc_cnt      <= '0;
      a_recomp    <= 1'b0;
      b_recomp    <= 1'b0;
      b_regen     <= 1'b0;
      size8_rc    <= 1'b0;
      b_md_done   <= 1'b0;
      best4_q     <= '0;
      best_is_8x8 <= 1'b0;
      mode8       <= '0;
      cost8       <= '0;
      cost4_sum   <= '0;
      done        <= 1'b0;
      cycles      <= '0;
      line        <= '0;
      df_wait     <= 1'b0;
      for (int k = 0; k < 4; k++) mode4[k] <= '0;
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++) begin
          rec[r][c]       <= '0;
          pred_hold[r][c] <= '0;
        end
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 4; c++) lft[r][c] <= '0;
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 16; c++) tp[r][c] <= '0;
    end else begin
      done <= 1'b0;
      if (state != T_IDLE && state != T_DONE) cycles <= cycles + 1;

      // the 8x8 decision runs in parallel with everything of path A
      if (md8_done) begin
        b_md_done <= 1'b1;
        mode8     <= md8_best;
        cost8     <= md8_cost;
      end

      // the reconstruction adder writes the region in place
      if (ra_valid)
        for (int k = 0; k < LANES; k++)
          if (size8_rc) rec[ra_idx][k] <= ra_out[k];
          else rec[4*by + 2*ra_idx + k/4][4*bx + k%4] <= ra_out[k];

      // prediction values for the adder
      if (ref_rd_q)
        for (int k = 0; k < LANES; k++)
          pred_hold[2*rc_idx_q + k/4][k%4] <= ref_rdata[k];
      if (b_regen && pb_valid)
        for (int k = 0; k < LANES; k++) pred_hold[b_row_q][k] <= pb[k];

      unique case (state)
        T_IDLE: if (start) begin
          state       <= T_MD;
          cnt         <= '0;
          blk         <= '0;
          cycles      <= '0;
          b_md_done   <= 1'b0;
          best_is_8x8 <= 1'b0;
          size8_rc    <= 1'b0;
          cost4_sum   <= '0;
          lft         <= left_nb;
          tp          <= top_px;
        end
        T_MD: begin
          cnt <= 4'd1;
          if (md4_done) begin
            best4_q    <= md4_best;
            mode4[blk] <= md4_best;
            cost4_sum  <= cost4_sum + 23'(md4_cost);
            a_recomp   <= 1'b1;
            cnt        <= '0;
            state      <= T_A_RECOMP;
          end
        end
        T_A_RECOMP: begin
          cnt <= cnt + 1;
          if (a_recomp && fa_last) begin
            a_recomp <= 1'b0;
            rc_cnt   <= '0;
            state    <= T_RECON;
          end
        end
        T_RECON: begin
          if (rc_rd || (fb_ce && !fb_we)) rc_cnt <= rc_cnt + 1;
          if (ra_valid && ra_idx == (size8_rc ? 3'd7 : 3'd1)) begin
            if (size8_rc)       begin cnt <= '0; state <= T_DBF; end
            else if (blk == 2'd3) state <= T_DECIDE;
            else begin
              blk   <= blk + 1;
              state <= T_A_NEXT;
            end
          end
        end
        T_A_NEXT: begin
          cnt   <= 4'd1;
          state <= T_MD;
        end
        T_DECIDE: if (b_md_done) begin
          if (cost8 < 21'(cost4_sum)) begin
            best_is_8x8 <= 1'b1;
            size8_rc    <= 1'b1;
            b_recomp    <= 1'b1;
            cnt         <= '0;
            state       <= T_B_RECOMP;
          end else begin
            cnt   <= '0;
            state <= T_DBF;
          end
        end
        T_B_RECOMP: begin
          cnt <= 4'd1;
          if (fb_last) begin
            b_recomp <= 1'b0;
            b_regen  <= 1'b1;
            cnt      <= '0;
            state    <= T_B_PRED;
          end
        end
        T_B_PRED: begin
          cnt <= cnt + 1;
          if (pb_valid && b_row_q == 3'd7) begin
            b_regen <= 1'b0;
            rc_cnt  <= '0;
            state   <= T_RECON;
          end
        end
        T_DBF: begin
          cnt <= 4'd1;
          if (df_in) df_wait <= 1'b1;
          if (df_valid) begin
            df_wait <= 1'b0;
            line    <= line + 1;
            for (int k = 0; k < 4; k++) begin
              if (!eo_horiz) begin
                if (eo_x == 0) lft[4*eo_y + line][3-k] <= df_po[k];
                else rec[4*eo_y + line][4*eo_x - 1 - k] <= df_po[k];
                rec[4*eo_y + line][4*eo_x + k] <= df_qo[k];
              end else begin
                if (eo_y == 0) tp[3-k][4*eo_x + line] <= df_po[k];
                else rec[4*eo_y - 1 - k][4*eo_x + line] <= df_po[k];
                rec[4*eo_y + k][4*eo_x + line] <= df_qo[k];
              end
            end
          end
          if (eo_done) state <= T_DONE;
        end
        T_DONE: begin
          done  <= 1'b1;
          state <= T_IDLE;
        end
        default: state <= T_IDLE;
      endcase
    end
  end

  assign ev_md4_done    = md4_done;
  assign ev_md8_done    = md8_done;
  assign ev_md4_57      = md4_branch;
  assign ev_md8_57      = md8_branch;
  assign ev_dbf_start   = eo_start;
  assign ev_dbf_line    = df_valid;
  assign ev_dbf_changed = df_filtered;
  assign ev_dbf_bs      = eo_bs;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ra_idx <= '0;
    else if (it_valid) ra_idx <= it_idx;
  end

endmodule
