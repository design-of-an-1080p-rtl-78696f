// inv_transform: inverse transform unit of the reconstruction phase. It
// executes the inverse 4x4 DCT, the inverse 8x8 DCT, the inverse 4x4
// Hadamard transform (luma 16x16 DC) and the inverse 2x2 Hadamard transform
// (chroma DC) on one shared 1-D unit per pass; the 8x8 butterfly is selected
// by the mode and the 4x4 datapaths reuse its adders two at a time.
//
// The input vectors are columns, as the quantizer and de-quantizer deliver
// them. The standard applies the 1-D inverse to the rows first and to the
// columns second, and the rounding shifts inside the butterflies make the
// order matter, so the unit works in four phases of N cycles each (N = 2 for
// 4x4, 8 for 8x8, 1 for 2x2):
//   collect - store the incoming columns
//   rows    - 1-D inverse of one row (4x4: two rows) per cycle
//   columns - 1-D inverse of one column (4x4: two columns) per cycle
//   output  - one row per cycle; for 4x4 lanes 0-3 = row 2k, 4-7 = row 2k+1
// The output is the un-rounded result; the (x + 32) >> 6 shift of the
// reconstruction ("Rec. shifter") follows in recon_add. The inverse 2x2
// Hadamard takes lanes 0-3 = c00 c01 c10 c11 of each chroma component.
//
// Timing: in_ready is high while collecting; the first output is valid
// 2N + 2 cycles after the last input (3 for 2x2), then one row per cycle; a
// new block may start after out_last.
//
// Origin: one unit for inverse 4x4/8x8 DCT and 4x4/2x2 Hadamard, with no
// shifts in the Hadamard paths, follows the original design; collecting the
// whole block before the row and column passes, and the latency, are this
// design's own choices.
module inv_transform
  import h264_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  output logic      in_ready,
  input  tr_mode_t  mode,
  input  coef_t     din  [LANES],
  output logic      out_valid,
  output logic      out_last,
  output logic [2:0] out_idx,
  output coef_t     dout [LANES]
);

  typedef logic signed [19:0] acc_t;
  typedef acc_t acc_vec_t [8];

  function automatic acc_vec_t idct4(input acc_t d0, d1, d2, d3, input logic had);
    acc_t e0, e1, e2, e3;
    acc_vec_t y;
    y = '{default: '0};
    if (had) begin
      y[0] = d0 + d1 + d2 + d3;
      y[1] = d0 + d1 - d2 - d3;
      y[2] = d0 - d1 - d2 + d3;
      y[3] = d0 - d1 + d2 - d3;
    end else begin
      e0 = d0 + d2;
      e1 = d0 - d2;
      e2 = (d1 >>> 1) - d3;
      e3 = d1 + (d3 >>> 1);
      y[0] = e0 + e3;
      y[1] = e1 + e2;
      y[2] = e1 - e2;
      y[3] = e0 - e3;
    end
    return y;
  endfunction

  function automatic acc_vec_t idct8(input acc_vec_t d);
    acc_t e0, e1, e2, e3, e4, e5, e6, e7, f0, f1, f2, f3, f4, f5, f6, f7;
    acc_vec_t g;
    e0 = d[0] + d[4];
    e1 = -d[3] + d[5] - d[7] - (d[7] >>> 1);
    e2 = d[0] - d[4];
    e3 = d[1] + d[7] - d[3] - (d[3] >>> 1);
    e4 = (d[2] >>> 1) - d[6];
    e5 = -d[1] + d[7] + d[5] + (d[5] >>> 1);
    e6 = d[2] + (d[6] >>> 1);
    e7 = d[3] + d[5] + d[1] + (d[1] >>> 1);
    f0 = e0 + e6;          f1 = e1 + (e7 >>> 2);
    f2 = e2 + e4;          f3 = e3 + (e5 >>> 2);
    f4 = e2 - e4;          f5 = (e3 >>> 2) - e5;
    f6 = e0 - e6;          f7 = e7 - (e1 >>> 2);
    g[0] = f0 + f7;  g[1] = f2 + f5;  g[2] = f4 + f3;  g[3] = f6 + f1;
    g[4] = f6 - f1;  g[5] = f4 - f3;  g[6] = f2 - f5;  g[7] = f0 - f7;
    return g;
  endfunction

  function automatic acc_vec_t pass_1d(input acc_vec_t v, input tr_mode_t m);
    acc_vec_t lo, hi, y;
    if (m == TR_DCT8) return idct8(v);
    lo = idct4(v[0], v[1], v[2], v[3], m == TR_DHT4);
    hi = idct4(v[4], v[5], v[6], v[7], m == TR_DHT4);
    for (int k = 0; k < 4; k++) begin
      y[k]   = lo[k];
      y[k+4] = hi[k];
    end
    return y;
  endfunction

  function automatic acc_vec_t ihad2(input acc_vec_t v);
    acc_vec_t y;
    for (int c = 0; c < 2; c++) begin
      y[4*c+0] = v[4*c] + v[4*c+1] + v[4*c+2] + v[4*c+3];
      y[4*c+1] = v[4*c] - v[4*c+1] + v[4*c+2] - v[4*c+3];
      y[4*c+2] = v[4*c] + v[4*c+1] - v[4*c+2] - v[4*c+3];
      y[4*c+3] = v[4*c] - v[4*c+1] - v[4*c+2] + v[4*c+3];
    end
    return y;
  endfunction

  function automatic logic [3:0] nvec(input tr_mode_t m);
    case (m)
      TR_DCT8: return 4'd8;
      TR_DHT2: return 4'd1;
      default: return 4'd2;
    endcase
  endfunction

  typedef enum logic [1:0] { P_COLLECT, P_ROWS, P_COLS, P_OUT } phase_t;
  phase_t     phase;
  tr_mode_t   mode_q, mode_c;
  logic [3:0] cnt;
  acc_t       arr [8][8];           // arr[row][col], rewritten in place

  assign in_ready = (phase == P_COLLECT);
  assign mode_c   = (phase == P_COLLECT && cnt == 0) ? mode : mode_q;

  acc_vec_t rin, rout, cin, cout;
  always_comb begin
    for (int k = 0; k < 8; k++) begin
      rin[k] = '0;
      cin[k] = '0;
    end
    if (mode_q == TR_DCT8)
      for (int j = 0; j < 8; j++) rin[j] = arr[cnt[2:0]][j];
    else
      for (int j = 0; j < 4; j++) begin
        rin[j]   = arr[2*cnt[2:0]][j];
        rin[j+4] = arr[2*cnt[2:0]+1][j];
      end
    if (mode_q == TR_DHT2) for (int j = 0; j < 8; j++) rin[j] = arr[0][j];
    rout = (mode_q == TR_DHT2) ? ihad2(rin) : pass_1d(rin, mode_q);
    if (mode_q == TR_DCT8)
      for (int i = 0; i < 8; i++) cin[i] = arr[i][cnt[2:0]];
    else
      for (int i = 0; i < 4; i++) begin
        cin[i]   = arr[i][2*cnt[2:0]];
        cin[i+4] = arr[i][2*cnt[2:0]+1];
      end
    cout = pass_1d(cin, mode_q);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= P_COLLECT;
      mode_q    <= TR_DCT4;
      cnt       <= '0;
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      out_idx   <= '0;
      for (int k = 0; k < 8; k++) dout[k] <= '0;
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++) arr[i][j] <= '0;
    end else begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      unique case (phase)
        P_COLLECT: if (in_valid) begin
          if (cnt == 0) mode_q <= mode;
          unique case (mode_c)
            TR_DCT8: for (int i = 0; i < 8; i++) arr[i][cnt[2:0]] <= acc_t'(din[i]);
            TR_DHT2: for (int j = 0; j < 8; j++) arr[0][j] <= acc_t'(din[j]);
            default: for (int i = 0; i < 4; i++) begin
              arr[i][2*cnt[2:0]]   <= acc_t'(din[i]);
              arr[i][2*cnt[2:0]+1] <= acc_t'(din[i+4]);
            end
          endcase
          if (cnt + 1 == nvec(mode_c)) begin
            cnt   <= '0;
            phase <= P_ROWS;
          end else cnt <= cnt + 1;
        end
        P_ROWS: begin
          if (mode_q == TR_DCT8)
            for (int j = 0; j < 8; j++) arr[cnt[2:0]][j] <= rout[j];
          else if (mode_q == TR_DHT2)
            for (int j = 0; j < 8; j++) arr[0][j] <= rout[j];
          else
            for (int j = 0; j < 4; j++) begin
              arr[2*cnt[2:0]][j]   <= rout[j];
              arr[2*cnt[2:0]+1][j] <= rout[j+4];
            end
          if (cnt + 1 == nvec(mode_q)) begin
            cnt   <= '0;
            // the 2x2 Hadamard is complete after one pass
            phase <= (mode_q == TR_DHT2) ? P_OUT : P_COLS;
          end else cnt <= cnt + 1;
        end
        P_COLS: begin
          if (mode_q == TR_DCT8)
            for (int i = 0; i < 8; i++) arr[i][cnt[2:0]] <= cout[i];
          else
            for (int i = 0; i < 4; i++) begin
              arr[i][2*cnt[2:0]]   <= cout[i];
              arr[i][2*cnt[2:0]+1] <= cout[i+4];
            end
          if (cnt + 1 == nvec(mode_q)) begin
            cnt   <= '0;
            phase <= P_OUT;
          end else cnt <= cnt + 1;
        end
        P_OUT: begin
          out_valid <= 1'b1;
          out_idx   <= cnt[2:0];
          if (mode_q == TR_DCT8 || mode_q == TR_DHT2)
            for (int j = 0; j < 8; j++)
              dout[j] <= coef_t'(arr[(mode_q == TR_DHT2) ? 0 : cnt[2:0]][j]);
          else
            for (int j = 0; j < 4; j++) begin
              dout[j]   <= coef_t'(arr[2*cnt[2:0]][j]);
              dout[j+4] <= coef_t'(arr[2*cnt[2:0]+1][j]);
            end
          if (cnt + 1 == nvec(mode_q)) begin
            out_last <= 1'b1;
            cnt      <= '0;
            phase    <= P_COLLECT;
          end else cnt <= cnt + 1;
        end
      endcase
    end
  end

endmodule
