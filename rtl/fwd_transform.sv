// fwd_transform: shared 2-D forward transform unit of the prediction phase.
// It executes the 4x4 integer DCT, the 8x8 integer DCT, the 4x4 Hadamard
// transform of the luma 16x16 DC values and the 2x2 Hadamard transform of the
// chroma DC values.
//
// Structure: a 1-D row transform unit on the input, an 8x8 transpose register
// array, and a 1-D column transform unit on the output, eight samples wide.
// The 4-point DCT butterfly is the usual one (sums and differences of
// inputs 0/3 and 1/2, then a second butterfly stage with a <<1 on the odd
// outputs); the 4x4 Hadamard uses the same butterflies without the shifts.
// The 8-point transform is the integer 8x8 transform of the high profile,
// written in its common butterfly form.
//
// Interface (all vectors 8 lanes of coef_t):
//   TR_DCT4, TR_DHT4: 2 input vectors, lanes 0-3 = row 2k, lanes 4-7 = row
//     2k+1; 2 output vectors, lanes 0-3 = column 2k, lanes 4-7 = column 2k+1.
//     The DHT4 output is halved (rounded), as for the luma DC path.
//   TR_DCT8: 8 input vectors (rows), 8 output vectors (columns).
//   TR_DHT2: 1 input vector, lanes 0-3 = c00 c01 c10 c11 of one chroma
//     component, lanes 4-7 those of the other; 1 output vector, same layout.
// Columns are output rather than rows: every later stage (ESATD weights,
// quantization classes) is symmetric in row and column.
//
// Timing: in_ready is high while the unit collects a block; the first output
// vector is valid two cycles after the last input was taken, then one vector
// per cycle. The mode is sampled with the first input vector. A new block can
// start in the cycle after out_last.
//
// Origin: one shared row/column butterfly datapath for 4x4 DCT, 8x8 DCT, 4x4
// and 2x2 Hadamard, eight inputs per cycle, follows the original design; the
// column output order, the Hadamard scaling point and the latency are this
// design's own choices.
module fwd_transform
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

  function automatic acc_vec_t dct4_1d(input acc_t x0, x1, x2, x3, input logic had);
    acc_t s0, s1, d0, d1;
    acc_vec_t y;
    s0 = x0 + x3;  s1 = x1 + x2;
    d0 = x0 - x3;  d1 = x1 - x2;
    y = '{default: '0};
    y[0] = s0 + s1;
    y[2] = s0 - s1;
    y[1] = had ? d0 + d1 : (d0 <<< 1) + d1;
    y[3] = had ? d0 - d1 : d0 - (d1 <<< 1);
    return y;
  endfunction

  function automatic acc_vec_t dct8_1d(input acc_vec_t x);
    acc_t a0, a1, a2, a3, a4, a5, a6, a7, b0, b1, b2, b3, b4, b5, b6, b7;
    acc_vec_t y;
    a0 = x[0] + x[7]; a1 = x[1] + x[6]; a2 = x[2] + x[5]; a3 = x[3] + x[4];
    a4 = x[0] - x[7]; a5 = x[1] - x[6]; a6 = x[2] - x[5]; a7 = x[3] - x[4];
    b0 = a0 + a3; b1 = a1 + a2; b2 = a0 - a3; b3 = a1 - a2;
    b4 = a5 + a6 + ((a4 >>> 1) + a4);
    b5 = a4 - a7 - ((a6 >>> 1) + a6);
    b6 = a4 + a7 - ((a5 >>> 1) + a5);
    b7 = a5 - a6 + ((a7 >>> 1) + a7);
    y[0] = b0 + b1;
    y[4] = b0 - b1;
    y[2] = b2 + (b3 >>> 1);
    y[6] = (b2 >>> 1) - b3;
    y[1] = b4 + (b7 >>> 2);
    y[3] = b5 + (b6 >>> 2);
    y[5] = b6 - (b5 >>> 2);
    y[7] = (b4 >>> 2) - b7;
    return y;
  endfunction

  // Row (first) or column (second) 1-D pass over one 8-lane vector.
  function automatic acc_vec_t pass_1d(input acc_vec_t v, input tr_mode_t m);
    acc_vec_t lo, hi, y;
    if (m == TR_DCT8) return dct8_1d(v);
    lo = dct4_1d(v[0], v[1], v[2], v[3], m == TR_DHT4);
    hi = dct4_1d(v[4], v[5], v[6], v[7], m == TR_DHT4);
    for (int k = 0; k < 4; k++) begin
      y[k]   = lo[k];
      y[k+4] = hi[k];
    end
    return y;
  endfunction

  function automatic acc_vec_t dht2(input acc_vec_t v);
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

  typedef enum logic { S_IN, S_OUT } state_t;
  state_t   state;
  tr_mode_t mode_q, mode_c;
  logic [3:0] cnt;
  acc_t     arr [8][8];          // arr[row][col] after the row pass

  assign in_ready = (state == S_IN);
  assign mode_c   = (cnt == 0) ? mode : mode_q;

  acc_vec_t row_in, row_out;
  always_comb begin
    for (int k = 0; k < 8; k++) row_in[k] = acc_t'(din[k]);
    row_out = pass_1d(row_in, mode_c);
  end

  // Column gather for the output pass.
  acc_vec_t col_in, col_out;
  always_comb begin
    for (int k = 0; k < 8; k++) col_in[k] = '0;
    unique case (mode_q)
      TR_DCT8: for (int i = 0; i < 8; i++) col_in[i] = arr[i][cnt[2:0]];
      TR_DHT2: for (int i = 0; i < 8; i++) col_in[i] = arr[0][i];
      default:
        for (int i = 0; i < 4; i++) begin
          col_in[i]   = arr[i][2*cnt[2:0]];
          col_in[i+4] = arr[i][2*cnt[2:0]+1];
        end
    endcase
    if (mode_q == TR_DHT2) col_out = dht2(col_in);
    else                   col_out = pass_1d(col_in, mode_q);
    if (mode_q == TR_DHT4)
      for (int k = 0; k < 8; k++) col_out[k] = (col_out[k] + 1) >>> 1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IN;
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
      unique case (state)
        S_IN: if (in_valid) begin
          if (cnt == 0) mode_q <= mode;
          unique case (mode_c)
            TR_DCT8: for (int j = 0; j < 8; j++) arr[cnt[2:0]][j] <= row_out[j];
            TR_DHT2: for (int j = 0; j < 8; j++) arr[0][j] <= row_in[j];
            default: for (int j = 0; j < 4; j++) begin
              arr[2*cnt[2:0]][j]   <= row_out[j];
              arr[2*cnt[2:0]+1][j] <= row_out[j+4];
            end
          endcase
          if (cnt + 1 == nvec(mode_c)) begin
            cnt   <= '0;
            state <= S_OUT;
          end else cnt <= cnt + 1;
        end
        S_OUT: begin
          out_valid <= 1'b1;
          out_idx   <= cnt[2:0];
          for (int k = 0; k < 8; k++) dout[k] <= coef_t'(col_out[k]);
          if (cnt + 1 == nvec(mode_q)) begin
            out_last <= 1'b1;
            cnt      <= '0;
            state    <= S_IN;
          end else cnt <= cnt + 1;
        end
      endcase
    end
  end

endmodule
