// intra_pred_gen: eight-pixel parallel intra prediction generator for every
// mode except intra luma 8x8 (luma 4x4 modes 0-8, and the vertical,
// horizontal and DC modes of luma 16x16 and chroma 8x8, applied one 4x4
// sub-block at a time).
//
// Each accepted request produces two rows of one 4x4 block: lanes 0-3 hold
// row 2*half, lanes 4-7 row 2*half+1, so a 4x4 block takes two cycles. The
// neighbour samples are the thirteen samples A..M of the standard: top[0..7]
// = A..H, left[0..3] = I..L, corner = M. For M_DC the mean of A..D and I..L
// is formed here; for M_DCX (16x16 / chroma DC) the caller supplies the mean
// on dc_ext, which the design computes while it evaluates the vertical and
// horizontal modes. Plane prediction is not supported: the design removes it.
//
// The sample equations are the standard's. The generator is written as one
// equation per lane; it does not reproduce the shared adder network of the
// original circuit. All neighbours are taken as available.
//
// Timing: one request per cycle, result registered, out_valid one cycle after
// in_valid.
//
// Origin: eight-pixel parallelism (two rows of a 4x4 block) and the removal
// of plane prediction follow the original design; the internal datapath, the
// registered output and the external-DC mode are this design's own choices,
// the equations are the standard's.
module intra_pred_gen
  import h264_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  ipred_mode_t mode,
  input  logic        half,
  input  pix_t        top    [8],
  input  pix_t        left   [4],
  input  pix_t        corner,
  input  pix_t        dc_ext,
  output logic        out_valid,
  output pix_t        pred   [LANES]
);

  pix_t t [17];
  pix_t l [17];
  pix_t dcv;
  pix_t nxt [LANES];

  always_comb begin
    int sum;
    for (int k = 0; k < 17; k++) begin
      t[k] = '0;
      l[k] = '0;
    end
    t[0] = corner;
    l[0] = corner;
    for (int k = 0; k < 8; k++) t[k+1] = top[k];
    for (int k = 0; k < 4; k++) l[k+1] = left[k];
    sum = 4;
    for (int k = 0; k < 4; k++) sum += int'(top[k]) + int'(left[k]);
    dcv = (mode == M_DCX) ? dc_ext : pix_t'(sum >> 3);
    for (int k = 0; k < LANES; k++)
      nxt[k] = ipred_sample(mode, 4, k % 4, 2*int'(half) + k / 4, t, l, dcv);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int k = 0; k < LANES; k++) pred[k] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) pred <= nxt;
    end
  end

endmodule
