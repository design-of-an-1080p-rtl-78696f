// intra8_pred_gen: prediction generator of the additional intra luma 8x8
// path. It produces one row of an 8x8 block per cycle (lanes 0-3 the left
// four samples, lanes 4-7 the right four), for the nine 8x8 modes.
//
// A load pulse takes the raw neighbours of the 8x8 block (top[0..15] =
// p[0..15,-1], left[0..7] = p[-1,0..7], corner = p[-1,-1]) and registers
// them after the reference smoothing filter of the standard, so the modes
// that need more than the six inputs of the 4x4 generator (vertical right,
// for instance) read them from this register file. The DC value is formed at
// load time. All neighbours are taken as available. Plane prediction does not
// exist for 8x8 and is not needed.
//
// Timing: load takes one cycle; afterwards one row request per cycle, result
// registered, out_valid one cycle after in_valid.
//
// Origin: one 8-sample row of an 8x8 block per cycle follows the original
// design; filtering the references once on load and holding them in registers
// is this design's own choice, the equations are the standard's.
module intra8_pred_gen
  import h264_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  pix_t        top    [16],
  input  pix_t        left   [8],
  input  pix_t        corner,
  input  logic        in_valid,
  input  ipred_mode_t mode,
  input  logic [2:0]  row,
  output logic        out_valid,
  output pix_t        pred   [LANES]
);

  pix_t tf [17];   // filtered top row, tf[0] = filtered corner
  pix_t lf [17];   // filtered left column, lf[0] = filtered corner
  pix_t dc_q;

  // Reference smoothing of the standard ([1 2 1] / 4).
  function automatic pix_t f3(input pix_t a, input pix_t b, input pix_t c);
    return pix_t'((10'(a) + 2 * 10'(b) + 10'(c) + 10'd2) >> 2);
  endfunction

  pix_t tf_n [17];
  pix_t lf_n [17];
  pix_t dc_n;

  always_comb begin
    int sum;
    for (int k = 0; k < 17; k++) begin
      tf_n[k] = '0;
      lf_n[k] = '0;
    end
    tf_n[0] = f3(top[0], corner, left[0]);
    lf_n[0] = tf_n[0];
    tf_n[1] = f3(corner, top[0], top[1]);
    for (int x = 1; x < 15; x++) tf_n[x+1] = f3(top[x-1], top[x], top[x+1]);
    tf_n[16] = f3(top[14], top[15], top[15]);
    lf_n[1] = f3(corner, left[0], left[1]);
    for (int y = 1; y < 7; y++) lf_n[y+1] = f3(left[y-1], left[y], left[y+1]);
    lf_n[8] = f3(left[6], left[7], left[7]);
    sum = 8;
    for (int k = 1; k <= 8; k++) sum += int'(tf_n[k]) + int'(lf_n[k]);
    dc_n = pix_t'(sum >> 4);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 17; k++) begin
        tf[k] <= '0;
        lf[k] <= '0;
      end
      dc_q <= '0;
    end else if (load) begin
      tf   <= tf_n;
      lf   <= lf_n;
      dc_q <= dc_n;
    end
  end

  pix_t nxt [LANES];
  always_comb
    for (int k = 0; k < LANES; k++)
      nxt[k] = ipred_sample(mode, 8, k, int'(row), tf, lf, dc_q);

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
