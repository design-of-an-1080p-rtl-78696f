// quantizer: forward quantization of eight transform coefficients per cycle.
//
// Two quantization circuits (lanes 0-3 and lanes 4-7) share one quantization
// parameter table. For a 4x4 block the input vector holds two columns (see
// fwd_transform), so one circuit always sees even-column and the other
// odd-column multipliers; for an 8x8 block they take the first and second
// four positions of one line. Since the multiplier pattern is symmetric the
// same holds for rows.
//
//   level = sign(c) * ((|c| * MF + f) >> qbits), f = 2^qbits / 3 (intra)
//   qbits = 15 + QP/6 for 4x4, 16 + QP/6 for 8x8;
//   dc = 1 (Hadamard-transformed DC values): shift by the 4x4 qbits + 1,
//   rounding offset 2f of the 4x4 qbits, MF(0,0).
// MF comes from the standard's tables (h264_pkg), flat scaling matrices.
// Levels saturate to 14 bits (the coefficient buffer word is 16 x 14 bits).
//
// Timing: one vector per cycle, registered, out_valid one cycle after
// in_valid. in_idx is the column (4x4: column pair) index of the vector.
//
// Origin: the pair of four-lane circuits sharing one table and the way that
// table is split follow the original design; the rounding offset (1/3, intra)
// and the saturation to the 14-bit level field are this design's own choices
// taken from common encoder practice.
module quantizer
  import h264_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic       size8,
  input  logic       dc,
  input  logic [5:0] qp,
  input  logic [2:0] in_idx,
  input  coef_t      coef  [LANES],
  output logic       out_valid,
  output level_t     level [LANES]
);

  // Quantization parameter table: multiplier of each lane for this vector.
  int unsigned mf [LANES];
  int unsigned qbits;
  logic [31:0] fofs;
  level_t nxt [LANES];

  always_comb begin
    int unsigned m, r, c;
    m = qp % 6;
    r = 0;
    c = 0;
    qbits = ((size8 || dc) ? 16 : 15) + qp / 6;
    fofs  = dc ? ((32'd1 << (qbits - 1)) / 3) << 1 : (32'd1 << qbits) / 3;
    for (int k = 0; k < LANES; k++) begin
      if (dc)         mf[k] = qmf4(m, 0);
      else if (size8) begin
        r = k;  c = in_idx;
        mf[k] = qmf8(m, cls8(r, c));
      end else begin
        r = k % 4;  c = 2 * in_idx + k / 4;
        mf[k] = qmf4(m, cls4(r, c));
      end
    end
  end

  // The two quantization circuits.
  always_comb begin
    logic [47:0] mag;
    logic [47:0] q;
    for (int k = 0; k < LANES; k++) begin
      mag = 48'((coef[k] < 0) ? -int'(coef[k]) : int'(coef[k]));
      q   = (mag * 48'(mf[k]) + 48'(fofs)) >> qbits;
      if (q > 48'd8191) q = 48'd8191;
      nxt[k] = (coef[k] < 0) ? -level_t'(q) : level_t'(q);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int k = 0; k < LANES; k++) level[k] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) level <= nxt;
    end
  end

endmodule
