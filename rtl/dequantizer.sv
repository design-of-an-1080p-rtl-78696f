// dequantizer: de-quantization of eight levels per cycle, built like the
// quantizer (two four-lane circuits sharing one table).
//
//   DQ_4   : c * V4 << QP/6
//   DQ_8   : QP >= 36: (c * 16 * V8) << (QP/6 - 6)
//            else      (c * 16 * V8 + 2^(5 - QP/6)) >> (6 - QP/6)
//   DQ_DCL : luma 16x16 DC, as DQ_8 with 16 * V4(0,0)
//   DQ_DCC : chroma DC, ((c * 16 * V4(0,0)) << QP/6) >> 5
// V4 / V8 are the standard's level scale values (flat scaling matrices).
// Results saturate to the 16-bit coefficient type.
//
// Timing: one vector per cycle, registered, out_valid one cycle after
// in_valid. in_idx / lane layout as in quantizer.
//
// Origin: the four-lane split mirrors the quantizer as in the original
// design; the scaling itself is the standard's.
module dequantizer
  import h264_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [1:0] dq_mode,   // 0 DQ_4, 1 DQ_8, 2 DQ_DCL, 3 DQ_DCC
  input  logic [5:0] qp,
  input  logic [2:0] in_idx,
  input  level_t     level [LANES],
  output logic       out_valid,
  output coef_t      coef  [LANES]
);

  coef_t nxt [LANES];

  always_comb begin
    int unsigned m, e, r, c, v;
    longint p;
    m = qp % 6;
    e = qp / 6;
    for (int k = 0; k < LANES; k++) begin
      r = 0;
      c = 0;
      unique case (dq_mode)
        2'd0: begin
          r = k % 4;  c = 2 * in_idx + k / 4;
          v = dqv4(m, cls4(r, c));
          p = longint'(level[k]) * v;
          p = p <<< e;
        end
        2'd1, 2'd2: begin
          if (dq_mode == 2'd1) v = 16 * dqv8(m, cls8(k, in_idx));
          else                 v = 16 * dqv4(m, 0);
          p = longint'(level[k]) * v;
          if (e >= 6) p = p <<< (e - 6);
          else        p = (p + (longint'(1) <<< (5 - e))) >>> (6 - e);
        end
        default: begin
          v = 16 * dqv4(m, 0);
          p = longint'(level[k]) * v;
          p = (p <<< e) >>> 5;
        end
      endcase
      if (p > 32767)       nxt[k] = 16'sd32767;
      else if (p < -32768) nxt[k] = -16'sd32768;
      else                 nxt[k] = coef_t'(p);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int k = 0; k < LANES; k++) coef[k] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) coef <= nxt;
    end
  end

endmodule
