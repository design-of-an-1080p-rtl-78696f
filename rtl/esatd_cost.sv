// esatd_cost: enhanced SATD (ESATD) cost of one transformed block.
//
// The cost of a block is the sum of the absolute transform coefficients,
// each weighted by a factor derived from the quantization multipliers, then
// scaled down: for a 4x4 block the weights are 32 (even,even), 20 (odd,odd)
// and 25 (otherwise) and the sum is divided by 32 (>> 5). For an 8x8 block
// the shift is one larger (>> 6), because the DC gain of the 8x8 transform is
// half that of the 4x4 one. The 8x8 weights use the same rule as the 4x4
// ones, 32 * sqrt(MF / MF(0,0)) of the QP%6 = 0 multipliers, rounded: 32,
// 30, 40, 31, 36, 35 for the six 8x8 position classes.
//
// Input: the column vectors of the forward transform unit (see
// fwd_transform): in_idx is the column index; for 4x4 blocks lanes 0-3 are
// column 2*idx and lanes 4-7 column 2*idx+1. in_last marks the last vector
// of the block. Output: block cost, valid one cycle after in_last.
//
// Origin: the 4x4 weights 32/25/20 over 32 and the one-larger shift for 8x8
// follow the original design; the 8x8 weights and the single shift after
// accumulation are this design's own choices.
module esatd_cost
  import h264_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic        in_last,
  input  logic        size8,
  input  logic [2:0]  in_idx,
  input  coef_t       coef [LANES],
  output logic        out_valid,
  output logic [19:0] cost
);

  function automatic int unsigned w4(input int unsigned i, input int unsigned j);
    unique case (cls4(i, j))
      0: return 32;
      1: return 20;
      default: return 25;
    endcase
  endfunction

  function automatic int unsigned w8(input int unsigned i, input int unsigned j);
    unique case (cls8(i, j))
      0: return 32;
      1: return 30;
      2: return 40;
      3: return 31;
      4: return 36;
      default: return 35;
    endcase
  endfunction

  logic [25:0] part, acc;

  always_comb begin
    automatic int unsigned s, a, r, c;
    s = 0;
    a = 0;
    r = 0;
    c = 0;
    for (int k = 0; k < LANES; k++) begin
      a = (coef[k] < 0) ? int'(-coef[k]) : int'(coef[k]);
      if (size8) begin
        r = k;
        c = in_idx;
        s += a * w8(r, c);
      end else begin
        r = k % 4;
        c = 2 * in_idx + k / 4;
        s += a * w4(r, c);
      end
    end
    part = 26'(s);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      out_valid <= 1'b0;
      cost      <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        if (in_last) begin
          acc       <= '0;
          out_valid <= 1'b1;
          cost      <= 20'((acc + part) >> (size8 ? 6 : 5));
        end else acc <= acc + part;
      end
    end
  end

endmodule
