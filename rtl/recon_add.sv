// recon_add: the "Rec. shifter" and "Add" stages of the reconstruction
// phase, eight samples per cycle.
//
//   rec = clip(pred + ((res + 32) >> 6), 0, 255)
// res is the un-rounded inverse transform output; pred comes from the
// reference buffer (inter or intra prediction of the chosen mode) or, for an
// intra 8x8 block, straight from the 8x8 prediction generator.
//
// Timing: one vector per cycle, registered, out_valid one cycle after
// in_valid.
//
// Origin: the shifter-then-adder stage follows the original reconstruction
// chain; the shift by 6 with rounding is the standard's.
module recon_add
  import h264_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  coef_t res  [LANES],
  input  pix_t  pred [LANES],
  output logic  out_valid,
  output pix_t  rec  [LANES]
);

  pix_t nxt [LANES];
  always_comb begin
    logic signed [17:0] s;
    for (int k = 0; k < LANES; k++) begin
      s = 18'(signed'({1'b0, pred[k]})) + ((18'(res[k]) + 18'sd32) >>> 6);
      if (s < 0)        nxt[k] = 8'd0;
      else if (s > 255) nxt[k] = 8'd255;
      else              nxt[k] = pix_t'(s);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int k = 0; k < LANES; k++) rec[k] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) rec <= nxt;
    end
  end

endmodule
