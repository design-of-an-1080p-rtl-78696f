// deblock_filter: edge filter of the deblocking engine. It filters one line
// of samples across a block edge per cycle: p[3..0] on one side (p[0]
// next to the edge) and q[0..3] on the other. Vertical edges are filtered
// along rows (horizontal filtering) and horizontal edges along columns
// (vertical filtering); the caller presents the line either way.
//
// The filter is the in-loop filter of the standard: the sample-level
// decision (|p0-q0| < alpha, |p1-p0| < beta, |q1-q0| < beta), the normal
// filter with the tc0 clipping table for bS 1-3 and the strong filter for
// bS = 4, for luma and chroma lines (chroma changes p0 and q0 only). alpha,
// beta and tc0 come from the standard's tables indexed by the average QP of
// the two blocks; the slice offsets are taken as zero.
//
// Timing: one line per cycle, registered, out_valid one cycle after
// in_valid. filtered reports whether the line was changed by the filter.
//
// Origin: the original design reuses an existing standard-conforming filter;
// this one is written from the standard, with a one-cycle registered stage as
// its own choice.
module deblock_filter
  import h264_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [2:0] bs,
  input  logic       chroma,
  input  logic [5:0] qp,
  input  pix_t       p     [4],
  input  pix_t       q     [4],
  output logic       out_valid,
  output logic       filtered,
  output pix_t       p_out [4],
  output pix_t       q_out [4]
);

  function automatic int clip3(input int lo, input int hi, input int v);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  function automatic int iabs(input int v);
    return (v < 0) ? -v : v;
  endfunction

  pix_t np [4], nq [4];
  logic nf;

  always_comb begin
    int p0, p1, p2, p3, q0, q1, q2, q3, al, be, tc0, tc, ap, aq, d;
    p0 = p[0]; p1 = p[1]; p2 = p[2]; p3 = p[3];
    q0 = q[0]; q1 = q[1]; q2 = q[2]; q3 = q[3];
    al  = dbf_alpha(qp);
    be  = dbf_beta(qp);
    tc0 = dbf_tc0(qp, bs);
    tc  = 0;
    d   = 0;
    ap  = iabs(p2 - p0);
    aq  = iabs(q2 - q0);
    np = p;
    nq = q;
    nf = (bs != 0) && iabs(p0 - q0) < al && iabs(p1 - p0) < be && iabs(q1 - q0) < be;
    if (nf) begin
      if (bs < 4) begin
        tc = chroma ? tc0 + 1 : tc0 + int'(ap < be) + int'(aq < be);
        d  = clip3(-tc, tc, (((q0 - p0) * 4) + (p1 - q1) + 4) >>> 3);
        np[0] = pix_t'(clip3(0, 255, p0 + d));
        nq[0] = pix_t'(clip3(0, 255, q0 - d));
        if (!chroma && ap < be)
          np[1] = pix_t'(p1 + clip3(-tc0, tc0, (p2 + ((p0 + q0 + 1) >>> 1) - 2 * p1) >>> 1));
        if (!chroma && aq < be)
          nq[1] = pix_t'(q1 + clip3(-tc0, tc0, (q2 + ((p0 + q0 + 1) >>> 1) - 2 * q1) >>> 1));
      end else begin
        if (!chroma && ap < be && iabs(p0 - q0) < ((al >>> 2) + 2)) begin
          np[0] = pix_t'((p2 + 2*p1 + 2*p0 + 2*q0 + q1 + 4) >>> 3);
          np[1] = pix_t'((p2 + p1 + p0 + q0 + 2) >>> 2);
          np[2] = pix_t'((2*p3 + 3*p2 + p1 + p0 + q0 + 4) >>> 3);
        end else
          np[0] = pix_t'((2*p1 + p0 + q1 + 2) >>> 2);
        if (!chroma && aq < be && iabs(p0 - q0) < ((al >>> 2) + 2)) begin
          nq[0] = pix_t'((p1 + 2*p0 + 2*q0 + 2*q1 + q2 + 4) >>> 3);
          nq[1] = pix_t'((p0 + q0 + q1 + q2 + 2) >>> 2);
          nq[2] = pix_t'((2*q3 + 3*q2 + q1 + q0 + p0 + 4) >>> 3);
        end else
          nq[0] = pix_t'((2*q1 + q0 + p1 + 2) >>> 2);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      filtered  <= 1'b0;
      for (int k = 0; k < 4; k++) begin
        p_out[k] <= '0;
        q_out[k] <= '0;
      end
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        filtered <= nf;
        p_out    <= np;
        q_out    <= nq;
      end
    end
  end

endmodule
