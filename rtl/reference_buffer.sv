// reference_buffer: prediction value (intra) or motion-compensated (inter)
// reference buffer between the second and third pipeline stages. It keeps
// the prediction of the best mode until the reconstruction phase adds the
// decoded residual to it.
//
// Four single-port SRAMs of 32-bit words (four samples per word), in two
// banks so that one access moves eight samples: bank 0 holds the odd line
// (4x4) or left half (8x8), bank 1 the even line or right half.
//   luma   2 x 32 words x 32 bits
//   chroma 2 x 16 words x 32 bits (U in words 0-7, V in words 8-15)
// Eight-lane vectors: lanes 0-3 go to bank 0, lanes 4-7 to bank 1.
// rdata is valid the cycle after a read.
//
// Origin: two 32 x 32-bit luma banks and two 16 x 32-bit chroma banks follow
// the original design; the lane-to-bank split is this design's own choice.
module reference_buffer
  import h264_pkg::*;
(
  input  logic       clk,
  input  logic       ce,
  input  logic       we,
  input  logic       chroma,
  input  logic [4:0] addr,
  input  pix_t       wdata [LANES],
  output pix_t       rdata [LANES]
);

  logic [31:0] w0, w1, l0, l1, c0, c1;
  logic        chroma_q;

  always_comb
    for (int k = 0; k < 4; k++) begin
      w0[8*k +: 8] = wdata[k];
      w1[8*k +: 8] = wdata[k+4];
    end

  sp_sram #(.WORDS(32), .WIDTH(32)) u_luma0 (
    .clk, .ce(ce && !chroma), .we, .addr, .wdata(w0), .rdata(l0));
  sp_sram #(.WORDS(32), .WIDTH(32)) u_luma1 (
    .clk, .ce(ce && !chroma), .we, .addr, .wdata(w1), .rdata(l1));
  sp_sram #(.WORDS(16), .WIDTH(32)) u_chroma0 (
    .clk, .ce(ce && chroma), .we, .addr(addr[3:0]), .wdata(w0), .rdata(c0));
  sp_sram #(.WORDS(16), .WIDTH(32)) u_chroma1 (
    .clk, .ce(ce && chroma), .we, .addr(addr[3:0]), .wdata(w1), .rdata(c1));

  always_ff @(posedge clk)
    if (ce && !we) chroma_q <= chroma;

  always_comb
    for (int k = 0; k < 4; k++) begin
      rdata[k]   = chroma_q ? c0[8*k +: 8] : l0[8*k +: 8];
      rdata[k+4] = chroma_q ? c1[8*k +: 8] : l1[8*k +: 8];
    end

endmodule
