// coef_buffer: buffer of quantized coefficients for the entropy coder. The
// quantizer of the reconstruction phase writes it while the same levels go
// on to de-quantization, so one quantizer serves both paths.
//
// Sixteen levels per word, so the entropy coder reads a whole 4x4 block or
// two lines of an 8x8 block in one cycle:
//   luma   16 words x 224 bits (16 x 14-bit levels)
//   chroma  8 words x 192 bits (16 x 12-bit levels)
// The quantizer delivers eight levels per cycle; the write port takes them in
// two halves (half = 0: levels 0-7, half = 1: levels 8-15 of the word). The
// first half waits in a holding register; the whole word goes into the SRAM
// in the cycle of the second half. Levels are truncated on write
// and sign-extended on read; rdata is valid the cycle after a read. A read
// in the same cycle as a second-half write is ignored (single port).
//
// Origin: the sizes (16 x 224 and 8 x 192 bits, sixteen levels per word)
// follow the original design; the two-half write through a holding register
// is this design's own choice.
module coef_buffer
  import h264_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       wr,
  input  logic       half,
  input  logic       chroma,
  input  logic [3:0] waddr,
  input  level_t     wdata [LANES],
  input  logic       rd,
  input  logic       rd_chroma,
  input  logic [3:0] raddr,
  output level_t     rdata [16]
);

  localparam int unsigned LW = 14;
  localparam int unsigned CW = 12;

  level_t hold [LANES];
  logic [16*LW-1:0] lw, lr;
  logic [16*CW-1:0] cw, cr;
  logic             chroma_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) for (int k = 0; k < LANES; k++) hold[k] <= '0;
    else if (wr && !half) hold <= wdata;
  end

  always_comb
    for (int k = 0; k < LANES; k++) begin
      lw[k*LW +: LW]     = hold[k][LW-1:0];
      lw[(k+8)*LW +: LW] = wdata[k][LW-1:0];
      cw[k*CW +: CW]     = hold[k][CW-1:0];
      cw[(k+8)*CW +: CW] = wdata[k][CW-1:0];
    end

  // Single port: a write (second half) takes the port, otherwise a read may.
  logic wr_word;
  assign wr_word = wr && half;

  sp_sram #(.WORDS(16), .WIDTH(16*LW)) u_luma (
    .clk, .ce((wr_word && !chroma) || (!wr_word && rd && !rd_chroma)),
    .we(wr_word), .addr(wr_word ? waddr : raddr), .wdata(lw), .rdata(lr));

  sp_sram #(.WORDS(8), .WIDTH(16*CW)) u_chroma (
    .clk, .ce((wr_word && chroma) || (!wr_word && rd && rd_chroma)),
    .we(wr_word), .addr(wr_word ? waddr[2:0] : raddr[2:0]), .wdata(cw), .rdata(cr));

  always_ff @(posedge clk)
    if (!wr_word && rd) chroma_q <= rd_chroma;

  always_comb
    for (int k = 0; k < 16; k++)
      rdata[k] = chroma_q ? level_t'(signed'(cr[k*CW +: CW]))
                          : level_t'(signed'(lr[k*LW +: LW]));

endmodule
