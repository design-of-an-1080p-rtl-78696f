// residual_buffer: prediction residual SRAMs between the second and third
// pipeline stages. They hold the transform coefficients of the best mode,
// from intra prediction or fractional motion estimation, until the
// reconstruction phase quantizes them.
//
// Two single-port SRAMs, eight values per word (two lines of a 4x4 block or
// one line of an 8x8 block):
//   luma   32 words x 120 bits (8 x 15-bit coefficients), 16 4x4 blocks
//   chroma 16 words x 104 bits (8 x 13-bit coefficients), U in words 0-7,
//          V in words 8-15
// chroma selects the SRAM. Values are truncated to the word's field width on
// write and sign-extended on read; rdata is valid the cycle after a read.
//
// Origin: the sizes (32 x 120 and 16 x 104 bits, eight values per word)
// follow the original design; truncation and sign extension are this design's
// own choices.
module residual_buffer
  import h264_pkg::*;
(
  input  logic       clk,
  input  logic       ce,
  input  logic       we,
  input  logic       chroma,
  input  logic [4:0] addr,
  input  coef_t      wdata [LANES],
  output coef_t      rdata [LANES]
);

  localparam int unsigned LW = 15;   // luma coefficient field
  localparam int unsigned CW = 13;   // chroma coefficient field

  logic [8*LW-1:0] lw, lr;
  logic [8*CW-1:0] cw, cr;
  logic            chroma_q;

  always_comb
    for (int k = 0; k < LANES; k++) begin
      lw[k*LW +: LW] = wdata[k][LW-1:0];
      cw[k*CW +: CW] = wdata[k][CW-1:0];
    end

  sp_sram #(.WORDS(32), .WIDTH(8*LW)) u_luma (
    .clk, .ce(ce && !chroma), .we, .addr, .wdata(lw), .rdata(lr));

  sp_sram #(.WORDS(16), .WIDTH(8*CW)) u_chroma (
    .clk, .ce(ce && chroma), .we, .addr(addr[3:0]), .wdata(cw), .rdata(cr));

  always_ff @(posedge clk)
    if (ce && !we) chroma_q <= chroma;

  always_comb
    for (int k = 0; k < LANES; k++)
      rdata[k] = chroma_q ? coef_t'(signed'(cr[k*CW +: CW]))
                          : coef_t'(signed'(lr[k*LW +: LW]));

endmodule
