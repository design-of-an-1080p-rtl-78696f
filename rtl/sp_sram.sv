// sp_sram: single-port synchronous SRAM model (one read or one write per
// cycle), used for every buffer between the second and third pipeline
// stages. Written as a memory array; a synthesis flow maps it to an SRAM
// macro. Read data is registered: it appears the cycle after a read with
// ce = 1, we = 0, and holds until the next read.
//
// Origin: single-port buffers follow the original design; the registered read
// is this design's own choice.
module sp_sram #(
  parameter int unsigned WORDS = 32,
  parameter int unsigned WIDTH = 120
) (
  input  logic                     clk,
  input  logic                     ce,
  input  logic                     we,
  input  logic [$clog2(WORDS)-1:0] addr,
  input  logic [WIDTH-1:0]         wdata,
  output logic [WIDTH-1:0]         rdata
);

  logic [WIDTH-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (ce) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
