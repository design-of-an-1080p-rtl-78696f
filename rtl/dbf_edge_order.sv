// dbf_edge_order: edge sequencer of the deblocking engine. It walks the 48
// 4-sample-long block edges of one macroblock in the interleaved
// horizontal / vertical order of the design, which lets each 4x4 block be
// filtered on both of its edges while it is still in the filter's registers:
//
//   luma, per row r of 4x4 blocks (edge numbers 8r .. 8r+7):
//     V(0,r) V(1,r) H(0,r) V(2,r) H(1,r) V(3,r) H(2,r) H(3,r)
//   chroma (edges 32..47), per row r of the 2x2 chroma blocks:
//     Cb: V(0,r) V(1,r) H(0,r) H(1,r), then Cr the same
// V(x,y) is the vertical edge on the left of block (x,y), filtered
// horizontally; H(x,y) the horizontal edge above it, filtered vertically.
// Edges with x = 0 (V) or y = 0 (H) are macroblock edges: for intra blocks
// they get bS = 4, the internal edges bS = 3.
//
// Handshake: start begins a macroblock; edge fields are valid while
// edge_valid is high and advance when edge_ready is high; mb_done pulses
// with the last edge.
//
// Origin: the edge numbering and the interleaved order follow the original
// design; the ready/valid handshake is this design's own choice.
module dbf_edge_order (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       edge_ready,
  output logic       edge_valid,
  output logic [5:0] edge_num,
  output logic       edge_horiz,   // 1: horizontal edge (vertical filtering)
  output logic [1:0] blk_x,
  output logic [1:0] blk_y,
  output logic [1:0] plane,        // 0 Y, 1 Cb, 2 Cr
  output logic [2:0] bs,
  output logic       mb_done
);

  logic [5:0] n;
  logic       busy;

  always_comb begin
    logic [2:0] k;
    logic [1:0] r;
    edge_num   = n;
    edge_horiz = 1'b0;
    blk_x      = '0;
    blk_y      = '0;
    plane      = 2'd0;
    k = n[2:0];
    r = n[4:3];
    if (n < 6'd32) begin
      blk_y = r;
      unique case (k)
        3'd0: begin edge_horiz = 1'b0; blk_x = 2'd0; end
        3'd1: begin edge_horiz = 1'b0; blk_x = 2'd1; end
        3'd2: begin edge_horiz = 1'b1; blk_x = 2'd0; end
        3'd3: begin edge_horiz = 1'b0; blk_x = 2'd2; end
        3'd4: begin edge_horiz = 1'b1; blk_x = 2'd1; end
        3'd5: begin edge_horiz = 1'b0; blk_x = 2'd3; end
        3'd6: begin edge_horiz = 1'b1; blk_x = 2'd2; end
        default: begin edge_horiz = 1'b1; blk_x = 2'd3; end
      endcase
    end else begin
      plane = k[2] ? 2'd2 : 2'd1;
      blk_y = {1'b0, n[3]};
      unique case (k[1:0])
        2'd0: begin edge_horiz = 1'b0; blk_x = 2'd0; end
        2'd1: begin edge_horiz = 1'b0; blk_x = 2'd1; end
        2'd2: begin edge_horiz = 1'b1; blk_x = 2'd0; end
        default: begin edge_horiz = 1'b1; blk_x = 2'd1; end
      endcase
    end
    bs = ((edge_horiz && blk_y == 0) || (!edge_horiz && blk_x == 0)) ? 3'd4 : 3'd3;
  end

  assign edge_valid = busy;
  assign mb_done    = busy && edge_ready && n == 6'd47;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n    <= '0;
      busy <= 1'b0;
    end else if (!busy) begin
      if (start) begin
        n    <= '0;
        busy <= 1'b1;
      end
    end else if (edge_ready) begin
      if (n == 6'd47) busy <= 1'b0;
      n <= n + 1;
    end
  end

endmodule
