// Self-checking testbench of intra_pred_gen. Random neighbour samples, every
// mode and both halves of the block; the expected samples are computed with
// the edge-array form of the intra 4x4 equations (all directional modes read
// a [1 2 1] or [1 1] filtered position of the 13-sample edge L..I,M,A..H),
// which is a different formulation from the one in the design.
//
// Origin: expected values come from this testbench's own reference model,
// written from the H.264 standard and the original design's description of
// the unit; stimulus and coverage are its own.
module tb_intra_pred_gen;
  import h264_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        in_valid = 0, half = 0, out_valid;
  ipred_mode_t mode = M_VERT;
  pix_t        top [8], left [4], corner, dc_ext, pred [LANES];
  int checks = 0, failures = 0;

  intra_pred_gen dut (.*);

  int e [13];   // L K J I M A B C D E F G H
  function automatic int f3(input int i); return (e[i-1] + 2*e[i] + e[i+1] + 2) >> 2; endfunction
  function automatic int f2(input int i); return (e[i] + e[i+1] + 1) >> 1; endfunction

  function automatic int ref4(input int m, input int x, input int y);
    int z, s;
    case (m)
      0: return e[5+x];
      1: return e[3-y];
      2: begin s = 4; for (int k = 0; k < 4; k++) s += e[5+k] + e[3-k]; return s >> 3; end
      3: return (x == 3 && y == 3) ? (e[11] + 3*e[12] + 2) >> 2 : f3(6+x+y);
      4: return f3(4+x-y);
      5: begin z = 2*x - y;
        if (z >= 0 && z % 2 == 0) return f2(4+x-y/2);
        if (z >= 0) return f3(4+x-(y>>1));
        if (z == -1) return f3(4);
        return f3(5-y); end
      6: begin z = 2*y - x;
        if (z >= 0 && z % 2 == 0) return f2(3-y+x/2);
        if (z >= 0) return f3(4-y+(x>>1));
        if (z == -1) return f3(4);
        return f3(3+x); end
      7: return (y % 2 == 0) ? f2(5+x+y/2) : f3(6+x+(y>>1));
      8: begin z = x + 2*y;
        if (z < 5 && z % 2 == 0) return f2(2-y-x/2);
        if (z < 5) return f3(2-y-(x>>1));
        if (z == 5) return (e[1] + 3*e[0] + 2) >> 2;
        return e[0]; end
      default: return dc_ext;
    endcase
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 300; it++) begin
      for (int k = 0; k < 8; k++) top[k] = pix_t'($urandom);
      for (int k = 0; k < 4; k++) left[k] = pix_t'($urandom);
      corner = pix_t'($urandom);
      dc_ext = pix_t'($urandom);
      if (it % 7 == 0) begin  // flat areas exercise exact rounding
        for (int k = 0; k < 8; k++) top[k] = 8'd255;
        for (int k = 0; k < 4; k++) left[k] = 8'd0;
      end
      for (int k = 0; k < 4; k++) e[3-k] = left[k];
      e[4] = corner;
      for (int k = 0; k < 8; k++) e[5+k] = top[k];
      for (int m = 0; m < 10; m++)
        for (int h = 0; h < 2; h++) begin
          @(negedge clk);
          in_valid = 1; mode = ipred_mode_t'(m); half = h[0];
          @(negedge clk);
          in_valid = 0;
          checks++;
          if (!out_valid) failures++;
          for (int k = 0; k < 8; k++)
            if (int'(pred[k]) != ref4(m, k % 4, 2*h + k/4)) begin
              if (failures < 10)
                $display("mode %0d half %0d lane %0d: got %0d exp %0d", m, h, k, pred[k], ref4(m, k%4, 2*h+k/4));
              failures++;
            end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
