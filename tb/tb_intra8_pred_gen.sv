// Self-checking testbench of intra8_pred_gen. Random raw neighbours are
// loaded, every mode and row is requested, and each sample is compared with
// a reference that smooths the references itself and then reads the
// 25-sample edge array (left column reversed, corner, top row) at the
// position each directional mode projects to.
//
// Origin: expected values come from this testbench's own reference model,
// written from the H.264 standard and the original design's description of
// the unit; stimulus and coverage are its own.
module tb_intra8_pred_gen;
  import h264_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        load = 0, in_valid = 0, out_valid;
  ipred_mode_t mode = M_VERT;
  logic [2:0]  row = 0;
  pix_t        top [16], left [8], corner, pred [LANES];
  int checks = 0, failures = 0;

  intra8_pred_gen dut (.*);

  int e [25];   // l7..l0, M, t0..t15 (all filtered)
  function automatic int f3(input int i); return (e[i-1] + 2*e[i] + e[i+1] + 2) >> 2; endfunction
  function automatic int f2(input int i); return (e[i] + e[i+1] + 1) >> 1; endfunction

  task automatic build_edge();
    int t [16], l [8];
    for (int k = 0; k < 16; k++) t[k] = top[k];
    for (int k = 0; k < 8; k++) l[k] = left[k];
    e[8]  = (t[0] + 2*corner + l[0] + 2) >> 2;
    e[9]  = (corner + 2*t[0] + t[1] + 2) >> 2;
    for (int k = 1; k < 15; k++) e[9+k] = (t[k-1] + 2*t[k] + t[k+1] + 2) >> 2;
    e[24] = (t[14] + 3*t[15] + 2) >> 2;
    e[7]  = (corner + 2*l[0] + l[1] + 2) >> 2;
    for (int k = 1; k < 7; k++) e[7-k] = (l[k-1] + 2*l[k] + l[k+1] + 2) >> 2;
    e[0]  = (l[6] + 3*l[7] + 2) >> 2;
  endtask

  function automatic int ref8(input int m, input int x, input int y);
    int z, s;
    case (m)
      0: return e[9+x];
      1: return e[7-y];
      2: begin s = 8; for (int k = 0; k < 8; k++) s += e[9+k] + e[7-k]; return s >> 4; end
      3: return (x == 7 && y == 7) ? (e[23] + 3*e[24] + 2) >> 2 : f3(10+x+y);
      4: return f3(8+x-y);
      5: begin z = 2*x - y;
        if (z >= 0 && z % 2 == 0) return f2(8+x-y/2);
        if (z >= 0) return f3(8+x-(y>>1));
        if (z == -1) return f3(8);
        return f3(9-y+2*x); end
      6: begin z = 2*y - x;
        if (z >= 0 && z % 2 == 0) return f2(7-y+x/2);
        if (z >= 0) return f3(8-y+(x>>1));
        if (z == -1) return f3(8);
        return f3(7+x-2*y); end
      7: return (y % 2 == 0) ? f2(9+x+y/2) : f3(10+x+(y>>1));
      default: begin z = x + 2*y;
        if (z < 13 && z % 2 == 0) return f2(6-y-x/2);
        if (z < 13) return f3(6-y-(x>>1));
        if (z == 13) return (e[1] + 3*e[0] + 2) >> 2;
        return e[0]; end
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
    for (int it = 0; it < 100; it++) begin
      for (int k = 0; k < 16; k++) top[k] = pix_t'($urandom);
      for (int k = 0; k < 8; k++) left[k] = pix_t'($urandom);
      corner = pix_t'($urandom);
      build_edge();
      @(negedge clk); load = 1;
      @(negedge clk); load = 0;
      for (int k = 0; k < 16; k++) top[k] = pix_t'($urandom);   // must not matter now
      for (int m = 0; m < 9; m++)
        for (int r = 0; r < 8; r++) begin
          @(negedge clk);
          in_valid = 1; mode = ipred_mode_t'(m); row = r[2:0];
          @(negedge clk);
          in_valid = 0;
          checks++;
          if (!out_valid) failures++;
          for (int k = 0; k < 8; k++)
            if (int'(pred[k]) != ref8(m, k, r)) begin
              if (failures < 10) $display("mode %0d row %0d x %0d: got %0d exp %0d", m, r, k, pred[k], ref8(m, k, r));
              failures++;
            end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
