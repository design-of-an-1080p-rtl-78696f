// Self-checking testbench of dbf_edge_order. The expected edge sequence of
// one macroblock is written out literally below (edge type, block x,
// block y and plane of each of the 48 edges, packed as decimal digits); bS follows from the position (4 on
// macroblock edges, 3 inside). The sequencer is run over several
// macroblocks with edge_ready randomly held low, and each accepted edge is
// compared with the table; mb_done must come with edge 47 only.
//
// Origin: expected values come from this testbench's own reference model,
// written from the H.264 standard and the original design's description of
// the unit; stimulus and coverage are its own.
module tb_dbf_edge_order;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       start = 0, edge_ready = 0;
  logic       edge_valid, edge_horiz, mb_done;
  logic [5:0] edge_num;
  logic [1:0] blk_x, blk_y, plane;
  logic [2:0] bs;
  int checks = 0, failures = 0;

  dbf_edge_order dut (.*);

  // one entry per edge, decimal digits H x y plane (H = 1: horizontal edge)
  localparam int EXP [48] = '{
    000, 100, 1000, 200, 1100, 300, 1200, 1300,
    010, 110, 1010, 210, 1110, 310, 1210, 1310,
    020, 120, 1020, 220, 1120, 320, 1220, 1320,
    030, 130, 1030, 230, 1130, 330, 1230, 1330,
    001, 101, 1001, 1101, 002, 102, 1002, 1102,
    011, 111, 1011, 1111, 012, 112, 1012, 1112};

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int mb = 0; mb < 20; mb++) begin
      int idx, ebs, eh, ex, ey, ep;
      @(negedge clk);
      checks++;
      if (edge_valid) failures++;            // idle before start
      start = 1;
      @(negedge clk);
      start = 0;
      idx = 0;
      while (idx < 48) begin
        edge_ready = ($urandom_range(0, 3) != 0);
        #1;
        if (edge_valid && edge_ready) begin
          eh = EXP[idx] / 1000; ex = (EXP[idx] / 100) % 10; ey = (EXP[idx] / 10) % 10; ep = EXP[idx] % 10;
          ebs = ((eh == 0 && ex == 0) || (eh == 1 && ey == 0)) ? 4 : 3;
          checks++;
          if (edge_num != 6'(idx) || int'(edge_horiz) != eh || int'(blk_x) != ex ||
              int'(blk_y) != ey || int'(plane) != ep || int'(bs) != ebs ||
              mb_done != (idx == 47)) begin
            if (failures < 10)
              $display("edge %0d: got n %0d h %0d x %0d y %0d pl %0d bs %0d done %0d", idx,
                       edge_num, edge_horiz, blk_x, blk_y, plane, bs, mb_done);
            failures++;
          end
          idx++;
        end else if (!edge_valid) begin
          checks++;
          failures++;
          idx = 48;
        end
        @(negedge clk);
      end
      edge_ready = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
