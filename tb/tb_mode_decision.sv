// Self-checking testbench of mode_decision. A cost table is drawn at random
// for each block; the testbench answers each request with the table entry
// of the requested mode after a random delay, and checks the order of the
// requested modes (three-step flow), the best mode and cost (including the
// MPM initial cost), that exactly seven costs are asked for, and the
// latency of done. Both branches of step 3 must occur.
//
// Origin: expected values come from this testbench's own reference model,
// written from the H.264 standard and the original design's description of
// the unit; stimulus and coverage are its own.
module tb_mode_decision;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        start = 0, req_valid, cost_valid = 0, done, took_5_7;
  logic [3:0]  mpm = 0, req_mode, best_mode;
  logic [19:0] mpm_init_cost = 0, cost = 0;
  logic [20:0] best_cost;
  int checks = 0, failures = 0, br57 = 0, br68 = 0;

  mode_decision dut (.*);

  int c [9];
  int seq [7];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 400; it++) begin
      int eff [9];
      int bm, bc, n;
      for (int m = 0; m < 9; m++) c[m] = (it % 5 == 0) ? 100 : $urandom_range(0, 5000);
      @(negedge clk);
      mpm = 4'($urandom_range(0, 8));
      mpm_init_cost = 20'($urandom_range(0, 300));
      start = 1;
      @(negedge clk);
      start = 0;
      for (int m = 0; m < 9; m++) eff[m] = c[m] + ((m == int'(mpm)) ? int'(mpm_init_cost) : 0);
      seq[0] = 0; seq[1] = 1; seq[2] = 2; seq[3] = 3; seq[4] = 4;
      if (eff[0] < eff[1]) begin seq[5] = 5; seq[6] = 7; br57++; end
      else begin seq[5] = 6; seq[6] = 8; br68++; end
      bm = 0; bc = eff[0];
      for (int k = 1; k < 7; k++) if (eff[seq[k]] < bc) begin bc = eff[seq[k]]; bm = seq[k]; end
      n = 0;
      while (n < 7) begin
        @(negedge clk);
        if (req_valid) begin
          checks++;
          if (int'(req_mode) != seq[n]) begin
            failures++;
            $display("request %0d: mode %0d expected %0d", n, req_mode, seq[n]);
          end
          repeat ($urandom_range(0, 3)) @(negedge clk);
          cost_valid = 1; cost = 20'(c[req_mode]);
          @(negedge clk);
          cost_valid = 0;
          n++;
          if (n == 7) begin
            checks++;
            if (!done || int'(best_mode) != bm || int'(best_cost) != bc) begin
              failures++;
              $display("best %0d/%0d (done %0d) expected %0d/%0d", best_mode, best_cost, done, bm, bc);
            end
            if (took_5_7 != (seq[5] == 5)) failures++;
          end
        end
      end
    end
    checks++;
    if (br57 == 0 || br68 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
