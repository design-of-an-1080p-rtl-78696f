// Self-checking testbench of coef_buffer: every luma and chroma word is
// written as two 8-level halves with random levels in the field range
// (14-bit luma, 12-bit chroma), sometimes with idle cycles between the
// halves, then read back in random order and compared, all 16 levels of a
// word at once, against a scoreboard.
//
// Origin: expected values come from this testbench's own reference model,
// written from the H.264 standard and the original design's description of
// the unit; stimulus and coverage are its own.
module tb_coef_buffer;
  import h264_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       wr = 0, half = 0, chroma = 0, rd = 0, rd_chroma = 0;
  logic [3:0] waddr = 0, raddr = 0;
  level_t     wdata [LANES], rdata [16];
  int checks = 0, failures = 0;
  int sb [24][16];

  coef_buffer dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 4; pass++) begin
      for (int a = 0; a < 24; a++) begin
        for (int h = 0; h < 2; h++) begin
          @(negedge clk);
          wr = 1; half = h; chroma = (a >= 16); waddr = (a < 16) ? 4'(a) : 4'(a - 16);
          for (int k = 0; k < 8; k++) begin
            sb[a][8*h+k] = (a < 16) ? int'($urandom_range(0, 16383)) - 8192
                                    : int'($urandom_range(0, 4095)) - 2048;
            wdata[k] = level_t'(sb[a][8*h+k]);
          end
          if (h == 0 && $urandom_range(0, 2) == 0) begin
            @(negedge clk);
            wr = 0;
            for (int k = 0; k < 8; k++) wdata[k] = level_t'($urandom);
          end
        end
      end
      @(negedge clk);
      wr = 0;
      for (int n = 0; n < 150; n++) begin
        int a;
        a = $urandom_range(0, 23);
        rd = 1; rd_chroma = (a >= 16); raddr = (a < 16) ? 4'(a) : 4'(a - 16);
        @(negedge clk);
        rd = 0;
        checks++;
        for (int k = 0; k < 16; k++)
          if (int'(rdata[k]) != sb[a][k]) begin
            if (failures < 10) $display("word %0d level %0d: got %0d exp %0d", a, k, rdata[k], sb[a][k]);
            failures++;
          end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
