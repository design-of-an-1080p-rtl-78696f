// Self-checking testbench of reference_buffer: random 8-sample words written
// to all 32 luma and 16 chroma addresses, read back in random order against
// a scoreboard, with the one-cycle read latency.
//
// Origin: expected values come from this testbench's own reference model,
// written from the H.264 standard and the original design's description of
// the unit; stimulus and coverage are its own.
module tb_reference_buffer;
  import h264_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       ce = 0, we = 0, chroma = 0;
  logic [4:0] addr = 0;
  pix_t       wdata [LANES], rdata [LANES];
  int checks = 0, failures = 0;
  int sb [48][8];

  reference_buffer dut (.*);

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
      for (int a = 0; a < 48; a++) begin
        @(negedge clk);
        ce = 1; we = 1; chroma = (a >= 32); addr = (a < 32) ? 5'(a) : 5'(a - 32);
        for (int k = 0; k < 8; k++) begin
          sb[a][k] = $urandom_range(0, 255);
          wdata[k] = pix_t'(sb[a][k]);
        end
      end
      for (int n = 0; n < 200; n++) begin
        int a;
        a = $urandom_range(0, 47);
        @(negedge clk);
        ce = 1; we = 0; chroma = (a >= 32); addr = (a < 32) ? 5'(a) : 5'(a - 32);
        @(negedge clk);
        ce = 0;
        checks++;
        for (int k = 0; k < 8; k++)
          if (int'(rdata[k]) != sb[a][k]) begin
            if (failures < 10) $display("word %0d lane %0d: got %0d exp %0d", a, k, rdata[k], sb[a][k]);
            failures++;
          end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
