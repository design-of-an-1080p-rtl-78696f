// Self-checking testbench of residual_buffer: fills every luma and chroma
// word with random coefficients in the field range (15-bit luma, 13-bit
// chroma), reads them back in random order, and checks the values and the
// one-cycle read latency; a scoreboard array is the reference.
//
// Origin: expected values come from this testbench's own reference model,
// written from the H.264 standard and the original design's description of
// the unit; stimulus and coverage are its own.
module tb_residual_buffer;
  import h264_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       ce = 0, we = 0, chroma = 0;
  logic [4:0] addr = 0;
  coef_t      wdata [LANES], rdata [LANES];
  int checks = 0, failures = 0;
  int sb_l [32][8], sb_c [16][8];

  residual_buffer dut (.*);

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
        ce = 1; we = 1; chroma = (a >= 32); addr = 5'(a % 32);
        for (int k = 0; k < 8; k++) begin
          if (a < 32) begin
            sb_l[a][k] = int'($urandom_range(0, 32767)) - 16384;
            wdata[k] = coef_t'(sb_l[a][k]);
          end else begin
            sb_c[a-32][k] = int'($urandom_range(0, 8191)) - 4096;
            wdata[k] = coef_t'(sb_c[a-32][k]);
          end
        end
      end
      for (int n = 0; n < 200; n++) begin
        int a;
        a = $urandom_range(0, 47);
        @(negedge clk);
        ce = 1; we = 0; chroma = (a >= 32); addr = 5'(a % 32);
        @(negedge clk);
        ce = 0;
        checks++;
        for (int k = 0; k < 8; k++)
          if (int'(rdata[k]) != ((a < 32) ? sb_l[a][k] : sb_c[a-32][k])) begin
            if (failures < 10) $display("word %0d lane %0d: got %0d", a, k, rdata[k]);
            failures++;
          end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
