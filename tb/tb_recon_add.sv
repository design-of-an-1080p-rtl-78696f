// Self-checking testbench of recon_add: random residuals (including values
// that drive the sum past 0 and 255) and predictions; expected
// rec = clip(pred + round(res / 64)) with round-half-up, computed with
// floor division.
//
// Origin: expected values come from this testbench's own reference model,
// written from the H.264 standard and the original design's description of
// the unit; stimulus and coverage are its own.
module tb_recon_add;
  import h264_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  in_valid = 0, out_valid;
  coef_t res [LANES];
  pix_t  pred [LANES], rec [LANES];
  int checks = 0, failures = 0;

  recon_add dut (.*);

  function automatic int fdiv(input int a, input int b);   // floor(a / b), b > 0
    return (a >= 0) ? a / b : -((-a + b - 1) / b);
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 3000; it++) begin
      int exp [8];
      @(negedge clk);
      in_valid = 1;
      for (int k = 0; k < 8; k++) begin
        res[k]  = coef_t'(int'($urandom_range(0, 40000)) - 20000);
        pred[k] = pix_t'($urandom);
        exp[k]  = int'(pred[k]) + fdiv(int'(res[k]) + 32, 64);
        exp[k]  = exp[k] < 0 ? 0 : exp[k] > 255 ? 255 : exp[k];
      end
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid) failures++;
      for (int k = 0; k < 8; k++)
        if (int'(rec[k]) != exp[k]) begin
          if (failures < 10) $display("lane %0d: res %0d pred %0d got %0d exp %0d", k, res[k], pred[k], rec[k], exp[k]);
          failures++;
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
