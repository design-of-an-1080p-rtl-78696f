// Self-checking testbench of sp_sram with a small odd geometry (WORDS = 12,
// WIDTH = 37): random interleaved reads and writes against a scoreboard,
// including that rdata holds its value while no read is issued.
//
// Origin: expected values come from this testbench's own reference model,
// written from the H.264 standard and the original design's description of
// the unit; stimulus and coverage are its own.
module tb_sp_sram;
  localparam int unsigned WORDS = 12, WIDTH = 37;

  logic clk = 0;
  always #5 clk = ~clk;

  logic ce = 0, we = 0;
  logic [$clog2(WORDS)-1:0] addr = 0;
  logic [WIDTH-1:0] wdata = 0, rdata;
  logic [WIDTH-1:0] sb [WORDS];
  logic [WIDTH-1:0] last;
  int checks = 0, failures = 0;

  sp_sram #(.WORDS(WORDS), .WIDTH(WIDTH)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < WORDS; a++) begin
      @(negedge clk);
      ce = 1; we = 1; addr = a; sb[a] = {$urandom, $urandom}; wdata = sb[a];
    end
    @(negedge clk);
    ce = 1; we = 0; addr = 0;
    @(negedge clk);
    last = sb[0];
    for (int n = 0; n < 5000; n++) begin
      int op, a;
      op = $urandom_range(0, 2);
      a  = $urandom_range(0, WORDS - 1);
      ce = (op != 2); we = (op == 1); addr = a;
      if (op == 1) begin sb[a] = {$urandom, $urandom}; wdata = sb[a]; end
      else wdata = {$urandom, $urandom};
      @(negedge clk);
      if (op == 0) last = sb[a];
      checks++;
      if (rdata !== last) begin
        if (failures < 10) $display("op %0d addr %0d: got %h exp %h", op, a, rdata, last);
        failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
