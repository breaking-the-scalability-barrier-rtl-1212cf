// tb_pcam_adgen: checks that the address generator hands out 0, 1, 2, ...
// one per allocation, holds between allocations, raises full after N
// addresses and never wraps.
module tb_pcam_adgen;
  localparam int N = 16;

  logic                 clk = 0, rst_n = 0, alloc_i = 0;
  logic [$clog2(N)-1:0] addr_o;
  logic                 full_o;
  int checks = 0, failures = 0, expected = 0;

  pcam_adgen #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      checks++;
      if (full_o !== (expected == N)) failures++;
      if (expected < N) begin
        checks++;
        if (addr_o !== expected[$clog2(N)-1:0]) failures++;
      end
      alloc_i = (expected < N) && ($urandom % 2 == 1);
      if (alloc_i) expected++;
    end
    checks++;
    if (!full_o) failures++;
    // reset starts again from zero
    rst_n = 0; @(negedge clk); rst_n = 1;
    checks++;
    if (addr_o !== 0 || full_o) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
