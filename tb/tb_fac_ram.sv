// tb_fac_ram: drives both ports of one sketch row with random traffic and
// compares the registered read data with a reference array, including the
// read-first cases (port B reading the word it writes, port A reading the
// word port B writes in the same cycle).
module tb_fac_ram;
  localparam int M = 64, W = 28;

  logic                 clk = 0;
  logic                 a_en, b_en, b_we;
  logic [$clog2(M)-1:0] a_addr, b_addr;
  logic [W-1:0]         a_rdata, b_rdata, b_wdata;
  logic [W-1:0]         model [M];
  logic [W-1:0]         exp_a, exp_b;
  logic                 chk_a, chk_b;
  int checks = 0, failures = 0, same_cycle = 0;

  fac_ram #(.M(M), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a_en = 0; b_en = 0; b_we = 0; chk_a = 0; chk_b = 0;
    // fill the row through port B
    for (int i = 0; i < M; i++) begin
      @(negedge clk);
      b_en = 1; b_we = 1; b_addr = i[$clog2(M)-1:0]; b_wdata = W'($urandom);
      model[i] = b_wdata;
    end
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      if (chk_a) begin checks++; if (a_rdata !== exp_a) failures++; end
      if (chk_b) begin checks++; if (b_rdata !== exp_b) failures++; end
      a_en = 1'($urandom); b_en = 1'($urandom); b_we = 1'($urandom);
      a_addr = $clog2(M)'($urandom);
      b_addr = ($urandom % 4 == 0) ? a_addr : $clog2(M)'($urandom);
      b_wdata = W'($urandom);
      chk_a = a_en; exp_a = model[a_addr];
      chk_b = b_en; exp_b = model[b_addr];
      if (a_en && b_en && b_we && a_addr == b_addr) same_cycle++;
      if (b_en && b_we) model[b_addr] = b_wdata;
    end
    @(negedge clk);
    $display("same-cycle read/write collisions: %0d", same_cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
