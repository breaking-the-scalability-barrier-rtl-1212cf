// tb_pcam_value_store: random writes and registered reads of the value
// store, compared with a reference array, including a read of the word being
// written in the same cycle (old data expected).
module tb_pcam_value_store;
  localparam int N = 32, VAL_W = 32;

  logic                 clk = 0;
  logic                 we_i, re_i;
  logic [$clog2(N)-1:0] waddr_i, raddr_i;
  logic [VAL_W-1:0]     wdata_i, rdata_o, exp_r;
  logic [VAL_W-1:0]     model [N];
  logic                 chk;
  int checks = 0, failures = 0;

  pcam_value_store #(.N(N), .VAL_W(VAL_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we_i = 0; re_i = 0; chk = 0;
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      we_i = 1; waddr_i = i[$clog2(N)-1:0]; wdata_i = $urandom; model[i] = wdata_i;
    end
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      if (chk) begin checks++; if (rdata_o !== exp_r) failures++; end
      we_i = 1'($urandom); re_i = 1'($urandom);
      waddr_i = $clog2(N)'($urandom);
      raddr_i = ($urandom % 4 == 0) ? waddr_i : $clog2(N)'($urandom);
      wdata_i = $urandom;
      chk = re_i; exp_r = model[raddr_i];
      if (we_i) model[waddr_i] = wdata_i;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
