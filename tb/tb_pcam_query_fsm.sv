// tb_pcam_query_fsm: streams queries, up to one per cycle, through the
// query pipeline over a sketch held in the testbench (synchronous-read rows
// filled with colliding cells) and checks that each result appears exactly
// three cycles after its query, with the presence, address, confidence
// vector, acceptance and value-store read address of the reference rules.
module tb_pcam_query_fsm;
  import pcam_ref_pkg::*;

  localparam int D = 4, M = 16, FP_W = 3, N = 16;
  localparam int IDX_W = $clog2(M), A_W = $clog2(N), W = 1 + FP_W + A_W, CW = $clog2(D+1);

  logic clk = 0, rst_n = 0, q_valid = 0;
  logic [D-1:0][IDX_W-1:0] q_idx;
  logic [FP_W-1:0] q_fp;
  logic [CW-1:0]   thresh = 2;
  logic a_en; logic [D-1:0][IDX_W-1:0] a_addr; logic [D-1:0][W-1:0] a_rdata;
  logic v_re; logic [A_W-1:0] v_raddr;
  logic res_valid, match, accept; logic [A_W-1:0] addr; logic [D-1:0] conf;
  logic [W-1:0] ram [D][M];

  typedef struct { int issue; qres_s q; } exp_s;
  exp_s exp_q [$];
  int checks = 0, failures = 0, cycle = 0, n_hit = 0, n_miss = 0, n_b2b = 0;
  logic v_re_q; logic [A_W-1:0] v_raddr_q;

  pcam_query_fsm #(.D(D), .M(M), .FP_W(FP_W), .N(N)) dut (
    .clk, .rst_n, .q_valid_i(q_valid), .q_idx_i(q_idx), .q_fp_i(q_fp), .thresh_i(thresh),
    .a_en_o(a_en), .a_addr_o(a_addr), .a_rdata_i(a_rdata), .v_re_o(v_re), .v_raddr_o(v_raddr),
    .res_valid_o(res_valid), .match_o(match), .addr_o(addr), .conf_o(conf), .accept_o(accept));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    for (int r = 0; r < D; r++) if (a_en) a_rdata[r] <= ram[r][a_addr[r]];
    v_re_q    <= v_re;
    v_raddr_q <= v_raddr;
  end

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // result checker
  always @(negedge clk) if (rst_n && res_valid) begin
    exp_s e;
    checks++;
    if (exp_q.size() == 0) failures++;
    else begin
      e = exp_q.pop_front();
      checks += 3;
      if (cycle - e.issue != 3) begin failures++; $display("latency %0d", cycle - e.issue); end
      if (match !== e.q.present) failures++;
      if (v_re_q !== e.q.present) failures++;
      if (e.q.present) begin
        checks += 4;
        n_hit++;
        if (addr !== A_W'(e.q.addr)) failures++;
        if (v_raddr_q !== A_W'(e.q.addr)) failures++;
        if (conf !== D'(e.q.conf)) failures++;
        if (accept !== ($countones(e.q.conf) >= thresh)) failures++;
      end else n_miss++;
    end
  end

  initial begin
    for (int r = 0; r < D; r++)
      for (int i = 0; i < M; i++)
        ram[r][i] = {1'($urandom % 8 != 0), FP_W'($urandom % 3), A_W'($urandom % 4)};
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      if (q_valid) n_b2b++;
      q_valid = ($urandom % 4) != 0;
      for (int r = 0; r < D; r++) q_idx[r] = IDX_W'($urandom);
      q_fp = FP_W'($urandom % 3);
      if (q_valid) begin
        fac_s f[] = new[D];
        exp_s e;
        for (int r = 0; r < D; r++) begin
          f[r].valid = ram[r][q_idx[r]][W-1];
          f[r].fp    = ram[r][q_idx[r]][A_W +: FP_W];
          f[r].addr  = ram[r][q_idx[r]][0 +: A_W];
        end
        e.issue = cycle;
        e.q = decide_query(f, q_fp);
        exp_q.push_back(e);
      end
    end
    @(negedge clk); q_valid = 0;
    repeat (5) @(negedge clk);
    checks += 2;
    if (exp_q.size() != 0) failures++;
    if (n_hit == 0 || n_miss == 0 || n_b2b == 0) failures++;
    $display("hits=%0d misses=%0d back-to-back=%0d", n_hit, n_miss, n_b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
