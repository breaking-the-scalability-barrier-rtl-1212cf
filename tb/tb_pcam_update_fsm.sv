// tb_pcam_update_fsm: runs the update controller with real sketch rows and
// address generator, against a reference sketch kept in the testbench.
// Checks: no request accepted during the post-reset sweep, which lasts M
// cycles; each operation's outcome and address; result three cycles after
// acceptance; every value-store write. Random row indices are drawn from a
// small range so that the update cases (fill, duplicate replacement,
// eviction, present key, denials, delete hit and miss) all occur. Some
// insertions are class insertions under an earlier address: they must write
// that address, leave the address generator alone, and succeed even when
// every address is used.
module tb_pcam_update_fsm;
  import pcam_pkg::*;
  import pcam_ref_pkg::*;

  localparam int D = 4, M = 16, FP_W = 3, N = 400, VAL_W = 16;
  localparam int IDX_W = $clog2(M), A_W = $clog2(N), W = 1 + FP_W + A_W;

  logic clk = 0, rst_n = 0;
  logic init_done, upd_valid = 0, upd_ready, evict_en = 1;
  upd_op_e op;
  logic [D-1:0][IDX_W-1:0] idx;
  logic [FP_W-1:0]  fp;
  logic [VAL_W-1:0] val;
  logic cls = 0;
  logic [$clog2(N)-1:0] cls_addr = '0;
  int n_cls = 0, n_cls_full = 0;
  logic b_en; logic [D-1:0] b_we; logic [D-1:0][IDX_W-1:0] b_addr;
  logic [W-1:0] b_wdata; logic [D-1:0][W-1:0] b_rdata;
  logic alloc; logic [A_W-1:0] ad_addr; logic ad_full;
  logic v_we; logic [A_W-1:0] v_waddr; logic [VAL_W-1:0] v_wdata;
  logic done; upd_kind_e kind; logic [A_W-1:0] res_addr; logic denied;
  bit denied_ref = 0;
  int n_denied_seen = 0;

  int checks = 0, failures = 0;
  int seen [8];
  fac_s        sk [D][M];
  int unsigned vref [int unsigned];
  int unsigned vgot [int unsigned];
  int unsigned count = 0;

  pcam_update_fsm #(.D(D), .M(M), .FP_W(FP_W), .N(N), .VAL_W(VAL_W)) dut (
    .clk, .rst_n, .init_done_o(init_done), .upd_valid_i(upd_valid), .upd_ready_o(upd_ready),
    .upd_op_i(op), .upd_idx_i(idx), .upd_fp_i(fp), .upd_val_i(val), .evict_en_i(evict_en),
    .upd_cls_en_i(cls), .upd_cls_addr_i(cls_addr),
    .b_en_o(b_en), .b_we_o(b_we), .b_addr_o(b_addr), .b_wdata_o(b_wdata), .b_rdata_i(b_rdata),
    .alloc_o(alloc), .adgen_addr_i(ad_addr), .adgen_full_i(ad_full),
    .v_we_o(v_we), .v_waddr_o(v_waddr), .v_wdata_o(v_wdata),
    .done_o(done), .kind_o(kind), .res_addr_o(res_addr), .denied_o(denied));

  for (genvar r = 0; r < D; r++) begin : g_row
    logic [W-1:0] unused_a;
    fac_ram #(.M(M), .W(W)) u_row (
      .clk, .a_en(1'b0), .a_addr('0), .a_rdata(unused_a),
      .b_en(b_en), .b_we(b_we[r]), .b_addr(b_addr[r]), .b_wdata(b_wdata), .b_rdata(b_rdata[r]));
  end

  pcam_adgen #(.N(N)) u_adgen (.clk, .rst_n, .alloc_i(alloc), .addr_o(ad_addr), .full_o(ad_full));

  always #5 clk = ~clk;

  always @(posedge clk) if (v_we) vgot[v_waddr] = v_wdata;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    repeat (3) @(negedge clk);
    rst_n = 1;
    upd_valid = 0; op = OP_INSERT; idx = '0; fp = '0; val = '0;
    cyc = 0;
    while (!init_done) begin
      @(negedge clk);
      cyc++;
      checks++;
      if (upd_ready && !init_done) failures++;
    end
    checks++;
    if (cyc != M) begin failures++; $display("sweep took %0d cycles, expected %0d", cyc, M); end
    upd_valid = 0;

    for (int t = 0; t < 1500; t++) begin
      fac_s  f[] = new[D];
      ures_s u;
      int    lat;
      int unsigned na;
      @(negedge clk);
      op = ($urandom % 5 == 0) ? OP_DELETE : OP_INSERT;
      for (int i = 0; i < D; i++) idx[i] = IDX_W'($urandom % 6);
      fp  = FP_W'($urandom);
      val = VAL_W'($urandom);
      cls = op == OP_INSERT && count > 0 && ($urandom % 4 == 0);
      cls_addr = A_W'($urandom % (count > 0 ? count : 1));
      na = cls ? cls_addr : count;
      if (t == 150) evict_en = 0;
      if (t == 300) evict_en = 1;
      upd_valid = 1;
      checks++;
      if (!upd_ready) failures++;
      for (int i = 0; i < D; i++) f[i] = sk[i][idx[i]];
      u = decide_update(f, fp, op == OP_DELETE, na, cls ? 1'b0 : (count == N), evict_en);
      @(negedge clk);
      upd_valid = 0;
      lat = 1;
      while (!done && lat < 10) begin @(negedge clk); lat++; end
      checks += 2;
      if (lat != 3) begin failures++; $display("latency %0d", lat); end
      if (int'(kind) != u.kind) begin
        failures++;
        $display("t=%0d kind %0d expected %0d", t, kind, u.kind);
      end
      if (u.kind != K_DEL_MISS && u.kind != K_DENY_FULL && u.kind != K_DENY_EVICT) begin
        checks++;
        if (res_addr !== A_W'(u.val_addr)) failures++;
      end
      seen[u.kind]++;
      for (int i = 0; i < D; i++)
        if (u.we & (1 << i)) sk[i][idx[i]] = (op == OP_DELETE) ? '{0, 0, 0} : '{1, fp, na};
      if (u.val_we) vref[u.val_addr] = val;
      if (cls && u.alloc) begin
        n_cls++;
        if (count == N) n_cls_full++;
      end
      if (u.alloc && !cls) count++;
      checks++;
      if (ad_addr !== A_W'(count) && count < N) begin failures++; $display("t=%0d address generator at %0d, expected %0d", t, ad_addr, count); end
      if (u.kind == K_DENY_FULL || u.kind == K_DENY_EVICT) denied_ref = 1;
      else if (u.alloc) denied_ref = 0;
      checks++;
      if (denied !== denied_ref) begin failures++; $display("t=%0d denied flag %0b expected %0b", t, denied, denied_ref); end
      if (denied) n_denied_seen++;
    end
    checks += 3;
    if (n_denied_seen == 0) failures++;
    if (n_cls == 0) failures++;
    if (n_cls_full == 0) failures++;
    $display("class insertions %0d, with all addresses used %0d", n_cls, n_cls_full);
    foreach (vref[a]) begin
      checks++;
      if (!vgot.exists(a) || vgot[a] != vref[a]) failures++;
    end
    checks++;
    if (vgot.size() != vref.size()) failures++;
    for (int k = 0; k < 8; k++) begin
      $display("outcome %0d seen %0d times", k, seen[k]);
      checks++;
      if (seen[k] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
