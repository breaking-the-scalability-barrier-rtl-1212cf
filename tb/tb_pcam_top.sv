// tb_pcam_top: end-to-end test of the P-CAM key-value store at reduced size
// (32 cells per row, 3-bit fingerprints, 128 addresses) so that collisions,
// evictions and a full address generator all happen within a short run.
//
// An update stream (inserts, value overwrites, deletes, with eviction
// disabled for a while) and a query stream (up to one per cycle, running
// beside the updates) drive the top. A reference P-CAM in the testbench
// applies each update when the RTL reports it done and predicts every update
// outcome and every query result (presence, address, confidence vector,
// acceptance, value), which must arrive exactly three cycles after the query.
// A query whose cells an update rewrote while the query was in flight is not
// compared (the RTL and the reference see the write at different times);
// their number is printed. About one insertion in five is a class insertion
// under an address handed out earlier, so several keys share a value entry;
// such insertions must also succeed once all addresses are used. Each
// mechanism must occur at least once.
module tb_pcam_top;
  import pcam_pkg::*;
  import pcam_ref_pkg::*;

  localparam int KEY_W = 384, D = 4, M = 32, FP_W = 3, N = 128, VAL_W = 32;
  localparam int A_W = $clog2(N), CW = $clog2(D+1);
  localparam int NKEYS = 160, NOPS = 900;

  logic clk = 0, rst_n = 0;
  logic init_done, evict_en = 1;
  logic [CW-1:0] thresh = 2;
  logic upd_valid = 0, upd_ready, upd_done, mem_full;
  logic upd_cls_en = 0;
  logic [$clog2(N)-1:0] upd_cls_addr = '0;
  upd_op_e upd_op = OP_INSERT;
  logic [KEY_W-1:0] upd_key = '0, q_key = '0;
  logic [VAL_W-1:0] upd_value = '0, q_value;
  upd_kind_e upd_kind;
  logic [A_W-1:0] upd_addr, q_addr;
  logic q_valid = 0, q_ready, q_res_valid, q_match, q_accept;
  logic [D-1:0] q_conf;

  pcam_top #(.KEY_W(KEY_W), .D(D), .M(M), .FP_W(FP_W), .N(N), .VAL_W(VAL_W)) dut (
    .clk, .rst_n, .init_done_o(init_done), .cfg_evict_en_i(evict_en),
    .cfg_conf_thresh_i(thresh), .upd_valid_i(upd_valid), .upd_ready_o(upd_ready),
    .upd_op_i(upd_op), .upd_key_i(upd_key), .upd_value_i(upd_value),
    .upd_cls_en_i(upd_cls_en), .upd_cls_addr_i(upd_cls_addr), .upd_done_o(upd_done),
    .upd_kind_o(upd_kind), .upd_addr_o(upd_addr), .mem_full_o(mem_full),
    .q_valid_i(q_valid), .q_ready_o(q_ready), .q_key_i(q_key), .q_res_valid_o(q_res_valid),
    .q_match_o(q_match), .q_addr_o(q_addr), .q_conf_o(q_conf), .q_accept_o(q_accept),
    .q_value_o(q_value));

  pcam_model model;
  logic [KEY_W-1:0] keys [NKEYS];
  int checks = 0, failures = 0, cycle = 0;
  int kinds [8];
  int n_hit = 0, n_miss = 0, n_split = 0, n_reject = 0, n_overlap = 0, n_skipped = 0;
  int n_accept = 0, n_full = 0, sweep_cycles = 0, n_class = 0, n_class_full = 0;
  bit upd_busy = 0;
  bit q_stop = 0;
  bit denied_ref = 0;

  // recent updates: cycle the result was seen, cells and value address touched
  typedef struct { int done_cycle; int unsigned idx[]; int unsigned we; int unsigned vaddr; bit vwe; } urec_s;
  urec_s recent [$];
  typedef struct { int issue; logic [KEY_W-1:0] key; } qrec_s;
  qrec_s qpend [$];

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit touched(qrec_s q, int unsigned qa, bit qpresent);
    int unsigned qidx[], qfp;
    model.hash(q.key, qidx, qfp);
    foreach (recent[i]) begin
      if (recent[i].done_cycle < q.issue + 2) continue;
      for (int r = 0; r < D; r++)
        if ((recent[i].we & (1 << r)) && recent[i].idx[r] == qidx[r]) return 1;
      if (recent[i].vwe && qpresent && recent[i].vaddr == qa) return 1;
    end
    return 0;
  endfunction

  // query results
  always @(negedge clk) if (rst_n && q_res_valid) begin
    qrec_s q;
    qres_s e;
    int unsigned ev;
    checks++;
    if (qpend.size() == 0) failures++;
    else begin
      q = qpend.pop_front();
      checks++;
      if (cycle - q.issue != 3) begin failures++; $display("query latency %0d", cycle - q.issue); end
      e = model.query(q.key, ev);
      if (touched(q, e.addr, e.present) || touched(q, q_addr, q_match)) n_skipped++;
      else begin
        checks++;
        if (q_match !== e.present) begin
          failures++;
          $display("cycle %0d: match %0b expected %0b", cycle, q_match, e.present);
        end
        if (e.present) begin
          int unsigned qidx[], qfp;
          fac_s f[];
          int unsigned a0;
          bit split;
          n_hit++;
          checks += 4;
          if (q_addr !== A_W'(e.addr)) begin failures++; $display("addr mismatch"); end
          if (q_conf !== D'(e.conf)) begin failures++; $display("conf mismatch"); end
          if (q_accept !== ($countones(e.conf) >= thresh)) begin failures++; $display("accept mismatch"); end
          if (q_value !== VAL_W'(ev)) begin failures++; $display("value mismatch %h %h", q_value, ev); end
          if (!q_accept) n_reject++; else n_accept++;
          model.hash(q.key, qidx, qfp);
          model.read(qidx, f);
          a0 = e.addr;
          split = 0;
          foreach (f[r]) if (f[r].valid && f[r].fp == qfp && f[r].addr != a0) split = 1;
          if (split) n_split++;
        end else n_miss++;
      end
    end
  end

  // update results
  task automatic do_update(upd_op_e op, logic [KEY_W-1:0] key, logic [VAL_W-1:0] value,
                           bit cls = 0, int unsigned cls_addr = 0);
    ures_s u;
    urec_s rec;
    int    lat;
    bit    was_full;
    @(negedge clk);
    upd_op = op; upd_key = key; upd_value = value; upd_valid = 1;
    upd_cls_en = cls; upd_cls_addr = A_W'(cls_addr);
    was_full = (model.count == N);
    while (!upd_ready) @(negedge clk);
    @(negedge clk);
    upd_valid = 0;
    upd_busy  = 1;
    lat = 1;
    while (!upd_done && lat < 20) begin @(negedge clk); lat++; end
    upd_busy = 0;
    u = model.update(key, op == OP_DELETE, value, evict_en, cls, cls_addr);
    kinds[u.kind]++;
    if (cls && op == OP_INSERT && (u.kind == K_FILL || u.kind == K_DUP || u.kind == K_EVICT)) begin
      n_class++;
      if (was_full) n_class_full++;
    end
    checks += 2;
    if (lat != 3) begin failures++; $display("update latency %0d", lat); end
    if (int'(upd_kind) != u.kind) begin
      failures++;
      $display("cycle %0d: update kind %0d expected %0d", cycle, upd_kind, u.kind);
    end
    if (u.kind != K_DEL_MISS && u.kind != K_DENY_FULL && u.kind != K_DENY_EVICT) begin
      checks++;
      if (upd_addr !== A_W'(u.val_addr)) begin failures++; $display("cycle %0d: update addr %0d expected %0d kind %0d", cycle, upd_addr, u.val_addr, u.kind); end
    end
    begin
      int unsigned fp;
      model.hash(key, rec.idx, fp);
    end
    rec.done_cycle = cycle; rec.we = u.we; rec.vaddr = u.val_addr; rec.vwe = u.val_we;
    recent.push_back(rec);
    if (recent.size() > 8) void'(recent.pop_front());
    if (u.kind == K_DENY_FULL || u.kind == K_DENY_EVICT) denied_ref = 1;
    else if (u.alloc) denied_ref = 0;
    checks++;
    if (mem_full !== (denied_ref || model.count == N)) begin
      failures++;
      $display("cycle %0d: mem_full %0b", cycle, mem_full);
    end
    if (mem_full) n_full++;
  endtask

  // query stream
  initial begin
    wait (rst_n && init_done);
    forever begin
      @(negedge clk);
      q_valid = !q_stop && ($urandom % 4) != 0;
      q_key   = keys[$urandom % NKEYS];
      if (q_valid) begin
        qpend.push_back('{cycle, q_key});
        if (upd_busy) n_overlap++;
      end
    end
  end

  initial begin
    model = new(D, M, N, FP_W, 4);
    for (int k = 0; k < NKEYS; k++)
      for (int w = 0; w < KEY_W/32; w++) keys[k][32*w +: 32] = $urandom;
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (!init_done) begin
      @(negedge clk);
      sweep_cycles++;
      checks++;
      if (!init_done && (q_ready || upd_ready)) begin failures++; $display("ready during sweep at %0d", sweep_cycles); end
    end
    checks++;
    if (sweep_cycles != M) begin failures++; $display("sweep took %0d cycles", sweep_cycles); end

    for (int t = 0; t < NOPS; t++) begin
      upd_op_e op;
      bit      cls;
      if (t == 40)  evict_en = 0;
      if (t == 120) evict_en = 1;
      op = ($urandom % 6 == 0) ? OP_DELETE : OP_INSERT;
      cls = model.count > 0 && ($urandom % 5 == 0);
      do_update(op, keys[$urandom % NKEYS], $urandom, cls, $urandom % (model.count > 0 ? model.count : 1));
    end
    repeat (6) @(negedge clk);
    q_stop = 1;
    repeat (6) @(negedge clk);
    checks++;
    if (qpend.size() != 0) begin failures++; $display("%0d queries without result", qpend.size()); end

    $display("sweep=%0d cycles", sweep_cycles);
    $display("fill=%0d dup=%0d evict=%0d exists=%0d deny_full=%0d deny_evict=%0d del_hit=%0d del_miss=%0d",
             kinds[0], kinds[1], kinds[2], kinds[3], kinds[4], kinds[5], kinds[6], kinds[7]);
    $display("query hit=%0d miss=%0d split_resolution=%0d accepted=%0d below_threshold=%0d beside_update=%0d not_compared=%0d mem_full_seen=%0d",
             n_hit, n_miss, n_split, n_accept, n_reject, n_overlap, n_skipped, n_full);
    $display("class insertions that wrote the sketch=%0d (with all addresses used: %0d)", n_class, n_class_full);
    for (int k = 0; k < 8; k++) begin checks++; if (kinds[k] == 0) failures++; end
    checks += 9;
    if (n_class == 0) failures++;
    if (n_class_full == 0) failures++;
    if (n_hit == 0) failures++;
    if (n_miss == 0) failures++;
    if (n_split == 0) failures++;
    if (n_reject == 0) failures++;
    if (n_accept == 0) failures++;
    if (n_overlap == 0) failures++;
    if (n_full == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
