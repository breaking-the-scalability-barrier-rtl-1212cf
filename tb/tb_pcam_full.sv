// tb_pcam_full: one complete operation of the P-CAM at its default size
// (384-bit keys, 4 rows of 2^19 cells, 8-bit fingerprints, 2^19 values).
// After the 2^19-cycle sweep that empties the sketch, it inserts 300 keys
// with values, reads them all back with back-to-back queries, overwrites
// some values, deletes some keys and queries again, including keys never
// inserted. Every outcome is compared with a reference P-CAM; queries must
// return three cycles after issue. Queries are only issued while no update
// is in flight.
module tb_pcam_full;
  import pcam_pkg::*;
  import pcam_ref_pkg::*;

  localparam int KEY_W = 384, D = 4, M = 524288, FP_W = 8, N = 524288, VAL_W = 32;
  localparam int A_W = $clog2(N), CW = $clog2(D+1);
  localparam int NKEYS = 300;

  logic clk = 0, rst_n = 0;
  logic init_done;
  logic [CW-1:0] thresh = 4;
  logic upd_valid = 0, upd_ready, upd_done, mem_full;
  upd_op_e upd_op = OP_INSERT;
  logic [KEY_W-1:0] upd_key = '0, q_key = '0;
  logic [VAL_W-1:0] upd_value = '0, q_value;
  upd_kind_e upd_kind;
  logic [A_W-1:0] upd_addr, q_addr;
  logic q_valid = 0, q_ready, q_res_valid, q_match, q_accept;
  logic [D-1:0] q_conf;

  pcam_top dut (
    .clk, .rst_n, .init_done_o(init_done), .cfg_evict_en_i(1'b0),
    .cfg_conf_thresh_i(thresh), .upd_valid_i(upd_valid), .upd_ready_o(upd_ready),
    .upd_op_i(upd_op), .upd_key_i(upd_key), .upd_value_i(upd_value), .upd_cls_en_i(1'b0), .upd_cls_addr_i('0),
    .upd_done_o(upd_done),
    .upd_kind_o(upd_kind), .upd_addr_o(upd_addr), .mem_full_o(mem_full),
    .q_valid_i(q_valid), .q_ready_o(q_ready), .q_key_i(q_key), .q_res_valid_o(q_res_valid),
    .q_match_o(q_match), .q_addr_o(q_addr), .q_conf_o(q_conf), .q_accept_o(q_accept),
    .q_value_o(q_value));

  pcam_model model;
  logic [KEY_W-1:0] keys [2*NKEYS];
  int checks = 0, failures = 0, cycle = 0, sweep = 0;
  int kinds [8];
  int n_hit = 0, n_miss = 0;
  typedef struct { int issue; logic [KEY_W-1:0] key; } qrec_s;
  qrec_s qpend [$];

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (600000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && q_res_valid) begin
    qrec_s q;
    qres_s e;
    int unsigned ev;
    checks++;
    if (qpend.size() == 0) failures++;
    else begin
      q = qpend.pop_front();
      e = model.query(q.key, ev);
      checks += 2;
      if (cycle - q.issue != 3) failures++;
      if (q_match !== e.present) failures++;
      if (e.present) begin
        n_hit++;
        checks += 4;
        if (q_addr !== A_W'(e.addr)) failures++;
        if (q_conf !== D'(e.conf)) failures++;
        if (q_accept !== ($countones(e.conf) >= thresh)) failures++;
        if (q_value !== VAL_W'(ev)) failures++;
      end else n_miss++;
    end
  end

  task automatic do_update(upd_op_e op, logic [KEY_W-1:0] key, logic [VAL_W-1:0] value);
    ures_s u;
    @(negedge clk);
    upd_op = op; upd_key = key; upd_value = value; upd_valid = 1;
    while (!upd_ready) @(negedge clk);
    @(negedge clk);
    upd_valid = 0;
    while (!upd_done) @(negedge clk);
    u = model.update(key, op == OP_DELETE, value, 1'b0);
    kinds[u.kind]++;
    checks++;
    if (int'(upd_kind) != u.kind) failures++;
    if (u.val_we || u.kind == K_DEL_HIT) begin
      checks++;
      if (upd_addr !== A_W'(u.val_addr)) failures++;
    end
  endtask

  task automatic query_burst(int first, int count);
    for (int i = first; i < first + count; i++) begin
      @(negedge clk);
      q_valid = 1; q_key = keys[i];
      qpend.push_back('{cycle, keys[i]});
    end
    @(negedge clk);
    q_valid = 0;
    repeat (5) @(negedge clk);
  endtask

  initial begin
    model = new(D, M, N, FP_W, 4);
    for (int k = 0; k < 2*NKEYS; k++)
      for (int w = 0; w < KEY_W/32; w++) keys[k][32*w +: 32] = $urandom;
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (!init_done) begin @(negedge clk); sweep++; end
    checks++;
    if (sweep != M) failures++;

    for (int k = 0; k < NKEYS; k++) do_update(OP_INSERT, keys[k], $urandom);
    query_burst(0, NKEYS);
    for (int k = 0; k < 30; k++) do_update(OP_INSERT, keys[k], $urandom);
    for (int k = 30; k < 60; k++) do_update(OP_DELETE, keys[k], 0);
    for (int k = 60; k < 70; k++) do_update(OP_DELETE, keys[NKEYS + k], 0);
    query_burst(0, 2*NKEYS);

    checks += 5;
    if (kinds[K_FILL] != NKEYS) failures++;
    if (kinds[K_EXISTS] != 30) failures++;
    if (kinds[K_DEL_HIT] != 30) failures++;
    if (n_hit != 2*NKEYS - 30) failures++;
    if (mem_full) failures++;
    $display("sweep=%0d fill=%0d exists=%0d del_hit=%0d del_miss=%0d hits=%0d misses=%0d",
             sweep, kinds[K_FILL], kinds[K_EXISTS], kinds[K_DEL_HIT], kinds[K_DEL_MISS], n_hit, n_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
