// pcam_acc_run: one accuracy experiment on its own P-CAM instance, used by
// tb_pcam_accuracy.
//
// Synthetic data set: M random keys of KEY_W bits with the values 0..M-1 in
// shuffled order. After the reset sweep the keys are inserted in three
// steps, to load factors 0.25, 0.5 and 1.0 (keys per row cell); after each
// step every key inserted so far is queried back-to-back. A query is counted
// correct when it reports a match and returns the key's own value. Every
// query result (match, address, confidence vector, value) is also compared
// with the reference P-CAM. The confidence histogram (number of rows that
// agree with the answer) is kept for load factors 0.5 and 1.0.
// Outputs are valid when done_o is high; accuracies are in units of 0.01 %.
// The confidence histograms have five bins, so D may be at most 4.
module pcam_acc_run
  import pcam_pkg::*;
  import pcam_ref_pkg::*;
#(
  parameter int KEY_W = 384,
  parameter int D     = 4,
  parameter int FP_W  = 8,
  parameter int M     = 4096
) (
  input  logic clk,
  output logic done_o,
  output int   checks_o,
  output int   failures_o,
  output int   acc_o [3],         // load factor 0.25, 0.5, 1.0
  output int   conf05_o [5],      // queries by confidence 0..D at 0.5 (D <= 4)
  output int   conf10_o [5]       // same at 1.0
);
  localparam int N = M, VAL_W = 32, A_W = $clog2(N), CW = $clog2(D+1);

  logic rst_n = 0, init_done;
  logic upd_valid = 0, upd_ready, upd_done, mem_full;
  upd_op_e upd_op = OP_INSERT;
  logic [KEY_W-1:0] upd_key = '0, q_key = '0;
  logic [VAL_W-1:0] upd_value = '0, q_value;
  upd_kind_e upd_kind;
  logic [A_W-1:0] upd_addr, q_addr;
  logic q_valid = 0, q_ready, q_res_valid, q_match, q_accept;
  logic [D-1:0] q_conf;

  pcam_top #(.KEY_W(KEY_W), .D(D), .M(M), .FP_W(FP_W), .N(N), .VAL_W(VAL_W)) dut (
    .clk, .rst_n, .init_done_o(init_done), .cfg_evict_en_i(1'b1),
    .cfg_conf_thresh_i(CW'(1)), .upd_valid_i(upd_valid), .upd_ready_o(upd_ready),
    .upd_op_i(upd_op), .upd_key_i(upd_key), .upd_value_i(upd_value), .upd_cls_en_i(1'b0), .upd_cls_addr_i('0),
    .upd_done_o(upd_done),
    .upd_kind_o(upd_kind), .upd_addr_o(upd_addr), .mem_full_o(mem_full),
    .q_valid_i(q_valid), .q_ready_o(q_ready), .q_key_i(q_key), .q_res_valid_o(q_res_valid),
    .q_match_o(q_match), .q_addr_o(q_addr), .q_conf_o(q_conf), .q_accept_o(q_accept),
    .q_value_o(q_value));

  pcam_model model;
  logic [KEY_W-1:0] keys [M];
  int unsigned      vals [M];
  int qkey [$];
  int correct, phase;

  always @(negedge clk) if (rst_n && q_res_valid) begin
    int     k;
    qres_s  e;
    int unsigned ev;
    k = qkey.pop_front();
    e = model.query(384'(keys[k]), ev);
    checks_o += 2;
    if (q_match !== e.present) failures_o++;
    if (e.present && (q_addr !== A_W'(e.addr) || q_conf !== D'(e.conf) || q_value !== ev))
      failures_o++;
    if (q_match && q_value == vals[k]) correct++;
    if (phase == 1) conf05_o[$countones(q_conf)]++;
    if (phase == 2) conf10_o[$countones(q_conf)]++;
  end

  task automatic insert(int k);
    ures_s u;
    @(negedge clk);
    upd_key = keys[k]; upd_value = vals[k]; upd_valid = 1;
    while (!upd_ready) @(negedge clk);
    @(negedge clk);
    upd_valid = 0;
    while (!upd_done) @(negedge clk);
    u = model.update(384'(keys[k]), 1'b0, vals[k], 1'b1);
    checks_o++;
    if (int'(upd_kind) != u.kind) failures_o++;
  endtask

  task automatic query_all(int upto);
    correct = 0;
    for (int k = 0; k < upto; k++) begin
      @(negedge clk);
      q_valid = 1; q_key = keys[k];
      qkey.push_back(k);
    end
    @(negedge clk);
    q_valid = 0;
    repeat (5) @(negedge clk);
  endtask

  initial begin
    done_o = 0; checks_o = 0; failures_o = 0; phase = 0;
    for (int c = 0; c < 5; c++) begin conf05_o[c] = 0; conf10_o[c] = 0; end
    assert (D <= 4) else $fatal(1, "pcam_acc_run: D > 4");
    model = new(D, M, N, FP_W, 4);
    for (int k = 0; k < M; k++) begin
      for (int w = 0; w < (KEY_W + 31) / 32; w++) keys[k][32*w +: 32] = $urandom;
      vals[k] = k;
    end
    for (int k = M - 1; k > 0; k--) begin
      int j;
      int unsigned t;
      j = $urandom % (k + 1);
      t = vals[k];
      vals[k] = vals[j]; vals[j] = t;
    end
    begin : perm_check
      bit seen [M];
      int bad = 0;
      foreach (vals[k]) begin
        if (vals[k] >= M || seen[vals[k]]) bad++;
        else seen[vals[k]] = 1;
      end
      checks_o++;
      if (bad != 0) failures_o++;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (init_done);
    for (int k = 0; k < M/4; k++) insert(k);
    phase = 0; query_all(M/4); acc_o[0] = correct * 10000 / (M/4);
    for (int k = M/4; k < M/2; k++) insert(k);
    phase = 1; query_all(M/2); acc_o[1] = correct * 10000 / (M/2);
    for (int k = M/2; k < M; k++) insert(k);
    phase = 2; query_all(M);   acc_o[2] = correct * 10000 / M;
    checks_o++;
    if (qkey.size() != 0) failures_o++;
    done_o = 1;
  end
endmodule
