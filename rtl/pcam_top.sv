// pcam_top: probabilistic content addressable memory (P-CAM) used as a
// key-value store for very wide keys.
//
// Instead of storing whole keys, every key is hashed once (pcam_hash) into D
// row indices and a short fingerprint. The sketch is D rows (fac_ram) of M
// fingerprint-address cells; a key occupies the cell its index selects in
// each row, and that cell holds (fingerprint, address). The address, handed
// out by a never-wrapping counter (pcam_adgen), indexes the value store
// (pcam_value_store) and also acts as an age stamp. Storage per row is thus
// M x (FP_W + log2 N) bits whatever the key width.
//
// Two independent datapaths share the sketch through its two RAM ports:
//   update (pcam_update_fsm, own hash): insert or delete, one operation per
//     three cycles, after an M-cycle sweep that empties the sketch following
//     reset (init_done_o);
//   query (pcam_query_fsm, own hash): one lookup per cycle, result, confidence
//     vector and value three cycles later.
// Both can be active in the same cycle. A query that reads a cell in the same
// cycle as an update writes it sees the cell's old content.
//
// Configuration inputs: cfg_evict_en_i selects what an insertion does when
// all D cells are taken by other keys: 1 evicts the oldest, 0 denies it and
// reports memory full (for deterministic, false-negative-free operation).
// cfg_conf_thresh_i is the number of agreeing rows a query needs for
// q_accept_o. mem_full_o is raised when every address has been used, and
// also while the most recent insertion was refused for lack of room.
// An insertion with upd_cls_en_i = 1 is a class insertion: the key is stored
// under the existing address upd_cls_addr_i instead of a new one, so that
// many keys return the same value-store entry (multi-key-to-class mapping).
// The structure follows the design description; port names, handshakes and
// the reset sweep are this implementation's.
module pcam_top
  import pcam_pkg::*;
#(
  parameter int unsigned KEY_W  = DEF_KEY_W,
  parameter int unsigned D      = DEF_D,
  parameter int unsigned M      = DEF_M,
  parameter int unsigned FP_W   = DEF_FP_W,
  parameter int unsigned N      = M,          // entries; load factor n/m = 1
  parameter int unsigned VAL_W  = DEF_VAL_W,
  parameter int unsigned ROUNDS = DEF_ROUNDS,
  localparam int unsigned IDX_W = $clog2(M),
  localparam int unsigned A_W   = $clog2(N),
  localparam int unsigned W     = 1 + FP_W + A_W,
  localparam int unsigned CW    = $clog2(D + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic              init_done_o,
  // configuration
  input  logic              cfg_evict_en_i,
  input  logic [CW-1:0]     cfg_conf_thresh_i,
  // update port
  input  logic              upd_valid_i,
  output logic              upd_ready_o,
  input  upd_op_e           upd_op_i,
  input  logic [KEY_W-1:0]  upd_key_i,
  input  logic [VAL_W-1:0]  upd_value_i,
  input  logic              upd_cls_en_i,
  input  logic [A_W-1:0]    upd_cls_addr_i,
  output logic              upd_done_o,
  output upd_kind_e         upd_kind_o,
  output logic [A_W-1:0]    upd_addr_o,
  output logic              mem_full_o,
  // query port
  input  logic              q_valid_i,
  output logic              q_ready_o,
  input  logic [KEY_W-1:0]  q_key_i,
  output logic              q_res_valid_o,
  output logic              q_match_o,
  output logic [A_W-1:0]    q_addr_o,
  output logic [D-1:0]      q_conf_o,
  output logic              q_accept_o,
  output logic [VAL_W-1:0]  q_value_o
);

  // hashes, one per datapath
  logic [D-1:0][IDX_W-1:0] u_idx, q_idx;
  logic [FP_W-1:0]         u_fp, q_fp;

  pcam_hash #(.KEY_W(KEY_W), .D(D), .IDX_W(IDX_W), .FP_W(FP_W), .ROUNDS(ROUNDS))
    u_hash_upd (.key_i(upd_key_i), .idx_o(u_idx), .fp_o(u_fp));

  pcam_hash #(.KEY_W(KEY_W), .D(D), .IDX_W(IDX_W), .FP_W(FP_W), .ROUNDS(ROUNDS))
    u_hash_qry (.key_i(q_key_i), .idx_o(q_idx), .fp_o(q_fp));

  // sketch
  logic                    a_en, b_en;
  logic [D-1:0]            b_we;
  logic [D-1:0][IDX_W-1:0] a_addr, b_addr;
  logic [W-1:0]            b_wdata;
  logic [D-1:0][W-1:0]     a_rdata, b_rdata;

  for (genvar r = 0; r < D; r++) begin : g_row
    fac_ram #(.M(M), .W(W)) u_row (
      .clk     (clk),
      .a_en    (a_en),
      .a_addr  (a_addr[r]),
      .a_rdata (a_rdata[r]),
      .b_en    (b_en),
      .b_we    (b_we[r]),
      .b_addr  (b_addr[r]),
      .b_wdata (b_wdata),
      .b_rdata (b_rdata[r])
    );
  end

  // address generator
  logic           alloc;
  logic [A_W-1:0] ad_addr;
  logic           adgen_full;
  logic           ins_denied;

  pcam_adgen #(.N(N)) u_adgen (
    .clk     (clk),
    .rst_n   (rst_n),
    .alloc_i (alloc),
    .addr_o  (ad_addr),
    .full_o  (adgen_full)
  );

  // value store
  logic             v_we, v_re;
  logic [A_W-1:0]   v_waddr, v_raddr;
  logic [VAL_W-1:0] v_wdata;

  pcam_value_store #(.N(N), .VAL_W(VAL_W)) u_vstore (
    .clk     (clk),
    .we_i    (v_we),
    .waddr_i (v_waddr),
    .wdata_i (v_wdata),
    .re_i    (v_re),
    .raddr_i (v_raddr),
    .rdata_o (q_value_o)
  );

  // control unit: update FSM and query FSM
  pcam_update_fsm #(.D(D), .M(M), .FP_W(FP_W), .N(N), .VAL_W(VAL_W)) u_upd (
    .clk          (clk),
    .rst_n        (rst_n),
    .init_done_o  (init_done_o),
    .upd_valid_i  (upd_valid_i),
    .upd_ready_o  (upd_ready_o),
    .upd_op_i     (upd_op_i),
    .upd_idx_i    (u_idx),
    .upd_fp_i     (u_fp),
    .upd_val_i    (upd_value_i),
    .upd_cls_en_i   (upd_cls_en_i),
    .upd_cls_addr_i (upd_cls_addr_i),
    .evict_en_i   (cfg_evict_en_i),
    .b_en_o       (b_en),
    .b_we_o       (b_we),
    .b_addr_o     (b_addr),
    .b_wdata_o    (b_wdata),
    .b_rdata_i    (b_rdata),
    .alloc_o      (alloc),
    .adgen_addr_i (ad_addr),
    .adgen_full_i (adgen_full),
    .v_we_o       (v_we),
    .v_waddr_o    (v_waddr),
    .v_wdata_o    (v_wdata),
    .done_o       (upd_done_o),
    .kind_o       (upd_kind_o),
    .res_addr_o   (upd_addr_o),
    .denied_o     (ins_denied)
  );

  assign mem_full_o = adgen_full || ins_denied;

  assign q_ready_o = init_done_o;

  pcam_query_fsm #(.D(D), .M(M), .FP_W(FP_W), .N(N)) u_qry (
    .clk         (clk),
    .rst_n       (rst_n),
    .q_valid_i   (q_valid_i && q_ready_o),
    .q_idx_i     (q_idx),
    .q_fp_i      (q_fp),
    .thresh_i    (cfg_conf_thresh_i),
    .a_en_o      (a_en),
    .a_addr_o    (a_addr),
    .a_rdata_i   (a_rdata),
    .v_re_o      (v_re),
    .v_raddr_o   (v_raddr),
    .res_valid_o (q_res_valid_o),
    .match_o     (q_match_o),
    .addr_o      (q_addr_o),
    .conf_o      (q_conf_o),
    .accept_o    (q_accept_o)
  );

endmodule
