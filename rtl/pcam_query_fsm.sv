// pcam_query_fsm: controller of the P-CAM query datapath, a three-stage
// pipeline that accepts one query per clock cycle.
//   stage 1  the key's D row indices and fingerprint (hashed by the caller
//            in the cycle the query is presented) are registered;
//   stage 2  the D hash-indexed FACs are read through sketch port A;
//   stage 3  pcam_addr_select resolves presence, address and confidence;
//            the results are registered, and in the same cycle the resolved
//            address reads the value store, so the value arrives with them.
// A query presented in cycle t has res_valid_o (with match_o, addr_o,
// conf_o, accept_o and the value store data) in cycle t+3. The three-cycle
// latency and the separate query datapath follow the design description;
// the exact split into stages is this implementation's choice.
//
// Interface: q_valid_i with indices and fingerprint; sketch port A; value
// store read port; registered result.
module pcam_query_fsm
  import pcam_pkg::*;
#(
  parameter int unsigned D    = DEF_D,
  parameter int unsigned M    = DEF_M,
  parameter int unsigned FP_W = DEF_FP_W,
  parameter int unsigned N    = DEF_M,
  localparam int unsigned IDX_W = $clog2(M),
  localparam int unsigned A_W   = $clog2(N),
  localparam int unsigned W     = 1 + FP_W + A_W,
  localparam int unsigned CW    = $clog2(D + 1)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     q_valid_i,
  input  logic [D-1:0][IDX_W-1:0]  q_idx_i,
  input  logic [FP_W-1:0]          q_fp_i,
  input  logic [CW-1:0]            thresh_i,
  // sketch port A
  output logic                     a_en_o,
  output logic [D-1:0][IDX_W-1:0]  a_addr_o,
  input  logic [D-1:0][W-1:0]      a_rdata_i,
  // value store read port
  output logic                     v_re_o,
  output logic [A_W-1:0]           v_raddr_o,
  // result
  output logic                     res_valid_o,
  output logic                     match_o,
  output logic [A_W-1:0]           addr_o,
  output logic [D-1:0]             conf_o,
  output logic                     accept_o
);

  logic                    s1_v, s2_v;
  logic [D-1:0][IDX_W-1:0] s1_idx;
  logic [FP_W-1:0]         s1_fp, s2_fp;

  logic           sel_present;
  logic [A_W-1:0] sel_addr;
  logic [D-1:0]   sel_conf;
  logic           sel_accept;
  logic [D-1:0]   unused_fm;
  logic           unused_all_valid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1_v        <= 1'b0;
      s2_v        <= 1'b0;
      res_valid_o <= 1'b0;
    end else begin
      s1_v        <= q_valid_i;
      s2_v        <= s1_v;
      res_valid_o <= s2_v;
    end
  end

  always_ff @(posedge clk) begin
    if (q_valid_i) begin
      s1_idx <= q_idx_i;
      s1_fp  <= q_fp_i;
    end
    if (s1_v) s2_fp <= s1_fp;
    if (s2_v) begin
      match_o  <= sel_present;
      addr_o   <= sel_addr;
      conf_o   <= sel_conf;
      accept_o <= sel_accept;
    end
  end

  assign a_en_o   = s1_v;
  assign a_addr_o = s1_idx;

  pcam_addr_select #(.D(D), .FP_W(FP_W), .A_W(A_W)) u_sel (
    .facs_i      (a_rdata_i),
    .fp_i        (s2_fp),
    .thresh_i    (thresh_i),
    .present_o   (sel_present),
    .addr_o      (sel_addr),
    .conf_o      (sel_conf),
    .accept_o    (sel_accept),
    .fp_match_o  (unused_fm),
    .all_valid_o (unused_all_valid)
  );

  assign v_re_o    = s2_v && sel_present;
  assign v_raddr_o = sel_addr;

endmodule
