// pcam_update_fsm: controller of the P-CAM update datapath.
//
// After reset it sweeps the M cells of every sketch row through port B and
// marks them empty (S_INIT, M cycles); init_done_o then rises. From then on
// it serves one insert or delete at a time:
//   S_IDLE   upd_ready_o = 1; on upd_valid_i it captures the operation, the
//            key's row indices and fingerprint (hashed by the caller in the
//            same cycle), the value and the optional class address;
//   S_READ   reads the D hash-indexed FACs through port B;
//   S_DECIDE applies pcam_update_policy to the read FACs, writes the chosen
//            rows, consumes an address from the address generator and writes
//            the value store as the policy says.
// A class insertion (upd_cls_en_i = 1) writes the given address
// upd_cls_addr_i into the FACs it fills or replaces, instead of a fresh one,
// so that several keys share one value-store entry; it takes nothing from the
// address generator and is therefore never refused for lack of addresses.
// The address should be one handed out earlier (it is also the entry's age
// stamp for eviction).
// An operation therefore occupies three cycles and its result (done_o,
// kind_o, res_addr_o) is registered at the end of S_DECIDE. denied_o is the
// memory-full indication for refused insertions: it rises when an insertion
// is denied (no address left, or eviction needed but disabled) and falls
// when an insertion next writes the sketch. A separate
// update datapath running beside the query datapath, on its own RAM port,
// follows the design description, and so does mapping several keys to one
// address; the empty-marking sweep, the three-state sequence, the
// one-at-a-time handshake and the class-address request field are this
// implementation's choices.
// Because operations do not overlap, a read always sees the previous write.
//
// Interface: valid/ready request handshake (the request must stay stable
// while valid is high and ready low), sketch port B, address generator,
// value store write port, result strobe.
module pcam_update_fsm
  import pcam_pkg::*;
#(
  parameter int unsigned D     = DEF_D,
  parameter int unsigned M     = DEF_M,
  parameter int unsigned FP_W  = DEF_FP_W,
  parameter int unsigned N     = DEF_M,
  parameter int unsigned VAL_W = DEF_VAL_W,
  localparam int unsigned IDX_W = $clog2(M),
  localparam int unsigned A_W   = $clog2(N),
  localparam int unsigned W     = 1 + FP_W + A_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  output logic                     init_done_o,
  // request
  input  logic                     upd_valid_i,
  output logic                     upd_ready_o,
  input  upd_op_e                  upd_op_i,
  input  logic [D-1:0][IDX_W-1:0]  upd_idx_i,
  input  logic [FP_W-1:0]          upd_fp_i,
  input  logic [VAL_W-1:0]         upd_val_i,
  input  logic                     upd_cls_en_i,   // insert under a given address
  input  logic [A_W-1:0]           upd_cls_addr_i,
  input  logic                     evict_en_i,
  // sketch port B
  output logic                     b_en_o,
  output logic [D-1:0]             b_we_o,
  output logic [D-1:0][IDX_W-1:0]  b_addr_o,
  output logic [W-1:0]             b_wdata_o,
  input  logic [D-1:0][W-1:0]      b_rdata_i,
  // address generator
  output logic                     alloc_o,
  input  logic [A_W-1:0]           adgen_addr_i,
  input  logic                     adgen_full_i,
  // value store write port
  output logic                     v_we_o,
  output logic [A_W-1:0]           v_waddr_o,
  output logic [VAL_W-1:0]         v_wdata_o,
  // result
  output logic                     done_o,
  output upd_kind_e                kind_o,
  output logic [A_W-1:0]           res_addr_o,
  output logic                     denied_o     // last insertion was refused
);

  typedef enum logic [1:0] {S_INIT, S_IDLE, S_READ, S_DECIDE} state_e;

  state_e                   state;
  logic [IDX_W-1:0]         clr_idx;
  upd_op_e                  op_q;
  logic [D-1:0][IDX_W-1:0]  idx_q;
  logic [FP_W-1:0]          fp_q;
  logic [VAL_W-1:0]         val_q;
  logic                     cls_en_q;
  logic [A_W-1:0]           cls_addr_q;
  logic [A_W-1:0]           new_addr;

  logic [D-1:0]             pol_we;
  logic [W-1:0]             pol_wdata;
  logic                     pol_alloc;
  logic                     pol_val_we;
  logic [A_W-1:0]           pol_val_addr;
  upd_kind_e                pol_kind;

  pcam_update_policy #(.D(D), .FP_W(FP_W), .A_W(A_W)) u_policy (
    .facs_i       (b_rdata_i),
    .fp_i         (fp_q),
    .op_i         (op_q),
    .new_addr_i   (new_addr),
    .adgen_full_i (adgen_full_i && !cls_en_q),
    .evict_en_i   (evict_en_i),
    .we_o         (pol_we),
    .wdata_o      (pol_wdata),
    .alloc_o      (pol_alloc),
    .val_we_o     (pol_val_we),
    .val_addr_o   (pol_val_addr),
    .kind_o       (pol_kind)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_INIT;
      clr_idx  <= '0;
      done_o   <= 1'b0;
      denied_o <= 1'b0;
    end else begin
      done_o <= 1'b0;
      unique case (state)
        S_INIT: begin
          clr_idx <= clr_idx + 1'b1;
          if (clr_idx == IDX_W'(M - 1)) state <= S_IDLE;
        end
        S_IDLE:   if (upd_valid_i) state <= S_READ;
        S_READ:   state <= S_DECIDE;
        S_DECIDE: begin
          state  <= S_IDLE;
          done_o <= 1'b1;
          if (pol_kind == UPD_DENY_FULL || pol_kind == UPD_DENY_EVICT) denied_o <= 1'b1;
          else if (|pol_we && op_q == OP_INSERT)                      denied_o <= 1'b0;
        end
        default:  state <= S_IDLE;
      endcase
    end
  end

  // a class insertion reuses the given address and leaves the counter alone
  assign new_addr = cls_en_q ? cls_addr_q : adgen_addr_i;

  always_ff @(posedge clk) begin
    if (state == S_IDLE && upd_valid_i) begin
      op_q  <= upd_op_i;
      idx_q <= upd_idx_i;
      fp_q  <= upd_fp_i;
      val_q <= upd_val_i;
      cls_en_q   <= upd_cls_en_i && upd_op_i == OP_INSERT;
      cls_addr_q <= upd_cls_addr_i;
    end
    if (state == S_DECIDE) begin
      kind_o     <= pol_kind;
      res_addr_o <= pol_val_addr;
    end
  end

  assign init_done_o = (state != S_INIT);
  assign upd_ready_o = (state == S_IDLE);

  always_comb begin
    b_en_o    = 1'b0;
    b_we_o    = '0;
    b_addr_o  = idx_q;
    b_wdata_o = pol_wdata;
    alloc_o   = 1'b0;
    v_we_o    = 1'b0;
    v_waddr_o = pol_val_addr;
    v_wdata_o = val_q;
    unique case (state)
      S_INIT: begin
        b_en_o    = 1'b1;
        b_we_o    = '1;
        for (int i = 0; i < D; i++) b_addr_o[i] = clr_idx;
        b_wdata_o = '0;
      end
      S_READ: b_en_o = 1'b1;
      S_DECIDE: begin
        b_en_o  = |pol_we;
        b_we_o  = pol_we;
        alloc_o = pol_alloc && !cls_en_q;
        v_we_o  = pol_val_we;
      end
      default: ;
    endcase
  end

  // Handshake rule: a request that is not yet accepted stays in place.
  property p_req_stable;
    @(posedge clk) disable iff (!rst_n)
      (upd_valid_i && !upd_ready_o) |=> upd_valid_i;
  endproperty
  a_req_stable: assert property (p_req_stable)
    else $error("pcam_update_fsm: update request withdrawn before acceptance");

endmodule
