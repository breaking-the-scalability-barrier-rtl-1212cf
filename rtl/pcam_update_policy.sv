// pcam_update_policy: decision logic of the P-CAM update and delete
// operations.
//
// Given the D FACs read for a key (one per sketch row), the key's
// fingerprint, the next free address and the configuration, it decides which
// rows are written and with what, whether an address is consumed, and where
// the key's value goes. For an insertion:
//   1. any FAC empty: all empty FACs receive (fingerprint, new address) and
//      the value is written at the new address (denied if the address
//      generator is full);
//   2. all occupied, some fingerprint matches: the key is present; the sketch
//      is left alone and the value is written at the resolved address;
//   3. all occupied, no match, some pairs identical: the first FAC (lowest
//      row) that has an identical partner is replaced by the new pair;
//   4. all occupied, no match, all pairs distinct: the FAC with the smallest
//      address (the oldest entry) is evicted, unless eviction is disabled,
//      in which case the insertion is denied and reported as memory full.
// For a deletion the key is looked up as a query would; if present, the FACs
// that match its fingerprint and hold the resolved address are cleared.
// The four cases and their order follow the design description. Choosing
// the lowest row in case 3 (the description allows random or first), the
// lowest row on an address tie in case 4, and clearing only the FACs that
// agree with the resolved address on delete are this implementation's
// choices.
//
// FAC word layout: {valid, fingerprint[FP_W], address[A_W]}.
// Purely combinational.
module pcam_update_policy
  import pcam_pkg::*;
#(
  parameter int unsigned D    = 4,
  parameter int unsigned FP_W = 8,
  parameter int unsigned A_W  = 19,
  localparam int unsigned W   = 1 + FP_W + A_W
) (
  input  logic [D-1:0][W-1:0] facs_i,
  input  logic [FP_W-1:0]     fp_i,
  input  upd_op_e             op_i,
  input  logic [A_W-1:0]      new_addr_i,   // next address from AdGen
  input  logic                adgen_full_i,
  input  logic                evict_en_i,   // 1: evict oldest, 0: deny
  output logic [D-1:0]        we_o,         // rows to write
  output logic [W-1:0]        wdata_o,      // word written to those rows
  output logic                alloc_o,      // consume new_addr_i
  output logic                val_we_o,     // write the value store
  output logic [A_W-1:0]      val_addr_o,   // value store address / result address
  output upd_kind_e           kind_o
);

  typedef struct packed {
    logic            valid;
    logic [FP_W-1:0] fp;
    logic [A_W-1:0]  addr;
  } fac_t;

  fac_t [D-1:0] fac;
  assign fac = facs_i;

  logic           present;
  logic [A_W-1:0] sel_addr;
  logic [D-1:0]   agree;
  logic [D-1:0]   fm;
  logic           all_valid;
  logic           unused_accept;

  pcam_addr_select #(.D(D), .FP_W(FP_W), .A_W(A_W)) u_sel (
    .facs_i      (facs_i),
    .fp_i        (fp_i),
    .thresh_i    ('0),
    .present_o   (present),
    .addr_o      (sel_addr),
    .conf_o      (agree),
    .accept_o    (unused_accept),
    .fp_match_o  (fm),
    .all_valid_o (all_valid)
  );

  logic [D-1:0] dup_row;    // one-hot: first row with an identical partner
  logic [D-1:0] old_row;    // one-hot: row with the smallest address
  logic         have_dup;

  always_comb begin
    have_dup = 1'b0;
    dup_row  = '0;
    for (int i = 0; i < D; i++)
      for (int j = 0; j < D; j++)
        if (i != j && !have_dup && fac[i] == fac[j]) begin
          have_dup   = 1'b1;
          dup_row[i] = 1'b1;
        end

    old_row = '0;
    begin
      int unsigned oi;
      oi = 0;
      for (int i = 1; i < D; i++)
        if (fac[i].addr < fac[oi].addr) oi = i;
      old_row[oi] = 1'b1;
    end
  end

  always_comb begin
    we_o       = '0;
    wdata_o    = {1'b1, fp_i, new_addr_i};
    alloc_o    = 1'b0;
    val_we_o   = 1'b0;
    val_addr_o = new_addr_i;
    kind_o     = UPD_DENY_FULL;

    if (op_i == OP_DELETE) begin
      wdata_o    = '0;
      val_addr_o = sel_addr;
      if (present) begin
        we_o   = agree;
        kind_o = UPD_DEL_HIT;
      end else begin
        kind_o = UPD_DEL_MISS;
      end
    end else if (!all_valid) begin
      if (!adgen_full_i) begin
        for (int i = 0; i < D; i++) we_o[i] = !fac[i].valid;
        alloc_o  = 1'b1;
        val_we_o = 1'b1;
        kind_o   = UPD_FILL_EMPTY;
      end
    end else if (|fm) begin
      val_we_o   = 1'b1;
      val_addr_o = sel_addr;
      kind_o     = UPD_EXISTS;
    end else if (adgen_full_i) begin
      kind_o = UPD_DENY_FULL;
    end else if (have_dup) begin
      we_o     = dup_row;
      alloc_o  = 1'b1;
      val_we_o = 1'b1;
      kind_o   = UPD_REPL_DUP;
    end else if (evict_en_i) begin
      we_o     = old_row;
      alloc_o  = 1'b1;
      val_we_o = 1'b1;
      kind_o   = UPD_EVICT;
    end else begin
      kind_o = UPD_DENY_EVICT;
    end
  end

endmodule
