// pcam_addr_select: address select logic of the P-CAM.
//
// Takes the D fingerprint-address cells (FACs) read for one key, one per
// sketch row, and the key's fingerprint, and decides:
//   * present_o: every FAC is occupied and at least one holds the key's
//     fingerprint. An empty FAC, or no fingerprint match, means absent.
//   * addr_o: among the FACs whose fingerprint matches, the address that all
//     of them share; otherwise an address held by more than half of them (a
//     majority); otherwise the highest (most recent) matching address.
//   * conf_o: the confidence vector, bit i set when row i's FAC matches the
//     fingerprint and holds the returned address. Zero when absent.
//   * accept_o: present and at least thresh_i bits of conf_o set.
// These rules follow the design description. Reading "majority" as strictly
// more than half of the matching FACs, and counting in the confidence vector
// only the FACs that agree with the returned address, are this
// implementation's readings. fp_match_o (fingerprint match per row, ignoring
// address) and all_valid_o are exported for the update policy.
//
// FAC word layout: {valid, fingerprint[FP_W], address[A_W]}.
// Purely combinational.
module pcam_addr_select #(
  parameter int unsigned D    = 4,
  parameter int unsigned FP_W = 8,
  parameter int unsigned A_W  = 19,
  localparam int unsigned W   = 1 + FP_W + A_W,
  localparam int unsigned CW  = $clog2(D + 1)
) (
  input  logic [D-1:0][W-1:0] facs_i,
  input  logic [FP_W-1:0]     fp_i,
  input  logic [CW-1:0]       thresh_i,
  output logic                present_o,
  output logic [A_W-1:0]      addr_o,
  output logic [D-1:0]        conf_o,
  output logic                accept_o,
  output logic [D-1:0]        fp_match_o,
  output logic                all_valid_o
);

  typedef struct packed {
    logic            valid;
    logic [FP_W-1:0] fp;
    logic [A_W-1:0]  addr;
  } fac_t;

  fac_t [D-1:0] fac;
  assign fac = facs_i;

  logic [D-1:0]  fm;
  logic [CW-1:0] n_match;
  logic          have_major;
  logic [A_W-1:0] major_addr;
  logic [A_W-1:0] max_addr;
  logic [CW-1:0]  n_conf;
  logic [CW-1:0]  agree [D];

  always_comb begin
    // fingerprint matches and occupancy
    all_valid_o = 1'b1;
    n_match     = '0;
    for (int i = 0; i < D; i++) begin
      fm[i] = fac[i].valid && (fac[i].fp == fp_i);
      all_valid_o &= fac[i].valid;
      n_match += CW'(fm[i]);
    end
    present_o = all_valid_o && (|fm);

    // majority (covers the unanimous case) and highest address
    have_major = 1'b0;
    major_addr = '0;
    max_addr   = '0;
    for (int i = 0; i < D; i++) begin
      agree[i] = '0;
      for (int j = 0; j < D; j++)
        if (fm[j] && fac[j].addr == fac[i].addr) agree[i] += 1'b1;
    end
    for (int i = 0; i < D; i++) begin
      if (fm[i]) begin
        if (!have_major && ((CW+1)'(agree[i]) << 1) > (CW+1)'(n_match)) begin
          have_major = 1'b1;
          major_addr = fac[i].addr;
        end
        if (fac[i].addr > max_addr) max_addr = fac[i].addr;
      end
    end
    addr_o = have_major ? major_addr : max_addr;

    // confidence vector and threshold
    n_conf = '0;
    for (int i = 0; i < D; i++) begin
      conf_o[i] = present_o && fm[i] && (fac[i].addr == addr_o);
      n_conf += CW'(conf_o[i]);
    end
    accept_o   = present_o && (n_conf >= thresh_i);
    fp_match_o = fm;
  end

endmodule
