// pcam_hash: hash calculation for one P-CAM datapath.
//
// A key of KEY_W bits is zero-padded to the 384-bit hash block, permuted by
// xoodoo_nc, and the single wide output is cut into D row indices h_i(x) of
// IDX_W bits each and one fingerprint f(x) of FP_W bits:
//   idx_o[i] = hash[i*IDX_W +: IDX_W]       (i = 0 .. D-1)
//   fp_o     = hash[D*IDX_W +: FP_W]
// Padding short keys with zeros, one hash instance per datapath and deriving
// all indices and the fingerprint from one output follow the design
// description; which output bits feed which field is this implementation's
// choice. Because the index is a plain bit field, the row size m = 2^IDX_W is
// a power of two.
//
// Interface: key_i in; idx_o, fp_o out. Purely combinational (one cycle).
module pcam_hash
  import pcam_pkg::*;
#(
  parameter int unsigned KEY_W  = DEF_KEY_W,
  parameter int unsigned D      = DEF_D,
  parameter int unsigned IDX_W  = $clog2(DEF_M),
  parameter int unsigned FP_W   = DEF_FP_W,
  parameter int unsigned ROUNDS = DEF_ROUNDS
) (
  input  logic [KEY_W-1:0]            key_i,
  output logic [D-1:0][IDX_W-1:0]     idx_o,
  output logic [FP_W-1:0]             fp_o
);

  initial begin
    assert (KEY_W <= HASH_W)
      else $fatal(1, "pcam_hash: KEY_W exceeds the 384-bit hash block");
    assert (D*IDX_W + FP_W <= HASH_W)
      else $fatal(1, "pcam_hash: indices and fingerprint exceed the hash output");
  end

  logic [HASH_W-1:0] block;
  logic [HASH_W-1:0] hash;

  assign block = HASH_W'(key_i);

  xoodoo_nc #(.ROUNDS(ROUNDS)) u_perm (
    .state_i (block),
    .state_o (hash)
  );

  always_comb begin
    for (int i = 0; i < D; i++) idx_o[i] = hash[i*IDX_W +: IDX_W];
    fp_o = hash[D*IDX_W +: FP_W];
  end

endmodule
