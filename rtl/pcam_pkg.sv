// pcam_pkg: types and constants shared by the P-CAM (probabilistic content
// addressable memory) modules.
//
// The defaults describe the main configuration: 384-bit keys, a sketch of
// d = 4 rows of m = 2^19 fingerprint-address cells (FACs), 8-bit fingerprints
// and a value store of n = m entries (load factor 1.0). Value width 32 bits
// follows the evaluation data set; the operation and result encodings are
// this implementation's own.
package pcam_pkg;

  // Hash block: the full 384-bit Xoodoo state (3 planes x 4 lanes x 32 bits).
  localparam int unsigned HASH_W        = 384;

  localparam int unsigned DEF_KEY_W     = 384;
  localparam int unsigned DEF_D         = 4;
  localparam int unsigned DEF_M         = 524288;  // 2^19 FACs per row
  localparam int unsigned DEF_FP_W      = 8;
  localparam int unsigned DEF_VAL_W     = 32;
  localparam int unsigned DEF_ROUNDS    = 4;

  // Operation requested on the update datapath.
  typedef enum logic [0:0] {
    OP_INSERT = 1'b0,   // insert key, or overwrite the value of a present key
    OP_DELETE = 1'b1    // clear the FACs that hold the key
  } upd_op_e;

  // Outcome of one update-datapath operation.
  typedef enum logic [2:0] {
    UPD_FILL_EMPTY = 3'd0,  // new key written into the empty FACs
    UPD_REPL_DUP   = 3'd1,  // new key replaced one of two identical FACs
    UPD_EVICT      = 3'd2,  // new key evicted the FAC with the smallest address
    UPD_EXISTS     = 3'd3,  // key already present: only its value was written
    UPD_DENY_FULL  = 3'd4,  // address generator exhausted: insertion denied
    UPD_DENY_EVICT = 3'd5,  // eviction needed but disabled: insertion denied
    UPD_DEL_HIT    = 3'd6,  // key found and its FACs cleared
    UPD_DEL_MISS   = 3'd7   // key not found: nothing cleared
  } upd_kind_e;

  // Xoodoo round constants c_i, i = -11 .. 0 (index 0 here is c_-11).
  function automatic logic [31:0] xoodoo_rc(input logic [3:0] idx);
    logic [11:0] rc [12] = '{12'h058, 12'h038, 12'h3C0, 12'h0D0,
                             12'h120, 12'h014, 12'h060, 12'h02C,
                             12'h380, 12'h0F0, 12'h1A0, 12'h012};
    return {20'd0, rc[idx]};
  endfunction

  // Rotate a 32-bit lane left.
  function automatic logic [31:0] rotl32(input logic [31:0] v, input int unsigned n);
    return (v << n) | (v >> (32 - n));
  endfunction

endpackage
