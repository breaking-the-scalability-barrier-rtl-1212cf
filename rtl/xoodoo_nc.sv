// xoodoo_nc: reduced-round Xoodoo permutation used as the P-CAM hash.
//
// The whole 384-bit state is permuted by ROUNDS unrolled rounds, entirely in
// combinational logic, so a new key can be hashed every clock cycle. The
// permutation neither compresses nor expands: every output bit depends on
// every input bit once enough rounds are applied (four for the 384-bit state),
// which is what lets the output be cut into independent row indices and a
// fingerprint.
//
// State layout: lane (x, y), x = 0..3, y = 0..2 (plane), occupies bits
// [32*(x+4*y) +: 32]. One round is theta, rho-west, iota, chi, rho-east as in
// the public Xoodoo definition; round r of ROUNDS uses the constant c_i with
// i = r - ROUNDS + 1 (the last ROUNDS constants of the 12-round table).
// Using the 384-bit state and four rounds follows the design description; the
// round function itself is the standard Xoodoo one, and whether the
// non-cryptographic variant alters it (constants, extra mixing) is not known,
// so it is taken unchanged.
//
// Interface: state_i (384 bits) in, state_o (384 bits) out. No clock.
module xoodoo_nc
  import pcam_pkg::*;
#(
  parameter int unsigned ROUNDS = DEF_ROUNDS  // 1..12
) (
  input  logic [HASH_W-1:0] state_i,
  output logic [HASH_W-1:0] state_o
);

  typedef logic [31:0] lane_t;
  typedef lane_t [2:0][3:0] state_t;   // [plane y][lane x]

  function automatic state_t unpack_state(input logic [HASH_W-1:0] v);
    state_t s;
    for (int y = 0; y < 3; y++)
      for (int x = 0; x < 4; x++)
        s[y][x] = v[32*(x+4*y) +: 32];
    return s;
  endfunction

  function automatic logic [HASH_W-1:0] pack_state(input state_t s);
    logic [HASH_W-1:0] v;
    for (int y = 0; y < 3; y++)
      for (int x = 0; x < 4; x++)
        v[32*(x+4*y) +: 32] = s[y][x];
    return v;
  endfunction

  function automatic state_t xoodoo_round(input state_t a, input lane_t rc);
    lane_t  p [4];
    lane_t  e [4];
    state_t b;
    lane_t  t1 [4];
    lane_t  t2 [4];
    // theta: column parity, folded back after a (1,5) and (1,14) shift
    for (int x = 0; x < 4; x++) p[x] = a[0][x] ^ a[1][x] ^ a[2][x];
    for (int x = 0; x < 4; x++)
      e[x] = rotl32(p[(x+3)%4], 5) ^ rotl32(p[(x+3)%4], 14);
    for (int y = 0; y < 3; y++)
      for (int x = 0; x < 4; x++) a[y][x] ^= e[x];
    // rho-west: plane 1 shifted by one lane, plane 2 rotated by 11
    for (int x = 0; x < 4; x++) begin
      t1[x] = a[1][x];
      t2[x] = a[2][x];
    end
    for (int x = 0; x < 4; x++) begin
      a[1][x] = t1[(x+3)%4];
      a[2][x] = rotl32(t2[x], 11);
    end
    // iota
    a[0][0] ^= rc;
    // chi
    for (int x = 0; x < 4; x++) begin
      b[0][x] = ~a[1][x] & a[2][x];
      b[1][x] = ~a[2][x] & a[0][x];
      b[2][x] = ~a[0][x] & a[1][x];
    end
    for (int y = 0; y < 3; y++)
      for (int x = 0; x < 4; x++) a[y][x] ^= b[y][x];
    // rho-east: plane 1 rotated by 1, plane 2 shifted by two lanes and rotated by 8
    for (int x = 0; x < 4; x++) begin
      t1[x] = a[1][x];
      t2[x] = a[2][x];
    end
    for (int x = 0; x < 4; x++) begin
      a[1][x] = rotl32(t1[x], 1);
      a[2][x] = rotl32(t2[(x+2)%4], 8);
    end
    return a;
  endfunction

  initial begin
    assert (ROUNDS >= 1 && ROUNDS <= 12)
      else $fatal(1, "xoodoo_nc: ROUNDS must be 1..12");
  end

  state_t st [ROUNDS+1];

  always_comb begin
    st[0] = unpack_state(state_i);
    for (int r = 0; r < ROUNDS; r++)
      st[r+1] = xoodoo_round(st[r], xoodoo_rc(4'(12 - ROUNDS + r)));
  end

  assign state_o = pack_state(st[ROUNDS]);

endmodule
