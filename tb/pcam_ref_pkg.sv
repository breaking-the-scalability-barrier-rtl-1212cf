// pcam_ref_pkg: reference models for the P-CAM testbenches.
//
// Written independently of the RTL, in a bit-indexed or list-based style:
//   xoodoo_ref    the Xoodoo round function on individual bits a[x][y][z];
//   fac_s and the decide_* functions  the query and update rules on one set
//                 of D cells, as plain integer arithmetic over lists;
//   pcam_model    a whole P-CAM (sketch, address counter, value store) that
//                 the end-to-end testbench runs in lockstep with the RTL.
package pcam_ref_pkg;

  // ---------------------------------------------------------------- hash
  function automatic int unsigned bitpos(int x, int y, int z);
    return 32*(((x % 4) + 4) % 4 + 4*y) + ((z % 32) + 32) % 32;
  endfunction

  function automatic logic [383:0] xoodoo_ref(logic [383:0] s, int rounds);
    logic [11:0] rc [12] = '{12'h058, 12'h038, 12'h3C0, 12'h0D0,
                             12'h120, 12'h014, 12'h060, 12'h02C,
                             12'h380, 12'h0F0, 12'h1A0, 12'h012};
    logic [383:0] a, b;
    logic [127:0] p;   // p[32*x+z]
    for (int r = 12 - rounds; r < 12; r++) begin
      a = s;
      for (int x = 0; x < 4; x++)
        for (int z = 0; z < 32; z++)
          p[32*x+z] = a[bitpos(x,0,z)] ^ a[bitpos(x,1,z)] ^ a[bitpos(x,2,z)];
      for (int x = 0; x < 4; x++)
        for (int y = 0; y < 3; y++)
          for (int z = 0; z < 32; z++)
            a[bitpos(x,y,z)] ^= p[32*((x+3)%4) + (z+32-5)%32] ^ p[32*((x+3)%4) + (z+32-14)%32];
      b = a;
      for (int x = 0; x < 4; x++)
        for (int z = 0; z < 32; z++) begin
          b[bitpos(x,1,z)] = a[bitpos(x-1,1,z)];
          b[bitpos(x,2,z)] = a[bitpos(x,2,z-11)];
        end
      a = b;
      for (int z = 0; z < 12; z++) a[bitpos(0,0,z)] ^= rc[r][z];
      b = a;
      for (int x = 0; x < 4; x++)
        for (int y = 0; y < 3; y++)
          for (int z = 0; z < 32; z++)
            b[bitpos(x,y,z)] = a[bitpos(x,y,z)] ^
                               (~a[bitpos(x,(y+1)%3,z)] & a[bitpos(x,(y+2)%3,z)]);
      a = b;
      for (int x = 0; x < 4; x++)
        for (int z = 0; z < 32; z++) begin
          b[bitpos(x,1,z)] = a[bitpos(x,1,z-1)];
          b[bitpos(x,2,z)] = a[bitpos(x-2,2,z-8)];
        end
      s = b;
    end
    return s;
  endfunction

  // ---------------------------------------------------------------- cells
  typedef struct {
    bit          valid;
    int unsigned fp;
    int unsigned addr;
  } fac_s;

  typedef struct {
    bit          present;
    int unsigned addr;
    int unsigned conf;    // bit mask over rows
  } qres_s;

  // Query rule: absent if any cell empty or no fingerprint match; otherwise
  // the common address, else a strict-majority address, else the largest.
  function automatic qres_s decide_query(fac_s f[], int unsigned fp);
    qres_s       r;
    int unsigned addrs[$];
    bit          all_valid = 1;
    r = '{0, 0, 0};
    foreach (f[i]) begin
      if (!f[i].valid) all_valid = 0;
      else if (f[i].fp == fp) addrs.push_back(f[i].addr);
    end
    if (!all_valid || addrs.size() == 0) return r;
    r.present = 1;
    begin
      int unsigned best = addrs[0];
      bit found = 0;
      foreach (addrs[i]) begin
        int cnt = 0;
        foreach (addrs[j]) if (addrs[j] == addrs[i]) cnt++;
        if (!found && 2*cnt > addrs.size()) begin found = 1; best = addrs[i]; end
      end
      if (!found) foreach (addrs[i]) if (addrs[i] > best) best = addrs[i];
      r.addr = best;
    end
    foreach (f[i])
      if (f[i].valid && f[i].fp == fp && f[i].addr == r.addr) r.conf |= (1 << i);
    return r;
  endfunction

  // Update kinds, same numbering as the RTL's encoding.
  localparam int K_FILL = 0, K_DUP = 1, K_EVICT = 2, K_EXISTS = 3,
                 K_DENY_FULL = 4, K_DENY_EVICT = 5, K_DEL_HIT = 6, K_DEL_MISS = 7;

  typedef struct {
    int          kind;
    int unsigned we;       // row mask
    bit          alloc;
    bit          val_we;
    int unsigned val_addr;
  } ures_s;

  function automatic ures_s decide_update(fac_s f[], int unsigned fp, bit is_delete,
                                          int unsigned new_addr, bit full, bit evict_en);
    ures_s r;
    qres_s q;
    int    n_empty = 0;
    r = '{K_DENY_FULL, 0, 0, 0, new_addr};
    q = decide_query(f, fp);
    foreach (f[i]) if (!f[i].valid) n_empty++;
    if (is_delete) begin
      r.val_addr = q.addr;
      if (q.present) begin r.kind = K_DEL_HIT; r.we = q.conf; end
      else r.kind = K_DEL_MISS;
      return r;
    end
    if (n_empty > 0) begin
      if (full) return r;
      foreach (f[i]) if (!f[i].valid) r.we |= (1 << i);
      r.kind = K_FILL; r.alloc = 1; r.val_we = 1;
      return r;
    end
    if (q.present) begin
      r.kind = K_EXISTS; r.val_we = 1; r.val_addr = q.addr;
      return r;
    end
    if (full) return r;
    // identical pairs: first row that has a twin
    foreach (f[i]) begin
      foreach (f[j])
        if (i != j && f[i].fp == f[j].fp && f[i].addr == f[j].addr) begin
          r.kind = K_DUP; r.we = (1 << i); r.alloc = 1; r.val_we = 1;
          return r;
        end
    end
    if (!evict_en) begin r.kind = K_DENY_EVICT; return r; end
    begin
      int oi = 0;
      foreach (f[i]) if (f[i].addr < f[oi].addr) oi = i;
      r.kind = K_EVICT; r.we = (1 << oi); r.alloc = 1; r.val_we = 1;
    end
    return r;
  endfunction

  // ---------------------------------------------------------------- model
  class pcam_model;
    int unsigned d, m, n;
    int unsigned key_w, fp_w, idx_w, rounds;
    fac_s        sketch [int unsigned];   // key: row*m + idx; missing = empty
    int unsigned vstore [int unsigned];
    int unsigned count;

    function new(int unsigned d, int unsigned m, int unsigned n, int unsigned fp_w,
                 int unsigned rounds);
      this.d = d; this.m = m; this.n = n; this.fp_w = fp_w; this.rounds = rounds;
      this.idx_w = $clog2(m);
      this.count = 0;
    endfunction

    function automatic void hash(logic [383:0] key, output int unsigned idx[],
                                 output int unsigned fp);
      logic [383:0] h = xoodoo_ref(key, rounds);
      idx = new[d];
      for (int i = 0; i < d; i++) begin
        idx[i] = 0;
        for (int b = 0; b < idx_w; b++) idx[i] |= int'(h[i*idx_w + b]) << b;
      end
      fp = 0;
      for (int b = 0; b < fp_w; b++) fp |= int'(h[d*idx_w + b]) << b;
    endfunction

    function automatic void read(int unsigned idx[], output fac_s f[]);
      f = new[d];
      for (int i = 0; i < d; i++)
        if (sketch.exists(i*m + idx[i])) f[i] = sketch[i*m + idx[i]];
        else f[i] = '{0, 0, 0};
    endfunction

    function automatic qres_s query(logic [383:0] key, output int unsigned value);
      int unsigned idx[], fp;
      fac_s f[];
      qres_s q;
      hash(key, idx, fp);
      read(idx, f);
      q = decide_query(f, fp);
      value = (q.present && vstore.exists(q.addr)) ? vstore[q.addr] : 0;
      return q;
    endfunction

    // cls_en: store the key under the given address cls_addr (class insert)
    function automatic ures_s update(logic [383:0] key, bit is_delete, int unsigned value,
                                     bit evict_en, bit cls_en = 0, int unsigned cls_addr = 0);
      int unsigned idx[], fp, a;
      fac_s f[];
      ures_s u;
      bit cls;
      cls = cls_en && !is_delete;
      a = cls ? cls_addr : count;
      hash(key, idx, fp);
      read(idx, f);
      u = decide_update(f, fp, is_delete, a, cls ? 1'b0 : (count == n), evict_en);
      for (int i = 0; i < d; i++)
        if (u.we & (1 << i)) begin
          if (is_delete) sketch.delete(i*m + idx[i]);
          else sketch[i*m + idx[i]] = '{1, fp, a};
        end
      if (u.val_we) vstore[u.val_addr] = value;
      if (u.alloc && !cls) count++;
      return u;
    endfunction
  endclass

endpackage
