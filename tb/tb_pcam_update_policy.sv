// tb_pcam_update_policy: checks the insert and delete decisions (rows
// written, word written, address consumed, value store write and address,
// outcome) against the reference rules on random cell sets biased toward
// collisions, with the address generator full or not and eviction enabled or
// not. Every outcome must occur at least once.
module tb_pcam_update_policy;
  import pcam_pkg::*;
  import pcam_ref_pkg::*;

  localparam int D = 4, FP_W = 3, A_W = 4, W = 1 + FP_W + A_W;

  logic [D-1:0][W-1:0] facs;
  logic [FP_W-1:0]     fp;
  upd_op_e             op;
  logic [A_W-1:0]      new_addr, val_addr;
  logic                full, evict_en, alloc, val_we;
  logic [D-1:0]        we;
  logic [W-1:0]        wdata;
  upd_kind_e           kind;
  int checks = 0, failures = 0;
  int seen [8];

  pcam_update_policy #(.D(D), .FP_W(FP_W), .A_W(A_W)) dut (
    .facs_i(facs), .fp_i(fp), .op_i(op), .new_addr_i(new_addr), .adgen_full_i(full),
    .evict_en_i(evict_en), .we_o(we), .wdata_o(wdata), .alloc_o(alloc), .val_we_o(val_we),
    .val_addr_o(val_addr), .kind_o(kind));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 30000; t++) begin
      fac_s  f[] = new[D];
      ures_s u;
      fp       = FP_W'($urandom);
      op       = ($urandom % 4 == 0) ? OP_DELETE : OP_INSERT;
      new_addr = A_W'($urandom);
      full     = ($urandom % 8) == 0;
      evict_en = ($urandom % 4) != 0;
      for (int i = 0; i < D; i++) begin
        facs[i][W-1]         = ($urandom % 6) != 0;
        facs[i][A_W +: FP_W] = ($urandom % 3 == 0) ? fp : FP_W'($urandom);
        facs[i][0 +: A_W]    = ($urandom % 2) ? A_W'($urandom % 3) : A_W'($urandom);
        // occasionally copy a neighbour so identical pairs appear
        if (i > 0 && $urandom % 4 == 0) facs[i] = facs[$urandom % i];
        f[i].valid = facs[i][W-1];
        f[i].fp    = facs[i][A_W +: FP_W];
        f[i].addr  = facs[i][0 +: A_W];
      end
      #1;
      u = decide_update(f, fp, op == OP_DELETE, new_addr, full, evict_en);
      seen[u.kind]++;
      checks += 4;
      if (int'(kind) != u.kind) failures++;
      if (we !== D'(u.we)) failures++;
      if (alloc !== u.alloc) failures++;
      if (val_we !== u.val_we) failures++;
      if (u.val_we || op == OP_DELETE) begin
        checks++;
        if (u.kind != K_DEL_MISS && val_addr !== A_W'(u.val_addr)) failures++;
      end
      if (we != 0) begin
        checks++;
        if (op == OP_DELETE) begin
          if (wdata[W-1] !== 1'b0) failures++;
        end else if (wdata !== {1'b1, fp, new_addr}) failures++;
      end
    end
    for (int k = 0; k < 8; k++) begin
      $display("outcome %0d seen %0d times", k, seen[k]);
      checks++;
      if (seen[k] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
