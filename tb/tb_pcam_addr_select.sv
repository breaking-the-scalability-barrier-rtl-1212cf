// tb_pcam_addr_select: checks the query decision (presence, resolved
// address, confidence vector, threshold acceptance) against the reference
// rules on random cell sets biased toward fingerprint and address
// collisions, plus the worked example where three of four rows agree on
// address 2 and the fourth holds another fingerprint. Counts how often each
// resolution (unanimous, majority, highest address, absent) is exercised.
module tb_pcam_addr_select;
  import pcam_ref_pkg::*;

  localparam int D = 4, FP_W = 3, A_W = 4, W = 1 + FP_W + A_W, CW = $clog2(D+1);

  logic [D-1:0][W-1:0] facs;
  logic [FP_W-1:0]     fp;
  logic [CW-1:0]       thresh;
  logic                present, accept, all_valid;
  logic [A_W-1:0]      addr;
  logic [D-1:0]        conf, fm;
  int checks = 0, failures = 0;
  int n_unan = 0, n_major = 0, n_high = 0, n_absent = 0, n_reject = 0;

  pcam_addr_select #(.D(D), .FP_W(FP_W), .A_W(A_W)) dut (
    .facs_i(facs), .fp_i(fp), .thresh_i(thresh), .present_o(present), .addr_o(addr),
    .conf_o(conf), .accept_o(accept), .fp_match_o(fm), .all_valid_o(all_valid));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one();
    fac_s  f[] = new[D];
    qres_s q;
    int    nm = 0, ones;
    int unsigned first = 0;
    bit    same = 1;
    for (int i = 0; i < D; i++) begin
      f[i].valid = facs[i][W-1];
      f[i].fp    = facs[i][A_W +: FP_W];
      f[i].addr  = facs[i][0 +: A_W];
    end
    #1;
    q = decide_query(f, fp);
    checks++;
    if (present !== q.present) failures++;
    if (q.present) begin
      checks += 2;
      if (addr !== A_W'(q.addr)) failures++;
      if (conf !== D'(q.conf)) failures++;
      foreach (f[i]) if (f[i].fp == fp) begin
        if (nm == 0) first = f[i].addr; else if (f[i].addr != first) same = 0;
        nm++;
      end
      ones = $countones(q.conf);
      if (same) n_unan++;
      else if (2*ones > nm) n_major++;
      else n_high++;
      checks++;
      if (accept !== (ones >= thresh)) failures++;
      if (!accept) n_reject++;
    end else begin
      n_absent++;
      checks += 2;
      if (conf !== '0) failures++;
      if (accept !== 1'b0) failures++;
    end
  endtask

  initial begin
    // worked example: fingerprint 2'b10-like pattern, rows 0,1,3 hold (fp, 2)
    fp = 3'b010; thresh = 2;
    facs[0] = {1'b1, 3'b010, 4'd2};
    facs[1] = {1'b1, 3'b010, 4'd2};
    facs[2] = {1'b1, 3'b001, 4'd5};
    facs[3] = {1'b1, 3'b010, 4'd2};
    check_one();
    checks += 2;
    if (addr !== 4'd2 || conf !== 4'b1011) failures++;
    if (!present) failures++;

    for (int t = 0; t < 20000; t++) begin
      fp = FP_W'($urandom);
      thresh = CW'($urandom % (D + 1));
      for (int i = 0; i < D; i++) begin
        facs[i][W-1]         = ($urandom % 8) != 0;
        facs[i][A_W +: FP_W] = ($urandom % 2) ? fp : FP_W'($urandom);
        facs[i][0 +: A_W]    = ($urandom % 2) ? A_W'($urandom % 3) : A_W'($urandom);
      end
      check_one();
    end
    $display("unanimous=%0d majority=%0d highest=%0d absent=%0d below-threshold=%0d",
             n_unan, n_major, n_high, n_absent, n_reject);
    checks++;
    if (n_unan == 0 || n_major == 0 || n_high == 0 || n_absent == 0 || n_reject == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
