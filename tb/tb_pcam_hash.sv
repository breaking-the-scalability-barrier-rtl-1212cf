// tb_pcam_hash: checks that the hash unit zero-pads the key, permutes it and
// cuts the result into D row indices and a fingerprint, for a 96-bit key
// (padded) and a 384-bit key, against the reference permutation.
module tb_pcam_hash;
  import pcam_ref_pkg::*;

  localparam int D = 4, IDX_W = 19, FP_W = 8;

  logic [95:0]              k96;
  logic [383:0]             k384;
  logic [D-1:0][IDX_W-1:0]  idx96, idx384;
  logic [FP_W-1:0]          fp96, fp384;
  int checks = 0, failures = 0;

  pcam_hash #(.KEY_W(96),  .D(D), .IDX_W(IDX_W), .FP_W(FP_W), .ROUNDS(4))
    dut96 (.key_i(k96), .idx_o(idx96), .fp_o(fp96));
  pcam_hash #(.KEY_W(384), .D(D), .IDX_W(IDX_W), .FP_W(FP_W), .ROUNDS(4))
    dut384 (.key_i(k384), .idx_o(idx384), .fp_o(fp384));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [383:0] key, logic [D-1:0][IDX_W-1:0] idx, logic [FP_W-1:0] fp);
    logic [383:0] h = xoodoo_ref(key, 4);
    for (int i = 0; i < D; i++) begin
      checks++;
      if (idx[i] !== h[i*IDX_W +: IDX_W]) begin
        failures++;
        $display("idx[%0d] mismatch key=%h got=%h", i, key, idx[i]);
      end
    end
    checks++;
    if (fp !== h[D*IDX_W +: FP_W]) begin
      failures++;
      $display("fp mismatch key=%h", key);
    end
  endtask

  initial begin
    for (int t = 0; t < 100; t++) begin
      k96 = {$urandom, $urandom, $urandom};
      for (int i = 0; i < 12; i++) k384[32*i +: 32] = $urandom;
      #1;
      check({288'd0, k96}, idx96, fp96);
      check(k384, idx384, fp384);
    end
    // a 96-bit key hashes like the same key zero-extended to 384 bits
    k384 = {288'd0, k96};
    #1;
    checks++;
    if (idx384 !== idx96 || fp384 !== fp96) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
