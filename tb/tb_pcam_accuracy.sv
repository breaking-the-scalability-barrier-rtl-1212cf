// tb_pcam_accuracy: accuracy of the P-CAM key-value store against load
// factor, number of rows and fingerprint size, on a synthetic data set of
// unique random keys with shuffled values. Seventeen configurations run side
// by side (see CFG_* below). At 4096 cells per row, a reduced size: d = 4, 3
// and 2 with 8-bit fingerprints, d = 3 with 4-bit fingerprints, d = 4 with
// 96-bit keys, a fingerprint sweep of 3..10 bits at d = 4, and 3-bit
// fingerprints at d = 3 and d = 2. At 512 cells per row, the smallest table
// of the comparison with other CAMs: d = 3 with 96-bit keys and d = 4 with
// 96- and 384-bit keys, all with 8-bit fingerprints. Each is filled to load factors
// 0.25, 0.5 and 1.0 and queried for every stored key. Every result must
// agree with the reference model, and the accuracies must reach the levels
// the architecture is reported to achieve, with some margin for the smaller
// table:
//   d=4 f=8: >= 99.5 % at 0.5 and >= 99.0 % at 1.0 (both key widths)
//   d=3 f=8: >= 99.5 % at 0.5 and >= 98.5 % at 1.0
//   d=2 f=8: >= 93 % at 1.0
//   d=3 f=4: >= 99.5 % at 0.25
//   512 cells: d=4 >= 99.0 % and d=3 >= 98.0 % at 1.0
// and, along the fingerprint sweep at load 1.0, accuracy must grow from
// 3 to 8 bits for every d, and gain little (under 0.3 %) from 8 to 10 bits.
// Confidence histograms at load 0.5 and 1.0 are printed for the d = 4
// sweep; high confidence must be more common at the lower load.
module tb_pcam_accuracy;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int M  = 4096;
  localparam int NR = 17;
  localparam int CFG_D [NR] = '{4, 3, 2, 3, 4,  4, 4, 4, 4, 4, 4, 4,  3, 2,  3, 4, 4};
  localparam int CFG_F [NR] = '{8, 8, 8, 4, 8,  3, 4, 5, 6, 7, 9, 10, 3, 3,  8, 8, 8};
  localparam int CFG_K [NR] = '{384, 384, 384, 384, 96,
                                384, 384, 384, 384, 384, 384, 384, 384, 384,
                                96, 96, 384};
  localparam int CFG_M [NR] = '{M, M, M, M, M,  M, M, M, M, M, M, M,  M, M,  512, 512, 512};
  logic done [NR];
  int   chk [NR], fl [NR];
  int   acc [NR][3];
  int   c05 [NR][5], c10 [NR][5];
  int   checks = 0, failures = 0;

  for (genvar g = 0; g < NR; g++) begin : g_run
    pcam_acc_run #(.KEY_W(CFG_K[g]), .D(CFG_D[g]), .FP_W(CFG_F[g]), .M(CFG_M[g])) run (
      .clk, .done_o(done[g]), .checks_o(chk[g]), .failures_o(fl[g]), .acc_o(acc[g]),
      .conf05_o(c05[g]), .conf10_o(c10[g]));
  end

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic need(string what, int got, int min);
    checks++;
    if (got < min) begin
      failures++;
      $display("%s: %0d.%02d %% below %0d.%02d %%", what, got / 100, got % 100, min / 100, min % 100);
    end
  endtask

  // configuration number with the given d, f and 384-bit keys
  function automatic int cfg(int d, int f);
    for (int r = 0; r < NR; r++)
      if (CFG_D[r] == d && CFG_F[r] == f && CFG_K[r] == 384 && CFG_M[r] == M) return r;
    return 0;
  endfunction

  function automatic string pct(int v, int of);
    int p = v * 1000 / of;
    return $sformatf("%0d.%0d", p / 10, p % 10);
  endfunction

  initial begin
    bit all;
    do begin
      @(posedge clk);
      all = 1;
      for (int r = 0; r < NR; r++) all &= done[r];
    end while (!all);
    for (int r = 0; r < NR; r++) begin
      checks += chk[r]; failures += fl[r];
      $display("m=%0d d=%0d f=%0d key %0d bits  accuracy %%: load 0.25 %0d.%02d  0.5 %0d.%02d  1.0 %0d.%02d",
               CFG_M[r], CFG_D[r], CFG_F[r], CFG_K[r], acc[r][0] / 100, acc[r][0] % 100,
               acc[r][1] / 100, acc[r][1] % 100, acc[r][2] / 100, acc[r][2] % 100);
    end
    for (int f = 3; f <= 10; f++) begin
      int r;
      r = cfg(4, f);
      $display("d=4 f=%0d confidence %% c=4/3/2/1: load 0.5 %s %s %s %s   load 1.0 %s %s %s %s", f,
               pct(c05[r][4], M/2), pct(c05[r][3], M/2), pct(c05[r][2], M/2), pct(c05[r][1], M/2),
               pct(c10[r][4], M), pct(c10[r][3], M), pct(c10[r][2], M), pct(c10[r][1], M));
      // share of queries answered by three or four rows falls as the load rises
      checks++;
      if ((c05[r][3] + c05[r][4]) * M <= (c10[r][3] + c10[r][4]) * (M/2)) failures++;
    end
    need("d=4 f=8 load 0.5", acc[cfg(4, 8)][1], 9950);
    need("d=4 f=8 load 1.0", acc[cfg(4, 8)][2], 9900);
    need("d=3 f=8 load 0.5", acc[cfg(3, 8)][1], 9950);
    need("d=3 f=8 load 1.0", acc[cfg(3, 8)][2], 9850);
    need("d=2 f=8 load 1.0", acc[cfg(2, 8)][2], 9300);
    need("d=3 f=4 load 0.25", acc[cfg(3, 4)][0], 9950);
    need("d=4 f=8 96-bit load 0.5", acc[4][1], 9950);
    need("d=4 f=8 96-bit load 1.0", acc[4][2], 9900);
    need("512 cells d=3 96-bit load 1.0", acc[14][2], 9800);
    need("512 cells d=4 96-bit load 1.0", acc[15][2], 9900);
    need("512 cells d=4 384-bit load 1.0", acc[16][2], 9900);
    for (int d = 2; d <= 4; d++) begin
      checks++;
      if (acc[cfg(d, 3)][2] >= acc[cfg(d, 8)][2]) begin
        failures++;
        $display("d=%0d: 3-bit fingerprints not worse than 8-bit at load 1.0", d);
      end
    end
    checks++;
    if (acc[cfg(4, 10)][2] - acc[cfg(4, 8)][2] >= 30) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
