// tb_xoodoo_nc: checks the unrolled Xoodoo permutation against a bit-level
// reference model for random and corner inputs, at four rounds (the hash
// configuration) and at three rounds, and checks the avalanche weight: at
// four rounds, flipping one input bit should change about half of the 384
// output bits (mean expected near 192).
module tb_xoodoo_nc;
  import pcam_ref_pkg::*;

  logic [383:0] in4, out4, in3, out3;
  int checks = 0, failures = 0;

  xoodoo_nc #(.ROUNDS(4)) dut4 (.state_i(in4), .state_o(out4));
  xoodoo_nc #(.ROUNDS(3)) dut3 (.state_i(in3), .state_o(out3));

  function automatic logic [383:0] rand384();
    logic [383:0] v;
    for (int i = 0; i < 12; i++) v[32*i +: 32] = $urandom;
    return v;
  endfunction

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [383:0] base, ref_o;
    real wsum;
    for (int t = 0; t < 200; t++) begin
      case (t)
        0: in4 = '0;
        1: in4 = '1;
        2: in4 = 384'd1;
        default: in4 = rand384();
      endcase
      in3 = in4;
      #1;
      checks++;
      ref_o = xoodoo_ref(in4, 4);
      if (out4 !== ref_o) begin
        failures++;
        if (failures < 5) $display("mismatch 4 rounds: in=%h\n got=%h\n exp=%h", in4, out4, ref_o);
      end
      checks++;
      if (out3 !== xoodoo_ref(in3, 3)) begin
        failures++;
        if (failures < 5) $display("mismatch 3 rounds: in=%h", in3);
      end
    end
    // avalanche weight at four rounds
    wsum = 0;
    for (int t = 0; t < 384; t++) begin
      base = rand384();
      in4 = base; #1; ref_o = out4;
      in4 = base ^ (384'd1 << t); #1;
      wsum += $countones(out4 ^ ref_o);
    end
    wsum = wsum / 384.0;
    $display("mean avalanche weight (4 rounds) = %0.2f", wsum);
    checks++;
    if (wsum < 180.0 || wsum > 204.0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
