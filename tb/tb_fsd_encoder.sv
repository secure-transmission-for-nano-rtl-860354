// tb_fsd_encoder -- exhaustive check of the EG-LDPC encoder: for all 128
// information vectors the codeword must carry the vector in bits 6:0 and have
// a zero syndrome under an independently built H (which, with the information
// bits fixed, makes it the unique codeword); the 127 nonzero codewords must
// all have weight >= 5, the code's minimum distance.
module tb_fsd_encoder;
  import tb_eg_ref_pkg::*;

  logic [K-1:0] info;
  logic [N-1:0] cw, exp_syn;
  int checks = 0, failures = 0;
  int minw = N;

  fsd_encoder dut (.info(info), .cw(cw));

  assign exp_syn = ref_syndrome(cw);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s info=%h cw=%h", what, info, cw);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << K); i++) begin
      info = i[K-1:0];
      #1;
      check(cw[K-1:0] == info, "systematic");
      check(exp_syn == '0, "syndrome");
      if (i != 0 && $countones(cw) < minw) minw = $countones(cw);
    end
    check(minw == 5, "minimum distance");
    $display("minimum weight of nonzero codewords: %0d", minw);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
