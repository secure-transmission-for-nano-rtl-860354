// tb_fault_secure_detector -- exhaustive check of the detector: all 2^15 input
// words give the reference syndrome and error = (syndrome != 0); every error
// pattern of weight 1..4 on random codewords is flagged; and a flipped
// syndrome bit (a fault inside the detector) raises the flag on a clean word.
module tb_fault_secure_detector;
  import tb_eg_ref_pkg::*;

  logic [N-1:0] cw, syn_flip, syndrome, exp_syn;
  logic         error;
  int checks = 0, failures = 0;

  fault_secure_detector dut (.cw(cw), .syn_flip(syn_flip), .syndrome(syndrome), .error(error));

  assign exp_syn = ref_syndrome(cw) ^ syn_flip;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s cw=%h syn=%h err=%b", what, cw, syndrome, error);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] c;
    syn_flip = '0;
    for (int w = 0; w < (1 << N); w++) begin
      cw = w[N-1:0];
      #1;
      check(syndrome == exp_syn, "syndrome");
      check(error == (exp_syn != '0), "error flag");
    end
    for (int t = 0; t < 400; t++) begin
      c  = eg_ldpc_pkg::encode(7'($urandom));
      cw = c;
      #1;
      check(!error && exp_syn == '0, "clean codeword passes");
      cw = c ^ rand_err(1 + t % 4);
      #1;
      check(error, "multi-bit error detected");
    end
    for (int j = 0; j < N; j++) begin
      cw = eg_ldpc_pkg::encode(7'($urandom));
      syn_flip = '0;
      syn_flip[j] = 1'b1;
      #1;
      check(error && syndrome == syn_flip, "detector-internal fault detected");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
