// tb_mlg_corrector -- checks the pipelined majority-logic corrector. Streams
// one word per cycle: every codeword with 0, 1 and 2 random errors, then every
// 2-error pattern (105) on random codewords, with idle gaps. Each output must
// equal the codeword before the errors (a code with minimum distance 5 maps
// every such word back to it, and the codeword's zero syndrome is confirmed
// with an independently built H), out_fixed must be set exactly
// when the input had errors, and every output must appear exactly 2 cycles
// after its input.
module tb_mlg_corrector;
  import tb_eg_ref_pkg::*;

  logic         clk = 0, rst_n = 0;
  logic         in_valid;
  logic [N-1:0] in_cw, out_cw;
  logic         out_valid, out_fixed;
  int checks = 0, failures = 0;
  int cycle = 0;

  typedef struct { logic [N-1:0] exp; bit fixed; int t_in; } item_t;
  item_t q[$];

  mlg_corrector dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_cw(in_cw),
                     .out_valid(out_valid), .out_cw(out_cw), .out_fixed(out_fixed));

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at cycle %0d", what, cycle);
    end
  endtask

  // Scoreboard, sampled away from the clock edge.
  always @(negedge clk) if (rst_n && out_valid) begin
    item_t it;
    if (q.size() == 0) check(0, "unexpected output");
    else begin
      it = q.pop_front();
      check(out_cw == it.exp, "corrected word");
      check(out_fixed == it.fixed, "out_fixed");
      check(cycle - it.t_in == 2, "latency of 2 cycles");
    end
  end

  logic [N-1:0] src_cw, src_syn;
  assign src_syn = ref_syndrome(src_cw);

  task automatic send(logic [N-1:0] c, logic [N-1:0] e);
    @(negedge clk);
    src_cw   = c;
    in_valid = 1'b1;
    in_cw    = c ^ e;
    q.push_back('{exp: c, fixed: (e != '0), t_in: cycle});
    #1;
    check(src_syn == '0, "stimulus is a codeword");
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0;
    in_cw    = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < (1 << K); i++)
      for (int e = 0; e <= 2; e++) send(eg_ldpc_pkg::encode(i[K-1:0]), rand_err(e));
    for (int a = 0; a < N; a++)
      for (int b = a + 1; b < N; b++) begin
        logic [N-1:0] e;
        e = '0; e[a] = 1'b1; e[b] = 1'b1;
        send(eg_ldpc_pkg::encode(7'($urandom)), e);
        if ($urandom_range(3) == 0) begin
          @(negedge clk);
          in_valid = 1'b0;
        end
      end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (5) @(negedge clk);
    check(q.size() == 0, "all outputs delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
