// tb_fsd_mem_ctrl -- checks the retry and scrubbing controller on its own, at
// a reduced size (16 words, scrub period 300, 2 retries), against a mock data
// path: a word-level memory, an ideal encoder, and an ideal corrector that
// returns the stored word 3 cycles after mem_rd (1 cycle memory + 2 cycles
// corrector). Detector flags are computed from the words with an
// independently built H, plus forced flags to model detector alarms.
// Checked: write/read data, encoder and corrector retry counts, give-up after
// MAX_RETRY, that flagged words are never written, that a scrub pass reads
// and writes back every address in order while req_ready stays low, and the
// scrub period.
module tb_fsd_mem_ctrl;
  import tb_eg_ref_pkg::*;

  localparam int AW = 4, WORDS = 16, PERIOD = 300, MAXR = 2;

  logic          clk = 0, rst_n = 0;
  logic          req_valid, req_ready, req_write;
  logic [AW-1:0] req_addr;
  logic [6:0]    req_info, rsp_info, enc_info;
  logic          rsp_valid, rsp_write, rsp_fail;
  logic [14:0]   enc_cw, enc_cw_q, mem_wr_cw, cor_cw, enc_syn, cor_syn;
  logic          enc_err, cor_err, mem_rd, mem_we, cor_valid;
  logic [AW-1:0] mem_rd_addr, mem_wr_addr;
  logic          scrub_busy, ev_enc_retry, ev_cor_retry, ev_scrub_done;
  logic          force_enc_err, force_cor_err;
  logic [14:0]   mem [WORDS];
  logic [14:0]   rd_pipe [3];
  logic [2:0]    rd_v;
  int checks = 0, failures = 0, cycle = 0;
  int n_enc_retry = 0, n_cor_retry = 0, n_scrub = 0;
  int scrub_rd [$];
  int scrub_wr [$];

  fsd_mem_ctrl #(.AW(AW), .SCRUB_PERIOD(PERIOD), .MAX_RETRY(MAXR)) dut (.*);

  // Mock data path.
  assign enc_cw  = eg_ldpc_pkg::encode(enc_info);
  assign enc_syn = ref_syndrome(enc_cw_q);
  assign enc_err = (enc_syn != '0) || force_enc_err;
  assign cor_cw  = rd_pipe[2];
  assign cor_syn = ref_syndrome(cor_cw);
  assign cor_valid = rd_v[2];
  assign cor_err = (cor_syn != '0) || (force_cor_err && cor_valid);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cycle++;
    if (!rst_n) begin
      rd_v <= '0;
      for (int a = 0; a < WORDS; a++) mem[a] <= '0;
    end else begin
      rd_v       <= {rd_v[1:0], mem_rd};
      rd_pipe[0] <= mem[mem_rd_addr];
      rd_pipe[1] <= rd_pipe[0];
      rd_pipe[2] <= rd_pipe[1];
      if (mem_we) mem[mem_wr_addr] <= mem_wr_cw;
      n_enc_retry += int'(ev_enc_retry);
      n_cor_retry += int'(ev_cor_retry);
      n_scrub     += int'(ev_scrub_done);
      if (scrub_busy && mem_rd) scrub_rd.push_back(int'(mem_rd_addr));
      if (scrub_busy && mem_we) scrub_wr.push_back(int'(mem_wr_addr));
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at cycle %0d", what, cycle);
    end
  endtask

  // Nothing a detector flags is ever stored.
  logic [14:0] wr_syn;
  assign wr_syn = ref_syndrome(mem_wr_cw);
  always @(negedge clk) if (rst_n && mem_we) check(wr_syn == '0, "only checked words written");

  // A request; force_n cycles of forced alarm on the chosen detector.
  task automatic access(bit wr, int addr, logic [6:0] info, bit on_enc, int force_n,
                        output logic [6:0] data, output bit fail);
    bit rdy;
    @(negedge clk);
    req_valid = 1; req_write = wr; req_addr = AW'(addr); req_info = info;
    forever begin
      rdy = req_ready;
      @(negedge clk);
      if (rdy) break;
    end
    req_valid = 0;
    if (on_enc) force_enc_err = (force_n > 0);
    else        force_cor_err = (force_n > 0);
    while (!rsp_valid) begin
      bit seen;
      seen = on_enc ? ev_enc_retry : ev_cor_retry;
      @(posedge clk);
      #1;
      if (seen) begin
        force_n--;
        if (force_n <= 0) begin force_enc_err = 0; force_cor_err = 0; end
      end
      @(negedge clk);
    end
    force_enc_err = 0; force_cor_err = 0;
    data = rsp_info;
    fail = rsp_fail;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [6:0] ref_mem [WORDS];
    logic [6:0] d;
    bit fail;
    int e0, c0, t0;
    req_valid = 0; req_write = 0; req_addr = 0; req_info = 0;
    force_enc_err = 0; force_cor_err = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    t0 = cycle;
    for (int a = 0; a < WORDS; a++) begin
      ref_mem[a] = 7'($urandom);
      access(1, a, ref_mem[a], 1, 0, d, fail);
      check(!fail, "write ok");
    end
    for (int a = 0; a < WORDS; a++) begin
      access(0, a, 0, 0, 0, d, fail);
      check(!fail && d == ref_mem[a], "read data");
    end
    // Encoder alarm once: one retry, data still stored.
    e0 = n_enc_retry;
    ref_mem[3] = 7'h2b;
    access(1, 3, ref_mem[3], 1, 1, d, fail);
    check(n_enc_retry == e0 + 1 && !fail, "one encoder retry");
    // Encoder alarm persists: gives up after MAXR retries, nothing stored.
    e0 = n_enc_retry;
    access(1, 3, 7'h11, 1, 100, d, fail);
    check(n_enc_retry == e0 + MAXR && fail, "encoder give-up");
    access(0, 3, 0, 0, 0, d, fail);
    check(d == ref_mem[3], "failed write left the word unchanged");
    // Corrector alarm once, then persistent.
    c0 = n_cor_retry;
    access(0, 5, 0, 0, 1, d, fail);
    check(n_cor_retry == c0 + 1 && !fail && d == ref_mem[5], "one corrector retry");
    c0 = n_cor_retry;
    access(0, 6, 0, 0, 100, d, fail);
    check(n_cor_retry == c0 + MAXR && fail, "corrector give-up");
    // Scrub pass.
    while (!scrub_busy) @(negedge clk);
    check(cycle - t0 >= PERIOD, "scrub not before its period");
    while (scrub_busy) begin
      check(!req_ready, "no requests during scrub");
      @(negedge clk);
    end
    @(negedge clk);
    check(n_scrub == 1, "one scrub pass");
    check(scrub_rd.size() == WORDS && scrub_wr.size() == WORDS, "every word read and written back");
    for (int a = 0; a < WORDS && a < scrub_rd.size() && a < scrub_wr.size(); a++)
      check(scrub_rd[a] == a && scrub_wr[a] == a, "scrub order");
    for (int a = 0; a < WORDS; a++) begin
      access(0, a, 0, 0, 0, d, fail);
      check(!fail && d == ref_mem[a], "data after scrub");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
