// tb_fsd_memory_top -- end-to-end test of the fault-tolerant memory at its
// default size (64 words, scrub period 4096 cycles, 4 retries).
//
// Writes all 64 words and reads them back against a reference array, then
// makes every mechanism of the design happen and counts it:
//   - encoder retry after a transient fault on the encoder output
//   - encoder retry after a transient fault inside the encoder's detector
//   - correction of 1 and of 2 upset memory bits on a read
//   - corrector retry after a transient fault on the corrector output
//   - corrector retry after a transient fault inside the corrector's detector
//   - give-up after MAX_RETRY retries under a persistent detector fault
//   - periodic scrubbing: a word with 2 upsets is scrubbed, then takes 2 more
//     upsets and still reads back correctly (4 errors would not be correctable)
//   - a request stalled while a scrub pass runs
// Clean writes and reads are also checked for their latency: rsp_valid rises
// 2 clock edges after the accepting edge for a write and 4 for a read.
module tb_fsd_memory_top;
  import eg_ldpc_pkg::N;
  import eg_ldpc_pkg::K;

  localparam int WORDS = 64;

  logic        clk = 0, rst_n = 0;
  logic        req_valid, req_ready, req_write;
  logic [5:0]  req_addr;
  logic [6:0]  req_info, rsp_info;
  logic        rsp_valid, rsp_write, rsp_fail;
  logic [14:0] enc_fault, enc_det_fault, cor_fault, cor_det_fault;
  logic        upset_en;
  logic [5:0]  upset_row;
  logic [3:0]  upset_col;
  logic        scrub_busy, ev_enc_retry, ev_cor_retry, ev_corrected, ev_scrub_done;

  logic [6:0]  ref_mem [WORDS];
  int checks = 0, failures = 0;
  int cycle = 0;
  int n_enc_retry = 0, n_cor_retry = 0, n_corrected = 0, n_scrub = 0;
  int n_stall = 0;
  // mechanism counters
  int m_enc_fault = 0, m_enc_det_fault = 0, m_fix1 = 0, m_fix2 = 0;
  int m_cor_fault = 0, m_cor_det_fault = 0, m_give_up = 0, m_scrub_repair = 0;
  int m_stall = 0, m_scrub_start = 0;

  fsd_memory_top dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cycle++;
    if (rst_n) begin
      n_enc_retry += int'(ev_enc_retry);
      n_cor_retry += int'(ev_cor_retry);
      n_corrected += int'(ev_corrected);
      n_scrub     += int'(ev_scrub_done);
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at cycle %0d", what, cycle);
    end
  endtask

  typedef enum int {F_NONE, F_ENC, F_ENC_DET, F_COR, F_COR_DET, F_COR_DET_STUCK} fault_t;

  // One request. The chosen fault is applied from the start of the request
  // and, unless stuck, removed as soon as the design reports the retry.
  task automatic access(input bit wr, input int addr, input logic [6:0] info,
                        input fault_t f, output logic [6:0] data, output bit fail,
                        output int latency, output int retries);
    int t_acc, r0;
    bit ready_now;
    @(negedge clk);
    req_valid = 1; req_write = wr; req_addr = 6'(addr); req_info = info;
    case (f)
      F_ENC:           enc_fault     = 15'(1) << $urandom_range(N - 1);
      F_ENC_DET:       enc_det_fault = 15'(1) << $urandom_range(N - 1);
      F_COR:           cor_fault     = 15'(1) << $urandom_range(N - 1);
      F_COR_DET,
      F_COR_DET_STUCK: cor_det_fault = 15'(1) << $urandom_range(N - 1);
      default: ;
    endcase
    r0 = (f == F_ENC || f == F_ENC_DET) ? n_enc_retry : n_cor_retry;
    forever begin
      ready_now = req_ready;
      if (!ready_now && scrub_busy) n_stall++;
      @(posedge clk);
      if (ready_now) break;
      @(negedge clk);
    end
    @(negedge clk);
    t_acc = cycle;
    req_valid = 0;
    while (!rsp_valid) begin
      bit seen_enc, seen_cor;
      seen_enc = ev_enc_retry && (f == F_ENC || f == F_ENC_DET);
      seen_cor = ev_cor_retry && (f == F_COR || f == F_COR_DET);
      @(posedge clk);
      #1;
      if (seen_enc) begin enc_fault = '0; enc_det_fault = '0; end
      if (seen_cor) begin cor_fault = '0; cor_det_fault = '0; end
      @(negedge clk);
    end
    enc_fault = '0; enc_det_fault = '0; cor_fault = '0; cor_det_fault = '0;
    latency = cycle - t_acc;
    retries = ((f == F_ENC || f == F_ENC_DET) ? n_enc_retry : n_cor_retry) - r0;
    data = rsp_info;
    fail = rsp_fail;
    check(rsp_write == wr, "response type");
  endtask

  task automatic write_word(int addr, logic [6:0] info, fault_t f, output int lat, output int retries);
    logic [6:0] d;
    bit fail;
    access(1, addr, info, f, d, fail, lat, retries);
    check(!fail, "write completes");
    ref_mem[addr] = info;
  endtask

  task automatic read_word(int addr, fault_t f, output int lat, output int retries, output bit fail);
    logic [6:0] d;
    access(0, addr, '0, f, d, fail, lat, retries);
    if (!fail) check(d == ref_mem[addr], $sformatf("read data of word %0d", addr));
  endtask

  // Flip codeword bit o of word addr in the array: row o*4+slot, column addr/4.
  task automatic upset(int addr, int o);
    @(negedge clk);
    upset_en = 1; upset_row = 6'(o * 4 + addr % 4); upset_col = 4'(addr / 4);
    @(negedge clk);
    upset_en = 0;
  endtask

  task automatic wait_scrub_done();
    int s0;
    s0 = n_scrub;
    while (n_scrub == s0) @(negedge clk);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // The first scrub pass must start SCRUB_PERIOD cycles after reset.
  initial begin
    int t0;
    @(posedge rst_n);
    t0 = cycle;
    @(posedge scrub_busy);
    m_scrub_start++;
    check(cycle - t0 >= 4096 && cycle - t0 <= 4096 + 8, "first scrub after 4096 cycles");
  end

  initial begin
    int lat, rt, o1, o2, o3, o4, c0;
    bit fail;
    req_valid = 0; req_write = 0; req_addr = 0; req_info = 0;
    enc_fault = 0; enc_det_fault = 0; cor_fault = 0; cor_det_fault = 0;
    upset_en = 0; upset_row = 0; upset_col = 0;
    for (int a = 0; a < WORDS; a++) ref_mem[a] = '0;
    repeat (4) @(negedge clk);
    rst_n = 1;

    // Fill and read back.
    for (int a = 0; a < WORDS; a++) begin
      write_word(a, 7'($urandom), F_NONE, lat, rt);
      check(lat == 2 && rt == 0, $sformatf("clean write latency %0d retries %0d", lat, rt));
    end
    for (int a = 0; a < WORDS; a++) begin
      read_word(a, F_NONE, lat, rt, fail);
      check(lat == 4 && rt == 0 && !fail, $sformatf("clean read latency %0d retries %0d", lat, rt));
    end

    // Transient faults in the encoder and its detector.
    write_word(10, 7'h5a, F_ENC, lat, rt);
    check(rt == 1, "encoder output fault retried once");
    if (rt == 1) m_enc_fault++;
    write_word(11, 7'h33, F_ENC_DET, lat, rt);
    check(rt == 1, "encoder detector fault retried once");
    if (rt == 1) m_enc_det_fault++;
    read_word(10, F_NONE, lat, rt, fail);
    read_word(11, F_NONE, lat, rt, fail);

    // Upsets corrected on read (done right after a scrub pass, so the read,
    // not the scrubber, does the correcting).
    wait_scrub_done();
    upset(20, 3);
    c0 = n_corrected;
    read_word(20, F_NONE, lat, rt, fail);
    check(n_corrected == c0 + 1, "single upset corrected");
    if (n_corrected == c0 + 1) m_fix1++;
    o1 = $urandom_range(N - 1);
    o2 = (o1 + 1 + $urandom_range(N - 2)) % N;
    upset(21, o1);
    upset(21, o2);
    c0 = n_corrected;
    read_word(21, F_NONE, lat, rt, fail);
    check(n_corrected == c0 + 1, "double upset corrected");
    if (n_corrected == c0 + 1) m_fix2++;

    // Transient faults in the corrector and its detector.
    read_word(30, F_COR, lat, rt, fail);
    check(rt == 1 && !fail, "corrector output fault retried once");
    if (rt == 1) m_cor_fault++;
    read_word(31, F_COR_DET, lat, rt, fail);
    check(rt == 1 && !fail, "corrector detector fault retried once");
    if (rt == 1) m_cor_det_fault++;
    read_word(32, F_COR_DET_STUCK, lat, rt, fail);
    check(rt == 4 && fail, "persistent fault gives up after 4 retries");
    if (rt == 4 && fail) m_give_up++;

    // Scrubbing keeps errors from piling up: 2 upsets, a scrub pass, then 2
    // more upsets on other bits of the same word.
    wait_scrub_done();
    o1 = 0; o2 = 5; o3 = 9; o4 = 13;
    upset(40, o1);
    upset(40, o2);
    wait_scrub_done();
    upset(40, o3);
    upset(40, o4);
    read_word(40, F_NONE, lat, rt, fail);
    check(!fail, "scrubbed word readable");
    if (!fail) m_scrub_repair++;

    // A request issued during a scrub pass waits for it.
    while (!scrub_busy) @(negedge clk);
    c0 = n_stall;
    read_word(41, F_NONE, lat, rt, fail);
    check(n_stall > c0, "request held off during scrub");
    if (n_stall > c0) m_stall++;
    check(!scrub_busy, "request served after scrub pass");

    // Final full read-back.
    for (int a = 0; a < WORDS; a++) read_word(a, F_NONE, lat, rt, fail);

    $display("encoder retries %0d, corrector retries %0d, corrected reads/scrubs %0d, scrub passes %0d, stalled cycles %0d",
             n_enc_retry, n_cor_retry, n_corrected, n_scrub, n_stall);
    check(m_enc_fault > 0,     "mechanism: encoder fault retry");
    check(m_enc_det_fault > 0, "mechanism: encoder detector fault retry");
    check(m_fix1 > 0,          "mechanism: single-error correction");
    check(m_fix2 > 0,          "mechanism: double-error correction");
    check(m_cor_fault > 0,     "mechanism: corrector fault retry");
    check(m_cor_det_fault > 0, "mechanism: corrector detector fault retry");
    check(m_give_up > 0,       "mechanism: retry limit");
    check(m_scrub_start > 0,   "mechanism: periodic scrub start");
    check(m_scrub_repair > 0,  "mechanism: scrub repair");
    check(m_stall > 0,         "mechanism: access stopped during scrub");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
