// tb_nano_memory -- checks the nano-memory array against a word-level model:
// random codeword writes to all 64 {column, slot} addresses, column reads
// whose rows must interleave the 4 codewords of that column as row o*4+slot,
// single-bit upsets, write-over-upset priority and the 1-cycle read latency.
module tb_nano_memory;
  logic        clk = 0, rst_n = 0;
  logic        rd_en, rd_valid, wr_en, upset_en;
  logic [3:0]  rd_col, wr_col, upset_col;
  logic [1:0]  wr_slot;
  logic [14:0] wr_cw;
  logic [59:0] rd_rows;
  logic [5:0]  upset_row;
  logic [14:0] model [16][4];
  int checks = 0, failures = 0;

  nano_memory dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s col=%0d", what, rd_col);
    end
  endtask

  function automatic logic [59:0] expected(int c);
    logic [59:0] r;
    for (int s = 0; s < 4; s++)
      for (int o = 0; o < 15; o++) r[o * 4 + s] = model[c][s][o];
    return r;
  endfunction

  task automatic read_check(int c);
    @(negedge clk);
    rd_en = 1; rd_col = 4'(c);
    @(negedge clk);
    rd_en = 0;
    check(rd_valid, "rd_valid one cycle after rd_en");
    check(rd_rows == expected(c), "column contents");
    @(negedge clk);
    check(!rd_valid, "rd_valid is a pulse");
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rd_en = 0; wr_en = 0; upset_en = 0;
    rd_col = 0; wr_col = 0; wr_slot = 0; wr_cw = 0; upset_row = 0; upset_col = 0;
    for (int c = 0; c < 16; c++) for (int s = 0; s < 4; s++) model[c][s] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    read_check(5);                          // reset contents are zero
    for (int a = 0; a < 64; a++) begin
      @(negedge clk);
      wr_en = 1; wr_col = 4'(a / 4); wr_slot = 2'(a % 4); wr_cw = 15'($urandom);
      model[a / 4][a % 4] = wr_cw;
    end
    @(negedge clk);
    wr_en = 0;
    for (int c = 0; c < 16; c++) read_check(c);
    for (int t = 0; t < 40; t++) begin
      int r, c;
      r = $urandom_range(59); c = $urandom_range(15);
      @(negedge clk);
      upset_en = 1; upset_row = 6'(r); upset_col = 4'(c);
      model[c][r % 4][r / 4] ^= 1'b1;
      @(negedge clk);
      upset_en = 0;
      read_check(c);
    end
    // A write to the same cell as an upset wins.
    @(negedge clk);
    upset_en = 1; upset_row = 6'(3 * 4 + 2); upset_col = 4'(7);
    wr_en = 1; wr_col = 4'(7); wr_slot = 2'(2); wr_cw = 15'h1234;
    model[7][2] = 15'h1234;
    @(negedge clk);
    upset_en = 0; wr_en = 0;
    read_check(7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
