// tb_nano_demux -- checks the nanowire demultiplexer at its default size (15
// outputs, groups of 4 rows) and at the small 3-output, 12-row example: for
// random row values and every select, output o must carry row o*GROUP+sel.
module tb_nano_demux;
  logic [59:0] rows;
  logic [1:0]  sel;
  logic [14:0] out;
  logic [11:0] rows_s;
  logic [2:0]  out_s;
  int checks = 0, failures = 0;

  nano_demux dut (.rows(rows), .sel(sel), .out(out));
  nano_demux #(.N_OUT(3), .GROUP(4)) dut_small (.rows(rows_s), .sel(sel), .out(out_s));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s sel=%0d", what, sel);
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
    for (int t = 0; t < 200; t++) begin
      rows   = {$urandom, $urandom};
      rows_s = 12'($urandom);
      for (int s = 0; s < 4; s++) begin
        sel = 2'(s);
        #1;
        for (int o = 0; o < 15; o++) check(out[o] == rows[o * 4 + s], "output bit");
        for (int o = 0; o < 3; o++) check(out_s[o] == rows_s[o * 4 + s], "small demux bit");
      end
    end
    // One-hot rows: exactly one output goes high, only for the matching select.
    for (int r = 0; r < 60; r++) begin
      rows = 60'd1 << r;
      sel  = 2'(r % 4);
      #1;
      check(out == (15'd1 << (r / 4)), "one-hot row routed to its output");
      sel  = 2'((r + 1) % 4);
      #1;
      check(out == '0, "unselected row blocked");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
