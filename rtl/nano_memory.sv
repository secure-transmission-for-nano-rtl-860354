// nano_memory -- the nano-memory array read through row nanowires.
//
// The array holds R = N*GROUP rows by COLS columns of bits. A read selects one
// column and every row nanowire then carries its bit of that column; the
// nano_demux that follows picks one row of every group of GROUP rows, so a
// codeword lives in one column, with its bit o in row o*GROUP + slot. A
// memory word address is therefore {column, slot}, and the array holds
// COLS*GROUP codewords. Memory cells may be upset while data waits to be read;
// the upset port flips one stored bit to model such a transient fault.
//
// The row grouping follows the published nanowire interface; the array size,
// the write path (all N bits of a codeword in one cycle), the read latency and
// the reset to all zeros (a valid codeword) are this design's choices.
//
// Timing: rd_rows is registered, valid the cycle after rd_en (rd_valid high
// then). A write and an upset take effect at the clock edge; a write wins over
// an upset of the same cell.
module nano_memory #(
  parameter int unsigned N     = 15,
  parameter int unsigned GROUP = 4,
  parameter int unsigned COLS  = 16,
  localparam int unsigned R    = N * GROUP,
  localparam int unsigned CW   = (COLS > 1)  ? $clog2(COLS)  : 1,
  localparam int unsigned SW   = (GROUP > 1) ? $clog2(GROUP) : 1,
  localparam int unsigned RW   = $clog2(R)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          rd_en,
  input  logic [CW-1:0] rd_col,
  output logic [R-1:0]  rd_rows,
  output logic          rd_valid,
  input  logic          wr_en,
  input  logic [CW-1:0] wr_col,
  input  logic [SW-1:0] wr_slot,
  input  logic [N-1:0]  wr_cw,
  input  logic          upset_en,
  input  logic [RW-1:0] upset_row,
  input  logic [CW-1:0] upset_col
);

  logic [R-1:0] mem [COLS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned c = 0; c < COLS; c++) mem[c] <= '0;
      rd_rows  <= '0;
      rd_valid <= 1'b0;
    end else begin
      if (upset_en && int'(upset_row) < R && int'(upset_col) < COLS)
        mem[upset_col][upset_row] <= ~mem[upset_col][upset_row];
      if (wr_en && int'(wr_col) < COLS)
        for (int unsigned o = 0; o < N; o++) mem[wr_col][o * GROUP + int'(wr_slot)] <= wr_cw[o];
      rd_valid <= rd_en;
      if (rd_en && int'(rd_col) < COLS) rd_rows <= mem[rd_col];
    end
  end

endmodule
