// nano_demux -- logic model of the sub-lithographic nanowire demultiplexer
// that reads the nano-memory.
//
// The memory's row nanowires are split into N_OUT groups of GROUP adjacent
// rows; output nanowire o can be gated by the rows of group o only (the first
// GROUP rows gate output 0). Lithographic select lines enable exactly one row
// position of every group, so each output carries one row and a read presents
// N_OUT rows at once: out[o] = rows[o*GROUP + sel]. With N_OUT = 15 one read
// delivers a whole codeword. The grouping and the one-of-GROUP selection
// follow the published design (its small example has 3 outputs and 12 rows);
// the physical, self-assembled crossbar is represented only by this function.
//
// Interface: rows (N_OUT*GROUP bits) and sel in, out (N_OUT bits) out.
// Purely combinational.
module nano_demux #(
  parameter int unsigned N_OUT = 15,
  parameter int unsigned GROUP = 4,
  localparam int unsigned SW   = (GROUP > 1) ? $clog2(GROUP) : 1
) (
  input  logic [N_OUT*GROUP-1:0] rows,
  input  logic [SW-1:0]          sel,
  output logic [N_OUT-1:0]       out
);

  always_comb begin
    for (int unsigned o = 0; o < N_OUT; o++) out[o] = rows[o * GROUP + int'(sel)];
  end

endmodule
