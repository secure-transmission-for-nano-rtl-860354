// fsd_memory_top -- fault-tolerant nano-memory with fault-secure encoder and
// corrector.
//
// Data path (write): information vector -> fsd_encoder -> codeword register
// in fsd_mem_ctrl -> fault_secure_detector (encoder side) -> nano_memory. A
// codeword the detector flags is encoded again. Data path (read): nano_memory
// column read -> nano_demux (one row of every group of GROUP rows, the
// "suspected codeword") -> mlg_corrector (2-stage pipeline) ->
// fault_secure_detector (corrector side) -> information vector = first K bits
// of the corrected codeword. A flagged word is read and corrected again.
// Periodic scrubbing writes corrected codewords back, with requests held off.
// This arrangement follows the published system; sizes marked as choices in
// the submodules are this design's own.
//
// Fault-injection inputs model transient faults and are tied to zero in
// normal use: enc_fault and cor_fault are XORed onto the encoder's and the
// corrector's outputs, enc_det_fault and cor_det_fault flip syndrome bits in
// the two detectors, and upset_* flips one memory bit.
//
// Interface and timing: see fsd_mem_ctrl (valid/ready request, one-cycle
// response 2 clock edges after acceptance for a clean write, 4 for a clean
// read, plus 2 or 4 per retry). Addresses are {column, slot}: the low $clog2(GROUP) bits pick the
// row of each group, the high bits the column.
module fsd_memory_top
  import eg_ldpc_pkg::*;
#(
  parameter int unsigned COLS         = 16,
  parameter int unsigned GROUP        = 4,
  parameter int unsigned SCRUB_PERIOD = 4096,
  parameter int unsigned MAX_RETRY    = 4,
  localparam int unsigned R           = N * GROUP,
  localparam int unsigned CW          = (COLS > 1)  ? $clog2(COLS)  : 1,
  localparam int unsigned SW          = (GROUP > 1) ? $clog2(GROUP) : 1,
  localparam int unsigned AW          = CW + SW,
  localparam int unsigned RW          = $clog2(R)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          req_valid,
  output logic          req_ready,
  input  logic          req_write,
  input  logic [AW-1:0] req_addr,
  input  info_t         req_info,
  output logic          rsp_valid,
  output logic          rsp_write,
  output info_t         rsp_info,
  output logic          rsp_fail,
  // transient-fault injection
  input  codeword_t     enc_fault,
  input  syndrome_t     enc_det_fault,
  input  codeword_t     cor_fault,
  input  syndrome_t     cor_det_fault,
  input  logic          upset_en,
  input  logic [RW-1:0] upset_row,
  input  logic [CW-1:0] upset_col,
  // status and events
  output logic          scrub_busy,
  output logic          ev_enc_retry,
  output logic          ev_cor_retry,
  output logic          ev_corrected,
  output logic          ev_scrub_done
);

  info_t         enc_info;
  codeword_t     enc_raw, enc_cw, enc_cw_q;
  logic          enc_err, cor_err;
  logic          mem_rd, mem_we, rd_valid;
  logic [AW-1:0] mem_rd_addr, mem_wr_addr;
  codeword_t     mem_wr_cw, suspect_cw, cor_raw, cor_cw;
  logic [R-1:0]  rd_rows;
  logic [SW-1:0] rd_slot_q;
  logic          cor_valid, cor_fixed;

  fsd_encoder u_encoder (
    .info (enc_info),
    .cw   (enc_raw)
  );
  assign enc_cw = enc_raw ^ enc_fault;

  fault_secure_detector u_enc_detector (
    .cw       (enc_cw_q),
    .syn_flip (enc_det_fault),
    .syndrome (),
    .error    (enc_err)
  );

  nano_memory #(.N(N), .GROUP(GROUP), .COLS(COLS)) u_memory (
    .clk       (clk),
    .rst_n     (rst_n),
    .rd_en     (mem_rd),
    .rd_col    (mem_rd_addr[AW-1:SW]),
    .rd_rows   (rd_rows),
    .rd_valid  (rd_valid),
    .wr_en     (mem_we),
    .wr_col    (mem_wr_addr[AW-1:SW]),
    .wr_slot   (mem_wr_addr[SW-1:0]),
    .wr_cw     (mem_wr_cw),
    .upset_en  (upset_en),
    .upset_row (upset_row),
    .upset_col (upset_col)
  );

  // The row select of the demultiplexer is held for the cycle the memory
  // presents the column read.
  always_ff @(posedge clk) begin
    if (!rst_n)      rd_slot_q <= '0;
    else if (mem_rd) rd_slot_q <= mem_rd_addr[SW-1:0];
  end

  nano_demux #(.N_OUT(N), .GROUP(GROUP)) u_demux (
    .rows (rd_rows),
    .sel  (rd_slot_q),
    .out  (suspect_cw)
  );

  mlg_corrector u_corrector (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (rd_valid),
    .in_cw     (suspect_cw),
    .out_valid (cor_valid),
    .out_cw    (cor_raw),
    .out_fixed (cor_fixed)
  );
  assign cor_cw = cor_raw ^ cor_fault;

  fault_secure_detector u_cor_detector (
    .cw       (cor_cw),
    .syn_flip (cor_det_fault),
    .syndrome (),
    .error    (cor_err)
  );

  fsd_mem_ctrl #(.AW(AW), .SCRUB_PERIOD(SCRUB_PERIOD), .MAX_RETRY(MAX_RETRY)) u_ctrl (
    .clk           (clk),
    .rst_n         (rst_n),
    .req_valid     (req_valid),
    .req_ready     (req_ready),
    .req_write     (req_write),
    .req_addr      (req_addr),
    .req_info      (req_info),
    .rsp_valid     (rsp_valid),
    .rsp_write     (rsp_write),
    .rsp_info      (rsp_info),
    .rsp_fail      (rsp_fail),
    .enc_info      (enc_info),
    .enc_cw        (enc_cw),
    .enc_cw_q      (enc_cw_q),
    .enc_err       (enc_err),
    .mem_rd        (mem_rd),
    .mem_rd_addr   (mem_rd_addr),
    .mem_we        (mem_we),
    .mem_wr_addr   (mem_wr_addr),
    .mem_wr_cw     (mem_wr_cw),
    .cor_valid     (cor_valid),
    .cor_cw        (cor_cw),
    .cor_err       (cor_err),
    .scrub_busy    (scrub_busy),
    .ev_enc_retry  (ev_enc_retry),
    .ev_cor_retry  (ev_cor_retry),
    .ev_scrub_done (ev_scrub_done)
  );

  assign ev_corrected = cor_valid && cor_fixed;

endmodule
