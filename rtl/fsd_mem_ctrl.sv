// fsd_mem_ctrl -- retry and scrubbing controller of the fault-secure memory.
//
// Write: the request's information vector is held and fed to the encoder;
// the encoder's codeword is latched (S_ENC) and checked by the encoder's
// fault-secure detector the next cycle (S_ENC_CHK). A clean codeword is
// written to memory; a flagged one is encoded again. Read: the word is read
// (S_RD), passes the demultiplexer and the pipelined corrector, and the
// corrected word is checked by the corrector's detector as it leaves the
// corrector (S_COR). A clean word completes the read with its first K bits,
// the information vector; a flagged one is read and corrected again.
// Scrubbing: every SCRUB_PERIOD cycles the controller stops taking requests
// (req_ready low) and walks through all 2**AW words: read, correct, check,
// write the corrected word back.
//
// Encode-check-retry, correct-check-retry and scrubbing with normal access
// stopped follow the published design. The retry limit, the scrub period,
// the handshake and the state encoding are this design's choices: after
// MAX_RETRY retries a request completes with rsp_fail set (a failed write
// stores nothing; a failed scrub leaves the word unchanged).
//
// Interface: request valid/ready with req_write, req_addr, req_info; a
// one-cycle rsp_valid pulse with rsp_write, rsp_info, rsp_fail. For a clean
// write rsp_valid rises 2 clock edges after the edge that accepts the
// request, for a clean read 4; each retry adds 2 edges (write) or 4 (read),
// and a request waits while a scrub pass runs. Memory read
// data is expected one cycle after mem_rd, and the corrector's output
// (cor_valid) a fixed number of cycles later. ev_* are one-cycle event pulses.
module fsd_mem_ctrl
  import eg_ldpc_pkg::*;
#(
  parameter int unsigned AW           = 6,
  parameter int unsigned SCRUB_PERIOD = 4096,
  parameter int unsigned MAX_RETRY    = 4
) (
  input  logic          clk,
  input  logic          rst_n,
  // requests
  input  logic          req_valid,
  output logic          req_ready,
  input  logic          req_write,
  input  logic [AW-1:0] req_addr,
  input  info_t         req_info,
  // responses
  output logic          rsp_valid,
  output logic          rsp_write,
  output info_t         rsp_info,
  output logic          rsp_fail,
  // encoder and its detector
  output info_t         enc_info,
  input  codeword_t     enc_cw,
  output codeword_t     enc_cw_q,
  input  logic          enc_err,
  // memory
  output logic          mem_rd,
  output logic [AW-1:0] mem_rd_addr,
  output logic          mem_we,
  output logic [AW-1:0] mem_wr_addr,
  output codeword_t     mem_wr_cw,
  // corrector and its detector
  input  logic          cor_valid,
  input  codeword_t     cor_cw,
  input  logic          cor_err,
  // status
  output logic          scrub_busy,
  output logic          ev_enc_retry,
  output logic          ev_cor_retry,
  output logic          ev_scrub_done
);

  typedef enum logic [2:0] {
    S_IDLE,
    S_ENC,
    S_ENC_CHK,
    S_RD,
    S_COR
  } state_t;

  localparam int unsigned TW = $clog2(SCRUB_PERIOD + 1);
  localparam int unsigned RC = $clog2(MAX_RETRY + 1);

  state_t        state;
  logic [AW-1:0] addr_q;
  info_t         info_q;
  logic [RC-1:0] retries;
  logic          scrub_mode;
  logic [AW-1:0] scrub_addr;
  logic [TW-1:0] timer;
  logic          scrub_pending;
  logic          give_up;

  assign req_ready   = (state == S_IDLE) && !scrub_pending;
  assign enc_info    = info_q;
  assign scrub_busy  = scrub_mode;
  assign give_up     = (int'(retries) >= MAX_RETRY);
  assign mem_rd      = (state == S_RD);
  assign mem_rd_addr = scrub_mode ? scrub_addr : addr_q;

  // Memory write: a checked codeword from the encoder, or a checked corrected
  // codeword during scrubbing. Nothing flagged by a detector is ever written.
  always_comb begin
    mem_we      = 1'b0;
    mem_wr_addr = addr_q;
    mem_wr_cw   = enc_cw_q;
    if (state == S_ENC_CHK && !enc_err) begin
      mem_we = 1'b1;
    end else if (state == S_COR && scrub_mode && cor_valid && !cor_err) begin
      mem_we      = 1'b1;
      mem_wr_addr = scrub_addr;
      mem_wr_cw   = cor_cw;
    end
  end

  assign ev_enc_retry = (state == S_ENC_CHK) && enc_err && !give_up;
  assign ev_cor_retry = (state == S_COR) && cor_valid && cor_err && !give_up;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      addr_q        <= '0;
      info_q        <= '0;
      enc_cw_q      <= '0;
      retries       <= '0;
      scrub_mode    <= 1'b0;
      scrub_addr    <= '0;
      timer         <= '0;
      scrub_pending <= 1'b0;
      rsp_valid     <= 1'b0;
      rsp_write     <= 1'b0;
      rsp_info      <= '0;
      rsp_fail      <= 1'b0;
      ev_scrub_done <= 1'b0;
    end else begin
      rsp_valid     <= 1'b0;
      ev_scrub_done <= 1'b0;

      // Scrub timer: counts while no scrub is pending or running.
      if (!scrub_pending && !scrub_mode) begin
        if (int'(timer) == SCRUB_PERIOD - 1) begin
          timer         <= '0;
          scrub_pending <= 1'b1;
        end else begin
          timer <= timer + 1'b1;
        end
      end

      unique case (state)
        S_IDLE: begin
          retries <= '0;
          if (scrub_pending) begin
            scrub_pending <= 1'b0;
            scrub_mode    <= 1'b1;
            scrub_addr    <= '0;
            state         <= S_RD;
          end else if (req_valid) begin
            addr_q <= req_addr;
            info_q <= req_info;
            state  <= req_write ? S_ENC : S_RD;
          end
        end

        S_ENC: begin
          enc_cw_q <= enc_cw;
          state    <= S_ENC_CHK;
        end

        S_ENC_CHK: begin
          if (enc_err && !give_up) begin
            retries <= retries + 1'b1;
            state   <= S_ENC;
          end else begin
            rsp_valid <= 1'b1;
            rsp_write <= 1'b1;
            rsp_info  <= info_q;
            rsp_fail  <= enc_err;
            state     <= S_IDLE;
          end
        end

        S_RD: state <= S_COR;

        S_COR: begin
          if (cor_valid) begin
            if (cor_err && !give_up) begin
              retries <= retries + 1'b1;
              state   <= S_RD;
            end else if (scrub_mode) begin
              retries <= '0;
              if (&scrub_addr) begin
                scrub_mode    <= 1'b0;
                ev_scrub_done <= 1'b1;
                state         <= S_IDLE;
              end else begin
                scrub_addr <= scrub_addr + 1'b1;
                state      <= S_RD;
              end
            end else begin
              rsp_valid <= 1'b1;
              rsp_write <= 1'b0;
              rsp_info  <= cor_cw[K-1:0];
              rsp_fail  <= cor_err;
              state     <= S_IDLE;
            end
          end
        end

        default: state <= S_IDLE;
      endcase
    end
  end

  // A request is only taken when the controller is idle and no scrub waits.
  a_no_req_during_scrub: assert property (@(posedge clk) disable iff (!rst_n)
    scrub_mode |-> !req_ready);
endmodule
