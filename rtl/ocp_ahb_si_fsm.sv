// ocp_ahb_si_fsm: OCP-AHB SI FSM, the controller of the slave wrapper.
//
// AHB side: it samples every address phase that selects the wrapper and answers in the data
// phase. A NONSEQ beat starts an OCP transaction ("engine"): one OCP request whose burst
// length is the AHB burst length (INCR4/8/16 give 4/8/16; SINGLE, undefined INCR and WRAP
// bursts give one request per beat). Write beats are taken into the write buffer, with wait
// states while it is full; read beats are answered from the read buffer, with wait states
// until the slave IP has returned the word. A NONSEQ arriving while the previous transaction
// is still being carried out on the OCP side gets a two-cycle SPLIT (or RETRY when SPLIT=0);
// a SEQ beat that needs a new request waits instead. A read word that the IP returns with
// SResp=ERR gives a two-cycle ERROR.
//
// Split: the number of the master that got SPLIT (HMASTER, sampled with its address phase)
// is kept in a 16-bit mask. In the first cycle in which the OCP transaction is over and no
// response is being given, the mask is driven on HSPLIT for one cycle and cleared, so the
// arbiter may grant those masters again; they then repeat the transfer.
//
// OCP side: the request (MCmd/SCmdAccept) goes first, with the start address that the
// FSM loaded into the address generator (AddrEn) when the transaction began; then the
// write words go out from the write buffer (MDataValid/SDataAccept), or the read words
// come back into the read buffer (SResp/MRespAccept). If the AHB master ends a fixed-length burst early, the words it did
// not send are sent to the IP with all byte enables low, and read words it will not collect
// are flushed from the read buffer or dropped as they arrive.
//
// HREADYOUT, HRESP and HSPLIT are combinational from registered state and the buffer levels.
//
// From the original description: an FSM that converts AHB transfers into OCP signals for the
// slave IP, with SRMD, retry and split, a busy slave IP and 32/64-bit data. Own choices: the
// whole state sequence, the one-transaction engine, when to answer SPLIT/RETRY or wait, and
// the early-termination and 64-bit rules.
module ocp_ahb_si_fsm
  import ocp_ahb_pkg::*;
#(
  parameter int unsigned CW    = 2,    // width of the buffer counts
  parameter int unsigned RATIO = 1,    // OCP word / AHB beat: 1 (32-bit OCP) or 2 (64-bit)
  parameter bit          SPLIT = 1'b1  // answer a busy NONSEQ with SPLIT (1) or RETRY (0)
) (
  input  logic          clk,
  input  logic          rst_n,
  // AHB slave
  input  logic          hsel,
  input  logic [AW-1:0] haddr,
  input  htrans_e       htrans,
  input  logic          hwrite,
  input  logic [2:0]    hsize,
  input  hburst_e       hburst,
  input  logic          hready,
  input  logic [3:0]    hmaster,
  output logic          hreadyout,
  output hresp_e        hresp,
  output logic [15:0]   hsplit,
  // write buffer
  input  logic [CW-1:0] wb_count,
  input  logic [CW-1:0] wb_free,
  output logic          wb_wr,
  output logic          wb_rd,
  // read buffer
  input  logic [CW-1:0] rb_count,
  input  logic [CW-1:0] rb_free,
  input  logic          rb_head_err,
  output logic          rb_wr,
  output logic          rb_rd,
  output logic          rb_clr,
  // OCP request to the slave IP (before RO)
  output logic          req_valid,
  output ocp_req_t      req,
  // address generator: AddrEn and the start address of the OCP request; its output is MAddr
  output logic          ag_load,
  output logic [AW-1:0] ag_start,
  input  logic [AW-1:0] ag_addr,
  input  logic          req_accept,
  // OCP write data (the word is the write buffer head, or a padding word)
  output logic          wd_valid,
  output logic          wd_pad,
  output logic          wd_half,     // 64-bit OCP: the beat is the upper half of its word
  output logic          pairs,       // 64-bit OCP: two beats per OCP word in this transaction
  input  logic          wd_accept,
  // OCP response from the slave IP (after RI)
  input  logic          rsp_valid,
  output logic          rsp_accept
);
  typedef enum logic [1:0] {RS_OK, RS_RETRY2, RS_SPLIT2, RS_ERR2} rsp_state_e;

  // data phase
  logic              dp_valid, dp_write, dp_start, dp_nonseq;
  logic [AW-1:0]     dp_addr;
  logic [BLEN_W-1:0] dp_len;
  logic [3:0]        dp_master;
  logic [15:0]       split_mask;  // masters that got SPLIT and wait for the wrapper
  rsp_state_e        rs;
  logic [BLEN_W-1:0] ap_open;   // beats of the current fixed-length burst still to come
  // OCP engine
  logic              eng_busy, eng_wr, req_pending, rd_drop, eng_pairs;
  logic [BLEN_W-1:0] eng_len, wd_left, pad_left, rd_left;

  logic in_dp, need_start, retry_now, start_now, wait_start, data_beat, rd_err_now, abort;
  logic sample, sample_seq_like;

  // Beats one OCP request covers when a NONSEQ starts a fixed-length burst. With a 64-bit
  // OCP port a burst that does not start on an 8-byte boundary is carried beat by beat.
  logic [BLEN_W-1:0] nonseq_len;
  assign nonseq_len = ((RATIO == 2) && haddr[2]) ? BLEN_W'(1) : beats_of_burst(hburst);

  assign in_dp      = dp_valid && (rs == RS_OK);
  assign need_start = in_dp && dp_start;
  assign retry_now  = need_start && eng_busy && dp_nonseq;
  assign start_now  = need_start && !eng_busy;
  assign wait_start = need_start && eng_busy && !dp_nonseq;
  assign data_beat  = in_dp && (!dp_start || start_now);
  assign rd_err_now = data_beat && !dp_write && (rb_count != '0) && rb_head_err;

  always_comb begin
    hreadyout = 1'b1;
    hresp     = HRESP_OKAY;
    if (rs == RS_RETRY2) begin
      hresp = HRESP_RETRY;
    end else if (rs == RS_SPLIT2) begin
      hresp = HRESP_SPLIT;
    end else if (rs == RS_ERR2) begin
      hresp = HRESP_ERROR;
    end else if (retry_now) begin
      hreadyout = 1'b0;
      hresp     = SPLIT ? HRESP_SPLIT : HRESP_RETRY;
    end else if (wait_start) begin
      hreadyout = 1'b0;
    end else if (data_beat && dp_write) begin
      hreadyout = (wb_free != '0);
    end else if (rd_err_now) begin
      hreadyout = 1'b0;
      hresp     = HRESP_ERROR;
    end else if (data_beat) begin
      hreadyout = (rb_count != '0);
    end
  end

  // a split master is released once the engine is free and no response is in progress
  assign hsplit = (SPLIT && !eng_busy && rs == RS_OK) ? split_mask : '0;

  assign wb_wr = data_beat && dp_write && (wb_free != '0);

  // address phase sampling and early-termination detection
  assign sample          = hready && hsel && (htrans == HTRANS_NONSEQ || htrans == HTRANS_SEQ);
  assign sample_seq_like = hsel && (htrans == HTRANS_SEQ || htrans == HTRANS_BUSY);
  assign abort           = hready && (ap_open != '0) && !sample_seq_like;

  // OCP engine
  logic [BLEN_W-1:0] real_left;
  assign real_left = wd_left - pad_left;
  assign req_valid = eng_busy && req_pending;
  assign req       = '{cmd:  eng_wr ? OCP_WR : OCP_RD,
                       addr: (RATIO == 2) ? {ag_addr[AW-1:3], 3'b000} : ag_addr,
                       blen: eng_pairs ? (eng_len >> 1) : eng_len};
  assign pairs     = eng_pairs;
  // beats are counted down from an even number in a paired transaction
  assign wd_half   = eng_pairs ? wd_left[0] : ((RATIO == 2) && ag_addr[2]);
  assign ag_load   = start_now;
  assign ag_start  = dp_addr;
  assign wd_pad    = (real_left == '0);
  assign wd_valid  = eng_busy && eng_wr && !req_pending && (wd_left != '0) &&
                     (wd_pad || (wb_count != '0));
  assign wb_rd     = wd_valid && wd_accept && !wd_pad;

  assign rsp_accept = eng_busy && !eng_wr && (rd_left != '0) && !(abort && !eng_wr) &&
                      (rd_drop || (rb_free != '0));
  assign rb_wr      = rsp_valid && rsp_accept && !rd_drop;
  assign rb_rd      = (data_beat && !dp_write && (rb_count != '0) && !rb_head_err) ||
                      (rs == RS_ERR2);
  assign rb_clr     = abort && !(start_now ? dp_write : eng_wr);

  logic              req_pending_n;
  logic [BLEN_W-1:0] wd_left_n, rd_left_n;
  always_comb begin
    req_pending_n = req_pending && !req_accept;
    wd_left_n     = wd_left - BLEN_W'(wd_valid && wd_accept);
    rd_left_n     = rd_left - BLEN_W'(rsp_valid && rsp_accept);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dp_valid    <= 1'b0;
      dp_write    <= 1'b0;
      dp_start    <= 1'b0;
      dp_nonseq   <= 1'b0;
      dp_addr     <= '0;
      dp_len      <= '0;
      dp_master   <= '0;
      split_mask  <= '0;
      rs          <= RS_OK;
      ap_open     <= '0;
      eng_busy    <= 1'b0;
      eng_wr      <= 1'b0;
      eng_pairs   <= 1'b0;
      req_pending <= 1'b0;
      rd_drop     <= 1'b0;
      eng_len     <= '0;
      wd_left     <= '0;
      pad_left    <= '0;
      rd_left     <= '0;
    end else begin
      // ---- response state ----
      if (rs != RS_OK)     rs <= RS_OK;
      else if (retry_now)  rs <= SPLIT ? RS_SPLIT2 : RS_RETRY2;

      // ---- split masters ----
      split_mask <= split_mask & ~hsplit;
      if (SPLIT && retry_now) split_mask[dp_master] <= 1'b1;
      else if (rd_err_now) rs <= RS_ERR2;

      // ---- data phase register ----
      if (hready) begin
        dp_valid <= sample;
        if (sample) begin
          dp_write  <= hwrite;
          dp_nonseq <= (htrans == HTRANS_NONSEQ);
          dp_addr   <= haddr;
          dp_master <= hmaster;
          dp_start  <= (htrans == HTRANS_NONSEQ) || (ap_open == '0);  // no fixed-length burst open
          dp_len    <= (htrans == HTRANS_NONSEQ) ? nonseq_len : BLEN_W'(1);
        end
      end else if (start_now) begin
        dp_start <= 1'b0;
      end

      // ---- open fixed-length burst ----
      if (retry_now) begin
        ap_open <= '0;
      end else if (hready) begin
        if (sample && htrans == HTRANS_NONSEQ) ap_open <= nonseq_len - 1'b1;
        else if (sample && ap_open != '0)      ap_open <= ap_open - 1'b1;
        else if (abort)                        ap_open <= '0;
      end

      // ---- OCP engine ----
      if (start_now) begin
        eng_busy    <= 1'b1;
        eng_wr      <= dp_write;
        eng_pairs   <= (RATIO == 2) && (dp_len != BLEN_W'(1)) && !dp_addr[2];
        eng_len     <= dp_len;
        req_pending <= 1'b1;
        wd_left     <= dp_write ? dp_len : '0;
        rd_left     <= dp_write ? '0 : dp_len;
        pad_left    <= (abort && dp_write) ? ap_open : '0;
        rd_drop     <= 1'b0;
      end else if (eng_busy) begin
        req_pending <= req_pending_n;
        wd_left     <= wd_left_n;
        rd_left     <= rd_left_n;
        if (wd_valid && wd_accept && wd_pad) pad_left <= pad_left - 1'b1;
        if (abort && eng_wr) pad_left <= pad_left + ap_open;
        if (abort && !eng_wr && rd_left_n != '0) rd_drop <= 1'b1;
        if (!req_pending_n && (eng_wr ? wd_left_n == '0 : rd_left_n == '0)) begin
          eng_busy <= 1'b0;
          rd_drop  <= 1'b0;
        end
      end
    end
  end

  a_word_only: assert property (@(posedge clk) disable iff (!rst_n)
    sample |-> hsize == HSIZE_WORD);
  a_pad_last: assert property (@(posedge clk) disable iff (!rst_n)
    pad_left <= wd_left);
endmodule
