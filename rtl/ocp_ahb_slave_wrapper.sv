// ocp_ahb_slave_wrapper: OCP-AHB slave wrapper.
//
// An AMBA 2.0 AHB slave that forwards the transfers it receives to an IP core with an OCP
// slave port. Each AHB burst of fixed length becomes a single OCP request with that burst
// length (single request, multiple data).
//
// Parts: the SI FSM, the address generator (loaded by the SI FSM's AddrEn with the HADDR
// of the beat that starts an OCP transaction; it supplies MAddr), a write buffer (AHB
// write beats waiting to go to the IP) and a read buffer (words returned by the IP waiting
// for their AHB beat), each a small FIFO with a write decoder and a read multiplexer, RO
// skid registers on the outgoing OCP request and write-data channels (REG_OUT) and an RI
// skid register on the incoming response channel (REG_IN). Each register adds one cycle of latency on its path.
//
// OCP side: MCmd/SCmdAccept for the request, MDataValid/SDataAccept for write words (with
// MDataByteEn; all zero for the padding words of an early-terminated burst), SResp/
// MRespAccept for read words. AHB side: word transfers only (HSIZE=010); HREADY is the bus
// ready, HREADYOUT this slave's. A NONSEQ that arrives while the IP is still busy with the
// previous transaction is answered with SPLIT (HMASTER identifies the master, HSPLIT
// releases it for the arbiter) or, with SPLIT=0, with RETRY.
//
// Width: the AHB is 32 bits; the OCP port is 32 or 64 bits (OCP_DW). With 64 bits, a
// fixed-length burst that starts on an 8-byte boundary is sent as half as many OCP words,
// two beats per word, low address in the low half; every other beat is a one-word request
// with byte enables on its own half, and a read beat takes the half its address selects.
// The buffers keep one beat per entry and hold BUF_WORDS OCP words.
//
// What follows the document: the part list (SI FSM, address generator with AddrEn, buffers
// with decoder and MUX, RI/RO), the 32-bit widths and the features (SRMD, retry/split,
// busy IP, register versions, 32/64-bit). The OCP signal set, the handshakes, the buffer
// depth and the rules above are this design's own.
module ocp_ahb_slave_wrapper
  import ocp_ahb_pkg::*;
#(
  parameter int unsigned OCP_DW    = 32,    // 32 or 64
  parameter int unsigned BUF_WORDS = 2,     // buffer depth in OCP words
  parameter bit          REG_IN    = 1'b1,
  parameter bit          REG_OUT   = 1'b1,
  parameter bit          SPLIT     = 1'b1,  // busy answer: SPLIT (1) or RETRY (0)
  localparam int unsigned RATIO    = OCP_DW / HDW,
  localparam int unsigned ENTRIES  = BUF_WORDS * RATIO,
  localparam int unsigned BEW      = OCP_DW / 8,
  localparam int unsigned CW       = $clog2(ENTRIES + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // AHB slave port
  input  logic              HSEL,
  input  logic [AW-1:0]     HADDR,
  input  htrans_e           HTRANS,
  input  logic              HWRITE,
  input  logic [2:0]        HSIZE,
  input  hburst_e           HBURST,
  input  logic [HDW-1:0]    HWDATA,
  input  logic              HREADY,
  input  logic [3:0]        HMASTER,
  output logic              HREADYOUT,
  output hresp_e            HRESP,
  output logic [HDW-1:0]    HRDATA,
  output logic [15:0]       HSPLIT,
  // OCP master port facing the slave IP
  output ocp_cmd_e          MCmd,
  output logic [AW-1:0]     MAddr,
  output logic [BLEN_W-1:0] MBurstLength,
  input  logic              SCmdAccept,
  output logic [OCP_DW-1:0] MData,
  output logic [BEW-1:0]    MDataByteEn,
  output logic              MDataValid,
  input  logic              SDataAccept,
  input  ocp_resp_e         SResp,
  input  logic [OCP_DW-1:0] SData,
  output logic              MRespAccept
);
  logic [CW-1:0]  wb_count, wb_free, rb_count, rb_free;
  logic           wb_wr, wb_rd, rb_wr, rb_rd, rb_clr;
  logic [HDW-1:0] wb_q;
  logic [HDW:0]   rb_q;
  logic           rsp_valid, rsp_accept;
  logic [HDW:0]   rsp_d;

  // ---------------- buffers ----------------
  ocp_ahb_buffer #(.ENTRIES(ENTRIES), .LW(HDW), .WL(1), .RL(1)) u_wbuf (
    .clk, .rst_n, .clr(1'b0),
    .wr(wb_wr), .wdata(HWDATA), .rd(wb_rd), .rdata(wb_q),
    .count(wb_count), .free(wb_free));

  ocp_ahb_buffer #(.ENTRIES(ENTRIES), .LW(HDW + 1), .WL(1), .RL(1)) u_rbuf (
    .clk, .rst_n, .clr(rb_clr),
    .wr(rb_wr), .wdata(rsp_d), .rd(rb_rd), .rdata(rb_q),
    .count(rb_count), .free(rb_free));

  assign HRDATA = rb_q[HDW-1:0];

  // ---------------- address generator ----------------
  // Holds the start address of the OCP request (AddrEn from the SI FSM). The request has
  // one address for the whole burst, so the generator is never stepped on this side.
  logic          ag_load;
  logic [AW-1:0] ag_start, ag_addr;

  ocp_ahb_addr_gen u_agen (
    .clk, .rst_n, .load(ag_load), .start_addr(ag_start), .inc(1'b0), .rewind(1'b0),
    .rewind_idx('0), .addr(ag_addr), .idx());

  // ---------------- FSM ----------------
  logic     req_valid, req_accept, wd_valid, wd_pad, wd_half, pairs, wd_accept;
  ocp_req_t req;

  ocp_ahb_si_fsm #(.CW(CW), .RATIO(RATIO), .SPLIT(SPLIT)) u_fsm (
    .clk, .rst_n,
    .hsel(HSEL), .haddr(HADDR), .htrans(HTRANS), .hwrite(HWRITE), .hsize(HSIZE),
    .hburst(HBURST), .hready(HREADY), .hmaster(HMASTER), .hreadyout(HREADYOUT), .hresp(HRESP),
    .hsplit(HSPLIT),
    .wb_count, .wb_free, .wb_wr, .wb_rd,
    .rb_count, .rb_free, .rb_head_err(rb_q[HDW]), .rb_wr, .rb_rd, .rb_clr,
    .req_valid, .req, .req_accept, .ag_load, .ag_start, .ag_addr,
    .wd_valid, .wd_pad, .wd_half, .pairs, .wd_accept,
    .rsp_valid, .rsp_accept);

  // ---------------- RO: request and write data ----------------
  logic     req_out_valid;
  ocp_req_t req_out;

  ocp_ahb_reg_slice #(.W($bits(ocp_req_t)), .EN(REG_OUT)) u_ro_req (
    .clk, .rst_n,
    .s_valid(req_valid), .s_data(req), .s_accept(req_accept),
    .m_valid(req_out_valid), .m_data(req_out), .m_accept(SCmdAccept));

  assign MCmd         = req_out_valid ? req_out.cmd : OCP_IDLE;
  assign MAddr        = req_out.addr;
  assign MBurstLength = req_out.blen;

  // ---------------- beat-to-word packing and RO on the write data ----------------
  // One beat per cycle comes from the FSM (a write-buffer word, or a padding beat with no
  // byte enables). For a 64-bit port the lower beat of a pair is held in lo_d/lo_be and
  // the word goes out with the upper beat; a lone beat goes to the half its address selects.
  logic                 pk_valid, pk_accept, wd_last;
  logic [OCP_DW+BEW-1:0] pk_word, wd_out;
  logic [HDW-1:0]       beat_d;
  logic [3:0]           beat_be;

  assign beat_d  = wd_pad ? '0 : wb_q;
  assign beat_be = wd_pad ? 4'h0 : 4'hF;

  if (RATIO == 1) begin : g_pk32
    assign wd_last = 1'b1;
    assign pk_word = {beat_be, beat_d};
  end else begin : g_pk64
    logic [HDW-1:0] lo_d;
    logic [3:0]     lo_be;
    assign wd_last = !pairs || wd_half;
    always_comb begin
      if (!wd_half)   pk_word = {4'h0, beat_be, {HDW{1'b0}}, beat_d};
      else if (pairs) pk_word = {beat_be, lo_be, beat_d, lo_d};
      else            pk_word = {beat_be, 4'h0, beat_d, {HDW{1'b0}}};
    end
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        lo_d  <= '0;
        lo_be <= '0;
      end else if (wd_valid && !wd_last) begin
        lo_d  <= beat_d;
        lo_be <= beat_be;
      end
    end
  end

  assign pk_valid  = wd_valid && wd_last;
  assign wd_accept = wd_last ? pk_accept : 1'b1;

  ocp_ahb_reg_slice #(.W(OCP_DW + BEW), .EN(REG_OUT)) u_ro_wd (
    .clk, .rst_n,
    .s_valid(pk_valid), .s_data(pk_word), .s_accept(pk_accept),
    .m_valid(MDataValid), .m_data(wd_out), .m_accept(SDataAccept));

  assign MData       = wd_out[OCP_DW-1:0];
  assign MDataByteEn = wd_out[OCP_DW +: BEW];

  // ---------------- RI on the response and word-to-beat unpacking ----------------
  // A 64-bit word gives both its halves in a paired transaction (low first), otherwise the
  // half its address selects; the error flag goes with each beat.
  logic              ri_valid, ri_accept;
  logic [OCP_DW:0]   ri_word;

  ocp_ahb_reg_slice #(.W(OCP_DW + 1), .EN(REG_IN)) u_ri_rsp (
    .clk, .rst_n,
    .s_valid(SResp != SRESP_NULL), .s_data({SResp == SRESP_ERR, SData}),
    .s_accept(MRespAccept),
    .m_valid(ri_valid), .m_data(ri_word), .m_accept(ri_accept));

  assign rsp_valid = ri_valid;

  if (RATIO == 1) begin : g_up32
    assign rsp_d     = ri_word;
    assign ri_accept = rsp_accept;
  end else begin : g_up64
    logic ptr;  // next half of a paired word
    logic sel;
    assign sel       = pairs ? ptr : ag_addr[2];
    assign rsp_d     = {ri_word[OCP_DW], sel ? ri_word[2*HDW-1:HDW] : ri_word[HDW-1:0]};
    assign ri_accept = rsp_accept && (!pairs || ptr);
    always_ff @(posedge clk) begin
      if (!rst_n)                       ptr <= 1'b0;
      else if (rsp_valid && rsp_accept) ptr <= pairs && !ptr;
    end
  end
endmodule
