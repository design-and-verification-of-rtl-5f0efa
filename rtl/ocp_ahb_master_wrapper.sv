// ocp_ahb_master_wrapper: OCP-AHB master wrapper.
//
// Lets an IP core with an OCP master port act as an AMBA 2.0 AHB bus master. The IP sends
// one request per burst (command, start address, length of 1..16 words) and then streams the
// write data, or receives the read data; the wrapper produces one AHB beat per 32-bit word
// with addresses from the address generator.
//
// Parts: RI registers on the incoming OCP request and write-data channels (skid registers,
// REG_IN), the MI FSM, the address generator, a write buffer and a read buffer (each a small
// FIFO with a write decoder and a read multiplexer), and an RO register on the outgoing OCP
// response (REG_OUT). REG_IN/REG_OUT select the four register-in/out versions; each
// register adds one cycle of latency on its path. OCP_DW = 64 makes every OCP word two AHB
// beats, low half first, at consecutive addresses.
//
// OCP side: request handshake MCmd/SCmdAccept; write data MDataValid/SDataAccept; read data
// returns as SResp = DVA (or ERR if an AHB beat of that word got ERROR) with SData, one word
// per cycle, and the IP must take it (no MRespAccept). Writes are posted: they get no
// response. The OCP master must not issue a burst that crosses a 1 KB address boundary.
//
// From the original description: the part list (MI FSM, address generator, write and read
// buffers with decoder and MUX, RI, RO), 32-bit widths, 3-bit MCmd and the feature list (SRMD,
// burst/single, retry/split, busy IP, four register versions, 32/64-bit). Own choices: the OCP
// signal set and handshakes, posted writes, the buffer depth and where the registers sit.
module ocp_ahb_master_wrapper
  import ocp_ahb_pkg::*;
#(
  parameter int unsigned OCP_DW    = 32,   // 32 or 64
  parameter int unsigned BUF_WORDS = 2,    // buffer depth in OCP words
  parameter bit          REG_IN    = 1'b1,
  parameter bit          REG_OUT   = 1'b1,
  localparam int unsigned RATIO    = OCP_DW / HDW,
  localparam int unsigned ENTRIES  = BUF_WORDS * RATIO,
  localparam int unsigned CW       = $clog2(ENTRIES + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // OCP slave port facing the master IP
  input  ocp_cmd_e          MCmd,
  input  logic [AW-1:0]     MAddr,
  input  logic [BLEN_W-1:0] MBurstLength,
  output logic              SCmdAccept,
  input  logic [OCP_DW-1:0] MData,
  input  logic              MDataValid,
  output logic              SDataAccept,
  output ocp_resp_e         SResp,
  output logic [OCP_DW-1:0] SData,
  // AHB master port
  output logic              HBUSREQ,
  input  logic              HGRANT,
  output logic [AW-1:0]     HADDR,
  output htrans_e           HTRANS,
  output logic              HWRITE,
  output logic [2:0]        HSIZE,
  output hburst_e           HBURST,
  output logic [3:0]        HPROT,
  output logic [HDW-1:0]    HWDATA,
  input  logic              HREADY,
  input  hresp_e            HRESP,
  input  logic [HDW-1:0]    HRDATA
);
  // ---------------- RI ----------------
  ocp_req_t          req_in, req;
  logic              req_valid, req_accept;
  logic              wd_valid, wd_accept;
  logic [OCP_DW-1:0] wd_data;

  assign req_in = '{cmd: MCmd, addr: MAddr, blen: MBurstLength};

  ocp_ahb_reg_slice #(.W($bits(ocp_req_t)), .EN(REG_IN)) u_ri_req (
    .clk, .rst_n,
    .s_valid(MCmd != OCP_IDLE), .s_data(req_in), .s_accept(SCmdAccept),
    .m_valid(req_valid), .m_data(req), .m_accept(req_accept));

  ocp_ahb_reg_slice #(.W(OCP_DW), .EN(REG_IN)) u_ri_wd (
    .clk, .rst_n,
    .s_valid(MDataValid), .s_data(MData), .s_accept(SDataAccept),
    .m_valid(wd_valid), .m_data(wd_data), .m_accept(wd_accept));

  // ---------------- buffers ----------------
  logic [CW-1:0] wb_count, wb_free, rb_count, rb_free;
  logic          wb_wr, wb_rd, rb_wr, rb_rd, rb_err;
  logic [RATIO-1:0][HDW:0] rb_q;

  ocp_ahb_buffer #(.ENTRIES(ENTRIES), .LW(HDW), .WL(RATIO), .RL(1)) u_wbuf (
    .clk, .rst_n, .clr(1'b0),
    .wr(wb_wr), .wdata(wd_data), .rd(wb_rd), .rdata(HWDATA),
    .count(wb_count), .free(wb_free));

  ocp_ahb_buffer #(.ENTRIES(ENTRIES), .LW(HDW + 1), .WL(1), .RL(RATIO)) u_rbuf (
    .clk, .rst_n, .clr(1'b0),
    .wr(rb_wr), .wdata({rb_err, HRDATA}), .rd(rb_rd), .rdata(rb_q),
    .count(rb_count), .free(rb_free));

  // ---------------- address generator + FSM ----------------
  logic          ag_load, ag_inc, ag_rewind;
  logic [5:0]    ag_rewind_idx, ag_idx;
  logic [AW-1:0] ag_addr;

  ocp_ahb_addr_gen #(.IW(6)) u_agen (
    .clk, .rst_n, .load(ag_load), .start_addr(req.addr), .inc(ag_inc),
    .rewind(ag_rewind), .rewind_idx(ag_rewind_idx), .addr(ag_addr), .idx(ag_idx));

  ocp_ahb_mi_fsm #(.RATIO(RATIO), .CW(CW)) u_fsm (
    .clk, .rst_n,
    .req_valid, .req, .req_accept, .wd_valid, .wd_accept,
    .wb_count, .wb_free, .wb_wr, .wb_rd, .rb_free, .rb_wr, .rb_err,
    .ag_load, .ag_inc, .ag_rewind, .ag_rewind_idx, .ag_addr, .ag_idx,
    .hbusreq(HBUSREQ), .hgrant(HGRANT), .haddr(HADDR), .htrans(HTRANS), .hwrite(HWRITE),
    .hsize(HSIZE), .hburst(HBURST), .hprot(HPROT), .hready(HREADY), .hresp(HRESP));

  // ---------------- read response + RO ----------------
  logic              rsp_err;
  logic [OCP_DW-1:0] rsp_data;
  logic              rsp_valid_q;
  logic [OCP_DW:0]   rsp_q;

  assign rb_rd = (rb_count >= CW'(RATIO));
  always_comb begin
    rsp_err = 1'b0;
    for (int unsigned i = 0; i < RATIO; i++) begin
      rsp_err |= rb_q[i][HDW];
      rsp_data[i*HDW +: HDW] = rb_q[i][HDW-1:0];
    end
  end

  ocp_ahb_reg_stage #(.W(OCP_DW + 1), .EN(REG_OUT)) u_ro_resp (
    .clk, .rst_n, .d_valid(rb_rd), .d({rsp_err, rsp_data}), .q_valid(rsp_valid_q), .q(rsp_q));

  assign SResp = !rsp_valid_q ? SRESP_NULL : (rsp_q[OCP_DW] ? SRESP_ERR : SRESP_DVA);
  assign SData = rsp_q[OCP_DW-1:0];
endmodule
