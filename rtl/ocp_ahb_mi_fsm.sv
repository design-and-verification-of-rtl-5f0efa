// ocp_ahb_mi_fsm: OCP-AHB MI FSM, the controller of the master wrapper.
//
// It takes one OCP request (command, start address, burst length in OCP words) and turns it
// into an AHB burst of RATIO beats per word (RATIO = OCP data width / 32). It loads the
// address generator (AddrEn), requests the bus, and once granted issues one address phase
// per beat: NONSEQ for the first, SEQ after it, BUSY while a write beat has no data in the
// write buffer yet (or a read beat no room in the read buffer). It pops the write buffer
// (WB_rd) when a write beat completes and pushes the read buffer (RB_wr) when a read beat
// completes. The AHB address-phase outputs are registered and change only at a clock edge
// with HREADY high, so they are held through wait states.
//
// RETRY and SPLIT: in the first cycle of the two-cycle response the next address phase is
// cancelled (HTRANS=IDLE) and the beat index is rewound to the failed beat; the burst
// restarts from there with NONSEQ and HBURST=INCR (SINGLE for a last beat), after the grant
// comes back in the SPLIT case. A grant lost in mid-burst restarts the same way. ERROR
// completes the beat (a read beat is returned with an error flag, a write beat is dropped)
// and the burst goes on with the next beat. Only one OCP request is in progress at a time:
// SCmdAccept is high while the FSM is idle. Writes are posted (no OCP write response).
//
// From the original description: an FSM that converts the master IP's OCP signals to AHB and
// controls the address generator (AddrEn) and the buffers (WB_wr, WB_rd, RB_wr, RB_rd), with
// SRMD, burst and single transfers, retry and split, and a busy master IP. Own choices: the
// whole state sequence, the burst-type choice, the restart rules and the ERROR handling, none
// of which is spelled out there.
module ocp_ahb_mi_fsm
  import ocp_ahb_pkg::*;
#(
  parameter int unsigned RATIO = 1,  // AHB beats per OCP word: 1 (32-bit) or 2 (64-bit)
  parameter int unsigned CW    = 2,  // width of the buffer counts
  localparam int unsigned IW   = 6   // beat index width
) (
  input  logic          clk,
  input  logic          rst_n,
  // OCP request channel (after RI)
  input  logic          req_valid,
  input  ocp_req_t      req,
  output logic          req_accept,
  // OCP write data channel (after RI); the data itself goes straight to the write buffer
  input  logic          wd_valid,
  output logic          wd_accept,
  // write buffer (lanes of 32 bits)
  input  logic [CW-1:0] wb_count,
  input  logic [CW-1:0] wb_free,
  output logic          wb_wr,
  output logic          wb_rd,
  // read buffer
  input  logic [CW-1:0] rb_free,
  output logic          rb_wr,
  output logic          rb_err,  // error flag stored with the beat
  // address generator
  output logic          ag_load,
  output logic          ag_inc,
  output logic          ag_rewind,
  output logic [IW-1:0] ag_rewind_idx,
  input  logic [AW-1:0] ag_addr,
  input  logic [IW-1:0] ag_idx,
  // AHB master
  output logic          hbusreq,
  input  logic          hgrant,
  output logic [AW-1:0] haddr,
  output htrans_e       htrans,
  output logic          hwrite,
  output logic [2:0]    hsize,
  output hburst_e       hburst,
  output logic [3:0]    hprot,
  input  logic          hready,
  input  hresp_e        hresp
);
  // transaction state
  logic          busy, is_wr, first, restart;
  logic [IW-1:0] total, done_cnt;
  logic [BLEN_W-1:0] wd_cnt, blen_q;
  // AHB pipeline state
  logic          dp_valid;          // a beat of ours is in its data phase
  htrans_e       htrans_q;
  logic [AW-1:0] haddr_q;
  hburst_e       hburst_q;
  logic          hwrite_q;

  assign haddr  = haddr_q;
  assign htrans = htrans_q;
  assign hwrite = hwrite_q;
  assign hburst = hburst_q;
  assign hsize  = HSIZE_WORD;
  assign hprot  = HPROT_DATA;

  // ---------------- OCP side ----------------
  assign req_accept = !busy;
  assign ag_load    = req_valid && req_accept;
  assign wd_accept  = busy && is_wr && (wd_cnt < blen_q) && (wb_free >= CW'(RATIO));
  assign wb_wr      = wd_valid && wd_accept;

  // ---------------- AHB side ----------------
  logic addr_active, dp_ok, dp_err, dp_fail_first, more_to_issue, data_ok, can_issue;
  assign addr_active   = (htrans_q == HTRANS_NONSEQ) || (htrans_q == HTRANS_SEQ);
  assign dp_ok         = dp_valid && hready && (hresp == HRESP_OKAY);
  assign dp_err        = dp_valid && hready && (hresp == HRESP_ERROR);
  // first cycle of a two-cycle RETRY/SPLIT/ERROR response
  assign dp_fail_first = dp_valid && !hready && (hresp != HRESP_OKAY);
  assign more_to_issue = busy && (ag_idx < total);

  // beat completion drives the buffers
  assign wb_rd  = (dp_ok || dp_err) && is_wr;
  assign rb_wr  = (dp_ok || dp_err) && !is_wr;
  assign rb_err = dp_err;

  // after this edge, the beat now in its address phase will own one buffer lane as well
  always_comb begin
    if (is_wr)
      data_ok = (32'(wb_count) - (wb_rd ? 32'd1 : 32'd0)) >= (addr_active ? 32'd2 : 32'd1);
    else
      data_ok = (32'(rb_free) - (rb_wr ? 32'd1 : 32'd0)) >= (addr_active ? 32'd2 : 32'd1);
  end
  assign can_issue = more_to_issue && hgrant && data_ok;

  assign hbusreq   = more_to_issue;

  assign ag_inc        = hready && can_issue;
  assign ag_rewind     = dp_fail_first;
  assign ag_rewind_idx = (hresp == HRESP_ERROR) ? done_cnt + 1'b1 : done_cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      is_wr    <= 1'b0;
      first    <= 1'b0;
      restart  <= 1'b0;
      total    <= '0;
      done_cnt <= '0;
      wd_cnt   <= '0;
      blen_q   <= '0;
      dp_valid <= 1'b0;
      htrans_q <= HTRANS_IDLE;
      haddr_q  <= '0;
      hburst_q <= HBURST_SINGLE;
      hwrite_q <= 1'b0;
    end else begin
      if (ag_load) begin
        busy     <= 1'b1;
        is_wr    <= (req.cmd == OCP_WR);
        first    <= 1'b1;
        restart  <= 1'b0;
        total    <= IW'(req.blen) * IW'(RATIO);
        blen_q   <= req.blen;
        done_cnt <= '0;
        wd_cnt   <= '0;
      end
      if (wb_wr) wd_cnt <= wd_cnt + 1'b1;

      if (dp_fail_first) begin
        // cancel the next transfer; the address generator rewinds to the failed beat
        htrans_q <= HTRANS_IDLE;
        restart  <= 1'b1;
      end else if (hready) begin
        dp_valid <= addr_active;
        if (dp_ok || dp_err) begin
          done_cnt <= done_cnt + 1'b1;
          if (done_cnt + 1'b1 == total) busy <= 1'b0;
        end
        if (can_issue) begin
          haddr_q  <= ag_addr;
          hwrite_q <= is_wr;
          first    <= 1'b0;
          restart  <= 1'b0;
          if (first) begin
            htrans_q <= HTRANS_NONSEQ;
            hburst_q <= burst_for_beats(32'(total));
          end else if (restart) begin
            htrans_q <= HTRANS_NONSEQ;
            hburst_q <= (total - ag_idx == IW'(1)) ? HBURST_SINGLE : HBURST_INCR;
          end else begin
            htrans_q <= HTRANS_SEQ;
          end
        end else if (more_to_issue && hgrant && !first && !restart) begin
          htrans_q <= HTRANS_BUSY;  // inside a burst, waiting for data or room
        end else begin
          htrans_q <= HTRANS_IDLE;
          if (more_to_issue && !hgrant && !first) restart <= 1'b1;
        end
      end
    end
  end

  // A write beat is only issued when its data is already buffered.
  a_wr_data_present: assert property (@(posedge clk) disable iff (!rst_n)
    (dp_valid && is_wr) |-> (wb_count != '0));
  // The address phase is held while HREADY is low, except for the RETRY/SPLIT/ERROR cancel.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (!hready && !dp_fail_first) |=> $stable(htrans_q) && $stable(haddr_q));
  a_blen_nonzero: assert property (@(posedge clk) disable iff (!rst_n)
    ag_load |-> (req.blen != '0) && (req.blen <= BLEN_W'(MAX_BEATS)));
endmodule
