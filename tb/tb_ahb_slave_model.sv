// tb_ahb_slave_model: behavioural AHB slave memory with an arbiter, for testbenches.
//
// Behavioural model, not for synthesis. A single-master AMBA 2.0 AHB: the arbiter grants
// the bus to a requesting master after a random delay, sometimes takes the grant away in
// mid-burst, and masks the master for a few cycles after a SPLIT (standing in for HSPLIT).
// The slave is a 256-word memory that inserts random wait states and randomly answers
// RETRY or SPLIT, and always answers ERROR for the word at ERR_ADDR (writes there are
// dropped). Protocol checks: only the owner drives a transfer, SEQ continues the previous
// beat's address and direction, address/control are held during wait states.
// Counters report how often each event happened.
//
// Test model, not part of the design: the arbiter and slave behaviour (wait, RETRY, SPLIT,
// ERROR, grant withdrawal) follow AMBA 2.0 AHB; the rates and the error address are this
// testbench's choice.
module tb_ahb_slave_model
  import ocp_ahb_pkg::*;
#(
  parameter logic [AW-1:0] ERR_ADDR = 32'h0000_0200,
  parameter int unsigned   P_WAIT   = 25,  // percent of data phases with wait states
  parameter int unsigned   P_RETRY  = 6,
  parameter int unsigned   P_SPLIT  = 4,
  parameter int unsigned   P_DROP   = 3    // percent of cycles the grant is withdrawn
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           hbusreq,
  output logic           hgrant,
  input  logic [AW-1:0]  haddr,
  input  htrans_e        htrans,
  input  logic           hwrite,
  input  hburst_e        hburst,
  input  logic [HDW-1:0] hwdata,
  output logic           hready,
  output hresp_e         hresp,
  output logic [HDW-1:0] hrdata,
  output int             n_retry,
  output int             n_split,
  output int             n_error,
  output int             n_wait,
  output int             n_busy,
  output int             n_nonseq,
  output int             n_seq,
  output int             n_grant_loss,
  output int             proto_errors
);
  logic [HDW-1:0] mem [256];

  // arbiter
  int  mask;
  logic owner;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      hgrant <= 1'b0;
      owner  <= 1'b0;
      n_grant_loss <= 0;
    end else begin
      if (hready) owner <= hgrant;
      if (mask > 0)                                         hgrant <= 1'b0;
      else if (hgrant && hbusreq && ($urandom % 100) < P_DROP) begin
        hgrant <= 1'b0;
        n_grant_loss <= n_grant_loss + 1;
      end else if (!hgrant && hbusreq && ($urandom % 4) == 0) hgrant <= 1'b1;
      else if (!hbusreq && ($urandom % 8) == 0)             hgrant <= 1'b0;
    end
  end

  // slave
  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_RESP2} st_e;
  st_e            st;
  logic           dp, dp_wr;
  logic [AW-1:0]  dp_addr, last_addr;
  logic           last_wr, in_burst;
  int             waits;
  hresp_e         resp2;
  logic [AW-1:0]  ap_addr_hold;
  htrans_e        ap_trans_hold;
  logic           hold_chk;

  always_comb begin
    hready = 1'b1;
    hresp  = HRESP_OKAY;
    if (st == S_WAIT) begin
      hready = 1'b0;
      if (waits == 0) begin
        if (dp_addr == ERR_ADDR) hresp = HRESP_ERROR;
        else if (resp2 != HRESP_OKAY) hresp = resp2;
      end
    end else if (st == S_RESP2) begin
      hresp = resp2;
    end
  end
  assign hrdata = mem[dp_addr[9:2]];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st <= S_IDLE; dp <= 1'b0; waits <= 0; resp2 <= HRESP_OKAY; mask <= 0;
      n_retry <= 0; n_split <= 0; n_error <= 0; n_wait <= 0; n_busy <= 0;
      n_nonseq <= 0; n_seq <= 0; proto_errors <= 0; in_burst <= 1'b0; hold_chk <= 1'b0;
      dp_addr <= '0;
    end else begin
      if (mask > 0) mask <= mask - 1;
      // protocol: only the owner drives a transfer
      if (htrans != HTRANS_IDLE && !owner) proto_errors <= proto_errors + 1;
      // protocol: held during wait states
      hold_chk <= !hready && !(st == S_WAIT && waits == 0);
      ap_addr_hold <= haddr; ap_trans_hold <= htrans;
      if (hold_chk && (haddr != ap_addr_hold || htrans != ap_trans_hold) && ap_trans_hold != HTRANS_IDLE)
        proto_errors <= proto_errors + 1;

      case (st)
        S_WAIT: begin
          if (waits > 0) waits <= waits - 1;
          else if (dp_addr == ERR_ADDR || resp2 != HRESP_OKAY) begin
            if (dp_addr == ERR_ADDR) begin resp2 <= HRESP_ERROR; n_error <= n_error + 1; end
            else if (resp2 == HRESP_RETRY) n_retry <= n_retry + 1;
            else begin n_split <= n_split + 1; mask <= 2 + int'($urandom % 6); end
            st <= S_RESP2;
          end else st <= S_IDLE;
        end
        S_RESP2: begin st <= S_IDLE; in_burst <= 1'b0; end  // a failed beat ends the burst
        default: ;
      endcase

      // data phase completing with OKAY
      if (hready && dp && hresp == HRESP_OKAY && dp_wr && dp_addr != ERR_ADDR)
        mem[dp_addr[9:2]] <= hwdata;

      if (hready) begin
        dp <= 1'b0;
        if (owner && htrans == HTRANS_BUSY) n_busy <= n_busy + 1;
        if (owner && (htrans == HTRANS_NONSEQ || htrans == HTRANS_SEQ)) begin
          if (htrans == HTRANS_SEQ) begin
            n_seq <= n_seq + 1;
            if (!in_burst || haddr != last_addr + 4 || hwrite != last_wr)
              proto_errors <= proto_errors + 1;
          end else n_nonseq <= n_nonseq + 1;
          in_burst <= 1'b1;
          last_addr <= haddr; last_wr <= hwrite;
          dp <= 1'b1; dp_wr <= hwrite; dp_addr <= haddr;
          // choose the response
          resp2 <= HRESP_OKAY;
          waits <= 0;
          st    <= S_IDLE;
          if (haddr == ERR_ADDR) begin
            st <= S_WAIT;
          end else begin
            int r;
            r = int'($urandom % 100);
            if (r < int'(P_RETRY)) begin resp2 <= HRESP_RETRY; st <= S_WAIT; end
            else if (r < int'(P_RETRY + P_SPLIT)) begin resp2 <= HRESP_SPLIT; st <= S_WAIT; end
            else if (r < int'(P_RETRY + P_SPLIT + P_WAIT)) begin
              waits <= 1 + int'($urandom % 3); st <= S_WAIT; n_wait <= n_wait + 1;
            end
          end
        end else if (owner && htrans == HTRANS_IDLE) begin
          in_burst <= 1'b0;
        end
      end
    end
  end


  initial for (int i = 0; i < 256; i++) mem[i] = 32'hA000_0000 | i;
endmodule
