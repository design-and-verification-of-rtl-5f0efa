// tb_sys_env: environment around ocp_ahb_system for end-to-end tests.
//
// Plays the OCP master IP (random reads and writes of 1..16 words with gaps in the write
// data), the OCP slave IP (tb_ocp_slave_model, a memory with random stalls that answers
// ERR for the word at ERR_ADDR) and the AHB arbiter (grants after a random delay, sometimes
// withdraws the grant in mid-burst, and after a SPLIT response keeps the master, number 0,
// off the bus until its HSPLIT bit is seen). HSEL is held high: the slave wrapper is the
// only slave. Expected read data come from a shadow memory updated in request order; at the
// end the slave IP memory must equal the shadow. Counts how often each mechanism happened.
//
// Test code, not part of the design: the traffic, the arbiter policy and the checks are this
// testbench's own.
module tb_sys_env
  import ocp_ahb_pkg::*;
#(
  parameter int unsigned OCP_DW = 32,
  parameter int unsigned S_DW   = 32,
  parameter int unsigned NTXN   = 60
) (
  input  logic              clk,
  input  logic              rst_n,
  output ocp_cmd_e          m_MCmd,
  output logic [31:0]       m_MAddr,
  output logic [4:0]        m_MBurstLength,
  input  logic              m_SCmdAccept,
  output logic [OCP_DW-1:0] m_MData,
  output logic              m_MDataValid,
  input  logic              m_SDataAccept,
  input  ocp_resp_e         m_SResp,
  input  logic [OCP_DW-1:0] m_SData,
  input  ocp_cmd_e          s_MCmd,
  input  logic [31:0]       s_MAddr,
  input  logic [4:0]        s_MBurstLength,
  output logic              s_SCmdAccept,
  input  logic [S_DW-1:0]   s_MData,
  input  logic [S_DW/8-1:0] s_MDataByteEn,
  input  logic              s_MDataValid,
  output logic              s_SDataAccept,
  output ocp_resp_e         s_SResp,
  output logic [S_DW-1:0]   s_SData,
  input  logic              s_MRespAccept,
  input  logic              HBUSREQ,
  output logic              HGRANT,
  output logic              HSEL,
  output logic [3:0]        HMASTER,
  input  logic [15:0]       HSPLIT,
  input  htrans_e           HTRANS,
  input  hburst_e           HBURST,
  input  logic              HREADY,
  input  hresp_e            HRESP,
  output logic              done,
  output int                checks,
  output int                failures,
  output int                ev [12]
);
  localparam int unsigned RATIO = OCP_DW / 32;
  localparam logic [31:0] ERR_ADDR = 32'h0000_0300;

  assign HSEL    = 1'b1;
  assign HMASTER = 4'd0;

  tb_ocp_slave_model #(.ERR_ADDR(ERR_ADDR), .DW(S_DW)) ip (
    .clk, .rst_n, .MCmd(s_MCmd), .MAddr(s_MAddr), .MBurstLength(s_MBurstLength),
    .SCmdAccept(s_SCmdAccept), .MData(s_MData), .MDataByteEn(s_MDataByteEn),
    .MDataValid(s_MDataValid), .SDataAccept(s_SDataAccept), .SResp(s_SResp), .SData(s_SData),
    .MRespAccept(s_MRespAccept), .n_cmd_stall(ev[0]), .n_data_stall(ev[1]),
    .n_resp_stall(ev[2]), .n_pad(), .n_burst(ev[3]));

  // arbiter
  logic split_m;  // master 0 is split
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      HGRANT  <= 1'b0;
      split_m <= 1'b0;
    end else if (!HREADY && HRESP == HRESP_SPLIT) begin
      HGRANT  <= 1'b0;
      split_m <= 1'b1;
    end else if (split_m) begin
      HGRANT  <= 1'b0;
      if (HSPLIT[0]) split_m <= 1'b0;
    end
    else if (HGRANT && HBUSREQ && ($urandom % 100) < 3) HGRANT <= 1'b0;
    else if (!HGRANT && HBUSREQ && ($urandom % 3) == 0) HGRANT <= 1'b1;
  end

  // event counters: 4 RETRY or SPLIT, 5 ERROR, 6 wait states, 7 BUSY, 8 SEQ, 9 INCRx bursts,
  // 10 SINGLE, 11 grant withdrawn in mid-burst
  logic gnt_q;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 4; i < 12; i++) ev[i] <= 0;
      gnt_q <= 1'b0;
    end else begin
      gnt_q <= HGRANT;
      if (!HREADY && (HRESP == HRESP_RETRY || HRESP == HRESP_SPLIT)) ev[4] <= ev[4] + 1;
      if (!HREADY && HRESP == HRESP_ERROR) ev[5] <= ev[5] + 1;
      if (!HREADY && HRESP == HRESP_OKAY)  ev[6] <= ev[6] + 1;
      if (HREADY && HTRANS == HTRANS_BUSY) ev[7] <= ev[7] + 1;
      if (HREADY && HTRANS == HTRANS_SEQ)  ev[8] <= ev[8] + 1;
      if (HREADY && HTRANS == HTRANS_NONSEQ &&
          (HBURST == HBURST_INCR4 || HBURST == HBURST_INCR8 || HBURST == HBURST_INCR16))
        ev[9] <= ev[9] + 1;
      if (HREADY && HTRANS == HTRANS_NONSEQ && HBURST == HBURST_SINGLE) ev[10] <= ev[10] + 1;
      if (gnt_q && !HGRANT && HBUSREQ) ev[11] <= ev[11] + 1;
    end
  end

  logic [31:0] shadow [256];
  logic [OCP_DW:0] exp_q [$];
  int c_chk, c_fail;
  assign checks = c_chk;
  assign failures = c_fail;

  always @(posedge clk) begin
    if (rst_n && m_SResp != SRESP_NULL) begin
      logic [OCP_DW:0] e;
      c_chk++;
      if (exp_q.size() == 0) begin
        c_fail++;
        $display("%m: unexpected response");
      end else begin
        e = exp_q.pop_front();
        if (e[OCP_DW]) begin
          if (m_SResp != SRESP_ERR) begin c_fail++; $display("%m: expected ERR"); end
        end else if (m_SResp != SRESP_DVA || m_SData != e[OCP_DW-1:0]) begin
          c_fail++;
          $display("%m: read got %0d/%h expected %h", m_SResp, m_SData, e[OCP_DW-1:0]);
        end
      end
    end
  end

  initial begin
    c_chk = 0; c_fail = 0; done = 1'b0;
    m_MCmd = OCP_IDLE; m_MAddr = '0; m_MBurstLength = '0; m_MData = '0; m_MDataValid = 1'b0;
    for (int i = 0; i < 256; i++) shadow[i] = 32'h5000_0000 | i;
    wait (rst_n);
    @(negedge clk);
    for (int t = 0; t < int'(NTXN); t++) begin
      int unsigned len, start, r;
      bit wr;
      r   = $urandom % 6;
      case (r)
        0: len = 1;
        1: len = 4 / RATIO;
        2: len = 8 / RATIO;
        3: len = 16 / RATIO;
        default: len = 1 + ($urandom % (16 / RATIO));
      endcase
      start = ($urandom % (256 - len * RATIO)) & ~(RATIO - 1);
      if (t % 7 == 3) start = (ERR_ADDR / 4 - 1) & ~(RATIO - 1);
      wr = ($urandom % 2) == 0;
      m_MCmd = wr ? OCP_WR : OCP_RD;
      m_MAddr = start * 4;
      m_MBurstLength = 5'(len);
      #1;
      while (!m_SCmdAccept) begin @(negedge clk); #1; end
      @(negedge clk);
      m_MCmd = OCP_IDLE;
      if (wr) begin
        for (int w = 0; w < int'(len); w++) begin
          logic [OCP_DW-1:0] d;
          for (int l = 0; l < int'(RATIO); l++) begin
            d[l*32 +: 32] = $urandom;
            shadow[start + w * RATIO + l] = d[l*32 +: 32];
          end
          while (($urandom % 4) == 0) @(negedge clk);
          m_MData = d; m_MDataValid = 1'b1;
          #1;
          while (!m_SDataAccept) begin @(negedge clk); #1; end
          @(negedge clk);
          m_MDataValid = 1'b0;
        end
      end else begin
        for (int w = 0; w < int'(len); w++) begin
          logic [OCP_DW:0] e;
          e = '0;
          for (int l = 0; l < int'(RATIO); l++) begin
            e[l*32 +: 32] = shadow[start + w * RATIO + l];
            // the slave IP flags its whole OCP word (4 or 8 bytes) holding ERR_ADDR
            if (((start + w * RATIO + l) * 4) / (S_DW / 8) == ERR_ADDR / (S_DW / 8))
              e[OCP_DW] = 1'b1;
          end
          exp_q.push_back(e);
        end
      end
    end
    repeat (500) @(posedge clk);
    c_chk++;
    if (exp_q.size() != 0) begin c_fail++; $display("%m: %0d reads never answered", exp_q.size()); end
    for (int i = 0; i < 256; i++) begin
      c_chk++;
      if (ip.mem[i] != shadow[i]) begin
        c_fail++;
        $display("%m: mem[%0d]=%h expected %h", i, ip.mem[i], shadow[i]);
      end
    end
    done = 1'b1;
  end
endmodule
