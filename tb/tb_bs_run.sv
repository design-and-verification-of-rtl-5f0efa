// tb_bs_run: one leg of the buffer-size study. Runs ocp_ahb_system at a given BUF_WORDS
// (everything else at the defaults) with no stalls anywhere: the OCP slave IP is always
// ready, the arbiter grants whenever the master asks, and the OCP master IP sends its write
// words back to back. Traffic: NB write bursts of 16 words, then NB read bursts of 16 words
// over the same addresses. Read data are checked against what was written.
//
// Interface: clk and rst_n in; done goes high at the end; wr_cycles counts the cycles from the
// first write request until the slave IP has taken the last write word, rd_cycles from the
// first read request until the master IP has the last read word. checks/failures count the
// compared read words and the mismatches.
//
// Test code, not part of the design: the traffic and the arbiter policy are this testbench's
// own. The arbiter still keeps a split master off the bus until its HSPLIT bit is seen,
// because the slave wrapper may split a read that arrives while posted writes drain.
module tb_bs_run
  import ocp_ahb_pkg::*;
#(
  parameter int unsigned BUF_WORDS = 2,
  parameter int unsigned NB        = 8
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   wr_cycles,
  output int   rd_cycles,
  output int   checks,
  output int   failures
);
  localparam int unsigned LEN = 16;

  ocp_cmd_e    m_MCmd, s_MCmd;
  logic [31:0] m_MAddr, s_MAddr, m_MData, m_SData, s_MData, s_SData, HADDR;
  logic [4:0]  m_MBurstLength, s_MBurstLength;
  logic        m_SCmdAccept, m_MDataValid, m_SDataAccept;
  logic [3:0]  s_MDataByteEn, HPROT;
  logic        s_SCmdAccept, s_MDataValid, s_SDataAccept, s_MRespAccept;
  ocp_resp_e   m_SResp, s_SResp;
  logic        HBUSREQ, HGRANT, HSEL, HWRITE, HREADY;
  htrans_e     HTRANS;
  hburst_e     HBURST;
  hresp_e      HRESP;
  logic [2:0]  HSIZE;
  logic [3:0]  HMASTER;
  logic [15:0] HSPLIT;

  ocp_ahb_system #(.BUF_WORDS(BUF_WORDS)) dut (.*);

  // the study uses words 0 .. NB*LEN-1; the error word is the last one of the memory
  tb_ocp_slave_model #(.ERR_ADDR(32'h0000_03FC), .P_READY(100)) ip (
    .clk, .rst_n, .MCmd(s_MCmd), .MAddr(s_MAddr), .MBurstLength(s_MBurstLength),
    .SCmdAccept(s_SCmdAccept), .MData(s_MData), .MDataByteEn(s_MDataByteEn),
    .MDataValid(s_MDataValid), .SDataAccept(s_SDataAccept), .SResp(s_SResp), .SData(s_SData),
    .MRespAccept(s_MRespAccept), .n_cmd_stall(), .n_data_stall(), .n_resp_stall(), .n_pad(),
    .n_burst());

  assign HSEL    = 1'b1;
  assign HMASTER = 4'd0;

  logic split_m;
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
    end else begin
      HGRANT  <= HBUSREQ;
    end
  end

  function automatic logic [31:0] pattern(int unsigned w);
    return 32'hB000_0000 ^ (w * 32'h0101_0101) ^ BUF_WORDS;
  endfunction

  // cycle counter, and count of write words taken by the slave IP
  int cyc, ip_words, rd_got;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cyc      <= 0;
      ip_words <= 0;
    end else begin
      cyc <= cyc + 1;
      if (s_MDataValid && s_SDataAccept) ip_words <= ip_words + 1;
    end
  end

  // read response checker
  int exp_w;
  always @(posedge clk) begin
    if (rst_n && m_SResp != SRESP_NULL) begin
      checks++;
      if (m_SResp != SRESP_DVA || m_SData != pattern(exp_w)) begin
        failures++;
        $display("%m: word %0d got %0d/%h expected %h", exp_w, m_SResp, m_SData, pattern(exp_w));
      end
      exp_w++;
      rd_got++;
    end
  end

  initial begin
    int t0;
    checks = 0; failures = 0; exp_w = 0; rd_got = 0; done = 1'b0;
    wr_cycles = 0; rd_cycles = 0;
    m_MCmd = OCP_IDLE; m_MAddr = '0; m_MBurstLength = '0; m_MData = '0; m_MDataValid = 1'b0;
    wait (rst_n);
    @(negedge clk);
    t0 = cyc;
    for (int b = 0; b < int'(NB); b++) begin
      m_MCmd = OCP_WR;
      m_MAddr = 32'(b * LEN * 4);
      m_MBurstLength = 5'(LEN);
      #1;
      while (!m_SCmdAccept) begin @(negedge clk); #1; end
      @(negedge clk);
      m_MCmd = OCP_IDLE;
      for (int w = 0; w < int'(LEN); w++) begin
        m_MData = pattern(b * LEN + w);
        m_MDataValid = 1'b1;
        #1;
        while (!m_SDataAccept) begin @(negedge clk); #1; end
        @(negedge clk);
      end
      m_MDataValid = 1'b0;
    end
    while (ip_words < int'(NB * LEN)) @(negedge clk);
    wr_cycles = cyc - t0;
    t0 = cyc;
    for (int b = 0; b < int'(NB); b++) begin
      m_MCmd = OCP_RD;
      m_MAddr = 32'(b * LEN * 4);
      m_MBurstLength = 5'(LEN);
      #1;
      while (!m_SCmdAccept) begin @(negedge clk); #1; end
      @(negedge clk);
      m_MCmd = OCP_IDLE;
    end
    while (rd_got < int'(NB * LEN)) @(negedge clk);
    rd_cycles = cyc - t0;
    done = 1'b1;
  end
endmodule
