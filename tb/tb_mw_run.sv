// tb_mw_run: one randomised run of ocp_ahb_master_wrapper against tb_ahb_slave_model.
//
// An OCP master issues NTXN requests (random read/write, lengths 1..16 words, addresses
// inside a 1 KB window) and streams write data with random gaps. A shadow memory, updated
// in request order, gives the expected read data; the word at the model's ERR_ADDR must
// come back as SResp=ERR. After the last request, the model memory is compared with the
// shadow. Reports checks, failures and the counts of each bus event through its ports.
//
// Test code, not part of the design: the traffic mix and the checks are this testbench's own.
module tb_mw_run
  import ocp_ahb_pkg::*;
#(
  parameter int unsigned OCP_DW  = 32,
  parameter bit          REG_IN  = 1'b1,
  parameter bit          REG_OUT = 1'b1,
  parameter int unsigned NTXN    = 60
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   ev [9]
);
  localparam int unsigned RATIO = OCP_DW / 32;
  localparam logic [31:0] ERR_ADDR = 32'h0000_0200;

  ocp_cmd_e          MCmd;
  logic [31:0]       MAddr;
  logic [4:0]        MBurstLength;
  logic              SCmdAccept, MDataValid, SDataAccept;
  logic [OCP_DW-1:0] MData, SData;
  ocp_resp_e         SResp;
  logic              HBUSREQ, HGRANT, HWRITE, HREADY;
  logic [31:0]       HADDR, HWDATA, HRDATA;
  htrans_e           HTRANS;
  hburst_e           HBURST;
  hresp_e            HRESP;
  logic [2:0]        HSIZE;
  logic [3:0]        HPROT;

  ocp_ahb_master_wrapper #(.OCP_DW(OCP_DW), .REG_IN(REG_IN), .REG_OUT(REG_OUT)) dut (.*);

  tb_ahb_slave_model #(.ERR_ADDR(ERR_ADDR)) ahb (
    .clk, .rst_n, .hbusreq(HBUSREQ), .hgrant(HGRANT), .haddr(HADDR), .htrans(HTRANS),
    .hwrite(HWRITE), .hburst(HBURST), .hwdata(HWDATA), .hready(HREADY), .hresp(HRESP),
    .hrdata(HRDATA), .n_retry(ev[0]), .n_split(ev[1]), .n_error(ev[2]), .n_wait(ev[3]),
    .n_busy(ev[4]), .n_nonseq(ev[5]), .n_seq(ev[6]), .n_grant_loss(ev[7]),
    .proto_errors(ev[8]));

  logic [31:0] shadow [256];
  logic [OCP_DW:0] exp_q [$];   // {is_error, data}
  int c_chk, c_fail;
  assign checks = c_chk;
  assign failures = c_fail;

  // response monitor
  always @(posedge clk) begin
    if (rst_n && SResp != SRESP_NULL) begin
      logic [OCP_DW:0] e;
      c_chk++;
      if (exp_q.size() == 0) begin
        c_fail++;
        $display("%m: unexpected response %0d", SResp);
      end else begin
        e = exp_q.pop_front();
        if (e[OCP_DW]) begin
          if (SResp != SRESP_ERR) begin c_fail++; $display("%m: expected ERR"); end
        end else if (SResp != SRESP_DVA || SData != e[OCP_DW-1:0]) begin
          c_fail++;
          $display("%m: read got %0d/%h expected %h", SResp, SData, e[OCP_DW-1:0]);
        end
      end
    end
  end

  initial begin
    c_chk = 0; c_fail = 0; done = 1'b0;
    MCmd = OCP_IDLE; MAddr = '0; MBurstLength = '0; MData = '0; MDataValid = 1'b0;
    for (int i = 0; i < 256; i++) shadow[i] = 32'hA000_0000 | i;
    wait (rst_n);
    @(negedge clk);
    for (int t = 0; t < int'(NTXN); t++) begin
      int unsigned len, start, r;
      bit wr;
      r   = $urandom % 8;
      len = (r < 4) ? (1 << r) * 1 : 1 + ($urandom % 16);        // 1,2,4,8 or random
      if (r == 3) len = 16 / RATIO;
      if (len * RATIO > 32) len = 32 / RATIO;
      start = ($urandom % (256 - len * RATIO)) & ~(RATIO - 1);
      if (t % 7 == 3) start = (ERR_ADDR / 4 - 1) & ~(RATIO - 1);  // cover the ERROR word
      wr = ($urandom % 2) == 0;
      // request
      // inputs change at the falling edge; a handshake completes at the next rising edge
      MCmd = wr ? OCP_WR : OCP_RD;
      MAddr = start * 4;
      MBurstLength = 5'(len);
      #1;
      while (!SCmdAccept) begin @(negedge clk); #1; end
      @(negedge clk);
      MCmd = OCP_IDLE;
      if (wr) begin
        for (int w = 0; w < int'(len); w++) begin
          logic [OCP_DW-1:0] d;
          for (int l = 0; l < int'(RATIO); l++) begin
            d[l*32 +: 32] = $urandom;
            if (((start + w * RATIO + l) * 4) != ERR_ADDR) shadow[start + w * RATIO + l] = d[l*32 +: 32];
          end
          while (($urandom % 4) == 0) @(negedge clk);   // gaps in the write data
          MData = d; MDataValid = 1'b1;
          #1;
          while (!SDataAccept) begin @(negedge clk); #1; end
          @(negedge clk);
          MDataValid = 1'b0;
        end
      end else begin
        for (int w = 0; w < int'(len); w++) begin
          logic [OCP_DW:0] e;
          e = '0;
          for (int l = 0; l < int'(RATIO); l++) begin
            e[l*32 +: 32] = shadow[start + w * RATIO + l];
            if (((start + w * RATIO + l) * 4) == ERR_ADDR) e[OCP_DW] = 1'b1;
          end
          exp_q.push_back(e);
        end
      end
    end
    // drain
    repeat (400) @(posedge clk);
    c_chk++;
    if (exp_q.size() != 0) begin c_fail++; $display("%m: %0d reads never answered", exp_q.size()); end
    for (int i = 0; i < 256; i++) begin
      c_chk++;
      if (ahb.mem[i] != shadow[i]) begin
        c_fail++;
        $display("%m: mem[%0d]=%h expected %h", i, ahb.mem[i], shadow[i]);
      end
    end
    c_chk++;
    if (ev[8] != 0) begin c_fail++; $display("%m: %0d AHB protocol errors", ev[8]); end
    done = 1'b1;
  end
endmodule
