// tb_ocp_ahb_system: end-to-end test of ocp_ahb_system in several configurations.
//
// Five systems run side by side, each with tb_sys_env as OCP master IP, OCP slave IP and
// AHB arbiter: 32-bit OCP with each of the four register-in/out versions, and 64-bit OCP
// ports on both IPs (width conversion in both wrappers, two AHB beats per OCP word)
// without registers. Two of
// the 32-bit systems have the slave wrapper answer a busy IP with RETRY, the others with
// SPLIT.
// Checks read data and final memories against shadow models, and requires each mechanism
// to have occurred in every configuration.
//
// Test code: scenarios are this testbench's own; the mechanisms it counts are the ones in the
// original feature list and AHB.
module tb_ocp_ahb_system;
  import ocp_ahb_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int NC = 5;
  logic done [NC];
  int   chk [NC], fail [NC], ev [NC][12];
  if (1) begin : c0
    logic [32-1:0] m_MData, m_SData;
    ocp_cmd_e    m_MCmd, s_MCmd;
    logic [31:0] m_MAddr, s_MAddr, s_MData, s_SData, HADDR;
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
    ocp_ahb_system #(.OCP_DW(32), .REG_IN(1), .REG_OUT(1)) dut (.*);
    tb_sys_env #(.OCP_DW(32), .NTXN(150)) env (.*, .done(done[0]), .checks(chk[0]), .failures(fail[0]), .ev(ev[0]));
  end
  if (1) begin : c1
    logic [32-1:0] m_MData, m_SData;
    ocp_cmd_e    m_MCmd, s_MCmd;
    logic [31:0] m_MAddr, s_MAddr, s_MData, s_SData, HADDR;
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
    ocp_ahb_system #(.OCP_DW(32), .REG_IN(0), .REG_OUT(0), .SPLIT(0)) dut (.*);
    tb_sys_env #(.OCP_DW(32), .NTXN(150)) env (.*, .done(done[1]), .checks(chk[1]), .failures(fail[1]), .ev(ev[1]));
  end
  if (1) begin : c2
    logic [32-1:0] m_MData, m_SData;
    ocp_cmd_e    m_MCmd, s_MCmd;
    logic [31:0] m_MAddr, s_MAddr, s_MData, s_SData, HADDR;
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
    ocp_ahb_system #(.OCP_DW(32), .REG_IN(1), .REG_OUT(0)) dut (.*);
    tb_sys_env #(.OCP_DW(32), .NTXN(150)) env (.*, .done(done[2]), .checks(chk[2]), .failures(fail[2]), .ev(ev[2]));
  end
  if (1) begin : c3
    logic [32-1:0] m_MData, m_SData;
    ocp_cmd_e    m_MCmd, s_MCmd;
    logic [31:0] m_MAddr, s_MAddr, s_MData, s_SData, HADDR;
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
    ocp_ahb_system #(.OCP_DW(32), .REG_IN(0), .REG_OUT(1), .SPLIT(0)) dut (.*);
    tb_sys_env #(.OCP_DW(32), .NTXN(150)) env (.*, .done(done[3]), .checks(chk[3]), .failures(fail[3]), .ev(ev[3]));
  end
  if (1) begin : c4
    logic [64-1:0] m_MData, m_SData;
    ocp_cmd_e    m_MCmd, s_MCmd;
    logic [31:0] m_MAddr, s_MAddr, HADDR;
    logic [63:0] s_MData, s_SData;
    logic [7:0]  s_MDataByteEn;
    logic [4:0]  m_MBurstLength, s_MBurstLength;
    logic        m_SCmdAccept, m_MDataValid, m_SDataAccept;
    logic [3:0]  HPROT;
    logic        s_SCmdAccept, s_MDataValid, s_SDataAccept, s_MRespAccept;
    ocp_resp_e   m_SResp, s_SResp;
    logic        HBUSREQ, HGRANT, HSEL, HWRITE, HREADY;
    htrans_e     HTRANS;
    hburst_e     HBURST;
    hresp_e      HRESP;
    logic [2:0]  HSIZE;
    logic [3:0]  HMASTER;
    logic [15:0] HSPLIT;
    ocp_ahb_system #(.OCP_DW(64), .S_OCP_DW(64), .REG_IN(0), .REG_OUT(0)) dut (.*);
    tb_sys_env #(.OCP_DW(64), .S_DW(64), .NTXN(150)) env (.*, .done(done[4]), .checks(chk[4]), .failures(fail[4]), .ev(ev[4]));
  end

  string names [12] = '{"IP cmd stall", "IP data stall", "IP resp stall", "OCP burst",
                        "RETRY/SPLIT", "ERROR", "wait state", "BUSY", "SEQ", "INCRx burst",
                        "SINGLE", "grant loss"};
  task automatic finish();
    int c = 0, f = 0;
    for (int k = 0; k < NC; k++) begin c += chk[k]; f += fail[k]; end
    for (int e = 0; e < 12; e++)
      for (int k = 0; k < NC; k++) begin
        c++;
        if (ev[k][e] == 0) begin f++; $display("config %0d: %s never happened", k, names[e]); end
      end
    for (int e = 0; e < 12; e++) $display("event %-14s : %0d %0d %0d %0d %0d", names[e], ev[0][e], ev[1][e], ev[2][e], ev[3][e], ev[4][e]);
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  endtask

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    wait (done[0] && done[1] && done[2] && done[3] && done[4]);
    finish();
  end
  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    for (int k = 0; k < NC; k++) fail[k] += done[k] ? 0 : 1;
    finish();
  end
endmodule
