// ocp_ahb_system: an OCP master IP and an OCP slave IP joined over AMBA 2.0 AHB through the
// two wrappers.
//
// Path: OCP master IP -> ocp_ahb_master_wrapper (AHB bus master) -> AHB -> 
// ocp_ahb_slave_wrapper (AHB slave) -> OCP slave IP. The IP cores are outside: their OCP
// ports are ports of this module. The bus arbiter and address decoder are outside too: the
// master's HBUSREQ comes out, and HGRANT and HSEL come in, with HMASTER (the number of the
// master that owns the address phase); the slave wrapper's HSPLIT goes out to the arbiter.
// The AHB has one slave here, so the bus HREADY/HRESP/HRDATA are the slave wrapper's. The
// AHB bus signals are also brought out for observation.
//
// Each IP's OCP data port may be 32 or 64 bits wide (OCP_DW for the master IP, S_OCP_DW
// for the slave IP); the AHB is 32 bits, so each wrapper converts between the two. REG_IN/REG_OUT choose the register-in/out version of both wrappers;
// SPLIT chooses whether the slave wrapper answers a busy IP with SPLIT or with RETRY.
//
// From the original description: OCP IP cores attached to an AMBA AHB through the wrappers.
// Own choices: joining one master wrapper and one slave wrapper on one bus, and leaving the
// arbiter and decoder outside.
module ocp_ahb_system
  import ocp_ahb_pkg::*;
#(
  parameter int unsigned OCP_DW    = 32,   // master IP's OCP data width, 32 or 64
  parameter int unsigned S_OCP_DW  = 32,   // slave IP's OCP data width, 32 or 64
  parameter int unsigned BUF_WORDS = 2,
  parameter bit          REG_IN    = 1'b1,
  parameter bit          REG_OUT   = 1'b1,
  parameter bit          SPLIT     = 1'b1   // slave wrapper answers a busy IP with SPLIT
) (
  input  logic              clk,
  input  logic              rst_n,
  // OCP port facing the master IP
  input  ocp_cmd_e          m_MCmd,
  input  logic [AW-1:0]     m_MAddr,
  input  logic [BLEN_W-1:0] m_MBurstLength,
  output logic              m_SCmdAccept,
  input  logic [OCP_DW-1:0] m_MData,
  input  logic              m_MDataValid,
  output logic              m_SDataAccept,
  output ocp_resp_e         m_SResp,
  output logic [OCP_DW-1:0] m_SData,
  // OCP port facing the slave IP
  output ocp_cmd_e          s_MCmd,
  output logic [AW-1:0]     s_MAddr,
  output logic [BLEN_W-1:0] s_MBurstLength,
  input  logic              s_SCmdAccept,
  output logic [S_OCP_DW-1:0]   s_MData,
  output logic [S_OCP_DW/8-1:0] s_MDataByteEn,
  output logic              s_MDataValid,
  input  logic              s_SDataAccept,
  input  ocp_resp_e         s_SResp,
  input  logic [S_OCP_DW-1:0]   s_SData,
  output logic              s_MRespAccept,
  // AHB arbiter / decoder
  output logic              HBUSREQ,
  input  logic              HGRANT,
  input  logic              HSEL,
  input  logic [3:0]        HMASTER,
  output logic [15:0]       HSPLIT,
  // AHB bus, for observation
  output logic [AW-1:0]     HADDR,
  output htrans_e           HTRANS,
  output hburst_e           HBURST,
  output logic              HWRITE,
  output logic [2:0]        HSIZE,
  output logic [3:0]        HPROT,
  output logic              HREADY,
  output hresp_e            HRESP
);
  logic [HDW-1:0] hwdata, hrdata;

  ocp_ahb_master_wrapper #(.OCP_DW(OCP_DW), .BUF_WORDS(BUF_WORDS), .REG_IN(REG_IN),
                           .REG_OUT(REG_OUT)) u_master (
    .clk, .rst_n,
    .MCmd(m_MCmd), .MAddr(m_MAddr), .MBurstLength(m_MBurstLength), .SCmdAccept(m_SCmdAccept),
    .MData(m_MData), .MDataValid(m_MDataValid), .SDataAccept(m_SDataAccept),
    .SResp(m_SResp), .SData(m_SData),
    .HBUSREQ, .HGRANT, .HADDR, .HTRANS, .HWRITE, .HSIZE, .HBURST, .HPROT,
    .HWDATA(hwdata), .HREADY, .HRESP, .HRDATA(hrdata));

  ocp_ahb_slave_wrapper #(.OCP_DW(S_OCP_DW), .BUF_WORDS(BUF_WORDS), .REG_IN(REG_IN),
                          .REG_OUT(REG_OUT), .SPLIT(SPLIT)) u_slave (
    .clk, .rst_n,
    .HSEL, .HADDR, .HTRANS, .HWRITE, .HSIZE, .HBURST, .HWDATA(hwdata),
    .HREADY, .HMASTER, .HREADYOUT(HREADY), .HRESP, .HRDATA(hrdata), .HSPLIT,
    .MCmd(s_MCmd), .MAddr(s_MAddr), .MBurstLength(s_MBurstLength), .SCmdAccept(s_SCmdAccept),
    .MData(s_MData), .MDataByteEn(s_MDataByteEn), .MDataValid(s_MDataValid),
    .SDataAccept(s_SDataAccept), .SResp(s_SResp), .SData(s_SData),
    .MRespAccept(s_MRespAccept));
endmodule
