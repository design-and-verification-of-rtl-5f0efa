// tb_ocp_ahb_system_full: end-to-end test of ocp_ahb_system with every parameter at its
// default (32-bit OCP ports, two-word buffers, RI and RO registers on both wrappers).
//
// tb_sys_env plays the OCP master IP, the OCP slave IP and the AHB arbiter. A run of random
// OCP reads and writes, single and burst, passes through the master wrapper, the AHB and
// the slave wrapper; read data and the final slave memory are checked against a shadow
// model, and each mechanism (SRMD bursts, single transfers, SPLIT from the busy slave
// wrapper, ERROR, wait states, BUSY beats, IP stalls, grant withdrawal) must occur.
//
// Test code: scenarios are this testbench's own; the parameters are the design's defaults.
module tb_ocp_ahb_system_full;
  import ocp_ahb_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic [31:0] m_MData, m_SData;
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
  logic done;
  int   checks, failures, ev [12];

  ocp_ahb_system dut (.*);
  tb_sys_env #(.NTXN(150)) env (.*);

  string names [12] = '{"IP cmd stall", "IP data stall", "IP resp stall", "OCP burst",
                        "RETRY/SPLIT", "ERROR", "wait state", "BUSY", "SEQ", "INCRx burst",
                        "SINGLE", "grant loss"};
  task automatic finish();
    int c = checks, f = failures;
    for (int e = 0; e < 12; e++) begin
      $display("event %-14s : %0d", names[e], ev[e]);
      c++;
      if (ev[e] == 0) begin f++; $display("event %s never happened", names[e]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  endtask

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    wait (done);
    finish();
  end
  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    finish();
  end
endmodule
