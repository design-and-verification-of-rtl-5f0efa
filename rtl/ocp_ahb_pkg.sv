// ocp_ahb_pkg: types and constants shared by the OCP-AHB master and slave wrappers.
//
// OCP command and response codes follow the Open Core Protocol encoding (MCmd IDLE=000,
// WR=001, RD=010; SResp NULL/DVA/FAIL/ERR). AHB transfer, burst and response codes follow
// AMBA 2.0 AHB. The burst length field carries 1..16 OCP words; all AHB transfers are
// 32-bit words (HSIZE=010), which is a choice of this design.
//
// From the original description: 3-bit MCmd with WR=001 and RD=010, 32-bit addresses and data.
// Own choices: the 5-bit burst length, the OCP response and AHB encodings taken from the two
// bus standards, and the burst-type mapping.
package ocp_ahb_pkg;

  localparam int unsigned AW     = 32;  // address width (OCP MAddr, AHB HADDR)
  localparam int unsigned HDW    = 32;  // AHB data width
  localparam int unsigned BLEN_W = 5;   // OCP MBurstLength width, 1..16 words
  localparam int unsigned MAX_BEATS = 16;

  typedef enum logic [2:0] {
    OCP_IDLE = 3'b000,
    OCP_WR   = 3'b001,
    OCP_RD   = 3'b010
  } ocp_cmd_e;

  typedef enum logic [1:0] {
    SRESP_NULL = 2'b00,
    SRESP_DVA  = 2'b01,
    SRESP_FAIL = 2'b10,
    SRESP_ERR  = 2'b11
  } ocp_resp_e;

  typedef enum logic [1:0] {
    HTRANS_IDLE   = 2'b00,
    HTRANS_BUSY   = 2'b01,
    HTRANS_NONSEQ = 2'b10,
    HTRANS_SEQ    = 2'b11
  } htrans_e;

  typedef enum logic [2:0] {
    HBURST_SINGLE = 3'b000,
    HBURST_INCR   = 3'b001,
    HBURST_WRAP4  = 3'b010,
    HBURST_INCR4  = 3'b011,
    HBURST_WRAP8  = 3'b100,
    HBURST_INCR8  = 3'b101,
    HBURST_WRAP16 = 3'b110,
    HBURST_INCR16 = 3'b111
  } hburst_e;

  typedef enum logic [1:0] {
    HRESP_OKAY  = 2'b00,
    HRESP_ERROR = 2'b01,
    HRESP_RETRY = 2'b10,
    HRESP_SPLIT = 2'b11
  } hresp_e;

  localparam logic [2:0] HSIZE_WORD = 3'b010;
  localparam logic [3:0] HPROT_DATA = 4'b0011;  // data access, privileged, not bufferable/cacheable

  // OCP request as it travels through a register slice.
  typedef struct packed {
    ocp_cmd_e          cmd;
    logic [AW-1:0]     addr;
    logic [BLEN_W-1:0] blen;
  } ocp_req_t;

  // AHB burst type for a burst of n word beats counted from its first beat.
  function automatic hburst_e burst_for_beats(input int unsigned n);
    case (n)
      1:       return HBURST_SINGLE;
      4:       return HBURST_INCR4;
      8:       return HBURST_INCR8;
      16:      return HBURST_INCR16;
      default: return HBURST_INCR;
    endcase
  endfunction

  // Beats of an incrementing fixed-length AHB burst. SINGLE, undefined INCR and the WRAP
  // bursts give 1: the slave wrapper forwards each of their beats as an OCP request of its own.
  function automatic logic [BLEN_W-1:0] beats_of_burst(input hburst_e b);
    case (b)
      HBURST_INCR4:  return BLEN_W'(4);
      HBURST_INCR8:  return BLEN_W'(8);
      HBURST_INCR16: return BLEN_W'(16);
      default:       return BLEN_W'(1);
    endcase
  endfunction

endpackage
