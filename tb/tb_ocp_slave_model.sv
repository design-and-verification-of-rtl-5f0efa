// tb_ocp_slave_model: behavioural OCP slave IP (a memory of 256 32-bit words) for testbenches.
//
// Behavioural model, not for synthesis. Takes one request at a time (MCmd/SCmdAccept with
// MBurstLength), then accepts that many write words (MDataValid/SDataAccept, honouring
// MDataByteEn) or returns that many read words (SResp/SData, held until MRespAccept).
// Every accept and every response is delayed at random, so the IP is often "busy". Reads
// of the word at ERR_ADDR return SResp=ERR. Counters: stalled requests, stalled data
// words, stalled responses, padding words (byte enables all low) and bursts received.
// DW is the OCP data width, 32 or 64; a 64-bit word covers two memory words (low half at
// the lower address) and is an error if either half is at ERR_ADDR.
//
// Test model, not part of the design: its OCP handshakes match the ones the wrappers use;
// memory size, stall rate and error address are this testbench's choice.
module tb_ocp_slave_model
  import ocp_ahb_pkg::*;
#(
  parameter logic [AW-1:0] ERR_ADDR = 32'h0000_0300,
  parameter int unsigned   P_READY  = 60,  // percent of cycles the IP is ready
  parameter int unsigned   DW       = 32,
  localparam int unsigned  L        = DW / 32
) (
  input  logic           clk,
  input  logic           rst_n,
  input  ocp_cmd_e       MCmd,
  input  logic [AW-1:0]  MAddr,
  input  logic [4:0]     MBurstLength,
  output logic           SCmdAccept,
  input  logic [DW-1:0]  MData,
  input  logic [DW/8-1:0] MDataByteEn,
  input  logic           MDataValid,
  output logic           SDataAccept,
  output ocp_resp_e      SResp,
  output logic [DW-1:0]  SData,
  input  logic           MRespAccept,
  output int             n_cmd_stall,
  output int             n_data_stall,
  output int             n_resp_stall,
  output int             n_pad,
  output int             n_burst
);
  logic [31:0] mem [256];
  typedef enum logic [1:0] {O_IDLE, O_WR, O_RD} ost_e;
  ost_e        st;
  logic [7:0]  idx;
  int          left;
  logic        rdy;

  assign SCmdAccept  = (st == O_IDLE) && rdy;
  assign SDataAccept = (st == O_WR) && rdy;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st <= O_IDLE; rdy <= 1'b0; SResp <= SRESP_NULL; left <= 0; idx <= '0;
      n_cmd_stall <= 0; n_data_stall <= 0; n_resp_stall <= 0; n_pad <= 0; n_burst <= 0;
    end else begin
      rdy <= ($urandom % 100) < P_READY;
      if (MCmd != OCP_IDLE && !SCmdAccept) n_cmd_stall <= n_cmd_stall + 1;
      if (MDataValid && !SDataAccept)      n_data_stall <= n_data_stall + 1;
      if (SResp != SRESP_NULL && !MRespAccept) n_resp_stall <= n_resp_stall + 1;
      case (st)
        O_IDLE: if (MCmd != OCP_IDLE && SCmdAccept) begin
          idx  <= MAddr[9:2] & ~8'(L - 1);
          left <= int'(MBurstLength);
          if (MBurstLength > 1) n_burst <= n_burst + 1;
          st   <= (MCmd == OCP_WR) ? O_WR : O_RD;
        end
        O_WR: if (MDataValid && SDataAccept) begin
          for (int l = 0; l < int'(L); l++)
            for (int b = 0; b < 4; b++)
              if (MDataByteEn[l*4 + b]) mem[idx + 8'(l)][b*8 +: 8] <= MData[l*32 + b*8 +: 8];
          if (MDataByteEn == '0) n_pad <= n_pad + 1;
          idx  <= idx + 8'(L);
          left <= left - 1;
          if (left == 1) st <= O_IDLE;
        end
        O_RD: begin
          if (SResp == SRESP_NULL || MRespAccept) begin
            if (SResp != SRESP_NULL) begin
              idx  <= idx + 8'(L);
              left <= left - 1;
            end
            if ((SResp == SRESP_NULL ? left : left - 1) == 0) begin
              SResp <= SRESP_NULL;
              st    <= O_IDLE;
            end else if (($urandom % 100) < P_READY) begin
              logic [7:0] i;
              logic       e;
              i = (SResp == SRESP_NULL) ? idx : idx + 8'(L);
              e = 1'b0;
              for (int l = 0; l < int'(L); l++) begin
                SData[l*32 +: 32] <= mem[i + 8'(l)];
                if ({i + 8'(l), 2'b00} == ERR_ADDR[9:0]) e = 1'b1;
              end
              SResp <= e ? SRESP_ERR : SRESP_DVA;
            end else begin
              SResp <= SRESP_NULL;
            end
          end
        end
        default: st <= O_IDLE;
      endcase
    end
  end

  initial for (int i = 0; i < 256; i++) mem[i] = 32'h5000_0000 | i;
endmodule
