// tb_ocp_ahb_slave_wrapper: self-checking testbench of the OCP-AHB slave wrapper.
//
// A procedural AHB master drives random bursts (SINGLE, INCR4/8/16, undefined INCR, WRAP4)
// with random BUSY beats, sometimes ends a fixed-length burst early, and re-issues a beat
// that gets RETRY. Behind the wrapper sits tb_ocp_slave_model, whose random accepts make
// the IP busy. A shadow memory updated at each completed AHB write gives the expected read
// data; the word at the model's ERR_ADDR must read back as ERROR. At the end, the model
// memory is compared with the shadow (so padding words of an early-ended burst must not
// have written anything). Runs the four register-in/out versions one after another; two of
// them answer a busy IP with SPLIT, the other two with RETRY. A fifth run uses a 64-bit
// OCP slave port (two AHB beats per OCP word, byte enables for lone halves). Each burst uses a random
// master number on HMASTER; after SPLIT the master waits until exactly its HSPLIT bit
// pulses and then repeats the beat. Requires RETRY, SPLIT, ERROR, wait states, padding,
// flushing and IP stalls to have happened.
//
// Test code: scenarios are this testbench's own; they exercise the features in the original
// list (SRMD bursts, single transfers, retry, split, busy IP, four register versions, 64-bit
// data).
module tb_ocp_ahb_slave_wrapper;
  import ocp_ahb_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam logic [31:0] ERR_ADDR = 32'h0000_0300;
  int checks = 0, failures = 0;
  int n_retry = 0, n_split = 0, n_error = 0, n_wait = 0, n_abort_wr = 0, n_abort_rd = 0;
  int done_cfg = 0;
  logic [31:0] shadow [256];
  logic [4:0]  rst_n;
  int st_cmd [5], st_data [5], st_resp [5], st_pad [5], st_burst [5];

  // AHB master signals, shared by the four wrapper instances (one is selected at a time)
  logic [31:0] HADDR, HWDATA;
  htrans_e     HTRANS;
  logic        HWRITE;
  hburst_e     HBURST;
  logic [4:0]  sel;
  logic        HREADY;
  hresp_e      HRESP;
  logic [31:0] HRDATA;
  logic [4:0]  ready_v;
  hresp_e      resp_v [5];
  logic [31:0] rdata_v [5];
  logic [15:0] hsplit_v [5];
  logic [3:0]  HMASTER;
  int          cur;

  for (genvar g = 0; g < 5; g++) begin : g_cfg
    localparam int unsigned DW = (g == 4) ? 64 : 32;
    ocp_cmd_e    MCmd;
    logic [31:0] MAddr;
    logic [DW-1:0] MData, SData;
    logic [4:0]  MBurstLength;
    logic [DW/8-1:0] MDataByteEn;
    logic        SCmdAccept, MDataValid, SDataAccept, MRespAccept;
    ocp_resp_e   SResp;

    ocp_ahb_slave_wrapper #(.OCP_DW(DW), .REG_IN(g == 4 || g[0]), .REG_OUT(g != 4 && g[1]),
                            .SPLIT(g == 4 || (g[0] ^ g[1]))) dut (
      .clk, .rst_n(rst_n[g]), .HSEL(sel[g]), .HADDR, .HTRANS, .HWRITE, .HSIZE(HSIZE_WORD),
      .HBURST, .HWDATA, .HREADY, .HMASTER, .HREADYOUT(ready_v[g]), .HRESP(resp_v[g]),
      .HRDATA(rdata_v[g]), .HSPLIT(hsplit_v[g]), .MCmd, .MAddr, .MBurstLength, .SCmdAccept, .MData, .MDataByteEn,
      .MDataValid, .SDataAccept, .SResp, .SData, .MRespAccept);

    tb_ocp_slave_model #(.ERR_ADDR(ERR_ADDR), .DW(DW)) ip (
      .clk, .rst_n(rst_n[g]), .MCmd, .MAddr, .MBurstLength, .SCmdAccept, .MData,
      .MDataByteEn, .MDataValid, .SDataAccept, .SResp, .SData, .MRespAccept,
      .n_cmd_stall(st_cmd[g]), .n_data_stall(st_data[g]), .n_resp_stall(st_resp[g]),
      .n_pad(st_pad[g]), .n_burst(st_burst[g]));
  end

  assign HREADY = ready_v[cur];
  assign HRESP  = resp_v[cur];
  assign HRDATA = rdata_v[cur];

  // The IP answers ERR for the OCP word holding ERR_ADDR: 4 bytes, or 8 on the 64-bit port.
  function automatic bit err_word(input logic [31:0] a);
    return (cur == 4) ? (a[31:3] == ERR_ADDR[31:3]) : (a == ERR_ADDR);
  endfunction

  // One burst. Outputs change 1 ns after the falling edge; HREADY/HRESP are read then too,
  // as they only change at the rising edge. stop_at < n ends a fixed-length burst early.
  task automatic burst(input logic [31:0] a0, input bit wr, input int n, input hburst_e hb,
                       input int stop_at);
    int issued = 0, dp_beat = 0, restart = 0, cancel = 0, split_wait = 0;
    hburst_e cur_hb = hb;
    bit dp = 0;
    logic [31:0] wdat [32];
    for (int i = 0; i < n; i++) wdat[i] = $urandom;
    HMASTER = 4'($urandom);
    while (issued < stop_at || dp) begin
      @(negedge clk); #1;
      // release from SPLIT: only this master's bit may pulse, and only while it waits
      if (hsplit_v[cur] != '0) begin
        checks++;
        if (!split_wait || hsplit_v[cur] != 16'(1 << HMASTER)) begin
          failures++;
          $display("cfg %0d: HSPLIT=%h, master %0d waiting=%0d", cur, hsplit_v[cur], HMASTER, split_wait);
        end
        split_wait = 0;
      end
      // address phase
      if (cancel || issued >= stop_at || split_wait) begin
        HTRANS = HTRANS_IDLE;
      end else if (issued > 0 && !restart && cur_hb != HBURST_SINGLE && ($urandom % 6) == 0) begin
        HTRANS = HTRANS_BUSY;
      end else begin
        HTRANS = (issued == 0 || restart) ? HTRANS_NONSEQ : HTRANS_SEQ;
        if (restart) cur_hb = HBURST_INCR;
        HBURST = cur_hb;
        HADDR  = (hb == HBURST_WRAP4) ? {a0[31:4], 4'(a0[3:0] + 4 * issued)} : a0 + 4 * issued;
        HWRITE = wr;
      end
      if (dp) HWDATA = wdat[dp_beat];
      #1;
      cancel = 0;
      if (dp && !HREADY && HRESP != HRESP_OKAY) begin
        cancel = 1;                        // first cycle of a two-cycle response
      end else if (dp && HREADY) begin
        logic [31:0] da;
        da = (hb == HBURST_WRAP4) ? {a0[31:4], 4'(a0[3:0] + 4 * dp_beat)} : a0 + 4 * dp_beat;
        dp = 0;
        if (HRESP == HRESP_RETRY || HRESP == HRESP_SPLIT) begin
          if (HRESP == HRESP_SPLIT) begin
            n_split++;
            split_wait = 1;
          end else begin
            n_retry++;
          end
          issued  = dp_beat;
          restart = 1;
        end else if (HRESP == HRESP_ERROR) begin
          n_error++;
          checks++;
          if (wr || !err_word(da)) begin
            failures++;
            $display("unexpected ERROR at %h", da);
          end
          issued  = dp_beat + 1;
          restart = 1;
        end else begin
          if (wr) shadow[da[9:2]] = wdat[dp_beat];
          else begin
            checks++;
            if (HRDATA != shadow[da[9:2]] || err_word(da)) begin
              failures++;
              $display("cfg %0d read %h: got %h expected %h", cur, da, HRDATA, shadow[da[9:2]]);
            end
          end
        end
      end else if (dp) begin
        n_wait++;
      end
      if (HREADY && !cancel && (HTRANS == HTRANS_NONSEQ || HTRANS == HTRANS_SEQ)) begin
        dp      = 1;
        dp_beat = issued;
        issued++;
        restart = 0;
      end
      @(posedge clk);
    end
    @(negedge clk); #1;
    HTRANS = HTRANS_IDLE;
  endtask

  initial begin
    HTRANS = HTRANS_IDLE; HADDR = '0; HWRITE = 1'b0; HBURST = HBURST_SINGLE; HWDATA = '0;
    rst_n = '0; sel = '0; cur = 0; HMASTER = '0;
    for (int i = 0; i < 256; i++) shadow[i] = 32'h5000_0000 | i;
    repeat (3) @(posedge clk);
    rst_n = '1;
    for (int c = 0; c < 5; c++) begin
      cur = c;
      sel = 5'(1 << c);
      for (int i = 0; i < 256; i++) shadow[i] = 32'h5000_0000 | i;
      for (int t = 0; t < 80; t++) begin
        int r, n, stop;
        hburst_e hb;
        logic [31:0] a;
        bit wr;
        r  = $urandom % 6;
        wr = ($urandom % 2) == 0;
        case (r)
          0: begin hb = HBURST_SINGLE; n = 1; end
          1: begin hb = HBURST_INCR4;  n = 4; end
          2: begin hb = HBURST_INCR8;  n = 8; end
          3: begin hb = HBURST_INCR16; n = 16; end
          4: begin hb = HBURST_INCR;   n = 1 + $urandom % 6; end
          default: begin hb = HBURST_WRAP4; n = 4; end
        endcase
        a = 32'(($urandom % (256 - 16)) * 4);
        if (t % 9 == 4) a = ERR_ADDR - 4;
        if (hb == HBURST_WRAP4) a = {a[31:4], 4'(4 * ($urandom % 4))};
        if (c == 4 && ($urandom % 4) != 0) a[2] = 1'b0;  // mostly 8-byte aligned: paired words
        stop = n;
        if ((hb == HBURST_INCR4 || hb == HBURST_INCR8) && ($urandom % (c == 4 ? 2 : 4)) == 0) begin
          stop = 1 + $urandom % (n - 1);
          if (wr) n_abort_wr++; else n_abort_rd++;
        end
        burst(a, wr, n, hb, stop);
        repeat ($urandom % 3) @(posedge clk);
      end
      // let posted writes drain, then compare the IP memory with the shadow
      repeat (200) @(posedge clk);
      for (int i = 0; i < 256; i++) begin
        logic [31:0] m;
        case (c)
          0: m = g_cfg[0].ip.mem[i];
          1: m = g_cfg[1].ip.mem[i];
          2: m = g_cfg[2].ip.mem[i];
          3: m = g_cfg[3].ip.mem[i];
          default: m = g_cfg[4].ip.mem[i];
        endcase
        checks++;
        if (m != shadow[i]) begin
          failures++;
          $display("cfg %0d mem[%0d]=%h expected %h", c, i, m, shadow[i]);
        end
      end
    end
    finish();
  end

  task automatic finish();
    int cmd = 0, dat = 0, rsp = 0, pad = 0, bst = 0;
    for (int g = 0; g < 5; g++) begin
      cmd += st_cmd[g]; dat += st_data[g]; rsp += st_resp[g]; pad += st_pad[g]; bst += st_burst[g];
    end
    $display("SPLIT %0d RETRY %0d ERROR %0d wait %0d early-end wr %0d rd %0d | IP stalls cmd %0d data %0d resp %0d, padding %0d, OCP bursts %0d",
             n_split, n_retry, n_error, n_wait, n_abort_wr, n_abort_rd, cmd, dat, rsp, pad, bst);
    checks += 8;
    if (n_retry == 0) failures++;
    if (n_split == 0) failures++;
    if (n_error == 0) failures++;
    if (n_wait == 0) failures++;
    if (pad == 0) failures++;
    if (n_abort_rd == 0) failures++;
    if (cmd == 0 || dat == 0 || rsp == 0) failures++;
    if (bst == 0) failures++;
    // the 64-bit port must have seen paired bursts and padding words as well
    checks += 2;
    if (st_burst[4] == 0) failures++;
    if (st_pad[4] == 0) failures++;
    $display("64-bit port: OCP bursts %0d, padding %0d", st_burst[4], st_pad[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    finish();
  end
endmodule
