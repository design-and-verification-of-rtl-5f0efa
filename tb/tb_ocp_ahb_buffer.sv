// tb_ocp_ahb_buffer: self-checking testbench of the wrapper buffer (with its decoder and
// multiplexer).
//
// Three buffers run on random push/pop traffic: one entry in and out per transfer (the
// 32-bit case), two entries in and one out (the 64-bit write buffer) and one in and two out
// (the 64-bit read buffer). A queue model gives the expected head data and fill level;
// push is only attempted when there is room and pop only when there is enough data.
//
// Test code: a queue model gives the expected contents; the stimulus is this testbench's own.
module tb_ocp_ahb_buffer;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // 1 in / 1 out, 2 entries
  logic        wr0, rd0;
  logic [31:0] wd0, q0;
  logic [1:0]  cnt0, free0;
  ocp_ahb_buffer #(.ENTRIES(2), .LW(32), .WL(1), .RL(1)) b0 (
    .clk, .rst_n, .clr(1'b0), .wr(wr0), .wdata(wd0), .rd(rd0), .rdata(q0), .count(cnt0), .free(free0));
  // 2 in / 1 out, 4 entries
  logic        wr1, rd1;
  logic [63:0] wd1;
  logic [31:0] q1;
  logic [2:0]  cnt1, free1;
  ocp_ahb_buffer #(.ENTRIES(4), .LW(32), .WL(2), .RL(1)) b1 (
    .clk, .rst_n, .clr(1'b0), .wr(wr1), .wdata(wd1), .rd(rd1), .rdata(q1), .count(cnt1), .free(free1));
  // 1 in / 2 out, 4 entries, with flush
  logic        wr2, rd2, clr2;
  logic [31:0] wd2;
  logic [63:0] q2;
  logic [2:0]  cnt2, free2;
  ocp_ahb_buffer #(.ENTRIES(4), .LW(32), .WL(1), .RL(2)) b2 (
    .clk, .rst_n, .clr(clr2), .wr(wr2), .wdata(wd2), .rd(rd2), .rdata(q2), .count(cnt2), .free(free2));

  logic [31:0] m0 [$], m1 [$], m2 [$];

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    {wr0, rd0, wr1, rd1, wr2, rd2, clr2} = '0;
    wd0 = '0; wd1 = '0; wd2 = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      // check state against the models
      chk(cnt0 == 2'(m0.size()) && free0 == 2'(2 - m0.size()), "b0 count");
      chk(cnt1 == 3'(m1.size()), "b1 count");
      chk(cnt2 == 3'(m2.size()), "b2 count");
      if (m0.size() >= 1) chk(q0 == m0[0], "b0 head");
      if (m1.size() >= 1) chk(q1 == m1[0], "b1 head");
      if (m2.size() >= 2) chk(q2 == {m2[1], m2[0]}, "b2 head");
      // drive
      wr0 = (m0.size() < 2) && $urandom % 2;  wd0 = $urandom;
      rd0 = (m0.size() >= 1) && $urandom % 2;
      wr1 = (m1.size() <= 2) && $urandom % 2; wd1 = {$urandom, $urandom};
      rd1 = (m1.size() >= 1) && $urandom % 2;
      wr2 = (m2.size() < 4) && $urandom % 2;  wd2 = $urandom;
      rd2 = (m2.size() >= 2) && $urandom % 2;
      clr2 = ($urandom % 64) == 0;
      @(posedge clk);
      if (rd0) void'(m0.pop_front());
      if (wr0) m0.push_back(wd0);
      if (rd1) void'(m1.pop_front());
      if (wr1) begin m1.push_back(wd1[31:0]); m1.push_back(wd1[63:32]); end
      if (clr2) m2.delete();
      else begin
        if (rd2) begin void'(m2.pop_front()); void'(m2.pop_front()); end
        if (wr2) m2.push_back(wd2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
