// tb_ocp_ahb_reg_slice: self-checking testbench of the RI/RO handshake register.
//
// A random source and a random sink exchange a numbered sequence through the registered
// (EN=1) and the wired (EN=0) version. Every value must arrive once, in order; the
// registered version must show its one cycle of latency and pass one transfer per cycle
// when the sink never stalls, and its accept must not depend on the sink in the same cycle.
//
// Test code: a queue model gives the expected order; the stimulus and the throughput check are
// this testbench's own.
module tb_ocp_ahb_reg_slice;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        sv [2], sa [2], mv [2], ma [2];
  logic [15:0] sd [2], md [2];
  ocp_ahb_reg_slice #(.W(16), .EN(1'b1)) u1 (.clk, .rst_n, .s_valid(sv[1]), .s_data(sd[1]),
    .s_accept(sa[1]), .m_valid(mv[1]), .m_data(md[1]), .m_accept(ma[1]));
  ocp_ahb_reg_slice #(.W(16), .EN(1'b0)) u0 (.clk, .rst_n, .s_valid(sv[0]), .s_data(sd[0]),
    .s_accept(sa[0]), .m_valid(mv[0]), .m_data(md[0]), .m_accept(ma[0]));

  int sent [2], got [2];
  int phase;   // 0: random stalls on both sides, 1: no stalls
  int g0;

  always @(posedge clk) if (rst_n) begin
    for (int k = 0; k < 2; k++) begin
      if (sv[k] && sa[k]) sent[k]++;
      if (mv[k] && ma[k]) begin
        checks++;
        if (md[k] != 16'(got[k])) begin
          failures++; $display("slice %0d: got %0d expected %0d", k, md[k], got[k]);
        end
        got[k]++;
      end
    end
  end

  initial begin
    for (int k = 0; k < 2; k++) begin sv[k] = 0; ma[k] = 0; sd[k] = '0; sent[k] = 0; got[k] = 0; end
    phase = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      if (cyc == 2000) phase = 1;
      if (cyc == 2500) g0 = got[1];
      if (cyc == 2600) begin
        // in the stall-free phase the registered slice delivers one word per cycle,
        // with one word in flight
        checks += 2;
        if (got[1] - g0 != 100) begin failures++; $display("throughput %0d/100", got[1] - g0); end
        if (sent[1] - got[1] != 1) begin failures++; $display("latency: %0d in flight", sent[1] - got[1]); end
      end
      for (int k = 0; k < 2; k++) begin
        sd[k] = 16'(sent[k]);
        sv[k] = (phase == 1) || ($urandom % 3 != 0);
        ma[k] = (phase == 1) || ($urandom % 3 != 0);
      end
      #1;
      // the registered accept must not follow the sink's accept combinationally
      if (cyc % 7 == 0) begin
        logic a_before;
        a_before = sa[1];
        ma[1] = !ma[1];
        #1;
        checks++;
        if (sa[1] != a_before) begin failures++; $display("accept depends on sink"); end
        ma[1] = !ma[1];
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
