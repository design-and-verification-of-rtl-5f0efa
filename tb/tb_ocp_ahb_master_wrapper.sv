// tb_ocp_ahb_master_wrapper: self-checking testbench of the OCP-AHB master wrapper.
//
// Runs tb_mw_run for the four register-in/out versions with a 32-bit OCP port and once
// with a 64-bit OCP port. Each run checks read data and final memory contents against a
// shadow model and the AHB protocol rules in the slave model. It also requires that every
// bus event the wrapper handles happened at least once over all runs: RETRY, SPLIT, ERROR,
// wait states, BUSY beats, SEQ beats and a grant lost in mid-burst.
//
// Test code: scenarios are this testbench's own; they exercise the features in the original
// list (SRMD bursts, single transfers, retry, split, busy IP, four register versions, 64-bit
// data).
module tb_ocp_ahb_master_wrapper;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int NR = 5;
  logic done [NR];
  int   chk [NR], fail [NR];
  int   ev [NR][9];

  tb_mw_run #(.OCP_DW(32), .REG_IN(1), .REG_OUT(1)) r0 (.clk, .rst_n, .done(done[0]), .checks(chk[0]), .failures(fail[0]), .ev(ev[0]));
  tb_mw_run #(.OCP_DW(32), .REG_IN(0), .REG_OUT(0)) r1 (.clk, .rst_n, .done(done[1]), .checks(chk[1]), .failures(fail[1]), .ev(ev[1]));
  tb_mw_run #(.OCP_DW(32), .REG_IN(1), .REG_OUT(0)) r2 (.clk, .rst_n, .done(done[2]), .checks(chk[2]), .failures(fail[2]), .ev(ev[2]));
  tb_mw_run #(.OCP_DW(32), .REG_IN(0), .REG_OUT(1)) r3 (.clk, .rst_n, .done(done[3]), .checks(chk[3]), .failures(fail[3]), .ev(ev[3]));
  tb_mw_run #(.OCP_DW(64), .REG_IN(1), .REG_OUT(1)) r4 (.clk, .rst_n, .done(done[4]), .checks(chk[4]), .failures(fail[4]), .ev(ev[4]));

  int checks, failures;
  string names [8] = '{"RETRY", "SPLIT", "ERROR", "wait state", "BUSY", "NONSEQ", "SEQ", "grant loss"};

  task automatic finish();
    checks = 0; failures = 0;
    for (int r = 0; r < NR; r++) begin checks += chk[r]; failures += fail[r]; end
    for (int e = 0; e < 8; e++) begin
      int n = 0;
      for (int r = 0; r < NR; r++) n += ev[r][e];
      $display("event %-10s : %0d", names[e], n);
      checks++;
      if (n == 0) begin failures++; $display("event %s never happened", names[e]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    wait (done[0] && done[1] && done[2] && done[3] && done[4]);
    finish();
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    for (int r = 0; r < NR; r++) fail[r] += done[r] ? 0 : 1;
    finish();
  end
endmodule
