// tb_ocp_ahb_buffer_study: buffer size against throughput for the whole OCP-AHB path.
//
// The same stall-free traffic (8 write bursts of 16 words, then 8 read bursts of 16 words,
// see tb_bs_run) is run through ocp_ahb_system at BUF_WORDS = 1, 2 and 4, side by side. For
// each size it prints the cycles taken by the writes and by the reads and the words moved
// per 100 cycles. Checked: every read word, that each run ends, and that a larger buffer is
// never slower than a smaller one.
//
// Test code: the question (how small the buffers can be for full performance) is the one
// the wrappers were designed around; the traffic and the sizes tried are this testbench's
// own, as no sizes or results are given for it.
module tb_ocp_ahb_buffer_study;
  localparam int N = 3;
  localparam int unsigned WORDS = 8 * 16;
  localparam int unsigned SIZES [N] = '{1, 2, 4};

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic done [N];
  int   wr_c [N], rd_c [N], chk [N], fail [N];

  for (genvar i = 0; i < N; i++) begin : g_run
    tb_bs_run #(.BUF_WORDS(SIZES[i])) run (
      .clk, .rst_n, .done(done[i]), .wr_cycles(wr_c[i]), .rd_cycles(rd_c[i]),
      .checks(chk[i]), .failures(fail[i]));
  end

  int checks = 0, failures = 0;

  task automatic finish();
    for (int i = 0; i < N; i++) begin
      checks += chk[i];
      failures += fail[i];
      checks++;
      if (!done[i]) begin
        failures++;
        $display("BUF_WORDS=%0d did not finish", SIZES[i]);
      end else begin
        $display("BUF_WORDS=%0d: writes %0d cycles (%0d words/100 cycles), reads %0d cycles (%0d words/100 cycles)",
                 SIZES[i], wr_c[i], WORDS * 100 / wr_c[i], rd_c[i], WORDS * 100 / rd_c[i]);
      end
    end
    for (int i = 1; i < N; i++) begin
      checks += 2;
      if (wr_c[i] > wr_c[i-1]) begin
        failures++;
        $display("writes slower at BUF_WORDS=%0d than at %0d", SIZES[i], SIZES[i-1]);
      end
      if (rd_c[i] > rd_c[i-1]) begin
        failures++;
        $display("reads slower at BUF_WORDS=%0d than at %0d", SIZES[i], SIZES[i-1]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    wait (done[0] && done[1] && done[2]);
    finish();
  end
  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    finish();
  end
endmodule
