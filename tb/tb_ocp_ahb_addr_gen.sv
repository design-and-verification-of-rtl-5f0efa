// tb_ocp_ahb_addr_gen: self-checking testbench of the address generator.
//
// Loads random start addresses, steps, rewinds and reloads at random, and checks every
// cycle that the address equals start (word aligned) + 4 * index, computed independently.
//
// Test code: expected addresses are worked out independently as start + 4*index; the stimulus
// is this testbench's own.
module tb_ocp_ahb_addr_gen;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        load, inc, rewind;
  logic [31:0] start, addr;
  logic [5:0]  ridx, idx;
  ocp_ahb_addr_gen dut (.clk, .rst_n, .load, .start_addr(start), .inc, .rewind,
                        .rewind_idx(ridx), .addr, .idx);

  logic [31:0] base_m;
  int          idx_m;

  initial begin
    load = 0; inc = 0; rewind = 0; start = '0; ridx = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    checks++;
    if (addr != 32'h0 || idx != 0) begin failures++; $display("reset value wrong"); end
    base_m = '0; idx_m = 0;
    for (int i = 0; i < 2000; i++) begin
      int r;
      r = $urandom % 16;
      load = (r == 0); rewind = (r == 1); inc = (r >= 2 && r < 12);
      start = $urandom; ridx = 6'($urandom % 32);
      @(posedge clk);
      if (load) begin base_m = {start[31:2], 2'b00}; idx_m = 0; end
      else if (rewind) idx_m = ridx;
      else if (inc) idx_m = (idx_m + 1) % 64;
      @(negedge clk);
      checks++;
      if (addr != base_m + 32'(idx_m) * 4 || idx != 6'(idx_m)) begin
        failures++;
        $display("addr %h idx %0d, expected %h %0d", addr, idx, base_m + 32'(idx_m) * 4, idx_m);
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
