// tb_ocp_ahb_reg_stage: self-checking testbench of the RI/RO response register.
//
// Random valid/data go through the registered (EN=1) and wired (EN=0) versions; the
// registered output must equal the input of the previous cycle, the wired one the current
// input, and reset must clear the registered valid.
//
// Test code: expected outputs are the inputs delayed by one cycle (or not at all); the
// stimulus is this testbench's own.
module tb_ocp_ahb_reg_stage;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        dv, qv1, qv0;
  logic [32:0] d, q1, q0;
  ocp_ahb_reg_stage #(.W(33), .EN(1'b1)) u1 (.clk, .rst_n, .d_valid(dv), .d, .q_valid(qv1), .q(q1));
  ocp_ahb_reg_stage #(.W(33), .EN(1'b0)) u0 (.clk, .rst_n, .d_valid(dv), .d, .q_valid(qv0), .q(q0));

  initial begin
    logic        pv;
    logic [32:0] pd;
    dv = 1'b1; d = '1;
    repeat (2) @(posedge clk);
    @(negedge clk);
    checks++;
    if (qv1) begin failures++; $display("valid not cleared by reset"); end
    rst_n = 1'b1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      pv = dv; pd = d;
      dv = $urandom % 2; d = {1'($urandom), $urandom};
      #1;
      checks += 2;
      if (qv0 != dv || q0 != d) begin failures++; $display("wired stage differs"); end
      if (qv1 != pv || (pv && q1 != pd)) begin failures++; $display("registered stage differs"); end
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
