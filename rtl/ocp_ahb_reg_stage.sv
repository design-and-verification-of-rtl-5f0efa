// ocp_ahb_reg_stage: RI/RO register for a channel without back-pressure (OCP response:
// SResp and SData).
//
// With EN=1 the valid flag and payload pass through one flip-flop stage (one cycle of
// latency, valid cleared by reset); with EN=0 they are wired straight through.
//
// From the original description: register-in/register-out modules that shorten the critical
// path. Own choices: a plain register for channels without back-pressure, and the EN
// parameter.
module ocp_ahb_reg_stage #(
  parameter int unsigned W  = 32,
  parameter bit          EN = 1'b1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         d_valid,
  input  logic [W-1:0] d,
  output logic         q_valid,
  output logic [W-1:0] q
);
  if (EN) begin : g_reg
    always_ff @(posedge clk) begin
      if (!rst_n) q_valid <= 1'b0;
      else        q_valid <= d_valid;
    end
    always_ff @(posedge clk) q <= d;
  end else begin : g_wire
    assign q_valid = d_valid;
    assign q       = d;
  end
endmodule
