// ocp_ahb_reg_slice: RI/RO register for a valid/accept channel (OCP request or write data).
//
// With EN=1 it is a two-entry skid buffer: the payload and valid towards the sink come from
// flip-flops, and so does the accept towards the source, so no combinational path crosses
// it in either direction. It passes one transfer per cycle and adds one cycle of latency.
// With EN=0 it is plain wiring. Together with ocp_ahb_reg_stage this gives the four
// register-in / register-out versions of a wrapper.
//
// Handshake on both sides: a transfer happens in a cycle where valid and accept are both
// high; valid and payload must be held until then.
//
// From the original description: register-in/register-out modules that shorten the critical
// path, in four versions. Own choices: the skid-buffer form that keeps full throughput on a
// valid/accept channel, and the EN parameter that turns it into wires.
module ocp_ahb_reg_slice #(
  parameter int unsigned W  = 32,
  parameter bit          EN = 1'b1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         s_valid,
  input  logic [W-1:0] s_data,
  output logic         s_accept,
  output logic         m_valid,
  output logic [W-1:0] m_data,
  input  logic         m_accept
);
  if (EN) begin : g_reg
    logic         main_v, skid_v;
    logic [W-1:0] main_d, skid_d;

    assign m_valid  = main_v;
    assign m_data   = main_d;
    assign s_accept = !skid_v;

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        main_v <= 1'b0;
        skid_v <= 1'b0;
      end else begin
        if (!main_v || m_accept) begin
          // main register is free after this cycle: fill it from the skid or the source
          if (skid_v) begin
            main_v <= 1'b1;
            main_d <= skid_d;
            skid_v <= 1'b0;
          end else begin
            main_v <= s_valid;
            main_d <= s_data;
          end
        end else if (s_valid && s_accept) begin
          // sink stalled while a new transfer arrives: park it in the skid register
          skid_v <= 1'b1;
          skid_d <= s_data;
        end
      end
    end
  end else begin : g_wire
    assign m_valid  = s_valid;
    assign m_data   = s_data;
    assign s_accept = m_accept;
  end
endmodule
