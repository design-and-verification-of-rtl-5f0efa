// ocp_ahb_mux: read-entry multiplexer of a wrapper buffer.
//
// Presents the RL consecutive entries starting at the read pointer as one word, lowest
// entry in the least significant bits. Purely combinational; the pointer is always a
// multiple of RL.
//
// From the original description: the MUX at the output of each buffer (driven through WB_rd /
// RB_rd). Own choices: read-pointer selection and the several-lane output for 64-bit words.
module ocp_ahb_mux #(
  parameter int unsigned ENTRIES = 2,
  parameter int unsigned LW      = 32,
  parameter int unsigned RL      = 1,
  localparam int unsigned PW     = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic [ENTRIES-1:0][LW-1:0] entries,
  input  logic [PW-1:0]              rptr,
  output logic [RL-1:0][LW-1:0]      q
);
  always_comb begin
    for (int unsigned j = 0; j < RL; j++) begin
      q[j] = entries[(32'(rptr) + j) % ENTRIES];
    end
  end
endmodule
