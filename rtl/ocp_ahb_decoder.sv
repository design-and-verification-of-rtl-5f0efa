// ocp_ahb_decoder: write-entry decoder of a wrapper buffer.
//
// Turns the buffer's write pointer and its write strobe (WB_wr or RB_wr) into one enable
// per entry. A push writes WL consecutive entries starting at the pointer, so a 64-bit OCP
// word fills two 32-bit entries at once; the pointer is always a multiple of WL.
// Purely combinational.
//
// From the original description: a decoder, driven by WB_wr or RB_wr, that decides which
// buffer entry is written. Own choices: pointer-based addressing and the several-entry write
// for 64-bit words.
module ocp_ahb_decoder #(
  parameter int unsigned ENTRIES = 2,
  parameter int unsigned WL      = 1,
  localparam int unsigned PW     = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic               wr,
  input  logic [PW-1:0]      wptr,
  output logic [ENTRIES-1:0] en
);
  always_comb begin
    for (int unsigned i = 0; i < ENTRIES; i++) begin
      en[i] = wr && (i >= 32'(wptr)) && (i < 32'(wptr) + WL);
    end
  end
endmodule
