// ocp_ahb_addr_gen: address generator of the OCP-AHB wrappers.
//
// An OCP master sends one address for a whole burst (single request, multiple data), while
// AHB needs an address for every beat. The generator holds the start address and a beat
// index and outputs start + 4*index: the address of the next beat to issue. AddrEn (load)
// takes a new start address and clears the index; inc steps to the next word; rewind sets
// the index back (to the first beat not yet completed) when a RETRY or SPLIT or a lost
// grant forces the burst to restart. All updates are synchronous; the address is a
// registered base plus a registered index, so it is stable for the whole cycle.
//
// From the original description: an address generator, loaded by AddrEn, that makes the
// address of every beat from the start address. Own choices: the index form (start + 4*index),
// the rewind input and the width of the index.
module ocp_ahb_addr_gen
  import ocp_ahb_pkg::*;
#(
  parameter int unsigned IW = 6  // beat index width: enough for 32 beats (16 words of 64 bits)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,       // AddrEn
  input  logic [AW-1:0] start_addr,
  input  logic          inc,
  input  logic          rewind,
  input  logic [IW-1:0] rewind_idx,
  output logic [AW-1:0] addr,
  output logic [IW-1:0] idx
);
  logic [AW-1:0] base;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      base <= '0;
      idx  <= '0;
    end else if (load) begin
      base <= {start_addr[AW-1:2], 2'b00};
      idx  <= '0;
    end else if (rewind) begin
      idx  <= rewind_idx;
    end else if (inc) begin
      idx  <= idx + 1'b1;
    end
  end

  assign addr = base + {{(AW-IW-2){1'b0}}, idx, 2'b00};
endmodule
