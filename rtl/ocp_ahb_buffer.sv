// ocp_ahb_buffer: write buffer / read buffer of the OCP-AHB wrappers.
//
// A first-in first-out store of ENTRIES entries of LW bits. One side pushes WL entries at a
// time, the other pops RL entries at a time; this is where the 32/64-bit width conversion
// happens (for a 64-bit OCP port the write buffer takes two entries per OCP word and gives
// one per AHB beat, the read buffer the other way round). The write strobe goes through
// ocp_ahb_decoder to the entry enables, the head goes through ocp_ahb_mux.
//
// Interface: push (wr) and pop (rd) may come in the same cycle. The caller must not push
// unless free >= WL nor pop unless count >= RL; assertions check it. rdata is the head and is
// valid while count >= RL. Synchronous, active-low reset and clr empty the buffer.
//
// From the original description: the write and read buffers, built from a decoder that picks
// the entry to write and a MUX that picks the entry to read. Own choices: the FIFO form, the
// depth (two OCP words, as the buffers are drawn in two parts), the multi-lane push/pop used
// for 64-bit words and the flush input.
module ocp_ahb_buffer #(
  parameter int unsigned ENTRIES = 2,
  parameter int unsigned LW      = 32,
  parameter int unsigned WL      = 1,
  parameter int unsigned RL      = 1,
  localparam int unsigned PW     = (ENTRIES > 1) ? $clog2(ENTRIES) : 1,
  localparam int unsigned CW     = $clog2(ENTRIES + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clr,    // synchronous flush, wins over wr and rd
  input  logic                  wr,
  input  logic [WL-1:0][LW-1:0] wdata,
  input  logic                  rd,
  output logic [RL-1:0][LW-1:0] rdata,
  output logic [CW-1:0]         count,
  output logic [CW-1:0]         free
);
  logic [ENTRIES-1:0][LW-1:0] mem;
  logic [ENTRIES-1:0]         en;
  logic [PW-1:0]              wptr, rptr;

  ocp_ahb_decoder #(.ENTRIES(ENTRIES), .WL(WL)) u_dec (.wr(wr), .wptr(wptr), .en(en));
  ocp_ahb_mux #(.ENTRIES(ENTRIES), .LW(LW), .RL(RL)) u_mux (.entries(mem), .rptr(rptr), .q(rdata));

  assign free = CW'(ENTRIES) - count;

  always_ff @(posedge clk) begin
    for (int unsigned i = 0; i < ENTRIES; i++) begin
      if (en[i]) mem[i] <= wdata[(i - 32'(wptr)) % WL];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clr) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (wr) wptr <= PW'((32'(wptr) + WL) % ENTRIES);
      if (rd) rptr <= PW'((32'(rptr) + RL) % ENTRIES);
      count <= count + (wr ? CW'(WL) : '0) - (rd ? CW'(RL) : '0);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n || clr) wr |-> free >= CW'(WL));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n || clr) rd |-> count >= CW'(RL));
endmodule
