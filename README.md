# OCP-AHB bus wrappers

An IP core with an Open Core Protocol (OCP) port can be attached to an AMBA 2.0 AHB bus
through one of two wrappers. The IP core itself is not changed.

- The **master wrapper** lets an OCP master (a core that issues requests) act as an AHB bus
  master.
- The **slave wrapper** lets an OCP slave (a core that answers requests) act as an AHB slave.

The two buses work in different ways, and that difference is what the wrappers handle.

- **OCP side.** Transfers are "single request, multiple data" (SRMD). The core sends one
  request: a command, a start address and a burst length. It then streams the data words with
  their own handshake.
- **AHB side.** Each beat has its own address phase, and the bus is pipelined: the address of
  beat *n+1* is driven while the data of beat *n* moves. A slave may stretch any beat with wait
  states (HREADY low). A slave may also reject a beat with RETRY, SPLIT or ERROR, and the bus
  may be taken away from a master in mid-burst.

Both wrappers are built from the same parts:

- a controller (the MI FSM in the master wrapper, the SI FSM in the slave wrapper);
- a write buffer and a read buffer (two words each by default), each with a decoder on its input and a
  multiplexer on its output;
- optional registers on the OCP side, called "register in" (RI) and "register out" (RO).

Each wrapper also has an address generator, loaded by its controller's AddrEn.

`ocp_ahb_system` joins the two wrappers over one AHB:

OCP master IP → master wrapper → AHB → slave wrapper → OCP slave IP.

## Source files

| file | what it is |
|---|---|
| `rtl/ocp_ahb_pkg.sv` | Shared package: widths, OCP/AHB encodings (enums), the OCP request struct, and the mapping between burst length and HBURST. |
| `rtl/ocp_ahb_master_wrapper.sv` | Master wrapper: RI, MI FSM, address generator, write/read buffers, RO. |
| `rtl/ocp_ahb_mi_fsm.sv` | MI FSM: turns an OCP request into an AHB burst. |
| `rtl/ocp_ahb_slave_wrapper.sv` | Slave wrapper: SI FSM, address generator, write/read buffers, RO on the request and write data, RI on the response. |
| `rtl/ocp_ahb_si_fsm.sv` | SI FSM: turns AHB beats into OCP requests. |
| `rtl/ocp_ahb_addr_gen.sv` | Address generator: start address + 4 × beat index, with rewind. |
| `rtl/ocp_ahb_buffer.sv` | Small FIFO built from the decoder, the entry registers and the multiplexer. It can push several 32-bit lanes at once or pop several at once. |
| `rtl/ocp_ahb_decoder.sv` | Write-entry decoder: turns the write pointer into entry enables. |
| `rtl/ocp_ahb_mux.sv` | Read multiplexer: selects the entries at the read pointer. |
| `rtl/ocp_ahb_reg_slice.sv` | RI/RO register for a valid/accept channel: a two-entry skid buffer, or wires. |
| `rtl/ocp_ahb_reg_stage.sv` | RI/RO register for a channel with no back-pressure, or wires. |
| `rtl/ocp_ahb_system.sv` | Top: master wrapper + slave wrapper on one AHB. |

## OCP signals used

Only a small part of OCP is used.

**Request**

| signal | width | meaning |
|---|---|---|
| `MCmd` | 3 | 000 = IDLE, 001 = WR, 010 = RD |
| `MAddr` | 32 | byte address of the first word |
| `MBurstLength` | 5 | 1..16 words |
| `SCmdAccept` | 1 | the request is accepted |

**Write data**

`MData` is qualified by `MDataValid` and accepted with `SDataAccept`. On the slave wrapper's
OCP port, `MDataByteEn` (one bit per byte) comes with each word.

**Read data**

`SData` comes with `SResp` (DVA = data valid, ERR = error). Only the slave wrapper's port has
`MRespAccept`.

**Other rules**

- Writes are posted: no response is returned for them.
- Bursts are incrementing, with 32-bit words (HSIZE = 010).
- A burst must not cross a 1 KB address boundary, the AHB limit.

On the AHB side the wrappers use HADDR, HTRANS, HWRITE, HSIZE, HBURST, HPROT, HWDATA,
HRDATA, HREADY and HRESP. The master wrapper also uses HBUSREQ and HGRANT. The slave wrapper
also uses HSEL, HREADYOUT, HMASTER and HSPLIT. HPROT is a constant data access.

## Master wrapper and MI FSM

### One request, many beats

When the FSM is idle it accepts a request (SCmdAccept = 1). It then does the following:

1. Loads the address generator with MAddr (AddrEn).
2. Raises HBUSREQ.
3. Once HGRANT is seen with HREADY high, issues the beats:
   - NONSEQ for the first beat, SEQ for the rest;
   - HADDR = start + 4 × index;
   - HBURST chosen from the number of beats: 1 → SINGLE, 4/8/16 → INCR4/INCR8/INCR16,
     any other length → INCR.

The AHB address and control outputs are registers. They change only on a clock edge where
HREADY is high, so they are held through wait states as AHB requires.

**Writes.** The IP's words go into the write buffer through the decoder (WB_wr). The FSM
reserves one buffered word for each write beat it puts on the bus, so a beat is only issued
when its data is there. When the data is not there yet, the FSM drives:

- IDLE if it is the burst's first beat;
- BUSY inside a burst.

The buffer is popped (WB_rd) when the beat's data phase completes.

**Reads.** Each completed beat is pushed into the read buffer (RB_wr). A beat is only issued
when there is room for it. Words leave the read buffer as SResp = DVA one cycle later. A word
that had an ERROR beat leaves as SResp = ERR.

The buffers hold two OCP words. One word is enough for full speed at zero wait states; the
second absorbs the one-cycle register delays on the OCP side.

### RETRY, SPLIT, lost grant, ERROR

This is the part of the design that is easiest to get wrong.

A slave answers RETRY, SPLIT or ERROR over two cycles, both with HREADY low. When the beat
fails, the next beat's address phase is already on the bus.

**In the first response cycle**, the FSM does three things:

- drives HTRANS = IDLE, which cancels the next beat (AHB requires this);
- rewinds the address generator's index to the failed beat;
- takes back the write-data reservation of the cancelled beat.

**RETRY.** The burst restarts from the failed beat with NONSEQ. HBURST becomes INCR because
the remaining length no longer matches a fixed burst; it is SINGLE if one beat is left.

**SPLIT.** The same restart happens, but only when the arbiter grants the bus again.

**Lost grant.** If HGRANT drops while beats are still due, the last address phase that was
granted completes normally. The rest of the burst is then restarted in the same way when the
grant returns.

**ERROR.** ERROR is not retried. The failed beat counts as done:

- a read word is flagged and reaches the IP as SResp = ERR;
- a write word is dropped.

The burst then continues from the next beat, again with NONSEQ.

Because the index, not the address, is rewound, a restarted write takes its data from the
right buffer entry. The buffer is popped only for completed beats, so a failed beat's word is
still at the head of the buffer.

### 32/64-bit conversion

With `OCP_DW = 64`:

- each OCP word is two AHB beats at consecutive addresses, low half first;
- a 16-word request becomes a 32-beat INCR burst (8 words become INCR16);
- the write buffer takes a 64-bit word as two 32-bit entries in one push;
- the read buffer gives two entries in one pop;
- a read word is flagged ERR if either half got ERROR.

The AHB side stays 32 bits wide. The slave wrapper has the same option for the slave IP; see
below.

## Slave wrapper and SI FSM

The SI FSM samples every address phase that selects it: HSEL with NONSEQ or SEQ, and HREADY
high.

### Starting an OCP transaction

A NONSEQ beat starts one OCP transaction, which the code calls the "engine". The FSM loads
the beat's HADDR into the address generator (AddrEn), whose output is the request's MAddr.
The request has one address for the whole burst, so on this side the generator is never
stepped.

- INCR4, INCR8 and INCR16 become one request with MBurstLength 4, 8 or 16. This is the SRMD
  form.
- SINGLE, undefined-length INCR and WRAP bursts become one single-word request per beat. Their
  length is not known in advance, and wrapping addresses cannot be described by an OCP
  incrementing burst.

**Writes.** Each beat's HWDATA goes into the write buffer. HREADYOUT is low while the buffer is
full. The engine sends the request, then the words from the buffer with byte enables 1111.

**Reads.** The beat waits (HREADYOUT low) until the IP's word is at the head of the read
buffer. The IP's responses are accepted (MRespAccept) while there is room. The beat then
completes with HRDATA from the buffer.

### When the previous transaction is still busy

The AHB side can run ahead of the OCP side: a posted write burst may still be draining into
the IP when the next burst starts.

- **A NONSEQ that needs a new transaction** is answered with a two-cycle SPLIT, or with a
  two-cycle RETRY when the parameter `SPLIT` is 0. The read or write is carried out only
  when the beat is finally accepted, so a busy IP never locks the bus.
  - **RETRY:** the master simply tries again.
  - **SPLIT:** the wrapper records the master's number (HMASTER, taken with the address
    phase) in a 16-bit mask, and the arbiter keeps that master off the bus. In the first
    cycle in which the engine is free and no response is being given, the mask is driven on
    HSPLIT for one cycle and cleared. The arbiter may then grant those masters again, and
    they repeat the beat. Several masters may be split at once; they are all released
    together and the first to return gets the engine.
- **A SEQ that needs a new request** (an INCR or SINGLE-per-beat sequence) waits with
  HREADYOUT low instead. A RETRY in mid-burst would make the master restart with INCR, and
  the request could then no longer match the burst.

### Error

A read word returned by the IP with SResp = ERR is answered to the AHB master with a two-cycle
ERROR response.

### Bursts that end early

An AHB master may end a fixed-length burst early, for example after losing the bus. The
SI FSM counts how many beats of the announced length have been seen. A NONSEQ, or IDLE while
the count is not zero, tells it the burst is over. The OCP request has already been sent with
the full length, so:

- **Write:** the missing words are sent with `MDataByteEn = 0000`. The IP completes its burst
  and writes no bytes.
- **Read:** words already in the read buffer are flushed, and words still to come from the IP
  are accepted and dropped.

The next transaction starts only after this clean-up. A master that arrives meanwhile gets
SPLIT or RETRY (NONSEQ), or waits (SEQ).

### 32/64-bit conversion

With `OCP_DW = 64` the slave IP has a 64-bit port, while the AHB beats stay 32 bits. Each
transaction is handled in one of two ways.

**Paired.** This applies to a fixed-length burst (INCR4/8/16) whose first address is 8-byte
aligned.

- It becomes one request of 2, 4 or 8 OCP words.
- Each word carries two consecutive beats, the lower address in the low half.
- On writes, a packer holds the low beat until the high beat arrives, then sends the word.
- On reads, an unpacker hands out the low half and then the high half of each word.
- If the burst ends early, the remaining beats are still padding beats, so a word may carry
  byte enables on one half only.

**Single.** This applies to every other beat: an unaligned burst, SINGLE, INCR or WRAP.

- Each beat becomes a one-word request at its 8-byte-aligned address.
- A write sets byte enables on the beat's half only.
- A read takes the half that address bit 2 selects.

Buffer entries stay 32 bits (one beat each); the buffers are sized in OCP words, so they hold
two beats per word. An ERR from the IP marks both halves of the word.

## Register in / register out versions

`REG_IN` and `REG_OUT` (both default 1) give the four versions:

| REG_IN | REG_OUT | version |
|---|---|---|
| 0 | 0 | no registers |
| 1 | 0 | input registers only |
| 0 | 1 | output registers only |
| 1 | 1 | both |

Each register cuts the combinational path between the IP and the wrapper's logic. It adds one
clock of latency on its path.

- **Channels with a handshake** use a two-entry skid buffer (`ocp_ahb_reg_slice`). Valid, data
  and accept are all registered, and the channel still carries one word per clock.
- **The master wrapper's read response** has no back-pressure, so a plain register
  (`ocp_ahb_reg_stage`) is enough.

"In" and "out" are seen from the wrapper:

| wrapper | RI (inputs) | RO (outputs) |
|---|---|---|
| master | OCP request, write data | read response |
| slave | read response | request, write data to the IP |

## Top level

`ocp_ahb_system` has these parameters:

| parameter | default | meaning |
|---|---|---|
| `OCP_DW` | 32 | width of the master IP's OCP data port (32 or 64) |
| `S_OCP_DW` | 32 | width of the slave IP's OCP data port (32 or 64) |
| `BUF_WORDS` | 2 | depth of each buffer, in OCP words |
| `REG_IN` | 1 | input registers on |
| `REG_OUT` | 1 | output registers on |
| `SPLIT` | 1 | slave wrapper answers a busy IP with SPLIT (0: RETRY) |

Its ports:

- the master IP's OCP port (`m_*`);
- the slave IP's OCP port (`s_*`);
- `HBUSREQ` and `HSPLIT` out, and `HGRANT`, `HSEL` and `HMASTER` in, for an external arbiter
  and address decoder;
- the AHB bus signals, out for observation.

The slave wrapper is the only slave, so its HREADYOUT, HRESP and HRDATA are the bus's.

## Buffer size

The buffers exist so that a burst can keep moving while the other side catches up. Their
depth, `BUF_WORDS`, is a parameter. With the default of two words, one side can fill one
entry while the other side empties the other.

`tb_ocp_ahb_buffer_study` measures the effect with nothing stalling: no IP stalls, no wait
states, and a grant whenever asked. It sends 8 write bursts of 16 words, then 8 read bursts
of 16 words, with RI and RO on.

| BUF_WORDS | 128 words written | 128 words read |
|---|---|---|
| 1 | 523 cycles | 571 cycles |
| 2 | 275 cycles | 323 cycles |
| 4 | 164 cycles | 211 cycles |

Throughput in this design keeps rising past two words. The write burst at the default
depth shows why:

- The master wrapper keeps a write word in its buffer until that word's AHB data phase has
  ended, because the word must be sent again after RETRY or SPLIT.
- With RI on, an entry is therefore busy for about four cycles from the moment it is filled.
- So two entries carry two words every four cycles, and the master puts two BUSY beats on
  the AHB in every four.

Reads behave the same way through the read buffers. Raise
`BUF_WORDS` where bandwidth matters more than area. The cost is `BUF_WORDS` × 32 flip-flops
per buffer, and there are four buffers in the system.

## Where this design is its own

The wrapper structure, the list of features and the signal widths come from the original
description of the wrappers. The following are choices made here:

- **Signals and handshakes.** The OCP signal set, the handshakes, and posted writes.
- **Slave wrapper:**
  - **SPLIT or RETRY for a busy IP.** It answers SPLIT or RETRY only when the IP is still
    busy with the previous transaction. That rule is a choice made here.
  - **Unaligned bursts with a 64-bit IP.** When the IP port is 64 bits wide, a burst that
    is not 8-byte aligned goes to the IP beat by beat, not as one request.
  - **Address generator only holds the address.** The OCP request carries only the start
    address, so the generator is never stepped.
- **Buffer depth.** Two words per buffer by default (see "Buffer size"), and one OCP transaction in progress per wrapper.
- **Built-in in-circuit emulation (ICE).** This debug logic is not included.
- **Arbiter and decoder.** The AHB arbiter and address decoder are not part of the design.
- **Reset.** Synchronous, active-low reset (`rst_n`) on all state.

## Testbenches

Each testbench checks its outputs against a model and prints
`TB_RESULT checks=<n> failures=<n>`. A watchdog ends a run that hangs.

**Unit testbenches**

- `tb_ocp_ahb_buffer`: random push/pop at several lane counts.
- `tb_ocp_ahb_addr_gen`: addresses, load and rewind.
- `tb_ocp_ahb_reg_slice`: random valid/accept; the data order and full throughput are
  checked.
- `tb_ocp_ahb_reg_stage`: latency and wiring.

**Wrapper testbenches**

- `tb_ocp_ahb_master_wrapper` runs random OCP traffic against `tb_ahb_slave_model`. The model
  is an AHB memory slave and arbiter that:
  - adds random wait states;
  - answers RETRY and SPLIT;
  - answers ERROR at one address;
  - drops the grant in mid-burst;
  - checks the AHB rules (held signals, IDLE after a failed beat, SEQ addresses, HBURST).

  It runs all four register versions and the 64-bit port.
- `tb_ocp_ahb_slave_wrapper` drives AHB bursts of every kind against `tb_ocp_slave_model`, an
  OCP memory with random stalls and an error address. The bursts include early-terminated
  bursts, and back-to-back bursts that get SPLIT (two register versions) or RETRY (the other
  two). Each burst uses a random HMASTER number. After a SPLIT the master waits until exactly
  its HSPLIT bit pulses. A fifth run uses a 64-bit IP port. Most of its bursts are aligned so
  that paired words and padded words occur.

**System testbenches**

- `tb_ocp_ahb_system` runs the whole path in five configurations: the four register versions
  with 32-bit IPs, and 64-bit ports on both IPs. In two of the 32-bit configurations the slave
  wrapper answers a busy IP with RETRY instead of SPLIT. The arbiter model keeps a split master
  off the bus until its HSPLIT bit is seen. The testbench counts the following and fails if
  any of them never happened:
  - OCP bursts, INCR4/8/16 bursts, SINGLE transfers and SEQ beats;
  - slave-IP stalls on the request, write data and response;
  - wait states, RETRY/SPLIT responses, BUSY beats and lost grants;
  - errors returned to the master.
- `tb_ocp_ahb_system_full` runs the top at its default parameters.
- `tb_ocp_ahb_buffer_study` runs the same stall-free traffic through the top at
  `BUF_WORDS` = 1, 2 and 4 (see "Buffer size"). It checks the read data and that a larger
  buffer is never slower.

### Running

To run a testbench with plain Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -y rtl -y tb +libext+.sv \
    rtl/ocp_ahb_pkg.sv tb/tb_ocp_ahb_system.sv --top-module tb_ocp_ahb_system
./obj_dir/Vtb_ocp_ahb_system
```

Replace `tb_ocp_ahb_system` with any other testbench name. The RTL modules synthesize with
Yosys through its SystemVerilog (slang) front end; top is `ocp_ahb_system`.
