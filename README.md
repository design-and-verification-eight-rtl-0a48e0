# Eight-port packet router for a network on chip

A network on chip replaces a shared bus with small routers that pass
packets between cores. This router has eight ports: one input port, where a
core pushes packets in one byte per clock, and seven output ports, each with
its own 16-byte FIFO. The router reads the destination address from the
packet's header and copies the whole packet into that port's FIFO. It checks
the packet's parity byte as the packet goes through, and it holds the source
back when the destination FIFO is full. The reader on each output pulls
bytes out at its own pace.

```
             +-----------+   +-----------+   +----------------+   +-----------+
 data_in --->| router_reg|-->| held byte |-->| router_decoder |-->| FIFO 0..6 |--> data_out[i]
 packet_valid|  data,    |   +-----------+   | address decode |   | 8 x 16    |<-- read_enb[i]
   |         |  parity,  |--> err            | write enables  |   +-----------+--> vld_out[i]
   v         |  status   |                   +----------------+
 router_fsm -+ ld_header / ld_data / ld_parity       | dest_full
   ^                                                 |
   +-------------------------------------------------+  suspend_data --> source
```

## Packet format

A packet is a run of 8-bit bytes:

| byte        | content                                              |
|-------------|------------------------------------------------------|
| 0 (header)  | `[2:0]` destination address, `[7:3]` payload length |
| 1 .. N      | payload, N = 0..31 bytes                             |
| N+1         | parity: the XOR of the header and all payload bytes  |

Each output port has its own address, set by the `PORT_ADDR` parameter
table; by default port `i` has address `i`, so addresses 0..6 select a port.
A packet whose address matches no port (7 by default) is dropped. The router itself does not
use the length field, because the input is framed by `packet_valid`. The
length field is there for the reader at the output, which uses it to find
where each packet ends in its byte stream.

Eight bits cannot hold both a three-bit address for seven ports and a
six-bit length for payloads up to 63 bytes. This design keeps the full
address and cuts the length field to five bits, so payloads of 0..31 bytes.
The router forwards a longer packet unchanged, but its header cannot state
its length. See "Departures and open points".

## Input port: framing and suspend

Signals: `data_in[7:0]`, `packet_valid`, `suspend_data`, `err`.

* `packet_valid` rises with the header and stays high through the payload.
* The byte presented in the first cycle after `packet_valid` falls is the
  parity byte.
* Bytes of one packet must be back to back. A new header may follow the
  parity byte in the very next cycle.
* A byte is taken at a rising edge at which `suspend_data` is low. While
  `suspend_data` is high, the source must hold `data_in` and `packet_valid`
  unchanged.

The controller (`router_fsm`) has two states. `DECODE_ADDRESS` lies between
packets; in it, a byte with `packet_valid` high is a header. `LOAD_DATA`
lies inside a packet; in it, bytes are payload while `packet_valid` is high,
and the first byte with it low is the parity byte. For each byte it takes,
the controller pulses one of `ld_header`, `ld_data` or `ld_parity` to the
register block (`router_reg`).

**Flow control is the subtle part.** Between the input and the FIFOs sits
one holding register. At every edge the byte in that register moves into
its FIFO, and the next input byte takes its place, so bytes pass at one per
clock. If the held byte's FIFO is full, the byte cannot move. Then the
register cannot take a new byte, so `suspend_data` goes high. The rule is
simply `suspend_data = held_valid && dest_full`. Both terms are register
outputs, so `suspend_data` has no combinational path from `data_in` or
`packet_valid` and is stable for the whole cycle. A FIFO that is full at an
edge does not accept a write at that edge, even if its reader frees a slot
at the same edge. `suspend_data` therefore drops one cycle after the reader
makes room. `suspend_data` can also be high between packets: this happens
while the previous packet's parity byte is still waiting for room.

The destination address is latched together with the header. It applies to
every byte up to and including the parity byte, even when the next packet's
header is already arriving.

## Parity check

The parity register loads the header and XORs in every payload byte. When
the parity byte arrives, the two are compared. On a mismatch, `err` is high
for exactly the one cycle after the parity byte is taken. The packet is
still delivered, parity byte included, so the reader can decide what to do
with it.

## Output ports

Each port `i` has `data_out[i]`, `vld_out[i]` and `read_enb[i]`.
`vld_out[i]` is high while port `i`'s FIFO holds data. A byte is read at
each rising edge where `read_enb[i]` and `vld_out[i]` are both high, and it
appears on `data_out[i]` in the next cycle. `data_out` keeps its value
until the next read. A `read_enb` while the FIFO is empty does nothing. A
FIFO can be read and written at the same edge.

`router_fifo` is an 8 x 16 circular buffer with an occupancy counter.
Its reset is synchronous and active low, and it gives `full = 0`,
`empty = 1` and `data_out = 0`.

## Timing

* Header taken at edge k, written into its FIFO at edge k+1, and `vld_out`
  high after edge k+1. This holds when the FIFO was empty and not full.
* Throughput is one byte per clock while the destination FIFO has room. A
  packet of n bytes is taken in n cycles.
* `err` is high in the cycle after the parity byte's edge.
* Reset (`resetn` low at a rising edge) is synchronous for every register.
  The FIFO storage arrays are not cleared, only their pointers.

## Files and parameters

| file                    | module           | role                                              |
|-------------------------|------------------|---------------------------------------------------|
| `rtl/router_pkg.sv`     | package          | byte and header types, header field helpers, FSM states |
| `rtl/router_fifo.sv`    | `router_fifo`    | output FIFO, `WIDTH = 8`, `DEPTH = 16`            |
| `rtl/router_reg.sv`     | `router_reg`     | data, status and parity registers; `err`          |
| `rtl/router_fsm.sv`     | `router_fsm`     | input framing, load strobes, `suspend_data`       |
| `rtl/router_decoder.sv` | `router_decoder` | address latch and decode, write enables, `vld_out`|
| `rtl/router_top.sv`     | `router_top`     | the router, `NUM_OUT = 7`, `FIFO_DEPTH = 16`, `PORT_ADDR` |

`NUM_OUT` can be lowered. With the three-bit address field it can be at
most 8; at 8, no address is left for dropping packets. `PORT_ADDR` entry
`i` is the address of port `i`; entries at and above `NUM_OUT` are unused. `FIFO_DEPTH` can be
any value of at least 1.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_router_fifo` checks every edge against a queue model. It covers
  fill, overflow attempt, drain, underflow attempt, reset mid-fill, read
  and write together at full and at empty, and random traffic.
* `tb_router_reg` checks the held byte, the valid flag, the running parity
  and the `err` pulse over 400 random packets. About a third of them carry a
  wrong parity byte.
* `tb_router_fsm` sends framed packets with a randomly full destination
  and checks the order of the loads. It then checks random inputs, cycle by
  cycle, against a reference model.
* `tb_router_decoder` checks the address latch, the write enables,
  `dest_full`, `drain` and `vld_out` against a model, using a shuffled
  `PORT_ADDR` table. It covers all eight addresses.
* `tb_router_top` runs the router at its default size. It first checks the
  two-edge header-to-`vld_out` latency and one-byte-per-clock throughput.
  It then sends 1500 random packets to all eight addresses while seven
  readers run at changing rates. Per-port scoreboards check every byte
  delivered. Each reader re-frames its stream using the header length, and
  every `err` pulse is matched to a bad parity byte. The test also counts
  how often suspend, a full FIFO on each port, parity errors, dropped
  packets, back-to-back packets and simultaneous FIFO read and write
  happen, and it fails if any of them never happens.

* `tb_router_waveforms` replays the basic input and output protocol
  sequence on port 0. Packet 1 has three payload bytes and a wrong parity
  byte, so `err` pulses once. Packet 2 is longer than the FIFO and arrives
  while the reader is idle, so `suspend_data` rises mid-packet. The reader
  then starts after a delay and must receive both packets byte for byte.

To run one with Verilator, for example the full router:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/router_pkg.sv rtl/router_fifo.sv rtl/router_reg.sv rtl/router_fsm.sv \
  rtl/router_decoder.sv rtl/router_top.sv tb/tb_router_top.sv \
  --top-module tb_router_top -o sim
./obj_dir/sim
```

The RTL contains concurrent assertions: the FIFO count stays in range, at
most one load strobe fires per cycle, a held byte is never overwritten,
write enables are one-hot or zero, and no full FIFO is written. Pass
`--assert` to enable them.

## Departures and open points

* **Seven outputs, not eight.** A symbol of the router draws eight output
  groups, but the description names seven output ports and seven FIFOs. The
  eighth port is the input port. This design has seven outputs.
* **Header split.** One header byte holds both the address and the length,
  as in the packet format. The description also calls the address and the
  length 8 bits each, with lengths 0..63. Those sizes do not fit in one
  byte with the seven-port address, so the length here covers 0..31.
* **Parity function.** Only "calculated over the header and data" is
  given. XOR is this design's choice.
* **Store and forward.** Every byte is stored in the holding register and
  then in the output FIFO before it leaves. However, `vld_out` rises as soon
  as the header is in the FIFO, not after the whole packet has arrived,
  which matches the output waveform of the router.
* **No arbiter.** A rotating-priority arbiter is mentioned, but with a
  single input port no two inputs ever compete for an output, so none is
  built.
* **Cause of `suspend_data`, timing of `err`, fate of address 7.** None of
  these is specified. The choices above are this design's own.
* **Port addresses.** Each output port has a unique address, which the
  original calls 8 bits wide. Here the addresses are 3 bits, as wide as the
  header's address field, and come from the `PORT_ADDR` parameter
  (default: port `i` answers to `i`). The entries used must differ.
