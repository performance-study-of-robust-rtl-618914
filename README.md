# Store-and-forward packet router: one 8-bit input, three outputs

This router takes byte-wide packets on a single input port. It delivers
each packet, whole and unchanged, to one of three output ports, chosen by
the packet's first byte. The router holds every packet in the
destination port's buffer until the packet has arrived completely and its
check byte has been verified. It then offers the packet to the reader on
that port. A packet that fails its check never appears on any output. The
sender is told to pause when a buffer has no room. The sender and every
reader can therefore run at their own pace.

The structure is small: an input register, a demultiplexer and one FIFO
per output port. An FSM controller and an address decoder steer them. The
parts that need care are the controller's byte-by-byte tracking of the
packet and the FIFO's separate write and commit pointers. Most of this
document covers those two parts.

## Packet format

One byte per transfer, in this order:

| byte       | meaning                                                            |
|------------|--------------------------------------------------------------------|
| 0: DA      | destination address; selects the output port                       |
| 1: L       | number of data bytes, 0 to `MAX_LEN` (62)                           |
| 2 .. L+1   | data, any values                                                   |
| L+2: check | XOR of bytes 0 .. L+1                                               |

A packet is therefore 3 to 65 bytes long. Output port `k` answers to
`DA = ADDR_BASE + k`. With the default `ADDR_BASE = 8'hF8`, port 0 is
`8'hF8`, port 1 is `8'hF9` and port 2 is `8'hFA`. The router drops three
kinds of packet:

* **Unknown address.** No port owns the DA. The packet is consumed and
  thrown away silently.
* **Too long.** L is above `MAX_LEN`. The packet is consumed and thrown
  away, and `err` pulses.
* **Bad check.** The check byte differs from the XOR of the other bytes.
  The packet is thrown away, and `err` pulses.

The router counts bytes with L. It does not use `packet_valid` to find
where a packet ends.

## Block structure

```
             +-------------+
data_in -+-->| data_register|--reg_q--> write_demux --+--> output_fifo 0 --> ch_out[0], valid_channel[0]
         |   +-------------+              ^  ^        +--> output_fifo 1 --> ch_out[1], valid_channel[1]
         |        ^ reg_en                |  | sel,   +--> output_fifo 2 --> ch_out[2], valid_channel[2]
         |        |                       |  | wr/commit/discard     |
         +--> addr_decoder --hit/idx--> router_fsm <--- fifo_full ----+
                                          |
               packet_valid ------------->+----> suspend_data_in, err
```

| module          | role                                                                      |
|-----------------|---------------------------------------------------------------------------|
| `router_top`    | wires the blocks; active-low `resetn`; port addresses from `ADDR_BASE`    |
| `data_register` | 8-bit register: rising edge, active-high enable, active-high async clear |
| `addr_decoder`  | compares the DA byte with every port address; returns hit and port index |
| `router_fsm`    | controller: packet tracking, suspend, check, commit/discard, err         |
| `write_demux`   | sends the register's byte and the write/commit/discard strobes to one FIFO |
| `output_fifo`   | per-port buffer with a commit pointer (store and forward)                 |
| `router_pkg`    | byte type, default address base and length limit, controller state enum  |

## The controller (`router_fsm`)

The controller has four states. Each state names the field that the next
input byte belongs to: `ST_DA`, `ST_LEN`, `ST_DATA` and `ST_FCS`.

A byte is **taken** in any cycle where `packet_valid=1` and
`suspend_data_in=0`. A taken byte goes into the input register at that
clock edge. The controller records three things about it: whether it must
be written, whether it is the packet's last byte, and whether its packet
is bad. One cycle later the byte leaves the register and is written into
the FIFO chosen by `sel`. So every byte passes through a one-stage
pipeline.

Per field:

* **DA.** The decoder looks at `data_in` directly, so `sel` is known at
  the same edge that loads the DA byte. The XOR accumulator restarts with
  the DA byte. With no match, the controller sets a *drop* flag. The rest
  of the packet is then counted but never written.
* **L.** L is loaded into a down-counter and accumulated. If L is above
  `MAX_LEN`, the DA byte is already in the FIFO. The L byte is therefore
  marked "last and bad", which discards what was written. `err` pulses
  and the drop flag is set. If L is 0, the next byte is the check byte.
* **Data.** Each byte is accumulated and written, and the counter counts
  down.
* **Check.** The byte is compared with the accumulator and marked as the
  last byte. If they match, writing it also **commits** the packet. If
  they differ, the FIFO gets a **discard** instead of the write, and
  `err` pulses.

**Suspend rule.** `suspend_data_in` is high while the byte in the
register must be written but its FIFO is full. While it is high, nothing
is taken and the register keeps its byte. The sender must hold
`data_in`; an assertion in `router_fsm` checks that it does. The signal
depends only on registers and on the FIFO full flags. It never depends
on `data_in`. A discard is never blocked, because it writes nothing.

**Timing of one packet**, with no suspension and an empty FIFO. The
check byte is taken at edge *t*:

| edge  | what happens                                                         |
|-------|----------------------------------------------------------------------|
| t     | check byte into the input register; `err` goes high if it is wrong   |
| t+1   | check byte written, packet committed (or discarded); `err` back low  |
| after t+1 | `valid_channel` high, first byte (the DA) on `ch_out`             |

Each byte takes one cycle, so throughput is one byte per cycle. A packet
of L data bytes takes L+3 cycles to enter.

## Output buffers (`output_fifo`)

Each FIFO has three pointers:

* a **write pointer**, which advances on every write;
* a **commit pointer**, which jumps to the write pointer when a byte is
  written with `commit=1`;
* a **read pointer**.

The reader sees only bytes between the read and commit pointers. A
packet that is still arriving is therefore invisible.

A `discard` moves the write pointer back to the commit pointer, which
erases the unfinished packet. `full` compares the write pointer with the
read pointer. Bytes that are written but not yet committed still take up
room.

The depth is 128 bytes, which holds two packets of the largest size.
While one packet drains, the next can arrive. The top module checks at
elaboration that the depth is at least one maximum packet. If it were
smaller, a long packet could deadlock its own FIFO.

The read side is first-word-fall-through. While `valid_channel[k]=1`,
`ch_out[k]` holds the oldest committed byte. Setting `re[k]=1` in that
cycle removes it. A read while `valid_channel` is low does nothing. The
ports are read independently and can all be read in the same cycle.

## Interface of `router_top`

| port              | dir | width      | meaning                                       |
|-------------------|-----|------------|-----------------------------------------------|
| `clk`             | in  | 1          | clock, rising edge                            |
| `resetn`          | in  | 1          | asynchronous reset, active low; empties everything |
| `packet_valid`    | in  | 1          | a packet byte is on `data_in`                 |
| `data_in`         | in  | 8          | packet byte                                   |
| `suspend_data_in` | out | 1          | hold `data_in`; it is not taken this cycle    |
| `err`             | out | 1          | one-cycle pulse: a packet was dropped for a bad check or length |
| `re`              | in  | N_PORTS    | read enable per port                          |
| `valid_channel`   | out | N_PORTS    | a byte is available per port                  |
| `ch_out`          | out | N_PORTS x 8| head byte per port                            |

Parameters: `N_PORTS` (3), `MAX_LEN` (62), `FIFO_DEPTH` (128, a power of
two, at least `MAX_LEN + 3`) and `ADDR_BASE` (`8'hF8`).

## What follows the source description and what is this design's own

These points follow the source description:

* a router with one input and three outputs;
* 8-bit bytes, an 8-bit destination address and an 8-bit length;
* a header made of a DA byte and a length byte, then data, then a frame
  check byte computed over the header and the data;
* a unique 8-bit address per port;
* store-and-forward flow control;
* an 8-bit input register with a rising-edge clock, an active-high enable
  and an active-high asynchronous clear, feeding a demultiplexer;
* an FSM controller that produces `err` and `suspend_data_in`;
* an output block of per-port FIFOs;
* the signal names `packet_valid`, `data_in`, `re`, `valid_channel`,
  `ch_out` and `resetn`;
* the routing example where DA `8'hF8` goes to the first channel and
  `8'hF9` to the second.

These are this design's own choices:

* **Length limit.** The source gives both 33 and 62 as the largest data
  length. This design takes 62, which also covers every packet of the
  33-byte reading.
* **Check byte.** It is an XOR, because the kind of check is not
  specified.
* **FSM.** The states, the suspend rule and the one-stage pipeline.
* **Dropped packets.** Bad packets are dropped by rewinding the FIFO.
  Packets with an unknown address are dropped silently.
* **Reset polarity.** The top's reset is active low, and the internal
  reset is active high.
* **Read handshake and depth.** The first-word-fall-through read
  handshake and the FIFO depth.
* **Third port address.** The address of the third port, `8'hFA`,
  continues the pattern of the first two.

The main configuration has three output ports. The reference waveform
shows four channels, and a five-port router is also mentioned. Both are
available by setting `N_PORTS` and are covered by `tb_router_wide`.

## Simulation

Every testbench checks itself and ends by printing
`TB_RESULT checks=N failures=M`. Each has a watchdog.

| testbench          | what it covers                                                          |
|--------------------|-------------------------------------------------------------------------|
| `tb_data_register` | load, hold and asynchronous clear against a reference value             |
| `tb_addr_decoder`  | all 256 DA values; duplicate addresses (lowest port wins)               |
| `tb_write_demux`   | random selects and strobes; unselected ports stay quiet                 |
| `tb_output_fifo`   | random packets with commit or discard, slow and fast reader, full flag  |
| `tb_router_fsm`    | controller with modelled register, decoder and FIFOs; random full flags; err timing |
| `tb_router_top`    | whole router at default parameters (see below)                          |
| `tb_router_wide`   | the same traffic on 4-port and 5-port instances (`router_env`)           |

`tb_router_top` first sends the routing example and checks that only the
expected port offers data. It then sends 1500 random packets, mixing
good, bad-check, unknown-address and over-long packets. Zero-length and
maximum-length packets are included. Each port's reader alternates
between slow and fast phases, so buffers fill and the sender is
suspended. Against a reference model, the testbench checks the following
every cycle:

* every byte read;
* that no byte of an unfinished packet is ever offered;
* that each completed packet is offered within one cycle;
* the exact cycle of every `err` pulse.

It counts how often each mechanism occurred: suspend, each kind of drop,
zero and maximum length, a nearly full FIFO, simultaneous reads and use
of every port. A mechanism that never occurred counts as a failure.

Build and run with Verilator 5, from the directory above `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv -Irtl -Itb \
    rtl/router_pkg.sv tb/router_tb_pkg.sv tb/tb_router_top.sv \
    --top-module tb_router_top -o sim
./obj_dir/sim
```

To run another test, replace `tb_router_top` with its name. The block
testbenches that do not use the packet package can leave out
`tb/router_tb_pkg.sv`. All RTL is synthesizable. The assertions in
`router_fsm` and `output_fifo` state the handshake rules: no write into
a full FIFO, commit only with a write, and the sender holds its byte
while suspended.

## Limits

* There is one input port, so there is no arbitration between inputs.
* A packet is routed by exact address match only. There is no routing
  table.
* A packet whose `packet_valid` stops part-way is not detected. The
  controller waits for the remaining bytes that L announced.
* If a FIFO stays full because its reader never reads, it stalls the
  input. That stops traffic to every port (head-of-line blocking).
