# A three-master, four-slave AMBA AHB bus system

This is a small on-chip bus built to the AMBA AHB (Advanced High-performance
Bus) protocol. Three bus masters share one pipelined address/data bus to
reach four memory slaves. A fixed-priority arbiter decides which master may
drive the bus. A decoder picks the slave from the address. A set of central
multiplexers routes the chosen master's signals to the slaves, and the chosen
slave's answer back to the masters. Every AHB mechanism needed for this is
implemented in synthesizable SystemVerilog:

- request/grant arbitration;
- the HMASTER owner number;
- single transfers and all eight burst types;
- BUSY cycles inside a burst;
- wait states;
- the ERROR, RETRY and SPLIT responses, with the HSPLITx release.

```
   master 0 ─┐ HBUSREQ/HGRANT  ┌──────────┐
   master 1 ─┼────────────────▶│ arbiter  │── HMASTER ─┐
   master 2 ─┘                 └──────────┘            ▼
      │  addr/ctrl/wdata        ┌───────────────────────────┐  HADDR  ┌─────────┐
      └────────────────────────▶│ mux: addr/ctrl by HMASTER │────────▶│ decoder │─ HSELx
                                │      wdata by HMASTER(d)  │         └─────────┘   │
      ┌─────────────────────────│      rdata/HREADY/HRESP   │◀── slaves 0..3 ◀──────┘
      ▼  HRDATA/HREADY/HRESP    │      by HSELx(d)          │
   all masters                  └───────────────────────────┘
```
`(d)` marks a select that has been delayed into the data phase.

## The pipeline: address phase and data phase

Each transfer has two parts:

- an **address phase**, when the master drives HADDR, HTRANS, HWRITE, HSIZE
  and HBURST;
- a **data phase**, one cycle later, when HWDATA or HRDATA moves and the
  slave answers on HREADY and HRESP.

The phases overlap. While beat *n* is in its data phase, beat *n+1* is
already in its address phase. The one bus-wide HREADY (the HREADYOUT of the
slave now in its data phase) moves the whole pipeline. On a rising edge with
HREADY high:

- the address phase on the bus is accepted, and its slave takes it into its
  data phase;
- the data phase on the bus ends.

While HREADY is low, nothing moves. This is why two selects in the
multiplexer block (`ahb_mux`) are delayed by a register loaded only on
HREADY-high edges:

- HWDATA must come from the master that owned the *previous* address phase;
- HRDATA/HREADY/HRESP must come from the slave selected in the *previous*
  address phase.

The address/control multiplexer uses HMASTER directly. With no slave
selected for the data phase (possible only if `NUM_SLAVES` is not a power of
two), the bus returns HREADY high and OKAY.

## Who owns the bus: HBUSREQ, HGRANT, HMASTER

A master that has a command raises HBUSREQ. The arbiter (`ahb_arbiter`)
drives one-hot HGRANT, which may change in any cycle. A master becomes the
owner on a rising edge where its HGRANT and HREADY are both high. On that
same edge the arbiter loads HMASTER with the new owner's index. So HMASTER
always names the owner of the current address phase, and it follows the
grant by one HREADY-qualified cycle.

The arbiter picks the grant in this order:

1. **Burst protection.** Once the owner starts a fixed-length burst (INCR4/8/16
   or WRAP4/8/16), the arbiter counts the beats from HTRANS and HBURST. It
   keeps the grant with the owner until the last beat is on the bus. The grant
   then moves during that last beat's address phase, so the next master can
   start right after with no idle cycle. A BUSY cycle keeps the grant while
   beats are left. An undefined-length INCR burst keeps the grant while its
   master still requests.
2. **Fixed priority.** Otherwise, the requesting master with the lowest index
   wins. Master 0 has the highest priority.
3. **Parking.** With no request, the grant stays with the current owner, who
   drives IDLE.

Masters that have been split (see below) are masked out of all three steps.

## Transfer types and bursts

HTRANS says what the address phase carries:

| HTRANS | type   | used for |
|--------|--------|----------|
| 00     | IDLE   | no transfer; also how a master fills a cycle it owns but cannot use |
| 01     | BUSY   | pause inside a burst; the slave answers OKAY with no wait and ignores it |
| 10     | NONSEQ | the first beat of a burst, or a single transfer |
| 11     | SEQ    | a later beat; its address follows from the previous one |

Burst addresses step by the transfer size. WRAP bursts wrap at a boundary of
(beats × size) bytes. For example, a WRAP4 of words from 0x38 visits 0x38,
0x3C, 0x30, 0x34. HSIZE may be a byte, a halfword or a word. Sub-word writes
use little-endian byte lanes.

## Responses: wait states, ERROR, RETRY, SPLIT

This is the subtle part of the bus, and the part where the master, the
arbiter and the slave must agree exactly.

**Wait states.** A slave holds HREADYOUT low to stretch a data phase. Slave
*s* of the top level adds `SLV_WAIT[s]` cycles to every data phase: 0, 1, 2
and 0 for slaves 0 to 3. The whole pipeline stalls. The next address phase
stays on the bus until HREADY rises.

**Two-cycle responses.** ERROR, RETRY and SPLIT always take two cycles:

- cycle 1: HREADY is low and HRESP already shows the response;
- cycle 2: HREADY is high and HRESP still shows it.

The first cycle gives the master time to react. On seeing it, the master
turns its next address phase, which is already on the bus but not yet
accepted, into IDLE. So nothing more of the failed command is accepted.

- **ERROR.** The slave answers ERROR for an address beyond its `MEM_DEPTH`
  words. The master ends the command at once: `done` and `done_err` pulse,
  and the rest of the burst is dropped.
- **RETRY.** A slave that cannot serve now asks the master to try again
  later. In this design that is a slave whose `busy` input is high and which
  is not split-capable (slave 3). The master rewinds to the failed beat and
  issues it again as soon as it owns the bus. The arbiter does nothing
  special, so a higher-priority master may get in first.
- **SPLIT.** This is RETRY plus a promise (slave 2 here):
  1. The slave records the HMASTER of the split master.
  2. In the first response cycle, the arbiter masks that master, so it takes
     no part in arbitration. The grant moves to another master in the second
     cycle.
  3. When the slave's `busy` drops and its response has ended, it pulses
     HSPLITx[m] for one cycle. The HSPLITx outputs of all slaves are ORed.
  4. The arbiter unmasks master *m*, which asks again and re-issues the
     failed beat.

  If every master is split, the grant stays with the current owner. No dummy
  master is added.

**Rebuilt bursts.** After a RETRY or SPLIT, or when a master loses its grant
in the middle of a burst, the master cannot simply continue with SEQ. Another
transfer may have come in between. It sends each remaining beat as its own
NONSEQ transfer with HBURST = SINGLE. This is always legal, and the client
sees the same data in the same beat order.

## The master's client interface

A master (`ahb_master`) takes one command at a time:

- `cmd_valid`/`cmd_ready` handshake;
- `cmd_write`, `cmd_addr`, `cmd_size`, `cmd_burst`;
- `cmd_len`, the beat count of an INCR burst (1..16).

Write data is pulled per beat: during each write data phase, the master
shows the beat index on `wr_beat` and drives HWDATA from `wr_data`, which
the client must set from `wr_beat` combinationally. Each read beat that ends
OKAY pulses `rd_valid` with `rd_data` and `rd_beat`. `done` pulses one cycle
after the last response. With the grant already held and a zero-wait slave,
a single transfer takes three cycles from acceptance to `done`. A burst of
*n* beats with *w* wait states takes 2 + n(1+w) cycles. While the client
holds `hold` inside a burst, the master drives BUSY instead of the next SEQ
beat.

## Slaves and memory map

The decoder (`ahb_decoder`) is purely combinational. The top two address
bits pick the slave, so slave *s* owns 0x4000_0000·s to 0x4000_0000·s +
0x3FFF_FFFF. Each memory slave (`ahb_slave`) holds `DEPTH` 32-bit words at
the start of its region. It stores writes at the end of the data phase and
serves reads from the word array. The array is not reset. A slave gives
RETRY or SPLIT only while its `busy` input is high, so in the top level
these responses are under the control of whatever drives `slv_busy`.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `ahb_top` | `NUM_MASTERS` | 3 | masters |
| `ahb_top` | `NUM_SLAVES` | 4 | slaves (a power of two keeps the map full) |
| `ahb_top` | `MEM_DEPTH` | 256 | words per slave |
| `ahb_top` | `SLV_WAIT` | '{0,1,2,0} | wait states of each slave |
| `ahb_top` | `SLV_SPLIT` | '{0,0,1,0} | split-capable slaves |
| `ahb_slave` | `WAIT_STATES`, `SPLIT_CAPABLE`, `DEPTH`, `OFFSET_W` | 0, 0, 256, 30 | per slave |

At these defaults, coarse synthesis of `ahb_top` gives about 720 word-level
cells and 389 flip-flop bits. It also gives four 256 × 32-bit memories,
32,768 bits in all.

`SLV_WAIT` and `SLV_SPLIT` have `NUM_SLAVES` entries. Change them together
with `NUM_SLAVES`. The bus widths (32-bit address and data, 4-bit HMASTER)
and all encodings are in `ahb_pkg`.

## How this relates to the AMBA AHB specification

What follows the protocol as described for this design:

- three masters and four slaves;
- the master, slave, arbiter, decoder and multiplexer blocks;
- HBUSREQ/HGRANT/HMASTER;
- fixed-priority arbitration with the HSPLITx release;
- the HTRANS table;
- the four responses;
- HMASTER steering address, control and write data, and HSELx steering read
  data.

This design's own choices, where the description leaves the point open:

- **Widths and encodings.** 32-bit address and data, and the AMBA 2 encodings
  of HBURST, HSIZE and HRESP.
- **Arbitration details.** Master 0 has the highest priority, fixed-length
  bursts are not broken, and the grant parks on the owner.
- **Memory map.** The top address bits pick the slave.
- **Slaves.** The memory slave, its ERROR rule, the `busy` input that causes
  RETRY/SPLIT, and each slave's wait states.
- **Master.** The client interface, the rebuild rule for broken bursts, and
  `hold` as the source of BUSY.

Not implemented:

- HLOCK/HMASTLOCK locked transfers;
- HPROT;
- a dummy master for the case that every master is split;
- early termination of fixed-length bursts by the arbiter;
- the 1 KB burst boundary rule, which is left to the client.

## Files

- `rtl/ahb_pkg.sv` holds the encodings, the widths and the `ahb_m2s_t` and
  `ahb_s2m_t` signal bundles.
- `rtl/ahb_master.sv`, `rtl/ahb_slave.sv`, `rtl/ahb_arbiter.sv`,
  `rtl/ahb_decoder.sv` and `rtl/ahb_mux.sv` are the blocks.
- `rtl/ahb_top.sv` wires them into the system.
- `tb/tb_<module>.sv` is a self-checking testbench for each module. Each one
  ends by printing `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
          --top-module tb_ahb_top rtl/ahb_pkg.sv tb/tb_ahb_top.sv
./obj_dir/Vtb_ahb_top
```

Replace `tb_ahb_top` with any other testbench name. Every testbench also has
a watchdog that counts a failure and stops the run if it hangs.

## How far it has been checked

- **Unit tests.** Each block's testbench compares the block against values
  worked out independently:
  - decoder selects for corner and random addresses;
  - multiplexer routing, including the delayed selects under random HREADY;
  - arbiter grant and HMASTER, step by step, through priority, a protected
    INCR4 burst with a wait state and a BUSY, an INCR burst and a SPLIT with
    its release;
  - slave data, byte lanes, wait-state cycle counts, pipelined bursts and
    every response type;
  - master address/HTRANS/HBURST sequences and latencies for every scenario
    above, against a model slave.
- **End-to-end test.** `tb_ahb_top` runs the full system at its default
  size. Each master runs 60 random commands over all four slaves, all burst
  types and sizes, random BUSY, random busy slaves and some bad addresses. A
  byte-level shadow memory checks every read. The test fails if any of these
  mechanisms never occurred: arbitration under contention, a change of owner,
  wait states, SEQ beats, WRAP bursts, BUSY, sub-word writes, ERROR, RETRY,
  SPLIT, the HSPLITx release, rebuilt bursts.
- **Fault injection.** Each testbench has been shown to fail when its module
  is broken in a way that matters.
- **Not checked.** Nothing has been checked against a formal protocol
  checker, or on an FPGA.
