# Three-master, four-slave AMBA AHB interconnect

Several bus masters on a chip need to reach several memory-mapped slaves
without tristate buses and without losing bus cycles between transfers.
This design is a small AMBA AHB system that does this. It has three
masters and four memory slaves, joined by a central multiplexer
interconnect. A fixed-priority arbiter decides which master owns the
bus. Multiplexers route that master's address and write data to the
slaves. Another multiplexer routes the addressed slave's read data and
response back to the masters. Masters move data in single transfers or
in 4-, 8- or 16-beat incrementing bursts, for both reads and writes.

```
 master 1 ─┐  HBUSREQ/HGRANT   ┌──────────┐
 master 2 ─┼──────────────────►│ arbiter  │── HMASTER
 master 3 ─┘                   └──────────┘
    │ address/control    ┌───────────────┐  HADDR ┌─────────┐ HSEL ┌─────────┐
    ├───────────────────►│ addr/ctrl mux │───────►│ decoder │─────►│ slave 1 │
    │ HWDATA             ├───────────────┤        └─────────┘      │ slave 2 │
    ├───────────────────►│ write data mux│──────── HWDATA ────────►│ slave 3 │
    │ HRDATA,HREADY,HRESP├───────────────┤                         │ slave 4 │
    ◄────────────────────│ read data mux │◄──────── per slave ─────┴─────────┘
                         └───────────────┘
```

## Files

| file | module | role |
|---|---|---|
| `rtl/ahb_pkg.sv` | package | widths, HTRANS/HRESP/HBURST encodings, master state enum, the `ahb_ctrl_t` and `ahb_resp_t` bundles |
| `rtl/ahb_master.sv` | `ahb_master` | bus master with an 8-state FSM and a user command port |
| `rtl/ahb_arbiter.sv` | `ahb_arbiter` | fixed-priority arbiter (master 1 highest) |
| `rtl/ahb_addr_mux.sv` | `ahb_addr_mux` | address/control multiplexer, selected by HMASTER |
| `rtl/ahb_decoder.sv` | `ahb_decoder` | address decoder, one HSEL per slave |
| `rtl/ahb_wdata_mux.sv` | `ahb_wdata_mux` | write data multiplexer, selected by the data-phase owner |
| `rtl/ahb_slave.sv` | `ahb_slave` | 256-word memory slave, optional wait states |
| `rtl/ahb_rdata_mux.sv` | `ahb_rdata_mux` | read data / HREADY / HRESP multiplexer |
| `rtl/ahb_top.sv` | `ahb_top` | the whole system |

## The pipelined bus

AHB splits every beat into an **address phase** and a **data phase**. The
data phase of a beat overlaps the address phase of the next beat. The
two phases of one beat can therefore belong to different owners, and
the interconnect tracks each owner separately:

- The **arbiter** registers HMASTER, the owner of the address phase. It
  updates HMASTER one HREADY cycle after it moves the grant, because a
  master starts to drive the bus only on the clock edge where it sees
  both HGRANT=1 and HREADY=1.
- The **address/control mux** selects with HMASTER directly.
- The **write data mux** keeps its own copy of HMASTER, delayed by one
  HREADY cycle. This copy names the owner of the data phase.
- The **decoder** is combinational on HADDR, so its output belongs to
  the address phase. The **read data mux** registers that selection
  whenever the bus HREADY is 1, and uses the registered copy to pick
  the slave that owns the data phase.
- Every register on the bus moves only on an edge where HREADY=1. A
  slave that holds HREADY low therefore freezes the whole pipeline: the
  address phase waiting behind it, the owner registers, and the master
  FSMs.

The bus HREADY is the output of the read data mux. All masters, all
slaves, the arbiter and the write data mux receive it.

## The master FSM

Each master runs one command at a time through eight states. The state
numbers appear on the `state` / `m_state` outputs.

| # | state | drives | leaves when |
|---|---|---|---|
| 0 | IDLE | nothing (HTRANS=IDLE) | `u_req`=1: address, direction and burst kind are latched → REQ |
| 1 | REQ | HBUSREQ=1 | always → GRANT |
| 2 | GRANT | HBUSREQ=1 | HGRANT=1 and HREADY=1 → WRITE or READ. beat_counter is loaded with beats−1. |
| 3 | WRITE | NONSEQ address phase of beat 0 | HREADY=1: beat_counter=0 → TRANS_END; otherwise → TRANS_WRITE (address += 2, counter −1) |
| 4 | TRANS_WRITE | SEQ address phase of the next beat, plus write data of the previous beat | HREADY=1: beat_counter=0 → TRANS_END; otherwise stay (address += 2, counter −1) |
| 6 | READ | NONSEQ address phase of beat 0 | same as WRITE, going to TRANS_READ |
| 7 | TRANS_READ | SEQ address phase of the next beat; the previous beat's read data arrives | same as TRANS_WRITE |
| 5 | TRANS_END | data phase of the last beat (HTRANS=IDLE) | HREADY=1 → IDLE |

GRANT waits for HREADY as well as HGRANT. HREADY=1 means the transfer
already on the bus is finishing, so the new owner can start its address
phase. `beat_counter` counts the beats that still need an address after
the beat now on the bus. HBUSREQ stays high until the last address phase
is accepted. It drops in TRANS_END, which lets the arbiter hand the bus
to another master.

**Timing.** On an idle bus with zero-wait slaves, a k-beat burst ends
k+3 clock edges after the edge that takes the command. The edges are
REQ, GRANT, k address phases and TRANS_END. So a single transfer takes
4 edges, INCR4 7, INCR8 11 and INCR16 19. Each wait state a slave
inserts adds one edge per beat.

**Command port.** Hold `u_req` high for one cycle while the master is
idle (`u_busy`=0), together with `u_write`, `u_addr` and `u_burst`.
For a write, present the data of beat 0 on `u_wdata`. After each cycle
in which `u_wnext`=1, present the next beat. For a read, each beat
appears on `u_rdata` in a cycle with `u_rvalid`=1. `u_done` pulses in
the last cycle. `u_err` reports that some beat received a non-OKAY
response. The master still finishes the burst in that case, and the
flag stays set until the next command is taken.

## Arbitration

The arbiter uses fixed priority: master 1 is highest, then master 2,
then master 3. A master keeps the bus for as long as it holds HBUSREQ,
so a burst is never cut short. When the owner releases HBUSREQ, the
highest-priority waiting master gets the grant. The grant never moves
in a cycle where HREADY=0. If no master is requesting, no master is
granted, HMASTER is 0, and the address mux drives IDLE transfers.
HMASTER numbers the masters from 1, so master 2 shows as HMASTER=2.

## Address map and slaves

Address bits [9:8] select the slave, so each slave owns 256 address
units:

| slave | addresses | example start address |
|---|---|---|
| 1 | 0x000–0x0FF | 160 |
| 2 | 0x100–0x1FF | 416 |
| 3 | 0x200–0x2FF | 672 |
| 4 | 0x300–0x3FF | 928 |

The decoder ignores the upper bits, so the map repeats every 1024
units. Consecutive beats of a burst are **2 address units** apart
(160, 162, 164, …). Each address value holds one 32-bit word, and the
slave indexes its memory with HADDR[7:0]. A burst therefore uses every
second word of a slave's 256-word memory. HSIZE is driven as 2.

A slave accepts a beat in its address phase when HSEL=1, HREADY=1 and
HTRANS is NONSEQ or SEQ. It writes HWDATA at the end of the data phase.
For a read it drives the stored word throughout the data phase. It
always answers OKAY. When WAIT_STATES=0 (the default) HREADY never
drops. When WAIT_STATES=n, HREADY is held low for the first n cycles of
every data phase.

## Encodings

| signal | width | values |
|---|---|---|
| HTRANS | 2 | IDLE 0, BUSY 1, NONSEQ 2, SEQ 3 (AMBA AHB) |
| HRESP | 2 | OKAY 0, ERROR 1, RETRY 2, SPLIT 3 (AMBA AHB) |
| HBURST | 2 | SINGLE 0, INCR4 1, INCR8 2, INCR16 3 (specific to this design) |
| HSIZE | 3 | always 2 |
| HMASTER | 2 | 0 = no owner, 1..3 = master 1..3 |

## Parameters of `ahb_top`

| parameter | default | meaning |
|---|---|---|
| `N_MASTERS` | 3 | number of masters (arbiter and muxes scale with it) |
| `N_SLAVES` | 4 | number of slaves (the decoder takes the index from bits above bit 8) |
| `MEM_DEPTH` | 256 | words per slave |
| `SLAVE_WAIT` | 0 | wait states each slave inserts per beat |

## Where this design departs from standard AHB, and what it leaves out

- **HBURST.** HBURST is a 2-bit field with its own encoding. AMBA uses
  a 3-bit field.
- **Address step.** The burst address step of 2 does not match HSIZE=2.
  Standard AHB would step 4 bytes for that size. Both the step and the
  size value are kept as this design defines them. The step is the
  `INCR` parameter of `ahb_master` (default `ahb_pkg::ADDR_INCR`).
- **Not implemented:** split and retry responses, wrapping bursts,
  undefined-length (INCR) bursts, BUSY transfers, locked transfers,
  protection signals, and a default slave for unmapped addresses.
  There is also no default master.
- **Grant timing.** A new owner gets the grant only after the previous
  owner's last data phase has finished. Handover therefore costs idle
  cycles and is not a zero-cycle overlap.
- **Error response.** No slave produces ERROR. The master checks for it
  anyway and flags it.
- **Reset.** Reset is synchronous and active low. The slave memories
  are not reset.

## Simulation

Every testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. To build and run one with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb rtl/ahb_pkg.sv \
    tb/tb_ahb_top_full.sv --top-module tb_ahb_top_full -o sim
./obj_dir/sim
```

| testbench | what it checks |
|---|---|
| `tb_ahb_top_full` | The system at its default parameters runs four example transfers, each written and then read back: master 3 → slave 1 INCR4 from 160; master 1 → slave 2 INCR8 from 416 (data 30, 32, …); master 2 → slave 3 INCR16 from 672 (data 45, 47, …); master 1 → slave 4 single at 928 (data 60). For every beat it checks read data, latency k+3, HADDR, HMASTER, HSEL and HTRANS. Finally all three masters request at once, and the grants must come in the order 1, 2, 3. |
| `tb_ahb_top` | The system with two wait states per beat. All three masters run random bursts at the same time, and every read is checked against a reference memory. The test also counts stalls, handovers, waits for a busy bus and waits behind a lower-priority burst, and fails if any of these never happens. |
| `tb_ahb_master` | One master against a model bus with late grants, random wait states and an injected ERROR. Checks the state sequence, address phases, data, latency and the error flag. |
| `tb_ahb_slave` | Pipelined bursts into a zero-wait slave and a two-wait slave. Checks data, the number of wait cycles, and that unselected beats are ignored. |
| `tb_ahb_arbiter`, `tb_ahb_decoder`, `tb_ahb_addr_mux`, `tb_ahb_wdata_mux`, `tb_ahb_rdata_mux` | Each block against a small reference model, with directed and random stimulus. |

`tb/tb_ahb_user_drv.sv` is the driver the system and master testbenches
use for a command port.

The masters and the arbiter contain concurrent assertions. Two are
checked: address/control stays stable while HREADY=0, and at most one
grant is active at a time. Build with `--assert` to enable them.
