# Shared-bus AXI interconnect with interleaved, data lock and hybrid transfer modes

This is a small AXI3 interconnect that connects five masters to eleven slaves
over one shared bus per AXI channel. A crossbar gives every master–slave pair
its own path, but it costs several times the gates and mostly sits idle when
traffic is concentrated on one device, such as an external memory controller.
This design keeps a single bus per channel and makes that bus cheap to keep
busy:

* **Interleaving.** Each channel has exactly one register stage. A source can
  put a beat on the bus at most every other cycle, and the arbiter fills the
  gaps with beats from other sources. With two or more active sources the bus
  carries a beat every cycle.
* **Data lock mode.** This is for slaves with a long initial latency (memory
  controllers) that then return a whole burst. The burst of a transaction
  marked as data lock gets the data bus to itself and streams at one beat per
  cycle. A burst waits one cycle in its port's register before the bus, and
  one source's next lock burst waits one more cycle, so back-to-back bursts
  cost two cycles each.
* **Hybrid mode.** When the table of outstanding data lock transactions is
  full, one more such request may go through as an ordinary transaction. After
  that, lock requests are held back until a locked transaction finishes. The
  memory controller keeps requests to reorder, and the lock table does not
  overflow.
* **Selectable arbitration.** Each channel can use one of four policies:
  fixed priority, TDMA, round-robin with per-device thresholds, or lottery.

At the default sizes (5×11 ports, 32-bit address and data, 8 outstanding
transactions per master, 4-entry lock tables) yosys maps the design to about
2.5k cells, with 1.9k flip-flop bits and 640 memory bits.

## Structure

```
 masters (5)                                              slaves (11)
  AR ──► [in port ×5] ─► arbiter ─► bus ─► [out port] ──► AR   (+ slave read monitor,
  AW ──► [in port ×5] ─► arbiter ─► bus ─► [out port] ──► AW     write monitor,
  W  ──► [in port ×5] ─► arbiter ─► bus ─► [out port] ──► W      write data table)
  R  ◄── [out port] ◄─ bus ◄─ arbiter ◄─ [in port ×11] ◄── R   (+ read lock buffer)
  B  ◄── [out port] ◄─ bus ◄─ arbiter ◄─ [in port ×11] ◄── B
                         write lock buffer on W, hybrid counter per direction
```

Each of the five channels is an `axi_channel`, built from these parts:

* **`axi_in_port`.** There is one per source. It holds a single beat in a
  register slot and asks for the bus.
* **`axi_arbiter`.** It wraps one of `arb_fixed`, `arb_tdma`, `arb_rr` or
  `arb_lottery`.
* **`axi_out_port`.** It raises VALID at the destination the beat is routed to,
  and passes that destination's READY back to the bus.

A beat is captured on one clock edge and forwarded, combinationally, in a later
cycle. Every channel therefore adds exactly one cycle of latency and has one
register layer.

Around the channels, `axi_interconnect` adds these parts:

| Part | Module | Role |
|---|---|---|
| Slave read / write buffer monitor | `axi_slave_monitor` | Counts the transactions outstanding at each slave. An address request to a slave that already holds `SLV_DEPTH` of them is not granted. |
| Write data table | `axi_wdata_table` | Has one entry per (master, write ID), filled when the write address is forwarded. It tells the W channel which slave a write beat goes to, and is cleared by the last beat. |
| Read / write data lock buffer | `axi_lock_buffer` | Records the extended IDs of data lock transactions that are in flight. The R and W channels look up each incoming beat's ID in it. |
| Hybrid mode counter | `axi_hybrid_ctr` | Counts lock requests let through as normal while the lock buffer was full. |

### IDs

Masters use 3-bit IDs (`log2(BUF_SIZE)`). On the AR and AW channels the
interconnect adds the 3-bit master index in front, so slaves see 6-bit IDs.
Read data and write responses are routed back to the master named by the top
three bits, and the extra bits are removed. Write data carries a WID (AXI3).
The W channel also prefixes it, and routes the beat through the write data
table. A master must not reuse a write ID before that write's last data beat
has left. A new write address with an ID whose entry is still valid is held
back.

### Address map

Slave `s` answers to `addr[31:28] == s` (`axi_pkg::decode_slave`). Top
nibbles 11 to 15 alias to slave 0. The slaves are numbered in this order:

| Index | Slave |
|---|---|
| 0 | video in |
| 1 | video out |
| 2 | audio in |
| 3 | audio out |
| 4 | communication |
| 5 | SRAM |
| 6 | memory controller 1 |
| 7 | memory controller 2 |
| 8 | interrupt controller |
| 9 | video encoder |
| 10 | DMA controller |

The masters are 0 MPU, 1 DSP, 2 video encoder, 3 DMA controller 1 and
4 DMA controller 2. The names only explain the default weights. Nothing in the
logic depends on them.

## Transfer modes and their timing

This is the part that needs the most care when the design is changed.

### Normal and interleaved

An input port's READY is high only while its slot is empty. A beat captured in
cycle *t* can be forwarded in *t+1* at the earliest, and the next beat can only
be captured after that. A single source therefore gets at most one transfer
every two cycles, which is 50 % of the bus. The benefit is that the register
stage never needs a second entry or a READY that depends on the destination.

`INTERLEAVE=1` (the default) lets the arbiter grant any held beat in any cycle.
While one source's beat crosses the bus, another source's slot is filling.
Two masters M0 and M1, each presenting two address requests from cycle 0:

| cycle | 0 | 1 | 2 | 3 | 4 |
|---|---|---|---|---|---|
| bus | – | A0 | B0 | A1 | B1 |
| captured | A0, B0 | – | A1 | B1 | – |

Four requests take five cycles.

`INTERLEAVE=0` is plain normal mode. The bus idles for one cycle after every
transfer, and the same four requests take eight cycles (transfers in cycles 1,
3, 5 and 7).

### Data lock

A transaction is a data lock transaction in either of two cases:

* Its AxLOCK is `2'b10` (LOCKED).
* Its slave is set in the `LOCK_SLAVES` mask. The default mask is the two
  memory controllers, slaves 6 and 7.

When its address is forwarded, the extended ID is written into the read or
write lock buffer. Data lock address requests are arbitrated ahead of normal
ones on the AR/AW channel. The data channels (R and W) then work like this:

1. A beat whose ID matches a lock buffer entry is captured into its source's
   slot like any other beat. The slot remembers that it holds a lock beat and
   raises a lock request instead of a normal one.
2. Lock requests are arbitrated before normal beats. The grant forwards the
   held beat in the same cycle. From then on only the lock owner may use the
   bus.
3. While it owns the lock, the port's READY follows the bus. A beat can enter
   the slot in the same cycle the previous one leaves, so the burst streams at
   one beat per cycle.
4. After the last beat has been captured, the port holds READY low, so no beat
   of a following burst slips in under the same lock. The lock is released
   when the last beat is forwarded, and READY stays low for one more cycle.

The ID is deleted from the lock buffer whenever the last beat of a
transaction with that ID crosses the data bus, whether or not the burst held
the lock. This matters on the write side. A master may send write data before
its address has been forwarded. Such a beat sits in its slot as a normal beat
and crosses the bus unlocked, even though its ID went into the lock buffer in
the meantime. If the ID stayed in the buffer, a later beat with the same ID
could ask for the lock before its own address had set up its route. Each
deletion of a recorded ID also resets the hybrid counter.

For bursts of L beats from one source whose data is always ready:

| cycle | T0 | T1 | T2 … T(L) | T(L+1) | T(L+2) | T(L+3) |
|---|---|---|---|---|---|---|
| | beat 0 captured | lock granted, beat 0 on bus | beats 1 … L−1 on bus, lock released at T(L) | READY low | next beat 0 captured | next lock granted |

A single locked burst is done L+1 cycles after its first VALID. For L=4 that
is five cycles, the same as the interleaved example. A second burst from the
same source needs one extra cycle, so back-to-back locked bursts start L+2
cycles apart and reach L/(L+2) utilization: 67 % at L=4, 80 % at L=8 and 89 %
at L=16. Another source's lock burst can use the bus in the cycle after a
lock is released, because only the finishing port holds its READY low.
A single source in normal mode gets only 50 %.

Requirement on slaves: a slave must not interleave other read data into a
locked read burst once it has started it. The bus is held for the lock owner
until its last beat.

### Hybrid

When an address request is a data lock request but the lock buffer is full,
what happens depends on the hybrid counter:

* **Counter below `HYB_THRESH` (default 1):** the request is forwarded as a
  normal transaction. It is not entered in the lock buffer, its data moves
  interleaved, and the counter increments.
* **Counter at the threshold:** the request is held in its slot until the
  counter resets.

The counter resets whenever a data lock transaction completes. The memory
controller thus gets extra requests to reorder, and the lock buffer never
overflows.

The top module reports these events on the pulse outputs `ev_r_lock`,
`ev_w_lock`, `ev_r_hybrid`, `ev_w_hybrid`, `ev_ar_block` and `ev_aw_block`.

## Arbiters

All four arbiters share one interface: `req[N]` in, one-hot `grant[N]` out, and
`accept` high when the grant was used. All are combinational in the grant and
keep their state in registers. The weight vector is packed, with index 0 in the
low byte.

| Arbiter | How it picks | State |
|---|---|---|
| `arb_fixed` | The lowest index wins. | None. |
| `arb_tdma` | The current owner wins if it requests. Otherwise requesters are served in rotating order from the owner. Ownership passes to the next device when the owner's slot counter, which counts down every cycle, reaches zero. Each device's slot count is its weight. | Owner pointer and slot counter. |
| `arb_rr` | A priority list. The first requester in the list wins. Each grant increments that device's counter. When the counter reaches the device's threshold (its weight), the device moves to the end of the list and its counter clears. | List and counters. |
| `arb_lottery` | Sums the tickets of the requesters and draws `d = (lfsr × sum) >> 16`. The winner is the requester in whose ticket range `d` falls. | 16-bit LFSR, x^16+x^14+x^13+x^11+1, seed 0xACE1, stepped every cycle. |

Default weights:

* Masters: 4, 8, 32, 16, 16 (MPU, DSP, video encoder, DMA 1, DMA 2).
* Slaves: 16 for the SRAM and the two memory controllers, 4 for the rest.

These weights only set shares. The interconnect is correct with any non-zero
values.

## Parameters

`axi_pkg` fixes the sizes: `N_MASTER=5`, `N_SLAVE=11`, `ADDR_W=32`,
`DATA_W=32` and `BUF_SIZE=8`. The ID widths follow from these. To change them,
edit the package. The top module has these parameters:

| Parameter | Default | Meaning |
|---|---|---|
| `POL_ADDR` | `ARB_RR` | Policy of the AR and AW channels. |
| `POL_DATA` | `ARB_TDMA` | Policy of the R and W channels. |
| `POL_RESP` | `ARB_RR` | Policy of the B channel. |
| `M_WEIGHT` | {16,16,32,8,4} | Weights of the master-driven channels. |
| `S_WEIGHT` | 16 for slaves 5–7, 4 otherwise | Weights of the slave-driven channels. |
| `INTERLEAVE` | 1 | 0 gives plain normal mode (an idle cycle after every transfer). |
| `LOCK_DEPTH` | 4 | Entries in each data lock buffer. |
| `HYB_THRESH` | 1 | Lock requests let through as normal while the lock buffer is full. |
| `SLV_DEPTH` | 8 | Outstanding transactions allowed per slave and direction. |
| `LOCK_SLAVES` | slaves 6 and 7 | Slaves whose transactions always use data lock mode. |

At 40 MHz, one 32-bit beat per cycle on R and on W gives 160 MB/s each way, or
320 MB/s in total. At 200 MHz it gives 1.6 GB/s.

## Origin of the design and departures

These parts follow the published design this RTL implements:

* the shared bus
* the four transfer modes and their cycle counts (5 versus 8 cycles; L/(L+2))
* marking data lock transactions by AxLOCK and/or by slave
* data lock requests arbitrated first
* the lock buffer and the hybrid counter with its reset rule
* the four arbitration policies
* the master weights (MPU fixed at 4, the others multiples of 8)
* the component list of the read and write sides
* the sizes: 5 masters, 11 slaves, 32-bit data, buffer size 8, lock buffer 4,
  threshold 1

These are this implementation's own choices:

* **Lock timing.** A lock beat is captured like a normal one and the lock
  grant forwards it. The extra cycle between back-to-back lock bursts from
  one source is spent with that port's READY low after its last beat.
* **Arbitration order.** Lock requests come first, then data lock address
  requests, then the rest.
* **Arbiter details.** TDMA serves non-owners in rotating order. The lottery
  uses an LFSR draw.
* **Default policies.** Round-robin on the address channels and TDMA on the
  data channels. These were the combinations reported to work best. Round-robin
  is used on write responses.
* **Weight split.** The master weights are split 8:32:16 among DSP, video
  encoder and DMA, closest to their bandwidth ratios. The slave weights are
  16 and 4.
* **Address map.** Slave s answers to addresses whose top four bits equal s.
  Other top nibbles alias to slave 0.
* **Write data table.** It has a valid bit per entry, and a write address
  whose ID is still in use waits.
* **Reset.** Active-low, asynchronous.
* **AXI3 subset.** AxID, AxADDR, AxLEN (4 bits), AxSIZE, AxBURST and AxLOCK;
  WID, WDATA, WSTRB and WLAST; RID, RDATA, RRESP and RLAST; BID and BRESP.
  Cache, protection and QoS fields are not carried.

Not covered: the 64-bit, 4-slave configuration needs `DATA_W=64` and
`N_SLAVE=4` in the package, and has not been simulated. Buffer size 16 needs
`BUF_SIZE=16`. Timing closure at 200 MHz has not been checked.

## Simulation

Every testbench checks itself and ends by printing
`TB_RESULT checks=<n> failures=<n>`. Each also has a watchdog. With Verilator
5, run from the top of the tree:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/axi_pkg.sv tb/tb_axi_interconnect.sv --top-module tb_axi_interconnect -o sim
./obj_dir/sim
```

Use the same command for any `tb/tb_<block>.sv`, with its name as the top
module.

| Testbench | What it checks |
|---|---|
| `tb_axi_interconnect` | The full-size design with default parameters. It first checks the five-cycle interleaving case directly. Then five behavioural masters (random reads and writes, some marked LOCKED, random gaps) drive eleven behavioural slaves (memory-like ones with 0–16 cycle latency). It checks all read data against what was written, all responses and IDs, and the one-hot VALIDs. It counts how often each mechanism happened and fails if any never did: interleaving, the half-rate limit, lock grants, streamed lock beats, hybrid pass-through, hybrid blocking, a full slave buffer, and a write address waiting on the data table. |
| `tb_axi_modes` | Four interconnects side by side, each running random traffic with data lock and hybrid cases. One is in normal mode: the four requests must take 8 cycles, and no two transfers may follow each other on a data channel outside a lock. The other three cover every policy on every kind of channel: fixed/lottery/TDMA, lottery/fixed/lottery and TDMA/round-robin/fixed for address/data/response. |
| `tb_axi_vphone` | The video phone workload at 40 MHz over a 0.5 ms window (see below). |
| `tb_axi_lockbuf` | The same video phone workload with data lock buffers of 1, 2 and 4 entries (see below). |
| `tb_axi_channel` | One channel in interleaved and in normal mode: the 5- and 8-cycle spans, the L+1 single lock burst, the L+2 lock period, and a random scoreboard. |
| `tb_axi_in_port`, `tb_axi_out_port` | Port handshakes, half rate, the lock stream and the drain, and random mixed lock and normal bursts under back-pressure. |
| `tb_arb_*` | Each arbiter against a reference model. This includes the threshold-two round-robin example and the lottery example with tickets 5, 4, 3, 2, 1, where requesters 1, 2 and 4 draw ticket 10 and master 4 wins. It also checks lottery shares over many draws. |
| `tb_axi_lock_buffer`, `tb_axi_hybrid_ctr`, `tb_axi_slave_monitor`, `tb_axi_wdata_table` | Against reference models with random stimulus. |

`tb/axi_master_model.sv` and `tb/axi_slave_model.sv` are behavioural models.
`tb/ic_env.sv` is a complete test environment around one interconnect: five
masters, eleven slaves, the directed timing check and the final tally. The
end-to-end testbenches use these files. They are not part of the design.

### Video phone workload

`tb_axi_vphone` paces each master at the bandwidth of a video phone
application:

| Master | Demand |
|---|---|
| MPU | 3.6 MB/s |
| DSP | 57.3 MB/s |
| video encoder | 74.2 MB/s |
| DMA 1 | 56.5 MB/s |
| DMA 2 | 56.2 MB/s |

The total is 247.8 MB/s: 132.7 MB/s read and 115.0 MB/s write. The buses give
160 MB/s per direction at 40 MHz. The traffic model is as follows:

* Bursts are 16 beats of 4 bytes, so a master needing B MB/s starts a
  transaction every 2560/B cycles.
* 77 % of the traffic goes to the two memory controllers, which use data lock
  mode.
* Each master's read share follows its read/write split.

Every master must finish the transactions of a 20000-cycle window by cycle
21000. In a typical run all of them were done by about cycle 20040, and the
buses carried about 135 MB/s of reads and 115 MB/s of writes. The burst
length and the memory share are modelling choices, so treat the margin as
indicative.

`tb_axi_lockbuf` runs the same traffic three times, with `LOCK_DEPTH` set
to 1, 2 and 4. All three meet the deadline. The smaller the lock buffer, the
more often a data lock request finds it full and goes through hybrid mode:

| `LOCK_DEPTH` | lock grants | passed as normal | cycles a lock request was held back |
|---|---|---|---|
| 1 | about 930 | about 670 | 12000–17000 |
| 2 | about 1280 | about 290 | 1300–3700 |
| 4 | about 1590 | 10–35 | under 100 |

The RTL contains SystemVerilog assertions:

* one-hot grants and VALIDs
* held beats stay stable
* no lock buffer or slave monitor overflow
* no reuse of a busy write ID

Run with `--assert` to enable them.
