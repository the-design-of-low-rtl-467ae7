# Low-latency FIFOs and relay stations for mixed-timing systems

A chip made of several clock domains, or of clocked and self-timed
(asynchronous) parts, has to pass data across every boundary between them.
The usual answer is a dual-clock FIFO with a synchroniser on each pointer, or
a double-flop synchroniser on the data handshake. Both add synchroniser
latency to every item and reduce throughput.

The interfaces in this repository use a different structure, after the
mixed-timing FIFOs of T. Chelcea and S. M. Nowick. Data never moves inside
the FIFO. Each item stays in the cell it was written to, and two tokens go
around a ring of cells. The put token marks the tail and the get token marks
the head. Only two status signals, *full* and *empty*, cross between the
domains, and each passes through a synchroniser. In steady state a sender
puts one item per cycle of its own clock and a receiver takes one per cycle
of its clock. No synchroniser sits on the data path.

The same cell halves combine into a whole family:

| Interface | Put side | Get side | Module |
|---|---|---|---|
| mixed-clock FIFO | clocked (`clk_put`) | clocked (`clk_get`) | `mixed_clock_fifo` |
| async-async FIFO | 4-phase handshake | 4-phase handshake | `async_async_fifo` |
| async-sync FIFO | 4-phase handshake | clocked | `async_sync_fifo` |
| sync-async FIFO | clocked | 4-phase handshake | `sync_async_fifo` |
| mixed-clock relay station (MCRS) | relay-station chain, clock 1 | relay-station chain, clock 2 | `mixed_clock_rs` |
| async-sync relay station | 4-phase handshake | relay-station chain | `async_sync_rs` |
| sync-async relay station | relay-station chain | 4-phase handshake | `sync_async_rs` |

The relay-station variants serve long wires that are pipelined with relay
stations (`relay_station`). The MCRS lets such a pipelined channel cross from
one clock domain to another. `mixed_timing_top` instantiates all seven, side
by side, together with an example channel.

All code is SystemVerilog-2017. The defaults are 4 cells and 8-bit data
items. Everything is synthesizable except the self-timed cell halves. Those
are behavioural models (see "Asynchronous halves").

## The token ring

`mixed_clock_fifo` is a ring of `CELLS` identical cells (`mc_cell`) and four
small controllers:

```
             put bus (req_put, data_put, en_put)
        +--------+--------+--------+--------+
        | cell 0 | cell 1 | cell 2 | cell 3 |   put token and get token
        +--------+--------+--------+--------+   circulate independently
             get bus (en_get -> valid, data_get)
  full_detector -> put_controller     empty_detector -> get_controller
```

- The put interface drives a common put bus that reaches every cell.
  `put_controller` computes `en_put = req_put & ~full`.
- Only the cell that holds the put token takes the item, at the `clk_put`
  edge. The token then moves to the next cell.
- The get side works the same way on `clk_get`. The cell that holds the get
  token drives the common get bus, and the token moves on at the closing
  edge.
- The get bus is an AND-OR bus. Each cell's output is forced to zero unless
  that cell is being read, and the outputs are ORed. No tri-state drivers are
  used.

Each cell owns two token flip-flops, one per domain. A token flop passes its
value to its neighbour when the global enable of its domain is high, so each
token is a one-hot shift register that shifts only on a transfer. A cell is
served when its `ptok_in` (or `gtok_in`) is high, which is the token flop of
the neighbouring cell. After reset, the flops of cell 1 hold both tokens.
Cell 0 is therefore served first, and the order around the ring is
0, `CELLS-1`, ..., 1. `mtf_pkg::ring_next` defines the neighbour.

## A cell (`mc_cell`)

A cell has two halves.

**Put half (`put_part_sync`).** On a put it loads the item and its valid bit
(`req_put`) into the cell register. The register is written only in the
`clk_put` domain.

**Get half (`get_part_sync`).** It drives the register onto the get bus.

The cell's state is *full* or *empty*. The state is set by the put side and
cleared by the get side, which are in different clock domains. This design
does not use a set-reset latch written from both clocks. Instead, each side
has a toggle flip-flop in its own domain:

- The put side flips `ptgl` on every put.
- The get side flips `gtgl` on every get.
- The cell is full while the toggles differ: `f_i = ptgl ^ gtgl`, `e_i = ~f_i`.

Each flop therefore has a single clock, and the state is still correct at any
time. Only the detectors read `f_i` and `e_i` across the domain boundary.

## Full and empty, and why the margin is one cell

Each side sees the ring's state through a synchroniser. Its decision is
therefore based on a state one cycle old, during which the other side may
have moved. The detectors make up for this lag with a one-cell margin:

- **`full_detector`**: *full* when no two neighbouring cells are both empty,
  i.e. 0 or 1 empty cells remain.
- **`empty_detector`**: *new empty* (`ne`) when no two neighbouring cells are
  both full, i.e. 0 or 1 items are stored.

Each detector is a small OR-of-ANDs over neighbouring pairs. Its output
passes through `sync_latch` on the receiving clock.

The synchroniser is specified as two latches, i.e. one master-slave pair. It
is written as one edge-triggered register. The lag is then one cycle, and
the one-cell margin is exactly enough:

- Puts stop with one cell still free at the moment `full` was sampled.
- The put made during the lag cycle fills that cell.
- So the FIFO accepts exactly `CELLS` items, and the testbenches check this
  for 4 and 16 cells.

A synchroniser built from two flip-flops would be a two-cycle lag. It would
need a two-cell margin; with one cell it can overflow. Before you deepen
`sync_latch` (`LATCHES` = 4, 6, ...), widen the detectors to match.

Three registers cross the domain boundary per mixed-clock FIFO: `full`,
`ne`, and the `oe` register below. The count does not grow with the number
of cells.

## Deadlock and the bi-modal empty

*New empty* is safe but conservative. With a single item in a FIFO that
nobody is writing to, `ne` says empty forever, and the item could never be
taken. `empty_detector` therefore also computes **true empty** (`te`, no
full cell). `get_controller` combines the two:

```
oe      <= te | en_get           (clk_get register, resets to 1)
empty    = ne & oe
en_get   = req_get & ~empty
valid_get = en_get & valid bit on the get bus
```

- **While gets are active**, `oe` is forced to 1, so `empty` follows the
  conservative `ne`. This mode is needed: a true-empty sample taken before
  the latest get is already stale, and could let the get side read a cell
  it has just emptied.
- **After an idle get cycle**, `oe` holds a sampled true-empty value. The
  last item becomes visible within a cycle or two.

`oe` is the register that synchronises `te`. The mode switch costs no extra
logic in the data path.

## Interface timing (clocked sides)

- **Put.** Hold `req_put` and `data_put` across the `clk_put` edge. The item
  is taken at an edge where `req_put` is high and `full` is low.
- **Get.** Raise `req_get`. In a `clk_get` cycle with `valid_get` high,
  `data_get` carries the item, and the item is removed at the closing edge.
  `empty` comes straight from registers. `en_get` and `valid_get` are
  combinational within the cycle.
- **Latency.** An item put into an empty, idle FIFO is visible to the get
  side after at most two `clk_get` edges (the `ne`/`oe` samples). The
  testbench measures 25 ns with a 14 ns get clock.
- **Reset.** `rst_n` is asynchronous and active low, for both domains. It
  empties the ring and places both tokens at cell 0.

## Asynchronous halves

An asynchronous interface is a 4-phase bundled-data channel:

1. The sender sets `put_data` and raises `put_req`.
2. The FIFO raises `put_ack` once the item is stored.
3. The sender lowers `put_req`.
4. The FIFO lowers `put_ack`.

The get channel works the same way, with `get_data` valid while `get_ack` is
high.

These interfaces need no detectors and no controllers. The tail cell simply
withholds `put_ack` while it is still full, and the head cell withholds
`get_ack` while it is empty. The tokens move when the request falls, gated
by the global acknowledge (the OR of the cells' acknowledges).

`put_part_async` and `get_part_async` model these self-timed cell
controllers with `wait` statements and `#` delays (`DLY_PS`, default 200 ps).
They are behavioural models: verilator and slang accept them, but they are
not gate-level controllers and do not synthesize.

The mixed FIFOs reuse the halves without change:

- `async_sync_fifo` = asynchronous put half + synchronous get half, with the
  empty detector and get controller.
- `sync_async_fifo` = synchronous put half, with the full detector and put
  controller + asynchronous get half.

## Relay stations and the mixed-clock relay station

A wire longer than a clock period can be split into one-cycle segments by
relay stations (`relay_station`). In such a latency-insensitive channel:

- Every cycle carries a packet (valid bit plus data). Invalid packets are
  bubbles.
- Back pressure travels the other way as `stop`.

A relay station has a main register MR and an auxiliary register AR:

- Every cycle the incoming packet goes into MR.
- `stop_out` is `stop_in` delayed by one register.
- When the station is stopped from downstream, one more packet still arrives,
  because the upstream station has not yet seen `stop_out`. That packet is
  caught in AR.
- On restart, MR is sent first, then AR, and then `stop_out` falls.

Relay stations only work within one clock. `mixed_clock_rs` is the
mixed-clock FIFO with only its two controllers replaced:

- **`mcrs_put_controller`**: `en_put = valid_in & ~full`, so only valid
  packets are stored, and `stop_out = full`.
- **`mcrs_get_controller`**: the same bi-modal empty as the FIFO. It puts
  out a packet on every `clk_get` cycle: a valid one when an item is stored
  and `stop_in` is low, and an invalid one otherwise. So
  `en_get = ~stop_in & ~empty`.

`async_sync_rs` and `sync_async_rs` apply the same controller swap to the
async-sync and sync-async FIFOs.

`mixed_timing_top` wires an example channel on its `lis_*` ports: two relay
stations on `lis_clk1`, the MCRS from `lis_clk1` to `lis_clk2`, and one
relay station on `lis_clk2`.

## The top module

`mixed_timing_top #(CELLS, W)` has one port group per interface, each with
its own clocks. `rst_n` is shared.

| Prefix | Interface |
|---|---|
| `mcf_` | mixed-clock FIFO |
| `aaf_` | async-async FIFO |
| `asf_` | async-sync FIFO |
| `saf_` | sync-async FIFO |
| `lis_` | RS-RS-MCRS-RS channel |
| `asr_` | async-sync relay station |
| `sar_` | sync-async relay station |

`CELLS` sets the capacity of every ring. `W` sets the data width.

`mixed_clock_fifo` and `mixed_clock_rs` also carry concurrent assertions on
their token rings:

- the put token and the get token are each one-hot;
- no put goes into a full cell;
- no get comes from an empty cell.

## Testbenches

Each module of the family has a self-checking testbench in `tb/`. Each one
compares the outputs against a reference queue, ends with a
`TB_RESULT checks=<n> failures=<n>` line, and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_mixed_clock_fifo` | exact capacity; single-item release (deadlock case); latency within two get cycles; one item per cycle in steady state; random traffic on unrelated clocks |
| `tb_mc_cell`, `tb_full_detector`, `tb_empty_detector`, `tb_put_controller`, `tb_get_controller` | the parts in isolation |
| `tb_async_async_fifo`, `tb_async_sync_fifo`, `tb_sync_async_fifo` | withheld acknowledgments on full and empty; ordering under random handshake gaps |
| `tb_relay_station`, `tb_mixed_clock_rs`, `tb_async_sync_rs`, `tb_sync_async_rs` | the stop protocol; no packet lost or duplicated; valid never shown under stop |
| `tb_mixed_timing_top` | all seven interfaces at once, at the default size; counts every mechanism (full and empty stalls, the bi-modal release, withheld acknowledgments, back pressure at each stage, invalid packets) and fails if one never happens |
| `tb_workload_16place` | the whole top at 16 cells: exact capacity of every ring, one transfer per cycle, random streaming |

## Simulating

Use Verilator 5 with timing support. Put the package first and let
Verilator find the modules in `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal \
  -y rtl -y tb +libext+.sv rtl/mtf_pkg.sv tb/tb_mixed_timing_top.sv \
  --top-module tb_mixed_timing_top -Mdir obj -o sim
./obj/sim
```

Replace the testbench name to run another testbench. `-Wno-fatal` is needed
because the testbenches use random `#` delays, which Verilator reports as
warnings. Without `--assert`, the ring assertions are not checked.

## Changing the design

- **`CELLS`.** Capacity. The detectors' pair structure scales with it, and
  synchronisation cost does not change. 4 and 16 are the tested sizes; with
  fewer than 3 cells the one-cell margins leave no useful capacity.
- **`W`.** Item width.
- **`DLY_PS`.** The response delay of the asynchronous models.
- **`sync_latch` `LATCHES`.** Even and at least 2. As explained above,
  deeper synchronisers need wider detector margins.

## Where this departs from the circuit it follows

The original interfaces are transistor-level circuits. This RTL keeps their
architecture and protocols, but not their circuit techniques:

- **Cell state.** The cell's set-reset latch is replaced by two
  single-clock toggle flip-flops (see "A cell").
- **Detectors.** The precharged dynamic detectors are ordinary combinational
  logic.
- **Synchroniser.** The two-latch synchroniser is one flip-flop.
- **Asynchronous controllers.** These are behavioural models with a fixed
  delay. The original burst-mode and Petri-net controllers are not
  reproduced, so the asynchronous interfaces do not synthesize.
- **Get bus.** It is an AND-OR bus instead of tri-state drivers.
- **Reset.** The asynchronous reset and the starting token position are
  this design's choices.
- **Performance.** The published latencies (about 2 to 8 ns) and rates
  (about 360 to 580 MHz or Mops) of the 0.6 µm circuits have no RTL
  counterpart. The testbenches check cycle behaviour instead: exact
  capacity, one transfer per cycle, and latency in clock cycles.
- **Async-sync and sync-async relay stations.** The original design gives
  little more than their names and measured rates. They are built here by
  the controller-swap rule that turns the mixed-clock FIFO into the MCRS.
