# Hardware earliest-deadline-first link scheduler for ATM switches

An ATM output link at 2.5 Gbit/s must pick its next cell every 0.17 µs.
The real-time cells come from many channels (virtual circuits). Each cell
carries a deadline given to it by an upstream traffic shaper. The link must
always send the waiting cell with the earliest deadline. A sorted hardware
queue holding every waiting cell would need one comparator per cell, and a
bus that loads all of them.

This design uses the fact that cells of one channel leave in the order they
arrived. So only the **oldest cell of each channel** has to compete:

* an **EDF queue** of just `C` blocks (one per channel) holds the head
  cell of every active channel, sorted by deadline;
* the later cells of each channel wait in a **data buffer**, a two-port
  memory that holds one linked-list FIFO per channel. Channels share the
  memory, so each FIFO grows and shrinks as needed;
* the cells themselves sit in a **cell buffer**. Only their addresses and
  deadlines move through the scheduler.

When a channel's head cell leaves the EDF queue, the channel's next cell
moves from the data buffer into the queue in the same clock cycle. An input
and an output together take one clock cycle, except in one case that takes
two (see below). Deadlines are kept modulo `2**DL_W` ("deadline folding").
Several schedulers can be chained to serve more channels. A horizon `H`
holds back cells that are too early.

## Block structure

```
                 in_ch (top SEL_W bits)
 in_cell ──► cell free list ─► cell_buffer ──────────────────────► out_cell
   │              ▲ (address)      ▲ read at address of winner
   │              └────────────────┤
   ▼                               │ OR of addresses (zero unless selected)
 channel_decoder ─► link_scheduler 0 ─ DO/EI ─ link_scheduler 1 ─ ... ─ 3
                    ┌─────────────────────────────────────────────┐
                    │ edf_queue (C × edf_block)  ◄─ input muxes   │
                    │ sched_ctrl   chan_counter_array (Cnt_i)     │
                    │ list_ptr_regs (WA_i, RA_i)                  │
                    │ data_buffer {D, A, NA} + idle_addr_fifo     │
                    │ deadline_cascade (subtracter, MUX, EI/EO)   │
                    └─────────────────────────────────────────────┘
 non-real-time cells ─► nrt_fifo ─► sent only when no real-time cell is due
```

| File | Block |
|---|---|
| `rtl/edf_atm_scheduler.sv` | top: chain of `2**SEL_W` link schedulers, shared cell buffer and its free list, non-real-time FIFO |
| `rtl/link_scheduler.sv` | one scheduler: EDF queue, controller, counters, list registers, data buffer, cascade stage |
| `rtl/edf_queue.sv`, `rtl/edf_block.sv` | shift-register EDF queue and one block of it |
| `rtl/sched_ctrl.sv` | picks the operation of each cycle |
| `rtl/chan_counter_array.sv` | `Cnt_i`: cells held per channel |
| `rtl/list_ptr_regs.sv` | `WA_i` (tail) and `RA_i` (head) of each channel's list |
| `rtl/data_buffer.sv` | two-port memory of `{deadline, cell address, next address}` words |
| `rtl/idle_addr_fifo.sv` | free list of a memory; fills itself after reset |
| `rtl/cell_buffer.sv` | two-port memory of 424-bit cells |
| `rtl/deadline_cascade.sv` | comparator against current time + H, and the chaining logic |
| `rtl/channel_decoder.sv` | selects the scheduler that owns a channel |
| `rtl/nrt_fifo.sv` | FIFO for best-effort cells |
| `rtl/edf_pkg.sv` | state numbers and queue operation codes |

## The EDF queue and deadline folding

The queue is a row of `C` identical blocks. Block 0 is the head. Each block
stores `valid, deadline, channel, cell address`. The deadline to insert, `e`,
is broadcast to all blocks. Every block computes `e − q` with its own
subtracter, where `q` is its stored deadline, and looks at the **most
significant bit** `M` of the difference, not at the borrow. With deadlines
kept modulo `D = 2**DL_W`, `M = 1` means "e is earlier than q" whenever the
two are less than `D/2` apart. That stays true when one of them has wrapped
past zero and the other has not. For example, with 8 bits, `F0 − 10 = E0`
has `M = 1`, so a new `F0` goes ahead of a wrapped `10`. An empty block
always reports `M = 1`, so empty blocks collect at the tail.

Each block decides from its own `M` and the `M` of one neighbour:

| operation | condition | action |
|---|---|---|
| insert (`Q_ENQ`) | `M=1`, right (head-side) neighbour `M=1` | take the right neighbour's entry (shift away from head) |
| | `M=1`, right neighbour `M=0` | load the new entry |
| | `M=0` | hold |
| insert + remove head (`Q_ENQ_DEQ`) | `M=0`, left neighbour `M=1` | load the new entry |
| | `M=0`, left neighbour `M=0` | take the left neighbour's entry (shift toward head) |
| | `M=1` | hold |
| remove head (`Q_DEQ`) | — | take the left neighbour's entry |

Equal deadlines give `M = 0`, so a new cell goes behind older cells with the
same deadline. All three operations take one cycle. During insert+remove,
the head block treats its own `M` as 0. Its entry leaves anyway, so it
always refills, even when the new deadline is the earliest of all.

**Requirement:** all deadlines alive at one time, and `current time + H`,
must lie within `2**(DL_W-1)` of each other. With the default
`DL_W = 15` that is 16384 time units. The deadline word has 16 bits in
total: 15 for the deadline and one valid flag, which is a separate flip-flop
here.

## Operations and the controller

`sched_ctrl` looks at whether a cell arrives (IN) and whether one is to be
sent (OUT), and at two counter tests: `F` (the arriving cell's channel holds
no cell, `Cnt_i = 0`) and `L` (the head cell is its channel's last,
`Cnt_j = 1`). The state numbers below are the ones the `state` output shows.

| IN | OUT | condition | state | operation | cycles |
|---|---|---|---|---|---|
| 0 | 0 | | 0 | idle | 1 |
| 1 | 0 | F | 12 | IQ: cell into EDF queue | 1 |
| 1 | 0 | F' | 4 | IB: cell into data buffer at `WA_i` | 1 |
| 0 | 1 | L | 3 | QO: head leaves | 1 |
| 0 | 1 | L' | 1 | BQ&QO: head leaves, channel's next cell moves from data buffer to queue | 1 |
| 1 | 1 | F L | 15 | IQ&QO | 1 |
| 1 | 1 | F' L | 7 | IB&QO | 1 |
| 1 | 1 | F' L' | 5 | IB&BQ&QO (write and read the data buffer together) | 1 |
| 1 | 1 | F L' | 13 → 29 | IQ, then BQ&QO | 2 |
| – | – | after reset | 30 | free lists being filled | `max(N, NB−C)` |

Only the `F L'` case needs two cycles, because both halves must insert into
the EDF queue. In the first cycle the input is taken and `out_ack` is
withheld. In the second cycle inputs are refused and the output is served.
The second cycle checks `L` again: if the new cell became the head and is
its channel's only cell, the second cycle is a plain QO (3).

A cell can arrive for the same channel whose last cell leaves in that
cycle. That combination is `F'` and `L`, but it is handled as IQ&QO (15), so
that the channel keeps its cell in the EDF queue.

**Linked lists.** A data-buffer word holds a cell's deadline, its cell
address and `NA`, the address of the next word of the same channel. Each
channel always owns one spare word, pointed to by `WA_i`. An IB writes the
cell into the word at `WA_i`. It also stores the next free address from the
free list as `NA` and moves `WA_i` there. A BQ reads the word at `RA_i` and
moves `RA_i` to the `NA` it read. It returns the old `RA_i` to the free
list. After reset `WA_i = RA_i = i`, and the free list holds addresses
`C … NB−1`. The data-buffer read port is combinational, so BQ&QO fits in one
cycle.

## Early traffic and chaining schedulers

`deadline_cascade` compares the head deadline `A` with a bound `B`, again by
the MSB of `A − B`. For a single scheduler, `B = current time + H`: the head
may leave only when its deadline is below that bound. Otherwise the output
request is ignored and a non-real-time cell is sent instead, if there is
one.

To serve more channels, `2**SEL_W` schedulers (4 by default) are chained:

* The top `SEL_W` channel bits select the scheduler that owns a cell.
* `DO` of each stage is the smaller of its head and its `DI`, and feeds the
  next stage's `DI`. The first stage's `DI` is `current time + H`.
* An enable travels the other way. The last stage gets `EI = 1`, and
  `EO = EI & !(A<B)`. The stage with `EI & (A<B)` is selected. That is the
  last stage whose head beats everything before it in the chain, which is
  the global minimum.
* Only the selected stage dequeues, and only it drives its cell address
  onto the shared address bus. That bus is an OR of outputs that are zero
  unless selected, a two-state stand-in for a tri-state bus.
* If two stages have the same deadline, the stage nearer the start of the
  chain wins.

The chained schedulers share one cell buffer and its free list. Each
scheduler has its own data buffer.

## Top-level interface (`edf_atm_scheduler`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `cur_time`, `horizon` | in | `DL_W` | current time and `H`, same modulo time base as the deadlines |
| `in_valid` / `in_ready` | in / out | 1 | a cell is taken when both are high |
| `in_rt` | in | 1 | 1 = real-time cell, 0 = best-effort |
| `in_dl`, `in_ch`, `in_cell` | in | `DL_W`, `SEL_W+CH_W`, `CELL_W` | deadline, channel, cell |
| `out_req` / `out_ack` | in / out | 1 | link asks for a cell; ack in the cycle it leaves. Keep `out_req` high until `out_ack`. |
| `out_is_rt`, `out_ch`, `out_dl` | out | | real-time cell due; its channel and deadline |
| `out_valid`, `out_cell` | out | 1, `CELL_W` | the cell, one cycle after `out_ack` |
| `init_done` | out | 1 | free lists filled; `in_ready` stays low until then (`N` = 4096 cycles) |
| `mod_state` | out | 5 × 4 | state number of each chained scheduler |

`in_ready` is low in these cases:

* the cell buffer is full;
* the owning scheduler's data buffer has no free word (this is checked
  conservatively, even for a cell that would go straight into the queue);
* the owning scheduler is in the second cycle of 13 → 29.

Best-effort cells are refused only when `nrt_fifo` is full.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `SEL_W` | 2 | log2 of the number of chained schedulers (4) |
| `C`, `CH_W` | 256, 8 | channels per scheduler, channel-number bits |
| `DL_W` | 15 | folded deadline bits (plus a valid flag = 16-bit deadline word) |
| `N`, `CA_W` | 4096, 12 | cell-buffer size and cell-address bits |
| `NB`, `BA_W` | 4096, 12 | data-buffer words per scheduler and their address bits |
| `CELL_W` | 424 | cell width (53 bytes) |
| `NRT_DEPTH` | 1024 | best-effort FIFO depth |

`NB = N` leaves `N − C` free data-buffer words, the number of buffered cells
the architecture calls for. The other `C` words are the spare tails.

## What is from the original architecture and what is not

The following follow the original design:

* the three-part structure: queue and control, data buffer, cell buffer;
* the `C`-block shift-register queue;
* the `M`/`M_r`/`M_l` rules and folding by the subtracter MSB;
* the operation set and state numbers, with the single two-cycle case;
* the `Cnt_i`, `WA_i` and `RA_i` registers;
* the self-initialising free lists;
* the early-traffic comparator;
* the DI/DO, EI/EO chaining;
* the best-effort FIFO served only when no real-time cell is due.

The following are choices of this implementation:

* all handshakes;
* the combinational data-buffer read;
* the registered cell-buffer read;
* the spare-word linked-list scheme and its reset values;
* the head block forcing `M = 0` during insert+remove;
* the same-channel rule;
* the second cycle of 13 → 29 checking `L` again;
* the OR bus in place of tri-states;
* `cur_time` and `horizon` as inputs;
* the best-effort FIFO depth and the counter widths.

The router, the VPI/VCI translation and the traffic shaper that assigns
deadlines are outside this design. The scheduler expects cells of one
channel to arrive with non-decreasing deadlines. Within a channel, cells
always leave in arrival order.

## Simulating

Every testbench in `tb/` checks itself and ends with
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_link_scheduler \
    rtl/edf_pkg.sv rtl/*.sv tb/tb_link_scheduler.sv
./obj_dir/Vtb_link_scheduler
```

For the end-to-end tests, also pass `tb/atm_sched_checker.sv`.

| Testbench | What it checks |
|---|---|
| `tb_edf_atm_scheduler` | whole design at reduced size (4 × 4 channels, 32 cells, 16-word data buffers, 8-cell best-effort FIFO); cycle-exact reference model; every mechanism must occur, including full buffers |
| `tb_edf_atm_scheduler_full` | whole design at default parameters; initialisation plus 4000 cycles of traffic across the `2**15` wrap |
| `tb_trace_replay` | one default-size scheduler runs a fixed 15-step sequence, then drains: states, cells leaving, one cycle per step except 13 → 29, and wrapped deadlines 1000/2000 leaving after 32000 |
| `tb_link_scheduler` | one scheduler with 16 queue blocks and a 32-word data buffer, random traffic against a reference model, all states, early holds, full data buffer |
| `tb_edf_queue`, `tb_edf_block` | queue order under wrap-around; block rules and the MSB-versus-borrow example |
| `tb_sched_ctrl` | the operation table above |
| others | one per remaining block |

`atm_sched_checker` holds the stimulus and reference model shared by the two
end-to-end tests.

## Limits

* Folding is only correct while the live deadlines, and current time + H,
  span less than `2**(DL_W−1)`. The hardware does not check this.
* The input-ready test for the data buffer is conservative.
* Timing closure, area and the 12.5 MHz target clock for 2.5 Gbit/s have not
  been evaluated. The long combinational paths are the broadcast to all `C`
  blocks and the ripple through the chained cascade stages.
