# Adaptive i-out-of-m traffic shaper: line-card hardware

An ATM virtual circuit (VC) that is shaped with a fixed contract of "at most
*i* cells in any *m* cell slots" is only as good as the guess behind *i* and
*m*. If the source speeds up, cells pile up in front of the shaper. If it slows
down, the reserved bandwidth sits unused. The adaptive shaper closes the loop.
Hardware on the line card enforces the current contract cell by cell. It also
measures, per VC, how many cells went out and in how many bursts. At the end of
every measurement interval, software on the line card processor (LCP) turns
those counts into an average rate and an average burst size. It then picks new
*i* and *m* values and writes them back without stopping traffic.

This repository holds that hardware, in synthesizable SystemVerilog:

* the **i-out-of-m controller**, which keeps a credit account per VC and books
  every used credit for return *m* slots later;
* the **pacing measurement unit**, which counts cells and bursts for up to 127
  selected VCs;
* the **slot timer** that cuts each cell slot into sub-slots.

The LCP software is not hardware. The testbench models it, so the whole loop
can be simulated.

## The pacing rule

Time is slotted. The transmit cell bus carries at most one cell per cell slot,
and a slot lasts 13 clocks of 40 ns (520 ns). Each paced VC has:

* `i`, the credits it currently holds;
* `m`, its window in slots.

Sending a cell costs one credit, and that credit comes back `m` slots later.
A VC therefore never sends more than `i` cells in any `m` consecutive slots.
Its long-run rate is at most `i/m` of the line, and `i` is also its largest
back-to-back burst.

When a VC spends its last credit, the controller pulses **Stop** for that VC to
the cell source. When a returned credit makes a stopped VC eligible again, it
pulses **Start**. The cell source (a round-robin queue server) obeys these
signals and is not part of this design.

## How the controller keeps its books

`rtl/im_controller.sv` has five single-port SRAMs (`rtl/sram_sp.sv`):

| table | entries | word | contents |
|---|---|---|---|
| i table | 4096 (per VCI) | 12 bits | `enb` (bit 11: VC is paced), `stopped`, signed 10-bit `i` |
| m table | 4096 (per VCI) | 12 bits | `sem` (semaphore), 11-bit `m` |
| schedule pointers | 2048 (per slot of the window) | 32 bits | head and tail of that slot's queue, each a 15-bit pointer with a nil bit |
| schedule list, VCI half | 16384 | 13 bits | nil bit, 12-bit VCI whose credit is due |
| schedule list, link half | 16384 | 16 bits | nil bit, 15-bit next pointer |

Each of the 2048 slots of the window owns a queue: a linked list in the
schedule list, found through that slot's head and tail pointers. The list
elements that are not in any queue form a free list, threaded through the
same next pointers.

A circular slot counter **C** (11 bits) names the slot whose queue the credit
return is working on.

* **Flow control, for each cell on the bus.**
  1. Read the VC's `i` and `m`. Nothing happens if `enb` is 0.
  2. Write back `i-1`. If the result is 0 or less and the VC is not already
     stopped, set `stopped` and pulse Stop.
  3. Take an element off the free list, fill it with the VCI, and append it to
     the queue of slot `(C + m) mod 2048`.
* **Credit return, once per slot.**
  1. Look at the queue of slot C. If it is empty, advance C by one and look at
     the next queue instead. At most one empty queue is passed per slot.
  2. Take the VCI at the head of the queue and read its entries.
  3. Unless that VC's `sem` bit is set, write back `i+1`. If the VC was stopped
     and now has credits, clear `stopped` and pulse Start.
  4. Unlink the head and push it onto the free list.
  5. If that emptied the queue, advance C, but only if C has not already moved
     in this slot.

### Sub-slot schedule

Every memory has one port, so each access has a fixed sub-slot. The numbers
come from `rtl/slot_timer.sv`.

| sub-slot | flow control (this slot's cell) | credit return (queue C) | other |
|---|---|---|---|
| T0 | sample `cell_valid`/`cell_vci` | | finish last slot's LCP access |
| T1 | read i and m entries | | |
| T2 | write `i-1`; Stop; compute `C+m` | | |
| T3 | read pointers of slot `C+m`; read free-list head | | |
| T4 | write the element; update the pointers; pop the free list | | |
| T5 | link the old tail to the new element | | |
| T6 | | read pointers of slot C | |
| T7 | | if empty: C+1, read that slot instead | |
| T8 | | read the head element | |
| T9 | | read the head VC's i and m | |
| T10 | | write `i+1`, or do nothing under `sem`; Start | |
| T11 | | unlink the head, free it, maybe C+1 | |
| T12 | | | one LCP access to the i or m table |

### Credit-return skew

Only one credit comes back per slot. If three VCs booked credits into the same
slot, the second and third return one and two slots late. Every queue behind
them slips as well. The testbench reproduces a worked example, as the VCs in
the order their credits return:

1. Queue K holds VCs 40 and 12.
2. Queue K+1 is empty.
3. Queue K+2 holds VCs 76, 10 and 23.
4. Queue K+3 holds VCs 88 and 99.

They come back in slots K to K+6, one per slot.

C therefore lags the wall clock by the total slip so far. This lag only ever
grows, and that is harmless: new credits are booked at `C + m`, relative to C.
So no credit returns earlier than `m` slots after its cell. The only cost is
that a credit waits longer when queues ahead of it hold several entries. A
lightly loaded link keeps the slip small.

The rule "C moves at most one step per slot" is what keeps credits from coming
back early. Without it, C could both pass an empty queue and finish the next
one in the same slot, and so run ahead of real time.

## Changing i and m while cells flow

Suppose the LCP did a plain read-modify-write of `i` while the hardware was
also updating it:

* a credit taken in between would be overwritten, and the VC would gain it;
* a credit returned in between would be overwritten, and the VC would lose it.

The design supports this update sequence:

1. Stop the VC at the source, so that no new credit is taken.
2. Write the m table with `sem = 1`. From now on the credit return holds still
   when this VC reaches the head of its queue. It does not advance C, and later
   queues wait too.
3. Wait two slots, so that any decrement already in flight has landed.
4. Read `i`, add the change in `i` (new minus old assigned value), and write it
   back. Set `stopped` if the result is 0 or less.
5. Write the m table with the new `m` and `sem = 0`.
6. If the VC holds credits, let the source send it again. Otherwise leave it
   stopped: the hardware's Start restarts it when a credit comes back.

The semaphore is in the m table, and the controller never writes the m table.
So setting and clearing `sem` cannot clobber a credit update. An earlier layout
kept everything in one word, and the LCP's semaphore writes lost credits. The
end-to-end test catches exactly that.

Freezing the return delays other VCs' credits by the length of the update.
This is the price of the scheme.

## Measuring rate and bursts

`rtl/pacing_meas.sv` holds two tables:

* The **translation table** has 4096 × 7 bits, indexed by VCI. It maps a VC to
  a measurement index, and 0 means "not measured". Index 0 is never used, so
  127 VCs can be measured.
* The **measurement table** has two banks, each of 128 entries of
  `{cells, bursts}`, both 24-bit.

The hardware counts into bank `bank_sel`, and the LCP reads and clears the
other bank. At the end of an interval the LCP flips `bank_sel`, waits one slot,
then reads and clears each entry.

**Burst rule.**

* A slot counter time-stamps every slot. Two idle slots in a row mark the line
  idle, and the unit records an idle time stamp.
* Each measured VC keeps the time stamp of its previous cell.
* A cell starts a new burst for its VC when the VC's previous cell is older
  than the last idle time stamp, that is when `(now - prev) > (now - idle)`.
* One exception: a VC that is out of credits looks idle to this rule even
  though it has cells waiting. The controller's Stop therefore sets a
  **stopped flag** per measured VC. While that flag is set, a new burst is not
  counted. The VC's next cell clears the flag.

Reading a count of 0 bursts with a non-zero cell count is possible. This
happens when a VC's only burst began in the previous interval.

## The adaptation step (software, modelled in the testbench)

Once per interval, for each VC, with `I` the interval length in slots:

1. Compute `λ = cells / I`, `β = cells / bursts` and `r = λ / (i/m)`.
2. Adapt the burst size. If `i < 1.1β`, grow `i` by a factor `μ+`. If
   `i > 1.3β`, shrink it by `μ-`.
3. Adapt the rate.
   * If `r > 0.85`, make the rate larger: `m/i ← m/i·(1-γ)`.
   * Otherwise make it smaller: `m/i ← m/i·(1+γ)`.
4. Set `m = (m/i)·i`.

The testbench uses these values: μ = 0.25, γ = 0.32 when the rate goes up,
γ = 0.15 when it goes down, a target utilisation of 0.85, and a starting
contract of `i = 10`, `m = 100`.

## Top level and its ports

`rtl/shaper_top.sv` wires the slot timer, the controller and the measurement
unit to the same cell bus. It also routes the controller's Stop into the
measurement unit's stopped flags.

| port group | direction | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock (40 ns intended), asynchronous active-low reset |
| `phase`, `ready` | out | current sub-slot; both units have cleared their tables |
| `cell_valid`, `cell_vci[11:0]` | in | the cell on the transmit bus this slot, sampled at the end of T0 |
| `stop_valid/stop_vci`, `start_valid/start_vci` | out | one-clock Stop and Start pulses to the cell source |
| `pt_req, pt_tbl, pt_we, pt_addr, pt_wdata[11:0]` | in | LCP access to the i table (`pt_tbl = 0`) or the m table (`pt_tbl = 1`) |
| `pt_rdata, pt_done` | out | read data, and the done pulse |
| `bank_sel` | in | measurement bank the hardware counts into |
| `pm_req, pm_op, pm_addr, pm_wdata[6:0]` | in | LCP access to the measurement unit: write or read a translation entry, read counts, read and clear counts |
| `pm_done, pm_rd_idx, pm_rd_meas, pm_rd_stopped` | out | results |
| `c_ptr[10:0]` | out | the credit return counter C |
| `ev_*` | out | one-clock event pulses for observation |

The `ev_*` pulses are:

| pulse | event |
|---|---|
| `ev_dec` | credit taken |
| `ev_ret` | credit returned |
| `ev_skip` | empty queue passed |
| `ev_freeze` | return held by `sem` |
| `ev_drop` | free list empty, booking lost |
| `ev_cell` | measured cell counted |
| `ev_burst` | burst counted |
| `ev_held` | burst not counted because the VC was stopped |
| `ev_idle` | line went idle |

Both LCP ports use the same handshake:

1. Raise `*_req` with the operands.
2. Hold them until `*_done` pulses.
3. Drop `*_req`.

Each unit serves one access per slot. A pacing table access is taken at T12
and completes in T1 of the next slot. A measurement access is taken at T8 and
completes in T11.

After reset, the units clear their own tables. The i and m tables become
all-zero, which means "not paced". Every queue becomes empty, and all 16384
elements go on the free list. `ready` rises after about 16384 clocks, and
traffic and LCP requests should wait for it.

### Default sizes

| parameter | default | meaning |
|---|---|---|
| `NUM_VC` | 4096 | VCs in the pacing and translation tables |
| `LIST_DEPTH` | 16384 | schedule list elements, i.e. credits in flight over all VCs |
| `MEAS_N` | 128 | measurement entries per bank (127 usable) |
| `STOP_LEVEL` | 0 | Stop when `i` falls to this or below |
| `START_LEVEL` | 0 | Start when `i` rises above this |

The window of 2048 slots and the field widths are fixed in
`rtl/shaper_pkg.sv`. At these sizes the top synthesises with yosys to about:

* 600 word-level cells;
* 3.6 k flip-flop bits, mostly the 127 × 24-bit burst time stamps;
* 0.66 Mbit of memory.

## Where this design departs from the description it follows

* **Start threshold.** The original timing table restarts a VC only once its
  credit count exceeds 3. With that rule, a VC assigned 3 or fewer credits
  would stay stopped forever. The default here is 0. Set `START_LEVEL = 3` to
  get the original behaviour.
* **Schedule address.** The timing table computes the queue address modulo
  4096, but the schedule pointers table has 2048 entries, and 2048 is also the
  stated maximum window. This design uses modulo 2048.
* **Field widths.** There are two statements of the widths. One gives a 10-bit
  signed `i` and an 11-bit `m`. The other gives an 11-bit `i` and a 12-bit `m`.
  The first is used here, and the 12-bit memory words hold the flag bits on
  top. So the largest `i`, and therefore the largest burst, is 511 cells. The
  second statement gives a largest burst of 1024 cells. Widen `I_W` together
  with `PT_W` to get that.
* **Consistency scheme.** The original also considers a second way to keep
  the LCP's updates of `i` safe. In that scheme, the controller delays its
  end-of-burst signal to the end of T4, and the LCP must finish its write
  before the next T2. The original rejects this because its software is too
  slow, so only the semaphore scheme is built here.
* **Increment sub-slot.** The original performs the credit increment at T4.
  Here it happens at T10, because the list walk needs four dependent reads on
  single-port memories first. The decrement is at T2, as in the original.
* **Empty queues** are passed one per slot. This detail is not specified in
  the original.
* **Free list exhausted.** The credit booking is dropped, and `ev_drop`
  reports it. This case is not specified in the original.
* **Burst rule.** The algorithm's description has a "same VC as the previous
  cell" rule. The hardware description has the two-idle-slots time-stamp rule.
  This design implements the hardware rule.
* **The `stopped` bit in the i table.** The original only hints at this bit,
  with a column next to `i` in its table layout. Here it makes Stop and Start
  fire once per episode.
* **Bank switching.** The two measurement banks are in the original, but how
  they are switched is not described. Here the LCP drives `bank_sel`.
* **Table clearing after reset** is done by the hardware here. In the original
  system, software cleared the tables.

## Verification

Every testbench is self-checking. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | block | what it checks |
|---|---|---|
| `tb/tb_slot_timer.sv` | slot timer | T0..T12 sequence, 13-clock slot, `slot_start` |
| `tb/tb_sram_sp.sv` | SRAM | random fill and read-back, one-cycle latency, read data held, write leaves read data alone |
| `tb/tb_pacing_meas.sv` | measurement unit | cell and burst counts over several intervals with random traffic, idle gaps and Stops, against a reference model |
| `tb/tb_im_controller.sv` | controller | see below |
| `tb/tb_shaper_top.sv` | whole design, default sizes | see below |

`tb_im_controller` checks:

* a lone VC with `i = 3`, `m = 20` sends in exactly slots 0–2, 20–22, and so on;
* the skew example returns its credits in the right order;
* a random mix of VCs never exceeds `i` in any `m` slots;
* all credits come back;
* the semaphore freezes the credit return;
* a reduced instance with 4 list elements reports lost bookings.

`tb_shaper_top` runs four sources:

* an ON-OFF source with a 20,000-slot rate bump;
* three steady sources.

It also runs a round-robin server and the LCP model, over 20 intervals of
5,000 slots. It checks:

* every measured count against the cells actually sent;
* that the assigned rate rises with the bump and falls afterwards;
* that every VC holds exactly its assigned credits once traffic stops;
* that each mechanism occurred at least once: Stop, Start, return, skew,
  freeze, burst, held burst, idle, bank swap, `i` up and down, rate up and
  down.

`tb_shaper_top` runs at the full default sizes and takes about a second.

`tb/tb_workload_bump.sv` runs a longer experiment at full size, in eight runs
of 1,000,000 slots each. Every run replays the same pseudo-random ON-OFF source.
The source averages 0.1 of the line, and its rate is raised to about 0.33 for
slots 50,000 to 100,000. One run uses the static contract `i = 10`, `m = 100`.
The other seven adapt, with measurement intervals from 1,000 to 100,000 slots.

The test checks the measured counts, credit conservation, and two properties:

* every adaptive run beats the static one;
* the shortest interval beats the longest.

It also prints the delays. One run took about 1 minute:

| contract | average queueing delay (slots) | maximum (slots) |
|---|---|---|
| static i=10, m=100 | 101,020 (11,335 cells still queued at the end) | 120,852 |
| adaptive, 1,000-slot interval | 90 | 1,760 |
| adaptive, 5,000 | 437 | 7,387 |
| adaptive, 12,500 | 927 | 8,559 |
| adaptive, 20,000 | 2,163 | 16,514 |
| adaptive, 25,000 | 3,602 | 28,085 |
| adaptive, 50,000 | 5,265 | 41,960 |
| adaptive, 100,000 | 12,609 | 77,679 |

Longer intervals react later to the bump and so leave a longer backlog. The
static contract never catches up. The ON/OFF period lengths are this test's
own choice, so only the ordering is meaningful, not the absolute numbers.

Simulate with plain Verilator (5.x):

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_shaper_top \
    -y rtl -y tb +libext+.sv rtl/shaper_pkg.sv tb/tb_shaper_top.sv
./obj_dir/Vtb_shaper_top
```

To run another test, replace `tb_shaper_top` with its name. The tests
initialise everything they read, and they also pass with
`+verilator+rand+reset+2 +verilator+seed+N`.

## Changing it

* The table sizes are parameters. The window (2048 slots) follows from `M_W`
  in `rtl/shaper_pkg.sv`, and changing `M_W` also changes the width of `m`.
* The sub-slot plan lives in the `case (phase)` blocks of both units. Each
  memory has exactly one access per sub-slot, and that one-access rule is what
  must be kept when moving steps around.
* The LCP ports are plain request/done handshakes. Adapting them to a real
  processor bus means adding only an address decoder and a wait-state
  generator.
