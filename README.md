# Subarray-level parallelism and PARA for a DDR3 memory system

A DRAM bank can serve only one row at a time. Two requests to different rows
of the same bank (a *bank conflict*) are served one after the other: close
the first row, wait for the bank to precharge, open the second row, and so on.
Inside the chip, though, a bank is not one monolithic array. It is built from
*subarrays*, each with its own row of sense-amplifiers (its *local
row-buffer*). They share only a global row-address path and a set of global
bitlines that lead to the bank's I/O.

This design exploits that. With a few changes to the bank periphery and a
controller that knows about subarrays, conflicting requests that fall into
different subarrays can overlap. Three levels of this are built, each a
superset of the one before:

| scheme | what overlaps | what the bank needs |
|---|---|---|
| baseline | nothing: one row open per bank, tRP before any ACT | nothing new |
| SALP-1 | precharge of one subarray with activation of another | nothing new: the controller drops tRP between different subarrays |
| SALP-2 | write recovery (or tRTP) of one subarray with activation of another | a row-address latch per subarray; PRECHARGE names a subarray |
| MASA | many subarrays stay open; the controller switches between them | a *designated* bit per subarray, the SA_SEL command and a subarray-select wire |

The same memory system also carries **PARA** (probabilistic adjacent row
activation), a defence against *disturbance errors*. Opening one row many
times within a refresh interval can flip bits in the rows physically next to
it. PARA needs no counters. Every time the controller closes a row it flips
a biased coin, and on heads it refreshes one of the two neighbouring rows.

The RTL is a complete single-channel system. Cache-line requests go in; the
rank's read data comes back. The scheme is a run-time input, so one build
can compare all four.

## Structure

```
salp_para_system
 ├─ mem_ctrl          queues, FR-FCFS scheduler, per-subarray state, refresh
 │   └─ para_unit     coin, neighbour computation, refresh queue
 └─ dram_rank         8 banks, CAS-latency pipeline, REFRESH check
     └─ dram_bank     global row-decoder, global address-bus, global bitlines
         ├─ row_predecoder
         └─ 8 x { subarray_periph (latches, decoder, A, D),
                  subarray_cells  (behavioural cell array + row-buffer) }
```

`dram_pkg` holds the command and scheme encodings, the geometry and the
DDR3-1066 timings in clock cycles (533 MHz):

| tCL | tRCD | tRP | tRAS | tWR | tRTP | tCCD | tCWL | tWTR | tRRD | tFAW | tRA | tWA | tRFC | tREFI |
|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|
| 8 | 8 | 8 | 20 | 8 | 4 | 4 | 6 | 4 | 4 | 20 | 4 | 14 | 86 | 4160 |

The default geometry: 8 banks of 32K rows; 8 subarrays of 4096 rows per bank;
128 columns of 64-byte lines per row (an 8 KB row); 64-entry read and write
queues.

## Inside a bank: how several rows can be open at once

### The global address-bus and INV

A row address of 15 bits is split into a 3-bit subarray ID and a 12-bit row
within the subarray. `row_predecoder` turns the ID into 8 one-hot lines and
the row into four 3:8 one-hot groups: 40 lines in all, the *partially
pre-decoded* address. `dram_bank` drives these lines (the global
address-bus) for ACT, SA_SEL and PRE.

For PRE the row part is **INV**, all lines low. INV never occurs for a valid
address, because every valid group has exactly one line high.

### Latched subarray row-decoding (SALP-2)

In a conventional bank a single global latch holds the row address, so only
one wordline in the whole bank can be high. Here every subarray has its own
latch (`subarray_periph`). A subarray loads the bus into its latch when the
bus carries its own ID, or when the ID part is INV. So:

* ACT to subarray *s* loads a valid row into *s* only, and *s* raises that
  wordline.
* PRE to subarray *s* loads INV into *s* only. Its wordline falls; the other
  subarrays keep theirs.
* A PRE with the ID part INV as well would precharge every subarray: the
  conventional whole-bank precharge.

The subarray decoder raises a wordline only when each 3:8 group in its latch
is one-hot. `activated` (A) is the OR of the subarray's wordlines, and its
inverse enables the local precharge circuit.

### Designated bit, SA_SEL and the global bitlines (MASA)

If two subarrays are open and a READ arrives, both row-buffers would drive
the global bitlines. So under SALP-2 a column command is only allowed while
exactly one subarray is activated. MASA instead gives each subarray a
one-bit *designated* latch (D). A row-buffer connects to the global bitlines
only when D is set and a column command is under way.

ACT and SA_SEL both pulse a shared *subarray-select* wire. On that pulse the
subarray whose ID is on the bus sets D, and every other subarray clears it.
SA_SEL therefore looks like ACT to the controller: same ID and row. It only
moves the designation to a row that is already open and does not touch the
cells. In the model the global bitlines are an OR of the connected
row-buffers. If two are ever connected at once, `short_circuit` latches, and
an assertion fires in simulation.

### Cells

`subarray_cells` is a **behavioural model**: cells and sense-amplifiers are
analog. When a wordline rises, the row is copied into the row-buffer at the
next clock edge. A column access must anyway wait tRCD after ACT. Writes
update both the row-buffer and the cells. The storage is sparse, an
associative array, so a full-size bank costs memory only for the lines used.
Synthesis tools do not accept this model; everything else is synthesizable.

## The controller: what each scheme allows

`mem_ctrl` is the part with the most logic. It keeps:

* a unified request queue, 64 read and 64 write entries, each holding the
  bank, row, column, tag and age;
* per subarray: open/closed, the open row, and tRCD, tRAS, tRP and
  write-recovery counters;
* per bank: the designated subarray and a tRA/tWA counter;
* per rank: tRRD, tFAW (last four ACTs), tCCD, read/write turnaround and tRFC.

**Scheduling** is FR-FCFS: the oldest request whose column command can go
now wins, otherwise the oldest request that needs an ACT (or SA_SEL). Writes
are posted and served in batches. The controller enters *drain mode* when the
write queue reaches 48 entries, or when no read is waiting, and leaves it at
16. The row policy is **closed-row**, per subarray: a subarray is precharged
as soon as no queued request of the kind being served wants its open row.

One command is issued per cycle, in this priority:

1. REFRESH, when due and every subarray is closed;
2. forced PRE: a subarray closed for refresh, for a PARA row in the same
   subarray, or under SALP-2 the non-designated one of two open subarrays;
3. PARA: the neighbour-row ACT;
4. the oldest ready READ/WRITE;
5. the oldest ACT, or SA_SEL under MASA;
6. closed-row PRE.

The **ACT rule** is where the schemes differ. An ACT to a closed subarray
needs tRP since that subarray's own last PRE, plus tRRD, tFAW and tRFC.
Then:

* **baseline**: no subarray of the bank open, and tRP since the last PRE to
  *any* subarray of the bank;
* **SALP-1**: no subarray of the bank open; tRP counts only within the same
  subarray, so a PRE to *x* and an ACT to *y* can be back to back;
* **SALP-2**: at most one other subarray open. If there is one, it must have
  no queued request and have met tRAS, so that only its write recovery (or
  tRTP) overlaps the new ACT. tRA (after READ) or tWA (after WRITE) must also
  have passed. No column command goes out while two are open; the older one
  is precharged first;
* **MASA**: any number open, tRA/tWA since the bank's last column command.
  Before a column command to an open subarray that is not designated, the
  controller issues SA_SEL, also gated by tRA/tWA.

Under every scheme PRE names the subarray. Under baseline and SALP-1 it
closes the only open one, so it is a whole-bank precharge.

**Refresh** asks for a REFRESH every tREFI (7.8 µs, 4160 cycles). The
controller first closes everything; ACT and SA_SEL then wait tRFC.

**Hazards**: a write to a line already in the write queue merges into it. A
read to a line with a queued write, or a write to a line with a queued read,
holds the input (`req_ready` low) until the older request is served, so reads
always see the latest data. Read data returns in command order with its tag.

**Counters** (`stats`): ACT, PRE, RD, WR, SA_SEL and REF commands; PARA heads,
PARA ACTs and PARA overflows; SALP-1 overlaps (an ACT within tRP of a PRE to
another subarray); SALP-2 overlaps (an ACT while another subarray is open);
MASA multi-open events; drain entries; input-stall cycles.

## PARA

`para_unit` sits beside the scheduler and sees every PRECHARGE (bank and
logical row):

* **Coin**: a 32-bit xorshift generator runs every cycle. A close is heads
  when the low `P_BITS` = 20 bits are below `p_thresh`, so
  p = p_thresh / 2^20. The default 1049 gives p ≈ 0.001; 5243 gives 0.005.
* **Neighbour**: the physical row order is taken to be the logical row
  address rotated right by `lsb_offset`: the chosen logical bit becomes the
  physical LSB. The neighbour is physical ±1 with equal probability, rotated
  back. A row at either end of the bank has one neighbour, which is always
  chosen. The module's own row mapping is an input because the controller
  cannot know it otherwise. Rows that the DRAM has remapped to spares are not
  covered.
* **Queue**: heads enter a 4-deep queue. The controller serves the head of
  the queue before ordinary requests. It precharges the subarray if another
  row of it is open, then opens the neighbour row, and the closed-row policy
  closes it again after tRAS. That closing PRE is itself reported to PARA,
  as any other close is. A head that arrives while the queue is full is
  dropped and counted (`overflow`). If the neighbour row is already open,
  the request is dropped: that row is being restored anyway.

PARA keeps no record of which rows were opened; only the coin and the small
queue hold state.

## Address mapping

Line-interleaving, from least significant bit up: bank (3), column (7), row
(15). This is only a choice of bits, so it is wired in the top itself. Consecutive cache lines fall into consecutive banks. The subarray is
the top 3 bits of the row, so each subarray holds a contiguous block of 4096
rows.

## Interface of the top (`salp_para_system`)

| signal | meaning |
|---|---|
| `scheme` | 0 baseline, 1 SALP-1, 2 SALP-2, 3 MASA; change only while idle |
| `refresh_en`, `para_en` | enable periodic REFRESH and PARA |
| `para_p_thresh`, `para_lsb_offset` | PARA probability and row mapping |
| `req_valid/ready/write`, `req_line_addr[24:0]`, `req_wdata[511:0]`, `req_id[7:0]` | request, taken on valid && ready |
| `resp_valid`, `resp_id`, `resp_data` | read data, in command order |
| `mon_cmd/bank/sa/sa_row` | the DRAM command bus, for observation |
| `sa_activated[63:0]`, `sa_designated[63:0]` | A and D of every subarray (bank*8+subarray) |
| `drain_mode`, `stats` | write-drain state and event counters |
| `short_circuit`, `access_error`, `ref_error` | sticky error flags of the rank |

A read to a closed row on an idle system takes 3 + tRCD + CL = 19 cycles from
acceptance to `resp_valid`. That is one cycle to enter the queue, one to
schedule, one command register, tRCD, then CL.

## Verification

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| bench | what it checks |
|---|---|
| `tb_row_predecoder` | every ID and row exhaustively against the one-hot arithmetic |
| `tb_subarray_periph` | latch, INV, wordline, A, D and bitline switch, on random bus traffic and an ACT, SA_SEL and PRE of wordline 0x20 |
| `tb_subarray_cells` | row load, write-through to the cells, data kept across other rows' activations, access errors |
| `tb_dram_bank` | random MASA command stream against a model of A, D and the data; no short circuit |
| `tb_dram_rank` | read data exactly CL after READ, bank routing, REFRESH check |
| `tb_para_unit` | neighbours for several bit offsets and the edge rows; 400k closes at p = 0.001 give 320-480 heads; overflow count with a full queue |
| `tb_mem_ctrl` | controller plus rank plus an independent timing checker (`dram_timing_checker`); data scoreboard; latency; read-conflict and write-conflict loads under each scheme |
| `tb_salp_para_system` | the whole system end to end (64-bit lines, tREFI 700); every mechanism must happen at least once; every ACT must open a requested row or a neighbour of a closed row |
| `tb_subarray_sweep` | the same conflict-heavy random stream on systems with 2, 8, 32 and 128 subarrays per bank, baseline against MASA; data checked; the speed-up must grow with the subarray count |
| `tb_para_overhead` | PARA at p = 0.005: a random stream with PARA off and on (at most 3% slower), PARA activations within 4 sigma of p times the row closes, and a row-hammer pattern after which all four neighbour rows must have been refreshed |
| `tb_full_size` | the top with every parameter at its default: 256 writes and 320 reads under MASA with refresh and PARA, data and refresh rate checked |

The timing checker keeps its own per-subarray state. It applies the DDR3
rules plus the rules of the selected scheme, and counts violations; every
bench that uses it requires zero. In the conflict loads the completion times
must order as the mechanisms predict. For reads: SALP-1 beats the baseline,
SALP-2 is no slower than SALP-1, and MASA beats SALP-1. For writes to new
rows: each step from baseline to SALP-2 is faster, and MASA is no slower.
One typical run of the end-to-end bench (cycles):

| scheme | read conflicts (48 reads) | write conflicts (32 writes) |
|---|---|---|
| baseline | 762 | 1178 |
| SALP-1 | 578 | 930 |
| SALP-2 | 555 | 775 |
| MASA | 444 | 767 |

In the sweep (400 requests over two banks, 8 reads in flight), MASA's
speed-up over the baseline was 1.67 with 2 subarrays per bank, 2.11 with 8,
2.11 with 32 and 2.13 with 128: most of the gain arrives by 8 subarrays.

With PARA at p = 0.005 a 1500-request random stream ran 0.35% slower than
without it. In the hammer test each neighbour row was refreshed 4 to 11 times
over 4000 openings of its aggressor.

To run one bench with Verilator 5:

```
verilator --binary --timing --assert rtl/dram_pkg.sv rtl/*.sv \
    tb/dram_timing_checker.sv tb/tb_salp_para_system.sv \
    --top-module tb_salp_para_system -Mdir obj && obj/Vtb_salp_para_system
```

## How far to trust it, and where it departs from the source design

* **Timings not given by the source.** It gives DDR3-1066 8-8-8, tRA = 4 and
  tWA = 14 clocks. tRAS, tWR, tRTP, tCCD, tCWL, tWTR, tRRD, tFAW and tRFC are
  standard DDR3-1066 values chosen here.
* **The rank is one device** that moves a whole 64-byte line per column
  command. Bursts, the data bus and individual chips are not modelled.
  REFRESH only checks that the banks are precharged; the cells never lose
  charge, so there is no refresh counter inside the rank.
* **SALP-2 policy.** The source defines what SALP-2 allows, not when a
  controller should use it. The rule here (open the next subarray only once
  the current one has no requests and has met tRAS) keeps SALP-2 from
  closing rows that still have hits. It overlaps write recovery and tRTP,
  which is the purpose the source gives SALP-2.
* **Scheduling details** are this design's: the drain watermarks (48/16),
  the command priority, same-line hazard handling, in-order read return,
  and the idle-only scheme switch.
* **PARA**: the rotation mapping is one reading of "a bit offset that
  becomes the physical LSB". The random generator and the 4-entry queue are
  choices made here. Remapped spare rows are not covered.
* **Not built**: more channels or ranks, row-interleaving with an open-row
  policy, application-aware schedulers, the processor, and the FPGA platform
  used to characterise disturbance errors. `NUM_BANKS` and `SA_PER_BANK` are
  parameters; the system is simulated with 2 to 128 subarrays per bank.
* Lint notes that remain and why: `precharge_en` of each subarray is left
  unconnected in the bank, because the cell model needs no precharge
  circuit; the cell model writes its associative array with a blocking
  assignment, since it is a model and not logic.
