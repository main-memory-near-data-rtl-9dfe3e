# Near-memory vector and GEMM acceleration that shares DRAM with the host

A processing element (PE) on the buffer/logic die of every DRAM rank streams
whole DRAM rows through a pair of floating-point FMAs. The host CPU keeps
using the same ranks for ordinary loads and stores at the same time. Neither
side hands the rank over to the other. Two ideas make that safe and cheap:

* **The host knows every PIM command without being told.** A PIM operation's
  access pattern depends only on its launch packet, on the host commands the
  rank sees and on a pseudo-random coin. So the host-side PIM controller runs
  an exact replica of each rank's access FSM, PIM memory controller, DRAM
  state table and coin. It therefore knows, cycle by cycle, which command the
  PIM will put on the rank's command bus. The host scheduler asks the replica
  whether a command is legal. The PIM never issues in a cycle in which the
  host issues, so the host always wins.
* **PIM writes are throttled, reads are not.** A PIM read only occupies the
  rank while the host leaves it idle. A PIM write burst turns the data bus
  around and delays the host's next reads. PIM writes are therefore issued
  only when the rank is idle and, depending on the mode, only when:
  * *next-rank prediction*: a per-rank pin is low. The host raises the pin
    while its oldest outstanding request is a read to that rank.
  * *stochastic issue*: a shared coin shows heads, with probability 2^-k.

A bank-partitioning address remap keeps the PIM's data in two reserved banks
of each rank. Host-only data never lands in those banks, so the PIM causes few
row conflicts for the host.

Beside this vector engine the design holds a second PIM style: a StepStone
unit. It multiplies a memory-resident weight matrix by a small batch of
activations. It works only on the cache blocks that the host's XOR address
mapping already places in its own bank group. The blocks of the matrix are
never moved.

All RTL is SystemVerilog-2017. Timing is in cycles of the 1.2 GHz DDR4-2400
command clock.

## How one rank is shared

```
 host MC ── host_cmd ──┬──────────────────────────► rank command bus ──► DRAM dies
                       │                    ▲
                       │           PIM cmd  │ (only when host_cmd is NOP)
                       ▼                    │
 pim_host_ctrl  ┌─ replica of rank r ─┐   pim_rank_unit r (logic die)
  (host side)   │ access FSM          │   ┌ pim_packet_regs  (32-byte launch packet)
                │ pim_mc + coin       │   │ pim_access_fsm   (X batch, Y batch, drain)
                │ dram_state_table    │   │ pim_mc           (ACT/PRE/RD/WR, throttling)
                └─────────────────────┘   │ dram_state_table (fed by host and PIM commands)
      host_cmd_legal, wr_inhibit[r] ──►   └ pim_pe           (2 x fp32_fma, 1 KiB buffer)
```

Both the die and its replica keep a `dram_state_table`. Each table sees every
command to the rank, whichever side issued it. It holds, per bank, the open
row and the cycles left until ACT, column and PRE commands are allowed. Per
bank group it holds the read, write and activate windows (tCCD_S/L,
tWTR_S/L, read-to-write turnaround, tRRD_S/L). `pim_pkg::dram_cmd_legal`
answers "may this command go now" from that state.

A cycle on one rank goes like this:

1. The host scheduler presents a candidate command. `host_cmd_legal` tells it
   whether the command fits the combined host-plus-PIM state. If the host
   issues, the die's `pim_mc` sees a non-NOP host command and stays silent.
2. Otherwise `pim_mc` issues the next command its FSM needs: ACT, PRE on a
   row conflict, or RD/WR once legal. A write needs, in addition, an idle
   rank, a low inhibit pin (mode NRP) or heads on the coin (mode STOCH).
3. The replica computes the same thing from the same inputs. The coin is a
   16-bit LFSR that steps every cycle from a seed shared at reset, so both
   sides draw the same coin.

The top has a sticky `rep_mismatch` output. It rises if any die command or
status bit ever differs from its replica. The tests require it to stay low.

## A vector operation

The host launches an operation by writing a 32-byte packet to every rank as
four 8-byte writes. The rank's `pim_packet_regs` decode those writes from the
command and data buses. Words 1 to 3 carry:
* the operation;
* the length in 8-byte beats;
* the (bank, row) of x, y and z;
* alpha and beta.

Word 0 is reserved. The fourth write launches. `pim_host_ctrl` sends the
packets round-robin over the ranks, using bus slots the host leaves free. It
pulses `req_done` when every rank has finished.

Each vector is cut into batches of 128 beats (1 KiB per chip, one DRAM row).
For every batch `pim_access_fsm` steps through these phases:
1. It reads the x row into the PE buffer.
2. For two-operand operations, it reads the y row and combines it beat by
   beat with the buffered x.
3. It waits `DRAIN_WAIT = tCL + tBL + 4` cycles until the last read data has
   passed through the PE.
4. It writes the 128 results to the destination row.

Operands advance one row per batch in their own bank. The wait and the write
phase are visible as `wr_phase`. The write phase is the only time throttling
applies.

`pim_pe` has two FMA lanes, one per 4-byte word of a beat. A beat arriving in
cycle t is written back by cycle t+2, which is fast enough for one beat every
tCCD_S = 4 cycles. A microcode table in `pim_pkg` gives each operation's FMA
sources and destination:

| op | result | reads | writes |
|---|---|---|---|
| COPY | y = x | x | y |
| SCAL | x = αx | x | x |
| AXPY | y = αx + y | x, y | y |
| XPY | y = αy + x | x, y | y |
| AXPBY | z = αx + βy (two FMAs) | x, y | z |
| XMY | z = x·y elementwise | x, y | z |
| DOT | Σ x·y | x, y | – |
| NRM2 | Σ x·x (root left to the host) | x | – |

Reductions keep one accumulator per lane. They add the two accumulators at
the end and present the result on `rank_result[r]`.

`fp32_fma` is a single-rounding fused multiply-add (round to nearest even).
Subnormals are flushed to zero. NaN results are the canonical quiet NaN.

## Address mapping and bank partitioning

`xor_addr_map` is a Skylake-style XOR mapping with 64-byte blocks. Each DRAM
field is the XOR of the physical-address bits listed here:

| field | physical bits |
|---|---|
| channel | 8, 9, 12, 13, 18, 19 |
| rank | 18, 23 |
| BG0 | 7, 14 |
| BG1 | 15, 20 |
| BA0 | 16, 21 |
| BA1 | 17, 22 |

The row starts at bit 19. The BG0 and channel terms follow the published
description of that mapping. The others are a close approximation.

`bank_partition_remap` reserves the top `NRES = 2` banks of every rank for
shared host/PIM data. A "shared" address is one whose row MSBs are `111x`.
The remap swaps the 4 row MSBs with the 4-bit bank ID when exactly one of the
following holds:
* the address falls in a reserved bank;
* the address is shared.

As a result:
* host-only rows that would have landed in a reserved bank move to a
  non-reserved bank;
* shared rows always end up in a reserved bank;
* the mapping stays one-to-one. The test checks this over 4 M addresses.

## StepStone GEMM unit

`stepstone_pim` computes `C[m][0..N) += Σ_k A[m][k]·B[k][0..N)` for the rows
[m0, m1) and the column range [k0, k1) of a row-major weight matrix A. It only
uses the 64-byte blocks of A whose PIM ID and block group match its
registers. B rows and C rows sit in an 8 KiB scratchpad, one 8-lane SIMD row
each. The host fills and drains the scratchpad through the `spm_*` port.
Each block costs one memory read and 16 SIMD FMAs. Control is through 13
word registers (see the file's opening comment).

The hard part is finding the next block that maps to this unit.
`stepstone_agen` does that one correction per cycle:
* Each PIM-ID bit and each group bit is the parity of the address ANDed with
  a mask.
* The generator adds one block. It then finds the lowest-order address bit
  that can fix the first violated parity. It jumps to the next address at
  which that bit toggles, with all lower ID-affecting bits cleared.
* It repeats until every parity matches or the limit is passed.

The group bits are the row-address part of those ID masks that mix row and
column address bits of the matrix. Blocks of one group therefore share B
rows along a column and C rows along a row. The search for the next block
overlaps the SIMD work on the current one.

### Replicating B and reducing C

Every unit needs its own copy of the B rows that its blocks of A touch.
Every unit also leaves a partial C. `stepstone_dma`, in the PIM controller,
moves those copies one 64-byte block at a time. The host programs a block
range, a mask of up to 16 units and each unit's private base address.
* In *replicate* mode the engine reads each source block once. It then writes
  the block to every unit in the mask.
* In *reduce* mode it reads the same block from every selected unit. It adds
  the blocks lane by lane with 16 FMAs (b = 1.0), in unit order, and writes
  the sum once.

Working out which unit needs which B rows depends on the address mapping
and the matrix shape. The host does that and issues one call per range. The
engine steps through all 16 unit indices for each block, one per cycle, and
keeps one read in flight.

## Module map

| file | role |
|---|---|
| `pim_pkg.sv` | command, timing, packet and microcode types; DDR4-2400 constants; legality function |
| `pim_system_top.sv` | one channel: mapping, host controller, one die per rank, StepStone unit and engine |
| `pim_host_ctrl.sv` | packet sender, replicas, legality answer, inhibit pins, completion |
| `pim_rank_unit.sv` | logic die of one rank |
| `pim_packet_regs.sv`, `pim_access_fsm.sv`, `pim_mc.sv`, `pim_pe.sv`, `fp32_fma.sv` | die components |
| `dram_state_table.sv` | per-rank bank/timing state |
| `next_rank_predictor.sv`, `stochastic_issue.sv` | write-throttling decisions |
| `xor_addr_map.sv`, `bank_partition_remap.sv` | host address mapping |
| `stepstone_pim.sv`, `stepstone_agen.sv` | GEMM unit and its address generator |
| `stepstone_dma.sv` | replication/reduction engine for B and partial C |

Parameter defaults are the evaluated configuration:
* 2 ranks per channel;
* DDR4-2400 timing (tCL = tRCD = tRP = 16, tCCD_S/L = 4/6, tRAS = 39,
  tRC = 55, tWR = 18, tWTR_S/L = 3/9, tRRD_S/L = 4/6);
* 128-beat write buffer;
* 2 of 16 banks reserved;
* an 8-lane SIMD and 8 KiB scratchpad for the StepStone unit.

## Simulating

Every `tb/tb_<module>.sv` is self-checking. It ends by printing
`TB_RESULT checks=<n> failures=<n>`. Each has a watchdog, and the tests also
check cycle counts. Two behavioural stand-ins serve the tests:
* `tb/dram_model.sv` is a DRAM rank with a timing-violation checker and a
  fixed read latency.
* `tb/host_mc_model.sv` issues random first-come-first-served host traffic
  and keeps its own state tables.

To build and run one test with Verilator 5:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb +libext+.sv -Irtl \
  rtl/pim_pkg.sv tb/tb_pim_system_top.sv --top-module tb_pim_system_top
./obj_dir/Vtb_pim_system_top
```

`tb_pim_system_top` runs the top with every parameter at its default:
* It sweeps addresses through the mapping.
* It runs DOT, AXPY and COPY on 8 KiB per rank under the three throttling
  modes, with host traffic running. Every result must be exact.
* It runs a 64×256 StepStone sub-GEMM.
* It has the engine replicate 8 blocks to four units and reduce the partial
  blocks of three units.

It requires each of these to happen at least once:
* a host command while a PIM runs;
* a PIM access held for the host;
* a PIM row-conflict precharge;
* a write held by next-rank prediction;
* a write held by the coin;
* packet writes on free slots;
* a host command refused as illegal;
* a remap swap;
* an address-generator correction;
* block replication and reduction.

It takes about 10 s.

## Where this RTL departs from or goes beyond the description it follows

* **One PE per rank instead of one per chip.** The PEs of a rank's chips work
  in lock step on their own 8-byte slices. A single 8-byte datapath stands
  for them. Results equal one chip's share of the vector.
* **No PE scratchpad.** The 1 KiB scratchpad per PE is not built. Reduction
  results stay in accumulator registers that the host reads.
* **tFAW and rank-to-rank turnaround (tRTRS) are not tracked** by the state
  tables. The read-to-write turnaround tCL + tBL + 2 − tCWL is this design's
  choice.
* **The remap also swaps shared addresses** whose initial bank is not
  reserved. Without that, shared rows would not all end up in the reserved
  banks.
* **The inhibit pin is registered:** one cycle from the host queue head to
  the pin.
* **Coin probability** is limited to powers of two.
* **Packet format, register maps, opcode encoding and the operand layout**
  (one row per batch in a fixed bank) are this design's own.
* **The address generator** does one correction per cycle, at the lowest
  failing bit. The two extra rules that cut the number of iterations are not
  built as separate logic. A search may take a few more cycles than it would
  with them.
* **The replication engine takes its targets from the host.** It does not
  derive from the mapping which units need a block. It also does not reorder
  data inside a unit's region. Loading the scratchpad from that region is
  left to the host, through the scratchpad port.
* **Mapping masks.** The rank, BG1 and bank masks of the XOR mapping are an
  approximation.
* **Side-by-side StepStone parts.** The StepStone unit and the engine each
  have their own block-memory port. Neither is wired into the rank command
  bus.
* **Not modelled.** The host cores, the host scheduler and the DRAM dies are
  not part of the RTL. Their signals are top-level ports.

Workload sizes checked against these defaults:
* Vectors of 8 KiB, 128 KiB and 8 MiB per rank fit, limited by a 24-bit beat
  count and 64 K rows per bank. Only the 8 KiB case is simulated.
* A 1024×4096 weight matrix runs on the StepStone unit as sub-GEMMs. N ≤ 8
  per pass, and the B and C rows must fit the 8 KiB scratchpad together, for
  example 128 of each at N = 8.
