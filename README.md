# Page-mapped register file for zero-copy task preemption

A preemptive real-time system normally spends its context switch copying
the register file to memory and back. On a VLIW core with 64 or 128
registers, that copy dominates the switch. This design removes the copy
with help from the compiler and the OS:

* The compiler finds, in each hot loop, a basic block where few registers
  are live (a **minimal block**, MB). Inside it there is usually a single
  instruction where the count is lowest (a **minimal point**, MP). The
  compiler then renames registers so that the live ones sit in the lowest
  registers, `r0` upwards.
* The register address space is cut into **register file pages** (RFPs) of
  8 registers. The first four RFPs (`r0`..`r31`) are *mappable*. Each of
  them can be redirected to any page of a separate **pool** of spare register
  pages. Four **mapped page number** (MPN) registers, 4 bits each, define
  the redirection.
* A preemption interrupt is **deferred** until the running task is inside
  a minimal block, or at a minimal point. At that moment all of its live
  registers are in mappable pages, and those pages are in the pool.
* To switch, the OS rewrites the 16 bits of MPNs. The preempted task's pages
  stay in the pool, out of view. The next task's pages come back into view
  exactly as it left them. No register is copied.

The RTL covers the hardware part: the mapped register file, the MPN
registers, and the preemption-deferral unit. The compiler pass, the OS
handler and the processor core are outside it. Their connections are the
ports of `rfmap_top`.

## Address mapping

With the default sizes (128 registers, 8-register pages, 4 mappable
pages, a pool of 8 pages), a 7-bit register address splits into three
fields:

```
 addr[6:5]  region bits   00 -> inside the mappable region r0..r31
 addr[4:3]  RFP number    selects one of the four MPNs (4:1 multiplexer)
 addr[2:0]  offset        register within the page
```

If the region bits are zero, the RFP number picks an MPN and the access
goes to the page that MPN names (table below). For a pool page the page
number in the address is simply replaced by the MPN. Any other address
goes to the base register file unchanged. So the mapping costs one
zero-detect, one 4:1 multiplexer and a 4-bit compare in front of each
port's decoder. Every read and write port has its own copy of this logic
(`rfp_addr_map`), and all the copies share the one set of MPN registers.

An MPN says where the page lives. There are three kinds of value:

| MPN (default sizes) | page lives in |
|---------------------|---------------|
| `0 .. POOL_PAGES-1` (0..7) | pool page MPN, register `{MPN, offset}` |
| `POOL_PAGES .. POOL_PAGES+3` (8..11) | base-file frame j = MPN - POOL_PAGES, register `{j, offset}` |
| above that (12..15) | its own normal place in the base file |

Because they are not reached by any address outside the mappable region,
the four mappable pages of the base file are page frames like the pool
pages. The OS can therefore keep up to 12 pages (8 pool + 4 base) of
different tasks on chip. Each task keeps its pages in frames of its own,
in the pool or in the base file, and a switch only rewrites the MPNs.
After reset
MPN k is `POOL_PAGES + k` (`16'hBA98`, i.e. 8, 9, 10, 11 from page 0 up),
so the processor sees an ordinary 128-register file. The pool is 8 pages,
64 registers, which is 50 % of the base file. A 4-bit MPN allows up to 12
pool pages together with the 4 base frames. The pool size does not need to
be a power of two: 6 and 12 pages are simulated.

The base file keeps all 128 entries. Its first four pages are the "normal
location" of the mappable pages.

## Preemption deferral

`mb_info_table` holds up to eight minimal-block descriptions, written by
the OS. Each entry has:

* the MB's first and last instruction address;
* its minimal-point address;
* a 4-bit mask of the mappable pages that hold live registers there.

`mb_compare` has one range comparator and one equality comparator per
entry. `preempt_ctrl` steps through these states:

| state | leaves on | next |
|-------|-----------|------|
| IDLE  | `preempt_irq` | RANGE |
| RANGE | first issued PC: table empty | request with `full_save` |
|       | PC inside an MB (range compare) | request, delay 0 |
|       | otherwise | DEFER |
| DEFER | an issued PC equals an MB start address | request |
| FIRE  | `switch_ack` | IDLE |

With `mp_only` set, every comparison, the first included, is an equality
test against the MP addresses. This is the stricter mode: it has a longer
deferral but may need fewer live pages.

`switch_req` rises combinationally in the cycle whose PC hits. It means
"take the switch before executing this instruction". The core must hold
that instruction (`pc_valid` high, same `pc`) until `switch_ack`. An
assertion checks that `switch_ack` only comes while a request is pending.
While `switch_req` is high, the unit also provides:

* `switch_mb`, the entry that was hit, so the OS knows which MB's pages to
  keep;
* `switch_live_rfps`, that entry's live-page mask;
* `defer_count`, the number of instructions executed between the interrupt
  and the switch.

If the task has no valid table entry, the switch is taken at once with
`full_save` set. The OS then saves the task's registers in the
conventional way. This fall-back is this design's own addition, for tasks
(or code outside hot-spots) without minimal-block information. Interrupts
that arrive while a request is pending are ignored.

## A context switch, cycle by cycle

1. The interrupt source pulses `preempt_irq`.
2. The core keeps issuing until `switch_req` rises. That takes zero
   instructions if it was already inside an MB.
3. The OS handler:
   * reads `mpn_q` into the preempted task's control block;
   * in the same cycle, raises `switch_ack`, writes the next task's MPNs
     (`mpn_wr_en`) and clears the table (`mbt_clear`);
   * then loads the next task's table entries, one per cycle.
4. The new mapping is in force from the cycle after the MPN write.

Register reads are combinational and writes happen at the clock edge. A
read in the cycle of a write returns the old value. If several write ports
hit the same register in one cycle, the highest-numbered port wins.

## Files

| file | contents |
|------|----------|
| `rtl/rfmap_pkg.sv` | default sizes, minimal-block entry type, controller states |
| `rtl/rfp_addr_map.sv` | per-port address mapper (combinational) |
| `rtl/mpn_regs.sv` | the four MPN registers |
| `rtl/mapped_regfile.sv` | base file + pool, 8 read / 4 write ports |
| `rtl/mb_info_table.sv` | minimal-block table |
| `rtl/mb_compare.sv` | range / equality comparators |
| `rtl/preempt_ctrl.sv` | deferral state machine |
| `rtl/rfmap_top.sv` | everything wired together |
| `tb/tb_*.sv` | one self-checking testbench per module |

Top-level parameters: `RF_ENTRIES` (128; 64 also works), `PAGE_SIZE` (8),
`POOL_PAGES` (8), `DATA_W` (32), `NUM_RD` (8), `NUM_WR` (4), `NUM_MB` (8),
`CNT_W` (16). The number of mappable pages (4), the MPN width (4) and the
PC width (32) are package constants, because the table entry type depends
on them. The page size must be a power of two; the pool size need not be,
but POOL_PAGES + 4 should fit in 4 bits. The number of
mappable pages must be at least 2.

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself.
Example for the whole design:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/rfmap_pkg.sv rtl/rfp_addr_map.sv rtl/mpn_regs.sv rtl/mapped_regfile.sv \
  rtl/mb_info_table.sv rtl/mb_compare.sv rtl/preempt_ctrl.sv rtl/rfmap_top.sv \
  tb/tb_rfmap_top.sv --top-module tb_rfmap_top
./obj_dir/Vtb_rfmap_top
```

`tb_rfmap_top` runs the top at its default parameters. Four tasks run
round-robin through 240 context switches:

* three tasks share the 8 pool pages (2 + 3 + 3 pages);
* the fourth task has no minimal-block information, so it exercises the
  full-save path;
* one task of the three also uses a mappable page left at its base
  location;
* every fifth round runs in MP-only mode.

After each switch the resumed task reads back all its live registers,
which no one saved. The test checks the MB reported, the live-page mask,
`full_save`, and the deferral delay, which it works out independently. It
fails if any of these mechanisms never occurred: immediate switch inside
an MB, deferred switch, MP-only switch, full save, pool access, base-page
access. It finishes in a few seconds.

The unit testbenches cover:

* every address against an arithmetic model, at 128 and at 64 registers;
* random multi-port traffic against a two-array model of the register
  file;
* random table writes and clears;
* comparator edge addresses in all modes;
* the controller's delays on a looping program with stalls.

## Capacity

Live-page counts have been measured with a VLIW compiler for eight
embedded codes: EJ, LU, TRI, MMUL, 2D-DCT, ADPCM, SHA and SUSAN. These
are the worst-case counts per hot-spot (MP / MB):

| 128 registers | EJ | LU | TRI | MMUL | 2D-DCT | ADPCM | SHA | SUSAN |
|---------------|----|----|-----|------|--------|-------|-----|-------|
| aggressive    | 1/2 | 3/5 | 4/5 | 3/3 | 3/6 | 2/2 | 2/3 | 3/4 |
| scalar only   | 1/3 | 3/3 | 2/3 | 2/2 | 2/2 | 2/2 | 2/2 | 3/3 |

A single task can keep at most the four mappable pages in the pool. Every
MP count fits. In MB mode with aggressive optimisation, LU, TRI and 2D-DCT
need 5 or 6 pages. For these codes, MP-only preemption avoids the copy.
With 64-register code, no count is above 4.

For a set of tasks that preempt one another, the frames must hold the sum
of their worst-case pages. By default there are 12 frames (8 pool + 4
base):

* scalar code at 128 registers: every set up to A4 = EJ + LU + TRI + MMUL
  (MB 3+3+3+2 = 11) and B4 = 2D-DCT + ADPCM + SHA + SUSAN (MB 2+2+2+3 = 9)
  fits in both modes;
* aggressive code, MP mode: A4 (1+3+4+3 = 11) and B4 (3+2+2+3 = 10) fit;
* aggressive code, MB mode: A4 and B4 need 15 pages, 3 more than there
  are frames. LU, TRI and 2D-DCT also have more live pages than the four
  mappable ones. Their upper pages lie in the shared, unmapped part of
  the file, so any set that contains one of them, even a pair, needs
  saves in MB mode. MP mode avoids this for all eight codes.

`tb/tb_task_sets.sv` runs these sets on the top, for 64- and 128-register
files and pools of 25 %, 50 % and 75 % (2/4/6 and 4/8/12 pages). It
covers both optimisation levels and both modes, with sets A2..A4
(EJ, LU, TRI, MMUL added in turn) and B2..B4 (2D-DCT, ADPCM, SHA, SUSAN
added in turn). The OS model works as follows. If every task has at most
four live pages and all of them fit in the frames, each task gets its own
frames and every switch is a plain MPN write. Otherwise the tasks, in
priority order, get pool pages while they fit, and the rest run in the
base frames with a conventional save on every switch. The testbench prints,
per set, the number of pages sent to memory, and checks that every task's
live registers survive each switch.

## Departures and limits

* Both the number of mappable pages and the page size are fixed when the
  design is elaborated. They cannot be changed at run time.
* Port counts, the MPN encoding (pool page, base frame, normal place), the
  reset values, the
  table format and size, the request/acknowledge handshake and the
  full-save fall-back are choices of this design.
* The compiler's liveness analysis and renaming, the OS allocation of pool
  pages, and the saving of tasks that do not fit in the pool are software,
  and are not part of the RTL.
* The register arrays are written as plain arrays with no reset. A
  synthesis flow maps them to flip-flops or a register-file generator.
