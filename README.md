# AB-VARF: an asymmetrically banked, value-aware integer register file

Most integer results in general-purpose code are small: roughly half fit in
16 bits, and nearly all fit in 34 bits. A 64-bit-wide physical register file
spends most of its bitline and wordline energy on sign-extension bits. The
asymmetrically banked value-aware register file (AB-VARF) splits the physical
registers into banks of *different widths*. Renaming places each result in a
bank wide enough for the width a predictor expects. Most accesses then go to
small, low-energy banks, and the banked file keeps the short access time and
low port count of a conventional banked design.

This repository holds synthesizable SystemVerilog for the register-file
subsystem of an 8-wide out-of-order core built this way:

- the width-detection logic on results;
- a last-width predictor;
- renaming with three width-classed free lists, a register alias table (RAT)
  and an active list with recovery;
- a register-port scheduler that sits inside instruction selection;
- the four-bank register file with its address and data routing.

It also holds a self-checking testbench for each block and an end-to-end
testbench of the whole subsystem at full size. The scheme follows S. Wang,
H. Yang, J. Hu and S. G. Ziavras, "Asymmetrically Banked Value-Aware Register
Files". The microarchitectural details that publication leaves open are
choices made here; they are listed in
[Departures and design choices](#departures-and-design-choices).

## Register organisation

| bank | width | entries | physical ids | read / write ports |
|------|-------|---------|--------------|--------------------|
| 0    | 16    | 128     | 0–127        | 4 / 2 |
| 1    | 16    | 128     | 128–255      | 4 / 2 |
| 2    | 34    | 128     | 256–383      | 4 / 2 |
| 3    | 64    | 128     | 384–511      | 4 / 2 |

This is the "211" configuration: two 16-bit banks, one 34-bit bank and one
64-bit bank. There are 512 integer physical registers. The aggregate of 16
read and 8 write ports matches a conventional monolithic file with 16 reads
and 8 writes. A 9-bit physical id is `{bank[1:0], index[6:0]}`. The id alone
tells how wide a register is, so no per-register width flag is stored.

A value is narrow when its upper bits are only copies of a sign bit. The
narrowness flags `N1N0` (`abvarf_pkg::width_t`) encode this:

| N1N0 | meaning |
|------|---------|
| 00 | 16-bit value: bits 63..15 all equal |
| 01 | 34-bit value: bits 63..33 all equal, but not a 16-bit value |
| 10 | reserved |
| 11 | regular 64-bit value |

A bank stores only its low bits. A read sign-extends from the bank width back
to 64 bits, so the rest of the core sees full 64-bit values.

## How an instruction passes through

1. **Fetch: width prediction** (`width_predictor`). The table has 2048 2-bit
   counters, indexed by PC[12:2]. A counter holds the width class of the last
   result of that instruction: 0 means 64-bit (also the reset value), 1 means
   34-bit, 2 means 16-bit. Each write-back sets the counter from the detected
   flags.
2. **Rename** (`dest_rename`, three `free_list`s, `rat`, `active_list`).
   There is one free list per class: 256 ids for 16 bits, 128 for 34 bits and
   128 for 64 bits. Each list is a circular FIFO that shows its first 8 ids.
   For every instruction in the group, in program order, the allocator picks
   from these lists:
   - predicted 16-bit: the 16-bit list, else the 34-bit list, else the 64-bit
     list;
   - predicted 34-bit: the 34-bit list, else the 64-bit list;
   - predicted 64-bit: the 64-bit list only.

   A wider register than predicted ("oversized" renaming) is always safe. A
   narrower one is never given. If any instruction of the group finds no
   register, the whole group stalls (`ren_nofree`) and nothing is taken. The
   RAT renames the sources, with dependence checks inside the group, and
   returns each destination's previous mapping. The active list stores
   `{ldest, new, old}` and hands out a tag.
3. **Issue** (`port_sched`). See the next section. A granted instruction never
   meets a bank-port conflict, for reads or writes.
4. **Read** (`abvarf_regfile` = `rf_routing` + 4 × `regbank`). Each global
   read port is routed to the next free port of its bank. The data come back
   sign-extended.
5. **Write-back**. The value is stored at the bank width. `width_verify`
   computes `N1N0` and compares it with the class of the destination
   register. If the result is wider than its register (a *misfit*), the
   register holds a wrong value. The instruction is then not marked done, and
   the oldest misfit of the cycle starts a *recovery walk*. The active list is
   walked from the youngest entry back to the misfit, one entry per cycle.
   Each step writes the old mapping back into the RAT and returns the new
   register to its free list. Fetch restarts at the misfit instruction, and by
   then the predictor has already been retrained. A result narrower than its
   register is simply correct.
6. **Commit**. Up to 8 finished instructions leave the active list per cycle.
   Each frees the register it unmapped, into the free list of that register's
   class.

## Register-port scheduling

Each bank has only 4 read and 2 write ports, so bank conflicts would dominate
if they were handled by stalling. Almost half of all results are 16-bit, and
they all compete for the write ports of banks 0 and 1. Instead, ports are
issue resources. `port_sched` sees up to 8 selection candidates, oldest first,
and grants them in that order.

**Read ports.** Each candidate marks which operands must read the register
file (`c_rd` / `iss_rd`). The bypass-hint logic outside this block clears the
flag for operands that will come from the bypass network. A candidate is
refused if granting it would push any bank past 4 reads in this cycle
(`rp_block`).

**Write ports.** Every write port of every bank has a 24-bit *scheduling
vector*, with one bit per future cycle. A global pointer `ptr` marks the
current cycle. A candidate with latency `L` (cycles from issue to write-back,
1 ≤ L < 24) needs a clear bit at position `(ptr + L) mod 24` on some write
port of its destination bank. The lowest such port is reserved by setting the
bit. If no port has a clear bit, the candidate is refused (`wp_block`).
Candidates later in the same cycle see the reservations of earlier ones. At
every clock edge the bits at `ptr` are cleared and `ptr` advances.

```
            ptr (current cycle)
             v
 bank1 wp0:  . . x . . x . . . . . . . . . . . . . . . . . .
 bank1 wp1:  . . x . . . . x . . . . . . . . . . . . . . . .
                 ^ a latency-2 write to bank 1 now finds both ports busy
```

**Loads.** A load's latency is unknown at issue, so it reserves two slots:
one at its L1-hit latency `L` and one at `L + 12` (the L2 latency). One of the
two slots stays unused. A load that misses in L2 as well returns later than
the vector reaches. It comes back on the `late_ld_*` path and has priority.
If its bank's write ports are all reserved in the current cycle, `wb_stall`
rises. In that cycle nothing is granted, no bits are cleared and the pointer
holds, so every scheduled write moves one cycle later. The core must hold its
execution pipelines for that cycle and write only the late load.

The vector length has to cover the longest operation latency. It is 24 here,
the usual floating-point square-root latency of a SimpleScalar-style core. The
integer subsystem itself needs only `L + 12 < 24` for loads.

## Top-level interface (`abvarf_top`)

All ports are plain packed arrays. Combinational paths within a cycle:

- `fetch_pc` → `fetch_wpred`;
- the rename group → `ren_fire`, `ren_pdest`, `ren_psrc*`, `ren_tag`,
  `ren_oversized`, `ren_nofree`;
- the issue candidates and `late_ld_*` → `iss_grant`, `iss_rp_block`,
  `iss_wp_block`, `wb_stall`;
- `rd_preg` → `rd_data`;
- the write-back → `wb_flags`, `wb_misfit`, `flush_valid`, `flush_tag`;
- `commit_count`.

All state changes at the rising edge of `clk`; `rst_n` is an asynchronous
active-low reset.

| group | direction | what the core must do |
|-------|-----------|-----------------------|
| `fetch_pc`, `fetch_wpred` | in / out | look up predictions for up to 8 PCs |
| `ren_*` | in / out | present a group with its predictions; it is taken when `ren_fire` is high (not during `recover_busy`, nor when the active list lacks room for 8) |
| `iss_*` | in / out | present up to 8 candidates oldest first, with source/destination physical ids, latency and load flag; issue only granted ones |
| `late_ld_valid`, `late_ld_preg`, `wb_stall` | in / out | a load back after more than the vector allows; on `wb_stall` write only that load and hold everything else one cycle |
| `rd_*` | in / out | 16 read ports; port scheduling keeps each bank within its 4 |
| `wb_*` | in / out | 8 write ports with data, destination, tag and PC |
| `cpl_valid`, `cpl_tag` | in | completion of instructions without a register result |
| `flush_valid`, `flush_tag`, `recover_busy` | out | on `flush_valid`, drop the flagged instruction and everything younger, and refetch from it |
| `commit_count`, `free16/34/64`, `rf_*_conflict` | out | status; the conflict flags must stay low |

## Parameters

| parameter | default | where |
|-----------|---------|-------|
| `RENAME_W`, `ISSUE_W`, `COMMIT_W` | 8 | top |
| `NRP`, `NWP` (global read / write ports) | 16, 8 | top, `abvarf_regfile` |
| `NRPB`, `NWPB` (ports per bank) | 4, 2 | top, `port_sched`, `abvarf_regfile` |
| `AL_DEPTH` (active list) | 512 | top |
| `WP_ENTRIES` (width predictor) | 2048 | top |
| `VEC_LEN`, `L2_LAT` | 24, 12 | `port_sched` |
| bank count, entries and widths | 4 × 128, 16/16/34/64 | `abvarf_pkg` |

The variant with 4 write ports per bank is `NWPB=4, NWP=16`. The "121" bank
mix (one 16-bit and two 34-bit banks) needs `bank_bits` and `class_of` in
`abvarf_pkg` changed, together with the free-list sizes in the top.

## Departures and design choices

These follow the published scheme:

- the bank widths and their count;
- the entries and ports per bank;
- the flag encoding and the detection rule;
- the counter meanings and table size of the predictor;
- the best-match / oversize-only allocation with stall;
- the oldest-first port scheduling with per-port bit-vectors and a global
  pointer, and the double reservation for loads;
- priority for late loads;
- recovery by walking the active list.

These are choices made here:

- **Squashing the misfit instruction itself.** The original description
  speaks of flushing the instructions *after* the mispredicted one. Here the
  misfit instruction is squashed too and refetched, because its register
  cannot hold its result.
- **Predictor update.** The predictor is set (not incremented) to the last
  width, and it is trained at write-back.
- **Late-load stall.** The one-cycle stall of scheduled writes is made by
  holding the scheduling pointer. Only one late load is accepted per cycle.
- **Rename stall.** A rename group is all-or-nothing.
- **Recovery walk.** It covers one entry per cycle, and a misfit of an older
  instruction during a walk extends it.
- **Sizes the scheme leaves open.**
  - commit width 8;
  - 32 logical registers, mapped at reset to physical 384–415 in the 64-bit
    bank;
  - scheduling vector of 24;
  - predictor indexed by PC[12:2].
- **Port wiring.** Global ports are routed to bank ports in port order.
  Banks read combinationally and their storage is not reset.
- **Read-port accounting.** A candidate refused for a write port does not
  consume read ports.

Not built here:

- the bypass-hint predictor, which only appears as the `iss_rd` flags;
- the rest of the core;
- any energy or timing model.

The partitioned value-aware file and the conventional banked file are the
comparison points of the original work. They are not part of this design.

## Files

- `rtl/abvarf_pkg.sv`: widths, id layout, `width_t`, the class helpers.
- `rtl/width_detect.sv`, `rtl/width_verify.sv`: flags and the misfit check.
- `rtl/width_predictor.sv`: the last-width predictor.
- `rtl/free_list.sv`, `rtl/dest_rename.sv`, `rtl/rat.sv`,
  `rtl/active_list.sv`: renaming and recovery.
- `rtl/port_sched.sv`: read and write port scheduling.
- `rtl/regbank.sv`, `rtl/rf_routing.sv`, `rtl/abvarf_regfile.sv`: the banked
  file.
- `rtl/abvarf_top.sv`: the subsystem.
- `tb/tb_<module>.sv`: one self-checking testbench per module.

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/abvarf_pkg.sv tb/tb_abvarf_top.sv \
          --top-module tb_abvarf_top -Mdir obj_top -o sim && obj_top/sim
```

Replace `abvarf_top` with any module name to run its own testbench. The
simulator has two-state semantics, so the testbenches initialise everything
they read. The register banks are not reset, and the testbenches only check
registers they have written.

`tb_abvarf_top` runs the subsystem at its default (full) size. It acts as the
core: a 64-instruction loop is fetched and renamed 8 at a time, 6000 dynamic
instructions in all. Most static instructions keep one result width. Two
change width between iterations, so the predictor is sometimes wrong. Loads
hit, miss in L1, or return late, some very late, which fills the active list
and empties the free lists. Against its own models of the RAT, the free
registers, the active-list order and the register contents, it checks every
cycle:

- source and destination renaming, including no downsizing and correct
  oversize flags;
- that no allocated register is still in use;
- the free counts per class;
- the read data;
- the absence of port conflicts;
- misfit flags and the flush tag;
- the commit count.

At the end it reads back all architectural registers. It requires every
mechanism to occur:

- full 8-wide rename;
- narrow predictions;
- oversized renaming;
- stalls for lack of a register;
- misfits, with one walk cycle per squashed entry;
- read-port and write-port refusals;
- late-load stalls;
- L1-miss loads.

A typical run takes about 7,400 cycles and a few seconds. In it:

| mechanism | count |
|-----------|-------|
| oversized renames | about 60 |
| rename stalls for lack of a register | about 150 |
| misfit recoveries (squashing about 5,700 entries) | about 50 |
| write-port refusals | about 4,400 |
| late-load stalls | about 40 |

`tb_abvarf_top_4w` runs the same test on the variant with four write ports per
bank (`NWPB=4`, `NWP=16`). The same 6000 instructions finish in about 5,200
cycles instead of 7,400. Write-port refusals drop from about 4,400 to about
500. This matches the purpose of the extra ports: fewer candidates are held
back for lack of a write port.

The block testbenches use random stimulus against independent models. The
`free_list` and `active_list` testbenches use reduced sizes (16 entries) so
that they wrap and run empty often.
