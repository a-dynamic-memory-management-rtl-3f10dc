# SoCDMMU — a dynamic memory management unit for multiprocessor SoCs

A system-on-chip with several processing elements (PEs: DSPs, RISC cores)
and one large global on-chip memory has to split that memory between the
PEs. A fixed partition wastes memory and cannot change after tape-out; a
general shared-memory allocator in software is flexible but slow and has no
useful worst case. The SoCDMMU is a small hardware unit that hands out the
global memory in fixed-size blocks at run time, in a few clock cycles per
request, with a fixed worst case. An RTOS on each PE then manages the memory
it obtained among its own tasks (level 1); only when it runs short does it
ask the SoCDMMU (level 2).

This RTL implements the SoCDMMU in its reference configuration:

| quantity | value |
|---|---|
| PEs | 4 (`NUM_PE`) |
| global memory | 16 MB |
| block size | 64 KB |
| blocks | 256 (`NUM_BLOCKS`): 256-bit allocation vector, 256-entry allocation table |
| PE address space | 4 GB (32-bit PE addresses, 16-bit virtual block number) |
| physical address | 24 bits = {8-bit block number, 16-bit offset} |

## Blocks, virtual block numbers and sharing

Every physical block has one physical address and, in each PE that uses it,
a virtual block number (VBN) of that PE's choosing. A PE asks for N blocks
"at VBN v": the unit picks any N free physical blocks, which need not be
adjacent, and the PE sees them at v, v+1, ..., v+N-1. So physical
fragmentation never blocks an allocation; only the total number of free
blocks matters.

There are three ways to hold a block:

* **exclusive** — only the owner may read or write it;
* **read/write** — the owner may read and write it, and the allocation is
  published under a software identifier (SW ID) so other PEs can map it;
* **read-only** — a PE maps another PE's read/write allocation, found by
  its SW ID, at VBNs of its own choosing, and may only read it.

## Commands

A PE writes one 32-bit command word:

| bits | 31..27 | 26..19 | 18..3 | 2..0 |
|---|---|---|---|---|
| field | SW ID | size (blocks) | VBN | opcode |

| opcode | command | uses | cycles |
|---|---|---|---|
| 000 | `G_alloc_ex` | size, VBN | 4 |
| 001 | `G_alloc_rw` | SW ID, size, VBN | 4 |
| 010 | `G_alloc_ro` | SW ID, VBN | 3 |
| 011 | `G_dealloc` | VBN (start of the allocation in this PE) | 5 |
| 100–111 | rejected (`ST_BAD_CMD`) | | 2 |

Cycles run from the clock edge at which the PE writes the command to the
edge at which its `done` flag goes high, when no other PE is being served.
The PE then reads `status` and `count` (blocks allocated, mapped or
released):

| status | meaning |
|---|---|
| `ST_OK` | done |
| `ST_NO_MEM` | fewer than `size` blocks free |
| `ST_VA_BUSY` | VBN .. VBN+N-1 overlaps one of the PE's mappings, or passes VBN 0xFFFF |
| `ST_NOT_FOUND` | `G_alloc_ro`: no read/write allocation with that SW ID that the PE does not already own or map; `G_dealloc`: no allocation of the PE starts at that VBN |
| `ST_SWID_BUSY` | `G_alloc_rw`: the SW ID already names a read/write allocation |
| `ST_BAD_CMD` | unknown opcode, or size 0 |

A failed command changes nothing.

Releasing: `G_dealloc v` releases the whole allocation that starts at VBN
`v` in the issuing PE. If the PE owns it, the blocks become free and every
read-only mapping of them, in every PE, disappears with them. If the PE only
maps it read-only, just that mapping goes and the blocks stay with their
owner.

## Why every command takes a fixed time

Nothing in the unit loops over blocks. The allocation vector and the
allocation table are registers that are all read at once and written by
256-bit masks at one clock edge:

* **Finding N free blocks** (`free_block_selector`): a running count of free
  blocks is formed across the vector; block *i* is chosen when it is free
  and fewer than N free blocks lie below it, and that count is also its
  index inside the allocation (so it is mapped at VBN v + index). This is a
  single combinational prefix count, the same depth for N = 1 or N = 255.
* **Finding a shared allocation** (`G_alloc_ro`): every table entry compares
  its SW ID and mode at once; the matched blocks keep the index they had in
  the owner's allocation, so the reader sees them in the same order.
* **Finding what to release** (`G_dealloc`): every block the PE has mapped
  computes "its VBN minus its index" and compares it with the command's VBN.
* **Checking the virtual range**: every mapping of the PE is compared with
  the range at once.

The basic SoCDMMU (`basic_socdmmu`) walks each command through fixed steps:

| command | steps (one clock each) |
|---|---|
| `G_alloc_ex`, `G_alloc_rw` | take, search (select + checks), update (vector, table, converter), respond |
| `G_alloc_ro` | take, map (match + checks + update), respond |
| `G_dealloc` | take, lookup, owner-or-reader check, update, respond |

"Take" happens at the edge after the PE's write, so the PE-visible counts are
4 / 4 / 3 / 5.

## Several PEs at once

All PEs may issue commands in the same cycle. Each PE's command register
(`pe_interface`) raises a request; a round-robin scheduler (`cmd_scheduler`)
passes one to the basic SoCDMMU whenever it is idle, with no idle cycle in
between. A PE therefore waits for at most one command of each other PE:
with four PEs and the slowest command (5 cycles) the last one is done 20
cycles after all four were written.

## Address converters

Each PE has an `addr_converter` between its bus and the global memory. It
holds, for each of the 256 physical blocks, whether this PE has it mapped,
at which VBN, and whether it may write it. The upper 16 bits of a PE address
are compared with all 256 entries; the index of the matching entry is the
physical block number and, with the low 16 bits, forms the 24-bit physical
address. No match, or a write to a read-only block, gives `fault` instead of
`phys_valid`. The translation is registered: the result appears one clock
after the access. Because the basic SoCDMMU refuses overlapping ranges, at
most one entry ever matches. The associative table avoids storing a 64K-entry
map per PE.

## Module map

| file | role |
|---|---|
| `rtl/socdmmu_pkg.sv` | sizes, command word (`cmd_t`), opcodes, status and mode enums |
| `rtl/socdmmu_top.sv` | the unit: 4 × `pe_interface`, 4 × `addr_converter`, `cmd_scheduler`, `basic_socdmmu` |
| `rtl/pe_interface.sv` | one PE's command and status registers |
| `rtl/cmd_scheduler.sv` | round-robin choice among waiting PEs |
| `rtl/basic_socdmmu.sv` | command sequencer; holds the three blocks below |
| `rtl/alloc_vector.sv` | used bit per block |
| `rtl/free_block_selector.sv` | picks the N lowest free blocks and their indices |
| `rtl/alloc_table.sv` | per block: mode, owner, SW ID, index, read-only users |
| `rtl/addr_converter.sv` | per-PE address translation and protection |

Top-level ports are per-PE arrays: command (`cmd_wr`, `cmd`, `cmd_ready`,
`busy`, `done`, `status`, `count`), memory access (`pe_valid`, `pe_write`,
`pe_addr`) and the translated access toward the global memory (`phys_valid`,
`phys_write`, `phys_addr`, `fault`), plus the allocation vector `used`. The
memory array itself and the PEs are outside the unit. Reset is asynchronous,
active low, and leaves all memory free and no mappings.

`NUM_PE` and `NUM_BLOCKS` are parameters (`NUM_BLOCKS` up to 256, since the
size and index fields are 8 bits). The field widths of the command word are
constants in the package.

## Simulating

Every testbench is self-checking and prints one `TB_RESULT checks=N
failures=M` line. With plain Verilator 5:

    verilator --binary --timing --assert -Wno-fatal \
        rtl/socdmmu_pkg.sv $(ls rtl/*.sv | grep -v _pkg) \
        tb/tb_socdmmu_top.sv --top-module tb_socdmmu_top
    ./obj_dir/Vtb_socdmmu_top

The package goes first; `-Wno-fatal` keeps width and style warnings of the
testbenches from stopping the build. The testbenches:

| testbench | what it shows |
|---|---|
| `tb_socdmmu_top` | the whole unit at full size: a directed sequence, then 3000 random rounds from one or four PEs at once, compared with a sequential reference model (status, count, vector, translations and faults); the 4/4/3/5 cycle counts and the 20-cycle four-PE worst case; every mechanism (each command, each failure, scattered allocation, reader and owner release, write-protect fault, scheduler waits) is counted and must occur |
| `tb_ofdm_buffers` | two DSPs sharing an FFT output buffer: one writes it, the other reads the same physical word read-only and keeps an exclusive output buffer |
| `tb_basic_socdmmu` | the sequencer alone, with a behavioural converter, directed |
| `tb_alloc_vector`, `tb_free_block_selector`, `tb_alloc_table`, `tb_cmd_scheduler`, `tb_pe_interface`, `tb_addr_converter` | each block against its own model, mostly random |

All pass; the full-size end-to-end run takes under a second. With
`--assert` the RTL's own assertions are checked as well: one grant at a time
and only to a requester, the PE handshake (no write while busy), no block
allocated twice, and at most one converter entry matching an address.

## Design choices beyond the published description

The SoCDMMU's published description gives the command set and opcodes, the
field order of the command word, the three allocation types, the sizes above
and the per-command cycle counts. The following are this implementation's
own:

* field widths (5-bit SW ID, 8-bit size, 16-bit VBN), status codes and the
  PE register handshake;
* the parallel prefix-count allocator and the lowest-numbered-first choice;
* the allocation table's fields and the associative converter with a
  one-cycle registered translation;
* round-robin scheduling (any policy that serves each PE once per round
  meets the 20-cycle bound);
* the failure rules (overlap, SW ID reuse, size 0) and the release rules
  (owner release drops readers; reader release keeps the blocks);
* `G_dealloc` naming an allocation by its starting VBN in the issuing PE;
* more than one PE may map the same read/write allocation read-only.

## Not included

* The "Move" command mentioned for compacting a PE's address space: its
  encoding and effect are not specified, so it is not implemented.
* The global memory array and the PEs themselves.
* The RTOS (uC/OS-II) software layer that issues the commands.

The reference implementation was reported at about 41,600 area units in a
0.5 µm library. This RTL keeps a full associative table per PE (256 × 16-bit
VBNs each) and a 256-wide prefix counter, so expect it to be larger; the
converters are the first place to trade area for latency, e.g. by sharing one
table among the PEs or searching it over several cycles.
