# Rollback chip: hardware state saving for Time Warp simulation

A Time Warp simulator runs events as soon as it can. When an event arrives
"in the past" it rolls back to a saved state and runs the events again. Saving
that state in software costs time on every event, even when nothing is ever
rolled back. The **rollback chip (RBC)** moves this work into a memory
management unit that sits between the processor and its memory:

* a **mark** saves the current state in one clock or a few;
* a **rollback by k** brings back the state as it was just before the k-th
  most recent mark, in a single clock;
* an **advance GVT by k** releases the k oldest saved states once global
  virtual time has passed them (fossil collection).

The processor reads and writes its state variables as plain memory. The chip
makes sure that a write never destroys a version that a rollback may still
need. A read always returns the most recent version.

This repository holds synthesizable SystemVerilog for the chip in its
prototype size: 16 mark frames of 16 lines of 16 bytes, on a 24-bit address
bus. It also covers the two ways to give a node more state than one chip
manages: virtual RBCs inside one chip, and several chips side by side in a
node (`rbc_node`, the top module). There is a self-checking testbench for
every block and one for the whole node.

## Version-controlled memory and mark frames

```
 23            12 11     8 7      4 3      0
+----------------+--------+--------+--------+
|  ROA (12 bits) | frame  |  line  |  byte  |
+----------------+--------+--------+--------+
```

The processor sees one block of **version-controlled memory**. It is 256 bytes
long and starts at the start address `SA`, which is a multiple of 4 KB. An
address belongs to the block when its ROA ("rest of address") field equals
`SA[23:12]` and its frame field is zero. The 15 blocks after it (frame field
1 to 15) are **forbidden** to the processor, and an access there is reported
as an error. The chip uses all 16 blocks as **mark frames**: each frame holds
one version of every line. Every other address is **ordinary memory** and
goes to memory unchanged.

The frames form a circular list with two pointers:

* `CMF` (current mark frame) is the top of the version stack. Writes go there.
* `OMF` (oldest mark frame) is the oldest frame a rollback may return to.

With these pointers:

* mark is `CMF := CMF+1`;
* rollback k is `CMF := CMF-k`;
* advance GVT k is `OMF := OMF+k`.

All three are modulo 16. Mark is refused when `CMF+1 = OMF`, because no free
frame is left. Rollback and advance are refused when `k > (CMF-OMF) mod 16`.

## Written bits and the most-recent-version search

The written-bits array `WB[line][frame]` has 16 x 16 bits. A set bit means
that this frame holds valid data for this line. To read line `l`, the chip
looks for the first set bit in row `l`, starting at `CMF` and going back
towards older frames. It does this in combinational logic, in three steps:

1. The **barrel shifter** rotates the row so that output bit `i` is the bit
   of frame `(CMF-i) mod 16`.
2. The **priority encoder** returns the index of the lowest set bit.
3. The **subtractor** computes `MRV = CMF - index`. MRV is the frame that
   holds the most recent version.

The physical address is the CPU address with its frame field replaced by
MRV for a read, or by CMF for a write.

After reset, column 0 is all ones and every other bit is zero. Every line
therefore always has at least one set bit. A row with no set bit is an
illegal state. The chip reports it as an error, and an assertion in
`rollback_chip` checks that it never happens.

## Line states and lazy copying

This is the hard part of the design. Mark does not clear a whole frame, and
rollback and advance do not touch the written bits at all. This keeps them
fast, but it means that some lines must be copied now and then.

For each line the chip splits the frames into two groups:

* **new**: the frames after `OMF` up to and including `CMF`;
* **old**: all other frames. That is `OMF` itself, the frames before it, and
  any frames beyond `CMF` that a rollback has abandoned.

Each line has a 2-bit state, derived by combinational logic (one
`line_state_logic` per line) from its row and from a window mask built from
OMF and CMF:

| state | old bits | new bits | meaning |
|-------|----------|----------|---------|
| 00 | 0 | 1 | line rarely written; its only copy is in a new frame |
| 01 | 1 | 0 | only copy is old; nothing written since OMF |
| 10 | 1 | >0 | one old copy (the version a rollback to OMF needs), newer copies exist |
| 11 | >1 | any | more than one old bit; the oldest of them can be dropped |

The rule behind all of this: the old group must always hold the version
needed to roll back to OMF. State 00 is the one exception. It avoids copying
data that is rarely written on every GVT advance.

**Write (address A, data D)** falls into one of four cases:

| case | WB[line][CMF] | state | what the chip does | cost (memory transfers) |
|------|---------------|-------|--------------------|-------------------------|
| 1 | 1 | not 00 | write D into CMF | 1, the same as an ordinary write |
| 2 | 1 | 00 | copy line CMF to OMF, set WB[OMF]; write D into CMF | 4 + 4 + 1 |
| 3 | 0 | not 00 | load line MRV into the line buffer, merge D, store into CMF, set WB[CMF] | 4 + 4 |
| 4 | 0 | 00 | load line MRV, store into OMF, set WB[OMF]; merge D, store into CMF, set WB[CMF], clear WB[MRV] | 4 + 4 + 4 |

Case 3 works like a write miss in a cache. The first write to a line in a new
frame reads the whole line first, because the write may change only part of
it. Every later write to that line before the next mark is case 1.

**Mark** allocates frame `N = CMF+1`. Frame N holds the oldest data of all,
so it is reused. For every line:

* If the line is in state 10 and `WB[line][N]` is set, its only old copy is
  about to be lost. The chip copies the line from N to OMF and sets
  `WB[line][OMF]`. The line then moves to state 11.
* After any copies, column N is cleared for every line except those in
  state 01. A line in state 01 may have its only copy in N, and keeping that
  bit is what turns the line into state 00.
* Then `CMF := N`.

The copies are done one line at a time. A priority encoder over the
copy-request vector picks the next line, so lines that need no copy cost no
time. A mark that copies nothing finishes in two clocks.

**Rollback** leaves the written bits of the abandoned frames set. Those
frames now count as old. They sit just above CMF, so a search from CMF
backwards reaches them only after every frame still in use. Marks that
later reuse those frames clear the stale bits like any other old bit.

**Advance GVT** only moves OMF. Lines whose old group grows to two or more
bits are collected later, by marks.

## Virtual RBCs: more version-controlled memory from one array

One chip manages only 256 bytes of state. The parameter `NVRBC` lets one
physical chip serve several **virtual RBCs**, each with its own 256-byte
block and its own 16 mark frames. The idea works like a direct-mapped cache
of written-bit rows.

* The lowest `log2(NVRBC)` ROA bits of an address form a **tag** that names
  the virtual RBC. With four virtual RBCs, tag `t` is address bits 13:12.
  The version-controlled block of virtual RBC `t` is at `SA + t x 4 KB`, and
  its frames follow it. `SA` must then be a multiple of `NVRBC x 4 KB`.
* The written-bits array still holds one row per line. `TAG[line]` records
  which virtual RBC that row belongs to. The rows of every other virtual RBC
  are kept in `VC[v][line]` (`virtual_rbc_store`).
* On a **tag miss** (an access to line `l` with tag `t != TAG[l]`), the chip
  does three things in one clock: it saves row `l` to `VC[TAG[l]][l]`,
  loads `VC[t][l]` into the array, and sets `TAG[l] := t`. The access then
  proceeds as usual, so a miss costs one extra clock.
* **Mark** must apply to every virtual RBC. For each `v` in turn, the chip
  swaps in all rows of `v`, then runs the copy scan and column clear with
  the tag `v` in the copy addresses. CMF moves once, after the last one. A
  mark with no copies takes `1 + 2 x NVRBC` clocks.
* **Rollback, advance and reset** work as before. CMF and OMF are shared, so
  rollback and advance never touch any row. Reset sets every TAG to 0 and
  every VC row to "frame 0 only".

The default `NVRBC = 1` is the plain prototype. In that case the store is
not built, every access is a hit, and all timings are as given below.

## Several chips in one node

`rbc_node` is the top. It puts `NRBC` chips between one CPU bus and one
memory bus. Each chip manages its own block of version-controlled memory.
All chips share one version stack, so their CMF and OMF always stay equal.
Around the chips the node adds three pieces of glue:

* **Address decoder.** Chip `i` claims its version-controlled and forbidden
  area, which starts at that chip's `SA`. It also claims its own 32-byte
  register block at `CSR_BASE - 32 x i`. Every other address is ordinary
  memory and goes through chip 0. After a hardware reset, chip `i` has
  `SA = SA_RESET + i x 4 KB` (times `NVRBC` with virtual RBCs). The areas then
  sit next to each other. If software moves two chips' `SA` onto the same
  area, the lower-numbered chip gets the accesses.
* **Broadcast.** A write to RESET, MARK, ROLLBACK or ADVANCE at any chip's
  register block goes to all chips at once. Each chip sees the address of
  its own register. The CPU gets its `ack` only when the last chip has
  answered, and gets `cpu_err` if any chip refused. The chips share CMF and
  OMF, so they all accept or all refuse. A broadcast mark runs the copy
  scans of all chips in parallel.
* **Memory arbiter.** Only one chip can use the memory bus at a time. Chips
  compete for it only during a broadcast mark, when several may have lines
  to copy. A free bus goes to the lowest-numbered requesting chip, which
  keeps it until `mem_ack`. An assertion checks that the bus never changes
  hands in the middle of a transfer.

Reads of SA and STATUS, and accesses to version-controlled memory, go to one
chip only. They take exactly as long as they do at a single chip. A
broadcast takes as long as the slowest chip, plus any waits for the bus.

The chips translate physical addresses. The state of one logical process
must therefore lie in physical memory that one chip's area covers. Under
virtual memory, the operating system has to map it that way.

## Programming interface

Both buses use the same handshake. The requester raises `req` with address,
data and byte enables and holds them until a one-clock `ack`. On the CPU bus,
`cpu_err` comes with `cpu_ack`. Data is 32 bits with byte enables. An access
never crosses a 16-byte line.

Operations are writes to a 32-byte register block at `CSR_BASE` (default
`0xFFFFE0`) in ordinary address space. In a node, chip `i` has its block at
`CSR_BASE - 32 x i`. The registers are:

| offset | register | access |
|--------|----------|--------|
| 0x00 | SA | read/write; bits 11:0 always read 0 |
| 0x04 | STATUS | read: errors [4:0], CMF [15:8], OMF [23:16]; write 1 to clear an error bit |
| 0x08 | RESET | write: reset operation (WB to "frame 0 only", CMF = OMF = 0, errors cleared) |
| 0x0C | MARK | write: mark |
| 0x10 | ROLLBACK | write k: rollback k frames |
| 0x14 | ADVANCE | write k: advance GVT by k frames |

The error bits are sticky:

| bit | name | set by |
|-----|------|--------|
| 0 | frame | an access to a forbidden frame |
| 1 | no frame | a mark refused for lack of a free frame |
| 2 | rollback | a rollback refused |
| 3 | advance | an advance refused |
| 4 | state | a line found with no written bit |

Each of these also ends its access with `cpu_err`. A refused operation
changes nothing.

Timing counts clock edges from the edge at which the chip first sees `cpu_req`
to the edge after which `cpu_ack` is high. L is the memory latency, in edges
from `mem_req` to `mem_ack`.

| access | edges |
|--------|-------|
| register access, reset, rollback, advance | 1 |
| mark with no copies | 2 |
| ordinary access, read of version-controlled memory, write case 1 | 2 + L |
| each line copy | adds 8 memory transfers |

A hardware reset (`rst_n` low, asynchronous) does the reset operation and also
loads `SA` from the parameter `SA_RESET`.

Before the processor takes a mark, it must push any state it holds in a
write-back cache out to memory. After a rollback, it must flush its cache.
The chip cannot see cached writes.

## Blocks

```
rbc_node                           top: decoder, broadcast, memory arbiter
 +- rollback_chip  (x NRBC)        one chip: CPU bus in, memory bus out
    +- address_translator          address classes, physical address
    +- written_bits_array          WB[16][16]
    +- barrel_shifter              row aligned to CMF
    +- priority_encoder            first set bit = frames back from CMF
    +- mrv_subtractor              MRV = CMF - index
    +- line_state_logic (x NLINES) 2-bit state of each line
    +- frame_pointer_regs          CMF, OMF, checks, new-frame mask
    +- line_buffer                 one line, word loads and byte merges
    +- control_unit                operation sequencer, registers, bus master
    +- virtual_rbc_store           TAG and VC rows (only when NVRBC > 1)
rbc_pkg                            line-state enum, address classes, register map
```

Parameters of `rbc_node`. All but `NRBC` are passed to every chip, and
`rollback_chip` has the same ones:

| parameter | default | meaning |
|-----------|---------|---------|
| `ADDR_W` | 24 | address width |
| `DATA_W` | 32 | data width |
| `NMF` | 16 | mark frames (a power of two) |
| `NLINES` | 16 | lines per frame (a power of two) |
| `LINE_BYTES` | 16 | bytes per line (a power of two, at least `DATA_W/8`) |
| `SA_RESET` | 0x001000 | start address after hardware reset |
| `CSR_BASE` | 0xFFFFE0 | register block (32 bytes) |
| `NVRBC` | 1 | virtual RBCs sharing the chip (1 or a power of two) |
| `NRBC` | 1 | physical chips in the node (`rbc_node` only) |

The frame, line and byte fields follow from `NMF`, `NLINES` and
`LINE_BYTES`. ROA is whatever address bits remain.

## Simulating

Every testbench is self-checking and ends with
`TB_RESULT checks=N failures=M`. To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/rbc_pkg.sv tb/tb_rollback_chip.sv --top-module tb_rollback_chip
./obj_dir/Vtb_rollback_chip
```

Replace the testbench name to run the others:

* `tb_written_bits_array`, `tb_barrel_shifter`, `tb_priority_encoder`,
  `tb_mrv_subtractor` and `tb_line_state_logic`;
* `tb_frame_pointer_regs`, `tb_address_translator`, `tb_line_buffer`,
  `tb_control_unit` and `tb_virtual_rbc_store`;
* `tb_rollback_chip_vrbc` and `tb_rbc_node`.

`tb_rollback_chip` runs the top, `rbc_node`, at its default size (one chip),
connected to a memory model (`tb/rbc_mem_model.sv`). It issues 40,000 random operations: reads and
writes, including seldom-written lines; mark, rollback, advance and reset;
forbidden and ordinary accesses; and status reads.

Its reference model knows nothing about written bits. It keeps a full image
of the 256-byte block for every frame and predicts every read value and
every error. A monitor on the memory bus checks that the mark frames are only
ever written in CMF or OMF.

The testbench counts how often each mechanism occurs, and fails if one never
does:

* each of the four write cases;
* mark copies, fossil collection and kept bits;
* CMF wrap-around;
* each kind of refused operation.

It also checks two timings: a case-1 write takes exactly as long as an
ordinary write, and rollback and advance are acknowledged one clock after
they are seen. It runs in about a second.

`tb_rollback_chip_vrbc` repeats this test with `NVRBC = 4`, spreading the
accesses over all four virtual RBCs, with one reference image per virtual
RBC and frame. It also requires the following to occur:

* tag misses on both reads and writes;
* mark copies for a virtual RBC other than 0.

It checks that a tag miss costs exactly one clock.

`tb_rbc_node` runs the same kind of test on a node of two chips. It keeps
reference images for both chips' blocks and checks that each chip writes
only its own mark frames. It reads STATUS from both chips to confirm that
they hold the same CMF and OMF. It requires the following to occur:

* broadcast operations started at either chip's register block;
* mark copies in chip 1;
* cycles in which both chips want the memory bus.

`tb_control_unit` tests the sequencer on its own. It compares the exact
sequence of memory transfers and written-bit updates for every write case
and for a mark with copies against sequences worked out by hand.

## Where this RTL makes its own choices

The algorithm (write cases, mark, rollback, advance, reset) and the prototype
sizes are those of the design. The following are choices of this
implementation:

* **Bus and data width.** 32-bit data, byte enables, and a req/ack handshake
  on both sides. The line buffer moves a line as 4 word transfers.
* **Register map and error reporting.** The register offsets, the status
  layout, the sticky error bits and `cpu_err` are all this implementation's.
  `SA` is a register, with its low 12 bits forced to zero.
* **Address of mark frames.** The ROA of a physical frame address is always
  taken from `SA`, never from the CPU address. This matters because line
  copies during a mark are started by a register write.
* **Write case 2.** The chip sets `WB[line][OMF]` after copying the line to
  OMF, so that the copy counts as the old version.
* **Mark algorithm.** Copy each state-10 line whose only old copy is in the
  new frame into OMF. Then clear the new frame's column except for lines in
  state 01.
* **Line-state logic.** The states are computed from each raw row and a
  shared old/new window mask, not from a barrel shifter per row. The result
  is the same.
* **Reset operation.** It also clears the error bits. It keeps `SA`.
* **Node glue.** The register block of chip `i` at `CSR_BASE - 32 x i`,
  chip 0 as the path to ordinary memory, the merged error, and the
  fixed-priority memory arbiter.
* **Virtual-RBC rows on chip.** The saved rows `VC` are registers in the
  chip, not words in ordinary memory. A tag miss therefore costs one clock
  and no memory transfers. The register cost is `NVRBC x 16 x 16` bits.
  During a mark, a row whose tag already matches is not reloaded.

## Not implemented

The following are not in this RTL:

* **More than 16 mark frames.** Even and odd working areas, with their
  written bits saved in memory by software, and traps to the processor.
  The chip here refuses a mark when all 16 frames are in use.
* **Set-associative virtual RBCs.** Only the direct-mapped form is built.

The chip also has no interrupt line. Errors are reported only on the access
that causes them and in `STATUS`.
