# A serialized stop-and-copy garbage collector in hardware

This is a hardware garbage collector for a list-processing heap. It is a
stop-and-copy (Cheney) collector. Memory is split into two semispaces and
only one holds live data at a time. When the allocator runs out of room, it
hands control to the collector. The collector copies every object reachable
from a root word into the other semispace, compacting them as it goes, and
then swaps the roles of the two halves. Free cells are never visited. The
cost is proportional to the live data, not to the size of memory.

The design has two levels:

- **Algorithm.** A small set of register-transfer "functions" that copy the
  heap (Idle, Driver, Show-avl, Next, Type, Pair1-3, Vec, Vloop, Bvec,
  Bloop). Each function is one step of a state machine over the registers
  H, D, C, U, A and R.
- **Serialized machine.** The same algorithm reworked to fit a narrow
  implementation: one memory port, one adder, and registered memory
  address/data. Each function is split into several clock cycles. The
  collector is 38 states long, against the algorithm's 12.

The data path exists in two equivalent organisations. The default
(`SLICED = 1`) is the chip-level realization: three identical bit-slice
chips of 16 slices each, with carries rippling from chip to chip. The other
(`SLICED = 0`) is the register-level view, where each register is a
24- or 32-bit unit next to a shared ALU and a counter. The two are
cycle-for-cycle identical.

The design follows the garbage collector case study in C. D. Boyer and
S. D. Johnson, *Using the Digital Design Derivation System: Case study of a
VLSI garbage collector implementation* (Indiana University, Technical
Report 274). Where that study is silent, the choices made here are listed
in "Departures and choices" below.

## Heap model

A heap word ("content") is 32 bits: an 8-bit **tag** above a 24-bit
**pointer field**. The pointer field addresses 2^24 words in each semispace.

| tag | meaning | pointer field |
|-----|---------|---------------|
| `0x80` pair | pointer to a two-word cell | address |
| `0x81` vec | pointer to a vector | address of its header |
| `0x82` bvec | pointer to a byte vector | address of its header |
| `0x83` fbvec | pointer to a byte vector that is never moved | address |
| `0x20` vector header | first word of a vector | number of elements *n* (object is *n*+1 words) |
| `0x21` byte-vector header | first word of a byte vector | number of bytes *b* (object is btow(*b*)+1 words) |
| `0x40` fwd | forwarding word, written over an object's first word in old space once it is copied | new address |
| anything else (bit 7 clear) | immediate | data |

Any tag with bit 7 set is a pointer. `btow(b) = ceil(b / 4)` rounds a byte
count up to whole words. The tag codes and the four bytes per word are this
design's own choices (`gc_pkg.sv`). The body words of a byte vector are
copied but never scanned, so they may hold any bit pattern.

The root is passed in as a word, `root`, and must be a **vec pointer** to a
root vector in old space. The collector starts with the scan pointer U and
the allocation pointer A both at 0. The root vector's copy therefore lands at
new-space word 0, and scanning begins with its first element. After the
collection the root is `{vec, 0}` in the new space.

## The algorithm (one function per step)

H is the word being examined and D a word read from old space. U is the scan
pointer and A the allocation pointer, both in new space. C is a loop counter.
R is the "ready" flag to the allocator.

- **Idle.** While GO is low, R is held high. On GO: H gets the root, U and A
  are cleared, R falls, and the next step is Next.
- **Driver.** If U = A, every copied word has been scanned. The semispaces
  are flipped, R rises, and the next step is Show-avl. Otherwise H gets
  new[U] and the next step is Next.
- **Show-avl.** Wait, showing A on `avl`, until GO falls, then return to Idle.
- **Next.** If H is a pointer, D gets old[ptr H] and the next step is Type.
  If H is a byte-vector header, U advances by btow(ptr H)+1, skipping the
  body. Otherwise U advances by 1.
- **Type.** If D is a forwarding word, the object has already moved.
  new[U] gets (tag H, ptr D), U advances, and control returns to Driver.
  Otherwise the step depends on the tag of H:
  - *pair*: old[ptr H] gets (fwd, A), then **Pair1** new[A] gets the first
    word.
    - **Pair2** new[U] gets (tag H, A), D gets the second word and A
      advances.
    - **Pair3** new[A] gets D, then U and A advance.
  - *vec*: new[U] gets (vec, A), C gets the length, and U advances. Then
    **Vec** copies the header and reads the last element. **Vloop** copies
    the elements from the top down, decrementing C. At C = -1 it writes
    (fwd, A) over the old header and A advances by *n*+1.
  - *bvec*: new[A] gets the header, and C and D's pointer field get the
    body length in words. Then **Bvec** writes new[U] = (bvec, A) and
    **Bloop** copies the body from the top down like Vloop. At the end A
    advances by btow(bytes)+1.
  - *fbvec* (or any other pointer tag): nothing moves and U advances.

## Serialization: the 38-state machine

The algorithm does several memory accesses and additions per step. The
hardware has one memory port and one adder, so each step is spread over
several cycles (`gc_control.sv`) under three rules:

1. **At most one memory operation per state.**
2. **Every memory operation takes two states.** The first loads the memory
   address register MA and, for a store, the data register MD. The second
   performs the access with MA/MD. The memory therefore only ever sees
   registered address and data.
3. **At most one ALU operation per state** (inc, add, addinc or btow). The
   counter C is a separate unit that loads and decrements on its own.

Example: the algorithm's Pair2 writes new[U], reads old[ptr H + 1] and
increments A, all in one step. Serialized, it becomes four states:

| state | action |
|-------|--------|
| PAIR2 | MA ← inc(ptr H) |
| PAIR2_RD | D ← old[MA] |
| PAIR2_2 | MA ← U, MD ← (tag H, A) |
| PAIR2_2_WR | new[MA] ← MD, A ← inc A |

Where a step needs two ALU results in sequence, a register that is dead at
that point holds the intermediate value. For example, Next on a byte-vector
header parks btow(ptr H) in C before adding it to U (state `NEXT_BVH`).

Cycles per algorithm step: Driver 2 (1 when finishing), Next 1-2, Type 1-2,
Pair1 2, Pair2 4, Pair3 2, Vec 4, Vloop and Bloop 4 per word plus 2 to
finish, Bvec 4. Costs for typical objects, including the Driver/Next/Type
steps that lead to them:

- pair: 14 cycles
- vector of *n* elements: 12 + 4*n* cycles
- already-forwarded pointer: 6 cycles
- immediate: 3 cycles

On the random heaps in the testbench this averages about 8.4 cycles per
live word.

All states, in `gc_state_e` order: IDLE, DRIVER, DRIVER_RD, SHOW_AVL, NEXT,
NEXT_RD, NEXT_BVH, TYPE, TYPE_FWD_WR, TYPE_PAIR_WR, TYPE_VEC_WR,
TYPE_BVEC_WR, PAIR1, PAIR1_WR, PAIR2, PAIR2_RD, PAIR2_2, PAIR2_2_WR, PAIR3,
PAIR3_WR, VEC, VEC_1, VEC_2, VEC_3, VLOOP, VLOOP_FWD_WR, VLOOP_WR, VLOOP_2,
VLOOP_3, BVEC, BVEC_1, BVEC_2, BVEC_3, BLOOP, BLOOP_FWD_WR, BLOOP_WR,
BLOOP_2, BLOOP_3.

The controller emits one control word per cycle (`gc_ctrl_t`). It names the
ALU function and operands, what each register loads, and the memory
operation. The data path simply obeys it.

## Data path

### Register-level view (`gc_datapath`)

Registers:

- MD, H and D: 32-bit heap words.
- MA, U and A: 24-bit addresses.
- R: the ready flag.
- The flip bit: which physical semispace is "old".

Each register has its own input multiplexer (its "selection combination").
One ALU (`gc_alu`) computes a+1, a+b, a+b+1 or btow(a). Its first operand
is U, A, ptr H or ptr D; its second is C or ptr D. The counter `gc_count`
holds C and flags C = -1. The status flags (pointer?, byte-vector header?,
fwd?, the tag of H, C = -1 and U = A) are combinational.

### Bit-slice realization (`gc_chipset`, `gc_chip`, slices)

The same registers are cut into one-bit slices:

- **Address slice** (`gc_addr_slice`). One bit of each of MD, H, D, MA, U
  and A, plus a full-adder ALU bit and one link of the U = A equality chain.
- **Tag slice** (`gc_tag_slice`). One bit of the tag of MD, H and D. Only
  those three registers carry a tag.

A chip (`gc_chip`) has 8 address slices and 8 tag slices: one byte of
addressing and a full tag field. A 24-bit collector uses three identical
chips, least significant byte first. Only chip 0's tag field is used; the
other chips' tag inputs are tied low. Between chips run three chains:

- the **ALU carry**;
- the **U = A equality** chain;
- two bits of the ALU operand. btow shifts right by two, so each slice takes
  the operand bit two places above it, and the top chip receives zeros.

The carry into bit 0 is 1 for inc and addinc, 0 for add, and for btow it is
the OR of the two bits shifted out, which rounds up.

A few parts stay outside the chips, beside the controller: the counter C,
R, the flip bit, memory-operation decoding and the tag tests. Because the
carry and equality ripple through 24 slices across three chips in one
cycle, these chains are the critical path.

## Interface and timing (`gc_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (everything to 0, state IDLE) |
| `go` | in | 1 | allocator request |
| `r` | out | 1 | ready: high in idle and when a collection is done |
| `root` | in | 32 | root word, sampled in the idle cycle that sees `go` |
| `avl` | out | 24 | A: first free word of the (new) live semispace |
| `flip` | out | 1 | physical semispace holding the live heap |
| `mem_addr` | out | 24 | address (the MA register) |
| `mem_space` | out | 1 | physical semispace of the access |
| `mem_re`, `mem_we` | out | 1 | read / write this cycle, never both |
| `mem_wdata` | out | 32 | store data (the MD register) |
| `mem_rdata` | in | 32 | read data, must be valid before the end of the read cycle |
| `state` | out | 6 | current state, for observation |

**Handshake.** In idle, `r` is high. The allocator raises `go`, and one
cycle later `r` falls while the collection runs. When it finishes, `flip`
has toggled, `r` rises and `avl` shows where allocation resumes. The
collector then waits until `go` falls and returns to idle.

**Memory.** Use one external memory of 2 × 2^24 words, indexed by
`{mem_space, mem_addr}`. Stores take effect on the rising edge at the end of
a `mem_we` cycle. A read's data is captured on the rising edge at the end of
a `mem_re` cycle. Address and data are registers, so they are stable for
the whole cycle.

## Departures and choices

Decided here, where the source is silent:

- The tag codes and their 8-bit width. The width follows from "16 slices = a
  full tag field + 8 address bits".
- Four bytes per word for btow.
- The exact memory-port protocol, and reset values.
- Which chip carries the tag field.
- The root convention, a vec pointer whose copy lands at word 0. This
  follows from the algorithm starting with U = A = 0.

Reconstructed:

- The **Bloop** step is reconstructed by analogy with Vloop. Its loop copies
  body words top-down. At C = -1 the header is back in D, so A advances by
  btow(header bytes)+1.

Differences from the reference realization:

- **38 states.** The reference serialization reports 37. Its state list is
  not available, so this expansion was redone from the stated rules, and
  one state more results.
- **Selection multiplexers, not a bus.** The reference draws the registers
  around one shared bus. Here every register has its own selection
  multiplexer, which carries the same transfers.
- **Where R sits.** The reference draws R inside the last bit-slice column.
  Here R sits outside the chips with C and the flip bit.
- **Pointer tags outside the four kinds** are skipped, like fbvec.

Not built: the chip pad frame and the PLA layout of the slices, the external
memory and the allocator. A behavioural memory model is in
`tb/gc_mem_model.sv`.

## Verification

Each module has a self-checking testbench that prints
`TB_RESULT checks=N failures=M`.

| testbench | what it shows |
|-----------|---------------|
| `tb_gc_alu` | all four ALU functions against integer arithmetic, incl. wrap-around and btow at 2^24-1 |
| `tb_gc_count` | load/hold/decrement, C = -1 flag |
| `tb_gc_addr_slice`, `tb_gc_tag_slice`, `tb_gc_chip` | slices and one chip against bit- and byte-wide models, random control words, carry and btow chains |
| `tb_gc_datapath` | register-level data path against a register-transfer model, 5000 random control words |
| `tb_gc_chipset` | three-chip data path equals the register-level one on every output every cycle |
| `tb_gc_control` | every path of the state machine, state by state: memory operations, key selections, MA/MD set-up before each access |
| `tb_gc_top` | full design at default size (24-bit, three chips) |
| `tb_gc_top_flat` | the same test with `SLICED = 0` |
| `tb_gc_workload` | the collector inside a running system: allocate until storage is exhausted, collect, resume, twelve times |

`tb_gc_top` builds a random heap of 1500 objects with garbage, sharing,
cycles, immediates and unmoved byte vectors. The heap straddles address
0x800000, so carries reach the third chip. The test then runs three
collections in a row. After each collection it compares three things with
a reference model, which is a direct, unserialized execution of the
algorithm above:

- the complete contents of both semispaces (including forwarding words);
- `avl`;
- the exact cycle count.

It also counts each mechanism (pair, vector and byte-vector copy, forwarded
pointer, fbvec skip, header skip, loops, flip, idle wait) and fails if any
never occurred.

`tb_gc_workload` uses the collector the way a list-processing machine
would. The testbench acts as the processor. It allocates pairs, vectors and
byte vectors at the top of the live semispace, links them into the data
reachable from a 16-slot root vector, and overwrites references so that
garbage builds up. When the next object does not fit below 3000 words, it
raises `go`, waits for `r`, and resumes allocating at `avl` in the space
`flip` now names. Each of the twelve collections is checked against the
reference model as above. It is also checked by a second test that does
not depend on the algorithm at all:

- The graph reachable from the root before the collection must be
  isomorphic to the graph reachable after it. Tags, immediates,
  byte-vector contents, sharing and cycles must all match, and unmoved
  byte vectors must keep their addresses.
- The objects reached in new space must fill it exactly, from word 0 to
  `avl`.

In a typical run about 5 to 15 % of the heap survives. The collector then
spends about 8.8 cycles per surviving word.

Run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb rtl/gc_pkg.sv \
    tb/tb_gc_top.sv --top-module tb_gc_top -Mdir obj && obj/Vtb_gc_top
```

Replace `tb_gc_top` with any testbench name. The shared body of the two
top-level tests is `tb/gc_top_tb_body.svh`.

## Files

- `rtl/gc_pkg.sv`: widths, tags, btow, control-word and state types
- `rtl/gc_top.sv`: top level (controller + data path)
- `rtl/gc_control.sv`: the 38-state controller
- `rtl/gc_datapath.sv`, `rtl/gc_alu.sv`, `rtl/gc_count.sv`: register-level data path
- `rtl/gc_chipset.sv`, `rtl/gc_chip.sv`, `rtl/gc_addr_slice.sv`, `rtl/gc_tag_slice.sv`: bit-slice data path
- `tb/`: testbenches, the memory model (`gc_mem_model.sv`) and the
  reference model of the algorithm (`gc_ref_model.svh`)
