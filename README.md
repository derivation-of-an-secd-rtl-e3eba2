# An SECD machine in hardware

The SECD machine is Landin's abstract machine for evaluating functional
programs. It has four list-valued registers: **S**tack, **E**nvironment,
**C**ontrol and **D**ump. Here it is built as a synchronous digital system that
runs Lisp compiled to SECD instructions, out of a list-cell memory.

The machine is two cooperating processes that take turns on one shared memory:

* The **CPU** executes SECD instructions. It is a large, table-driven
  controller (171 states) around a small data path.
* The **garbage collector (GC)** is a stop-and-copy collector. It copies
  whatever is still reachable from one half of memory into the other. After
  reset, the same unit loads the initial memory image from a boot ROM.

Only one of them runs at a time. The CPU checks, before every instruction,
whether enough free cells remain for the worst instruction. If not, it
publishes its registers as a list in memory, hands over to the GC, and later
reloads its registers from the collected copy of that list.

The structure is taken from a hardware derivation of the SECD machine: the
block split, the memory instructions, the ALU operations, the GC's counters and
address ALU, and the CPU/GC handshake. The word encoding, the exact state
sequences and a few protocol details are this design's own; they are listed in
[Departures and choices](#departures-and-choices).

## Words and cells

Memory holds 16-bit words. A **cell** is two words: the car is at the even word
address and the cdr at the odd one. A pointer's value is a cell number, and the
memory turns it into a word address by appending the cdr bit.

| bits [15:12] | kind      | value                                   |
|--------------|-----------|-----------------------------------------|
| `00xx`       | pointer   | [13:0] cell number                      |
| `01xx`       | symbol    | [13:0] cell number of its character list |
| `1000`       | constant  | 0 = nil, 1 = true                       |
| `1100`       | number    | [11:0] two's complement                 |
| `1101`       | character | [7:0] ASCII                             |

The number tag matters for one instruction. Character-to-integer (CI) only sets
bits 15:14 and clears bits 13:12, so `1101` becomes `1100` and the value is
kept. The other codes were chosen to keep the tests cheap: `is pointer` reads
two bits, `is number` reads four.

The GC sees 17-bit words. Bit 16 is the **mark**. It is set on the old car of
a cell that has already been copied, and that car then holds a pointer to the
copy (a forward pointer). The CPU always writes the mark as 0.

Sizes at the default parameters:

* Two spaces of 32K words each, which is 16K cells per space.
* Physical memory of 64K × 17 bits.
* A boot ROM of 32K × 16 bits.

Reserved locations in each space:

* Word 0 holds the first free cell.
* Word 1 holds a pointer to cell 1.
* Cell 1 is the dedicated first cell of the register list `(s e c d)`, the
  collector's root.

## The memory unit: two views of one RAM

```
 CPU ── car/cdr/setcar!/setcdr!/alloc/meminit ──► level 2 (cells, avail)
                                                     │ word read/write
 GC ─── mem-read/mem-write/mem-switch ────────────► level 1 (space bit)
        (full physical address)                      │
                                                   phys_mem 64K × 17
```

* **Level 2** (`mem_level2`) gives the CPU a cell memory. It keeps the
  allocation pointer `avail`.
  * `alloc` returns a pointer to `avail` and increments it.
  * `meminit` reloads `avail` from word 0.
  * It raises `need_2_gc` when `avail + 8 > CELLS`.
* **Level 1** (`mem_level1`) holds the space bit. CPU accesses always land in
  the current ("new") space. GC accesses carry their own space bit, which the
  GC's address ALU computes as `old_addr` or `new_addr`. `mem-switch` swaps the
  roles of the two spaces.
* **Physical memory** (`phys_mem`) reads asynchronously and writes on the clock
  edge.

So a CPU `car` or `cdr` returns its data in the same cycle, and a write lands
at the next edge. The GC port has priority, but the two processes never
overlap. An assertion in `mem_level1` checks this.

## The CPU

The CPU has the following parts:

* **Data path unit** (`cpu_datapath`)
  * Registers s, e, c, d and two scratch registers i and j, plus the flags
    `do_gc` and `donesecd`.
  * Each cycle a *register transfer code* (RTC) chooses, for every register,
    what it loads: hold, the memory result, the ALU result, the serial
    character, another register, or a constant.
  * The same RTC selects which register drives the memory address and which
    drives the memory write data.
  * i and j feed the ALU directly (x = i, y = j), and j feeds the serial
    output.
  * The three tag conversions (CI, SL, LS) are done here as bit rewrites of j.
* **Instruction generator** (`cpu_inst_gen`). This is combinational. It turns
  (state, predicates) into the memory, ALU and serial instructions and the RTC.
* **State generator** (`cpu_state_gen`). It holds the 8-bit state register.
* **ALU** (`secd_alu`). Add, sub and sub1 produce a 12-bit result that wraps.
  Eq compares the whole word. Leq is a signed comparison. There are also the
  type tests atom?, number?, symbol? and pair?.
* **Serial interface** (`serial_if`)
  * `s-in` returns the last received byte as a character word.
  * `s-out` emits j's low byte with a one-cycle `tx_valid`.

Both generators read a single table, `secd_pkg::cpu_ucode(state, predicates)`.
The predicates are: the opcode (low byte of i), "i is zero", "i is not nil",
`need_2_gc`, `gcdone` and `donesecd`.

Every state does at most one memory operation, ALU operation or serial
operation. This is the serialization rule that lets one memory port and one
ALU serve the whole machine.

### Instruction cycle

1. `FETCH`:
   * If `need_2_gc`, start a collection (see below).
   * Otherwise read `car c` into i.
2. `EXEC`: advance c (`c := cdr c`) and dispatch on the opcode in i.
3. A short sequence of states carries out the instruction. Many sequences end
   in the shared `PUSH1..3`, which allocates a cell and pushes i onto s.

For example, `ADD` takes 10 cycles in all:

* FETCH and EXEC.
* j ← car s.
* i ← cdr s.
* s ← cdr i.
* i ← car i.
* i ← i + j.
* Allocate a cell, write its car, write its cdr.

### Instruction set

Opcodes 1–16, 20 and 21 keep Henderson's numbering. The rest were added for
character I/O and the read-eval-print loop.

| op | name | effect |
|----|------|--------|
| 1  | LD (m.n)  | push element n of frame m of e |
| 2  | LDC x     | push x |
| 3  | LDF f     | push closure (f . e) |
| 4  | AP        | call: s=((f.e') v . s') → s=nil, e=(v . e'), c=f, d=(s' e c . d) |
| 5  | RTN       | return the top of the stack to the caller saved in d |
| 6  | DUM       | e := (nil . e) |
| 7  | RAP       | recursive call: replace the dummy frame's car with v |
| 8  | SEL ct cf | d := (c' . d); continue with ct if top ≠ nil, else cf |
| 9  | JOIN      | c := car d, d := cdr d |
| 10 / 11 | CAR / CDR | on the top of the stack |
| 12 | ATOM      | type test |
| 13 | CONS      | (a b . s) → ((a . b) . s) |
| 14, 15, 16, 20 | EQ, ADD, SUB, LEQ | (a b . s) → ((b op a) . s) |
| 21 | STOP      | halt: `donesecd` rises |
| 22 / 23 | SL / LS | symbol → its character list, and back |
| 24 | CI        | character → integer |
| 25 / 26 | RECH / WRCH | read a character (push) / write the top character |
| 27, 28, 29 | NUM, SYM, PAIR | type tests |
| 30 | EXEC      | (code . s) → ((code . e) . s), ready for AP |
| 31 | POP       | drop the top of the stack |
| 32 | SET (m.n) | store the top of the stack into element n of frame m of e |

Unknown opcodes halt like STOP.

For the binary operations, the element pushed first is the left operand, so
`LDC 10, LDC 3, SUB` leaves 7.

## Garbage collection and the process interface

This is the most delicate part of the design. The two processes must agree on
who owns memory and on where the roots are.

### Handing over (CPU side)

In `FETCH`, if `need_2_gc` is set, the CPU runs `INIT_GC1..12`. These states
build the list `(s e c d)`:

* Its first cell is always cell 1.
* The other two cells are allocated normally.

`INIT_GC12` writes the final nil and sets **`do_gc`**. `do_gc` is a register,
so it rises at the edge on which the CPU enters `WAIT_GC`.

The reserve of 8 cells covers three things:

* The 4 cells the worst instruction (AP, RAP) allocates, since the check is
  made only at FETCH.
* The 3 cells of this list.
* One spare, so `avail` never has to hold the value `CELLS`.

### Collecting (GC side)

While idle (`IDLEGC`), the GC drives **`gcdone = !do_gc`**, combinationally.
So `gcdone` is already low in the first cycle of `WAIT_GC`, and the CPU cannot
slip through. In that same cycle the GC does three things:

* It issues `mem-switch`. The space the CPU was using becomes "old".
* It loads `untraced := 1`.
* It loads `avail := 2`. These are word addresses.

It then runs a Cheney scan. Old word 1, the pointer to the root cell, is
processed first. After that, `untraced` walks the new space behind `avail`:

1. `NEXTOBJ` looks at the scanned word (`header`):
   * An atom is written back unchanged.
   * For a pointer or symbol, it reads the old car of the cell it refers to.
2. `GC_CHECK`:
   * If that car carries the mark, the cell was already copied. The scanned
     word is rewritten to point at the copy.
   * Otherwise the car is copied to `avail`.
3. `PAIR1..4`:
   * Overwrite the old car with a marked forward pointer to `avail/2`.
   * Rewrite the scanned word, keeping its tag.
   * Copy the old cdr.
   * Advance `avail` by 2.
4. `GC_NEXT`: stop when `untraced == avail`.
5. `RESTORE`:
   * Write `avail/2`, the first free cell, into word 0 of the new space. The
     top bits are cleared, as the shift-right projection requires.
   * Drive `gcdone = 1` for this one cycle.
   * Return to `IDLEGC`.

### Resuming (CPU side)

The CPU leaves `WAIT_GC` on `gcdone`, then runs `RECOVER_GC1..8`:

* It reloads s, e, c and d from the list at cell 1. The GC moved that list, but
  its head is still cell 1.
* `meminit` reloads `avail` from word 0.

Execution then continues at `FETCH`.

### Reset

Reset starts the GC in `GC_RESET`, then `GC_ROMCOPY`. This copies the whole
boot ROM, one word per cycle, into the current space. The CPU waits in `IDLE`
until `gcdone`, then recovers exactly as after a collection. So a boot image is
simply a memory image in the format above: word 0, word 1, the root list in
cell 1, and the code.

The tests exercise the following cases:

* An empty heap.
* Shared substructure.
* Cycles (a cell pointing to itself).
* Symbols.
* Interleaved garbage.
* Collections requested at random instruction boundaries.

## Performance

TAK(18, 12, 6) computes 7 using 63,609 calls. At the default sizes it runs in
**12,919,169 clock cycles**. That figure includes the 32,768-cycle ROM load and
84 collections. Each collection copies a live heap of roughly 200–300 cells.

For comparison, the original implementation reported:

* 17,144,484 cycles for its serialized 204-state controller.
* 13,137,101 cycles for an unconstrained 161-state one.

The state sequences here are this design's own serialization (one memory,
ALU or serial operation per state). They land near the unconstrained count.
The testbench fails if the run ever needs more cycles than the original
serialized machine.

## Departures and choices

* **Mark bits.** The original used a separate 32K × 1 RAM for the marks. Here
  each physical word is 17 bits wide and carries its own mark.
* **When the spaces switch.** The original description restores the free
  pointer through an `old_addr` access at the end of a collection. Here the
  spaces are switched when a collection *starts*, copying goes old → new, and
  the free pointer is written into the space the CPU will use.
* **Operand order of SUB/LEQ.** One form of the abstract specification
  subtracts the deeper stack element from the top. The register-level
  specification and Henderson's machine do the reverse (x = deeper element,
  y = top), and this design follows them.
* **SET.** It stores the top of the stack into the addressed environment slot,
  leaves the stack unchanged, and skips its operand.
* **Control.** The controller is a next-state/output table written as a
  SystemVerilog function. It has 171 states in an 8-bit register, where the
  original had 204. The RTC is a struct of per-register selects rather than an
  encoded row number.
* **Serial device.** The UART and line drivers are not part of the RTL. The
  machine exposes a byte interface (`rx_valid/rx_data/rx_full`,
  `tx_valid/tx_data`). `RECH` does not wait for a byte: it returns the last
  one received.
* **STOP.** Sets `donesecd`; the CPU then stays in `IDLE` until reset.
* **Sizes** of words and memory follow the original: 16-bit words, 16K cells
  per space, a 32K-word ROM, 16-bit GC counters. The 12-bit number range and
  the tag codes are this design's.
* **Not provided.** The read-eval-print loop image. It is a compiled Lisp
  program, and the compiler is software. Any image in the format above can be
  placed in the ROM through the `ROM_FILE` parameter of `secd_top` (hex, one
  16-bit word per line, word 0 first).

## Files

`rtl/`:

* `secd_pkg.sv`: word format, enums, the CPU and GC control tables.
* `secd_top.sv`: CPU + GC + memory unit.
* `secd_cpu.sv`: `cpu_state_gen`, `cpu_inst_gen`, `cpu_datapath`,
  `secd_alu`, `serial_if`.
* `secd_gc.sv`: `gc_state_gen`, `gc_datapath`, two `gc_counter`s,
  `gc_addr_alu`, `boot_rom`.
* `memory_unit.sv`: `mem_level2`, `mem_level1`, `phys_mem`.

`tb/`:

* `secd_image_pkg.sv`: builds memory images in testbench code: a cell
  allocator, list builders, hand-compiled TAK and a software TAK for the
  expected value.
* `tb_secd_top.sv`: end to end at reduced size, with 512 cells and a 1K ROM.
  It runs 18 programs covering every opcode plus TAK(8,4,2). It counts each
  mechanism (ROM load, collections, forward-pointer hits, space switches,
  serial in/out, every opcode) and fails any that never occurs.
  It also checks the do_gc/gcdone timing at every collection.
* `tb_secd_full.sv`: TAK(18,12,6) at the default sizes. It takes about
  6 seconds of simulation.
* `tb_<block>.sv`: one self-checking testbench per block. Each compares against
  its own reference model or checks properties: GC graph isomorphism, at most
  4 allocations per instruction, one scan step per word, and so on.

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

## Simulating

With Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb \
    rtl/secd_pkg.sv tb/secd_image_pkg.sv rtl/*.sv tb/tb_secd_full.sv \
    --top-module tb_secd_full
./obj_dir/Vtb_secd_full
```

Replace `tb_secd_full` with any other testbench name. The testbenches load the
ROM by writing `dut.u_gc.u_rom.rom[]` directly. They read results from
`dut.u_mem.u_pm.ram[]`: the top of the stack is the car of the cell `s` points
to, in the current space.

To run your own SECD code, build it with the helpers in `secd_image_pkg`, as
`tb_secd_top.sv` does. For example:

```
lst('{n(OP_LDC), n(2), n(OP_LDC), n(3), n(OP_ADD), n(OP_STOP)})
```

followed by `load_prog(...)`.
