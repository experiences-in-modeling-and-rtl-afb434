# Alfa-1: a small SPARC-style computer in SystemVerilog

Alfa-1 is a teaching computer. It has a 32-bit RISC processor whose integer
unit follows the SPARC V8 integer unit, with overlapping register windows,
a trap table and user/kernel modes. The processor reaches a simple shared
bus through a small external cache, and the bus holds a main memory selected
by a chip selector. The original machine was
described as a hierarchy of small components, from Boolean gates up to the
processor. This RTL keeps that decomposition: every component is its own
synthesizable module with its own self-checking testbench, and the top
module `alfa1_top` wires them into a computer that runs SPARC machine code.

The processor is multi-cycle, not pipelined. An instruction takes about 4
clocks when its fetch hits in the cache and about 8 when it misses. It executes the SPARC instructions that the
original machine supports and stops, in SPARC "error mode", when a trap
arrives while traps are disabled. The example programs end with an `unimp`
word, which halts the machine this way.

## The computer

```
   irq[15:1] ─────────────┐            iack
                          v              ^
 ext master ──► ┌──────────────────────────────┐
 (priority 0)   │ sysbus                       │◄── ext slave (DTACK/ERR/data)
  BGRANT "1" ──►│ grant cell 0 ──► grant cell 1├──► bus_* (shared bus, visible)
                └───────┬──────────────┬───────┘
                        │              │
                  cache_unit      chip_selector (csmem) ──► memory (32 KiB)
                  (master 1)      MIN <= addr <= MAX
                        │
                  integer_unit
```

* **integer_unit** is the processor. It holds PC, nPC, IR, PSR, WIM, TBR and
  Y, the register files, and the ALU block. It is sequenced by the
  `control_unit`.
* **cache_unit** is the external cache. The processor's bus port connects
  to it; it answers read hits itself and uses the bus for misses, writes
  and device addresses.
* **sysbus** shares one bus among the masters. Priority is passed along a
  BGRANT daisy chain. The external master port is the highest-priority
  device and the cache (on behalf of the CPU) is the last link of the chain.
* **chip_selector + memory**: the memory answers when its chip selector sees
  `MIN <= address <= MAX` with AS high. By default the window is
  0..0x7FFF_FFFF. Its two masks can be rewritten through the `cs_mask_*`
  ports. Addresses inside the window but beyond the 32 KiB array get ERR.
  Addresses from 0x8000_0000 up are for memory-mapped devices on the
  external slave port.
* The external master, slave and IRQ ports stand in for I/O devices. No
  devices are modelled.

Parameters of `alfa1_top`:

| Parameter | Default | Meaning |
|---|---|---|
| `MEM_BYTES` | 32768 | main memory size (32 KiB) |
| `MEM_LATENCY` | 2 | clocks from the memory seeing AS to DTACK |
| `MEM_BASE`, `MEM_TOP` | 0, 0x7FFF_FFFF | chip-selector window after reset |
| `RESET_PC` | 0x20 | first instruction fetched (address 32) |
| `CACHE_LINES` | 64 | lines of the cache, one word each |

After reset the processor is in kernel mode with traps disabled: S = 1,
ET = 0, CWP = 0, WIM = 0. PC is 32 and nPC is 36. All registers read zero.
The memory contents are not touched by reset. Put a program into
`u_mem.mem` (32-bit words, index = byte address / 4) before releasing reset.

## Register windows

This is the part of the processor that is hardest to follow, so it comes
first. There are 520 registers:

* **8 globals** (`regglob`): instruction registers r0..r7. r0 always reads
  zero and writes to it are dropped.
* **512 window registers** (`regblock`): instruction registers r8..r31 of the
  current window.

A window shows 24 registers: outs r8..r15, locals r16..r23 and ins r24..r31.
Only 16 of them are new to each window, so there are 512 / 16 = 32 windows,
and the PSR's 5-bit CWP selects one. `cwp_logic` maps instruction register
r (r >= 8) to window-file entry

```
    (16 * CWP + r - 8) mod 512
```

so the outs of window w are the ins of window w - 1. `save` decrements CWP,
which makes the caller's outs the callee's ins. `restore` and `rett`
increment CWP. The wrap modulo 512 makes window 0's ins the outs of
window 31.

Window overflow and underflow are detected with WIM. `incdec` computes the
new CWP and `wim_check` reads WIM at that position:

* A `save` whose new window is marked in WIM traps with window overflow
  (TT 0x05).
* A `restore` (or `rett`) whose new window is marked traps with window
  underflow (TT 0x06).

The trap handler does the spilling in software, as on SPARC. Trap entry
itself decrements CWP without looking at WIM. Software must keep one window
marked invalid as the usual "trap window". The system test does exactly that:
it spills and retries the `save`.

Register ports: port A reads rs1. Port B reads rs2, or rd during the memory
cycle of a store. The single write port writes rd in the write-back state,
r15 for `call`, and l1/l2 (r17/r18) during trap entry.

## Instruction cycle

`control_unit` holds one state register:

```
RESET → FETCH → EXEC ─┬──────────────→ WB → FETCH
                      ├→ MULDIV ───────↗
                      └→ MEM ──────────↗
any of FETCH/EXEC/MULDIV/MEM/WB with a trap:
        ET = 1 → TRAP → TRAP_L1 → TRAP_L2 → FETCH
        ET = 0 → HALT (stays)
```

* **FETCH** requests the bus, reads the word at PC into IR and waits for
  DTACK. ERR gives instruction access error; a user-mode address beyond
  LIMIT gives instruction access exception.
* **EXEC** decodes and reads the registers. It computes the ALU or shifter
  result, the load/store or jump address, the branch condition and the new
  CWP. Illegal, privileged, window and alignment traps are found here, and a
  taken `Ticc` raises a software trap.
* **MULDIV** waits for the multiply/divide unit.
* **MEM** does the load or store bus cycle. Stores go through `align_store`
  and loads through `align_load`.
* **WB** writes rd and the condition codes, and updates PC/nPC, CWP, Y and
  the special registers. Pending interrupts are taken at the end of WB.

Branches use SPARC delayed control transfer: the instruction after a branch
(the delay slot) runs before the target. The annul bit is honoured, so a
`b<cond>,a` skips its delay slot when not taken (and `ba,a` always does).

Typical timings with the default memory (2-cycle latency, one master
active):
* an ALU instruction takes about 4 clocks when the fetch hits in the cache
  and about 8 when it misses;
* a load that hits takes about 3 more, a load that misses or a store about 7 more;
* `umul`/`smul` take 1 extra clock;
* `udiv`/`sdiv` take 66 extra clocks (a restoring divider, one quotient bit
  per clock over the 64-bit dividend).

## Traps and interrupts

`trap_logic` chooses among the trap lines raised in a cycle; the lowest
priority number wins:

| Trap | Priority | TT |
|---|---|---|
| data store error (bus ERR on a store) | 2 | 0x2B |
| instruction access error (ERR on fetch) | 3 | 0x21 |
| instruction access exception (user fetch beyond LIMIT) | 5 | 0x01 |
| privileged instruction | 6 | 0x03 |
| illegal instruction (includes `unimp`) | 7 | 0x02 |
| window overflow / underflow | 9 | 0x05 / 0x06 |
| address not aligned | 10 | 0x07 |
| data access error (ERR on a load) | 12 | 0x29 |
| data access exception (user data beyond LIMIT) | 13 | 0x09 |
| division by zero | 15 | 0x2A |
| trap instruction `t<cond> n` | below all of the above | 0x80 + n |
| interrupt level L | lowest | 0x10 + L |

Interrupts come from `irq_logic`. A request on IRQ1..IRQ15 is taken when
its level is above PIL and ET = 1. The highest pending level wins; IRQ15
cannot be masked by PIL values below 15. `iack` pulses during the first
trap-entry state of an interrupt.

Trap entry (states TRAP, TRAP_L1, TRAP_L2) follows SPARC:
* ET ← 0, PS ← S, S ← 1, CWP ← CWP − 1, TBR.tt ← TT;
* then l1 ← PC and l2 ← nPC of the new window;
* then PC ← TBR and nPC ← TBR + 4.

TBR holds the trap base address in bits 31..12 and the trap type in bits
11..4. Each trap therefore has a 16-byte slot in the table. `rett` returns:
it restores S from PS, sets ET and increments CWP.

## User mode and the address unit

With S = 0 every instruction and data address goes through `address_unit`.
The address is relocated by adding BASE, and an access exception is raised
unless the untranslated address is below LIMIT. BASE and LIMIT are ancillary
state registers 16 and 17:

```
wr  %rs1, imm, %asr16    ! BASE   (privileged)
wr  %rs1, imm, %asr17    ! LIMIT  (privileged)
rd  %asr16, %rd          ! (privileged)
```

In kernel mode (S = 1) addresses are used unchanged and never fault.

## The bus

`sysbus` is built from one `bus_grant_cell` per master. The first cell's
BGRANT input is the constant 1. A cell that is not requesting passes the
grant down. A requesting cell stops the grant and, once BUSY is low, takes
the bus at the next clock edge. It keeps the bus while it still requests and
still receives the grant, and releases it when the request or grant drops
and its own AS is low. The owner's AS, RD_WR (1 = read), ADDRESS, DATA and
BSEL go onto the bus. The slaves' DTACK, ERR and read data are ORed
together and returned only to the owner. Assertions check that no master
strobes without owning the bus and that there is never more than one owner.

A bus cycle uses four-phase handshaking:
1. The master drives the address and data and raises AS.
2. The selected slave answers, `LATENCY` clocks after it first sees AS,
   with a one-clock DTACK (read data valid in that clock) or a one-clock ERR.
3. The master drops AS.
4. The slave waits for AS to fall before it accepts another cycle.

The CPU asserts that its address stays stable while a cycle is open. The
cache's bus interface is a bus master of the same kind.

## The cache

The cache is built from the parts of the original cache organisation:

* `cache_directory`: one tag per line, compared with the tag of the address
  (Hit/Miss).
* `cache_validity_control`: one valid bit per line (Valid/Invalid), all
  cleared by reset.
* `cache_memory_bank`: one data word per line, with byte-lane writes.
* `cache_bus_interface`: opened by the cache unit for one bus cycle
  (request, grant, AS, DTACK or ERR) and closed when the cycle ends.
* `cache_unit`: the processor interface and the control, coupling the
  parts above.

The processor's request is granted at once. Then:

* **Read hit** (line valid, tag equal): DTACK with the cached word one clock
  after AS, with no bus cycle.
* **Read miss**: one bus read. The word fills the line and goes to the
  processor.
* **Write**: always written through to the bus. A write hit also updates
  the enabled byte lanes of the line. A write miss does not fill.
* Addresses above `MEM_TOP` (devices) and cycles that end in ERR are never
  cached.

The cache is direct mapped with `CACHE_LINES` one-word lines. The index is
address bits 2 and up, and the tag is the rest. It does not watch other
bus masters. So an external master must not write words the processor has
cached and will read again. The top-level test writes a word the processor
never reads.

Byte order is big-endian: byte offset 0 is bits 31..24, selected by BSEL3.
`stb` replicates the byte on all four lanes and enables one BSEL line; `sth`
uses lanes 3..2 or 1..0.

## Gate-level comparator and chip selector

A few parts are built at gate level, as in the original design:

* `logic_gate`: AND, OR, NOT and XOR.
* `cmp_bit`: a one-bit comparator cell made of those gates. It extends
  "equal so far / lower so far" by one bit.
* `cmp`: chains W `cmp_bit` cells from the most significant bit down,
  giving EQ and LW (A < B, unsigned).

`chip_selector` uses two `cmp` instances against its MAX and MIN masks. The
masks are held in `latch_reg` registers. It computes
`CS = AS & (EQ_max | LW_max) & ~LW_min`. `address_unit` uses a `cmp` for the
LIMIT test, an `adder` for relocation and a `onehot_mux` to choose between
them.

## ALU block

`alu_unit` holds the `alu`, `muldiv` and `shifter`. A one-hot MUX4 picks the
result and a second one-hot MUX picks the N Z V C flags, under the enables
`en_alu`, `en_md` and `en_shf`.

* **`alu`**: add, addx, sub, subx, and, andn, or, orn, xor and xnor. Its
  function code is op3[3:0] of the instruction. C is the carry of addition
  and the borrow of subtraction.
* **`muldiv`**: 32 × 32 → 64 multiply, with the high word going to Y. It
  also divides the 64-bit Y:rs1 by rs2, signed or unsigned. The quotient is
  truncated toward zero. A quotient that does not fit saturates (0xFFFFFFFF,
  0x7FFFFFFF or 0x80000000) and sets V. The remainder is left in Y.
* **`shifter`**: sll, srl and sra.

The condition codes are written only by the `cc` forms of the instructions.

## Instructions executed

The instructions use SPARC V8 encodings:

* `sethi`, `nop`
* `b<cond>[,a]` (all 16 conditions)
* `call`, `jmpl`, `rett`, `t<cond>`
* `save`, `restore`
* `add[x][cc]`, `sub[x][cc]`, `and[n][cc]`, `or[n][cc]`, `xor[cc]`, `xnor[cc]`
* `umul[cc]`, `smul[cc]`, `udiv[cc]`, `sdiv[cc]`
* `sll`, `srl`, `sra`
* `rd`/`wr` of `%y`, `%psr`, `%wim`, `%tbr` and `%asr16/17`
* `ld`, `ldub`, `ldsb`, `lduh`, `ldsh`, `st`, `sth`, `stb`

Anything else raises an illegal-instruction trap. That includes `unimp`,
`ldd`/`std`, `swap`, `ldstub`, alternate-space accesses, tagged arithmetic,
`mulscc`, `flush` and the floating-point and coprocessor opcodes. Reading or
writing PSR, WIM, TBR, BASE or LIMIT in user mode raises a
privileged-instruction trap.

## Where this design makes its own choices

The original description fixes the component set and names, the PSR and TBR
layouts, the register organisation, the trap table with its priorities, the
use of Y in multiply and divide, the bus signals with their daisy-chained
grant, the comparator cell and the chip-selector equation, and the 32 KiB
memory. The following points are this design's own reading or choice:

* **Byte order.** The original text calls the memory little-endian, but its
  example programs store bytes big-endian, as SPARC does. The examples are
  followed.
* **Interrupt priority.** The original text says both that the highest
  pending level above PIL is served and that higher-priority devices sit on
  lower IRQ numbers. The first (the SPARC rule) is implemented.
* **Trap numbers of software traps and interrupts** (0x80 + n, 0x10 + L)
  and their rank below the table traps come from SPARC.
* **Encodings** of instructions, ALU, shifter and multiply/divide function
  codes are SPARC V8's.
* **BASE/LIMIT access** through `%asr16/%asr17` is invented here; the
  original does not say how software loads them.
* **Single clock, registers instead of latches.** The original models
  registers as latches with delays. Here everything is synchronous to one
  clock, and the state machine replaces the original's clock-tick counter.
* **Latencies**: memory 2 clocks, multiply 1, divide 66.
* **Memory reset** does not reload an initial image. The image is written
  into the array before reset is released.
* **The cache.** The original names the cache's parts and their
  connections but gives no size, organisation, policy or timing. The
  64 one-word lines, direct mapping, write-through without allocation,
  uncached device window and one-clock hit are this design's choices. The
  original directory is drawn as a table looked up by the upper address
  bits, with its output compared against the index. Here it is a tag table
  looked up by the index, which behaves the same for a direct-mapped
  cache.
* **Not built:** the I/O devices. Their bus and IRQ connections are
  brought out as ports instead.

## Verification

Every module has a self-checking testbench in `tb/` named `tb_<module>.sv`.
Each one ends by printing `TB_RESULT checks=N failures=M` and has a
watchdog. They compare against reference models written in the testbench,
with `$urandom` stimulus plus directed corner cases. Some use values from
the original description:

* `tb_incdec` increments 20 to 21.
* `tb_regglob` writes 0xFFFFFFFF to r4 and 0x55555555 to r2, reads them on
  ports A and B, then resets and reads zero.
* `tb_trap_logic` raises every trap line at once and expects TT 0x2B with
  trap-found set.
* `tb_muldiv` checks 274543375 / 13908050 = 19.

`tb_alfa1_top` runs the whole computer at its default parameters and loads
four programs into memory:

1. **The shift loop.** It stores 1 << i into bytes 60..71, giving
   `01020408 10204080 00000000`.
2. **The store example.** `st`, `sth` and `stb` of 0x12345678 into a buffer
   of spaces.
3. **The division routine.** `udiv` of the two values above, storing 19.
4. **A system test.** It checks:
   - window overflow, with a handler that spills and retries;
   - division by zero, misalignment, a software trap, and a bus error on a
     load;
   - a privileged instruction from user mode;
   - an IRQ15 interrupt with `iack`;
   - a memory-mapped device on the external slave port;
   - `be,a`/`bne,a` annulment and `call`/`jmpl`;
   - `smul` with Y;
   - an external master writing to memory between CPU cycles;
   - a user-mode program with BASE/LIMIT: an access inside LIMIT succeeds
     and one beyond it traps.

The top-level testbench also counts each mechanism: memory wait states,
each trap type, the external grant, device accesses, interrupt
acknowledges, user-mode cycles, and cache hits and misses. A mechanism that never occurs counts as
a failure.

`tb_integer_unit` runs the processor alone against a testbench memory with
random wait states. `tb_cache_unit` drives the cache with random reads and
writes to addresses that collide in its lines, behind a model memory with
random latency. It checks every read against the memory, checks that hits
use no bus cycle, and checks that device reads and bus errors are not
cached.

## Simulating

Verilator 5 with `--timing` is enough. For example, for the whole computer:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb -Irtl -Itb \
    rtl/alfa_pkg.sv tb/sparc_asm_pkg.sv tb/tb_alfa1_top.sv --top-module tb_alfa1_top
./obj_dir/Vtb_alfa1_top
```

Any block testbench is built the same way, with its own file and top
module. `tb/sparc_asm_pkg.sv` has small functions that encode SPARC
instructions (`ari`, `arr`, `mem_i`, `sethi`, `set_lo`, `bicc`, `call`,
`ticc`), for writing test programs directly in SystemVerilog.

To run your own program:
1. Write it into `dut.u_mem.mem[]`, starting at byte address 32, and end it
   with a zero word (`unimp`).
2. Release reset.
3. Wait for `halted`. `dbg_tt` then shows 0x02 for a normal end; any other
   value is the trap that stopped the program.

## Files

| File | Contents |
|---|---|
| `rtl/alfa_pkg.sv` | opcodes, function codes, PSR bits, trap types, state and control-word types |
| `rtl/alfa1_top.sv` | the computer |
| `rtl/integer_unit.sv`, `rtl/control_unit.sv` | processor datapath and its sequencer/decoder |
| `rtl/alu_unit.sv`, `alu.sv`, `muldiv.sv`, `shifter.sv`, `onehot_mux.sv` | ALU block |
| `rtl/regglob.sv`, `regblock.sv`, `cwp_logic.sv`, `incdec.sv`, `wim_check.sv` | registers and windows |
| `rtl/cclogic.sv`, `adder.sv`, `inc4.sv`, `signext.sv`, `latch_reg.sv` | branch conditions, PC arithmetic, registers |
| `rtl/align_load.sv`, `align_store.sv` | sub-word loads and stores |
| `rtl/trap_logic.sv`, `irq_logic.sv` | trap and interrupt selection |
| `rtl/address_unit.sv`, `cmp.sv`, `cmp_bit.sv`, `logic_gate.sv` | user-mode relocation and the gate-level comparator |
| `rtl/chip_selector.sv`, `memory.sv`, `sysbus.sv`, `bus_grant_cell.sv` | bus and memory |
| `rtl/cache_unit.sv`, `cache_directory.sv`, `cache_validity_control.sv`, `cache_memory_bank.sv`, `cache_bus_interface.sv` | external cache |
| `tb/tb_*.sv` | one testbench per module, plus the whole-computer test |
| `tb/sparc_asm_pkg.sv` | instruction encoders for the testbenches |

Lint warnings that remain are unused signal bits; each is explained in the
header comment of its module.
