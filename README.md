# An object-oriented processor with abstract instructions and context-cache registers

This is the RTL of a processor built for object-oriented languages of the
Smalltalk kind. Three ideas set it apart from a conventional CPU:

* **Opcodes are messages, not operations.** An instruction names only an
  abstract operation, such as "+". The hardware reads the operands, then
  looks up *(opcode, class of operand 1, class of operand 2)* in an
  associative table, the **ITLB** (instruction translation lookaside
  buffer). The entry either names a primitive function-unit operation,
  which runs at once, or gives the address of a method, which is called
  with a fresh context. So `a + b` runs as an integer add on small
  integers and as a method call on anything else, with no type tests in
  the code.
* **There is no register file.** Operands are words of the *current* and
  *next* contexts (procedure activation records of 32 words) or fields of
  two objects addressed through pointers stored in the current context.
  Contexts live in a **context cache**, a dual-ported 32 x 32-word array
  with a directory and access vectors. A method call makes the next
  context current in one step. A return makes the caller current again
  through a directory lookup.
* **Virtual addresses are floating point numbers.** A 5-bit exponent says
  how many low mantissa bits are the offset within the object. The
  remaining high bits are the segment number. Small objects and huge
  objects therefore share one address format. The processor translates
  addresses through segment descriptors (base, length, class), cached in
  an **ATLB** (address translation lookaside buffer).

Every memory word carries a 4-bit tag: uninitialized, small integer,
floating point, atom, instruction or object pointer. Inside the context
cache a word also carries the 16-bit class of what it holds. This class is
the tag for primitive data and the object's class for pointers. The
operand classes needed for the ITLB key are therefore available as soon
as the operands are read.

The design is written in synthesizable SystemVerilog. The default
parameters are the sizes the architecture calls for: a 512-entry 2-way
ITLB, a 4096-entry 2-way instruction cache, and a context cache of 32
blocks of 32 words.

## Blocks

| Module | Role |
|---|---|
| `com_pkg` | word, tag, operand and primitive types; shared constants |
| `fp_addr_decode` | splits a floating point virtual address into exponent, segment and offset |
| `atlb` | segment descriptor cache: bounds check, base \| offset, object class |
| `itlb` | (opcode, class1, class2) -> primitive bit + method |
| `icache` | instruction cache |
| `operand_decode` | instruction formats and operand addressing modes |
| `com_fu` | primitive function units |
| `context_cache` | context store that replaces the register file |
| `context_alloc` | free list of contexts with the FP register |
| `com_core` | the processor; instantiates all of the above (top level) |

The memory system is not part of the RTL. `com_core` exposes a memory port,
and the testbenches model the memory.

## Instruction word

All instructions are 32 bits. Bit 31 is the **return bit** R: after the
instruction completes, the method returns. There are four formats:

```
3 operands   R | O<6> | A<7> | B<7>  | C<11>
2 operands   R | O<6> | A<7> | B<18>
1 operand    R | O<6> | A<25>
0 operands   R | O<31>
```

The top two opcode bits give the operand count. A is the destination, and
B and C are sources. For a zero-operand instruction, the whole 31-bit
field is the message name used in the ITLB key. Its bits 28:27 say how many
words of the next context (arg1, arg2) act as operands.

An operand descriptor selects one of these addressing modes:

* **pointer relative**: one of four pointers plus a word offset. The
  pointers are CP (current context), NCP (next context), P1 and P2. P1 and
  P2 are object pointers held in words 2 and 3 of the current context.
  Every descriptor except the last has this mode: `sel[6:5] off[4:0]`.
  The last one is `0 sel off...`.
* **short integer**: the last descriptor only, with code `10`. The rest is
  a two's complement constant, sign-extended to 32 bits.
* **bit field**: the last descriptor only, with code `11`, a 5-bit start
  and a 5-bit stop. The constant is a mask with those bits set, which
  `mask`, `and` and the shifts use for field work. It needs a 12-bit
  descriptor, so the 11-bit C field cannot hold it. In a 3-operand
  instruction the code is reported as a bad operand.
* **half word**: 2-operand B only, bit 17 set. Bit 16 selects the high or
  low half, and bits 15:0 are the value.

A sketch of a call-and-multiply sequence (n = next context, c = current
context):

```
n3 := c3 - 1        ; argument of the recursive call
n3 fact             ; 1-operand instruction, ITLB says "method": call
c5 := c3 * n3       ; after return, n3 holds the result
*c2 := c5  (R)      ; store through the result pointer, then return
```

## Abstract instructions and the ITLB

The ITLB key is 63 bits: the 31-bit opcode part, then the classes of the
two source operands. Each entry stores a **primitive bit** and a 32-bit
**method** field:

* primitive bit set: the low 6 bits of the method field select a
  function-unit operation (`prim_e` in `com_pkg`).
* primitive bit clear: the method field is the absolute address of the
  method's first instruction, and the instruction becomes a call.

The ITLB is set associative (default 512 entries, 2 ways). The set index is
an XOR-fold of the key, and each set replaces its least recently used way.
On a miss the processor traps with the key on `trap_key`. Software does
the method lookup in the class's message dictionary. It writes the entry
through the `itlb_fill_*` port, then pulses `resume`. Software owns the
dictionary format; the hardware only caches its answers.

Primitives on 32-bit small integers (`com_fu`):

* arithmetic: `+ - * /`, modulo, negate. `/` truncates toward zero. Modulo
  takes the divisor's sign. Division by zero is a primitive error.
* multiple precision: `carry` gives the carry out of the unsigned sum;
  `mult1` and `mult2` give the low and high words of the unsigned product.
* shift, arithmetic shift and rotate: a positive count shifts left and a
  negative count shifts right.
* `mask` extracts a field marked by a bit-field constant; also `and`,
  `or`, `not`, `xor`.
* comparisons: `<`, `=`, `=0` and `==`. The first three return small
  integer 1 or 0. `==` is identity: it compares tag and data.
* `move`; `tag` reads a word's tag; `as` re-tags a word. Making an
  object pointer with `as` needs the privilege bit, so user code cannot
  forge addresses.
* `fjmp` and `rjmp` jump forward or back by their integer operand. In the
  2-operand form, A is a condition and the jump is taken only when A is
  non-zero. Jumps are **delayed**: the next instruction always executes
  before the jump takes effect.
* `xfer` transfers control to the next context.

## Virtual addresses and translation

A virtual address is one 32-bit word: a 5-bit exponent `e` and a 27-bit
mantissa. The low `e` mantissa bits are the offset. The exponent and the
remaining high bits form the segment number. An object of `2^e` words
therefore needs exactly `e` offset bits. `fp_addr_decode` does the split.
The mantissa width is a parameter. `MANT_W = 31` gives the 36-bit layout
with a 5-bit exponent and 31-bit mantissa, which needs wider pointer words.

Each team space (`SN`) has a table of segment descriptors with three
fields:

* **base**: the absolute address, aligned to a multiple of the segment
  size.
* **length**: the largest legal offset.
* **class**: the class of the object.

Because segments are aligned, the absolute address is `base | offset`,
with no adder. The `atlb` caches descriptors keyed by (SN, exponent,
segment). It is 8 entries, fully associative, with round-robin
replacement. An offset greater than the length raises a bounds trap. A
miss traps with the virtual address on `trap_va`, and software refills the
entry through `atlb_fill_*`. Aliasing, the tables themselves and the
collection of unused addresses are software's job.

CP, NCP and IP are held **pre-translated** (absolute). Only P1- and
P2-relative operands go through the ATLB.

## Contexts and the context cache

A context is 32 words, aligned on 32 words in absolute memory:

| word | contents |
|---|---|
| 0 | RCP: return context pointer, the caller's context (absolute) |
| 1 | RIP: return instruction pointer (absolute, tagged object pointer) |
| 2 | arg0 / P1: on a call, the result pointer |
| 3 | arg1 / P2: on a call, the receiver or first argument |
| 4 | arg2 |
| 5-31 | locals and temporaries |

`context_cache` holds 32 such blocks. Its parts:

* **directory**: the absolute address of each block.
* **access vectors**: four one-hot or empty vectors. *current* and *next*
  mark the blocks CP and NCP use, *free* marks unused blocks, and *match*
  is the directory comparison. Because CP and NCP select blocks by
  vector, the usual operand reads need no address comparison.
* **array**: each word holds a 4-bit tag, a 16-bit class and 32 data bits.
  A cycle does two reads or one write, never both, and an assertion
  checks this. Read ports select a word of the current or next block, or
  any cached absolute address. Both operands of an instruction are read
  in one cycle.

Context operations, one per cycle:

* *allocate* claims the lowest free block as *next*. It clears the block
  in one step: each word has a written bit, and unwritten words read as
  zero, i.e. uninitialized.
* *call* makes *next* current and leaves *next* empty.
* *return(address)* frees the unused next block, moves *current* to
  *next*, and finds the caller by directory match. If the caller is not
  cached, the return is reported as a miss.
* *free(address)* drops a block.

When all 32 blocks are in use, allocation fails and the processor traps.
No context is copied back to memory. 32 contexts, 1024 words, is deeper
than ordinary programs go.

`context_alloc` keeps the free list of contexts in memory. FP points to
the first free context, and each free context's word 0 links to the next
one; 0 ends the list. Allocating or freeing costs one memory reference.

## Executing an instruction (`com_core`)

Each instruction goes through five steps. They run one after another, not
overlapped:

1. **fetch**: read the instruction cache at IP. A miss reads memory and
   fills the cache.
2. **read**: read the source operands.
   * CP and NCP words come from the two context cache ports in one cycle.
   * Constants come from the descriptor.
   * A P1- or P2-relative operand first reads the pointer from the current
     context and translates it in the ATLB. The word is then read from the
     context cache if that address is a cached context, and otherwise from
     memory. A word loaded from memory that holds an object pointer gets
     its class by translating it as well.
3. **translate**: look up the ITLB.
4. **operate**: run the primitive, or start a call.
5. **store**: write the result to the destination (context cache or
   memory). IP advances, or follows a pending delayed jump.

A 2-operand instruction keys the ITLB on B's class alone. Its A operand is
read, as a condition, only when the entry names a jump.

**Call**, when the ITLB gives a method:

1. IP+1 is stored in the current context's RIP.
2. CP takes NCP, and IP takes the method address.
3. The operands are copied into the new context, one word per cycle:
   * arg0 gets the destination's address, as a result pointer. A context
     word's address is the virtual address `{CTX_EXP, absolute}`, which
     software maps one to one.
   * arg1 and arg2 get the source values.
4. A new next context is taken from the free list and claimed in the
   cache. Its RCP is set to the new CP.

A zero-operand message uses the arguments already placed in the next
context.

**Tail call**: a call with R set. The new context inherits the old
context's RCP, and the old context is freed. Deep tail recursion therefore
runs in constant context space.

**Return**: any instruction with R set returns after it completes.

1. CP takes RCP.
2. The returning context becomes the next context.
3. IP is reloaded from the caller's RIP.

A return to RCP = 0 halts the processor; `halted` rises.

**Traps**: ITLB miss, ATLB miss, bounds error, context cache full, context
miss on return, bad operand and primitive error. A trap sets `trap` and
`trap_cause`, and `trap_key`/`trap_va` give the key or address involved.
The processor then waits. After software has serviced the trap through
the fill ports and memory, a `resume` pulse retries the step that trapped.

`ev` carries one-cycle event strobes for measurement: instruction,
primitive, call, tail call, xfer, return, taken jump, instruction cache
miss, ITLB miss, ATLB miss, P1/P2 access served by the context cache or by
memory, and context allocation.

### Memory port

There is one port for instruction fetch, P1/P2 data and the free list.
`mem_req` is held until `mem_ack`. Words are 36 bits: a 4-bit tag plus 32
data bits.

### Parameters of `com_core`

| Parameter | Default | Meaning |
|---|---|---|
| `ITLB_ENTRIES`, `ITLB_WAYS` | 512, 2 | ITLB size |
| `IC_LINES`, `IC_WAYS` | 4096, 2 | instruction cache size |
| `ATLB_ENTRIES` | 8 | cached segment descriptors |
| `CC_BLOCKS` | 32 | contexts in the context cache |
| `MANT_W`, `EXP_W` | 27, 5 | virtual address format |
| `SN_W` | 8 | team space number width |
| `ABS_W` | 32 | absolute address width |
| `CTX_EXP`, `CTX_CLASS` | 16, 0x0010 | virtual exponent and class under which contexts are named |

## Where this design departs from the architecture or fills gaps

* **No pipeline.** The architecture overlaps the steps so that an
  instruction starts every two cycles. Here an instruction takes at
  least five cycles, and calls and returns take more than the four extra
  cycles the architecture aims for. Because the steps do not overlap, no
  interlock is needed between an instruction's store and the next
  instruction's read.
* **No floating point primitives**, because no floating point format is
  defined. `movea` (move address), `at:` and `at:put:` are not
  primitives: an ITLB entry can route them to a method. Fields are
  accessed through P1 and P2.
* **No context copy-back**: a full context cache traps.
* Choices of this design where the architecture gives no detail:
  * every bit encoding: tags, operand modes, operand count, primitive
    numbers
  * the ITLB index and replacement, and the instruction cache
    organisation
  * the ATLB size
  * the trap/resume interface
  * the naming of contexts by a virtual address
  * RIP holding an absolute address
  * the handling of jump conditions
  * halting on a return to 0
* The virtual address is 32 bits (27-bit mantissa) so that a pointer fits
  in one data word. The architecture's example of a 36-bit address (5-bit
  exponent, 31-bit mantissa) is available through `MANT_W`.
* The architecture reserves two context words for P1 and P2 and also
  describes a call layout of RCP, RIP, arg0, arg1. Both are met by making
  P1 = arg0 and P2 = arg1.

## Testbenches and simulation

Each block has a self-checking testbench in `tb/`, named `tb_<module>`.
Each one prints `TB_RESULT checks=N failures=M` and stops on a watchdog.
Randomised tests use `$urandom`. `tb_com_core` is the end-to-end test. It
runs the whole processor at its default sizes and acts as the memory and
the trap-handling software. Its program covers:

* a recursive factorial (5! = 120) through method calls and result
  pointers
* object field reads and writes through P1 in memory
* a counted loop with a conditional delayed backward jump
* an `xfer`
* a tail-called factorial that finally returns to 0 and halts

It checks the results and counts every mechanism: instruction cache and
ITLB misses, ATLB misses, P1/P2 accesses from the context cache and from
memory, allocations, calls, returns, tail calls, xfers and jumps.
`+trace` prints the state sequence.

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl \
    rtl/com_pkg.sv tb/tb_com_core.sv --top-module tb_com_core -Mdir obj_core
./obj_core/Vtb_com_core
```

Replace `com_core` with any other module name to run that block's test.
