# TiReX: a regular-expression processor in SystemVerilog

This design is a small processor that runs regular expressions as programs. A
compiler (not included) turns an expression into a short list of 38-bit
instructions. A tile runs that program over a text held in its own memory and
reports whether it matched, with the first match's start and end. Sixteen such
tiles sit behind an AXI-Lite crossbar. A host processor loads them and starts
them. It can give every tile a different expression over the same text. Or it
can give every tile the same expression over a different slice of a long text.

The tile compares up to four characters per instruction. While looking for
where a match could begin, it tries four start positions per clock cycle. So
a text with no match is scanned at four characters per cycle.

Everything is synthesizable SystemVerilog in `rtl/`, one module per file.
Self-checking testbenches are in `tb/`.

## Contents

| File | Block |
|------|-------|
| `rtl/tirex_system.sv` | Top: crossbar and 16 tiles (control port and core each) |
| `rtl/tirex_axil_xbar.sv` | AXI-Lite crossbar, host to tiles, with broadcast writes |
| `rtl/tirex_axil_ctrl.sv` | Per-tile AXI-Lite register port |
| `rtl/tirex_core.sv` | One tile: wires the parts below together |
| `rtl/tirex_im.sv` | Instruction memory, 1 write port and 3 read ports |
| `rtl/tirex_fdu.sv` | Fetch/decode unit (three are used) |
| `rtl/tirex_data_mem.sv` | Tile data memory (16 KiB) |
| `rtl/tirex_db.sv` | Data buffer: the character window at the data pointer |
| `rtl/tirex_cluster.sv` | One cluster of four character comparators |
| `rtl/tirex_engine.sv` | Combines the cluster results |
| `rtl/tirex_stack.sv` | Context stack |
| `rtl/tirex_cu.sv` | Control unit |
| `rtl/tirex_pkg.sv` | Opcodes, AXI-Lite structs, register map |

Default parameters:
- 16 tiles;
- 4 clusters of 4 comparators;
- 256 instructions and 16 KiB of data per tile;
- 16 stack entries.

The tile count, cluster shape and 38-bit instruction word come from the
original design. The memory sizes and stack depth are this implementation's
choice.

## The instruction set

An instruction is `{opcode[5:0], reference[31:0]}`. The reference holds up to
four ASCII characters, with character *i* in byte *i*. A zero byte means the
slot is unused. The opcode has two 3-bit halves that combine.

Upper half, how the characters are compared:

| Code | Name | Meaning |
|------|------|---------|
| `010` | AND | the next characters equal the reference string |
| `001` | OR | the next character is any one of the reference characters |
| `011` | ANY | `.`: any one character |
| `100` | CALL | `(`: opens a group |

Lower half, what happens to the control flow after a success:

| Code | Name | Meaning |
|------|------|---------|
| `100` | `)` | closes a group |
| `001` | `)*` | closes a zero-or-more loop |
| `010` | `)+` | closes a one-or-more loop |
| `011` | `)\|` | closes one alternative of an OR chain |
| `101` | OKP | a loop starts here; the reference holds the address of the loop's closing instruction |
| `111` | JIM | an OR chain starts here; the reference holds the address just after the chain |

`000000` is EOP: the expression has fully matched.

Examples, as the testbenches write them:

- `ACCGTGGA`: `AND "ACCG"`, `AND "TGGA"`, `EOP`.
- `ACGT(A|C)*`:
  - `AND "ACGT"`
  - `OKP 2`
  - `OR|)* "AC"`, a single bundle: "match A or C, then close the star loop"
  - `EOP`
- `(CAGT)|(GGGG)|(TTGG)TGCA(C|G)+`:
  - `JIM 4`
  - `AND|)| "CAGT"`, `AND|)| "GGGG"`, `AND|)| "TTGG"`
  - `AND "TGCA"`
  - `OKP 6`
  - `OR|)+ "CG"`
  - `EOP`

Every alternative in an OR chain, the last one too, ends with a `)|`
instruction. A loop body or an alternative may be several instructions long.

## The tile

```
           +----------------- instruction memory -----------------+
           | port A (addr 0)     port B (pc+1)     port C (target) |
           v                     v                 v
        FDU-A                 FDU-B             FDU-C        fetch/decode stage
           \____________________|_________________/
                                | select (control unit)
                                v
   data memory -> data buffer -> 4 clusters -> engine         execute stage
                                                 |
                         control unit <----------+----> context stack
```

There are two pipeline stages: fetch/decode, then execute. The control unit
keeps three fetch/decode units (FDUs) loaded. At the end of every cycle the
next instruction is already decoded, whatever the current one does:

- **FDU-A** always holds instruction 0. When an attempt fails partway, the
  program restarts at instruction 0 with no refetch. While searching,
  instruction 0 is executed again and again from here.
- **FDU-B** holds the next sequential instruction, `pc+1`.
- **FDU-C** holds the jump target named by the innermost open loop or OR
  chain. For a loop, that is the first instruction of the loop body. For an OR
  chain, it is the instruction after the chain.

A multiplexer picks one FDU's output for the execute stage each cycle. An FDU
registers the opcode halves, the four reference characters and a `valid_ref`
mask with one bit per used character.

**Timing.** `start` is cycle 0. Cycle 1 fetches and decodes instruction 0.
Cycle 2 executes it. From then on, one instruction executes per cycle. For
the worked example `ACGT(A|C)*` over `CCGTACGTATTGCACTA`, EOP executes in
cycle 7 and `done` rises the cycle after. Only two cases cost an extra cycle:
a loop body that fails after its first instruction, and closing groups
after a failure (see below).

### Execute stage: data buffer, clusters and engine

The **data buffer** registers the data pointer. It shows the 7 characters
(NCLUSTER + CLUSTER_WIDTH - 1) that start there, each with a valid bit that
is clear at or past the end of data. To fill the window at any byte offset,
it reads three 32-bit words from the data memory each cycle. The pointer for
the next cycle can be anything: an advance of 0 to 7, a restart, or a
restored loop position. So the window never stalls.

Cluster *c* sees window characters `c .. c+3`. It has four comparators:

- **AND**: comparator *i* checks window character *c+i* against reference
  character *i*. Unused reference slots count as equal.
- **OR**: every comparator checks the first character, *c*, against its own
  reference character. Any hit counts.
- **ANY**: true if character *c* exists.

The **engine** works in two modes:

- **Searching.** The tile is not inside a match and is at instruction 0. All
  four clusters are enabled, so four start positions are tried at once. The
  lowest cluster that hits gives the match start, `dp + c`. The pointer moves
  past the consumed characters: all used reference characters for AND, one
  for OR and ANY. If no cluster hits, the pointer moves by 4 and instruction
  0 runs again the next cycle.
- **Matching.** Only cluster 0 is used. The pointer moves by the number of
  characters consumed.

### Control unit and context stack (the hard part)

The control unit holds:
- the program counter;
- the data pointer;
- the start of the current attempt;
- a flag: searching, or inside a match.

Groups, loops and OR chains push a context onto the stack. A context records:
- its kind (group, loop or OR chain);
- its jump target and closing address;
- a saved data pointer;
- one bit that says whether a loop has finished an iteration.

The matcher is greedy and depth-first. A loop takes as many iterations as it
can. The first alternative of an OR chain that matches wins. Nothing is ever
retried after that. This is the usual behaviour of a simple regular
expression VM without backtracking. Its consequence is that `(A|C)*C` cannot
match, because the loop eats the final C.

**What each instruction does on success:**

| Instruction | Effect on success |
|-------------|-------------------|
| AND / OR / ANY | advance the pointer, go to `pc+1` |
| `(` | push a group context |
| OKP | push a loop context (body = `pc+1`, saved pointer = now); no characters consumed |
| JIM | push an OR-chain context (exit address, saved pointer); no characters consumed |
| `)` | pop the group |
| `)*` / `)+` | one iteration done: save the pointer, jump back to the body through FDU-C. An iteration that consumed nothing ends the loop, so an empty body cannot spin forever. |
| `)\|` | this alternative matched: pop the chain and jump to its exit through FDU-C |
| EOP | match found: record the span and stop |

**What happens on failure** depends on the innermost context:

- **No context.** The attempt failed. Go back to instruction 0 through FDU-A,
  with no lost cycle, and start again one character after the last attempt
  start. In searching mode, start again 4 characters further. When the
  restart point reaches the end of data, the run ends with no match.
- **Loop.** The current iteration failed, so the loop ends with what it had.
  - The pointer is restored to the end of the last complete iteration.
  - Execution goes on after the loop closer.
  - If the failing instruction was the closer itself, this costs no extra
    cycle.
  - If the body has several instructions and failed earlier, the control unit
    spends one bubble cycle fetching the closer. The closer then runs in
    "exit" mode: it does not compare, only pops and continues.
  - A `)+` loop with no complete iteration fails in turn, into the next
    context out.
- **OR chain.** The current alternative failed. The pointer is restored to
  where the chain started. Execution goes on with the next alternative.
  - If the failing instruction was this alternative's `)|`, the next
    alternative is simply `pc+1`.
  - Otherwise the control unit skips forward, one instruction per cycle,
    counting nested groups, until it passes this alternative's `)|`.
  - If the last alternative fails, the chain is popped and the failure goes
    to the next context out.
- **Group.** The group is popped. The failure is passed to the next context
  out, one cycle later.

A stack overflow, or a closer that does not match the open context, sets
`error` and ends the run.

Each of the five mechanisms gives a one-cycle event pulse. They are: restart,
loop back-jump, next alternative, chain exit, and loop-exit redirect. The
testbenches count them.

## The multi-core system

`tirex_system` connects one host AXI-Lite port to 16 tiles. Each tile owns a
1 MiB window: tile *t* is at `t << 20`. A write with address bit 24 set goes
to every tile at once. Reads are never broadcast. A broadcast read gets
DECERR. The crossbar carries one read and one write at a time.

Tile registers (byte offsets inside the tile window):

| Offset | Register | Access |
|--------|----------|--------|
| `0x00` | CTRL: bit 0 starts the tile | W |
| `0x04` | STATUS: `{error, found, done, busy}` | R |
| `0x08`, `0x0C` | SOD and EOD: the data window `[SOD, EOD)` | RW |
| `0x10`, `0x14` | match start, and match end (exclusive) | R |
| `0x18` | clock cycles of the last run | R |
| `0x40000 + 8*i` | instruction *i*: reference word first, then opcode word (the opcode write stores the instruction) | W |
| `0x80000 + 4*w` | data word *w*, with byte strobes | W |

The top also brings out the following outputs:
- per-tile `core_done` and `core_found`;
- `found_any` and `all_done`;
- the per-tile event pulses.

The host can use the tiles in two ways:

- **Many expressions, one text.** Broadcast the text, then write a different
  program to each tile.
- **One expression, many slices.** Broadcast the program. Split the text
  into N slices that overlap by a threshold *Tr*, the longest match expected.
  Take the batch size `B = S / N`. Slice *i* ends at
  `EoD_i = min(B*(i+1) + Tr, S)` and starts at `SoD_i = EoD_(i-1) - Tr` (0 for
  the first slice). Write each slice to a tile and start all tiles with one
  broadcast write. A match that crosses a slice boundary is still seen whole
  by the tile before it. Found positions are local to the slice; add `SoD_i`.

## Testbenches

Each testbench checks its block against a model written in the testbench. It
prints `TB_RESULT checks=N failures=M`. It has a watchdog.

- `tb_tirex_system` runs at full size: 16 tiles, 16 KiB each. It first splits
  a 16 KiB text over the tiles with Tr = 100 and runs
  `(CAGT)|(GGGG)|(TTGG)TGCA(C|G)+`. One planted match straddles a slice
  boundary. It then broadcasts a text and runs a different expression in
  each tile. It checks:
  - every tile's result;
  - the scan rate, 16384 characters in about 4096 cycles;
  - DECERR on a broadcast read;
  - that every mechanism and both system flags occurred.
- `tb_tirex_core` tests one tile. It checks:
  - the worked example, with its 7-cycle timing;
  - the three benchmark expressions;
  - a multi-instruction loop body that fails (redirect);
  - a multi-instruction alternative that fails (skip);
  - groups;
  - the `.` operator and the data window;
  - the search rate;
  - 40 random literal searches against a brute-force search.

  It is also the control unit's testbench.
- Leaf testbenches: `tb_tirex_im`, `tb_tirex_fdu`, `tb_tirex_data_mem`,
  `tb_tirex_db`, `tb_tirex_cluster`, `tb_tirex_engine`, `tb_tirex_stack`,
  `tb_tirex_axil_ctrl`, `tb_tirex_axil_xbar`.

`tb/tirex_asm_pkg.sv` has small helpers for hand-assembling programs.

## Not included

- **The external-host variant.** In this variant each tile streams its
  program and data from DDR through an AXI master port, with a FIFO in each
  direction for back-pressure. It is not built. Only the embedded-host
  variant (AXI-Lite loading) is.
- **The host processor, its software and the compiler.** The system
  testbench plays the host, and the testbenches assemble programs by hand.
- **Backtracking.** The matcher is greedy, as described above.
