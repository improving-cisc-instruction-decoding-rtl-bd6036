# Fill-unit decoding front end for an x86-style microengine

Wide out-of-order cores need several instructions per cycle from their
decoders. For a CISC instruction set such as x86 that is hard: a P6-style
decoder has one complex decoder and two simple ones, so a complex instruction
(one that touches memory) can only be decoded from the first slot, and in
practice the decoder delivers well under two instructions per cycle.

This RTL implements the remedy described in *Improving CISC Instruction
Decoding Performance Using a Fill Unit*: a **fill unit** watches the
microoperations that leave the decoders, packs the microoperations of up to
three consecutive instructions into one **line**, and stores the line in a
**decoded instruction cache**. The next time execution reaches the line's
first address, the whole line is taken from that cache in one cycle, bypassing
fetch and decode, with complex instructions in any position. Lines are
*tree-like*: past a conditional branch they hold both the taken and the
untaken continuation, and a branch predictor chooses which one is issued.

A second idea keeps renaming cheap. The values that pass between the
microoperations of a line (the microarchitected registers, MR) are not renamed
by the general renamer. Instead each line gets a fresh number from a 5-bit
line counter, and each MR reference in the line becomes
`{line counter, MR number}`: a name in a separate 512-entry *fill unit
register file*. Only architected registers go through the general renamer.

## Block diagram

```
  instruction stream ──► instr_queue ──slots 1..3──► p6_decoder ──groups──┬──► fill_unit ──lines──► decoded_icache
         (execution order,      │                   (1 complex,          │                              │
          branch directions)    │                    2 simple)           │         fetch address ───────┤
                                │                                        │                              │ hit, line
                                │                    branch_pred_cache ──┼── path choice ◄──────────────┤
                                │                                        │                              ▼
                                │                                        │                          fu_rename
                                │                                        ▼                              │
                                └────────────── pop count ◄──────── uop_mux ◄──── hit signal ───────────┘
                                                                        │
                                                                        ▼
                                                                   gen_rename ──► renamed microoperations
                                                                   (reorder-buffer names)

   regfile x2 (fill unit register file, physical register file): ports go to the microengine
```

`fill_frontend` is the top. The out-of-order microengine that executes the
renamed microoperations, and the ordinary instruction cache, are not part of
this design; the top brings out their connections.

## From instructions to microoperation groups

Instructions enter already split into fields (`instr_t` in `fu_pkg`: class,
base/index/source registers, length, branch target and, for conditional
branches, the direction they actually went). Parsing x86 bytes is not modelled.

Every instruction becomes a *group* of at most seven microoperations that fits
one resource template: one address generation (A), two loads (L), three
computations (C) and one store (S), with three microarchitected registers
MR1–MR3 to carry values inside the instruction. Examples:

| instruction | microoperations, in group order |
|---|---|
| `ADD [EBX+EAX],ECX` | A MR1←EBX+EAX; L MR2←[MR1]; C MR3,flags←MR2+ECX; S [MR1]←MR3 |
| `ADD reg,[mem]` | A MR1; L MR2←[MR1]; C reg,flags←MR2+reg |
| `PUSH reg` | S [ESP]←reg; C ESP←step(ESP) |
| `POP mem` | A MR1; L MR2←[ESP]; S [MR1]←MR2; C ESP←step(ESP) |
| `CMPS` | L MR1←[ESI]; L MR2←[EDI]; C flags←MR1−MR2; C ESI; C EDI |
| register–register ALU | one C |
| direct branch | one B |

Groups list their microoperations in data-flow order, so a renamer walking a
group front to back sees each producer before its consumers. MUL and DIV
through memory use the second destination and the third source of the C
microoperation. The direction flag of string instructions is not modelled.

**Decoder slot rule** (`p6_decoder`). Slot 1 feeds the complex decoder, which
accepts anything. Slot 2 is decoded in the same cycle only if slot 1 was and
slot 2 is *simple* (register–register ALU, direct branch or NOP); slot 3
likewise depends on slot 2. Decoding also stops after a taken branch. So the
sequence simple, complex, simple, complex takes three cycles (1 + 2 + 1).

## Tree-like lines

This is the part that needs the most care. A line (`dline_t`) has:

* an **entry tag**: the address of its first instruction (the cache key);
* two **paths**, 0 = branch untaken and 1 = branch taken, each with up to three
  instructions / 21 microoperations, an instruction and microoperation count,
  a **next-instruction address** and an **open** flag;
* one **branch** field: whether the line has a conditional branch, its
  position, condition, own address and taken address;
* a **target tag**: the address of the first instruction filled from the
  branch target, used only by invalidation.

**Filling** (`fill_unit`). A line starts at the first decoded instruction that
arrives while no line is being built. Until a conditional branch arrives, each
instruction's group is appended to *both* paths, so both hold identical
microoperations up to the branch. Appending renumbers the group's MRs: MRk of
the n-th instruction in the path becomes line register 3n+k−1 (0..8), so
groups of one line never share an MR. The branch itself goes into both paths;
path 0's next address becomes the fall-through address, path 1's the target.
From then on only the path that execution actually followed grows; the other
path stays **open**: a short path that ends at the branch.

A line is **finalized** when:

| cause | what happens |
|---|---|
| the growing path has three instructions | closed normally |
| an unconditional direct jump was added | its target becomes the next address |
| a second conditional branch arrives | one branch per line; the branch starts a new line |
| a return or indirect jump arrives | it is not filled (its target is not static) |
| an instruction does not continue the path | e.g. after a squashed wrong path |
| the cache supplied a line | the line being built ends where the cached one starts |

A finalized line is written only if some path holds more than one
instruction; single instructions are cheaper to fetch normally. Finished lines
pass through a 4-entry write queue, one write per cycle. A line that finds the
queue full is dropped and reported on `ev_drop`.

**Back-up.** When the cache supplies a path that is still open (the short path),
the fill unit reloads that line and keeps filling the open path with the
instructions decoded next, then writes the line back in place. After a branch
has gone both ways, the line therefore serves both directions.

## One cycle of the front end

At the start of a cycle the address of the oldest queued instruction is looked
up (combinationally) in the decoded instruction cache.

* **Hit.** If the line has a branch, `branch_pred_cache` picks a path: a
  one-bit taken/untaken entry if present, otherwise backward-taken /
  forward-untaken. The path's microoperations pass through `fu_rename` and the
  mux to `gen_rename`. The instructions they replace leave the queue: up to
  three per cycle, whatever their mix. The line counter then advances.
* **Wrong path.** The testbench-supplied stream carries each branch's real
  direction, standing in for resolution by the microengine. If the chosen path
  disagrees, nothing is sent that cycle and the predictor is corrected. The
  next cycle the same line is looked up again and now yields the other path,
  which may be only the short path up to the branch. The cost is one cycle.
* **Miss** (or too few queued instructions to cover the path). The decoders
  deliver up to three instructions. Their groups are packed back to back by
  `uop_mux` and sent to renaming and to the fill unit.
* Nothing is taken while `gen_rename` lacks room for a whole line (21
  reorder-buffer slots).

Renamed microoperations appear one cycle after selection.

## Two-level renaming

`fu_rename` turns each line register r (0..8) into the fill unit name
`{counter[4:0], r[3:0]}` (512 names). The counter advances once per line
issued. With a reorder buffer of 64 microoperation slots and at least two
microoperations per line, at most 32 lines are in flight, so live names never
collide.

`gen_rename` renames everything else in program order: the eight general
registers, the flags, and MR1–MR3 of decoder-supplied groups. Physical names
are reorder-buffer slots. The k-th microoperation of a cycle gets slot tail+k.
Its destinations are `{sub, slot}`, with sub 0 for the first, 1 for the second
and 2 for the flags. An alias table maps each logical register to its latest
writer. A source takes that name while the writer is in flight, and the
retired architected value (`O_ARCH`) once the writer has retired (`retire_n`).
Fill unit names pass through as `O_FU`.

For `ADD EAX,[EBX+ESI]; ADD EAX,10; ADD EBX,4` from the decoders this is 15
register renames. From a cached line the MR traffic moves to the fill unit
register file, and the general renamer sees only the 11 architected
references.

## Self-modifying code

A store into code (`inv_valid`, `inv_addr` = X) cannot be traced to one line,
because a line covers up to three instructions of at most 16 bytes each. The
cache therefore clears a 48-byte window. Over four cycles it checks the 16-byte
blocks X−48, X−32, X−16 and X, comparing addresses with the low four bits
dropped. A line dies if its entry tag or its target tag falls in the block.
The set index uses the address bits just above the low four, so the entry
check looks at one set; the target check looks at every line.

## Parameters

| parameter (module) | default | origin |
|---|---|---|
| `DIC_ENTRIES` / `ENTRIES` (decoded_icache) | 1024 lines | source design |
| `DIC_WAYS` / `WAYS` | 4 | source design |
| line size | 3 instructions, 21 microoperations, 2 paths | source design |
| fill unit register file | 512 (5-bit counter + 4-bit number) | source design |
| `ROB_N` (gen_rename) | 64 microoperation slots | own choice (the source example is about fifty instructions) |
| `BPC_ENTRIES` (branch_pred_cache) | 512, direct-mapped, 1 bit | own choice |
| `IQ_DEPTH` (instr_queue) | 8 | own choice |
| `WR_FIFO` (fill_unit) | 4 | own choice |
| register files | 32-bit words, 3 read + 3 write ports | own choice |

A line is about 1.3 kbit, so the default cache holds about 1.3 Mbit as
flip-flop arrays. A real implementation would use SRAM macros with the same
ports.

## Departures and own choices

* Branch directions arrive with the instruction stream rather than from a
  branch unit and microengine. A wrong path is caught before renaming, so no
  flush of the renamer is needed.
* Returns and indirect jumps end a line and are never stored in one.
* Lookup is combinational, within the same cycle. Renaming takes one cycle.
  No other pipeline timing is modelled.
* `LODS` reads EDI and `POP reg` uses a load, following the data-flow
  pictures of the source (one labels that microoperation as a store, which
  cannot be right).
* Not built: the optional scheme that retires a whole line atomically, keeping
  only the last definition of each register. It needs exception recovery in
  the microengine. Also not built: the microengine, the ordinary instruction
  cache, and the baseline decoder variants ("moves as simple", three complex
  decoders).

## Verification

Each module in `rtl/` has a self-checking testbench `tb/tb_<module>.sv`. Each
testbench ends with a `TB_RESULT checks=N failures=M` line and has a watchdog.
The most informative are:

* `tb_p6_decoder`: the simple, complex, simple, complex sequence takes three
  cycles; the slot and taken-branch rules.
* `tb_fill_unit`: builds a tree line and checks both paths, the open short path, MR
  renumbering and the tags. It also checks every finalization cause, the
  more-than-one-instruction rule, back-up into an open path, and an overflowing
  write queue.
* `tb_decoded_icache`: replacement and rewrite in place; invalidation by entry
  tag and by target tag; the edges of the 48-byte window.
* `tb_gen_rename`: the three-instruction example above, dependence by
  dependence; the reorder-buffer full handshake.
* `tb_fill_frontend`: the whole front end at default sizes. It runs a 60-pass
  loop with complex instructions in every slot, a jump, an indirect jump and an
  inner branch that changes direction every fourth pass. During the run it
  pauses retirement, disables filling and invalidates part of the loop. Every
  cycle it checks the count and kind sequence of the renamed microoperations
  against reference mappings. It requires each mechanism to occur: hits,
  wrong-path squashes, back-up, renaming stalls, slot-1 waits, each
  finalization cause, invalidation kills and line-counter wrap. Measured: the
  cold first pass decodes 14 instructions in 9 cycles (1.56 per cycle); the
  warm loop decodes 260 in 120 cycles (2.17 per cycle).

## Simulating

With Verilator 5 (the package must come first):

```
verilator --binary --timing --assert rtl/fu_pkg.sv \
    $(ls rtl/*.sv | grep -v fu_pkg) tb/tb_fill_frontend.sv \
    --top-module tb_fill_frontend -Mdir obj
./obj/Vtb_fill_frontend
```

Replace `tb_fill_frontend` by any other testbench name to run a single block.
The full-size run builds in about 20 s and simulates in well under a second.
