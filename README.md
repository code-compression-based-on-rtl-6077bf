# Operand-factorization code decompression engine

Embedded programs are often held in on-chip memory, and the program memory can take more
die area than the processor that runs the program. Operand factorization shrinks the program
by splitting every expression tree of the compiled code into two parts:

* a **tree-pattern**: the opcodes of the tree's instructions, with every operand replaced by a
  wildcard (`addiu *,*,* ; lui *,* ; sw *,*(*)`);
* an **operand-pattern**: the registers and immediates of the tree, in the order they appear
  (`[r4, r4, 1, r1, 0, r1, 0, r4]`).

A program has few distinct tree-patterns and operand-patterns, and their frequencies fall off
steeply. Each pattern therefore gets a short variable-length codeword, and the program is
stored as a string of codeword pairs `[Tp, Op]`. This RTL is the hardware that turns that
string back into ordinary 32-bit MIPS R2000 instructions while the processor fetches them. It
works in real time and can restart at any branch target.

```
            +------------+  Tp rank   +------+ tpaddr  +-----+ OPCODE,ITYPE,END
 program -->| cw_extract |----------->| tgen |-------->| tpd |-----------------+
 memory     | (bit buf,  |  Op rank   +------+         +-----+                 v
            |  VLC len)  |-----+----->| rgen |--- RD, RS1, RS2 ----------> +-----+  insn
            +------------+     |      +------+                             | iab |------>
               ^ redirect      +----->| igen |-- BSEL,BADDR -->+-----+ IMB | FIFO|  CPU
               | (addr,offs)          +------+                 | imd |---->+-----+
                                                               +-----+
```

The top module is `opfact_decomp` (`rtl/opfact_decomp.sv`). It contains the blocks above and a
small pipelined controller.

## The compressed stream

**Words and bit order.** The program memory holds 32-bit words. Codewords are packed back to
back from the most significant bit of a word downwards. A codeword may split across two
words. The stream is `Tp1 Op1 Tp2 Op2 ...`.

**Codewords.** The code is a bounded variable-length code: the number of leading zeroes tells
the decoder how long the codeword is, so no Huffman tree has to be walked. This RTL uses three
classes:

| class | bit pattern           | length | codewords | ranks        |
|-------|-----------------------|--------|-----------|--------------|
| 0     | `1 ppp`               | 4      | 8         | 0 – 7        |
| 1     | `01 pppppp`           | 8      | 64        | 8 – 71       |
| 2     | `00` + 14-bit payload | 16     | 16384     | 72 – 16455   |

The **rank** of a codeword is the number of codewords in shorter classes plus its payload. It
indexes the pattern tables. The compressor should give the lowest ranks to the patterns that
contribute the most bits. Class 2 is the fixed-length escape for the long tail of rare
patterns. No codeword is longer than 16 bits, so a 32-bit word always holds at least one
codeword and a pair never needs more than 32 buffered bits. The class table lives in
`ofz_pkg` (`vlc_len`, `vlc_pay`, `vlc_base`), and `cw_extract` derives its decoding from it.

**Branch targets** are codeword pairs, not words. A target is a 21-bit word address plus a
5-bit bit offset (bit 0 is the MSB of the word). Targets are stored in the 32-bit bank of the
immediate dictionary as `{addr, offset}`. A jump is assembled with this 26-bit value as its
target field. The processor then gives the pair back to the engine on `redir_addr` and
`redir_offs`. Targets that do not fit in 21 bits are left to a jump table kept by software.

## How one pair becomes instructions

`cw_extract` keeps a 96-bit left-aligned bit buffer. It asks for a new word whenever at least
32 bits are free, with at most one read outstanding. Each cycle it decodes the pair at the
head of the buffer:

1. It counts the leading zeroes of the first 16 bits, which gives the Tp class, length and rank.
2. It takes the next 16 bits after the Tp codeword and decodes the Op codeword the same way.
3. It offers the pair when `pair_len <= valid bits`.

Bits below the valid count are kept at zero. An incomplete codeword therefore always looks
too long, and it is never decoded early. When the consumer is ready, the extractor delivers
one pair per clock.

The control in `opfact_decomp` then expands the pair in a three-stage pipeline. Each
instruction takes one cycle in each stage:

| stage | what happens |
|-------|--------------|
| issue | read TPD entry `tpaddr = base + step`, the register record and the immediate record of the current step, and advance the step |
| entry | the three records are out; read the IMD bank named by BSEL at BADDR; if the TPD entry has END set, do not issue the next step's read and start the next pair instead (its base lookups take this cycle) |
| assemble | the immediate is out; the IAB assembles and queues the instruction |

The hard part is the pattern boundary. The last instruction of a tree-pattern is only known
when its TPD entry comes back, one cycle after it was read. By then the issue stage would
already be reading the step after it. The engine therefore issues nothing in the cycle that
sees END. It uses that cycle to accept the next pair, and the TGEN, RGEN and IGEN base
lookups happen at the same clock edge. A tree-pattern of L instructions thus costs L + 1
cycles.

The IAB is never overrun. A read is only issued when the IAB's fill level plus the
instructions already in the entry and assemble stages leave room for one more. While the
processor holds `insn_ready` low, issue simply waits, and nothing in flight has to stop.

The extractor keeps up with this rate. It fetches 16 bits per cycle on average, and a pair
takes at least two cycles and at most 32 bits.

The three generators step in lock-step, and the TPD's END bit alone ends a pattern. An
operand-pattern must therefore hold exactly as many records as its tree-pattern has
instructions. The compressor pairs only patterns of the same length.

A redirect (`redir_valid`) takes effect in the same cycle. It empties the bit buffer, drops
the pattern in progress, discards any word already in flight and flushes the IAB. Reads
restart at `redir_addr`, and the first `redir_offs` bits of that word are skipped. After reset
the engine does nothing until the first redirect, which gives the program's start address.

## The dictionaries

All tables are RAMs loaded through one write port before decompression starts:
`cfg_we`, `cfg_tgt`, `cfg_bank`, `cfg_addr`, `cfg_wdata`.

| `cfg_tgt` | table | address | data (`cfg_wdata`, low bits) |
|-----------|-------|---------|------------------------------|
| `CFG_TGEN`  | TGEN: Tp rank → first TPD entry | Tp rank | tpaddr |
| `CFG_TPD`   | TPD entry | TPD address | `{OPCODE[11:0], ITYPE[2:0], END}` |
| `CFG_RBASE` | RGEN: Op rank → first register record | Op rank | record address |
| `CFG_RREC`  | register record | record address | `{RD, RS1, RS2}`, 5 bits each |
| `CFG_IBASE` | IGEN: Op rank → first immediate record | Op rank | record address |
| `CFG_IREC`  | immediate record | record address | `{HAS_IMM, BSEL[2:0], BADDR[9:0]}` |
| `CFG_IMD`   | immediate bank `cfg_bank` | entry | value (the bank keeps its low 2^(bank+1) bits) |

* **TPD (tree-pattern dictionary)**: a tree-pattern's instructions occupy consecutive entries.
  END marks the last one. OPCODE is `{major opcode, funct}`. For REGIMM branches the `rt` code
  goes in `funct[4:0]`.
* **RGEN and IGEN**: both are the dictionary form of a per-program state machine. The base
  table maps the Op rank to the first record, and a step counter (the state) walks through
  the records, one per instruction. An unused register field may hold anything. A fully
  minimised RGEN would be logic synthesised for one fixed program. The dictionary form holds
  any program and is the upper bound on its size.
* **IMD (immediate dictionary)**: five banks of 2, 4, 8, 16 and 32-bit entries. Each distinct
  immediate is stored once, in the smallest bank that holds the bits its instruction uses. A
  bank's output is sign-extended to the 32-bit immediate bus IMB. For example, `ori`'s 0xFFFF
  sits in the 16-bit bank, because only the low 16 bits are used.

## Instruction assembly (ITYPE)

The IAB places the fields according to the 3-bit ITYPE of the TPD entry (`itype_e` in
`ofz_pkg`):

| ITYPE | format | examples |
|-------|--------|----------|
| 0 `IT_R3`     | `op rs=RS1 rt=RS2 rd=RD 0 funct` | addu, slt |
| 1 `IT_RSH`    | `op 0 rt=RS1 rd=RD shamt=IMB[4:0] funct` | sll, srl |
| 2 `IT_IALU`   | `op rs=RS1 rt=RD IMB[15:0]` | addiu, lw |
| 3 `IT_ISTORE` | `op rs=RS1 rt=RS2 IMB[15:0]` | sw, beq |
| 4 `IT_LUI`    | `op 0 rt=RD IMB[15:0]` | lui |
| 5 `IT_REGIMM` | `op rs=RS1 rt=funct[4:0] IMB[15:0]` | bgez, bltz |
| 6 `IT_J`      | `op IMB[25:0]` | j, jal |
| 7 `IT_RAW`    | `op 0 funct` | syscall |

For example, the tree `addiu r4,r4,1 ; lui r1,0 ; sw r1,0(r4)` comes out as `24840001`,
`3c010000` and `ac810000`. Finished instructions wait in a 4-entry FIFO. The processor takes
them through `insn_valid`, `insn_ready` and `insn`.

## Top-level interface

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset (control state only, tables are not cleared) |
| `mem_req`, `mem_addr` | out | 1, 21 | read one compressed word |
| `mem_rdata` | in | 32 | the word, valid in the cycle after `mem_req` |
| `redir_valid`, `redir_addr`, `redir_offs` | in | 1, 21, 5 | restart at a branch target |
| `cfg_*` | in | see above | table load port |
| `insn_valid`, `insn_ready`, `insn` | out, in, out | 1, 1, 32 | decompressed instructions |
| `decode_err` | out | 1 | sticky: a rank fell outside the TGEN or RGEN table |

| parameter | default | meaning |
|-----------|---------|---------|
| `ADDR_W`, `OFFS_W` | 21, 5 | branch target word address and bit offset |
| `TP_PATTERNS` | 2048 | TGEN table entries (distinct tree-patterns) |
| `TPD_DEPTH` | 8192 | TPD entries |
| `OP_PATTERNS` | 16384 | RGEN/IGEN base-table entries (distinct operand-patterns) |
| `OPR_DEPTH` | 65536 | register and immediate records |
| `NBANKS`, `BANK_DEPTH` | 5, 1024 | IMD banks (2..32 bits) and entries per bank |
| `MAX_TREE_LEN` | 16 | longest tree-pattern (size of the step counter) |
| `IAB_DEPTH` | 4 | instruction FIFO entries |

## What to trust and where this departs from the original scheme

Taken from the original scheme:
* the split into tree-patterns and operand-patterns;
* `[Tp, Op]` pairs, codewords of at most 16 bits that may split across 32-bit words, and
  leading-zero length coding;
* the blocks TGEN, TPD, RGEN, IGEN, IMD and IAB with their interfaces;
* the TPD entry fields OPCODE, ITYPE and END;
* IMD banks of growing width behind a multiplexer;
* branch targets as a 21-bit address plus a 5-bit offset.

Choices made in this RTL:
* the exact codeword classes and rank numbering;
* MSB-first bit order;
* table-based TGEN, and RGEN/IGEN in dictionary form rather than minimised logic;
* the ITYPE encoding and field placement;
* sign extension in the IMD;
* the three-stage expansion pipeline (L + 1 cycles for an L-instruction tree);
* the FIFO depth, the load port, redirect and flush behaviour, `decode_err`;
* every memory size.

There is no published rate or latency to check against. The L + 1 cycle rate is this
design's own, and the testbenches check it.

**Capacity.** Published pattern counts for the SPECint95 programs compiled for the R2000 are:
* go: 578 tree-patterns, 12561 operand-patterns;
* li: 157 and 3056;
* compress: 125 and 731;
* perl: 648 and 11209;
* gcc: 1547 and 41486;
* vortex: 471 and 16143;
* jpeg: 767 and 9839.

With the default sizes, every program's tree-patterns fit in the TGEN table. Every program
except gcc also fits its operand-patterns in the 16456-codeword space and the 16384-entry
tables. gcc's operand-patterns exceed what any prefix code of at most 16 bits can name with a
length escape, so such a program needs some trees left to a different mechanism. The record
memories assume about four instructions per pattern on average.

The compressor (pattern extraction, code assignment, packing, branch patching) is software
and is not included.

## Simulating

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | block | what it checks |
|-----------|-------|----------------|
| `tb_opfact_decomp` | whole engine, default sizes | random dictionaries and program, encoded by the testbench's own encoder; every instruction compared with its own assembler; random consumer stalls; a backward branch to a non-zero bit offset that flushes queued work; a rank out of range raising `decode_err`; counts codeword splits, every class, every ITYPE and IMD bank, reads held back for IAB room, the longest pattern |
| `tb_cw_extract` | extractor | ranks of 300 random pairs, restart at a bit offset, nothing before the first restart, one pair per cycle |
| `tb_tgen`, `tb_tpd`, `tb_rgen`, `tb_igen`, `tb_imd` | tables | lookups, stepping, read latency and hold, sign extension, range errors |
| `tb_iab` | IAB | all formats against a reference assembler, the example tree above, FIFO order, full, flush |
| `tb_workloads` | whole engine, default sizes | synthetic programs with the tree and pattern counts of the seven SPECint95 programs above (random contents, skewed pattern frequencies), every instruction compared, rate of L + 1 cycles per tree of L instructions; gcc with its operand-patterns capped at 16384 |

With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/ofz_pkg.sv tb/tb_opfact_decomp.sv \
          --top-module tb_opfact_decomp -o sim
./obj_dir/sim
```

Replace the testbench name to run another one. Every run takes well under a second,
except `tb_workloads` (about 1.3 million patterns, a few seconds). The
testbenches have no random seed of their own: use `+verilator+seed+N` for other seeds.
