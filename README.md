# RVC instruction front end

RVC ("RISC-V Compressed") is a variable-length extension of an early version
of the RISC-V base instruction set. The most frequent instructions get a
16-bit encoding. Every 32-bit instruction stays available, and the two sizes
can be mixed at any halfword boundary. Each 16-bit instruction stands for
exactly one 32-bit instruction. A core can therefore run RVC code with its
base-ISA decoder unchanged, provided something in front of it does three
things:

1. finds where each instruction starts, and fetches 32-bit instructions that
   begin in the middle of a word, possibly crossing a cache line or a page;
2. rewrites each 16-bit instruction into its 32-bit equivalent;
3. feeds both from a translated instruction cache. Compressed code has a
   smaller working set, so it misses less often.

This repository is that front end, in synthesizable SystemVerilog:

```
                          page-table walker
                                 ^
                                 | TLB refills
                                 v
 main memory <==> icache <--- itlb <--- rvc_fetch_align ---> rvc_expander ---> core
  (refills)      16 KB DM    8 entries   halfword buffer      16 -> 32 bit
                 32 B lines  4 KB pages  + length decode
                    |                          ^
                    +------- fetched words ----+
```

The core, the main memory, the page-table walker and the data side are not
included. The front end
gives the core a valid/ready stream of 32-bit base instructions. Each comes
with its PC, a "was compressed" flag (so the PC advances by 2 instead of 4)
and an "illegal" flag. The core sends redirects back for taken branches,
jumps and traps.

## Files

| file | contents |
|---|---|
| `rtl/rvc_pkg.sv` | base-ISA opcodes and format builders, RVC opcode enum, 3-bit register maps |
| `rtl/rvc_length_decoder.sv` | instruction length from the first halfword |
| `rtl/rvc_expander.sv` | combinational RVC to RISC-V rewriting |
| `rtl/rvc_fetch_align.sv` | fetch unit, halfword buffer, redirect handling |
| `rtl/itlb.sv` | fully associative instruction TLB |
| `rtl/icache.sv` | blocking instruction cache, direct-mapped or two-way |
| `rtl/rvc_frontend.sv` | top: the parts wired together |
| `tb/tb_*.sv` | self-checking testbenches: one per block, plus a compressed-versus-uncompressed fetch comparison |
| `tb/icache_bench.sv`, `tb/mem_model.sv`, `tb/ptw_model.sv` | testbench helpers: one cache configuration under test; a main memory with a fixed refill latency; a page-table walker with a fixed page map and walk latency |

## Instruction length

Only the low bits of the first halfword matter:

| bits 1:0 | bits 4:0 | length |
|---|---|---|
| 00, 01, 10 | – | 16-bit RVC |
| 11 | not 11111 | 32-bit base instruction |
| 11 | 11111 | reserved for longer instructions; flagged illegal here |

This leaves 24 of the 32 five-bit values as RVC major opcodes.

## The 32-bit base format this targets

The expander produces the *early* RISC-V layout, not the later ratified one.
Register fields sit at the top of the word:

| format | 31:27 | 26:22 | 21:17 | 16:10 | 9:7 | 6:0 |
|---|---|---|---|---|---|---|
| R | rd | rs1 | rs2 | funct10 (16:7) | | opcode |
| I | rd | rs1 | imm[11:7] | imm[6:0] | funct3 | opcode |
| B (store, branch) | imm[11:7] | rs1 | rs2 | imm[6:0] | funct3 | opcode |
| J | offset[24:0] (31:7) | | | | | opcode |

Branch and jump offsets count halfwords. Targets can be any even address,
which is what lets them reach a 16-bit instruction.

Opcodes used:
- LOAD 0x03, LOAD-FP 0x07, OP-IMM 0x13, OP-IMM-32 0x1B
- STORE 0x23, STORE-FP 0x27, OP 0x33
- BRANCH 0x63 (BEQ 000, BNE 001)
- J 0x67
- JALR 0x6B. funct3 000 is the call hint and 001 the return hint.
- SUB is ADD with funct10 bit 9 set, i.e. instruction bit 16.
- SRAI sets immediate bit 10.

Several of these are known from a real code example of the era:
- LOAD, OP-IMM, BRANCH, OP, JALR
- the SUB bit
- the return hint

The rest follow the usual RISC-V values. Every constant is in `rvc_pkg`, so a
different base encoding can be dropped in there.

## RVC formats and expansion (`rvc_expander`)

The opcode is always in bits 4:0. There are two kinds of register
specifier:
- 5-bit fields (`rd`, `rs1`, `rs2`) reach every register.
- 3-bit fields (`rda`, `rs1a`, `rs2a`, `rs2b`) reach the eight most used
  registers.

| 3-bit value | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 |
|---|---|---|---|---|---|---|---|---|
| `rda`, `rs1a`, `rs2a` | x20 (s0) | x21 (s1) | x2 | x3 | x4 | x5 | x6 | x7 |
| `rs2b` (stores, branches) | x20 | x21 | x2 | x3 | x4 | x5 | x6 | x0 |

The stack pointer is x30.

| opcode | name | layout (bit 15 first) | expands to |
|---|---|---|---|
| 0 | C.LI | imm6 · rd | `addi rd, x0, imm6` |
| 1 | C.ADDI | imm6 · rd (rd ≠ 0) | `addi rd, rd, imm6` |
| 1 | C.JR / C.JALR | s · rs1 · 00000 | `jalr x0/ra, rs1` (s = 0 / 1) |
| 2 | C.MOVE | 0 · rs1 · rd | `addi rd, rs1, 0` |
| 2 | C.J | 1 · target10 | `j target10` |
| 4 | C.ADDIW | imm6 · rd | `addiw rd, rd, imm6` |
| 5, 6 | C.LWSP, C.LDSP | imm6 · rd | `lw/ld rd, imm6·4/8(sp)` |
| 8, 9 | C.SWSP, C.SDSP | imm6 · rs2 | `sw/sd rs2, imm6·4/8(sp)` |
| 10 | C.LW0 / C.LD0 | s · rs1 · rd | `lw/ld rd, 0(rs1)` |
| 12 | C.ADD / C.SUB | s · rs1 · rd | `add/sub rd, rs1, rd` |
| 13 | C.SLLI, C.SRLI, C.SRAI | rda · f(00/01/11) · shamt6 | `slli/srli/srai rda, rda, shamt` |
| 13 | C.SLLIW | rda · 10 · 0 · shamt5 | `slliw rda, rda, shamt` |
| 16, 17 | C.BEQ, C.BNE | rs2b · rs1a · imm5 | `beq/bne rs1a, rs2b, imm5` |
| 20, 21, 22, 24 | C.LW, C.LD, C.FLW, C.FLD | rda · rs1a · imm5 | `l* rda, imm5·4/8(rs1a)` |
| 25, 26, 29, 30 | C.SW, C.SD, C.FSW, C.FSD | rs2b · rs1a · imm5 | `s* rs2b, imm5·4/8(rs1a)` |
| 28 | C.ADD3/SUB3/OR3/AND3 | rda · rs1a · f2 · rs2a | `add/sub/or/and rda, rs1a, rs2a` |

Field positions:
- `imm6`/`rd`: 15:10 and 9:5.
- `s`/`rs1`/`rd`: 15, 14:10 and 9:5.
- `rda` (or `rs2b`), `rs1a`, `imm5`: 15:13, 12:10 and 9:5.
- The three-register group puts `f2` in 9:8 and `rs2a` in 7:5.

Points to know before changing or trusting the expander:

- **Opcode numbers.** Opcodes 1, 2, 16, 17 and 28 are fixed by known
  example code. The other seventeen are this design's own assignment.
  Opcodes 14 and 18 are left unused.
- **Immediates.** `imm6` of LI/ADDI/ADDIW, the branch `imm5` and the jump
  target are two's complement. Branch and jump offsets count halfwords.
  Scaled load/store offsets are taken as unsigned, a choice of this design.
- **C.SUB** computes `rd = rs1 - rd`, operand order kept from the mapping
  definition.
- **C.JR and C.JALR** use a 5-bit `rs1`, so `c.jr ra` (0x0401) can be
  encoded. Their mapping definition names the 3-bit `rs1a`, but that cannot
  reach `ra`.
- **Unused encodings** raise `illegal_o` and produce an all-zero word. These
  are the free opcodes and SHIFT with `f = 10` and bit 10 set.

Example: the compressed string-length loop
`1062 f4b0 0461 ebb1 4d9c 0401` expands to `addi v1,a0,0`,
`beq a1,x0,+10B`, `addi v1,v1,1`, `bne v0,x0,-6B`, `sub v0,v1,a0`,
`jalr x0,ra`. The testbenches check exactly these words.

## Fetching misaligned code (`rvc_fetch_align`)

This is the least obvious part of the design.

**Buffer.** The unit fetches aligned 32-bit words from the cache and appends
their halfwords to a circular buffer of `BUF_HW` (6) halfwords. Each
instruction has a PC and a length, and the length comes from the head
halfword alone. The head instruction is handed out once all of it is
buffered. A 32-bit instruction at an odd halfword is assembled from two
fetches, which may come from different cache lines, with a miss in between.

**Fetch switch-off.** A new word is requested only while the buffer has room
for it, counting any word still in flight. Code rich in 16-bit instructions
fills the buffer faster than it drains, so the fetch port then idles. This
saves cache accesses, the energy the compressed encoding is meant to save.
`fetch_idle_o` shows it.

**Throughput.** There is a single outstanding request. A new request can
issue in the same cycle the previous response arrives. With six halfwords,
aligned 32-bit code streams at one instruction per cycle from a one-cycle
cache.

**Redirects.** `redirect_valid_i` does three things:
- flushes the buffer;
- marks an in-flight fetch to be discarded when it returns;
- restarts at the word holding the target.

A target in the upper half of a word drops that word's lower halfword.
Reset behaves as a redirect to `RESET_PC`.

**Long opcodes.** An instruction with the reserved 11111 pattern is handed
out as 32 bits with `islong_o` set. The top turns that into
`inst_illegal_o`.

**Timing (one-cycle cache).**
- The target word is requested on the redirect's clock edge.
- It is in the buffer one edge later.
- The first instruction can be taken on the edge after that.

## Instruction TLB (`itlb`)

The TLB holds 8 translations of 4 KB pages and is fully associative. It sits
in the fetch request path: the virtual page number of each word fetch is
compared with all entries in the same cycle. On a hit, the request goes on
to the cache at once with the physical page number, so a hit costs no
cycle. The cache is therefore physically indexed and tagged.

**Crossing a page.** A 32-bit instruction may start in the last halfword of
a page. The fetch unit then needs two words, one from each page, and the TLB
translates each separately. No special case exists beyond the one for
crossing a cache line.

**Miss sequence.** On a miss the request is held, and the TLB sends the
virtual page number to an external page-table walker. When the physical page
number returns, it is written into the next entry in FIFO order, and the held
request then hits. A miss therefore costs the walk time plus 3 cycles from
first presentation; with the 100-cycle walker used in the tests, that is 103.

**Refill behaviour.**
- Requests to pages already present pass while a refill is outstanding.
- If the fetch unit is redirected away, the refill still completes and fills
  its entry.
- There are no permission bits, address-space identifiers or flush input.
  Reset invalidates every entry.

## Instruction cache (`icache`)

A blocking cache with 32-byte lines, word-wide requests, and a one-cycle hit
(response in the cycle after acceptance). Back-to-back hits stream one word
per cycle.

**Miss sequence:**
1. lookup;
2. line request to memory;
3. the memory's refill, eight words, word 0 first;
4. response.

A miss therefore takes the memory latency plus 3 cycles from acceptance.
With the 50-cycle memory used in the tests, that is 53 cycles.

**Parameters and organisation.**
- `CACHE_BYTES` is any power of two (default 16384).
- `WAYS` is 1 or 2 (default 1). The two-way version uses LRU replacement.
- Reset invalidates every line.
- Tags, data and valid bits are per-way one-dimensional arrays, so synthesis
  maps them to memories.

The sizes the design was meant to be studied at run from 256 B to 32 KB,
direct-mapped and two-way. The default of 16 KB direct-mapped is the point
where compressed code runs about as fast as uncompressed code with twice the
cache.

## Top level (`rvc_frontend`)

**Parameters:** `ADDR_W` 32, `CACHE_BYTES` 16384, `LINE_BYTES` 32, `WAYS` 1,
`BUF_HW` 6, `RESET_PC` 0, `TLB_ENTRIES` 8, `PAGE_BYTES` 4096.

**Ports:**
- `inst_*` — stream to the core. `inst_ready_i` may be held low to stall.
- `redirect_*` — redirects from the core.
- `mem_*` — line refills: a valid/ready request, then `LINE_BYTES/4` data
  beats with no backpressure.
- `ptw_*` — TLB refills: a valid/ready request carrying the virtual page
  number, then one response with the physical page number, with no
  backpressure.
- `stat_hit_o`, `stat_miss_o`, `stat_tlb_miss_o`, `fetch_idle_o` — event
  pulses for counters.

**Timing.** After reset, with a 100-cycle walker and a 50-cycle memory, the
first instruction is available at edge 157:
- 102 edges for the TLB miss;
- 2 edges to issue the fetch;
- 53 for the cache miss.

After that, TLB and cache hits deliver one instruction per cycle.

## Verification

Every testbench is self-checking, has a watchdog and ends with a
`TB_RESULT checks=N failures=M` line.

- **`tb_rvc_length_decoder`** tries all 32 values of bits 4:0.
- **`tb_rvc_expander`** uses three kinds of input:
  - the string-length example words;
  - one hand-encoded case per instruction form;
  - 20 000 random halfwords and 2 000 random 32-bit words, compared with a
    reference expander written independently inside the testbench.
- **`tb_icache`** runs four caches: 256 B direct-mapped, 256 B two-way,
  16 KB direct-mapped and 32 KB two-way. Each gets:
  - sequential, random and conflicting accesses;
  - a reference tag model, so every response's data, hit/miss and latency
    are checked;
  - a streaming check of 8 hits in 9 cycles;
  - a check that memory refills equal misses.
- **`tb_itlb`** drives requests to 12 pages, more than the TLB holds, and
  compares each with a reference model of the entries. For every request it
  checks:
  - the physical address;
  - that a hit is forwarded in the cycle it is presented;
  - that a miss is forwarded walk time plus 3 cycles later;
  - one walk per miss.

  It also checks that a hit passes during a refill, and that a refill whose
  request was withdrawn still fills its entry.
- **`tb_rvc_fetch_align`** runs a random mixed-length program with:
  - a cache model that has random delays and refuses requests;
  - a randomly stalling consumer;
  - random redirects, including ones to odd halfwords.

  A final phase checks the one-per-cycle throughput.
- **`tb_rvc_frontend`** runs the top at its default parameters. Its page
  map is not the identity, so a wrong translation would fetch wrong words.
  It:
  1. checks the reset-to-first-instruction latency;
  2. executes the compressed string-length routine with a small instruction
     interpreter acting as the core, on four strings, and checks the
     returned lengths;
  3. runs a 3000-instruction random program mixing RVC, 32-bit and illegal
     encodings, with random redirects, stalls and far jumps to cold lines.

  Each handed-out instruction is compared with the expected expansion and
  PC. The test counts, and requires at least once:
  - TLB misses;
  - cache hits and misses;
  - 16- and 32-bit instructions;
  - 32-bit instructions split across words, cache lines and pages (the
    program is laid out so that one straddles each page boundary);
  - redirects to odd halfwords;
  - fetches discarded by a redirect;
  - fetch switch-off;
  - consumer stalls;
  - illegal instructions.
- **`tb_rvc_fetch_traffic`** measures what compression buys. It runs four
  front ends side by side on the same synthetic 4400-instruction loop, in
  which half of the instructions have a 16-bit form:
  - lane 0 holds the compressed program, 13.1 KB, on the default 16 KB
    direct-mapped cache, which it fits;
  - lanes 1 to 3 hold the uncompressed program, 17.6 KB, on a 16 KB
    direct-mapped cache (the base), a 32 KB direct-mapped cache and a
    16 KB two-way cache.

  Every instruction of every lane is checked. Over four passes, the
  compressed lane against the base:
  - fetches 74 % of the words (the test requires at most 80 %);
  - takes 52 % of the misses;
  - needs 67 % of the cycles.

  Speedups over the base are 1.48 for compressed code, 1.26 for doubling
  the cache and 0.91 for the two-way cache (its LRU replacement thrashes on
  a loop just larger than the cache). The test requires compressed code to
  beat the base and the two-way cache and to reach at least 99 % of the
  speed of the doubled cache. One synthetic loop is not a benchmark suite:
  these numbers show the mechanism, not the size of the effect on real
  programs.

Run any of them with plain Verilator (5.x), for example:

```
verilator --binary --timing -Wno-fatal -Irtl --top-module tb_rvc_frontend \
    rtl/rvc_pkg.sv rtl/rvc_length_decoder.sv rtl/rvc_expander.sv \
    rtl/rvc_fetch_align.sv rtl/itlb.sv rtl/icache.sv rtl/rvc_frontend.sv \
    tb/mem_model.sv tb/ptw_model.sv tb/tb_rvc_frontend.sv
./obj_dir/Vtb_rvc_frontend
```

For `tb_icache`, use `rtl/rvc_pkg.sv`, `rtl/icache.sv`,
`tb/mem_model.sv`, `tb/icache_bench.sv` and `tb/tb_icache.sv`. For
`tb_itlb`, use `rtl/itlb.sv`, `tb/ptw_model.sv` and `tb/tb_itlb.sv`. Add
`--assert` to have the design's handshake assertions checked. Each run takes
seconds.

## Limits and departures

- The 17 RVC opcode numbers marked above, several base-ISA opcodes, and the
  signedness of scaled load/store offsets are this design's choices. An
  assembler written for another RVC encoding will not match.
- The TLB has only what translation needs. Its replacement order, its
  refill port and its lack of protection bits are this design's choices, and
  the page-table walker is outside it.
- The cache blocks on a miss, with no critical-word-first and no
  prefetching. That matches the simple in-order machine the design targets.
- Only the first 32 bits of a longer-than-32-bit instruction are handed out,
  flagged illegal.
