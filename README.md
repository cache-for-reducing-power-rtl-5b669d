# Program-memory cache for a hearing-aid DSP

A hearing-aid DSP fetches one 32-bit instruction word from its program
memory on almost every clock cycle. Most of those fetches repeat: the
program spends most of its time in short loops, and an idle processor
keeps fetching the same `nop`. Every read of the program RAM or ROM costs
energy. This design saves some of it by serving repeated fetches from a
tiny cache built from flip-flops (4 to 16 words), placed between the
DSP's address generation unit and the program memory.

Two rules shape everything else:

* **No stall.** The DSP may never wait for memory. The cache has to fit
  inside the two pipeline states an instruction fetch already takes, and
  a miss costs no more cycles than a hit. It only changes where the word
  comes from.
* **Tiny and flip-flop based.** A few words is far below any SRAM macro,
  and at that size sense amplifiers would take most of the power anyway.
  The storage is therefore flip-flops with a multiplexer read side and no
  tri-state bus.

The RTL holds four cache organisations, all behind the same interface:

| slot | module | organisation |
|---|---|---|
| 0 | `cache_dm` LINES=4 | direct mapped, 4 one-word lines |
| 1 | `cache_dm` LINES=8 | direct mapped, 8 one-word lines |
| 2 | `cache_2w` LINES=4 | 2-way set associative, 4 lines per way, semi-random round-robin |
| 3 | `loop_cache` SIZE=16 | tag-less loop cache for Do loops |

It also has the ROM-side line latch that the program ROM uses to save
energy (`rom_line_latch`). The top, `hi_cache_top`, runs all four side by
side on one access stream, so their hit rates and memory traffic can be
compared on the same program.

## Where a fetch spends its time

A program-memory access passes through three stages. Every register in
the cache is clocked on the rising edge. The memory itself is clocked on
the falling edge.

```
 rising        falling       rising        falling       rising
   |    PC state    |            |    Fe state   |            |   De
   | AGU makes addr |  tag lookup | data from cache |          | fetch register
   |                |  (compare)  | or from memory  |          | data_de_o
   ^ pc_i valid                   ^ mem_o valid      ^ memory   ^ data_de_o valid
                                                       clocks
```

* **PC state.** The address generation unit drives `pc_i` early in the
  cycle. It is a `mem_access_t` struct with `en`, `we`, a 16-bit `addr`
  and 32-bit `data`. In the rest of the cycle the cache reads its tag
  array at the index bits and compares the result with the tag bits.
  This gives `hit_pc`. If the access does not hit, the new tag is written
  on the rising edge that ends the PC state. This happens whether or not
  the old line survives.
* **Fe state.** The access and the hit decision are registered. On a
  hit, the word is read from the data array and the memory is not
  enabled. On a miss, `mem_o` carries the request to the memory. The
  memory latches it on the falling edge and returns `mem_rdata_i` before
  the next rising edge. On that edge the word is written into the data
  array. This is the fill.
* **De.** The fetch register `data_de_o` takes the word at the end of
  Fe. Read data therefore appears **two rising edges after the address**,
  the same as without a cache. `de_valid_o` marks the cycles where
  `data_de_o` was loaded by a read.

The tag is written one cycle before its data. The two cannot get out of
step, for this reason: the line can only be read by a hit in the PC state
of the next access, and that read takes place in its Fe state, after the
fill edge. A hit on a line that is still being filled therefore reads the
new word. The testbenches check back-to-back accesses to the same line
for this case.

`hit_o` is the Fe-state hit. It exists only for counting hits.

## Direct-mapped cache (`cache_dm`)

Each line holds one word. With `LINES` lines, the index is
`addr[log2(LINES)-1:0]` and the tag is the remaining upper bits: 14 bits
for 4 lines, 13 bits for 8.

The sub-blocks are:

* `tag_array`: `LINES` x tag flip-flops plus one valid bit per line,
  read combinationally.
* `tag_compare`: an XOR of the new and stored tags, reduced to a match
  bit.
* `data_array`: `LINES` x 32 flip-flops with separate read and write
  indices and a multiplexer read.

The data array's read index and write index sit in separate registers.
`index_hit_fe` is loaded only by hits and `index_miss_fe` only by misses.
The read multiplexer therefore changes select only when a hit needs it,
which saves switching power.

Writes are **write-through with update**. A write always goes to memory.
It never counts as a hit. It also writes its tag and data into the cache,
so a later read of that address hits with the new value. The valid bits
only matter between reset and the first fill of each line, since there is
no invalidate.

## Two-way cache (`cache_2w`)

This has two tag arrays, two comparators and two data arrays, one of each
per way. A read hits in the way whose tag matches. An assertion checks
that both ways never hit at once.

In the Fe state, each way has its own read-index register. A way's
register is loaded only when that way hits. `hit1_fe` then selects data
array 1 or data array 0 for the output. The multiplexer of the way that
is not used keeps still.

On a miss, the way to overwrite comes from `rrr_replace`, the
**semi-random round-robin** bit. It is a single flip-flop that is
inverted whenever an access hits (in either way) and is used as the
victim way on a miss. There is one exception: a write whose tag is
already cached updates the way that holds it, so no address is ever in
both ways.

## Loop cache (`loop_cache`)

Most of the program's fetches fall inside **Do loops**. A Do instruction
is recognised by `(word & 32'hC03E0000) == DO_MATCH`. Its low 16 bits
hold the loop's last address, and the loop starts at the word after the
Do. Because the start address is known, the loop cache needs no tags. Word
`addr - start` of the loop goes into slot `addr - start` of a `SIZE`-word
buffer.

It has three states:

1. **IDLE.** Each fetched word is checked for a Do. A loop that fits
   (`last - start + 1 <= SIZE`) starts a load. Larger loops are ignored.
2. **LOAD.** Fetches inside `[start, last]` come from memory and are
   stored in the buffer. When the word at `last` has been fetched, the
   loop is held and the state becomes ON.
3. **ON.** A read inside the range hits and does not enable the memory.
   A per-word loaded bit covers a first pass that jumped over part of the
   body: such a word misses once and is stored. A read outside the range
   is a change of control flow, such as an interrupt or a call, and goes
   to memory.

How the cache learns that the program has left the loop is set by
`RESET_MODE`:

* **0, counter (the default).** Fetches outside the loop are counted,
  and a fetch inside clears the count. After `COUNT_LIMIT` = 32 of them
  the cache returns to IDLE.
* **1, Do instruction.** A fetched Do of a different loop that fits
  discards the current loop and starts loading the new one.

The range check in the PC state uses registered bounds. A state change
takes effect on the edge that ends the Fe state of the fetch that caused
it. If a load starts or a loop is dropped on the same edge as a hit, that
hit is cancelled, so stale data is never returned.

## Behind the cache: memory map and ROM line latch

The 64k-word program space is split in half:

* `0x0000`-`0x7FFF` is RAM. The peripheral registers in the low
  addresses are treated as RAM.
* `0x8000`-`0xFFFF` is ROM.

`prog_mem_front` takes a cache's Fe-state request and routes it by this
map:

* RAM requests leave on `ram_o[slot]` for the RAM macro.
* ROM requests go to a `rom_line_latch`.
* Writes to the ROM half are dropped.

The latch keeps the last 8-word ROM line and its line address. A read
within that line is served from the latch. Any other read enables the ROM
array (`rom_en_o`, `rom_line_addr_o`), takes the whole line from
`rom_line_i`, and keeps it. Reading the latch costs roughly a tenth of
reading a new line.

The memory is clocked on the falling edge, so the latch runs on the
inverted clock. It still returns its word before the rising edge that
ends Fe.

## Top level (`hi_cache_top`)

`pc_i` is broadcast to the four slots. Each slot has its own
`prog_mem_front` and brings its own memory ports out as unpacked arrays
indexed by slot:

* `ram_o`, `ram_rdata_i`
* `rom_en_o`, `rom_line_addr_o`, `rom_line_i`

Each slot also has its own fetch outputs:

* `data_de_o`, `de_valid_o`
* `hit_o`, `rom_latch_hit_o`

The loop cache's state is visible on `lc_loop_on_o` and
`lc_loop_reset_o`. The RAM macro, the ROM array and the DSP core are not
part of the RTL. Their signals are the top's ports.

The shared types and constants live in `cache_pkg`. These are `ADDR_W`=16,
`DATA_W`=32, `mem_access_t`, `ROM_LINE_WORDS`=8 and `is_rom()`. The reset
`rst_n` is asynchronous and active low throughout.

## Size

Below are the flip-flop counts of the three hardware caches when this
RTL is synthesised, and the register counts reported for the original
standard-cell implementation:

| cache | flip-flops here | registers, original |
|---|---|---|
| 4 lines, direct mapped | 276 | 274 |
| 8 lines, direct mapped | 458 | 456 |
| 4 lines x 2 ways | 469 | 470 |

The bits are split like this:

* data: 32 bits per line;
* tag and valid: 15 bits per line for 4 lines, 14 for 8;
* about 90 pipeline bits: the Fe-state copy of the access (50 bits),
  the fetch register with its valid bit (33), the hit flag and the index
  registers.

The loop cache has 652 flip-flops at 16 words. The ROM line latch has
303: 256 data bits plus the line address and a valid bit.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `cache_dm` | `LINES` | 4 | lines (a power of two; 1 gives a single line with a 16-bit tag) |
| `cache_2w` | `LINES` | 4 | lines per way (a power of two, 1 allowed) |
| `loop_cache` | `SIZE` | 16 | words in the loop buffer |
| `loop_cache` | `RESET_MODE` | 0 | 0 counter, 1 new Do |
| `loop_cache` | `COUNT_LIMIT` | 32 | fetches outside the loop before reset (mode 0) |
| `loop_cache` | `DO_MASK` / `DO_MATCH` | `C03E0000` / `40000000` | Do opcode recognition |
| `rom_line_latch`, `prog_mem_front` | `LINE_WORDS` | 8 | ROM line length |

## Simulating

Every testbench in `tb/` checks itself and ends by printing
`TB_RESULT checks=<n> failures=<n>`. With Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb \
  rtl/cache_pkg.sv tb/tb_mem_pkg.sv tb/tb_stim_pkg.sv \
  tb/hi_cache_top_tb.sv --top-module hi_cache_top_tb -Mdir obj_top
./obj_top/Vhi_cache_top_tb
```

Replace the testbench name to run another one. `-y` finds the other
modules by file name. The two testbench packages must come before the
testbench. All testbenches finish in seconds.

| testbench | what it checks |
|---|---|
| `tag_compare_tb`, `tag_array_tb`, `data_array_tb`, `rrr_replace_tb` | leaf blocks against direct models |
| `cache_dm_tb` | 4-, 8- and 1-line caches on random loop/jump/write traffic. Every word, every hit decision against a reference cache model, and the two-edge latency |
| `cache_2w_tb` | the same for the 2-way cache with 4 and 1 lines per way, including the replacement bit |
| `rom_line_latch_tb`, `prog_mem_front_tb` | line reuse, ROM enables, RAM/ROM routing |
| `loop_cache_tb` | both reset modes: loops that fit and that do not, interrupts, jumps inside loops |
| `trace_excerpt_tb` | two short recorded access sequences: a one-instruction interrupt while idling on a `nop`, and a miss followed by a hit. The expected hits are worked out by hand |
| `hi_cache_top_tb` | the whole top at its default parameters, 40000 accesses. It counts each mechanism (hits and misses per slot, write-through, ROM latch hits and line reads, RAM reads, loop load and reset, idle cycles) and fails if one never happens. It also checks, per slot, that memory reads + latch hits + ROM line reads = reads − hits |

Two more testbenches run a full-length generated trace of 715,816
accesses:

| testbench | what it checks |
|---|---|
| `trace_workload_tb` | the top at its defaults, on the generated trace. Every word and its latency in every slot. Per slot: accesses = hits + memory reads + memory writes. Per access: a hit in the 4-line cache is also a hit in the 8-line cache |
| `config_sweep_tb` | 22 configurations side by side on the same trace (see the next section), with the same data, accounting and inclusion checks |

The support files are:

* `tb_flat_mem`: a falling-edge memory model.
* `cache_scoreboard`: a golden-memory check of data, hit flag and latency.
* `tb_mem_pkg`: the program contents as a formula of the address.
* `tb_stim_pkg`: the traffic generator.
* `tb_trace_pkg`: the generator of the full-length trace.

Add `tb/tb_trace_pkg.sv` after `tb/tb_mem_pkg.sv` on the command line
for the last two testbenches.

## Hit rates on a generated trace

The configurations were chosen by comparing hit rates on a recorded
fetch trace of a hearing aid streaming audio. That trace is not
available. `tb_trace_pkg` generates one with the same published
statistics:

| statistic | recorded | generated |
|---|---|---|
| accesses | 715,816 | 715,816 |
| writes | 86 | 86 |
| Do executions | 7,008 | 6,732 |
| fetches inside loops | 66 % | 65 % |
| RAM accesses | 35 % | 33 % |
| unique addresses | 6,744 | 7,724 |

The generated trace also follows these:

* Do loop sizes are drawn from the recorded size histogram. Most loops
  are 2 or 3 words and almost all are 15 words or fewer.
* The DSP sometimes idles on a `nop` at 0x1510, broken by
  one-instruction interrupts.

`config_sweep_tb` prints these hit rates, in percent of all accesses:

| configuration | 1 | 2 | 4 | 8 | 16 | 32 | 64 |
|---|---|---|---|---|---|---|---|
| direct mapped, lines | 6 (2) | 41 (11) | 54 (21) | 63 (36) | 65 (45) | 65 (60) | |
| 2-way, lines per way | 7 (16) | 50 (26) | 56 (38) | 65 (47) | 65 (60) | 66 (67) | |
| loop cache, counter reset, words | | 25 (16) | 34 (20) | 38 (32) | 39 (37) | 39 (46) | 39 (56) |
| loop cache, Do reset, words | | 34 (14) | 49 (18) | 58 (31) | 61 (35) | 61 (47) | 61 (57) |

The number in brackets is the rate measured on the recorded trace.

From 2 lines up, the generated trace is kinder to small caches than the
real one. Its loops are clean, with no calls and no branches inside, and
all its non-loop code is short. Both show the same order of configurations
(larger is better, and 2-way beats direct mapped at the same lines per
way), but the absolute numbers should not be taken as predictions.

The loop caches saturate at 16 words here because no generated loop is
longer than 15 words. The counter-reset loop cache falls behind the
Do-reset one because of how the generated program behaves: the next Do
usually comes less than 32 fetches after a loop ends, while the old
loop is still held, and in counter mode it is then ignored.

## What follows the source design and what is added

These parts follow the source design:

* The PC/Fe/De split and the no-stall rule.
* One-word lines, write-through with update, and the valid bit cleared
  only by reset.
* Separate hit and miss index registers, and per-way read indices in the
  2-way cache.
* The single-bit semi-random round-robin replacement.
* The memory map and the 8-word ROM line latch.
* The Do-opcode mask, the loop range test, the counter limit of 32 and
  the two loop-cache reset modes.

The original work built only the three tagged caches as hardware. It
describes the loop cache and the ROM latch only by their behaviour.
Their RTL here is this design's own. So are these details:

* the `en` qualifier on `pc_i` and the `de_valid_o` output, for cycles
  without an access;
* the way chosen for a write to an already cached tag;
* the reset value 0 of the replacement bit;
* the Do opcode value `DO_MATCH`;
* the fit test `last - start + 1 <= SIZE`;
* keeping the loop when the same Do is fetched again;
* the per-word loaded bits;
* dropping writes to ROM;
* a line-valid flag in the ROM latch.

## How far to trust it

* Everything here is checked in simulation against independent
  reference models. It has not been checked against the real DSP or its
  instruction traces. All traffic is generated. The closest to a real
  program is the full-length trace described above, and its hit rates
  are mostly higher than the recorded ones.
* Only 1- and 2-way caches exist. The 4-, 8- and 16-way organisations,
  which were studied only in software, are not built.
* The loop cache does not keep part of a loop that is too large. Such
  loops are simply not cached.
* Data memories (X and Y) could take the same cache. Only the program
  memory is covered here.
* The lint warnings left are about assertion `disable iff` on the
  asynchronous reset and a few intentionally unused bits.
