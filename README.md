# Reconfigurable Aho-Corasick string matching accelerator

Many bioinformatics jobs have to find where a set of short strings occurs
inside a large text. Examples are peptides from a mass spectrometer matched
against a protein database, or oligonucleotides matched against a genome. The
set of patterns changes often, so rebuilding an FPGA bitstream for every new
set is far too slow.

This design keeps the hardware fixed and makes the patterns data. Software
builds an Aho-Corasick automaton for the pattern set. It writes the automaton
as a next-state table into block RAM inside each matching core. The hardware
then scans the database at one symbol per clock, and writes every match
(which pattern, in which protein, at which position) to a result memory that
the processor reads. To load a new pattern set, software writes a new table.
At a 100 MHz clock, one 8-bit symbol per cycle is 800 Mbit/s.

The RTL is SystemVerilog-2017 and synthesizable. It is written for an FPGA
with block RAM, next to an embedded processor (for example a Zynq-class SoC).
The processor, its software and the vendor bus fabric are not part of this
RTL. The testbenches contain a software model of the table builder.

## How one table row drives the search

The automaton is stored one row per state. For an alphabet of `ALPHA` symbols,
a core sized for `NPAT` patterns and `NSTATES` states, a row is
`ALPHA * log2(NSTATES) + NPAT` bits wide, packed MSB first:

```
{ next[A], next[B], ..., next[Z], match[NPAT-1:0] }
```

* `next[k]` (a *state-cell*) is the state to go to when symbol `k` arrives in
  this state. The table is a complete transition table: failure transitions
  are already folded in by software, so every lookup takes exactly one step.
* `match` (the *output-cell*) has bit `p` set if pattern `p` ends in this
  state. This includes patterns that end as a suffix of a longer one.

Searching one symbol is one table lookup. The row of the current state is at
the RAM output. An `ALPHA`-to-1 multiplexer picks `next[symbol]`, and that
value becomes the new state. Block RAM has a registered read port, so the RAM
is addressed with the multiplexer output, which is the state about to be
entered, rather than with the state register. The row of the current state is
therefore always ready at the start of the cycle, and the loop runs at one
symbol per clock. The match vector of the new state appears one cycle after
the symbol is consumed (`search_engine.sv`).

Symbol codes at or above `ALPHA` are outside the alphabet. They send the
automaton back to the root state. Code 31 (all ones) also marks the boundary
between two proteins (see *Symbols and proteins*).

Example: the patterns `AC`, `DAC`, `ABD` and `ACED` over the 26-letter
alphabet give a 10-state automaton. Reserving 16 states (4-bit state-cells)
gives rows of 26·4 + 4 = 108 bits. The `search_engine` testbench checks these
numbers.

### Table size

For `S` patterns of at most `L` symbols the automaton has at most `S·L`
states. The default core is sized for 32 patterns of up to 30 symbols:

| quantity | value |
|---|---|
| states (rows) | 32 · 30 = 960 |
| state-cell | ⌈log2 960⌉ = 10 bits |
| row | 26 · 10 + 32 = 292 bits |
| local memory per core | 960 · 292 = 280,320 bits (34.2 KiB) |
| 32-bit bus words per row | 10 |

Patterns longer than 30 symbols still fit if the pattern set needs no more
than 960 states in total. The trie has at most (total pattern symbols + 1)
states.

Splitting a large pattern set over several small cores uses less memory than
one big core. The row width grows with the number of patterns and with the
log of the number of states. This is why the design uses many 32-pattern
cores.

## Cores, sections and the fabric

```
 processor bus ─► master_ctrl ──► table rows, start, sizes, modes
                      │
     database segment 0 ──► dragc 0 ──► section 0: ac_core 0,0 .. 0,N-1 ─┐
     database segment 1 ──► dragc 1 ──► section 1: ac_core 1,0 .. 1,N-1 ─┤ round-robin
            ...                                                          ┘    merge
                                                                                │
                       gm_addr_counter ──► global_memory ◄───────────────────────┘
                                                 │
                                      master_ctrl (result read-back)
```

* **AC core** (`ac_core`): one `search_engine` plus a `match_encoder` and the
  logic that tags each match with its location and protein number.
* **AC core section** (`ac_core_section`): `NCORES` cores. Each core has its
  own table and all of them read the same symbol stream. A section searches up
  to `NCORES·NPAT` patterns in one pass. Cores can be switched off one at a
  time (`CORE_EN`).
* **Read address generator** (`dragc`): one per section. It walks its
  database segment from address 0 to `DB_SIZE-1`. It hands a symbol to the
  section only in a cycle when every enabled core of the section is ready. It
  also counts protein separators.
* **Multi-core fabric** (`ac_fabric`): `NSEC` sections. It routes the
  segments to the sections and merges their results.

The default system has 2 sections of 4 cores (8 automata, 256 patterns per
pass). With `NSEC = NCORES = 1` the same top is a single-core system.

### The four configurations

| # | set-up | registers | effect |
|---|---|---|---|
| 1 | one section on its segment | `SECTION_EN = 1` | up to `NCORES·NPAT` patterns |
| 2 | all sections on segment 0, different tables | `CTRL.shared = 1` | up to `NSEC·NCORES·NPAT` patterns on one database |
| 3 | the same tables in every section, one segment each | `SECTION_EN = all` | the database is split into `NSEC` parts, so the search is about `NSEC` times faster |
| 4 | different tables, one segment each | `SECTION_EN = all` | different pattern sets against different databases at once |

In hardware, configurations 3 and 4 are the same. They differ only in which
tables software loads. In shared mode (configuration 2) all read address
generators start together, use segment 0's size and share one ready signal.
The sections therefore move in lock step and all read the same symbol.

## Stalls and the result path

A core normally takes one symbol per clock. It holds the search in two cases:

1. **Several patterns end on the same symbol.** For example, `DAC` and `AC`
   both end at the `C` of `DAC`. The match encoder sends one pattern ID per
   cycle, lowest first. The section stops until the last ID has left.
2. **Several cores have results in the same cycle.** The global memory takes
   one result per cycle, and round-robin arbiters merge the cores of a section
   and then the sections. A core that is not granted keeps its result and
   holds its section.

`ready` is combinational from the current pending bits and the arbiter grant.
The encoder's `hold` goes high in the same cycle in which bits would remain,
so no match vector is ever lost. With at most one match per symbol and no
contention, the search does not stall.

Each result is one word of up to 64 bits, read as two 32-bit halves:

```
{ section, core, pattern ID, protein number (16 b), location (log2 DB_DEPTH b) }
```

With the defaults that is 1 + 2 + 5 + 16 + 16 = 40 bits. The protein number
counts the separators before the match in its segment. The location is the
offset inside that protein of the symbol that completes the pattern: the first
residue after a separator is at offset 0. The match therefore starts at offset
`location - length + 1` of that protein. `dragc` keeps both counters.

The global memory holds `GM_DEPTH` (4096) results. The write address counter
restarts at every search. When the memory is full, further results are
dropped and the `STATUS.overflow` bit is set. The search itself runs to the
end.

## Symbols and proteins

Symbols are 5 bits wide. Codes 0-25 stand for the letters A-Z, which covers
the 20 amino acids and the IUPAC ambiguity letters. Code 31 separates two
proteins. The protein counter starts at 0 and goes up after each separator.
The location counter goes back to 0 after each separator.
Software converts FASTA to this code: it drops header lines and writes one
separator per record.

## Programming sequence

The bus is word-addressed, with 24-bit addresses and 32-bit data. Read data
arrive one cycle after `bus_re`. Table and database writes are ignored while a
search runs.

| address | name | access |
|---|---|---|
| `0x000000` | CTRL | W bit0 = start; RW bit1 = shared (configuration 2) |
| `0x000001` | STATUS | R bit0 = done, bit1 = busy, bit2 = overflow |
| `0x000002` | SECTION_EN | RW, one bit per section |
| `0x000003` | CORE_EN | RW, bit `s·NCORES + c` |
| `0x000004` | RESULTS | R, number of results stored |
| `0x000005` | CYCLES | R, clock cycles of the last search |
| `0x000006` | TBL_COMMIT | W `{core s·NCORES+c [31:16], row [15:0]}` |
| `0x000008 + s` | DB_SIZE[s] | RW, symbols in segment `s` |
| `0x000010 + w` | TBL_WORD[w] | W, bits `32w+31 : 32w` of the staged row |
| `0x400000 \| seg<<log2(DB_DEPTH) \| i` | database | W, symbol `i` of segment `seg` |
| `0x800000 \| r<<1 \| h` | results | R, half `h` (0 = low) of result `r` |

To search:

1. For every core and every state: write the row's words to TBL_WORD, then
   write TBL_COMMIT with the core and row number. Rows past the last state can
   be left as they are.
2. Write the database symbols and DB_SIZE.
3. Write SECTION_EN, CORE_EN and CTRL.shared, then write CTRL with bit 0 set.
4. Poll STATUS.done, or wait for the `search_done` output. Then read RESULTS
   and the result words.

To change patterns, repeat step 1 for the cores concerned. The database stays
loaded.

## Timing summary

* Search: one symbol per clock when there are no stalls. `start` at cycle `t`
  clears the automata, and the first symbol is consumed at `t+2`. A segment of
  `K` symbols with no stalls is consumed by `t+K+1`. `done` follows once the
  last results have been written (K + about 6 cycles in all; the full-size
  test measures 65,577 cycles for 65,536 symbols).
* Match latency: a match completed by the symbol consumed in cycle `t` is
  offered to the merge in cycle `t+1`.
* Table load: one row per TBL_COMMIT write, after `⌈row/32⌉` staging writes.
  A full 960-row table is 960 × 11 = 10,560 bus writes, about 0.1 ms at
  100 MHz with single-cycle writes. In a real system, reconfiguration time is
  set by the software that builds the automaton and by the bus, not by this
  hardware.

## Parameters

`ac_soc_top` parameters, with defaults in `ac_pkg`:

| parameter | default | meaning |
|---|---|---|
| `NSEC` | 2 | sections (M) |
| `NCORES` | 4 | cores per section (N) |
| `ALPHA` | 26 | symbols in the automaton's alphabet |
| `NPAT` | 32 | patterns per core (match vector width) |
| `NSTATES` | 960 | table rows per core (32 patterns × 30 symbols) |
| `CW` | 5 | bits per symbol |
| `DB_DEPTH` | 65536 | symbols per database segment |
| `GM_DEPTH` | 4096 | results in the global memory |
| `PW` | 16 | protein counter width |

The result word must fit in 64 bits. The top stops elaboration with an error
if it does not. `CORE_EN` is 32 bits wide, so `NSEC·NCORES ≤ 32`. At most 8
sections fit the DB_SIZE register block.

## Where this RTL departs from the published architecture, and why

* **Processor side.** The processor, its DDR memory, reset block, AXI
  interconnect and AXI BRAM controller are vendor parts. They are replaced by
  a plain register bus (`master_ctrl`). Adding an AXI4-Lite slave in front of
  that bus is left to the integrator.
* **Sizes chosen here.** The database segment depth (64 Ki symbols), the
  global memory depth (4096 results) and the protein counter width are this
  design's choices. Databases larger than a segment are searched in batches,
  as in the original evaluation: load a part, search, read the results,
  repeat.
* **Other choices made here.** The original architecture does not say how
  several simultaneous matches are serialised, how cores share the result
  memory, what happens when that memory is full, or how the configurations
  are selected. The stall scheme, the round-robin merge, the overflow flag and
  the shared-segment mode described above are this design's answers.
* **Encoding choices.** The separator code and the choice to send
  out-of-alphabet symbols to the root state are this design's.
* **Power.** "Powering on" a core is an enable. There is no power or clock
  gating.
* **Location.** The location is counted from the start of the protein, and
  the offset counter is `log2 DB_DEPTH` bits wide. To find the segment address,
  software adds the protein's start address, which it knows because it wrote
  the database.

## Capacity against typical workloads

One core holds 32 patterns in 960 states. Sets of 32 tryptic peptides (a few
hundred residues in total) fit easily. The full fabric takes 256 patterns per
pass. Sets of 256 patterns of length 16 fit (32 × 16 = 512 states per core).
Sets of patterns of length 32 or more generally do not fit in one load, unless
they share prefixes. Such sets need more passes with fewer patterns per core,
or a larger `NSTATES`. Protein databases of tens of megabytes are far larger
than the 2 × 64 Ki symbols on chip and are searched in batches.

## Verification

Each module has a self-checking testbench in `tb/`. All of them print
`TB_RESULT checks=N failures=M`. The reference results never come from the RTL
itself. `tb/ac_tb_pkg.sv` builds the Aho-Corasick tables the way the processor
software would (trie, breadth-first failure links, then a full transition
table). Expected matches come from a naive comparison at every text position.

Two handshake rules are also written as assertions in the RTL, and they are
checked whenever the simulator runs with assertions on (`--assert`):
`match_encoder` never receives a new match vector while IDs are pending, and
`rr_arbiter` grants at most one input, and only one that requests.

| testbench | what it covers |
|---|---|
| `tb_search_engine` | example automaton (10 states, 108-bit rows), random pattern sets, match vector after every step, one symbol per clock |
| `tb_match_encoder` | ID order, tags, `hold` exactly when bits remain, no hold for single matches |
| `tb_ac_core` | result words in order, random bubbles and result stalls, exactly 500 cycles for 500 symbols, disabled core |
| `tb_dragc` | address sequence, protein count, stalls, done at K+2 |
| `tb_database_memory`, `tb_global_memory`, `tb_gm_addr_counter` | memory behaviour, update-mode gating, full and overflow |
| `tb_ac_core_section` | 4 cores with different tables, multiset of results, stalls, disabled core |
| `tb_ac_fabric` | configurations 1-4, lock step in shared mode, two half segments against one pass |
| `tb_master_ctrl` | register map, staging and commit decode, blocking during a search, result read-back |
| `tb_ac_soc_top` | whole system at reduced sizes over the bus: all four configurations, stalls, multi-matches, overflow, disabled core, reconfiguration; fails if any of these never happened |
| `tb_single_core` | 1 × 1 system, 32-pattern table reloaded three times |
| `tb_ac_soc_full` | default sizes: 8 tables of 32 patterns of up to 30 residues, two full 64 Ki-symbol segments, all results checked |
| `tb_workload_peptides` | default sizes: 256 patterns of length 4, 8 and 16 in one pass over a 32 Ki-symbol database (configuration 2); shows that 32 random patterns of length 32 do not fit a 960-state table |
| `tb_workload_reuse` | single core: a 256-pattern set searched as 8 batches of 32, reloading the table each time; checks that search time grows linearly with the number of batches |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/ac_pkg.sv tb/ac_tb_pkg.sv tb/tb_ac_soc_full.sv --top-module tb_ac_soc_full
./obj_dir/Vtb_ac_soc_full
```

The full-size run takes a few seconds. To lint a module:

```
verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/ac_pkg.sv rtl/ac_soc_top.sv
```

The testbenches need a simulator with classes, queues and associative arrays.
They use `$urandom` only.

## Files

| file | content |
|---|---|
| `rtl/ac_pkg.sv` | defaults, symbol coding, row layout helpers |
| `rtl/search_engine.sv` | table memory, state-cell multiplexer, state register |
| `rtl/match_encoder.sv` | match vector to pattern IDs, stall |
| `rtl/ac_core.sv` | one AC core |
| `rtl/dragc.sv` | search control and database read addresses |
| `rtl/database_memory.sv` | one database segment |
| `rtl/ac_core_section.sv` | N cores on one symbol stream |
| `rtl/ac_fabric.sv` | M sections, configurations, merge |
| `rtl/rr_arbiter.sv` | round-robin merge of result streams |
| `rtl/gm_addr_counter.sv` | result write address, full and overflow |
| `rtl/global_memory.sv` | result memory |
| `rtl/master_ctrl.sv` | register bus, table staging, sequencing |
| `rtl/ac_soc_top.sv` | the complete accelerator |
| `tb/ac_tb_pkg.sv` | table builder and reference matcher |
| `tb/tb_*.sv` | testbenches |
