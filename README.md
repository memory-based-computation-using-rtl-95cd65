# Memory-based computation for an integer execution cluster

A processor whose adder or multiplier is defective, or too hot, usually has to
be discarded or throttled. This design keeps it running instead. When a
functional unit is out of service, its additions and multiplications move to a
small memory-based unit. That unit looks up precomputed addition results in a
two-level cache of look-up tables. The core sees a slower unit, not a missing
one.

The RTL models the integer execution cluster of such a processor:

- 6 adders and 2 multipliers;
- a bypass controller that watches each unit's defect flag and temperature;
- the memory-based unit, with its adder, multiplier and cache hierarchy.

The out-of-order core, the operating system, the main memory and the
temperature sensors are not part of the RTL. They connect through ports of
the top module, `mbc_exec_top`.

## The idea: addition as a table lookup

A 32-bit addition is cut into four 8-bit slices. For one slice pair (X, Y), a
table entry holds the result for both possible carries into the slice:

```
entry(X, Y) = { c1, s1, c0, s0 }      {c0,s0} = X + Y      {c1,s1} = X + Y + 1
```

An entry is 18 bits (`mbc_pkg::lut_entry_t`). The addition then takes two
steps:

1. Look up the four slice entries.
2. Pass the carry through a carry-select chain (`carry_select`). The carry into
   slice i picks `s1`/`c1` or `s0`/`c0`, starting from the adder's carry in.

The full table has 256 × 256 entries. It lives in one page of main memory,
which the operating system loads on request. A *line* of the page holds the
256 entries of one X against every Y. That line is the unit the caches move
around.

## Addressing: the operand is the address

An operation sent to the memory-based unit has its operands passed to
`mbc_addr_gen`, together with the number of the slice being looked up. The
generator selects the slice pair X = `a[8s+7:8s]` and Y = `b[8s+7:8s]`. It
then builds every address straight from those slices:

| address | tag | index | offset |
|---|---|---|---|
| L1 virtual | X | X mod L1_SETS | Y |
| L2 virtual | X | X mod L2_SETS | Y |
| physical (byte) | `{pagebase[15:0], X, 8'h00}` | | |

Because the tag is the operand itself, two different addresses can never name
the same line. The caches are virtually indexed and virtually tagged, but have
no synonym problem. Translation is needed only to reach main memory. There it
is a plain concatenation with the single page base that the OS returned, so
there is no TLB and no page table. The modulo is real arithmetic, so set
counts need not be powers of two.

## The lookup hierarchy (`mbc_lookup`, `lut_cache`)

This is the most involved part of the design. `mbc_lookup` serves one slice
request at a time. A request carries the two operands and a slice number, and
the address generator picks (X, Y) from them. The controller uses two `lut_cache` instances:

- **L1:** 2 ways, 16 sets, 1-cycle lookup.
- **L2:** 4 ways, 64 sets, 6-cycle lookup.

Lines are 256 entries long, so these are 8 KB and 64 KB if an entry is counted
as one byte. Both caches use LRU replacement, with per-way age counters. An
invalid way is always filled first.

```
request ─► L1 lookup ──hit──────────────────────────────► response (1 cycle)
              │ miss
              ▼
           L2 lookup (6 cycles) ──hit──► response (8 cycles)
              │ miss                              │
              ▼                                   │
           fetch line {pagebase,X} from memory,   │
           write it into the LRU L2 way ─► response
              │                                   │
              ▼                                   ▼
           pick the L1 victim way  (controller stays busy from here on)
              │ victim valid?
              ├─ yes: probe L2 for the victim's tag;
              │       if L2 lacks it, copy the victim line L1 ─► L2
              ▼
           copy X's line L2 ─► L1, then accept the next request
```

An L2 hit answers with the L2 entry straight away. A fetch answers with the
requested entry, picked from the line as it streams in, once the whole line is
in L2. In both cases the L1 fill follows, and the next request waits for it.

Lines move in chunks of 16 entries (288 bits). One chunk moves between the
caches every two cycles: a read, then a write.

The main-memory port is a request/ready handshake with the line's byte
address. The memory answers with 16 chunk beats, chunk 0 first, at whatever
spacing it likes. The evaluated system assumes 100 cycles to the first chunk
and 4 cycles between chunks. The testbench memory model uses those numbers.

Things to know before changing the hierarchy:

- A cache write clears the line's valid bit. Only the last chunk's write sets
  valid and the tag, and makes the way most recently used. So a
  half-written line never hits.
- The L1 victim is written back only if L2 does not already hold it. This
  avoids two L2 copies of one line.
- The line just filled or hit in L2 is always most recently used. So the
  write-back, which replaces the LRU way, cannot overwrite it. This needs at
  least 2 L2 ways.
- At the default size, L2 holds 4 × 64 = 256 lines: the whole page. It
  therefore never loses a line, and the L1 write-back path is never used.
  It becomes active when L2 is smaller than the page, or (in the original
  scheme) when L2 is shared with program data. `tb_mbc_lookup` and
  `tb_mbc_exec_top` use a 16-set L2 to exercise it.
- The table is read-only, so lines dropped from L2 are never written back to
  memory.

## Arithmetic on top of the lookups

**`mbc_adder`** issues the four slice lookups one after another, stores the
entries, and combines them with `carry_select`. When every line is in L1, an
addition takes 9 cycles from acceptance to `out_valid`: two cycles per slice
plus one. A miss adds the miss time of that slice.

**`mbc_multiplier`** is a shift-and-add multiplier whose additions go through
the memory-based adder. Each round works like this:

1. `prio_enc32` finds the lowest set bit of the remaining multiplier.
2. `shifter32` weights the multiplicand by that bit's position.
3. The memory-based adder adds the weighted multiplicand to the partial
   product.
4. The bit is cleared.

A multiplication costs one memory-based addition per set multiplier bit. The
result is the low 32 bits of the product.

**`mbc_unit`** takes one operation at a time. It first orders the operands
with `comparator32`:

- For an addition, the smaller operand becomes X, the tag slice. Then `a+b`
  and `b+a` use the same lines, and small operands share line X = 0.
- For a multiplication, the smaller operand becomes the multiplier. This
  bounds the number of additions.

The multiplier borrows the unit's only adder. `in_ready` stays low until the
table page is known.

## Deciding what to bypass (`bypass_ctrl`)

A unit is bypassed while either holds:

- its `fault` flag is set (a permanent defect found at test);
- it is *hot*.

A unit becomes hot when its temperature exceeds 100 °C. It stays hot until it
falls below 95 °C, so it does not flap around the threshold.

The first bypass raises `os_req`, which stays high until `os_ack`. The page
base given with `os_ack` is kept, and the tables stay loaded from then on.

## The cluster (`mbc_exec_top`)

The scheduler issues one operation per cycle. It names the unit it chose with
`iss_fu`: 0–5 are adders, 6–7 are multipliers, and the operation follows from
the unit type.

- If that unit is in service, the operation always enters it. `int_fu` is
  pipelined, with latency 1 for adders and 3 for multipliers.
- If the unit is bypassed, the operation goes to `mbc_unit`. `iss_ready` is
  then low until that unit can take it. This is the only stall the cluster
  produces.

Results come back on one port per functional unit plus one port for the
memory-based unit, each tagged with `iss_tag`. The status outputs show the
bypass vector, thermal trip/release pulses and cache event pulses.
Performance counters can count them.

### Parameters of the top

| parameter | default | meaning |
|---|---|---|
| NUM_ALU / NUM_MUL | 6 / 2 | integer adders / multipliers |
| ALU_LAT / MUL_LAT | 1 / 3 | latencies of the conventional units |
| T_HOT / T_COOL | 100 / 95 | bypass above, return below (°C) |
| L1_WAYS / L1_SETS | 2 / 16 | L1 of 256-entry lines |
| L2_WAYS / L2_SETS / L2_LAT | 4 / 64 / 6 | L2 of 256-entry lines |
| TAG_W | 8 | result tag width |

The unit counts, the 100 °C threshold, the cache geometry, the latencies and
the memory timing follow the configuration the scheme was evaluated in. The
return threshold, the unit latencies, the port structure and the chunk size
are this design's own choices.

## Timing at a glance

| event | cycles |
|---|---|
| slice lookup, L1 hit | 1 |
| slice lookup, L1 miss and L2 hit | 8, then 32 more to fill L1 |
| slice lookup, L2 miss (100/4-cycle memory) | about 170, then the L1 fill |
| L1 write-back of a victim into L2 | 32 plus a 7-cycle L2 probe |
| 32-bit addition, all slices in L1 | 9 |
| multiplication | one addition (plus 2 cycles) per set bit of the smaller operand |
| thermal bypass after the temperature crosses 100 °C | 1 (registered) |

## Where this departs from the scheme it implements

- **Entry size.** Each entry holds both carry cases (18 bits), as the table
  organisation requires. A 256-line page is therefore 147,456 bytes of entries,
  not the 64 KB quoted for the original system. Cache sizes are kept as line
  counts (16 × 2 and 64 × 4 lines).
- **Fetch answer.** A memory fetch is answered only after the whole line is in
  L2, not as soon as the requested entry arrives.
- **Slice order.** Slices are looked up one after another. A wider or
  multi-ported L1 could look them up in parallel.
- **Comparator.** The comparator is used to order the operands, as described
  above. The original only says that the operands are compared before a
  memory-based operation.
- **Issue width.** The evaluated processor issues up to 8 instructions per
  cycle. This cluster has a single issue port, and stands for the integer
  execution side only.
- **Scope.** The memory-based unit handles one operation at a time. The
  conventional units are plain adders and multipliers, with no divide.
- **Shared caches not modelled.** The original also evaluates keeping the
  tables in the processor's existing caches, shared with program data. Here
  the table caches are dedicated.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog. Reference values are
computed in the testbench (`+`, `*`, `<`, `<<`).

The testbenches check:

- one-cycle L1 hits;
- 9-cycle additions when every line is in L1;
- one addition per set multiplier bit;
- LRU victim order;
- the 100 °C / 95 °C thresholds;
- that results come back from the path the bypass state implies.

`tb/main_mem_model.sv` is a behavioural model of the table page. It computes
entries on the fly and applies the 100/4-cycle timing.

`tb_mbc_exec_top` runs the cluster end to end through five phases:

1. all units healthy;
2. ALU 0 overheats;
3. two adders and one multiplier are marked defective;
4. ALU 0 cools down;
5. four adders and one multiplier are defective.

Phases 3 and 5 are the two defect configurations the scheme was evaluated with.

It runs with a 16-set L2. It counts every mechanism and fails if one never
happens: defect redirections, thermal trip and release, the OS request, issue
stalls, L1 hits and misses, L2 hits, memory fetches, L1 write-backs, operand
swaps and memory-based multiplies.

`tb_mbc_exec_top_full` runs the same scenario with every parameter at its
default. It checks everything except the write-back, which cannot happen at
that size. Both finish in well under a second.

### Cost of the transfer

`tb_workload_configs` sends one fixed stream of 400 operations through the
cluster at default parameters. The stream is 80 % additions and 20 %
multiplications, with loop-counter, address-like and random operands. The
cluster is reset before each run, so every run starts with empty table caches.
Each operation is dealt round-robin to a unit of its type, bypassed or not.

| condition | bypassed units | cycles | line fetches from memory |
|---|---|---|---|
| healthy | none | 403 | 0 |
| ALU 0 above 100 °C | ALU 0 | 7,146 | 32 |
| defect configuration 1 | ALUs 1, 2; MUL 0 | 24,861 | 100 |
| defect configuration 2 | ALUs 1–4; MUL 0 | 32,875 | 129 |

The testbench checks every result and requires the cycle counts to rise in
this order. The ratios are far larger than a whole processor would see. In
this cluster there is one issue port and nothing else to do, so every
redirected operation stalls the stream until the memory-based unit is free.
Most of the cost is the cold start. Each line fetched from memory costs about
200 cycles, including the L1 fill, and the fetches alone account for roughly
80 % to 90 % of the cycles in the bypassed runs.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl +libext+.sv -Irtl \
  --top-module tb_mbc_exec_top_full rtl/mbc_pkg.sv tb/main_mem_model.sv \
  tb/tb_mbc_exec_top_full.sv
./obj_dir/Vtb_mbc_exec_top_full
```

Replace the top module and the last file to run another testbench. Add
`tb/main_mem_model.sv` for any testbench that uses the memory, and keep
`rtl/mbc_pkg.sv` first. Lint with
`verilator --lint-only -Wall -y rtl +libext+.sv rtl/mbc_pkg.sv rtl/<module>.sv`.

## Files

| file | content |
|---|---|
| `rtl/mbc_pkg.sv` | entry type, chunk sizes, operation enum, event struct |
| `rtl/mbc_exec_top.sv` | the cluster |
| `rtl/bypass_ctrl.sv` | fault/thermal bypass and OS page-base handshake |
| `rtl/int_fu.sv` | conventional adder or multiplier unit |
| `rtl/mbc_unit.sv` | memory-based execution unit |
| `rtl/mbc_adder.sv`, `rtl/carry_select.sv` | memory-based addition |
| `rtl/mbc_multiplier.sv`, `rtl/prio_enc32.sv`, `rtl/shifter32.sv` | memory-based multiplication |
| `rtl/comparator32.sv` | operand ordering |
| `rtl/mbc_lookup.sv` | L1/L2/memory lookup controller |
| `rtl/lut_cache.sv` | one set-associative LRU line cache |
| `rtl/mbc_addr_gen.sv` | virtual and physical address formation |
| `tb/tb_workload_configs.sv` | the same operation stream under each bypass condition |
| `tb/tb_*.sv` | testbenches |
| `tb/main_mem_model.sv` | behavioural main memory holding the table page |
