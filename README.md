# Way-prediction two-way data cache

A two-way set-associative cache normally reads the tag and data memories of
**both** ways on every access, compares both tags, and then throws one way's
data away. For a small L1 data cache in a DSP, that wasted read can be a large
part of the cache's dynamic power. This RTL adds a tiny **Way Predict Module
(WPM)** in front of the arrays. The WPM remembers, for a few recently used tags,
which ways lines with that tag have been written into. Before the arrays are
read it looks the request's tag up and enables only the ways that can hold
the line. When it knows nothing about the tag, it enables both ways.

The scheme follows the way-prediction data cache published by L. Wang and
D. Wang ("Way Prediction Set-Associative Data Cache for Low Power Digital
Signal Processors"). The cache around the predictor is filled in here as a
complete, simulatable L1 data cache: miss handling, stores, victim choice and
the two bus interfaces. Those parts are this implementation's own design;
each is marked below.

## Organisation

| Item | Value | Origin |
|---|---|---|
| Capacity, associativity, line | 1 KB, 2 ways, 4-byte lines | published configuration |
| Sets | 128 (7 index bits) | follows from the above |
| Address | 32 bits: tag `[31:9]` (23 bits), index `[8:2]`, byte offset `[1:0]` | 23-bit tags as published; the 32-bit width is what 23 + 7 + 2 adds up to |
| Effective tag (TagL) | low 10 bits of the tag, `addr[18:9]` | published |
| Tag Record Buffer (TRB) | 3 entries × 10 bits | published |
| Way Record Buffer (WRB) | 3 entries × 2 bits | published |
| Accesses | 32-bit words only, no byte enables | own choice |

The tag splits into TagH, its upper 13 bits, and TagL, its lower 10 bits.
Programs with memory locality mostly change only the low tag bits from one
access to the next, so the predictor stores only TagL.

## The Way Predict Module

The WPM has three parts. Each is a separate module.

* **Tag Record Buffer** (`tag_record_buffer`). This is three 10-bit flip-flop
  registers, each with an equality comparator. There is one compare port for
  lookups and one for updates.
* **Way Record Buffer** (`way_record_buffer`). Each TRB entry has one bit per
  way. Bit *w* is 1 when a line with that entry's tag has been written into way
  *w*. An entry whose bits are all 0 is empty. Reset makes every entry empty.
* **Replacement scheme** (`replacement_scheme`). This decides what to record
  when a line is written into the cache. It keeps three entries enough for the
  loops that dominate DSP programs.

### Lookup (every access, combinational)

| TRB | WRB way 0 | WRB way 1 | Ways read |
|---|---|---|---|
| hit | 1 | 0 | way 0 only |
| hit | 0 | 1 | way 1 only |
| hit | 1 | 1 | both |
| miss | – | – | both |

`way_en[0]` is Way0EnFlag and `way_en[1]` is Way1EnFlag. Each flag is ANDed
with the conventional read enable of its way to give RenNew. RenNew drives
the valid, tag and data reads of that way. A way that is not enabled does not
read, and its outputs keep their old values. For that reason, `hit_logic` also
requires a way to have been read before its tag comparison can count as a hit.

### Update (whenever a line is written into the cache)

Take a line with effective tag *T* written into way *w*. The rules are tried
in this order:

1. If *T* is in the TRB, set bit *w* of its WRB entry.
2. Otherwise, if some entry's WRB bits are `11`, that entry now records *T*
   with only bit *w* set. A tag found in both ways is the least useful to
   predict, so it is the one that gets replaced.
3. Otherwise, if an entry is empty, that entry takes *T* with bit *w* set.
4. Otherwise, *T* is not recorded. Its accesses then read both ways. This rule
   is own choice; the published scheme does not cover a full buffer with no
   `11` entry.

Where several entries qualify, the lowest-numbered one is used. WRB bits are
never cleared when a line is evicted. A stale bit only causes an extra way to
be read; it never causes a wrong result.

Worked example (also in `tb_way_predict_module`):

1. Tag `23'h040100` is written into way 0 and `23'h040201` into way 1.
   `23'h040200` is written into both ways. The entries are now 100/`way0`,
   201/`way1` and 200/`both`.
2. `23'h040202` is then written into way 0. It is not in the TRB, and entry
   200 has both bits set, so that entry is replaced by 202/`way0`.
3. When `23'h040202` later also lands in way 1, its entry becomes `both`.

## Wrong predictions and why results stay correct

This is the subtle part of the design. A prediction can leave out the way
that holds the line. For example, an entry is replaced or cannot be recorded
while its lines stay in the cache. Later the same tag is recorded again from a
fill into the other way. A later access then reads only that other way and
misses.

As in the published scheme, **a wrong prediction is handled as an ordinary
miss**. The cost is a refill from the next level. The refill must not create a
second copy of the line, which a later store could make stale. So the miss
path works as follows (own design):

1. **Probe.** In the cycle after the miss is seen, the tags and valid bits of
   both ways of the set are read. The data memories stay idle.
2. **Refill way.** The line goes into the way that already holds it, if the
   probe found it there. Otherwise it goes into an invalid way, or else into
   the least recently used way (one LRU bit per set).
3. **Refill.** The word is fetched from the next level and written with
   valid = 1. The WPM is updated with the chosen way, so the prediction for
   this tag now includes it.

So a line is never in both ways of a set. The assertion `a_one_hit` checks
this.

## Stores

Stores are write-through with no write-allocate (own choice):

* A store hit writes the data memory of the hit way.
* On a store miss the probe still runs. If it finds the line in the way the
  prediction left out, it writes that copy and records the way in the WPM.
* Every store is then sent to the next level. It is acknowledged
  (`resp_valid`, with `resp_hit` telling hit from miss) once the next level
  grants it.

## Timing and interfaces (`wp_dcache`)

CPU side: `req_valid/req_ready/req_we/req_addr/req_wdata`, and in return
`resp_valid/resp_rdata/resp_hit`.

* A request is taken at a clock edge where `req_ready` is high. The WPM lookup
  and the gated array reads happen in that cycle.
* In the next cycle the tags are compared. A load hit responds in that cycle,
  one cycle after it was taken. A new request can be taken in the same cycle,
  so hits stream at one per cycle.
* A miss takes one cycle to detect and one to probe, then the next-level read.
* A store takes one cycle, then the next-level write.
* During a miss or a store, `req_ready` stays low.
* `ren_new[1:0]` brings out the per-way read enables so that read activity can
  be measured.

Next-level side: `mem_req/mem_we/mem_addr/mem_wdata` are held until `mem_gnt`.
Read data returns later with `mem_rvalid/mem_rdata`. Only one request is
outstanding at a time. A refill is one 32-bit word, because a line is 4 bytes.

Reset (`rst_n`, asynchronous, active low) clears the valid bits, TRB, WRB, LRU
bits and control state. The tag and data memories are not reset.

In the published work, adding the predictor lengthened the cache access path
by about 0.15 ns (1.10 ns to 1.25 ns) and added 0.5 % to the area. In this RTL
the lookup is combinational logic ahead of the array enables, in the same
cycle.

## Modules (`rtl/`)

| File | Role |
|---|---|
| `wp_pkg.sv` | sizes and the `rs_action_e` type |
| `wp_dcache.sv` | top: the cache, control state machine, LRU, miss probe |
| `way_predict_module.sv` | WPM: lookup and update around the three parts below |
| `tag_record_buffer.sv` | TRB |
| `way_record_buffer.sv` | WRB |
| `replacement_scheme.sv` | replacement decision |
| `cache_way.sv` | one way: valid flip-flops, tag RAM, data RAM |
| `hit_logic.sv` | tag comparators, hit0/hit1/Hit, Data0/Data1 multiplexer |
| `sram_sp.sv` | synchronous RAM with read enable (tag and data memories) |

Top parameters (defaults are the published sizes): `SETS` (128), `TAG_W` (23),
`ETAG_W` (10) and `TRB_ENTRIES` (3). The cache itself is fixed at two ways. The
WPM modules take any number of ways and entries.

## Verification (`tb/`)

Every testbench checks itself. Each prints
`TB_RESULT checks=N failures=M` and contains a watchdog.

| Testbench | What it shows |
|---|---|
| `tb_sram_sp`, `tb_cache_way`, `tb_hit_logic` | array read/hold/write behaviour, tag-only probe reads, hit and select |
| `tb_tag_record_buffer`, `tb_way_record_buffer` | against reference models under random traffic |
| `tb_replacement_scheme` | all 512 input combinations against the rules |
| `tb_way_predict_module` | the worked example, the lookup table, then random traffic against a model; every replacement action and lookup outcome must occur |
| `tb_wp_dcache` | end-to-end at full size (see below) |
| `tb_dsp_kernels` | small DSP kernels run through the cache, checking their results |

`tb_wp_dcache` uses the default parameters. It runs about 17,500 random loads
and stores through a behavioural memory (`tb/mem_model.sv`) that has random
grant and latency, and compares every load with a reference memory. It checks:

* load-hit latency;
* that RenNew equals the prediction;
* that no two ways hit together.

It also requires each of these to happen at least once:

* single-way reads of way 0 and of way 1;
* both-way reads, both on a TRB hit and on a TRB miss;
* back-to-back hits;
* refills and evictions;
* wrong predictions;
* store hits, store misses, and store misses found by the probe;
* all four replacement actions.

`tb_dsp_kernels` runs dot product, vector sum, vector multiply, maximum,
autocorrelation and 8×8 matrix multiply as load/store sequences. Each runs on
64-word arrays in one set range, each kernel after a reset, and each result is
checked. The kernels are small stand-ins written for this test, not the
benchmark programs the published figures were measured on. The share of way
reads saved depends on the data layout: it was about 49 % for dot product,
33 % for the vector kernels and 3 % for matrix multiply. The published
results, measured on full programs, were 7 % to 19 % fewer array accesses.
The maximum possible saving is 50 %.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
    --top-module tb_wp_dcache rtl/wp_pkg.sv tb/tb_wp_dcache.sv
./obj_dir/Vtb_wp_dcache +verilator+rand+reset+2
```

Replace `tb_wp_dcache` with any other testbench name.

## Limits and departures

* Power is not modelled. What the RTL exposes is read activity, through
  `ren_new`.
* Only the 2-way configuration is built. The CPU and memory handshakes, the
  write policy, LRU victim choice, the miss probe, the refill-way rule and
  rule 4 of the replacement scheme are all this implementation's choices.
* The published text also says a 5-bit tag would be enough. The 10-bit
  effective tag that it settles on is used here.
* The processor and the next-level memory are outside this RTL. The memory
  exists only as a behavioural testbench model.
