# Reactive-associative L1 data cache

A direct-mapped cache is fast because the data array is read with one index,
which is known as soon as the address is. A set-associative cache misses less,
but it must read every way and pick one after the tag compare, and that output
mux sits on the critical path. The reactive-associative (r-a) cache tries to get
both:

- The **tag array is set-associative**: all ways are compared in parallel.
- The **data array is a single direct-mapped array**: it is read at one position
  per probe.
- **Most blocks stay in their direct-mapped position**. There they are found with
  no prediction at all.
- **Only blocks that keep conflicting are moved ("displaced")** into another way
  of their set. A PC-based **way predictor** tells the first data probe where to
  look for them.
- **Blocks or instructions that turn out to be unpredictable are taken back**
  to direct-mapped placement by a feedback mechanism. A wrong prediction costs a
  second probe and data-array bandwidth.

The outcome is a cache whose first-probe hit rate is close to that of a
direct-mapped cache and whose overall miss rate is closer to that of a
set-associative one. The first-probe latency stays that of a direct-mapped cache.

This repository holds synthesizable SystemVerilog for the cache and its
predictor, with self-checking testbenches. The default configuration is an
8 KB, 4-way cache with 32-byte blocks. The predictor defaults are:

- a 128-entry access-prediction table (APT);
- a 128-entry block way-number table (BWT);
- a 2048-bit inhibit list;
- a 256-entry victim list;
- an inhibit threshold of 3 and a victim threshold of 5.

## Where a block can live

An address splits into a tag, a set index and a block offset, exactly as for a
4-way set-associative cache of the same size (64 sets with the defaults). The
data array has `WAYS × SETS` rows, and row `{way, set}` holds way `way` of set
`set`. The ways of one set therefore lie `SETS` rows apart.

The **direct-mapped way** of an address is the low `log2(WAYS)` bits of its tag.
A block in its direct-mapped way is at row `{tag[1:0], set}`. That is the same
row a direct-mapped 8 KB cache would use, so finding it needs no prediction. A
block in any other way of its set is **displaced**.

Modules:

- `tag_array` holds WAYS tags and valid bits per set. It compares them all
  combinationally against the request's tag, producing one match line per way.
- `data_array` is the single data array, addressed by `{way, set}`. It has
  per-word write enables.

## Probe sequence and timing

Each access makes at most two data probes:

| Case | What happens | Response after acceptance |
|---|---|---|
| probe0 hit | The data array is read at the direct-mapped way, or at the predicted way. The tags are compared in parallel, and the match line of the probed way is the probe0 hit. | 1 cycle |
| probe1 hit | probe0 missed, but another way matched. That way number is encoded, and the data array is read again there. | 3 cycles |
| miss | No way matched. L2 is asked the cycle after probe0. | the L2 latency (12 cycles in the tests), then a fill cycle and a response cycle |

Three small blocks form the probe datapath:

- **`probe0_way_mux`** picks the way number for the data-array index from three
  sources: direct-mapped, predicted, or probe1. It always has exactly three
  inputs, whatever the associativity. The select is turned into a one-hot code
  and the output is an AND-OR. This mirrors a single level of pass gates whose
  select settles before the address arrives.
- **`probe0_hit_mux`** selects the match line of the probed way. That gives the
  probe0 hit.
- **`probe1_way_encoder`** turns the match lines into the way number for probe1.
  Its OR of the match lines is the overall hit.

Data is returned only after the tag check confirms it; nothing speculative
leaves the cache.

## Selective displacement: the victim list

On a miss, the filled block normally goes to its direct-mapped way. The victim
list (`victim_list`) decides otherwise for blocks that keep coming back.

- It has 256 entries, 8-way set-associative on the block address. Each entry
  holds a saturating counter that goes up to 5.
- When a fill pushes a valid block out of the cache, the evicted block's counter
  is incremented. A new entry starts at 1 and replaces the way with the lowest
  counter.
- When a block is filled, its counter is looked up. A saturated block is placed
  in a **set-associative way** and its counter is reset.
- The way chosen is the first invalid way other than the direct-mapped one.
  Otherwise a round-robin pointer picks a way, skipping the direct-mapped one.

So a block has to be thrown out five times before it is displaced. Capacity
misses, which rarely repeat on the same block, are therefore mostly left alone.

## Way prediction (PC scheme)

The data address is not known early enough to predict from it. The predictor
(`way_predictor`) therefore works from the **instruction PC**, in the front end,
before the address exists. It is a two-stage lookup:

1. The PC reads the **inhibit list** (one bit per instruction, indexed by
   PC[12:2]). In the same stage it reads the **APT** (`apt`), which maps a PC to
   the *block address* that instruction last touched in a displaced position.
2. That block address reads the **BWT** (`bwt`). The BWT maps a block address to
   the block's *current way* and holds a 2-bit misprediction counter.

The result is valid two cycles after the lookup. The prediction is
"set-associative, way = BWT way" only if the APT hits, the BWT hits and the
instruction is not inhibited. Otherwise it is "direct-mapped". The processor (in
the tests, the testbench) carries the prediction with the memory request
(`req_pred_sa`, `req_pred_way`, `req_pred_blk`, `req_inhibit`).

### Why two tables

A block that gets displaced may conflict again and move. Mapping PC → way
directly would leave every instruction that uses the block with a stale way.
Mapping PC → block and block → way means a moving block updates one BWT entry,
and every instruction that reaches it through the APT sees the new way. On
every fill, the BWT entry of the filled block gets the new way:

- a displaced fill allocates the entry if it is absent;
- a direct-mapped fill only updates an entry that already exists.

### APT update rule

The APT gets a new entry only when an access actually touched a displaced block.
An instruction that already has an entry has it rewritten with whatever block it
touched. That includes a block in its direct-mapped way, so once an instruction
moves on from a displaced block it stops being predicted set-associative.
Inhibited instructions never write the APT. Both tables are 4-way
set-associative with 8-bit tags. A tag is the PC or block-address bits above the
index, XOR-folded.

## Feedback: misprediction counters, the inhibit list and how they spread

This is the least obvious part of the design. After each access the cache sends
an access report (`acc_*`) to the predictor, and the predictor acts on it:

- **Counter update.** If the access was predicted set-associative and the block
  was in the cache, the BWT counter of the predicted block is decremented on a
  correct prediction and incremented on a wrong one. The counter saturates at the
  inhibit threshold, 3.
- **Inhibiting.** An uninhibited instruction is put on the inhibit list when the
  block it touched has a saturated counter, or when its own wrong prediction
  saturates that counter.
- **Spreading.** When an inhibited instruction touches a block, it forces that
  block's counter to saturation.

Unpredictability therefore spreads from instructions to blocks and from blocks
to every instruction that shares them. That is deliberate: a block shared
between an inhibited and an uninhibited instruction would otherwise be displaced
and evicted over and over.

An inhibited instruction:

- always makes its probe0 at the direct-mapped way;
- never causes a displacement;
- evicts a block it finds in a displaced way (`inhibit_evict`). That block comes
  back from L2 into its direct-mapped way.

**Clearing.** The marking is sticky: as long as the same data is reused, the
inhibited instructions keep the counters saturated, and the saturated counters
keep the instructions inhibited. So it has to be cleared from outside:

- `dtlb_miss` clears the whole inhibit list (a new data phase);
- `itlb_miss` clears all BWT counters (a new code phase);
- with `CLEAR_INTERVAL` > 0, both are also cleared every `CLEAR_INTERVAL`
  accesses (periodic clearing). The default is 0, which turns it off.

The end-to-end test shows why clearing matters. A burst of random accesses
inhibits the array loops, and they stay inhibited until both kinds of clearing
have happened. A clear of only one kind is undone by the other half of the loop
within a few accesses.

## Interface of the top (`ra_top`)

All ports are plain signals. Everything is synchronous to `clk`, and `rst_n` is
an active-low synchronous reset.

| Group | Signals | Notes |
|---|---|---|
| prediction lookup | `lk_valid`, `lk_pc` → `pred_valid`, `pred_pc`, `pred_sa`, `pred_way`, `pred_blk`, `pred_inhibit` | Result 2 cycles after `lk_valid`. Pipelined: one lookup per cycle. |
| request | `req_valid`/`req_ready`, `req_pc`, `req_addr`, `req_store`, `req_wdata` (64 bit), `req_pred_sa`, `req_pred_way`, `req_pred_blk`, `req_inhibit` | Accepted when both are high. Pass the `pred_*` values for `req_pc`, or zeros for a direct-mapped probe0. |
| response | `resp_valid`, `resp_kind` (probe0 hit / probe1 hit / miss), `resp_rdata` | One pulse per request. For stores, `resp_rdata` has no meaning. |
| L2 | `l2_req_valid`/`l2_req_ready`, `l2_req_write`, `l2_req_addr`, `l2_req_wdata`; `l2_resp_valid`, `l2_resp_data` (256 bit) | Block reads and word writes. A read is answered by one cycle with the whole block. |
| clearing | `dtlb_miss`, `itlb_miss` | One-cycle pulses. |
| observation | `cache_events`, `pred_events` | One-cycle flags per mechanism (structs in `ra_pkg`). |

The cache serves **one access at a time**. `req_ready` is low from acceptance
until the response, and also while a full write buffer cannot drain. Stores are
**write-through with write-allocate**, through a one-entry write buffer. An L2
read waits until the buffer has drained.

## Files

| File | Content |
|---|---|
| `rtl/ra_pkg.sv` | Probe-select, response and feedback enums; event structs; the XOR-fold function. |
| `rtl/ra_top.sv` | Top: cache and predictor wired together. |
| `rtl/ra_cache.sv` | Cache controller: probe sequencing, miss and fill handling, victim list, write buffer. |
| `rtl/tag_array.sv`, `rtl/data_array.sv` | The two arrays. |
| `rtl/probe0_way_mux.sv`, `rtl/probe0_hit_mux.sv`, `rtl/probe1_way_encoder.sv` | Probe datapath. |
| `rtl/way_predictor.sv`, `rtl/apt.sv`, `rtl/bwt.sv`, `rtl/inhibit_list.sv` | Way predictor. |
| `rtl/victim_list.sv` | Victim list. |
| `tb/tb_<module>.sv` | Self-checking testbench for each module. |
| `tb/l2_model.sv` | Behavioural L2 model: 12-cycle latency, random back-pressure, sparse memory with a fixed initial pattern. |

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops. Each also
has a watchdog. With Verilator 5:

```sh
t=ra_top   # or ra_cache, way_predictor, apt, bwt, victim_list, ...
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/ra_pkg.sv tb/tb_$t.sv --top-module tb_$t --Mdir obj_$t -o sim
./obj_$t/sim
```

`tb_ra_top` runs the whole design with every parameter at its default. It takes
well under a second.

The testbench plays the processor:

- it looks up the prediction by PC, waits the two cycles, then issues the access
  with that prediction;
- two arrays 8 KB apart fight for the same direct-mapped lines;
- stores go to one array;
- a burst of random loads inhibits the array loops;
- TLB-miss pulses clear the marking again.

It checks:

- every load's data against a reference memory;
- the latencies: 1 cycle for probe0, 3 for probe1, at least 13 for a miss;
- that each of the 19 event kinds happens at least once;
- that the array loads hit on probe0 more than 75 % of the time in the last
  rounds (they reach 100 %).

`tb_way_predictor` sets `CLEAR_INTERVAL = 16` so that periodic clearing is also
tested. The other testbenches run at the default sizes.

## Parameters

`ra_top` takes all of these. Both `ra_cache` and `way_predictor` take the subset
they use.

| Parameter | Default | Meaning |
|---|---|---|
| `CACHE_BYTES` | 8192 | L1 capacity |
| `BLOCK_BYTES` | 32 | block size |
| `WAYS` | 4 | associativity of the tag side (power of two) |
| `ADDR_W`, `PC_W` | 32, 32 | address and PC width |
| `WORD_W` | 64 | load/store word |
| `VL_ENTRIES`, `VL_WAYS`, `VICTIM_THRESH` | 256, 8, 5 | victim list |
| `APT_ENTRIES`, `APT_WAYS` | 128, 4 | APT |
| `BWT_ENTRIES`, `BWT_WAYS` | 128, 4 | BWT |
| `CTAG_W` | 8 | compressed tag width of APT and BWT |
| `INHIBIT_BITS`, `INHIBIT_THRESH` | 2048, 3 | inhibit list size; misprediction counter saturation |
| `CLEAR_INTERVAL` | 0 | periodic clearing interval in accesses, 0 = off |

## How far this follows the original design, and where it departs

These points follow the original design:

- the organisation: a set-associative tag array, one direct-mapped data array,
  and the direct-mapped way taken from the low tag bits;
- the three probe paths with their 1- and 3-cycle latencies;
- the three probe-datapath blocks;
- the two-table PC predictor, with the BWT updated on fills;
- victim-list displacement with its reset;
- the counters, inhibit list and spreading;
- eviction by inhibited instructions;
- both clearing schemes;
- all the table sizes and thresholds listed above.

These are choices of this implementation:

- **Blocking controller.** The original cache is non-blocking (lock-up free). It
  also holds its port for only one extra cycle on a probe1 hit. Here the cache
  handles one access at a time.
- **Write policy.** The original does not give one. Write-through with
  write-allocate and a one-entry buffer is used here.
- **Widths.** The 32-bit addresses and PCs and the 64-bit words are chosen here.
- **Organisation of the tables.**
  - The APT and BWT are 4-way set-associative with 8-bit XOR-folded tags.
  - The victim list is 8-way with full tags, and a new entry replaces the way
    with the lowest counter.
  - Replacements take an invalid way first, then round-robin.
  - The inhibit list is a separate bit vector, not bits inside an instruction
    cache.

  The original gives a total predictor storage of 1184 bytes. These choices do
  not reproduce that number.
- **Victim counting.** The counter that is incremented belongs to the block
  that is *thrown out* by a fill, not the block that is missing.
- **Counter direction.** The counter rises on a wrong prediction and falls on a
  correct one.
- **APT rewrite rule.** The rule in "APT update rule" above is this design's.
  Without it an instruction kept being predicted into a block it no longer used.
- **Exact spreading rule.** Which access saturates which counter, and when an
  instruction gets inhibited, is this design's reading of the spreading idea.
- **Prediction pipeline.** The two-cycle split of the predictor pipeline is
  chosen here.
- **Not built.**
  - The alternative XOR-based predictor, which indexes the BWT by register value
    XOR offset.
  - The processor, the TLBs and the L2. They are ports, and the L2 exists only as
    a testbench model.

## Limits

- The design has been checked in simulation only: directed and random tests per
  module, plus the end-to-end test above. It has not been timed or synthesized
  for a technology, so the claim that probe0 is as fast as a direct-mapped hit is
  not tested here.
- Predictor accuracy on real programs is untested. Only the synthetic workload
  of the end-to-end test has been run, not the benchmark programs the scheme was
  designed for.
