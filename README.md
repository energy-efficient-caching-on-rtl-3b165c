# Caching-on-Cache (CoC) L1 data cache

Most of a small cache's energy goes into its tag and data arrays: every access
drives a word line, precharges and discharges bit lines and fires sense
amplifiers, whether the data were just read a cycle ago or not. Programs with
good spatial locality keep touching the same few lines. This design puts a
tiny fully associative buffer of whole lines, the **CoC** ("caching on
cache"), *inside* the L1 in front of the arrays. Every access is compared
against the CoC first. When a load hits there, the index never reaches the
array decoders, so neither array is read, and the word comes out of a CoC
register. Only on a CoC miss does the cache run a normal tag and data access.

The CoC compare costs energy and time on every access. To keep that cost low it
uses a **hierarchical address comparison (HAC)**. The low bits of the block
address change most often, so they are compared first. The upper bits are
compared only where needed.

Default configuration, as evaluated and recommended for the architecture:

| item | value |
|---|---|
| L1 | 8 KB, direct-mapped, 32-byte lines, 256 lines, 19-bit tag |
| address | 32 bits: tag `[31:13]`, index `[12:5]`, block offset `[4:0]` |
| next-level bus | 32 bits, one word per transfer |
| CoC | 4 entries, FIFO replacement, each entry one full 256-bit line |
| HAC split | LSB field = block address bits `[9:5]` (5 bits), MSB field = `[31:10]` |
| HAC model | CAM-REG |

## Access flow

```
 req_addr ──┬──────────────► CoC address buffer (HAC) ──hit──┐
            │                         │                      │
            │                  index tri-state               ▼
            │                (open unless a load           MUX ◄── CoC data lines
            │                 hits the CoC)                 ▲
            └──► tag array ──► tag comparator ──┐           │
                 data array ────────────────────┼───────────┘
                                                ▼
                              OR(CoC hit, tag hit) ──► data-out register ──► rsp_rdata
```

Each accepted request falls into one of these cases:

* **Load, CoC hit.** `array_en` stays low, so the arrays are not read. The MUX
  selects the CoC line and the data-out register loads the word.
  `ev_coc_hit` pulses.
* **Load, CoC miss, array hit.** The arrays are read in the same cycle and the
  word comes from the data array. The whole line is also written into the CoC
  entry that the FIFO pointer names, replacing the oldest entry.
  `ev_l1_hit` pulses.
* **Load, miss in both.** `ev_l1_miss` pulses. The line is fetched word by word
  from the next level and written into the data array. The tag is written with
  the last word. The held load is then looked up again: it now hits the arrays,
  is served, and its line enters the CoC.
* **Store.** The L1 writes through and does not allocate on a miss. The word
  goes to the next level and, if the line is present, also into the data
  array. If the CoC holds the line, that entry is **invalidated** instead of
  updated (`ev_coc_inv`). This means a CoC entry is never stale.

The CoC is not kept inclusive of the L1. A refill that evicts an L1 line
leaves any CoC copy in place. That copy is still correct, because stores
invalidate CoC copies and memory is always current under write-through.
Since a CoC hit never looks at the arrays, a CoC hit can never turn into an
L1 miss.

## Hierarchical address comparison

Each CoC entry stores its 27-bit block address split into an LSB field (the
lowest `LSB_BITS` bits) and an MSB field (the rest). Two storage models are
built, selected by `HAC_MODE` (`coc_pkg::hac_mode_e`):

* **`HAC_CAM_REG`** (default). The LSB field is in CAM and the MSB field in
  plain registers. An entry's MSB comparator is enabled only when its LSB field
  matched. Entries whose LSB differs never switch their MSB comparator.
* **`HAC_CAM_CAM`**. Both fields are in CAM and all valid entries compare both
  fields at once.

Both models produce the same hit vector. They differ only in how many MSB
comparators switch. The cache reports that count for each accepted load on
`ev_msb_cmps`: in CAM-REG it is the number of LSB matches, in CAM-CAM it is
the number of valid entries. The energy of one lookup is modelled as

    E_HAC = N_entries * E_LSB + N_MSB_compares * E_MSB

so `ev_msb_cmps` supplies the second term. At most one entry may hit. The
RTL asserts this, and the FIFO fill guarantees it, because a line enters the
CoC only after it missed there.

### Two-level comparison

A two-level variant is also built, selected by `HAC_LEVELS = 2`. The block
address is cut at the page boundary (`PAGE_BYTES`, 4 KB by default), giving
two parts:

* the page number, with an LSB field of `LSB_HI_BITS` bits at its bottom and
  an MSB field above it;
* the block address inside the page (7 bits at the defaults), with an LSB
  field of `LSB_BITS` bits and an MSB field above it.

Each level's LSB match enables its own MSB comparator, and an entry hits only
when both levels match. `ev_msb_cmps` then counts the MSB comparators of both
levels. The evaluated configurations use the single split, so that is the
default.

Under a stream with good locality the page number rarely changes. Its LSB
field therefore nearly always matches, and the upper MSB comparator switches
almost every time. The configuration sweep shows this: it reports about three
times as many MSB comparisons for the two-level split as for the single split
at the same size.

## Timing

Everything after the CPU's request is one combinational path per cycle:
CoC compare → index tri-state → array read → tag compare → OR → data-out
register. This mirrors the critical path of the architecture. The CAM compare
is the only delay added to a normal cache's path. The circuit-level estimate is
7.5 ns against 7.1 ns, about 5.6 % in a 0.35 µm process. The RTL does not model
that delay.

| access | cycles from `req_valid` to `req_ready` | data |
|---|---|---|
| load, CoC hit | 0 (accepted in the first cycle) | next cycle |
| load, array hit | 0 | next cycle |
| load, miss | 1 + 8 × (memory word latency) | next cycle after acceptance |
| store | 1 + memory write latency | — |

"Memory word latency" counts from raising `mem_req` to the cycle in which
`mem_ack` is seen, plus that cycle. With the test model's `LATENCY = 4` this
is 5, so a miss takes 41 cycles.

## Interfaces

CPU side (`coc_l1_cache`):

* `req_valid`, `req_we`, `req_addr`, `req_wdata` → `req_ready`. The request
  must be held stable until `req_ready` is high. This is asserted.
* `rsp_valid`, `rsp_rdata` come from the data-out register, one cycle after
  a load is accepted.
* Word accesses only: `req_addr[1:0]` is ignored and there are no byte enables.

Next-level side: `mem_req`, `mem_we`, `mem_addr` (word aligned) and `mem_wdata`
are held until the one-cycle `mem_ack`. `mem_rdata` is valid with `mem_ack`.
A refill issues eight reads at consecutive word addresses of the line.

Event outputs, for counting what an energy model weighs:

* `ev_coc_hit`, `ev_l1_hit`, `ev_l1_miss` and `ev_coc_inv` pulse once per
  access. The load that completes after its own refill counts only as a miss.
* `ev_array_access` is high while the arrays are read.
* `ev_msb_cmps` is the count of MSB comparisons described above.

Reset (`rst_n`, asynchronous, active low) clears the valid bits of the tags and
of the CoC, the FIFO pointer, the controller state and the output register. The
array contents are not reset.

## Parameters of `coc_l1_cache`

| parameter | default | meaning |
|---|---|---|
| `CACHE_BYTES` | 8192 | L1 capacity; 16384, 32768 and 65536 were also evaluated |
| `LINE_BYTES` | 32 | line size |
| `ADDR_W` | 32 | address width |
| `WORD_W` | 32 | bus and CPU word width |
| `COC_ENTRIES` | 4 | CoC lines; 1 to 8 were evaluated |
| `LSB_BITS` | 5 | HAC LSB field width; 1 to 12 were evaluated |
| `HAC_MODE` | `HAC_CAM_REG` | CoC address storage model |
| `HAC_LEVELS` | 1 | 1: single LSB/MSB split; 2: separate page-number and in-page levels |
| `PAGE_BYTES` | 4096 | page size for the two-level split |
| `LSB_HI_BITS` | 5 | LSB field width of the page-number level |

The index and tag widths follow from these. For example, the tag is 16 bits
at 64 KB.

## Files

`rtl/`:

* `coc_pkg.sv`: the HAC mode type and a helper.
* `coc_l1_cache.sv`: the top. It holds the index tri-state and wires the
  blocks together.
* `l1_ctrl.sv`: the controller. It has three states: lookup, refill and
  write-through.
* `coc.sv`: the CoC buffer. It contains the FIFO pointer and instantiates
  `coc_addr_cam.sv` (HAC address buffer) and `coc_data_regs.sv` (line
  registers).
* `tag_array.sv`, `data_array.sv`, `tag_comparator.sv`: the conventional
  cache parts.
* `coc_out_path.sv`: the MUX, the OR gate and the data-out register.

`tb/`:

* Every block has a self-checking testbench, `tb_<module>.sv`.
* `tb_coc_l1_cache.sv` runs the top at its default parameters. It compares every
  load's data and acceptance cycle, every hit/miss classification and every MSB
  comparison count against a reference model. It also counts each mechanism
  and fails if one never occurred: CoC hit with arrays idle, CoC fill, FIFO
  wrap-around, conflict refill, LSB match with MSB mismatch, store
  invalidation, store hit and store miss.
* `tb_coc_configs.sv` runs eight configurations side by side through
  `coc_cache_env.sv`: 8–64 KB, 1–8 entries, 1–12 LSB bits, both models,
  and one or two comparison levels.
* `next_level_mem.sv` is a behavioural memory model with a fixed latency.

Each testbench prints `TB_RESULT checks=N failures=M`.

Simulating with Verilator, for example:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv -Irtl \
        rtl/coc_pkg.sv tb/tb_coc_l1_cache.sv --top-module tb_coc_l1_cache -o sim
    ./obj_dir/sim

All testbenches finish in well under a second.

## Where this RTL departs from the architecture, or fills gaps

* **Circuit-level parts are reduced to their logic.** These include the CAM
  cells with dynamic NAND- or NOR-type match lines, the sub-banked
  divided-word-line arrays, and the tri-state buffer itself. The CAM is an
  equality compare, the arrays are plain register arrays with a combinational
  read, and the tri-state is a read enable. For silicon, the arrays would be
  replaced by SRAM macros and the CoC address buffer by a CAM macro.
* **One cycle for every hit.** The CoC-hit speed-up and the CoC-miss slow-down
  are delay effects inside a cycle and do not show in cycle counts.
* **The two-level HAC split uses chosen values.** Its page size and
  upper LSB width are this design's choices.
* **Choices of this design, not specified by the architecture:**
  * the L1 write policy (write-through, no write-allocate)
  * word-only stores
  * the CPU and bus handshakes
  * that only loads fill the CoC
  * the extra lookup cycle after a refill
  * the event outputs
  * reset behaviour
* **Arrays are sized from `CACHE_BYTES`.** The published configuration table
  lists 256 tag entries and 1/2/3/4 data sub-arrays for 8/16/32/64 KB. That
  does not match sizes that double, so the RTL computes the number of lines
  from the capacity. The published tag widths (19/18/17/16 bits) agree with
  the RTL.
* **Not built:** the CoC shown inside an optional L2 cache, and the L2 and
  main memory themselves. The processor is left to the user; the testbenches
  drive its port.
* **Not run:** the published results come from SPEC95 address traces (five
  integer and five floating-point programs). They are not reproduced here.
  The testbenches use synthetic address streams with locality instead.
