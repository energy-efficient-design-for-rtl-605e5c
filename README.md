# Fetch-mask-predicted instruction cache

An instruction cache for a 4-wide embedded processor that reads from its
data array only the instructions the processor will actually use.

In a highly associative cache with CAM tags, the CAM match line selects one
data-array line and, in a plain design, the whole 256-bit line (eight
instructions) is read, and a multiplexer then picks the four the processor
fetches. Reading words that are thrown away costs energy. This design cuts
that cost in two steps:

1. **Segmented wordline.** The wordline of each line is cut into one
   segment per 32-bit word, each with its own driver enable. A fetch drives
   only the aligned 4-word half line that holds the fetch address, so half
   of the line is never read.
2. **Fetch Mask Predictor.** Branches make part of even that half useless.
   When a fetch enters a line at a branch target (*branch in*), the words
   before the target are not used. When the line holds a branch that will
   be taken (*branch out*), the words after it are not used. The predictor
   builds a word mask that removes both. The mask is known before the
   array is read, and it drives the wordline segments.

The technique comes from the paper *Energy-Efficient Design for Highly
Associative Instruction Caches in Next-Generation Embedded Processors*
(Aragón, Nicolaescu, Veidenbaum, Badulescu). That work describes the
mechanism at the architecture level. The RTL here is one implementation of
it. The paper defines neither the cycle-level protocol nor the recovery
path: both are this implementation's own, and they are marked as such below.

## Cache organisation

| Quantity | Default | Parameter |
|---|---|---|
| Capacity | 32 KB | `CACHE_BYTES` |
| Associativity | 32 ways, CAM tags | `WAYS` |
| Line | 32 bytes = 8 instructions of 32 bits | `LINE_BYTES`, `WORD_W` |
| Lines / sets | 1024 / 32 | derived |
| Fetch width | 4 instructions | `FETCH_W` |
| Address | 32 bits | `ADDR_W` (own choice) |

A byte address splits into `tag[31:10] | set[9:5] | word[4:2] | byte[1:0]`.
A line is numbered `{set, way}` (10 bits). This number addresses the data
array and the Predicted Mask Table alike.

## How the word mask is formed

Every fetch starts at word `s` of a line (`s = pc[4:2]`). Three 8-bit
masks over the words of the line are ANDed:

| Mask | Bit `w` is set when | Removes |
|---|---|---|
| `seg_mask` | `w` is in the aligned 4-word segment holding `s` | the other half line |
| `target_mask` | `w >= s` | words before a branch target (branch in) |
| `pred_mask` | the PMT entry has no taken branch at or after `s`, or `w <= pos` | words after a predicted-taken branch at word `pos` (branch out) |

`fetch_mask = seg_mask & target_mask & pred_mask` is what the wordline
drivers see (`arr_word_en` on the top).

Branch in needs no prediction. The fetch address is already the target
computed by the BTB and branch predictor in the previous cycle, so its word
offset is exact. Branch out does need one. The branch predictor's verdict
on the line being fetched arrives in the same cycle as the array access,
which is too late to gate the wordline. The **Predicted Mask Table (PMT)**
fills that gap. It has one entry per cache line and remembers the verdict
from the last time the line was fetched.

Example: a fetch at word 5 (a branch target) of a line whose PMT entry
records a taken branch at word 6:

```
word         7 6 5 4 3 2 1 0
seg_mask     1 1 1 1 0 0 0 0
target_mask  1 1 1 0 0 0 0 0
pred_mask    0 1 1 1 1 1 1 1
fetch_mask   0 1 1 0 0 0 0 0   -> 2 words read instead of 4 (or 8)
```

## The Predicted Mask Table and mask misses

A PMT entry is `{taken, pos[2:0]}`: does the line hold a branch that was
predicted taken, and at which word. The paper specifies the taken flag. The
position is this implementation's own addition, because a mask cannot be
built without it. Entries are updated in the cycle of every hit, from the
branch predictor's outcome for the fetched words (`req_bp_taken`,
`req_bp_pos`):

* If a branch is predicted taken at word `q`, the entry becomes `{1, q}`.
* If no branch is predicted taken, and the entry points inside the
  fetched words, the entry is cleared.
* Otherwise the entry is left alone. A recorded branch before the fetch
  address therefore does not apply to this fetch, and it also survives the
  fetch.

An entry is cleared when its line is refilled. Entries have no reset,
because an entry is read only for a valid line.

The PMT can be wrong. It may say "taken at word 1" when the predictor now
says the branch is not taken. The words after word 1 are then needed but
were not read. This is a **mask miss** (`mask_miss` output). The cache then
spends one extra cycle reading only the missing words of the same line. It
merges them with the words already read and delivers the complete fetch one
cycle late. A PMT that trims too little only costs energy: extra words are
read, and `rsp_mask` still marks only the used ones. The paper claims that
the predictor costs no performance. It does not say how a wrong mask is
recovered. The one-cycle replay is this implementation's choice, and it is
the only performance cost of the mechanism here.

## Interface and timing (`fmp_icache`)

```
fetch side                         memory side
  req_valid/req_ready  ->            mem_req_valid/mem_req_ready, mem_req_addr (line aligned)
  req_pc, req_bp_taken, req_bp_pos   mem_rsp_valid, mem_rsp_data[8][32] (word 0 first)
  rsp_valid, rsp_pc  <-            observation
  rsp_words[4][32], rsp_mask[4]      arr_rd_en, arr_word_en[8], mask_miss
```

* `req_ready` depends only on the controller state. It is high in the
  normal state, so one fetch can be accepted every cycle.
* `req_bp_taken/req_bp_pos` are the branch predictor's outcome for the
  fetch block being requested. `req_bp_pos` is the word of the line holding
  the first predicted-taken branch, and it must lie within the fetched
  words (an assertion checks this). These inputs update the PMT and detect
  mask misses. They never shape the mask of the same fetch.
* **Hit:** in cycle *t* the CAM search, the PMT read, the mask and the
  array read enables are all combinational. `rsp_valid` is high in cycle
  *t+1*, with the four words of the segment (unread words are zero) and
  `rsp_mask` = the words from the fetch address up to the predicted-taken
  branch.
* **Mask miss:** `req_ready` is low in *t+1*, while the missing words are
  read, and the response comes in *t+2*.
* **Cache miss:** the line is requested from memory, written into the
  set's round-robin victim way, and its PMT entry is cleared. The request
  is then looked up again, and the response follows one cycle after that
  lookup. `req_ready` stays low throughout. There is no second level of
  cache.

The controller in `fmp_icache` has five states: `S_RUN`, `S_REPLAY` (mask
miss), `S_MEM_REQ`, `S_MEM_WAIT` and `S_RETRY` (lookup after the fill).

## Modules

| File | Contents |
|---|---|
| `rtl/fmp_pkg.sv` | default geometry |
| `rtl/fmp_icache.sv` | top: access multiplexing, controller, refill, response/merge stage |
| `rtl/fetch_mask_predictor.sv` | the three masks, needed-word mask, mask-miss flag, PMT update rule |
| `rtl/pmt.sv` | Predicted Mask Table, 1024 × 4 bits, combinational read |
| `rtl/cam_tag_array.sv` | CAM tags: 32 sets × 32 ways, combinational search, fill write |
| `rtl/seg_data_array.sv` | data array as one memory per word column, per-word read enable, registered output |

The CAM cells and the segmented wordline drivers are circuits. Here they
are modelled behaviourally as synthesizable logic: flip-flops with
comparators for the CAM, and one memory column per word with its own read
enable for the data array. They show which words are read in each cycle,
which is the quantity that decides the energy. They say nothing about
circuit-level energy. The branch predictor/BTB, the processor and main
memory are outside this RTL. The end-to-end testbench models them.

## Own choices, not from the source design

* The request/response protocol, the one-cycle hit latency and back-to-back
  fetching.
* The one-cycle mask-miss replay.
* The valid/ready refill handshake with a one-beat line response.
* Round-robin replacement.
* The PMT's position field and its update rule.
* A PMT branch before the fetch address is ignored.
* The 32-bit address.
* Disabled words read as zero.
* The flip-flop CAM model.

The ANDing of the target and predicted masks follows the source, which
says the two masks are "combined"; AND is the only combination that keeps
just the words both allow. The source's target mask runs "to the end of
the line". ANDed with the 4-word segment, this becomes "to the end of the
segment".

## Simulation

Verilator 5, from the repository root:

```
verilator --binary --timing --assert --top-module tb_fmp_icache \
    -y rtl rtl/fmp_pkg.sv tb/tb_fmp_icache.sv
./obj_dir/Vtb_fmp_icache
```

The same works for `tb_fetch_mask_predictor`, `tb_pmt`, `tb_cam_tag_array`
and `tb_seg_data_array`. Every testbench runs at the default sizes. Each
ends with a `TB_RESULT checks=N failures=M` line and has a watchdog.

* `tb_fmp_icache` surrounds the cache with a synthetic program, a branch
  predictor and a memory:
  * The program's instructions, branches (about one word in six) and
    branch targets are hash functions of the address.
  * The predictor's per-branch verdicts flip now and then, which produces
    mask misses.
  * The memory has random handshake delays.
  * The program runs 60,000 fetches: a 2 KB loop, then a 96 KB region
    (three times the cache), then the loop again.

  An independent model of the tags, the round-robin replacement and the
  PMT predicts every hit or miss, every `arr_word_en`, and every mask miss.
  The testbench checks each response's words, mask and latency (1 cycle,
  or 2 after a mask miss). It requires that hits, misses, evictions,
  memory back-pressure, branch-in trimming, branch-out trimming, both
  together, and mask misses all occur. It prints the words read against
  whole-line and whole-segment reads. On this stream, about 59% fewer words
  are read than with whole-line reads, and about 18% fewer than with
  segment-only reads, at a cost of about one mask miss per 60 hits. These
  are word counts for one synthetic stream. They are not energy figures.
  For comparison, the source reports I-cache energy savings of about 44%
  over the whole-line design and about 6% over the segment-only design,
  measured on MiBench programs.
* `tb_fetch_mask_predictor` checks all masks against a reference model,
  over 20,000 random fetches and branch outcomes.
* The CAM, data-array and PMT testbenches check their block against a
  stored copy of the contents.

## Limits

* The MiBench programs used to evaluate the technique need a processor
  model and cannot be run on the cache alone.
* Energy is not modelled. `arr_word_en` is the activity an energy model
  would weight.
* An 8-word line with 4-word fetch is what the defaults and testbenches
  cover. The modules take other powers of two as parameters, but only the
  defaults have been simulated.
