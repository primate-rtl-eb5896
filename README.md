# In-memory top-k token selection for token-pruning Transformers

Dynamic token pruning shrinks a Transformer's work layer by layer. After the
attention of each layer, every token gets an importance score: the sum of the
attention probabilities that all tokens give it. Only the k tokens with the
largest scores go on to the feed-forward part and to the next layer.
PRIMATE is a processing-in-memory accelerator built on HBM2E. In it, the
attention itself is computed inside the DRAM banks. The scores are spread over
the banks as partial sums, so the selection has to happen next to the memory
too. Sending the scores to the host CPU costs up to a quarter of the run time.

This RTL is the selection hardware: one **Top-k Engine** per HBM2E channel,
16 per stack. It sits on the channel's 256-bit data path and takes the
banks' 8-bit partial sums at the full channel rate, 32 per clock. It keeps a
sorted list of the k best tokens in a small reserved region of the channel's
own memory. The DRAM, the bit-serial in-array arithmetic and the near-bank
reduction units belong to the memory and are not part of this RTL. Their
results reach the engines as the 256-bit beats on the engines' input ports.

## Data path of one engine

```
 256-bit beat ──► 4 × 8-to-1 accumulators ──► 4-stream bitonic sorter ──► Sorted Buffer
 (32 partial sums)   (te_accum8)                (te_bitonic_sorter)            │ first key
                                                                               ▼
                                            Segment Range LUT (te_seg_lut) ── probe
                                                                               │ start segment / drop
   reserved memory (te_seg_mem) ──► Segment Buffer ──► 2n bitonic merger ──► Merged Buffer ──► write back
        ▲                                                (te_bitonic_merger)     │
        └──────────────────────────── New Range Detection (te_range_detect) ──► LUT update
```

1. **Accumulation.** A beat holds 32 bytes. Bytes 8a…8a+7 are the partial
   sums of token a (a = 0…3) in eight banks. Each accumulator adds its eight
   bytes. A channel has 16 banks, so a token group may take more than one beat:
   `in_first` starts a group and `in_last` ends it. The result saturates to
   8 bits. Four token scores come out per group.
2. **Sorting into lists of n = 32.** The sorter collects 4 scores per clock.
   After 8 groups it sorts all 32 with a bitonic network and loads the result,
   in descending order, into its Sorted Buffer. At full input rate it makes one
   list every n/4 = 8 clocks.
3. **Insertion into the segmented top-k list.** This step is described in the
   next section.
4. **Read-out.** When `done` is set, the host reads the list one segment per
   request (`rd_en`, `rd_seg`). Each entry gives the token index and its score.

## The segmented top-k list

The list of the k best tokens is stored as `k/32` **segments** of 32 entries.
The segments are in descending order: segment 0 holds the largest scores, and
each segment is sorted inside. A segment is one memory row, so the engine can
read or write a whole segment in one access. The **Segment Range LUT** keeps
every segment's largest and smallest key in registers. With it, the engine
decides where a new list goes without reading the memory.

A new sorted list L is inserted as follows:

* **Probe.** The LUT looks for the first segment whose minimum is below L's
  first (largest) key. If no segment qualifies, every stored score is at least
  as large as anything in L. L is then **dropped**, at a cost of one clock.
* **Walk.** Starting from that segment s, the engine reads one segment per
  clock. The merger combines the segment with the carried list (L at first):
  the 64 entries form a bitonic sequence, and six half-cleaner stages sort it.
  The upper 32 go to the Merged Buffer. One clock later they are written back
  to the same segment, and New Range Detection puts the segment's new maximum
  and minimum into the LUT. The lower 32 become the carry for segment s+1.
  Segments before s are not touched.
* **End.** After the last segment in use, the carry falls off the end of the
  list. This is how the list stays at k entries. The walk also ends early when
  the carry's largest key is not above the last segment's minimum, because
  nothing in the carry can enter the list any more.

A walk costs one clock per segment, plus one clock to probe and one to write
back the last segment. When a walk takes longer than the 8 clocks the sorter
needs for its next list, the sorter holds that list and `in_ready` falls. The
channel stream then stalls. Once the list has filled with high scores, most
new lists are dropped or end their walks early.

Entries carry a valid bit above the score. Their key is `{valid, score}`. An
empty slot therefore ranks below a real token whose score is 0. After `start`,
every LUT range is 0, and a segment whose LUT maximum is 0 is read as empty.
As a result, the reserved memory never needs to be cleared.

## Layers spread over several channels

When a layer's tokens live in the banks of several channels, each of those
channels' engines accumulates its own banks. Engine c adds engine c-1's
running sums (`cfg_chain_en[c]`). Only the engine at the end of the chain
(`cfg_sort_en`) sorts and keeps a list. The chain is combinational, so the
beats for one token group must reach every channel of the chain in the same
clock. The engines earlier in the chain take their `in_ready` from the next
engine, so the whole chain stalls together.

## Files

| file | what it is |
|---|---|
| `rtl/primate_pkg.sv` | widths, the entry struct `te_entry_t` and the key function |
| `rtl/primate_topk_stack.sv` | **top**: `NUM_CH` engines and the partial-sum chain |
| `rtl/te_topk_engine.sv` | one engine: control state machine and buffers |
| `rtl/te_accum8.sv` | 8-to-1 accumulator |
| `rtl/te_bitonic_sorter.sv`, `rtl/te_sort_net.sv` | 4-stream sorter and its bitonic network |
| `rtl/te_bitonic_merger.sv` | 2n-input bitonic merger |
| `rtl/te_seg_lut.sv` | segment range LUT |
| `rtl/te_range_detect.sv` | new range detection |
| `rtl/te_seg_mem.sv` | the reserved memory region, one segment per row |
| `tb/tb_*.sv` | one self-checking testbench per module; `tb_primate_topk_stack` is the full-size end-to-end test |

Default parameters: `NUM_CH = 16`, `SEG_N = 32` (n) and `MAX_SEGS = 128`.
With 128 segments, k can be up to 4096 and the score part of the list is
4 KB. The token index is 12 bits wide, which covers sequences of up to 4096
tokens. That is enough for the sequence lengths the design was evaluated on
(128, 786, 3137 and 4096 tokens). For those lengths, keeping 80% of the
tokens needs at most 103 segments.

## Interface and timing of the top

Every port of `primate_topk_stack` is an array indexed by channel.

* `start[c]` is a one-clock pulse. It latches `cfg_k_segs[c]` (1…128
  segments, so k = 32·cfg_k_segs), clears the LUT and the token counter, and
  opens the input.
* `in_valid/in_ready` is a valid/ready beat handshake. Along with each beat
  come `in_first`, `in_last`, `in_stream_last` and `in_tok_mask`. A 0 in the
  mask leaves that token group's slot empty, which is used for a layer whose
  token count is not a multiple of 4. Token indices count up from 0 in stream
  order: beat group g, lane a is token 4g+a.
* `done[c]` rises after the last list has been inserted and stays high until
  the next `start`. `busy[c]` is high in between.
* After `rd_en`, `rd_data` and `rd_valid` follow one clock later.
* `ev_drop`, `ev_merge` and `ev_early` are one-clock pulses: a list was
  dropped, a segment was merged, a walk ended early. They are for monitoring.

Reset is asynchronous and active low. The memory contents are not reset.

## Where this RTL departs from, or adds to, the published design

* Each entry carries a token index and a valid bit. The publication speaks
  only of the sorted values. Without the index, the list could not say which
  tokens survive. Because of these fields, a memory row is 32 × 21 bits, not
  32 × 8.
* The insides of the 4-stream sorter are not published. Here the sorter
  gathers 32 scores and sorts them with one parallel network. This matches the
  published rate of one list every n/4 clocks, but not necessarily the
  published area.
* Saturating the accumulated score to 8 bits, grouping a token over several
  beats, chaining between neighbouring channels, ending walks early, merging
  one segment per clock, and all handshakes are choices of this RTL.
* k is a whole number of segments. For another k, use the first k entries of
  the list.
* The reserved region of channel DRAM is modelled as an ordinary synchronous
  memory with one read port and one write port. DRAM timing and the channel
  protocol are not modelled.
* Not included: the HBM2E dies, the bit-serial in-array arithmetic, the
  near-bank reduction units, the inter-bank links, and the offline optimiser
  that maps pipeline stages onto banks.

## How far it is checked

Each module's testbench compares its outputs with results computed
independently in the testbench. These include the sorter's rate of one list
every 8 clocks, random back-pressure, ties and empty slots.

The end-to-end test `tb_primate_topk_stack` runs all 16 engines at default
size at the same time:

* one layer chained over three channels;
* layers of 128, 786, 3137 and 4096 tokens that keep about 80%;
* smaller layers with very small k or with fewer tokens than k.

For every engine it checks the entire read-out list against a histogram of
the expected top-k scores and checks every returned token's score. It also
checks that drops, early-ended walks, stalls, chaining, saturation, two-beat
groups and partly filled last lists each actually happened.

`tb_workload_layers` runs four evaluated models through all 12 of their
layers, each on its own channel. The models are a 786-token ViT, a 3137-token
ViT, a 128-token BERT and a 4096-token RoBERTa. Every layer keeps 80% of its
tokens and passes the rest on as the next layer's input. The testbench checks
each of the 48 lists in the same way. Only functional behaviour is checked. No timing closure or power figures come with this RTL.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
  rtl/primate_pkg.sv tb/tb_primate_topk_stack.sv --top-module tb_primate_topk_stack
./obj_dir/Vtb_primate_topk_stack
```

Use the same command for any other `tb/tb_<module>.sv`. Each testbench ends
by printing `TB_RESULT checks=N failures=M`. To change n or the list size,
override `SEG_N` and `MAX_SEGS` on the top. `SEG_N` must be a power of two and
a multiple of 4. If k may exceed 4096 or sequences are longer than 4096
tokens, widen `IDX_W` in the package.
