# DM-hash routing lookup engine

A core router must find, for every packet, the longest routing-table prefix that
matches the packet's destination address. It must do this at line rate, with the
table kept in off-chip SRAM. The SRAM-to-chip bandwidth sets the limit. A lookup that
fetches `t` buckets of `s` bits each caps the rate at `B / (t*s)` lookups per second.
So the best design fetches exactly one bucket per packet, and keeps buckets small by
spreading the prefixes evenly over them.

Hashing each prefix with a single function gives uneven buckets. Classic multi-choice
hashing places each prefix in the least-loaded of `k` candidate buckets, which evens
the load. But the lookup no longer knows which candidate holds the prefix, so it has
to fetch all `k`.

**Deterministic multi-hashing (DM-hash)** keeps the balancing and still fetches one
bucket. A small on-chip *index table* of `x` entries (`x` much smaller than the number
of buckets `m`) sits between the prefix and the bucket:

```
bucket(p) = index[H1(p)] XOR index[H2(p)]      (low log2(m) bits)
```

The lookup hardware only hashes, reads two index words, XORs them and fetches that
one bucket. All the cleverness lies in the *values* stored in the index table. An
offline setup algorithm chooses them to even out the buckets (see
[How the index values are chosen](#how-the-index-values-are-chosen-setup-not-in-rtl)).

This repository holds synthesizable SystemVerilog for the lookup datapath, and the
testbenches that check it.

## Lookup datapath

```
 in_dst ──► dm_hash_fn ──H1,H2──► dm_index_table ──e1,e2──► dm_bucket_id ──bucket──►
 (32 b)    first PFX_LEN bits     16K x 24 b, 2 read ports   XOR, low 19 b

   ──► dm_bucket_fetch ──sram_rd_*──► [off-chip QDR SRAM, 72-bit words]
        WPB reads per bucket ◄──sram_rd_valid/data──┘
            │ 144-bit bucket + address
            ▼
       dm_bucket_search ──► hash result queue ─┐
                                               ├─► dm_result_select ──► out_*
 in_dst ──tcam_req/key──► [external TCAM] ──► TCAM result queue ─┘
```

| Module | Role |
|---|---|
| `dm_pkg` | Widths, the bucket layout helpers (`words_per_bucket`, `flag_w`), the slot struct and the `src_e` result-source enum |
| `dm_hash_fn` | The two hash functions (combinational) |
| `dm_index_table` | On-chip index table: two synchronous read ports, one write port |
| `dm_bucket_id` | XOR of the two index words, cut to `log2(m)` bits |
| `dm_bucket_fetch` | Issues the reads for one bucket, overlapped across packets, and reassembles the bucket |
| `dm_bucket_search` | Compares all slots of the bucket in parallel; the longest match wins |
| `dm_result_select` | Merges the TCAM answer and the hash-table answer by prefix length |
| `dm_fifo` | Small show-ahead queue (helper) |
| `dm_lookup_top` | Wires the above into the pipeline, with the handshakes and the in-flight limit |

### Hash functions

The design looks only at the first `PFX_LEN` bits of the address, `p = dst[31 -: PFX_LEN]`.
For the default `PFX_LEN = 23` that is `dst[31:9]`, with a 14-bit index address:

* `H1(p)` = the 14 low-order bits of `p`, which are `dst[22:9]`. This is a plain bit
  selection.
* `H2(p)` = those bits XOR the next 14 higher-order bits of `p`. Only 9 higher bits
  exist (`dst[31:23]`); the missing ones count as zero.

If the high-order field is zero, both hashes name the same entry. The XOR is then 0,
and the prefix always lands in bucket 0. At the default size this happens only for
prefixes inside 0.0.0.0/9, which real tables do not route. The setup software must
keep any such prefix in the TCAM.

### Which prefixes live where (longest-prefix match)

Prefix lengths are split in two:

* Lengths 8–18 and 25–32 are rare, under 10% of a backbone table. They go to a
  conventional external TCAM.
* Lengths 19–24 are *expanded*. Every prefix shorter than `PFX_LEN` is replaced by
  the `PFX_LEN`-bit prefixes it covers. The hash table therefore holds only lengths
  `PFX_LEN`..24, and all of them are hashed on their first `PFX_LEN` bits. A prefix
  and every longer prefix below it share those bits, so they land in the same
  bucket.

The engine sends each address to the TCAM and into the hash pipeline at the same time.
Every TCAM prefix is either shorter or longer than every hash-table prefix, so the
longest match is chosen in this order:

1. a TCAM hit of length 25 or more;
2. otherwise, a hash-table hit;
3. otherwise, a TCAM hit of length 8–18;
4. otherwise, no route (`out_hit = 0`).

`out_src` reports which case applied. A hash-table hit shows as `SRC_HASH_24` for a
/24 prefix and as `SRC_HASH_SHORT` for a shorter, expanded one.

### Bucket format in SRAM

Bucket `b` occupies SRAM words `WPB*b .. WPB*b+WPB-1`, with word 0 in the low bits.
Inside the `WPB*72`-bit bucket:

| Bits | Content |
|---|---|
| `[40*j +: 40]`, j < OMEGA | slot j: `{prefix[23:0], port[15:0]}`, prefix left-aligned, unused low bits 0 |
| `[40*OMEGA + j*FW +: FW]` | slot j flags: `{valid, len_off}`, prefix length = 24 − `len_off` |
| rest | unused, write 0 |

`FW = 1 + clog2(24 − PFX_LEN + 1)`, which is 2 bits for expansion to 23.
`WPB = ceil(OMEGA*(40+FW)/72)`. For the default `OMEGA = 3` this gives 126 of 144
bits, i.e. 2 words: the same count as for bare 40-bit slots. The flags fill bits that
would otherwise be padding. For a few larger `OMEGA` they cost one extra word (for
example `OMEGA = 9` needs 6 words instead of 5).

A slot matches when it is valid, its length is in `PFX_LEN..24`, and its prefix
equals that many leading address bits. Among matches the longest wins; among
matches of equal length the lowest slot wins.

## Timing and throughput

* **Rate.** `dm_bucket_fetch` issues one SRAM read per cycle, and accepts the next
  bucket in the cycle it issues the current bucket's last word. With addresses
  waiting, the engine therefore accepts one lookup every `WPB` cycles: every 2 cycles
  at the defaults. With a 500 MHz QDR SRAM clock that is 250 M lookups/s.
  Hashing, searching and merging overlap with the fetches of other packets.
* **Latency.** From `in_valid & in_ready` to `out_valid` takes `4 + WPB + L` cycles,
  where `L` is the SRAM read latency. That is 10 cycles with `L = 4`, as measured in
  simulation.
* **Back-pressure.** `in_ready` is low while stage 1 holds an address the fetch unit
  cannot take yet. It is also low while `MAX_INFLIGHT` (8) lookups are unfinished;
  this limit bounds the two result queues. At the start of a burst, stage 1 can take
  one extra address, so the first two accepts may be one cycle apart. After that the
  spacing is exactly `WPB`.
* **Ordering.** Results leave in arrival order, and `out_valid` cannot be stalled.
  The SRAM and the TCAM must both answer in request order. Their latencies may be any
  value (the fetch unit is tested with 3 and 40 cycles). `out_valid` pulses one cycle
  after both answers for the oldest lookup are present.
* **Reset.** Synchronous and active-low. It clears control state: valid bits,
  counters and queue pointers. It does not clear the index table or data registers.

## Interfaces of `dm_lookup_top`

| Group | Signals | Notes |
|---|---|---|
| Lookup in | `in_valid`, `in_ready`, `in_dst[31:0]` | valid/ready |
| Index load | `cfg_we`, `cfg_addr[13:0]`, `cfg_data[23:0]` | one entry per cycle. A read in the same cycle as a write to the same entry returns the old word |
| SRAM | `sram_rd_en`, `sram_rd_addr[19:0]` out; `sram_rd_valid`, `sram_rd_data[71:0]` in | word address; in-order data |
| TCAM | `tcam_req`, `tcam_key[31:0]` out; `tcam_rsp_valid`, `tcam_rsp_hit`, `tcam_rsp_len[5:0]`, `tcam_rsp_port[15:0]` in | one request per accepted address (`tcam_key` is `in_dst`); in-order answers |
| Result | `out_valid`, `out_dst`, `out_hit`, `out_port[15:0]`, `out_src` | `out_port` is meaningful only when `out_hit` |

The bucket contents are written into the SRAM by the control plane. The engine has no
SRAM write port.

## Parameters

| Parameter | Default | Meaning and origin |
|---|---|---|
| `PFX_LEN` | 23 | Expansion length `i`. Expansion to 23 is the configuration that reaches 250 M lookups/s |
| `IDX_ENTRIES` | 16384 | Index-table entries `x` (16K x 24 bits = 48 KB on chip) |
| `IDX_W` | 24 | Index entry width; enough for up to 2^24 buckets |
| `BUCKET_AW` | 19 | `log2(m)`, so m = 512K buckets. See the note below |
| `OMEGA` | 3 | Slots per bucket Ω. Ω = 3 is the largest that still fits in 2 words, i.e. 250 M/s at 500 MHz |
| `MAX_INFLIGHT` | 8 | Lookups in flight; this design's choice |

How `m` was chosen: the backbone tables this scheme was evaluated on hold up to
about 715K prefixes after expansion to 23 bits. The 250 M/s result was reached at
about 2.2 bucket slots per prefix. 512K × 3 / 715K = 2.2, so `m = 2^19`.

To run another configuration of the evaluation, change the parameters. For example,
expansion to 22 uses `PFX_LEN = 22, OMEGA = 5` and fetches 3 words per bucket (166 M/s
at 500 MHz). For any configuration, the rows of the SRAM image must follow the layout
above.

## How the index values are chosen (setup, not in RTL)

This part runs as control-plane software. It is the reason the hardware can be this
simple. The testbench `tb_dm_setup_workload` contains a working model of it.

1. **Groups and progressive order.** Each prefix touches two index entries. The setup
   orders all entries `e_1..e_x`, building from the last position backwards. At each
   step it takes the not-yet-placed entry whose remaining group is smallest. Its group
   `G_i` is the prefixes that still touch it. Those prefixes are then removed from all
   other groups. The result has two properties:
   * every prefix in `G_i` touches `e_i`;
   * every other entry it touches comes earlier in the order.
2. **Value assignment.** The setup walks the order from `e_1`. When it reaches `e_i`,
   the other entry of every prefix in `G_i` already has a value. So each of the `m`
   candidate values for `e_i` fixes where all of `G_i` goes. The setup picks the value
   whose sorted bucket-load vector is lexicographically smallest (the "min-max"
   vector): smallest largest load, then smallest second-largest, and so on. The model
   compares load histograms counted from the top load down, which gives the same
   order.

At reduced size (1536 prefixes, 1024 buckets, a 512-entry index table) the model gets
the largest bucket down to 3 slots. The single hash function (the second one, cut to 10 bits) gives 7 on the same routes. Over 16 seeds
the result was 2 or 3, once 4. The balance is good on average, not guaranteed. If a
bucket would overflow `OMEGA`, the control plane must rerun the setup or move prefixes
to the TCAM. The RTL does not check for this.

The index-table size matters. On the same routes and buckets, 128, 256 and 512
entries all give a largest bucket of 3. 64 entries give 5, because each entry then
places about 24 routes with a single value choice. On full-size tables the same
effect is what favours a 16K-entry table over a 4K one.

## Verification

Each testbench checks itself against values computed independently of the RTL. Each
prints `TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_dm_hash_fn` | Both hashes against arithmetic models, at the defaults and at `PFX_LEN=24`, 4K entries |
| `tb_dm_index_table` | Full 16K load; both ports one cycle after `rd_en`; hold while `rd_en` is low; rewrites |
| `tb_dm_bucket_id` | XOR and truncation |
| `tb_dm_bucket_fetch` | Word addresses, reassembly and side data. Accept spacing of exactly 2 cycles in back-to-back traffic. Stalling when the in-flight queue is full (40-cycle SRAM) |
| `tb_dm_bucket_search` | Random buckets with overlapping prefixes, invalid slots and out-of-range lengths; expansion to 23 (3 slots) and to 22 (5 slots) |
| `tb_dm_result_select` | Every combination of TCAM length class and hash hit/length |
| `tb_dm_lookup_top` | Whole engine at reduced size (256-entry index, 256 buckets): random index values, random routes, TCAM and SRAM models, random and back-to-back traffic, all checked against a flat longest-prefix match. Requires every result source, input stalls and the 2-cycle spacing to occur |
| `tb_dm_lookup_full` | The same at the default parameters: 16K index entries, 512K buckets, about 4000 hash routes plus TCAM routes |
| `tb_dm_lookup_exp22` | Expansion to 22 with 5 slots: /22, /23 and /24 in one bucket, 3-cycle spacing |
| `tb_dm_setup_workload` | The setup model above feeding the engine. It checks that no bucket exceeds 3 slots and that the result is no worse than single hashing. Fixed seed (`SEED = 1`) |
| `tb_dm_setup_small_index` | The same routes through a 64-entry index table. Buckets reach 5 slots, so the engine is built with `OMEGA = 5` (3 words per bucket) |

The end-to-end benches share `tb/dm_lookup_tb_body.svh`. Each runs in a few seconds.

To run one with Verilator:

```
verilator --binary --timing --assert --top-module tb_dm_lookup_top \
    -Irtl -Itb -y rtl +libext+.sv rtl/dm_pkg.sv tb/tb_dm_lookup_top.sv -o sim
./obj_dir/sim
```

Use the same command with another testbench name.

## Departures, limits and trust

* The lookup follows the scheme as specified: two hash functions, the XOR of two
  index entries, one bucket per lookup, 40-bit slots, 72-bit SRAM words. The
  following are this design's own choices: pipeline structure, handshakes, queue
  depths, per-slot flags, result merge, reset, and the SRAM layout.
* `k` is fixed at 2. The scheme allows any `k`, but the hash functions are defined
  only for two, and two is the evaluated setting. The scheme's optional extra hash of
  the XOR result is not implemented.
* Index entries are 24 bits, and only the low `log2(m)` bits form the bucket ID.
  Storing only `log2(m)` bits would save area.
* `m` must be a power of two.
* Not included: the TCAM, the QDR SRAM and its controller, the setup software, and
  any incremental route update. The testbenches model the TCAM and SRAM behaviourally.
* Only simulation and lint have been done. Neither 500 MHz timing nor the area of the
  16K × 24-bit two-read-port memory has been checked for any technology. A real chip
  would likely use two single-read copies or a multi-port macro here.
* Whether a given real routing table fits in Ω = 3 depends on the setup software.
  The evaluated backbone tables are reported to reach Ω = 3 at m = 512K with a 16K
  index; this has not been re-run here.
