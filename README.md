# Modified bit-vector packet classifier

A packet classifier compares the header of every packet with a list of
rules and reports the first rule that matches. Here a rule is a four-part
condition: a prefix on the source address, a prefix on the destination
address, a range on the source port and a range on the destination port.
A simple approach compares the header with every rule in turn. This
design uses **bit vectors** instead, so that no per-rule comparison runs
on the address fields at all:

* Each field is split into 4-bit **sub-fields**. For every sub-field and
  every one of its 16 possible values there is a precomputed N-bit vector
  (N = number of rules). Bit *i* of that vector says whether rule *i*
  accepts that value in that sub-field.
* Classifying a header means reading one vector per sub-field and ANDing
  them. A bit that survives every AND belongs to a rule that matches the
  whole field.
* Ports are matched by range, not by prefix, so they cannot be stored as
  per-value vectors. Instead each rule keeps a lower and an upper bound.
  The bounds are compared one sub-field per stage, in the same pipeline
  rhythm as the address lookup.
* The vectors of all fields are ANDed. A priority encoder then picks the
  lowest-numbered surviving rule.

With 16-bit fields and 4-bit sub-fields the pipeline has four stages. A
new header can enter on every clock, and its result comes out exactly
four clocks later.

## Block structure

```
 bytes ─► pgm ─► hem ─┬─ SA ─► mbv_field (4 stages) ── BV_SA ─┬───────────────┐
                      ├─ DA ─► mbv_field (4 stages) ── BV_DA ─┼──────────┐    │
                      ├─ SP ─► rs_field  (4 stages) ◄─ BV_SA ─┘          │    ├─► net_aggregator ─► prio_encoder ─► rule
                      └─ DP ─► rs_field  (4 stages) ◄─ BV_DA ────────────┘    │    (6-way AND)
                                 └── BV_SP_L, BV_SP_H, BV_DP_L, BV_DP_H ──────┘
                      └──────────────────── mbv_pc_core ──────────────────────────────────────────┘
```

| module | role |
|---|---|
| `mbv_pc_top` | complete classifier: byte stream in, rule number out |
| `pgm` | packet framing: accepts bytes from SOP to EOP and discards errored packets |
| `hem` | header extractor: pulls the IPv4 addresses and TCP ports out of the byte stream |
| `mbv_pc_core` | classification engine: four field pipelines, aggregator, priority encoder |
| `mbv_field` / `mbv_stage` | bit-vector lookup for one address field, and one of its stages |
| `rs_field` / `rs_stage` | range search for one port field, and one of its stages |
| `net_aggregator` | AND of the six field vectors |
| `prio_encoder` | lowest set bit of the match vector, plus a match flag |
| `pc_pkg` | shared constants, the header struct `hdr_t` and the configuration target enum |

Default parameters: `W = 16` (field width), `K = 4` (sub-field width),
`N = 32` (rules). The number of rules is this design's own choice. Only
W and K are fixed by the original design.

## The address pipeline (`mbv_stage`, `mbv_field`)

Stage *s* (s = 0..3) holds a 16-entry memory of N-bit rows. Stage 0 is
addressed by header bits [15:12], stage 1 by [11:8], and so on. In each
clock a stage does three things:

1. it reads `row = mem[sub-field]`;
2. it computes `bv_out = row & bv_in`;
3. it registers `bv_out` together with the header, for use by the next stage.

The first stage's `bv_in` is the **rule-enable vector**. This register is
cleared at reset, so nothing can match until the rules are loaded and
enabled.

Memory contents for a prefix or ternary rule (value `v_i`, mask `m_i`):

    row_s[x] bit i = ((x XOR v_i[sub-field s]) AND m_i[sub-field s]) == 0

A rule with a don't-care sub-field therefore has its bit set in all 16
rows of that stage. The whole lookup needs 2 fields × 4 stages × 16 rows
× 1 bit = 128 bits per rule, which is 16 bytes per rule.

## The range search (`rs_stage`, `rs_field`)

This is the least obvious part of the design. The result required is
`BV_Lout[i] = (port >= LB_i)` and `BV_Hout[i] = (port <= UB_i)`. The work
is spread over four stages, one 4-bit sub-field each, starting with the
most significant.

Comparing each sub-field on its own and ANDing the four results would be
wrong. For example, 0x1F00 >= 0x0F01 is true, but the low nibble 0 is
not >= 1. So every stage carries two state bits per rule and per bound
down the pipeline:

    lower bound:  gt' = gt | (eq & nib > LB_nib)      eq' = eq & (nib == LB_nib)
    upper bound:  lt' = lt | (eq & nib < UB_nib)      eq' = eq & (nib == UB_nib)

The pipeline starts with `gt = lt = 0, eq = 1`. After the last stage:

* `port >= LB` is `gt | eq`
* `port <= UB` is `lt | eq`

The bounds are stored in per-rule registers inside `rs_field`. After
reset every rule holds the empty range (LB = 0xFFFF, UB = 0).

**Address vector on the port pipelines.** The source-port pipeline also
receives `BV_SA`, and the destination-port pipeline receives `BV_DA`. The
address and port pipelines both take four stages, so the address vector
for a packet is ready only in the clock when the port comparison
finishes. It is therefore ANDed into `BV_Lout`/`BV_Hout` at the output of
the last range stage, without adding a clock. The aggregator ANDs the
address vectors in again, so this qualification changes no result. It
is kept because it is part of the original structure.

## Aggregation and priority

`net_aggregator` ANDs the six vectors `BV_SA`, `BV_DA`, `BV_SP_L`,
`BV_SP_H`, `BV_DP_L` and `BV_DP_H`. `prio_encoder` reports
`match = |bv` and `rule` = the lowest set bit, so **rule 0 has the
highest priority**. Both blocks are combinational and sit behind the
stage-4 registers of `mbv_pc_core`. This is what keeps the latency at
four clocks. If timing requires it, a register can be added after the
encoder, which makes the latency five clocks.

## Packet front end (`pgm`, `hem`)

`pgm` takes one byte per clock, with `in_valid`, `in_sop`, `in_eop` and
`in_err`:

* It forwards a packet from its SOP byte to its EOP byte.
* It drops bytes that arrive outside a packet.
* If a byte of an open packet carries `in_err`, or a new SOP arrives
  before EOP, it pulses `out_abort` and drops the rest of that packet.

It counts good packets in `pkt_ok` and discarded packets in `pkt_drop`.

`hem` expects frames laid out as follows:

* a 14-byte Ethernet header, with EtherType 0x0800 checked; `L2_BYTES`
  sets the header length, and the EtherType check applies only when it
  is 14;
* an IPv4 header, where the IHL field locates the TCP header;
* a TCP header, whose first four bytes are the two ports.

`hem` captures the fields as the bytes pass. It releases the header only
on EOP, so a packet aborted by `pgm` is never classified. A packet that
is too short, not IPv4 or not TCP gives a `hdr_drop` pulse instead of a
header.

`mbv_pc_top` matches the **upper 16 bits** of each 32-bit IPv4 address,
because the rule width is 16. The ports are matched whole.

## Timing summary

| path | clocks |
|---|---|
| `mbv_pc_core`: header in → `out_valid` | 4 (one per stage) |
| `pgm` | 1 |
| `hem`: EOP byte → header | 1 |
| `mbv_pc_top`: EOP byte at input → `cls_valid` | 6 |

The core accepts one header per clock. The byte-wide front end carries
one byte per clock, so end to end the design handles one packet per
packet-length in clocks (at least 54 clocks for a minimal
Ethernet/IPv4/TCP frame). There is no back-pressure anywhere.

## Loading rules

All tables are written through one port of `mbv_pc_core` (brought out
unchanged on `mbv_pc_top`). Set `cfg_we` for one clock per write:

| `cfg_tgt` | meaning |
|---|---|
| `CFG_SA`, `CFG_DA` | row `cfg_index` (a sub-field value, 0..15) of stage `cfg_stage` ← `cfg_bv` |
| `CFG_SP`, `CFG_DP` | bounds of rule `cfg_index` ← `cfg_lb`, `cfg_ub` |
| `CFG_RULE_EN` | rule-enable vector ← `cfg_bv` |

Turning rules into rows is done in software. `tb/pc_tb_pkg.sv` contains
the formula (`subfield_ok`) and a reference matcher (`rule_hit`). A write
takes effect for headers that enter in the following clock. Writing
while traffic flows is allowed, but a packet already in the pipeline may
then see a mix of the old and new tables.

## Where this departs from the original description, or goes beyond it

* **Per-stage range comparison.** The original describes each range
  stage as comparing one sub-field and ANDing the stage results. That is
  not a correct `>=`/`<=` on the whole field. The carried gt/eq state
  described above is used instead. It gives the full-field comparison
  that the original's comparator diagram shows.
* **Output names.** `BV_Lout` is the lower-bound result (`>= LB`) and
  `BV_Hout` the upper-bound result (`<= UB`), as the description names
  them. The original diagram can be read the other way round; the
  difference only matters for naming.
* **Address vector timing.** The address vector enters the range search
  at its last stage, not its first, as explained above.
* **Address width.** The original sets the rule width to 16 bits for all
  fields. IPv4 addresses are therefore matched on their upper 16 bits.
* **Five-tuple.** The protocol field is not matched; the original
  matches only the four fields.
* **Throughput.** The figures reported for the original design (986.2
  Mpps and 74.95 Gbps at 493.1 MHz) imply two packets, or 152 bits, per
  clock. The architecture described has one pipeline taking one header
  per clock, and that is what is built.
* **Size.** The rule count is not given in the original; N = 32 here.
  Coarse synthesis of the top gives about 3.8 k flip-flops and 4096
  memory bits. The original reports 3110 slice registers on an Artix-7,
  for an unknown N.
* **Own choices** that the original leaves open include the byte
  interface and error flag of `pgm`, the parsing checks in `hem`, rule
  loading, reset behaviour (asynchronous, active low; BV memories are not
  reset) and the priority order.

## Simulation

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each
prints `TB_RESULT checks=<n> failures=<n>` and stops itself with a
watchdog. For example, to run the end-to-end test (which uses the top's
default parameters):

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/pc_pkg.sv tb/pc_tb_pkg.sv rtl/*.sv tb/tb_mbv_pc_top.sv \
    --top-module tb_mbv_pc_top -Mdir obj_top
./obj_top/Vtb_mbv_pc_top
```

For another block, swap the testbench file and the top module name.

The testbenches compare against models written independently in the
testbench:

* `tb_mbv_pc_core` streams 2000 headers, one per clock, against a random
  32-rule set that contains overlapping rules and disabled rules. It
  checks the vector, the rule number and the 4-clock latency of every
  result.
* `tb_mbv_pc_top` sends 400 frames as bytes. The mix includes errored,
  truncated, stray and UDP traffic and back-to-back frames, and each of
  these cases must occur at least once. For every classified frame it checks the chosen rule
  and the 6-clock latency.
* `tb_mbv_pc_workload` keeps the core busy on every clock. It checks
  that it delivers one result per clock with 4 clocks of latency.
