# XnorBV packet classifier

A five-field (5-tuple) IPv4 packet classifier that checks every header against a
whole ruleset in parallel and reports the highest-priority rule that matches.
A header goes in on every clock, and its result comes out three clock edges later.

The main idea is that the address and protocol fields need no lookup tables. Each
rule stores a ternary pattern: every bit is `0`, `1` or `*`. For each rule, the field
is compared with the pattern by one XNOR gate per bit. The XNOR outputs are ANDed
into a single "this rule matches this field" bit. Ports are matched against a range
instead, using two comparators per rule. So no range has to be expanded into
prefixes. Each field gives an N-bit vector, one bit per rule (a "bit vector", BV).
The five vectors are ANDed, and a priority encoder picks the winning rule.

## The header and the rules

The 104-bit header is `xnorbv_pkg::header_t`. From most to least significant bit:

| field | bits | match kind |
|---|---|---|
| source IP | 32 | ternary (prefix or any bit mask) |
| destination IP | 32 | ternary |
| source port | 16 | inclusive range `lo..hi` |
| destination port | 16 | inclusive range |
| protocol | 8 | ternary (exact value or wildcard) |

A rule, `xnorbv_pkg::rule_t` (208 bits), holds the following:

* a value and a care mask for each ternary field. A care bit of 0 makes that bit `*`.
  A /L prefix is a care mask whose top L bits are set. An exact match is an all-ones
  mask. A full wildcard is an all-zero mask.
* `lo` and `hi` for each port. A range with `lo > hi` is empty and matches nothing.

Rules are kept in priority order. Entry 0 has the highest priority, and bit 0 of
every vector belongs to entry 0.

## How a field turns into a bit vector

For rule `n` and a K-bit field `T`, `xnorbv_field` forms
`S = ~(W ^ T) | ~care`. This is the per-bit XNOR, with wildcard bits forced to 1.
It then sets `bv[n] = &S`.

Example with 4-bit rules `1010`, `1*01`, `0010`, `*001` and field `1101`:

| rule | XNOR (wildcards forced to 1) | AND |
|---|---|---|
| 1010 | 1000 | 0 |
| 1*01 | 1111 | 1 |
| 0010 | 0000 | 0 |
| *001 | 1011 | 0 |

Only the second rule matches. `tb_xnorbv_field` checks exactly this case.

`range_match` sets `bv[n] = (field >= lo[n]) && (field <= hi[n])`.

## Pipeline and timing

`xnorbv_classifier` has three register stages:

1. **Field vectors.** The header is split into its five fields. Three `xnorbv_field`
   instances handle the two addresses and the protocol. Two `range_match` instances
   handle the two ports. The five N-bit vectors are registered.
2. **Combine.** `bv_and` ANDs the five vectors bit by bit. The result is masked with
   the rule valid flags and registered. This is the multi-match vector: every rule
   the header satisfies.
3. **Select.** `priority_encoder` finds the lowest set bit, which is the
   highest-priority rule. The index, a hit flag and the multi-match vector are
   registered.

Say a header is present with `in_valid` at rising edge *t*. Its result is then on
`out_rule`, `out_hit` and `out_match_vec`, with `out_valid` high, after edge *t+2*.
That is three edges, counting the one that captured the header. The classifier
takes one header per clock. It has no back-pressure and nothing ever stalls.

Each stage is one level of work: per-rule XNOR/AND trees or 16-bit comparators,
then a 5-input AND, then an N-input priority scan. For N = 8 these are short paths.
Larger rulesets make the priority encoder the longest path.

## Loading rules

`rule_table` keeps the ruleset in flip-flops, so every matcher sees every rule at
once. To load or delete a rule:

* To write, drive `wr_en`, `wr_addr`, `wr_rule` and `wr_valid` for one clock.
  `wr_valid = 0` deletes the entry.
* A write is seen by headers presented from the next clock on. Headers already in
  the pipeline keep the result they started with.
* Reset clears every valid flag, so a freshly reset classifier matches nothing.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N` | 8 | number of rules (vector width) |
| `IW` | `$clog2(N)` | width of the rule index |

The field widths are fixed by the 5-tuple and live in `xnorbv_pkg`. N can be raised
freely. Area grows about linearly with N: roughly 209 flip-flops, 2 x 32 + 8 XNOR
bits and four 16-bit comparators per rule.

## Where this RTL makes its own choices

The source design fixes the field split, the match kinds, XNOR-then-AND, the AND of
the five vectors, the priority encoder and the three-stage, three-cycle pipeline.
The following are this implementation's own choices:

* **Wildcard encoding.** `*` is a separate care bit, applied by ORing after the XNOR.
* **Rule count.** N = 8 is taken from the 8-bit vectors of the reference simulation.
  No rule count is stated outright.
* **Rule storage.** The rules live in loadable registers with a write port and
  per-rule valid flags. The original FPGA build, which has 111 I/Os, appears to have
  had its rules fixed in logic. With the write port, the top has far more pins, so as
  a stand-alone top it would not fit that device's 232-pin package.
* **Handshake and reset.** `in_valid`/`out_valid` and the asynchronous active-low
  `rst_n` are added.
* **Outputs.** `out_match_vec` is exposed for multi-match use alongside the single
  best-match index.
* **No-match result.** When nothing matches, `out_hit = 0` and `out_rule = 0`.

Storage cost is 26 bytes per rule: 208 bits plus the valid flag.

## Files

| file | content |
|---|---|
| `rtl/xnorbv_pkg.sv` | widths, `header_t`, `rule_t`, field order |
| `rtl/rule_table.sv` | rule registers, write port, valid flags |
| `rtl/xnorbv_field.sv` | ternary XNOR/AND matcher, one field x N rules |
| `rtl/range_match.sv` | range matcher, one port x N rules |
| `rtl/bv_and.sv` | AND of the per-field vectors |
| `rtl/priority_encoder.sv` | lowest-set-bit encoder |
| `rtl/xnorbv_classifier.sv` | top level, three-stage pipeline |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Each testbench computes its expected values independently of the RTL, ends with a
`TB_RESULT checks=… failures=…` line and has a watchdog. The testbenches are:

* `tb_xnorbv_field`: the 4-bit example above, then 2000 random cases at 32 bits.
  The cases use exact, prefix, arbitrary and all-wildcard masks.
* `tb_range_match`: a hand-made 4-bit case, then random ranges. These include
  single ports, full and empty ranges, and fields on and next to the bounds.
* `tb_bv_and`: random vectors.
* `tb_priority_encoder`: exhaustive over all 256 inputs.
* `tb_rule_table`: reset, random writes and deletes, against a shadow copy.
* `tb_xnorbv_classifier`: the whole design at default size. It runs three phases:
  an empty table, a directed ruleset, and then about 20,000 random headers with rule
  writes mixed into the traffic. A reference model checks every result and its
  three-cycle latency. The test also counts how often each behaviour occurs: prefix,
  wildcard, range hit and miss, exact protocol, multi-match resolved by priority, no
  match, a write during traffic, and back-to-back headers. A behaviour that never
  occurs counts as a failure.

The top level also asserts three output invariants on every clock while
`out_valid` is high. A hit must name a rule that is in the match vector. No
higher-priority bit may be set. `out_hit` must equal the OR of the vector. Build
with `--assert` to enable these checks.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/xnorbv_pkg.sv tb/tb_xnorbv_classifier.sv --top-module tb_xnorbv_classifier
./obj_dir/Vtb_xnorbv_classifier
```

Replace the testbench name to run any other one. All of them finish in well under a
second.
