# SCDBI: self and coupling driven bus invert coding for NoC links

On a network-on-chip, the long wires between routers burn a growing share
of the power, and most of it goes into charging two kinds of capacitance:
each wire's own capacitance to ground (self capacitance, `c_s`), charged
on every 0→1 edge, and the capacitance between neighbouring wires
(coupling capacitance, `c_c`), charged whenever two neighbours switch
differently. Bus-invert coding attacks the first, coupling-driven
bus-invert the second. SCDBI weighs both at once: for every body flit it
decides whether sending the flit as is or sending its bitwise complement
charges less capacitance, sends the cheaper one, and adds one wire, the
invert line, to tell the receiver which.

The coding works end to end. The source network interface (NI) encodes and
the destination NI decodes, so the routers on the path see ordinary flits
and need no change. Header flits, which the routers have to read, are never
encoded.

This repository holds synthesizable SystemVerilog for the encoder, the
decoder, both network-interface halves and an LFSR traffic source, joined in
one top level (`scdbi_noc_top`), with a self-checking testbench for each.

## The invert rule

Let `y` be the last encoded body flit sent on the link, and `x` the next
body flit, `W` lines wide. With the link power model

    P ∝ T01·c_s + (T1 + 2·T2)·c_c

the cost of a transfer `y → x` counts:

| term | what it counts | cost |
|------|----------------|------|
| `T01` | lines that go 0→1 | `c_s` each |
| Type I | adjacent pairs where exactly one line toggles | `c_c` |
| Type II | adjacent pairs where both toggle in opposite directions (01→10, 10→01) | `2·c_c` |
| Type III | both toggle the same way (00→11, 11→00) | 0 |
| Type IV | neither toggles | 0 |

Inverting `x` changes the terms in a fixed way:

* a line with `y_i = 0, x_i = 0` (counted as `T00`) becomes a 0→1 edge,
  and every old 0→1 edge disappears;
* Type I pairs stay Type I, so they drop out of the comparison;
* Type II and Type III pairs become Type IV (free);
* a Type IV pair whose two lines differ (01→01 or 10→10, called `T4**`)
  becomes Type II; one whose lines are equal (00→00, 11→11) becomes Type III.

With `c_c / c_s = 4`, the flit is inverted exactly when

    T01 + 8·T2  >  T00 + 8·T4**

Ties keep the flit as is. The factor 8 is `INV_WEIGHT` in `scdbi_pkg`
(`K2 · CC_OVER_CS`). The load capacitance at the wire end, which adds to
`c_s`, is not part of the rule.

## Encoder structure

`scdbi_encoder` follows the rule directly, in three levels of logic and one
register:

1. `scdbi_trans_detect` compares `x` with `y`. For each line it gives a
   `t01` and a `t00` flag. For each of the `W-1` adjacent pairs it gives a
   `t2` flag (both lines toggle and they differed before) and a `t4ss` flag
   (neither toggles and they differ).
2. Four `ones_counter` instances count the four flag vectors.
3. `scdbi_inv_cmp` forms `n01 + 8·n2` and `n00 + 8·n4ss` and compares
   them. The sums are sized so they cannot overflow.

The output is `z = inv ? ~x : x`. `y` is loaded with `z` when the NI sends
the flit (`take`). Only body flits update `y`, so `y` is always the last
*encoded body* flit, even when a header crossed the link in between. Reset
clears `y` to zero. The decision is combinational, one adder tree deep.

The decoder (`scdbi_decoder`) needs no state: it XORs the received lines
with the invert line.

## Network interfaces and timing

```
 core ──in_*──► ni_tx ──link_* (W data + inv + head)──► ni_rx ──out_*──► core
                 │ scdbi_encoder                          │ scdbi_decoder
   lfsr_gen ─────┘ (body payload when src_lfsr = 1)
```

All streams use a valid/ready handshake. A transfer happens on a clock
edge where `valid && ready`. Each flit carries a `head` flag that marks
header flits.

* **`ni_tx`** has one output register. A flit accepted at edge *t* is on
  the link from *t* on. Headers go out unchanged with `inv = 0`. Body flits
  go out as `z` and `inv`. `in_ready = !link_valid || link_ready`, so the
  NI takes one flit per cycle. When no new flit follows, the data and
  invert lines keep their last value, so an idle link does not toggle.
* **`ni_rx`** has one output register, with the same handshake rule.
  Headers pass unchanged. Body flits are decoded.
* **`scdbi_noc_top`** joins the two NIs with one link. The link lines are
  also brought out as outputs, so they can be observed. The end-to-end
  latency is two cycles, and the path carries one flit per cycle.
  `out_ready` low stalls it flit by flit. With `src_lfsr = 1`, body
  payload comes from `lfsr_gen` instead of `in_data`; the LFSR advances
  once per accepted body flit. Headers always come from `in_data`.
* **`lfsr_gen`** is a Galois LFSR that shifts right. Its defaults are the
  maximal-length polynomial `x^32 + x^22 + x^2 + x + 1`
  (`POLY = 32'h8020_0003`) and `SEED = 1`.

Concurrent assertions check the handshake rules: a flit offered on the
link or to the core stays unchanged until it is taken. A third assertion
checks that the LFSR never reaches the all-zero state.

## Parameters

| parameter | default | where | notes |
|-----------|---------|-------|-------|
| `W` | 32 (`scdbi_pkg::FLIT_W`) | all modules | data lines per flit; the link has `W+1` coded lines plus `head` and `valid` |
| `WEIGHT` / `INV_WEIGHT` | 8 | `scdbi_inv_cmp` | `k2 · c_c/c_s = 2 · 4` |
| `POLY`, `SEED` | `32'h8020_0003`, 1 | `lfsr_gen` | must be changed together with `W` |

`W` must be at least 2, since there has to be at least one pair of lines.

## What follows the published scheme and what is chosen here

Taken from the scheme:

* the invert condition with weights `k1 = 1`, `k2 = 2`, `k3 = k4 = 0` and
  `c_c/c_s = 4`;
* the first-level blocks (`T01`, `T00`, `T2`, `T4**`), followed by ones
  counters and a comparator;
* the single invert line;
* the rule that headers pass unencoded;
* `y` defined as the previous encoded body flit;
* encoding in the source NI and decoding in the destination NI.

Chosen here, because the scheme leaves these open:

* the flit width of 32;
* the valid/ready handshake, and the one register stage in each NI;
* a `head` flag carried with each flit;
* synchronous active-low reset, with `y` starting at zero;
* idle lines holding their value;
* strict inequality on ties (the scheme states the condition as a strict
  inequality);
* pairs formed by neighbouring data bits in index order;
* the invert line left out of both the decision and the pairs;
* the LFSR's width, polynomial and seed, and the `src_lfsr` switch that
  feeds it into the datapath.

Not included:

* **Routers.** The scheme needs no router change, so the NIs here are
  joined by a direct link.
* **Clock gating.** This is left to the synthesis tool.
* **The cores at either end.** They are represented by the `in_*` and
  `out_*` ports.

## How much it saves

The published figures come from a 45 nm gate-level power flow on LFSR
traffic. They give 439.5 µW without SCDBI and 287.2 µW with it, a 34.6%
saving, for about 8% more area. Those numbers cannot be reproduced in RTL
simulation.

`tb_scdbi_lfsr_power` measures what the RTL can show instead: the
switched capacitance of the power model. It counts, in units of `c_s`,
`T01 + 4·(T1 + 2·T2)` over 50,000 consecutive LFSR words sent as body
flits. The 32-bit link costs 6,486,476 units raw and 3,865,650 units with
SCDBI, including the extra cost of the invert line placed next to the top
data line. That is a 40.4% reduction. Most of it comes from coupling: a
right-shifting LFSR produces many Type II pairs, and inversion turns them
into Type IV. On uniformly random 32-bit words the same count drops by only about 8%, since
random flits carry little correlation for the encoder to exploit.

## Verification

Every testbench checks its outputs against values it computes itself and
ends with a `TB_RESULT checks=N failures=M` line. The reference model
(`tb/scdbi_ref_pkg.sv`) does not use the `T00`/`T4**` shortcut. It
computes the full link cost of both candidate flits, by classifying every
pair into Types I–IV, and inverts when the complement is cheaper. This
makes it an independent check of the derivation above.

| testbench | covers |
|-----------|--------|
| `tb_scdbi_trans_detect` | all 16 pair transfers, and random flits |
| `tb_ones_counter` | 32- and 7-bit counters |
| `tb_scdbi_inv_cmp` | ties, extreme counts, random legal counts |
| `tb_scdbi_encoder` | 3,000 random and near-complement flits, with `y` tracking |
| `tb_scdbi_decoder` | round trips |
| `tb_ni_tx`, `tb_ni_rx` | packets under random back-pressure: header bypass, encoding, hold under stall, 1-cycle latency |
| `tb_lfsr_gen` | full period of 4- and 5-bit instances; the output recurrence `s[n+32] = s[n+31] ^ s[n+30] ^ s[n+10] ^ s[n]` of the 32-bit default |
| `tb_scdbi_noc_top` | 20,000 flits end to end at default parameters |
| `tb_scdbi_lfsr_power` | the LFSR workload above |

`tb_scdbi_noc_top` also counts how often each mechanism happened, and
fails if any of them never did: header bypass, inverted body flit, plain
body flit, source stall, destination stall, LFSR payload, core payload,
and 2-cycle latency.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/scdbi_pkg.sv tb/scdbi_ref_pkg.sv tb/tb_scdbi_noc_top.sv \
    --top-module tb_scdbi_noc_top -o sim
./obj_dir/sim
```

Each testbench runs in well under a second.
