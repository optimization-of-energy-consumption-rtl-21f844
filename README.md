# Inversion coding for low-energy NoC links

On a network-on-chip link in a deep-submicron process, most of the dynamic
energy goes into the coupling capacitance between neighbouring wires, not
into the wire-to-ground capacitance. What costs energy is therefore not only
how many wires toggle, but how neighbouring wires toggle *relative to each
other*. This design spends one wire of a w-bit link on an inversion flag and
lets the sending network interface decide, flit by flit, whether to send the
body flit as it is or with some of its wires inverted, so that the link sees
fewer costly neighbour transitions. The receiving network interface undoes
the inversion. Routers and link wires are untouched: the coding is end to
end and invisible to the network.

Three encoders of growing strength are provided, each with its decoder:

| scheme | actions the encoder may take | decision inputs |
|---|---|---|
| I   | none, odd inversion | Ty count |
| II  | none, odd inversion, full inversion | Ty, T2, T4** counts |
| III | none, odd, even or full inversion | Ty, Te, T2, T4** counts |

The top level, `noc_link_codec`, runs all three side by side on one flit
stream so that their effect can be compared.

## Link word

A link of width `W` (default 32) carries

* lanes `[W-2:0]`: the body-flit payload, `W-1` bits;
* lane `W-1`: `inv`, 1 when the payload on the link is inverted in any way.

"Odd inversion" flips lanes 1, 3, 5, ...; "even inversion" flips lanes
0, 2, 4, ...; "full inversion" flips all payload lanes. The action codes used
on the `act` ports are none `00`, even `01`, odd `10`, full `11`.

## Classifying neighbour transitions

The encoder compares the flit it is about to send, X, with the word it sent
last, Y, one pair of adjacent lanes at a time (lanes `i` and `i+1`, for
`i = 0 .. W-3`; the inv lane is not paired). In every pair one lane has an odd
index (the lane odd inversion flips) and one an even index. Writing each
pair as (even lane, odd lane), the usual coupling classes are:

| class | before -> after | coupling cost |
|---|---|---|
| Type I  | exactly one lane toggles | 1 |
| Type II | both toggle in opposite directions (01 -> 10) | 2 |
| Type III | both toggle in the same direction (00 -> 11) | 0 |
| Type IV | neither toggles | 0 |

Type I is split by which lane toggles and whether the two lanes were equal
before. The subclasses that matter, and what each inversion turns them into:

| flag | pair condition | odd inversion | even inversion | full inversion |
|---|---|---|---|---|
| `ty` | even lane alone toggles, lanes were equal (T1*) | -> Type III | | |
|      | odd lane alone toggles (T1**) | -> Type IV | | |
|      | Type II | -> Type I | | |
| `te` | even lane alone toggles | | -> Type IV | |
|      | odd lane alone toggles, lanes were equal | | -> Type III | |
|      | Type II | | -> Type I | |
| `t2` | Type II | | | -> Type IV |
| `t4` | Type IV with unequal lanes, 01 or 10 (T4**) | | | -> Type II |

All other pairs get worse under the inversion in question: for odd inversion
every pair without `ty` becomes a Type I or Type II pair, for even inversion
every pair without `te`. Hence the decision rules, with `w = W`:

* odd inversion pays off when `Ty > (w-1)/2`;
* even inversion pays off when `Te > (w-1)/2`;
* full inversion is preferred when, in addition, `T2 > T4**`.

`pair_classifier` computes the four flags for all `W-2` pairs from the
toggle and equality of each lane pair; `ones_counter` counts them and
`majority_voter` tests for "more ones than zeros", which for an even `W` is
the same test as `count > (W-1)/2`.

## Deciding the action

* **Scheme I** (`enc_scheme1`): Ty flags, majority voter, odd inverter.
* **Scheme II** (`enc_scheme2`, decision in `module_a`): full inversion when
  `Ty > (w-1)/2` and `T2 > T4**`; odd inversion when only the first holds;
  otherwise none.
* **Scheme III** (`enc_scheme3`, decision in `module_c`): when
  `Ty > (w-1)/2`, full inversion if also `T2 > T4**`, else odd; when the Ty
  test fails but `Te > (w-1)/2`, even inversion; otherwise none. This
  priority order is this design's choice.

## Decoding with a single inv lane

This is the subtle part. The decoder sees only the received word Z, the
previous received word R and one inv bit, yet schemes II and III have two or
three kinds of inversion. The decoder re-runs the pair classification on
(Z, R), which works because of one exact property of the flags:

* odd inversion of a flit complements **every** `ty` flag, and even
  inversion complements every `te` flag (this is visible in the table above:
  each class with the flag maps to one without it, and the reverse).

So if the encoder odd-inverted because more than half the pairs had `ty`,
fewer than half of the received pairs have `ty`: a Ty majority of 0 with
`inv = 1` means odd inversion. The decoders therefore use:

* scheme II (`dec_scheme2`): `inv = 1` and Ty majority 0 -> odd, 1 -> full;
* scheme III (`dec_scheme3`): `inv = 1` and Ty majority 0 -> odd; Ty
  majority 1 and Te majority 0 -> even; both 1 -> full.

Full inversion, and even inversion in scheme III, have no such guarantee:
a fully inverted word may happen to show a Ty majority of 0 and would then be
decoded wrongly. This design closes that gap in the encoder. It also
classifies the fully inverted (and, in scheme III, the even-inverted)
candidate against Y, exactly as the decoder will, and takes that action only
if the decoder will read it back as intended (`full_ok`, `even_ok`). A
rejected full inversion falls back to odd inversion, which always decodes;
a rejected even inversion falls back to no inversion. With this guard,
decoding is exact for every flit stream. The cost is one or two extra pair
classifiers and majority voters per encoder, and some full/even inversions
that are given up. On the test traffic the guard gives up most of the full
inversions the rules ask for: about three quarters in scheme II and more in
scheme III.

A second inversion lane would remove the guard and the decoder-side
classification. This design keeps the single lane.

## Interface and timing

Encoders (`enc_scheme1/2/3`):
`clk`, `rst_n` (synchronous, active low), `in_valid`, `in_data[W-2:0]` in;
`action` (combinational decision for the offered flit), `link_valid`,
`link_data[W-1:0]` out. A flit is accepted in every cycle `in_valid` is high;
there is no back-pressure. The encoded word is registered and appears one
clock later. The register is also the "previous word" Y, so the link holds
its last word during idle cycles, and idle cycles cost no link energy.

Decoders (`dec_scheme1/2/3`): `clk`, `rst_n`, `link_valid`, `link_data`
in; `out_valid`, `out_data[W-2:0]`, `out_action` out, registered one clock
after `link_valid`. The previous received word R is updated with every valid
word.

After reset both ends assume the link holds all zeros, so Y and R start
equal. Both ends must be reset together.

`noc_link_codec` (top): `in_valid`, `in_data` feed all three encoders;
outputs are 3-entry vectors (index 0, 1, 2 = scheme I, II, III) of `act`,
`link_valid`, `link_word`, `out_valid`, `out_data`. End-to-end latency is two
clocks. The top contains an assertion that each decoder recovers the action
its encoder took.

## Modules

| file | role |
|---|---|
| `rtl/noc_codec_pkg.sv` | `LINK_W` default, `inv_action_e` action codes |
| `rtl/pair_classifier.sv` | Ty / Te / T2 / T4** flags for all lane pairs |
| `rtl/ones_counter.sv` | counts ones in a flag vector |
| `rtl/majority_voter.sv` | more ones than zeros |
| `rtl/module_a.sv` | scheme II decision |
| `rtl/module_c.sv` | scheme III decision |
| `rtl/enc_scheme{1,2,3}.sv` | encoders with output register |
| `rtl/dec_scheme{1,2,3}.sv` | decoders with output register |
| `rtl/noc_link_codec.sv` | top: three encoder-link-decoder chains |

The only parameter is the link width `W` (default 32; also exercised at 9
and 16 by `tb_noc_link_codec_widths`). The pair-count width is `$clog2(W-1)`, 5 bits at `W = 32`.

## Not included

* The network interface around the encoder (packetisation, head and tail
  flits, flow control). The encoder simply codes every flit it is given. In a
  real interface, only body flits would go through it.
* Routers. The coding needs none of their logic, so the link is a direct
  connection in the top.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. The testbenches share `tb/codec_ref_pkg.sv`,
a reference model written differently from the RTL. It classifies pairs by
looking up the before/after values in the transition tables, and it
recomputes the decisions and the decoding from the counts.

* `tb_pair_classifier`: all 16 pair transitions at every position, plus
  random flits. It also checks the complement property.
* `tb_ones_counter`, `tb_majority_voter`: edge cases, exhaustive small
  instances, and the 15/16 threshold.
* `tb_module_a`: all Ty x T2 x T4** counts. `tb_module_c`: all Ty x Te
  counts with varied T2/T4** and guard inputs.
* `tb_enc_scheme*`: action, link word and one-clock timing for 4000 cycles
  of mixed traffic with idles; each action must occur.
* `tb_dec_scheme*`: exact payload and action recovery from reference-encoded
  streams.
* `tb_noc_link_codec`: 20,000 cycles through all three chains at the
  default width. It checks link words and two-clock decoding. It counts every
  action of every scheme, the full-to-odd fallbacks, dropped even inversions
  and idle cycles, and requires each to occur. It also measures link
  activity.
* `tb_noc_link_codec_widths`: round trip through all three chains at
  `W = 16` and at an odd `W = 9`, with every action occurring.

Run a testbench with plain Verilator, for example:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/noc_codec_pkg.sv tb/codec_ref_pkg.sv tb/tb_noc_link_codec.sv \
  --top-module tb_noc_link_codec -o sim && ./obj_dir/sim
```

Link activity measured by `tb_noc_link_codec` over 16,092 flits of its
traffic. The traffic mixes 50 % random flits, 25 % near-repeats and 25 %
near-inversions of the previous flit. The activity model counts coupling at
1 per Type I pair and 2 per Type II pair over all `W-1` neighbour pairs,
inv lane included.

| link | self toggles | coupling cost |
|---|---|---|
| unencoded (inv lane idle) | 213,258 | 301,039 |
| scheme I | 195,028 (-8.5 %) | 261,860 (-13.0 %) |
| scheme II | 197,758 (-7.3 %) | 277,374 (-7.9 %) |
| scheme III | 196,926 (-7.7 %) | 276,894 (-8.0 %) |

On this traffic, schemes II and III save less than scheme I. The rule
`T2 > T4**` compares only Type II pairs against T4** pairs. Under full
inversion, though, every Type I pair stays Type I, and the pairs that odd
inversion would have improved are not improved. Treat the full-inversion
rule as a design point worth re-tuning for real traffic, not as an
optimum.

## Choices made where the published scheme is silent

* Odd lanes are the 0-based odd indices. In pair (0, 1) the second lane is
  the one inverted.
* Only payload lanes are paired, which gives `W-2` flags. The inv lane's
  coupling to lane `W-2` is ignored by the decision but counted in the
  activity figures.
* T4** means a stable pair with unequal values (01/10), the case that full
  inversion turns into Type II.
* The decodability guard for full and even inversion (see above).
* The scheme III priority order, and the scheme III decoder, which the
  published scheme describes only by analogy with scheme II.
* Registered outputs, valid-only handshake, zero reset state and
  synchronous reset.
