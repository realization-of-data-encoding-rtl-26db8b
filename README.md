# Coupling-aware flit encoding for network-on-chip links

On a long on-chip link most of the switching energy goes into the coupling
capacitance between neighbouring wires, not into each wire's own capacitance to
ground. This design sits in the network interface (NI) of a network on chip. It
re-encodes every flit except the header before the flit enters the network.
The goal is fewer neighbour-to-neighbour transitions on every link the packet
crosses. The routers and the wires stay as they are: headers travel
unencoded, so routing is not affected, and the matching decoder sits in the
destination NI.

The encoding is a choice among a few inversions of the flit, made fresh for
every flit by comparing it with the value the link holds now. One or two extra
link lines tell the receiver which inversion was used. Three schemes are
provided, each a superset of the one before:

| scheme | inversions considered        | extra lines | decoder needs the previous flit |
|--------|------------------------------|-------------|---------------------------------|
| I      | odd                          | 1           | no                              |
| II     | odd, full                    | 1           | yes                             |
| III    | odd, even, full              | 2           | no                              |

"Odd inversion" inverts every odd-numbered line (1, 3, 5, ...). "Even
inversion" inverts every even-numbered line. "Full inversion" inverts all of
them.

## The coupling model

The encoders look at the link two adjacent lines at a time. Take the values
of a pair before and after a flit is sent. There are sixteen cases, in four
types:

| type | what happens                                   | example      | cost used here |
|------|------------------------------------------------|--------------|----------------|
| I    | exactly one line switches                      | 00 -> 10     | 1              |
| II   | both switch, in opposite directions            | 01 -> 10     | 2              |
| III  | both switch, in the same direction             | 00 -> 11     | 0              |
| IV   | neither switches                               | 01 -> 01     | 0              |

For random data the types occur 8, 2, 2 and 4 times out of 16, that is with
probability 1/2, 1/8, 1/8 and 1/4. The cost column gives the relative energy
charged into the coupling capacitor between the two lines. The cost of a whole
link transfer is the sum over its adjacent pairs
(`noc_codec_pkg::pair_cost`). The weights 1/2/0/0 are this design's choice.
Encoder decisions minimise this coupling cost only. Self-switching of each
line to ground is not weighed.

## Why a few counters are enough

The encoders never evaluate the cost of each candidate flit. Instead they count
pairs, and one observation makes that exact.

In odd inversion, each adjacent pair has exactly one inverted line. The same is
true of even inversion. Flipping one line of a pair always moves the pair's cost
by exactly one step:
- Type I becomes II, III or IV.
- Types II, III and IV become Type I.

So if `n_ty` of the `P` pairs get cheaper under odd inversion, the link cost
changes by `P - 2*n_ty`. Odd inversion pays exactly when `n_ty > P/2`. That is
a majority vote, and `ty_block` is the per-pair detector behind it. The same
module, with the other line of the pair inverted, is the even-inversion
detector `Te`.

Full inversion leaves Type I pairs as Type I. It swaps III and IV. It turns
Type II into IV (01->10 becomes 01->01), and it turns "IV on a 01/10 pair"
into Type II (the `T4**` pairs). Its cost change is therefore
`2*(n_4ss - n_2)`, from the `t2_block` and `t4ss_block` detector counts.

Each encoder is a bank of per-pair detectors, one `ones_counter` per bank, and
a small decision block:
- Scheme I uses a `majority_voter`.
- Scheme II uses `module_a`.
- Scheme III uses `module_c`.

The decision block picks the action with the largest strictly positive gain.
On ties it prefers no inversion, then odd, then even, then full.

## Link format and the inversion lines

`W` is the number of link lines in schemes I and II, inversion line included.
It defaults to 32 and must be even. A body flit has `W-1` bits.

- **Schemes I and II**: data on lines `0..W-2`, the inversion flag on line
  `W-1`. The encoder treats the flag line as a data line that holds 0. Because
  `W-1` is odd, both odd and full inversion turn it into 1 by themselves. The
  flag line's own coupling with line `W-2` is part of the vote.
- **Scheme III**: `W+1` lines. Line `W-1` (odd) is the odd-inversion flag
  and line `W` (even) the even-inversion flag. Both start at 0, so each
  inversion sets its own flag. The pair of flags reads `10` for odd, `01` for
  even, `11` for full and `00` for none.

Header flits go out raw with the flag line(s) at 0. The flit type (head, body,
tail) travels on two separate sideband lines that are never encoded.

## Scheme II: telling odd from full inversion with one flag line

This is the subtle part of the design. Scheme II has two inverting actions but
only one flag line. The decoder (`decoder_s2`) therefore has to work out which
action was used. It runs the same `Ty` detectors over the received flit `z`
and the previously received link value `r`, then takes a majority vote:

- After an odd inversion, every pair's `Ty` answer is the opposite of what it
  was before, so fewer than half of the pairs vote. A vote of 0 with the flag
  set therefore means odd inversion.
- After a full inversion nothing forces the vote either way. Consider a flit
  whose pairs are all Type II: full inversion is clearly the best choice for
  it, yet the vote reads 0.

`encoder_s2` closes this gap with a fourth detector bank, which is not part of
the published block diagram. This bank runs `Ty` on the fully inverted flit.
`module_a` may choose full inversion only when that vote reads 1 (`full_ok`).
Every choice the encoder makes is then decodable. The cost is that full
inversion is sometimes passed over for a less effective action.

Scheme III avoids the problem with its second flag line, and its decoder is
just the XOR stage. Scheme I has a single action, so its decoder does not look
at the previous flit either.

## Network interfaces

`ni_tx` (sending) and `ni_rx` (receiving) wrap the codecs. `SCHEME` (1, 2 or 3)
selects the codec.

- Both sides use a valid/ready handshake with a single register stage. A
  flit accepted in cycle *t* appears on the other side in cycle *t+1*, and
  each NI moves one flit per cycle.
- The `ni_tx` output register is also the encoder's reference value. It keeps
  its contents while the link is idle, just as the wires do, so the next flit
  is encoded against what the lines really hold.
- `ni_rx` keeps the previously accepted link value for scheme II. It updates
  this value on every accepted flit, headers included, so it always equals the
  sender's reference value.
- The schemes assume that flits of different packets are never interleaved on
  a link, which means no virtual channels. Links must deliver flits unchanged
  and in order.
- Reset is synchronous and active low. It clears both reference values to all
  zeros.
- `ni_tx` and `ni_rx` assert that a flit offered under back-pressure stays
  stable until it is taken.

## Top level

`noc_codec_top` places the three schemes side by side as three independent
channels, `s1_*`, `s2_*` and `s3_*`. The parameter is `W`. Each channel has
four ports:

- `src`: flits in from the source processing element.
- `out`: the encoded link towards the first router.
- `in`: the encoded link from the last router.
- `dst`: decoded flits to the destination processing element.

The routers between `out` and `in` are not part of this RTL. Connect `out` to
`in` through any router path that is in order and leaves the flit lines
unchanged, or wire them directly for a point-to-point link.

## Files

| file                          | contents |
|-------------------------------|----------|
| `rtl/noc_codec_pkg.sv`        | flit type and inversion-action enums, `pair_cost` |
| `rtl/ty_block.sv`             | Ty/Te detector (one line of a pair inverted: does it help?) |
| `rtl/t2_block.sv`, `rtl/t4ss_block.sv` | Type II and T4** detectors |
| `rtl/ones_counter.sv`, `rtl/majority_voter.sv` | counting and voting |
| `rtl/module_a.sv`, `rtl/module_c.sv` | scheme II and III decisions |
| `rtl/encoder_s{1,2,3}.sv`, `rtl/decoder_s{1,2,3}.sv` | the codecs (combinational) |
| `rtl/ni_tx.sv`, `rtl/ni_rx.sv` | network-interface halves |
| `rtl/noc_codec_top.sv`        | three channels side by side |
| `tb/tb_codec_ref_pkg.sv`      | brute-force reference encoder and link cost |
| `tb/tb_router_path.sv`        | behavioural router path (delay, random stalls) for simulation |
| `tb/tb_*.sv`                  | one self-checking testbench per module, plus `tb_workload_random` |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops. For example,
the end-to-end test at default parameters:

    verilator --binary --timing --assert -Irtl -Itb \
      rtl/noc_codec_pkg.sv tb/tb_codec_ref_pkg.sv tb/tb_noc_codec_top.sv \
      --top-module tb_noc_codec_top -Mdir obj_top
    ./obj_top/Vtb_noc_codec_top

Other testbenches run the same way; substitute the testbench name.

All checks compare against `tb_codec_ref_pkg`. That package works
differently from the RTL: it builds every candidate link value, adds up its
coupling cost pair by pair and keeps the cheapest. For scheme II it excludes a
full inversion unless odd-inverting the result would lower its cost, which is
the decodability rule above.

- The block tests of the codecs run 4000 chained flits each.
- `tb_ni_tx` and `tb_ni_rx` check latency, full-rate throughput and
  back-pressure.
- `tb_noc_codec_top` sends 5000 flits per channel through random gaps, router
  stalls and sink back-pressure. It requires every action of every scheme to
  occur.

On uniform random 31-bit flits (`tb_workload_random`, 20000 flits) the raw
coupling cost falls by about 11 % with scheme I, 12 % with scheme II and 18 %
with scheme III. That run also checks the 1/2, 1/8, 1/8, 1/4 type
probabilities.

## Where this design goes beyond or departs from the published scheme

- **Flit width.** No flit width was given. `W = 32` is this design's choice.
- **Decision rules.** The published encoders give the block structure (detector
  banks, counters, Module A and Module C). They do not give the inequalities
  that Module A and Module C evaluate. The rules here follow from the 1/2/0/0
  cost weights and the one-step property above. Self-switching energy is
  ignored.
- **Scheme II guard.** The `full_ok` bank in `encoder_s2` is an addition. It
  is what makes the single-flag-line scheme II decodable in every case.
- **Table 1 versus the text.** The published odd-inversion table maps the three
  Type I sub-cases T1*, T1** and T1*** to Types III, IV and II. One sentence of
  the accompanying text lists them as II, III and IV. The table is followed
  here, since it matches the pair analysis.
- **NI details.** Handshake, sideband flit-type lines, register placement and
  reset are this design's choices.
- **Not included.**
  - The routers.
  - The "traditional" bus-invert encoder used as the comparison baseline.
  - The power figures. Power cannot be obtained from RTL simulation, so the
    testbenches report coupling-transition counts instead.
