# Chip IDs hidden in a reconfigurable scan network

Every chip that carries an IEEE 1687 style reconfigurable scan network (RSN)
already contains dozens to hundreds of *segment insertion bits* (SIBs). A SIB
is a 1-bit scan register `S` followed by a 1-bit shadow register `U`; `U`
decides whether the scan segment beneath the SIB is part of the scan path.
Normally `U` loads `S` unchanged. This design lets each SIB load either `S`
or `NOT S` into `U`, chosen after fabrication by blowing one of two fuses.
The choice made in each SIB is one bit of a chip identifier:

| fuse blown | S to U connection | ID bit |
|------------|-------------------|--------|
| F2         | `U <= S`  (Q-D)   | 0      |
| F1         | `U <= ~S` (Q'-D)  | 1      |

A network with k such *ID-SIBs* can tell 2^k chips apart. All chips share one
mask, and the functional logic is untouched. The ID is not stored anywhere
readable: it shows only in how the network reacts to the configuration bits
shifted into it. The scan test program of each chip therefore has to match
that chip's ID, and a chip can be identified through its test port without
opening the package.

## The ID-SIB (`rtl/id_sib.sv`)

```
 si --+---------------------------------> to_seg --> [segment] --+
      |                                                          |
      +--> mux input 0     mux input 1 <-- from_seg <------------+
               \             /
                mux (select = U) --> S --+--------------------> so
                                         |
                       conn ? ~S : S  <--+
                             |
                             v
                   U (loads on update & sel) --> mux select
                             |
                   sel & U ---------------------------------> to_sel
```

- **Bypassing** (`U = 0`): `S` shifts from `si`; the segment is not in the
  path.
- **Directing** (`U = 1`): `si` goes out on `to_seg`, through the segment and
  back on `from_seg` into `S`. The segment's select `to_sel` is `sel & U`.
- `S` shifts only while `sel` is high, and `U` loads only when `update` and
  `sel` are both high. Capture leaves `S` as it is, because a SIB has no
  instrument data.
- Input `conn` stands for the fuse pair. A real chip ties it to the fuse
  outputs. In simulation it is a port you drive.

A plain SIB is an ID-SIB with `conn = 0`.

## Configuring a network whose ID is not zero

After an update, each `U` holds the bit shifted into its `S`, XORed with
that SIB's ID bit. A tester that wants segment i inserted (`want[i] = 1`)
must therefore shift

```
cfg[i] = want[i] XOR id[i]
```

In words: for an ID-0 SIB, 1 inserts and 0 bypasses. For an ID-1 SIB, 0
inserts and 1 bypasses. Only the configuration bits of a CSU operation
(capture, shift, update) change. Data shifted into the segments is not
affected, because segments have no fuses.

Take the three-SIB network that `rsn_top` builds by default. Write strings
with SIB 1, the one next to scan-in, first. To reach segments 1 and 3:

- a chip with ID `000` needs the sequence `101`;
- a chip with ID `101` needs `000`.

`tb/tb_rsn_top.sv` applies both sequences literally. A tester that has the
wrong ID for a chip gets the wrong scan path. Its test then fails, and that
failure is how the ID is authenticated.

## Reading an ID back

No extra hardware is needed to recover the ID:

1. Reset, so every segment is bypassed and the path is only the `NUM_SIB`
   SIB bits.
2. Shift in all zeros and update. Each `U` now equals its ID bit, so exactly
   the segments of ID-1 SIBs are inserted.
3. Capture, with the instruments returning known non-zero data (the
   testbench uses all ones), and shift the path out.

Scan-out first shows `S` of the last SIB, which is 0. If that SIB's ID bit
is 1, its segment's `SEG_LEN` captured bits come next. Then comes the next
SIB's 0, and so on. `rsn_driver` decodes the ID this way from scan-out
alone and compares it with the fuse inputs.

This procedure is this design's own addition, and the testbench applies it
to flat networks only. In a two-level network, the instrument SIBs behind
a doorway with ID bit 0 stay hidden after step 2. It needs instrument data that
is not all zero, which real instruments may not guarantee.

## The network (`rtl/rsn_top.sv`)

**Flat shape.** This is the default, with `NUM_INSTR = 0`. `NUM_SIB`
ID-SIBs are chained, each with one `SEG_LEN`-bit scan segment
(`rtl/scan_segment.sv`) beneath it. The row is `rtl/sib_chain.sv`:

```
si -> [seg 0]? -> S0 -> [seg 1]? -> S1 -> ... -> [seg N-1]? -> S(N-1) -> so
```

The active path is `NUM_SIB + SEG_LEN * (inserted segments)` bits long.

**Two-level shape.** This is used with `NUM_INSTR = K > 0`. It follows the
way SIB networks are built for SoC benchmarks:

- each of the `NUM_SIB` top-level SIBs is a *doorway* over one module;
- a module is a `sib_chain` of K *instrument* SIBs, each over its own
  segment;
- a closed doorway hides its whole module, including the module's SIBs.

```
si -> ( [module 0: I0 .. I(K-1)]? -> D0 ) -> ( [module 1]? -> D1 ) -> ... -> so
```

Instrument SIBs can be configured only while their doorway is open. Any
setting therefore takes two CSUs from reset:

1. open the doorways;
2. set the instrument SIBs, and close any doorway that should end up
   closed.

Doorway SIBs carry ID bits just like instrument SIBs, and the configuration
rule applies to all of them. `id_bits` is numbered in scan-path order with
every SIB open:

- module j's instrument SIBs are bits `j*(K+1) .. j*(K+1)+K-1`;
- module j's doorway is bit `j*(K+1)+K`;
- segment `j*K+k` hangs below instrument SIB k of module j.

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst` | in | 1 | scan clock; synchronous active-high reset (all SIBs bypassing afterwards) |
| `capture`, `shift`, `update` | in | 1 each | global controls from the TAP; at most one high per cycle (asserted) |
| `sel` | in | 1 | selects the whole network |
| `si`, `so` | in/out | 1 | scan-in, scan-out |
| `id_bits` | in | `NUM_ID` | fuse states, numbered as above (flat: bit i is SIB i, nearest scan-in = bit 0) |
| `instr_di` | in | `NUM_SEG x SEG_LEN` | instrument data captured into each segment |
| `instr_do` | out | `NUM_SEG x SEG_LEN` | each segment's shadow register |
| `seg_sel` | out | `NUM_SEG` | the segment is selected: its SIB is directing, any doorway above it is open, and `sel` is high |

Timing:

- Each of capture, shift and update is a one-cycle enable on the rising
  clock edge.
- A new `U` value changes the path from the next cycle.
- `so` is a register output, so the bit leaving the path is visible before
  the shift that removes it.

A `scan_segment` shifts in at bit `LEN-1` and out at bit 0. It captures
`data_in` and, when `HAS_SHADOW` is 1, updates its shadow register. It does
none of these while deselected.

Shared types are in `rtl/rsn_pkg.sv`:

- `scan_ctrl_t`, the capture/shift/update bundle;
- `conn_style_e`, the fuse state.

Parameters:

| parameter | default | notes |
|-----------|---------|-------|
| `NUM_SIB` | 3 | top-level SIBs; 3 is the three-SIB example network |
| `NUM_INSTR` | 0 | instrument SIBs per doorway; 0 gives the flat shape |
| `SEG_LEN` | 8 | chosen here; no length is specified for the example |
| `HAS_SHADOW` | 1 | shadow registers in the segments are optional |
| `NUM_ID`, `NUM_SEG` | derived | number of SIBs and of segments; do not override |

## How many IDs

The number of distinct IDs equals 2^(number of SIBs). Published SIB-based
networks for the ITC'02 SoC benchmarks have the following SIB counts:

| benchmark | SIBs | IDs |
|-----------|------|-----|
| q127110 | 25 | 3.35e7 |
| a586710 | 40 | 1.09e12 |
| f2126 | 41 | 2.19e12 |
| u226 | 50 | 1.13e15 |
| h953 | 55 | 3.60e16 |
| d281 | 59 | 5.76e17 |
| g1023 | 80 | 1.20e24 |
| p34392 | 123 | 1.06e37 |
| t512505 | 160 | 1.46e48 |
| d695 | 168 | 3.74e50 |
| p228110 | 283 | 1.55e85 |
| p93791 | 621 | 8.70e186 |

In ten of the twelve rows, the SIB count equals the number of scan segments
plus the number of modules. That fits one instrument SIB per segment and
one doorway per module.

The benchmark networks have up to three levels and an uneven number of
segments per module. `rsn_top` can match their SIB counts exactly as a
flat row, or approximately as a two-level network with the same number of
instrument SIBs in every module. It does not reproduce their exact shapes. Every ID-SIB behaves the same wherever it sits, so
for the ID only the count matters.

`tb/tb_rsn_itc02.sv` runs flat rows of 25 SIBs (q127110) and 621 SIBs
(p93791), with 2-bit segments. The two-level shape is exercised at small
sizes by `tb/tb_rsn_two_level.sv`. `tb_rsn_itc02` also checks 2^N against
every table entry.

## What this RTL does and does not cover

Left outside, as ports:

- the IEEE 1149.1 TAP controller that produces `capture`, `shift`, `update`
  and `sel`;
- the instruments behind the segments;
- the fuses.

The vendor-side ID choice is not implemented. In that scheme, m random bits
plus an IC-specific key go through a one-way hash, which produces the other
N-m bits. The hash is not specified, and the step happens before the fuses
are blown.

Choices made here that a user may want to change:

- **Single clock edge.** `U` and the shadow registers load on the rising
  edge. A 1149.1 TAP updates on the falling edge of TCK.
- **Reset.** Reset clears `S` and `U`, so every segment is bypassed after
  reset whatever the ID.
- **Capture in a SIB.** Capture leaves `S` alone. Some SIB designs capture
  `U` instead.
- **Uniform modules.** The two-level shape has the same number of
  instrument SIBs below every doorway and only two levels.
- **String order.** ID and configuration strings are written with SIB 1
  (nearest scan-in) first. The two examples above read the same either way.
- **Fuse states.** The states "both fuses blown" and "neither blown" are not
  modelled.

## Simulating

Every testbench is self-checking and prints
`TB_RESULT checks=N failures=M`. Build and run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/rsn_pkg.sv tb/tb_rsn_top.sv --top-module tb_rsn_top
./obj_dir/Vtb_rsn_top
```

| testbench | what it covers |
|-----------|----------------|
| `tb_scan_segment` | a 5-bit segment with a shadow register and a 1-bit one without; random operations against a queue model; 5-cycle shift-through latency; hold while deselected |
| `tb_id_sib` | both fuse states; the two configuration rules; mux selection; random operations against a model |
| `tb_rsn_top` | default network (3 SIBs, 8-bit segments); all 8 IDs x all 8 insertion patterns; the two example sequences; path length, read-back and shadow contents; hold while deselected; ID read-out |
| `tb_rsn_two_level` | two-level networks: 2 doorways x 2 instrument SIBs with all 64 IDs x all 64 settings, and 4 x 3 with random IDs; wrong-ID rejection |
| `tb_rsn_itc02` | flat networks of 25 and 621 SIBs with random IDs and ID read-out; ID capacity per benchmark |

`tb/rsn_driver.sv` holds the stimulus and checking used by `tb_rsn_top` and
`tb_rsn_two_level`. `tb/rsn_flat_driver.sv` is a leaner version, for flat
networks only, that compiles quickly at hundreds of SIBs. `rsn_driver`
works as follows:

- it acts as the TAP and the tester;
- it computes configuration bits from the wanted pattern and the ID;
- it compares a cycle-level model of every register with the outputs after
  every edge;
- it counts each mechanism and fails if one never occurs: bypassing,
  directing, each configuration rule, shadow update, capture, deselection,
  rejection of a wrong ID, ID read-out (flat) and doorway opening
  (two-level).
