# Crosstalk-avoiding bus-invert codec for a shielded 4-line bus

On a long on-chip bus, neighbouring wires disturb each other when they switch together.
The worst patterns depend on the wire model. On RC lines the capacitive coupling dominates,
so it is worst when neighbours switch in opposite directions. On RLC lines the mutual
inductance dominates, so it is worst when they switch in the same direction. This codec
deals with both models. Before each word is sent, it classifies how every group of three
adjacent lines would switch. If the word would cause a coupling pattern it watches for, the
word is sent inverted instead, and a separate control line says so. That control line is
routed apart from the data lines behind a supply/ground shield. It therefore never takes
part in the coupling patterns, and only the four data lines need to be classified.

The design is small and fully combinational apart from five flip-flops. It takes one
4-bit word per clock. The encoded word reaches the lines one clock later, and the decoder
gives the word back in the same cycle it arrives.

```
                 +--------------------------------- codec_encoder ---------------------------------+
 data_in[3:0] -->| transition_detector --> type0..type4_detector --> or_logic --ctrl--+             |
                 |   ^ prev                   (hit[4:0])                              v             |
                 |   |                                         data_in --> xor_stack (XOR stack 1)   |
                 |   +---------------- bus register (4 data + 1 ctrl flip-flops) <----+             |
                 +--------------------------------|---------------------------------------------------+
                                tx_data, tx_ctrl  v   (shielded interconnect, outside the RTL)
                                rx_data, rx_ctrl  v
                                   xor_stack (XOR stack 2) --> data_out[3:0]
```

## Coupling types

Each line makes one of three moves between two consecutive words: rise (`^`), fall (`v`)
or hold (`-`). Take three adjacent lines *l, m, r* and write each move as +1, -1 or 0. The
middle line is coupled by `|m-l| + |m-r|` units. That sum, 0 to 4, is the pattern's
coupling **type**. The 27 possible moves of a three-line group then fall into these
classes:

| Type | Patterns (l m r) | Worst case for |
|------|------------------|----------------|
| 0 | `^^^` `vvv` (and `---`, see below) | RLC lines |
| 1 | `--^` `^--` `--v` `v--` `-^^` `^^-` `-vv` `vv-` | RLC lines |
| 2 | `-^-` `-v-` `^-^` `v-v` `^-v` `v-^` `^^v` `vv^` `^vv` `v^^` | — |
| 3 | `-^v` `-v^` `^v-` `v^-` | RC lines |
| 4 | `^v^` `v^v` | RC lines |

A 4-line bus has two overlapping groups: lines 1-3 and lines 2-4. Line 1 is bit 0.
Reversing the wire order does not change any class, so the bit order makes no difference.
A detector's output is high when either group shows one of its patterns.

The RTL has one detector module per type (`type0_detector` to `type4_detector`), and each
spells out its patterns as ANDs of three flags. The flags come from
`transition_detector`, which gives one `rise`, `fall` and `hold` flag per line. The
testbenches do not reuse those pattern lists. Their reference model (`tb/codec_ref_pkg.sv`)
computes the type with the `|m-l| + |m-r|` formula above, so a wrong pattern in a detector
shows up as a mismatch.

**The quiet pattern `---` is not detected.** It belongs to Type-0 by the formula, but
nothing switches, so it causes no crosstalk. Flagging it would make the invert decision
high for every word.

## The invert decision and what it amounts to

`or_logic` ORs the five detector outputs into the control bit. If the control bit is low,
the word goes out as it is. If it is high, the word goes out inverted and the control line
is high. The parameter `TYPE_MASK` (a `codec_pkg::type_vec_t`, bit *k* for Type-*k*)
selects which types take part in the OR:

- `ALL_TYPES` (5'b11111) is the default and the unified scheme. It covers the RC and RLC
  worst cases together.
- `RC_WORST_TYPES` (Type-3/4) gives a codec aimed only at RC lines.
- `RLC_WORST_TYPES` (Type-0/1) gives a codec aimed only at RLC lines.

Note what the default means. Every switching three-line group belongs to one of the five
types. So with all types enabled, the control bit is high exactly when **at least one data
line would switch**. Such a word is sent inverted. A word equal to what the lines already
carry is sent as it is.

The "previous word" is the word actually on the lines, not the previous data word. The
comparison is therefore against what the wires will really switch from. Take the case of
highest power in the published measurements: the lines carry `0111` and the data is `1000`.
Type-0 and Type-2 fire, the word is sent inverted as `0111`, and no data line switches.

In the end-to-end test stream of 20,002 words, the default codec gave the following. The
stream is random 4-bit words, and one word in six repeats the current line state.

| | raw data | coded lines |
|---|---|---|
| switching events (coded count includes the control line) | 33,514 | 31,210 |
| Type-3/4 groups | 5,182 | 4,667 |
| Type-0/1 groups | 13,578 | 12,982 |

These are observations from the testbench, not claims about silicon.

## Timing and interface

`unified_codec` (top), with parameters `W` (default 4) and `TYPE_MASK` (default all five
types):

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; active-low asynchronous reset |
| `data_in` | in | W | word to send, sampled on the rising edge |
| `tx_data`, `tx_ctrl` | out | W, 1 | registered encoded lines and control line |
| `rx_data`, `rx_ctrl` | in | W, 1 | the same lines at the receiving end |
| `data_out` | out | W | decoded word, `rx_data ^ {W{rx_ctrl}}` |
| `hit` | out | 5 | detector outputs for the word on `data_in` (Type-0 is bit 0) |

- The shielded routing is physical, so the lines leave the top and come back in. For an
  ideal wire, tie `rx_*` to `tx_*`.
- A word sampled at edge *n* is on `tx_*` after edge *n*. With the lines tied, it is on
  `data_out` during the same cycle.
- The lines hold their value until the next edge. There is no handshake: every clock
  carries a word.
- Reset drives all data lines and the control line to 0.
- The critical path runs from `data_in` through the transition flags, one detector, the
  OR and the XOR into the bus register.

## Modules

| File | Role |
|---|---|
| `rtl/codec_pkg.sv` | bus width, type indices, type-vector type, the three mask presets |
| `rtl/transition_detector.sv` | per-line rise/fall/hold flags, present word against the word on the lines |
| `rtl/type0_detector.sv` … `rtl/type4_detector.sv` | one coupling-type detector each, for any `W >= 3` |
| `rtl/or_logic.sv` | masked OR of the five detector outputs into the control bit |
| `rtl/xor_stack.sv` | one XOR per line; used as the encoder (stack 1) and the decoder (stack 2) |
| `rtl/codec_encoder.sv` | transmitter: the blocks above plus the bus register |
| `rtl/unified_codec.sv` | top: encoder and decoder, with the lines brought out between them |

## Simulating

Every testbench checks itself and ends with a line `TB_RESULT checks=N failures=M`. For
example, the end-to-end test at default size:

```
verilator --binary --timing --assert -y rtl rtl/codec_pkg.sv tb/codec_ref_pkg.sv \
    tb/tb_unified_codec.sv --top-module tb_unified_codec -Mdir obj
./obj/Vtb_unified_codec
```

Replace the testbench name to run another one. The testbenches are:

- `tb_transition_detector`: all 256 (present, previous) pairs.
- `tb_type0_detector` … `tb_type4_detector`: all 3^W line moves, at W=4 and W=6.
- `tb_or_logic`: all 32 detector vectors, with the default mask and the RC-only mask.
- `tb_xor_stack`: every word both ways, plus a round trip through two stacks.
- `tb_codec_encoder`: a cycle-accurate model, with the default and the RC-only encoder
  side by side, and a reset in the middle of traffic.
- `tb_unified_codec`: end to end at default parameters. It requires each of the
  following at least once: an inverted word, a plain word, each type firing, the
  `0111`→`1000` case, a reset during traffic, and every one of the 16 data words arriving
  on every one of the 16 line states.

Each testbench runs in well under a second.

## Relation to the published scheme, and departures

These parts follow the published scheme:

- The block structure: transition detector, five coupling detectors, OR logic, two XOR
  stacks, and a shielded control line.
- The 4-bit bus.
- The coupling classes.
- Inverting the word when the OR is high.

These are choices made here:

- **The `---` pattern is not detected**, for the reason given above.
- **Hold flags.** The transition detector gives a hold flag for each line as well as rise
  and fall flags, 12 outputs for 4 lines. With the hold flags, every detector pattern is a
  single 3-input AND.
- **Register and reset.** The bus register sits at the encoder output, the previous word
  is taken from it, and the reset value is 0.
- **`TYPE_MASK`.** Its default gives the unified codec.
- **Gate counts.** The detectors are plain sums of products over both groups, and the
  XOR stack uses one gate per line. The published gate counts per block (7, 11, 12, 11
  and 7 gates for Type-0 to Type-4, 16 for the transition detector, 8 for the XOR stack)
  come from a gate-level structure that is not given. This RTL will not match those counts
  before synthesis, though it has the same function.
- **Not included.** The analog and layout work (0.18 µm full-custom cells, power and
  delay figures) and the shield routing itself are outside the RTL.
