# MRFC crosstalk-avoidance CODEC for a 4-wire on-chip bus

Neighbouring on-chip wires are coupled. When two adjacent wires switch in
the same clock cycle they disturb each other. If they switch in opposite
directions the coupling is mainly capacitive. If they switch in the same
direction it is mainly inductive, which becomes more important as clock
rates rise. This CODEC sends 3-bit data words over a 4-wire bus. Before
it drives a new word, it makes sure that no two adjacent wires switch
together.

It does this in two steps:

1. **Encode.** Each data word becomes a 4-bit Modified Redundant Fibonacci
   Code (MRFC) word.
2. **Detect and flip.** The new word is compared with the word already on
   the wires. Wherever two neighbouring wires would both switch, both bits of
   that pair are flipped back in the outgoing word, so those wires stay still.
   The corrected word becomes the reference for the next word.

## The MRFC code

An MRFC word `d3 d2 d1 d0` gives its four bits the weights 3, 2, 1 and 1.
The value of the word is `3*d3 + 2*d2 + d1 + d0`. The code is redundant:
several words have the same value (for example `0110` and `0101` are both 3).
The encoder uses one fixed word per value:

| data | 000  | 001  | 010  | 011  | 100  | 101  | 110  | 111  |
|------|------|------|------|------|------|------|------|------|
| MRFC | 0000 | 0001 | 0011 | 0110 | 0111 | 1100 | 1101 | 1111 |

Walking through the data values in order, most consecutive words differ on
wires that are not neighbours. The exception is `100 -> 101` (`0111 -> 1100`),
where wires 3, 1 and 0 switch and wires 1 and 0 are neighbours. Random data
causes many more such cases, and the flip stage handles them.

## Detect and flip

This is the part of the design that needs the most care.

Let `prev` be the word on the wires and `next` the MRFC word to be sent.

- **Transition detector** (`transition_detector`): `trans = prev ^ next`.
  Each 1 marks a wire that would switch.
- **Crosstalk detector** (`crosstalk_detector`):
  `xtalk[i] = trans[i] & trans[i+1]` for the 3 adjacent pairs.
  All zeros means the transfer is free of adjacent switching.
- **Flip** (`crosstalk_flipper`): every bit that belongs to a flagged pair is
  inverted in `next`. The detectors then run again on the corrected word.
  This repeats for `PASSES` stages, followed by a final check that drives
  `clean`.

Example: `prev = 0111`, `next = 1100`. Then `trans = 1011` and
`xtalk = 001` (pair of wires 1 and 0). Bits 1 and 0 are flipped, so the bus
receives `1111`. Only wire 3 switches.

**Why one pass is enough.** A flipped bit no longer switches. Every wire that
was part of a run of two or more switching neighbours is flipped back. The
only switches left are isolated ones, so the second check always reads zero.
The further passes are kept because they mirror the "check, flip, check
again" loop of the scheme. They cost only redundant logic that synthesis
removes. `mrfc_codec` asserts that the loop always ends clean, and the
testbenches check this for all 256 `(prev, next)` pairs.

**Chaining.** The reference for the next word is the corrected word that was
actually driven, not the original MRFC word. So one flip can change what
happens to the following word. After the data sweep wraps from `111` to
`000`, for example, every wire would switch. All four bits are flipped, so
the bus stays at `1111`.

**What the receiver sees.** The scheme sends no information about which bits
were flipped. The decoder (`mrfc_decoder`) returns the weighted sum of the
bus word. This equals the sent data only when nothing was flipped
(`flip_mask == 0`). A flipped word decodes to a different value. The
`flip_mask` and `xtalk_seen` outputs show when this has happened. Adding a
recovery channel would be an extension beyond the scheme.

A second limitation: the detector flags any two neighbours that switch
together, whatever their direction. It therefore removes the capacitive
(opposite-direction) case as well as the inductive one. It does not tell the
two cases apart.

## Top level: `mrfc_codec`

```
in_data --> mrfc_encoder --code--> crosstalk_flipper --> bus register --> bus
                                       ^                     |
                                       +------- prev --------+--> mrfc_decoder --> rx_data
```

| port         | dir | width | meaning |
|--------------|-----|-------|---------|
| `clk`        | in  | 1 | clock |
| `rst`        | in  | 1 | synchronous, active high; clears the bus to `0000` |
| `in_valid`   | in  | 1 | a data word is present this cycle |
| `in_data`    | in  | 3 | data word |
| `bus`        | out | 4 | the interconnect wires (registered) |
| `bus_valid`  | out | 1 | `bus` took a new word at the last edge |
| `flip_mask`  | out | 4 | bits of that word's MRFC code that were flipped |
| `xtalk_seen` | out | 1 | crosstalk was detected and avoided for that word |
| `bus_clean`  | out | 1 | the final re-check found no adjacent switching |
| `rx_data`    | out | 3 | receiver-side decode of `bus` |

**Timing.** The design accepts one word per clock with no stalls. A word
sampled at edge *k* is registered in the encoder and is on `bus` after edge
*k+1*: two register stages, one word per clock. Without `in_valid` the bus keeps its
value, so idle cycles cause no switching. The detect-and-flip loop is fully
combinational between the encoder register and the bus register: about three
XOR/AND/mux levels per pass.

**Size.** The design uses 15 flip-flop bits: 3 data bits and a valid bit in
the encoder, plus the bus, its status bits and `bus_valid`. Coarse synthesis
gives about 70 word-level cells.

## Files

| file | contents |
|------|----------|
| `rtl/mrfc_pkg.sv` | widths (`DATA_W = 3`, `CODE_W = 4`), types, bit weights |
| `rtl/mrfc_encoder.sv` | data register + MRFC table |
| `rtl/transition_detector.sv` | per-wire XOR, `WIDTH` parameter |
| `rtl/crosstalk_detector.sv` | adjacent-pair AND, `WIDTH` parameter |
| `rtl/crosstalk_flipper.sv` | unrolled detect-and-flip loop, `WIDTH` and `PASSES` parameters |
| `rtl/mrfc_decoder.sv` | weighted-sum decoder |
| `rtl/mrfc_codec.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module |

The detectors and the flipper take a `WIDTH` parameter. The encoder and
decoder are fixed to the 3-bit/4-bit code shown above. A wider bus would need
a longer code table, which is not defined here.

## Where this design makes its own choices

These points follow the scheme as published:

- the code table;
- the XOR transition detector and the AND crosstalk detector;
- flipping the flagged bits of the next word;
- re-checking until the detector reads all zeros;
- comparing each word with the word that was actually driven.

These points are choices of this design:

- **Streaming.** Words are processed one per clock as they arrive. An
  alternative is to collect a block of code words first (eight words in a
  32-bit register) and then step through them with a counter. That form was
  not adopted.
- **Registers.** The data word is registered before the table lookup, giving
  a one-clock encode delay. The corrected word is then registered on the bus.
- **Handshake.** There is a `valid` signal, and the bus holds its value when
  no word is valid.
- **Reset.** Reset is synchronous and clears the bus to `0000`.
- **Loop.** The loop runs within one cycle as `PASSES = WIDTH-1` unrolled
  stages.
- **Decoder.** The decoder is a plain weighted sum.
- **Status outputs.** `flip_mask`, `xtalk_seen` and `bus_clean` are extras.

Published FPGA results for the scheme report 3 flip-flops and a 5 ns encoder
delay. Those figures belong to a different partitioning and are not
reproduced here.

## Simulating

Each testbench is self-checking. It prints
`TB_RESULT checks=N failures=M` and stops. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/mrfc_pkg.sv tb/tb_mrfc_codec.sv --top-module tb_mrfc_codec -o sim
./obj_dir/sim
```

- `tb_mrfc_codec` runs the CODEC end to end at its only configuration.
  - It runs the ordered sweep `000..111` twice, checks that `101` after `100`
    is sent as `1111`, and checks that the wrap back to `000` leaves the bus
    still.
  - It then runs about 2500 random words with idle gaps and a reset in the
    middle.
  - It compares every output against a reference model and checks on every
    edge that no two neighbouring bus wires switch.
  - It counts unchanged words, flipped words, multi-pair flips, idle holds
    and resets, and fails if any of these never happened.
- `tb_crosstalk_flipper`, `tb_transition_detector` and `tb_crosstalk_detector`
  test every input combination.
- `tb_mrfc_encoder` checks the table and the one-clock delay.
- `tb_mrfc_decoder` checks all 16 words.

All testbenches finish in well under a second.
