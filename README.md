# Pipelined partitioned bus-invert encoder

A wide, heavily loaded bus burns most of its dynamic power in charging and
discharging its lines, so the number of lines that toggle from one word to the
next is what matters. Bus-invert coding bounds that number: before a word is
driven, the sender counts how many lines would change; if more than half would,
it drives the complement of the word instead and raises an extra *invert line*
so that the receiver can undo it.

This design applies the idea to an 8-bit data bus split into two independent
4-bit halves. Each half has its own vote and its own invert line, so a word
whose low half changes a lot and whose high half barely changes gets only its
low half inverted. A pipeline register between the vote and the output
multiplexer cuts the compare-and-vote path from the bus-driving path.

## How a word is coded

```
           din[7:0] ──┬──────────────────────────────┐
                      │                              ▼
                ┌─────▼──────┐ m[3:0] ┌───────┐   ┌──────────┐ d_q   ┌─────────┐
                │ comparator │───────►│ voter │──►│ pipeline │──────►│  invert │── dout[7:0] (bus)
   dout ───────►│ din ^ dout │ m[7:4] ├───────┤cnt│ register │ cnt_q │   mux   │
   (fed back)   └────────────┘───────►│ voter │──►│          │──────►│         │
                                      └───────┘   └──────────┘   │   └─────────┘
                                                                 └──────────────── inv[1:0]
```

1. **Compare.** `bit_comparator` marks with a 1 each bit where the new word
   `din` differs from the word the bus carries now (`dout`, fed back).
2. **Vote.** One `majority_voter` per half counts those marks. It asks for
   inversion (`cnt = 1`) when more than half of its lines would toggle: 3 or 4
   of 4. Exactly 2 of 4 is a tie, and the half is sent as it is.
3. **Register.** `pipe_register` captures `din` and both votes on the rising
   clock edge.
4. **Drive.** `invert_mux` drives each half of the registered word either true
   or complemented. `cnt_q[0]` steers bits 3:0 and `cnt_q[1]` bits 7:4. The
   registered votes leave the encoder as the invert lines `inv[1:0]`.

The result: between two consecutive bus words, at most 2 of the 4 lines of
each half toggle. The encoder carries an assertion that checks this on every
cycle.

**Timing.** A word offered on `din` before a rising edge is on `dout`/`inv`
just after that edge. That is one cycle of latency at one word per cycle, with
no handshake and no stall. The feedback loop closes through the register. So
the next word's vote always sees the word that is really on the bus, including
any inversion, and the loop is never a combinational path.

**Decoding.** `pbi_decoder` inverts each half of the bus whose invert line is
1. It is combinational, so the receiver's word is valid in the same cycle as
the bus.

**Reset.** `rst_n` is asynchronous and active low. It clears the register, so
the bus reads `00` with both invert lines low. The first word after reset is
coded against `00`.

## Worked example

Bus starts at `00`:

| din | halves vs bus (hi, lo) | differing bits | inv | bus |
|-----|------------------------|----------------|-----|-----|
| 58  | 5 vs 0, 8 vs 0         | 2, 1           | 00  | 58  |
| 76  | 7 vs 5, 6 vs 8         | 1, 3           | 01  | 79  |
| 58  | 5 vs 7, 8 vs 9         | 1, 1           | 00  | 58  |
| FF  | F vs 5, F vs 8         | 2, 3           | 01  | F0  |
| 56  | 5 vs F, 6 vs 0         | 2, 2 (ties)    | 00  | 56  |

## What the coding buys

`tb/pbi_top_tb.sv` sends 100,000 random words. It totals the line transitions
for three cases: this link, an uncoded 8-bit bus, and a classic bus-invert
code with one invert line over all 8 bits. That last code is only a software
reference model in the testbench. Typical totals per word:

| bus                         | data lines | invert lines | total |
|-----------------------------|-----------:|-------------:|------:|
| uncoded                     | 4.00       | –            | 4.00  |
| classic bus invert (1 line) | 2.90       | 0.36         | 3.27  |
| this design (2 lines)       | 2.50       | 0.86         | 3.36  |

On the eight data lines the partitioned code does clearly better than the
classic one. But its two invert lines toggle more often, and on uniformly
random data the total, invert lines included, comes out about 3% above classic
bus invert. Which code wins depends on whether the invert lines are as heavily
loaded as the data lines, and on how the data is correlated within each half.

## Parameters

All modules take their defaults from `rtl/pbi_pkg.sv`:

| parameter | default | meaning |
|-----------|---------|---------|
| `DATA_W`  | 8       | bus width |
| `SEG_W`   | 4       | bits per independently inverted segment |
| `NSEG`    | `DATA_W/SEG_W` = 2 | segments, which is also the number of invert lines |

The modules are written for any `DATA_W` that is a multiple of `SEG_W`. The
voter's threshold is "more than `SEG_W/2`". Only the 8/4 configuration is
tested end to end. The unit testbenches also exercise an 8-input voter.

## Where this implementation makes its own choices

- **Invert lines are outputs.** The encoder's data path ends in the
  multiplexer. The registered votes are brought out as `inv[1:0]`, because no
  receiver can decode without them.
- **The invert lines are not counted in the vote.** Each voter sees only the 4
  data lines of its half. A classic bus-invert encoder also counts its own
  invert line.
- **Ties are not inverted.** At exactly 2 of 4 differing bits the half is sent
  as it is.
- **Receiver.** The decoder, and the top level that joins encoder and decoder,
  complete the link. The encoder alone is the core of the design.
- **Reset** as described above. The comparator's "differs" polarity (1 = the
  bit differs) is also this design's choice.
- **The voter is written behaviourally** as a ones count against a threshold.
  It is not a particular gate network.
- The design is not timed against any FPGA or cell library. The
  delay advantage claimed for the pipelined form is not reproduced here.

## Files

| file | contents |
|------|----------|
| `rtl/pbi_pkg.sv` | default widths |
| `rtl/bit_comparator.sv` | bitwise compare of new word with bus word |
| `rtl/majority_voter.sv` | "more than half" vote of one segment |
| `rtl/pipe_register.sv` | pipeline register for the word and the votes |
| `rtl/invert_mux.sv` | per-segment true/inverted output select |
| `rtl/pbi_encoder.sv` | the encoder: the four blocks above plus feedback |
| `rtl/pbi_decoder.sv` | receiver: per-segment conditional inversion |
| `rtl/pbi_top.sv` | encoder and receiver joined by the bus |
| `tb/pbi_ref_pkg.sv` | reference models: partitioned and classic bus invert |
| `tb/*_tb.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. For example,
the end-to-end test at the default size:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/pbi_pkg.sv tb/pbi_ref_pkg.sv tb/pbi_top_tb.sv --top-module pbi_top_tb
./obj_dir/Vpbi_top_tb
```

The end-to-end test checks these things for every word:

- the bus matches the reference coding;
- the receiver returns the word one cycle after it was offered;
- no half toggles more than 2 lines.

It also counts how often each case occurred: neither half inverted, low only,
high only, both, a tie, and a reset in mid stream. It fails if any case never
occurred, and it fails if the coded bus does not beat the uncoded bus on
data-line transitions.

The encoder test also checks that the bus does not change before the clock
edge. The comparator, voter, multiplexer and decoder tests are exhaustive.
