# On-detector trigger and readout chips for an end-cap muon system

The end-cap muon trigger of a collider experiment has to decide, for every bunch crossing
(every 25 ns), whether a muon above a transverse-momentum (pT) threshold went through the
thin-gap chambers. A muon from the interaction point crosses a *triplet* of chambers and then
a *doublet* further out. The straighter its path, the higher its pT. So the decision comes
down to one question: does a hit on one plane have a partner on another plane close to the
straight line back to the interaction point?

This RTL models the three custom chips that answer that question on the detector. It also
models the readout of the hits they see:

| chip | module | job |
|---|---|---|
| patch-panel chip | `ppic` | takes 16 front-end channels, assigns each hit to its bunch crossing, sends test pulses to the front end, keeps its settings in upset-proof registers |
| slave-board chip | `slbic` | low-pT trigger for one board in one of four schemes; level-1 buffer, derandomizer and serial readout link |
| high-pT chip | `hptic` | matches doublet tracks from three slave boards against triplet candidates and sends the two best tracks to the sector logic |

`tgc_endcap_top` wires one unit together:

```
 front-end hits (3 x 144 doublet, 112 triplet)
        |
  34 x ppic  (bunch crossing id, masks, test pulses)          1 clock
        |
  3 x slbic (doublet CM)      1 x slbic (triplet 2/3 or OR)   2 clocks
        | 6 tracks                  | up to 4 candidates
        +------------+--------------+
                     |
                  hptic (6 matrix blocks, 2-out-of-6, H/L)     2 clocks
                     |
               2 tracks -> sector logic
  each slbic: level-1 buffer -> derandomizer -> local slave link -> star switch
```

All logic runs on the 40 MHz bunch-crossing clock. Resets are active low and asynchronous.
With the high-pT coarse delays at zero, a track on the front-end pins appears on `hpt_out`
at the fifth clock edge, counting the edge that samples the pins as the first.

## The coincidence matrix

The matrix is the centre of both the slave-board doublet trigger and the high-pT chip.
Take one plane as the *pivot* (its channel numbers index the rows) and another as the
*reference* (columns). A muon from the interaction point fires pivot channel `i` and
reference channel `i + d`. The displacement `d` is the distance of the matrix element from
the diagonal. A small |d| is a stiff, high-pT track; a large |d| is a soft one. The window
of allowed `d` sets the pT threshold.

### Slave-board doublet matrix (`slb_matrix`, `slb_decluster`)

Each slave-board chip has two identical matrix halves, A and B. Each half has 32 pivot
channels and a displacement window of -7..+7. Within one half:

1. **Matrix.** For every `d` the element row `i`, displacement `d` is
   `pivot[i] & refer[i+7+d]`. The elements are ORed over the rows, giving one "something
   matched at `d`" bit per displacement.
2. **Primary encoder.** It searches outward from `d = 0` and takes the first displacement
   that matched, so the highest-pT track wins. For equal |d|, the negative one wins. The
   result is a 4-bit two's-complement code (the "16-4 encoder").
3. **Feedback.** The chosen `d` goes back into the matrix. The rows that match at exactly
   that displacement form a 32-bit row vector.
4. **Decluster and 32-5 encoder.** A track often fires neighbouring channels. The decluster
   keeps the middle channel of the first run of set bits (the lower middle for an even run)
   and encodes it in 5 bits.

The track word is `{delta[3:0], pos[4:0]}`, 9 bits. Half A reports in output slot 0 and
half B in slot 1. Reference channel `c` sits on input bit `64 + c`. Pivot channel `p`
matches reference channel `p + d`, so it needs reference bit `64 + p + 7 + d`. This gives
78 reference bits for 64 pivot channels.

### High-pT matrix (`hpt_matrix_block`)

Here the doublet is the pivot plane and the triplet is the reference. The chip has six
blocks, one per doublet track it receives (three slave boards, halves A and B). The row is
the doublet track's 5-bit position. The triplet candidates arrive as column numbers and are
decoded into a 222-bit column pattern. Block `k` sees columns `32k .. 32k+61`. Column
`32k + 15 + pos + d` is displacement `d` from doublet position `pos` in block `k`. The
window is ±15 for wires and ±7 for strips, chosen by `strip_mode`. Each block gives at most
one high-pT candidate: the displacement closest to the diagonal, as a 5-bit signed number.

## Slave-board chip trigger schemes (`slb_trigger`)

The same 142 input pins carry a different pattern in each mode. The two mode pins are
`{triplet, strip}`.

| mode | inputs | rule | outputs |
|---|---|---|---|
| doublet wire / strip | pivot `hit[63:0]`, reference `hit[141:64]` | coincidence matrix, two halves | slots 0,1: `{delta, pos}` |
| triplet wire | planes `hit[35:0]`, `hit[71:36]`, `hit[107:72]` | 2-out-of-3 per channel | slots 0..2: channel 0..35, lowest first |
| triplet strip | inner `hit[31:0]`, outer `hit[63:32]` | OR per channel | two logics (channels 0..15, 16..31), two candidates each, slots 0..3 |

Only the inner and outer triplet chambers have strips, which is why the strip rule is an
OR of two planes. Each output slot is `{valid, data[8:0]}`. The trigger result is
registered, so `trig_out` follows `hit_in` by two clocks.

## High-pT chip (`hptic`)

Inputs per crossing:

- six doublet candidates `{valid, dlow[3:0], pos[4:0]}`, taken straight from the
  slave-board track words;
- twelve triplet candidates `{valid, col[7:0]}`: enough for four triplet wire boards of
  three tracks each. A triplet strip board fills four of them.

Each bus passes a coarse delay (`hpt_coarse_delay`, 0..7 crossings) and an input register.
This lets inputs that arrive over cables of different lengths be aligned.

After the six matrix blocks, every doublet candidate becomes one of two kinds:

- a **high** candidate with the chip's own displacement, if its block found a triplet match;
- otherwise a **low** candidate carrying the slave board's low-pT displacement.

Two copies of `hpt_sel2of6` pick the two best highs and the two best lows. "Best" means the
smallest |displacement|, with the lower block winning ties. The selector does not use
cascaded priority encoders. Every candidate is compared with every other one at the same
time. A candidate beaten by nobody is first, and one beaten by exactly one other is second.
This keeps the whole selection inside one clock.

`hpt_hl_select` then forms the output pair. Highs come first:

- **HH**: two highs;
- **HL**: one high and the best low;
- **LL**: the two best lows.

The output word is `{valid, high, blk[2:0], pos[4:0], delta[4:0]}`. The pair is registered,
so the chip takes two clocks from input to output.

In `tgc_endcap_top`, triplet channel `c` drives high-pT column `c + 15`. A triplet hit on
channel `c` therefore lines up with doublet row `c` (block `c/32`, position `c%32`) at zero
displacement. This mapping stands in for board wiring that a real installation defines.

## Readout (`slb_l1buffer`, `slb_derandomizer`, `slb_link_tx`)

Every clock, the slave-board chip writes a 194-bit record into the level-1 buffer:

```
record = {bcid[11:0], trigger slots[39:0], hits[141:0]}
```

The hits and the trigger result in one record belong to the same crossing. The crossing
number counts 0..3563 and is cleared by `bcr`.

**Level-1 buffer.** A 128-word circular RAM. A word comes back exactly `latency` clocks
after it was written. `latency` can be set from 1 to 127; the nominal ~2.5 µs is 100.

**Derandomizer.** A level-1 accept copies one event into a 16-entry FIFO. An entry is
`{l1id[23:0], next, current, previous}`: the event number plus the accepted crossing and
its two neighbours. The crossing after the accepted one leaves the buffer one clock after
the accept, so the copy is made one clock late from a two-stage shift register. An accept
that finds the FIFO full is dropped, and the sticky `dr_overflow` flag is set.

**Local slave link.** Four lines: clock, synch and two data bits. The transmitter sends one
606-bit entry per frame:

- synch is high on the first clock only;
- two bits go out per clock, least significant first;
- a frame takes 303 clocks, and frames follow each other back to back.

**Accept timing.** In `slbic`, the accept for a crossing must be sampled `latency+3` clock
edges after the edge that sampled the crossing's hits. In `tgc_endcap_top`, counted from
the front-end pins, it is `latency+4`.

## Patch-panel chip (`ppic`)

The hits reach this chip from the front end after an analog delay-locked loop has aligned
them to better than a nanosecond. That loop is not modelled here.

**Bunch crossing identification (`pp_bcid`).** A hit is assigned to the first crossing in
which it is seen. The chip outputs one pulse exactly one crossing long, however long the
front-end pulse lasts. Disabled channels stay silent.

**Test pulses (`pp_testpulse`).** A request starts a programmable delay. When it runs out,
the chip sends a one-crossing pulse on the selected channels. With delay `D`, the pulse
appears `D+1` edges after the edge that samples the request.

**Registers (`pp_tmr_regs`).** The settings are triplicated against single event upsets.
Reads and the logic see the bitwise majority of the three copies. Every clock the majority
is written back into all copies, so an upset is repaired after one clock. `seu_seen` pulses
when a repair happens. The `inj_*` pins flip bits in one copy for testing; tie `inj_en` low
in use.

Register map, 16 bits each:

| address | register |
|---|---|
| 0 | channel enable mask (resets to 0: all channels off) |
| 1 | test pulse channel mask |
| 2 | test pulse delay, bits [7:0] |
| 3 | bit 0: test pulse enable |

In the top, `reg_chip` selects one of the 34 chips. Doublet board `s` uses chips
`9s..9s+8`, and the triplet board uses chips 27..33.

## What is modelled, what is not, and where it departs

Modelled as synthesizable logic:

- all the digital functions above;
- the four trigger schemes;
- the readout chain;
- the upset-protected registers.

Not modelled:

- the sub-nanosecond DLL delay of the hit channels and the DLL clock-phase adjustment,
  which are analog;
- the LVDS receivers;
- the forwarding of timing-system signals through the patch panel, whose modification is
  not specified;
- the CAN node on the patch-panel board;
- the serializers and LVDS drivers outside the chips;
- the star switch, readout driver and sector logic.

Choices and departures an engineer should know about:

- **Doublet wire size.** The doublet matrix is 64 pivot × 78 reference channels: two halves
  of 32 pivots with a ±7 window. This covers the 64 × 64 strip configuration. The 88 × 72
  wire configuration quoted for the real chip has more inputs (160) than this pin map has
  (142), and is not reached.
- **Track word widths.** The track word is 4 bits of displacement and 5 bits of position.
  This follows the encoder widths of the slave-board block diagram (16-4 after the primary
  encoder, 32-5 after the decluster). The prose of the original description gives the two
  widths the other way round. Either way the word is 9 bits.
- **High-pT inputs.** The high-pT chip accepts twelve triplet candidates per crossing, for
  four triplet wire boards. The top-level model holds only one triplet board, which fills
  the first four inputs; the other eight are tied off there.
- **Own choices.** These were not specified and are this design's own:
  - window sizes of the high-pT matrix;
  - tie rules in the encoders and selectors;
  - the decluster rule for several clusters;
  - the split of the strip channels between the two strip logics;
  - record and frame layouts;
  - counter widths (ATLAS conventions);
  - the register map;
  - the coarse delay range.
- **Doublet layers.** A doublet chamber has two layers in reality. Here each doublet input
  is taken as one already-combined channel; no layer coincidence is modelled in front of
  the matrix.

## Size

The logic was synthesised to generic cells (yosys, before technology mapping). For scale,
the gate counts quoted for the real chips are also listed. Those chips contain far more
than this model: the analog delay lines, the interfaces, and their buffers built from
gates.

| chip | cells here | storage bits here | quoted for the chip |
|---|---|---|---|
| `ppic` | 140 | 250 flip-flops | about 10K gates |
| `hptic` | 2.3K | 1.4K flip-flops | about 20K gates |
| `slbic` | 3.4K | 1.4K flip-flops + 34.5K memory bits | about 200K gates |

In `slbic`, the memory is the level-1 buffer (128 × 194 bits) and the derandomizer
(16 × 606 bits). A gate-built version of those two memories alone would account for most of
the quoted 200K gates.

## Files

- `rtl/tgc_pkg.sv`: shared constants, the mode enum and the candidate structs.
- `rtl/<module>.sv`: one module per file, as named above.
- `tb/<module>_tb.sv`: a self-checking testbench per module. Each ends by printing
  `TB_RESULT checks=N failures=M`.
- `tb/slbic_rate_tb.sv`: the slave-board chip read out at the nominal level-1 rate (see
  Verification).

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -y rtl +libext+.sv -Irtl rtl/tgc_pkg.sv tb/tgc_endcap_top_tb.sv \
  --top-module tgc_endcap_top_tb -Mdir obj_top
./obj_top/Vtgc_endcap_top_tb
```

Replace `tgc_endcap_top` with any module name to run its own testbench. To lint a module:

```
verilator --lint-only -Wall -y rtl +libext+.sv rtl/tgc_pkg.sv rtl/<module>.sv --top-module <module>
```

The lint reports unused package constants, a few unused status bits, and `rst_n` being used
both synchronously and asynchronously. The synchronous use comes from `disable iff` in a
FIFO assertion; it does not affect the logic.

## Verification

Every block's testbench compares the block with an independent model, using directed cases
and a few thousand random patterns:

- matrix and decluster against brute-force searches;
- selectors against a sort;
- buffers and FIFO against recorded histories;
- the link by rebuilding frames from the serial lines.

Where a latency is defined, it is checked cycle by cycle:

- two clocks for the slave-board trigger output and for the high-pT chip;
- exactly `latency` clocks for the level-1 buffer;
- one clock for bunch crossing identification;
- `D+1` for test pulses.

`tb/tgc_endcap_top_tb.sv` runs the whole unit at its default sizes, with a level-1 latency
of 100 crossings (2.5 us). It places tracks on the front-end pins and checks the high-pT
output for each scenario. It also reads one event back
through two links and forces a derandomizer overflow. It counts each mechanism and fails if
one never occurs:

- low- and high-pT coincidence;
- HH, HL and LL;
- declustering;
- triplet 2-out-of-3 and strip OR;
- the wire/strip window change;
- coarse delay;
- channel mask;
- a long front-end pulse giving a single crossing;
- level-1 readout;
- derandomizer overflow;
- test pulses;
- upset repair.

`tb/slbic_rate_tb.sv` runs the slave-board readout under load. It uses the default sizes,
a level-1 latency of 100 crossings (2.5 us) and random hits in every crossing. Accepts come
at random, one per 400 crossings on average (100 kHz); a frame occupies the link for 303 of
those crossings. All 1000 events are rebuilt from the link and checked against the recorded
hits and trigger outputs. The derandomizer must never overflow. With the random
sequences tried, at most 13 events were waiting at once, against a depth of 16.

Each testbench was also run against a deliberately broken copy of its module and reported
failures.
