# Interface controller unit for an ESM receiver

An ESM (electronic support measures) receiver listens for other emitters. It
sits on a platform that carries its own radar and its own gyro. This
interface controller handles both neighbours:

* **Blanking interface (BIM).** The platform's radar transmits at high power,
  and a receiver left open during that burst would be swamped or damaged. The
  BIM takes the radar's trigger timing and makes one *blanking cover pulse*
  (BCP) per receiver band. Each BCP shuts its band a little before the
  transmission starts and releases it a little after the transmission ends.
* **Gyro interface (GIM).** The platform gyro reports a heading as a 12-bit
  angle. The GIM adds a fixed gyro offset to it, or subtracts the offset, as a
  polarity pin selects. It folds the result back into 0..360 degrees.

The two halves share only clock and reset, and their outputs are independent.
The top module `icu_top` places them side by side.

```
             +------------------------- icu_top --------------------------+
 clk, rst -->|  bim                                                        |
 en -------->|   mtp_module                          bcp_gen               |
             |    clk_gen --tick--+---------------->  (one window    ---->|--> bcp1..bcp3
             |    pt_gen  --pt----+---------------->   per band,          |
             |    mtp_gen --mtp---+---------------->   ORed with MTP)     |--> pt, mtp
             |                                                             |
 gyro_in --->|  gim   pos_corr (in + off) mod 4096 --+                     |
 gyro_off -->|        neg_corr (in - off) mod 4096 --+-- OR merge -------->|--> gyro_corr, gyro_valid
 polarity -->|                                                             |
             +-------------------------------------------------------------+
```

## The radar timeline (BIM)

This part needs the most care. All BIM timing is counted in **ticks**.
`clk_gen` makes a one-clock `tick` every `CLK_DIV` clocks, and every BIM
register advances only on a clock edge that samples `tick` high. So every
edge of PT, MTP and BCP falls on a tick edge, and each duration is a whole
number of ticks. The one exception is a pre-trigger cut short by `en` (see
below).

One radar period with the default parameters, one character per tick (tick =
4 clocks, so the period is 44 ticks = 176 clocks; `#` is high):

```
tick   01234567890123456789     (one period = 44 ticks; PT rises again at 44)
PT     ####________________ ...
MTP    ________######______ ...    delay 4, width 6
BCP1   _______########_____ ...    advance 1, delta 1
BCP2   ______##########____ ...    advance 2, delta 2
BCP3   _____############___ ...    advance 3, delta 3
```

* **Pre-trigger (`pt_gen`).** PT is high for `PT_PW` ticks and then low for
  `PT_PRI` ticks, over and over, while `en` is high. `PT_PRI` is the *low
  time*, not the full repetition period. PT rises on the first tick edge after
  `en` goes high. If `en` drops, PT drops on that clock edge, which need not be
  a tick edge. The next enable restarts the train with a high phase.
* **Main transmission pulse (`mtp_gen`).** The generator waits for the PT
  trailing edge. It then keeps MTP low for `MTP_DELAY` ticks and high for
  `MTP_PW` ticks. PT is sampled on ticks, so the fall is first seen one tick
  after it happens, and the delay counter starts at 1 at that point. That is
  why `MTP_DELAY` must be at least 1. Each PT pulse gives exactly one MTP.
* **Blanking cover (`bcp_gen`).** The pre-trigger gives advance warning, so a
  cover can open before the transmission starts. `bcp_gen` has its own tick
  counter `t`. The counter restarts at each PT trailing edge, and it is given
  the same `MTP_DELAY` and `MTP_PW` as the MTP generator. Band *b* is high for
  `t` in `[MTP_DELAY - BCP_ADV[b], MTP_DELAY + MTP_PW + BCP_DELTA[b])`, and is
  ORed with MTP itself. The OR means a band can never be open while the
  transmitter is on, even if the parameters are set inconsistently.
  `BCP_ADV[b]` must be below `MTP_DELAY`.

Constraints to respect when you change the timing:
`MTP_DELAY + MTP_PW + max(BCP_DELTA) < PT_PRI`, so that each window closes
before the next pre-trigger. `PT_PW`, `PT_PRI`, `MTP_DELAY` and `MTP_PW` must
all be at least 1. Elaboration-time assertions check the last two rules and
the advance rule. A concurrent assertion in `bim` checks that MTP never
overlaps PT.

## Gyro correction (GIM)

A heading is a 12-bit unsigned code. The 4096 codes cover one full turn, so
1 LSB = 360/4096 = 0.087890625 degree.

* `pos_corr` forms the 13-bit sum `in + off`. If the sum is 0x1000 or more,
  it subtracts 0x1000. Example: 358 deg (0xFE8) + 5 deg (0x038) = 0x1020,
  which folds to 0x020 (about 3 deg).
* `neg_corr` forms the signed difference `in - off`. If the difference is
  negative, it adds 0x1000. Example: 0x020 - 0x038 gives 0xFE8.
* `gim` feeds both blocks the same operands, and sends the polarity to both
  as an enable (`sel`). `polarity` = 0 enables the positive block and 1 the
  negative one. The idle block drives zeros, so `gim` merges the two results
  and the two valid flags with an OR. After folding, the result is always
  within 0..360 degrees, so in practice `gyro_valid` is high whenever reset
  is low. While `rst` is high, the output is 0 and valid is 0.

The GIM path is **combinational**: there is no clock between the operand
pins and `gyro_corr`. Register the inputs or outputs at the integration level
if your timing needs it.

## Interface of `icu_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock of the BIM |
| `rst` | in | 1 | active-high reset: synchronous for the BIM, and it forces the GIM output to zero |
| `en` | in | 1 | enables the radar trigger train |
| `gyro_in`, `gyro_off` | in | 12 | gyro heading and offset (`icu_pkg::gyro_t`) |
| `polarity` | in | 1 | 0: `in + off`, 1: `in - off` |
| `bcp1`, `bcp2`, `bcp3` | out | 1 | blanking cover pulses, bands 1 to 3 |
| `pt`, `mtp` | out | 1 | pre-trigger and main transmission pulse, for observation |
| `gyro_corr` | out | 12 | corrected heading |
| `gyro_valid` | out | 1 | corrected heading valid |

Parameters, all passed down to `bim`:

| parameter | default | unit |
|---|---|---|
| `CLK_DIV` | 4 | clocks per tick |
| `PT_PW` | 4 | ticks (4-bit field) |
| `PT_PRI` | 40 | ticks (8-bit field) |
| `MTP_DELAY` | 4 | ticks (4-bit field) |
| `MTP_PW` | 6 | ticks (4-bit field) |
| `BCP_ADV` | `{3,2,1}` | ticks, band 3..1, packed 3 x 4 bits |
| `BCP_DELTA` | `{3,2,1}` | ticks, band 3..1, packed 3 x 4 bits |

Shared types and constants are in `rtl/icu_pkg.sv`: the 12-bit `gyro_t`, the
`corr_sel_e` polarity enum, the 4-bit and 8-bit timing field types, and
`N_BANDS = 3`.

## What is specified, and what was chosen here

Taken from the original specification:

* the split into BIM and GIM, and into MTP module and BCP module;
* the clock generator, PT generator and MTP generator inside the MTP module;
* PT as PW high followed by PRI low;
* MTP as a delay after the PT trailing edge, followed by a pulse;
* 4-bit PW of PT, MTP delay and MTP width;
* three BCP outputs, one per band;
* 12-bit gyro words and the 360/4096 resolution;
* positive and negative correction selected by the polarity pin (high means
  negative);
* the 0x1000 fold with its worked example;
* a valid output;
* the port list of the integrated module.

This design's own choices:

* **All timing values.** The specification calls them fixed but does not give
  numbers.
* **The 8-bit width of the PRI field.**
* **The clock generator as a clock-enable divider**, and its divide ratio.
* **How the BCP window is defined.** Advance and delta delays appear only in a
  list of radar parameters. Here they are read as "open this many ticks before
  the MTP, close this many ticks after", with separate values per band and an
  OR with MTP (the "composite" pulse).
* **The operand order of the negative correction** (input minus offset).
* **How the two correction outputs are merged:** the idle block drives zeros
  and the outputs are ORed.
* **Reset:** active-high, synchronous in the BIM, and forcing zeros in the GIM.
* **What happens when enable drops in the middle of a pulse.**
* **The extra `pt`, `mtp` and `gyro_valid` ports on the top.**

Departures and omissions:

* **No correction-type output.** The specification says the correction type
  "is indicated by a marker". That is read as a marker in the simulation
  waveform, so there is no separate output pin. The polarity input already
  tells which correction is in use.
* **The MTP module's internal wiring is this design's own.** Only its three
  parts are specified.
* **Each band's BCP covers one radar.** "Composite" could also mean merging
  several on-board radars into one cover pulse. Only one radar timing source
  is described, so each band's BCP is built from that single radar.

## Verification

Each module has a self-checking bench in `tb/`. Each bench prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| bench | what it checks |
|---|---|
| `tb_pos_corr`, `tb_neg_corr` | worked example; wrap corners; 4000 random pairs against integer `mod 4096`; reset; block not selected |
| `tb_gim` | both polarities, random operands, example in both directions, reset |
| `tb_clk_gen` | tick spacing at divide ratios 4 and 3; first tick after reset |
| `tb_pt_gen` | high and low times in clocks for two settings; start on the first enabled tick; enable stop and restart |
| `tb_mtp_gen` | delay and width for (4,6) and (1,2); one MTP per PT; no overlap with PT |
| `tb_bcp_gen` | open and close of each band against the PT fall; MTP passed to every band when it comes without a pre-trigger |
| `tb_mtp_module` | the three generators together at their defaults |
| `tb_bim` | a non-default timing set, checked edge by edge |
| `tb_icu_top` | the whole unit at its default parameters, end to end |

`tb_icu_top` checks every BIM edge, with random gyro traffic running at the
same time. It cuts the pre-trigger short once with `en` and resets once
mid-run. It counts each mechanism and fails if one never happened: positive
and negative correction, wrap above 360 and below 0 degrees, PT, MTP, each
band's cover, the enable stop, and the reset.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl rtl/icu_pkg.sv rtl/*.sv \
          tb/tb_icu_top.sv --top-module tb_icu_top -Mdir obj_top
./obj_top/Vtb_icu_top
```

Any other bench works the same way: replace `tb_icu_top` with its name. The
package must come first on the command line. The whole run takes well under
a second.
