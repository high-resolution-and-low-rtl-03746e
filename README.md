# Multiband pulse-swallow frequency divider (32/33/47/48 prescaler)

This is the feedback divider of an integer-N PLL synthesizer for the 2.4 GHz
band (Bluetooth, IEEE 802.15.4, 802.11b/g) and the 5 GHz bands (802.11a). A
single divider serves all bands because its prescaler has four moduli instead
of two. With SEL = 0 it behaves as a 32/33 prescaler. With SEL = 1 it behaves
as a 47/48 prescaler. The 47/48 moduli add no flip-flop: they come from
inverting the mode signal of the 2/3 prescaler inside it.
Around the prescaler sit a 7-bit programmable counter (P) and a 6-bit swallow
counter (S). They give the classic pulse-swallow ratio, set in steps of one
input period:

| SEL | band                | moduli | division ratio  | S range  |
|-----|---------------------|--------|-----------------|----------|
| 0   | 2.4 GHz             | 33/32  | `32*P + S`      | 0..31    |
| 1   | 5.1 to 5.8 GHz      | 47/48  | `48*P - S`      | 0..47    |

With a 1 MHz reference, the synthesizer output frequency in MHz equals the
ratio. For example, 2410 MHz is `SEL=0, P=75, S=10` and 5815 MHz is
`SEL=1, P=122, S=41`. Every 1 MHz channel from 2410 to 2483, 5140 to 5300
and 5715 to 5815 MHz is reachable. Across the whole range, SEL = 0 covers
992..4095 without gaps and SEL = 1 covers 2209..6096.

The RTL is synchronous and uses a single clock, the divider's input. The
intended circuit is different: dynamic single-phase-clock flip-flops, and
asynchronous counters in which each stage is clocked by the one before it.
Here each of those stages is a clock-enabled register on the input clock. The
counting is the same, so the division ratios are exact. Gate-level phase
relations and speed are not modelled.

## How one output period is built

The output period is called a *frame*. It consists of P *prescaler periods*.

1. At the start of a frame, the S counter loads S and pulls MOD low. The P
   counter loads P-1.
2. While MOD is low, each prescaler period lasts 33 input clocks (SEL=0) or
   47 (SEL=1). The S counter counts these periods down. The period that
   takes it to zero sets MOD high.
3. For the remaining P-S periods, the prescaler divides by 32 or 48. The
   S counter is frozen by MOD.
4. When the P counter reaches zero, its flag LD goes high for the last
   prescaler period. LD is the divider output `fout`. At the end of that
   period, both counters reload and the next frame starts.

So a frame lasts `33*S + 32*(P-S) = 32P + S` or `47*S + 48*(P-S) = 48P - S`
input clocks. S must not exceed P, and P must be at least 1. Assertions in
the top module check both whenever the counters reload. With S = 0, MOD is
already high at the reload, and the frame is exactly `32P` or `48P` clocks.

## The multi-modulus prescaler

This is the least obvious part of the design. It has three layers.

**2/3 prescaler** (`prescaler_2_3`). It has two flip-flops and two NOR gates:

    D1 = NOR(MC, ~Q2)      D2 = NOR(Q1, Q2)      output = Q2

- With MC = 1, Q1 stays 0 and Q2 toggles, so it divides by 2 (states 00, 01).
- With MC = 0, Q1 adds one extra state after Q2 was high, so it divides by 3
  (states 00, 01, 10).
- MC counts only in the clock where Q2 is high. That clock decides the length
  of the current output period.

**Divide-by-16** (AD = 16). Four divide-by-2 stages count the 2/3 prescaler's
output periods. One prescaler period is therefore 16 *sub-periods*. The last
stage is the prescaler output `pre_out`.

**Mode logic.** A NAND2 gate combines `~MOD` with the terminal state of the
divide-by-16, which is all stages high, i.e. sub-period 15:

    nand = ~(~MOD & terminal)          MC = SEL ? ~nand : nand

| SEL | MOD | MC in sub-periods 0..14 | MC in sub-period 15 | modulus        |
|-----|-----|-------------------------|---------------------|----------------|
| 0   | 1   | 1 (/2)                  | 1 (/2)              | 16*2 = 32      |
| 0   | 0   | 1 (/2)                  | 0 (/3)              | 15*2 + 3 = 33  |
| 1   | 1   | 0 (/3)                  | 0 (/3)              | 16*3 = 48      |
| 1   | 0   | 0 (/3)                  | 1 (/2)              | 15*3 + 2 = 47  |

Two consequences are worth knowing:

- **MOD = 0 is the swallow phase in both bands.** In the high band, the
  swallow phase is *shorter* (47 clocks). That is why the ratio there is
  `48P - S` rather than `47P + S`.
- **The prescaler uses MOD and SEL in sub-period 15 only.** The counters
  change MOD right after a prescaler period ends. Every prescaler period
  therefore sees one stable MOD.

## Counters and bit cells

Both counters are chains of `loadable_bit_cell`. A cell either loads its
data bit or toggles when a borrow arrives from the bits below it. It passes
the borrow on when it toggles from 0 to 1, which makes the chain a down
counter.

- **Swallow counter.** Its cells also have a disable input, driven by MOD.
  Once the swallow phase is over, the counter stays frozen at zero. MOD
  itself is a flip-flop fed by a NOR of the counter's next state.
- **P counter.** Its cells have the disable input tied low. A NOR of all its
  bits gives LD.

## Timing

- All state changes on the rising edge of `clk` (the input frequency). The
  reset, `rst_n`, is asynchronous and active low.
- `pre_tick` is high in the last input clock of every prescaler period. The
  counters advance only on it.
- `frame_tick` (`= LD & pre_tick`) is high in the last input clock of every
  frame.
- Reset leaves the prescaler at the end of a period and the P counter at
  zero. The first `frame_tick` is therefore in the clock in which reset is
  released, and the first complete frame starts one clock later.
- Treat `sel`, `p_prog` and `s_prog` as static. A new programming applied at
  or before a `frame_tick` governs the whole next frame. A change in
  mid-frame gives one frame of undefined length.

## Where this RTL departs from the published design, and why

- **Single clock instead of ripple clocking.** See the introduction.
- **High-band MOD polarity.** The published prescaler description gives 48
  for MOD = 1. Its counter description says the prescaler moves to 47 once
  the swallow count ends (MOD = 1). These two statements cannot both hold.
  This RTL follows the gate-level description (table above), which gives
  `48P - S`. The S range of 0..47 then fills all gaps between P and P+1.
  The other reading needs MOD = 0 to give 48 and MOD = 1 to give 47 in the
  high band, for a ratio of `47P + S`.
- **P counter bits.** The published counter ties one P bit to SEL and holds
  two others at 1. That cannot produce all of its own P range (105..122),
  so here all seven P bits are programmable.
- **Terminal count.** The P counter loads P-1 and flags LD at zero, so that a
  frame is exactly P prescaler periods long. The S counter treats S = 0 as
  "swallow nothing".
- **Not modelled.** The PLL around the divider (VCO, phase detector, loop
  filter) is not part of this RTL. Neither are transistor-level features:
  dynamic latches, the pass-transistor mode control, power and maximum
  frequency.

## Files

| file                       | contents                                              |
|----------------------------|-------------------------------------------------------|
| `rtl/divider_pkg.sv`       | constants (N1, AD, counter widths) and the `band_e` select type |
| `rtl/prescaler_2_3.sv`     | 2/3 prescaler                                         |
| `rtl/mm_prescaler.sv`      | 32/33/47/48 prescaler: 2/3 prescaler, divide-by-16, NAND and SEL mux |
| `rtl/loadable_bit_cell.sv` | loadable down-counter bit with disable                |
| `rtl/swallow_counter.sv`   | 6-bit S counter and the MOD flip-flop                 |
| `rtl/program_counter.sv`   | 7-bit P counter and LD                                |
| `rtl/multiband_divider.sv` | top: the complete divider                             |
| `tb/*_tb.sv`               | one self-checking testbench per module, plus `band_channels_tb` |

Parameters of the top: `P_W = 7`, `S_W = 6`, `AD_BITS = 4`.
- A wider `P_W` extends the range. For example, `P_W = 8` reaches 6.2 GHz at
  1 MHz resolution.
- `AD_BITS` changes the base moduli to `2*2**AD_BITS` and `3*2**AD_BITS`.
  Add one to each for the swallow phase of the low band, and subtract one
  from the larger for the high band.

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself
through a watchdog if it hangs. Each testbench compares against values
derived independently from the rules above:

- **`prescaler_2_3_tb`.** Random MC every clock. Checks the length of every
  output period.
- **`mm_prescaler_tb`.** Random SEL/MOD per period. Checks all four moduli
  and the output waveform.
- **`loadable_bit_cell_tb`, `swallow_counter_tb`, `program_counter_tb`.**
  Random stimulus against integer reference models. Also checks that MOD
  stays low for exactly S periods and that a frame lasts exactly P periods.
- **`multiband_divider_tb`.** The top at default sizes, with 38
  programmings: both bands, S = 0, S = P, P = 1, the largest values, and
  random ones. For every frame it checks the length, the number of
  prescaler periods at each modulus, and the width of `fout`. It also
  counts that every modulus, band switch, S = 0 frame and all-swallow frame
  occurred.
- **`band_channels_tb`.** Every 1 MHz channel of the three bands, plus a
  coarse sweep of 992..6096. One frame per channel is measured against N.

To run a testbench with Verilator 5:

    verilator --binary --timing --assert --top-module multiband_divider_tb \
        -Irtl -y rtl -y tb +libext+.sv rtl/divider_pkg.sv tb/multiband_divider_tb.sv
    ./obj_dir/Vmultiband_divider_tb

Replace the top module and file to run the other testbenches. Each one runs
in under two seconds.
