# An XF correlator for a six-antenna submillimetre array

This is synthesizable SystemVerilog for the digital back end of a six-station
interferometer: the 2-bit samplers, the per-station switching matrix, and one
lag (XF) correlator per baseline. Each baseline gets 8192 lags. That is 4096
spectral channels, whether they are spread over 4 GHz of bandwidth at 2 MHz
resolution or packed into one 32 MHz band at 7.8 kHz. Beside the data path are
the digital dividers and phase detectors of the baseband L.O. synthesizers.

The main idea is that no multiplier runs faster than the 32 MHz system clock,
though every signal is sampled at 64 Ms/s. Each signal travels as an
(even, odd) pair of samples per clock. Four 16-lag correlator chips, working
on the even×even, odd×odd, even×odd and odd×even streams, together give 32
lags of the full-rate cross-correlation. The same chip, wired differently,
also extends a correlator to more lags by daisy-chaining. This is how a fixed
pool of chips trades bandwidth for resolution.

## Structure

```
sma_correlator                       top: 6 stations, 15 baselines, 32 L.O.s
├── sampler_2bit      x 6 x 128      behavioural 4-level sampler
├── sample_switch     x 6            128 x 128 crossbar per station
├── baseline_chassis  x 15           one per station pair
│   ├── accum_control                dump timing, unload, SIG/REF summation
│   └── correlator_module x 16       one card = two pages
│       ├── delay_ram x 2            station X and station Y delay
│       └── octal_correlator x 2     eight 32-lag correlators
│           └── quad_correlator x 8  32 lags from four chips
│               └── bos_chip x 4     16 multiply-accumulate cells
└── lo_synth_dividers x 32           feedback/reference dividers + PFD
```

`corr_pkg` holds the shared sample types and the reduced-product function.

Sizes at the default parameters:

| | per baseline | whole array |
|---|---|---|
| correlator chips | 16 × 2 × 8 × 4 = 1024 | 15,360 |
| lags | 8192 | 122,880 |
| spectral channels | 4096 | 61,440 |
| inputs per station | 128 baseband signals (64 MHz each) | |

## Samples and products

A sample is 2 bits, `{sign, magnitude}`. Sign 1 means positive and magnitude 1
means a high level. The product of two samples uses the usual reduced 4-level
weights:

| x \ y | high | low |
|---|---|---|
| high | ±3 | ±1 |
| low  | ±1 | 0  |

The sign is the XOR of the two signs. A +3 offset makes every product an
unsigned count from 0 to 6. Each MAC cell can then use a plain counter.

Each cell is a 20-bit counter: a 4-bit prescaler plus a 16-bit latch. At 32 MHz
and the 4 ms dump period, the largest count is 6 × 128,000 = 768,000, which
fits in 20 bits. A `dump` latches the upper 16 bits for readout and restarts
the counter with the product of that same clock, so no sample is lost. The
prescale of 4 is one of the two values the design allows (4 or 6). It is the
`PRESCALE` parameter.

To recover a correlation coefficient, subtract the offset. For a window of W
clocks, one sample stream contributes 3W counts before the prescale.

## Odd/even multi-processing and lag numbering

This is the part that takes the most care.

**The chip (`bos_chip`).** The chip has 16 MAC cells. It shifts X and Y
through two short registers, `xr` and `yr`, one step per clock. Cell 2c
multiplies `xr[c]·yr[7-c]` and cell 2c+1 multiplies `xr[c]·yr[6-c]`. With this
tap pattern, cell i accumulates `x(s)·y(s+i-7)`. The chip therefore covers
lags -7..+8 of its two input streams. Select and delay inputs (`x_sel`,
`y_sel`, `x_dly`, `y_dly`) choose whether a chip takes its local input or the
output of its neighbour, and whether it adds a one-clock delay. The chip also
drives its X and Y shift outputs for cascading.

**The quad (`quad_correlator`).** The four chips take these stream pairs:

| chip | X stream | Y stream |
|---|---|---|
| 0 | even | even |
| 1 | odd | odd |
| 2 | even | odd |
| 3 | odd | even |

When Y is local, a one-clock Y delay is switched in on chips 0, 1 and 2. This
lines the chips up so that readout point n (0..31) is full-rate lag n-16,
giving lags -16..+15:

- An even point n reads cell n>>1 of chips 0 and 1 and adds them.
- An odd point n reads cell n>>1 of chips 2 and 3 and adds them.

Each point is therefore the sum of two 16-bit latches, 17 bits wide. Each
point covers both the even and the odd sample of every clock, i.e. the full
64 Ms/s stream.

**Daisy chains.** The quad also has cascade ports. X enters the first member
of a chain and is passed on. Y enters the last member and is passed back. In a
chain of L quads, quad q (counting from the X end) measures lags 32q-16L+n.
The whole chain covers -16L..+16L-1, centred on zero. The optional Y delay is
not applied to a Y that arrives from a neighbour. The delay is needed only
once, at the chain's Y entry.

**The octal (`octal_correlator`).** An octal takes Video A–D of station X and
of station Y. A and C are right circular polarization; B and D are left. Its
eight quads form:

```
0: XA·YA   1: XA·YB   2: XB·YA   3: XB·YB
4: XC·YC   5: XC·YD   6: XD·YC   7: XD·YD
```

That is all four polarization products of two bands. Seven `chain` bits link
correlator q to q+1. `link_prev` and `link_next`, with the link ports, carry a
chain into and out of the octal. `correlator_module` has the same links
between its two octals and to the cards on either side, over the backplane.
One chain can therefore run through all 256 correlators of a baseline:
8192 lags on one signal pair.

## Delay compensation

Each card puts both its X and its Y inputs through a `delay_ram`. Each RAM has
its own delay register. The RAM has 2048 words, enough for 100 lags per km on
a 20 km baseline. Its latency is delay+2 clocks.

A card with delays dx and dy shows input lag k at its correlator lag
k + 2(dx-dy). The factor is 2 because one clock holds two samples. Delay
therefore moves in steps of two samples. Any odd sample of residual delay, and
all fractional delay and fringe rotation, is assumed to be handled before the
samplers.

## Dump, unload and the summation memory (`accum_control`)

Each chassis has one accumulator/control unit.

**Dump and unload.** Every `dump_period` clocks (default 128,000, i.e. 4 ms)
it sends a one-clock dump to every chip of the chassis. It then reads all
N_MODULES × 512 points, one per clock, over the chassis readout bus. The
module data arrives one clock after the address. Each point is added into the
summation memory.

**Overrun.** A dump that falls due while an unload is still running is
skipped. It sets a sticky overrun flag. At the defaults an unload takes 8192
clocks, far inside the period. The flag only appears with very short periods.

**SIG/REF banks.** The summation memory has two banks, A and B. Each bank has
a SIG half and a REF half. The `sig_ref` input is sampled at each dump and
picks the half that dump goes into. This keeps the two phases of a load- or
phase-switching cycle apart.

One bank accumulates while the host reads the other. A host *swap* exchanges
the banks. It takes effect once the unit is idle. After a swap, the first dump
into each half of the new bank overwrites instead of adding. The registers
report how many SIG and REF dumps the idle bank holds.

Host addresses of a chassis (18-bit word address, read data one clock later):

| addr[17:16] | meaning |
|---|---|
| 0 | registers: 0 dump period (r/w); 1 control (write bit 0 = swap, bit 1 = clear overrun); 2 status {overrun, busy, accumulating bank}; 3 SIG dumps in idle bank; 4 REF dumps in idle bank; 5 total dumps |
| 1 | card registers: addr[5:2] card, addr[1:0] register |
| 2 | idle bank: addr[13] 0 = SIG / 1 = REF, addr[12:0] = {card, octal, correlator, lag} |

Card registers:

| reg | contents |
|---|---|
| 0 | X delay |
| 1 | Y delay |
| 2 | {link from previous card (bit 8), link octal 0 → 1 (bit 7), chain bits of octal 0 (6:0)} |
| 3 | {link to next card (bit 7), chain bits of octal 1 (6:0)} |

Both cards at a card-to-card link must have their link bit set.

## The top (`sma_correlator`)

Each station's 128 baseband signals are sampled and go through that station's
crossbar. The crossbar chooses which signal feeds each of its 128 outputs; at
reset it is the identity. Output k of station i goes to input k of every
chassis where station i is X (the lower station number). Output k of
station j goes to input k of every chassis where station j is Y. Baseline
(i, j) with i < j is chassis `i·N - i(i+1)/2 + (j-i-1)`.

One `sig_ref` input and one sampler threshold are shared by the whole array.
The host bus stands in for the VME and computer links. It uses a 24-bit word
address with a 2-clock read latency. addr[23:19] selects the target:

| addr[23:19] | target |
|---|---|
| 0..14 | chassis (addr[17:0] as above) |
| 16..21 | switch of station s: write, addr[6:0] = output, wdata = input that feeds it |
| 24 | L.O. words: addr[4:0] = synthesizer, wdata[10:0] = frequency in MHz; reads back |

## L.O. synthesizer dividers (`lo_synth_dividers`)

Each baseband converter's 1–2 GHz L.O. is a phase-locked loop stepped in
1 MHz. Only the loop's digital parts are here:

- **Feedback divider.** It runs on the VCO clock: a dual-modulus ÷10/11
  prescaler with pulse-swallow counters P = n/10 and S = n mod 10. Its output
  period is exactly n VCO cycles.
- **Reference divider.** It divides the 10 MHz reference by 10.
- **Phase/frequency detector.** It has the usual up/down flops. They clear
  each other asynchronously when both are set.

When the loop is locked, both divider outputs run at 1 MHz. The VCO, the loop
filter and the microprocessor that loads the words are outside this RTL.

## Where this design departs from, or goes beyond, the source design

- **Not built.** These are analog, or bought in, and appear only as ports:
  - the I.F. distribution and the baseband converters;
  - the analog half of the L.O. synthesizers;
  - the control computers and the VME interfaces;
  - the FFT processing after the correlator;
  - the backplanes.
- **Sampler.** The 2-bit sampler is a behavioural model. It takes an 8-bit
  signed "voltage" and a threshold. The code assignment is this design's.
- **Host bus.** The plain host bus, its address maps, and the register layout
  of the cards and the chassis are this design's. The source describes VME
  slave interfaces but gives no register map.
- **Summation memory.** The two-bank SIG/REF scheme, the swap-on-idle rule and
  the overrun flag are this design's reading of a memory that is only drawn as
  blocks. `SUM_W` = 32 is assumed.
- **Delay memory.** The width and depth of the delay memory are assumed. The
  depth comes from the 20 km baseline figure.
- **Chaining.** Chains link only neighbouring correlators. This is enough for
  the continuum, 7.8 kHz, 31.2 kHz and 250 kHz configurations. It is not
  enough for the mixed configuration (4 GHz continuum at single polarization
  plus a 4096-lag 32 MHz band): the 128-correlator chain occupies 8 cards,
  leaving 64 inputs per station, i.e. 2 GHz of continuum. A more general
  routing of chain ends would be needed for that.
- **Switching matrix.** It is a full 128×128 registered crossbar per station.
  The source gives its function, not its construction.
- **Chip cell order.** The MAC tap pattern inside the chip, and the choice of
  which three chips receive the Y delay, are this design's. They were worked
  out so that readout point n is lag n-16.

## Verification

Every block has a self-checking testbench in `tb/`. Each computes its
expected values independently of the RTL, from full-rate sample records
(`tb_pkg`), and ends with a `TB_RESULT checks=… failures=…` line. Each also
has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_bos_chip` | every cell against a direct sum, across changes of select and delay |
| `tb_quad_correlator` | all 32 lags, local and chained |
| `tb_octal_correlator` | the eight pairings and the chains |
| `tb_delay_ram` | latency and delay changes |
| `tb_sample_switch` | routing and reset state |
| `tb_sampler_2bit` | thresholds and sign |
| `tb_correlator_module` | delays, registers and chains across the two octals |
| `tb_accum_control` | dump period, unload order, SIG/REF halves, swap, overwrite and overrun |
| `tb_baseline_chassis` | a chain of six correlators across a card boundary, plus summation |
| `tb_lo_synth_dividers` | divider periods for several n, and PFD pulses |
| `tb_sma_correlator` | end to end |

**The burst method.** Most of the data-path tests share one method. Outside a
"burst", every input carries low-level samples with random sign, which add
exactly zero excess to every lag. Inside a burst, chosen correlated data is
applied. The expected point for a window of W clocks is then

    ((3W + e_even) >>> 4) + ((3W + e_odd) >>> 4)

where e_even and e_odd are the excess counts of that lag's two streams,
computed from the records.

**End-to-end test.** `tb_sma_correlator` runs the whole processor at reduced
size:

- 3 stations of eight baseband signals, sampled from 8-bit voltages;
- 3 chassis, one card each;
- a 32-word delay memory;
- a 700-clock dump period;
- 2 L.O. synthesizers.

Through the host bus it exercises these mechanisms:

- it re-routes one station's switch;
- it sets X and Y delays on one baseline;
- it chains all eight correlators of one octal into a single 256-lag
  correlator;
- it sets an L.O. frequency word.

Every point of every baseline, in both SIG/REF halves, is compared with the
expected value. The test counts each mechanism and fails if any never
happened:

- dumps;
- bank swaps;
- SIG and REF dumps;
- bursts;
- L.O. divider edges;
- an overrun, provoked at the end by a dump period shorter than the unload.

**Largest size simulated.** That end-to-end test is the largest simulation
run. A simulation of the top at its full default size (6 stations,
15 chassis × 16 cards, 15,360 correlator chips) was not run: it needs more
memory to compile than was available (Verilator needs well over 16 GB for it). At full size, Verilator lint and the slang
front end both accept the top. Lint of the top needs roughly 1.2 GB per
chassis.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Irtl -Itb rtl/corr_pkg.sv tb/tb_pkg.sv \
    tb/tb_quad_correlator.sv --top-module tb_quad_correlator -Mdir obj
./obj/Vtb_quad_correlator
```

Replace the testbench name for any other block. Modules are found through
`-Irtl` (add `-y rtl` if your version needs it). The simulator is two-state,
and every register that is read is reset or initialised.

To change the design's size, set the parameters on `sma_correlator`:

- `N_STATIONS`
- `N_MODULES` (cards per chassis; also sets 8 × N_MODULES inputs per station)
- `DEPTH` (delay words)
- `DUMP_CYCLES`
- `N_LO`

`PRESCALE` on the chip, quad, octal, card and chassis sets the low-order bits
dropped at each dump.
