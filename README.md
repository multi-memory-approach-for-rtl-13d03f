# Multi-memory inverse-CDF random number generators

Hardware that draws random numbers from a non-uniform distribution, one per
clock, with no multipliers or DSP blocks. It uses inverse-transform sampling:
a uniform random index addresses a ROM that holds x-values of the inverse
CDF, so the numbers that come out follow the target distribution.

A single ROM of equally spaced probability points has a known weakness. Where
the CDF is nearly flat, for example in the tail of an exponential, neighbouring
entries lie far apart in x. Whole ranges of output values then never occur, and
the tail comes out as a few isolated spikes. Making the ROM large enough to fix
this would take on the order of a million entries. This design instead splits
the CDF over several small memories, called layers:

* layer 0 covers the whole probability range [0, 1);
* the entries of layer *k* above its *limit* (the flat part) are not used;
  layer *k+1* covers exactly the probability range they stood for, using all of
  its own entries;
* this repeats down to the last layer.

Resolution is added only where the CDF is flat. For an exponential with mean
600, three layers of 2048 entries (6,144 entries, 79,872 bits) reproduce the
tail about as well as a single table of several hundred thousand entries.

The RTL holds the sampler itself, a decorrelated LFSR-based uniform generator
for the addresses, and two complete configurations taken from a calorimeter
simulation setting:

* an exponential energy-deposit generator, mean 600 MeV;
* a Gaussian electronic-noise generator, σ = 20 MeV.

## How one sample is chosen

A software version would read layer 0 first and decide from the result
whether to read layer 1, and so on. That loop has a variable latency. In this
hardware, every layer has its own uniform address stream, and all layers are
read in the same clock. The choice is made afterwards, by a chain of
comparators and 2:1 multiplexers:

```
addr[0] ─┬─> ROM 0 ───────────────────────────────┐
         └─> (addr[0] > LIMIT[0]) ──────────── sel │ mux ──> value
addr[1] ─┬─> ROM 1 ──────────────────────┐         │  ^
         └─> (addr[1] > LIMIT[1]) ─ sel  │ mux ────┘  │
addr[2] ───> ROM 2 ──────────────────────┘            (deeper result)
```

The chain is built from the last layer back to the first. The multiplexer of
layer *k* passes the deeper result when `addr[k] > LIMIT[k]`, and ROM *k*'s word
otherwise. So the output comes from the first layer whose address is not above
its limit. This is exactly what the sequential decision would have picked, but
with a fixed latency.

Each layer's address is drawn independently. When layer 0 hands over, layer 1's
address is a fresh uniform index into the sub-range, which is what sampling
that sub-range requires. It also follows that layer *k* is used with
probability ∏(1 − (LIMITᵢ+1)/DEPTH) over the layers before it, times its own
chance of not handing over.

`multi_memory_icdf` takes 2 clocks:

1. ROM read, with the comparison results registered alongside it;
2. the registered multiplexer chain.

It also outputs the index of the layer that produced each sample.

## What the memories hold

Layer *k* covers probabilities [lo_k, 1):

```
lo_0     = 0
lo_{k+1} = lo_k + (1 − lo_k) · (LIMIT_k + 1) / DEPTH
```

Entry *i* of layer *k* holds the x-value at the middle of its probability
interval:

```
u_i   = lo_k + (1 − lo_k) · (i + 0.5) / DEPTH
x_i   = SCALE · F⁻¹(u_i)        rounded to nearest, clipped to [0, 2^DATA_W − 1]
```

* exponential: F⁻¹(u) = −ln(1 − u), with SCALE the mean;
* half Gaussian: F⁻¹(u) = Φ⁻¹((1 + u)/2), with SCALE = σ × fixed-point factor.
  This is |X| for X ~ N(0, 1).

The tables are computed while the design is elaborated (`rng_pkg::icdf_value`,
`icdf_rom`), so no data files are needed. Φ⁻¹ uses Acklam's rational
approximation, whose relative error of about 10⁻⁹ is far below one output LSB.
To use the design with an empirical distribution instead, replace
`icdf_value` with a function of your table, or load the ROM from a file.

### Choosing the limits

A layer's limit is where its table starts to become flat. Take the
differences between consecutive entries, dᵢ = x_{i+1} − x_i. The limit is
the first index where dᵢ reaches a chosen fraction (1 % or 2 %) of the
largest difference in that table. Layer k+1 is then tabulated over the range
above that limit, and the rule is applied again. The limits are parameters, so
you can also set them by hand after looking at histograms.

| configuration | layers × depth × width | limits | source of the limits |
|---|---|---|---|
| exponential, mean 600 | 3 × 2048 × 13 bit | 1989, 1989 | the published design |
| half Gaussian, σ 20 × 512 | 4 × 512 × 16 bit | 277, 335, 445 | the rule above at 1 %, 1 %, 2 %, applied to these tables |

Probability range covered by each layer, exponential: layer 1 starts at
u = 0.97168 and layer 2 at u = 0.99920. The largest stored values per layer
are about 4,990, 7,130 and 9,270 MeV. The last three entries of layer 2 exceed
13 bits and are clipped to 8,191.

Gaussian magnitudes: layers start at u = 0, 0.5430, 0.8429 and 0.9797 of the
half-normal. The largest stored magnitude is about 43,700, which is 4.27 σ.

## Uniform addresses: interleaved LFSRs

Consecutive outputs of one LFSR share most of their bits, so neighbouring
samples are correlated. `uncorrelated_prng` runs M = 7 LFSRs of 42 bits in
parallel, each from its own seed, and all of them step every clock. A counter
modulo M drives a multiplexer that takes the output from a different LFSR each
clock. The output is registered and is 11 bits for the 2048-entry layers,
9 bits for the 512-entry layers, and 1 bit for the Gaussian sign.

### Output bit order

Each LFSR is read again exactly M clocks later, after M more shifts. Of the 11
register bits used, the low 4 therefore come back 7 places higher in the next
number that LFSR supplies.

In plain order those shared bits are the low bits of one number and the high
bits of the next. That gives an autocorrelation of about 0.008 at lag 7.

The output word is therefore built from the register bits in this order, LSB
first:

```
[0 .. OUT_W-M-1], [M .. OUT_W-1], [OUT_W-M .. M-1]
for 11 bits: 0 1 2 3 | 7 8 9 10 | 4 5 6
```

The shared bits then sit on the lowest weights of both numbers. The
correlation they cause drops to about 0.001, below the statistical noise of
10⁶ samples.

### LFSRs and seeds

* `lfsr`: Fibonacci form. It shifts towards the MSB, and the new LSB is the
  XOR of the tap bits. The polynomial is x⁴² + x⁴¹ + x²⁰ + x¹⁹ + 1. A zero seed
  is replaced by 1.
* Each generator uses its own PRNG per layer, so the layers' addresses are
  independent streams.
* Seeds are constants derived from a per-generator base value with a
  SplitMix64 hash (`rng_pkg::make_seed`). Every one of the 56 LFSRs in a
  channel therefore starts from a different seed.
* A reset reloads the seeds, so the output sequence after every reset is the
  same.

## The two generators and the channel top

`multi_memory_rng` puts one `uncorrelated_prng` per layer in front of a
`multi_memory_icdf`. Its defaults are the exponential generator.
`valid` rises 3 clocks after reset is released.

`gaussian_noise_rng` uses a four-layer `multi_memory_rng` for |X|, plus an
eighth PRNG with a 1-bit output for the sign: 1 means negative. The sign is
delayed two clocks so that it meets the magnitude addressed in the same clock.
The output is a 17-bit two's-complement number in units of 1/512 MeV.
`valid` rises 4 clocks after reset.

`hep_channel_rng` (top) is one detector channel: one energy generator and one
noise generator side by side.

| port | dir | width | meaning |
|---|---|---|---|
| clk | in | 1 | clock |
| rst_n | in | 1 | synchronous, active low; reloads all seeds |
| energy | out | 13 | exponential sample, integer MeV |
| energy_valid | out | 1 | high from the 3rd clock after reset |
| energy_layer | out | 2 | memory layer that produced `energy` (monitoring) |
| noise | out | 17 signed | Gaussian sample, MeV × 512 |
| noise_valid | out | 1 | high from the 4th clock after reset |
| noise_layer | out | 2 | memory layer that produced the noise magnitude |

Throughput is one sample of each per clock. There is no handshake and no
stall, because the generators run freely.

Size after generic synthesis:

* 112,640 ROM bits: 79,872 for the energy generator and 32,768 for the noise
  generator;
* 2,509 flip-flops, 2,352 of them in the 56 LFSRs;
* no multipliers.

## Departures and choices

These points are not fixed by the published description, or differ from it:

* **Gaussian word width.** The description gives 16-bit words for the Gaussian
  layers, but its memory count (34,816 bits) corresponds to 17-bit words. This
  RTL uses 16 bits, which is enough for every stored magnitude. A channel
  therefore has 112,640 ROM bits instead of 114,688.
* **Exponential word width.** 13 bits is derived from the reported memory size
  (79,872 bits / 6,144 entries). As a result, three tail entries saturate at
  8,191 MeV.
* **Gaussian limits.** No values are published for them. They were computed by
  the relative-difference rule. The published rule gives "1 % for the first
  three memories and 2 % for the last". With four layers there are only three
  limits, so this design uses 1 %, 1 % and 2 %.
* **Comparator sense.** A layer hands over when its address is *greater than*
  its limit, as in the sequential decision flow.
* **Entry placement.** Entries sit at the midpoints of their probability
  intervals. Values are rounded to nearest.
* **Pipelining and reset.** The pipeline depth (1 + 2 clocks), the registered
  ROM reads, the synchronous reset and the `layer` outputs are this design's
  choices. The published design fixes the latency but does not give it.
* **LFSR details.** The polynomial, the address bits and their order, and the
  seed values are this design's choices.
* **Statistics.** With these seeds, one million samples give the following:
  * energy: mean 600.4, variance 3.60·10⁵, skewness 2.00, excess kurtosis
    5.95, KS distance 1.1·10⁻³, and 996 samples above the 99.9 % quantile
    against 1,000 expected;
  * noise: mean −0.0009 σ, variance 1.0007 σ², KS distance 1.2·10⁻³, and
    P(|x| > 3σ) = 2.69·10⁻³ against 2.70·10⁻³;
  * uniform addresses (4 streams): KS distance 9.2·10⁻⁴, runs-test
    z = −0.99, largest |autocorrelation| over lags 1–100 of 2.2·10⁻³, and
    largest cross-correlation of 1.6·10⁻³. Both correlation figures are at the
    noise level of 10⁶ samples.
* **Size and speed.** The published exponential and Gaussian generators used
  1,011 and 1,623 registers. This RTL has 944 and 1,568 flip-flops. The
  published clock rates (225 MHz and 143 MHz on a Cyclone V FPGA) have not been
  measured for this RTL.
* **Not included.** The analog detector front end (sensor, amplifier, shaper,
  ADC) belongs to the application and is not part of this RTL.

## Files

| file | content |
|---|---|
| `rtl/rng_pkg.sv` | distribution enum, LFSR taps, seed hash, ICDF table function |
| `rtl/lfsr.sv` | one LFSR |
| `rtl/uncorrelated_prng.sv` | M interleaved LFSRs |
| `rtl/icdf_rom.sv` | one memory layer, contents computed at elaboration |
| `rtl/multi_memory_icdf.sv` | the layers, comparators and multiplexer chain |
| `rtl/multi_memory_rng.sv` | address PRNGs + sampler; defaults = exponential generator |
| `rtl/gaussian_noise_rng.sv` | half-Gaussian generator + sign generator |
| `rtl/hep_channel_rng.sv` | top: one channel |
| `tb/rng_ref_pkg.sv` | reference models shared by the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module, plus two statistics testbenches |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops on its own.
With Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb \
    rtl/rng_pkg.sv tb/rng_ref_pkg.sv tb/tb_hep_channel_rng.sv -Mdir obj -o sim
obj/sim
```

Replace `tb_hep_channel_rng` with any other testbench. All of them run at full
size in a few seconds.

* `tb_lfsr`: the LFSR against a bit-serial model. The 5-bit version must have
  a period of 31.
* `tb_uncorrelated_prng`: every output against a model of 7 round-robin LFSRs,
  plus flatness of the histogram.
* `tb_icdf_rom`: every entry of three layers against the target CDF. The
  Gaussian entries are judged with a numerically integrated forward CDF, not
  with the inverse used to build them.
* `tb_multi_memory_icdf`: random addresses with gaps in `in_valid`. Checks the
  2-clock latency, the chosen layer and the value, and that every layer is
  used.
* `tb_multi_memory_rng`, `tb_gaussian_noise_rng`: the full-size generators,
  sample by sample against models of all address streams, plus moments and
  tail fraction. The Gaussian test also re-derives the three limits with the
  relative-difference rule.
* `tb_hep_channel_rng`: the whole channel, 400,000 samples of each output. It
  counts how often every layer of both generators and each noise sign occurs.
* `tb_channel_statistics`: one million samples per generator. Checks moments,
  KS distance and tail probabilities against the exact distributions.
* `tb_prng_statistics`: one million addresses from each of four uniform
  streams. Checks the KS distance to uniform, a runs test, autocorrelation
  over lags 1–100 and cross-correlation between the streams.

## Changing it

* **Another distribution.** Add an entry to `rng_pkg::dist_e` and its inverse
  CDF to `icdf_value`. Then pick the number of layers, the depth and the width,
  and derive the limits with the rule above.
* **Word width or fixed-point scale.** Change `DATA_W` and `SCALE`. The tables
  follow automatically.
* **Non-power-of-two depths.** Not supported: each layer has 2^ADDR_W entries,
  and `DEPTH` is computed from `ADDR_W`.
* **Several channels.** Instantiate `hep_channel_rng` once per channel, with
  different `EXP_SEED_BASE`/`NOISE_SEED_BASE`, so that no two channels share
  seeds.
