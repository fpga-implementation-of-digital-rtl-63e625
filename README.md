# Direct-form FIR filters on 4-bit sign-magnitude samples

This is synthesizable SystemVerilog for three linear-phase FIR filters: a 53-tap low-pass, a
73-tap band-pass and a 53-tap high-pass. Each filter is written twice, once **fully parallel**
and once **fully serial**:

- The parallel version has a multiplier and an adder for every tap and gives one output per clock.
- The serial version reuses one multiplier and one adder for all taps. It gives one output every
  N clocks, where N is the number of taps.

Each filter computes

    y(n) = sum_{k=0}^{N-1} h(k) x(n-k)

with fixed integer coefficients h(k). The design has two unusual features, and they account for
most of its logic:

- It keeps every number in **sign-magnitude** form, not two's complement.
- It multiplies with **shifts and adds**, not with a hardware multiplier.

The structure, word widths, coefficient tables and both realisations follow a published M.Tech
design of FPGA FIR filters. Where that source is silent, the choices are this design's own; they
are listed under [Departures and own choices](#departures-and-own-choices).

## The filters

| module             | taps | specification                                                   | coefficient scale     |
|--------------------|------|-----------------------------------------------------------------|-----------------------|
| `low_pass_filter`  | 53   | passband edge 1.5 kHz, transition 0.5 kHz, fs 8 kHz, Hamming    | 2^16 (taps sum to 65542) |
| `band_pass_filter` | 73   | passband 150–250 Hz, transition 50 Hz, fs 1 kHz, Kaiser         | passband gain ≈ 2     |
| `high_pass_filter` | 53   | passband edge 10 kHz, transition 0.5 kHz, fs 48 kHz             | passband gain ≈ 0.5   |

All coefficients are symmetric: h(k) = h(N−1−k). `fir_pkg` stores only h(0) up to the centre tap
and mirrors the rest.

These are the frequency responses computed from the tables:

- **Low-pass:** 0 dB in the passband and about −63 dB from 0.3·fs upwards.
- **High-pass:** below −62 dB from DC to 0.15·fs, then flat from 0.25·fs. This uses
  **h(22) = +2139**. With h(22) = −2139 the filter would pass DC at −17.6 dB, which no high-pass
  with a 60 dB stopband can do.
- **Band-pass:** the passband is in the right place, 0.15–0.25·fs. But the stopband is only
  about 22 dB down, not the 60 dB of its specification. The table is used unchanged, so treat it
  as a placeholder if you need the full attenuation.

All three filters share the same ports, as the source's block symbols show them:

| port              | dir | meaning                                                    |
|-------------------|-----|------------------------------------------------------------|
| `clk`             | in  | clock                                                      |
| `clk_enable`      | in  | when low, no register changes                              |
| `reset`           | in  | synchronous, active high; clears the taps and the output   |
| `filter_in[3:0]`  | in  | sample: sign bit, binary point, 3 magnitude bits (±m/8)    |
| `filter_out[31:0]`| out | sign-magnitude sum of products                             |

The parameter `ARCH` (`ARCH_PARALLEL` by default, or `ARCH_SERIAL`) selects which realisation a
filter builds.

## Sign-magnitude arithmetic

All data words carry a sign bit in the MSB and a magnitude below it. There are three kinds of
word:

- the 4-bit sample;
- the 28-bit coefficient;
- the 32-bit products, partial sums and outputs.

Reading an output takes two steps:

1. `filter_out = {sign, 31-bit magnitude}` means the integer ±magnitude.
2. That integer equals y(n) · 8 · (coefficient scale). For the low-pass filter, an output of
   524 288 (2^19) therefore means y = 1.0.

Zero is always encoded as positive zero. The one exception is the input: the code `4'b1000`
("minus zero") is accepted and treated as zero.

**`nibble_multiplier`** computes the product in three parts:

- The sign is the XOR of the two signs.
- The magnitude is the coefficient magnitude, shifted left by i and added in for every set bit i
  of the sample's 3-bit magnitude.
- The product is A_W + B_W = 32 bits wide, the product width of a 4-bit by 28-bit multiply.

The source draws this multiplier as a shift-accumulator between registers A, B and C, looping over
several steps. Here the loop is unrolled into one combinational step, so a filter can still produce
one product per clock. The source's own serial filter backs this reading. It reports a single
one-cycle 28×4 multiplier, and exactly as many flip-flops as this RTL has, which leaves no bits
for separate multiplier registers.

**`byte_adder`** adds two sign-magnitude words in four steps:

1. Each negative operand is converted to two's complement.
2. The two operands are added in a 33-bit adder.
3. If the sum is negative, its two's complement is taken again. This gives the magnitude, and the
   sign bit is set.
4. `ovf` flags a magnitude that does not fit in 31 bits, and the result saturates.

All three conversions use the same small module, `twos_complement`, which computes
`neg ? ~x + 1 : x`.

None of the three filters can overflow. The largest possible |y| is 2 017 946, for the band-pass
filter at full-scale input of alternating sign, far below 2^31. So `ovf` stays unconnected inside
the filters.

## Tap line

`delay_ram` is a shift register of N samples of 4 bits each:

- On every enabled clock, the new sample enters at `taps[0]` and the oldest sample falls off the
  end.
- `taps[k]` is x(n−k).
- The first stage also acts as the input register. So a 53-tap filter holds 53 × 4 = 212 bits.
  That is the flip-flop count the source reports for its parallel 53-tap design.

## Fully parallel realisation (`fir_parallel`)

The datapath has three parts:

- one `nibble_multiplier` per tap, with its coefficient fixed at elaboration;
- a linear chain of N−1 `byte_adder`s, starting from tap 0;
- no output register.

Timing:

- `filter_out` shows y(n) right after the clock edge that loads x(n), so the latency is zero
  clocks.
- The rate is one sample per enabled clock.
- The path from a tap register through 53 (or 73) adders to the pin is long. The source reports
  the same long clock-to-output path. If you need speed, add a register after the chain or build
  the adders as a tree. Either change makes the latency one clock.

## Fully serial realisation (`fir_serial`)

The datapath has these parts:

- one multiplier and one adder, shared by all taps;
- a 32-bit tap counter;
- a 32-bit accumulator;
- a 32-bit output register.

For the 53-tap filter this adds up to 212 + 96 = 308 flip-flops. That is the count the source
reports for its serial design, and 388 is its count for the 73-tap filter.

Each sample takes a frame of N enabled clocks:

    counter   0     1     2   ...  N-2   N-1 | 0 ...
    MAC       h0x0  h1x1  h2x2     ...  h(N-1)x(N-1)
    at the edge ending counter = N-1:
              filter_out <= acc + last product
              acc        <= 0
              tap line   <= shifts in filter_in

Counting enabled clocks from reset:

- `filter_in` is sampled on edges N, 2N, 3N, …
- The result for the sample taken on edge jN appears on `filter_out` at edge (j+1)N.
- It is held there for N clocks.

So both the latency and the sample period are N clocks. The input only has to be valid on the
last clock of each frame. The clock must run at least N times the sample rate. For the
specifications above that is 424 kHz, 73 kHz and 2.544 MHz.

There is no "output valid" port, because the source's block symbol has none. Count frames from
reset instead.

## Top level

`fir_filter_top` places all six configurations side by side and shares `clk` and `reset`
between them. Each configuration has its own `clk_enable[i]`, `filter_in[i]` and
`filter_out[i]`:

| i | instance            |
|---|---------------------|
| 0 | low-pass parallel   |
| 1 | low-pass serial     |
| 2 | band-pass parallel  |
| 3 | band-pass serial    |
| 4 | high-pass parallel  |
| 5 | high-pass serial    |

The analog-to-digital and digital-to-analog converters sit around the filter in a real system.
They are outside this RTL: samples come in and results go out as plain digital ports.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. `tb/fir_ref_pkg.sv` holds the reference
model: an integer convolution with its own copy of the coefficient tables.

| testbench              | what it checks                                                                 |
|------------------------|--------------------------------------------------------------------------------|
| `tb_twos_complement`   | conditional negation at 33 bits, edge and random words                         |
| `tb_nibble_multiplier` | all 16 samples × edge and random coefficients against integer multiply         |
| `tb_byte_adder`        | sign changes, ±0, overflow/saturation, 6000 random pairs                       |
| `tb_delay_ram`         | 53 × 4 tap line against a queue, random enable, reset                          |
| `tb_fir_parallel`      | all three tables: impulse gives h(k), random data, enable gaps, reset, every cycle |
| `tb_fir_serial`        | all three tables: the frame schedule and N-clock latency, every cycle           |
| `tb_low_pass_filter`   | both realisations; impulse; input codes 8, 9, 10                                |
| `tb_band_pass_filter`  | both realisations; impulse; inputs 1, 3, 4                                      |
| `tb_high_pass_filter`  | both realisations; impulse; a +7/8 step, which must settle near zero            |
| `tb_fir_filter_top`    | all six at full size, 8000 clocks of random data, per-instance enable gaps, mid-run reset |

`tb_fir_filter_top` also counts how often enable stalls, resets, serial frame completions and
negative results happened. It fails if any of them never happened.

Every testbench was also run against a copy of its module with one deliberate bug, and each one
reported failures. The bugs included a dropped partial product, a missing final two's complement,
an enable ignored by the tap line, a missing last MAC and swapped coefficient tables.

To run a testbench with Verilator 5, from the folder that holds `rtl/` and `tb/`:

    verilator --binary --timing -Irtl -Itb -y rtl -y tb \
        rtl/fir_pkg.sv tb/fir_ref_pkg.sv tb/tb_fir_filter_top.sv \
        --top-module tb_fir_filter_top --Mdir obj_dir
    ./obj_dir/Vtb_fir_filter_top

To run any other testbench, replace `tb_fir_filter_top` with its name. Every run finishes in
seconds.

## Departures and own choices

The following come from the source design:

- the direct-form structure and the per-tap multipliers;
- the sign-magnitude adder behaviour;
- shift-and-add multiplication;
- the 4 / 28 / 32-bit widths;
- the tap counts and coefficients;
- the port list;
- the unregistered parallel output and the registered serial output;
- the resource mix of the serial version.

The following are this design's own:

- **Reset:** synchronous and active high. **clk_enable:** freezes every register.
- **Unrolled multiplier:** the register A/B/C shift-accumulator is flattened into one
  combinational step.
- **Adder chain:** the adders form a linear chain, where the source drawing pairs them.
- **Serial frame schedule:** the exact schedule and the choice of edge that samples the input.
- **Overflow:** flagged and saturated in `byte_adder`, where the source only avoids it by word
  width.
- **High-pass coefficient h(22):** set to +2139 (see above).
- **`ARCH` parameter:** selects parallel or serial in one module.
- **Top level:** `fir_filter_top` combines the six configurations. The source builds each filter
  as a separate FPGA design.

Not covered:

- FPGA-specific results: resource use, timing and power on the Spartan-3E target.
- The data converters.

## Files

- `rtl/fir_pkg.sv`: widths, the `filter_kind_e` and `arch_e` enums, coefficient tables, `coef()`.
- `rtl/twos_complement.sv`, `rtl/nibble_multiplier.sv`, `rtl/byte_adder.sv`, `rtl/delay_ram.sv`: arithmetic and storage.
- `rtl/fir_parallel.sv`, `rtl/fir_serial.sv`: the two realisations, generic in `KIND` and the widths.
- `rtl/low_pass_filter.sv`, `rtl/band_pass_filter.sv`, `rtl/high_pass_filter.sv`: the named filters.
- `rtl/fir_filter_top.sv`: all six side by side.
- `tb/`: testbenches and `fir_ref_pkg.sv`.
