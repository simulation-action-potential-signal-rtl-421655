# Action-potential signal generator with a 1-bit sigma-delta output

This design makes a nerve action potential (AP) as an analog voltage, using only logic and an
FPGA pin. One action potential is stored as 32 ten-bit samples. The samples are played out at
48.828 kHz. A first-order sigma-delta modulator turns each sample into a 1-bit
pulse-density stream at the full 50 MHz clock rate. An external resistor divider with an RC
low-pass filter smooths that stream back into the waveform. There is no multi-bit DAC.
The output needs a single pin, a few flip-flops and two resistors and a capacitor.

```
              +---------------+  sample   +-----------------------+ bit_stream    +------------------+
  clk 50 MHz  | ap_generator  |  10 bit   | sigma_delta_modulator |  1 bit, pin   | lpf_attenuator   |  analog
  ----------->|  prescaler    |---------->|  summer, integrator,  |-------------->| 10k -> 1k || 4.7n|-------->
              |  slot counter |  48.8 kHz |  comparator, D-FF,    |  50 Mbit/s    | (model of the    |  0..300 mV
              +-------+-------+           |  1-bit DAC feedback   |               |  board circuit)  |
                 addr |  ^ data           +-----------------------+               +------------------+
                      v  |
              +-------+-------+
              |    ap_rom     |  32 x 10 bit
              +---------------+
                       aps_system (top)
```

## The stored action potential

The biological action potential is modelled as

    v(t) = A * t^n * exp(-B*t)   for t >= 0,   0 before,

with A = 3.7e-3 V/s, B = 1.5e4 1/s and n = 1. The curve rises steeply to a peak at t = 1/B =
67 us and then decays exponentially. The design stores this curve, sampled and scaled, in a
32-word table (`aps_pkg::AP_TABLE`). Word k is

    AP_TABLE[k] = round(244.4 * k * exp(-0.2902 * k)),   k = 0 .. 31

That is 0 at k = 0, a peak of 307 at k = 3, and 1 at k = 31. The words are unsigned. On the
converter's scale, 1024 is full scale, so the peak drives the output to 30 % of its range.
The table is a parameter of `ap_rom` (`CONTENTS`). A different waveform, for example the same
equation with other A, B or n, is loaded by passing a new 32-entry array. No code changes.

## Sample timing and the frame

`ap_generator` divides the 50 MHz clock by `SAMPLE_DIV` = 1024. That gives one sample every
20.48 us, or 48.828 kHz. A slot counter advances on each sample tick. A frame has
`FRAME_SAMPLES` = 512 slots. Slots 0 to 31 read the table, so one action potential lasts
32 x 20.48 us = 0.655 ms. Slots 32 to 511 output the resting level, 0. The action potential
therefore repeats every 512 x 20.48 us = 10.49 ms, as an isolated spike on a flat baseline.

The ROM has one cycle of read latency, so the sample pipeline is two stages deep:

| edge   | what happens                                                    |
|--------|-----------------------------------------------------------------|
| E      | prescaler wraps and the slot counter advances; new ROM address  |
| E+1    | ROM word for the new slot is valid                              |
| E+2    | `sample` takes it, and `sample_stb` (with `ap_start` on slot 0) pulses for one cycle |
| E+4    | the first output bit that depends on the new sample leaves the modulator |

After reset the first sample (slot 0) loads on the second clock edge. From then on, `sample`
changes exactly every `SAMPLE_DIV` cycles.

## The sigma-delta loop

`sigma_delta_modulator` is the central block. It is the textbook first-order loop. Each
analog part of that loop becomes a piece of logic that does the same job:

| classic part | here                               | width            |
|--------------|------------------------------------|------------------|
| summer       | `diff = sample - dac`              | 13-bit signed    |
| integrator   | `integ <= integ + diff`            | 13-bit register  |
| comparator   | `integ > 0`                        | 1 bit            |
| D flip-flop  | `bit_out <= comparator`            | 1-bit register   |
| 1-bit DAC    | `dac = bit_out ? 1024 : 0`         |                  |

Why the density of ones equals `sample / 1024`: every output 1 takes 1024 out of the
integrator, and every clock puts `sample` in. Over N cycles with k ones, the integrator
changes by `N*sample - 1024*k`. The integrator stays bounded, so this change cannot grow with
N, and k/N must approach sample/1024. In steady state the integrator stays within about
+-2048, so 13 signed bits are enough, with margin. An assertion in the module checks this
bound in simulation. Inside any window of 1024 cycles the count of ones matches the sample
to within +-2.

This is what ties the sample rate to the resolution. A 10-bit sample needs 1024 output bits
to be represented exactly. At 50 MHz, 1024 bits take 20.48 us, one sample period. The
48.828 kHz sample rate is the highest at which every sample still gets its full 10 bits.

Two choices shape the stream at the edges of the range. The comparator tests `> 0`, so a
sample of 0 from reset gives no ones at all, and the resting baseline is a clean 0 V. A
full-scale step from reset shows up on `bit_out` on the second clock edge: one edge for the
integrator, one for the flip-flop.

## The output filter

The board circuit is a 10 kOhm series resistor from the pin into 1.0 kOhm to ground, with
4.7 nF across the 1.0 kOhm. Seen from the capacitor, this is a source of pin voltage / 11
behind 909 Ohm. So:

- full-scale output, all ones from a 3.3 V pin: 300 mV;
- AP peak, sample 307: 307/1024 x 300 mV = 90 mV;
- time constant: 909 Ohm x 4.7 nF = 4.27 us, about 214 clock cycles. That is long enough to
  average the 50 MHz stream, and a fifth of a sample period, so each sample settles before
  the next one.

`lpf_attenuator` models this circuit for simulation. Each clock, it advances the capacitor
voltage by one forward-Euler step: `v += (v_source - v) * T / tau`, with T/tau as a 24-bit
fraction and the state in nanovolts. The output `vout_uv` is in microvolts. The model uses
integer arithmetic throughout, so every tool that elaborates the design accepts it. It is a
model of off-chip parts, not logic for the FPGA. The pin's high level (3.3 V) is a parameter.

## Files

| file                            | contents                                              |
|---------------------------------|-------------------------------------------------------|
| `rtl/aps_pkg.sv`                | widths, clock and sample rate, the waveform table     |
| `rtl/ap_rom.sv`                 | 32 x 10-bit table with a registered read              |
| `rtl/ap_generator.sv`           | prescaler, slot counter and ROM sequencing            |
| `rtl/sigma_delta_modulator.sv`  | first-order 1-bit modulator                           |
| `rtl/lpf_attenuator.sv`         | behavioural model of the 10k/1k/4.7nF output network  |
| `rtl/aps_system.sv`             | top level: the whole chain                            |
| `tb/tb_*.sv`                    | self-checking testbenches, one per module, plus `tb_sine_conversion` |

Top-level ports of `aps_system`: `clk` (50 MHz), `rst_n` (asynchronous, active low),
`bit_stream` (the output pin), and `analog_out_uv` (the filter model's voltage). There are
also three observation outputs: `sample`, `sample_stb` and `ap_start`. In an FPGA build,
`analog_out_uv` and the filter model would be left out, and `bit_stream` drives the pin.

Parameters of the top: `SAMPLE_DIV` (default 1024) and `FRAME_SAMPLES` (default 512). The
sample width (10) and table depth (32) are set in `aps_pkg`.

## Resources

Excluding the filter model: 35 flip-flops in the generator, of which 10 are the prescaler,
9 the slot counter, 10 the sample register and 6 the pipeline and strobes. The modulator
has 14: a 13-bit integrator and the output bit. The table is 320 bits, a small distributed
ROM. For comparison, the reference build of this system on a Spartan-3E xc3s100e reports
36 slice flip-flops and 7 I/O pins.

## Verification

Each testbench checks its module against values it works out on its own. Each ends with a
line `TB_RESULT checks=N failures=M` and has a cycle-count watchdog.

| testbench                   | what it establishes                                                        |
|-----------------------------|----------------------------------------------------------------------------|
| `tb_ap_rom`                 | all 32 words, in three address orders; exactly one cycle of read latency    |
| `tb_ap_generator`           | strobe spacing, sample values per slot, rest level, `ap_start`, frame period. Runs at 8 cycles x 40 slots and at the defaults, 1024 x 512 |
| `tb_sigma_delta_modulator`  | ones per 1024-cycle window = sample +-2, for both range ends, the AP peak and 20 random values; no ones at sample 0; two-edge latency |
| `tb_lpf_attenuator`         | charge and discharge curves against 300 mV (1 - e^(-t/tau)); settled level for four pulse densities |
| `tb_aps_system`             | the whole chain at default parameters over two full frames (1,048,576 cycles): the sample rate, the frame period, every sample value, ones per sample period, the filtered voltage at the end of each period, and the AP peak of about 90 mV |
| `tb_sine_conversion`        | modulator and filter on a 763 Hz, 10-bit sine: ones per period, output voltage per sample, full swing |

To run one with Verilator, for example the full-system test:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/aps_pkg.sv tb/tb_aps_system.sv --top-module tb_aps_system -o sim
    ./obj_dir/sim

All six run in seconds. `tb_aps_system` runs the top with every parameter at its default.

## Where this RTL goes beyond, or differs from, the reference design

- The reference system gives the sample rate, resolution, table contents, block diagram and
  filter. It does not give the generator's internals. The prescaler, slot counter, rest level
  of 0, frame length of 512 slots, strobes and reset behaviour are choices made here.
  `FRAME_SAMPLES` sets how often the action potential repeats. It is not tied to a measured
  value.
- The 32-sample duration is 0.655 ms at 48.828 kHz. The reference quotes it as 0.64 ms.
- The reference system's block diagram shows a USB interface to a PC next to the generator
  and converter. What it carries is not specified, so it is not part of this RTL.
- The reference build reports a large number of LUTs used as shift registers. Nothing in
  the described function needs one, and this RTL has none.
- The sigma-delta loop is digital: the input is already a number. The comparator threshold,
  integrator width and reset values are choices made here. A continuous-time model of the
  same loop would use gains on the input and feedback paths. Here both paths use the same
  full scale, 1024, which makes those gains unnecessary.
- The 3.3 V pin level used by the filter model is an assumption.
