# Real-time optical wireless channel emulator

This RTL reproduces, in real time and sample by sample, what an optical
wireless link does to a signal. It sits between a baseband transmitter and a
baseband receiver. It models the LED and its driver, the multipath optical
channel of a room, and the photodetector and amplifier of the receiver.

The architecture follows the one published as *On Real Time Optical Wireless
Communication Channel Emulator Design with FPGAs*. The SystemVerilog here is
an independent implementation of it. Widths, register maps, the noise
generator, reset behaviour and the pipeline are this implementation's own
choices. Each is listed under "Choices and departures" below.

The hard part is time resolution. An indoor optical channel has to be
described with sub-nanosecond taps: light covers about 15 cm in 0.5 ns. An
FPGA fabric clock of 250 MHz only gives 4 ns per sample. The design therefore
processes **K samples per core clock** on K parallel lanes. The signal is then
handled at K·f_clk: with K = 8 at 250 MHz that is 2 GS/s, or 0.5 ns per
channel tap. Serializers at the two ends turn the lanes back into one
fast sample stream.

## Signal chain

```
serial_in ─► deserializer ─► driver_led ─────────► poly_fir (channel) ─► rx_frontend ─────────────► serializer ─► serial_out
 (M bits,     (S/P, K lanes)  led_lut + poly_fir     40-tap impulse        photodetector + noise_gen     (P/S, counter
  K·f_clk)                    (non-linearity,        response, K lanes     → poly_fir (TIA)              + K:1 mux)
                               LED bandwidth)        M+R-1 bit output      back to M bits
```

| lanes | width | between |
|---|---|---|
| K × M | 12 bits | deserializer → driver_led → channel |
| K × (M+R-1) | 27 bits | channel → rx_frontend |
| K × M | 12 bits | rx_frontend → serializer |

All blocks between the two serializers run on `clk_core` and exchange one
K-sample block per cycle with a `valid` flag.

## The K-lane (polyphase) filter — `poly_fir`

One module implements every frequency response in the chain: the channel
impulse response, the LED/driver bandwidth and the TIA bandwidth. Each core
cycle it receives the block x(nK) … x(nK+K-1) and produces

    y(nK+p) = Σ_{j=0}^{TAPS-1} h(j) · x(nK+p−j),      p = 0 … K−1

so it is an ordinary FIR filter running at K·f_clk. The module keeps the last
TAPS−1 samples in a history register. It concatenates them with the current
block into a window and forms all K sums in parallel: K·TAPS multipliers.

**Polyphase view.** On output lane p, the taps that meet input lane q are
h(tK + ((p−q) mod K)). These are the polyphase components
h_p(t) = h(tK + p). The published architecture feeds the channel a core-rate
signal interpolated by K. In that signal only lane 0 is non-zero, and output
lane p then reduces exactly to phase filter h_p applied to that signal.
Reading the lanes out in order 0 … K−1 (the serializer) is the output
switch of the polyphase interpolator. The general form is kept because the
LED model before the channel spreads energy into every lane. The testbenches
check both cases.

Setting the parameter `INTERP = 1` builds the interpolator literally. Only
lane 0 is read, and an assertion requires lanes 1 … K−1 to be zero. There
are K phase filters of ⌈TAPS/K⌉ taps each, with one multiplier per
coefficient: TAPS multipliers instead of K·TAPS, 40 at the defaults. The
top does not use it, because its channel input comes from the LED model.

**Normalization.** The impulse-response coefficients span a large dynamic
range. The coefficients are loaded pre-scaled by 2^s, so that the largest
one uses most of the 16-bit range. The sum is then shifted right
arithmetically by the programmable s, which undoes the scaling with no
multiplier. After the shift the result is saturated to OUT_W bits, and `sat`
pulses when any lane clipped. Scaling to a power of two near the maximum
costs a little accuracy compared to scaling by the exact maximum. In exchange
it needs only a shift.

**Timing.** Stage 1 registers the input block. Stage 2 registers the sums.
`y` appears two core cycles after `x`. The history only advances on valid
blocks.

**Configuration** (local address): `addr[12]=0` writes h(`addr[11:0]`) from
`data[15:0]`. `addr[12]=1` writes the shift. Reset loads a unit impulse
(h(0)=1, shift 0), so an unprogrammed filter is transparent. A write takes
effect on the next block in stage 2. Reloading while the stream runs mixes
old and new coefficients for about TAPS/K blocks.

## Clocks and serial interfaces

`clk_fast` must run at exactly K × `clk_core`. The two clocks must be phase
aligned, that is, generated by one synthesizer (a PLL on the FPGA, not part
of this RTL). Every K-th rising edge of `clk_fast` coincides with a rising
edge of `clk_core`. `rst` is synchronous in both domains. It must be released
in the `clk_fast` cycle that ends with a `clk_core` edge. Both serializers
start their phase counters at 0 on that edge, so lane 0 lines up with the
core clock.

* **deserializer** (S/P): samples `din` on every fast edge. On the last fast
  edge of a core cycle it copies the K samples into a word register, with
  lane 0 the earliest. The core captures the word on the next core edge.
  The word never changes on a core edge, so the crossing is safe by
  construction.
* **serializer** (P/S): on the last fast edge of each core cycle it copies
  the K lanes into a holding register. A fast-clock counter then drives the
  select of a K:1 multiplexer, followed by a registered output buffer.

**End-to-end latency:** input sample i, taken on fast edge i, leaves
`serial_out` after fast edge i + 10·K (80 fast cycles = 10 core cycles at
K = 8). The 10 core cycles are made up as follows:

| stage | core cycles |
|---|---|
| deserializer | 1 (plus the fast cycles spent collecting the block) |
| driver_led | 3 (table 1, FIR 2) |
| channel | 2 |
| rx_frontend | 3 (photodetector 1, TIA 2) |
| serializer | 1 |

## Transmitter model — `driver_led`, `led_lut`

* `led_lut` models the static non-linearity of the LED and its driver. It is
  a 2^M-entry table, addressed in offset binary (sample + 2^(M−1)), and read
  by all K lanes in the same cycle. The table is not cleared at reset. The
  block bypasses it until the enable bit is set, so a table can be loaded
  first. With `AW < M` only the top AW bits address the table.
* A `poly_fir` (8 taps, output saturated back to M bits) models the limited
  bandwidth.

Address map: `addr[15:14]`=00 selects a table entry, 01 the FIR, and 10 the
control register (bit 0 = table enable).

## Receiver model — `rx_frontend`, `photodetector`, `noise_gen`

* `photodetector`: y = sat((x·gain) >>> shift + (noise·amp) >>> 8). Its
  registers are gain (signed 16 bits, local addr 0), shift (addr 1) and
  noise amplitude (unsigned 16 bits, addr 2; 0 turns the noise off). Reset
  makes it transparent.
* `noise_gen` stands in for ambient-light shot noise. It adds a zero-mean,
  signal-independent term. Each lane has its own 32-bit Galois LFSR
  (x^32+x^22+x^2+x+1), advanced 32 bits per sample. The noise value is the
  sum of the state's four bytes minus 510, so it lies in [−510, 510] and is
  roughly Gaussian. Lane p is seeded with SEED ^ (p·0x9E3779B9).
* The TIA is a `poly_fir` (8 taps). Its shift brings the 27-bit channel
  samples back to the 12-bit output lanes, with saturation.

Address map: `addr[15:14]`=00 selects the photodetector registers and 01
the TIA FIR.

## Configuration and monitoring

An external processor configures and watches the emulator. Reloading the
impulse response at run time moves the emulated receiver to another
position in the room. The processor reaches the design through a
single-cycle write bus on `clk_core`:

| `cfg_sel` | block | local map |
|---|---|---|
| 0 | driver_led | table / FIR / control |
| 1 | channel `poly_fir` | coefficients, shift |
| 2 | rx_frontend | photodetector / TIA FIR |

`cfg_addr` (16 bits) is the block's local address, and `cfg_data` is 32 bits.
Monitoring outputs:

* `mon_in` / `mon_out`: the deserialized input block and the output block,
  with their valid flags.
* `sat`: saturation pulses of the driver, channel and receiver.
* `lut_en` and `noise_on`.

Programming sequence for a new room position:

1. Write the 40 coefficients, scaled by 2^s.
2. Write the shift s.

## Parameters (defaults)

| parameter | default | meaning |
|---|---|---|
| K | 8 | lanes per core clock; time resolution 1/(K·f_clk) |
| M | 12 | sample width at input and output |
| COEF_W (R) | 16 | coefficient width; channel output is M+R−1 = 27 bits |
| CH_TAPS | 40 | channel impulse-response taps (20 ns at 0.5 ns) |
| DRV_TAPS, RX_TAPS | 8 | LED and TIA filter taps |

The constants and the shared `cfg_wr_t` bus type are in `rtl/owc_pkg.sv`.

## Choices and departures

* **Lane structure.** The channel filter is the general K-lane FIR, with
  K·TAPS multipliers (320 at the defaults, plus 64 each for the LED and TIA
  filters). The published build reports 40 DSP blocks, which matches only
  the interpolated-input special case (one multiplier per tap). That
  form is available as `poly_fir` with `INTERP = 1`, but it needs its input
  restricted to lane 0, which the LED model before it does not provide.
* **Normalization.** Only the power-of-two form (shift) is built. Exact
  normalization by the largest coefficient would need a multiplier per
  lane.
* **Table size.** The LED table keeps full 12-bit resolution (4096 × 12
  bits, 8 read ports). This is larger than the memory the published build
  reports.
* **Impulse-response length.** 40 taps cover 20 ns. A ray-traced
  5 × 5 × 5 m room with two reflections has noticeable response for about
  40–50 ns after the direct path. Raise CH_TAPS (coefficient address space
  up to 4096) to hold all of it.
* **Own choices.** The widths M and R, the filter lengths, the bus and its
  address maps, the noise generator, the reset values (transparent blocks),
  the pipeline depths, truncating shifts and saturation are all this
  implementation's own.
* **Serializers.** The deserializer and serializer are written in fabric
  logic. On an FPGA they would map to the I/O serializer primitives, and
  the fast clock would come from a PLL.
* **Not included.** The processor, its host GUI and the PLL are not
  included.
* **Timing closure.** Timing closure at 250 MHz has not been attempted. The
  stage-2 adder trees of `poly_fir` are a single cycle deep and would need
  pipelining on a real device.

## Verification

Every module in `rtl/` has a self-checking testbench in `tb/`. Each one
compares against integer reference models in `tb/owc_ref_pkg.sv` and prints
`TB_RESULT checks=N failures=F`:

| testbench | what it checks |
|---|---|
| tb_poly_fir | reset impulse, random response with shift, interpolated input (phase filters), second instance with `INTERP = 1` against the same model, saturation, 2-cycle latency, gaps in valid |
| tb_deserializer / tb_serializer | lane order, latency, valid, phase rule |
| tb_led_lut | bypass, loaded table with reduced address width |
| tb_noise_gen | exact LFSR sequence, hold when not stepped, range, mean |
| tb_photodetector | gain/shift, noise on, saturation |
| tb_rx_frontend | photodetector + TIA chain |
| tb_driver_led | table on/off with the FIR |
| tb_owc_emulator | whole chain at default parameters (see below) |
| tb_owc_ofdm | OFDM workload and coefficient normalization (see below) |

`tb_owc_emulator` runs the whole chain at the default parameters. It checks
the serial output sample by sample, about 5000 samples, against a reference
of the full chain. It also checks the 80-fast-cycle latency. The run goes
through four configurations, each loaded while the stream keeps running:

1. reset (transparent);
2. "room centre": compressive table, low-pass LED, 40-tap response with
   line of sight and decaying reflections, photodetector noise, interpolated
   input;
3. "corner": new response, table bypassed, full-rate input;
4. overload: every stage saturates.

Outputs affected by a change in flight are skipped. The test fails if any
mechanism (table on and off, interpolated and full-rate input,
reconfiguration, noise, saturation in each block) never happened.

`tb_owc_ofdm` also runs at the default parameters. It sends OFDM symbols
through a 40-tap multipath response:

* 1024-point symbols with 300 loaded carriers, in 4-, 16- and 64-QAM;
* the input interpolated by 8 (lane 0 only), so the channel works as the
  polyphase interpolator.

The same symbol runs twice. The first run quantizes the coefficients
directly (h·2^15). The second normalizes them by 2^6 and shifts the result
back. The bench compares the channel output with the exact real-valued
convolution. Normalization lowers the quantization error from about
−47 dB to about −85 dB relative to the signal, and the test requires at
least 20 dB of improvement. Every channel and output sample is also
checked bit-exactly. For information, the bench prints the time-domain EVM
between the transmitted samples and the direct-path output lane, which is
about −33 dB with this response.

Running a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/owc_pkg.sv tb/owc_ref_pkg.sv tb/tb_owc_emulator.sv \
    --top-module tb_owc_emulator -o sim
./obj_dir/sim
```

The full-size end-to-end run takes about ten seconds. The other
testbenches use reduced K, widths and tap counts so they can reach corner
cases quickly.
