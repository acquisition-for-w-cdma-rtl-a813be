# Code acquisition engine for a W-CDMA RAKE receiver

A RAKE receiver gives each multipath component of a received DS-CDMA signal
its own correlator finger. Before the fingers can do that, something has to
find out where the paths are: at which delays the received chip stream lines up
with the locally known PN code. This step is called code acquisition. It only
has to be coarse, to within half a chip. A tracking loop refines it afterwards.

This RTL is the hardware half of that acquisition step. It correlates the
received I/Q samples with a PN code at every half-chip delay of a search range.
It then writes the resulting *delay profile* (correlation energy against delay)
into a memory. An external DSP reads the memory and picks the peaks. The DSP
also controls the engine. It loads the code, sets the search range and starts a
run through its asynchronous external memory interface (EMIF).

The correlator is a **serial-to-parallel matched filter** of the "inversed"
(transposed) type. It has N = 128 taps and correlates a code M chips long by
reusing the same 128 multipliers for successive 128-chip segments of the code.

```
 rx_i, rx_q ──► sample reg ──► sp_matched_filter (I) ──┐
                         └───► sp_matched_filter (Q) ──┤
                                  ▲ chip stream        ▼
                       int_mem (PN code)       delay_profile_unit
                                  ▲                    │ energy, position
                       acq_controller                  ▼
                        (runs, windows,        int_mem (delay profile)
                         sample phases)                │
                                  ▲                    │
 DSP EMIF ◄──► emif_glue ◄──► decoder_arbiter ◄────────┘
          (async)      (sync bus) primitives, parameters, memory window
```

## How the matched filter works

### What one run computes

Let D[k] be the samples taken at chip spacing and C[i] = ±1 the code chips. One
run of the filter produces TAPS full-length correlations

    corr(tau) = sum_{i=0}^{M-1} D[tau+i] * C[i],     tau = 0 .. TAPS-1,   M = segs*TAPS

A fully parallel filter would need M multipliers and an M-input adder. Here
only TAPS multipliers are present. The code is split into segments of TAPS
chips. While segment s is loaded, TAPS consecutive outputs are produced, and
output n is a partial correlation:

    out[n] = sum_{j=0}^{TAPS-1} D[n+j] * C[s*TAPS + j],      s = floor(n / TAPS)

For three taps the sequence is D0C0+D1C1+D2C2, D1C0+D2C1+D3C2,
D2C0+D3C1+D4C2, then D3C3+D4C4+D5C5, D4C3+D5C4+D6C5, and so on. The partial
results for one tau are TAPS outputs apart: out[tau], out[tau+TAPS], ... So a
TAPS-deep delay line with an adder in its feedback path sums them:

    acc[n] = out[n] + acc[n-TAPS]      (the first segment adds 0)

During the last segment, acc[n] is corr(n - (M - TAPS)).

### Why the transposed form, and why the load enables are staggered

With 128 taps, the direct form needs a 128-input adder every clock. The
transposed form removes that adder:

* After one input register, each sample is broadcast to all TAPS multipliers.
* Multiplying by a ±1 chip is just a conditional negation.
* The products flow through a chain of registers with one adder between each
  pair: `chain[0] <= p[0]`, `chain[j] <= chain[j-1] + p[j]`.
* The end of the chain gives out[n] one sample after D[n+TAPS-1] is multiplied.

The catch is the coefficient switch. A sample D[t] contributes to several
outputs at once. Its product with tap j belongs to output n = t - j, which may
already be in the next code segment while n for another tap is not. Tap j
therefore has to change segments exactly when t - j crosses a multiple of
TAPS, that is when **t mod TAPS = j**. This has a useful consequence: at chip
time t, the one tap that reloads always needs chip C[t]. So every coefficient
register is fed from one serial chip line that simply carries C[0], C[1], ...
A one-hot load-enable token (LD_EN) moves one tap further every sample, so that
LD_EN0, LD_EN1, ... fire in turn. No code shift register and no parallel
reload are needed.

### Filter interface timing

`sp_matched_filter` moves forward only on clocks with `en = 1`:

* Each `en` cycle carries one sample and one chip. `start` marks D[0] and C[0].
* A run takes `M + TAPS + 1` en cycles. It reads samples D[0..M+TAPS-2]; the
  last two cycles only flush the pipeline.
* corr(tau) appears, with `corr_valid`, one clock after en cycle number
  `M + tau + 2`.
* `segs` (1 .. CODE_LEN/TAPS) sets M at run time.

Because of the input register, out[n] leaves the chain after en cycle
n + TAPS + 1. That is one en cycle after the last sample it uses was fed.

## How a search is organised

The receiver feeds **two samples per chip, one sample per clock**. A sample
counter gives each sample a position in a reference period of `PROFILE_LEN`
samples (2048 = 1024 chips by default). `frame_sync` clears the counter. The
profile has one entry per sample position, which gives a resolution of half a
chip.

A filter run works on a single sample phase: it takes every second sample, so
its taps are one chip apart. One run therefore covers the 128 positions
`2*(w*TAPS + tau) + p` of window `w` and phase `p`. For each window the
controller (`acq_controller`) runs phase 0 and then phase 1:

1. Wait until the sample at position `2*w*TAPS + p` arrives.
2. Feed that sample and every second sample after it to both filters. For the
   t-th sample fed, read chip t from the PN code memory.
3. After `M + TAPS + 1` samples, pause three clocks so that the last energies
   are written.

`delay_profile_unit` turns each I/Q correlation pair into `I*I + Q*Q`,
saturated to 32 bits. It writes the energy to the profile memory at
`pass_base + 2*tau`.

The runs rely on the code repeating with the reference period, so each run
normally waits about one period for its start position. A full profile (8
windows × 2 phases) takes at most 17 periods plus one run: about 35 000 clocks,
or 4.6 ms at 7.68 MHz (2 × 3.84 Mchip/s).

## The DSP interface

**Glue logic (`emif_glue`).**
* The EMIF chip enable, read strobe and write strobe (`emif_ce_n`,
  `emif_are_n`, `emif_awe_n`, all active low) each pass through a two-flop
  synchronizer.
* When a synchronized strobe becomes active, the glue issues exactly one
  request on the internal synchronous bus (`bus_req_t`: we, re, addr, wdata).
* Read data comes back one clock later and is held on `emif_ed_out`.
* `emif_ed_oe` follows the raw read strobe, so the data bus is released at
  once.
* Program the DSP's asynchronous-memory timing so that a read strobe lasts at
  least **7 FPGA clocks** and a write strobe at least **4**. Address and data
  must stay stable during the strobe.

**Decoder/arbiter (`decoder_arbiter`).** The bus has 12-bit word addresses.
Address bit 11 splits it:

| address | contents |
|---|---|
| `0x800` | primitive (see below) |
| `0x801` | first window `w` |
| `0x802` | number of windows |
| `0x803` | code segments per run (`segs`, M = segs × 128) |
| `0x804` | status: bit 0 busy, bit 1 done, bit 2 conflict; any write clears conflict |
| `0x808`–`0x80B` | finger delays 0–3: the path delays (profile positions) chosen by the peak search |
| `0x000`–`0x7FF` | window onto the memory selected by the primitive |

| primitive | value | memory window |
|---|---|---|
| IDLE | 0 | none |
| LOAD_CODE | 1 | PN code memory, read/write, one chip per word in bit 0 (0 = +1, 1 = −1) |
| START_ACQ | 2 | none; writing it while idle starts a run |
| READ_PROFILE | 3 | delay profile memory, read only, one 32-bit energy per half-chip position |

The primitive selects the memory, so only one memory can ever drive the bus.
While a run is active, the engine owns both memories. A window access is then
dropped and sets the sticky conflict bit. `acq_done` (status bit 1) can serve
as an interrupt.

A typical sequence:
1. Write LOAD_CODE, then write the code words.
2. Write the window and segment parameters.
3. Write START_ACQ and wait for done.
4. Write READ_PROFILE and read the profile.
5. Search it for peaks, and write the chosen delays into the finger
   registers.

The finger registers appear on the top-level ports `finger_delay[0..NFING-1]`
for the tracking unit. `finger_load` pulses for one clock after each write.

## Parameters (top, `acq_top`)

| parameter | default | meaning |
|---|---|---|
| `TAPS` | 128 | filter taps N, also the number of delays per run |
| `CODE_LEN` | 256 | longest code M in chips (a multiple of TAPS); M is chosen per run |
| `DW` | 6 | signed sample width |
| `PROFILE_LEN` | 2048 | reference period and profile length in samples (half chips); a power of two |
| `NFING` | 4 | finger delay registers handed to the tracking unit (at most 8) |

Derived: accumulator width `DW + log2(CODE_LEN) + 1`; windows per profile
`PROFILE_LEN / (2*TAPS)`.

## Files

| file | content |
|---|---|
| `rtl/acq_pkg.sv` | bus widths, request struct, primitive enum, register offsets |
| `rtl/acq_top.sv` | top level: wiring, sample register |
| `rtl/sp_matched_filter.sv` | inversed serial-to-parallel matched filter with segment accumulator |
| `rtl/acq_controller.sv` | sample counter, window/phase run sequencer, PN memory reads |
| `rtl/delay_profile_unit.sv` | energy and profile address |
| `rtl/emif_glue.sv` | asynchronous EMIF to synchronous bus |
| `rtl/decoder_arbiter.sv` | registers, primitive-based memory selection, arbitration |
| `rtl/int_mem.sv` | dual-port synchronous RAM (PN code, delay profile) |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_mf_cycle_example` |

## Simulating

Every testbench is self-checking and ends with `TB_RESULT checks=N failures=M`.
With Verilator 5:

```
verilator --binary --timing -Irtl rtl/acq_pkg.sv tb/tb_acq_top.sv -y rtl \
          --top-module tb_acq_top -o sim && ./obj_dir/sim
```

Replace `tb_acq_top` with any other testbench name.

* **`tb_acq_top`** runs the whole design at its default parameters. It models
  the DSP's EMIF accesses, with strobes placed off the clock edges. The
  received signal repeats every 2048 samples: the 256-chip code plus random
  chips, sent over four paths with different delays and complex gains, plus
  noise. The test checks:
  * all 2048 profile entries against energies computed in the testbench;
  * that the four path delays are the strongest positions;
  * the run time;
  * a second run with other parameters.

  A model of the peak search then writes the four strongest peaks as finger
  delays, and the test checks them on the output ports. It also counts that
  each mechanism occurred: primitive switches, segment reloads, both sample
  phases, a bus conflict, frame syncs and finger loads. It runs in
  about a second.
* **`tb_sp_matched_filter`** uses 4 taps and a 16-chip code. en has random
  gaps, and segs takes every value. It checks each correlation and the en
  cycle on which it appears.
* **`tb_mf_cycle_example`** uses 3 taps and a 9-chip code. It checks the
  partial sums leaving the chain against the segment-by-segment sequence given
  above.
* The remaining testbenches each cover one block. `tb_emif_glue` uses
  asynchronous strobes. `tb_decoder_arbiter` covers the register map, memory
  selection by primitive, the conflict rule and the finger registers. `tb_acq_controller` checks the
  run schedule with wrap-around and random `frame_sync`. `tb_int_mem` and
  `tb_delay_profile_unit` check the memory and the saturation and address
  arithmetic.

## What follows the original design and what is chosen here

Taken from the original design:
* the split of work: the matched filter and the delay profile are computed in
  hardware, and the peak search runs on the DSP;
* the serial-to-parallel filter that reloads its coefficients with successive
  N-chip code segments and sums the sections through an N-chip delay;
* the inversed filter structure with one input register, a broadcast sample,
  an adder-register chain and staggered load enables LD_EN0, LD_EN1, ...;
* N = 128 taps;
* half-chip resolution;
* a DSP that acts as master over EMIF, with glue logic to a synchronous bus and
  a decoder/arbiter that selects the internal memory from the DSP's primitive.

Chosen here, because the original does not specify it:
* the code length M = 256 (programmable in 128-chip segments);
* 6-bit samples;
* separate I and Q filters sharing one real ±1 code, rather than a complex
  scrambling code;
* energy I² + Q², with no non-coherent accumulation over several runs;
* a profile of 2048 half-chip positions;
* the periodic reference with `frame_sync`, and the window/phase schedule;
* the primitive encoding, register map, status bits and conflict rule;
* four finger delay registers as the path from the peak search to the
  tracking unit;
* the EMIF synchronizer circuit and its strobe-width requirement;
* dual-port memories with one-clock reads, and one chip per memory word;
* asynchronous active-low reset.

## Not included

These parts are outside this RTL:
* **Peak search.** This is DSP software. Its algorithm is not specified beyond
  choosing peaks that come from real paths against a threshold.
* **Tracking unit.** It refines the delay from 1/2 to 1/16 chip.
* **RAKE correlator fingers and combiner.**
* **Maximal ratio combining and channel decoding.** These run on the DSP.
* **The DSP itself.**

Beyond the profile, the engine only provides the finger delay registers and
their ports.

Other limits:
* The direct-form serial-to-parallel filter (a parallel-load code register
  feeding an adder tree) is not built. It serves only to explain the
  transposed filter, which replaces it.
* Lint reports a few unused package constants in modules that do not use the
  register map, and unconnected status outputs in the top.
* The only assertions are a bus request that is never both a read and a write,
  and the I and Q filters running in lock step.
