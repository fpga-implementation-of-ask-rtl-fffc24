# Binary ASK and FSK modulators by carrier selection

Two small, independent digital modulators for a binary message:

* **ASK (amplitude shift keying)** sends `A0·cos(2π·fc·t)` for a 0 and
  `A1·cos(2π·fc·t)` for a 1. Often `A0 = 0`, which gives on-off keying.
* **FSK (frequency shift keying)** sends `A·cos(2π·f1·t)` for a 0 and
  `A·cos(2π·f2·t)` for a 1. The peak amplitude is the same for both.

Neither modulator multiplies or generates anything. Both carriers arrive
already sampled and quantised on two input ports. The message bit drives the
select input of a 2:1 multiplexer, which passes one of the two sample streams
to the output. Each modulator is therefore one 6-bit multiplexer with no
registers: a message change shows at the output in the same sample period.
On an FPGA with 6-input LUTs that have two outputs, each modulator packs into
three LUTs and uses 19 pins.

## Sample format

`rtl/sk_pkg.sv` defines the shared types:

| name          | value | meaning                                                     |
|---------------|-------|-------------------------------------------------------------|
| `SAMPLE_W`    | 6     | width of every carrier and output sample, signed two's complement |
| `SAMPLE_FRAC` | 4     | fraction bits assumed by the sources and testbenches (Fix_6_4) |
| `sample_t`    |       | `logic signed [SAMPLE_W-1:0]`                               |
| `symbol_e`    |       | `SYM_ZERO` / `SYM_ONE`, the message bit                     |

With 4 fraction bits a unit-amplitude carrier spans −16 … +16
(−1.0 … +1.0), and the word can hold amplitudes up to 1.9375. The hardware
only selects samples, so the binary point is a convention shared by the
sample sources and whatever reads the output. The modules do not depend on
it. The width is the parameter `W` on every module.

## Blocks

```
ask_fsk_top
├── ask_modulator ── sg_mux (N=2)
└── fsk_modulator ── sg_mux (N=2)
```

### `sg_mux`: the multiplexer

It has one select input and `N` data inputs (`d[N]`, each `W` bits), with
`N = 2` by default. `y = d[sel]`. If `N` is not a power of two, the unused
select codes return `d[N-1]`; this is a choice of this design. The mux is
purely combinational.

### `ask_modulator`

| port       | dir | width | meaning                                  |
|------------|-----|-------|------------------------------------------|
| `msg`      | in  | 1 (`symbol_e`) | message bit; 1 selects `carrier1` |
| `carrier0` | in  | W     | sample of `A0·cos(2π·fc·t)`               |
| `carrier1` | in  | W     | sample of `A1·cos(2π·fc·t)`               |
| `ask_out`  | out | W     | ASK sample                               |

The two carriers must have the same frequency and phase, and differ only in
amplitude. For on-off keying, tie `carrier0` to zero.

### `fsk_modulator`

This has the same ports as `ask_modulator`, with the output named `fsk_out`.
`carrier0` is the f1 carrier (sent for 0) and `carrier1` is the f2 carrier
(sent for 1). The module switches between two free-running carriers, so the
output phase jumps at a bit boundary unless the sources line up there. For
continuous-phase FSK, the sources must provide it. The modulator does not.

### `ask_fsk_top`

This module places the two modulators side by side. They share no signal.
Its ports are `ask_msg`, `ask_carrier0`, `ask_carrier1` and `ask_out` for the
ASK side, and the same four names with an `fsk_` prefix for the FSK side.
There is no clock and no reset, because nothing in the datapath has state.

## Timing

All paths are combinational, from a message or carrier input to the
modulator's output. The output is valid once the inputs settle, and a new
sample can be applied every cycle of whatever clock the sample sources run
on. To register the output, add a flip-flop stage around the top. That adds
one cycle of latency to both the message and the carrier.

## Where this RTL makes its own choices

* The carriers and the message come from outside the hardware. This RTL has
  no sine generator, so any source works (a DDS, a ROM, an ADC). The
  frequencies, amplitudes and bit rate are the source's business.
* The amplitude scaling for ASK (`A0`, `A1`) also happens in the sources.
  The modulator selects between the two scaled carriers and does not
  multiply.
* Latency is zero: no pipeline register.
* Sample width is 6 bits. The 4 fraction bits are only a convention.
* The unused select codes of a multiplexer whose `N` is not a power of two
  return the last input.

## Testbenches

Every testbench checks itself and ends by printing
`TB_RESULT checks=<n> failures=<m>`. `tb/sine_source.sv` is a behavioural
sampled-cosine source, `round(AMPL·2^FRAC·cos(2πn/PERIOD + PHASE))` with
saturation. It stands in for the carrier generators. The expected values are
computed again inside each testbench from the same formula, not read from the
source or the design.

| testbench           | what it shows |
|---------------------|---------------|
| `tb_sg_mux`         | Random data with every select code, for N = 2, 3 (the unused code returns the last input) and 4. |
| `tb_ask_modulator`  | Two instances: on-off keying (A0 = 0, A1 = 1.0) and A0 = 0.5, A1 = 1.75. Checks every sample against the formula, the peak magnitude of every bit, and zero latency at each message change. |
| `tb_fsk_modulator`  | f1 with a period of 16 samples, f2 with a period of 8, and 32 samples per bit. Checks every sample, counts sign changes per bit to confirm the frequency, checks the constant peak amplitude and zero latency. |
| `tb_ask_fsk_top`    | Both sides at once, at the top's default parameters, with independent random messages. Counts ASK carrier on/off and FSK f1→f2 / f2→f1 switches, and fails if any of them never happens. |

Simulate with Verilator 5, for example for the top:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/sk_pkg.sv rtl/sg_mux.sv rtl/ask_modulator.sv rtl/fsk_modulator.sv \
    rtl/ask_fsk_top.sv tb/sine_source.sv tb/tb_ask_fsk_top.sv \
    --top-module tb_ask_fsk_top -o sim
./obj_dir/sim
```

For the other testbenches, replace the last two files and `--top-module`.
Every run takes well under a second. Lint the RTL with
`verilator --lint-only -Wall`. The only warning is that `SAMPLE_FRAC` is not
used by any synthesizable module. It exists for the sources and testbenches.

## What is not here

* The carrier and message sources, and any display of the waveforms. Only a
  behavioural source for simulation is included.
* Board-level items: pin assignment, device configuration and clocking for a
  particular FPGA board.
* Demodulation. The design is transmit-side only.
