# BPSK modulators for a Spartan-6 board: on-chip carrier and AC'97 codec carrier

Binary phase-shift keying sends one bit per symbol by flipping the phase of a
sinusoidal carrier: the carrier itself for one bit value, the carrier shifted
by 180 degrees for the other. Multiplying a sine by +1 or -1 is the same as
choosing between the sine and its negation, so a BPSK modulator needs no
multiplier. It needs an oscillator, an inverter and a 2:1 multiplexer whose
select input is the data bit.

This repository holds two modulators built on that idea. They are two ways
of doing the same job and share their small parts:

| | `bpsk_sysgen` | `bpsk_modulator` |
|---|---|---|
| carrier | 10 MHz sine, 16-bit samples from an on-chip DDS | 440 Hz sine, played by an external AC'97 codec (LM4550) |
| clock | 100 MHz (100 MSps) | 12.288 MHz AC-link bit clock from the codec |
| data bits | on-chip 8-bit LFSR, one bit per carrier period | external input `sel` (a Pmod pin) |
| what is inverted | each 16-bit carrier sample | the serial AC-link data line |
| output | 16-bit BPSK samples | AC-link serial stream to the codec; the analogue BPSK signal appears at the codec's line and headphone outputs |

`bpsk_top` places both side by side; they share no signals.

## Hierarchy

```
bpsk_top
├── bpsk_sysgen            on-chip modulator, 100 MHz
│   ├── lfsr               modulating bits
│   ├── dds                10 MHz sine (phase accumulator + sine ROM)
│   ├── inverter  (W=16)   ~x = -x-1
│   └── mux2      (W=16)   sel = LFSR bit
└── bpsk_modulator         AC'97 modulator, on the codec's bit clock
    ├── sine_wave          AC'97 driver: codec set-up + sine PCM stream
    │   └── dds            440 Hz sine, stepped once per 48 kHz frame
    ├── inverter  (W=1)    on the serial data line
    └── mux2      (W=1)    sel = external data bit
```

`bpsk_pkg` holds the AC-link frame layout, the codec register numbers and
the sine-table size. Instance names inside `bpsk_modulator` (`xlxi_9`,
`xlxi_7`, `xlxi_5`) follow the schematic names of the original board design.

## The oscillator (`dds`)

A 32-bit phase accumulator adds `PHASE_INC` each enabled clock. Its top 9
bits address a 512-word full-wave sine table holding
`round(32767 * sin(2*pi*i/512))`. The table is computed at elaboration by a
constant function, so there is no data file; synthesis infers a 512 x 16 ROM,
which is one 8-kbit block RAM. Output frequency is
`f_ce * PHASE_INC / 2^32`.

The sample is registered: on an enabled edge the output takes the table word
of the phase held *before* that edge. After reset the output is 0 (the
sin 0 entry) and step `n` appears after the `(n+1)`-th enabled edge.

- In `bpsk_sysgen`: `ce = 1`, `PHASE_INC = 429496730`, giving
  10.0000000005 MHz at 100 MHz, exactly 10 samples per carrier period.
- In `sine_wave`: `ce` is high once per AC-link frame (48 kHz), and
  `PHASE_INC = floor(TONE_HZ * 2^32 / 48000)`. For 440 Hz that is
  39370533, giving 439.99999 Hz at about 109 samples per period.

## The on-chip modulator (`bpsk_sysgen`)

The LFSR steps once every `BIT_CYCLES` = 10 clocks, so each data bit lasts
exactly one carrier period and bit edges fall on carrier zero phase. The LFSR
is an 8-bit Fibonacci register: polynomial x^8 + x^6 + x^5 + x^4 + 1, seed
FFh, period 255, output is the MSB. The inverter and multiplexer are
combinational, so `bpsk_out` follows `dds_out` and `lfsr_out` in the same
cycle:

```
bpsk_out = lfsr_out ? ~dds_out : dds_out      (~x = -x-1)
```

All four internal signals are outputs, for observation. Reset is
synchronous and active high. The first LFSR step comes 10 clocks after
reset.

**Bit polarity.** The carrier feeds `d0` and the inverted carrier feeds
`d1`. With the usual multiplexer convention (`sel = 0` passes `d0`), a data
bit of 1 sends the inverted carrier. The opposite mapping (1 sends the
carrier) is an equally valid BPSK convention. To get it, swap `d0` and `d1`
in `bpsk_sysgen`. A receiver only has to use the same convention.

**Why bitwise NOT.** The inverter is a NOT gate, not a negation. The result
is off by one LSB from a true negation (-x-1 instead of -x). The benefit is
that it costs no adder. At 16 bits the error is negligible.

## The AC'97 modulator (`bpsk_modulator`, `sine_wave`)

### The AC-link as `sine_wave` drives it

The LM4550 codec supplies `aud_bit_clk` (12.288 MHz). The driver runs
entirely on that clock. A frame is 256 bit clocks long, which gives
48 kHz frames. Each frame is sent MSB first on `aud_sdo` as follows:

| bits | slot | content |
|---|---|---|
| 0-15 | 0, tag | `F800h` when active: frame valid, slot 1-4 valid, codec ID 00. `0000h` when idle |
| 16-35 | 1, command address | bit 19 = 0 (write), bits 18:12 = register |
| 36-55 | 2, command data | register value in bits 19:4 |
| 56-75 | 3, PCM left | 16-bit sine sample in bits 19:4 |
| 76-95 | 4, PCM right | same sample |
| 96-255 | 5-12 | zero |

Outputs change on the rising edge of `aud_bit_clk`. The codec samples them
on the falling edge. `aud_sync` is high for 16 bit clocks and rises one bit
clock before bit 15 of slot 0, as the AC-link protocol requires:

```
bit_clk   _/‾\_/‾\_/‾\_/‾\_ ... _/‾\_/‾\_/‾\_
aud_sync  ___/‾‾‾‾‾‾‾‾‾‾‾‾‾‾ ... ‾‾‾‾‾‾‾\_____      (16 clocks)
aud_sdo   ===X=====X=====X== ... ===X=====X====
            255   tag15  tag14         tag0  slot1.19
```

The internal order of events is as follows:

- At bit 254 the oscillator steps.
- At bit 255 the next frame's slot words are latched: tag, command and
  sample.
- The frame is then serialised from bit counter positions by plain
  comparisons.

### Start-up and codec set-up

There is no reset input. The block has no clock before the codec runs, so
every register takes its power-up value, as an FPGA does after
configuration. Verilator's lint reports this as "procedural assignment to a
declaration with initial value", which is expected here. The first frame
boundary comes on the first clock edge; it also resets the oscillator.
`aud_reset` (the codec's active-low `RESET#`) is held high.

The first `INIT_FRAMES` frames (default 1024, about 21 ms) are idle: their
tag is zero, and they give the codec time to become ready. The driver has
no `SDATA_IN` input, so it does not read the codec-ready bit. After that,
every frame is active. The command slots write three registers in turn, one
per frame, and keep repeating:

| register | meaning | value |
|---|---|---|
| 02h | master volume (line out) | `{2'b00, sw, 4'h0, 2'b00, sw, 4'h0}`: no mute, attenuation `sw * 8` steps of 1.5 dB = 0/-12/-24/-36 dB |
| 04h | headphone volume | same |
| 18h | PCM-out gain | `0808h`, 0 dB on both channels |

These three registers lie on the codec's path from its DACs to `LINE_OUT`
and `HP_OUT`. Because the writes repeat, a change on `sw` reaches the codec
within four frames, since the words for a frame are latched one bit before it
starts.

### Keying the serial line

`bpsk_modulator` does not touch the samples. It inverts the whole serial
line:

```
aud_sdo ──┬────────────── d0 ┐
          └── inverter ── d1 ├─ mux2 ── out_1 → codec SDATA_OUT
sel ─────────────────────── sel┘
```

Inverting every bit of a 20-bit slot turns the left-justified sample `x`
into `~x`, which is the carrier shifted by 180 degrees (to within one LSB).
So while `sel = 1` the PCM slots carry the inverted carrier.

**Side effect.** The same inversion also hits slot 0 and the command slots.
An inverted tag reads `07FFh`, so its frame-valid bit is 0. A codec that
honours that bit ignores such frames and holds its last sample. The
testbench's codec model behaves that way: its DAC value changes only during
frames sent with `sel = 0`. How a real LM4550 reacts to such frames has not
been verified.

The keying on the serial line is kept because it is how the modulator is
specified. If a clean analogue BPSK output is what you need, you can move
the inverter and multiplexer onto the 16-bit sample in `sine_wave`, before
serialisation. That is a local change: `sel` becomes a `sine_wave` input,
and `pcm_q` is loaded with `sel ? ~sample : sample`.

`sel` is used without a synchroniser and acts immediately, possibly in the
middle of a frame. The testbenches change it only at frame starts.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `bpsk_sysgen` | `CLK_HZ` | 100 000 000 | clock frequency |
| | `CARRIER_HZ` | 10 000 000 | carrier frequency |
| | `BIT_CYCLES` | 10 | clocks per data bit |
| `bpsk_modulator`, `sine_wave` | `TONE_HZ` | 440 | carrier frequency; 400 gives exactly 120 frames per period |
| | `INIT_FRAMES` | 1024 | idle frames after power-up, at least 1 |
| `dds` | `PHASE_W`, `PHASE_INC` | 32, 429496730 | accumulator width and step |
| | `LUT_AW`, `OUT_W` | 9, 16 | table address bits and sample width |
| `lfsr` | `N`, `TAPS`, `SEED` | 8, `10111000b`, `FFh` | register length, feedback taps, reset value |
| `inverter`, `mux2` | `W` | 1 | word width |

## What follows the specification and what is chosen here

The following come from the specification of the two modulators:

- the block structure of both modulators;
- the 100 MHz clock and the 10 MHz carrier of the on-chip one;
- the LFSR as data source;
- the lookup-table oscillator;
- the port names of the AC'97 modulator and its wiring (serial line into the
  multiplexer and the inverter);
- the 440 Hz carrier;
- the codec registers on the DAC-to-output path.

The carrier frequency of the AC'97 modulator is given as both 440 Hz and
400 Hz. This design uses 440 Hz by default, and `TONE_HZ = 400` gives the
other.

The following are this design's own choices:

- LFSR length, taps and seed;
- one bit per carrier period in `bpsk_sysgen`;
- oscillator widths and table size (512 x 16, one block RAM);
- the synchronous reset of `bpsk_sysgen`;
- the power-up-value scheme of `sine_wave` and its 1024 idle frames;
- the meaning of `sw` (volume);
- the round-robin register writes;
- 16-bit samples sent on both channels;
- the multiplexer polarity (bit 1 = inverted carrier).

The AC'97 frame format follows the AC'97 standard.

Not included:

- the codec itself, an external chip;
- the external pulse generator that supplies `sel` on the board;
- the simulation-tool blocks of the on-chip design's model (clock token,
  gateways, scope, JTAG co-simulation wrapper).

The gateways became the four observation outputs of `bpsk_sysgen`.

### Resource use

For reference, the reported implementations used these resources on the
Spartan-6 LX45:

- on-chip modulator: 43 flip-flops, 39 LUTs and one RAMB8BWER;
- AC'97 modulator: 62 flip-flops, 76 LUTs and no block RAM.

A generic synthesis of this RTL gives:

- `bpsk_sysgen`: 44 flip-flop bits plus the 8-kbit sine ROM;
- `bpsk_modulator`: 108 flip-flop bits plus the same ROM.

This AC'97 driver keeps a whole-frame set of slot registers and a 32-bit
phase accumulator, which explains its larger count.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. Reference values are
computed inside the testbenches (`bpsk_tb_pkg`) from real-valued `$sin` and
from the LFSR recurrence `b[n] = b[n-8] ^ b[n-6] ^ b[n-5] ^ b[n-4]`.

| testbench | checks |
|---|---|
| `tb_inverter`, `tb_mux2` | exhaustive / random words, ~x = -x-1 |
| `tb_lfsr` | 520 steps under random `ce` against the recurrence; period 255; reset |
| `tb_dds` | every sample at 10 MHz / 100 MHz; latency; 10-sample period; hold with `ce` low |
| `tb_bpsk_sysgen` | 3000 clocks, cycle by cycle: carrier, inverted carrier, bit sequence, 10-clock bit period, BPSK output |
| `tb_sine_wave` | with a codec model (`ac97_codec_model`): frame length 256, SYNC 16 bits, idle then active tags, command cycle, volume changes via `sw`, every PCM sample at 440 Hz; a 400 Hz instance repeats every 120 frames |
| `tb_bpsk_modulator` | random `sel` per frame: frames bit-exact, or bit-exact inverted; codec model's DAC follows only `sel = 0` frames |
| `tb_bpsk_top` | both modulators at default parameters (full 1024-frame start-up, then 300 active frames; 2.7 M clocks at 100 MHz). Counts and requires each mechanism: LFSR bits 0 and 1, idle frames, carrier frames, inverted frames, each register write, a volume change |

To run one with Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/bpsk_pkg.sv tb/bpsk_tb_pkg.sv tb/tb_bpsk_top.sv --top-module tb_bpsk_top
./obj_dir/Vtb_bpsk_top
```

Replace `tb_bpsk_top` with any other testbench name. The top-level test
runs in a few seconds.

The design was checked only in simulation, against the codec model. The
model checks the frame format and reacts to the frame-valid bit, but it is
not the real codec's analogue behaviour.
