# Real-time guitar effects unit (chorus, vibrato, distortion) for the WM8731 codec

This is an FPGA effects unit for an electric guitar. It is written for the Altera DE2 board and
its Wolfson WM8731 audio codec. The guitar signal, brought to line level by a preamplifier,
enters the codec's ADC. The FPGA reads the stereo sample stream and runs each channel through
its own chain of three effects: **chorus**, then **vibrato**, then **distortion**. The processed
samples go back out through the codec's DAC. Every effect can be switched on or off for each
channel and has settings (clip level, sweep depth and speed, wet/dry mix). A CPU writes these
settings into a register window over an Avalon bus, and it reads a PS/2 keyboard to let the
player change them. The unit also sets up the codec over I2C after reset and sends it a new
headphone volume whenever the CPU changes one.

Vibrato and chorus rest on one idea. The sample is delayed by an amount that a slow sine wave
sweeps back and forth, and the moving delay bends the pitch up and down. Vibrato outputs only the
delayed signal. Chorus mixes it with the dry signal, so the result sounds like two players who are
slightly out of tune. Distortion clips the waveform at a settable level.

The RTL covers all the logic inside the FPGA. It does not include the CPU, its control program,
the SRAM and LCD controllers of the original system, or the codec chip. The top level brings out
the CPU-side bus ports so that a CPU, or a testbench, can drive them.

## Signal path

```
            ADC serial                                                   DAC serial
 codec ──► audio_in ──► lr_buffer_in ──┬─► chorus ─► vibrato ─► distortion ─┬─► lr_buffer_out ──► audio_out ──► codec
                                       │   (left chain)                      │
                                       └─► chorus ─► vibrato ─► distortion ─┘
                                           (right chain)
            effector_regs (CPU settings) ──► both chains,  volumes ──► i2c_codec_config ──► codec control port
```

Every block passes a sample with a one-cycle valid pulse (`data_enable` in, `data_ready` out)
and a 16-bit two's-complement word. A disabled effect passes its input on in one clk cycle. An
enabled one takes:

| stage      | enabled | disabled |
|------------|---------|----------|
| chorus     | 6 cycles | 1 cycle |
| vibrato    | 5 cycles | 1 cycle |
| distortion | 1 cycle  | 1 cycle |

So a channel needs at most 12 clk cycles per sample. A new sample for a channel arrives every
1536 clk cycles (see below), which leaves the chain idle almost all the time. The two chains run
in parallel and do not share any state.

## Codec serial port and timing

The codec runs as a slave, so the FPGA makes all of the audio clocks. The design uses one clock,
`clk` (50 MHz on the board). The audio logic advances only on `audio_ce`, a clock enable that is
high for one cycle in every `AUDIO_DIV` = 4. One enabled cycle is called an *audio tick* below.
`aud_xck`, the codec's master clock, is clk/4.

* **LRCK** toggles every 192 audio ticks, so a frame lasts 384 ticks. LRCK high carries the left
  channel and LRCK low the right, on both the ADC and the DAC side.
* **BCLK** has a period of 12 ticks and restarts at each LRCK edge. It rises at tick 5 and falls
  at tick 11 of each period. That gives 16 BCLK periods per LRCK half: one 16-bit word per half,
  left-justified, MSB first.
* **ADC** (`audio_in`): a bit is sampled on each BCLK rising edge. At the LRCK edge that ends a
  half, the word is latched, and one tick later `audio_req` asks `lr_buffer_in` to take it. LRCK
  has already toggled by then, so LRCK high at the request means the word is the right channel's.
* **DAC** (`audio_out`): at each LRCK edge the next word is loaded into a shift register whose
  MSB drives DACDAT. The register shifts on each BCLK falling edge, so every bit is stable at the
  rising edge where the codec samples it. One tick after the edge, `audio_req` asks
  `lr_buffer_out` for the word of the following half. `lr_buffer_out` holds the latest processed
  sample of each channel. It answers with the left sample while LRCK is low, because that word
  will go out in the coming high (left) half, and with the right sample while LRCK is high.
* `audio_in` and `audio_out` each hold an identical `codec_clkgen`. Both leave reset together, so
  ADC LRCK and DAC LRCK are the same signal.

The sample rate is f_audio / 384. The divider ratios come from a codec clock of 18.432 MHz,
which gives 48 kHz. On the board the audio clock is 50 MHz / 4 = 12.5 MHz, and the same dividers
give 32.55 kHz. Change `AUDIO_DIV` (or the clock) to move the rate; nothing else depends on it.

**End-to-end latency.** A word latched at an LRCK edge goes out in the same channel's half that
starts one frame later. It cannot go out earlier, because the DAC request for the coming half
comes one tick after the edge, before the chain has finished with the word just latched.

An optional test tone in `audio_out` (input `test_mode`; tied off in the effects unit) sends a
48-step sine, one step per frame, in both halves. Step k is floor(32767·sin(2πk/48)) for
k = 0..24, and the bitwise complement of step 48−k for k = 25..47. The table is computed when the
design is elaborated.

## The modulated delay (`variable_delay`)

This block is shared by vibrato and chorus, and it is the part that needs the most care.

**Buffer.** A 1633-entry circular RAM (`delay_ram`, 1633 × 16) keeps the channel's recent
samples. A write pointer `wr` moves one entry per sample and wraps from 1632 to 0.

**Delay.** For sample n the block returns the sample written `d[n]` samples earlier:

```
d[n] = 1633 − (2^(5+amp) − 1) + (S[k] >>> (4 − amp))
```

* `amp` is the 3-bit amplitude code. Codes 0..4 are meaningful; 5..7 act as 4.
* `S[k]` is entry k of a 1500-entry table that holds one full sine period,
  `S[k] = trunc(256·sin(2πk/1500))` limited to ±255. It is 12 bits signed and computed at
  elaboration (`sine_table`).
* The centre term shrinks as the swing grows, so the delay always stays inside the buffer:

| amp | swing (samples) | centre | d range      |
|-----|-----------------|--------|--------------|
| 0   | ±15             | 1602   | 1587 .. 1617 |
| 1   | ±31             | 1570   | 1539 .. 1601 |
| 2   | ±63             | 1506   | 1443 .. 1569 |
| 3   | ±127            | 1378   | 1251 .. 1505 |
| 4   | ±255            | 1122   | 867 .. 1377  |

**Read address.** The read address is `wr − d[n]`, plus 1633 when that is negative. This is a
subtract-and-correct in place of a modulo. Because 1 ≤ d ≤ 1632, one correction is always
enough.

**Sweep speed.** The oscillator index k advances once every `freq + 1` samples (`freq` is 4 bits)
and wraps from 1499 to 0. The sweep period is therefore 1500·(freq+1) samples, which is 31 ms
to 0.5 s at 48 kHz. Codes 5..15 cover the 2–6 Hz usual for vibrato. A larger code gives a
slower sweep.

**Start-up.** Right after reset, the entry `d` samples back has never been written. A saturating
count of the samples written so far detects this, and the block then outputs 0 in place of the
RAM word. The effect therefore starts silent, whatever the RAM held at power-up.

**Disabled effect.** When an effect is switched off, its delay line is neither written nor
stepped. It keeps its state and picks up where it stopped when switched back on.

**Timing** (cycles after `start`):

1. write the sample, request the sine entry, step the oscillator divider;
2. form the read address from the sine value;
3. read the RAM;
4. (RAM output registered);
5. `done` for one cycle, with `delayed` and `dry` held until the next sample.

A `start` while busy breaks the handshake rule, and an assertion reports it. Samples arrive
hundreds of cycles apart, so this never happens in the design.

## Chorus blend

The chorus output is `g·delayed + (1−g)·dry`. The weight g comes from the 4-bit mix code m and
is built only from arithmetic shifts and adds:

* m = 0..7: `delayed >>> (8−m)` + Σ_{k=1..8−m} `dry >>> k`, so g = 2^−(8−m) (from 1/256 to 1/2);
* m = 8..15: Σ_{k=1..m−6} `delayed >>> k` + `dry >>> (m−6)`, so g = 1 − 2^−(m−6) (from 3/4 to
  511/512).

Each shift rounds toward −∞, and the sum wraps at 16 bits. The reset value m = 8 gives ¾ delayed
and ¼ dry. The blend is the registered sixth cycle of the chorus.

## Distortion

When enabled, a sample above `+clip[14:0]` is set to that value, and a sample below
`~clip[14:0]` = −(clip+1) is set to that. With the reset level 256, 16183 → 256, −28891 → −257
and 35 → 35. The stage has no gain. Output level is set by the codec's headphone volume, which
the register file sends over I2C.

## Control

### Effect registers (`effector_regs`, Avalon-MM slave, 16-bit data)

The registers sit at word addresses 0..19. Unused addresses read 0 and ignore writes. Read data
is combinational, with no wait states.

| addr | register | bits | reset | | addr | register | bits | reset |
|------|----------|------|-------|-|------|----------|------|-------|
| 0 | left volume  | 7  | 121 | | 10 | right vibrato amp  | 3 | 4 |
| 1 | right volume | 7  | 121 | | 11 | right vibrato freq | 4 | 0 |
| 2 | left distortion on | 1 | 0 | | 12 | left chorus on   | 1 | 0 |
| 3 | left clip level    | 16 | 256 | | 13 | left chorus amp  | 3 | 4 |
| 4 | right distortion on | 1 | 0 | | 14 | left chorus freq | 4 | 0 |
| 5 | right clip level   | 16 | 256 | | 15 | left chorus mix  | 4 | 8 |
| 6 | left vibrato on    | 1 | 0 | | 16 | right chorus on  | 1 | 0 |
| 7 | left vibrato amp   | 3 | 4 | | 17 | right chorus amp | 3 | 4 |
| 8 | left vibrato freq  | 4 | 0 | | 18 | right chorus freq | 4 | 0 |
| 9 | right vibrato on   | 1 | 0 | | 19 | right chorus mix | 4 | 8 |

The control program addresses the registers with 16-bit pointers at byte offsets 0, 2, 4, …
(0x80800 + 2·addr). On a 32-bit-word Avalon slave, that byte offset maps to word address `addr`.
A write to a volume register also pulses `vol_valid` for that channel.

### Codec set-up (`i2c_codec_config`)

After reset, this block writes ten WM8731 registers, each as device 0x34, 7-bit register number
and 9-bit value:

* R0, R1 = 0x017: line inputs at 0 dB.
* R2, R3 = volume: headphone volume, 121 = 0 dB.
* R4 = 0x012: DAC selected, line input, microphone muted.
* R5 = 0: no de-emphasis, DAC not muted.
* R6 = 0: everything powered.
* R7 = 0x001: slave, 16-bit, left-justified.
* R8 = 0x002: normal mode, 384·fs.
* R9 = 0x001: active.

After that it sends R2 or R3 again whenever a volume register is written. A volume written while
the bus is busy is queued, and only the latest value is sent. SCL is clk/(4·`I2C_QUARTER`),
which is 100 kHz at 50 MHz. SDA is open-drain: `i2c_sdat_oe` = 1 pulls the pin low. A byte that
is not acknowledged sets the sticky `i2c_ack_error`, and the sequence carries on.

### Keyboard port (`ps2_keyboard`)

The PS/2 clock and data lines are synchronised into the clk domain. The receiver shifts one bit
on each PS/2 clock falling edge and checks the start, odd-parity and stop bits of every 11-bit
frame. A good frame's byte becomes the current code and sets a flag. A bad frame is dropped. A
frame left unfinished for 65536 cycles is abandoned.

* Word 0 reads 1 while a code waits.
* Word 1 reads the code, and reading it clears the flag.

One code is held. A newer code replaces one that has not been read.

## Top level (`guitar_effects_top`)

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | system clock, asynchronous active-low reset |
| `eff_address[6:0]`, `eff_write`, `eff_read`, `eff_writedata[15:0]`, `eff_readdata[15:0]` | | effect register window |
| `kbd_address`, `kbd_read`, `kbd_readdata[7:0]` | | keyboard port |
| `ps2_clk`, `ps2_dat` | in | PS/2 keyboard lines |
| `aud_xck`, `aud_bclk`, `aud_adclrck`, `aud_daclrck`, `aud_dacdat` | out | codec audio port |
| `aud_adcdat` | in | codec ADC data |
| `i2c_sclk`, `i2c_sdat_oe` | out | codec control port, open-drain data |
| `i2c_sdat_i` | in | I2C data as seen on the pin |
| `i2c_busy`, `i2c_ack_error` | out | I2C status |

Parameters and their defaults:

* `AUDIO_DIV` = 4: clk cycles per audio tick.
* `LRCK_HALF` = 192: audio ticks per LRCK half.
* `BCLK_DIV` = 12: audio ticks per BCLK period.
* `DEPTH` = 1633: delay buffer entries.
* `TABLE_LEN` = 1500: sine entries.
* `I2C_QUARTER` = 125: clk cycles per quarter SCL period.

On the board, the bidirectional SDA pin is built as `assign I2C_SDAT = i2c_sdat_oe ? 1'b0 : 1'bz;`
with `i2c_sdat_i = I2C_SDAT`. Shared types, the register map and the blend arithmetic live in
`effects_pkg`.

On-chip memory comes to four delay RAMs (104,512 bits) and four sine tables (72,000 bits). That
is well inside the 483,840 M4K bits of the DE2's Cyclone II EP2C35.

## Where this design departs from the original

* **Channel order on the DAC side.** The original output buffer hands out the left sample while
  LRCK is high. That word is loaded at the next edge and sent in the low half, which swaps the
  channels. Here the left sample goes out in the high half, the same convention as the input.
* **Negative clip level.** The negative bound is −(clip+1), e.g. −257 for clip 256, as in the
  original's simulation values. It is not exactly −clip.
* **Sine table.** The table holds a full period and is indexed directly, with no quarter-wave
  folding or interpolation. It is computed from its formula, not stored as a list.
* **Delay timing.** The delay uses d[n] for the same sample n; the original used the value of the
  previous sample. The state machine takes 5 cycles instead of 7, and the chorus 6 instead of 8.
  The oscillator index wraps only through its divider. Start-up is silent.
* **Sweep speed.** The original's description speaks of skipping table entries to raise the
  rate. Its logic instead holds each entry for freq+1 samples, so a larger code is slower. This
  design follows the logic.
* **Amplitude codes 5..7** act as 4. They were undefined in the original.
* **Test tone.** Step 28 is 0xc000 from the formula (the original table has 0xc001 there).
* **Audio clock.** The audio clock is a clock enable, not a divided clock, so the whole design is
  one clock domain.
* **Codec set-up values.** The original only describes its I2C controller: 16-bit, 48 kHz,
  line input, low gain, slave mode, left-justified. The register values above are this design's
  reading of that.
* **Keyboard receiver.** The frame checks, the single holding register and the time-out are this
  design's own choices. Only the two-word polling interface comes from the original control
  program.
* **Distortion gain.** One block diagram shows a gain stage after the clipper. It is not built;
  the codec volume does that job.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends with the line
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_distortion` | The timing-diagram trace at clip 256 (7 samples), then 2000 random samples and levels against a reference; one-cycle latency. |
| `tb_sine_table` | Spot values from the original table and a full sweep of every entry at every amplitude code. |
| `tb_delay_ram` | Every address is written and read back; read latency; output held between reads. |
| `tb_variable_delay` | 6000 samples against a reference with its own history and oscillator, amplitude codes 0..5 and random speeds; latency 5. |
| `tb_vibrato`, `tb_chorus` | The timing-diagram settings (amp 2, freq 5, mix 7) with a ramp, then random data and every mix code; latencies 5/6, bypass 1. |
| `tb_codec_clkgen` | LRCK and BCLK periods, 16 BCLK per half, strobes agree with the edges. |
| `tb_audio_in` | A codec ADC model sends random words; each request carries the right word and channel. |
| `tb_audio_out` | A codec DAC model collects words; the word sent is the one given at the request; the test-tone sequence. |
| `tb_lr_buffer_in`, `tb_lr_buffer_out` | Channel routing, one pulse per request, values held. |
| `tb_effector_regs` | Reset values, random writes and reads over all 128 addresses, field routing, `vol_valid`. |
| `tb_i2c_codec_config` | An I2C slave model decodes the ten set-up writes, the queued volume writes, clean START/STOP and a missing acknowledge. |
| `tb_ps2_keyboard` | Good, bad-parity, bad-start and bad-stop frames, the time-out and the polling protocol. |
| `tb_effector`, `tb_effector_avalon`, `tb_guitar_effects_top` | The end-to-end test (below) at each level. |

`tb_guitar_effects_top` runs the complete design at its real sizes, with no parameter
overrides. It includes models of the codec's ADC, DAC and I2C ports, a PS/2 keyboard and a CPU.
A reference model of the two effect chains predicts every DAC word from the ADC words and the
settings in force. Over 2900 frames it covers:

* pass-through;
* chorus on one channel and vibrato on the other;
* all three effects with different settings per channel;
* a volume change;
* twelve random setting changes.

It counts how often each mechanism happened, and a count of zero is a failure. The mechanisms
are:

* bypassed samples;
* samples changed by the chorus;
* samples changed by the vibrato;
* samples clipped high;
* samples clipped low;
* different settings on the two channels;
* register read-backs;
* the ten codec set-up writes;
* volume writes;
* a keyboard code.

It takes about 10 s of simulation.

To run a testbench with plain Verilator (the package goes first):

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_guitar_effects_top \
    -y rtl -y tb rtl/effects_pkg.sv tb/tb_guitar_effects_top.sv -o sim
./obj_dir/sim
```

The design's only assertion is the `variable_delay` handshake rule. It is an immediate assertion
inside a clocked block, so that synthesis front ends that lack concurrent assertions still accept
the file.
