# Four-track looping audio workstation for an FPGA

This is a small multitrack recorder and mixer. It lives on one FPGA board
with an I2S audio codec, an SD card and a VGA screen. Four tracks of equal
length are stored on the SD card. All four are played in a loop, at the same
time, through a chain of effects per channel and a volume mixer. During
playback, the line input (or the mix itself) can be recorded into any
channel, in step with the loop. The player drives everything from five board
buttons and sixteen switches, over a 10-row × 5-column table drawn on a
1024×768 screen.

Audio is handled as **8-bit signed words**. There is one word per half period
of the 44.1 kHz word clock, with left and right interleaved. Everything below
is counted in words, so one SD sector (512 bytes) holds 512 words, which is
256 stereo sample pairs.

```
 I2S ADC ─► i2s_rx ─► cdc_fifo ─┐                       ┌─► cdc_fifo ─► i2s_tx ─► I2S DAC
   (22.579 MHz domain)          │    (100 MHz domain)   │
                                ▼                       │
                 word step ─► load_cache[0..3] ─► fx_pipeline[c] ─► mixer
                                ▲                                      │
                 store_cache ◄──┴──── input word or mix word ◄─────────┘
                     │         ▲
                     ▼         │  sd_arbiter (round robin)
                 SD controller (byte-wide sector interface, 25 MHz)

 buttons/switches ─► gui_controller ─► settings ─► gui_renderer ─► VGA (65 MHz)
```

## Clock domains

| Domain | Frequency | Contents |
|---|---|---|
| `clk_mclk` | 22.579 MHz | `i2s_clkgen`, `i2s_rx`, `i2s_tx` |
| `clk_100` | 100 MHz | caches, SD arbitration, effects, mixer, GUI state |
| `clk_65` | 65 MHz | `vga_timing`, `gui_renderer` |
| `sd_clk_25` | 100 MHz ÷ 4 | output to the SD controller, made by `clk_div` |

The three input clocks are expected from the board's clocking block.

Resets are synchronised into each domain separately.

The settings reach the 65 MHz domain through two flip-flops. They change only
when a button is pressed, and a one-frame glitch on screen does no harm.

## Audio in and out: `i2s_clkgen`, `i2s_rx`, `i2s_tx`, `cdc_fifo`

`i2s_clkgen` divides the master clock:
- by 8 for the serial clock, 2.82 MHz;
- by a further 64 for the word clock, 44.1 kHz.

The ADC and DAC share these clocks.

The data follows standard I2S:
- bits go MSB first;
- the first bit comes one serial clock after the word-clock edge.

`i2s_rx` keeps the top eight bits of each sample, that is, serial positions
1 to 8 after the edge. It hands them over as one word, with a flag for left or
right.

`i2s_tx` works one slot behind the receiver:
- at each word-clock change it pops the next word from its FIFO;
- it shifts that word out in the following slot;
- if the FIFO is empty, it sends zero and raises `underrun`.

`cdc_fifo` carries words between the audio domain and the 100 MHz domain. It
is built on a dual-clock block RAM (`dual_clock_bram`):
- each port is clocked by its own domain;
- the pointers cross as Gray code through two-flop synchronisers;
- read data is valid one cycle after `rd_en`.

There is one FIFO in each direction, each 16 words deep.

## The word step

Each word that `i2s_rx` delivers is the heartbeat of the core:
1. `daw_top` pops the word from the input FIFO.
2. It asks every load cache for its next word. The word arrives two cycles
   later.
3. It runs each channel word through that channel's `fx_pipeline` (11 cycles).
4. It mixes the results (1 cycle).
5. It pushes the mix into the output FIFO.

While recording, the same step writes one word into the store cache: the
input word, or the mix word when "record mix" is set.

A step takes about 17 of the roughly 1,134 core cycles between words, so the
core is idle most of the time.

Because input and output run at the same rate, the output FIFO holds a
constant level. Left and right keep their slots.

## SD track memory: `memory_manager`, `load_cache`, `store_cache`, `sd_arbiter`

This is the part that needs the most care. The card delivers data a whole
sector at a time, in bursts, slowly and with latency. The audio path needs
one word per channel, every word period, with no gaps.

### Layout on the card

The card is split into one region per channel, `REGION_SECTORS` = 2^19
sectors each:
- channel *c*'s track starts at sector `c × REGION_SECTORS`;
- a track is `LOOP_SECTORS` = 1024 sectors long;
- all tracks have the same length, so the loops stay aligned;
- addresses sent to the controller are byte addresses (sector × 512), as
  standard-capacity cards expect.

A 1024-sector loop holds 524,288 words, which is 5.9 s of stereo.

A 16 s stereo loop would need about 2,757 sectors. It fits easily in a region;
set `LOOP_SECTORS` accordingly.

### Load caches (playback)

Each channel has a 4096-byte (eight-sector) block-RAM ring, `load_cache`. How
it runs:
- **Start of play.** It requests `PRELOAD` = 4 sectors at once.
- **Primed.** It raises `primed` once they have all arrived.
- **Refill.** After every 512 words read out, it owes the card one more
  sector, and requests the next sector of the track.
- **Wrap.** The sector address wraps back to the start after `LOOP_SECTORS`
  sectors, so the track loops seamlessly.
- **Read latency.** A read returns its word two cycles after `rd_req`.
- **Underflow.** If the cache is ever empty, the read returns silence (zero)
  and sets a sticky `underflow` flag.

`memory_manager` raises `play_ready` only when every channel's cache is
primed. Until then, `daw_top` holds the loop position and does not advance the
caches, so all tracks start together.

The cache keeps four sectors of margin. Serving all four caches and the
recorder once takes under 1 ms of card time. Each cache drains a sector in
5.8 ms. That leaves a comfortable margin.

### Store cache (recording)

`store_cache` is the same ring in the other direction:
- words are written in as they arrive;
- each time 512 words are present, it requests a sector write and streams the
  bytes out as the controller asks for them;
- it stops by itself after `LOOP_SECTORS` sectors and pulses `done`;
- on an early stop, an incomplete last sector is dropped;
- if the ring ever fills, the word is lost and `overflow` is set.

Recording is armed from the GUI, one channel at a time. While playing, the
store cache starts only at the next loop start. The new track is therefore
aligned with the others sector for sector.

### Arbitration and the controller handshake

`sd_arbiter` grants the one controller to the clients in round-robin order:
the store cache and each load cache.

It speaks the common byte-wide SD controller interface:
- `rd`/`wr` with a byte address start a sector transfer while `ready` is
  high;
- `byte_available` strobes each read byte;
- `ready_for_next_byte` asks for each write byte.

These strobes come from the 25 MHz controller domain. The arbiter samples them
at 100 MHz and acts on their rising edges.

For a read, each byte is passed to the granted cache as `rbyte_valid`/`rbyte`.

For a write:
- byte 0 must be on `din` when the transfer starts;
- each later request pulses `wnext` so the cache presents the next byte.

After the 512th byte, the arbiter waits for `ready` again. It pulses `done`
while the grant is still held, and releases the grant one cycle later.

The SD controller and card themselves are outside this RTL.
`tb/sd_card_model.sv` is a behavioural model of both, with the same
interface, for simulation.

## Effects: `fx_pipeline` and the effect blocks

Each channel has its own chain, in this order:

**distortion → delay → echo → chorus → tremolo**

- Each stage is enabled by one bit of the channel's settings.
- A disabled stage passes the word through with the same latency, so the
  total is always 11 cycles.
- All sums are saturated to 8 bits.
- Three channel settings are shared between stages. `TIME` is the delay
  length in words, used by both delay and echo. `LEVEL` is the coefficient
  α = LEVEL/256 for delay and echo; its top 7 bits are the clip limit, and
  its top 6 bits are the tremolo depth.

| Block | What it computes | Notes |
|---|---|---|
| `delay_fx` | y[n] = x[n] + α·x[n−m] | Block-RAM line of 44,100 words (500 ms of stereo). Latency 2. |
| `echo_fx` | y[n] = x[n] + α·y[n−m] | Same, but the output goes back into the line, so repeats decay by α each time. |
| `chorus_fx` | (x[n] + x[n−1324] + x[n−1764] + x[n−2206]) / 4 | Taps of about 15, 20 and 25 ms. 4096-word line. Latency 5. |
| `distortion_fx` | clamp to ±limit | Hard clipping. |
| `tremolo_fx` | x·(64 − depth·tri/64)/64 | `tri` is a 0..63..0 triangle stepping every 138 words, about 5 Hz. |

Because words are interleaved, a delay of *m* words is *m*/88,200 s. An even
*m* keeps left echoing left.

## Mixer: `mixer`

- Each channel word is multiplied by its 6-bit volume (0 to 63) and shifted
  right by 6.
- The words of the unmuted channels are summed.
- The sum is shifted right by ⌈log2 n⌉, where n is the number of unmuted
  channels, and clipped to 8 bits.

With all four channels at full scale, the sum cannot overflow. With fewer
channels, the level is not reduced more than needed.

## User interface: `gui_controller`, `vga_timing`, `gui_renderer`

The table has four channel columns and one mixer column. Its rows are:

REC, MUTE, VOL, DELAY, ECHO, CHORUS, DIST, TREM, TIME, LEVEL

- The up, down, left and right buttons move the cursor. It stops at the table
  edges.
- The centre button acts on the cell under the cursor:
  - REC arms that channel for recording and disarms any other. The arm clears
    when the recording ends.
  - MUTE and the five effect rows toggle.
  - VOL loads `sw[5:0]`.
  - TIME loads `sw[15:0]`.
  - LEVEL loads `sw[7:0]`.
- In the mixer column, REC selects "record the mix" and the MUTE row is
  play/stop.
- Buttons are synchronised and debounced: a press counts after 1 ms stable
  (100,000 cycles).
- Each channel resets to unmuted, volume 48, TIME 22,050 words (250 ms) and
  LEVEL 128.

`vga_timing` produces standard 1024×768 at 60 Hz from 65 MHz:
- 1344 × 806 total;
- negative sync pulses;
- horizontal sync starts at 1048 and is 136 pixels wide;
- vertical sync starts at 771 and is 6 lines wide.

`gui_renderer` draws, over a plain dark-blue background:
- a header of coloured column blocks;
- the grid;
- a highlighted cursor cell;
- a green block for each setting that is on, or red for an armed record;
- a bar whose length shows each numeric value;
- the row name in the corner of every cell, and the column names (CH1–CH4,
  MIX) in the header.

The labels are two-colour sprite text from `text_sprites`. It uses a 5×7 font
drawn at double size, so each character fills a 16×14 box and all the
position arithmetic is shifts. Only the characters the labels need have
glyphs.

The status LEDs:

| LED | Meaning |
|---|---|
| 15 | playing |
| 14 | recording active |
| 13 | recorder waiting or flushing |
| 12 | record overflow |
| 11 | input FIFO overrun |
| 10 | output underrun while playing |
| 9 | output FIFO full |
| 8 | all caches primed |
| 7:4 | unmuted channels |
| 3:0 | per-channel cache underflow |

## Parameters of `daw_top`

| Parameter | Default | Meaning |
|---|---|---|
| `NUM_CH` | 4 | channels |
| `LOOP_SECTORS` | 1024 | track length in sectors |
| `REGION_SECTORS` | 524288 | card space per channel |
| `CACHE_DEPTH` | 4096 | bytes per cache |
| `PRELOAD` | 4 | sectors loaded before play starts |
| `MAX_DELAY` | 44100 | delay/echo line length in words |
| `DEBOUNCE` | 100000 | button debounce in 100 MHz cycles |

Block RAM use at the defaults is about 3.1 Mbit. Most of it is the eight
500 ms delay and echo lines.

## Simulation

Every block has a self-checking testbench `tb/tb_<block>.sv`. Each one:
- ends by printing `TB_RESULT checks=N failures=M`;
- has a watchdog;
- uses only `$urandom`, so plain Verilator 5 runs it.

For example:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb --top-module tb_mixer \
    rtl/daw_pkg.sv rtl/mixer.sv tb/tb_mixer.sv
./obj_dir/Vtb_mixer
```

To build the whole design for a top-level test:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb --top-module tb_daw_top \
    rtl/daw_pkg.sv $(ls rtl/*.sv | grep -v daw_pkg) \
    tb/sd_card_model.sv tb/i2s_adc_model.sv tb/i2s_dac_model.sv tb/tb_daw_top.sv
```

Top-level tests:

- **`tb_daw_top`** runs the whole design with a two-sector loop, short regions
  and a short debounce. It takes about 30 s.
  - It records a track from the ADC model.
  - It records a second track while playing, which waits for the loop start.
  - It plays them back with effects and volumes.
  - It compares the DAC output with the expected mix.
  - It counts the mechanisms it exercises: finished recordings, loop-start
    waits, clipping and cache refills. Each must happen at least once.
- **`tb_daw_top_full`** uses every default. It records three sectors, stops,
  mutes the other channels, plays back and checks the output word for word.

- **`tb_delay_500ms`** runs the delay and the echo at their full 500 ms
  line (44,100 words) on 100,000 random words against reference models.

Bench models in `tb/`:
- `sd_card_model.sv`, the SD controller and card;
- `i2s_adc_model.sv` and `i2s_dac_model.sv`, the codec.

## Departures, assumptions and limits

- **Word width.** Words are 8 bits throughout. A 16-bit path would widen
  `daw_pkg::WORD_W`, the effects and the caches' word-to-byte packing. Nothing
  here does that.
- **Loop length.** The default loop is 1024 sectors, which is 5.9 s of
  stereo. That is not 16 s; see the layout section for the parameter to
  change.
- **Played channels.** A channel is played when it is unmuted. The track on
  the card persists, so there is no separate "programmed" state.
- **Own choices.** These are this design's own choices:
  - the chorus taps;
  - the tremolo waveform and rate;
  - the order of the effect chain;
  - the row assignment of the table;
  - the screen layout and the font;
  - the cache preload depth;
  - the region size.
- **Not included:**
  - a flanger;
  - live monitoring of the input;
  - the SD card controller itself;
  - the clock synthesiser.
- **Not verified.** Nothing here has run on hardware. All verification is in
  simulation, against the behavioural card and codec models.
