# Guitar Hero with a real guitar: FFT note recognition and a rhythm game on two FPGAs

This is a rhythm game you play with a real electric guitar instead of a
button controller. The player plugs their guitar into one FPGA board (the **audio
board**). The board:

- samples the pickup signal;
- takes a 4096-point FFT of it;
- correlates the magnitude spectrum against reference spectra for 40 notes
  and 8 chords;
- decides which notes are sounding.

It sends that active-note vector over two slow wires to a second board (the
**game board**). The game board:

- compares rising notes against the song being played;
- scores each one by how close in time it was played;
- draws scrolling guitar tablature over a run-length-coded background on a
  1024×768 VGA display.

All of this is SystemVerilog (IEEE 1800-2017). It compiles with Verilator 5
and Yosys with the slang front end. Every module has a self-checking
testbench.

```
 guitar ─► XADC ─► oversampler ─► bram_to_fft ─► [FFT core] ─► fft_magnitude ─┬─► spectrum_bram ─► histogram_video (VGA)
          1 MSPS   256× sum        4096 frame                 |X| per bin    │                 └► sd_saver ─► [SD controller]
                                                                              └─► 48 × correlator ─► process_division
                                                                                                  │  (dot / |ref|², one divider)
           104 MHz ─────────────────────────────────────────────────────────────────────────────────┤ 48 × async_fifo
            65 MHz   48 × process_correlation (moving average, hysteresis, calibration, bar graph) ◄┘
           100 MHz   note_serializer ──── data, sync ────►  game board
                                                            note_deserializer ─► scoring_unit ─► score, match events
                                                            game_control (song time, pause, over)     │
                                                            ai_player (test mode)                     ▼
                                                            background_rle + 6 × string_renderer + sprite_rom ─► layer_mixer (VGA)
                                                            hex_display (score on the seven-segment digits)
```

Parts in brackets are not in this RTL; their signals are ports of the top
(see "What is outside the RTL").

## Clocks

| Clock | Used by |
|---|---|
| 104 MHz | Sampling, FFT streaming, magnitude, correlation and division (audio board) |
| 65 MHz | 1024×768 at 60 Hz video on both boards; the per-note filters run here as well |
| 100 MHz | The serial link and all game logic |
| 25 MHz | `sd_saver` and the SD card |

Data crosses clocks at these points:

- **Correlations, 104 → 65 MHz:** dual-clock FIFOs (`async_fifo`, Gray-coded
  pointers).
- **Active notes, 65 → 100 MHz:** two-flop synchronisers. The vector changes
  at most once per FFT frame, and the serializer latches it only at the start
  of a packet.
- **Song time and match events, 100 → 65 MHz:** FIFOs.
- **Pause flag:** two-flop synchroniser.

The clocks are ports of `guitar_hero_top`. The PLL that makes them is not part
of the RTL.

## The audio board

### Sampling (`oversampler`)

The 12-bit XADC runs at about 1 MSPS (one conversion every 104 cycles at
104 MHz). `oversampler` adds 256 conversions and keeps the top 16 bits of
the 20-bit sum. This gives a 16-bit sample at 104 MHz / 104 / 256 =
3906.25 Hz, so the FFT sees frequencies up to about 1.95 kHz.

`audio_board` inverts the MSB of the sample. This turns the offset-binary
value (the pickup is biased to mid-scale) into the two's complement that the
FFT expects.

### Sliding FFT frames (`bram_to_fft`)

The FFT core has no sliding-window mode. To get a new spectrum for every new
sample, the whole 4096-sample frame is sent again each time:

- `bram_to_fft` keeps a circular buffer of 4096 samples. Each new sample
  overwrites the oldest one at HEAD.
- Each new sample starts an AXI-Stream transfer of all 4096 words, oldest
  first, with TLAST on the 4096th beat.
- At 26,624 cycles between samples, one transfer (4096 beats) fits about six
  times over.
- If the FFT core reports `event_tlast_missing` (its frame count and ours
  disagree), the transfer is abandoned and restarted from HEAD. This is how
  the two re-align after a glitch.

### Magnitude and the spectrum display (`fft_magnitude`, `spectrum_bram`, `histogram_video`)

`fft_magnitude` computes floor(√(re² + im²)) for every output beat:

- two squaring multipliers, then an adder;
- then a 16-stage integer square root, one result bit per stage.

The latency is 18 cycles, and the bin index (TUSER) and TLAST travel
alongside the data.

`spectrum_bram` keeps the latest magnitude of bins 0..1023 (below about
1 kHz). It is written only when TUSER < 1024. It has a read port for the
video and one for the SD saver.

`histogram_video` draws that spectrum as a bar graph on the audio board's
VGA output:

- one bin per screen column;
- the magnitude is shifted right by 7 bits, so bars are at most 512 pixels
  tall.

### Recording spectra (`sd_saver`)

A button press copies the 1024-bin spectrum into one of 64 slots on an SD
card. The slot is chosen by six switches. Each slot is 2048 bytes (four
512-byte sectors), and each word is stored high byte first.

While the saver is active, it blocks writes into the spectrum memory, so the
saved spectrum is one consistent frame. For each sector, it pulses the
controller's write strobe, then streams 512 bytes, using the controller's
`ready` and `ready_for_next_byte` handshake.

Recorded spectra are how the reference spectra of a real instrument are
made.

### Correlation (`correlator`, `divider`, `process_division`)

This is the core of the recognition. For each channel k (notes E2..G5 and the
chords E, A, D, G, C, F major, E minor and A minor), the correlation index is

```
            Σ_b  |X[b]| · R_k[b]
  c_k  =  ─────────────────────── ,   b = 0..1023
               Σ_b  R_k[b]²
```

where |X| is the current magnitude spectrum and R_k is the reference
spectrum of channel k. The index is 1.0 when the spectrum equals the
reference, and it grows with loudness. It is carried as unsigned Q8.8.

- **Numerator:** each of the 48 `correlator`s holds its reference in a
  1024-word ROM. It forms the dot product as the FFT streams out, one
  multiply-accumulate per beat, in a DSP48-like pipeline. Beats whose bin is
  1024 or above are ignored.
  - The FFT core outputs bins in bit-reversed order, so only one beat in four
    counts.
  - TLAST closes the frame: the sum appears 4 cycles after the TLAST beat,
    and the accumulator restarts.
- **Denominator:** |R_k|² is a constant. It is computed at elaboration time
  by a function in `gh_pkg`.
- **Division:** a single fully pipelined `divider` (restoring division, one
  quotient bit per stage, padded to a 46-cycle latency) is shared by all
  channels. `process_division` feeds it the 48 dot products one per cycle,
  with the channel number as a tag.
  - All 48 correlations are ready 48 + 46 + 1 cycles after the correlators
    finish. That is 99 cycles after the last FFT beat, far inside the 26,624
    cycles per frame.

**The reference spectra are synthetic.** Each note's reference has peaks at
harmonics 1 to 4 of its fundamental, with amplitudes 8000, 4000, 2500 and
1500. Each peak has half-height shoulders in the bins on either side. A chord
is the sum of its root, third and fifth. These formulas are in `gh_pkg`
(`ref_mag`, `ref_energy`).

To use recorded spectra instead, replace `ref_mag` with a table. The
correlator ROMs and the divisor table follow it automatically.

### Deciding which notes are on (`process_correlation`)

Each channel gets one `process_correlation`, which runs at 65 MHz behind its
FIFO:

- **Smoothing:** an exponential moving average with α = 1/32:
  `acc ← acc − acc/32 + c`, output `acc/32`. This smooths the
  frame-to-frame jitter of a sliding FFT that updates about 3,900 times a
  second.
- **Hysteresis:** the note turns on above `th_on` (default 192 = 0.75) and
  off below `th_off` (default 128 = 0.5).
- **Calibration:** while the calibration switch selects a channel, two
  buttons move its upper or lower threshold up or down in steps of 4.
- **Display:** each channel owns a 16-line row of the audio board's second
  VGA view. The row shows:
  - a green bar for the filtered correlation;
  - a red marker at `th_on` and a blue marker at `th_off`.

A switch chooses whether the VGA output shows this view or the spectrum.

### The two-wire link (`note_serializer`, `note_deserializer`)

The boards are joined by about 70 cm of unterminated wire, so the link is
deliberately slow:

- A packet is 64 segments of 8192 cycles at 100 MHz (about 5.2 ms).
- During segment i the data wire carries bit i of the active-note vector,
  latched at the start of the packet. Segments 48..63 carry 0.
- The sync wire is high during the last segment.

The receiver:

- synchronises both wires;
- starts counting at the falling edge of sync;
- samples the data wire in the middle of each segment, away from the edges
  that the cable smears;
- hands over the vector after the 48th segment.

A whole new vector arrives about every 5 ms, which is finer than the game's
10 ms time resolution.

## The game board

### Song time and game state (`game_control`)

Song time is a 16-bit count of 10 ms ticks (1,000,000 cycles at 100 MHz),
which covers 10.9 minutes.

| Event | Effect |
|---|---|
| Reset button | Clears song time and starts playing |
| Pause button | Toggles between PLAYING and PAUSED; time stands still while paused |
| Song time reaches `SONG_END` (1700 ticks, two seconds after the last note) | The game goes to OVER |

### The song (`gh_pkg`, `metadata_controller`)

Notes are 32-bit metadata words:

| Bits | Field |
|---|---|
| 16 | time (ticks) |
| 6 | pitch (0..36 = E2..E5) |
| 3 | string |
| 5 | fret |
| 2 | end flag (`11` marks the last note) |

The built-in song is *Mary Had a Little Lamb*:

- 26 notes on the top two strings;
- one beat = 50 ticks;
- the first note is at 2 s.

The song is computed into a ROM by `gh_pkg::song_note`.

`metadata_controller` serves this table to 37 per-pitch matchers over one
shared 16-bit time bus. Each pitch has its own read pointer. A matcher
raises `req[p]`. The controller polls the requests round-robin, scans
forward to that pitch's next note, puts its time on the bus, and pulses
`avail[p]`.

### Matching and scoring (`pitch_matcher`, `buffer_serializer`, `score_keeper`, `scoring_unit`)

Each of the 37 pitches has a `pitch_matcher` holding two note times:

- the most recent note of that pitch already passed;
- the next one still to come.

When the pitch's bit in the active-note vector rises, the matcher:

1. picks whichever of the two notes is closer to now;
2. if it is within ±1 s, reports a match;
3. removes that note, so it cannot score twice.

`buffer_serializer` merges the 37 match outputs. The highest pitch wins a
cycle in which two pitches match; that practically never happens at 100 MHz.
It then:

- passes |error| to `score_keeper`;
- sends a match event (time, fret) to the renderer of every string on which
  that pitch can be played.

`score_keeper` awards:

| Timing error | Points |
|---|---|
| ≤ 100 ms | 100 |
| ≤ 250 ms | 50 |
| ≤ 500 ms | 25 |
| ≤ 1 s | 10 |

`game_board` passes played notes on only while the game is PLAYING.

For testing without a guitar, a switch selects `ai_player` instead of the
serial link. It pulses every pitch in turn, one per cycle, so every note is
played as early as the window allows.

### Graphics (`xvga`, `background_rle`, `sprite_rom`, `string_renderer`, `layer_mixer`, `hex_display`)

**Timing (`xvga`):** 1024×768 at 60 Hz from a 65 MHz pixel clock. All layers
have a two-cycle pixel latency, and the sync signals are delayed to match.

**Background (`background_rle`):** an uncompressed 1024×768 12-bit image does
not fit in the FPGA's block RAM. It is stored as 8-bit run words instead:

- a 2-bit run length (1..4 pixels);
- a 6-bit index into a 64-colour, 12-bit palette.

The run table has 262,144 words (2 Mbit). The decoder:

- walks the table in raster order, holding each word for its run length;
- pauses during blanking;
- rewinds at vertical blank.

The table and palette are loaded through a write port, and they start out
black.

**Sprites (`sprite_rom`):** 18 sprites of 32×32 pixels, one per fret
(0..17). Each is an orange disc with the fret number in white, and each pixel
is 13 bits {alpha, RGB}. The ROM is computed at elaboration from a 3×5 digit
font in `gh_pkg` and is read for all 18 frets in parallel.

**Strings (`string_renderer`, one per string):** each renderer takes its
string's notes from the song in time order into 5 sprite slots:

- A note enters a slot 448 ticks before its time and leaves 64 ticks after.
- A sprite is drawn at `x = 128 + 2·(note time − song time)`, so it crosses
  the play line at x = 128 exactly on time.
- A match event marks the slot holding that note. Matched sprites are drawn
  with inverted colours.

**Mixing (`layer_mixer`):**

- The background is the bottom layer. String sprites are drawn over it where
  their alpha bit is set.
- While paused, the whole picture is inverted to its photographic negative.

**Score (`hex_display`):** the board's eight seven-segment digits show the
score (upper four) and the song time (lower four) in hexadecimal. The digits
are scanned one at a time.

## Simulating

Any testbench runs with plain Verilator:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb rtl/gh_pkg.sv tb/tb_correlator.sv --top-module tb_correlator
./obj_dir/Vtb_correlator
```

Each testbench checks its block against values it computes itself, counts
checks and failures, and ends with a line
`TB_RESULT checks=<n> failures=<m>`. A watchdog ends any testbench that
hangs and counts it as a failure. Stimulus is randomised with `$urandom`.
Where the design promises a latency, the testbench checks it:

| Block | Latency checked |
|---|---|
| Magnitude | 18 cycles |
| Correlator | 4 cycles after TLAST |
| Divider | 46 cycles |
| Division | 95 cycles |
| Serial packet | 524,288 cycles |
| Frame transfer | 4096 beats |

Two behavioural models in `tb/` stand in for the parts outside the RTL:

- **`xfft_model`:** an AXI-Stream radix-2 FFT on real input.
  - Output is in bit-reversed order with TUSER, scaled by 2/N.
  - It raises `event_tlast_missing` like the real core.
- **`sd_controller_model`:** a byte-level SD card that records what is
  written.

End-to-end tests:

- **`tb_guitar_hero_top`:** the whole two-board system with short timings.
  These are 4× oversampling, 16-cycle link segments, 500-cycle ticks and a
  4096-word background. The guitar is a synthetic E4 (329.6 Hz plus
  harmonics) fed to the XADC inputs.
  - It checks and counts each mechanism:
    - detection of exactly E4;
    - the serial link;
    - the FFT frames, and a forced re-alignment;
    - an SD recording;
    - threshold calibration;
    - the note's release;
    - scoring of the played note;
    - the AI player over the rest of the song;
    - pause;
    - the OVER state;
    - sprite matching;
    - every kind of video pixel;
    - the seven-segment scan.
  - It runs in about 10 s.
- **`tb_guitar_hero_top_full`:** the top at its real parameters. It takes one
  recognition from the ADC to the game board:
  - 256× oversampling and 4096-point frames;
  - the 5.2 ms serial packet;
  - the 10 ms game tick.

  It checks that E4, and only E4, reaches the game board. For speed, the
  testbench converts a sample every clock cycle rather than every 104, so it
  runs for 20 s, not minutes. A whole song at full parameters (17 s of game
  time) is not simulated.

## What is outside the RTL

These parts are ports or models, not RTL:

- the XADC and the analog bias network in front of it;
- the clock PLL;
- the vendor FFT core (an AXI-Stream 4096-point FFT; a model is in `tb/`);
- the SD-card controller (a model is in `tb/`);
- the debug logic analyser;
- the score drawn as text on screen (scores show on the seven-segment
  display only);
- loading songs and song audio from an SD card, and audio playback (the song
  is built in).

## Choices of this design, and where to be careful

- **Reference spectra** are formulas, not recordings. Real recognition needs
  reference spectra of the actual guitar, recorded with `sd_saver`.
- **Thresholds.** The default thresholds (0.75 / 0.5), the calibration step
  (4), the ±1 s match window and the point table are this design's choices.
- **Frame length.** A 4096-sample frame holds about one second of sound, so
  a note stays in the spectrum for about a second after it stops. The moving
  average adds to that. Fast repeated notes of the same pitch are therefore
  hard to detect as separate notes.
- **Link packet.** The serializer latches the vector at the start of each
  packet and holds sync high for the last segment. The receiver samples
  mid-segment.
- **Sprite slots.** With 5 slots per string, a string that has more than 5
  notes within about 5 s shows the later ones only when earlier ones leave.
  In the built-in song, up to 7 notes share such a window on string 1.
- **Song length.** The 16-bit song time limits a song to 10.9 minutes.
- **Simulation-only parameters.** Parameters that only shorten simulation
  (`OVERSAMPLE`, `SEG_CYCLES`, `TICK_CYCLES`, `DIGIT_CYCLES`, `RUN_DEPTH`,
  `FRAME`) default to the real values.

## Files

| File | Contents |
|---|---|
| `rtl/gh_pkg.sv` | Constants, the metadata word, game states, the song, reference spectra, sprite font |
| `rtl/guitar_hero_top.sv` | Both boards joined by the link |
| `rtl/audio_board.sv`, `rtl/game_board.sv` | One board each |
| Other `rtl/` files | One block each, as named above |
| `tb/tb_<block>.sv` | Testbench of each block |
| `tb/xfft_model.sv`, `tb/sd_controller_model.sv` | Behavioural models |
