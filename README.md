# FPGzAm: a hardware song identifier

FPGzAm learns a few short songs, then tells which of them a short clip came
from. It is a hardware take on audio fingerprinting: each song is reduced to a
sequence of spectral peaks, and a clip is identified by sliding its own peak
sequence along the stored ones and counting disagreements. Noise or talking
over the clip moves a few peaks. Most peaks stay where they were, so a clip
with some noise still lands under the match threshold.

The design learns up to three songs of about 2 s and identifies clips of about
250 ms. It reports the bank (1, 2 or 3) of the matching song, or 0 for no
match. Everything runs on one 27 MHz clock. The audio sample rate is 47.87 kHz
(27 MHz / 564). The 1024-point FFT is an external core, and this RTL connects
to it through ports.

## Fingerprints

* **Frame.** The FFT transforms 1024 audio samples. Frames overlap by 50%: the
  sample address runs 0..1023, then 512..1535, then 1024..2047, and so on.
  Each output point's power is `re² + im²`.
* **Slice.** Only the positive-frequency bins 0..499 are used. They are split
  into five ranges of 100 bins: 0–99, 100–199, 200–299, 300–399 and 400–499.
  The loudest bin of each range is kept as a 9-bit bin number. The five
  numbers form a 45-bit slice, with range 0 in bits 8:0. The bin numbers are
  absolute, so range 3's number is between 300 and 399.
* **Fingerprint.** A song is 170 consecutive slices, and a clip is 22.
* **Delta.** To compare a clip with a 22-slice window of a song, count every
  bin number that differs. The count runs from 0 to 110. A window with
  delta < 50 is a match.

The song memory is 512 × 45 bits. It holds three fingerprints, which start at
addresses 0, 170 and 340. The clip memory is 32 × 45 bits, of which 22 entries
are used.

## Data path

```
            +-----------+   +-----------+      +--------------------- input_cascade ---------------------+
audio ROM ->| (FFT core |-->| intensity |----->| fft_output --WE/addr--> addr_mux --> frame_buffer (512x10) |
  ^         |  external)|   | re²+im²   | bits |     |RDY                    ^ raddr        | 5 x 10 bits  |
  |         +-----------+   +-----------+ 24:6 |     +----> peak_detector ---+   <-----------+             |
overlap_addr      ^ ce                          +----------------------------|--------------- slice, ready -+
  ^               |                                                          v
clk_en_48k -------+                     zam_fsm --we/addr--> addr_mux --> bram 512x45 (songs) --+
                                           ^  |                           bram  32x45 (clip)  --+--> searcher --> result
buttons -> debounce -> sync_gen -----------+  +------------------- search enable / done --------------+
```

### From FFT stream to slice (`input_cascade`)

The FFT presents one output point per sample period, in natural order (bins
0..1023). `fft_output` is a three-state machine:

* **IDLE (00)** waits until the bin index is 0.
* **ACTIVE (01)** writes each positive-frequency point into the frame buffer.
  It stores the top 10 bits of the 19-bit power, and the write strobe lasts
  one clock per sample period.
* **SYNC (10)** waits for the sample strobe to drop before the next write.

When the index's top bit rises (the negative-frequency half begins), the
machine raises `rdy`. `rdy` stays high until the first write of the next
frame, which is about 512 sample periods, or 289 000 clocks.

The frame buffer is what makes the peak search fast. One read address `a` (at
most 99) returns five words at once: `a`, `a+100`, `a+200`, `a+300` and
`a+400`. Addresses from 100 up read as zero. `peak_detector` therefore sweeps
`a` from 0 to 99 and tracks a running maximum for all five ranges in parallel.
The read is registered, so each comparison runs one clock behind its address.
A bin replaces the maximum only if it is strictly louder, so in a tie the
lower bin wins. A range that is entirely zero reports bin 0.

`ready` rises 102 clocks after `rdy`, which is 103 clocks after the first
negative-frequency point. The slice then holds until the next frame starts
writing. While the detector is disabled, all of its outputs are zero.

The frame buffer has a single address port. Writes from `fft_output` and
reads from the detector share it through `addr_mux`, and a write always takes
the port. The two never overlap, because the detector only runs while `rdy`
is high, and nothing is written during that time.

### Audio side

* `clk_en_48k` produces the sample strobe.
* `overlap_addr` steps the sample address. After every 1024th sample it goes
  back 511 addresses instead of forward one.
* A learn or zam button pulse resets the sample address to 0 at the next
  sample strobe. The recording then starts from the beginning of the stored
  audio.
* The FFT's synchronous clear is driven from the design's reset.

## Control: `zam_fsm`

The controller has four main states and a four-state write loop. The write
loop is shared by song learning and clip recording.

| state | does |
|---|---|
| IDLE | waits for a learn pulse (goes to LEARN) or a zam pulse (goes to ZAM) |
| LEARN | sets the write address to `(idx-1)*170` and raises `mode`. The return state is IDLE. `idx = 0` aborts |
| ZAM | sets the write address to 0 with `mode` low, so the clip memory is written. The return state is SEARCH |
| FRM_WAIT1 | waits for slice `ready` |
| FRM_STORE | writes the slice into the song memory (`mode` = 1) or the clip memory (`mode` = 0) |
| FRM_WAIT2 | goes to the saved return state if this was the last slice. Otherwise it waits for `ready` to fall |
| FRM_NEXT | increments the address, then goes back to FRM_WAIT1 |
| SEARCH | holds the searcher enabled until it reports done |

One slice is stored per FFT frame. The write happens while `ready` is still
high, so the slice is stable when it is written. Learning a song takes 170
frames, which is about 3.6 s of real time at 47.87 kHz. Recording a clip takes
22 frames.

## Search: `searcher`

The searcher scores every window start from 0 to 488 (3 × 170 − 22). For each
window it makes 22 reads from both memories. The bin comparisons are
accumulated one clock behind the reads, because the memories have one clock of
read latency.

* **Timing.** Each window takes 24 clocks: 22 reads, one clock to drain the
  pipeline and one to score. A full search is 11 736 clocks, about 0.43 ms.
* **Result.** A window with delta < 50 sets `result` to the bank that holds
  the window's last slice. Scanning continues after a match, so a later
  matching window replaces the result.
* **Done.** When the scan ends, `done` rises. The controller then returns to
  IDLE and drops the enable, which clears `done`. `result` stays until the
  next search begins.

A window that straddles two songs is scored like any other. It is credited to
the later bank.

**What the score can and cannot separate.** A range with no energy reports
bin 0. Two sounds that are both quiet in most ranges therefore agree on those
ranges. Two different pure tones differ in only one or two of the five ranges,
which gives a delta of 22 or 44. Both are below the threshold, so single tones
are not told apart. Music fills all five ranges. In the source's software
experiments with recorded songs, matching clips scored 0 to 30 and a different
song scored about 90.

## Top level: `fpgzam`

The audio store and the FFT core are outside the top:

* `audio_addr` goes out to the audio store, and `audio_sample` comes back.
* The sample is passed on as `fft_xn_re`, along with `fft_ce`, `fft_start`
  and `fft_sclr`.
* The FFT's `fft_xk_re`, `fft_xk_im` and `fft_xk_index` come back in.

The FFT is expected to be a 1024-point streaming transform with an unscaled
19-bit output in natural order, advancing one point per `fft_ce`.

The buttons (`btn_learn`, `btn_zam`) go through `debounce` (10 ms) and then
`sync_gen` (one-clock pulse). `idx` chooses the bank for learning. `result`,
`learn_mode`, `searching` and `search_done` are the status outputs. On the
original board, `result` was shown inverted on two active-low LEDs.

| parameter | default | meaning |
|---|---|---|
| `DEBOUNCE_CYCLES` | 270000 | button settle time in clocks |
| `CLK_DIVIDE` | 564 | clocks per audio sample |
| `AMP_LSB` | 6 | lowest intensity bit passed to the input cascade. Bits `AMP_LSB+18..AMP_LSB` are used |

`AMP_LSB` sets the loudness range. The frame buffer keeps power bits
`AMP_LSB+18..AMP_LSB+9`, which are bits 24:15 at the default. A bin whose power
reaches 2^25 (an FFT magnitude of about 5800) therefore wraps around and can
lose its peak. With the unscaled 19-bit FFT of 8-bit audio, a pure tone keeps
below this up to an amplitude of about 11 of 127. Louder material needs a
larger `AMP_LSB`.

The fixed sizes are in `rtl/fpgzam_pkg.sv`: 170- and 22-slice fingerprints,
three banks, five ranges of 100 bins, threshold 50, and the memory sizes.

## Where this RTL departs from its source description, or fills gaps

* **Number of banks.** The design is built for **three** song banks. The
  source describes the memory as holding two songs in one place. But it also
  says the fingerprint length was cut to 170 to make room for three, its
  final test uses banks 2 and 3, and its controller and searcher use bank
  addresses 0, 170 and 340 with a last address of 509.
* **Match rule.** A match is delta **below** the threshold of 50.
* **Clip memory size.** The clip memory is 32 × 45 bits. One passage gives
  22 × 45, but the block diagram has 32 × 45, and only 22 entries are
  written.
* **Frame-capture handshake.** `rdy` stays high through IDLE until the next
  frame's first write. One description of IDLE has it held low there, but
  the peak detector needs it high.
* **Peak-detector pipeline.** Every one of the 100 offsets in each range is
  compared, including bin 0, and bin numbers are exact. The one-clock read
  latency is handled explicitly.
* **Searcher pipeline.** All 22 slices of every window count, and the
  pipeline is drained before a window is scored.
* **End of a search.** The searcher clears `done` when its enable drops, and
  the controller returns to IDLE. This lets a second search start cleanly,
  and the result is kept for display.
* **One clock domain.** The 48 kHz rate is a clock enable on the 27 MHz clock
  rather than a derived clock. A button's restart request is held until the
  next sample strobe so that it is not lost.
* **Reset.** Resets are synchronous and active high.
* **Widths and ratios taken from the board's code.** These come from the
  board-level code that accompanies the description, not from its prose:
  intensity bits 24:6 as the cascade input, the 564 clock divide and the
  270 000-clock debounce.
* **Not included.** Playback of the matched song through the board's AC97
  codec, the board's LED and display wiring, and the test-tone generators.

## Simulating

Each module is in `rtl/<module>.sv`, with the shared package in
`rtl/fpgzam_pkg.sv`. Each testbench is `tb/tb_<module>.sv` (the memory's is
`tb/tb_bram.sv`). They are self-checking and print
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl rtl/fpgzam_pkg.sv tb/tb_fpgzam.sv \
          --top-module tb_fpgzam -Mdir obj_fpgzam -o sim && obj_fpgzam/sim
```

* **`tb_fpgzam`** is the end-to-end test. It runs at a 4-clock sample period
  and an 8-clock debounce, and takes 2 s. The testbench stands in for the
  FFT: each song is a sequence of synthetic spectra with one strong bin per
  range, chosen by a hash of (song, frame, range), over weak random noise.
  * It learns three songs into banks 1–3 and checks every stored slice.
  * It checks that `idx = 0` is ignored.
  * It zams a clean clip of song 2 (result 2), a clip of song 3 with 8 of
    its 110 bins moved (result 3), and an unknown song (result 0).
  * It counts each mechanism and fails if one never happened.
* **`tb_fpgzam_full`** runs the default parameters (564-clock samples, 10 ms
  debounce). It learns one song into bank 2 and identifies a clip of it. This
  is about 112 M clocks, or roughly 70 s.
* **`tb_tone`** runs the whole design with real spectra. A behavioural
  1024-point DFT streams with one frame of latency, and the sources are test
  tones. It compares every slice with a slice worked out independently in the
  testbench. It checks that 750 Hz, 2 kHz and 7 kHz land in bins 16, 43 and
  150, using bin = f × 1024 / 47 872 Hz. It also predicts the search result by
  scoring every window itself. The clip of the 2 kHz tone matches the stored
  750 Hz tone as well as its own song, and the later bank wins.
* **`tb_searcher`** checks exact copies of windows in each bank (for example
  song slices 18..39 as the clip gives result 1). It also checks 49 versus 50 differing bins, a
  window straddling two banks, and the search time: `done` comes 11 737 clocks after `enable`, which is
  11 736 clocks of scanning plus the start clock.

## What has been verified

* Every block has a testbench that compares it against values computed
  independently in the testbench, including cycle counts where the timing is
  defined (102-clock peak detection, 24-clock search windows, 564-clock
  sample period).
* Each testbench was also run against a deliberately broken copy of its
  block, and every one of them caught the break.
* All files lint cleanly with Verilator `-Wall`. The only warnings are
  intentionally unused bits and package constants.
* **Not verified:** operation with the vendor FFT core and with recorded
  music. The DFT stand-in checks the arithmetic path with real spectra. The
  synthetic songs exercise the control and the search. Neither shows how robust
  the fingerprint is to real noise.
