# Programmable error-trapping decoder for runlength limited error control codes

A binary link that carries timing in its data needs a bound on the number of
equal consecutive bits (the runlength). An ordinary linear error control code
gives none: it contains the all-zero word and often the all-one word. A
*runlength limited error control code* (RLECC) keeps the parent cyclic code
but adds one fixed **modification vector** to every code word before
transmission. The result is a coset of the code. Its distance properties, and
so its error-control power, are those of the parent code. A well-chosen
vector bounds the runlength without adding any redundancy. For the BCH(15,5)
code, the vector `100010101001001` limits the runlength to 10 bits across word
boundaries.

This repository holds the digital part of such a link in SystemVerilog:

* `petld`, a programmable error-trapping line decoder. It can be set up by
  pins for any cyclic code with n ≤ 31, k ≤ 31 and q = n − k ≤ 15 check bits.
  This is the core of the design.
* `rlecc_decoder_board`: the decoder plus the parallel-in serial-out register
  that replays the modification vector from 15 switches.
* `rlecc_test_system`, the top level: a BCH(15,5) test link. Besides the
  decoder board, it holds the transmit-side logic around an external encoder
  chip. That logic is the encoder's vector register and `cwfmt`, which puts
  the encoder's check bits back in cyclic order. The top also has the
  calibration switch that bypasses encoder and decoder.

The decoder works in real time. It outputs one message per received code
word, and every word takes the same number of clock cycles however its errors
fall.

## Data path

```
 transmit side (encoder chip and channel are external)
 enc_modv_sw ─► modv_piso ─► enc_modv ─► [encoder chip] ─► enc_cw ─► cwfmt ─► mux ─► line_tx ─► [channel]
 (wired with check-bit    ▲ eframe                                    ▲ eload  ▲ src_data, calib
  positions reversed)

 receive side (rlecc_decoder_board, fed from line_rx; calib: a flip-flop replaces it)
 dec_in ──► lndeco ──► pipeli (input buffer) ──► errtrp ──► pipeli (output buffer) ──► dec_out
 (ECLC)   XOR with     collect on clk1,          syndrome,   collect on clk2,             (DATAOUT)
            MODV       replay twice on clk2      correction  shift out k bits on clk3
              ▲                                     │
 modv_sw ► modv_piso                                └──► nerrdet
              ▲               ctrlsg: eting / netrst for each frame of 2n clk2 cycles
 dframe ──────┴──────────────► (nreset)
```

| Module | Role |
|---|---|
| `lndeco` | Latches the line bit and the vector bit on clk1 and XORs them. This gives back the unmodified code word. |
| `pipeli` | Double buffer. A serial-in register on one clock feeds a 31-stage register on another clock, through a parallel load. A 32-to-1 multiplexer picks the word length; length 0 bypasses the buffer. Used twice. |
| `errtrp` | Error-trapping decoder. Contains `synreg` (15-stage syndrome register with AND-gated feedback taps), `weight` (count of ones, a tree of eleven full adders) and `cmp4le` (weight ≤ t, eleven gates like the device's comparator). |
| `ctrlsg` | Frame control. A 5-bit counter compared with n, and a toggle flip-flop. It produces the gate signal `eting` and the reset-load pulse `netrst`. |
| `modv_piso` | Switch-loaded circular shift register that supplies the modification vector. Used on both sides of the link. |
| `cwfmt` | Transmit side. A SIPO/PISO pair that reverses the order of the first Q bits of every word. |
| `csgen` | Control signal generator. A counter scans 64 stored bytes; five flip-flops latch the clock and frame patterns of one BCH(15,5) frame. |
| `rlecc_test_system` | Top level. Vector register with reversed switch wiring, `cwfmt`, the decoder board, and the calibration multiplexers with their bypass flip-flop. |
| `petld_pkg` | Size constants: N_MAX = 31, K_MAX = 31, Q_MAX = 15, pin widths. |

## Code word format and configuration

The data are serial, most significant bit first. A code word is
r(X) = u(X) + X^k·b(X): the q check bits come first, then the k message bits.
The check bits are b(X) = X^q·u(X) mod g(X). After the vector is removed, the
words must be in this cyclic form.

The decoder is set up by four static pin groups:

| Pins | Meaning | BCH(15,5), t = 3 |
|---|---|---|
| `w` (W4..W0) | code word length n | `01111` |
| `m` (M4..M0) | message length k | `00101` |
| `t` (T3..T0) | errors to correct | `0011` |
| `j` (J14..J0) | generator polynomial, shifted | `010011011100000` |

To form `j`, write g(X) in binary and drop the leading 1. Then append 15 − q
zeros, so that J(15−q+i) = g_i. For g = X^10+X^8+X^5+X^4+X^2+X+1 this gives
`10100110111` → `0100110111` → `010011011100000`. The zeros switch off the
feedback taps of the syndrome stages the code does not use. Those stages
therefore stay at zero and do not disturb the weight count.

## Error trapping in 2n steps

Error trapping corrects an error pattern of weight ≤ t when all its errors lie
within q cyclically consecutive positions of the word. For those patterns, the
syndrome of a suitable cyclic shift of the word *is* the error pattern. Random
errors beyond that are not corrected. For BCH(15,5) this leaves 5 of the 455
triple-error patterns uncorrected: the three errors spaced five bits apart.
All single and double errors are corrected.

`errtrp` sees each word twice, one bit per falling clk2 edge. The input buffer
circulates the word to make this possible.

1. **First pass (`eting` high, n cycles).** Gates G1 and G2 are open. The word
   is divided into the syndrome register with feedback `din ^ s[14]`. This
   leaves the syndrome of the word cyclically shifted by q.
2. **Second pass (`eting` low, n cycles).** G1 closes, and the word passes to
   `datout` a second time.
   * While the syndrome weight is above t (`aleqb` low), G2 stays open. Each
     shift then turns the register into the syndrome of the next cyclic shift,
     and the bits go out unchanged.
   * Once the weight is ≤ t, the errors are trapped. G2 closes and G3 opens.
     The register now shifts out without feedback, and its top stage is XORed
     onto each passing bit.

   Shifting without feedback can only lower the weight. So `aleqb` stays high
   for the rest of the pass, and no state flip-flop is needed. The gate logic
   is `G2 = eting | ~aleqb` and `G3 = ~eting & aleqb`.

Three cases follow:

* **Errors only in the check bits.** The weight is ≤ t straight after the
  first pass, and correction starts at bit 0.
* **Errors elsewhere.** Trapping happens during the second pass, once the bad
  bits reach the register's window. The bits already passed were correct.
* **End-around patterns** (errors in both the last and the first bits of the
  word). These trap late. Only the message bits are corrected; the check bits
  have already passed, but they are discarded anyway.

The last cycle of the second pass is also the `netrst` cycle. Its bit is still
corrected, and the register clears at the closing edge. A full decode is
therefore exactly 2n clk2 cycles.

### NERRDET

`nerrdet` is `aleqb` registered on clk2. It carries two answers,
time-multiplexed:

* **One clk2 period after the first pass:** high means no error touched the
  message bits. Either there were no errors, or ≤ t errors all in the check
  bits.
* **At the start of the next frame (after 2n cycles):** high means the errors
  were trapped and corrected. Low means they could not be.

## Clocks, frames and latency

All logic acts on falling edges. The three clocks are:

* `wclk` (clk1): code word bit rate.
* `dclk` (clk2): exactly 2 × `wclk`.
* `mclk` (clk3): k/n × `wclk`.

At the start of every frame (the frame is one code word time, 2n clk2 periods),
a falling edge of all three clocks must coincide.

`dframe` (the decoder's NRESET) must be low at the falling clk2 edge that
starts the first frame. That edge is "instant 0". After it, `ctrlsg` produces
the following pattern for every frame:

* `eting` is high for n clk2 cycles, then low for n.
* `netrst` is low during the last cycle. This cycle clears the syndrome
  register and parallel-loads both buffers.

`dframe` may be one pulse, or a frame pulse (low for one clk2 period every
2n). It is only ANDed with the internal signals, so a frame pulse also pulls a
disturbed decoder back into step.

| Word w | Frame (counted from instant 0) |
|---|---|
| bits latched from `dec_in` | w |
| decoded; `nerrdet` "no error in message" one clk2 period after mid-frame | w + 1 |
| `nerrdet` "corrected" at the frame start; message on `dec_out` (k bits, MSB first, one per clk3 period) | w + 2 |

The latency is two frames for data and one for the flag. The throughput is
one message per code word.

## The modification vector register

`modv_piso` is clocked by `wclk` and loaded by `dframe`. The first vector bit
must be latched by `lndeco` at the same edge as the first code word bit. To
achieve this:

* While load is low, the output shows the switch for the first bit.
* The load edge stores the vector rotated by one place.

The register is always connected circularly. A single reset pulse is then
enough when the vector length equals n (15 for BCH(15,5)). With a frame pulse,
the vector is reloaded for every word. The switches hold the vector in line
order, with the first bit in `modv_sw[14]`.

## The transmit side and the calibration switch

The encoder chip this decoder was paired with emits its code words with the q
check bits in reverse order. It also adds the modification vector *before*
that reordering. The transmit side of `rlecc_test_system` makes both facts
invisible:

* `cwfmt` collects each word on `wclk`. At the `eload` pulse, which is low at
  the edge of the word's last bit, it reloads the word with its first Q bits
  reversed. It then shifts the word out. The latency is one word.
* The encoder's vector switches reach its vector register with the same Q
  positions reversed. The vector therefore ends up in line order after
  `cwfmt`, and both sets of switches take the same setting.

The encoder side is fixed to BCH(15,5) (parameters N = 15 and Q = 10), as
on the original board. The decoder side stays programmable.

With `calib` high, encoder and decoder are bypassed:

* `src_data` goes straight to `line_tx`.
* A flip-flop latches `line_rx` on the falling `wclk` edge and drives
  `sink_data`.

An external error detector on `sink_data` then measures the channel's own
error rate. With `calib` low, `sink_data` is `dec_out`, so the detector
measures the residual error rate after decoding.

## The control signal generator

The board makes its clocks by playing back patterns, not by dividing a
clock. `csgen` has a 6-bit counter on the falling edge of a master clock
`xclk`. The counter addresses a 64-byte pattern memory, and five flip-flops
latch its outputs on the rising edge. One scan of the 64 addresses is one
code word frame:

| Data bit | Output | Falling edges per scan |
|---|---|---|
| 4 | `dclk` | 30 (2n) |
| 5 | `wclk` | 15 (n) |
| 3 | `mclk` | 5 (k) |
| 6 | `dframe` | 1 |
| 7 | `eframe` | 1 (three addresses long) |

Four times per scan the pattern holds for one extra address, so the 60
half-periods of `dclk` take 64 master clock periods. The encoder needs a
single reset pulse rather than a periodic one. A flip-flop with its input
tied high, clocked by `eframe` and cleared by the encoder reset button
(`enc_nrst`), gives `ereset`. It stays low from the press until the first
`eframe` rising edge after the release.

The bytes are the original board's. Which data bit drives which output is
this design's reading of them: the edge counts in the table match the
required clock ratios (f_dclk = 2 f_wclk, f_mclk = f_wclk / 3). In
`rlecc_test_system` the generator's outputs come out as `csg_*` ports and do
not clock the link. The testbench sets the link's phases itself.

The stored phases do not fit this decoder's own timing. In the patterns,
`mclk` never falls together with `wclk`: each falling edge of `mclk` comes
two master clock periods after one of `wclk`. This decoder instead expects
all three clocks to fall together at each frame start (see "Clocks, frames
and latency"). The original device evidently had different phase rules, and
its bit-level timing was not available. Driving the decoder from `csgen`
would need the output buffer's `clk3` timing adapted first.

## Simulating

Every testbench is self-checking and ends with a
`TB_RESULT checks=… failures=…` line. Build and run one with plain verilator
from the repository root:

```
verilator --binary --timing -Irtl -Itb rtl/petld_pkg.sv tb/rlecc_tb_pkg.sv \
    tb/tb_rlecc_test_system.sv --top-module tb_rlecc_test_system
obj_dir/Vtb_rlecc_test_system
```

Replace the testbench name to run another one. `tb/rlecc_tb_pkg.sv` holds the
reference model: a polynomial encoder, J-pin derivation, popcount, and the
test for whether an error pattern is confined to q cyclically consecutive
bits.

## Verification

| Testbench | What it checks | Checks |
|---|---|---|
| `tb_rlecc_test_system` | Whole link at its default parameters. It models the encoder chip (reversed check bits) and the channel. The line must carry the modified words in cyclic order. Every 1-, 2- and 3-error pattern is sent, with both single-pulse and frame-pulse decoder framing. Also covers calibration mode, and measurement mode again after switching back. The control signal generator runs alongside; every generated frame is checked. | 27635 |
| `tb_rlecc_decoder_board` | Decoder board at its default parameters. First, a reference-encoder check against worked examples, the J word of BCH(15,5), and the runlength bound of 10 for the modified BCH(15,5) code. Then three sessions: BCH(15,5) with a single reset pulse and every 1-, 2- and 3-error pattern (450 of 455 triples corrected, as expected); Hamming(7,4) and BCH(31,16) with a frame pulse. Checks every message bit and both NERRDET samples. | 5590 |
| `tb_petld` | The decoder driven pin by pin. Runs BCH(15,5), Hamming(7,4) and BCH(31,16). Then the two register tests of the device's test program: (a) all J pins low with alternating bits, with n = k = 31 and with n = 20, k = 9; (b) t = 15 with M = n, where the syndrome of every received word must appear on its check bits. | 2903 |
| `tb_errtrp` | Two-pass decoding of single, double and triple errors against the reference model. | 5100 |
| `tb_synreg`, `tb_pipeli`, `tb_ctrlsg`, `tb_lndeco`, `tb_modv_piso` | Each block's cycle behaviour against an independent model. | 421 to 2405 |
| `tb_cwfmt` | Check-bit reordering at N = 15, Q = 10 and at N = 7, Q = 3, with words back to back. | 860 |
| `tb_weight`, `tb_cmp4le` | Exhaustive. | 32768 / 256 |
| `tb_csgen` | Per 64-period frame: 30 `dclk`, 15 `wclk` and 5 `mclk` periods, one frame pulse of each kind, and the clock ratios edge by edge. Also checks the encoder reset button and `ereset`. | 830 |

The end-to-end tests count how often each mechanism occurs, and count a
failure for any that never does. In one run of `tb_rlecc_test_system` these
were:

* 585 words with reordered check bits;
* 186 patterns trapped right after the first pass;
* 416 trapped during the second pass;
* 171 end-around patterns;
* 5 untrappable patterns;
* 579 words with a single reset pulse and 52 with a frame pulse;
* 300 calibration bits, 14 of them hit by channel errors;
* two mode switches;
* 519 generated control signal frames.

Each testbench was also run against a copy of its module with one deliberate
bug, and each reported failures.

## Where this design goes beyond, or departs from, the original device

* Block split, pin names, the J-pin rule, the gate arrangement of the
  error-trapping decoder and the buffer structure (input bit loaded straight
  into the second register, length 0 = bypass) follow the original decoder.
  So do the clock ratios, instant 0, the frame-pulse option and the two-frame
  output latency.
* The cycle-level timing is this design's own, and so are these choices:
  * the frame counter restarts at 1, so each half frame is exactly n cycles;
  * the syndrome register clears synchronously;
  * the `netrst` cycle doubles as the last correction step;
  * the output buffer's serial input is tied low;
  * the vector register loads rotated by one.

  The original bit-level timing diagram was not available to follow. The
  board's stored clock patterns (see `csgen`) show that the device's phase
  rules differ: its `mclk` does not fall together with `wclk`. A user
  of a real device should check the phase of `nerrdet` and `dec_out`
  against the testbench rather than assume the device's exact edges.
* `weight` is the device's tree of eleven full adders. Which signal goes to
  which adder input is this design's own choice. `cmp4le` has the device's
  pin names and eleven gates, but the function of each gate is this
  design's reading: a plain magnitude comparator on the inverted t bits.
* The decoder's configuration pins are ports of the top. The original board
  hard-wired them for BCH(15,5).
* Only the function of the check-bit reordering circuit is known. Two parts
  of it are this design's reading:
  * the reversed check bits are taken to still lead the word;
  * its load pulse is a separate input, `eload`.

  The switch wiring that hides the reordering is likewise reconstructed from
  its purpose.
* **Not included:**
  * the encoder chip, which was designed separately;
  * the board logic that makes the `eload` pulse of the reordering
    circuit, which is not described;
  * the analog noise and comparator circuit of the channel;
  * the PRBS test equipment;
  * the pad ring.

  These connect through ports of the top. The testbenches generate clocks,
  frames, encoder output and channel errors themselves.
* The decoder handles random-error-correcting codes only. The threshold
  decision is "weight ≤ t", which is not a burst-error decision. Error
  patterns not confined to q consecutive bits go through uncorrected, and
  `nerrdet` flags them.
