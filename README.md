# Pipeline and parallel-pipeline convolutional encoders and threshold decoders

A convolutional encoder computes each parity digit as the XOR of a few past
information digits, picked by the code's taps. In the textbook design the
information digits sit in a shift register and one XOR tree combines the taps.
The XOR tree grows with the number of taps, and so does the clock period. A
threshold (majority-logic) decoder has the same problem twice: once in its
local copy of the encoder, and again in the adder that counts failing parity
checks.

This design removes both problems with the same trick:

- **Transpose the shift register.** The register carries *partially computed*
  parity digits instead of past information digits. Each stage ANDs the
  current information digit with its connection bit and XORs the result into
  the partial parity passing through. The critical path is one AND plus one
  XOR, whatever the code length L. Because the connections are register bits,
  the code can be changed without redesigning the circuit.
- **Pipeline the count the same way.** The sum of failing checks travels down
  a *sum-of-syndromes (SOS) pipeline*. This is a W-bit-wide row of stages.
  Each connected stage adds the current syndrome digit to the partial sum
  passing through. The critical path is a W-bit ripple increment, with
  W = ceil(log2(J+1)) for J checks.
- **Widen the pipelines to Y lanes.** Y codewords enter per clock. Each
  lane-to-lane pipeline is about L/Y stages long. The throughput grows with Y
  while the clock stays the same.

Further pieces build on this:

- threshold decoders with *feedback*, where decided noise digits go back
  into the syndromes and into the partial sums already in flight. One
  version is wired for a fixed code; the other is programmable at run time,
  including the network that routes each column's feedback;
- two "chip" configurations: a six-stage cascadable encoder, and a
  programmable L = 40 definite decoder with a 5-bit SOS pipeline.

Everything is generic SystemVerilog and synthesizable. All sequential
elements use one rising-edge clock `clk` and an asynchronous active-low reset
`rst_n`. Reset clears every stage, so a pipeline starts as if all earlier
information digits had been 0.

## The running example

Unless a parameter says otherwise, every default is the systematic rate 1/2
code of memory 6. Each information digit `i_t` is sent together with one
parity digit:

    p_t = i_t ^ i_(t-1) ^ i_(t-4) ^ i_(t-6)        taps {0,1,4,6}, L = 7

The code is self-orthogonal. The four syndromes `s_t`, `s_(t-2)`, `s_(t-5)`
and `s_(t-6)` each check the noise digit on `i_(t-6)`, and no other noise
digit is checked by more than one of them. So J = 4. The decoder declares
`i_(t-6)` wrong when more than 2 of the 4 checks fail, which makes the
threshold 2 and the SOS width W = 3. The decoding delay is L-1 = 6 digits.

Code and connection vectors are always **indexed by lag**: bit d set means
"the term delayed by d clocks is connected". The example code is
`7'b1010011`. The majority connections of its decoder are lags {0,2,5,6},
which is `7'b1100101`.

## The basic cell

`pipe_cell` is the only storage-and-logic element of every pipeline.

- It holds one delay unit `q`.
- It forms `a & b` from its two top inputs.
- Its right output is `q ^ (a & b)`.
- `q` and `a & b` are also passed down to the cell below.

One row of these cells, with `a` = information digit and `b` = connection bit,
is an encoding pipeline. A column of W cells is one stage of the SOS
pipeline:

- the top cell gets the syndrome AND the majority connection;
- each lower cell gets the carry from the cell above;
- together they form a ripple incrementer.

The same cell therefore serves both pipelines unchanged. An equivalent
circuit with an active-low connection input (XNOR/NAND form) is common. This
RTL uses the active-high form throughout.

## Pipeline encoder and SOS pipeline

`encoding_pipeline` has L cells.

- Column c (0 = the end farthest from the output) uses connection bit
  `conn_i[L-1-c]`.
- The partial parity enters at `part_i`, which is 0 for a stand-alone
  encoder. It leaves combinationally from the last XOR as `part_o`.
- Output at clock t: `part_o = XOR_d conn[d] & info[t-d]`, plus `part_i`
  delayed by L.

`part_i` is what makes a pipeline *segmentable*. A long encoder can be cut
into pieces, across chips for example, and only one digit per clock crosses
each cut.

`sos_pipeline` is the W-row version. Column c adds `s_i & conn_i[L-1-c]` to
the sum passing through, so the output at clock t is
`sum_i(t-L) + Σ_e conn[e]·s(t-e)`, modulo 2^W. `threshold_comparator`
compares that sum with a threshold (`sum > thr`). `majority_pipeline` puts
NS SOS pipelines side by side, adds their outputs and compares the total.

## Parallel-pipeline lane mapping

This is the least obvious part of the design. It is implemented in
`pp_encoder` and `pp_threshold_decoder`.

With parallelism Y, clock k delivers the Y digits at times `kY, kY+1, …,
kY+Y-1`. Lane y carries time `kY+y`. Output lane y at block k needs
information digit `kY+y-d` for every tap d. That digit sits in lane
`x = (y-d) mod Y` and is `q = (d - y + x)/Y` blocks old. Inverting that:

> cell q of the pipeline that runs **from input lane x to output lane y**
> covers lag `d = q·Y + y - x`.

So every output lane XORs Y pipelines, one from each input lane. Each
pipeline has `n_cells(L,Y) = floor((L+Y-2)/Y) + 1` cells, about L/Y. Cell q
of that pipeline takes the generator bit for lag `qY+y-x`, or 0 when the lag
lies outside 0..L-1. `tcodec_pkg::lane_lag` and `tcodec_pkg::n_cells` hold
the two formulas.

For the example code with Y = 2, each pipeline has 4 cells. The lags for
cells q = 0..3, and the connection bits they get, are:

| pipeline (x → y) | lags covered | bits, q = 0..3 |
|---|---|---|
| 0 → 0 | 0, 2, 4, 6 | 1 0 1 1 |
| 1 → 0 | -1, 1, 3, 5 | 0 1 0 0 |
| 0 → 1 | 1, 3, 5, 7 | 1 0 0 0 |
| 1 → 1 | 0, 2, 4, 6 | 1 0 1 1 |

Lag 1 for output lane 0 comes from lane 1 of the *previous* block. That is
why the 1 → 0 pipeline starts with a 0 and carries the tap at its second
cell.

The same lane rule also works without pipelining. `parallel_encoder`
keeps one plain shift register of information digits per lane (lane x, q
blocks back) and one XOR tree per output lane. For the example with Y = 2,
lane 0 holds `i(t-2), i(t-4), i(t-6)` and lane 1 holds
`i(t-1), i(t-3), i(t-5)`, which gives:

    p(t)   = i(t) ^ i(t-1) ^ i(t-4) ^ i(t-6)
    p(t+1) = i(t+1) ^ i(t) ^ i(t-3) ^ i(t-5)

Its code is fixed by a parameter, and its XOR trees still grow with the
number of taps. Pipelining each lane-to-lane path, as below, removes both
limits.

For a rate U/V code, `pp_encoder` builds Y·Y·U·P such pipelines, with P
generated streams.

- `gen_i[p][u][d]` connects information stream u, delayed by d, to output p.
- With Y = 1, this is the general U/V pipeline encoder.
- With U = P = 1 and Y = 2, it is the two-codeword encoder of the example.

The decoder applies the same mapping twice.

1. A replica `pp_encoder` re-encodes the received information digits. XORing
   its output with the received parities gives one syndrome digit per
   (lane, parity stream).
2. For each information stream u and output lane y, a `majority_pipeline`
   sums `P·Y` SOS pipelines, one from each syndrome lane x and stream p. It
   uses the lane mapping with the *majority* connections: cell q covers
   syndrome lag `qY+y-x` and takes `maj_i[u][p][lag]`. The totals are added
   and compared with `thr_i[u]`. The result is the noise estimate for the
   digit at time `kY+y-(L-1)`.
3. That received digit is in lane `(y-(L-1)) mod Y`, some whole number of
   blocks back. It is taken from a `shift_delay` of the right length and
   XORed with the estimate.

For the example with Y = 2, the majority connection bits per pipeline are
1 1 0 1, 0 0 0 1, 0 0 1 0 and 1 1 0 1 (for 0→0, 1→0, 0→1, 1→1, cells
q = 0..3). The threshold stays 2. Lane 0 delivers `i_(t-6)` and lane 1
delivers `i_(t-5)`, where t is the time of lane 0.

Two special cases follow from the parameters:

- Rate (V-1)/V (U > 1, P = 1): the U majority pipelines share one syndrome
  stream.
- Rate 1/V (U = 1, P > 1): the P SOS pipelines are added before a single
  comparison.

The general U/V decoder combines both. Each information stream has its own
majority connections on every syndrome stream, and its own threshold.
Choosing codes and connections for U/V > 1/2 is left to the user; see the
testbenches for rate 3/4 and rate 1/3 examples.

A parallel decoder, correctly configured, produces exactly the same digit
sequence as the Y = 1 decoder, just Y digits per clock. The testbenches check
that equivalence directly.

## Feedback decoding and the target-syndrome network

Definite decoding (above) uses the raw syndromes. A *feedback* decoder
removes the effect of each decided noise digit from the syndromes that
checked it. This improves the decisions that still depend on those
syndromes. `feedback_threshold_decoder` implements it for a **fixed**
rate 1/2 self-orthogonal code with Y = 1, in three parts.

1. **`fb_syndrome_register`** keeps the corrected syndromes `s*`.
   - `sstar_o[0]` is the new syndrome; `sstar_o[e]` is `s*` at lag e.
   - Each shift computes `r[e+1] = s*[e] ^ (n̂ & CODE[L-1-e])`.
   - So every stored syndrome that checks the digit just decided is
     corrected. For the example, these are the syndromes arriving at lags
     1, 3 and 6.
2. **`sigma_processor`** is one column of the feedback SOS pipeline. It adds
   `σ ∈ {-1,0,+1,+2}` to the partial sum. Its inputs are:
   - `i`: the syndrome, gated by this column's connection;
   - `j`: the current value of the column's target syndrome;
   - `k`: the noise estimate.

   It computes `σ = i + k·(j ? -1 : +1)`. Flipping a syndrome digit that
   was 1 lowers the count of failing checks by one; flipping a 0 raises it by
   one.
3. **`fb_sos_pipeline`** places a W-bit register before each processor. The
   partial sum of column c (syndrome lag `L-1-c`) already contains the
   syndromes added by the connected columns c2 ≤ c. Each of them is now
   `c-c2` clocks old. One of them also checks the digit being decided if
   code bit `L-1-(c-c2)` is set. For a self-orthogonal code there is at most
   one such syndrome: the column's **target syndrome**.

   `tcodec_pkg::fb_target` finds it at elaboration time, and the column's
   `j` input is wired straight to that lag of the syndrome register. That
   fixed wiring is the "target network". Columns with no target get `k = 0`.
   For the example code, the targets of columns 0..6 come out as:

       s*_t, s*_t, s*_(t-2), s*_(t-2), s*_t, s*_(t-5), none

The decoder connects these parts around a local pipeline encoder. The last
column's sum is compared with `THRESH` to give n̂. n̂ then does two things:

- it corrects the received digit from a `shift_delay` of L-1;
- it feeds back into both the syndrome register and the SOS columns in the
  same clock.

Feedback is applied only to the syndromes. The local encoder keeps using the
received, uncorrected information digits.

The code of the fixed decoder is a parameter (`CODE`, `L`, `W`, `THRESH`),
and the network is rebuilt at elaboration for any self-orthogonal code.
Nothing checks in hardware that the code is self-orthogonal.

### Programmable feedback decoder

`prog_feedback_decoder` is the same decoder with every code-dependent part
turned into an input:

- the local encoder's connections (`code_i`);
- the majority connections (`maj_i`). These also select the syndrome
  register positions that receive the feedback: for a rate 1/2 code, the
  syndromes that check the decided digit are exactly the majority-connected
  ones;
- the threshold (`thr_i`);
- the target network: per column, an enable bit (`tgt_en_i[c]`) and a lag
  select (`tgt_sel_i[c]`, ceil(log2 L) bits). The select drives a
  multiplexer over the whole syndrome register.

To load a code, run `fb_target` (or the same search by hand). A result
T ≥ 0 means `tgt_en = 1` and `tgt_sel = T`. The last column never receives
feedback, so its enable is ignored; this also keeps the decision free of a
combinational loop.

The cost of being programmable is one L-input multiplexer per column, plus
the configuration bits. That is the expense that makes a programmable target
network unattractive next to the fixed wiring. In the top it sits behind a
scan chain of `3L + W + L·ceil(log2 L)` bits. The layout, first bit shifted
in at position 0, is:

- code;
- majority connections;
- threshold;
- target enables;
- target selects, column c at `3L + W + c·ceil(log2 L)`.

Feedback combined with parallelism (Y > 1) is not built.

## The two chip configurations

**`encoder_chip`** (L = 6) is a six-cell encoding pipeline. Its connection
register is loaded in parallel (`load_i`, `conn_i`).

- The information digit is passed through as `info_o`.
- The partial parity goes in at `part_i` and out at `part_o`.
- N chips in a row form a 6N-stage encoder. The chip holding the largest
  lags comes first, and the first chip's `part_i` is 0.
- A parallel-pipeline encoder is built from chips by using one chain per
  lane-to-lane pipeline. Each chain is loaded with that pipeline's bits from
  the lane mapping, and external XORs combine the chains per output lane.

**`decoder_chip`** (L = 40, W = 5) is a complete definite decoder for rate
1/2 codes. It holds a 40-cell encoding pipeline, a 40-column SOS pipeline, a
comparator and a 40-stage information shift register. It is configured
through one scan chain of `2L+W` = 85 bits. The first bit shifted in lands
at position 0:

    [39:0]   code connections, by information lag
    [79:40]  majority connections, by syndrome lag
    [84:80]  threshold

Stand-alone use:

- tie `info_i` and `sr_i` to the received information digit;
- tie `part_i` and `sum_i` to 0;
- tie `syn_i` to `syn_o`.

Cascading (to build codes longer than 40):

- `info_i`, `par_r_i` and `syn_i` are common to all chips;
- `part_o → part_i`, `sum_o → sum_i` and `sr_o → sr_i` run from chip n to
  chip n+1;
- the syndrome is `syn_o` of the *last* chip, fed back to every chip's
  `syn_i`;
- the last chip's `nhat_o` and `dec_o` are the outputs.

The whole chain must have at most 2^5-1 = 31 majority connections, or the
5-bit sum wraps. That rule is not checked in hardware. For example, a code
with J = 30 and L = 841 would need 22 chips; `decoder_chip_chain_tb`
builds such a chain.

## Top level

`fec_codec_top` instantiates everything side by side. Each part has its own
prefixed ports:

| Prefix | Contents |
|---|---|
| `enc_*` | `pp_encoder` behind its own scan register |
| `dec_*` | `pp_threshold_decoder` behind its own scan register |
| `pe_*` | `parallel_encoder`, fixed example code, same Y |
| `fb_*` | the fixed-code feedback decoder |
| `pf_*` | `prog_feedback_decoder` behind its own scan register |
| `ec_*` | the encoder chip |
| `dc_*` | the decoder chip |

The scan layouts, with the first bit shifted in landing at position 0:

- encoder: generator bit `gen[p][u][d]` at position `(p·U+u)·L + d`
  (P·U·L bits);
- decoder: the same generator field, then `maj[u][p][e]` at
  `P·U·L + (u·P+p)·L + e`, then the U thresholds of W bits each, least
  significant bit first.

The channel between encoder and decoder is outside the top. This includes
serializing the Y·V encoded digits of each clock onto a fast line, and the
noise. Most of the logic at the defaults is in the L = 40 decoder chip.

## Timing summary

- All outputs are combinational from the current inputs and the registered
  state. There are no output registers.
- Encoders: the parity of the information digit presented at clock t
  appears at clock t.
- Definite and feedback decoders: `dec_o` at clock t is the decoded digit
  received at clock t-(L-1). The parallel decoder gives time
  `kY+y-(L-1)` on lane y of block k.
- The critical paths, as the gates are written, are:
  - encoders: one AND plus one XOR, plus an XOR tree of U·Y pipeline
    outputs;
  - decoders: a W-bit increment per column, plus the final adder and the
    comparator.

## Files

`rtl/` holds one module or package per file.

| Module | Purpose |
|---|---|
| `tcodec_pkg` | example-code constants; `lane_lag`, `n_cells`, `fb_target` |
| `pipe_cell` | the basic cell |
| `encoding_pipeline`, `sos_pipeline` | single-lane pipelines |
| `threshold_comparator`, `majority_pipeline` | decision logic |
| `shift_delay` | N-stage delay, N = 0 allowed |
| `scan_register` | serially loaded configuration register |
| `parallel_encoder` | parallel encoder without pipelining, fixed code |
| `pp_encoder`, `pp_threshold_decoder` | parallel-pipeline encoder and decoder |
| `sigma_processor`, `fb_syndrome_register`, `fb_sos_pipeline`, `feedback_threshold_decoder` | fixed-code feedback decoder |
| `prog_feedback_decoder` | run-time programmable feedback decoder |
| `encoder_chip`, `decoder_chip` | the two chip configurations |
| `fec_codec_top` | top level |

`tb/` holds one self-checking testbench per module, named `<module>_tb`. The
feedback decoder's testbench also covers its syndrome register and SOS
pipeline. The shared checkers `pp_enc_check`, `pp_dec_check`,
`fb_dec_check` and `pfb_dec_check` are instantiated several times with different parameters.

Every testbench:

- compares the outputs against a separate serial reference model in plain
  procedural code (tap-by-tap XOR sums, direct syndrome counts, a
  conventional feedback decoder);
- ends with a line `TB_RESULT checks=N failures=M`;
- has a cycle-count watchdog.

What they cover:

- the sigma truth table and the target labels of the example;
- parallel encoders and decoders for Y = 1, 2, 3, at rates 1/2, 2/3, 3/4 and
  1/3, against the serial references, including a rate 3/4 decoder with
  Y = 2 that delivers six digits per clock;
- random noise injection: isolated errors must all be corrected, and with
  dense noise the decoded digits must match the reference exactly;
- a feedback decoder for a second, longer code (taps 0,1,4,10,12,17);
- the programmable feedback decoder reloaded with two different codes
  without any change to the hardware, at L = 7 and at L = 18;
- two encoder chips chained into a 12-stage encoder;
- `long_encoder_tb`: a single 2000-cell encoding pipeline with 30
  connections;
- `chip_parallel_encoder_tb`, which builds parallel-pipeline encoders with
  Y = 3 out of encoder chips and external XORs:
  - rate 2/3, L = 16, 18 chips, 6 digits per clock (150 Mbit/s at 25 MHz);
  - rate 3/4, L = 20, 54 chips in chains of two, 9 digits per clock
    (225 Mbit/s at 25 MHz);
- a single decoder chip with an L = 35, J = 8 code, and two chained decoder
  chips (length 80);
- `decoder_chip_chain_tb`, which chains 22 decoder chips (880 stages), enough
  for a code of length 841. The code is generated in the testbench as the
  greedy tap set with all pairwise differences distinct, keeping taps up to
  840: J = 25, largest tap 821, threshold 12. It is run through a noisy
  channel, and every digit must decode correctly;
- `fec_codec_top_tb`, which drives the top at its default parameters
  end to end. It loads each scan chain, encodes, adds noise and decodes
  through every part, and counts that each mechanism (scan loading, parallel
  load, corrections by each decoder, feedback events) happened. The two
  feedback decoders get the same received stream and must agree on every
  digit.

Simulating with Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
      -Irtl -Itb -y rtl -y tb rtl/tcodec_pkg.sv tb/fec_codec_top_tb.sv \
      --top-module fec_codec_top_tb -Mdir obj_top
    obj_top/Vfec_codec_top_tb

Replace `fec_codec_top_tb` with any other testbench name. Each one finishes
in seconds.

## Where this RTL departs from, or goes beyond, the architecture it implements

- **Rate U/V decoder.** The connection scheme (one majority connection set
  per information stream and syndrome stream, one threshold per information
  stream) is this design's generalisation of the rate (V-1)/V and 1/V
  structures.
- **Lane mapping for any Y.** The general formula is derived here. It
  reproduces the Y = 2 example exactly.
- **Pipeline widths.** All SOS pipelines of a parallel decoder use the same
  width W. A parallel pipeline sees only about J/Y taps, so narrower
  pipelines would do, but one width is simpler.
- **Adder and comparator.** The adder of the SOS totals and the comparator
  are plain combinational W-bit logic.
- **Interfaces.** The scan chain order and shift direction, the encoder
  chip's parallel-load interface, the chip chaining ports and the reset are
  this design's choices.
- **Cell polarity.** The cell uses active-high connections, not the
  active-low form of a pseudo-nMOS implementation. The logic function is the
  same.
- **Feedback decoders.** Both are single-lane. The programmable target
  network is a plain multiplexer per column. Their overall connection (local encoder, syndrome register, feedback SOS
  pipeline, delay, correction) is this design's assembly of the parts.
- **Not modelled.** Clock-rate figures (25 MHz encoder, 20 MHz decoder
  estimates) belong to a 3 µm CMOS process. The transistor-level cell, the
  layout, and the GaAs serializers of a complete link are outside this RTL.
