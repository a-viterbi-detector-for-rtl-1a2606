# A Viterbi detector for class IV partial-response magnetic recording

This is a hardware Viterbi detector for the class IV partial-response channel
(response 1 − D²). It is described at the register-transfer level, together with
the digital test equipment used to measure its bit error rate against a plain
threshold detector on the same samples.

A magnetic recording channel equalised to class IV produces, for every written bit,
one of three sample levels: −2, 0 or +2. A threshold detector slices each sample on
its own. The Viterbi detector instead uses the fact that the channel only allows
certain sequences of levels. This buys a few dB of noise margin. The design's
central trick is that the class IV trellis can be reduced to something needing
only:

- one adder;
- one register for a stored sample;
- one flag bit;
- a path memory that is a shift register, where a single bit may be set afterwards.

The structure, from sample to decision:

```
  sample (7 bit, offset binary over -2..+2)
     |
     +--> threshold_detector --------------------------> threshold decision
     |
     +--> viterbi_pr4
            pr4_interleaver: even samples -> detector 0, odd -> detector 1
            viterbi_1d x 2
              vd_logic  : Yp, B, subtractor, comparator -> Update, Data
              vd_ram    : vd_controller + 2 x vd_shifter (14 bit) -> decided bit
                          (or vd_exchange_ram, the two-register alternative)
            merged decision, 59 clocks after its sample
```

The test side consists of:

- a pseudo-random sequence generator and a precoder, producing the bits to be written;
- two error detectors, one behind each detector, that count bit errors without
  knowing where the sequence starts;
- a capture memory that records both error streams for one measurement.

## 1. From class IV to two 1 − D detectors

With precoding, a_k = b_k ⊕ a_{k−2}. The noiseless channel output is
y_k = 2·(a_k − a_{k−2}) in the levels used here, so |y_k| = 2 exactly when
b_k = 1. Even and odd samples never interact. Class IV is therefore two independent
1 − D channels, each running at half the sample rate.

`pr4_interleaver` toggles a phase bit on every clock. It enables detector 0 on
even clocks and detector 1 on odd clocks. Both detectors see the same sample bus.
On each clock it registers the decision of the detector whose turn it is, so the
two decision streams merge back into sample order. The overflow output is high
when either detector is in overflow.

The decision for a sample leaves `viterbi_pr4` **59 clocks** after the sample was
presented. That is 2 × 28 + 3, made up of:

- 28 path-memory steps per detector, each taking two clocks, because a detector
  is enabled only every second clock;
- three more clocks for the sample register in `vd_logic`, the output
  register of the interleaver, and the wait until it is the detector's turn
  at the output multiplexer.

## 2. The simplified Viterbi algorithm (`vd_logic`)

A 1 − D channel has two trellis states. The full algorithm keeps two path metrics
and two survivor paths. For this channel the difference between the two metrics
only matters up to a window. The algorithm can then be rewritten to keep only:

- **Yp**: the sample at which the two survivors last merged;
- **B**: the sign, β = ±1, of the transition that is still undecided.

For each new sample Yk, let d = Yk − Yp:

| B (β) | d inside the window: no merge   | otherwise: Update                  | Data (bit written at the old merge point) |
|-------|---------------------------------|------------------------------------|-------------------------------------------|
| 1 (+1)| −2 ≤ d < 0                      | d ≥ 0, or d < −2                   | 1 if d < −2: the candidate was a pulse    |
| 0 (−1)| 0 ≤ d < +2                      | d < 0, or d ≥ +2                   | 1 if d ≥ +2: the candidate was a pulse    |

On an Update:

- the survivors merge;
- the bit at the old merge point becomes known, and equals Data;
- Yp takes Yk;
- B becomes the sign of d.

Between Updates every new bit is tentatively 0. A 1 can only ever appear at the
position of the last merge point.

In hardware the sample is offset binary: code = ⌊(y + 2) · 2^W / 4⌋, clipped to
the code range. A difference of 2 in signal units is then HALF = 2^(W−1) codes,
which is the weight of the msb. The subtractor computes Yk + ~Yp + 1 and gives
two signals:

- **C**, its carry out, meaning Yk ≥ Yp;
- **M**, its msb, which is set when |d| ≥ HALF in the direction of its sign.

The three interesting values of d (−2, 0, +2) are where C and M change. The whole
comparator is therefore two equations on three bits:

```
Update = ~B·(M + ~C) + B·(~M + C)
Data   = ~B·M·C      + B·~M·~C
On Update:  Yp <= Yk,  B <= C
```

These equations fix the boundary cases, and the design follows them:

- with B = 1, a difference of exactly −2 is still inside the window;
- with B = 0, a difference of exactly +2 causes an Update.

`vd_logic` registers the incoming sample first (one clock). It then computes
Update and Data combinationally from that register and from Yp and B. It loads
Yp and B on the same enabled edge on which Update is high.

## 3. The path memory

### 3.1 Pointer style, as built (`vd_ram`, `vd_controller`, `vd_shifter`)

The survivor is kept in a shift register, 28 bits deep: two 14-bit shifters in
series. On every enabled clock a 0 enters at the front, and the bit leaving the
back is the decision. Since a bit is only ever changed from 0 to 1, and only at
the last merge point, the memory needs just one pointer to that bit.

`vd_controller` holds the pointer as a pair, (shifter select `css`, address
`cnt`). This pair is the place the candidate bit will occupy after the coming
shift. On each enabled clock:

- **Update**: if Data is 1, the bit at the pointer is set. This happens in the
  same edge as the shift, on the shifted position. The pointer then returns to
  position 1, which is the sample that caused the Update and is now the new
  candidate.
- **No Update**: the pointer advances by one, so it keeps pointing at the same
  bit while the register shifts. Moving from the last address of one shifter to
  the first of the next changes `css`.
- **Overflow**: the pointer runs past the end of the last shifter. The candidate
  bit has then left the memory and can no longer be corrected. `overflow` rises
  and stays high until the next Update.

Overflow happens when more than 28 samples of one detector pass without an
Update. On random data this is rare (about 2^−28), but a dropout provokes
it. After reset the controller starts in overflow, since there is no candidate
yet.

The controller can also drive three shifters (`long_mode`), for 42 bits.
`vd_ram` uses that mode when NUM_SHIFTERS = 3.

`vd_shifter` is a shift register that ORs a one-hot mask into its next value. It
has no other logic, because the controller does all the bookkeeping.

### 3.2 Exchange style (`vd_exchange_ram`)

The alternative uses no pointer. Two 28-bit registers hold the two survivor
paths:

- `path0` always shifts in 0;
- `path1` shifts in Update.

On an Update both registers first take a copy of one of them: `path1` if Data is
1, else `path0`. The new bits then enter. The decision is the msb of `path1`.

While the survivors have merged within the memory depth, the two registers agree
at the output. A difference there means the merge point left the memory, which
is an overflow. This overflow is therefore a one-clock pulse per affected bit,
not a level as in the pointer style.

Select this style with `RAM_STYLE = vd_pkg::RAM_EXCHANGE` on `viterbi_1d`,
`viterbi_pr4` or the top. The default is the pointer style.

## 4. Threshold detector

In offset binary, a sample lies in the outer quarters (|y| > 1, a pulse) exactly
when its two most significant bits are equal. `threshold_detector` is therefore
one XNOR. It is combinational, so its decision is available on the same clock as
the sample.

## 5. Test equipment

### PRS generator (`prs_generator`)

A 31-bit linear feedback shift register that divides by 1 + x³ + x³¹. An all-zero
detector feeds a 1 into the feedback. This starts the sequence from reset, and
from any lock-up in the all-zero state. The period is 2³¹ − 1.

### Write path

The sequence is inverted and then precoded (`precoder`, a_k = b_k ⊕ a_{k−2}),
which gives `tx_bit`. The inversion means that a dropout, which reads as no
pulses, shows up at the error detector as a run of ones. Such a run is easy to
detect, whereas a run of zeros would look like error-free data.

### Error detector (`error_detector`)

The received decisions are inverted back and then multiplied by the same
polynomial. When the input is the error-free sequence, the product is 0 whatever
the starting phase. A single wrong bit makes the product 1 three times: at lags
0, 3 and 31.

A second register divides the product by the polynomial again (the "canceller").
This turns each group of three back into a single error pulse. After any burst,
the canceller can be left running on its own as a free PRS generator. To prevent
this, it is cleared once 64 consecutive zero products have been seen
(`cancel_clear`).

### Capture memory (`capture_memory`)

Stores the pair {Viterbi error, threshold error} once per clock, for 2^24 clocks
after `start`. Then `done` is raised, and the stored data can be read through a
port with one clock of read latency. 2^24 × 2 bits = 32 Mbit, one measurement.

### Top (`pr4_viterbi_system`)

The top connects all of the above. Its ports include:

- the bit to write (`tx_bit`) and the digitised sample (`sample`);
- both decisions;
- Update and Data of both detectors, for observation;
- both error streams and both canceller clears;
- the capture handshake and read port.

The two detectors have different latencies (0 and 59 clocks). This needs no
alignment, because each error detector locks onto the sequence by itself.

## 6. Parameters

| Parameter      | Default | Where                                         | Meaning                                  |
|----------------|---------|-----------------------------------------------|------------------------------------------|
| `W`            | 7       | `vd_logic` up to the top                      | sample width; W = 4 also works           |
| `LEN`          | 14      | shifters, controller                          | bits per shifter                         |
| `NUM_SHIFTERS` | 2       | `vd_ram` up to the top                        | 1, 2 or 3 shifters per detector          |
| `RAM_STYLE`    | pointer | `viterbi_1d` up to the top                    | path memory style                        |
| `LAG`          | 2       | `precoder`                                    | 2 for class IV, 1 for a 1 − D channel    |
| `LEN`, `TAP`   | 31, 3   | PRS generator, error detector                 | polynomial 1 + x^TAP + x^LEN             |
| `ZEROS`        | 64      | `error_detector`                              | zero run that clears the canceller       |
| `CAPTURE_AW`   | 24      | `capture_memory`, top                         | log2 of the number of captured clocks    |

The shared defaults live in `vd_pkg`.

## 7. Where this design departs from the original hardware

The original was built from discrete logic and programmable logic devices, with
an analog front end. The following differences matter to a user.

- **Analog parts are outside.** The A/D converter, the equalizer, the (1 + D)
  cosine filter, the clock recovery, and the channel with its noise source are
  not part of the RTL. The top takes a digitised sample and gives the bit to
  write. `tb/adc7.sv` is a testbench-only model of the converter.
- **One clock instead of two.** The original clocked each 1-D detector with its
  own clock. Here one clock runs everything, and the interleaver produces clock
  enables.
- **Controller timing is equivalent, not identical.** The original controller's
  state encoding, pointer offset and one-clock delay of Update are not
  reproduced. The path contents and the overflow behaviour are the same.
- **Comparator boundaries.** At d = ±2 exactly, the behaviour is the one the
  carry/msb equations above give. A model written with signed differences must
  use the same convention to agree bit for bit.
- **Exchange memory included as an option.** The exchange path memory was
  conceived after the pointer version had been built. It is offered as an
  option and is not the default.
- **Capture memory is generic.** Its organisation and read-out to a computer are
  not known, so it is a plain array with a start/done handshake and a read port.
- **No timing closure.** 20 Mbit/s at one sample per clock means a 20 MHz clock.
  This is easily within reach of the logic depth involved (one 7-bit adder plus a
  few gates), but it has not been checked by timing analysis.

## 8. Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. `tb_vd_ref_pkg` holds the independent reference
models:

- a behavioural model of the simplified algorithm, written with signed
  differences rather than carry and msb;
- a path-memory model that keeps every decision in a queue and sets bits by
  index;
- a Gaussian noise source and the quantiser.

What the main testbenches cover:

| Testbench | What it checks |
|---|---|
| `tb_vd_logic` | Update, Data, Yp and B against the reference on random codes and on a noisy 1 − D channel, with a random enable |
| `tb_vd_ram`, `tb_vd_exchange_ram` | decision, overflow and the whole stored path against the path model; random Update/Data with phases of rare Updates that force overflow |
| `tb_viterbi_1d` | both path styles: exact decisions on a noiseless 1 − D channel; agreement with the model under noise; overflow on a dropout |
| `tb_viterbi_pr4` | class IV decisions at W = 7 and W = 4; the 59-clock latency |
| `tb_prs_generator` | the sequence against the recurrence; full period on a 5-bit instance |
| `tb_error_detector` | exactly one error pulse per injected error; relocking after a 200-bit dropout, which needs the 64-zero clear |
| `tb_pr4_viterbi_system` | the whole chain on a noisy class IV channel with a dropout (20,000 clocks, 4096-entry capture) |

In `tb_pr4_viterbi_system`:

- it counts Updates, pulses, overflows, errors of both detectors, canceller
  clears and a completed capture;
- it fails if any of these never happens;
- at σ = 0.4 the Viterbi detector makes clearly fewer errors than the threshold
  detector;
- the capture memory's contents are compared with the error streams it recorded.

`tb_awgn_1d_test` measures bit error rates on a single 1 − D channel with
Gaussian noise. It uses the design's own PRS generator, precoder (one delay),
detectors and error detectors, with 10^6 bits per point. S/N is the mean
signal power at the sampling instants (2, for levels −2/0/+2 with
probabilities ¼, ½, ¼) over the noise variance:

| S/N   | threshold | analytic 1.5·Q(1/σ) | Viterbi, 7 bit | Viterbi, 4 bit |
|-------|-----------|---------------------|----------------|----------------|
| 7 dB  | 8.5e-2    | 8.5e-2              | 3.6e-2         | 3.9e-2         |
| 9 dB  | 3.5e-2    | 3.5e-2              | 8.1e-3         | 9.6e-3         |
| 11 dB | 9.1e-3    | 9.1e-3              | 7.1e-4         | 1.0e-3         |
| 13 dB | 1.2e-3    | 1.2e-3              | 1.6e-5         | 4.2e-5         |

Three things follow from the table:

- the threshold detector matches theory, which checks the test chain itself;
- the Viterbi detector reaches the same error rate as the threshold detector
  at about 2 to 2.5 dB less S/N;
- 4-bit quantisation (the top four bits of the same samples) costs little at
  low S/N, and up to a factor of about 2.5 at 13 dB.

`tb_pr4_viterbi_system_full` runs the top with every parameter at its default.
It performs one complete 2^24-clock measurement with noise and a dropout, checks
every decision of both detectors, and reads the capture back. It takes under a
minute.

To build and run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/vd_pkg.sv tb/tb_vd_ref_pkg.sv tb/tb_viterbi_pr4.sv --top-module tb_viterbi_pr4
./obj_dir/Vtb_viterbi_pr4
```

Replace the testbench name for any other block. Every testbench has a watchdog,
and ends with the `TB_RESULT` line.
