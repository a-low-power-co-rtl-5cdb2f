# CoAP: a low-power co-processor that predicts ventricular arrhythmia

This is synthesizable SystemVerilog for a small ECG co-processor. It runs on a
wearable device and tries to flag the electrocardiogram of a patient who is
heading towards ventricular tachycardia or fibrillation (VT/VF), some 15 minutes
before the event. The design follows the architecture published by Janveja,
Parmar, Dash, Pidanic and Trivedi in "A Low-Power Co-Processor to Predict
Ventricular Arrhythmia for Wearable Healthcare Devices" (called *the article*
below). The RTL is a new implementation. Many details the article leaves open
are filled in here; each is listed under
[Departures and choices](#departures-and-choices).

The idea is to avoid anything expensive:

* Only the **peaks** of the P, Q, R, S and T waves are located, never the wave
  boundaries. All intervals are measured peak to peak.
* Six statistical **descriptors** per 3-s window are computed with subtractions,
  one small divider, squarings and shifts. Dividing by the beat count (1 to 4)
  takes no divider either.
* A **6-32-16-8-2 neural network** is evaluated one multiply at a time on a
  single MAC. The MAC uses an **approximate multiplier** built from shifts, two
  priority encoders and one Mitchell logarithmic product of small residues.
* The two sigmoid outputs used in training are replaced by a **comparator**.

The article runs the design at 12.5 kHz. At that clock, a window's processing
takes about 2,000 of the 37,500 clocks between windows.

## Data flow

```
 sample ──► ecg_bpf ──┬──► ecg_ram (2 banks x 750) ◄── peak_delineator ──► descriptor_processor ──► dnn_classifier ──► arrhythmia / normal
 (250 Hz)  0.5-40 Hz  │         ▲ write (bank, idx)     Q,S,P,T per beat      6 descriptors, Q10.6     │        ▲
                      └──► r_peak_detector ─────────────► R list (<= 4)                              neuron_mac  weight_memory
                                 ▲                                                                  (approx_multiplier)
                       main_control_unit: window counter, bank swap, start/done sequencing of the three steps
```

1. `ecg_bpf` band-pass filters each sample.
2. `main_control_unit` writes the sample into the current bank of `ecg_ram`.
   The same sample goes to `r_peak_detector`.
3. After 750 samples (3 s), the banks swap. The detector hands over up to four
   R-peak positions. The control unit then runs three steps in order:
   delineation, descriptors and classification.
4. `result_valid` pulses with the decision, the six descriptors and the number
   of beats used. Meanwhile the next window is already being recorded in the
   other bank.

## Number formats

All data words are 16-bit two's complement. Descriptors, weights, biases and
neuron outputs use **Q10.6**: 10 integer bits including the sign, and 6
fraction bits. Products are Q20.12. The MAC accumulates them in 40 bits. The
result is shifted back to Q10.6, the bias is added, and the value saturates to
16 bits. The descriptor arithmetic uses 32-bit intermediates.

## Finding the peaks

**R peaks** are found on the sample stream (`r_peak_detector`):

* The detector forms the first difference `d[n] = x[n] - x[n-1]` and the
  second difference `dd[n] = d[n] - d[n-1]`.
* A local maximum sits at sample n-1 when `d` goes from positive to zero or
  negative.
* The maximum counts as an R peak when its curvature `-dd[n]` is at least a
  quarter of the largest amplitude seen so far.
* The sharp R wave passes this test. The broad P and T waves, whose curvature
  is about a hundred times smaller, do not.
* The running maximum is halved at every window end, so the threshold can
  follow a falling amplitude.
* After an accepted peak, a 200 ms refractory period blocks re-triggering.
* At most four peaks are kept per window. A 3-s window cannot hold more beats
  at physiological rates.

**Q, S, P and T** are found afterwards in the stored window
(`peak_delineator`). Each search reads one sample per clock:

| point | search                                    | span   |
|-------|-------------------------------------------|--------|
| Q     | first minimum in `[R-25, R-1]`            | 100 ms |
| S     | first minimum in `[R+1, R+25]`            | 100 ms |
| P     | first maximum in `[Q-50, Q-1]`            | 200 ms |
| T     | first maximum in `[S+1, S+100]`           | 400 ms |

The delineator drops a beat when any of its searches would leave the window:
R must lie in 75..624. The beats used in a window are therefore complete, and
there are 0 to 4 of them. The spans are constants in `coap_pkg`.

## Descriptors

Per beat, the following are computed as sample counts converted to Q.6:

* `QRS = S-Q`
* `RT = T-R`
* `PS = S-P`
* `iCEB = (T-Q)/(S-Q)`, the QT/QRS balance index, computed by a 32-cycle
  bit-serial divider

Over the n beats of the window:

| descriptor | value                               |
|------------|-------------------------------------|
| QRS_m      | mean(QRS) / 16                      |
| RT_m       | mean(RT) / 16                       |
| RT_var     | mean((RT - mean(RT))^2) / 64        |
| PS_m       | mean(PS) / 16                       |
| iCEB_m     | mean(iCEB)                          |
| iCEB_var   | mean((iCEB - iCEB_m)^2)             |

The divisions by 16 and 64 scale the values into the Q10.6 range; they are
shifts. The mean divides by n with shifts (`div_by_n`):

* n = 2 and n = 4 shift right by 1 and 2.
* n = 3 uses `x/3 ~ x>>2 + x>>4 + x>>5`, that is 0.34375 x, about 3 % high.
  In a window of three identical beats this leaves a small nonzero variance,
  which is expected.

The vector is fed to the network in this order:

`{QRS_m, RT_m, RT_var, PS_m, iCEB_m, iCEB_var}`

## The approximate multiplier

This is the least obvious part of the design (`approx_multiplier`). Write each
operand magnitude with its leading one split off:

    a = 2^k1 + fa,   b = 2^k2 + fb          (k1, k2 from priority encoders)

Then, exactly,

    a*b = (a << k2) + (b << k1) - 2^(k1+k2) + fa*fb

The first three terms are shifts and adds, with no error. Only the residue
product `fa*fb` is approximated. Both residues are smaller than their operands'
leading powers of two, so the error this term brings is small compared with
the whole product. That residue product uses Mitchell's method:

* A second pair of priority encoders gives `fa = 2^k3 (1+x3)` and
  `fb = 2^k4 (1+x4)`, with fractions `x3` and `x4` of 16 bits.
* The approximation is:

      fa*fb ~ 2^(k3+k4)   (1 + x3 + x4)    if x3 + x4 < 1
      fa*fb ~ 2^(k3+k4+1) (x3 + x4)        otherwise

* Mitchell's method always underestimates. Its mean error over the unit
  square is `-2^(k3+k4)/12`. That amount (5461/65536) is added to the
  mantissa before the final shift.

Signed operands are handled as sign and magnitude. Over random 16-bit operands
the testbench measures a mean relative error of about 0.24 %, against 3.75 %
for a plain Mitchell multiplier. No error exceeds 3 % of the exact product
plus 2 LSB. Products with a power-of-two operand are exact.

## The folded network

`dnn_classifier` holds one `neuron_mac` and sequences it:

* It works layer by layer (6→32→16→8→2) and neuron by neuron.
* For each neuron it reads the weights, one per clock, from `weight_memory`.
  The matching input comes from the previous layer's output register. It then
  reads the bias.
* `neuron_mac` adds the bias and applies ReLU (layers 1 to 3) or nothing
  (layer 4).
* Each result is shifted into the layer's serial-in parallel-out register.
* A neuron with N inputs takes N+3 clocks. The whole network takes 1,022
  clocks plus 2.
* `output_comparator` reports arrhythmia when node 1 is greater than node 0.
  A tie is reported as normal. Because the sigmoid is monotonic, this gives the
  same decision as comparing the two sigmoid outputs.

**Loading weights.** The trained network is not part of the hardware
description. Write the 906 Q10.6 words through `wmem_we`, `wmem_addr` and
`wmem_wdata` while `busy` is low. The layout is neuron by neuron, layer 1
first. Each neuron stores its weights in input order, followed by its bias.
Layer 1 starts at address 0, layer 2 at 224, layer 3 at 752 and layer 4 at 888.
Within layer 1, input i of neuron j is at address `7j + i`, and its bias at
`7j + 6`.

## Top-level interface (`coap_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock (12.5 kHz in the article), asynchronous active-low reset |
| `sample_valid`, `sample` | in | 1, 16 | one raw ADC sample, 250 Hz |
| `wmem_we`, `wmem_addr`, `wmem_wdata` | in | 1, 10, 16 | weight/bias load port |
| `result_valid` | out | 1 | one-clock pulse per classified window |
| `arrhythmia`, `normal` | out | 1 | decision, held until the next result |
| `descriptors` | out | 6 x 16 | the window's input vector |
| `n_beats` | out | 3 | complete beats used (0..4) |
| `out_nodes` | out | 2 x 16 | final-layer values (node 0 normal, node 1 arrhythmia) |
| `peak_pulse` | out | 1 | an R peak was accepted |
| `overrun` | out | 1 | a window was skipped because the previous one was still processing |
| `busy` | out | 1 | a window is being processed |

**Timing.** For one window with n complete beats:

* delineation takes 2 + 206 n clocks, plus 1 per dropped beat;
* descriptors take 34 n + 5 clocks;
* the network takes about 1,024 clocks.

So `result_valid` follows the window's last sample by at most about 2,000
clocks. `overrun` cannot occur unless samples arrive more often than once
every three clocks or so.

## Departures and choices

The article gives the overall architecture, the descriptor definitions, the
division rule, the multiplier algorithm, the network size and the
comparator output stage. It does not give the following. Each is this design's
own choice:

* **Filter.** Only the 0.5-40 Hz band is specified. The filter here is a
  first-order high-pass (pole 1-2^-6) followed by a first-order low-pass
  (coefficient 5/8). Both are shift-add, with 8 guard bits in the state.
* **R-peak rule.** The article shows a differentiator, a zero-crossing
  detector, a comparator against a shifted (>>2) running maximum and an AND
  gate. Several details are this design's reading: the exact comparison, the
  halving of the running maximum per window, and the refractory period.
* **Search spans** for Q, S, P and T, and dropping incomplete beats.
* **Second RAM bank.** The article shows a single ECG RAM. A second bank
  removes the race between searching one window and recording the next.
* **Signs of intervals.** The article writes some intervals as
  earlier-minus-later peak. Here they are positive durations.
* **RT variance.** It uses the unscaled RT values and mean, then divides by
  64, as the article's data-path figure draws it.
* **Result width.** Results saturate to 16 bits; the article says
  "truncated".
* **Empty window.** A window with no usable beat gives all-zero descriptors.
  It is still classified.
* **Weights.** The trained weights and the class assigned to each output node
  are not available. The weights are loaded at run time, and node 1 is taken
  as the arrhythmia class.
* **Not included.** The analog front end (sensors, ADC) and the link that
  reports the result are outside this RTL.

The article reports 91.19 % accuracy for 15-minute prediction on MIT-BIH
data. That figure depends on the trained weights and on the original
peak-detection algorithm. It is **not** reproduced by this RTL, which has been
verified only against synthetic ECG.

## Simulation

Every module has a self-checking testbench in `tb/`. It prints
`TB_RESULT checks=N failures=M`. `tb/tb_ref_pkg.sv` holds the shared reference
models: the approximate product, the reference neuron and network, and the
synthetic ECG. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/coap_pkg.sv tb/tb_ref_pkg.sv tb/tb_coap_top.sv --top-module tb_coap_top
./obj_dir/Vtb_coap_top
```

`tb_coap_top` runs the whole design at its default sizes and a 12.5 kHz
clock. It streams eight 3-s windows of synthetic ECG, with 0 to 4 complete
beats, edge beats that must be dropped, and normal or prolonged RT intervals.
The weights build an RT_m comparator through the network, and the other
neurons get random weights.

It checks, per window:

* the beat count;
* the descriptors, within filter tolerances;
* both output nodes, bit for bit against the reference network;
* the expected class;
* that processing ends within the window.

It also checks that every mechanism occurs at least once: n = 0, 1, 2, 3 and
4, dropped beats, ReLU clipping, both classes, and both RAM banks. It runs in
about 10 s.

## Files

| file | content |
|------|---------|
| `rtl/coap_pkg.sv` | widths, window and network sizes, search spans, `beat_t`, descriptor order, saturation |
| `rtl/coap_top.sv` | the co-processor |
| `rtl/main_control_unit.sv` | window counter, bank swap, step sequencing |
| `rtl/ecg_bpf.sv` | band-pass filter |
| `rtl/ecg_ram.sv` | two-bank window buffer |
| `rtl/r_peak_detector.sv` | streaming R-peak detector |
| `rtl/peak_delineator.sv` | Q/S/P/T search in the stored window |
| `rtl/descriptor_processor.sv` | the six descriptors |
| `rtl/div_by_n.sv` | division by the beat count with shifts |
| `rtl/seq_divider.sv` | bit-serial divider for iCEB |
| `rtl/dnn_classifier.sv` | folded network and its sequencer |
| `rtl/neuron_mac.sv` | shared MAC, bias and ReLU |
| `rtl/approx_multiplier.sv` | approximate multiplier |
| `rtl/priority_encoder.sv` | leading-one finder |
| `rtl/weight_memory.sv` | 906-word weight and bias memory |
| `rtl/output_comparator.sv` | two-node decision |
