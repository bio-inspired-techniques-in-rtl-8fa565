# Lifelong-learning classifier in fully digital logic

This design is a small image classifier that keeps learning after it ships.
It combines two learning styles:

- **Supervised part (trained offline).** A bank of 16 convolution filters is
  trained ahead of time. It turns a 28x28 grayscale image into 16 yes/no
  filter answers.
- **Unsupervised part (learns on chip).** Sixteen spiking neurons learn by
  spike-timing-dependent plasticity (STDP). The neurons never see a label
  during learning. Classes that were never trained offline can still get
  their own neurons while the system runs.

All of the logic is ordinary synchronous RTL. There are no analog neurons,
and a neuron's membrane and synapses are plain counters. The target is a
Zynq-class SoC with a 50 MHz fabric clock. The processor side receives images
over a UART and writes them into the logic over AXI. The logic drives a VGA
monitor that shows what the network is doing.

## How an image is classified and learned

For each image, data flows through six blocks:

1. **Feature maps (`feature_maps`).** The 28x28 8-bit image is convolved with
   16 signed 8-bit 20x20 filters.
   - There are 9x9 = 81 valid positions. Each 400-term sum is saturated to
     16 bits.
   - Each filter's 81 results are max-pooled to one value.
   - The maximum is compared with that filter's threshold. The answer is
     `1` only when the maximum is strictly greater than the threshold.
   - The 16 answers form the response word O11.
2. **Equalization (`pattern_equalizer`).** This block turns O11 into a 4x4
   binary pattern O21. The patterns are "equalized", meaning every class is
   given a pattern with the same number of lit pixels (4 of 16). This keeps
   any one class from producing more input spikes than the others.
   - Filters 9..15 are **class filters**. Each was trained to recognise one
     known class. If any of them answers `1`, its own pattern T0..T6 is
     used. The lowest-numbered filter wins.
   - Otherwise the 9 answers of the **feature filters** 0..8 form an index
     into 512 generic patterns NT0..NT511. This is how classes that were
     never trained still get a pattern of their own.
3. **Noise generator (`noise_lfsr`).** A 4-bit LFSR (x^4+x^3+1) chooses the
   single lit pixel of a 16-pixel noise pattern O31.
   - It steps once for each noise window.
   - Pressing button B0 reseeds it from a free-running prescaled counter, so
     every press gives a different noise sequence.
4. **STDP / winner-take-all layer (`stdp_wta`).** This is the learning core,
   described in the next section.
5. **Confusion matrix (`confusion_matrix`).** This block counts how often
   each neuron fires for each label.
   - Once a neuron has fired 100 times, it is **linked** to the class it
     fired for most often.
   - From then on, each of its fires counts as classified. The fire also
     counts as correct when the label matches the linked class.
   - Each cell's share of the neuron's fires is kept as an 8-bit level for
     display and read-out.
6. **Monitor control (`lcd_monitor`).** This block generates 640x480 VGA
   timing at 59.5 Hz. Switches pick the picture:
   - SW0: filter response rates (a 4x4 grid, one cell per filter).
   - SW1: the synaptic weights (16 neurons x 16 synapses).
   - SW2: the confusion matrix (neurons as columns, classes as rows).
   - If several switches are closed, the lowest-numbered one wins.

`axi_regs` is a small AXI4-Lite slave. `lln_top` wires all the blocks
together and maps them into the processor's address space.

## The learning core: windows, fires and weight updates

This is the least obvious part of the design.

### Neuron state

Each of the 16 neurons has:

- **Synapses.** 16 weights of 8 bits each, one per pattern pixel, saturating
  at 0 and 255. They start at `W_INIT` = 128.
- **Integrator.** A 16-bit membrane value.
- **Threshold.** Starts at `TH_INIT` = 600.

### The run for one image

Each image gets one run of two windows, each `WIN` cycles long. At 50 MHz,
`WIN` = 500,000 cycles, which is 10 ms.

1. **Pattern window.** The image's pattern O21 is the input.
2. **Noise window.** The LFSR pattern O31 is the input. The LFSR steps
   (O41) at the start of this window.

### At the start of each window

1. **Integrate.** Every neuron adds the weights of its active inputs to its
   integrator. This happens once per window, and the integrators saturate.
2. **Pick a winner.** Neurons whose integrator is above their own threshold
   are candidates. The candidate with the largest integrator fires. A tie
   goes to the lowest index. At most one neuron fires, which is
   winner-take-all inhibition.
3. **Reset and adapt.** When a neuron fires:
   - Every integrator is cleared.
   - The winner's threshold rises by `TH_STEP` = 8, up to `TH_MAX` = 1000.

   The rising threshold is spike-frequency adaptation. A neuron that keeps
   winning becomes harder to fire, so other neurons get a chance.

### Through the rest of the window

The winner's fire line (O42) stays high until the window ends. When it
falls, the winner's synapses are updated:

- Inputs that were active get +64 (LTP, long-term potentiation).
- Inputs that were not active get -16 (LTD, long-term depression).

This is how a neuron comes to specialise on one pattern:

- A neuron that fires on a pattern grows the weights of that pattern's four
  pixels and shrinks the rest.
- Next time it reaches its threshold sooner on that pattern than on any
  other.
- A fully potentiated 4-pixel pattern gives 4 x 255 = 1020. That is above
  the threshold cap, so a trained neuron always stays able to fire.
- Because the integrator is cleared only by a fire, a neuron can build up
  over several windows before it fires. This is why some noise windows also
  produce fires.

### Bookkeeping

- The confusion matrix counts only fires from pattern windows, since only
  those relate to the image's label.
- Each fire gives a one-cycle event (`fire_evt`). It carries:
  - the neuron index;
  - the label;
  - whether it came from a pattern window.

The step sizes and thresholds above were chosen in this design so that four
disjoint patterns end up on four different neurons. They are parameters of
`stdp_wta` and of `lln_top`'s instance of it.

## Timing

| step | cycles at 50 MHz | time |
|---|---|---|
| convolution + max-pool + threshold (all 16 filters in parallel, one pixel per cycle) | 81 x 400 + 4 = 32,404 | 0.65 ms |
| equalization | combinational | - |
| STDP run (pattern + noise window) | 2 x 500,000 | 20 ms |
| one image over a 230,400-baud UART (outside this RTL) | - | about 40 ms |

The processor loads the next image into one image bank while the other is
being convolved. A finished pattern waits in a one-entry buffer if the STDP
layer is still busy. So the logic keeps up with the UART.

A `start` write while a convolution is running is ignored. A pattern that
finishes while the buffer is already full replaces the buffered one. Software
should poll the status word (`pending`, `stdp busy`, `conv busy`) before
starting the next image.

## Address map (AXI4-Lite, 32-bit, word address = byte address / 4)

| word address | write | read |
|---|---|---|
| 0x0000+p | image pixel p (0..783, row-major), bits 7:0 | - |
| 0x0800 | start; label in bits 3:0 | {pending, stdp busy, conv busy} |
| 0x0801 | clear the confusion matrix | - |
| 0x0802 | - | filter responses O11 |
| 0x0803 | - | {fire event count[15:0], fire bus} |
| 0x0804 | - | {correct[15:0], classified[15:0]} |
| 0x0805 | - | {STDP runs[15:0], convolutions[15:0]} |
| 0x0806 | - | {class-filter hit, pattern O21} |
| 0x0807 | - | {weight updates[15:0], linked neurons[7:0], 0, pattern window, LFSR state[3:0]} |
| 0x0808 | - | VGA frame count |
| 0x0809 | - | pattern-table entry in use |
| 0x1000+f | threshold of filter f (signed 16 bit) | max-pooled result of filter f |
| 0x1400+e | pattern table: 0..511 generic, 512..518 class patterns | - |
| 0x1800+16n+c | - | {level[7:0], count[15:0]} of neuron n, class c |
| 0x1900+n | - | {linked, linked class[3:0], total fires[15:0]} |
| 0x1A00+16n+i | - | synapse i of neuron n |
| 0x1B00+n | - | threshold of neuron n |
| 0x2000+512f+k | weight k (0..399, row-major) of filter f, bits 7:0 | - |

Writes complete in one bus transaction, and reads return on the next cycle.
WSTRB is ignored and the response is always OKAY.

## Files

- `rtl/lln_pkg.sv`: sizes, the 50 MHz clock, the colour type and the colour
  ramp shared by the displays.
- `rtl/ratio_sweep.sv`: a helper. A serial divider computes
  floor(256 x num / den), limited to 255, over a whole array of counters in
  round-robin. It is used by the two displays that show percentages.
- `rtl/feature_maps.sv`, `pattern_equalizer.sv`, `noise_lfsr.sv`,
  `stdp_wta.sv`, `confusion_matrix.sv`, `lcd_monitor.sv`, `axi_regs.sv`:
  the blocks described above.
- `rtl/lln_top.sv`: the top level.
- `tb/tb_<block>.sv`: one self-checking testbench per block.
- `tb/tb_lln_top_full.sv`: the top at its default parameters.

Each file opens with a comment on its function, interface and timing.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `WIN` | 500,000 | `lln_top`, `stdp_wta` | window length in cycles (10 ms) |
| `PRESC` | 50,000 | `lln_top`, `noise_lfsr` | seed counter prescaler |
| `LINK_FIRES` | 100 | `lln_top`, `confusion_matrix` | fires before a neuron is linked |
| `W_INIT`, `TH_INIT`, `TH_STEP`, `TH_MAX` | 128, 600, 8, 1000 | `stdp_wta` | synapse start, threshold start, step, cap |
| `LTP_STEP`, `LTD_STEP` | 64, 16 | `stdp_wta` | weight update steps |
| `N_CF`, `N_FF` | 7, 9 | `pattern_equalizer` | class and feature filters |

The image, filter and network sizes live in `lln_pkg`.

The split between class filters and feature filters sets how many classes
can be learned without offline training. With 7 class filters, 3 of the 10
classes are new. The 16 neurons are enough for one neuron for each of the 7
trained classes plus three neurons for each of the 3 new ones.

## Where this design makes its own choices

These points are not fixed by the source design and were decided here:

- **Threshold adaptation.** The threshold rises on every fire. An
  alternative reading raises it only once a neuron's weight contrast
  between pattern and background reaches a reference level.
- **Synapse display.** It is drawn from the STDP block's own colour output.
- **Arithmetic and rules.**
  - Saturation of the convolution sums to 16 bits.
  - Pixels are unsigned and weights are signed.
  - Priority among several responding class filters.
  - Winner choice among several candidate neurons.
  - The noise LFSR polynomial.
  - The mapping of LFSR state to pixel: pixel 0 is never lit.
- **Housekeeping.**
  - The address map.
  - The image double buffer and the pending-pattern buffer.
  - The VGA mode.
  - The colour ramp.
  - The screen layouts.
- **Linking.** Only pattern-window fires are counted, and linking applies to
  every neuron, including the ones that learn trained classes.
- **Out of scope.** The processor program, the UART link and the host-side
  training are outside this RTL. Their only interface is the AXI port.

## Simulating

Any testbench runs with plain Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl \
  rtl/lln_pkg.sv rtl/ratio_sweep.sv rtl/*.sv tb/tb_lln_top.sv \
  --top-module tb_lln_top -o sim
./obj_dir/sim +verilator+rand+reset+2
```

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
The block testbenches compare each block against an independent model:

- **`tb_feature_maps`.** Full-size random images and filters against a
  direct convolution. It tests thresholds at and just below the maximum,
  the bank swap, the cycle count, and the display.
- **`tb_pattern_equalizer`.** Random tables and responses against the
  priority rule.
- **`tb_noise_lfsr`.** The LFSR sequence, the reseeding, and that the state
  is never zero.
- **`tb_stdp_wta`.** A window of 20 cycles. It runs a cycle-level model of
  the integrate / fire / update rules on random inputs, then checks that
  four disjoint patterns are learned by four different neurons.
- **`tb_confusion_matrix`.** Counts, linking and accuracy levels against a
  model.
- **`tb_lcd_monitor`.** Sync pulse widths and periods, and switch
  selection.
- **`tb_axi_regs`.** Handshakes with random stalls.

`tb_lln_top` is the end-to-end test:

- **Settings.** `WIN` = 20,000, `LINK_FIRES` = 20, `PRESC` = 16.
- **Data.** 700 synthetic images in 10 classes, with filters and patterns
  built for them.
- **Counters.** It counts every mechanism and fails if any never occurred:
  - class-filter and feature-filter equalization paths;
  - the pending-pattern buffer;
  - fires in both windows;
  - weight updates;
  - threshold adaptation;
  - linking;
  - correct classifications;
  - each switch setting of the display;
  - LFSR reseeding.
- **Accuracy.** On this synthetic data with early linking, the result is
  about 23% (chance is 10%), and the test asks only for at least 20%.

The end-to-end test shows that the pieces work together. It is not a
measure of the accuracy the design can reach on real handwritten digits;
that needs trained filters and the full 100-fire linking phase.

`tb_lln_top_full` runs `lln_top` with every parameter at its default. It
takes three images through the full 20 ms runs and checks that each STDP run
lasts 1,000,000 cycles.
