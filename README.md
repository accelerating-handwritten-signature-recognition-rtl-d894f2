# On-chip trained CSFNN for handwritten signature recognition

This design recognises who wrote a signature. It learns to do so on the chip
itself. Each signature arrives as a vector of 10 features: the scanning,
clean-up, feature extraction and scaling are done on a host PC. The vector is
classified by a small neural network of the *conic section function* kind
(CSFNN), with 10 inputs, 10 hidden neurons and 3 outputs. The three outputs
form a binary code for one of 8 signature owners.

The network has 240 parameters:

- 130 weights;
- 100 neuron centres;
- 10 opening angles.

They are not loaded from outside. A differential-evolution (DE) optimiser in
the same fabric trains them. It evolves a population of 20 candidate parameter
sets. Each candidate is scored by running the whole training set through the
real network datapath. The design does all its arithmetic in IEEE 754
half-precision (binary16). It computes the two non-linear functions, the
bipolar sigmoid and the square root, from look-up tables.

The system runs three phases in a row:

```
 serial / host bytes
        |
  uart_rx -> dataset_loader -> dataset_mem (256 samples x {10 x fp16, 3-bit class})
                                     |
        +----------------------------+----------------------------+
        |  TRAIN: dea_trainer                                     |  RECOGNISE: recognizer
        |   lfsr, dea_init, dea_mutation, dea_crossover,          |   streams all 256 samples,
        |   dea_selection, dea_comparison, cost_unit              |   reports and counts hits
        |   population 20 x 240 genes in registers                |
        +--------------> param_store (240 x fp16) <---------------+
                               |
                             csfnn: input register -> 10 x primary_neuron (hidden)
                                                   -> 3 x primary_neuron (output, c = 0, cos = 0)
                                                   -> output_control (threshold 0.5)
```

`sig_recog_top` sequences the phases by itself:

1. **LOAD.** Samples arrive until all 256 are in.
2. **TRAIN.** Training starts automatically.
3. **RECOGNISE.** Recognition starts when training ends.
4. **DONE.**

The trainer and the recogniser share the network, the data memory and the
parameter store. The phase register decides which of them drives the network.

## The conic section neuron

A CSF neuron combines the two classic neuron types: the dot product of a
multilayer perceptron and the distance of a radial-basis unit. For hidden
neuron j, with inputs x_i, centres c_ij, weights w_ij and opening angle ω_j:

```
u_j = Σ_i (x_i − c_ij)·w_ij  −  cos(ω_j) · sqrt( Σ_i (x_i − c_ij)² )
a_j = f(u_j),        f(u) = 2 / (1 + e^(−2u)) − 1      (bipolar sigmoid = tanh)
```

Two settings of the angle give the two classic cases:

- ω = π/2 makes the cosine term vanish, and the neuron becomes an MLP neuron.
- ω = π/4 weighs the distance like an RBF unit.

The output neurons are the same hardware, `primary_neuron`, with all centres
and the cosine tied to zero. Then u_k is a plain weighted sum. One module
therefore builds every neuron.

`primary_neuron` is a pipeline with a register after each operation:

| stage | operation |
|---|---|
| 1 | d_i = x_i − c_i (10 subtractors) |
| 2 | p_i = d_i·w_i and q_i = d_i² (10 + 10 multipliers) |
| 3..6 | two balanced adder trees: P = Σp, Q = Σq (4 levels for 10 terms) |
| 7 | R = sqrt(Q) (table) |
| 8 | M = R·cos ω |
| 9 | u = P − M (P is delayed to line up with M) |
| 10 | a = f(u) (table) |

The latency is 6 + ceil(log2 N) = 10 cycles for N = 10. The pipeline accepts a
new input vector every cycle. The angle is stored and trained as the value
cos ω, not as ω. That way the datapath needs no cosine unit.

## Half-precision arithmetic and the two tables

`fp16_add` and `fp16_mul` are combinational binary16 units. They behave as
follows:

- **Rounding:** to nearest, ties to even.
- **Subnormals:** inputs and results that would be subnormal are flushed to
  zero.
- **Overflow:** gives infinity.
- **NaN:** no handling, because the datapath never makes a NaN from finite data.

The adder aligns operands inside a frame of 13 guard bits, so that rounding
after cancellation stays exact. The squarer is the multiplier with both inputs
tied together.

Both tables are ROMs with a registered output. They are filled at elaboration
time by an `initial` loop that evaluates the exact function and rounds it to
binary16. There is no data file; the formulas are in `sigmoid_lut.sv` and
`sqrt_lut.sv`.

- **Sigmoid (`sigmoid_lut`).** The table stores 5019 samples of the
  right-hand half of f, at u = k·2⁻¹⁰ for k = 0 … 5018, covering [0, 4.90].
  The index is |u| rounded to that grid. The sign of u is copied onto the
  result, because f is odd. For |u| beyond the last sample the value is
  f(4.90) ≈ 0.9999.
- **Square root (`sqrt_lut`).** The range [0, 5] uses three resolutions,
  because sqrt is steep near zero:

  | segment | step | table index |
  |---|---|---|
  | [0, 1/16) | 2⁻¹⁶ | x·65536 → 0 … 4095 |
  | [1/16, 1) | 2⁻¹² | 3840 + x·4096 → 4096 … 7935 |
  | [1, 5] | 2⁻¹⁰ | 6912 + x·1024 → 7936 … 12032 |

  That makes 12033 entries. Arguments above 5 saturate at sqrt(5).
  `fp16_to_fix` in `csfnn_pkg` forms every index from the binary16 value. It
  rounds and saturates.

## The network and its parameter vector

`csfnn` registers each sample once in its input control register and sends it
to all hidden neurons at once. The 3 output neurons take the 10 hidden
activations. `output_control` then thresholds each output at 0.5:

- an output ≥ 0.5 gives class bit 1 and level 0.9;
- an output < 0.5 gives class bit 0 and level 0.1.

The class code is {bit 2, bit 1, bit 0} from outputs 2, 1 and 0. The forward
latency from `in_valid` to `out_valid` is 22 cycles:

- 1 cycle in the input register;
- 10 cycles in the hidden neurons;
- 10 cycles in the output neurons;
- 1 cycle in output control.

The network computes 130 connections per sample. At 200 MHz that is
130 / 22 cycles = 1.18 G connections per second for a single sample. With the
pipeline kept full, it computes one sample per cycle.

`param_store` holds the 240 genes as registers. The DE trainer writes them one
at a time, and the network reads them all in parallel. Gene layout (j = hidden
neuron, i = input, k = output):

| genes | content | index |
|---|---|---|
| 0 … 99 | w_ij, input → hidden weights | 10·j + i |
| 100 … 129 | w_jk, hidden → output weights | 100 + 10·k + j |
| 130 … 229 | c_ij, hidden centres | 130 + 10·j + i |
| 230 … 239 | cos ω_j | 230 + j |

## Training by differential evolution

`dea_trainer` runs the DE/best/1/bin scheme with a population of NP = 20,
F = 0.6 and CR = 0.6, for 150 generations. It works on one gene per clock.

**Initialisation.** `dea_init` draws every gene uniformly between its limits:
x = lo + r·(hi − lo), with r taken from the `lfsr`. The limits are:

- weights: [−0.5, 0.5];
- centres: [−1, 1];
- cos ω: [0, 0.707].

Each chromosome is then evaluated, and `dea_comparison` keeps the index of the
best one.

**Each target i in each generation:**

1. **Pick.** Choose r1 ≠ r2, both ≠ i, and a forced gene j_rand. A collision
   is drawn again on the next cycle.
2. **Mutate and cross over.** This takes 240 cycles, one per gene:
   - `dea_mutation` (3 stages) forms v_j = best_j + F·(x_r1,j − x_r2,j).
   - `dea_crossover` then takes v_j if a 16-bit random fraction is at most
     round(0.6·65536), or if j = j_rand. Otherwise it takes x_i,j.
   - The trial gene is written both into a trial buffer and into
     `param_store`.
3. **Evaluate.** The 200 training samples stream through `csfnn`, one per
   cycle. A FIFO carries each sample's label alongside it. `cost_unit`
   accumulates the average squared error in binary16:

   ```
   eps_av = 1/(2N) · Σ_p Σ_k (d_pk − y_pk)²
   ```

   The targets d are 0.9 or 0.1, taken from the class bits.
4. **Select.** `dea_selection` compares the costs:
   - If the trial costs no more than x_i, it replaces x_i.
   - If it also costs no more than the best, it becomes the new best.

After the last generation, the best chromosome is written into `param_store`
for recognition.

The population (20 × 240 × 16 bits) and its costs are held in flip-flops. One
evaluation takes about D + N_TRAIN + 30 ≈ 470 cycles. A full training run at
the default size takes 1,432,162 cycles, or 7.2 ms at 200 MHz.

For observation, the trainer counts these events:

- evaluations;
- replacements;
- rejections;
- r1/r2 redraws;
- best updates.

The random source is a 32-bit Galois LFSR (x³² + x²² + x² + x + 1). It
advances 32 steps per clock, so that consecutive draws are independent bits.

## Loading the data set

Samples arrive as bytes: either over a serial line (`uart_rx`, 8N1,
CLKS_PER_BIT = 1736, which is 115200 baud at 200 MHz) or over the
`host_byte_valid`/`host_byte` port. Both feed `dataset_loader`, in the same
format.

Each sample is 21 bytes:

- 10 features, each a binary16 value sent low byte first;
- 1 byte whose bits [2:0] are the class code.

Samples 0 … 199 are the training set and 200 … 255 the test set. The serial
receiver has a two-flop synchroniser and samples the middle of each bit. It
drops frames with a low stop bit and flags them on `uart_frame_err`.

## Recognition and results

`recognizer` reads all 256 samples through the trained network. For each
sample it reports:

- `res_idx`, the sample index;
- `res_cls`, the class it decided;
- `res_label`, the stored label;
- `res_ok`, set when all three bits match.

It also counts `train_correct` and `test_correct`.

## Where this RTL departs from the original design

- **Square-root table size.** The original uses a segmented table of 11882
  samples over [0, 5] and does not give the segments. The segments chosen here
  need 12033 samples.
- **Sigmoid table size.** 5019 samples as in the original, but the sample
  spacing (2⁻¹⁰) is chosen here. 5019 × 16 bits is about 78 Kbit, a little
  more than the original's memory figure.
- **Cosine parameter.** The angle is kept as cos ω. The original names ω as
  the parameter but feeds cos ω_j from storage into the neuron.
- **Initial population.** The original's DE block diagram shows a ROM of
  initial solution sets, 2080 bits (130 × 16) wide and 10 deep. Here the
  initial genes are generated on chip, for all 240 genes and 20 chromosomes,
  as the text's sizes require. The centre and cosine initial ranges are
  choices of this design.
- **Gene-serial DE.** The original's mutation unit is much wider (130
  multipliers). Here one gene per clock is processed. The operations are the
  same; only the throughput is lower.
- **Number format.** Subnormals are flushed to zero. NaN is not handled.
- **Data memory.** It is writable and holds training and test samples
  together. Class codes are loaded together with the features, because the
  on-chip cost needs targets.
- **Accuracy.** The original reports 90 % training and 83 % test accuracy on
  its signature data. That data set is not reproduced here. On the synthetic
  8-class sets that the top-level testbench generates, the default
  configuration gets 38 % to 62 % of the training and the test samples right,
  depending on the random set. Chance is 12.5 %. Only about 5 % of the trial
  vectors are accepted in 150 generations, so training is far from converged
  at this generation count.
- **Sizes fixed at elaboration.** Network and population sizes are
  parameters set at elaboration. Reassigning neurons between layers at run
  time is not built.
- **Clock speed.** 200 MHz is the intended clock. Timing closure has not been
  analysed, and the combinational binary16 units are long paths.
- **Synthesis of the tables.** The tables are computed with `real` maths in
  `initial` blocks. Tools that cannot evaluate such blocks need the contents
  supplied another way.

## Simulating

Every block has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M` and has a cycle watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/csfnn_pkg.sv \
          tb/tb_primary_neuron.sv --top-module tb_primary_neuron
./obj_dir/Vtb_primary_neuron
```

Replace the testbench name to run any other. Most testbenches compare against
a double-precision model written in the testbench.

`tb_sig_recog_top` runs the complete system at its default size: load,
150 generations of training, then recognition. It takes about half a minute.
It checks:

- the phase sequence and the training time;
- the data memory contents;
- a cost that never rises;
- every recognition result against a reference evaluation;
- that each mechanism occurred at least once: serial and host bytes, a
  framing error, selection replace and reject, redraws, best updates, both
  crossover sources, and the phase switches.

To change a size, override the top's parameters:

- network: `N_IN`, `N_HID`, `N_OUT`;
- DE: `NP`, `G_MAX`;
- data set: `N_TRAIN`, `N_TEST`;
- serial port: `CLKS_PER_BIT`;
- random seed: `SEED`.

The gene count D and the data memory depth follow from these.
