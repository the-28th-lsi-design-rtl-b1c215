# VAE decoder and building-block hardware

This repository holds synthesizable SystemVerilog for several small
variational-autoencoder (VAE) accelerators. Each one puts the heavy,
regular part of a VAE on an FPGA fabric and leaves control and the
lighter arithmetic to a processor:

| prefix | design | what the hardware does |
|---|---|---|
| `pc_` | point cloud generator | decoder layer, 32-dimensional latent vector -> 2,048 points (x, y, z), behind an AXI4-Lite slave |
| `ac_` | angle completion decoder | 2 latent values -> fully connected 16x16 map -> stride-2 3x3 transposed convolution -> 32x32 image |
| `pdense` | partitioned dense unit | Z = sum X*W + b for a 16-input x 2-output slice; the host builds whole layers from slices |
| `sc_` | ShiftCNN VAE blocks | multiplier-free arithmetic (weights = sums of two signed powers of two), ReLU, exp/sigmoid tables, reparameterisation, a dense-layer engine |
| `sv_fpu` | stacked-VAE number unit | add / multiply / ReLU on a 16-bit format with 1 sign, 4 exponent and 11 mantissa bits |

The designs are independent. `vae_contest_top` places them side by side on
one clock and reset, with each design's own ports prefixed. Nothing is
connected between them.

None of the trained networks' weights are part of this code. Every weight
memory is filled with deterministic stand-in values from a small integer hash
(formulas in `pc_pkg`, `ac_pkg`). The testbenches compute the expected
outputs from the same formulas, so the datapaths are checked bit-exactly.
To run a trained model, replace the two weight sources (`pc_weight_rom`,
`ac_rom`) with memories that hold real values.

## Point cloud generator (`pc_top`)

The decoder is one fully connected layer: 32 inputs of 16 bits, 6,144
outputs (2,048 points x 3 coordinates), and no activation. Two problems shape the
hardware.

**Too many output wires.** All 98,304 output bits at once do not fit, so the
weight matrix is cut into four row blocks ("quarters"). One decoder run
computes 512 points (1,536 outputs, 24,576 bits) of quarter `part`. The
state machine (`pc_fsm`) runs the decoder and the output controller four
times.

**Throughput.** Every clock, the weight source delivers, for one point, three
512-bit words: 32 weights for each of x, y and z. It also delivers three
biases. Three lanes (`pc_weight_mult`) each do 32 multiplications in
parallel (`pc_multiplier`). Each product keeps bits [27:12] of the 32-bit
result, because the numbers are Q3.12. A 5-level registered adder tree
(`pc_adder_tree`, 21-bit sums) follows. The bias is delayed to match and
added, and the sum is saturated to 16 bits. The three coordinates are
shifted into a 24,576-bit register. A point takes 17 pipeline clocks, and a
new point enters every clock. A quarter therefore takes 17 + 512 = **529
clocks**, counted from the clock that samples `start` to the clock in which
`done` is high.

Data path around the decoder:

```
AXI4-Lite -> pc_axil_regs -> FIFO A (32b x 16) -> pc_input_ctrl (512-bit latent)
          -> pc_decoder (x4 quarters) -> pc_output_ctrl (24,576 bits -> 768 words)
          -> FIFO B (32b x 3,072) -> pc_axil_regs -> processor
```

Register map (byte addresses): `0x00` write bit 0 = start (read: busy),
`0x04` end-of-computation flag, `0x08` push a latent word (two 16-bit
dimensions, dimension 2i in the low half), `0x0C` pop an output word
(dimension 2j low, 2j+1 high; 0 when empty). Reset is the bus reset.

A full run takes about 5,220 clocks from the start write to the end flag
(52 us at 100 MHz): 16 clocks to gather the latent vector, then four times
529 + 768 clocks.

`pc_weight_rom` generates its stand-in weights in logic instead of storing
them. A stored table would be 3.2 Mbit. The block has the same interface and
3-clock latency that a block-RAM ROM would have.

## Angle completion decoder (`ac_top`)

The processor sends a latent pair, for example the mean of the latent
vectors of two viewpoints. The decoder draws the object as seen from
in between. Cells of the 16x16 map stream through a pipeline, one per
clock. Each step takes one clock:

1. read the cell's 32-bit weight word and bias (`ac_rom`);
2. multiply, z1*w11 and z2*w12 (`ac_fc`; z1/w11 are the low halves);
3. add the bias: A = z1*w11 + z2*w12 + b1;
4. split the 144-bit kernel into nine 16-bit taps (`ac_deconv`);
5. multiply A by the nine taps;
6. scatter-add the 3x3 products into the 32x32 array at (2*row+dy,
   2*col+dx). Neighbouring cells overlap in one row or column, and there the
   values add up.

After the last cell, `ac_data_ctrl` stores the array (1 clock), forms it
into a 16,384-bit vector (1 clock), and raises `end_sig` (1 clock). That is
256 + 8 = **264 clocks** from `start` to `end_sig`. The image is then written
as 512 32-bit words into an output FIFO.

Arithmetic is Q7.8, and every multiply and add saturates. The full
transposed convolution would be 33x33. The last row and column are dropped,
which gives 32x32.

The scatter stage is 1,024 pixel registers, each with its own small
tap-select and saturating adder. That is simple and one cell per clock, but
it is the largest part of this design.

## Partitioned dense unit (`pdense`)

A small fixed unit (N_I inputs x N_O outputs, default 16 x 2) computes
Z = sum(X_i * W_i) + b and ReLU(Z). It uses N_I*N_O parallel multipliers and
is pipelined: 3 clocks latency, one operation per clock. A layer of any size
is run by the host. For each group of N_O outputs it feeds the input in
slices of N_I, and passes each result Z back as the next run's bias
(b <- Z). So the unit needs no accumulator state. Examples:

* 256 -> 16 (means) + 16 (variances): 16 pairs x 16 slices = 256 runs;
* 16 -> 256: 128 runs;
* 180 -> 40 on a `pdense #(.N_I(9))`: 400 runs.

Data are Q7.8. Z saturates once per run, so chained partial sums saturate
at 16 bits between runs.

## ShiftCNN blocks (`sc_`)

All data are Q10.10 (20 bits, signed). A weight is two 10-bit terms
`{sign, direction, amount[7:0]}`. A term multiplies x by ±2^(±amount): a
left shift, or an arithmetic right shift when direction = 1. The two
shifted values are added, so no multiplier is needed (`sc_shift_mul`, one
clock).

* `sc_relu`: ReLU with the enable/done handshake that the layer controllers
  use; `done` comes one clock after `en`.
* `sc_lut`: exp and sigmoid tables, 256 entries over [-8, 8) in steps of
  1/16, filled at elaboration with `$exp`. exp saturates at the largest
  Q10.10 value. The sigmoid is stored in 11 bits and zero-extended.
* `sc_reparam`: z = mean + exp(logvar/2) * eps, with eps supplied from
  outside. It uses a real multiplier, because eps is data. Latency 3.
* `sc_dense`: a layer engine over block memories. An FSM steps the input
  and weight addresses, does one shift-multiply per clock, accumulates in
  40 bits, adds the bias, optionally applies ReLU, and writes the output
  memory. At the default 169 -> 100 the layer takes 100 x (169 + 3) =
  17,200 clocks.

Not built: the Conv2D / Conv2DTranspose engines and the FSM that sequences
the whole 28x28 network.

## 1/4/11 number unit (`sv_fpu`)

This unit reads `{s, e[3:0], m[10:0]}` as (-1)^s * 1.m * 2^(e-7). e = 0 means
zero. There are no subnormals, infinities or NaNs. Sums are formed exactly
on a 26-bit grid and products exactly on 24 bits, then truncated toward
zero. Overflow saturates, and results below 2^-6 flush to +0. The unit
takes one operation per clock with one clock of latency. The classifier
network that would use it is not built.

## How far to trust it

Every block has a self-checking testbench in `tb/` that compares against an
independent model: integer or real arithmetic, with the hash formulas for
weights. Each testbench also checks the cycle counts given above.
`tb_vae_contest_top` runs every design at full size through the top level,
all at the same time:

* a complete 2,048-point inference, with all 6,144 coordinates compared;
* an angle-completion image;
* a 16-run chained dense slice;
* the number-unit operations;
* a full 169 -> 100 ShiftCNN layer.

It also counts the mechanisms that happen: quarters, FIFO words, cells,
overlapping scatters, chained runs.

What is this design's own choice rather than the original's:

* the fixed-point formats (Q3.12, Q7.8), the choice of product bits, and
  saturation everywhere;
* the meaning of the 1/4/11 fields;
* how the 17 and 264 clocks are split into stages;
* handshakes, word orders and FIFO read ports;
* LUT size and range;
* memory load ports;
* the stand-in weights.

Known differences from the original designs:

* The weights are stand-ins, so outputs are not meaningful images or
  point clouds.
* The point cloud weight source computes values instead of reading a
  3.2 Mbit ROM.
* The angle completion decoder has plain ports instead of a processor bus.
* The ShiftCNN convolution engines and the stacked-VAE network are missing.

## Simulating

Any testbench builds with plain Verilator 5. The packages go first:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/pc_pkg.sv rtl/ac_pkg.sv rtl/sc_pkg.sv tb/pc_ref_pkg.sv tb/ac_ref_pkg.sv \
  rtl/*.sv tb/tb_vae_contest_top.sv --top-module tb_vae_contest_top -o sim
./obj_dir/sim
```

Each testbench ends by printing `TB_RESULT checks=<n> failures=<m>`. The
full-size top-level run covers about 17,000 clocks and finishes in
under a second.
