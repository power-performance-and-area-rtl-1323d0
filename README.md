# Coarse-grain sparse DNN acoustic model in SystemVerilog

This is a speech-recognition DNN engine that keeps all of its weights on chip.
A frame of speech is described by 40 fMLLR features. The network reads a
window of 11 frames (440 values). It passes them through four hidden layers of
1024 ReLU neurons and produces 1947 scores, one per HMM state, for an HMM/Viterbi
decoder outside the chip.

A dense version of this network has about 5.6 million weights. The design
relies on **coarse-grain sparsification (CGS)**. Every weight matrix is cut into
square blocks of `BLOCK x BLOCK` weights. Only 12.5 % of the blocks are kept,
and every block row keeps the same number of blocks:

| network | block size | kept blocks per block row | coefficient bits per block row |
|---------|-----------:|--------------------------:|-------------------------------:|
| CGS-16 (default) | 16 x 16 | 8 of 64 | 8 x 6 = 48 |
| CGS-64  | 64 x 64 | 2 of 16 | 2 x 4 = 8 |

The result has two useful properties:

- Every output neuron depends on exactly 128 input neurons.
- The non-zero weights are a dense 1024 x 128 matrix per layer. A short list of
  block-column indices is enough to know where the weights belong.

All compressed weights, about 6 Mb, fit in six SRAM banks of 8192 rows x 128
bits. The hardware needs no sparse-matrix indexing beyond a set of wide
multiplexers.

Both networks are one RTL design with different values of the parameter
`BLOCK`. CGS-16 has the finer selection, so its neuron-select logic is much
larger.

## Datapath

```
 features ─► input_shift_reg ─► ┌─mux─┐                  weight_memory (6 x weight_sram_bank)
 (12 bit)     11 x 40 window    │     ├─► input_neurons       │ 16 weights / cycle
                      ┌────────►└─────┘      (1024)           ▼
                      │                        │         ┌──────────┐
                      │                 neuron_select ─► mac_mux ─► 16 x mac_unit
                      │                 (1024 → 128)    (128 → 16)       │ 16 results
                      │                        ▲                         ▼
                      │                   coef_regfile            drain mux (16 → 1)
                      │                  (inside dnn_fsm)                │
                      └──────────── output_neurons ◄── demux ◄──── relu ─┴─► score stream
                                       (1024)                      (bypassed on the output layer)
```

`dnn_fsm` controls the whole datapath. The network is computed **one layer at
a time**:

1. At the start of a frame, `input_neurons` loads the 440-value window. The
   rest of the 1024 entries are set to zero.
2. The layer is computed into `output_neurons`.
3. `output_neurons` is copied back into `input_neurons` in one cycle. The next
   layer then starts.
4. The output layer (1947 states, padded to 2048 rows) does not fit in the
   1024-entry output register. Its results go straight out on the `score_*`
   stream.

## How a layer is scheduled

This is the part to understand before writing weights into the memory.

A layer is processed in **passes**. Each pass computes 16 output neurons, one
per MAC lane: lane `k` accumulates output `16p + k` of pass `p`. A pass lasts
`N_SEL = 128` cycles, because each output has 128 terms and all 16 lanes
advance together. With 1024 outputs that gives 64 passes, so one hidden layer
takes 8192 cycles and 8192 weight rows, which is exactly one bank. The output
layer takes 128 passes (16384 rows) and uses banks 4 and 5.

**Neuron selection.** A pass belongs to one block row. `neuron_select` uses
that block row's coefficient entry to gather the 128 useful input neurons:

```
selected[s] = input_neurons[BLOCK * sel[s / BLOCK] + s % BLOCK]     s = 0..127
```

Here `sel[m]` is field `m` of the entry. In CGS-16 these are eight 64:1
multiplexers, each 16 neurons wide. In CGS-64 they are two 16:1 multiplexers,
each 64 neurons wide.

**Rotation in the MAC mux.** In cycle `t` of a pass (`t = 0..127`), lane `k`
receives this selected neuron:

```
s(t, k) = 16 * (t / 16) + ((t % 16) + k) % 16
```

The 16 lanes therefore always see 16 different neurons of the same group of
16. Over 16 cycles each lane sees every neuron of the group once. This keeps
one weight row per cycle and one accumulator per lane, with no adder tree.

**Weight row layout.** The weights are read in the same order. The global row
and its contents are:

```
row  = layer * 8192 + p * 128 + t                  layer 4 = output layer (rows 32768..49151)
lane k of the row (bits 8k+7:8k) = W_layer[ out = 16p + k ][ in = BLOCK*sel[s/BLOCK] + s%BLOCK ],
                                   s = s(t, k),  sel = coefficient entry (layer*1024 + 16p) / BLOCK
```

A frame reads rows 0 to 49151 in order, one row per cycle. The row address is
just a counter. The bank is `row / 8192`.

**Pipeline and drain.** Each row goes through these cycles:

- Cycle 0: the controller issues the SRAM read and reads the coefficient entry.
- Cycle 1: the row arrives, and the registered entry drives `neuron_select` and
  `mac_mux`.
- End of cycle 1: the MACs accumulate.

On the last term of a pass, every lane stores its scaled and saturated result
in a holding register. During the first 16 cycles of the next pass, these 16
results are drained one per cycle: through the drain mux, then `relu`, then
the output demux into `output_neurons`. On the output layer they go out as
scores instead, with ReLU bypassed. Draining overlaps with computing.

**Between layers.** At the end of a layer the controller:

1. waits for the last drain, which takes 1 + 16 cycles;
2. spends one cycle confirming it;
3. spends one cycle copying the output neurons back.

That is 19 cycles per layer.

**Latency.** From the cycle a window is taken to the `frame_done` pulse:

```
ROWS_TOT + (N_HIDDEN + 1) * (N_MAC + 3) = 49,152 + 5 * 19 = 49,247 cycles
```

At the 400 MHz the design was targeted at, that is about 123 µs per frame.

## Number format

- Neurons are 12-bit two's complement. Weights are 8-bit two's complement with
  `FRAC = 7` fraction bits.
- Each MAC lane multiplies 12 x 8 bits into a 28-bit accumulator (`ACC_W`).
  128 terms need at most 27 bits.
- At the end of a dot product the sum is shifted right arithmetically by
  `FRAC` and saturated to the 12-bit range.
- ReLU then clamps negative values to zero on hidden layers.
- Output scores keep their sign.

The 8-bit weights and the 12-bit buses belong to the architecture. The
fixed-point scaling, rounding (truncation toward minus infinity) and
saturation are this implementation's choices. Change `FRAC` to match a
trained model's quantisation.

## Interfaces

All ports of `cgs_dnn_top` are synchronous to `clk`. Reset is synchronous and
active low (`rst_n`).

| port | dir | width (defaults) | meaning |
|------|-----|-----------------:|---------|
| `feat_valid/feat_data/feat_ready` | in/in/out | 1/12/1 | Feature stream, valid/ready. Every 40 accepted features complete a frame. `feat_ready` drops while a complete frame waits to be taken, which is during computation. |
| `coef_we/coef_addr/coef_wdata` | in | 1/9/48 | Writes one coefficient entry (see below). |
| `wmem_we/wmem_addr/wmem_wdata` | in | 1/16/128 | Writes one weight row, laid out as above. It may be used at any time, including while a frame runs. |
| `busy` | out | 1 | A frame is in progress. |
| `score_valid/score_idx/score_data` | out | 1/11/12 | One output score per cycle while valid. The index runs over 0..1946 and each index is sent once per frame. There is no backpressure. |
| `frame_done` | out | 1 | One-cycle pulse after the last score of a frame. |

**Input window.** `window[0]` holds the oldest feature and `window[439]` the
newest. Frame `f` is classified with the last 440 features received up to the
end of frame `f`; before the stream has filled the window, missing values are
zero. A frame starts as soon as the controller is idle and a new frame is
complete. The input keeps streaming during computation until the next frame
has fully arrived.

**Coefficient entries.** Entry `(layer * 1024 + first output row of the block
row) / BLOCK` describes one block row. Field `m`, in bits
`[m*SEL_W +: SEL_W]`, is the block-column index of the `m`-th kept block.

There are 384 entries for CGS-16 (18,432 bits) and 96 for CGS-64 (768 bits).
That covers four 1024-row matrices and one 2048-row output matrix. The
register file and the weight memory are not reset. Both must be loaded before
the first frame.

**Weight memory.** Each bank has one read port and one independent write port.
A read of a row that is written in the same cycle returns the old row. This
lets a training-style workload rewrite weights while inference runs, which is
the weight-update phase of "pseudo-training". For example, a layer's bank can
be rewritten while later layers are being computed.

## Files

| file | module |
|------|--------|
| `rtl/dnn_pkg.sv` | Widths and the `neuron_t` / `weight_t` types. |
| `rtl/cgs_dnn_top.sv` | Top level: the datapath above. |
| `rtl/input_shift_reg.sv` | 11 x 40 feature window with a valid/ready input. |
| `rtl/input_neurons.sv` | Input neurons register with its window/feedback mux. |
| `rtl/neuron_select.sv` | CGS block selection, 1024 → 128. |
| `rtl/mac_mux.sv` | Rotating 128 → 16 lane multiplexer. |
| `rtl/mac_unit.sv` | One MAC lane with result holding register. |
| `rtl/relu.sv` | ReLU with output-layer bypass. |
| `rtl/output_neurons.sv` | Output demux and register. |
| `rtl/weight_sram_bank.sv` | One 8192 x 128 bank, 1 read + 1 write port. |
| `rtl/weight_memory.sv` | Six banks, global row space, bank multiplexer. |
| `rtl/coef_regfile.sv` | Coefficient register file. |
| `rtl/dnn_fsm.sv` | Controller; contains the coefficient register file. |

Parameters of `cgs_dnn_top` and their defaults:

- `BLOCK = 16`
- `N_NEURONS = 1024`
- `N_SEL = 128`
- `N_MAC = 16`
- `N_FEAT = 40`
- `N_FRAMES = 11`
- `N_HIDDEN = 4`
- `N_OUT = 1947`
- `N_OUT_ROWS = 2048`
- `ACC_W = 28`
- `FRAC = 7`

The bank depth and the bank count are derived from these:
`(N_NEURONS / N_MAC) * N_SEL` rows per bank, and `N_HIDDEN + N_OUT_ROWS / N_NEURONS`
banks. The structure requires:

- powers of two for `N_NEURONS`, `N_SEL` and `N_MAC`;
- `N_SEL` a multiple of both `N_MAC` and `BLOCK`;
- `N_OUT_ROWS` a whole number of `N_NEURONS`;
- `N_SEL` no smaller than `N_MAC`, so that a drain ends before the next pass
  does.

## Simulation

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/dnn_pkg.sv tb/tb_cgs_dnn_full.sv \
          --top-module tb_cgs_dnn_full -o sim
./obj_dir/sim
```

The end-to-end benches instantiate `cgs_dnn_top` next to `tb/dnn_env.sv`. The
environment works as follows:

- It generates every weight, coefficient and feature from a hash of its
  coordinates, so no data files are needed.
- It writes the weights in the row layout described above.
- It streams three frames. During the second frame it rewrites all layer-0
  weights.
- It compares every score with a reference model. The model is a plain sum
  over the kept blocks and does not know about passes or rotation.
- It checks the 49,247-cycle latency.
- It checks that input backpressure, layer feedback, ReLU clamping, weight
  writes during computation and negative (bypassed) output scores all occur.

| testbench | what it runs |
|-----------|--------------|
| `tb_cgs_dnn_full` | Default parameters (CGS-16, full size): three frames, about 200k cycles, about 1 s. |
| `tb_cgs_dnn_cgs64` | The CGS-64 network at full size. |
| `tb_cgs_dnn_top` | The same structure at quarter width (256-neuron layers), for quick iteration. |
| `tb_dnn_fsm` | The controller alone: row order, stage-1 controls, coefficient fields, drain indices, feedback timing, latency. |
| `tb_<block>` | One per datapath block. |

## Where this implementation makes its own choices

The architecture fixes these:

- the layer sizes;
- 16 parallel MAC lanes;
- selecting 128 neurons by block-column coefficients held in the controller;
- 8-bit weights and 12-bit neuron buses;
- six 8192 x 128 weight banks;
- input and output neurons in registers with a feedback path;
- ReLU on hidden layers only.

The following are this design's own:

- **Schedule:** the pass/rotation schedule and the weight row layout that goes
  with it.
- **Drain:** draining 16 results through one ReLU during the next pass.
- **Fixed point:** the format and saturation.
- **Handshakes:** the feature handshake and its backpressure rule, the score
  stream, and the load ports for weights and coefficients.
- **Memory ports:** one read and one write port per bank, with read-old-data on
  a collision.
- **Coefficient count:** the file covers all five weight matrices, 384 x 48
  bits. A smaller count of 15,360 bits (five 1024-row layers) also appears for
  this architecture. It does not cover the doubled output layer that the
  six-bank weight memory holds, so the larger file was chosen.
- **Input padding:** the 440 inputs are padded to 1024 with zeros. The first
  layer is therefore treated like the others: its coefficients select among
  1024 input positions, of which only the first 440 are non-zero.

The following are not part of this RTL:

- **HMM/Viterbi decoder:** it takes `score_*` as input and is only referred to.
- **Training arithmetic:** gradient and momentum updates run offline. The
  hardware only accepts new weight rows.
- **Physical implementation:** 28 nm SRAM macros and the two-tier monolithic 3D
  implementation. `weight_sram_bank` is an array that synthesises to a generic
  memory, to be swapped for a macro with the same read latency.
