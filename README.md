# HyperSpike inference engine

HyperSpike classifies event-camera (DVS) recordings with two brain-inspired
models in series. A single layer of leaky integrate-and-fire (LIF) neurons
with **random, never-trained weights** turns the spike frames of a recording
into a binary feature vector. A **hyperdimensional (HDC) classifier** then
projects that vector into a 10,000-bit hypervector and picks the stored class
hypervector with the smallest Hamming distance. Only the class hypervectors
are trained (offline, by summing encoded examples), so there is no SNN
training. The wide binary representation makes the result tolerant of bit
errors in the memory that holds the model. The memory can therefore be a
cheap, error-prone technology with no error correction.

This repository is a synthesizable SystemVerilog model of that engine:

```
            cfg_* load port (model + query frames)          ber_thr
                      |                                        |
   +------------------v----------------------------------------v-----+
   | (A) parameter memory, four banks, bit errors injected on write  |
   |   weights      input frames      projection P      class HVs    |
   +------|--------------|------------------|----------------|-------+
          |              |                  |                |
   +------v--------------v------+    +------v----------------v-------+
   | (B) hs_lif_layer           |    | (C) hs_hdc_accel              |
   |  trace P, reset R,         |--->|  hs_rp_encoder  -> chunks ->  |
   |  membrane U, spikes S      | S  |  hs_hamming_search (XOR,      |
   |  over n_steps time steps   |    |  popcount, arg-min)           |
   +----------------------------+    +---------------|---------------+
                                                     v
                                        class_out, min_dist, class_dist
```

`hyperspike_top` sequences one query: run the SNN layer over `n_steps`
time steps, hand over the spike vector of the last step, encode it and
search it, then pulse `done`.

## A query, step by step

1. **Load.** The model and the query are written word by word through the
   load port: `cfg_we`, `cfg_bank`, `cfg_addr` and `cfg_wdata`. The word is
   taken from the low bits of `cfg_wdata`. The model is the weights, the
   projection matrix and the class hypervectors; the query is its spike
   frames. A query needs only its input frames rewritten. Do not write
   while `busy`.
2. **Start.** Pulse `start` with `n_steps` (1..512), `n_classes` (1..24),
   `alpha` (decay, unsigned Q0.16) and `u_th` (threshold, signed, 12
   fraction bits).
3. **SNN layer.** It runs `n_steps` steps from zero state. `features`
   then holds the final spike vector.
4. **HDC.** The feature vector is encoded and searched. `done` pulses, and
   `class_out`, `min_dist` and `class_dist[k]` stay valid until the next
   start.

Cycle count from the `start` cycle to `done`, exact:

```
n_steps * ((NN+1)*NI/L + 2) + 2 + (D/CH)*(NN+2) + 2*n_classes + 5
= n_steps * 41122 + 5167 + 2*n_classes        (default sizes)
```

The SNN layer takes almost all of the time: 256 neurons x 2560 synapses at
16 multiply-accumulates per cycle. The HDC part takes about 5,200 cycles.

## Memory banks and word layouts

| bank (`cfg_bank`) | words (default) | word width | word `a` holds |
|---|---|---|---|
| `BANK_WEIGHT` (0) | NN*NI/L = 40960 | L*16 = 256 | `a = i*(NI/L)+c`: lane `l` = signed weight W[i][c*L+l] |
| `BANK_INPUT` (1) | TMAX*NI/L = 81920 | L = 16 | `a = t*(NI/L)+c`: bit `l` = input spike of channel c*L+l at step t |
| `BANK_PROJ` (2) | (D/CH)*NN = 5120 | CH = 500 | `a = c*NN+j`: bit `d` = P[c*CH+d][j], 1 means +1, 0 means -1 |
| `BANK_CLASS` (3) | (D/CH)*NCLS = 480 | CH = 500 | `a = c*NCLS+k`: bits of class hypervector k, dimensions c*CH .. c*CH+CH-1 |

### Bit errors

Each bank (`hs_param_mem`) corrupts data as it is written. Each bit is
flipped with probability `ber_thr/65535`, so an error stays in memory for
every later read. For example, `ber_thr = 66` gives 0.1 % and `2228` gives
3.4 %. With `ber_thr = 0` the memory is ideal. Each bit has its own 16-bit
maximal-length LFSR (x^16+x^14+x^13+x^11+1), seeded at reset from the
bank's `SEED` and the bit index. All LFSRs of a bank advance once per
write. `flip_count` counts the bits corrupted so far. This lets you measure
the classifier's tolerance to errors in the weights, the projection and the
class hypervectors in simulation, or on an FPGA.

## (B) The LIF layer: `hs_lif_layer`

At each time step the layer evaluates the discretised LIF neuron in
spike-response form:

```
P_j <- alpha*P_j + S_in_j            pre-synaptic trace of input j
R_i <- alpha*R_i + alpha*U_i*S_i     reset/refractory term (old U, old S)
U_i <- sum_j W_ij*P_j - R_i          membrane potential
S_i <- (U_i >= U_th)                 spike
```

All state is zero at the start of a query. Number formats:

* **W**: signed 16-bit integer.
* **P**: unsigned Q4.12; one input spike adds 4096. P saturates at 65535.
* **U and R**: signed 48-bit with 12 fraction bits.
* **alpha**: unsigned Q0.16, so alpha = exp(-dt/tau_mem) * 65536.

Every alpha product is truncated towards minus infinity, an arithmetic
shift right by 16.

Schedule of one step:

* **Trace pass**, `NI/L` cycles. One input-bank word is read per cycle,
  and `L` trace values are updated in a register file of `NI/L` words.
* **Neuron pass**, `NN*NI/L` cycles. For neuron `i`, weight word `c` and
  trace word `c` are multiplied lane by lane and summed into an
  accumulator. At the neuron's last word, the datapath forms the new `R`
  from the stored `R`, `U` and `S`. It then forms `U = acc - R` and
  compares `U` with the threshold. The results are written back into
  per-neuron arrays.

Reads have one cycle of latency, so the pipeline has one issue stage and one
data stage. That is where the `+2` per step comes from.

The feature vector handed to the HDC side is the spike vector `S` after the
last step.

## (C) The HDC accelerator: `hs_hdc_accel`

**Encoding** (`hs_rp_encoder`) computes `H = sign(P F)`. `F` is the binary
feature vector and `P` is a D x NN matrix of +1/-1. Because `F` is binary,
each dimension is a sum of +1/-1 over the active features. The encoder works
on 500 dimensions at a time. For chunk `c` it reads projection word
`c*NN + j` for every feature `j`. For every active feature it adds +1 or -1
into 500 signed counters, one per dimension. A positive sum gives bit 1. A
sum of zero or less gives bit 0, so an empty feature vector encodes to the
all-zero hypervector. One chunk takes `NN+2` cycles.

**Search** (`hs_hamming_search`) takes each chunk on a valid/ready stream.
It XORs the chunk with the matching word of every class and adds the count
of ones (the mismatches) into a per-class distance register: one class per
cycle. After the last chunk, a sequential scan finds the smallest distance.
On a tie, the lowest class index wins.

The two units overlap. While the search compares chunk `c` with up to 24
classes (`n_classes+2` cycles), the encoder is already building chunk `c+1`
(`NN+2` cycles). The encoder holds a finished chunk only when the search is
still busy. At the default sizes this never happens. An assertion checks
that a chunk that is offered stays stable until it is taken.

Class hypervectors are trained offline and loaded. Training sums the
bipolar encoded hypervectors of the examples of each class and takes the
sign of the sum. The end-to-end testbenches show this procedure.

## Parameters

All defaults live in `rtl/hs_pkg.sv`. The top passes them down as module
parameters.

| parameter | default | origin |
|---|---|---|
| `HV_D` / `D` | 10000 | published design |
| 16-bit weights and trace | 16 | published design (16-bit fixed-point quantisation, integer weights) |
| time step | 1 ms per frame | published design (the frame rate is up to whoever prepares the frames) |
| `N_CLASS` / `NCLS` | 24 | largest class count of the three target data sets (ASL-DVS) |
| `N_IN` / `NI` | 2560 | own choice: holds a 34x34x2 frame (2312) or a 32x32x2 one (2048) |
| `N_NEUR` / `NN` | 256 | own choice: SNN layer width = feature length |
| `LANES` / `L` | 16 | own choice: synapses per cycle |
| `T_MAX` / `TMAX` | 512 | own choice: time steps the input bank holds |
| `HV_CHUNK` / `CH` | 500 | own choice: hypervector bits per memory word (must divide D) |

Constraints: `NI` must be a multiple of `L`, and `D` a multiple of `CH`.
`n_steps <= TMAX` and `n_classes <= NCLS`.

## Where this model departs from the published design

* **SNN hardware.** The published system runs the SNN layer on 56 Intel Loihi
  neuromorphic cores. Their internals are not part of this model. Here the
  layer is one time-multiplexed datapath that evaluates the same neuron
  equations in fixed point. Its speed is therefore not Loihi's.
* **HDC hardware.** The HDC accelerator of the published design is based on
  an existing low-power HDC engine whose internals are not reproduced. The
  chunked encoder/search pipeline here is a straightforward design of the
  same function.
* **Interfaces.** The load port, the bank split, the word layouts, the
  run-time `alpha` and `u_th`, the 512-step input bank and the controller
  are choices of this model.
* **Error model.** The published work injected bit errors in software. Here
  they are injected in hardware at write time with independent per-bit
  probabilities.
* **Features.** The features are the output spikes of the final step.
  Other read-outs, such as spike counts or membrane potentials, would need a
  small change in `hs_lif_layer`.
* **Sensor.** The DVS sensor and its event-to-frame conversion are outside
  the model. Frames are written into the input bank.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

| testbench | what it checks |
|---|---|
| `tb_hs_param_mem` | exact read-back with no errors; every bit flipped at the maximum rate; ~1 % flips at `ber_thr=655`, and `flip_count` agrees with the read-back |
| `tb_hs_lif_layer` | spike vectors bit-exact against a 64-bit reference of the equations; exact cycle count; spikes and post-spike resets occur; `n_steps=0` |
| `tb_hs_rp_encoder` | every chunk against `sign(P F)` computed independently; random back-pressure; unstalled cycle count |
| `tb_hs_hamming_search` | all distances, minimum and class; variable class count; forced tie; cycle count |
| `tb_hs_hdc_accel` | trained class hypervectors, noisy queries: class and distance equal the reference; cycle count; accuracy |
| `tb_hyperspike_top` | reduced sizes (128 inputs, 64 neurons, D=512, 5 classes), 20 queries: features, all distances and class bit-exact, exact cycle count, then the model reloaded at 1 % BER |
| `tb_hyperspike_ber` | reduced sizes with D=1,000: the whole model stored at 0 %, 0.1 % and 3.4 % bit error rate, then 3.4 % in the hypervector banks only; accuracy on the same 30 queries; corrupted-bit counts within 30 % of expectation; loss at most 15 points at 0.1 % and at most 10 points with errors only in the hypervectors |
| `tb_hyperspike_full` | all defaults (2560 inputs, 256 neurons, D=10,000, 24 classes), 24 queries of 4 steps, same checks |

The end-to-end benches build a synthetic workload. Each class has a set of
busy input channels. An untrained random SNN layer extracts the features,
and class hypervectors are trained from reference features. With an ideal
memory, every query of the full-size run lands in its true class. After the
model is reloaded with 1 % bit errors, 20 of 24 still do. Every result was
checked bit-exact against the reference when the memory is ideal. The
benches do not use real DVS data.

In the bit-error sweep, 0.1 % costs no accuracy (96 % error-free, 100 %
at 0.1 %). At 3.4 % accuracy falls to about 23 %. The errors then hit the
16-bit SNN weights as well as the hypervectors. One flipped high-order bit
turns a weight into a large outlier, and the random feature extractor no
longer separates the classes. With the same 3.4 % rate confined to the
projection and class hypervectors, accuracy stays at 96 %.

To run a bench with plain Verilator (5.x):

```
verilator --binary --timing --assert -Irtl --top-module tb_hyperspike_top \
    rtl/hs_pkg.sv rtl/hs_param_mem.sv rtl/hs_lif_layer.sv rtl/hs_rp_encoder.sv \
    rtl/hs_hamming_search.sv rtl/hs_hdc_accel.sv rtl/hyperspike_top.sv \
    tb/tb_hyperspike_top.sv -Mdir obj
./obj/Vtb_hyperspike_top
```

Replace the top module and testbench file for the other benches.
`tb_hyperspike_full` builds in under a minute and runs in a few minutes.
Signals that nothing initialises start at random values in Verilator, so
every register that is read has a reset.
