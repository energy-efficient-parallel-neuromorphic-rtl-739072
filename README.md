# A K-way parallel spiking neural network processor with on-chip STDP learning and approximate multipliers

This design runs a two-layer spiking neural network of leaky integrate-and-fire (LIF) neurons. It learns by spike-timing-dependent plasticity (STDP) and is sized for MNIST digit recognition. The network has:

- 784 input neurons, one per pixel, driven by random external spikes;
- 800 output neurons, each connected to every input neuron through a learned 4-bit weight (627,200 plastic synapses);
- a few inhibitory neurons with fixed weights, which make the output layer compete (winner-take-all).

A host computer sends the input spikes of each biological time step over a UART. The processor advances the network by one step. It then sends back which output neurons fired and, in training mode, updates the weights.

Two ideas shape the hardware:

1. **Loop-I parallelism (LIP).** The network update is a double loop: an outer loop over postsynaptic neurons *i*, and an inner loop over their presynaptic inputs *j*. The processor parallelises the outer loop. K LIF arithmetic units (default K = 32) each update a different neuron. Each unit reads its weights from its own single-port weight memory, so the K units share one address and never conflict.
2. **Approximate multiplication.** The multipliers are fixed-width 16×16 radix-4 Booth multipliers. They generate only the upper half of the partial-product bits, and then add a small correction. The size of the correction depends on how many Booth digits of the multiplier are zero. This makes each multiplier about a quarter smaller, and the answer is still within a few LSBs of the exact rounded product.

Everything is plain synthesizable SystemVerilog in `rtl/`. Self-checking testbenches are in `tb/`.

## The network and the neuron arithmetic

Each excitatory neuron *i* has a membrane potential `Vmem(i)` (16-bit signed), a firing flag `S(i)` and the time it last fired, `Tfire(i)` (16 bits). In every step, each neuron's potential is updated as

```
Vnew = V + K_SYN * sum_j W(j,i)*S(j)  +  K_EXT*E(i)  +  Inh(i)  -  V_LEAK
```

- `E(i)` is the external spike (input layer only).
- `K_EXT` is a random amplitude, `KEXT_MIN + rnd[7:0]`. The random number comes from a 16-bit LFSR, one per lane.
- `Inh(i)` is the sum of the fixed weights of the inhibitory neurons of that layer that fired.
- The result saturates to 16 bits.

After all potentials are updated, every neuron is compared with `V_TH` in the same cycle. A neuron that reaches it fires: `S` is set, `Tfire` gets the current time, and `V` goes back to `V_REST`.

The weighted sum is built one presynaptic neuron per clock: the accumulator adds `W` whenever `S(j)` is set. The `K_SYN` scaling then uses the unit's one multiplier. The 16-bit sum is read as a Q8.8 number, so the synaptic term is `round(K_SYN * sum / 65536)` for a Q8.8 `K_SYN`.

The inhibitory part of the network has fixed synapses, so it needs no memory:

- six inhibitory neurons listen to and inhibit all input neurons;
- one inhibitory neuron does the same for the output layer.

`inhibitory_unit` holds these 7 neurons. It computes their input as a constant weight times the number of firing neurons in their layer, using the previous step's firing flags. Every constant is a module parameter.

## The memory organisation

With K lanes, output neuron *i* belongs to lane `i mod K`. All of its weights are in that lane's bank, at address `(i div K)*N_IN + j`.

| memory | count | words × width | total (K = 32) |
|---|---|---|---|
| weight bank | K | ceil(N_OUT/K)·N_IN × 4 bit | 32 × 19,600 × 4 = 2,508,800 bits |
| A+ trace | 1 | N_OUT·N_IN × 8 bit | 5,017,600 bits |
| A− trace | 1 | N_OUT·N_IN × 8 bit | 5,017,600 bits |

All are single-port memories (`sp_bram`): read-first, with one cycle of read latency. `synapse_rw_if` routes access to the weight banks in two ways:

- in the neuron stage, one address goes to all K banks, giving K weights per cycle;
- in the learning stage and during a weight dump, one bank is selected for reading or writing.

The memories have no reset. Their write enables are held off while reset is asserted, so a stored value cannot be overwritten before the control state is defined. At reset the weights are loaded with a fixed pseudo-random pattern of values 4..11, from an address hash in `sp_bram`. A+ and A− start at the `A_PLUS_INIT` and `A_MINUS_INIT` parameters.

The neuron state is kept in registers in `neuron_unit`, with K read/write ports: 1584 × (16 + 16 + 1) bits. The firing flags of all neurons are visible at once as a vector.

## One biological time step: spike I/O, NOS, LOS

`sys_controller` sequences each step in three stages.

1. **Spike I/O.** The input spikes arrive from the UART into the input half of `spike_io_buffer`. That half is double-buffered.
2. **Neuron operation stage (NOS).** The global timer increments, and the K arithmetic units work in lock step:
   - *Input layer:* ceil(N_IN/K) cycles. Each lane updates one input neuron per cycle from its external spike and inhibition.
   - *Output layer:* ceil(N_OUT/K) groups of N_IN + 2 cycles. In cycle *j* all banks are read at `g*N_IN + j`. One cycle later the K weights are accumulated against `S(j)`. The group's last cycle writes the K new potentials.
   - *Inhibitory neurons:* 1 cycle.
   - *Fire check:* 1 cycle, covering all neurons.

   At the defaults this is 25 + 25·786 + 2 = 19,677 cycles, plus one cycle to load the input vector. With a single lane (K = 1) the output layer alone would take 800·786 cycles. The output firing flags are then captured and sent back.
3. **Learning operation stage (LOS).** This stage runs in training mode only. `stdp_unit` scans the 800 output neurons, spending one cycle on each neuron that did not fire. For each neuron *i* that fired, it updates all of its N_IN synapses, two cycles per synapse (read, then write back):

   ```
   dT = T_global - Tfire(j)
   A+ = A+ * exp(-dT/tau1) + OFFSET1
   A- = A- * exp(-dT/tau2) + OFFSET2
   W  = sat_0..15( W + round(A+ + A- + OFFSET3) )
   ```

   The busy flag stays high for N_OUT + 1 + 2·N_IN·(number of fired outputs) cycles. It is not parallelised, so in training it usually dominates the step time.

The spike I/O of step *t+1* shares no data with the LOS of step *t*, so the controller takes the next frame while the LOS is still running. The next NOS starts only when the LOS has finished. In recognition mode there is no LOS, and the step rate scales almost linearly with K.

### Host protocol

Communication is 8N1 UART at `CLKS_PER_BIT` clocks per bit; 1042 gives 115,200 baud at 120 MHz. The host sends a command byte, followed by data for the two step commands:

| byte | command | followed by | processor answers |
|---|---|---|---|
| `0x00` | one step, recognition | ceil(N_IN/8) spike bytes | ceil(N_OUT/8) output-spike bytes |
| `0x01` | one step, training (NOS + LOS) | ceil(N_IN/8) spike bytes | ceil(N_OUT/8) output-spike bytes |
| `0x02` | dump weights | — | N_OUT·N_IN/2 bytes |
| `0x03` | clear: new pattern | — | nothing |

Bit packing:

- **Spike bytes:** neuron `8b+k` is bit *k* of byte *b*.
- **Weight dump:** two 4-bit weights per byte, with the lower input index in the low nibble. Weights are sent output neuron by output neuron.

Clear resets every membrane potential, firing flag and firing time, and sets the timer back to 256. Never-fired neurons therefore look "long ago" to STDP, and their exponential reads as fully decayed. Bytes that arrive during a NOS are dropped, so the host should wait for each answer before sending the next frame.

## The approximate Booth multiplier

`booth_mult_std` and `booth_mult_approx` share an interface:

- Inputs are two Q8.8 operands (16-bit two's complement).
- The output is the rounded integer part of the product, `(a*b + 2^15) >> 16`, truncated to 16 bits.
- The multiplier operand is recoded into 8 radix-4 Booth digits by `booth_r4_encoder`. Its one/two/neg/zero flags select ±a, ±2a or 0 for each partial product.

The exact version forms all partial-product bits and adds a rounding 1 in column 15.

The approximate version has three parts:

- **Low-precision unit:** builds only the bits of columns 15..31. Nothing below column 15 is generated, including the two's-complement +1 correction bits of negative digits.
- **Signature generator:** counts the zero digits *z* from the encoder's existing zero flags. It picks a compensation of 2 output LSBs if z ≤ 1, 1 LSB if 2 ≤ z ≤ 5, and 0 if z ≥ 6.
- **Combine unit:** one 16-bit adder adds the compensation.

The grouping follows from a simple estimate. Each non-zero digit loses on average about a quarter of an output LSB. The three ranges of *z* therefore have mean losses closest to 2, 1 and 0. Against the exact rounded product, the error over random operands stays within −2..+3 LSB, and the mean error is about +0.1 LSB. `snn_mult` selects between the two versions with `APPROX` (default 1).

The multipliers are used in two places:

- one in each LIF arithmetic unit, for the `K_SYN` scaling;
- two in the STDP unit: `A+ × exp` and `A− × exp`. The 8-bit trace is extended to Q8.8 as `{A, 8'h00}`.

## STDP number formats and the exponential tables

- **A+ and A−:** signed 8-bit numbers in units of 1/16 of a weight step (Q4.4). They saturate.
- **Weights:** unsigned 4-bit, saturating at 0 and 15. `W + dW` is rounded to the nearest step.
- **Exponential tables:** `exp(-dT/tau)` comes from `exp_lut`, a 256-entry Q8.8 table that saturates for dT ≥ 256. The table is computed at elaboration, with no data file. It starts from 1.0 and multiplies repeatedly by `R = round(exp(-1/tau)·2^24)`, in Q0.24, rounding each entry to Q8.8.
- **Defaults:** tau1 = 16 (R = 15,760,736), tau2 = 32 (R = 16,261,035), OFFSET1 = 4, OFFSET2 = −3, OFFSET3 = −2.

## Parameters

Top-level parameters of `neuro_top`:

| parameter | default | meaning |
|---|---|---|
| `N_IN` | 784 | input excitatory neurons (28×28 image) |
| `N_OUT` | 800 | output excitatory neurons |
| `K` | 32 | lanes: LIF units and weight banks |
| `APPROX` | 1 | 1 = approximate, 0 = exact Booth multipliers |
| `CLKS_PER_BIT` | 1042 | UART bit time in clocks |
| `V_TH`, `V_REST`, `V_LEAK` | 1024, 0, 16 | threshold, reset value, leak per step |
| `K_SYN` | 16'h4000 | synaptic scale, Q8.8 (64.0) |
| `KEXT_MIN` | 256 | smallest external spike amplitude |
| `A_PLUS_INIT`, `A_MINUS_INIT` | 32, −24 | initial traces, Q4.4 |

These parameters are fixed in the lower blocks:

- the 6 + 1 inhibitory neurons and their weights;
- the STDP offsets and time constants;
- the 16-bit widths, set in `snn_pkg`.

## How this design relates to the published architecture

The design follows a published FPGA architecture: "Energy efficient parallel neuromorphic architectures with approximate arithmetic on FPGA". Taken from it:

- the network and its sizes;
- the LIP memory organisation with 32 weight banks and separate A+/A− memories;
- the three-stage step, and the overlap of spike I/O with learning;
- the serial accumulation in each arithmetic unit;
- the sequential STDP stage that only visits output neurons that fired;
- constant inhibitory weights in logic, LFSR random spike amplitudes, and table-based exponentials;
- the fixed-width Booth multiplier with three-group compensation of 2/1/0.

The following are this design's own choices and may differ from the original:

- **Word widths.** The 4-bit weights, 8-bit traces and 16-bit potentials and times are inferred from the published memory and register sizes.
- **Neuron constants.** Threshold, leak, scaling, K_EXT range, inhibitory weights, STDP offsets, time constants, and initial weights and traces are not given numerically. They are parameters here.
- **Inhibitory weights.** The original uses ten distinct constant weights on its inhibitory synapses. This design uses nine:
  - one excitatory-to-inhibitory weight per layer;
  - one output-layer inhibitory weight;
  - six graded weights for the input-layer inhibitory neurons.
- **Multiplier grouping.** The rule that sorts operands into the three compensation groups is the zero-digit count described above. The original forms its groups from Boolean combinations of Booth-encoder signals that are not spelled out, so this rule stands in for them.
- **STDP datapath.** The STDP unit has two multipliers and spends two cycles per synapse.
- **Fire check.** The check is one parallel compare of all neurons.
- **Host link.** The UART frame format, the weight dump and the clear command are this design's own.
- **Clocking.** The clock comes straight in on `clk`. A clock manager (120 MHz in the original) and the host software are outside the RTL.
- **Loop-J alternative.** The loop-J parallel alternative was not built. It reads all 784 weights of one neuron at once into an adder tree over 1568 inputs.

## Verification

Each block has a self-checking testbench, `tb/tb_<block>.sv`. It compares the block with an independent model in `tb/snn_ref_pkg.sv`, which holds bit-exact integer models of:

- the multipliers, the LFSR and the memory initialisation;
- the exponential table;
- the whole network, in the class `snn_model`.

At the end each testbench prints `TB_RESULT checks=N failures=M`, and a watchdog stops a hung run. The checks include:

- the exact multiplier on corner cases and 20,000 random operand pairs;
- the approximate multiplier against a model that sums the same partial-product bits, plus its error bound and mean error;
- cycle counts of the NOS and LOS;
- UART bit timing.

Three testbenches run the whole design:

- **`tb_neuro_top`** uses a small network: 16 inputs, 8 outputs, K = 4, with constants that make neurons fire quickly. It drives the processor only through its UART pins, with training and recognition steps, clear and weight dumps. It compares every answer and every dumped weight with `snn_model`. It counts that each mechanism happened at least once, including:
  - firing in each layer;
  - inhibitory firing in both layers;
  - skipped and updated output neurons in the LOS;
  - spike I/O overlapping the LOS;
  - weight saturation.
- **`tb_lip_sweep`** runs one pattern through ten copies of the processor, one after another. It covers K = 1, 2, 4, 8 and 32, each with exact and with approximate multipliers, on a 32-input, 40-output network. Each run is checked bit for bit against the model. The bench also checks:
  - the neuron-stage length at every K;
  - that the neuron stage is independent of the multiplier type;
  - that recognition steps start no learning stage.

  It prints the cycle counts and the speedups over K = 1. On this small network, K = 32 shortens the neuron stage 19.4×. Training speeds up only about 6× here, because learning dominates at this size. At full size, K = 32 shortens the neuron stage from 629,587 to 19,678 cycles.
- **`tb_neuro_top_full`** uses every default: 784-800, K = 32, approximate multipliers. It trains on a fixed pattern until learning takes place, then does one recognition step. It checks all 627,200 weights and both trace memories against the model, and the NOS length of 19,678 cycles. It runs in a little over a minute with Verilator.

To simulate one testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/snn_pkg.sv tb/snn_ref_pkg.sv tb/tb_neuro_top.sv \
    -y rtl -y tb --top-module tb_neuro_top -o sim
./obj_dir/sim
```

Replace `tb_neuro_top` with any other testbench name. Add `-Wno-fatal` if your Verilator version treats width warnings as errors.

## Changing the design

- **Degree of parallelism.** Change `K`. Banks and lanes follow, and `N_OUT` need not be a multiple of K.
- **Network size.** `N_IN` and `N_OUT` set all memory depths and counters. `CLKS_PER_BIT` sets the UART bit time, which is the first thing to lower when simulating small configurations.
- **Exact arithmetic.** `APPROX = 0` swaps every multiplier for the exact one. The reference model has the same switch.
