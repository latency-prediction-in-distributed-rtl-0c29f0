# LSTM latency predictor

A distributed control system schedules tasks better if it knows how long the next task will
take. This design predicts that latency in hardware. Each completed task delivers one sample:
its measured latency and six readings of the system state, such as load, queue length and
priority. A single-layer LSTM with 128 hidden units and 8-bit fixed-point weights runs over the
last 10 samples and produces one number, the expected latency of the next task. When the
scheduler later reports the true latency and the error is larger than a threshold, the chip
fine-tunes its output layer with the Adam rule. Training itself happens offline, and the host
loads the trained weights over a shared configuration bus.

Everything is plain synthesizable SystemVerilog with generic multipliers and memories. It
targets a large FPGA such as an Alveo-class card.

## Data flow

```
 s_valid/s_latency/s_state
        |
  input_interface   one-entry valid/ready buffer, counts stalled cycles
        |
  min_max_norm x7   (u - min) / (max - min) -> Q3.12 in [0, 1]
        |
  feature_extract   shift register of the last HIST latencies + state -> 16 x 8-bit vector
        |
  window_cache      ring buffer of DEPTH vectors; the WIN newest are pinned during a prediction
        |
  neural_engine     lstm_core + state_regs + 4 gate weight memories + 4 bias memories
        |  final h (128 x Q0.7)
  output_layer      y = W_out . h + b_out  ->  y_norm (Q3.12), y_latency (raw units)
        |                                         |
        |                               y_valid/y_latency to the scheduler
  feedback_unit  <-- fb_valid/fb_latency (measured latency of the predicted task)
        |  err = y_pred - y_true, exceed = |err| > delta
  adam_update       updates the 128 output weights and the output bias in place
```

`main_ctrl` holds the configuration registers and sequences the loop. The loop is: collect a
sample, predict, hand the prediction to the scheduler, wait for the measured latency, and
update if the miss was large. Only one of prediction, output layer and update runs at a time.
Sample collection runs alongside all of them.

## The LSTM core: one column per clock, four gates side by side

This is the part that sets the throughput and the part most worth understanding before you
change anything.

Each gate (i, f, g, o) has its own weight memory. Row `r` of a gate holds the concatenated
row `[W_r | U_r]`, which has K = IN + H = 144 columns, at addresses `r*K .. r*K+K-1`. One
shared address reads all four memories in the same clock. The four multiply-accumulate lanes
therefore see the weights of the same column of four gates. The operand of column `k` is
`x_t[k]` for k < IN and `h_{t-1}[k-IN]` otherwise. It comes from the window cache or from the
state register.

The pipeline stages are:

| stage | work |
|-------|------|
| issue | address weights, bias, x and h(t-1) |
| S1    | four 8x8 products |
| S2    | accumulate; on the first column the bias is added, shifted left 7 bits to the accumulator format Q13 |
| P0    | requantize each sum to a Q4.4 LUT index; read sigmoid/tanh ROMs; read c(t-1) |
| P1    | c(t) = f*c(t-1) + i*g, rounded to Q5.10 and written back |
| P2    | tanh(c(t)) ROM read |
| P3    | h(t) = o * tanh(c(t)), rounded to Q0.7 and written to the other h bank |

Rows follow each other without a gap. The tail (P0–P3) of row r overlaps the
multiply-accumulate of row r+1. Between time steps the pipeline drains for 7 clocks, so that
step t+1 reads a complete h(t). Then the two h banks swap roles. The state register keeps
h(t-1) in one bank while h(t) is written into the other. The cell state c is updated in place,
because each c element is read and written by the same row.

One prediction takes

    WIN * (H*(IN+H) + 7) + 1 = 10 * (128*144 + 7) + 1 = 184,391 clocks

in the engine, plus H + 2 = 130 in the output layer and one for the result register. At
300 MHz this is about 1,600 predictions per second. It uses four multipliers for the gates and
one for the output neuron. More lanes per gate would divide the H*K term. That is the natural
extension if more speed is needed, but it is not built.

## Number formats

| quantity | width | format |
|---|---|---|
| weights, biases (gates and output) | 8 | Q1.6, range [-2, 2) |
| x, h, gate outputs | 8 | Q0.7 |
| cell state c | 16 | Q5.10 |
| accumulator | 32 | 13 fraction bits |
| activation LUT index | 8 | Q4.4, input clipped to [-8, 8) |
| normalized values, y_norm, delta, err | 16 (err 17) | Q3.12, 1.0 = 4096 |
| raw latency | 16 | unsigned, 0.01 ms units |

Every narrowing step is done by `quantizer`: round to nearest (ties upward) and saturate. This
is the rule W_q = round(W * 2^q) / 2^q applied to fraction bits. It is used on the
parameters as they are loaded, on the inputs, on the gate sums, on c and h, and on the
updated output weights. The 8-bit weights come from
the source design. How the bits are split between integer and fraction is this design's own
choice.

The activation ROMs `rtl/sigmoid_lut.hex` and `rtl/tanh_lut.hex` have 256 entries each, indexed
by the Q4.4 pre-activation `a`:

    sigmoid[a] = min(127, round(128 / (1 + exp(-a/16))))
    tanh[a]    = clip(round(128 * tanh(a/16)), -127, 127)

Rounding is half away from zero. Address `a` is the two's-complement byte, so entries 0x80 to
0xFF are the negative inputs.

## Normalization and de-normalization

The seven raw channels (latency plus six state readings) are scaled to [0, 1] by min-max
scaling. Instead of dividing, the host writes one reciprocal per channel, and the result is

    recip = round(2^28 / (max - min))
    y     = clip((((u - min) * recip) + 2^15) >> 16, 0, 4096)

The prediction is mapped back to raw units with the latency range:
`y_latency = clip(min + (y_norm * range + 2048) >> 12, 0, 65535)`. The threshold delta and the
error are compared in the normalized domain.

## Window cache and stalls

The cache is a ring of DEPTH (16) input vectors. When a prediction starts, the controller
*locks* the cache: the base of the window is pinned at the WIN newest vectors. New samples keep
arriving into the free slots while the engine runs. Only when the writer would overwrite the
pinned window does `wr_ready` drop. The stall then propagates back to `s_ready`, and the
input interface counts the stalled cycles (register N_STALL). The lock is released when the
engine finishes. The output layer and the update work only on the stored h, not on the cache.

## Online update

When feedback is enabled and |y_pred - y_true| > delta, `adam_update` walks the 128 output
weights and then the output bias. For each parameter j, its input u_j is the h_j of that
prediction for a weight, and the constant 1.0 for the bias:

    g_j = err * u_j                       saturated to 16 bit, Q3.12
    m_j += (1-b1) * (g_j - m_j)           b1 = 0.9,   (1-b1) = 6554 / 2^16
    v_j += (1-b2) * (g_j^2 - v_j)         b2 = 0.999, (1-b2) = 66 / 2^16
    W_j -= alpha * m_j / sqrt(v_j + eps)  alpha = 0.001 = 16 / 2^14, eps = 1 LSB of v

A 16-bit master copy (Q1.14) of each parameter holds steps smaller than one 8-bit LSB. After
each step it is rounded to Q1.6 and written into the output-layer memory, or into the BOUT
register for the bias. The square root is a
17-clock bit-serial unit (`isqrt`) and the division a 33-clock restoring divider (`divider`).
One update takes (H+1)*53 + 1 = 6,838 clocks. Writing a weight or BOUT over the bus also loads
its master copy and clears its moments.

Adam needs gradients. Only the output layer is updated, because its gradient needs nothing
but the stored h. Back-propagation into the LSTM gate weights is not implemented.

## Configuration bus and registers

The bus takes single-clock word writes (`bus_valid & bus_we`). A read returns the data on
`bus_rdata` with `bus_rvalid` one clock after the request. `bus_addr[23:20]` selects the
region, and the low bits hold an element index:

| region | contents | index |
|---|---|---|
| 0 | registers | see below |
| 1, 2, 3, 4 | gate i, f, g, o weights | row*(IN+H) + col |
| 5 | gate biases | gate*H + row |
| 6 | output weights | j |

Parameter memories are write-only. Every parameter (gate weights, biases, output weights,
BOUT) is written as a 16-bit Q3.12 number in `bus_wdata[15:0]`. The chip rounds it to 8-bit
Q1.6, with ties going up and values outside [-2, 2) saturated. The host can therefore send
trained weights without quantizing them first. STATUS[1] records that a value was clipped.

| reg | name | meaning |
|---|---|---|
| 0x00 | CTRL | [0] auto start, [1] wait for feedback, [2] online update enable, [8] start one prediction (write 1) |
| 0x01 | STATUS | [0] busy, [1] a parameter was clipped on load (any write clears it), [6:4] controller state |
| 0x02 | DELTA | update threshold, Q3.12 |
| 0x03 | RESULT | [15:0] last prediction in raw units, [31:16] normalized |
| 0x04 | N_INFER | predictions made |
| 0x05 | N_UPDATE | online updates made |
| 0x06 | N_STALL | clocks the sample input was stalled |
| 0x07 | BOUT | output bias: written as Q3.12, stored and read back as Q1.6 |
| 0x08 | RANGE | latency max - min, for de-normalization |
| 0x10+ch | MIN[ch] | minimum of raw channel ch (0 = latency, 1..6 = state) |
| 0x20+ch | RECIP[ch] | round(2^28 / (max - min)) of channel ch |

Reset is asynchronous and active low. After reset the minimums are 0, the reciprocals are
4096 (a range of 65536), and all modes are off.

In auto mode a prediction starts after every new sample, once the cache holds a full window.
Writing CTRL[8] starts one by hand. `y_valid` pulses for one clock with the result.

## Where this design departs from its source

- **One LSTM layer, 16 inputs.** The architecture description gives a single layer with
  16 inputs: 10 past latencies and 6 state values. The experiment description mentions
  6 input features and two stacked layers. The hardware follows the single-layer,
  16-input version.
- **Epsilon.** The update equation puts epsilon inside the square root. A later summary puts
  it outside. Here it is inside.
- **Update scope.** Only the output layer (weights and bias) is fine-tuned (see above). There
  is no Adam bias correction, and there is none in the source equations either.
- **Master copy.** The source updates the 8-bit weights directly. With a learning rate of
  0.001, one step is far smaller than one 8-bit LSB and would round away. So a 16-bit copy
  accumulates the steps, and the 8-bit weight is re-derived from it.
- **Normalization in hardware.** The source normalizes features while preparing data. Its
  block diagram places normalization in the hardware input path, so it is built here with
  host-supplied constants. Outlier removal (IQR) and the one-hot encoding of task type and
  priority are left to the host. They arrive as state readings.
- **Not built:** the task scheduler that uses the prediction ("delay optimization"); the
  y_* and fb_* ports are its interface. Also not built are the FPGA-specific resource
  allocation, and the training itself (MSE loss, mini-batches, early stopping, gradient
  clipping).
- **Own choices:** all widths and fraction bits other than the 8-bit weights, the bus
  protocol and register map, the cache depth of 16, the drain between time steps, one
  prediction at a time, and the round-half-up rule.

## Files

| file | role |
|---|---|
| `rtl/lstm_pkg.sv` | widths, formats, gate enum, bus map |
| `rtl/lstm_latency_predictor.sv` | top level |
| `rtl/main_ctrl.sv` | register file and sequencer |
| `rtl/input_interface.sv` | sample buffer, stall counter |
| `rtl/min_max_norm.sv` | normalization of one channel |
| `rtl/feature_extract.sv` | latency history and 16-element vector |
| `rtl/window_cache.sv` | ring buffer with window lock |
| `rtl/neural_engine.sv` | weight/bias memories, core and state |
| `rtl/lstm_core.sv` | gate-parallel pipelined LSTM |
| `rtl/state_regs.sv` | h ping-pong banks and c memory |
| `rtl/act_lut.sv` | sigmoid / tanh ROM |
| `rtl/quantizer.sv` | round and saturate |
| `rtl/weight_mem.sv` | synchronous 1W1R memory |
| `rtl/output_layer.sv` | output neuron and de-normalization |
| `rtl/feedback_unit.sv` | error and threshold |
| `rtl/adam_update.sv`, `rtl/isqrt.sv`, `rtl/divider.sv` | online update |

Each file starts with a comment that gives its interface and timing.

## Simulation

Each block has a self-checking testbench in `tb/`. Each one compares the block against the
integer reference models in `tb/lstm_ref_pkg.sv`, which are written independently of the RTL
and reproduce it bit for bit. Each one ends with a line `TB_RESULT checks=N failures=M`. Run
them from the directory that holds `rtl/` and `tb/`, because the LUT files are opened by the
relative path `rtl/...`:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/lstm_pkg.sv tb/lstm_ref_pkg.sv tb/tb_lstm_core.sv --top tb_lstm_core -o sim
./obj_dir/sim
```

There are two end-to-end tests:

- `tb_lstm_latency_predictor` runs the whole predictor at a reduced size (HIST=4, H=8,
  WIN=4, DEPTH=8) and takes a few seconds.
- `tb_lstm_latency_predictor_full` runs it at the default size: 16 inputs, 128 hidden
  units, a window of 10 and 74,368 parameters loaded over the bus. It takes about
  5 seconds with verilator.

Both tests do the following:

- check every prediction and its latency against the reference;
- make each mechanism happen and count it: manual and automatic starts, samples arriving
  during an inference, an input stall on a full cache, feedback within delta, and online
  updates;
- after the updates, check the later predictions against a reference that applied the same
  Adam steps to its own copy of the output weights and bias, which shows that the updated
  values on chip are the same bit for bit.

A test fails if any of these mechanisms never occurs.

## How far to trust it

- **What the tests prove.** The reference models are plain integer code that uses the same
  number formats, rounding rules and LUT formulas. Passing shows that the RTL computes
  exactly that fixed-point arithmetic, including the clock counts given above.
- **What they do not prove.** The tests do not measure how far 8-bit weights, Q0.7 states
  and the 256-entry LUTs move a prediction from a floating-point LSTM with the same weights.
  That depends on the trained weights, and none are included. The random weights in the tests
  only exercise the datapath.
- **What has not been done.** No FPGA build was run, so the 300 MHz figure is an estimate.
