# Multi-layer spiking convolution processor (event-driven, row by row)

This is synthesizable SystemVerilog for an event-driven convolution processor
for spiking convolutional neural networks. Input is a stream of
address-events, for example from a DVS retina sensor. Each event is a pixel
position (x, y). The processor convolves each event with up to 64 kernels,
from 1x1 to 7x7. Every kernel has its own map of 128x128 leaky
integrate-and-fire (LIF) neurons. When a neuron crosses its threshold it
sends out a spike. No frames are involved: an event only adds weights to
membrane potentials, so the datapath needs adders but no multipliers for the
convolution.

The main idea is the **layer mask**. The 64 convolution engines are not all
tied to one kernel size and one layer. A host writes, for each engine, the
number of the layer that engine belongs to. Each layer has its own parameter
bank: kernel size, threshold, leakage, refractory period and pooling.
Spikes from one layer are pooled and passed straight to the engines of the
next layer, so a small multi-layer network runs on one chip without
reconfiguring between layers. Spikes from the last layer leave on the AER
output.

The architecture follows the FPGA processor described in *Spiking row-by-row
FPGA Multi-kernel and Multi-layer Convolution Processor*. That description
is at block level. The internal mechanisms, widths, handshakes and the
register map here are this implementation's own, and are marked as such
below and in each file's header.

## Data flow

```
 AER in (4-phase) ─► aer_rx ─► queue L0 ─► layer_dispatch L0 ─► engines with mask = 0 ─┐
                                  ▲                                                     │ spikes
                 queue L1 ◄───────┼──── event_router ◄── spike_arbiter ◄────────────────┤
                    │             │      (pool, then: next layer or AER out)            │
                    ▼             │                                                     │
             layer_dispatch L1 ─► engines with mask = 1 ────────────────────────────────┘
                                                       event_router ─► out queue ─► aer_tx ─► AER out (4-phase)
 host bus ─► config_regs ─► layer banks + layer mask ─► param_select (one per engine)
             global_counters (leakage time, refractory time) ─► every engine
```

* `aer_rx` takes an input event {y, x} and puts it in the layer-0 queue. If
  that queue is full, it holds back `ack`, which stalls the sender.
* `layer_dispatch` for layer *l* waits until the queue has an event and all
  engines of the layer are idle. It then pops the event and starts all those
  engines in the same cycle. Engines of one layer share the kernel size, so
  they finish together.
* Each engine `conv_engine` presents its spikes {engine id, y, x} one at a
  time with a valid/ready handshake. `spike_arbiter` grants one spike per
  clock, round robin. It only considers engines whose destination queue has
  room, so a full queue for one layer never blocks another layer.
* `event_router` looks up the layer of the sending engine.
  * If that layer pools, the address is halved (`event_pool`).
  * If the layer is the last active one (the `last_layer` field of CTRL),
    the spike goes to the AER output queue, keeping its engine id.
  * Otherwise only the pooled (x, y) goes to the next layer's queue. Every
    engine of the next layer then convolves it with its own kernel.
* `aer_tx` sends the output queue on the AER output with the four-phase
  handshake.

Layer *l* ≥ 1 never sees which engine of layer *l*−1 produced an event.
Each next-layer engine convolves all incoming events with one kernel; it
does not keep a separate kernel per input channel. This follows the
published routing diagram, where only (x/2, y/2) travels between layers.

## Inside a convolution engine: the row-by-row sweep

This is the part of the design that is easiest to misread.

Each engine keeps all of its neuron state in block RAM, one 24-bit word per
neuron:

| field | width | meaning |
|---|---|---|
| `v` | 8, signed | membrane potential |
| `ts_leak` | 8 | leakage counter value when leakage was last applied |
| `ts_ref` | 8 | refractory counter value of the last spike |

The engine also has two 1-bit overflow-flag memories, one for each counter.
They are described in the next section.

For an event at (x, y) with kernel size K, let `off = (K-1)/2`. The engine
walks the K image rows `y-off … y-off+K-1`. For each row it streams **all
IMG_W neurons of the row** through a two-stage pipeline, one neuron per clock:

1. **Stage 0** issues the read of neuron (row, c). If the neuron is under the
   kernel, it also issues the read of weight (r, c−x+off).
2. **Stage 1** gets the neuron word, its two flags and the weight, then:
   * computes the elapsed leakage time and removes `leak × elapsed` from the
     potential, towards zero;
   * if the neuron is under the kernel and not refractory, adds the weight,
     saturating at 8 bits;
   * if the potential has reached the threshold, fires: the potential goes
     to 0, `ts_ref` is set to the current time, and the spike {id, row, c}
     is offered;
   * writes the neuron back with `ts_leak` set to the current time.

Every neuron in a visited row is updated, not only the K under the kernel.
Linear leakage gives the same result whether it is applied in one step or
in several, so this changes no neuron's behaviour. It keeps all timestamps
in the row fresh, which is what the overflow flags need. It also makes the
cost of an event independent of x:

    cycles per event = K × IMG_W + 2

Here the cycles are counted from the cycle that presents `start` to the
first idle cycle. At 128 columns that is 130 cycles for 1x1 and 898 cycles
for 7x7, which is 1.44 µs and 9.98 µs at 90 MHz. These are exactly the
latencies published for the original processor, and their inverses are its
published throughput (0.69 and 0.10 Mevents/s). The full-row scan is this
implementation's reading of those numbers; the published text does not
describe the row mechanism in that detail. Rows above or below the map are
still scanned, but without reads that matter and without writes, so the
time stays the same.

Consecutive neurons in the pipeline are always different addresses, so no
forwarding is needed. The two counters are sampled when the event starts
and used for the whole event. A spike that the arbiter does not take at
once stalls the pipeline. While it waits, `sp_valid` and `sp` stay stable,
and the block RAM output holds because no new read is issued.

## Time, leakage, refractory period and counter overflow

`global_counters` has two 8-bit counters, one for leakage time and one for
refractory time. Each has a 16-bit prescaler, in clock cycles per tick. The
counters run only while processing is enabled. The neurons store 8-bit
copies of these counters. When a counter wraps, a stored timestamp would
look newer than it is.

The overflow flags fix this. Each counter has an **epoch bit** that toggles
at every wrap. When a timestamp is written, the engine stores the current
epoch in a 1-bit distributed RAM (`ovf_flag_ram`), one bit per neuron per
counter. When the timestamp is read back, a stored epoch different from the
current one means "the counter has wrapped once since". In that case
2^8 is added to the elapsed time. Storing the epoch, instead of a flag that
is set at the overflow, means nothing has to touch every flag at the moment
the counter wraps.

Two rules keep this correct:

* A neuron that is *not* refractory when visited gets its refractory
  timestamp rewritten as "one wrap ago". A long-past spike therefore cannot
  look recent after a later wrap.
* Two wraps without a visit cannot be told from none. Every neuron must be
  visited (any event whose kernel rows cover its row) at least once per
  counter period, which is 256 ticks × prescale cycles. Choose the
  prescalers with this in mind. This is the main limit of the scheme.

The neuron model is this implementation's choice, within the published
"LIF with leakage and refractory period":

* leakage is linear, `leak` per tick, towards zero;
* a neuron is refractory for `refrac` ticks after a spike;
* the threshold is a signed 8-bit compare, `v ≥ thresh`;
* a neuron that fires is reset to 0.

## Layers and parameter selection

`config_regs` holds one `layer_params_t` bank per layer (`thresh`, `leak`,
`refrac`, `ksize`, `pool`) and one layer number per engine (the layer
mask). Each engine has its own `param_select` mux. The mux picks the bank of
the engine's layer, so engines of different layers run with different kernel
sizes and time constants side by side. The register count and mux width grow
with `N_LAYERS`.

## Host register map

The host interface is a simple 32-bit word bus: `cfg_we`, `cfg_addr[15:0]`
and `cfg_wdata`. Read data comes on `cfg_rdata` one cycle after the address.
On a Zynq-class part this would sit behind an AXI-lite bridge.

| address | register |
|---|---|
| 0x0000 | CTRL: [0] enable, [1] clear all neurons (pulse), [6:4] last active layer |
| 0x0001 | leakage prescaler (cycles per tick) |
| 0x0002 | refractory prescaler |
| 0x0003 | STATUS (read): [0] some engine busy, [1] clearing |
| 0x0010 + 4·l | layer l: +0 threshold, +1 leakage, +2 refractory period, +3 {[3] pool, [2:0] kernel size} |
| 0x0100 + e | layer mask entry of engine e |
| 0x1000 + 64·e + 7·r + c | kernel weight (row r, column c) of engine e, 8-bit signed, write only |

Typical bring-up:

1. Write the banks, the mask and the weights.
2. Write CTRL = 0x12 (clear, last layer 1).
3. Poll STATUS[1] until the clear sweep is done. It takes IMG_W·IMG_H
   cycles.
4. Write CTRL = 0x11 (enable, last layer 1).

Do not change the parameters of a layer while its engines are busy.

## AER ports

Both ports use the four-phase handshake:

1. The sender drives the address and raises `req`.
2. The receiver takes the address and raises `ack`.
3. The sender drops `req`.
4. The receiver drops `ack`.

The address is bundled data: it must be stable while `req` is high. On each
side the incoming control signal goes through a two-flop synchroniser, so
the peer may run on another clock.

* The input address is `event_t` {y[6:0], x[6:0]}.
* The output address is `spike_t` {ceid[5:0], y[6:0], x[6:0]}.

## Parameters

| parameter | default | origin |
|---|---|---|
| `N_CE` | 64 | published |
| `N_LAYERS` | 2 | published configuration (up to 8 with the 3-bit layer field) |
| `IMG_W`, `IMG_H` | 128 | published |
| `KMAX` | 7 | published (kernels 1x1..7x7) |
| `FIFO_DEPTH` | 16 | this design |
| widths in `snn_pkg` | potential, timestamps and weights all 8 bits | this design |

The 24 bits per neuron were chosen to fit the published block-RAM budget.
That budget is 713.5 BRAM36 for 64 engines, about 400 kbit per engine, or
about 24 bits for each of its 16384 neurons.

## Files

* `rtl/snn_pkg.sv`: shared types, widths and the register map.
* `rtl/scnn_top.sv`: top level.
* The blocks named above: `conv_engine`, `sdp_ram` (block RAM),
  `ovf_flag_ram`, `global_counters`, `config_regs`, `param_select`,
  `layer_dispatch`, `spike_arbiter`, `event_router`, `event_pool`,
  `event_fifo`, `aer_rx`, `aer_tx`.
* `tb/`: one self-checking testbench per block, plus:
  * `tb_scnn_top`: end to end, 4 engines, 16x16 map;
  * `tb_scnn_top_full`: end to end at the default size, 64 engines and
    128x128, which runs in about 15 s;
  * `tb_gabor_sobel`: a Gabor layer followed by a Sobel layer.

Each testbench prints `TB_RESULT checks=N failures=M`.

Simulate with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
  --top-module tb_scnn_top rtl/snn_pkg.sv tb/tb_scnn_top.sv
./obj_dir/Vtb_scnn_top
```

## How far it is verified

* **Engine.** `tb_conv_engine` compares every spike, in order, with an
  independent model. The model keeps neuron time as unbounded integers, so
  the engine's 8-bit timestamps and overflow flags are checked across a
  counter wrap. The test uses random kernel sizes and random back-pressure,
  and checks the K·W+2 cycle count.
* **Whole processor.** The end-to-end tests check two things against a
  model:
  * the multiset of events passed to layer 1;
  * the multiset of AER output spikes.

  They count that each of these happened: engine stalls, simultaneous
  spikes, full layer and output queues, AER input back-pressure, routing to
  the next layer and to the output, counter wrap, and the clear sweep.
  Leakage and refractory period are switched off there, so that the result
  does not depend on arbitration timing. Those two are covered by the
  engine test.
* **Not verified.** The design has not been placed and routed. Neither the
  90 MHz clock nor the FPGA resource use has been checked.

## Known limits and departures

* **Events between layers.** They carry no channel id. A next-layer engine
  applies one kernel to events from all engines of the previous layer.
* **Pooling.** It only halves the address. Events that land on the same
  pooled position are not merged.
* **Counter period.** Every neuron must be visited at least once per
  counter period, as explained above.
* **Layer width.** One layer processes one event at a time. All its engines
  wait for the slowest, which only matters when outputs are back-pressured.
* **Not part of this RTL.** The host processor that writes the registers is
  outside this design.
