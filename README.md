# An event-driven neuromorphic core and cluster in SystemVerilog

This design is a digital neuromorphic processor that runs spiking and other event-based neural
networks. Work happens only when a non-zero activation (a *spike*, here carrying a graded BF16
value) arrives. Each core stores neuron states and weights in a local data memory. When an event
arrives, a small vector datapath loads the affected neuron states, adds the weighted input,
stores the states back, and turns neurons that fire into new events for other cores.

The RTL builds one cluster of sixteen such cores joined by an on-chip event network. In each
core it builds:

- the data memory;
- the loop controller, which replays micro-code;
- eight neuron processing elements (NPEs) that run in lock-step;
- the event generator;
- the NoC interface with its routing table.

The general-purpose controller of each core is not part of the RTL. It is a small RISC-V
processor that decodes incoming events and queues work. Its data bus and interrupt lines are
brought out as ports instead, and the testbenches play its software.

Two techniques shape the design:

- **Spike grouping.** Up to four spikes that target the same neurons are handled as one task.
  The loop controller then loads each neuron state once, applies up to four updates in the
  register file, and stores it once. Most of the per-event memory traffic goes away.
- **Event-driven processing without barriers.** Events flow from layer to layer as soon as they
  are produced. A *synchronisation* packet marks the end of a time step. Receiving cores can
  integrate while the sending core is still firing.

## Inside a core

```
             bus_* (controller data bus)          irq_event   irq_noc
                 |                                    ^          ^
   +-------------+----------------+-----------------+-+----------+------+
   | address decode / task staging registers          |          |      |
   |    |              |                    |         |          |      |
   |  port A       loop buffer        task FIFO   event FIFO  rx FIFO   |
   |  32 bit        128 x 32            8 deep      16 deep   16 deep  |
   |    |              \______  ______/               ^          ^      |
   | +--+----------+          loop controller         |          |      |
   | | data memory |<-port B->  (2 stages)  --EVG--> event     routing   |
   | | 256 KB      | 8x16 bit      |                generator   table   |
   | +-------------+               v                  ^       + tx reg -+--> NoC
   |                   NPE0 ... NPE7 (64 x 16-bit RF, BF16)  -+          |
   +--------------------------------------------------------------------+
```

### Data memory (`data_memory`)

The data memory is 256 KB (2 Mbit) with two ports.

- **Port A** is 32 bits wide and belongs to the controller. It has byte enables.
- **Port B** is one row of 16 bits per NPE, so 128 bits with eight NPEs. It has one write
  enable per lane. The NPEs use it.

Both ports read synchronously with one cycle of latency. If both ports write the same word in
one cycle, port B wins. A row address on port B selects 16 bytes. A port A word address
selects one 32-bit quarter of such a row.

### Micro-instructions and the NPEs (`npe`)

Every NPE holds a 64 × 16-bit register file. All NPEs execute the same 32-bit
micro-instruction in the same cycle:

```
 31   28 27  22 21  16 15  10 9   7 6      0
 [ op   ][ rd  ][ ra  ][ rb  ][agen][  off  ]
```

| op | name | effect (per NPE) |
|----|------|------------------|
| 0 | NOP  | nothing |
| 1 | LD   | rd ← own 16-bit lane of data memory row `agen[agen] + off` |
| 2 | ST   | own lane of row `agen[agen] + off` ← ra |
| 3 | SCL  | rd ← task scalar `rb[1:0]` (the same value in every NPE) |
| 4 | ADD  | rd ← ra + rb |
| 5 | MUL  | rd ← ra × rb |
| 6 | MAC  | rd ← rd + ra × rb (product rounded first, not fused) |
| 7 | MAX  | rd ← max(ra, rb), used for max pooling |
| 8 | THR  | rd ← ra > rb ? ra : 0, which is FATReLU with a threshold in rb |
| 9 | CVT4 | rd ← signed 4-bit nibble `rb[1:0]` of ra, as BF16 |
| 10 | EVG | offer ra of every NPE to the event generator |
| 11 | MOV | rd ← ra |
| 12 | CLR | rd ← 0 |
| 13 | CVT8 | rd ← signed byte `rb[0]` of ra, as BF16 |

Numbers are BF16: 1 sign bit, 8 exponent bits and 7 mantissa bits. The arithmetic works as
follows:

- Every result is rounded toward zero.
- Subnormal inputs and results become zero.
- Overflow goes to infinity.
- NaN is not produced as a separate value.

Weights are 4-bit integers, packed four per 16-bit memory lane. For networks with 8-bit
parameters, CVT8 unpacks two per lane. Each layer has one power-of-two scale. That scale is
folded into the spike value through the task scalar, so a synaptic update is `SCL v; LD w; CVT4 t,w,q; MAC s_q += v*t`.

### Loop controller and task descriptors (`loop_controller`)

The controller never steps the NPEs itself. It writes micro-code into the loop buffer once,
and then pushes *tasks* into the task FIFO. A task tells the loop controller what to replay and
with which operands:

| field | meaning |
|-------|---------|
| `start`, `len` | loop buffer entries `start .. start+len-1` form the loop body |
| `iters` | number of times the body runs |
| `neuron_base` | neuron index of NPE 0 in the first iteration; it grows by 8 per iteration |
| `scalar[0..3]` | broadcast operands, such as the values of up to four grouped spikes and a threshold |
| `base[g]`, `stride[g]` | five address generators; generator `g` starts at `base[g]` and grows by `stride[g]` after every iteration |

The loop controller is a two-stage pipeline that issues one micro-instruction per cycle:

1. The first stage reads the loop buffer, forms the row address `agen + off` and starts the
   port B read for an LD.
2. The second stage hands the instruction to the NPEs. The loaded lane arrives in time, and an
   ST writes port B in this cycle.

A task costs one cycle to pop, `len × iters` issue cycles, and one cycle to drain. An empty
task (`len` or `iters` zero) retires at once. The pipeline stalls in one case only: an EVG
waits while the event generator is still converting the previous vector.

A task runs while the controller prepares the next one. That is what lets event decoding and
neural processing overlap.

### Event generator (`event_generator`)

An EVG instruction captures the eight NPE outputs and their neuron indices. The generator marks
the non-zero lanes, where both signs of zero count as zero. It then writes one AER event per
cycle, lowest lane first, into a 16-entry FIFO. An AER event is `{neuron[15:0], value[15:0]}`.

The generator takes the next vector only after all marked lanes are written. While the FIFO is
full it waits. `irq_event` is high while events are queued.

### NoC interface (`noc_router`) and cluster fabric (`noc_fabric`)

The controller sends a packet as a `{key, payload}` pair. The router looks up the 8-bit key in
a 256-entry routing table. Each entry gives the set of destination cores as a bit mask, which
makes multicast free. A key whose mask is empty is dropped. The controller can rewrite the
table at any time.

A packet on the network is `{src core, key, payload[31:0]}`. The usual payload is an AER event.
Received packets wait in a 16-entry FIFO, and `irq_noc` is high while it holds any.

The cluster fabric is a shared multicast bus. In every cycle it grants one source, in
round-robin order, among the sources whose destination cores can all take a packet. It then
delivers that packet to all of them in the same cycle. A core with a full receive FIFO holds
back every packet addressed to it. No packet is lost.

### Controller bus and memory map (`seneca_core`)

Each core exposes a simple request/ready bus:

- One request is accepted per cycle, while `bus_ready` is high.
- Read data returns one cycle after acceptance, on `bus_rvalid`.
- A task push waits while the task FIFO is full.
- A NoC send waits while the router is busy.

| byte address | access | function |
|--------------|--------|----------|
| `0x000000 + a` | R/W | data memory, port A |
| `0x100000 + 4i` | W | loop buffer entry i |
| `0x200000 + 4k` | W | task staging word k (see below) |
| `0x200100` | W | push the staged task |
| `0x300000` | R | status: `[31:24]` receive count, `[23:16]` event count, `[8]` busy, `[3:0]` tasks queued |
| `0x300004` | R | pop one AER event |
| `0x300008` | R | tasks completed |
| `0x400000 + 4*key` | W | routing table entry (destination mask) |
| `0x401000` | W | transmit key |
| `0x401004` | W | transmit payload; this write sends the packet |
| `0x401008` | R | pop a received packet, returns its payload |
| `0x40100C` | R | head of the receive FIFO, `{src, key}`, without popping |

The staging words are:

- w0 = `{iters[15:0], len[7:0], 0, start[6:0]}`
- w1 = `neuron_base`
- w2 = `{scalar1, scalar0}`
- w3 = `{scalar3, scalar2}`
- w4+g = `{stride_g, base_g}` for g = 0..4

### The top: `seneca_cluster`

The top has sixteen cores, each with its own identifier, plus the fabric. Its ports are the
sixteen controller buses and the two interrupt lines of each core.

## A layer, step by step

The end-to-end test maps a two-layer network onto four cores. An integration task for a group
of G spikes works on 32 neurons per iteration, four state rows of 8 NPEs:

1. LD the four state rows.
2. For each spike in the group: SCL the spike value, LD the packed weight row for that input,
   then CVT4 and MAC once per state row.
3. ST the four state rows.

With G = 4, one task does the work of four single-spike tasks. The state loads and stores
happen once instead of four times.

When a synchronisation packet arrives, the core runs a fire task over all states. For each row
it does LD, THR against the threshold, EVG, then clears the row. The controller reads the
resulting AER events and sends them with the key of the next layer.

## Convolution, depth first

A convolution layer would need the states of its whole output map if it waited for the end of
a time step. Input events from a frame sensor arrive in row order, though. Once input row `y`
has been processed, output row `y-1` can receive no more contributions. So a 3×3 layer only
needs states for K+1 = 4 output lines, used as a circular buffer:

- One line is being initialised.
- Two lines are still being updated.
- One finished line waits for its pooling partner.

On this hardware the eight output channels of one pixel fill one memory row, one channel per
NPE. The controller handles the layer with three kinds of task:

- **Initialise.** Before input row `y` is processed, a copy task fills the slot of output line
  `y+1` with the channel biases.
- **Convolve.** Each input event `(x, y, v)` becomes one 46-instruction task. The controller
  computes the row addresses of the three lines it touches and puts them in address
  generators 0 to 2. The task then does LD, LD weight, CVT4, MAC and ST for the nine
  neighbours.
- **Pool and fire.** When a pair of output lines is complete, a pooling task runs. For each of
  the 20 pooled columns it loads the 2×2 window, takes three MAXes, applies the FATReLU
  threshold and runs EVG.

For the 40×40×8 layer the state buffer is 2,688 bytes, where the full map would be 25,600 bytes.
A margin column on each side of a line absorbs the updates that zero padding would discard.
The testbench pools once per completed pair of lines. A finer schedule can fire each 2×2
window as soon as the input events have moved past it, and needs no extra hardware. That
shortens the latency, but the state still takes four lines.

When several FC layers share one core, as in the keyword-spotting test, the events of one
layer go straight back into the integration tasks of the next. They do not pass through the
NoC.

## Departures and limits

- The per-core RISC-V, its instruction memory, the shared-memory prefetch unit and the cluster
  shared memory with its arbiter are not included. How four clusters connect is not included
  either. Only their roles are known.
- The sizes follow the architecture: 8 NPEs, 64-word register files, 256 KB data memory,
  16 cores and groups of up to four spikes. These are choices of this RTL:
  - the micro-instruction set and encoding;
  - the loop buffer (128 entries), task FIFO (8), event FIFO (16) and receive FIFO (16) depths;
  - the five address generators;
  - the 8-bit routing key, the packet format and the memory map;
  - the bus fabric;
  - BF16 rounding toward zero.
- Depth-first convolution (keeping only K+1 lines of neuron states per layer) is a mapping
  technique. It runs on this hardware as controller software plus tasks. No dedicated block
  exists for it. See "Convolution, depth first" above.
- The NPE count is a parameter, and the architecture allows up to 128. Larger values change the
  port B row width and the event generator lane count. The core lints cleanly with 16 and
  with 128 NPEs, but only 8 is simulated.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops with `$finish`. Run one with
verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/seneca_pkg.sv tb/tb_ref_pkg.sv tb/tb_seneca_cluster.sv --top tb_seneca_cluster
./obj_dir/Vtb_seneca_cluster
```

`tb_ref_pkg` holds the BF16 reference model used by the testbenches. It works in double
precision, truncates to BF16, and is written separately from the RTL functions.

| testbench | what it checks |
|-----------|----------------|
| `tb_npe` | every operation against the reference on random and corner values |
| `tb_data_memory` | both ports, byte and lane masks, and collisions, at the full 256 KB |
| `tb_sync_fifo` | random push/pop against a queue model, full and empty flags |
| `tb_loop_controller` | the issued instruction, address and neuron streams, the `len×iters+3` cycle count, FIFO full, empty tasks and the EVG stall |
| `tb_event_generator` | events per lane, order, drain time, signed zero and FIFO back-pressure |
| `tb_noc_router` | table lookup, multicast masks, dropped keys, receive FIFO and interrupt |
| `tb_noc_fabric` | delivery, ordering and fairness under random traffic and blocked destinations |
| `tb_seneca_core` | a 32→64 FC layer with int4 weights, with and without grouping, the events it fires, and a NoC loopback |
| `tb_seneca_cluster` | the full 16-core cluster at default sizes running a two-layer network across four cores |
| `tb_conv_depth_first` | the 40×40 CONV 8c3 + 2×2 max-pool layer run event by event with only four state lines, every pooled event checked |
| `tb_kws_workload` | a 390-256-256-29 keyword-spotting network, one full inference on one default-size core, every event and output checked |

The keyword-spotting network needs 86,784 bytes of packed weights, about a third of one core's
data memory. With 146 of 390 input features non-zero, one inference takes about 29,400
cycles from the first task to the last output state. In that run the testbench issues the
tasks as fast as the bus accepts them.

In one core the grouped FC layer takes 360 micro-instructions and 377 cycles. One task per
spike takes 504 micro-instructions and 530 cycles.

`tb_seneca_cluster` runs the top with no parameter overrides. It compares every event that
reaches the output core with the reference. It also counts each of these mechanisms and fails
if one never happens:

- grouped tasks and single-spike tasks;
- the task FIFO filling up;
- an event generator stall;
- multicast;
- NoC back-pressure;
- a neuron held back by the FATReLU threshold.
