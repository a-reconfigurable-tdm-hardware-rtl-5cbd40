# adLIF TDM accelerator

A spiking neural network accelerator built around a single neuron datapath
that is time-shared by every neuron of the network. The network is not
hard-wired into the logic. Its topology, weights, neuron parameters and
neuron states all sit in one 48-bit-wide on-chip SRAM. Once per time-step a
processing element (PE) walks through that memory and updates every
"virtual" neuron in turn with the adaptive leaky integrate-and-fire (adLIF)
equations. Any fully connected feed-forward network that fits in the SRAM
can therefore run without changing the hardware. Input spikes arrive from an
event camera over an AER (address-event representation) handshake, or are
written by a host. Output spikes are read from a FIFO.

What you pay for this is time. A time-step costs a fixed amount per neuron
plus a cost per spike, so the time-step duration grows linearly with network
size and activity.

## The neuron and its arithmetic

Each neuron has a synaptic current `I`, a membrane potential `u` and an
adaptation current `w`. Per time-step it computes (semi-implicit Euler):

```
u_bar = alpha*u + (1-alpha)*(I - w)
spike = (u_bar >= theta)
u'    = spike ? u_bar - theta : u_bar            (soft reset)
w'    = beta*w + (1-beta)*(a*u' + b*spike)
```

Number formats (`rtl/adlif_pkg.sv`):

- Weights and the five parameters `alpha, beta, theta, a, b` are 8-bit two's
  complement.
- The states `I, u, w` are 12-bit.
- All formats have 5 fractional bits, so 1.0 is 32, parameters cover
  [-4, 3.97] and states cover [-64, 63.97].
- A product is shifted right by 5 (an arithmetic shift, so it rounds towards
  minus infinity).
- Every sum and product is saturated to the 12-bit range.
- Synaptic currents accumulate with saturation.

`adlif_neuron_logic` does all of this with one two-stage pipelined multiplier
and one adder, in a fixed 15-step schedule. It takes 16 cycles from `start`
to `done`. Every intermediate value is kept in a register and visible
through the debug registers:

| step | adder | multiplier issue | result stored |
|---|---|---|---|
| 1 | `I - w` → ADAPTED_I | `alpha*u` | |
| 2 | `1 - alpha` → ONE_ALPHA | | |
| 3 | `1 - beta` → ONE_BETA | `(1-alpha)*(I-w)` | ALPHA_U |
| 4 | | `beta*w` | |
| 5 | | | SCALED_I |
| 6 | `alpha_u + scaled_i` → U_BAR | | BETA_W |
| 7 | `u_bar - theta`, spike → NEW_U | | |
| 8 | | `a*u'` | |
| 10 | `a*u' + b` → AU_P_B | | A_UBAR |
| 11 | | `(1-beta)*(spike ? AU_P_B : A_UBAR)` | |
| 13 | | | BETA_SCALED |
| 14 | `beta_w + beta_scaled` → NEW_W | | |
| 15 | done | | |

## Memory layout

This section is the key to using the design. The SRAM has 32768 lines of 48
bits, and one line is read or written per bus access. Values are packed as
follows:

- weights: four 8-bit values per line, in bits `[8e+7:8e]` for e = 0..3;
- synaptic currents: four 12-bit values per line, in bits `[12e+11:12e]`;
- parameters and states: one value per line, in the low bits.

Unused slots are zero. Because four is a power of two, `ceil(n/4)` is a
shift.

Take a network of layers `n0` (inputs), `n1`, …, `nK` (output), and write
`c(x) = ceil(x/4)`.

```
line 0                     input layer block
                             for each input neuron i: c(n1) lines of its weights to layer 1
B1 = n0*c(n1)              layer 1 block
  B1                         marker: n3 (neurons of layer L+2; 0 if there is none)
  B1+1 .. B1+c(n1)           synaptic currents of layer 1
  then for each neuron j:    7 lines  u, w, alpha, beta, theta, a, b
                             c(n2) lines of its outgoing weights to layer 2
B2 = B1 + 1 + c(n1) + n1*(7 + c(n2))   layer 2 block, same structure
...
output layer block           marker 0, currents, 7 lines per neuron, no weights
IN_SPK_ADDR ..               input spike region: one input-neuron index per line
```

Three points need care:

- **The marker holds the size of layer L+2.** The PE keeps base address and
  size for three layers: the one it updates (L), the one that receives its
  spikes (L+1), and the one after that. To compute where layer L+2 begins, it
  needs the size of layer L+2, because that size sets how many weight lines
  each neuron of L+1 has. So the first line of each layer block stores that
  size. A marker of 0 means there is no layer L+2. The PE treats a layer as
  the output layer when the layer after it has 0 neurons.
- **Layers 1 and 2 come from registers.** L1 and L2 are the first two layers
  *with neurons to update* (the input layer has no state). Their base lines
  and sizes are written into `L1_ADDR`, `L1_NRN_NUM`, `L2_ADDR` and
  `L2_NRN_NUM`, so the PE can start without reading any marker. For a
  two-layer network (inputs → outputs) `L2_NRN_NUM` is 0.
- **The input layer costs nothing unless it spikes.** Input neurons have no
  state. For each input spike the PE fetches only that neuron's weight row
  and adds it into the currents of layer 1.

Memory footprints of the four networks the design was evaluated with (also
checked by `tb_layer_addr_ctrl` and `tb_workloads`):

| network | lines | fraction of SRAM |
|---|---|---|
| 2450x4 | 2 480 | 8% |
| 2450x16x4 | 9 963 | 30% |
| 2450x32x4 | 19 895 | 61% |
| 2312x10 | 7 010 | 21% |

`tb_adlif_ref_pkg::net_model::image()` builds exactly this image, and it
serves as an executable description of the format.

## A time-step inside the PE

`adlif_pe` is one sequencer with three phases.

1. **Input layer** (`inlayer_busy` high). For each of the `n_spk` spike lines:
   - read the input index;
   - then, for each of the `c(n1)` weight lines of that input, read the
     weight line and the matching current line of layer 1, add the four
     pairs with saturation, and write the current line back.
2. **Neurons, layer by layer.**
   - Read the layer marker.
   - For each neuron, read its current line (once per four neurons) and its 7
     parameter lines, then run `adlif_neuron_logic`.
   - Write back `u'` and `w'`.
   - After the fourth neuron of a current line, write that line back as
     zero. Each time-step therefore integrates only its own input.
3. **Spikes.**
   - In a hidden layer, a spiking neuron's weight lines are added into the
     current lines of the next layer (read-modify-write, one line at a time).
     Those neurons are updated later in the same time-step, so a spike
     travels through the whole network in one step.
   - In the output layer, the neuron index is pushed into the output FIFO.
     There is no fan-out. If the FIFO is full, the PE waits.

At the end the PE sets `end_of_ts`.

Memory accesses use the shared bus: a read costs 2 cycles and a write 1.
The seven parameter lines of a neuron are the exception: they are requested
on consecutive cycles, and each line arrives one cycle after its request, so
all seven take 8 cycles. The PE raises `pe_prio` while it runs, so the
arbiter always serves it first.

Measured cost, with an uncontended bus:

- about **31 cycles per neuron** with no spikes;
- **5 cycles per line** for each input spike or hidden spike (read weights,
  read currents, write currents), plus 2 cycles to read an input index.

`tb_workloads` measures these for the evaluated networks:

| network | base cycles (no input) | cycles per input spike* | published base / slope |
|---|---|---|---|
| 2312x10 | 312 | 17 | 346 / 27 |
| 2450x4 | 127 | 7 | 141 / 19 |
| 2450x16x4 | 627 | 23 | 809 / 36 |
| 2450x32x4 | 1105 | 44 | 1410 / 67 |

\* The slope is from random weights. It includes the hidden spikes those
weights cause, so it depends on the network's activity and is not a property
of the hardware alone.

At 100 MHz with a 100 µs time window (10 000 cycles), the largest network
leaves room for about 200 input spikes per window at these costs.

## Event input path

```
sensor --AER req/ack--> aer_rx --> input_spike_fifo --> input_spike_fsm --bus--> SRAM spike region
                                       ^ tick_gen (EoF markers)            \--> start PE
```

- **`aer_rx`** is the receiving side of the four-phase handshake:
  1. The sensor raises `req` with the address.
  2. The receiver synchronises `req` with two flops. On the edge that raises
     `ack`, it latches the 12-bit address.
  3. The sensor drops `req`.
  4. The receiver drops `ack`.

  While the FIFO is nearly full, `ack` is held back. This is the
  back-pressure path: events wait in the sensor instead of being dropped.
- **`tick_gen`** pulses every `TICK_COUNTER` cycles while `START_TICK_GEN`
  is 1. Each tick closes a frame (one time-step of input).
- **`input_spike_fifo`** (256 x 16 bits) stores event addresses with MSB 0.
  On each tick it stores an End-of-Frame word: `{1, number of events in the
  frame}`. For example, `0x8004` closes a frame of four events. Ticks that
  arrive while the FIFO is full are counted and written later, so frames
  never merge.
- **`input_spike_fsm`** pops events and writes each one to the next line of
  the spike region, starting at `IN_SPK_ADDR`. Then:
  - At an End-of-Frame word it compares the count with what it wrote. A
    mismatch increments `err_frames`.
  - It pulses the PE's `start` with the frame's event count.
  - If the PE is still busy with the previous frame, the start waits. Events
    of later frames then queue in the FIFO.
  - The FSM may write the next frame while the PE runs, but not while the PE
    is still reading the spike region (`inlayer_busy`). On the bus it always
    yields to the PE.

A host can bypass all of this. It writes spike indices into the spike region
itself, sets `IN_SPK_NUM` and writes `START_SNN`.

## Bus, address map and registers

One shared bus connects three masters with five slaves.

- **Masters:** 0 = PE, 1 = input spike FSM, 2 = host.
- **Master side:** a request/grant port. `gnt` is combinational, and read
  data arrives with `rvalid` one cycle after the grant.
- **Slave side:** AHB-Lite signals with no wait states.
- **Arbitration:** the PE wins while it has priority; otherwise requests are
  served round-robin.
- **Addresses** are 27-bit word addresses. Bits [18:16] select the slave:

| base | slave | access |
|---|---|---|
| 0x0_0000 | register file | below |
| 0x1_0000 | SRAM, + line number | read/write 48-bit lines |
| 0x2_0000 | output spike FIFO | a read pops one output neuron index |
| 0x3_0000 | input spike FIFO | a read returns the head word without popping |
| 0x4_0000 | debug registers | read-only |

Register file (32-bit; the top's `host_req` port is where a host bridge
connects):

| off | name | | off | name | |
|---|---|---|---|---|---|
| 0x00 | IN_SPK_NUM | spikes in the host frame | 0x0A | OUT_FIFO_EMPTY | status |
| 0x01 | IN_SPK_ADDR | first line of the spike region | 0x0B | SPIKE_RDY | an output spike in the last step |
| 0x02 | START_TICK_GEN | tick generator on/off | 0x0C | END_OF_TS | time-step finished |
| 0x03 | TICK_COUNTER | tick period in cycles | 0x0D | RUNNING | PE busy |
| 0x04 | L1_ADDR | base line of layer 1 | 0x0E | DEB_REG | scratch |
| 0x05 | L2_ADDR | base line of layer 2 | 0x0F | RSTN | 0 holds the core in reset, 1 releases it |
| 0x06 | L1_NRN_NUM | neurons in layer 1 | 0x10 | BS_VERSION | 0x0001_0000 |
| 0x07 | L2_NRN_NUM | neurons in layer 2 (0 if layer 1 is the output) | 0x11 | IN_FIFO_FULL | status |
| 0x08 | START_SNN | write 1: run one time-step | 0x12 | IN_FIFO_EMPTY | status |
| 0x09 | OUT_FIFO_FULL | status | | | |

Debug registers:

| offsets | contents |
|---|---|
| 0x00–0x08 | sequencer states: 0x00 PE, 0x01 input spike FSM, 0x02 layer control, 0x03 parameter load, 0x04 update, 0x05 write-back, 0x07 post-synaptic update, 0x08 weight load (0x06 reads 0) |
| 0x09 TOT_CC | cycles spent running since reset |
| 0x0A CURR_TS_CC | cycles of the last time-step |
| 0x0B WSTATES_CC | cycles the PE waited for the bus |
| 0x0C CURR_LAYER | active layer |
| 0x0D CURR_NRN | active neuron |
| 0x0E CURR_TS | time-steps run |
| 0x0F–0x1A | neuron-update intermediates: ADAPTED_I, ONE_ALPHA, ONE_BETA, SCALED_I, ALPHA_U, U_BAR, BETA_W, A_UBAR, NEW_U, BETA_SCALED, NEW_W, AU_P_B |
| 0x1B END_M_UPDATE | |
| 0x1C NXT_SPIKE_ADDR | |
| 0x1F–0x26 | operands of the current neuron: I, w, alpha, u, theta, beta, a, b |

Signed values read sign-extended.

### Running a network from a host

1. Write the memory image into the SRAM window.
2. Write L1_ADDR, L1_NRN_NUM, L2_ADDR, L2_NRN_NUM and IN_SPK_ADDR.
3. For each time-step:
   - write the input indices to the spike region;
   - write IN_SPK_NUM;
   - write START_SNN;
   - poll END_OF_TS;
   - read 0x2_0000 until OUT_FIFO_EMPTY.

For the sensor path instead of step 3, set TICK_COUNTER (200 000 gives a
2 ms window at 100 MHz) and START_TICK_GEN. Collect output spikes as they
appear.

## Files

All RTL is in `rtl/`, one unit per file:

| file | contents |
|---|---|
| `adlif_pkg.sv` | formats, packing factors, bus structs, register offsets, debug bundle |
| `adlif_accel_top.sv` | top level: wiring, the software-reset synchroniser, START_SNN vs FSM start |
| `adlif_pe.sv` | the PE sequencer, the packed saturating current adder, cycle counters |
| `adlif_neuron_logic.sv` | the neuron datapath |
| `layer_addr_ctrl.sv` | three-layer look-ahead and all address arithmetic |
| `aer_rx.sv`, `tick_gen.sv`, `input_spike_fifo.sv`, `input_spike_fsm.sv`, `sync_fifo.sv` | event path |
| `ahb_interconnect.sv` | arbiter and decoder |
| `sram.sv`, `reg_file.sv`, `debug_regs.sv`, `fifo_ahb_port.sv` | bus slaves |

The top has no parameters. The sizes are package constants (`SRAM_AW`,
`IN_FIFO_AW`, `OUT_FIFO_AW`, the number formats). `WPL`/`IPL` and their
logarithms must stay consistent with each other and be powers of two.

## Simulation

Every testbench in `tb/` is self-checking and prints
`TB_RESULT checks=N failures=M`. They share the reference model
`tb/tb_adlif_ref_pkg.sv`, a direct implementation of the equations and of the
memory layout. With Verilator 5:

```
verilator --binary --timing --assert --top-module tb_adlif_accel_top \
  -Irtl -Itb rtl/adlif_pkg.sv tb/tb_adlif_ref_pkg.sv -y rtl -y tb tb/tb_adlif_accel_top.sv
./obj_dir/Vtb_adlif_accel_top
```

| testbench | what it establishes |
|---|---|
| `tb_adlif_accel_top` | full design at its real size. A 96x16x4 network is loaded over the host port and run on the host path, then on the AER path with ticks (frames postponed while the PE is busy, transfers blocked during the input layer), then with the output FIFO full. Output spikes, final states, debug registers and the software reset are checked against the model. Each of these mechanisms is counted and must occur. |
| `tb_workloads` | the four evaluated network sizes at full size: footprints, output spikes and states against the model, and the cycle costs in the table above |
| `tb_adlif_pe` | the PE alone on a bus that stalls at random, with a slowly drained output FIFO; a 4-layer network for 25 steps |
| `tb_adlif_neuron_logic` | 3000 random updates against the equations, latency 16 |
| `tb_layer_addr_ctrl` | offsets for 2- to 5-layer networks |
| others | one bench per block: handshake, FIFO ordering and markers, frame transfer and start rules, arbitration and routing, SRAM bypass, register and debug maps |

Each bench finishes in well under a second of simulation time, except
`tb_workloads`, which needs a few seconds.

## Departures and limits

- **No prefetch.** The original design loads the next neuron's parameters
  while the current neuron's arithmetic runs, and reaches about 30–35 cycles
  per neuron. Here the sub-units (spike loader, parameter loader, weight
  loader, post-synaptic update) are states of one sequencer, and memory
  access never overlaps the arithmetic. Pipelining the parameter reads
  brings the cost to about 31 cycles per neuron, which `tb_adlif_pe` and
  `tb_adlif_accel_top` check against the 30–35 range.
- **Not specified in the original design, chosen here:**
  - the binary point (5 fractional bits), rounding and saturation;
  - the order of the seven parameter lines;
  - clearing the currents after use;
  - the exact bus signalling on the master side;
  - reset values.
- **AER sampling.** The original design samples the AER address while both
  `req` and `ack` are high. Here it is latched on the edge that raises
  `ack`. This accepts both kinds of sender: those that hold the address
  until `req` falls, and those that change it as soon as they see `ack`.
- **Two conflicting locations for `b`.** Parameter `b` appears at debug
  offset 0x28 in one place and 0x26 in another. 0x26 is used, which keeps
  the debug range inside 0x00–0x26.
- **Not included:** the UART-to-bus bridge and the FPGA clock manager. The
  host bus port and the clock are inputs of the top.
- **Input FIFO size.** While the PE reads the spike region, the FSM is held
  and at most 256 events (markers included) can wait in the input FIFO.
  After that, the sensor is stalled through `ack`. Events are delayed, not
  lost. A host writing the spike region directly has no such limit.
- **Trust.** Every block is checked against an independent model written
  from the equations and the layout above, and the full design runs at its
  real size. The RTL synthesises with a generic flow (no latches, the SRAM
  inferred as a memory array), but it has not been run on an FPGA or timed
  at 100 MHz. The cycle costs are measured in simulation. The base cost per
  step is 8–22% below the published numbers. The cost per input spike is
  lower too, as the table above shows. Each testbench was also run against
  a copy of its block with one deliberate bug, and caught it.
