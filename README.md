# A direct digital frequency synthesizer built from one spiking neuron

A conventional direct digital frequency synthesizer (DDFS) steps a phase
accumulator by a frequency control word (FCW) every clock and looks up a sine
value for each phase. This design does the same, but the value it outputs is
a *time interval*: the gap between two spikes. One leaky integrate-and-fire
(LIF) neuron, built from two counters, sits in the signal path. For every
sample:

1. The phase sets the spacing of an **input spike pair**. One spike reaches the
   neuron directly. The other goes through a delay line of
   `tau_d = phase + 1` clock cycles.
2. The neuron integrates the two synaptic current pulses and **fires** once
   its membrane potential reaches the threshold.
3. The neuron's spike leaves on the output, then leaves once more through a
   second delay line of `Q` cycles. The spacing of this **output spike pair**
   is the sine value of the phase: `Q = 65 + round(64 * sin(2*pi*(phase+0.5)/1024))`.
   So the output inter-spike interval (ISI) sweeps from 1 to 129 cycles along
   a sine.

The phase accumulator, the quarter-wave sine table with its quadrant logic,
the two delay lines and the counter-based LIF neuron follow the published
architecture. The frame sequencer that paces the samples is this design's own
(see *Frames and timing*).

## Signal path

```
            FCW
             |
        +----v----+   phase (10 b)      +------------------------+
        |  phase  |-------------------->| fold  ->  256x8 ROM  -> |--> sample (signed 9 b)
        |  accum. |----+                | (bit 8)  quarter sine   |--> isi = Q (8 b)
        +----^----+    |                | sign (bit 9)            |        |
             | pa_step |  tau_d =       +------------------------+         |
             |         |  phase+1                                          v
 +-----------+---+   +-v-----------+                              +---------------+
 |    frame      |-->| spike_delay |--in_spike_delayed--+         |  spike_delay  |
 |   sequencer   |   |   (tau_d)   |                    |  OR     |      (Q)      |
 |               |---------------------in_spike_direct--+--+      +-------^-------+
 +---------------+                                         v              |   |
       ^   ^                                        +-------------+       |   v
       |   +-------------- rest, q_busy ------------|  LIF neuron |--S(t)-+--OR--> out_spike
       +------------------ fire --------------------|  synapse -> |
                                                    |  membrane   |
                                                    +-------------+
```

| Module | Role |
|---|---|
| `lif_ddfs` | Top level: wires everything below. |
| `phase_accumulator` | 10-bit phase register, `phase += fcw` once per sample. |
| `phase_to_amplitude` | Quadrant folding around `quarter_sine_lut`. Gives the signed sample and the ISI `Q`. |
| `quarter_sine_lut` | 256 x 8 ROM holding a quarter sine period in 2.6 fixed point, read synchronously. |
| `spike_delay` | Down-counter delay line for one spike, delay 1..2^W-1 cycles. Used for tau_d and for Q. |
| `lif_neuron` | `synaptic_block` feeding `core_block`. |
| `synaptic_block` | Turns an input spike into a current pulse `weight` cycles long. |
| `core_block` | Membrane counter: integrates, leaks, compares with the threshold, fires, resets. |
| `frame_sequencer` | Issues one input spike every `FRAME_CYC` cycles and steps the phase. |
| `ddfs_pkg` | Widths, the `neuron_cfg_t` settings struct and the ISI offset. |

## The digital LIF neuron

The neuron is the forward-Euler form of the RC membrane equation
`C dV/dt = -V/R + I(t)`, reduced to two counters.

**Synaptic block.** An input spike starts a counter and raises `syn_out`.
When the counter reaches the synaptic weight `w`, it is cleared and `syn_out`
falls. Each spike therefore injects a current pulse exactly `w` cycles long.
The two input lines are ORed into this one synapse. When the second spike
arrives while the first pulse is still running (tau_d < w), the pulse is
**restarted**, so it ends `w` cycles after the later spike. The two pulses
then merge into one pulse of `tau_d + w` cycles. One counter cannot add two
overlapping currents, so this is the nearest single-counter reading of
`I(t) = U(t) + U(t - tau_d)`.

**Core block.** This is the membrane potential, an 8-bit counter:

* While `syn_out` is high it counts up one per clock. With `exc_inh = 0`
  (inhibitory input) it counts down instead. It saturates at 0 and 255.
* With no input pulse it **leaks**: it drops by one every `leak_period` idle
  cycles. A leak period of 0 turns the leak off.
* When `membrane >= threshold`, the next clock resets it to 0 and raises
  `spike_out` for one cycle. Counting resumes after that if the pulse is
  still running.

Example (weight 0x55, threshold 0x33, leak period 0xF, one input spike): the
membrane climbs 0x30, 0x31, 0x32, 0x33. It then fires and drops to 0x00. It
climbs again for the 33 cycles left in the pulse, then leaks one step per 15
cycles back to rest.

**Choosing the neuron settings.** The neuron should fire once per
sample, and only after both input spikes have arrived. With
`threshold = weight + 1` one pulse alone never fires. A spike pair always does,
as long as the leak between the two pulses takes off less than `weight - 1`.
With the reference settings (weight 0x55, threshold 0x56, leak period 0xF), the
largest gap (tau_d = 1024) loses 62 steps, so every phase fires. The threshold
is therefore set by the largest tau_d, as the architecture requires.

## Quarter-wave sine table

The two phase MSBs select the quadrant:

* bit 8 (the second MSB) inverts the 8 table-address bits, which reads the
  quarter wave backwards in quadrants 2 and 4;
* bit 9 (the MSB) negates the table value in quadrants 3 and 4.

Entry `i` of the table is `round(64 * sin(pi/2 * (i + 0.5) / 256))`: an
unsigned 2.6 number from 0 to 1.0 (0x40). Sampling at half steps makes
address inversion an exact mirror. The full 1024-point period is therefore
`round(64 * sin(2*pi*(p+0.5)/1024))` with no seam between quadrants. The table
is `rtl/quarter_sine.hex`, 256 lines of two hex digits, generated from that
formula. Scaling the table up to use its two integer bits needs a wider ISI
(`ISI_W`, `ISI_OFFSET` in `ddfs_pkg`).

The architecture describes the table as the result of training the neuron
network with the update `Q <- Q + 0.7 (F(x) - Q)`. That iteration converges to
the target value `F(x)` itself, so the table holds the sine values directly
and nothing is trained in hardware.

## Frames and timing

The time a sample needs depends on its phase. The delayed input spike comes up
to 1024 cycles after the first one, and the leftover potential after the fire
takes up to about 84 x 15 cycles to leak away. If each sample simply started
when the previous one ended, the samples would be unevenly spaced in time and
the output would not be a sine in time. The sequencer therefore runs the
neuron in **frames** of fixed length `FRAME_CYC` (default 2048):

| state | cycles | what happens |
|---|---|---|
| SETTLE | 2 | the phase-to-amplitude pipeline (2-cycle latency) settles on the new phase |
| LAUNCH | 1 | `in_spike_direct`; the same spike enters the tau_d line |
| WAIT_TAU | tau_d - 1 | until `in_spike_delayed` |
| WAIT_REST | rest of frame | until the neuron is quiescent, the Q line is idle and the frame period is used up |
| STEP | 1 | `pa_step`, `frame_done`; `frame_miss` if the neuron never fired |

Launches are exactly `FRAME_CYC` cycles apart. The synthesized frequency is
therefore

```
f_out = FCW * f_clk / (FRAME_CYC * 2^10)
```

At a 250 MHz clock that gives a resolution of about 119 Hz and 122 k samples
per second. With the reference settings a frame needs at most about 1500
cycles. Settings that need more than `FRAME_CYC` stretch that frame and raise
`frame_overrun`. "Quiescent" means no synaptic pulse, no spike, and a membrane
at zero, or a disabled leak (then the membrane will not change any more, so
waiting for zero would stall forever). Each sample starts from the resting
potential unless the leak is disabled.

Within a frame, the neuron fires between `weight + 1` cycles and about
`tau_d + weight` cycles after the launch. The output spike pair follows: the
neuron spike `S(t)` on `out_spike`, then the second spike exactly `Q` cycles
later. `Q >= 1`, so the two pulses never merge. The information is only in
their spacing, not in when the pair occurs within the frame.

## Interface of `lif_ddfs`

| Port | Dir | Width | |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `enable` | in | 1 | run; low holds the sequencer before its next launch |
| `fcw` | in | 10 | frequency control word |
| `weight`, `threshold` | in | 8 | synaptic pulse length, firing threshold |
| `leak_period` | in | 4 | idle cycles per leak step, 0 = no leak |
| `exc_inh` | in | 1 | 1 excitatory, 0 inhibitory |
| `in_spike_direct`, `in_spike_delayed` | out | 1 | the two input lines |
| `syn_active`, `syn_count` | out | 1, 8 | synaptic pulse and counter |
| `membrane` | out | 8 | membrane potential |
| `neuron_spike` | out | 1 | the neuron's spike S(t) |
| `out_spike` | out | 1 | output spike pair, spacing Q |
| `phase`, `sample`, `isi` | out | 10, 9 signed, 8 | current phase, its sine sample (-64..64) and Q |
| `frame_done`, `frame_miss`, `frame_overrun` | out | 1 | per-frame status pulses |

`sample` is the digital output a conventional DDFS would send to a DAC. No
DAC is included.

## Where this departs from the published design

* **Phase width.** The published text gives an 8-bit phase accumulator but
  also a 256-byte quarter-wave table (2048 memory bits). A 256-entry quarter
  wave needs 8 address bits plus 2 quadrant bits, so the accumulator here is
  10 bits wide.
* **ISI scale.** The output ISI is `65 + sample`, 1 to 129 cycles. The
  published plots show a smaller, offset ISI range. The offset and scale are
  this design's choice (`ISI_OFFSET` in `ddfs_pkg`).
* **Firing time.** The architecture suggests choosing the weight so that the
  neuron fires at roughly constant intervals for every input. Here the fire
  time within a frame varies with tau_d. The fixed frame period keeps the
  samples evenly spaced anyway, and the value is carried only by the output
  pair's spacing.
* **Own additions.** The frame sequencer, `FRAME_CYC`, the `+1` on tau_d, the
  synapse restart on overlapping spikes, saturation of the membrane, a leak
  period of 0 meaning "no leak", and the status outputs.
* **Size.** Generic synthesis gives about 103 flip-flop bits for the whole
  design. The published FPGA figure of 28 registers and 37 logic elements
  does not count a sequencer, delay counters or output registers. The
  published 250 MHz clock has not been checked here. The published SFDR is
  71 dB. The sample sequence of this design (the output ISI minus its offset)
  has an SFDR of about 57.9 dB over a 1024-sample period at FCW = 1 and at
  FCW = 7, by direct DFT. That figure is limited by the table's 6 fraction
  bits.

## Simulating

Every module has a self-checking testbench, `tb/tb_<module>.sv`. Each one ends
with `TB_RESULT checks=N failures=M`. Run the testbenches from the repository
root, because the ROM loads `rtl/quarter_sine.hex` by that relative path:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/ddfs_pkg.sv \
          tb/tb_lif_ddfs.sv --top-module tb_lif_ddfs -o sim
./obj_dir/sim
```

`tb_lif_ddfs` runs the top level at its default sizes, for about 2.8 million
cycles (a few seconds). Its seven phases cover:

* one full sine period at FCW = 1 (1024 samples);
* a hop to FCW = 7 for 300 samples;
* a threshold out of reach;
* inhibitory input;
* weight 0xF0 / threshold 0xF1, whose frames overrun;
* the leak disabled;
* `enable` low.

For every sample the testbench checks the phase, tau_d, the sine sample, a
single fire after the delayed spike, the exact output ISI against `$sin`, and
the 2048-cycle launch period. It also counts each mechanism: merged and
separate synaptic pulses, leak between pulses, all four quadrants, phase
wrap, missed frames, overruns. Any mechanism that never occurs counts as a
failure.

The block testbenches check, among other things:

* every ROM entry against `$sin`;
* all 1024 phases of the converter, with its 2-cycle latency;
* exact spike delays;
* exact synaptic pulse lengths;
* the membrane against a cycle model over 100,000 random cycles;
* the neuron sequence from the example above;
* the sequencer's timing with a scripted neuron.
