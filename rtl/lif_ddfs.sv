// lif_ddfs -- direct digital frequency synthesizer built on one LIF neuron.
//
// The phase accumulator (PA) sets, for each sample, the spacing of an input
// spike pair: one spike goes to the neuron directly, the other through a delay
// line of tau_d = phase + 1 cycles, so the neuron's input current is
// I(t) = U(t) + U(t - tau_d).  The LIF neuron (synaptic counter feeding a
// membrane counter) fires once the pair has driven its membrane to the
// threshold.  Its spike leaves on the output directly and once more through a
// second delay line of Q cycles, so the output inter-spike interval encodes
// the sine value of the phase: Q = ISI_OFFSET + sin-sample, read from a
// quarter-wave table with quadrant folding.  A frame sequencer issues the
// input spike every FRAME_CYC cycles, waits for the output pair and for the
// neuron to come to rest, then steps the PA by FCW, so the n-th output pair
// carries sin(2*pi*n*FCW/2^PHASE_W) and the synthesized frequency is
// f_out = FCW * f_clk / (FRAME_CYC * 2^PHASE_W).
//
// Interface: `fcw` and the neuron settings (`weight`, `threshold`,
// `leak_period`, `exc_inh`) are run-time inputs; the threshold should let the
// neuron fire for the largest tau_d, e.g. weight + 1 with weight = 0x55 and
// leak period 0xF.  Outputs: both input lines, the synaptic pulse and counter, the membrane, the neuron spike,
// the output spike pair `out_spike`, the current phase, its signed sample and
// ISI, and per-frame status (`frame_done`, `frame_miss`, `frame_overrun`).
// With the settings above the neuron needs at most about 1500 cycles per
// sample, well inside the default FRAME_CYC of 2048; settings that need more
// stretch that frame and raise `frame_overrun`.
//
// Following the specification: the PA, tau_d and Q lines, the LIF neuron, the
// quarter-wave LUT and the output spike pair.  This design's choices: the
// frame sequencing and its period, the +1 on tau_d, the ISI offset and the ports.
module lif_ddfs
  import ddfs_pkg::*;
#(
  parameter int unsigned FRAME_CYC = 2048
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    enable,
  input  phase_t  fcw,
  input  cnt_t    weight,
  input  cnt_t    threshold,
  input  leak_t   leak_period,
  input  logic    exc_inh,
  output logic    in_spike_direct,
  output logic    in_spike_delayed,
  output logic    syn_active,
  output cnt_t    syn_count,
  output cnt_t    membrane,
  output logic    neuron_spike,
  output logic    out_spike,
  output phase_t  phase,
  output sample_t sample,
  output isi_t    isi,
  output logic    frame_done,
  output logic    frame_miss,
  output logic    frame_overrun
);

  localparam int unsigned TAU_W = PHASE_W + 1;

  logic        pa_step;
  logic        tau_busy;
  logic        q_busy;
  logic        q_spike;
  logic        neuron_rest;
  neuron_cfg_t cfg;
  logic [TAU_W-1:0] tau_d;

  assign cfg = '{weight: weight, threshold: threshold,
                 leak_period: leak_period, exc_inh: exc_inh};

  phase_accumulator u_pa (
    .clk   (clk),
    .rst_n (rst_n),
    .step  (pa_step),
    .fcw   (fcw),
    .phase (phase)
  );

  phase_to_amplitude u_p2a (
    .clk    (clk),
    .rst_n  (rst_n),
    .phase  (phase),
    .sample (sample),
    .isi    (isi)
  );

  frame_sequencer #(.FRAME_CYC(FRAME_CYC)) u_seq (
    .clk         (clk),
    .rst_n       (rst_n),
    .enable      (enable),
    .tau_spike   (in_spike_delayed),
    .neuron_fire (neuron_spike),
    .neuron_rest (neuron_rest),
    .q_busy      (q_busy),
    .launch      (in_spike_direct),
    .pa_step     (pa_step),
    .frame_done  (frame_done),
    .frame_miss    (frame_miss),
    .frame_overrun (frame_overrun)
  );

  // Input delay line tau_d, set by the phase value.
  assign tau_d = TAU_W'(phase) + TAU_W'(1);

  spike_delay #(.DELAY_W(TAU_W)) u_tau (
    .clk       (clk),
    .rst_n     (rst_n),
    .spike_in  (in_spike_direct),
    .delay     (tau_d),
    .spike_out (in_spike_delayed),
    .busy      (tau_busy)
  );

  lif_neuron u_neuron (
    .clk        (clk),
    .rst_n      (rst_n),
    .spike_in   (in_spike_direct | in_spike_delayed),
    .cfg        (cfg),
    .membrane   (membrane),
    .syn_active (syn_active),
    .syn_count  (syn_count),
    .spike_out  (neuron_spike),
    .rest       (neuron_rest)
  );

  // Output delay line Q, set by the sine table.
  spike_delay #(.DELAY_W(ISI_W)) u_q (
    .clk       (clk),
    .rst_n     (rst_n),
    .spike_in  (neuron_spike),
    .delay     (isi),
    .spike_out (q_spike),
    .busy      (q_busy)
  );

  assign out_spike = neuron_spike | q_spike;

  // The tau_d line is idle again before each new input spike.
  a_tau_free: assert property (@(posedge clk) disable iff (!rst_n)
                               in_spike_direct |-> !tau_busy);

endmodule
