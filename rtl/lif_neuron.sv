// lif_neuron -- digital leaky integrate-and-fire neuron.
//
// Two counters in series: the synaptic block turns each input spike into a
// pulse of `weight` cycles, and the core block integrates that pulse into the
// membrane potential, leaks between pulses and fires when the potential
// reaches the threshold.  `syn_count` is the synaptic counter.  `rest` is
// high when the neuron is quiescent: no synaptic pulse, no spike, and the
// membrane back at zero (or the leak disabled, so it will not change any
// more).  The sequencer uses it to tell that a sample is finished.
//
// Timing: the synaptic pulse starts one cycle after an input spike; the
// membrane then moves one step per cycle, and `spike_out` rises one cycle
// after the membrane reaches the threshold.  The structure follows the
// specification; the `rest` output is this design's addition.
module lif_neuron
  import ddfs_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        spike_in,
  input  neuron_cfg_t cfg,
  output cnt_t        membrane,
  output logic        syn_active,
  output cnt_t        syn_count,
  output logic        spike_out,
  output logic        rest
);

  synaptic_block u_syn (
    .clk      (clk),
    .rst_n    (rst_n),
    .spike_in (spike_in),
    .weight   (cfg.weight),
    .syn_out  (syn_active),
    .count    (syn_count)
  );

  core_block u_core (
    .clk         (clk),
    .rst_n       (rst_n),
    .syn_in      (syn_active),
    .exc_inh     (cfg.exc_inh),
    .leak_period (cfg.leak_period),
    .threshold   (cfg.threshold),
    .membrane    (membrane),
    .spike_out   (spike_out)
  );

  assign rest = !syn_active && !spike_out &&
                ((membrane == '0) || (cfg.leak_period == '0));

endmodule
