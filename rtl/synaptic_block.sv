// synaptic_block -- synapse of the digital LIF neuron.
//
// An input spike starts a counter and raises `syn_out`; the counter advances
// once per clock and, when it reaches the synaptic weight w, is reset and
// `syn_out` falls.  Each spike therefore becomes a current pulse of exactly
// `weight` cycles that drives the core block.  A weight of 0 gives no pulse.
//
// Timing: `syn_out` rises in the cycle after the input spike.  A spike that
// arrives during a pulse restarts the count, so the pulse ends `weight` cycles
// after the latest spike.  The counter, its reset at w and the 8-bit width
// follow the specification; the restart on overlapping spikes is this
// design's choice (with one counter, two overlapping spikes cannot add).
module synaptic_block
  import ddfs_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic spike_in,
  input  cnt_t weight,
  output logic syn_out,
  output cnt_t count
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      count   <= '0;
      syn_out <= 1'b0;
    end else if (spike_in) begin
      count   <= cnt_t'(1);
      syn_out <= (weight != '0);
    end else if (syn_out) begin
      if (count >= weight) begin
        count   <= '0;
        syn_out <= 1'b0;
      end else begin
        count <= count + cnt_t'(1);
      end
    end
  end

endmodule
