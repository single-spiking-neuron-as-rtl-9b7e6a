// core_block -- membrane (soma) of the digital LIF neuron.
//
// An up/down counter models the membrane potential, the forward-Euler form of
// C dV/dt = -V/R + I.  While the synaptic pulse `syn_in` is high it counts up
// one per clock for an excitatory input (`exc_inh` = 1) or down for an
// inhibitory one, saturating at 0 and at the counter's maximum.  With no input
// pulse the potential leaks: it is decremented by one every `leak_period`
// cycles, down to 0 (a leak period of 0 turns the leak off).  When the
// potential is at or above `threshold` the neuron fires: on the next clock the
// membrane is reset to 0 and `spike_out` is high for that one cycle.
//
// The counter, the leak period, the >= th compare and the reset follow the
// specification; the saturation, the leak timer restarting whenever an input
// pulse is present, and the one-cycle registered spike are this design's
// choices.
module core_block
  import ddfs_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  syn_in,
  input  logic  exc_inh,
  input  leak_t leak_period,
  input  cnt_t  threshold,
  output cnt_t  membrane,
  output logic  spike_out
);

  leak_t leak_cnt;
  logic  fire;

  assign fire = (membrane >= threshold);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      membrane  <= '0;
      leak_cnt  <= '0;
      spike_out <= 1'b0;
    end else begin
      spike_out <= fire;
      if (fire) begin
        membrane <= '0;
        leak_cnt <= '0;
      end else if (syn_in) begin
        leak_cnt <= '0;
        if (exc_inh) begin
          if (membrane != '1) membrane <= membrane + cnt_t'(1);
        end else begin
          if (membrane != '0) membrane <= membrane - cnt_t'(1);
        end
      end else if (leak_period == '0) begin
        leak_cnt <= '0;
      end else if (leak_cnt >= leak_period - leak_t'(1)) begin
        leak_cnt <= '0;
        if (membrane != '0) membrane <= membrane - cnt_t'(1);
      end else begin
        leak_cnt <= leak_cnt + leak_t'(1);
      end
    end
  end

endmodule
