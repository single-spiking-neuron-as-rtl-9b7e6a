// spike_delay -- adjustable delay line for single-cycle spikes.
//
// A down-counter replaces a tapped shift register: a spike on `spike_in` loads
// the requested delay, and `spike_out` pulses for one cycle exactly `delay`
// cycles after the input pulse (a delay of 0 is treated as 1).  `busy` is high
// while a spike is in flight.  One spike is held at a time; a new input spike
// while busy restarts the delay from that spike (the sequencer never does
// this).  Used for the tau_d line at the input and the Q line at the output.
//
// The delay function follows the specification; the counter form, the
// one-spike capacity and the minimum of one cycle are this design's choices.
module spike_delay #(
  parameter int unsigned DELAY_W = 11
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               spike_in,
  input  logic [DELAY_W-1:0] delay,
  output logic               spike_out,
  output logic               busy
);

  logic [DELAY_W-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt       <= '0;
      busy      <= 1'b0;
      spike_out <= 1'b0;
    end else begin
      spike_out <= 1'b0;
      if (spike_in) begin
        if (delay <= DELAY_W'(1)) begin
          spike_out <= 1'b1;
          busy      <= 1'b0;
        end else begin
          cnt  <= delay - DELAY_W'(1);
          busy <= 1'b1;
        end
      end else if (busy) begin
        if (cnt == DELAY_W'(1)) begin
          spike_out <= 1'b1;
          busy      <= 1'b0;
        end
        cnt <= cnt - DELAY_W'(1);
      end
    end
  end

endmodule
