// phase_to_amplitude -- phase-to-amplitude converter using quarter-wave symmetry.
//
// The two MSBs of the phase select the quadrant.  The second MSB conditionally
// inverts the table address (quadrants 2 and 4 read the quarter wave
// backwards); the MSB conditionally negates the table value (quadrants 3 and
// 4 give the negative half).  The result is the signed sample
//   sample = (msb ? -1 : +1) * LUT[addr ^ {2nd msb}]
// and the output inter-spike interval Q = ISI_OFFSET + sample, which is the
// delay the output spike pair is given.  Q is always at least one cycle.
//
// Timing: two-cycle latency from `phase` to `sample` and `isi` (one cycle for
// the table read, one output register).  The quadrant logic follows the
// specification; applying the sign by negation, the output register and the
// offset that turns the sample into a positive ISI are this design's choices.
module phase_to_amplitude
  import ddfs_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  phase_t  phase,
  output sample_t sample,
  output isi_t    isi
);

  localparam int unsigned A = LUT_ADDR_W;

  lut_addr_t addr;
  lut_data_t amp;
  logic      negate_q;

  // Second MSB: mirror the address inside the half period.
  assign addr = phase[A-1:0] ^ {A{phase[A]}};

  quarter_sine_lut u_lut (
    .clk  (clk),
    .addr (addr),
    .data (amp)
  );

  // MSB travels alongside the table read.
  always_ff @(posedge clk) begin
    if (!rst_n) negate_q <= 1'b0;
    else        negate_q <= phase[A+1];
  end

  sample_t sample_d;
  always_comb begin
    sample_d = negate_q ? -sample_t'(amp) : sample_t'(amp);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sample <= '0;
      isi    <= isi_t'(ISI_OFFSET);
    end else begin
      sample <= sample_d;
      isi    <= isi_t'(sample_t'(ISI_OFFSET) + sample_d);
    end
  end

endmodule
