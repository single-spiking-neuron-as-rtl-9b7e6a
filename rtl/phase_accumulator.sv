// phase_accumulator -- phase value generator of the DDFS.
//
// A PHASE_W-bit register that adds the frequency control word FCW each time
// `step` is high and wraps modulo 2^PHASE_W, so one period of the synthesized
// sine takes 2^PHASE_W / FCW steps (f_out = FCW * f_step / 2^PHASE_W).  The
// registered phase drives both the input delay tau_d and the sine table.
//
// Interface: `phase` is the register itself; it changes on the clock edge at
// which `step` is sampled high.  Synchronous active-low reset to zero (the
// reset value and the step enable are this design's choices; the accumulator
// and its FCW input follow the specification).
module phase_accumulator #(
  parameter int unsigned PHASE_W = 10
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               step,
  input  logic [PHASE_W-1:0] fcw,
  output logic [PHASE_W-1:0] phase
);

  always_ff @(posedge clk) begin
    if (!rst_n)    phase <= '0;
    else if (step) phase <= phase + fcw;
  end

endmodule
