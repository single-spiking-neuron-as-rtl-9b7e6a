// frame_sequencer -- control of one synthesized sample ("frame").
//
// Each sample of the sine is produced by one round trip through the neuron,
// and a new one starts every FRAME_CYC cycles, so the output samples are
// evenly spaced in time:
//   SETTLE   : SETTLE_CYC cycles for the phase-to-amplitude pipeline to show
//              the amplitude of the current phase;
//   LAUNCH   : one cycle: `launch` is the spike on the undelayed input line;
//              the same spike enters the tau_d delay line;
//   WAIT_TAU : until the delayed copy (`tau_spike`) has reached the neuron;
//   WAIT_REST: until the neuron is quiescent (no synaptic pulse, membrane
//              back at zero or leak disabled), the Q-delayed output spike has
//              left, and the frame period is used up;
//   STEP     : one cycle: `pa_step` advances the phase accumulator by FCW;
//              `frame_done` reports the sample, `frame_miss` that the neuron
//              did not fire in it, `frame_overrun` that the neuron needed
//              longer than FRAME_CYC (that frame is stretched).
// Launch-to-launch time is exactly FRAME_CYC unless a frame overruns.
// `enable` low holds the sequencer in SETTLE.
//
// The specification gives the signal flow (input spike pair, neuron, output
// spike pair, phase accumulator updating tau_d) but no controller: the whole
// sequencing, the fixed frame period and the flags are this design's choices.
module frame_sequencer #(
  parameter int unsigned SETTLE_CYC = 2,
  parameter int unsigned FRAME_CYC  = 2048
) (
  input  logic clk,
  input  logic rst_n,
  input  logic enable,
  input  logic tau_spike,
  input  logic neuron_fire,
  input  logic neuron_rest,
  input  logic q_busy,
  output logic launch,
  output logic pa_step,
  output logic frame_done,
  output logic frame_miss,
  output logic frame_overrun
);

  typedef enum logic [2:0] {
    S_SETTLE, S_LAUNCH, S_WAIT_TAU, S_WAIT_REST, S_STEP
  } state_t;

  localparam int unsigned SC_W = $clog2(SETTLE_CYC + 1);
  localparam int unsigned T_W  = $clog2(FRAME_CYC + 1) + 1;
  // Timer value (cycles since launch) in the cycle before STEP.
  localparam int unsigned T_LAST = FRAME_CYC - SETTLE_CYC - 2;

  state_t          state;
  logic            fired;
  logic            late;
  logic [SC_W-1:0] settle_cnt;
  logic [T_W-1:0]  timer;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= S_SETTLE;
      settle_cnt <= '0;
      fired      <= 1'b0;
      late       <= 1'b0;
      timer      <= '0;
    end else begin
      if (neuron_fire) fired <= 1'b1;
      if (timer != '1) timer <= timer + T_W'(1);
      unique case (state)
        S_SETTLE: begin
          if (!enable) begin
            settle_cnt <= '0;
          end else if (settle_cnt >= SC_W'(SETTLE_CYC - 1)) begin
            settle_cnt <= '0;
            state      <= S_LAUNCH;
          end else begin
            settle_cnt <= settle_cnt + SC_W'(1);
          end
        end
        S_LAUNCH: begin
          fired <= neuron_fire;
          late  <= 1'b0;
          timer <= T_W'(1);
          state <= S_WAIT_TAU;
        end
        S_WAIT_TAU: if (tau_spike) state <= S_WAIT_REST;
        S_WAIT_REST: begin
          if (neuron_rest && !q_busy && !neuron_fire) begin
            if (timer >= T_W'(T_LAST)) begin
              late  <= (timer > T_W'(T_LAST));
              state <= S_STEP;
            end
          end
        end
        S_STEP:  state <= S_SETTLE;
        default: state <= S_SETTLE;
      endcase
    end
  end

  assign launch        = (state == S_LAUNCH);
  assign pa_step       = (state == S_STEP);
  assign frame_done    = (state == S_STEP);
  assign frame_miss    = (state == S_STEP) && !fired;
  assign frame_overrun = (state == S_STEP) && late;

  // The frame must leave room for the settle time and the launch.
  initial assert (FRAME_CYC >= SETTLE_CYC + 8)
    else $error("FRAME_CYC too small");

endmodule
