// tb_frame_sequencer -- drives the sequencer (SETTLE_CYC 2, FRAME_CYC 64)
// with a scripted neuron.  Checks: `launch` comes SETTLE_CYC cycles after
// enable; no step before the delayed spike, before rest, or while the Q line
// is busy; launch-to-launch is exactly FRAME_CYC for short frames; a frame
// whose neuron stays busy past the period steps one cycle after rest and
// raises `frame_overrun`; a frame without a fire raises `frame_miss`;
// disable stops new frames.
module tb_frame_sequencer;
  localparam int FRAME = 64;
  localparam longint FRAME_L = longint'(FRAME);
  logic clk = 0, rst_n = 0, enable = 0;
  logic tau_spike = 0, neuron_fire = 0, neuron_rest = 1, q_busy = 0;
  logic launch, pa_step, frame_done, frame_miss, frame_overrun;
  int checks = 0, failures = 0;
  int launches = 0, steps = 0;
  longint cyc = 0, last_launch = -1;

  frame_sequencer #(.SETTLE_CYC(2), .FRAME_CYC(FRAME)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc++;
    if (rst_n && launch) launches++;
    if (rst_n && pa_step) steps++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, what); end
  endtask

  // One frame: delayed spike after `tau` cycles, neuron busy for `busy`
  // cycles after it, optional fire followed by `q` cycles of Q line.
  task automatic frame(int tau, int busy, bit fire, int q, bit want_overrun);
    int c;
    longint t0, t_rest;
    c = 0;
    while (!launch) begin @(negedge clk); c++; if (c > FRAME + 10) break; end
    check(launch, "launch");
    t0 = cyc;
    if (last_launch >= 0 && !want_overrun)
      check(t0 - last_launch == FRAME_L, $sformatf("launch period %0d", t0 - last_launch));
    last_launch = t0;
    neuron_rest = 0;
    for (int i = 1; i <= tau; i++) begin
      @(negedge clk);
      check(!pa_step && !launch, "idle while waiting for tau");
      tau_spike = (i == tau);
    end
    @(negedge clk);
    tau_spike = 0;
    repeat (busy) begin check(!pa_step, "no step while neuron busy"); @(negedge clk); end
    if (fire) begin
      neuron_fire = 1; @(negedge clk); neuron_fire = 0;
      q_busy = 1;
      repeat (q) begin check(!pa_step, "no step while Q busy"); @(negedge clk); end
      q_busy = 0;
    end
    neuron_rest = 1;
    t_rest = cyc;
    c = 0;
    while (!pa_step) begin @(negedge clk); c++; if (c > FRAME) break; end
    check(pa_step && frame_done, "step");
    check(frame_miss == !fire, "miss flag");
    check(frame_overrun == want_overrun, "overrun flag");
    if (want_overrun) check(cyc - t_rest == 1, "overrun frame steps right after rest");
    else check(cyc - t0 == FRAME_L - 3, $sformatf("step at %0d of the frame", cyc - t0));
    @(negedge clk);
    check(!pa_step, "step lasts one cycle");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (10) begin @(negedge clk); check(!launch, "no launch while disabled"); end
    enable = 1;
    @(negedge clk); check(!launch, "settle");
    @(negedge clk); check(launch, "launch after settle");
    frame(5, 20, 1, 7, 0);
    frame(1, 3, 1, 1, 0);
    frame(30, 10, 0, 0, 0);
    frame(20, 60, 1, 12, 1);
    last_launch = -1;
    frame(3, 10, 1, 12, 0);
    check(launches == 5 && steps == 5, $sformatf("5 frames (launch %0d step %0d)", launches, steps));
    @(negedge clk);
    enable = 0;
    repeat (3 * FRAME) @(negedge clk);
    check(launches == 5, "no frame starts while disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
