// tb_lif_ddfs -- end-to-end test of the single-neuron DDFS at its default
// sizes (10-bit phase, 256-byte table, 8-bit neuron counters).
//
// Neuron settings: weight 0x55, threshold 0x56, leak period 0xF, excitatory.
// Phase 1: FCW = 1 for one full period (1024 frames).  Phase 2: a frequency
// hop to FCW = 7 for 300 frames (the phase wraps several times).  Phase 3:
// threshold 0xC8, out of reach of any spike pair, for 4 frames.  Phase 4:
// inhibitory input for 3 frames.  Phase 5: weight 0xF0, threshold 0xF1, whose
// residual potential takes longer than a frame to leak away, for 6 frames.
// Phase 6: leak disabled for 6 frames.  Phase 7: enable low holds the design.
//
// For every frame the expected phase is n*FCW mod 1024 (tracked here), the
// delayed input spike must come tau_d = phase + 1 cycles after the direct one,
// the neuron must fire exactly once and only after the delayed spike, and the
// output pair's spacing must be 65 + round(64*sin(2*pi*(phase+0.5)/1024)),
// computed here with $sin.  Launches must be exactly 2048 cycles apart unless
// the previous frame overran.  In phases 3 and 4 no output spike may appear
// and every frame must be flagged as a miss.
//
// Each mechanism is counted and must occur: overlapping synaptic pulses
// (tau_d < weight), separate pulses with leak between them, all four sine
// quadrants, phase wrap-around, the frequency hop, missed frames,
// inhibitory input, frame overrun, disabled leak and the enable hold.
module tb_lif_ddfs;
  import ddfs_pkg::*;
  logic    clk = 0, rst_n = 0, enable = 0, exc_inh = 1;
  phase_t  fcw = 10'd1;
  cnt_t    weight = 8'h55, threshold = 8'h56;
  leak_t   leak_period = 4'hF;
  logic    in_spike_direct, in_spike_delayed, syn_active, neuron_spike;
  logic    out_spike, frame_done, frame_miss, frame_overrun;
  cnt_t    syn_count, membrane;
  phase_t  phase;
  sample_t sample;
  isi_t    isi;

  int checks = 0, failures = 0;
  longint cyc = 0;

  // mechanism counters
  int n_frames = 0, n_overlap = 0, n_leak_between = 0, n_wrap = 0;
  int n_quadrant[4] = '{0, 0, 0, 0};
  int n_hop = 0, n_miss = 0, n_inhib = 0, n_hold = 0, n_neg = 0;
  int n_period = 0, n_overrun = 0, n_noleak = 0;
  longint last_launch = -1;
  bit last_overrun = 0;
  localparam int FRAME = 2048;
  localparam longint FRAME_L = longint'(FRAME);

  lif_ddfs dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (12000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  function automatic int expected_sample(int p);
    real v;
    v = 64.0 * $sin(2.0 * 3.14159265358979 * (real'(p) + 0.5) / 1024.0);
    if (v >= 0.0) return int'($floor(v + 0.5));
    else          return -int'($floor(-v + 0.5));
  endfunction

  // Run one frame, starting at the negedge before `launch` is seen.
  // mode 1: the neuron must fire once, after the delayed spike; mode 0: it
  // must stay silent; mode 2 (leak disabled): the frame must only complete,
  // with every fire answered by an output spike Q cycles later.
  task automatic run_frame(int p, int mode);
    bit expect_fire;
    longint t_launch, t_tau, t_fire, t_q;
    int fires, q_seen, wait_c;
    int want_isi;
    bit gap_seen, leak_seen;
    cnt_t prev_mem;
    expect_fire = (mode != 0);
    want_isi = 65;
    want_isi += expected_sample(p);
    wait_c = 0;
    while (!in_spike_direct) begin
      @(negedge clk);
      wait_c++;
      if (wait_c > FRAME) begin check(0, "launch missing"); return; end
    end
    if (last_launch >= 0 && !last_overrun) begin
      check(cyc - last_launch == FRAME_L,
            $sformatf("launch period %0d expected %0d", cyc - last_launch, FRAME));
      n_period++;
    end
    last_launch = cyc;
    check(int'(phase) == p, $sformatf("phase %0d expected %0d", phase, p));
    check(int'(sample) == expected_sample(p),
          $sformatf("sample %0d expected %0d at phase %0d", sample, expected_sample(p), p));
    t_launch = cyc; t_tau = -1; t_fire = -1; t_q = -1;
    fires = 0; q_seen = 0; gap_seen = 0; leak_seen = 0; prev_mem = membrane;
    while (!frame_done) begin
      @(negedge clk);
      if (in_spike_delayed) t_tau = cyc;
      if (neuron_spike) begin fires++; t_fire = cyc; end
      if (out_spike && !neuron_spike) begin q_seen++; t_q = cyc; end
      if (t_tau < 0 && !syn_active && cyc > t_launch + 1) gap_seen = 1;
      if (t_tau < 0 && !syn_active && membrane < prev_mem) leak_seen = 1;
      prev_mem = membrane;
      if (cyc - t_launch > 8000) begin check(0, "frame does not end"); return; end
    end
    last_overrun = frame_overrun;
    if (frame_overrun) begin
      n_overrun++;
      check(cyc - t_launch > FRAME_L - 3, "overrun only when the neuron needs longer than a frame");
    end else begin
      check(cyc - t_launch == FRAME_L - 3, "step at the end of the frame period");
    end
    check(t_tau - t_launch == longint'(p) + 1,
          $sformatf("tau_d %0d expected %0d", t_tau - t_launch, p + 1));
    n_frames++;
    if (mode == 2) begin
      check(fires > 0 && !frame_miss, "leak disabled: neuron still fires");
      check(t_q - t_fire == longint'(want_isi), "leak disabled: output ISI");
      n_noleak++;
      return;
    end
    check(frame_miss == !expect_fire, "miss flag");
    if (expect_fire) begin
      check(fires == 1, $sformatf("phase %0d: %0d fires", p, fires));
      check(t_fire > t_tau, "fire only after the delayed input spike");
      check(q_seen == 1, "one delayed output spike");
      check(t_q - t_fire == longint'(want_isi),
            $sformatf("phase %0d: output ISI %0d expected %0d", p, t_q - t_fire, want_isi));
      if (gap_seen) begin
        n_leak_between += leak_seen;
        // The first leak step shows 16 idle cycles after the first pulse.
        check(leak_seen || (p + 1 - int'(weight)) <= 16, "leak between separate pulses");
      end else begin
        n_overlap++;
      end
      n_quadrant[p >> 8]++;
      if (expected_sample(p) < 0) n_neg++;
    end else begin
      check(fires == 0 && q_seen == 0, "no output spikes when the threshold is out of reach");
      if (frame_miss) n_miss++;
      if (!exc_inh && frame_miss) n_inhib++;
    end
  endtask

  int p;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    enable = 1;
    p = 0;
    // Phase 1: one full period at FCW = 1.
    for (int n = 0; n < 1024; n++) begin
      run_frame(p, 1);
      p = (p + 1) % 1024;
      if (p == 0) n_wrap++;
    end
    // Phase 2: frequency hop.
    @(negedge clk);
    fcw = 10'd7;
    n_hop++;
    // The step that ended the period (FCW = 1) brought the phase back to 0.
    for (int n = 0; n < 300; n++) begin
      run_frame(p, 1);
      if (p + 7 >= 1024) n_wrap++;
      p = (p + 7) % 1024;
    end
    // Phase 3: threshold out of reach.
    threshold = 8'hC8;
    for (int n = 0; n < 4; n++) begin
      run_frame(p, 0);
      p = (p + 7) % 1024;
    end
    // Phase 4: inhibitory input.
    threshold = 8'h56;
    exc_inh = 0;
    for (int n = 0; n < 3; n++) begin
      run_frame(p, 0);
      p = (p + 7) % 1024;
    end
    exc_inh = 1;
    // Phase 5: a long synaptic pulse leaves a large residual potential that
    // needs longer than a frame to leak away: frames overrun.
    weight = 8'hF0;
    threshold = 8'hF1;
    for (int n = 0; n < 6; n++) begin
      run_frame(p, 1);
      p = (p + 7) % 1024;
    end
    // Phase 6: leak disabled; the residual potential stays, frames go on.
    weight = 8'h55;
    threshold = 8'h56;
    leak_period = 4'h0;
    for (int n = 0; n < 6; n++) begin
      run_frame(p, 2);
      p = (p + 7) % 1024;
    end
    leak_period = 4'hF;
    // Phase 7: enable low holds phase and spikes.
    enable = 0;
    repeat (5) @(negedge clk);
    begin
      phase_t held;
      bit quiet;
      held = phase; quiet = 1;
      repeat (2000) begin
        @(negedge clk);
        if (in_spike_direct || out_spike || phase != held) quiet = 0;
      end
      check(quiet, "enable low holds the synthesizer");
      n_hold += quiet;
    end

    $display("frames=%0d overlap=%0d leak_between=%0d wrap=%0d quadrants=%0d/%0d/%0d/%0d negative=%0d hop=%0d miss=%0d inhibitory=%0d hold=%0d period=%0d overrun=%0d noleak=%0d",
             n_frames, n_overlap, n_leak_between, n_wrap, n_quadrant[0], n_quadrant[1],
             n_quadrant[2], n_quadrant[3], n_neg, n_hop, n_miss, n_inhib, n_hold,
             n_period, n_overrun, n_noleak);
    check(n_period > 0, "fixed frame period checked");
    check(n_overrun > 0, "frame overrun happened");
    check(n_noleak > 0, "frames with the leak disabled completed");
    check(n_overlap > 0, "overlapping synaptic pulses happened");
    check(n_leak_between > 0, "leak between separate pulses happened");
    check(n_wrap > 0, "phase wrap happened");
    for (int q = 0; q < 4; q++) check(n_quadrant[q] > 0, $sformatf("quadrant %0d visited", q));
    check(n_neg > 0, "negative samples happened");
    check(n_hop > 0, "frequency hop happened");
    check(n_miss > 0, "missed frames happened");
    check(n_inhib > 0, "inhibitory frames happened");
    check(n_hold > 0, "enable hold happened");
    $display("simulated cycles=%0d", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
