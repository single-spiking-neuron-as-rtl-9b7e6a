// tb_lif_neuron -- neuron with weight 0x55, threshold 0x33, leak period 0xF.
// One input spike gives an 85-cycle synaptic pulse: the membrane reaches
// 0x33 after 51 up-counts, fires once (spike one cycle after reaching it),
// resets and counts the remaining 33 cycles, then leaks one step per 15
// cycles back to rest.  A second case with threshold 0x56 needs a spike pair:
// one spike alone must not fire, a pair 100 cycles apart must.  Last, with
// the leak disabled the membrane holds its value and `rest` is high.
module tb_lif_neuron;
  import ddfs_pkg::*;
  logic clk = 0, rst_n = 0, spike_in = 0, syn_active, spike_out, rest;
  cnt_t membrane, syn_count;
  neuron_cfg_t cfg;
  int checks = 0, failures = 0;
  int fires, fire_at, cyc;

  lif_neuron dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    cfg = '{weight: 8'h55, threshold: 8'h33, leak_period: 4'hF, exc_inh: 1'b1};
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(rest, "at rest after reset");
    spike_in = 1;
    @(negedge clk);
    spike_in = 0;
    fires = 0; fire_at = -1;
    // Cycle c = 1 is the first cycle of the synaptic pulse.
    for (cyc = 1; cyc <= 85; cyc++) begin
      check(syn_active, "synaptic pulse active");
      if (spike_out) begin fires++; fire_at = cyc; end
      if (cyc == 52) check(membrane == 8'h33, "membrane at threshold in cycle 52");
      @(negedge clk);
    end
    check(!syn_active, "pulse lasts 85 cycles");
    check(fires == 1 && fire_at == 53, $sformatf("one fire in cycle 53 (got %0d at %0d)", fires, fire_at));
    check(membrane == 8'd33, $sformatf("membrane 33 after pulse (got %0d)", membrane));
    repeat (33 * 15 - 1) @(negedge clk);
    check(membrane == 8'd1 && !rest, "one step left before rest");
    @(negedge clk);
    check(membrane == 8'd0 && rest, "back at rest after 33 leak periods");

    // Pair coding: threshold just above one pulse.
    cfg.threshold = 8'h56;
    spike_in = 1; @(negedge clk); spike_in = 0;
    fires = 0;
    repeat (300) begin
      if (spike_out) fires++;
      @(negedge clk);
    end
    check(fires == 0, "single spike below threshold 0x56 does not fire");
    while (!rest) @(negedge clk);
    spike_in = 1; @(negedge clk); spike_in = 0;
    fires = 0;
    for (cyc = 1; cyc < 400; cyc++) begin
      if (cyc == 100) spike_in = 1;
      if (spike_out) fires++;
      @(negedge clk);
      spike_in = 0;
    end
    check(fires == 1, $sformatf("spike pair 100 cycles apart fires once (got %0d)", fires));

    // Leak disabled: the residual potential stays and the neuron counts as
    // quiescent once the pulse is over.
    while (!rest) @(negedge clk);
    cfg.leak_period = 4'h0;
    spike_in = 1; @(negedge clk); spike_in = 0;
    repeat (10) @(negedge clk);
    check(!rest && membrane == 8'd10, "pulse in progress is not rest");
    repeat (100) @(negedge clk);
    check(membrane == 8'd85 && rest, "leak disabled: membrane held, neuron quiescent");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
