// tb_synaptic_block -- checks that one input spike gives a synaptic pulse of
// exactly `weight` cycles starting the cycle after the spike, that weight 0
// gives none, and that a spike during a pulse makes it end `weight` cycles
// after the later spike.
module tb_synaptic_block;
  import ddfs_pkg::*;
  logic clk = 0, rst_n = 0, spike_in = 0, syn_out;
  cnt_t weight = '0, count;
  int checks = 0, failures = 0;

  synaptic_block dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Spike at cycle 0, optional second spike at cycle `gap`; record the cycles
  // (1-based after the first spike) where syn_out is high.
  task automatic run(int w, int gap);
    int first, last, n, want_last, want_n;
    @(negedge clk);
    weight = cnt_t'(w);
    spike_in = 1;
    @(negedge clk);
    spike_in = 0;
    first = -1; last = -1; n = 0;
    for (int c = 1; c <= w + gap + 5; c++) begin
      if (syn_out) begin
        n++;
        if (first < 0) first = c;
        last = c;
      end
      if (gap > 0 && c == gap) spike_in = 1;
      @(negedge clk);
      spike_in = 0;
    end
    want_n    = (w == 0) ? 0 : ((gap > 0 && gap < w) ? gap + w : w);
    want_last = want_n;
    checks += 3;
    if (n != want_n) begin failures++; $display("w=%0d gap=%0d: %0d high cycles, want %0d", w, gap, n, want_n); end
    if (w != 0 && first != 1) begin failures++; $display("w=%0d: pulse starts at %0d", w, first); end
    if (last != (w == 0 ? -1 : want_last)) begin failures++; $display("w=%0d gap=%0d: ends at %0d", w, gap, last); end
    repeat (3) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(0, 0); run(1, 0); run(2, 0); run(85, 0); run(255, 0);
    run(85, 10); run(85, 84);
    for (int i = 0; i < 100; i++) run($urandom_range(1, 255), 0);
    for (int i = 0; i < 50; i++) begin
      int w;
      w = $urandom_range(2, 200);
      run(w, $urandom_range(1, w - 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
