// tb_core_block -- membrane counter test.
// Directed: with threshold 0x33 the membrane climbs 0x30, 0x31, 0x32, 0x33,
// then returns to 0 with a one-cycle output spike; an excitatory pulse of n
// cycles raises the membrane by n; with leak period L, k*L idle cycles lower
// it by k; leak period 0 holds it; inhibitory pulses count down to 0.
// Random: syn_in, exc_inh, leak period and threshold are driven at random and
// the membrane and spike are compared each cycle with a behavioural model.
module tb_core_block;
  import ddfs_pkg::*;
  logic  clk = 0, rst_n = 0, syn_in = 0, exc_inh = 1, spike_out;
  leak_t leak_period = 4'hF;
  cnt_t  threshold = 8'hFF, membrane;
  int checks = 0, failures = 0;

  core_block dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_mem(int v, string what);
    checks++;
    if (int'(membrane) != v) begin
      failures++;
      $display("%s: membrane %0d expected %0d", what, membrane, v);
    end
  endtask

  // Behavioural model state.
  int m_mem, m_idle;
  logic m_spk;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    expect_mem(0, "reset");

    // Excitatory pulse of 0x30 cycles, threshold 0x33.
    threshold = 8'h33;
    syn_in = 1;
    repeat (48) @(negedge clk);
    expect_mem('h30, "after 0x30 up-counts");
    for (int v = 'h31; v <= 'h33; v++) begin
      @(negedge clk);
      expect_mem(v, "climb");
      checks++;
      if (spike_out) begin failures++; $display("early spike at %0h", v); end
    end
    @(negedge clk);
    expect_mem(0, "reset on threshold");
    checks++;
    if (!spike_out) begin failures++; $display("no spike at threshold"); end
    @(negedge clk);
    checks++;
    if (spike_out) begin failures++; $display("spike longer than one cycle"); end
    expect_mem(1, "counting resumes after fire");
    syn_in = 0;

    // Leak: from 1+... build up to 20 then leak with period 15.
    threshold = 8'hFF;
    syn_in = 1;
    repeat (19) @(negedge clk);
    syn_in = 0;
    expect_mem(20, "build-up");
    repeat (15 * 3) @(negedge clk);
    expect_mem(17, "three leak periods of 15");
    leak_period = 4'd4;
    repeat (4 * 5) @(negedge clk);
    expect_mem(12, "five leak periods of 4");
    leak_period = 4'd0;
    repeat (100) @(negedge clk);
    expect_mem(12, "leak period 0 holds");
    // Inhibitory pulses count down and stop at 0.
    exc_inh = 0;
    syn_in = 1;
    repeat (5) @(negedge clk);
    expect_mem(7, "inhibitory down-count");
    repeat (20) @(negedge clk);
    expect_mem(0, "inhibitory saturates at 0");
    syn_in = 0;
    exc_inh = 1;

    // Random run against the model.
    rst_n = 0; @(negedge clk); rst_n = 1;
    m_mem = 0; m_idle = 0; m_spk = 0;
    for (int i = 0; i < 100000; i++) begin
      if (i % 2000 == 0) begin
        leak_period = leak_t'($urandom);
        threshold   = cnt_t'($urandom_range(1, 255));
      end
      syn_in  = ($urandom_range(0, 2) == 0);
      exc_inh = ($urandom_range(0, 5) != 0);
      @(posedge clk);
      // model step
      if (m_mem >= int'(threshold)) begin
        m_spk = 1; m_mem = 0; m_idle = 0;
      end else begin
        m_spk = 0;
        if (syn_in) begin
          m_idle = 0;
          if (exc_inh) m_mem = (m_mem < 255) ? m_mem + 1 : 255;
          else         m_mem = (m_mem > 0) ? m_mem - 1 : 0;
        end else if (leak_period != 0) begin
          m_idle++;
          if (m_idle >= int'(leak_period)) begin
            m_idle = 0;
            if (m_mem > 0) m_mem--;
          end
        end else begin
          m_idle = 0;
        end
      end
      @(negedge clk);
      checks += 2;
      if (int'(membrane) != m_mem) begin
        failures++;
        if (failures < 10) $display("random %0d: membrane %0d model %0d", i, membrane, m_mem);
      end
      if (spike_out != m_spk) begin
        failures++;
        if (failures < 10) $display("random %0d: spike %0b model %0b", i, spike_out, m_spk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
