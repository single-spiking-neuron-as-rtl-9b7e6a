// tb_phase_to_amplitude -- checks the converter over all 1024 phases against
// round(64 * sin(2*pi*(p + 0.5)/1024)) computed here directly (no folding),
// the ISI Q = 65 + sample, and the two-cycle latency.
module tb_phase_to_amplitude;
  import ddfs_pkg::*;
  logic clk = 0, rst_n = 0;
  phase_t  phase = '0;
  sample_t sample;
  isi_t    isi;
  int checks = 0, failures = 0;

  phase_to_amplitude dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expected(int p);
    real v;
    v = 64.0 * $sin(2.0 * 3.14159265358979 * (real'(p) + 0.5) / 1024.0);
    if (v >= 0.0) return int'($floor(v + 0.5));
    else          return -int'($floor(-v + 0.5));
  endfunction

  // Present phase p, then look at the outputs after exactly two edges.
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 1024; p++) begin
      @(negedge clk);
      phase = phase_t'(p);
      @(posedge clk);
      #1;
      if (p > 0) begin
        checks++;
        if (int'(sample) != expected(p - 1)) begin
          failures++;
          $display("latency: after one edge sample already %0d", sample);
        end
      end
      @(posedge clk);
      #1;
      checks += 2;
      if (int'(sample) != expected(p)) begin
        failures++;
        $display("phase %0d: sample %0d expected %0d", p, sample, expected(p));
      end
      if (int'(isi) != 65 + expected(p)) begin
        failures++;
        $display("phase %0d: isi %0d expected %0d", p, isi, 65 + expected(p));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
