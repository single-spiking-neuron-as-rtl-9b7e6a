// tb_phase_accumulator -- self-checking test of the phase accumulator.
// Steps the accumulator with random FCW values and random step enables and
// compares the phase with a modulo-2^10 model every cycle; also checks that
// FCW = 1 returns to zero after exactly 1024 steps.
module tb_phase_accumulator;
  localparam int unsigned W = 10;
  logic clk = 0, rst_n = 0, step = 0;
  logic [W-1:0] fcw = '0, phase;
  int checks = 0, failures = 0;
  int unsigned model = 0;

  phase_accumulator #(.PHASE_W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_phase();
    checks++;
    if (phase !== W'(model)) begin
      failures++;
      $display("phase mismatch: got %0d expected %0d", phase, model);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check_phase();
    for (int i = 0; i < 5000; i++) begin
      step = ($urandom_range(0, 3) != 0);
      fcw  = W'($urandom);
      @(posedge clk);
      if (step) model = (model + int'(fcw)) % (1 << W);
      @(negedge clk);
      check_phase();
    end
    // One full period at FCW = 1.
    rst_n = 0; @(negedge clk); rst_n = 1; model = 0;
    fcw = 1; step = 1;
    for (int i = 1; i <= 1024; i++) begin
      @(negedge clk);
      checks++;
      if ((phase == 0) != (i == 1024)) begin
        failures++;
        $display("wrap error at step %0d phase %0d", i, phase);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
