// tb_spike_delay -- sends spikes with random delays (including 0 and 1) and
// checks that exactly one output pulse appears exactly `delay` cycles later
// (delay 0 counts as 1) and that `busy` covers the wait.
module tb_spike_delay;
  localparam int unsigned W = 11;
  logic clk = 0, rst_n = 0, spike_in = 0, spike_out, busy;
  logic [W-1:0] delay = '0;
  int checks = 0, failures = 0;

  spike_delay #(.DELAY_W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(int d);
    int want, got, n_out;
    want = (d == 0) ? 1 : d;
    @(negedge clk);
    delay = W'(d);
    spike_in = 1;
    @(negedge clk);
    spike_in = 0;
    delay = W'($urandom);          // the delay is taken at the input spike
    got = -1; n_out = 0;
    for (int c = 1; c <= want + 5; c++) begin
      if (spike_out) begin
        n_out++;
        got = c;
      end
      if (c < want) begin
        checks++;
        if (!busy) begin failures++; $display("not busy at %0d of %0d", c, want); end
      end
      @(negedge clk);
    end
    checks += 2;
    if (got != want) begin failures++; $display("delay %0d: out at %0d", d, got); end
    if (n_out != 1) begin failures++; $display("delay %0d: %0d pulses", d, n_out); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    one(0); one(1); one(2); one(3); one(2047);
    for (int i = 0; i < 200; i++) one($urandom_range(1, 300));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
