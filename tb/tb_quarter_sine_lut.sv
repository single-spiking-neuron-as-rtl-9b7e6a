// tb_quarter_sine_lut -- checks every entry of the quarter-wave sine ROM
// against round(64 * sin(pi/2 * (i + 0.5) / 256)) computed here with $sin,
// and checks the one-cycle read latency.
module tb_quarter_sine_lut;
  logic clk = 0;
  logic [7:0] addr = '0, data;
  int checks = 0, failures = 0;

  quarter_sine_lut dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expected(int i);
    real v;
    v = 64.0 * $sin(3.14159265358979 / 2.0 * (real'(i) + 0.5) / 256.0);
    return int'($floor(v + 0.5));
  endfunction

  initial begin
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      addr = 8'(i);
      @(posedge clk);
      #1;
      checks++;
      if (int'(data) != expected(i)) begin
        failures++;
        $display("entry %0d: got %0d expected %0d", i, data, expected(i));
      end
    end
    // Latency: data must not follow a new address before the clock edge.
    @(negedge clk);
    addr = 8'd255;
    @(posedge clk); #1;
    @(negedge clk);
    addr = 8'd0;
    #1;
    checks++;
    if (data != 8'(expected(255))) begin
      failures++;
      $display("read is not registered");
    end
    @(posedge clk); #1;
    checks++;
    if (data != 8'(expected(0))) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
