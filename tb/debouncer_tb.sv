// debouncer_tb: checks the debouncer with small sample and pulse counts.
//
// A bouncing press (random short pulses) must not reach the output; a steady
// press must appear after between PULSE_CNT_MAX and PULSE_CNT_MAX + 1 sample
// periods; a release must clear the output on the next cycle; and a single
// low reading inside a long press must restart the wait.
module debouncer_tb;
  localparam int S = 8;
  localparam int P = 5;
  logic       clk = 0;
  logic [1:0] glitchy_signal = '0, debounced_signal;
  int         checks = 0, failures = 0;

  debouncer #(.WIDTH(2), .SAMPLE_CNT_MAX(S), .PULSE_CNT_MAX(P)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    repeat (2 * S) @(negedge clk);
    // Bounce: high for less than one sample period at a time.
    repeat (60) begin
      glitchy_signal[0] = 1'($urandom);
      @(negedge clk);
      check(debounced_signal == 2'b00, "bounce does not pass");
    end
    glitchy_signal = 2'b00;
    @(negedge clk);
    // Steady press on bit 1.
    glitchy_signal[1] = 1;
    n = 0;
    while (!debounced_signal[1] && n < 10 * S * P) begin
      @(negedge clk);
      n++;
    end
    check(n >= (P - 1) * S && n <= (P + 1) * S + 1, $sformatf("press seen after %0d cycles", n));
    check(debounced_signal[0] == 0, "other bit untouched");
    repeat (3 * S) @(negedge clk);
    check(debounced_signal[1], "held press stays high");
    glitchy_signal[1] = 0;
    @(negedge clk);
    check(!debounced_signal[1], "release clears at once");
    // One low cycle restarts the count.
    glitchy_signal[1] = 1;
    repeat ((P - 1) * S) @(negedge clk);
    glitchy_signal[1] = 0;
    @(negedge clk);
    glitchy_signal[1] = 1;
    repeat ((P - 1) * S) @(negedge clk);
    check(!debounced_signal[1], "a low reading restarted the wait");
    repeat (3 * S) @(negedge clk);
    check(debounced_signal[1], "then the press is accepted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
