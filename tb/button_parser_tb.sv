// button_parser_tb: end-to-end test of synchronise, debounce, edge detect.
//
// A bouncing then steady press of one button must give exactly one one-cycle
// pulse on that button's output, after roughly PULSE_CNT_MAX sample periods,
// and nothing on the other outputs; holding and releasing give no more pulses.
module button_parser_tb;
  localparam int S = 6;
  localparam int P = 4;
  logic       clk = 0;
  logic [3:0] in = '0, out_pulse;
  int         checks = 0, failures = 0;
  int         count [4];
  int         first_at;
  int         cyc = 0;

  button_parser #(.WIDTH(4), .SAMPLE_CNT_MAX(S), .PULSE_CNT_MAX(P)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc++;
    for (int i = 0; i < 4; i++) if (out_pulse[i]) begin
      count[i]++;
      if (first_at < 0) first_at = cyc;
    end
  end

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
    int start;
    foreach (count[i]) count[i] = 0;
    first_at = -1;
    repeat (4 * S) @(negedge clk);
    for (int b = 0; b < 4; b++) begin
      foreach (count[i]) count[i] = 0;
      first_at = -1;
      repeat (10) begin
        in[b] = 1'($urandom);
        @(negedge clk);
      end
      in[b] = 1;
      start = cyc;
      repeat (3 * S * P) @(negedge clk);
      in[b] = 0;
      repeat (3 * S * P) @(negedge clk);
      for (int i = 0; i < 4; i++)
        check(count[i] == (i == b ? 1 : 0), $sformatf("button %0d: output %0d pulsed %0d times", b, i, count[i]));
      check(first_at - start >= (P - 1) * S && first_at - start <= (P + 1) * S + 4,
            $sformatf("pulse %0d cycles after the steady press", first_at - start));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
