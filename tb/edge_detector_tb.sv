// edge_detector_tb: drives random levels and checks that each output bit
// is high for exactly the one cycle that follows the clock edge at which
// its input is first seen high, and never otherwise.
module edge_detector_tb;
  localparam int W = 3;
  logic         clk = 0;
  logic [W-1:0] signal_in = '0, edge_detect_pulse;
  logic [W-1:0] prev = '0, expect_pulse = '0;
  int           checks = 0, failures = 0, pulses = 0;

  edge_detector #(.WIDTH(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    for (int k = 0; k < 400; k++) begin
      @(negedge clk);
      if ($urandom % 3 == 0) signal_in = W'($urandom);
      @(posedge clk);
      #1;
      // The pulse is registered on the same edge that first sees the new level.
      expect_pulse = signal_in & ~prev;
      prev         = signal_in;
      checks++;
      if (edge_detect_pulse != expect_pulse) begin
        failures++;
        $display("FAIL: k=%0d got %b want %b", k, edge_detect_pulse, expect_pulse);
      end
      pulses += $countones(edge_detect_pulse);
    end
    checks++;
    if (pulses == 0) begin
      failures++;
      $display("FAIL: no pulse seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
