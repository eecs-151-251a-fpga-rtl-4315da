// synchronizer_tb: checks that each bit of sync_signal equals async_signal as
// it was two rising edges earlier, for random input changes.
module synchronizer_tb;
  localparam int W = 4;
  logic         clk = 0;
  logic [W-1:0] async_signal = '0, sync_signal;
  logic [W-1:0] hist [3];
  int           checks = 0, failures = 0;

  synchronizer #(.WIDTH(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    hist[0] = '0; hist[1] = '0; hist[2] = '0;
    repeat (3) @(posedge clk);
    for (int k = 0; k < 300; k++) begin
      @(negedge clk);
      async_signal = W'($urandom);
      @(posedge clk);
      hist[2] = hist[1]; hist[1] = hist[0]; hist[0] = async_signal;
      #1;
      checks++;
      if (k >= 2 && sync_signal != hist[1]) begin
        failures++;
        $display("FAIL: got %b want %b", sync_signal, hist[1]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
