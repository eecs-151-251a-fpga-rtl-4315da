// uart_tb: loopback test of the uart wrapper.
//
// The transmitter's serial_out is wired to the receiver's serial_in. Random
// bytes sent through data_in must come back on data_out in order, through the
// input synchroniser, with each byte taking about ten bit periods.
module uart_tb;
  localparam int CLOCK_FREQ = 1_000_000;
  localparam int BAUD_RATE  = 125_000;
  localparam int BIT        = CLOCK_FREQ / BAUD_RATE;

  logic       clk = 0;
  logic       reset;
  logic [7:0] data_in, data_out;
  logic       data_in_valid, data_in_ready;
  logic       data_out_valid, data_out_ready;
  logic       line;
  int         checks = 0, failures = 0;
  logic [7:0] sent [$];
  longint     t_first, t_last;
  int         got = 0;

  uart #(.CLOCK_FREQ(CLOCK_FREQ), .BAUD_RATE(BAUD_RATE)) dut (
    .clk, .reset, .data_in, .data_in_valid, .data_in_ready,
    .data_out, .data_out_valid, .data_out_ready,
    .serial_in(line), .serial_out(line)
  );

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Receive side: ready always high.
  always @(posedge clk) begin
    if (!reset && data_out_valid && data_out_ready) begin
      check(sent.size() > 0 && data_out == sent[0], $sformatf("loopback got %h", data_out));
      if (sent.size() > 0) void'(sent.pop_front());
      got++;
      t_last = $time;
    end
  end

  initial begin
    reset = 1; data_in_valid = 0; data_in = 0; data_out_ready = 1;
    repeat (4) @(posedge clk);
    #1 reset = 0;
    t_first = $time;
    for (int k = 0; k < 16; k++) begin
      data_in = 8'($urandom); data_in_valid = 1;
      @(posedge clk);
      while (!data_in_ready) @(posedge clk);
      sent.push_back(data_in);
      #1 data_in_valid = 0;
    end
    wait (got == 16);
    // 16 frames of 10 bits back to back: about 160 bit periods in all.
    check((t_last - t_first) / 10 >= 16 * 10 * BIT - BIT &&
          (t_last - t_first) / 10 <= 16 * 10 * BIT + 16 * 4,
          $sformatf("throughput: %0d cycles for 16 bytes", (t_last - t_first) / 10));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
