// uart_transmitter_tb: self-checking test of the UART transmitter.
//
// Sends random bytes, some back to back, decodes serial_out independently by
// sampling it in the middle of each bit period, and checks the start bit,
// the eight data bits LSB first, the stop bit, the bit period in clock cycles
// and that data_in_ready is low while a frame is on the line.
module uart_transmitter_tb;
  localparam int CLOCK_FREQ = 1_000_000;
  localparam int BAUD_RATE  = 100_000;
  localparam int BIT        = CLOCK_FREQ / BAUD_RATE;

  logic       clk = 0;
  logic       reset;
  logic [7:0] data_in;
  logic       data_in_valid, data_in_ready;
  logic       serial_out;
  int         checks = 0, failures = 0;
  logic [7:0] sent [$];
  int         got = 0;

  uart_transmitter #(.CLOCK_FREQ(CLOCK_FREQ), .BAUD_RATE(BAUD_RATE)) dut (.*);

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

  // Line decoder: find the falling edge, then sample mid-bit.
  initial begin
    logic [7:0] b;
    int         t0, t1;
    forever begin
      @(negedge serial_out);
      t0 = $time;
      repeat (BIT / 2) @(posedge clk);
      check(serial_out == 0, "start bit low at mid-bit");
      for (int i = 0; i < 8; i++) begin
        repeat (BIT) @(posedge clk);
        b[i] = serial_out;
        check(!data_in_ready, "not ready during the frame");
      end
      repeat (BIT) @(posedge clk);
      check(serial_out == 1, "stop bit high");
      check(sent.size() > 0 && b == sent[0], $sformatf("byte got %h", b));
      if (sent.size() > 0) void'(sent.pop_front());
      got++;
      @(posedge data_in_ready);
      t1 = $time;
      // Ten bit periods from the start edge to ready again (within a cycle).
      check((t1 - t0) / 10 >= 10 * BIT - 1 && (t1 - t0) / 10 <= 10 * BIT + 1,
            $sformatf("frame length %0d cycles", (t1 - t0) / 10));
    end
  end

  initial begin
    reset = 1; data_in_valid = 0; data_in = 0;
    repeat (3) @(posedge clk);
    #1 reset = 0;
    @(posedge clk); #1;
    check(serial_out == 1 && data_in_ready, "idle high and ready after reset");
    for (int k = 0; k < 12; k++) begin
      data_in = 8'($urandom); data_in_valid = 1;
      @(posedge clk);
      while (!data_in_ready) @(posedge clk);
      sent.push_back(data_in);
      #1 data_in_valid = 0;
      if (k % 3 == 2) begin
        repeat (BIT * 14) @(posedge clk);
        #1;
      end
    end
    wait (got == 12);
    repeat (BIT * 2) @(posedge clk);
    check(serial_out == 1, "line idles high at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
