// uart_receiver_tb: self-checking test of the UART receiver.
//
// Drives 8N1 frames of random bytes onto serial_in with an independent
// serialiser (including frames sent back to back), and checks each byte
// offered on data_out, that data_out_valid holds until data_out_ready takes
// it, that a start glitch shorter than half a bit is ignored and that a frame
// with a low stop bit is dropped. The byte must appear within one bit period
// after the middle of the stop bit.
module uart_receiver_tb;
  localparam int CLOCK_FREQ = 1_000_000;
  localparam int BAUD_RATE  = 100_000;
  localparam int BIT        = CLOCK_FREQ / BAUD_RATE;

  logic       clk = 0;
  logic       reset;
  logic [7:0] data_out;
  logic       data_out_valid, data_out_ready;
  logic       serial_in;
  int         checks = 0, failures = 0;

  uart_receiver #(.CLOCK_FREQ(CLOCK_FREQ), .BAUD_RATE(BAUD_RATE)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  task automatic send(logic [7:0] b, logic stop = 1'b1);
    logic [9:0] f;
    f = {stop, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      serial_in <= f[i];
      repeat (BIT) @(posedge clk);
    end
  endtask

  task automatic expect_byte(logic [7:0] b);
    int n = 0;
    while (!data_out_valid && n < 2 * BIT) begin
      @(posedge clk);
      n++;
    end
    check(data_out_valid, "byte offered");
    check(data_out == b, $sformatf("byte got %h want %h", data_out, b));
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] b;
    reset = 1; serial_in = 1; data_out_ready = 0;
    repeat (3) @(posedge clk);
    reset <= 0;
    repeat (BIT) @(posedge clk);
    check(!data_out_valid, "nothing after reset");

    // Valid holds until ready.
    b = 8'h5A;
    send(b);
    expect_byte(b);
    repeat (50) @(posedge clk);
    check(data_out_valid && data_out == b, "valid held while not ready");
    data_out_ready <= 1;
    @(posedge clk);
    @(posedge clk);
    check(!data_out_valid, "valid drops after the handshake");

    // Back-to-back random frames with ready held high.
    for (int k = 0; k < 10; k++) begin
      logic [7:0] r;
      r = 8'($urandom);
      fork
        send(r);
        begin
          @(posedge data_out_valid);
          @(posedge clk);
          check(data_out == r, $sformatf("b2b byte got %h want %h", data_out, r));
        end
      join
    end

    // A short glitch is not a start bit.
    repeat (2 * BIT) @(posedge clk);
    serial_in <= 0;
    repeat (BIT / 4) @(posedge clk);
    serial_in <= 1;
    repeat (12 * BIT) @(posedge clk);
    check(!data_out_valid, "glitch ignored");

    // Framing error: stop bit low drops the byte.
    data_out_ready <= 0;
    send(8'hC3, 1'b0);
    serial_in <= 1'b1;
    repeat (3 * BIT) @(posedge clk);
    check(!data_out_valid, "framing error dropped");

    // And the receiver still works afterwards.
    send(8'h3C);
    expect_byte(8'h3C);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
