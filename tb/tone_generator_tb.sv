// tone_generator_tb: measures the square wave for several periods.
//
// For each tone_switch_period the time between successive output toggles must
// be exactly that many cycles; with output_enable low or a zero period the
// output must stay low and never toggle.
module tone_generator_tb;
  logic        clk = 0;
  logic        rst;
  logic        output_enable;
  logic [23:0] tone_switch_period;
  logic        square_wave_out;
  int          checks = 0, failures = 0;

  tone_generator #(.PERIOD_W(24)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(int p);
    int  n;
    logic last;
    tone_switch_period = 24'(p);
    output_enable = 1;
    // First toggle after p cycles.
    n = 0;
    last = square_wave_out;
    do begin
      @(posedge clk); #1; n++;
    end while (square_wave_out == last && n < 4 * p + 10);
    check(n == p, $sformatf("period %0d: first toggle after %0d", p, n));
    for (int t = 0; t < 6; t++) begin
      last = square_wave_out;
      n = 0;
      do begin
        @(posedge clk); #1; n++;
      end while (square_wave_out == last && n < 4 * p + 10);
      check(n == p, $sformatf("period %0d: toggle interval %0d", p, n));
    end
    output_enable = 0;
    @(posedge clk); #1;
    check(!square_wave_out, "disabled output is low");
  endtask

  initial begin
    rst = 1; output_enable = 0; tone_switch_period = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    measure(1);
    measure(7);
    measure(50);
    measure(333);
    // Disabled: no oscillation.
    tone_switch_period = 10;
    output_enable = 0;
    repeat (100) begin
      @(posedge clk); #1;
      check(!square_wave_out, "silent while disabled");
    end
    // Zero period: no oscillation.
    tone_switch_period = 0;
    output_enable = 1;
    repeat (100) begin
      @(posedge clk); #1;
      check(!square_wave_out, "silent with a zero period");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
