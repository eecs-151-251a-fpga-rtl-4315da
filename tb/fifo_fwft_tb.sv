// fifo_fwft_tb: self-checking test of the first-word fall-through FIFO.
//
// Checks that the head entry is on dout with valid high as soon as it is
// written (no read needed), that rd_en pops it, that full rises at DEPTH
// entries and blocks further writes, and runs random simultaneous pushes and
// pops against a queue model, using the ready/valid reading of the read side.
module fifo_fwft_tb;
  localparam int W = 8;
  localparam int D = 16;

  logic         clk = 0;
  logic         srst;
  logic [W-1:0] din, dout;
  logic         wr_en, rd_en, full, empty, valid;
  int           checks = 0, failures = 0;
  logic [W-1:0] model [$];

  fifo_fwft #(.DATA_WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  task automatic step();
    @(posedge clk);
    #1;
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    srst = 1; wr_en = 0; rd_en = 0; din = 0;
    step(); srst = 0; step();
    check(empty && !valid && !full, "empty after reset");

    // First word falls through without a read.
    wr_en = 1; din = 8'hA5;
    step();
    wr_en = 0;
    check(valid && !empty && dout == 8'hA5, "first word on dout with valid, read latency 0");
    step();
    check(valid && dout == 8'hA5, "head stays until popped");
    rd_en = 1;
    step();
    rd_en = 0;
    check(!valid && empty, "pop empties the FIFO");

    // Fill to full, try to overflow, drain.
    for (int i = 0; i < D + 3; i++) begin
      wr_en = 1; din = W'(i + 1);
      step();
      check(full == (i >= D - 1), "full at DEPTH entries");
    end
    wr_en = 0;
    for (int i = 0; i < D; i++) begin
      check(valid && dout == W'(i + 1), $sformatf("drain %0d got %h", i, dout));
      rd_en = 1; step(); rd_en = 0;
    end
    check(empty && !valid, "empty after draining");
    rd_en = 1; step(); rd_en = 0;
    check(empty && !full, "pop on empty is ignored");

    // Random traffic against a model.
    for (int k = 0; k < 500; k++) begin
      bit           w, r, f, v0;
      logic [W-1:0] v;
      w = ($urandom % 2) != 0;
      r = ($urandom % 3) != 0;
      v = W'($urandom);
      if (valid) check(dout == model[0], "head matches model");
      check(valid == (model.size() != 0), "valid matches model");
      wr_en = w; rd_en = r; din = v; f = full; v0 = valid;
      step();
      if (r && v0) void'(model.pop_front());
      if (w && !f) model.push_back(v);
      check(full == (model.size() == D), "full matches model");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
