// fifo_tb: self-checking test of the synchronous fifo.
//
// Follows the sequence a FIFO must survive: flags after reset, filling with
// random data (not empty after each write, full after the last), writes while
// full that must change nothing, draining (not full after each read, data in
// order, dout valid right after the read edge), reads while empty that must
// change nothing, back-to-back write-then-read bursts, and simultaneous
// reads and writes checked against a queue model. Inputs change on the
// falling edge; outputs are checked after the rising edge.
module fifo_tb;
  localparam int W = 8;
  localparam int D = 8;

  logic         clk = 0;
  logic         rst;
  logic         wr_en, rd_en;
  logic [W-1:0] din, dout;
  logic         full, empty;
  int           checks = 0, failures = 0;
  logic [W-1:0] model [$];
  logic [W-1:0] data  [D];

  fifo #(.data_width(W), .fifo_depth(D)) dut (.*);

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
    rst = 1; wr_en = 0; rd_en = 0; din = 0;
    step(); step();
    rst = 0;
    step();
    check(!full && empty, "after reset: not full, empty");

    // Fill.
    foreach (data[i]) data[i] = W'($urandom);
    for (int i = 0; i < D; i++) begin
      wr_en = 1; din = data[i];
      step();
      check(!empty, "not empty after a write");
      check(full == (i == D - 1), "full exactly after the last write");
    end
    // Overflow attempts.
    din = ~data[0];
    repeat (5) begin
      step();
      check(full && !empty, "flags hold while writing a full FIFO");
    end
    wr_en = 0;

    // Drain.
    for (int i = 0; i < D; i++) begin
      rd_en = 1;
      step();
      check(!full, "not full after a read");
      check(dout == data[i], $sformatf("read %0d: got %h want %h", i, dout, data[i]));
      check(empty == (i == D - 1), "empty exactly after the last read");
    end
    // Underflow attempts: dout keeps the last value.
    repeat (5) begin
      step();
      check(empty && !full && dout == data[D-1], "nothing changes reading an empty FIFO");
    end
    rd_en = 0;
    step();

    // Write then read, back to back, several times.
    for (int k = 0; k < 6; k++) begin
      logic [W-1:0] v;
      v = W'($urandom);
      wr_en = 1; din = v;
      step();
      wr_en = 0; rd_en = 1;
      step();
      rd_en = 0;
      check(dout == v && empty, "write-then-read burst");
    end

    // Random simultaneous reads and writes against a queue model.
    for (int k = 0; k < 400; k++) begin
      bit           w, r, f, e;
      logic [W-1:0] v;
      w = ($urandom % 3) != 0;
      r = ($urandom % 3) != 0;
      v = W'($urandom);
      wr_en = w; rd_en = r; din = v;
      f = full; e = empty;
      step();
      if (r && !e) begin
        check(dout == model[0], $sformatf("random read got %h want %h", dout, model[0]));
        void'(model.pop_front());
      end
      if (w && !f) model.push_back(v);
      check(full == (model.size() == D), "full matches model");
      check(empty == (model.size() == 0), "empty matches model");
    end
    wr_en = 0; rd_en = 0;

    // Reset empties the FIFO.
    rst = 1; step(); rst = 0;
    check(empty && !full, "reset clears the FIFO");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
