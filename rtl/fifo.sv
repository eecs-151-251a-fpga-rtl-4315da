// fifo: synchronous FIFO (one clock for both sides) built as a circular
// buffer addressed by a write pointer and a read pointer.
//
// A write (wr_en high and not full) stores din at the write pointer and
// advances it; a read (rd_en high and not empty) loads the entry at the read
// pointer into the dout register and advances it. Pointers wrap at
// fifo_depth, so any depth works. An occupancy counter, kept next to the
// pointers, gives the flags: empty when it is 0, full when it is fifo_depth.
// A write when full and a read when empty are ignored, so neither overflow
// nor underflow corrupts data or flags. On a cycle with both a write and a
// read the count is unchanged; when the FIFO is full a simultaneous write is
// refused even though a read frees a slot that cycle.
//
// Interface and timing follow the lab: rst is synchronous and returns both
// pointers to the same place; dout holds the data read on the rising edge
// where rd_en was high and keeps it until the next read; full and empty are
// registered and change on the edge that performs the write or read.
// Parameters data_width, fifo_depth and addr_width keep the lab's names;
// the defaults (8 bits, 8 entries) are the depth and width the lab suggests
// for the UART receive FIFO. The counter-based flag logic is this design's
// own choice.
module fifo #(
  parameter int unsigned data_width = 8,
  parameter int unsigned fifo_depth = 8,
  parameter int unsigned addr_width = (fifo_depth > 1) ? $clog2(fifo_depth) : 1
) (
  input  logic                  clk,
  input  logic                  rst,

  input  logic                  wr_en,
  input  logic [data_width-1:0] din,
  output logic                  full,

  input  logic                  rd_en,
  output logic [data_width-1:0] dout,
  output logic                  empty
);

  localparam int unsigned CW = $clog2(fifo_depth + 1);

  logic [data_width-1:0] mem [fifo_depth];
  logic [addr_width-1:0] wr_ptr, rd_ptr;
  logic [CW-1:0]         count;
  logic                  do_wr, do_rd;

  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;

  function automatic logic [addr_width-1:0] next_ptr(logic [addr_width-1:0] p);
    return (p == addr_width'(fifo_depth - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= din;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
      full   <= 1'b0;
      empty  <= 1'b1;
      dout   <= '0;
    end else begin
      if (do_wr) wr_ptr <= next_ptr(wr_ptr);
      if (do_rd) begin
        rd_ptr <= next_ptr(rd_ptr);
        dout   <= mem[rd_ptr];
      end
      if (do_wr && !do_rd) begin
        count <= count + 1'b1;
        full  <= (count == CW'(fifo_depth - 1));
        empty <= 1'b0;
      end else if (do_rd && !do_wr) begin
        count <= count - 1'b1;
        full  <= 1'b0;
        empty <= (count == CW'(1));
      end
    end
  end

  // The assertions hold from the first reset on (power-up contents are
  // arbitrary until then).
  logic was_reset = 1'b0;
  always_ff @(posedge clk) if (rst) was_reset <= 1'b1;

  // Flag rules: never both full and empty; flags agree with the count.
  a_flags_exclusive: assert property (@(posedge clk) disable iff (rst || !was_reset) !(full && empty));
  a_empty_count:     assert property (@(posedge clk) disable iff (rst || !was_reset) empty == (count == '0));
  a_full_count:      assert property (@(posedge clk) disable iff (rst || !was_reset) full == (count == CW'(fifo_depth)));

endmodule
