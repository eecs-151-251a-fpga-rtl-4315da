// fifo_fwft: common-clock first-word fall-through FIFO with a valid flag,
// used between the piano FSM and the UART transmitter.
//
// "First-word fall-through" means the entry at the head of the FIFO is
// already on dout whenever the FIFO holds data: valid (= !empty) says dout
// is good, and rd_en pops it. Read as a ready/valid source, valid is "valid"
// and rd_en is "ready". The write side is a plain FIFO write port: din is
// stored on a rising edge with wr_en high and full low.
//
// Configuration follows the vendor FIFO the lab instantiates for this spot:
// 8-bit write and read width, 256 entries, synchronous reset (srst), active
// high valid flag, read latency 0. The port names (din, wr_en, full, dout,
// rd_en, empty, valid, srst) are the vendor core's native names. The inside is
// this design's own, the simplest that meets that function: a register array
// read combinationally at the read pointer, with an occupancy counter for the
// flags. A pop when empty and a push when full are ignored.
module fifo_fwft #(
  parameter int unsigned DATA_WIDTH = 8,
  parameter int unsigned DEPTH      = 256
) (
  input  logic                  clk,
  input  logic                  srst,

  input  logic [DATA_WIDTH-1:0] din,
  input  logic                  wr_en,
  output logic                  full,

  output logic [DATA_WIDTH-1:0] dout,
  input  logic                  rd_en,
  output logic                  empty,
  output logic                  valid
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [DATA_WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]         wr_ptr, rd_ptr;
  logic [CW-1:0]         count;
  logic                  do_wr, do_rd;

  assign full  = (count == CW'(DEPTH));
  assign empty = (count == '0);
  assign valid = !empty;
  assign dout  = mem[rd_ptr];

  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;

  function automatic logic [AW-1:0] next_ptr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= din;
  end

  always_ff @(posedge clk) begin
    if (srst) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= next_ptr(wr_ptr);
      if (do_rd) rd_ptr <= next_ptr(rd_ptr);
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

endmodule
