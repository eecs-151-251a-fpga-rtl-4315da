// edge_detector: a one-cycle pulse for each low-to-high transition of every
// input bit.
//
// Interface: signal_in[WIDTH] in, edge_detect_pulse[WIDTH] out.
// Timing: the pulse is high during the cycle after the first rising edge at
// which signal_in is seen high, for exactly one cycle. The block and its place
// at the end of the button chain follow the lab's overview diagram; the
// registered-previous-value scheme is this design's own. The history register
// starts at 0 (FPGA power-up value).
module edge_detector #(
  parameter int unsigned WIDTH = 1
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] signal_in,
  output logic [WIDTH-1:0] edge_detect_pulse
);

  logic [WIDTH-1:0] prev  = '0;
  logic [WIDTH-1:0] pulse = '0;

  always_ff @(posedge clk) begin
    prev  <= signal_in;
    pulse <= signal_in & ~prev;
  end

  assign edge_detect_pulse = pulse;

endmodule
