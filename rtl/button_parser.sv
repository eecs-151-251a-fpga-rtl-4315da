// button_parser: turns raw push-button inputs into one-cycle press pulses.
//
// As in the lab's overview diagram, each button passes through a
// synchronizer, then a debouncer, then an edge_detector; out_pulse[i] is high
// for one clock cycle each time button i is pressed and held through the
// debounce window. Interface: in[WIDTH] raw buttons, out_pulse[WIDTH].
// Timing: a press that stays high is reported roughly
// PULSE_CNT_MAX * SAMPLE_CNT_MAX cycles after it starts (see debouncer).
// The parameter defaults are this design's choice.
module button_parser #(
  parameter int unsigned WIDTH          = 4,
  parameter int unsigned SAMPLE_CNT_MAX = 62500,
  parameter int unsigned PULSE_CNT_MAX  = 200
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] in,
  output logic [WIDTH-1:0] out_pulse
);

  logic [WIDTH-1:0] synced;
  logic [WIDTH-1:0] debounced;

  synchronizer #(.WIDTH(WIDTH)) u_sync (
    .clk         (clk),
    .async_signal(in),
    .sync_signal (synced)
  );

  debouncer #(
    .WIDTH         (WIDTH),
    .SAMPLE_CNT_MAX(SAMPLE_CNT_MAX),
    .PULSE_CNT_MAX (PULSE_CNT_MAX)
  ) u_debounce (
    .clk             (clk),
    .glitchy_signal  (synced),
    .debounced_signal(debounced)
  );

  edge_detector #(.WIDTH(WIDTH)) u_edge (
    .clk              (clk),
    .signal_in        (debounced),
    .edge_detect_pulse(out_pulse)
  );

endmodule
