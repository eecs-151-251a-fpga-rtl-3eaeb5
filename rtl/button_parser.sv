// button_parser: turns raw push-button levels into one-cycle press pulses.
//
// The chain is synchronizer -> debouncer -> edge_detector, as in the system
// block diagram. A press appears on `out` as a single-cycle pulse about
// 2 + PULSE_CNT_MAX * SAMPLE_CNT_MAX cycles after the button goes down, and
// nothing is produced on release. In the top level one bit of the output is
// the reset and the others are note-length controls for the piano.
module button_parser #(
  parameter int unsigned WIDTH          = 4,
  parameter int unsigned SAMPLE_CNT_MAX = 25_000,
  parameter int unsigned PULSE_CNT_MAX  = 150
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] in,
  output logic [WIDTH-1:0] out
);
  logic [WIDTH-1:0] synced, debounced;

  synchronizer #(.WIDTH(WIDTH)) u_sync (
    .clk(clk), .async_signal(in), .sync_signal(synced));

  debouncer #(
    .WIDTH(WIDTH), .SAMPLE_CNT_MAX(SAMPLE_CNT_MAX), .PULSE_CNT_MAX(PULSE_CNT_MAX)
  ) u_debounce (
    .clk(clk), .glitchy_signal(synced), .debounced_signal(debounced));

  edge_detector #(.WIDTH(WIDTH)) u_edge (
    .clk(clk), .signal_in(debounced), .edge_detect_pulse(out));
endmodule
