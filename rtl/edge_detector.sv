// edge_detector: one-cycle pulse on every rising edge of each input bit.
//
// A register keeps the previous value of signal_in; edge_detect_pulse is high
// for exactly the cycle in which a bit is 1 and was 0 one cycle before. The
// pulse is combinational from signal_in, so it appears in the same cycle the
// input rises. The history register starts at zero.
module edge_detector #(
  parameter int unsigned WIDTH = 1
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] signal_in,
  output logic [WIDTH-1:0] edge_detect_pulse
);
  logic [WIDTH-1:0] prev = '0;

  always_ff @(posedge clk) prev <= signal_in;

  assign edge_detect_pulse = signal_in & ~prev;
endmodule
