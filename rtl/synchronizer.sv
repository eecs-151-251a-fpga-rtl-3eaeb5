// synchronizer: two-flop synchronizer for asynchronous inputs.
//
// Each bit of async_signal passes through two flip-flops clocked by clk, so
// sync_signal follows the input two rising edges later and a metastable first
// stage has a full cycle to settle. Used for the push buttons ahead of the
// debouncer. The two-stage depth is this design's choice; the flops start at
// zero, as FPGA registers do after configuration.
module synchronizer #(
  parameter int unsigned WIDTH = 1
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] async_signal,
  output logic [WIDTH-1:0] sync_signal
);
  logic [WIDTH-1:0] meta = '0;
  logic [WIDTH-1:0] sync_q = '0;

  always_ff @(posedge clk) begin
    meta   <= async_signal;
    sync_q <= meta;
  end

  assign sync_signal = sync_q;
endmodule
