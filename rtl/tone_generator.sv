// tone_generator: square-wave note generator driving the audio output.
//
// While output_enable is high and tone_switch_period is non-zero, a counter
// runs and the output level toggles every tone_switch_period clock cycles, so
// the tone frequency is f_clk / (2 * tone_switch_period). A period of zero or
// output_enable low silences the output (held low) and clears the counter, so
// every note starts from a fresh half period. A new period takes effect at the
// next toggle (the counter is compared with >=, so shortening the period
// mid-note toggles at once). The reading of tone_switch_period as a half
// period in clock cycles, and the silence encoding, are this design's choices.
module tone_generator
  import piano_pkg::*;
#(
  parameter int unsigned PERIOD_WIDTH = piano_pkg::TONE_PERIOD_WIDTH
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    output_enable,
  input  logic [PERIOD_WIDTH-1:0] tone_switch_period,
  output logic                    square_wave_out
);
  logic [PERIOD_WIDTH-1:0] count;
  logic                    wave;
  logic                    active;

  assign active = output_enable && (tone_switch_period != '0);

  always_ff @(posedge clk) begin
    if (rst || !active) begin
      count <= '0;
      wave  <= 1'b0;
    end else if (count >= tone_switch_period - 1'b1) begin
      count <= '0;
      wave  <= ~wave;
    end else begin
      count <= count + 1'b1;
    end
  end

  assign square_wave_out = wave;
endmodule
