// debouncer: rejects contact bounce on push-button inputs.
//
// A shared counter produces a sample tick once every SAMPLE_CNT_MAX cycles.
// Each input bit has a saturating counter: on a tick it counts up while the
// input is high, and it is cleared in any cycle the input is low. The output
// bit is high once the counter has reached PULSE_CNT_MAX, so a press must stay
// high for PULSE_CNT_MAX ticks (30 ms with the defaults at 125 MHz) before it
// is seen, and it drops as soon as the input is released. Counter sizes and the
// 5 kHz sampling rate are this design's choices. Counters start at zero.
module debouncer #(
  parameter int unsigned WIDTH          = 1,
  parameter int unsigned SAMPLE_CNT_MAX = 25_000,
  parameter int unsigned PULSE_CNT_MAX  = 150
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] glitchy_signal,
  output logic [WIDTH-1:0] debounced_signal
);
  localparam int unsigned SW = $clog2(SAMPLE_CNT_MAX + 1);
  localparam int unsigned PW = $clog2(PULSE_CNT_MAX + 1);

  logic [SW-1:0] sample_cnt = '0;
  logic          tick;
  logic [PW-1:0] pulse_cnt [WIDTH] = '{default: '0};

  assign tick = (sample_cnt >= SW'(SAMPLE_CNT_MAX - 1));

  always_ff @(posedge clk) begin
    if (tick) sample_cnt <= '0;
    else      sample_cnt <= sample_cnt + 1'b1;
  end

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    always_ff @(posedge clk) begin
      if (!glitchy_signal[i])
        pulse_cnt[i] <= '0;
      else if (tick && pulse_cnt[i] < PW'(PULSE_CNT_MAX))
        pulse_cnt[i] <= pulse_cnt[i] + 1'b1;
    end
    assign debounced_signal[i] = (pulse_cnt[i] >= PW'(PULSE_CNT_MAX));
  end
endmodule
