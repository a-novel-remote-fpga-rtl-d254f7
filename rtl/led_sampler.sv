// led_sampler: samples the user circuit's LED array SAMPLE_HZ times a second
// with a duty-cycle threshold, so that PWM-dimmed LEDs come out as a stable
// on or off instead of whatever level happens to be present at the sample.
//
// For each LED a counter adds up the clocks the LED is on during a period of
// CLK_HZ/SAMPLE_HZ clocks. At the end of the period the LED's sampled value is
// 1 when that count is at least THRESHOLD_PCT percent of the period, and the
// counters restart.
//
// Interface: led straight from the user circuit (active high), sampled[i] the
// thresholded value. Timing: sampled changes at most once per period, one
// clock after the period's last cycle, so a change of led shows within one
// to two periods (2 to 4 ms at 500 Hz). The 500 Hz rate and the
// time-ratio threshold follow the platform description; the 50 % default is this
// design's choice.
module led_sampler
  import io_pkg::*;
#(
  parameter int unsigned CLK_HZ        = 100_000_000,
  parameter int unsigned SAMPLE_HZ     = 500,
  parameter int unsigned THRESHOLD_PCT = 50
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [NUM_LEDS-1:0] led,
  output logic [NUM_LEDS-1:0] sampled,
  output logic                tick
);
  localparam int unsigned PERIOD    = CLK_HZ / SAMPLE_HZ;
  localparam int unsigned CW        = $clog2(PERIOD + 1);
  localparam longint unsigned THR_L = (longint'(PERIOD) * THRESHOLD_PCT + 99) / 100;
  localparam int unsigned THRESHOLD = (THR_L == 0) ? 1 : int'(THR_L);

  logic [CW-1:0] cnt;
  logic [CW-1:0] ones [NUM_LEDS];

  assign tick = (cnt == CW'(PERIOD - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt     <= '0;
      sampled <= '0;
      for (int i = 0; i < NUM_LEDS; i++) ones[i] <= '0;
    end else begin
      cnt <= tick ? '0 : cnt + 1'b1;
      for (int i = 0; i < NUM_LEDS; i++) begin
        if (tick) begin
          sampled[i] <= (ones[i] + CW'(led[i])) >= CW'(THRESHOLD);
          ones[i]    <= '0;
        end else begin
          ones[i] <= ones[i] + CW'(led[i]);
        end
      end
    end
  end

endmodule
