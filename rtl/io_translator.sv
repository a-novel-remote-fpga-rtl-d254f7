// io_translator: converts between I/O port changes and command strings.
//
// It pairs the checker, which turns received switch commands into the switch
// values the user circuit sees, with the generator, which turns changes of the
// user circuit's LEDs and seven-segment display into commands for the sender.
// The checker's "VZ" detection drives the generator's resend input. Both
// halves work only while enable (translate mode) is high. Grouping them as
// one translator follows the I/O circuit's block diagram.
module io_translator
  import io_pkg::*;
#(
  parameter int unsigned CLK_HZ            = 100_000_000,
  parameter int unsigned SEG_SAMPLE_HZ     = 100,
  parameter int unsigned LED_SAMPLE_HZ     = 500,
  parameter int unsigned LED_THRESHOLD_PCT = 50,
  parameter bit          SEG_ACTIVE_LOW    = 1'b1
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  enable,
  input  logic                  hold,
  // receive port
  input  logic [7:0]            rx_data,
  input  logic                  rx_empty,
  output logic                  rx_read,
  // send port
  input  logic                  tx_full,
  output logic [7:0]            tx_data,
  output logic                  tx_write,
  output logic                  gen_idle,
  // user circuit
  input  logic [NUM_DIGITS-1:0] an,
  input  logic [NUM_SEGS-1:0]   seg,
  input  logic [NUM_LEDS-1:0]   led,
  output logic [NUM_SLIDE-1:0]  sw_state,
  output logic [NUM_TACT-1:0]   btn_state
);
  logic resend;

  sw_checker u_checker (
    .clk       (clk),
    .rst       (rst),
    .enable    (enable),
    .rx_data   (rx_data),
    .rx_empty  (rx_empty),
    .rx_read   (rx_read),
    .sw_state  (sw_state),
    .btn_state (btn_state),
    .resend    (resend)
  );

  generator #(
    .CLK_HZ            (CLK_HZ),
    .SEG_SAMPLE_HZ     (SEG_SAMPLE_HZ),
    .LED_SAMPLE_HZ     (LED_SAMPLE_HZ),
    .LED_THRESHOLD_PCT (LED_THRESHOLD_PCT),
    .SEG_ACTIVE_LOW    (SEG_ACTIVE_LOW)
  ) u_generator (
    .clk      (clk),
    .rst      (rst),
    .enable   (enable),
    .hold     (hold),
    .resend   (resend),
    .an       (an),
    .seg      (seg),
    .led      (led),
    .tx_full  (tx_full),
    .tx_data  (tx_data),
    .tx_write (tx_write),
    .idle     (gen_idle)
  );

endmodule
