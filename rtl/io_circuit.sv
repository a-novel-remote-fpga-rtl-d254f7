// io_circuit: the FPGA-side I/O circuit of a remote FPGA lab.
//
// A student's design (the user circuit) runs in an FPGA on a remote server.
// A cheap controller board on the student's desk, with 8 slide switches,
// 3 tactile switches, 8 LEDs and a 4-digit seven-segment display, stands in
// for the FPGA board's own I/O. The two exchange two-character ASCII commands
// over a 115,200 bps UART link (relayed by software on both ends). This module
// sits between the user circuit, the board's I/O pins and the UART.
//
// Three parts, wired through multiplexers that the switcher steers:
//   uart_controller  receiver and sender, each behind a FIFO
//   switcher         pass mode until the request "VX" arrives, then answers
//                    it and hands control to the translator
//   io_translator    checker (switch commands -> switch values) and generator
//                    (LED/segment changes -> commands, via 100 Hz and 500 Hz
//                    samplers)
// In pass mode the board's switches (board_sw, board_btn) drive the user
// circuit and the switcher drains the receive FIFO. In translate mode the
// checker's switch values drive the user circuit and the checker reads the
// receive FIFO. The sender belongs to the switcher in pass mode and while it
// answers a "VX"; otherwise to the generator. The user circuit's outputs
// always drive the board's display and LEDs as well (an, seg, led).
//
// Clock and reset: one clock (CLK_HZ, 100 MHz on the Nexys A7), synchronous
// active-high reset. The structure, the command set, the baud rate and the
// sampling rates follow the platform description; the response text, FIFO depth, LED
// threshold and the active-low display polarity are this design's choices.
module io_circuit
  import io_pkg::*;
#(
  parameter int unsigned CLK_HZ            = 100_000_000,
  parameter int unsigned BAUD              = 115_200,
  parameter int unsigned FIFO_DEPTH        = 16,
  parameter int unsigned SEG_SAMPLE_HZ     = 100,
  parameter int unsigned LED_SAMPLE_HZ     = 500,
  parameter int unsigned LED_THRESHOLD_PCT = 50,
  parameter bit          SEG_ACTIVE_LOW    = 1'b1,
  parameter logic [15:0] RESPONSE          = "VN"
) (
  input  logic                  clk,
  input  logic                  rst,
  // UART to the server-side connector
  input  logic                  rxd,
  output logic                  txd,
  // FPGA board I/O
  input  logic [NUM_SLIDE-1:0]  board_sw,
  input  logic [NUM_TACT-1:0]   board_btn,
  output logic [NUM_DIGITS-1:0] an,
  output logic [NUM_SEGS-1:0]   seg,
  output logic [NUM_LEDS-1:0]   led,
  // user circuit
  output logic [NUM_SLIDE-1:0]  user_sw,
  output logic [NUM_TACT-1:0]   user_btn,
  input  logic [NUM_DIGITS-1:0] user_an,
  input  logic [NUM_SEGS-1:0]   user_seg,
  input  logic [NUM_LEDS-1:0]   user_led,
  // status
  output logic                  translating,
  output logic                  rx_frame_error,
  output logic                  rx_overrun
);
  mode_e      mode;
  logic [7:0] rx_data, tx_data;
  logic       rx_empty, rx_read, tx_full, tx_write;
  logic       sw_rx_read, sw_tx_write, own_tx, hold;
  logic [7:0] sw_tx_data;
  logic       tr_rx_read, tr_tx_write, gen_idle;
  logic [7:0] tr_tx_data;
  logic [NUM_SLIDE-1:0] chk_sw;
  logic [NUM_TACT-1:0]  chk_btn;

  assign translating = (mode == MODE_TRANSLATE);

  // the multiplexers steered by the switcher
  always_comb begin
    rx_read  = translating ? tr_rx_read : sw_rx_read;
    tx_data  = own_tx ? sw_tx_data  : tr_tx_data;
    tx_write = own_tx ? sw_tx_write : tr_tx_write;
    user_sw  = translating ? chk_sw  : board_sw;
    user_btn = translating ? chk_btn : board_btn;
  end

  // the user circuit's outputs also drive the board
  assign an  = user_an;
  assign seg = user_seg;
  assign led = user_led;

  uart_controller #(.CLK_HZ(CLK_HZ), .BAUD(BAUD), .FIFO_DEPTH(FIFO_DEPTH)) u_uart (
    .clk            (clk),
    .rst            (rst),
    .rxd            (rxd),
    .txd            (txd),
    .rx_read        (rx_read),
    .rx_data        (rx_data),
    .rx_empty       (rx_empty),
    .tx_write       (tx_write),
    .tx_data        (tx_data),
    .tx_full        (tx_full),
    .rx_frame_error (rx_frame_error),
    .rx_overrun     (rx_overrun)
  );

  switcher #(.RESPONSE(RESPONSE)) u_switcher (
    .clk         (clk),
    .rst         (rst),
    .rx_data     (rx_data),
    .rx_empty    (rx_empty),
    .rx_pop      (rx_read && !rx_empty),
    .sw_rx_read  (sw_rx_read),
    .tx_full     (tx_full),
    .sw_tx_data  (sw_tx_data),
    .sw_tx_write (sw_tx_write),
    .own_tx      (own_tx),
    .gen_idle    (gen_idle),
    .hold        (hold),
    .mode        (mode)
  );

  io_translator #(
    .CLK_HZ            (CLK_HZ),
    .SEG_SAMPLE_HZ     (SEG_SAMPLE_HZ),
    .LED_SAMPLE_HZ     (LED_SAMPLE_HZ),
    .LED_THRESHOLD_PCT (LED_THRESHOLD_PCT),
    .SEG_ACTIVE_LOW    (SEG_ACTIVE_LOW)
  ) u_translator (
    .clk       (clk),
    .rst       (rst),
    .enable    (translating),
    .hold      (hold),
    .rx_data   (rx_data),
    .rx_empty  (rx_empty),
    .rx_read   (tr_rx_read),
    .tx_full   (tx_full),
    .tx_data   (tr_tx_data),
    .tx_write  (tr_tx_write),
    .gen_idle  (gen_idle),
    .an        (user_an),
    .seg       (user_seg),
    .led       (user_led),
    .sw_state  (chk_sw),
    .btn_state (chk_btn)
  );

  // only one side writes the sender at a time
  assert property (@(posedge clk) disable iff (rst) !(own_tx && tr_tx_write));
  // FIFO handshake: nobody writes a full sender or reads an empty receiver
  assert property (@(posedge clk) disable iff (rst) tx_write |-> !tx_full);
  assert property (@(posedge clk) disable iff (rst) rx_read |-> !rx_empty);

endmodule
