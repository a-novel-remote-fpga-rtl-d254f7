// uart_controller: the UART side of the I/O circuit, a receiver and a sender.
//
// It offers the rest of the circuit a FIFO-style interface in each direction:
// receive (rx_data valid while rx_empty is low, rx_read pops) and send
// (tx_data pushed by tx_write unless tx_full). The line runs 8N1 at BAUD bps.
// Splitting the controller into a receiver and a sender, each behind a FIFO,
// follows the I/O circuit's block diagram; see uart_receiver and uart_sender
// for the timing.
module uart_controller #(
  parameter int unsigned CLK_HZ     = 100_000_000,
  parameter int unsigned BAUD       = 115_200,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       rxd,
  output logic       txd,
  input  logic       rx_read,
  output logic [7:0] rx_data,
  output logic       rx_empty,
  input  logic       tx_write,
  input  logic [7:0] tx_data,
  output logic       tx_full,
  output logic       rx_frame_error,
  output logic       rx_overrun
);
  uart_receiver #(.CLK_HZ(CLK_HZ), .BAUD(BAUD), .FIFO_DEPTH(FIFO_DEPTH)) u_receiver (
    .clk         (clk),
    .rst         (rst),
    .rxd         (rxd),
    .rd_en       (rx_read),
    .rd_data     (rx_data),
    .empty       (rx_empty),
    .frame_error (rx_frame_error),
    .overrun     (rx_overrun)
  );

  uart_sender #(.CLK_HZ(CLK_HZ), .BAUD(BAUD), .FIFO_DEPTH(FIFO_DEPTH)) u_sender (
    .clk     (clk),
    .rst     (rst),
    .wr_en   (tx_write),
    .wr_data (tx_data),
    .full    (tx_full),
    .txd     (txd),
    .busy    ()
  );

endmodule
