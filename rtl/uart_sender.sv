// uart_sender: UART transmit path of the I/O circuit, with a send FIFO.
//
// Bytes written with wr_en (ignored while full is high) queue in a FIFO and
// are sent on txd as 8N1 frames: a low start bit, eight data bits LSB first
// and a high stop bit, each DIV = CLK_HZ/BAUD clocks long. txd idles high.
//
// Timing: a byte written into an empty, idle sender starts its start bit within two
// clocks later; back-to-back bytes follow each other with no idle time, so
// the sustained rate is BAUD/10 bytes per second (11,520 at 115,200 bps).
// The rate follows the platform description; the frame format and the FIFO depth are this
// design's choices.
module uart_sender #(
  parameter int unsigned CLK_HZ     = 100_000_000,
  parameter int unsigned BAUD       = 115_200,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       wr_en,
  input  logic [7:0] wr_data,
  output logic       full,
  output logic       txd,
  output logic       busy
);
  localparam int unsigned DIV = (CLK_HZ + BAUD / 2) / BAUD;
  localparam int unsigned CW  = $clog2(DIV + 1);

  logic [7:0]    head;
  logic          empty;
  logic          pop;
  logic [8:0]    frame;     // data bits then the stop bit, LSB first
  logic [3:0]    left;      // bit periods still to go in this frame
  logic [CW-1:0] cnt;

  assign busy = (left != 0);
  // the next frame starts right as the stop bit of the last one ends
  assign pop  = (!busy || (left == 4'd1 && cnt == 0)) && !empty;

  always_ff @(posedge clk) begin
    if (rst) begin
      frame <= '1;
      left  <= '0;
      cnt   <= '0;
      txd   <= 1'b1;
    end else if (pop) begin
      txd   <= 1'b0;              // start bit goes out now
      frame <= {1'b1, head};
      left  <= 4'd10;
      cnt   <= CW'(DIV - 1);
    end else if (busy) begin
      if (cnt == 0) begin
        cnt  <= CW'(DIV - 1);
        left <= left - 1'b1;
        if (left != 4'd1) begin
          txd   <= frame[0];
          frame <= {1'b1, frame[8:1]};
        end
      end else begin
        cnt <= cnt - 1'b1;
      end
    end
  end

  sync_fifo #(.WIDTH(8), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk     (clk),
    .rst     (rst),
    .wr_en   (wr_en),
    .wr_data (wr_data),
    .full    (full),
    .rd_en   (pop),
    .rd_data (head),
    .empty   (empty)
  );

endmodule
