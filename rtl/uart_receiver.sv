// uart_receiver: UART receive path of the I/O circuit, with a receive FIFO.
//
// Decodes 8N1 frames (one start bit, eight data bits LSB first, one stop bit)
// from rxd at BAUD bits per second and pushes each good byte into a FIFO that
// the rest of the circuit reads through a first-word-fall-through interface:
// rd_data holds the oldest byte while empty is low, and rd_en pops it.
//
// How it works: rxd passes a two-flop synchroniser. A falling edge starts a
// frame; the start bit is re-checked half a bit later, and each further bit is
// sampled one bit period after the previous one, i.e. at its middle. A frame
// whose stop bit is low is dropped and flagged with a one-cycle frame_error.
// A byte arriving with the FIFO full is dropped and flagged with overrun.
//
// Timing: a byte becomes visible on rd_data about 9.5 bit periods after its
// start edge (at the middle of the stop bit, plus two synchroniser cycles).
// The 115,200 bps rate follows the platform description; the 100 MHz default clock is the
// Nexys A7 board clock; the frame format, the FIFO depth and the sampling
// scheme are this design's choices.
module uart_receiver #(
  parameter int unsigned CLK_HZ     = 100_000_000,
  parameter int unsigned BAUD       = 115_200,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       rxd,
  input  logic       rd_en,
  output logic [7:0] rd_data,
  output logic       empty,
  output logic       frame_error,
  output logic       overrun
);
  localparam int unsigned DIV  = (CLK_HZ + BAUD / 2) / BAUD;  // clocks per bit
  localparam int unsigned CW   = $clog2(DIV + 1);
  localparam int unsigned HALF = DIV / 2;

  typedef enum logic [1:0] {S_IDLE, S_START, S_DATA, S_STOP} state_e;

  state_e        state;
  logic [1:0]    sync;
  logic [CW-1:0] cnt;
  logic [2:0]    bit_idx;
  logic [7:0]    shreg;
  logic          push;
  logic          fifo_full;

  wire rx = sync[1];

  always_ff @(posedge clk) begin
    if (rst) begin
      sync        <= 2'b11;
      state       <= S_IDLE;
      cnt         <= '0;
      bit_idx     <= '0;
      shreg       <= '0;
      push        <= 1'b0;
      frame_error <= 1'b0;
    end else begin
      sync        <= {sync[0], rxd};
      push        <= 1'b0;
      frame_error <= 1'b0;
      case (state)
        S_IDLE: if (!rx) begin
          state <= S_START;
          cnt   <= CW'(HALF - 1);
        end
        S_START: if (cnt == 0) begin
          if (!rx) begin
            state   <= S_DATA;
            cnt     <= CW'(DIV - 1);
            bit_idx <= '0;
          end else begin
            state <= S_IDLE;          // glitch, not a start bit
          end
        end else cnt <= cnt - 1'b1;
        S_DATA: if (cnt == 0) begin
          shreg <= {rx, shreg[7:1]};
          cnt   <= CW'(DIV - 1);
          if (bit_idx == 3'd7) state <= S_STOP;
          bit_idx <= bit_idx + 1'b1;
        end else cnt <= cnt - 1'b1;
        S_STOP: if (cnt == 0) begin
          state <= S_IDLE;
          if (rx) push <= 1'b1;
          else    frame_error <= 1'b1;
        end else cnt <= cnt - 1'b1;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign overrun = push && fifo_full;

  sync_fifo #(.WIDTH(8), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk     (clk),
    .rst     (rst),
    .wr_en   (push),
    .wr_data (shreg),
    .full    (fifo_full),
    .rd_en   (rd_en),
    .rd_data (rd_data),
    .empty   (empty)
  );

endmodule
