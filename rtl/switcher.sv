// switcher: decides who owns the board switches and the UART.
//
// After reset the circuit is in pass mode: the switcher itself drains the
// receive FIFO (sw_rx_read) and the board's own switches drive the user
// circuit, so the user design behaves as if the I/O circuit were absent. It
// watches every character leaving the receive FIFO (rx_pop, rx_data) in both
// modes. When a 'V' is followed by an 'X' (the request for a board-specific
// response) it queues the two-character RESPONSE. Sending it needs the
// sender: in translate mode the switcher raises hold, waits for the generator
// to finish its current command (gen_idle) and then owns the sender
// (own_tx) until both characters are written. Once the first response has
// been written the mode becomes translate and stays there until reset.
//
// Following the platform description: the "VX" trigger, pass-through before it and the
// translator taking over after it. This design's own choices: the response
// text (the description gives no content), answering every later "VX" too, and
// never returning to pass mode short of a reset.
module switcher
  import io_pkg::*;
#(
  parameter logic [15:0] RESPONSE = "VN"   // first character in the upper byte
) (
  input  logic       clk,
  input  logic       rst,
  // receive side
  input  logic [7:0] rx_data,
  input  logic       rx_empty,
  input  logic       rx_pop,      // a character is read this cycle (after the muxes)
  output logic       sw_rx_read,  // the switcher's own read, used in pass mode
  // send side
  input  logic       tx_full,
  output logic [7:0] sw_tx_data,
  output logic       sw_tx_write,
  output logic       own_tx,      // the switcher's port drives the sender
  // coordination with the generator
  input  logic       gen_idle,
  output logic       hold,        // asks the generator not to start a command
  output mode_e      mode
);
  logic after_v;      // the last character read was 'V'
  logic pending;      // a response is waiting to be written
  logic second;       // the first response character is already written
  logic new_req;      // "VX" completes this cycle

  assign new_req     = rx_pop && after_v && (rx_data == CH_REQ_ID);
  assign sw_rx_read  = (mode == MODE_PASS) && !rx_empty;
  assign hold        = pending;
  assign own_tx      = (mode == MODE_PASS) || (pending && gen_idle);
  assign sw_tx_data  = second ? RESPONSE[7:0] : RESPONSE[15:8];
  assign sw_tx_write = pending && own_tx && !tx_full;

  always_ff @(posedge clk) begin
    if (rst) begin
      mode    <= MODE_PASS;
      after_v <= 1'b0;
      pending <= 1'b0;
      second  <= 1'b0;
    end else begin
      if (rx_pop) after_v <= (rx_data == CH_REQ);
      if (sw_tx_write) second <= !second;
      if (sw_tx_write && second) begin
        pending <= new_req;          // a request arriving right now is kept
        mode    <= MODE_TRANSLATE;
      end else if (new_req) begin
        pending <= 1'b1;
      end
    end
  end

  // The switcher never writes while the generator is mid-command.
  assert property (@(posedge clk) disable iff (rst) sw_tx_write |-> own_tx);
  assert property (@(posedge clk) disable iff (rst)
                   (mode == MODE_TRANSLATE && own_tx) |-> gen_idle);

endmodule
