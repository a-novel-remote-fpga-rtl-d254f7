// sw_checker: the receiving half of the I/O translator.
//
// Holds the switch state the user circuit sees in translate mode: eight slide
// switches and three tactile switches. While enabled it reads every character
// the receive FIFO offers (rx_read = enable && !rx_empty). 'I'..'P' select
// slide switch 0..7 and 'Q'..'S' tactile switch 0..2; 'U' then sets the
// selected switch to 1 and 'u' clears it. A 'V' followed by 'Z' pulses
// resend for one cycle, asking the generator to send every LED value again.
// A 'V' followed by anything is consumed as a request, not as a switch
// command; other characters are ignored.
//
// Timing: a switch changes on the clock edge that reads its 'U'/'u', and the
// new value is on sw_state/btn_state the cycle after. One character per clock.
// The command characters and the set/clear behaviour follow the platform description.
// Reset values (all switches 0, nothing selected) and a selection that stays
// until the next select character are this design's choices.
module sw_checker
  import io_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 enable,
  input  logic [7:0]           rx_data,
  input  logic                 rx_empty,
  output logic                 rx_read,
  output logic [NUM_SLIDE-1:0] sw_state,
  output logic [NUM_TACT-1:0]  btn_state,
  output logic                 resend
);
  logic       sel_valid;
  logic [3:0] sel;          // 0..7 slide switches, 8..10 tactile switches
  logic       after_v;

  localparam char_t SLIDE_LAST = CH_SLIDE0 + char_t'(NUM_SLIDE - 1);
  localparam char_t TACT_LAST  = CH_TACT0 + char_t'(NUM_TACT - 1);

  assign rx_read = enable && !rx_empty;

  always_ff @(posedge clk) begin
    if (rst) begin
      sw_state  <= '0;
      btn_state <= '0;
      sel_valid <= 1'b0;
      sel       <= '0;
      after_v   <= 1'b0;
      resend    <= 1'b0;
    end else begin
      resend <= 1'b0;
      if (rx_read) begin
        after_v <= 1'b0;
        if (after_v) begin
          if (rx_data == CH_REQ_RS) resend <= 1'b1;
        end else if (rx_data == CH_REQ) begin
          after_v <= 1'b1;
        end else if (rx_data >= CH_SLIDE0 && rx_data <= SLIDE_LAST) begin
          sel_valid <= 1'b1;
          sel       <= 4'(rx_data - CH_SLIDE0);
        end else if (rx_data >= CH_TACT0 && rx_data <= TACT_LAST) begin
          sel_valid <= 1'b1;
          sel       <= 4'(rx_data - CH_TACT0) + 4'(NUM_SLIDE);
        end else if ((rx_data == CH_SW_ON || rx_data == CH_SW_OFF) && sel_valid) begin
          if (sel < 4'(NUM_SLIDE)) sw_state[sel[2:0]] <= (rx_data == CH_SW_ON);
          else                 btn_state[2'(sel - 4'(NUM_SLIDE))] <= (rx_data == CH_SW_ON);
        end
      end
    end
  end

endmodule
