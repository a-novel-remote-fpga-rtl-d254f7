// io_pkg: constants and helpers shared by the remote-lab I/O circuit.
//
// The I/O circuit sits next to a student's design in the FPGA and talks to a
// remote controller board over a UART. Both sides exchange two-character ASCII
// command strings: a select character followed by an action character.
//   '0'..'3'  select a digit of the 4-digit seven-segment display
//   '4'       select the array of eight LEDs
//   'A'..'H'  turn on segment/LED 0..7 of the selection, 'a'..'h' turn it off
//   'I'..'P'  select slide switch 0..7
//   'Q'..'S'  select tactile switch 0..2
//   'U' / 'u' turn the selected switch on / off
//   "VX"      request for a board-specific response
//   "VZ"      request to resend every LED value
// The command alphabet and the I/O counts follow the published platform. The
// bit order inside the vectors (index 0 = 'A', 'I', 'Q', digit '0') is this
// design's own choice.
package io_pkg;

  localparam int unsigned NUM_DIGITS = 4;  // seven-segment digits on the controller board
  localparam int unsigned NUM_SEGS   = 8;  // segments a..g and the decimal point
  localparam int unsigned NUM_LEDS   = 8;  // LED array
  localparam int unsigned NUM_SLIDE  = 8;  // slide switches
  localparam int unsigned NUM_TACT   = 3;  // tactile switches
  // Every output bit the controller board mirrors: 4 digits x 8 segments, then 8 LEDs.
  localparam int unsigned NUM_OUT    = NUM_DIGITS * NUM_SEGS + NUM_LEDS;

  typedef logic [7:0] char_t;

  localparam char_t CH_DIGIT0 = "0";
  localparam char_t CH_LEDS   = "4";
  localparam char_t CH_ON0    = "A";
  localparam char_t CH_OFF0   = "a";
  localparam char_t CH_SLIDE0 = "I";
  localparam char_t CH_TACT0  = "Q";
  localparam char_t CH_SW_ON  = "U";
  localparam char_t CH_SW_OFF = "u";
  localparam char_t CH_REQ    = "V";
  localparam char_t CH_REQ_ID = "X";
  localparam char_t CH_REQ_RS = "Z";

  // Operating mode of the I/O circuit, chosen by the switcher.
  typedef enum logic {
    MODE_PASS      = 1'b0,  // board switches drive the user circuit directly
    MODE_TRANSLATE = 1'b1   // the I/O translator owns the switches and the UART
  } mode_e;

  // Select character for output bit `idx` (0..NUM_OUT-1).
  function automatic char_t select_char(input int unsigned idx);
    if (idx < NUM_DIGITS * NUM_SEGS) return CH_DIGIT0 + char_t'(idx / NUM_SEGS);
    return CH_LEDS;
  endfunction

  // Action character that sets output bit `idx` to `on`.
  function automatic char_t action_char(input int unsigned idx, input logic on);
    return (on ? CH_ON0 : CH_OFF0) + char_t'(idx % NUM_SEGS);
  endfunction

endpackage
