// generator: the sending half of the I/O translator.
//
// It keeps a copy of what the controller board is supposed to show (known),
// with a flag per bit saying whether that copy is trustworthy (known_ok). Its
// samplers give the current, stabilised state of the user circuit's outputs:
// 4 digits x 8 segments from seg_sampler and 8 LEDs from led_sampler, 40 bits
// in all. Whenever some bit differs from the copy, or is not trustworthy, the
// generator picks the lowest such bit, writes its two-character command
// (select '0'..'3' or '4', then 'A'..'H' for on or 'a'..'h' for off) into the
// sender, and updates that bit of the copy. It repeats until both agree.
//
// All flags are cleared while disabled (pass mode) and on resend (a "VZ"
// from the other side), so on entering translate mode, and after each resend
// request, all 40 values go out. A new command starts only when enable is
// high and hold is low; idle tells the switcher that no command is half
// written, so it can borrow the sender between commands.
//
// Timing: from IDLE, one clock to pick a bit, then one character per clock as
// long as the sender has room. A change on the outputs reaches the command
// stream within one sampling period of its sampler plus the queueing behind
// earlier commands. Picking one differing segment at a time and the 100/500 Hz
// samplers follow the platform description; the lowest-index-first order, the flags and
// always sending both characters of a command are this design's choices.
module generator
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
  input  logic                  resend,
  // user circuit outputs
  input  logic [NUM_DIGITS-1:0] an,
  input  logic [NUM_SEGS-1:0]   seg,
  input  logic [NUM_LEDS-1:0]   led,
  // sender port
  input  logic                  tx_full,
  output logic [7:0]            tx_data,
  output logic                  tx_write,
  output logic                  idle
);
  typedef enum logic [1:0] {G_IDLE, G_SELECT, G_ACTION} gstate_e;

  logic [NUM_DIGITS-1:0][NUM_SEGS-1:0] picture;
  logic [NUM_LEDS-1:0]                 led_s;

  seg_sampler #(.CLK_HZ(CLK_HZ), .SAMPLE_HZ(SEG_SAMPLE_HZ), .ACTIVE_LOW(SEG_ACTIVE_LOW)) u_seg (
    .clk (clk), .rst (rst), .an (an), .seg (seg), .picture (picture), .tick ()
  );

  led_sampler #(.CLK_HZ(CLK_HZ), .SAMPLE_HZ(LED_SAMPLE_HZ),
                .THRESHOLD_PCT(LED_THRESHOLD_PCT)) u_led (
    .clk (clk), .rst (rst), .led (led), .sampled (led_s), .tick ()
  );

  logic [NUM_OUT-1:0] current, known, known_ok, differ;
  logic [5:0]         pick;
  logic               any;
  gstate_e            state;
  logic [5:0]         idx;
  logic               val;

  assign current = {led_s, picture};
  assign differ  = ~known_ok | (known ^ current);

  // lowest differing bit
  always_comb begin
    any  = 1'b0;
    pick = '0;
    for (int i = NUM_OUT - 1; i >= 0; i--) begin
      if (differ[i]) begin
        any  = 1'b1;
        pick = 6'(i);
      end
    end
  end

  assign idle     = (state == G_IDLE);
  assign tx_write = (state != G_IDLE) && !tx_full;
  assign tx_data  = (state == G_SELECT) ? select_char(32'(idx)) : action_char(32'(idx), val);

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= G_IDLE;
      known    <= '0;
      known_ok <= '0;
      idx      <= '0;
      val      <= 1'b0;
    end else begin
      case (state)
        G_IDLE: if (enable && !hold && any) begin
          idx   <= pick;
          val   <= current[pick];
          state <= G_SELECT;
        end
        G_SELECT: if (!tx_full) state <= G_ACTION;
        G_ACTION: if (!tx_full) begin
          known[idx]    <= val;
          known_ok[idx] <= 1'b1;
          state         <= G_IDLE;
        end
        default: state <= G_IDLE;
      endcase
      // forget everything while disabled or when asked to resend
      if (!enable || resend) known_ok <= '0;
    end
  end

endmodule
