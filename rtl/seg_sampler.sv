// seg_sampler: turns the time-multiplexed seven-segment drive of the user
// circuit into a steady per-digit picture, refreshed SAMPLE_HZ times a second.
//
// The user circuit lights one digit at a time: an anode selects the digit and
// the segment lines carry its pattern. For each digit the sampler keeps the
// segment pattern seen the last time that digit's anode was active, and
// whether it was active at all in the current sampling period. At the end of
// each period (every CLK_HZ/SAMPLE_HZ clocks) the picture is updated: a digit
// that was driven shows its last pattern, a digit that was never driven shows
// blank. Between updates the picture does not move, so a steadily scanned
// display produces a constant picture and no commands.
//
// Interface: an and seg straight from the user circuit (active low when
// ACTIVE_LOW is 1, as on the Nexys A7), seg[0..6] = segments a..g, seg[7] =
// decimal point. picture[d][s] is 1 when segment s of digit d is lit.
// Timing: picture changes at most once per period, one clock after the
// period's last cycle. The 100 Hz rate and the idea of tracking the
// appearance follow the platform description; the last-pattern rule is this design's
// reading of it.
module seg_sampler
  import io_pkg::*;
#(
  parameter int unsigned CLK_HZ     = 100_000_000,
  parameter int unsigned SAMPLE_HZ  = 100,
  parameter bit          ACTIVE_LOW = 1'b1
) (
  input  logic                               clk,
  input  logic                               rst,
  input  logic [NUM_DIGITS-1:0]              an,
  input  logic [NUM_SEGS-1:0]                seg,
  output logic [NUM_DIGITS-1:0][NUM_SEGS-1:0] picture,
  output logic                               tick     // last cycle of a period
);
  localparam int unsigned PERIOD = CLK_HZ / SAMPLE_HZ;
  localparam int unsigned CW     = $clog2(PERIOD);

  logic [CW-1:0]                       cnt;
  logic [NUM_DIGITS-1:0][NUM_SEGS-1:0] last;
  logic [NUM_DIGITS-1:0]               seen;
  logic [NUM_DIGITS-1:0]               an_on;
  logic [NUM_SEGS-1:0]                 seg_on;

  assign an_on  = ACTIVE_LOW ? ~an  : an;
  assign seg_on = ACTIVE_LOW ? ~seg : seg;
  assign tick   = (cnt == CW'(PERIOD - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt     <= '0;
      last    <= '0;
      seen    <= '0;
      picture <= '0;
    end else begin
      cnt <= tick ? '0 : cnt + 1'b1;
      for (int d = 0; d < NUM_DIGITS; d++) begin
        if (tick) begin
          // close the period, counting this last cycle too
          picture[d] <= an_on[d] ? seg_on : (seen[d] ? last[d] : '0);
          seen[d]    <= 1'b0;
        end else if (an_on[d]) begin
          seen[d] <= 1'b1;
        end
        if (an_on[d]) last[d] <= seg_on;
      end
    end
  end

endmodule
