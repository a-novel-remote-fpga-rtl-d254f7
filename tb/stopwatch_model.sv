// stopwatch_model: testbench user circuit, a stopwatch counting hundredths of
// a second, like the one used to measure the platform's latency.
//
// While sw[0] is 1 it counts one hundredth every TICK clocks; btn[0] clears
// it. The four seven-segment digits show the 100 s, 10 s, 1 s and 0.1 s
// places (digit 3 leftmost), scanned one digit every SCAN clocks with active-
// low anodes and segments (seg[0..6] = a..g, seg[7] = decimal point, lit
// after the 1 s digit). The LED array shows the 0.1 s digit in Gray code on
// led[7:4] and the 0.01 s digit in Gray code on led[3:0]. hundredths is the
// count itself, for the testbench to compare against.
module stopwatch_model #(
  parameter int unsigned TICK = 1_000_000,
  parameter int unsigned SCAN = 100_000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [7:0]  sw,
  input  logic [2:0]  btn,
  output logic [3:0]  an,
  output logic [7:0]  seg,
  output logic [7:0]  led,
  output int unsigned hundredths
);
  int unsigned div = 0, scan_cnt = 0;
  logic [1:0] digit = 0;

  function automatic logic [6:0] decode(input int unsigned v);
    case (v)            // gfedcba
      0: return 7'b0111111;
      1: return 7'b0000110;
      2: return 7'b1011011;
      3: return 7'b1001111;
      4: return 7'b1100110;
      5: return 7'b1101101;
      6: return 7'b1111101;
      7: return 7'b0000111;
      8: return 7'b1111111;
      default: return 7'b1101111;
    endcase
  endfunction

  function automatic logic [3:0] gray(input int unsigned v);
    return 4'(v ^ (v >> 1));
  endfunction

  function automatic int unsigned place(input int unsigned d);
    // digit 0 = 0.1 s, 1 = 1 s, 2 = 10 s, 3 = 100 s
    case (d)
      0: return (hundredths / 10) % 10;
      1: return (hundredths / 100) % 10;
      2: return (hundredths / 1000) % 10;
      default: return (hundredths / 10000) % 10;
    endcase
  endfunction

  always @(posedge clk) begin
    if (rst || btn[0]) begin
      hundredths <= 0;
      div <= 0;
    end else if (sw[0]) begin
      if (div == TICK - 1) begin
        div <= 0;
        hundredths <= hundredths + 1;
      end else div <= div + 1;
    end
    if (scan_cnt == SCAN - 1) begin
      scan_cnt <= 0;
      digit <= digit + 1;
    end else scan_cnt <= scan_cnt + 1;
  end

  assign an  = ~(4'b1 << digit);
  assign seg = ~{digit == 2'd1, decode(place(digit))};
  assign led = {gray((hundredths / 10) % 10), gray(hundredths % 10)};
endmodule
