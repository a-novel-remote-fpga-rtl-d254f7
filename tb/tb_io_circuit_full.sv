// tb_io_circuit_full: the I/O circuit at its default parameters (100 MHz
// clock, 115,200 bps, 100 Hz and 500 Hz samplers) running the stopwatch
// latency experiment.
//
// The user circuit is a stopwatch counting hundredths of a second; the far
// end of the link is a controller-board model. The run: "VX" and its
// response, the full initial state, "IU" to start the stopwatch, 140 ms of
// counting, "Iu" to stop it. For every hundredth the test measures the time
// from the stopwatch changing to the board model's LED array (right half,
// Gray-coded hundredths) showing the new value, and checks it stays below
// the bound the circuit allows: two LED sampling periods (4 ms) plus the
// commands queued ahead (at most 1.5 ms). At the end the board model must
// mirror the stopped stopwatch exactly.
module tb_io_circuit_full;
  localparam int unsigned CLK_HZ = 100_000_000;
  localparam int unsigned DIV    = 868;               // 100 MHz / 115,200 bps
  localparam int unsigned TICK   = CLK_HZ / 100;
  localparam int unsigned BOUND  = CLK_HZ / 1000 * 55 / 10;   // 5.5 ms

  logic clk = 1'b0, rst = 1'b1;
  logic rxd, txd;
  logic [7:0] board_sw = '0;
  logic [2:0] board_btn = '0;
  logic [3:0] an, user_an;
  logic [7:0] seg, led, user_seg, user_led;
  logic [7:0] user_sw;
  logic [2:0] user_btn;
  logic translating, rx_frame_error, rx_overrun;
  int unsigned hundredths;
  int checks = 0, failures = 0;

  io_circuit dut (.*);
  stopwatch_model #(.TICK(TICK), .SCAN(CLK_HZ / 1000)) watch (
    .clk (clk), .rst (rst), .sw (user_sw), .btn (user_btn),
    .an (user_an), .seg (user_seg), .led (user_led), .hundredths (hundredths)
  );
  board_model #(.DIV(DIV)) remote (.clk(clk), .tx(rxd), .rx(txd));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [6:0] decode(input int unsigned v);
    case (v)
      0: return 7'h3F; 1: return 7'h06; 2: return 7'h5B; 3: return 7'h4F; 4: return 7'h66;
      5: return 7'h6D; 6: return 7'h7D; 7: return 7'h07; 8: return 7'h7F; default: return 7'h6F;
    endcase
  endfunction

  function automatic logic [3:0] gray(input int unsigned v);
    return 4'(v ^ (v >> 1));
  endfunction

  function automatic logic [39:0] expected();
    logic [3:0][7:0] d;
    int unsigned h = hundredths;
    d[0] = {1'b0, decode((h / 10) % 10)};
    d[1] = {1'b1, decode((h / 100) % 10)};
    d[2] = {1'b0, decode((h / 1000) % 10)};
    d[3] = {1'b0, decode((h / 10000) % 10)};
    return {gray((h / 10) % 10), gray(h % 10), d};
  endfunction

  // latency of the hundredths LEDs
  longint change_at = 0, lat_max = 0, lat_sum = 0;
  int unsigned lat_n = 0, shown = 0, counting = 0;
  bit pending = 0;
  always @(posedge clk) begin
    if (hundredths != shown && !pending && counting != 0) begin
      change_at <= remote.line.cycle;
      pending   <= 1;
      shown     <= hundredths;
    end else if (pending && remote.leds[3:0] == gray(shown % 10)) begin
      lat_sum += remote.line.cycle - change_at;
      if (remote.line.cycle - change_at > lat_max) lat_max = remote.line.cycle - change_at;
      lat_n++;
      pending <= 0;
    end
  end

  initial begin
    repeat (25_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5) @(posedge clk);
    #1 rst = 1'b0;
    remote.send_str("VX");
    repeat (4 * 10 * DIV) @(posedge clk);
    check(translating, "translate mode after VX");
    check(remote.other.size() == 2 && remote.other[0] == "V" && remote.other[1] == "N",
          "board-specific response");
    // 80 characters of initial state take about 0.7 ms at 115,200 bps
    repeat (2 * TICK) @(posedge clk);
    // at least all 40 values, plus the digits the display sampler picks up later
    check(remote.cmds >= 40, $sformatf("initial state: %0d commands", remote.cmds));
    check({remote.leds, remote.segs} == expected(), "board mirrors the stopwatch before it starts");
    // start at a random phase of the samplers
    repeat ($urandom_range(0, CLK_HZ / 500)) @(posedge clk);
    counting = 1;
    remote.send_str("IU");
    repeat (14 * TICK) @(posedge clk);
    remote.send_str("Iu");
    counting = 0;
    repeat (3 * TICK) @(posedge clk);
    check(hundredths >= 5, $sformatf("stopwatch counted %0d hundredths", hundredths));
    check({remote.leds, remote.segs} == expected(),
          $sformatf("board %010h vs stopwatch %010h", {remote.leds, remote.segs}, expected()));
    check(lat_n >= 12, $sformatf("%0d LED changes measured", lat_n));
    check(lat_max <= BOUND, $sformatf("worst LED latency %0d clocks", lat_max));
    if (lat_n > 0)
      $display("LED latency: mean %0d us, worst %0d us over %0d changes",
               lat_sum / lat_n / 100, lat_max / 100, lat_n);
    check(!rx_frame_error && !rx_overrun && remote.line.stop_errors == 0, "clean link");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
