// tb_io_circuit: end-to-end test of the I/O circuit at a reduced clock.
//
// The user circuit is a stopwatch model; the far end of the UART is a
// controller-board model. The run walks through the circuit's mechanisms and
// counts each one; a mechanism that never happens counts as a failure:
//   pass      - before "VX" the board's own switch starts the stopwatch and
//               characters other than "VX" get no answer
//   vx        - "VX" is answered with the board response and switches modes
//   fullsend  - after the switch the whole display and LED state is sent
//   backpress - the send FIFO fills up (Full) during that burst
//   switch    - slide and tactile switch commands drive the user circuit
//   mirror    - after the stopwatch stops, the model's display and LEDs equal
//               what the stopwatch shows
//   quiet     - a steady, scanned display causes no commands
//   pwm       - PWM-dimmed LEDs come out by the 50 % duty threshold
//   resend    - "VZ" makes all 40 values go out again
//   vx_again  - a "VX" in translate mode is answered while commands flow
// The clock is 1.6 MHz and the link 100 kbaud (16 clocks per bit); the
// sampling rates are the design's defaults, 100 Hz and 500 Hz.
module tb_io_circuit;
  localparam int unsigned CLK_HZ = 1_600_000;
  localparam int unsigned BAUD   = 100_000;
  localparam int unsigned DIV    = CLK_HZ / BAUD;
  localparam int unsigned TICK   = CLK_HZ / 100;       // one hundredth of a second
  localparam int unsigned SEG_P  = CLK_HZ / 100;       // seven-segment sampling period
  localparam int unsigned LED_P  = CLK_HZ / 500;       // LED sampling period

  logic clk = 1'b0, rst = 1'b1;
  logic rxd, txd;
  logic [7:0] board_sw = '0;
  logic [2:0] board_btn = '0;
  logic [3:0] an, user_an;
  logic [7:0] seg, led, user_seg, user_led, sw_led;
  logic [7:0] user_sw;
  logic [2:0] user_btn;
  logic translating, rx_frame_error, rx_overrun;
  int unsigned hundredths;
  int checks = 0, failures = 0;

  io_circuit #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) dut (.*);
  stopwatch_model #(.TICK(TICK), .SCAN(400)) watch (
    .clk (clk), .rst (rst), .sw (user_sw), .btn (user_btn),
    .an (user_an), .seg (user_seg), .led (sw_led), .hundredths (hundredths)
  );
  board_model #(.DIV(DIV)) remote (.clk(clk), .tx(rxd), .rx(txd));

  // PWM stage: LEDs 0-3 at 25 % duty, 4-7 at 75 %, 8-clock PWM period
  bit pwm_on = 0;
  int pwm_phase = 0;
  always @(posedge clk) pwm_phase <= (pwm_phase + 1) % 8;
  assign user_led = pwm_on ? {{4{pwm_phase < 6}}, {4{pwm_phase < 2}}} : sw_led;

  always #5 clk = ~clk;

  int n_pass = 0, n_vx = 0, n_fullsend = 0, n_backpress = 0, n_switch = 0;
  int n_mirror = 0, n_quiet = 0, n_pwm = 0, n_resend = 0, n_vx_again = 0;
  always @(posedge clk) if (translating && dut.tx_full) n_backpress++;

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

  // what the controller board should show for the current count
  function automatic logic [39:0] expected();
    logic [3:0][7:0] d;
    int unsigned h = hundredths;
    d[0] = {1'b0, decode((h / 10) % 10)};
    d[1] = {1'b1, decode((h / 100) % 10)};
    d[2] = {1'b0, decode((h / 1000) % 10)};
    d[3] = {1'b0, decode((h / 10000) % 10)};
    return {gray((h / 10) % 10), gray(h % 10), d};
  endfunction

  task automatic wait_quiet(input int unsigned clocks);
    // wait until no command has arrived for `clocks` clocks
    do repeat (clocks) @(posedge clk);
    while (remote.line.cycle - remote.last_cmd < clocks || remote.line.got.size() > 0);
  endtask

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned h0;
    int c0;
    repeat (5) @(posedge clk);
    #1 rst = 1'b0;

    // pass mode
    remote.send_str("IUVQ4A");
    board_sw[0] = 1'b1;
    repeat (3 * TICK) @(posedge clk);
    check(!translating, "still in pass mode");
    check(hundredths >= 2, "board switch runs the stopwatch in pass mode");
    check(remote.other.size() == 0 && remote.cmds == 0, "nothing sent in pass mode");
    if (!translating && hundredths >= 2) n_pass++;
    #1 board_btn[0] = 1'b1;                // clear the count with the board's button
    @(posedge clk);
    #1 board_btn[0] = 1'b0;
    board_sw[0] = 1'b0;

    // the request
    remote.send_str("VX");
    repeat (4 * 10 * DIV) @(posedge clk);
    check(translating, "translate mode after VX");
    check(remote.other.size() == 2 && remote.other[0] == "V" && remote.other[1] == "N",
          "board-specific response");
    if (translating && remote.other.size() == 2) n_vx++;
    void'(remote.other.pop_front());
    void'(remote.other.pop_front());
    wait_quiet(3 * SEG_P);
    check(remote.cmds == 40, $sformatf("full state after the switch: %0d commands", remote.cmds));
    check({remote.leds, remote.segs} == expected(), "board mirrors the display after the switch");
    if (remote.cmds == 40) n_fullsend++;
    check(user_sw[0] == 1'b0, "board switch no longer reaches the user circuit");

    // switches over the link: run the stopwatch for a while
    remote.send_str("IU");
    repeat (20 * DIV) @(posedge clk);
    check(user_sw == 8'h01, "slide switch 0 on over the link");
    repeat (25 * TICK) @(posedge clk);
    remote.send_str("Iu");
    h0 = hundredths;
    check(h0 >= 24 && h0 <= 27, $sformatf("stopwatch ran %0d hundredths", h0));
    if (user_sw == 8'h00 && h0 > 0) n_switch++;
    wait_quiet(3 * SEG_P);
    check({remote.leds, remote.segs} == expected(),
          $sformatf("board %010h vs stopwatch %010h", {remote.leds, remote.segs}, expected()));
    if ({remote.leds, remote.segs} == expected()) n_mirror++;

    // a scanned but steady display sends nothing
    c0 = remote.cmds;
    repeat (5 * SEG_P) @(posedge clk);
    check(remote.cmds == c0, "no commands for a steady display");
    if (remote.cmds == c0) n_quiet++;

    // tactile switch clears the stopwatch
    remote.send_str("QUQu");
    wait_quiet(3 * SEG_P);
    check(hundredths == 0, "tactile switch 0 cleared the stopwatch");
    check({remote.leds, remote.segs} == expected(), "board shows the cleared stopwatch");
    if (hundredths == 0) n_switch++;

    // PWM-dimmed LEDs
    pwm_on = 1;
    wait_quiet(4 * LED_P);
    check(remote.leds == 8'hF0, $sformatf("PWM LEDs thresholded: %02h", remote.leds));
    if (remote.leds == 8'hF0) n_pwm++;
    pwm_on = 0;
    wait_quiet(4 * LED_P);

    // resend request
    c0 = remote.cmds;
    remote.send_str("VZ");
    wait_quiet(3 * SEG_P);
    check(remote.cmds - c0 == 40, $sformatf("resend: %0d commands", remote.cmds - c0));
    if (remote.cmds - c0 == 40) n_resend++;

    // a request in translate mode while the stopwatch runs and commands flow
    remote.send_str("IU");
    repeat (3 * TICK) @(posedge clk);
    remote.send_str("VX");
    repeat (10 * TICK) @(posedge clk);
    remote.send_str("Iu");
    wait_quiet(3 * SEG_P);
    check(remote.other.size() == 2 && remote.other[0] == "V" && remote.other[1] == "N",
          "second response");
    if (remote.other.size() == 2) n_vx_again++;
    check({remote.leds, remote.segs} == expected(), "board mirrors the stopwatch at the end");
    check(!rx_frame_error && !rx_overrun && remote.line.stop_errors == 0, "clean link");

    $display("mechanisms: pass=%0d vx=%0d fullsend=%0d backpress=%0d switch=%0d mirror=%0d quiet=%0d pwm=%0d resend=%0d vx_again=%0d",
             n_pass, n_vx, n_fullsend, n_backpress, n_switch, n_mirror, n_quiet, n_pwm, n_resend, n_vx_again);
    check(n_pass > 0 && n_vx > 0 && n_fullsend > 0 && n_backpress > 0 && n_switch > 0 &&
          n_mirror > 0 && n_quiet > 0 && n_pwm > 0 && n_resend > 0 && n_vx_again > 0,
          "every mechanism happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
