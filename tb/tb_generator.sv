// tb_generator: self-checking test of the generator.
//
// A user-circuit stand-in scans a 4-digit display (active low, 5 clocks per
// digit) and drives 8 LEDs. A controller-board model decodes the command
// stream the generator writes into a sender that is randomly full, and keeps
// its own picture of the 40 output bits. Checks: nothing is sent while
// disabled; on enabling, exactly 40 commands bring the model up to date;
// later changes cost exactly one command per changed bit; resend makes all 40
// go out again; hold stops new commands and leaves the generator idle; every
// command is a valid select character followed by a valid action character.
module tb_generator;
  import io_pkg::*;
  localparam int unsigned CLK_HZ = 10_000;

  logic clk = 1'b0, rst = 1'b1;
  logic enable = 1'b0, hold = 1'b0, resend = 1'b0;
  logic [3:0] an;
  logic [7:0] seg, led = '0;
  logic tx_full = 1'b0;
  logic [7:0] tx_data;
  logic tx_write, idle;
  int checks = 0, failures = 0;

  generator #(.CLK_HZ(CLK_HZ), .SEG_SAMPLE_HZ(100), .LED_SAMPLE_HZ(500),
              .LED_THRESHOLD_PCT(50), .SEG_ACTIVE_LOW(1'b1)) dut (.*);

  always #5 clk = ~clk;

  // user circuit stand-in
  logic [3:0][7:0] digits = '0;
  int scan = 0;
  always @(posedge clk) scan <= (scan + 1) % 20;
  assign an  = ~(4'b1 << (scan / 5));
  assign seg = ~digits[scan / 5];

  // controller-board model
  logic [39:0] board = '0;
  int cmds = 0, bad = 0, writes = 0;
  logic [7:0] sel_c;
  bit have_sel = 0;
  always @(posedge clk) begin
    tx_full <= ($urandom_range(0, 3) == 0);
    if (tx_write && !tx_full && !rst) begin
      writes++;
      if (!have_sel) begin
        sel_c = tx_data;
        have_sel = 1;
        if (!(tx_data >= "0" && tx_data <= "4")) bad++;
      end else begin
        have_sel = 0;
        cmds++;
        if (tx_data >= "A" && tx_data <= "H")
          board[(sel_c - "0") * 8 + (tx_data - "A")] = 1'b1;
        else if (tx_data >= "a" && tx_data <= "h")
          board[(sel_c - "0") * 8 + (tx_data - "a")] = 1'b0;
        else bad++;
      end
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [39:0] want();
    return {led, digits};
  endfunction

  task automatic settle();
    // two sampling periods of the slower sampler plus sending time
    repeat (400) @(posedge clk);
    wait (idle);
    repeat (200) @(posedge clk);
    wait (idle && !have_sel);
  endtask

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [39:0] prev_state, next_state;
    int c0, nchg;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    digits = {$urandom};
    led = 8'($urandom);
    repeat (300) @(posedge clk);
    check(writes == 0, "nothing sent while disabled");

    #1 enable = 1'b1;
    settle();
    check(cmds == 40, $sformatf("full state on enable: %0d commands", cmds));
    check(board == want(), "board up to date next_state enable");

    for (int r = 0; r < 20; r++) begin
      prev_state = want();
      for (int i = 0; i < 1 + r % 4; i++) begin
        automatic int b = $urandom_range(0, 39);
        if (b < 32) digits[b / 8][b % 8] = ~digits[b / 8][b % 8];
        else led[b - 32] = ~led[b - 32];
      end
      next_state = want();
      nchg = $countones(prev_state ^ next_state);
      c0 = cmds;
      settle();
      check(cmds - c0 == nchg, $sformatf("round %0d: %0d commands for %0d changes", r, cmds - c0, nchg));
      check(board == want(), $sformatf("round %0d: board %010h vs %010h", r, board, want()));
    end

    // resend request
    c0 = cmds;
    @(posedge clk);
    #1 resend = 1'b1;
    @(posedge clk);
    #1 resend = 1'b0;
    settle();
    check(cmds - c0 == 40, $sformatf("resend: %0d commands", cmds - c0));

    // hold
    wait (idle);
    #1 hold = 1'b1;
    c0 = writes;
    led = ~led;
    repeat (300) @(posedge clk);
    check(writes == c0 && idle, "no command starts while held");
    #1 hold = 1'b0;
    settle();
    check(board == want(), "board up to date next_state hold");
    check(bad == 0, "all characters valid");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
